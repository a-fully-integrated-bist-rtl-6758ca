// tb_dsg: self-checking test of the digital sine-wave generator.
//
// Programs the frequency word a21, K (as up to three powers of two close to
// a21) and the initial integrator values for a sine and for a cosine at
// several frequencies and amplitudes, then checks for 60,000 clocks that
//   * y_S(m) follows A*sin(w*m) (or A*cos(w*m)) within 3e-5, where
//     2 - 2^-10*a21 = 2cos(w) is the published frequency relation;
//   * the bitstream D_S tracks y_S: the running sum of (D_S - y_S) stays
//     bounded (the embedded modulator has unity signal transfer);
//   * load restarts the oscillator from the programmed state.
`timescale 1ns/1ps
module tb_dsg;
  import bist_pkg::*;
  localparam int FRAC = 40;
  localparam real PI = 3.14159265358979323846;
  localparam real S40 = 1099511627776.0;     // 2^40
  logic clk = 0, rst_n = 0, load = 0;
  logic [31:0] a21 = '0;
  k_cfg_t k_cfg = '0;
  logic signed [FRAC+5:0] x1_init = '0;
  logic signed [FRAC+1:0] x2_init = '0, ys;
  logic ds;
  int checks = 0, failures = 0;
  real max_err;

  dsg #(.FRAC(FRAC)) dut (.clk(clk), .rst_n(rst_n), .load(load), .a21(a21), .k_cfg(k_cfg),
                          .x1_init(x1_init), .x2_init(x2_init), .ys(ys), .ds(ds));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (max err %g)", what, max_err);
    end
  endtask

  function automatic k_cfg_t k_from_a21(input logic [31:0] a);
    k_cfg_t k = '0;
    real r = real'(a) / 4294967296.0;
    for (int t = 0; t < int'(K_TERMS); t++) begin
      int e;
      if (r == 0.0) break;
      e = int'($floor(-$ln(r < 0.0 ? -r : r) / $ln(2.0) + 0.5));
      if (e > 63) break;
      k[t].en = 1'b1;
      k[t].neg = (r < 0.0);
      k[t].shift = 6'(e);
      r = r - (r < 0.0 ? -1.0 : 1.0) * $pow(2.0, -real'(e));
    end
    return k;
  endfunction

  task automatic tone(input real f, input real amp, input bit cosine);
    real w, wq, e, sum_e, max_sum;
    w = 2.0 * PI * f / 12.288e6;
    a21 = 32'(longint'(4096.0 * $pow($sin(w / 2.0), 2.0) * 4294967296.0));
    wq = $acos(1.0 - real'(a21) / 4294967296.0 / 2048.0);
    k_cfg = k_from_a21(a21);
    if (cosine) begin
      x2_init = (FRAC+2)'(longint'(amp * S40));
      x1_init = (FRAC+6)'(longint'(amp * real'(a21) / 4294967296.0 / 2.0 * S40));
    end else begin
      x2_init = '0;
      x1_init = (FRAC+6)'(longint'(amp * $sin(wq) * 1024.0 * S40));
    end
    load = 1; @(negedge clk); load = 0;
    max_err = 0.0; sum_e = 0.0; max_sum = 0.0;
    for (int m = 0; m < 60000; m++) begin
      real ref_v = cosine ? amp * $cos(wq * m) : amp * $sin(wq * m);
      e = real'(ys) / S40 - ref_v;
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      sum_e += (ds ? 1.0 : -1.0) - real'(ys) / S40;
      if (sum_e > max_sum) max_sum = sum_e;
      if (-sum_e > max_sum) max_sum = -sum_e;
      @(negedge clk);
    end
    $display("tone %0.1f Hz amp %g: max err %g, max run sum %g", f, amp, max_err, max_sum);
    check(max_err < 3e-5, cosine ? "cosine follows A*cos(wm)" : "sine follows A*sin(wm)");
    check(max_sum < 8.0, "D_S tracks y_S (bounded running error)");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    tone(960.9375, 0.5, 1'b0);
    tone(960.9375, 0.5, 1'b1);
    tone(5000.0, 0.708, 1'b0);     // -3 dBFS, top of the published sweep
    tone(19992.0, 0.25, 1'b1);
    tone(300.0, 0.001, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
