// tb_dsg_dsm3: self-checking test of the DSG's third-order 1-bit modulator.
//
// Drives DC levels and a -6 dBFS sine into the modulator and checks
//   * bit-exact agreement of ds with an independent integer model of the
//     loop (gains 1/16, 1/2, 79/64, quantiser on y + w3);
//   * that the bitstream mean follows the DC input within 1e-3 (unity STF);
//   * that clr restarts the loop from zero state (the output after clr must
//     match the model restarted from zero).
`timescale 1ns/1ps
module tb_dsg_dsm3;
  localparam int FRAC = 40;
  logic clk = 0, rst_n = 0, clr = 0;
  logic signed [FRAC+1:0] y = '0;
  logic ds;
  int checks = 0, failures = 0;
  longint m1, m2, m3;                      // model state, scale 2^(FRAC+6)
  localparam longint ONE = 64'sd1 <<< (FRAC + 6);

  dsg_dsm3 #(.FRAC(FRAC)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .y(y), .ds(ds));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t y=%0d m3=%0d", what, $time, y, m3);
    end
  endtask

  function automatic logic model_ds();
    return (longint'(y) * 64 + m3) >= 0;
  endfunction

  task automatic model_step();
    longint e;
    e = longint'(y) * 64 - (model_ds() ? ONE : -ONE);
    m3 = m3 + m2 + ((e * 79) >>> 6);
    m2 = m2 + m1 + (e >>> 1);
    m1 = m1 + (e >>> 4);
  endtask

  // Run n clocks at the present y; return mean of the bitstream (±1).
  task automatic run(input int n, output real mean);
    longint s = 0;
    for (int i = 0; i < n; i++) begin
      #1 check(ds == model_ds(), "ds matches model");
      s += ds ? 1 : -1;
      @(posedge clk);
      model_step();
      @(negedge clk);
    end
    mean = real'(s) / n;
  endtask

  initial begin
    real mean, level;
    m1 = 0; m2 = 0; m3 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      level = (real'($urandom_range(1400)) - 700.0) / 1000.0;     // -0.7 .. 0.7
      y = (FRAC+2)'(longint'(level * real'(64'sd1 <<< FRAC)));
      run(1000, mean);                                             // settle
      run(16384, mean);
      check((mean - level) < 1e-3 && (level - mean) < 1e-3, "bitstream mean follows DC input");
    end
    // sine at -6 dBFS
    for (int i = 0; i < 20000; i++) begin
      y = (FRAC+2)'(longint'(0.5 * $sin(2.0 * 3.14159265 * i / 1000.0) * real'(64'sd1 <<< FRAC)));
      run(1, mean);
    end
    // synchronous clear
    clr = 1;
    @(posedge clk);
    m1 = 0; m2 = 0; m3 = 0;
    @(negedge clk);
    clr = 0;
    y = '0;
    run(2000, mean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
