// tb_d3t_mut: self-checking test of the behavioural D3T modulator model.
//
// Normal mode (T = 0, D_i0 = D_i1 = 1): a differential input voltage V must
// give an output bitstream whose running sum follows V/(2*V_REF), i.e. the
// running sum of (D_o - V/(2 V_REF)) stays bounded (checked for DC levels
// and a sine).  Digital test mode (T = 1): random D_i0 with D_i1 its 5-clock
// delay must give a bitstream following (D_i0 + D_i1)/2, and the analog input
// must have no effect.
`timescale 1ns/1ps
module tb_d3t_mut;
  localparam real VREF = 1.0;
  logic clk = 0, rst_n = 0, t = 0, di0 = 1, di1 = 1, do_bit;
  real vin = 0.0;
  int checks = 0, failures = 0;
  logic dly[$];

  d3t_mut #(.VREF(VREF)) dut (.clk(clk), .rst_n(rst_n), .t(t), .di0(di0), .di1(di1),
                              .vin(vin), .do_bit(do_bit));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // run n clocks; target(m) is the expected mean of D_o for clock m
  task automatic run_normal(input int n, input real dc, input real amp, output real max_sum);
    real s = 0.0;
    max_sum = 0.0;
    for (int m = 0; m < n; m++) begin
      vin = dc + amp * $sin(2.0 * 3.14159265 * m / 700.0);
      @(negedge clk);
      s += (do_bit ? 1.0 : -1.0) - vin / (2.0 * VREF);
      if (m > 50) max_sum = (s > max_sum) ? s : (-s > max_sum) ? -s : max_sum;
    end
  endtask

  task automatic run_test(input int n, input int pct, output real max_sum);
    real s = 0.0;
    max_sum = 0.0;
    for (int m = 0; m < n; m++) begin
      di0 = ($urandom_range(99) < pct);
      dly.push_back(di0);
      di1 = dly.size() > 5 ? dly[dly.size() - 6] : 1'b1;
      vin = 0.9 * $sin(real'(m));           // must be ignored in test mode
      @(negedge clk);
      s += (do_bit ? 1.0 : -1.0) - ((di0 ? 0.5 : -0.5) + (di1 ? 0.5 : -0.5));
      if (m > 50) max_sum = (s > max_sum) ? s : (-s > max_sum) ? -s : max_sum;
    end
  endtask

  initial begin
    real ms, level;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      level = -1.2 + 0.48 * k;          // -0.6 .. +0.6 of full scale
      run_normal(5000, level, 0.0, ms);
      check(ms < 8.0, "normal mode: output follows DC input");
    end
    run_normal(20000, 0.0, 1.0, ms);
    check(ms < 8.0, "normal mode: output follows -6 dBFS sine");
    t = 1;
    for (int k = 0; k < 4; k++) begin
      run_test(5000, 20 + 20 * k, ms);
      $display("test mode %0d%% ones: max running error %g", 20 + 20 * k, ms);
      // the input jumps between -1, 0 and +1 every clock, so the loop states
      // swing further than with an analog input: allow a larger bound
      check(ms < 16.0, "test mode: output follows (D_i0 + D_i1)/2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
