// tb_pdm_delay: self-checking test of the K-cycle bitstream delay.
//
// Drives a random bitstream and checks that q equals d from exactly K clocks
// earlier, and that q reads 1 (the normal-mode level) for the first K clocks
// after reset.  Uses the default K = 5 (the z^-5 between D_S and D_i1).
`timescale 1ns/1ps
module tb_pdm_delay;
  localparam int K = 5;
  logic clk = 0, rst_n = 0, d = 0, q;
  int checks = 0, failures = 0;
  logic hist[$];

  pdm_delay #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      d = 1'($urandom);
      hist.push_back(d);
      @(negedge clk);
      if (n < K - 1) check(q == 1'b1, "output high after reset");
      else           check(q == hist[hist.size() - K], "q equals d delayed by K");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
