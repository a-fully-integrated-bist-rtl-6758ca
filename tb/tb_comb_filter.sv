// tb_comb_filter: self-checking test of the third-order CIC decimator (R = 128).
//
// Feeds a random bitstream (±1) and compares every decimated output with a
// direct convolution of the input history with the CIC impulse response
// (three cascaded 128-tap box-cars), computed independently in the bench.
// Also checks the all-ones and all-zeros steady state (±128^3) and that
// dout_valid pulses once every 128 clocks.
`timescale 1ns/1ps
module tb_comb_filter;
  localparam int R = 128;
  localparam int HL = 3 * R - 2;
  localparam int LAG = 3;                  // pipeline delay of the structure
  logic clk = 0, rst_n = 0, din = 0;
  logic signed [22:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int h[HL];
  int x[$];
  int last_valid = -1, cyc = 0;

  comb_filter dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (cycle %0d dout %0d)", what, cyc, dout);
    end
  endtask

  function automatic longint conv();
    longint s = 0;
    for (int k = 0; k < HL; k++) begin
      int idx = x.size() - 1 - LAG - k;
      if (idx >= 0) s += longint'(h[k]) * x[idx];
    end
    return s;
  endfunction

  initial begin
    int b1[R], b2[2*R-1];
    for (int i = 0; i < R; i++) b1[i] = 1;
    for (int i = 0; i < 2*R-1; i++) b2[i] = 0;
    for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) b2[i+j] += b1[i] * b1[j];
    for (int i = 0; i < HL; i++) h[i] = 0;
    for (int i = 0; i < 2*R-1; i++) for (int j = 0; j < R; j++) h[i+j] += b2[i];

    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40 * R; n++) begin
      din = (n < 10 * R) ? 1'($urandom) : (n < 20 * R) ? 1'b1 : (n < 30 * R) ? 1'b0 : 1'($urandom);
      x.push_back(din ? 1 : -1);
      @(negedge clk);
      cyc++;
      if (dout_valid) begin
        check(longint'(dout) == conv(), "output equals CIC convolution");
        if (last_valid >= 0) check(cyc - last_valid == R, "one output every R clocks");
        last_valid = cyc;
        if (n == 20 * R - 1) check(dout == 23'sd2097152, "all-ones steady state");
        if (n == 30 * R - 1) check(dout == -23'sd2097152, "all-zeros steady state");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
