// tb_booth_mul: self-checking test of the sequential 24x24 multiplier.
//
// Multiplies random and corner operands (zero, ±1, the most negative value
// squared) and checks the 48-bit product, that done pulses exactly W = 24
// clocks after start (the published 24-cycle multiply) and that busy is high
// in between.
`timescale 1ns/1ps
module tb_booth_mul;
  localparam int W = 24;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] a = '0, b = '0;
  logic signed [2*W-1:0] p;
  logic busy, done;
  int checks = 0, failures = 0;

  booth_mul #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                          .p(p), .busy(busy), .done(done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s a=%0d b=%0d p=%0d", what, a, b, p);
    end
  endtask

  task automatic one(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    int lat;
    logic signed [2*W-1:0] expect_p;
    expect_p = (2*W)'(x) * (2*W)'(y);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 100) begin
      check(busy == 1'b1, "busy while multiplying");
      a = W'($urandom); b = W'($urandom);   // operands may change after start
      @(negedge clk);
      lat++;
    end
    check(lat == W, "done W clocks after start");
    check(p == expect_p, "product");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 0);
    one(1, -1);
    one(-24'sd8388608, -24'sd8388608);
    one(24'sd8388607, -24'sd8388608);
    one(24'sd8388607, 24'sd8388607);
    for (int n = 0; n < 3000; n++) one(W'($urandom), W'($urandom));
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
