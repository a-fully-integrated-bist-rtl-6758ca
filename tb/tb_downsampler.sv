// tb_downsampler: self-checking test of the IQ reference decimator.
//
// Applies random Q2.32 values (including out-of-range ones) with a strobe
// every 256 clocks, as in the full design, and checks that dout holds the
// value rounded to Q1.23 (round half up) and saturated to ±full scale, and
// that dout does not change between strobes.
`timescale 1ns/1ps
module tb_downsampler;
  import bist_pkg::*;
  localparam int IN_FRAC = 32;
  logic clk = 0, rst_n = 0, strobe = 0;
  logic signed [IN_FRAC+1:0] din = '0;
  word_t dout, expect_w;
  int checks = 0, failures = 0;

  downsampler #(.IN_FRAC(IN_FRAC)) dut (.clk(clk), .rst_n(rst_n), .strobe(strobe),
                                        .din(din), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s din=%0d dout=%0d exp=%0d", what, din, dout, expect_w);
    end
  endtask

  function automatic word_t ref_round(input logic signed [IN_FRAC+1:0] x);
    real r = $floor(real'(x) / 512.0 + 0.5);   // 2^(32-23)
    if (r > 8388607.0)  return 24'sh7FFFFF;
    if (r < -8388608.0) return 24'sh800000;
    return word_t'(longint'(r));
  endfunction

  initial begin
    expect_w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      din = {2'($urandom), $urandom};
      if (n % 4 == 0) din = (din >>> 1);                // mostly in range
      if (n % 7 == 0) din = {din[IN_FRAC+1:9], 9'h100};  // exact half LSB ties
      strobe = 1;
      expect_w = ref_round(din);
      @(negedge clk);
      strobe = 0;
      check(dout == expect_w, "rounded and saturated word");
      for (int k = 0; k < 254; k++) begin
        din = {2'($urandom), $urandom};
        @(negedge clk);
      end
      check(dout == expect_w, "held between strobes");
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
