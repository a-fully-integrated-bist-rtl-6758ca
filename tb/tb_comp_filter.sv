// tb_comp_filter: self-checking test of the 63-tap compensation FIR and /2
// decimator.
//
// Feeds random 23-bit CIC words once every 128 clocks (the rate used in the
// design) and compares every output with a direct-form model in the bench:
// y = sat(round(sum c_k x(n-k) / 2^15)) computed on every second input.  The
// bench also checks that the taps are symmetric, that their sum (the DC gain)
// is 2^17 (within coefficient rounding), and that outputs come once per two inputs.
`timescale 1ns/1ps
module tb_comp_filter;
  import bist_pkg::*;
  localparam int TAPS = 63;
  localparam int HALF = 32;
  localparam int C_HALF[HALF] = '{
    8, -23, 5, 52, -34, -95, 91, 155, -193, -235, 357, 335, -605, -454, 966, 592,
    -1476, -747, 2183, 921, -3165, -1118, 4560, 1363, -6654, -1733, 10168, 2550,
    -17565, -5946, 44127, 74294};
  logic clk = 0, rst_n = 0, din_valid = 0;
  logic signed [22:0] din = '0;
  word_t dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int c[TAPS];
  longint x[$];
  int n_in = 0, n_out = 0;
  word_t expect_w;
  bit pending = 0;

  comp_filter dut (.clk(clk), .rst_n(rst_n), .din(din), .din_valid(din_valid),
                   .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s dout=%0d exp=%0d", what, dout, expect_w);
    end
  endtask

  function automatic word_t model();
    longint s = 0;
    longint r;
    for (int k = 0; k < TAPS; k++)
      if (x.size() - 1 - k >= 0) s += longint'(c[k]) * x[x.size() - 1 - k];
    r = (s + (64'sd1 <<< 14)) >>> 15;
    if (r > 8388607)  return 24'sh7FFFFF;
    if (r < -8388608) return 24'sh800000;
    return word_t'(r);
  endfunction

  always @(negedge clk) if (dout_valid) begin
    n_out++;
    check(pending, "output only after an even input");
    check(dout == expect_w, "output equals direct-form FIR model");
    pending = 0;
  end

  initial begin
    int sum;
    bit sym;
    sum = 0;
    sym = 1;
    for (int k = 0; k < TAPS; k++) c[k] = (k < HALF) ? C_HALF[k] : C_HALF[TAPS - 1 - k];
    for (int k = 0; k < TAPS; k++) begin
      sum += c[k];
      if (c[k] != c[TAPS - 1 - k]) sym = 0;
    end
    check(sym, "symmetric taps (linear phase)");
    check(sum >= 131068 && sum <= 131076, "DC gain 2^17 within coefficient rounding");

    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      // random words, with runs of full-scale values to exercise saturation
      if (n >= 600 && n < 700) din = 23'sh3FFFFF;
      else if (n >= 700 && n < 800) din = -23'sh400000;
      else din = 23'($urandom);
      x.push_back(longint'(din));
      din_valid = 1;
      n_in++;
      if (n_in % 2 == 0) begin
        expect_w = model();
        pending = 1;
      end
      @(negedge clk);
      din_valid = 0;
      repeat (127) @(negedge clk);
    end
    check(n_out == n_in / 2, "one output per two inputs");
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
