// tb_ora: self-checking test of the output response analyzer.
//
// For each operation (offset, in-phase, quadrature, THD+N and the final
// power step) the bench clears the accumulator, applies random samples,
// reference words and fitted coefficients, and after every sample compares
// the accumulator (and, for THD+N, the residual thdn) with an integer model
// of the published equations:
//   offset : acc += y<<23            in-phase/quadrature: acc += y_DSG*(y-a0)
//   THD+N  : x1 = y-a0 - 2*A_I*y_I,  x2 = x1 - 2*A_Q*y_Q,  acc += x2^2
//   power  : acc += A_I^2 + A_Q^2
// Samples arriving with acc_en low must leave acc unchanged.  It also checks
// that a THD+N sample takes fewer than 256 clocks (one decimated period)
// and more than three 24-clock multiplies, and counts the products of each
// sample (0 for offset, 1 for in-phase/quadrature, 3 for THD+N).
`timescale 1ns/1ps
module tb_ora;
  import bist_pkg::*;
  localparam int ACC_W = 59;
  logic clk = 0, rst_n = 0, acc_clr = 0, acc_en = 0, smp_valid = 0, pow_start = 0;
  ora_op_e op = OP_OFFSET;
  word_t y_adc = '0, y_i = '0, y_q = '0, a0 = '0, a_i = '0, a_q = '0, thdn;
  logic signed [ACC_W-1:0] acc;
  logic busy, mul_done;
  logic [1:0] substep;
  int n_mul = 0, sub_seen = 0;
  int checks = 0, failures = 0;
  longint m_acc;
  word_t m_thdn;
  int n_ops[5];

  ora #(.ACC_W(ACC_W)) dut (.clk(clk), .rst_n(rst_n), .op(op), .acc_clr(acc_clr),
    .acc_en(acc_en), .smp_valid(smp_valid), .pow_start(pow_start), .y_adc(y_adc),
    .y_i(y_i), .y_q(y_q), .a0(a0), .a_i(a_i), .a_q(a_q), .acc(acc), .thdn(thdn),
    .busy(busy), .substep(substep), .mul_done(mul_done));

  always #5 clk = ~clk;

  // products per sample and the substep index at each product
  always @(posedge clk) if (mul_done) begin
    if (op == OP_THDN) sub_seen = sub_seen | (1 << substep);
    n_mul++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s op=%0d acc=%0d model=%0d", what, op, acc, m_acc);
    end
  endtask

  function automatic word_t sat(input longint v);
    if (v > 8388607)  return 24'sh7FFFFF;
    if (v < -8388608) return 24'sh800000;
    return word_t'(v);
  endfunction

  function automatic word_t rnd_word(input int bits);
    return word_t'($signed($urandom) >>> (32 - bits));
  endfunction

  task automatic one_sample(input bit en);
    int cyc;
    longint yt, x1, x2;
    y_adc = rnd_word(23); y_i = rnd_word(23); y_q = rnd_word(23);
    yt = longint'(sat(longint'(y_adc) - longint'(a0)));
    if (en) begin
      unique case (op)
        OP_OFFSET:  m_acc += longint'(y_adc) <<< 23;
        OP_INPHASE: m_acc += longint'(y_i) * yt;
        OP_QUAD:    m_acc += longint'(y_q) * yt;
        default: ;
      endcase
    end
    if (op == OP_THDN) begin
      x1 = longint'(sat(yt - ((longint'(a_i) * y_i) >>> 22)));
      x2 = longint'(sat(x1 - ((longint'(a_q) * y_q) >>> 22)));
      if (en) m_acc += x2 * x2;
      m_thdn = word_t'(x2);
    end
    n_mul = 0; sub_seen = 0;
    acc_en = en;
    smp_valid = 1;
    @(negedge clk);
    smp_valid = 0;
    acc_en = 1'($urandom);            // acc_en only matters when sampled
    cyc = 1;
    while (busy && cyc < 1000) begin @(negedge clk); cyc++; end
    repeat (2) @(negedge clk);
    check(longint'(acc) == m_acc, "accumulator");
    if (op == OP_THDN) begin
      check(thdn == m_thdn, "THD+N residual");
      check(cyc > 72 && cyc < 256, "THD+N sample within one decimated period");
      check(n_mul == 3 && sub_seen == 7, "three products, substeps 0, 1, 2");
    end else if (op == OP_OFFSET) begin
      check(n_mul == 0, "offset step uses no multiply");
    end else begin
      check(n_mul == 1, "one product per in-phase/quadrature sample");
    end
    n_ops[op]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 4; o++) begin
      op = ora_op_e'(o);
      acc_clr = 1; @(negedge clk); acc_clr = 0;
      m_acc = 0;
      a0 = rnd_word(12); a_i = rnd_word(22); a_q = rnd_word(22);
      for (int n = 0; n < 300; n++) begin
        if (n == 150) begin a_i = rnd_word(24); a_q = rnd_word(24); end   // saturating x
        one_sample(n % 13 != 5);
      end
    end
    // power step
    for (int r = 0; r < 20; r++) begin
      op = OP_POWER;
      a_i = rnd_word(24); a_q = rnd_word(24);
      acc_clr = 1; @(negedge clk); acc_clr = 0;
      m_acc = longint'(a_i) * a_i + longint'(a_q) * a_q;
      acc_en = 1; pow_start = 1; @(negedge clk); pow_start = 0;
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      check(longint'(acc) == m_acc, "power A_I^2 + A_Q^2");
      n_ops[OP_POWER]++;
    end
    for (int o = 0; o < 5; o++) check(n_ops[o] > 0, "every operation exercised");
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
