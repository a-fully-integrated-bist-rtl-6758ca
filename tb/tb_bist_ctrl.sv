// tb_bist_ctrl: self-checking test of the BIST controller.
//
// Runs the controller with N = 2^4 and 3 settling samples (to keep the run
// short) against a simple ORA stand-in: the ORA accumulator is a random
// value per step and the ORA reports busy for a few clocks after every
// sample it takes.  Checks, over three runs:
//   * setup words are registered on start and the DSGs get one load pulse;
//   * exactly SETTLE samples with acc_en low, then exactly N accumulated
//     samples in each of the four steps, in the published order;
//   * one power request at the end, then done high / busy low;
//   * the result conversions a0 = acc/2^(23+n), A_I, A_Q = acc/2^(21+n)
//     (the 4/N factor), P_THDN = acc/2^n and sig_pow2 = acc, with saturation.
`timescale 1ns/1ps
module tb_bist_ctrl;
  import bist_pkg::*;
  localparam int N_LOG2 = 4, SETTLE = 3, ACC_W = 59;
  logic clk = 0, rst_n = 0, start = 0, smp_valid = 0, ora_busy = 0;
  logic [31:0] a21_in = '0, a21;
  k_cfg_t k_in = '0, k_cfg;
  logic signed [45:0] s_x1_in = '0, s_x1;
  logic signed [37:0] i_x1_in = '0, i_x1;
  logic busy, done, dsg_load, acc_clr, acc_en, ora_smp, pow_start;
  ora_op_e step, op;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] vals[5];
  word_t a0, a_i, a_q;
  prod_t p_thdn, sig_pow2;
  int checks = 0, failures = 0;
  int n_settle, n_acc[5], n_load, n_pow, busy_cnt = 0;
  ora_op_e order[$];

  bist_ctrl #(.N_LOG2(N_LOG2), .SETTLE_SAMPLES(SETTLE), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a21_in(a21_in), .k_in(k_in),
    .s_x1_in(s_x1_in), .i_x1_in(i_x1_in), .busy(busy), .done(done), .step(step),
    .dsg_load(dsg_load), .a21(a21), .k_cfg(k_cfg), .s_x1(s_x1), .i_x1(i_x1),
    .smp_valid(smp_valid), .acc(acc), .ora_busy(ora_busy), .op(op), .acc_clr(acc_clr),
    .acc_en(acc_en), .ora_smp(ora_smp), .pow_start(pow_start), .a0(a0), .a_i(a_i),
    .a_q(a_q), .p_thdn(p_thdn), .sig_pow2(sig_pow2));

  always #5 clk = ~clk;
  assign acc = vals[op];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic word_t sat_sh(input logic signed [ACC_W-1:0] v, input int sh);
    longint w = longint'(v) >>> sh;
    if (w > 8388607)  return 24'sh7FFFFF;
    if (w < -8388608) return 24'sh800000;
    return word_t'(w);
  endfunction

  // decimated-sample strobe every 16 clocks; ORA stand-in busy for 6 clocks
  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 16;
    smp_valid <= (ph == 15);
    if (ora_smp || pow_start) busy_cnt <= 6;
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    ora_busy <= (ora_smp || pow_start) || busy_cnt > 1;
    if (dsg_load) n_load++;
    if (pow_start) n_pow++;
    if (ora_smp && !acc_en) n_settle++;
    if (ora_smp && acc_en) begin
      n_acc[op]++;
      if (order.size() == 0 || order[$] != op) order.push_back(op);
    end
  end

  task automatic one_run(input int r);
    a21_in = $urandom; k_in = k_cfg_t'($urandom);
    s_x1_in = {$urandom, 14'($urandom)}; i_x1_in = {6'($urandom), $urandom};
    for (int s = 0; s < 5; s++) vals[s] = {27'($urandom), $urandom} >>> $urandom_range(20);
    if (r == 1) vals[1] = {1'b0, {(ACC_W-1){1'b1}}};       // saturates A_I
    n_settle = 0; n_load = 0; n_pow = 0; order.delete();
    foreach (n_acc[s]) n_acc[s] = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    a21_in = '0; k_in = '0; s_x1_in = '0; i_x1_in = '0;   // must have been registered
    check(busy && !done, "busy after start");
    while (!done) @(negedge clk);
    check(!busy, "busy low when done");
    check(n_load == 1, "one DSG load pulse");
    check(n_settle == SETTLE, "settling samples not accumulated");
    for (int s = 0; s < 4; s++) check(n_acc[s] == (1 << N_LOG2), "N samples per step");
    check(order.size() == 4 && order[0] == OP_OFFSET && order[1] == OP_INPHASE &&
          order[2] == OP_QUAD && order[3] == OP_THDN, "step order 1-2-3-4");
    check(n_pow == 1, "one power request");
    check(a0 == sat_sh(vals[0], 23 + N_LOG2), "a0 conversion");
    check(a_i == sat_sh(vals[1], 21 + N_LOG2), "A_I conversion");
    check(a_q == sat_sh(vals[2], 21 + N_LOG2), "A_Q conversion");
    check(p_thdn == prod_t'(vals[3] >>> N_LOG2), "P_THDN conversion");
    check(sig_pow2 == prod_t'(vals[4]), "signal power");
    repeat (40) @(negedge clk);
    check(done && !busy, "done held until next start");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    for (int r = 0; r < 3; r++) begin
      one_run(r);
    end
    // setup registered at start
    @(negedge clk);
    a21_in = 32'hCAFE_0001; start = 1; @(negedge clk); start = 0; a21_in = '0;
    @(negedge clk);
    check(a21 == 32'hCAFE_0001, "a21 registered on start");
    while (!done) @(negedge clk);
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
