// tb_bist_adc_top: end-to-end test of the self-testing ADC at full size
// (N = 2048, all parameters at their defaults).
//
// Run 1 (digital test mode): the SDSG produces a -6 dBFS tone at 41 bins of
// the 48 kHz / 2048 grid (960.9 Hz).  Run 2 (normal mode): the same tone is
// applied as an analog input instead.  For every run the bench recomputes,
// from the decimated samples and reference words it observes, the offset,
// both IQ amplitudes and the THD+N power with the published formulas and
// compares them bit-exactly with the hardware; it also checks the measured
// amplitude and SNDR for plausibility, the ORA's per-sample cycle budget, and
// decodes the I2S stream.  Each mechanism (the four steps, the three
// substeps, the power step, I2S frames, both modes) must occur at least once.
`timescale 1ns/1ps
module tb_bist_adc_top;
  import bist_pkg::*;

  localparam real FOS = 12.288e6;
  localparam int  BINS = 41;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0, test_mode = 1;
  real  vin = 0.0;
  logic [31:0] a21;
  k_cfg_t      k_cfg;
  logic signed [45:0] s_x1;
  logic signed [45:0] i_x1;
  logic busy, done, y_adc_valid, i2s_sck, i2s_ws, i2s_sd;
  ora_op_e step;
  word_t a0, a_i, a_q, y_adc;
  prod_t p_thdn, sig_pow2;
  bist_obs_t obs;

  int checks = 0, failures = 0;
  int n_step[5], n_sub[3], n_frames = 0, n_test_runs = 0, n_norm_runs = 0, n_thdn_small = 0;

  bist_adc_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .test_mode(test_mode), .vin(vin),
    .a21(a21), .k_cfg(k_cfg), .s_x1_init(s_x1), .i_x1_init(i_x1),
    .busy(busy), .done(done), .step(step), .a0(a0), .a_i(a_i), .a_q(a_q),
    .p_thdn(p_thdn), .sig_pow2(sig_pow2), .y_adc(y_adc), .y_adc_valid(y_adc_valid),
    .i2s_sck(i2s_sck), .i2s_ws(i2s_ws), .i2s_sd(i2s_sd), .obs(obs));

  always #40.69 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- analog input for normal mode ----------------
  longint unsigned mcount = 0;
  // The tone runs at the frequency the programmed a21 word gives the DSGs.
  real w_dsg = 0.0;
  always @(posedge clk) begin
    mcount <= mcount + 1;
    vin <= 2.0 * 0.5 * $sin(w_dsg * real'(mcount));
  end

  // ---------------- independent reference of the ORA ----------------
  longint sum_y, sum_i, sum_q, sum_p;
  word_t  ref_a0, ref_ai, ref_aq;
  int     busy_len, max_busy_thdn;
  logic   ora_busy_d;

  function automatic word_t sat24(input longint v);
    if (v > 8388607) return 24'sh7FFFFF;
    if (v < -8388608) return 24'sh800000;
    return v[23:0];
  endfunction

  always @(posedge clk) begin
    if (obs.ora_smp && obs.acc_en) begin
      longint yt, yi, yq, x1, x2;
      yt = longint'(sat24(longint'(y_adc) - longint'(a0)));
      yi = longint'(obs.y_i);
      yq = longint'(obs.y_q);
      unique case (step)
        OP_OFFSET:  sum_y += longint'(y_adc);
        OP_INPHASE: sum_i += yi * yt;
        OP_QUAD:    sum_q += yq * yt;
        OP_THDN: begin
          x1 = longint'(sat24(yt - ((yi * longint'(a_i)) >>> 22)));
          x2 = longint'(sat24(x1 - ((yq * longint'(a_q)) >>> 22)));
          sum_p += x2 * x2;
        end
        default: ;
      endcase
      n_step[int'(step)]++;
    end
    if (obs.mul_done && step == OP_THDN) n_sub[obs.ora_sub]++;
    if (obs.pow_start) n_step[int'(OP_POWER)]++;
    // cycle budget of one THD+N sample
    ora_busy_d <= obs.ora_busy;
    if (obs.ora_busy) busy_len++;
    else begin
      if (ora_busy_d && step == OP_THDN && busy_len > max_busy_thdn) max_busy_thdn = busy_len;
      busy_len = 0;
    end
  end

  // ---------------- I2S decoder ----------------
  word_t y_hist[$];
  logic  ws_d = 0;
  int    bitpos = 0;
  logic [31:0] sh_l, sh_r;
  always @(posedge clk) if (obs.smp) y_hist.push_back(y_adc);
  always @(posedge i2s_sck) begin
    if (i2s_ws != ws_d) begin
      bitpos = 0;
      if (i2s_ws == 1'b0 && sh_r !== 'x) begin
        // a full frame ended: left word = sh_l[30:7], right word = sh_r[30:7]
        n_frames++;
        if (y_hist.size() >= 3 && n_frames > 4) begin
          check(word_t'(sh_l[30:7]) == y_hist[y_hist.size()-1] ||
                word_t'(sh_l[30:7]) == y_hist[y_hist.size()-2] ||
                word_t'(sh_l[30:7]) == y_hist[y_hist.size()-3], "I2S left word matches an ADC sample");
          if (step == OP_THDN && obs.acc_en) begin
            real thd_fs;
            thd_fs = real'(word_t'(sh_r[30:7])) / 8388608.0;
            if (thd_fs < 1.0e-3 && thd_fs > -1.0e-3) n_thdn_small++;
          end
        end
        while (y_hist.size() > 4) void'(y_hist.pop_front());
      end
    end
    ws_d = i2s_ws;
    // bit 0 of a slot is the padding/delay bit; bits 1..32 shift in
    if (bitpos >= 1) begin
      if (i2s_ws) sh_r = {sh_r[30:0], i2s_sd};
      else        sh_l = {sh_l[30:0], i2s_sd};
    end
    bitpos++;
  end

  // K ~ a21 as up to three signed powers of two (greedy nearest-power split).
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

  // ---------------- one BIST run ----------------
  task automatic run(input bit tmode, input real amp);
    real f, w, a1, sndr, ai_r, aq_r, ps;
    f = 48.0e3 * BINS / 2048.0;
    w = 2.0 * PI * f / FOS;
    a21  = 32'(longint'(4096.0 * $pow($sin(w / 2.0), 2.0) * 4294967296.0));
    k_cfg = k_from_a21(a21);
    s_x1 = 46'(longint'(amp * $sin(w) * 1024.0 * 1099511627776.0));
    i_x1 = 46'(longint'(0.5 * $sin(w) * 1024.0 * 1099511627776.0));
    w_dsg = 2.0 * $asin($sqrt(real'(a21) / 4294967296.0 / 1024.0) / 2.0);
    test_mode = tmode;
    sum_y = 0; sum_i = 0; sum_q = 0; sum_p = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    check(busy == 1'b1, "busy after start");
    // a0 is needed by the reference model from step 2 on
    wait (step == OP_INPHASE);
    ref_a0 = sat24(sum_y >>> 11);
    check(a0 == ref_a0, $sformatf("a0 %0d == reference %0d", a0, ref_a0));
    wait (step == OP_QUAD);
    ref_ai = sat24(sum_i >>> 32);
    check(a_i == ref_ai, $sformatf("A_I %0d == reference %0d", a_i, ref_ai));
    wait (step == OP_THDN);
    ref_aq = sat24(sum_q >>> 32);
    check(a_q == ref_aq, $sformatf("A_Q %0d == reference %0d", a_q, ref_aq));
    wait (done);
    check(p_thdn == prod_t'(sum_p >>> 11), $sformatf("P_THDN %0d == reference %0d", p_thdn, sum_p >>> 11));
    check(sig_pow2 == prod_t'(longint'(a_i) * longint'(a_i) + longint'(a_q) * longint'(a_q)),
          "A_I^2 + A_Q^2");
    ai_r = real'(a_i) / 8388608.0;
    aq_r = real'(a_q) / 8388608.0;
    a1   = $sqrt(ai_r * ai_r + aq_r * aq_r);
    ps   = real'(p_thdn) / 70368744177664.0;   // 2^46
    sndr = 10.0 * $log10((ai_r * ai_r + aq_r * aq_r) / (2.0 * ps));
    $display("run mode=%0d: a0=%g A_I=%g A_Q=%g a1=%g P_THDN=%g SNDR=%0.1f dB",
             tmode, real'(a0) / 8388608.0, ai_r, aq_r, a1, ps, sndr);
    check(a1 > amp * 0.97 && a1 < amp * 1.03, "fitted amplitude near the stimulus amplitude");
    check(sndr > 90.0, "SNDR above 90 dB");
    check(a0 < 24'sd8400 && a0 > -24'sd8400, "offset below 1e-3 FS");
    if (tmode) n_test_runs++; else n_norm_runs++;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) n_step[i] = 0;
    for (int i = 0; i < 3; i++) n_sub[i] = 0;
    busy_len = 0; max_busy_thdn = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    run(1'b1, 0.5);
    run(1'b0, 0.5);
    check(max_busy_thdn > 70 && max_busy_thdn < 256, $sformatf("THD+N sample takes %0d clocks < 256", max_busy_thdn));
    for (int i = 0; i < 4; i++) check(n_step[i] == 2 * 2048, $sformatf("step %0d saw %0d samples", i + 1, n_step[i]));
    check(n_step[4] == 2, "power step ran in each run");
    for (int i = 0; i < 3; i++) check(n_sub[i] >= 2 * 2048, $sformatf("substep %0d ran %0d times", i + 1, n_sub[i]));
    check(n_frames > 1000, $sformatf("%0d I2S frames decoded", n_frames));
    check(n_thdn_small > 1000, $sformatf("%0d small THD+N words seen on I2S", n_thdn_small));
    check(n_test_runs == 1 && n_norm_runs == 1, "test-mode and normal-mode runs");
    $display("mechanisms: steps %0d/%0d/%0d/%0d power %0d substeps %0d/%0d/%0d frames %0d",
             n_step[0], n_step[1], n_step[2], n_step[3], n_step[4], n_sub[0], n_sub[1], n_sub[2], n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
