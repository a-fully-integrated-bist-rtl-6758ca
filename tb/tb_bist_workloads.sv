// tb_bist_workloads: the two sweeps the self test is meant for, run through
// the complete design at its default size (N = 2048, digital test mode).
//
//   level sweep    : 0.96 kHz (41 bins of 48 kHz/2048) at -60, -40, -20 and
//                    -3 dBFS, the range used for SNDR-versus-level and
//                    dynamic-range tests;
//   frequency sweep: -6 dBFS at 5.0, 10.0 and 19.99 kHz (213, 427 and 853
//                    bins), up to the 20 kHz audio band edge.
//
// For every run the bench programs the setup words from the tone (a21, the
// three-term K close to a21, and the initial x1 values), waits for done and
// checks:
//   * the gain a1/A_T against the expected (1 + z^-5)/2 stimulus response
//     |cos(5w/2)| of the two delayed copies (frequency response / gain
//     error), within 0.5 % (2 % at -60 dBFS);
//   * the offset a0 (ideal modulator: below 1e-4 of full scale);
//   * the SNDR against the level: it must rise with the stimulus level by
//     about one dB per dB (the noise floor of the test is fixed), and be
//     above 85 dB at -6 dBFS over the whole band.
// Each level and each frequency counts as one mechanism that must have run.
`timescale 1ns/1ps
module tb_bist_workloads;
  import bist_pkg::*;

  localparam real FOS = 12.288e6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0;
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

  int checks = 0, failures = 0, n_runs = 0;
  real sndr_lvl[4];

  bist_adc_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .test_mode(1'b1), .vin(vin),
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

  // one complete BIST run; returns the SNDR in dB
  task automatic run(input int nbins, input real level_db, output real sndr);
    real f, w, amp, a1, ai_r, aq_r, ps, g_exp, tol;
    amp = $pow(10.0, level_db / 20.0);
    f = 48.0e3 * nbins / 2048.0;
    w = 2.0 * PI * f / FOS;
    a21   = 32'(longint'(4096.0 * $pow($sin(w / 2.0), 2.0) * 4294967296.0));
    k_cfg = k_from_a21(a21);
    s_x1  = 46'(longint'(amp * $sin(w) * 1024.0 * 1099511627776.0));
    i_x1  = 46'(longint'(0.5 * $sin(w) * 1024.0 * 1099511627776.0));
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    wait (done);
    ai_r = real'(a_i) / 8388608.0;
    aq_r = real'(a_q) / 8388608.0;
    a1   = $sqrt(ai_r * ai_r + aq_r * aq_r);
    ps   = real'(p_thdn) / 70368744177664.0;   // 2^46
    sndr = 10.0 * $log10((ai_r * ai_r + aq_r * aq_r) / (2.0 * (ps > 0.0 ? ps : 1.0e-30)));
    g_exp = $cos(2.5 * w);
    tol = (level_db < -50.0) ? 0.02 : 0.005;
    $display("%8.1f Hz %6.1f dBFS: gain %0.5f (expected %0.5f) offset %g SNDR %0.1f dB",
             f, level_db, a1 / amp, g_exp, real'(a0) / 8388608.0, sndr);
    check(a1 / amp > g_exp * (1.0 - tol) && a1 / amp < g_exp * (1.0 + tol),
          $sformatf("gain at %0.0f Hz, %0.0f dBFS", f, level_db));
    check(a0 < 24'sd839 && a0 > -24'sd839, "offset below 1e-4 of full scale");
    check(sig_pow2 == prod_t'(longint'(a_i) * longint'(a_i) + longint'(a_q) * longint'(a_q)),
          "signal power word");
    n_runs++;
  endtask

  initial begin
    real s;
    real levels[4] = '{-60.0, -40.0, -20.0, -3.0};
    int  freq_bins[3] = '{213, 427, 853};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // level sweep at 0.96 kHz
    foreach (levels[i]) begin
      run(41, levels[i], s);
      sndr_lvl[i] = s;
    end
    for (int i = 0; i < 2; i++)
      check(sndr_lvl[i+1] - sndr_lvl[i] > 14.0 && sndr_lvl[i+1] - sndr_lvl[i] < 26.0,
            $sformatf("SNDR rises ~20 dB from %0.0f to %0.0f dBFS", levels[i], levels[i+1]));
    check(sndr_lvl[0] > 30.0, "SNDR at -60 dBFS above 30 dB");
    check(sndr_lvl[3] > 85.0, "SNDR at -3 dBFS above 85 dB");
    // frequency sweep at -6 dBFS
    foreach (freq_bins[i]) begin
      run(freq_bins[i], -6.0, s);
      check(s > 85.0, $sformatf("SNDR above 85 dB at %0d bins", freq_bins[i]));
    end
    check(n_runs == 7, $sformatf("%0d of 7 sweep points ran", n_runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
