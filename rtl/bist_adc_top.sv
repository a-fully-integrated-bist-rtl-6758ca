// bist_adc_top: delta-sigma ADC with a fully on-chip, all-digital self-test
// based on in-phase and quadrature wave fitting (IQWF).
//
// Signal path (one clock = one oversampling period, f_OS = 12.288 MHz):
//   SDSG --D_S(m)--+--------------------> D_i0 \
//                  +--> z^-5 ------------> D_i1  > D3T 2nd-order modulator
//   vin (normal mode) ---------------------------/        | D_o(m)
//                                         decimation filter (CIC /128, FIR /2)
//                                                          | y_ADC(n), 48 kHz
//   IDSG --y_S--> /256 --> y_IDSG(n) --\                    v
//   QDSG --y_S--> /256 --> y_QDSG(n) ----> ORA <----- BIST controller
//                                           |
//                              I2S: left = y_ADC(n), right = thdn(n)
// In test mode (test_mode = 1) the SDSG's PDM stream drives both D3T inputs,
// the second one 5 cycles late; in normal mode both D3T inputs are held at 1
// and the modulator converts vin.  A run started with 'start' loads the
// DSGs, lets the chain settle, then measures a0, A_I, A_Q and P_THDN over
// N = 2^11 samples each, and finally A_I^2 + A_Q^2:
//   SNDR = sig_pow2 / (2 * p_thdn),  amplitude a1 = sqrt(sig_pow2),
//   offset = a0.
// Setup: a21 (unsigned 0.32) sets f_T via 2 - 2^-10*a21 = 2cos(2*pi*f_T/f_OS);
// k_cfg gives K ~ a21 as up to three signed powers of two;
// s_x1_init = A_T*sin(w)/2^-10 (Q6.40) sets the stimulus amplitude;
// i_x1_init = 0.5*sin(w)/2^-10 (Q6.40) makes the in-phase reference a 0.5
// sine.  The quadrature reference (a 0.5 cosine) is initialised from a21
// alone: x2(0) = 0.5, x1(0) = a21/4.
// The block structure and all published constants follow the original
// design; the formats, settling time and handshakes are this design's.
// The modulator is a behavioural model (real-valued input).  The 'obs'
// output bundles internal strobes and words (reference words, THD+N sample,
// ORA handshakes) for monitoring; it changes nothing in the operation.
module bist_adc_top
  import bist_pkg::*;
#(
  parameter int unsigned N_LOG2         = 11,
  parameter int unsigned SETTLE_SAMPLES = 64,
  parameter int unsigned D3T_DELAY      = 5,
  parameter int unsigned S_FRAC         = 40,   // SDSG precision
  parameter int unsigned IQ_FRAC        = 40    // IDSG / QDSG precision
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      test_mode,
  input  real                       vin,
  input  logic [31:0]               a21,
  input  k_cfg_t                    k_cfg,
  input  logic signed [S_FRAC+5:0]  s_x1_init,
  input  logic signed [IQ_FRAC+5:0] i_x1_init,
  output logic                      busy,
  output logic                      done,
  output ora_op_e                   step,
  output word_t                     a0,
  output word_t                     a_i,
  output word_t                     a_q,
  output prod_t                     p_thdn,
  output prod_t                     sig_pow2,
  output word_t                     y_adc,
  output logic                      y_adc_valid,
  output logic                      i2s_sck,
  output logic                      i2s_ws,
  output logic                      i2s_sd,
  output bist_obs_t                 obs         // internal words and strobes
);
  localparam int unsigned ACC_W = 2 * WORD_W + N_LOG2;

  // DSGs
  logic                      dsg_load;
  logic [31:0]               a21_r;
  k_cfg_t                    k_r;
  logic signed [S_FRAC+5:0]  s_x1;
  logic signed [IQ_FRAC+5:0] i_x1, q_x1;
  logic signed [S_FRAC+1:0]  ys_s;
  logic signed [IQ_FRAC+1:0] ys_i, ys_q;
  logic                      ds_s, ds_i, ds_q;
  // ADC
  logic                      di0, di1, di1_dly, do_bit;
  logic                      smp;           // decimated strobe, one clock late
  word_t                     y_i, y_q, y_prev;
  // ORA
  ora_op_e                   op;
  logic                      acc_clr, acc_en, ora_smp, pow_start, ora_busy;
  logic signed [ACC_W-1:0]   acc;
  word_t                     thdn;
  logic [1:0]                ora_sub;
  logic                      mul_done;

  always_comb q_x1 = (IQ_FRAC+6)'({2'b00, a21_r[31:2]}) <<< (IQ_FRAC - 32);

  dsg #(.FRAC(S_FRAC)) u_sdsg (
    .clk(clk), .rst_n(rst_n), .load(dsg_load), .a21(a21_r), .k_cfg(k_r),
    .x1_init(s_x1), .x2_init('0), .ys(ys_s), .ds(ds_s));

  dsg #(.FRAC(IQ_FRAC)) u_idsg (
    .clk(clk), .rst_n(rst_n), .load(dsg_load), .a21(a21_r), .k_cfg(k_r),
    .x1_init(i_x1), .x2_init('0), .ys(ys_i), .ds(ds_i));

  dsg #(.FRAC(IQ_FRAC)) u_qdsg (
    .clk(clk), .rst_n(rst_n), .load(dsg_load), .a21(a21_r), .k_cfg(k_r),
    .x1_init(q_x1), .x2_init((IQ_FRAC+2)'(1) <<< (IQ_FRAC - 1)), .ys(ys_q), .ds(ds_q));

  // D3T stimulus inputs
  pdm_delay #(.K(D3T_DELAY)) u_dly (.clk(clk), .rst_n(rst_n), .d(ds_s), .q(di1_dly));
  assign di0 = test_mode ? ds_s    : 1'b1;
  assign di1 = test_mode ? di1_dly : 1'b1;

  d3t_mut u_mut (
    .clk(clk), .rst_n(rst_n), .t(test_mode), .di0(di0), .di1(di1),
    .vin(vin), .do_bit(do_bit));

  decimation_filter u_dec (
    .clk(clk), .rst_n(rst_n), .din(do_bit), .y_adc(y_adc), .y_valid(y_adc_valid));

  downsampler #(.IN_FRAC(IQ_FRAC)) u_dn_i (
    .clk(clk), .rst_n(rst_n), .strobe(y_adc_valid), .din(ys_i), .dout(y_i));
  downsampler #(.IN_FRAC(IQ_FRAC)) u_dn_q (
    .clk(clk), .rst_n(rst_n), .strobe(y_adc_valid), .din(ys_q), .dout(y_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp    <= 1'b0;
      y_prev <= '0;
    end else begin
      smp <= y_adc_valid;
      if (smp) y_prev <= y_adc;
    end
  end

  bist_ctrl #(
    .N_LOG2(N_LOG2), .SETTLE_SAMPLES(SETTLE_SAMPLES), .ACC_W(ACC_W),
    .S_X1_W(S_FRAC+6), .I_X1_W(IQ_FRAC+6)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start), .a21_in(a21), .k_in(k_cfg), .s_x1_in(s_x1_init), .i_x1_in(i_x1_init),
    .busy(busy), .done(done), .step(step),
    .dsg_load(dsg_load), .a21(a21_r), .k_cfg(k_r), .s_x1(s_x1), .i_x1(i_x1),
    .smp_valid(smp), .acc(acc), .ora_busy(ora_busy),
    .op(op), .acc_clr(acc_clr), .acc_en(acc_en), .ora_smp(ora_smp), .pow_start(pow_start),
    .a0(a0), .a_i(a_i), .a_q(a_q), .p_thdn(p_thdn), .sig_pow2(sig_pow2));

  ora #(.ACC_W(ACC_W)) u_ora (
    .clk(clk), .rst_n(rst_n), .op(op), .acc_clr(acc_clr), .acc_en(acc_en),
    .smp_valid(ora_smp), .pow_start(pow_start),
    .y_adc(y_adc), .y_i(y_i), .y_q(y_q), .a0(a0), .a_i(a_i), .a_q(a_q),
    .acc(acc), .thdn(thdn), .busy(ora_busy), .substep(ora_sub), .mul_done(mul_done));

  assign obs = '{smp: smp, ora_smp: ora_smp, acc_en: acc_en, pow_start: pow_start,
                 ora_busy: ora_busy, mul_done: mul_done, ora_sub: ora_sub,
                 y_i: y_i, y_q: y_q, thdn: thdn};

  // I2S frame n+1 carries sample n and its THD+N value.
  i2s_tx u_i2s (
    .clk(clk), .rst_n(rst_n), .load(smp), .left(y_prev), .right(thdn),
    .sck(i2s_sck), .ws(i2s_ws), .sd(i2s_sd));

  // The D_S bits of the reference generators only close their own loops;
  // the SDSG multibit output is not used outside the SDSG.
  logic unused_ok;
  assign unused_ok = ds_i ^ ds_q ^ (^ys_s);
endmodule
