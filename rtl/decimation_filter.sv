// decimation_filter: the ADC's digital decimator, 12.288 MHz x 1 bit to
// 48 kHz x 24 bits.
//
// A third-order comb filter decimates the modulator bit-stream by 128 and a
// FIR compensation filter flattens the comb droop and decimates by 2, as in
// the published ADC.  Output words are Q1.23 with full scale ±1.0
// corresponding to a modulator bit-stream of all ones / all zeros.
// Timing: y_valid pulses once every 256 clocks; y_adc holds in between.
module decimation_filter
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  din,       // D_o(m), 1 = +1
  output word_t y_adc,     // y_ADC(n), Q1.23
  output logic  y_valid
);
  logic signed [22:0] cic;
  logic               cic_valid;

  comb_filter #(.R_LOG2(7)) u_comb (
    .clk       (clk),
    .rst_n     (rst_n),
    .din       (din),
    .dout      (cic),
    .dout_valid(cic_valid)
  );

  comp_filter u_comp (
    .clk       (clk),
    .rst_n     (rst_n),
    .din       (cic),
    .din_valid (cic_valid),
    .dout      (y_adc),
    .dout_valid(y_valid)
  );
endmodule
