// downsampler: the "decimate by OSR" box after IDSG and QDSG.
//
// Each time 'strobe' pulses (once per decimated period, from the decimation
// filter) the current DSG output y_S(m) is taken, rounded from Q2.IN_FRAC to
// a 24-bit Q1.23 word and held until the next strobe, giving y_IDSG(n) or
// y_QDSG(n).  Simple sample picking follows the published design; rounding
// to nearest and saturation are this design's choice.
// Timing: dout is updated on the clock edge where strobe = 1.
module downsampler
  import bist_pkg::*;
#(
  parameter int unsigned IN_FRAC = 32            // >= 24
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      strobe,
  input  logic signed [IN_FRAC+1:0] din,         // Q2.IN_FRAC
  output word_t                     dout         // Q1.23
);
  localparam int unsigned SH = IN_FRAC - (WORD_W - 1);

  logic signed [63:0] rounded;

  always_comb
    rounded = (64'(din) + (64'sd1 <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dout <= '0;
    else if (strobe) dout <= sat_word(rounded);
  end
endmodule
