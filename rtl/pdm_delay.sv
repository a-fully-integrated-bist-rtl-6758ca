// pdm_delay: K-cycle delay of a single-bit PDM stream.
//
// Produces the second D3T stimulus D_i1(m) = D_S(m-K) from D_i0(m) = D_S(m).
// With both inputs driven by the same stream, the modulator applies the
// extra low-pass term (1 + z^-K)/2 to the stimulus.  K = 5 as published; the
// reset value (all ones, the normal-mode level of D_ij) is this design's
// choice.  Interface: d is sampled every clock, q = d delayed by K clocks.
module pdm_delay #(
  parameter int unsigned K = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [K-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '1;
    else        sr <= {sr[K-2:0], d};
  end

  assign q = sr[K-1];
endmodule
