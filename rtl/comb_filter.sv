// comb_filter: third-order CIC (comb) decimator, R = 128.
//
// The single-bit modulator output (1 -> +1, 0 -> -1) is integrated three
// times at f_OS; every R-th clock the last integrator is sampled and passed
// through three first-difference (comb) stages at f_OS/R.  The DC gain is
// R^3 = 2^21, so a full-scale input gives an output of ±2^21.  The
// integrators may wrap: two's-complement arithmetic makes the comb output
// correct as long as it fits the 23-bit word.  Order and decimation factor
// follow the published filter; the register widths are the minimum the CIC
// needs.
// Timing: dout/dout_valid are registered; dout_valid pulses once every R
// clocks and dout holds until the next pulse.
module comb_filter #(
  parameter int unsigned R_LOG2 = 7,              // R = 128
  parameter int unsigned OUT_W  = 3 * R_LOG2 + 2  // 23 bits
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);
  typedef logic signed [OUT_W-1:0] acc_t;

  acc_t i1, i2, i3;          // integrators at f_OS
  acc_t c1, c2, c3;          // comb delay registers at f_OS/R
  acc_t d1, d2, d3;
  logic [R_LOG2-1:0] phase;

  always_comb begin
    d1 = i3 - c1;
    d2 = d1 - c2;
    d3 = d2 - c3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0; i2 <= '0; i3 <= '0;
      c1 <= '0; c2 <= '0; c3 <= '0;
      phase <= '0;
      dout <= '0;
      dout_valid <= 1'b0;
    end else begin
      i1 <= i1 + (din ? acc_t'(1) : -acc_t'(1));
      i2 <= i2 + i1;
      i3 <= i3 + i2;
      phase <= phase + 1'b1;
      dout_valid <= 1'b0;
      if (phase == '1) begin
        c1 <= i3;
        c2 <= d1;
        c3 <= d2;
        dout <= d3;
        dout_valid <= 1'b1;
      end
    end
  end
endmodule
