// dsg_dsm3: third-order single-bit digital delta-sigma modulator with a
// unity signal transfer function, the modulator embedded in every DSG.
//
// Three delaying integrators are driven by the error e = y - v between the
// multibit input y and the fed-back output v (v = +1 when ds = 1, -1 when
// ds = 0), weighted 1/16, 1/2 and 1.234375 (= 79/64) as in the published
// structure; each integrator also adds the previous integrator's state.  The
// quantizer sees y + w3, so the output is v = y + NTF * quantization error.
// All weights are shifts and one 79x constant, and the state keeps six more
// fractional bits than the input, so the loop arithmetic is exact.
//
// Interface: y is signed Q2.FRAC, valid every clock; ds is the registered
// output bit for the current y (combinational from y and the state, the
// state updates on the clock edge).  clr zeroes the integrators.
// Integrator widths and reset behaviour are this implementation's choice.
module dsg_dsm3 #(
  parameter int unsigned FRAC = 40            // fractional bits of y
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic signed [FRAC+1:0] y,           // Q2.FRAC
  output logic                   ds           // 1 = +1, 0 = -1
);
  localparam int unsigned IFRAC = FRAC + 6;   // exact for 1/16, 1/2, 79/64
  localparam int unsigned IW    = IFRAC + 8;  // ±128 integer range

  typedef logic signed [IW-1:0] st_t;
  typedef logic signed [IW+7:0] wide_t;     // e * 79 needs 7 more bits

  st_t w1, w2, w3;
  st_t y_i, v_i, e, u, e79;

  always_comb begin
    y_i = st_t'(y) <<< 6;
    u   = y_i + w3;
    ds  = ~u[IW-1];                             // sign quantizer, u >= 0 -> +1
    v_i = ds ? (st_t'(1) <<< IFRAC) : -(st_t'(1) <<< IFRAC);
    e   = y_i - v_i;
    e79 = st_t'((wide_t'(e) * wide_t'(79)) >>> 6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1 <= '0; w2 <= '0; w3 <= '0;
    end else if (clr) begin
      w1 <= '0; w2 <= '0; w3 <= '0;
    end else begin
      w1 <= w1 + (e >>> 4);
      w2 <= w2 + w1 + (e >>> 1);
      w3 <= w3 + w2 + e79;
    end
  end
endmodule
