// dsg: digital signal generator (used as SDSG, IDSG and QDSG).
//
// A two-integrator digital resonator whose output y_S(m) = x2(m) feeds an
// embedded third-order delta-sigma modulator (dsg_dsm3) with unity STF.  The
// resonator loop is closed through the modulator's output bit: the first
// integrator adds -K*y_S plus a term chosen by D_S, (K - a21) when D_S = 1
// and (a21 - K) when D_S = 0.  Since D_S = y_S + shaped noise, this is
// -a21*y_S plus (K - a21) times the shaped noise, so no multiplier is needed
// for a21.  The second integrator adds a12 * (first integrator output) with
// a12 = 2^-10, a shift:
//     n1(m)   = x1(m) - K*x2(m) + (D_S ? K - a21 : a21 - K)
//     x1(m+1) = n1(m)
//     x2(m+1) = x2(m) + 2^-10 * n1(m)
// The tone frequency satisfies 2 - a12*a21 = 2cos(2*pi*f/f_OS); amplitude
// and phase come from the initial values x1(0), x2(0), loaded by 'load':
//   sine of amplitude A:   x2(0) = 0, x1(0) = A*sin(w)/a12
//   cosine of amplitude A: x2(0) = A, x1(0) = A*a21/2
// Structure, a12 and the mux constants follow the published DSG.  K is a
// setup input given as up to three signed powers of two (k_cfg), so K*y_S is
// a sum of shifted copies and the DSG stays multiplier-free; it should be set
// as close to a21 as three terms allow, which removes most of the
// modulator's shaped noise from the resonator.  The fractional widths, the
// a21 format and the three-term limit are this design's choice.
//
// Interface: ys is Q2.FRAC, x1 is Q6.FRAC, a21 is unsigned with 32
// fractional bits (FRAC >= 32).  ys and ds change every clock.
module dsg
  import bist_pkg::*;
#(
  parameter int unsigned FRAC      = 40,
  parameter int unsigned A12_SHIFT = 10      // a12 = 2^-10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [31:0]            a21,        // 0.32 unsigned
  input  k_cfg_t                 k_cfg,      // K as signed powers of two
  input  logic signed [FRAC+5:0] x1_init,    // Q6.FRAC
  input  logic signed [FRAC+1:0] x2_init,    // Q2.FRAC
  output logic signed [FRAC+1:0] ys,         // y_S(m), Q2.FRAC
  output logic                   ds          // D_S(m), 1 = +1
);
  localparam int unsigned X1W = FRAC + 6;
  typedef logic signed [X1W-1:0] x1_t;

  x1_t x1, n1, a21_x, k_x, coef, ky;
  logic signed [FRAC+1:0] x2;

  dsg_dsm3 #(.FRAC(FRAC)) u_dsm (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (load),
    .y    (x2),
    .ds   (ds)
  );

  always_comb begin
    a21_x = x1_t'({1'b0, a21}) <<< (FRAC - 32);
    k_x   = '0;
    ky    = '0;
    for (int t = 0; t < int'(K_TERMS); t++) begin
      if (k_cfg[t].en) begin
        if (k_cfg[t].neg) begin
          k_x = k_x - ((x1_t'(1) <<< FRAC) >>> k_cfg[t].shift);
          ky  = ky  - (x1_t'(x2) >>> k_cfg[t].shift);
        end else begin
          k_x = k_x + ((x1_t'(1) <<< FRAC) >>> k_cfg[t].shift);
          ky  = ky  + (x1_t'(x2) >>> k_cfg[t].shift);
        end
      end
    end
    coef  = ds ? (k_x - a21_x) : (a21_x - k_x);
    n1    = x1 - ky + coef;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
    end else if (load) begin
      x1 <= x1_init;
      x2 <= x2_init;
    end else begin
      x1 <= n1;
      x2 <= x2 + (FRAC+2)'(n1 >>> A12_SHIFT);
    end
  end

  assign ys = x2;
endmodule
