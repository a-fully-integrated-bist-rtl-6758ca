// d3t_mut: BEHAVIOURAL MODEL (not synthesizable) of the analog second-order
// switched-capacitor delta-sigma modulator with the D3T input stage.
//
// One clock cycle stands for one Φ1/Φ2 pair.  The model evaluates the switch
// enables of d3t_switch_ctrl for the Φ1 half (sampling) and the Φ2 half
// (charge transfer) and turns them into the differential charge each input
// branch delivers:
//   normal mode (T = 0, Dij = 1): each branch samples V_i+ - V_i-;
//   test mode   (T = 1): each branch samples ±2*V_REF, sign set by Dij.
// The sum over both branches, normalised to the reference, is the modulator
// input u, so in test mode u = (D_i0 + D_i1)/2 with D = ±1, which gives the
// (1 + z^-K)/2 term of the D3T transfer function when D_i1 is a delayed D_i0.
// Normal-mode full scale is a differential input of ±2*V_REF.
// The loop is an ideal Boser-Wooley pair of delaying integrators with gains
// 1/2 and 1/2 and a sign comparator; capacitor ratios, OPAMP non-idealities
// and noise are not modelled (the published text gives none of them).
// Only the switches that carry charge in each half are read: the sampling
// switches (SA, SB, S1) of the Φ1 decode and the transfer switches (S2, S3,
// S4, SC, SD) of the Φ2 decode.  The other bits of each decode, and the
// reference-feedback pair (replaced here by the ideal loop), are left unread.
// Interface: do_bit is registered and changes once per clock.
module d3t_mut
  import bist_pkg::*;
#(
  parameter real VREF = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  input  logic di0,
  input  logic di1,
  input  real  vin,       // V_i+ - V_i-, volts
  output logic do_bit     // D_o, 1 = +1
);
  phases_t ph_s, ph_t;
  d3t_sw_t sw_s, sw_t;
  real     y1, y2, u, v;

  assign ph_s = '{phi1: 1'b1, phi1d: 1'b1, phi2: 1'b0, phi2d: 1'b0};
  assign ph_t = '{phi1: 1'b0, phi1d: 1'b0, phi2: 1'b1, phi2d: 1'b1};

  d3t_switch_ctrl u_sw_s (.ph(ph_s), .t(t), .di0(di0), .di1(di1), .do_bit(do_bit), .sw(sw_s));
  d3t_switch_ctrl u_sw_t (.ph(ph_t), .t(t), .di0(di0), .di1(di1), .do_bit(do_bit), .sw(sw_t));

  // Differential charge (in volts of sampled voltage) of one branch.
  function automatic real branch_q(input d3t_branch_sw_t s1, input d3t_branch_sw_t s2,
                                   input real vi, input real vref);
    real vpos1, vpos2, vneg1, vneg2, q;
    // Positive capacitor: bottom plate to V_i+ (SA) or V_REF (S1) in Φ1,
    // to V_CM in Φ2.  Negative capacitor: bottom plate to V_i- (SB) or V_CM
    // (S5) in Φ1, to V_REF (S2) or V_CM (SE) in Φ2.  V_CM = 0 here and the
    // differential input is split symmetrically.
    vpos1 = s1.sa ? vi / 2.0 : (s1.s1 ? vref : 0.0);
    vpos2 = 0.0;
    vneg1 = s1.sb ? -vi / 2.0 : 0.0;
    vneg2 = s2.s2 ? vref : 0.0;
    q = (vpos1 - vpos2) - (vneg1 - vneg2);
    // Top plates: SC/SD keep the polarity, S3/S4 cross it.
    if (s2.sc && s2.sd)      return q;
    else if (s2.s3 && s2.s4) return -q;
    else                     return 0.0;
  endfunction

  always_comb begin
    u = (branch_q(sw_s.br0, sw_t.br0, vin, VREF) +
         branch_q(sw_s.br1, sw_t.br1, vin, VREF)) / (4.0 * VREF);
    v = sw_t.ref_pos ? 1.0 : -1.0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= 0.0;
      y2 <= 0.0;
      do_bit <= 1'b0;
    end else begin
      y1 <= y1 + 0.5 * (u - v);
      y2 <= y2 + 0.5 * (y1 - v);
      do_bit <= (y2 + 0.5 * (y1 - v)) >= 0.0;
    end
  end
endmodule
