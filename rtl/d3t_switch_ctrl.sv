// d3t_switch_ctrl: switch-enable decoder of the D3T modulator input stage.
//
// Combines the clock phases (Φ1, Φ1', Φ2, Φ2'), the test-mode pin T, the two
// digital stimuli D_i0/D_i1 and the modulator output D_o into the enable of
// every input-stage and reference switch.  The Boolean term of each switch is
// the one printed next to it in the published schematic:
//   S1j = Φ1'&T    SAj = Φ1'&~T   S3j = Φ2&~Dij  SCj = Φ2&Dij
//   S2j = Φ2'&T    SBj = Φ1'&~T   SEj = ~T&Φ2'   S5j = T&Φ1'
//   S4j = Φ2&~Dij  SDj = Φ2&Dij   reference: Φ2&Do, Φ2&~Do
// With T = 0 and Dij = 1, S1j..S5j stay off (normal mode); with T = 1,
// SAj, SBj and SEj stay off and Dij steers the sampled V_REF charge (digital
// test mode).  Purely combinational.
// None of the printed terms uses the plain Φ1 phase (sampling switches use
// the delayed Φ1'), so ph.phi1 is an input of the interface that this block
// never reads; it is kept so that the four-phase bundle stays whole.
module d3t_switch_ctrl
  import bist_pkg::*;
(
  input  phases_t ph,
  input  logic    t,
  input  logic    di0,
  input  logic    di1,
  input  logic    do_bit,
  output d3t_sw_t sw
);
  function automatic d3t_branch_sw_t branch(input phases_t p, input logic tm, input logic d);
    d3t_branch_sw_t b;
    b.s1 = p.phi1d & tm;
    b.sa = p.phi1d & ~tm;
    b.s3 = p.phi2  & ~d;
    b.sc = p.phi2  & d;
    b.s2 = p.phi2d & tm;
    b.sb = p.phi1d & ~tm;
    b.se = ~tm     & p.phi2d;
    b.s5 = tm      & p.phi1d;
    b.s4 = p.phi2  & ~d;
    b.sd = p.phi2  & d;
    return b;
  endfunction

  always_comb begin
    sw.br0     = branch(ph, t, di0);
    sw.br1     = branch(ph, t, di1);
    sw.ref_pos = ph.phi2 & do_bit;
    sw.ref_neg = ph.phi2 & ~do_bit;
  end
endmodule
