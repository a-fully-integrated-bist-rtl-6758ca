// tb_d3t_switch_ctrl: exhaustive self-checking test of the D3T switch decoder.
//
// Applies all 256 combinations of the four phases, T, D_i0, D_i1 and D_o and
// checks every switch enable against the Boolean label of the schematic,
// written out independently here.  It also checks two mode properties: in
// normal mode (T = 0) the test-only switches S1, S2 and S5 never close, and in
// test mode (T = 1) the input-sampling switches SA, SB and SE never close.
`timescale 1ns/1ps
module tb_d3t_switch_ctrl;
  import bist_pkg::*;
  phases_t ph;
  logic t, di0, di1, do_bit;
  d3t_sw_t sw;
  int checks = 0, failures = 0;

  d3t_switch_ctrl dut (.ph(ph), .t(t), .di0(di0), .di1(di1), .do_bit(do_bit), .sw(sw));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s ph=%b t=%b di=%b%b do=%b", what, ph, t, di0, di1, do_bit);
    end
  endtask

  task automatic check_branch(input d3t_branch_sw_t b, input logic d, input string nm);
    check(b.s1 == (ph.phi1d & t),     {nm, " S1"});
    check(b.sa == (ph.phi1d & !t),    {nm, " SA"});
    check(b.s3 == (ph.phi2 & !d),     {nm, " S3"});
    check(b.sc == (ph.phi2 & d),      {nm, " SC"});
    check(b.s2 == (ph.phi2d & t),     {nm, " S2"});
    check(b.sb == (ph.phi1d & !t),    {nm, " SB"});
    check(b.se == (!t & ph.phi2d),    {nm, " SE"});
    check(b.s5 == (t & ph.phi1d),     {nm, " S5"});
    check(b.s4 == (ph.phi2 & !d),     {nm, " S4"});
    check(b.sd == (ph.phi2 & d),      {nm, " SD"});
    if (!t) check(!b.s1 && !b.s2 && !b.s5, {nm, " test switches open in normal mode"});
    else    check(!b.sa && !b.sb && !b.se, {nm, " input switches open in test mode"});
    check(!(b.s3 && b.sc), {nm, " S3/SC never both closed"});
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      {ph.phi1, ph.phi1d, ph.phi2, ph.phi2d, t, di0, di1, do_bit} = 8'(v);
      #1;
      check_branch(sw.br0, di0, "branch 0");
      check_branch(sw.br1, di1, "branch 1");
      check(sw.ref_pos == (ph.phi2 & do_bit),  "reference + switch");
      check(sw.ref_neg == (ph.phi2 & !do_bit), "reference - switch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
