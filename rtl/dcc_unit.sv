// dcc_unit: behavioural model of one duty-cycle-corrector unit. Two narrow
// pulse generators turn the rising edges of the major clock c1 and of the
// minor clock c2 into short pulses that set and clear an SR latch.
//
// When the loop is locked c2 is c1 delayed by half a reference period, so
// the latch output q rises with c1, falls half a period later and has a 50%
// duty cycle whatever the duty cycle of c1. The latch is intended: it is the
// SR latch of the circuit. The narrow pulse width
// (T_NP_PS) is this design's choice; q starts low.
`timescale 1ps/1fs
module dcc_unit #(
  parameter real T_NP_PS = 50.0
) (
  input  logic c1,
  input  logic c2,
  output logic q
);

  logic c1_d, c2_d, set_p, clr_p;

  initial begin
    c1_d = 1'b0; c2_d = 1'b0; q = 1'b0;
  end

  always @(c1) c1_d <= #(T_NP_PS) c1;
  always @(c2) c2_d <= #(T_NP_PS) c2;

  assign set_p = c1 & ~c1_d;
  assign clr_p = c2 & ~c2_d;

  always_latch begin
    if (set_p)      q = 1'b1;
    else if (clr_p) q = 1'b0;
  end

endmodule
