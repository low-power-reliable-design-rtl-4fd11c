// ctrl_gen - supply-voltage detector that produces the pulse-width control.
//
// Kind: behavioural model of an analog circuit. In silicon a resistive
// transistor divider produces a little under VDD/2 and drives a
// pseudo-NMOS inverter (strong NMOS pull-down, weak PMOS and NMOS pull-ups in
// parallel), followed by two CMOS inverters. At nominal VDD the divider turns
// the pull-down on hard and the pseudo-NMOS output reads as 0; at scaled-down
// VDD the pull-down is barely on and the output reads as 1. The model takes
// the supply as a number in millivolts and compares it with VTH_MV, the
// switching point set in silicon by transistor sizes and thresholds. The
// default threshold sits between the two operating points used for the
// reconfigurable registers (1.05 V and 0.7 V) with room for +-5 % supply
// tolerance on each side; the exact value is this model's choice.
//
// Interface: vdd_mv[15:0] -> ctrl (1 = low supply, use the wider pulse).
// Combinational.
module ctrl_gen #(
  parameter int unsigned VTH_MV = 870
) (
  input  logic [15:0] vdd_mv,
  output logic        ctrl
);
  timeunit 1ps; timeprecision 1ps;

  logic pseudo_nmos_out, inv1_out;

  assign pseudo_nmos_out = (32'(vdd_mv) < VTH_MV);  // pull-down too weak at low VDD
  assign inv1_out        = ~pseudo_nmos_out;
  assign ctrl            = ~inv1_out;
endmodule
