// pulser_sw - reconfigurable pulser with header switches (PL-SW).
//
// Kind: behavioural model. The pulser is the classic delay-path pulser:
// three inverters delay and invert the clock, a NAND combines the clock with
// that signal and an output inverter gives the pulse. The three inverters run
// from a virtual rail VDI fed through two parallel PMOS header switches, one
// always on and one controlled by CTRL. CTRL = 1 (scaled-down supply) turns
// the controlled switch off, VDI drops a little below VDD, the delay path
// slows down and the pulse widens. That supply dependence is analog; the
// model reproduces it as two delays, SHORT_PS with both switches on and
// LONG_PS with only the always-on switch. The two values are placeholders
// that only have to be ordered SHORT < LONG; in silicon they come from the
// switch sizes.
//
// Interface: clk, ctrl -> pulse, pulse_b. Timing: pulse opens at the rising
// clock edge and lasts SHORT_PS (ctrl = 0) or LONG_PS (ctrl = 1). ctrl should
// only change while clk is low.
module pulser_sw #(
  parameter int unsigned SHORT_PS = 60,
  parameter int unsigned LONG_PS  = 90
) (
  input  logic clk,
  input  logic ctrl,
  output logic pulse,
  output logic pulse_b
);
  timeunit 1ps; timeprecision 1ps;

  logic clk_d_nom, clk_d_low, delay_path;

  // Delay path at the two virtual-rail levels.
  delay_buffer #(.DELAY_PS(SHORT_PS)) u_nom (.a(clk), .y(clk_d_nom));
  delay_buffer #(.DELAY_PS(LONG_PS))  u_low (.a(clk), .y(clk_d_low));

  // Three inverters: the delayed clock arrives inverted at the NAND.
  assign delay_path = ~(ctrl ? clk_d_low : clk_d_nom);
  assign pulse_b    = ~(clk & delay_path);
  assign pulse      = ~pulse_b;
endmodule
