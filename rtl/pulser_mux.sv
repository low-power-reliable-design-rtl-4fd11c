// pulser_mux - reconfigurable pulser with multiplexed delay units (PL-MUX).
//
// Kind: behavioural model (delays). A two-input multiplexer chooses either
// the clock itself (short delay unit, a wire) or the clock after two extra
// inverters (long delay unit). The mux output passes three inverters and
// meets the clock in a NAND; an inverter gives the pulse. The delay path is
// therefore three inverters (plus the mux) or five, and the pulse width is
// MAIN_PS or MAIN_PS + EXTRA_PS. CTRL = 1, the scaled-down supply, selects
// the long unit. The two extra inverters are powered down by CTRL when the
// short unit is selected, modelled here by holding their input low. The
// delay values are placeholders; in silicon they come from transistor sizing.
//
// Interface: clk, ctrl -> pulse, pulse_b. Timing: pulse opens at the rising
// clock edge and lasts MAIN_PS (ctrl = 0) or MAIN_PS + EXTRA_PS (ctrl = 1).
module pulser_mux #(
  parameter int unsigned MAIN_PS  = 60,
  parameter int unsigned EXTRA_PS = 30
) (
  input  logic clk,
  input  logic ctrl,
  output logic pulse,
  output logic pulse_b
);
  timeunit 1ps; timeprecision 1ps;

  logic long_in, long_out, mux_out, main_out, nand_in;

  // Long delay unit: two inverters, idle unless selected.
  assign long_in = clk & ctrl;
  delay_buffer #(.DELAY_PS(EXTRA_PS)) u_long (.a(long_in), .y(long_out));

  assign mux_out = ctrl ? long_out : clk;

  // Three inverters after the multiplexer (odd count: inverting).
  delay_buffer #(.DELAY_PS(MAIN_PS)) u_main (.a(mux_out), .y(main_out));
  assign nand_in = ~main_out;

  assign pulse_b = ~(clk & nand_in);
  assign pulse   = ~pulse_b;
endmodule
