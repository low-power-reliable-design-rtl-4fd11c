// pulser_2clk - enable-gated pulser with its delay chain shared outside.
//
// The gated pulser of a pulsed-latch register file row is a NOR gate used as
// a gated inverter of the clock (en enters inverted), a delay chain, and an
// AND gate with the clock. Here the delay chain is not inside the pulser: the
// pulser receives the clock and a delayed copy of it, so one chain can serve
// many pulsers. Its logic reduces to
//     pulse = clk & NOR(~en, clk_del) = en & clk & ~clk_del
// so the pulse opens at the rising edge of clk and closes at the rising edge
// of clk_del. Driving clk and clk_del with any two phases (or inverted
// phases) of a clock gives a pulse between those two edges; the virtual-port
// register file uses it that way for all its pulser groups.
//
// Interface: en, clk, clk_del -> pulse. en must be stable while the pulse
// window is open. Purely combinational.
module pulser_2clk (
  input  logic en,
  input  logic clk,
  input  logic clk_del,
  output logic pulse
);
  timeunit 1ps; timeprecision 1ps;

  logic clkb_g_del;

  assign clkb_g_del = ~(~en | clk_del);
  assign pulse      = clk & clkb_g_del;
endmodule
