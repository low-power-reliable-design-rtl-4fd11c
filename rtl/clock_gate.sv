// clock_gate - latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low,
// and the gated clock is clk AND the latched enable. Because the latch is
// closed while clk is high, a change of en during the high phase cannot cut
// or create a clock pulse. The register files use one of these in each
// internal clock generator so that the read or write logic receives no clock
// in a cycle in which none of its ports is enabled.
//
// Interface: clk, en (must be valid during the low phase before the rising
// edge it is meant to pass), gclk.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  timeunit 1ps; timeprecision 1ps;

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
