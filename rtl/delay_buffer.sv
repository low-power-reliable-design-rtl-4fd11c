// delay_buffer - behavioural model of a chain of delay buffer cells.
//
// Kind: behavioural model. A buffer chain has no logic function; its only
// property is its propagation delay, which is what this model reproduces.
// The output follows the input after DELAY_PS picoseconds. The delay is
// inertial: a pulse shorter than DELAY_PS is swallowed, as it would be by a
// real buffer chain; every pulse in these designs is much wider than the
// delay it passes through. In silicon this is a string
// of buffer cells sized for the delay; the delay value is a design choice,
// not a number taken from measured silicon.
//
// A synthesis tool drops the delay and turns this module into a wire; every
// pulser built on it (clk & ~delayed clk) then reduces to a constant 0 in a
// zero-delay netlist. A physical implementation replaces it with sized delay
// cells that the flow must not remove.
//
// Interface: a -> y. Timing: y(t) = a(t - DELAY_PS) for
// input pulses of at least DELAY_PS.
module delay_buffer #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic a,
  output logic y
);
  timeunit 1ps; timeprecision 1ps;

  assign #(DELAY_PS) y = a;
endmodule
