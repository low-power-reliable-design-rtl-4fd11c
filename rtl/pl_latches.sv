// pl_latches - a row of latches that share one pulser.
//
// B level-sensitive latches with a common enable. While pulse is high every
// latch is transparent and q follows d; when pulse falls the value is held.
// Driven by a short pulse from a pulser, the row behaves like an
// edge-triggered register with a very small transparency window, which is
// the pulsed-latch principle. The transistor-level transmission-gate latch
// is represented by an always_latch, which maps onto a D-latch cell.
//
// Interface: pulse, d[B] -> q[B]. d must be stable while pulse is high.
//
// Tool note: when this row is flattened into a parent whose pulse comes from
// a pulser, Verilator's lint can report that the always_latch holds no latch.
// The report stands: it comes from the flattened view only (it disappears
// with inlining turned off and for this module on its own), synthesis maps
// every bit onto a D-latch, and the testbenches check that q holds its value
// while pulse is low.
module pl_latches #(
  parameter int unsigned B = 32
) (
  input  logic         pulse,
  input  logic [B-1:0] d,
  output logic [B-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (pulse) q = d;
  end
endmodule
