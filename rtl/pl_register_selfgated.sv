// pl_register_selfgated - pulsed-latch register with pulser self gating.
//
// A shared pulser is the largest power consumer of a pulsed-latch register,
// and most cycles store the value the register already holds. Here every
// latch compares its input with its stored value; a latch whose value would
// change pulls a shared wired-OR line, PulseEnable, and only then does the
// pulser fire. In silicon the comparator is two transistors per latch and a
// third discharges the precharged PulseEnable node; here it is written as
// PulseEnable = |(d ^ q). The pulser is the enable_pulser (enable NORed
// into the clock path, own delay chain of PULSE_PS). The comparison is made
// during the low phase; once the pulse has started, q taking the new value
// does not shorten it, because the pulse end is set by the delayed signal.
//
// Interface: clk, d[B] -> q[B], pulse (pulser output, to observe gating).
// Timing: d must be stable from the low phase before a rising edge until
// PULSE_PS after it; q takes d at the edge, and no pulse is produced when
// d == q. Width 16 follows the test register the technique was tried on;
// PULSE_PS is a placeholder. Not modelled: the precharge device and its
// timing.
//
// Combinational loop: q feeds the comparator, the comparator enables the
// pulser and the pulser opens the latches that drive q. Lint (circular logic
// on pulse) and synthesis (logic loop) both report it, and it stands: it is
// the self-gating principle itself. It is broken in time, not in logic: once
// the pulse has started, the comparator result can only end it early through
// the pulser's delay chain, and the latches close when the pulse ends, after
// which d == q keeps the pulser off. The end-to-end and unit testbenches
// check that every changed value is captured and unchanged values fire no
// pulse.
module pl_register_selfgated #(
  parameter int unsigned B        = 16,
  parameter int unsigned PULSE_PS = 100
) (
  input  logic         clk,
  input  logic [B-1:0] d,
  output logic [B-1:0] q,
  output logic         pulse
);
  timeunit 1ps; timeprecision 1ps;

  logic pulse_enable;

  assign pulse_enable = |(d ^ q);

  enable_pulser #(.DELAY_PS(PULSE_PS)) u_pulser (.en(pulse_enable), .clk(clk), .pulse(pulse));

  pl_latches #(.B(B)) u_latches (.pulse(pulse), .d(d), .q(q));
endmodule
