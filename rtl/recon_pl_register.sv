// recon_pl_register - 16-bit reconfigurable pulsed-latch register.
//
// One pulser drives all B latches. The pulser is one of the two
// reconfigurable kinds (KIND = PULSER_SW: header-switch pulser, PULSER_MUX:
// multiplexed delay units). The control input widens the pulse when the
// supply is scaled down, so that the latches still get enough write time,
// and keeps it short at nominal supply, so that no unnecessary transparency
// (hold-time risk) is added. Logically the register captures d at each
// rising clock edge; the pulse width only matters electrically.
//
// Interface: clk, ctrl, d[B] -> q[B], pulse and pulse_b (the pulser outputs,
// brought out so the width can be observed). Timing: q follows d during the pulse that
// starts at the rising edge; d must hold until the pulse ends.
// The register width of 16 follows the test circuit of the design; the pulse
// widths inside the pulser models are placeholders.
module recon_pl_register
  import pl_pkg::*;
#(
  parameter int unsigned  B    = 16,
  parameter pulser_kind_e KIND = PULSER_MUX
) (
  input  logic         clk,
  input  logic         ctrl,
  input  logic [B-1:0] d,
  output logic [B-1:0] q,
  output logic         pulse,
  output logic         pulse_b
);
  timeunit 1ps; timeprecision 1ps;

  if (KIND == PULSER_SW) begin : g_sw
    pulser_sw  u_pulser (.clk(clk), .ctrl(ctrl), .pulse(pulse), .pulse_b(pulse_b));
  end else begin : g_mux
    pulser_mux u_pulser (.clk(clk), .ctrl(ctrl), .pulse(pulse), .pulse_b(pulse_b));
  end

  pl_latches #(.B(B)) u_latches (.pulse(pulse), .d(d), .q(q));
endmodule
