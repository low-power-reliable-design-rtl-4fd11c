// enable_pulser - pulser with an enable input and its own delay buffers.
//
// Kind: behavioural model, because it contains a delay chain; the gates
// around it are ordinary logic. A NOR gate with the enable entering inverted
// produces clkb_g = en & ~clk, i.e. the inverted clock while enabled and 0
// otherwise. A buffer chain delays it to clkb_g_del, and the output pulse is
// clk & clkb_g_del: when en is high before the clock rises, clkb_g_del is
// still high at the rising edge, so the pulse starts with the edge and ends
// DELAY_PS later, when the falling clkb_g has passed the buffers. With en low
// no pulse is produced, which is how a register's write enable replaces a
// clock gating cell.
//
// Interface: en (valid during the low phase before the edge), clk -> pulse.
// Timing: pulse = [clk rise, clk rise + DELAY_PS) when enabled.
// When en is derived from the latches this pulser drives (self gating), the
// path en -> pulse -> latch -> en is a deliberate loop; see
// pl_register_selfgated for why it stands.
module enable_pulser #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic en,
  input  logic clk,
  output logic pulse
);
  timeunit 1ps; timeprecision 1ps;

  logic clkb_g, clkb_g_del;

  assign clkb_g = ~(~en | clk);

  delay_buffer #(.DELAY_PS(DELAY_PS)) u_delay (.a(clkb_g), .y(clkb_g_del));

  assign pulse = clk & clkb_g_del;
endmodule
