// pl_rf_1r1w - register file with one read and one write port built from
// pulsed latches.
//
// Structure: a write decoder turns wr_en/wr_address into row enables; each
// row of the data array is B latches under one gated pulser, so a write
// opens exactly one row for a short pulse after the rising clock edge. The
// read side holds the read address in a small pulsed-latch register that is
// loaded at the rising edge when rd_en is high, and a W-to-1 multiplexer
// drives data_out from it. With rd_en low the address register is not
// loaded, so data_out keeps reading the last address (and follows writes
// to that word).
// One delay chain of PULSE_PS, shared by every pulser in the file, sets the
// pulse width (all pulsers take the clock and its delayed copy). With
// SHARED_DELAY = 0 the data-array rows use enable pulsers with their own
// delay buffers instead (same pulse width); the read-address register keeps
// the shared chain.
//
// Timing: wr_en, wr_address, data_in, rd_en and rd_address must be stable
// from the clock low phase before a rising edge until PULSE_PS after it. A
// write becomes visible in the array at that edge; a read requested at an
// edge shows on data_out after that edge (one cycle latency). A read of the
// word being written at the same edge returns the new word.
// W = 32 and B = 32 follow the sizes the design is evaluated at; the pulse
// width is a placeholder.
module pl_rf_1r1w #(
  parameter int unsigned W        = 32,
  parameter int unsigned B        = 32,
  parameter int unsigned PULSE_PS = 100,
  parameter bit          SHARED_DELAY = 1'b1,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_address,
  input  logic [B-1:0]  data_in,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_address,
  output logic [B-1:0]  data_out
);
  timeunit 1ps; timeprecision 1ps;

  logic                clk_del;
  logic [W-1:0]        en;
  logic [W-1:0][B-1:0] rows;
  logic                rd_pulse;
  logic [AW-1:0]       rd_address_q;

  delay_buffer #(.DELAY_PS(PULSE_PS)) u_clk_del (.a(clk), .y(clk_del));

  rf_write_decoder #(.W(W)) u_wdec (.wr_en(wr_en), .wr_address(wr_address), .en(en));

  pl_data_array #(.W(W), .B(B), .SHARED_DELAY(SHARED_DELAY), .PULSE_PS(PULSE_PS)) u_array (
    .clk(clk), .clk_del(clk_del), .en(en), .data_in(data_in), .rows(rows)
  );

  // Read address register: pulsed latches loaded only for an enabled read.
  pulser_2clk u_rd_pulser (.en(rd_en), .clk(clk), .clk_del(clk_del), .pulse(rd_pulse));
  pl_latches #(.B(AW)) u_rd_addr (.pulse(rd_pulse), .d(rd_address), .q(rd_address_q));

  rf_read_mux #(.W(W), .B(B)) u_rmux (.rows(rows), .addr(rd_address_q), .data_out(data_out));
endmodule
