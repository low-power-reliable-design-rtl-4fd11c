// pl_data_array - pulsed-latch data array of a register file.
//
// W registers of B latches. Each register has one gated pulser
// (pulser_2clk) shared by its B latches; the pulser's enable is the row's
// write enable, so the pulser also does the job of a clock gating cell. All
// rows see the same write data. The pulsers take the write clock and a
// delayed copy produced by one delay chain shared by the whole array, so a
// selected row is transparent from the rising edge of clk to the rising
// edge of clk_del.
//
// Two pulser styles are described for the rows. The enable pulser with its
// own delay buffers in every row is the primary one; sharing one delay chain
// among all rows (two clock inputs per pulser) is offered as a cheaper
// alternative that moves the pulse-width control into clock distribution.
// SHARED_DELAY selects between them. This design defaults to the shared
// chain because the virtual-port control builds all of its pulses the same
// way; with SHARED_DELAY = 0 each row uses an enable_pulser of PULSE_PS and
// clk_del is not used.
//
// Interface: clk, clk_del (shared style only), en[W], data_in[B] -> rows[W][B] (all register
// outputs, for the read multiplexers). Timing: en and data_in must be stable
// from before the rising edge of clk until clk_del rises.
module pl_data_array #(
  parameter int unsigned W = 32,
  parameter int unsigned B            = 32,
  parameter bit          SHARED_DELAY = 1'b1,
  parameter int unsigned PULSE_PS     = 100
) (
  input  logic                clk,
  input  logic                clk_del,
  input  logic [W-1:0]        en,
  input  logic [B-1:0]        data_in,
  output logic [W-1:0][B-1:0] rows
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] row_pulse;

  for (genvar r = 0; r < W; r++) begin : g_row
    if (SHARED_DELAY) begin : g_shared
      pulser_2clk u_pulser (
        .en(en[r]), .clk(clk), .clk_del(clk_del), .pulse(row_pulse[r])
      );
    end else begin : g_own
      enable_pulser #(.DELAY_PS(PULSE_PS)) u_pulser (
        .en(en[r]), .clk(clk), .pulse(row_pulse[r])
      );
    end
    pl_latches #(.B(B)) u_latches (
      .pulse(row_pulse[r]), .d(data_in), .q(rows[r])
    );
  end
endmodule
