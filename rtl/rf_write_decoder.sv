// rf_write_decoder - write logic of a standard-cell register file.
//
// Decodes the write address into W one-hot row enables. With wr_en low all
// enables are inactive, so no row pulser fires. In the pulsed-latch register
// files each enable goes straight to a row pulser, which takes the place of
// a clock gating cell.
//
// Interface: wr_en, wr_address[$clog2(W)] -> en[W]. Combinational.
module rf_write_decoder #(
  parameter int unsigned W  = 32,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          wr_en,
  input  logic [AW-1:0] wr_address,
  output logic [W-1:0]  en
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    en = '0;
    if (wr_en && (32'(wr_address) < W)) en[wr_address] = 1'b1;
  end
endmodule
