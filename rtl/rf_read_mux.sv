// rf_read_mux - data multiplexer of a register file.
//
// B parallel W-to-1 multiplexers: data_out is the register selected by addr.
// A multiplexer is used instead of tri-state buses because it can be
// buffered. In the virtual-port register file this single multiplexer is
// reused once for every enabled read port within a clock cycle.
//
// Interface: rows[W][B], addr -> data_out[B]. Combinational. An address at or
// above W reads zero.
module rf_read_mux #(
  parameter int unsigned W  = 32,
  parameter int unsigned B  = 32,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0][B-1:0] rows,
  input  logic [AW-1:0]       addr,
  output logic [B-1:0]        data_out
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    data_out = '0;
    if (32'(addr) < W) data_out = rows[addr];
  end
endmodule
