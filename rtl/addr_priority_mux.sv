// addr_priority_mux - read address multiplexer of the virtual read ports.
//
// A chain of 2:1 multiplexers: the stage nearest the output passes port 0's
// address when sel[0] is active, otherwise the next stage decides, and so
// on; the last stage's default input is port 0's address again. So port 0
// has the highest priority, then port 1, and with no select active the
// output is port 0's address, which lets port 0 - the first port served in
// a cycle - be set up early.
//
// Interface: addr[M][AW], sel[M] -> addr_mux[AW]. Combinational.
module addr_priority_mux #(
  parameter int unsigned M  = 4,
  parameter int unsigned AW = 5
) (
  input  logic [M-1:0][AW-1:0] addr,
  input  logic [M-1:0]         sel,
  output logic [AW-1:0]        addr_mux
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    addr_mux = addr[0];
    for (int k = M - 1; k >= 0; k--) begin
      if (sel[k]) addr_mux = addr[k];
    end
  end
endmodule
