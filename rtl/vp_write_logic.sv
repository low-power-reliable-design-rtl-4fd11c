// vp_write_logic - virtual write ports over one write decoder.
//
// One write decoder and one data-array write clock serve P write ports in a
// single clock cycle. The cycle is divided into P slots, one per port, and
// each slot into two intervals:
//   * Port selector: three multiplexers pass the enable, address and data of
//     the port whose slot it is (wr_en_current, wr_address_current,
//     wr_data_current) to the decoder and the array. The write port selector
//     derives the select from the phase clocks; for P = 2 it is simply the
//     gated clock, port 0 while it is high and port 1 while it is low.
//   * Data array clock generator: an AND-OR gate raises clkw_data_array in
//     the second interval of each slot whose port is enabled, after the
//     address has been decoded and the data routed. For P = 2 this is
//     wr_en_current & ((ph0 & ph1) | (~ph0 & ~ph1)).
// The P phases come from phase_clock_gen with STEP = T/(2P), so the 2P phase
// edges mark the slot and interval boundaries. Ports are written in order
// 0..P-1, so if two ports write the same word the last one wins.
//
// Interface: phw[P]; wr_en[P], wr_address[P][AW], wr_data[P][B] (held for
// the whole cycle) -> current enable/address/data and clkw_data_array.
module vp_write_logic #(
  parameter int unsigned P  = 2,
  parameter int unsigned AW = 5,
  parameter int unsigned B  = 32
) (
  input  logic [P-1:0]         phw,
  input  logic [P-1:0]         wr_en,
  input  logic [P-1:0][AW-1:0] wr_address,
  input  logic [P-1:0][B-1:0]  wr_data,
  output logic                 wr_en_current,
  output logic [AW-1:0]        wr_address_current,
  output logic [B-1:0]         wr_data_current,
  output logic                 clkw_data_array
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned E = 2 * P;

  logic [E-1:0] lvl;     // lvl[j] rises at edge j
  logic [P-1:0] slot;    // write port selector: port k's slot
  logic [P-1:0] trig;    // second interval of port k's slot

  for (genvar j = 0; j < E; j++) begin : g_lvl
    if (j < P) begin : g_rise
      assign lvl[j] = phw[j];
    end else begin : g_fall
      assign lvl[j] = ~phw[j-P];
    end
  end

  for (genvar k = 0; k < P; k++) begin : g_slot
    if (P == 1) begin : g_one
      assign slot[k] = 1'b1;
    end else begin : g_many
      assign slot[k] = lvl[2*k] & ~lvl[(2*k+2) % E];
    end
    assign trig[k] = lvl[2*k+1] & ~lvl[(2*k+2) % E];
  end

  // Port selector multiplexers.
  always_comb begin
    wr_en_current      = wr_en[0];
    wr_address_current = wr_address[0];
    wr_data_current    = wr_data[0];
    for (int k = P - 1; k >= 0; k--) begin
      if (slot[k]) begin
        wr_en_current      = wr_en[k];
        wr_address_current = wr_address[k];
        wr_data_current    = wr_data[k];
      end
    end
  end

  // Data array clock generator (AND-OR).
  assign clkw_data_array = wr_en_current & (|trig);
endmodule
