// vp_read_logic - virtual read ports over one data multiplexer.
//
// A conventional register file needs one W-to-1 multiplexer per read port.
// Here a single multiplexer serves all M ports, one after another inside one
// clock cycle, and pulsed latches hold each port's result:
//   * Read address selector pulser group: for each port k >= 1, a pulser
//     enabled by rd_en[k] whose pulse selects port k's address in the
//     address multiplexer during port k's time slot.
//   * Read address sampling pulser group: one pulser per port, enabled by
//     its rd_en; their outputs are ORed into address_pulse, which loads the
//     address latch. Port 0's pulse also serves as port 0's selector.
//   * Current read address sample and hold: the priority address multiplexer
//     and the address latch (rd_address_current), which drives the data
//     multiplexer outside this block.
//   * Output port latches: one B-bit pulsed latch per port, enabled by its
//     rd_en, which captures the data multiplexer output while that port's
//     address is held.
//
// Time slots: the 2M rising and falling edges of the M phase clocks split the
// cycle into 2M equal intervals. Port k samples its address in interval 2k
// and opens its output latch in interval 2k+1, so ports are served in order
// 0, 1, ..., M-1 and every output is settled by the end of the cycle. For
// M = 4 the output latches of ports 0 and 1 open on rising phase edges and
// those of ports 2 and 3 on falling ones. A window between edges a and b is
// a pulser_2clk fed with the phase level that rises at edge a and the one
// that rises at edge b. The schedule is this design's own; only the block
// structure and the port priority are fixed by the architecture. The hold
// margin when an output latch closes at the edge where the next address is
// sampled is the address-latch-to-data-multiplexer delay.
//
// Interface: ph[M] phase clocks; rd_en[M], rd_address[M][AW] (held for the
// whole cycle); data_out[B] from the data multiplexer; outputs
// rd_address_current[AW] and rd_data[M][B]. A port that is not enabled keeps
// its last value. Requires M >= 1.
module vp_read_logic #(
  parameter int unsigned M  = 4,
  parameter int unsigned AW = 5,
  parameter int unsigned B  = 32
) (
  input  logic [M-1:0]         ph,
  input  logic [M-1:0]         rd_en,
  input  logic [M-1:0][AW-1:0] rd_address,
  output logic [AW-1:0]        rd_address_current,
  input  logic [B-1:0]         data_out,
  output logic [M-1:0][B-1:0]  rd_data
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned E = 2 * M;  // edges per cycle

  logic [E-1:0]  lvl;           // lvl[j] rises at edge j
  logic [M-1:0]  addr_pulse;    // sampling pulser group outputs
  logic [M-1:0]  out_pulse;     // output latch pulses
  logic [M-1:0]  sel;           // address mux selects
  logic          address_pulse;
  logic [AW-1:0] rd_address_mux;

  for (genvar j = 0; j < E; j++) begin : g_lvl
    if (j < M) begin : g_rise
      assign lvl[j] = ph[j];
    end else begin : g_fall
      assign lvl[j] = ~ph[j-M];
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_port
    // Address sampling pulser: interval 2k.
    pulser_2clk u_addr_pulser (
      .en(rd_en[k]), .clk(lvl[2*k]), .clk_del(lvl[(2*k+1) % E]), .pulse(addr_pulse[k])
    );
    // Output latch pulser: interval 2k+1.
    pulser_2clk u_out_pulser (
      .en(rd_en[k]), .clk(lvl[2*k+1]), .clk_del(lvl[(2*k+2) % E]), .pulse(out_pulse[k])
    );
    pl_latches #(.B(B)) u_out_latch (.pulse(out_pulse[k]), .d(data_out), .q(rd_data[k]));

    if (k == 0) begin : g_sel0
      assign sel[k] = addr_pulse[k];
    end else begin : g_selk
      // Address selector pulser: intervals 2k and 2k+1.
      pulser_2clk u_sel_pulser (
        .en(rd_en[k]), .clk(lvl[2*k]), .clk_del(lvl[(2*k+2) % E]), .pulse(sel[k])
      );
    end
  end

  assign address_pulse = |addr_pulse;

  addr_priority_mux #(.M(M), .AW(AW)) u_amux (
    .addr(rd_address), .sel(sel), .addr_mux(rd_address_mux)
  );

  pl_latches #(.B(AW)) u_addr_latch (
    .pulse(address_pulse), .d(rd_address_mux), .q(rd_address_current)
  );
endmodule
