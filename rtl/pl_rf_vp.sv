// pl_rf_vp - pulsed-latch register file with virtual read and write ports.
//
// The file has one physical read path (one W-to-1 data multiplexer) and one
// physical write path (one decoder, one data-array write clock), yet offers
// M read ports and P write ports. Pulsers make this possible: a pulser can
// open a latch for a short window anywhere inside the cycle, so the single
// paths are time-shared, each port getting its own slot of the cycle.
//
//   inputs --> input pulsed-latch registers (loaded at the rising edge)
//   read:  phase_clock_gen (M phases) -> vp_read_logic -> address latch
//          -> rf_read_mux -> output port latches (rd_data)
//   write: phase_clock_gen (P phases) -> vp_write_logic -> rf_write_decoder
//          + clkw_data_array (and its delayed copy) -> pl_data_array
//
// Each internal clock generator is gated off in a cycle in which none of its
// ports is enabled. Data-array rows use pulser_2clk with one shared delay
// chain (PULSE_PS) on clkw_data_array.
//
// Timing (T = CLK_PERIOD_PS, the clock fed to clk must have this period and
// a 50 % duty cycle, because the internal delay chains are sized from it):
//   * All port inputs must be stable from the clock low phase before a rising
//     edge until PULSE_PS after it; they are captured at that edge.
//   * Reads captured at edge N are served in cycle N in port order; read port
//     k's output is valid from (2k+1)*T/(2M) + data path delay after edge N
//     and stays until the next enabled read on that port. Port M-1 settles
//     by the end of the cycle. A disabled port keeps its last value.
//   * Writes captured at edge N happen in cycle N, port k in the second
//     interval of slot k. Reads in cycle N+1 see them. A read of a word that
//     is written in the same cycle may return either value; when two ports
//     write the same word in one cycle the higher-numbered port wins.
// Defaults are the 4-read / 2-write, 32 x 32-bit configuration at 500 MHz
// that the architecture is evaluated at. PULSE_PS and the slot schedule are
// this design's own choices. Needs PULSE_PS < T/(4P) and PULSE_PS < T/2.
// All slot timing comes from behavioural delay chains; a zero-delay synthesis
// turns them into wires, so the pulsers and everything they load reduce to
// constants unless the chains are built from preserved delay cells.
module pl_rf_vp #(
  parameter int unsigned W             = 32,
  parameter int unsigned B             = 32,
  parameter int unsigned M             = 4,
  parameter int unsigned P             = 2,
  parameter int unsigned CLK_PERIOD_PS = pl_pkg::CLK_PERIOD_PS,
  parameter int unsigned PULSE_PS      = 100,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic                 clk,
  input  logic [M-1:0]         rd_en,
  input  logic [M-1:0][AW-1:0] rd_address,
  output logic [M-1:0][B-1:0]  rd_data,
  input  logic [P-1:0]         wr_en,
  input  logic [P-1:0][AW-1:0] wr_address,
  input  logic [P-1:0][B-1:0]  wr_data
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned RIN = M + M * AW;
  localparam int unsigned WIN = P + P * AW + P * B;

  // ---------------- input pulsed-latch registers ----------------
  logic clk_del, in_pulse;
  logic [M-1:0]         rd_en_s;
  logic [M-1:0][AW-1:0] rd_address_s;
  logic [P-1:0]         wr_en_s;
  logic [P-1:0][AW-1:0] wr_address_s;
  logic [P-1:0][B-1:0]  wr_data_s;

  delay_buffer #(.DELAY_PS(PULSE_PS)) u_clk_del (.a(clk), .y(clk_del));
  pulser_2clk u_in_pulser (.en(1'b1), .clk(clk), .clk_del(clk_del), .pulse(in_pulse));

  pl_latches #(.B(RIN)) u_rd_in (
    .pulse(in_pulse), .d({rd_en, rd_address}), .q({rd_en_s, rd_address_s})
  );
  pl_latches #(.B(WIN)) u_wr_in (
    .pulse(in_pulse), .d({wr_en, wr_address, wr_data}), .q({wr_en_s, wr_address_s, wr_data_s})
  );

  // ---------------- read side ----------------
  logic [M-1:0]  ph;
  logic [AW-1:0] rd_address_current;
  logic [B-1:0]  data_out;

  phase_clock_gen #(.N(M), .STEP_PS(CLK_PERIOD_PS / (2 * M))) u_rclk (
    .clk(clk), .en(|rd_en), .ph(ph)
  );

  vp_read_logic #(.M(M), .AW(AW), .B(B)) u_read (
    .ph(ph), .rd_en(rd_en_s), .rd_address(rd_address_s),
    .rd_address_current(rd_address_current), .data_out(data_out), .rd_data(rd_data)
  );

  // ---------------- write side ----------------
  logic [P-1:0]  phw;
  logic          wr_en_current;
  logic [AW-1:0] wr_address_current;
  logic [B-1:0]  wr_data_current;
  logic          clkw_data_array, clkw_data_array_del;
  logic [W-1:0]  row_en;

  phase_clock_gen #(.N(P), .STEP_PS(CLK_PERIOD_PS / (2 * P))) u_wclk (
    .clk(clk), .en(|wr_en), .ph(phw)
  );

  vp_write_logic #(.P(P), .AW(AW), .B(B)) u_write (
    .phw(phw), .wr_en(wr_en_s), .wr_address(wr_address_s), .wr_data(wr_data_s),
    .wr_en_current(wr_en_current), .wr_address_current(wr_address_current),
    .wr_data_current(wr_data_current), .clkw_data_array(clkw_data_array)
  );

  delay_buffer #(.DELAY_PS(PULSE_PS)) u_wclk_del (.a(clkw_data_array), .y(clkw_data_array_del));

  rf_write_decoder #(.W(W)) u_wdec (
    .wr_en(wr_en_current), .wr_address(wr_address_current), .en(row_en)
  );

  // ---------------- storage and the shared read path ----------------
  logic [W-1:0][B-1:0] rows;

  pl_data_array #(.W(W), .B(B)) u_array (
    .clk(clkw_data_array), .clk_del(clkw_data_array_del), .en(row_en),
    .data_in(wr_data_current), .rows(rows)
  );

  rf_read_mux #(.W(W), .B(B)) u_rmux (.rows(rows), .addr(rd_address_current), .data_out(data_out));
endmodule
