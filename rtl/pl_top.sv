// pl_top - the pulsed-latch designs side by side.
//
// Four independent circuits, each with its own ports:
//   * vp_*   : 32 x 32-bit register file with 4 virtual read ports and 2
//              virtual write ports over one physical read path and one
//              write path (pl_rf_vp), clocked by clk_rf at 500 MHz.
//   * rf1_*  : 32 x 32-bit pulsed-latch register file with one read and one
//              write port (pl_rf_1r1w), also on clk_rf.
//   * sw_*, mux_* : two 16-bit reconfigurable pulsed-latch registers, one
//              with the header-switch pulser and one with the multiplexed
//              delay-unit pulser. Both take their pulse-width control from
//              one shared supply detector (ctrl_gen) driven by vdd_mv, the
//              supply voltage in millivolts; ctrl is brought out.
//   * sg_*   : 16-bit register with pulser self gating.
// The registers run on clk_reg. The circuits do not exchange signals.
// Timing of each part is described in its own module. The active-low pulse
// of each reconfigurable register is brought out as well, for observation.
// Lint reports circular logic on sg_pulse: that is the self-gating loop,
// explained in pl_register_selfgated, and it stands.
module pl_top
  import pl_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned B  = 32,
  parameter int unsigned M  = 4,
  parameter int unsigned P  = 2,
  parameter int unsigned RB = 16,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic                 clk_rf,
  input  logic                 clk_reg,
  // virtual-port register file
  input  logic [M-1:0]         vp_rd_en,
  input  logic [M-1:0][AW-1:0] vp_rd_address,
  output logic [M-1:0][B-1:0]  vp_rd_data,
  input  logic [P-1:0]         vp_wr_en,
  input  logic [P-1:0][AW-1:0] vp_wr_address,
  input  logic [P-1:0][B-1:0]  vp_wr_data,
  // 1R1W register file
  input  logic                 rf1_wr_en,
  input  logic [AW-1:0]        rf1_wr_address,
  input  logic [B-1:0]         rf1_data_in,
  input  logic                 rf1_rd_en,
  input  logic [AW-1:0]        rf1_rd_address,
  output logic [B-1:0]         rf1_data_out,
  // reconfigurable registers
  input  logic [15:0]          vdd_mv,
  output logic                 ctrl,
  input  logic [RB-1:0]        sw_d,
  output logic [RB-1:0]        sw_q,
  output logic                 sw_pulse,
  output logic                 sw_pulse_b,
  input  logic [RB-1:0]        mux_d,
  output logic [RB-1:0]        mux_q,
  output logic                 mux_pulse,
  output logic                 mux_pulse_b,
  // self-gated register
  input  logic [RB-1:0]        sg_d,
  output logic [RB-1:0]        sg_q,
  output logic                 sg_pulse
);
  timeunit 1ps; timeprecision 1ps;

  pl_rf_vp #(.W(W), .B(B), .M(M), .P(P)) u_rf_vp (
    .clk(clk_rf), .rd_en(vp_rd_en), .rd_address(vp_rd_address), .rd_data(vp_rd_data),
    .wr_en(vp_wr_en), .wr_address(vp_wr_address), .wr_data(vp_wr_data)
  );

  pl_rf_1r1w #(.W(W), .B(B)) u_rf_1r1w (
    .clk(clk_rf), .wr_en(rf1_wr_en), .wr_address(rf1_wr_address), .data_in(rf1_data_in),
    .rd_en(rf1_rd_en), .rd_address(rf1_rd_address), .data_out(rf1_data_out)
  );

  ctrl_gen u_ctrl_gen (.vdd_mv(vdd_mv), .ctrl(ctrl));

  recon_pl_register #(.B(RB), .KIND(PULSER_SW)) u_reg_sw (
    .clk(clk_reg), .ctrl(ctrl), .d(sw_d), .q(sw_q), .pulse(sw_pulse), .pulse_b(sw_pulse_b)
  );

  recon_pl_register #(.B(RB), .KIND(PULSER_MUX)) u_reg_mux (
    .clk(clk_reg), .ctrl(ctrl), .d(mux_d), .q(mux_q), .pulse(mux_pulse), .pulse_b(mux_pulse_b)
  );

  pl_register_selfgated #(.B(RB)) u_reg_sg (
    .clk(clk_reg), .d(sg_d), .q(sg_q), .pulse(sg_pulse)
  );
endmodule
