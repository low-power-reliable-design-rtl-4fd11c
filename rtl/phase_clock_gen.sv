// phase_clock_gen - internal clocks generator of the virtual-port logic.
//
// A clock gating cell passes clk to ph[0] only in cycles in which at least
// one port is enabled (en sampled during the preceding low phase). A chain
// of N-1 delay buffers, STEP_PS each, makes ph[i] = ph[0] delayed by
// i*STEP_PS. With STEP_PS = T/(2N) the rising and falling edges of the N
// phases fall at T/(2N) intervals and cut the clock cycle into 2N equal
// time slots, which the read and write logic use to time their pulsers.
// The delay buffers are behavioural (delay_buffer); the gating cell is
// logic.
//
// Interface: clk, en -> ph[N]. Timing: ph[0] rises with clk in enabled
// cycles; ph[i] lags by i*STEP_PS.
module phase_clock_gen #(
  parameter int unsigned N       = 4,
  parameter int unsigned STEP_PS = 250
) (
  input  logic         clk,
  input  logic         en,
  output logic [N-1:0] ph
);
  timeunit 1ps; timeprecision 1ps;

  clock_gate u_cgc (.clk(clk), .en(en), .gclk(ph[0]));

  for (genvar i = 1; i < N; i++) begin : g_del
    delay_buffer #(.DELAY_PS(STEP_PS)) u_del (.a(ph[i-1]), .y(ph[i]));
  end
endmodule
