// tb_recon_pl_register - runs both reconfigurable 16-bit registers (PL-SW
// and PL-MUX pulser) at 1 GHz, switching the control between cycles. Checks
// that q takes d at each rising edge and holds until the next one, and that
// the pulse is wider with ctrl = 1 than with ctrl = 0.
module tb_recon_pl_register;
  import pl_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 1'b0, ctrl = 1'b0;
  logic [15:0] d = '0, q_sw, q_mux, exp_q;
  logic p_sw, p_mux, pb_sw, pb_mux;
  time r_sw, r_mux, w_sw [2], w_mux [2];

  recon_pl_register #(.B(16), .KIND(PULSER_SW)) dut_sw (
    .clk(clk), .ctrl(ctrl), .d(d), .q(q_sw), .pulse(p_sw), .pulse_b(pb_sw));
  recon_pl_register dut_mux (
    .clk(clk), .ctrl(ctrl), .d(d), .q(q_mux), .pulse(p_mux), .pulse_b(pb_mux));

  always #500 clk = ~clk;
  always @(posedge p_sw)  r_sw  = $time;
  always @(negedge p_sw)  w_sw[ctrl]  = $time - r_sw;
  always @(posedge p_mux) r_mux = $time;
  always @(negedge p_mux) w_mux[ctrl] = $time - r_mux;

  initial begin
    w_sw[0] = 0; w_sw[1] = 0; w_mux[0] = 0; w_mux[1] = 0;
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      d = 16'($urandom); ctrl = (i % 8) >= 4;
      exp_q = d;
      @(posedge clk); #200;
      checks += 2;
      if (q_sw  !== exp_q) begin failures++; $display("FAIL sw q=%h exp=%h", q_sw, exp_q); end
      if (q_mux !== exp_q) begin failures++; $display("FAIL mux q=%h exp=%h", q_mux, exp_q); end
      #250 d = ~d;   // change after the pulse: must not be captured
      #40 checks += 2;
      if (q_sw !== exp_q || q_mux !== exp_q) begin failures++; $display("FAIL hold after pulse"); end
    end
    checks += 2;
    if (!(w_sw[1] > w_sw[0] && w_sw[0] > 0))   begin failures++; $display("FAIL sw widths %0t %0t", w_sw[0], w_sw[1]); end
    if (!(w_mux[1] > w_mux[0] && w_mux[0] > 0)) begin failures++; $display("FAIL mux widths %0t %0t", w_mux[0], w_mux[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
