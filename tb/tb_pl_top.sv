// tb_pl_top - end-to-end run of the whole top at its default sizes.
//   * Virtual-port register file: writes through both write ports, then
//     cycles with four reads, two writes, gated read/write cycles and a
//     disabled port, checked against a reference array.
//   * 1R1W register file: fill, then read back every word.
//   * Reconfigurable registers: the supply value switches between 1050 mV
//     and 700 mV; ctrl must follow, both registers must capture every word,
//     and both pulses must be wider at 700 mV.
//   * Self-gated register: the pulser must fire only when the data changes.
// Each mechanism is counted and must occur at least once.
module tb_pl_top;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 32, B = 32, M = 4, P = 2, RB = 16, AW = 5;
  localparam int unsigned T = 2000, TR = 1000;
  int checks = 0, failures = 0;
  logic clk_rf = 1'b0, clk_reg = 1'b0;
  logic [M-1:0] vp_rd_en = '0;
  logic [M-1:0][AW-1:0] vp_rd_address = '0;
  logic [M-1:0][B-1:0] vp_rd_data, vp_exp;
  logic [P-1:0] vp_wr_en = '0;
  logic [P-1:0][AW-1:0] vp_wr_address = '0;
  logic [P-1:0][B-1:0] vp_wr_data = '0;
  logic rf1_wr_en = 1'b0, rf1_rd_en = 1'b0;
  logic [AW-1:0] rf1_wr_address = '0, rf1_rd_address = '0;
  logic [B-1:0] rf1_data_in = '0, rf1_data_out;
  logic [15:0] vdd_mv = 16'd1050;
  logic ctrl;
  logic [RB-1:0] sw_d = '0, sw_q, mux_d = '0, mux_q, sg_d = '0, sg_q;
  logic sw_pulse, mux_pulse, sg_pulse, sw_pulse_b, mux_pulse_b;
  logic [B-1:0] vp_mem [W], rf1_mem [W];
  int n_vp_four = 0, n_vp_two_wr = 0, n_vp_gated = 0, n_vp_hold = 0;
  int n_rf1_rd = 0, n_mode_low = 0, n_mode_nom = 0, n_wider = 0, n_sg_skip = 0, n_sg_fire = 0;
  time r_sw, r_mux, w_sw, w_mux;
  int sg_pulses = 0;

  pl_top dut (.*);

  always #(T/2)  clk_rf  = ~clk_rf;
  always #(TR/2) clk_reg = ~clk_reg;
  always @(posedge sw_pulse)  r_sw = $time;
  always @(negedge sw_pulse)  if ($time > 0) w_sw = $time - r_sw;
  always @(posedge mux_pulse) r_mux = $time;
  always @(negedge mux_pulse) if ($time > 0) w_mux = $time - r_mux;
  always @(posedge sg_pulse)  sg_pulses++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- register files (clk_rf) ----------------
  initial begin : rf_test
    for (int a = 0; a < W; a += 2) begin
      @(negedge clk_rf);
      vp_wr_en = '1; vp_wr_address[0] = AW'(a); vp_wr_address[1] = AW'(a + 1);
      vp_wr_data[0] = $urandom; vp_wr_data[1] = $urandom;
      vp_mem[a] = vp_wr_data[0]; vp_mem[a + 1] = vp_wr_data[1];
      rf1_wr_en = 1'b1; rf1_wr_address = AW'(a); rf1_data_in = $urandom; rf1_mem[a] = rf1_data_in;
    end
    for (int a = 1; a < W; a += 2) begin
      @(negedge clk_rf); vp_wr_en = '0;
      rf1_wr_en = 1'b1; rf1_wr_address = AW'(a); rf1_data_in = $urandom; rf1_mem[a] = rf1_data_in;
    end
    @(negedge clk_rf); rf1_wr_en = 1'b0;
    vp_exp = '0;
    for (int i = 0; i < 64; i++) begin
      logic [M-1:0][B-1:0] nxt;
      logic [W-1:0] wnow;
      @(negedge clk_rf);
      vp_wr_en = (i % 5 == 4) ? '0 : P'($urandom_range(1, 3));
      for (int p = 0; p < P; p++) begin vp_wr_address[p] = AW'($urandom); vp_wr_data[p] = $urandom; end
      if (i % 4 == 1) vp_wr_en = '1;
      vp_rd_en = (i == 0) ? '1 : ((i % 6 == 3) ? '0 : M'($urandom));
      if (i % 4 == 2) vp_rd_en = '1;
      wnow = '0;
      for (int p = 0; p < P; p++) if (vp_wr_en[p]) wnow[vp_wr_address[p]] = 1'b1;
      for (int k = 0; k < M; k++) begin
        logic [AW-1:0] a;
        a = AW'($urandom);
        while (wnow[a]) a = a + 1'b1;
        vp_rd_address[k] = a;
      end
      nxt = vp_exp;
      for (int k = 0; k < M; k++) if (vp_rd_en[k]) nxt[k] = vp_mem[vp_rd_address[k]];
      if (vp_rd_en == '1) n_vp_four++;
      if (vp_wr_en == '1) n_vp_two_wr++;
      if (vp_rd_en == '0) n_vp_gated++;
      if (i > 0 && vp_rd_en != '0 && vp_rd_en != '1) n_vp_hold++;
      for (int p = 0; p < P; p++) if (vp_wr_en[p]) vp_mem[vp_wr_address[p]] = vp_wr_data[p];
      rf1_rd_en = 1'b1; rf1_rd_address = AW'(i % W);
      @(posedge clk_rf); #(T - 50);
      vp_exp = nxt;
      for (int k = 0; k < M; k++) chk(vp_rd_data[k] === vp_exp[k], $sformatf("vp port %0d", k));
      chk(rf1_data_out === rf1_mem[i % W], "rf1 read");
      n_rf1_rd++;
    end
  end

  // ---------------- registers (clk_reg) ----------------
  initial begin : reg_test
    time w_sw_nom, w_mux_nom;
    logic [RB-1:0] sg_model;
    w_sw_nom = 0; w_mux_nom = 0;
    @(negedge clk_reg); sg_d = 16'h00ff;
    @(posedge clk_reg); #(TR/4); sg_model = sg_d;
    for (int i = 0; i < 120; i++) begin
      int n_before;
      logic chg;
      @(negedge clk_reg);
      vdd_mv = ((i / 10) % 2 == 1) ? 16'd700 : 16'd1050;
      sw_d = 16'($urandom); mux_d = 16'($urandom);
      chg = bit'($urandom_range(0, 2) == 0);
      if (chg) sg_d = ~sg_model;
      n_before = sg_pulses;
      #1 chk(ctrl === (vdd_mv == 16'd700), "ctrl follows supply");
      @(posedge clk_reg); #(TR/4);
      chk(sw_q === sw_d && mux_q === mux_d, "reconfigurable registers capture");
      if (chg) sg_model = sg_d;
      chk(sg_q === sg_model, "self-gated capture");
      chk((sg_pulses - n_before) == int'(chg), "self-gated pulse count");
      if (chg) n_sg_fire++; else n_sg_skip++;
      if (ctrl) begin
        n_mode_low++;
        if (w_sw_nom > 0 && w_sw > w_sw_nom && w_mux > w_mux_nom) n_wider++;
      end else begin
        n_mode_nom++; w_sw_nom = w_sw; w_mux_nom = w_mux;
      end
    end
  end

  initial begin
    #(T * 180);
    chk(n_vp_four > 0 && n_vp_two_wr > 0 && n_vp_gated > 0 && n_vp_hold > 0, "vp mechanisms");
    chk(n_rf1_rd > 0, "1r1w reads");
    chk(n_mode_low > 0 && n_mode_nom > 0 && n_wider > 0, "pulse width reconfiguration");
    chk(n_sg_skip > 0 && n_sg_fire > 0, "self gating");
    $display("vp four_reads=%0d two_writes=%0d gated=%0d hold=%0d | rf1 reads=%0d | low=%0d nom=%0d wider=%0d | sg skip=%0d fire=%0d",
      n_vp_four, n_vp_two_wr, n_vp_gated, n_vp_hold, n_rf1_rd, n_mode_low, n_mode_nom, n_wider, n_sg_skip, n_sg_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * 260); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
