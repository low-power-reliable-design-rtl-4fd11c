// tb_wl_vp_port_configs - the full-size 4-read / 2-write virtual-port
// register file used with fewer ports, as a general-purpose register file.
//
// Five configurations run one after another on the default pl_rf_vp
// (32 x 32 bits, 500 MHz): 1R1W, 2R1W, 2R2W, 4R1W and 4R2W, 200 cycles each.
// In each cycle every port that the configuration uses is enabled: random
// data goes to random words and random words are read; the other ports are
// held disabled. Read results are compared 50 ps before the next rising edge
// with a reference array (one cycle latency), and disabled read ports must
// keep their last value. Reads never target a word written in the same
// cycle, whose result is unspecified.
//
// A second, dedicated build with two read ports and one write port
// (M = 2, P = 1) gets read ports 0-1 and write port 0 of the same traffic
// and is checked against its own reference, which shows that the port
// counts are real parameters and not only enables.
//
// Counted per configuration: cycles run, read checks and write operations;
// each configuration must have run its cycles with at least one write and
// one read check.
module tb_wl_vp_port_configs;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 32, B = 32, M = 4, P = 2, T = 2000, AW = 5;
  localparam int NCFG = 5, NCYC = 200;
  localparam int CFG_R [NCFG] = '{1, 2, 2, 4, 4};
  localparam int CFG_W [NCFG] = '{1, 1, 2, 1, 2};
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [M-1:0] rd_en = '0;
  logic [M-1:0][AW-1:0] rd_address = '0;
  logic [M-1:0][B-1:0] rd_data, exp_q;
  logic [P-1:0] wr_en = '0;
  logic [P-1:0][AW-1:0] wr_address = '0;
  logic [P-1:0][B-1:0] wr_data = '0;
  logic [1:0][B-1:0] rd_data2, exp_q2;
  logic [B-1:0] mem [W];
  logic [B-1:0] mem2 [W];
  logic checking = 1'b0;
  int cfg = 0;
  int n_cycles [NCFG], n_reads [NCFG], n_writes [NCFG];

  pl_rf_vp dut (.clk(clk), .rd_en(rd_en), .rd_address(rd_address), .rd_data(rd_data),
    .wr_en(wr_en), .wr_address(wr_address), .wr_data(wr_data));

  pl_rf_vp #(.M(2), .P(1)) dut_2r1w (.clk(clk), .rd_en(rd_en[1:0]), .rd_address(rd_address[1:0]),
    .rd_data(rd_data2), .wr_en(wr_en[0]), .wr_address(wr_address[0]), .wr_data(wr_data[0]));

  always #(T/2) clk = ~clk;

  always @(posedge clk) begin
    #(T - 50);
    if (checking) begin
      for (int k = 0; k < M; k++) begin
        checks++;
        if (k < CFG_R[cfg]) n_reads[cfg]++;
        if (rd_data[k] !== exp_q[k]) begin
          failures++; $display("FAIL %0t cfg %0dR%0dW port %0d = %h exp %h", $time, CFG_R[cfg], CFG_W[cfg], k, rd_data[k], exp_q[k]);
        end
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (rd_data2[k] !== exp_q2[k]) begin
          failures++; $display("FAIL %0t 2R1W build port %0d = %h exp %h", $time, k, rd_data2[k], exp_q2[k]);
        end
      end
    end
  end

  initial begin
    for (int c = 0; c < NCFG; c++) begin n_cycles[c] = 0; n_reads[c] = 0; n_writes[c] = 0; end
    // fill every word of both files through write port 0, then read once
    for (int a = 0; a < W; a++) begin
      @(negedge clk);
      wr_en = 2'b01; wr_address[0] = AW'(a); wr_data[0] = $urandom;
      mem[a] = wr_data[0]; mem2[a] = wr_data[0];
    end
    @(negedge clk); wr_en = '0; rd_en = '1;
    for (int k = 0; k < M; k++) begin rd_address[k] = AW'(k); exp_q[k] = mem[k]; end
    for (int k = 0; k < 2; k++) exp_q2[k] = mem2[k];
    @(posedge clk); #1; checking = 1'b1;
    for (int c = 0; c < NCFG; c++) begin
      for (int i = 0; i < NCYC; i++) begin
        logic [M-1:0][B-1:0] nxt;
        logic [1:0][B-1:0] nxt2;
        logic [W-1:0] written_now;
        @(negedge clk);
        cfg = c;
        wr_en = (CFG_W[c] == 2) ? 2'b11 : 2'b01;
        rd_en = M'((1 << CFG_R[c]) - 1);
        for (int p = 0; p < P; p++) begin wr_address[p] = AW'($urandom); wr_data[p] = $urandom; end
        written_now = '0;
        for (int p = 0; p < P; p++) if (wr_en[p]) written_now[wr_address[p]] = 1'b1;
        for (int k = 0; k < M; k++) begin
          logic [AW-1:0] a;
          a = AW'($urandom);
          while (written_now[a]) a = a + 1'b1;
          rd_address[k] = a;
        end
        nxt = exp_q;
        for (int k = 0; k < M; k++) if (rd_en[k]) nxt[k] = mem[rd_address[k]];
        nxt2 = exp_q2;
        for (int k = 0; k < 2; k++) if (rd_en[k]) nxt2[k] = mem2[rd_address[k]];
        for (int p = 0; p < P; p++) if (wr_en[p]) begin mem[wr_address[p]] = wr_data[p]; n_writes[c]++; end
        mem2[wr_address[0]] = wr_data[0];
        n_cycles[c]++;
        @(posedge clk); #1;
        exp_q = nxt;
        exp_q2 = nxt2;
      end
    end
    @(posedge clk); #(T/2);
    checking = 1'b0;
    for (int c = 0; c < NCFG; c++) begin
      $display("config %0dR%0dW: cycles=%0d read_checks=%0d writes=%0d", CFG_R[c], CFG_W[c], n_cycles[c], n_reads[c], n_writes[c]);
      checks++;
      if (n_cycles[c] != NCYC || n_reads[c] == 0 || n_writes[c] == 0) begin
        failures++; $display("FAIL configuration %0dR%0dW did not run", CFG_R[c], CFG_W[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * (NCFG * NCYC + W + 100)); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
