// tb_pl_rf_vp - random traffic on the 4-read / 2-write virtual-port
// register file (32 x 32 bits, 500 MHz) against a reference array.
// Inputs are applied at the falling edge and captured at the rising edge;
// the reads captured at an edge are checked 50 ps before the next edge (one
// cycle latency, all four ports served within the cycle). Writes captured
// at an edge must be visible to reads at the next edge. Reads never target a
// word written in the same cycle (that case is unspecified).
// Mechanisms counted, each must occur: four reads in one cycle, two writes
// in one cycle, a cycle with no read (read clock gated), a cycle with no
// write (write clock gated), a disabled port keeping its value, both write
// ports on the same word (port 1 wins), and a read of a word written in the
// previous cycle.
module tb_pl_rf_vp;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 32, B = 32, M = 4, P = 2, T = 2000, AW = 5;
  localparam int NCYC = 1500;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [M-1:0] rd_en = '0;
  logic [M-1:0][AW-1:0] rd_address = '0;
  logic [M-1:0][B-1:0] rd_data, exp_q;
  logic [P-1:0] wr_en = '0;
  logic [P-1:0][AW-1:0] wr_address = '0;
  logic [P-1:0][B-1:0] wr_data = '0;
  logic [B-1:0] mem [W];
  logic checking = 1'b0;
  int n_four_reads = 0, n_two_writes = 0, n_rd_gated = 0, n_wr_gated = 0;
  int n_port_hold = 0, n_same_word = 0, n_read_after_write = 0;

  pl_rf_vp #(.W(W), .B(B), .M(M), .P(P)) dut (.clk(clk), .rd_en(rd_en), .rd_address(rd_address),
    .rd_data(rd_data), .wr_en(wr_en), .wr_address(wr_address), .wr_data(wr_data));

  always #(T/2) clk = ~clk;

  // checker: 50 ps before the next rising edge
  always @(posedge clk) begin
    #(T - 50);
    if (checking) begin
      for (int k = 0; k < M; k++) begin
        checks++;
        if (rd_data[k] !== exp_q[k]) begin
          failures++; $display("FAIL %0t port %0d = %h exp %h", $time, k, rd_data[k], exp_q[k]);
        end
      end
    end
  end

  initial begin
    logic [AW-1:0] last_written [$];
    // initialise every word through port 0, then read all ports once
    for (int a = 0; a < W; a += 2) begin
      @(negedge clk);
      wr_en = '1; wr_address[0] = AW'(a); wr_address[1] = AW'(a + 1);
      wr_data[0] = $urandom; wr_data[1] = $urandom;
      mem[a] = wr_data[0]; mem[a + 1] = wr_data[1];
    end
    @(negedge clk); wr_en = '0; rd_en = '1;
    for (int k = 0; k < M; k++) begin rd_address[k] = AW'(k); exp_q[k] = mem[k]; end
    @(posedge clk); checking = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      logic [M-1:0][B-1:0] nxt;
      logic [W-1:0] written_now;
      @(negedge clk);
      // choose this cycle's operation
      wr_en = (i % 11 == 5) ? '0 : P'($urandom);
      for (int p = 0; p < P; p++) begin wr_address[p] = AW'($urandom); wr_data[p] = $urandom; end
      if (i % 13 == 3) begin wr_en = '1; wr_address[1] = wr_address[0]; end
      rd_en = (i % 7 == 2) ? '0 : ((i % 3 == 0) ? '1 : M'($urandom));
      written_now = '0;
      for (int p = 0; p < P; p++) if (wr_en[p]) written_now[wr_address[p]] = 1'b1;
      for (int k = 0; k < M; k++) begin
        logic [AW-1:0] a;
        a = (last_written.size() > 0 && k == 1) ? last_written[0] : AW'($urandom);
        while (written_now[a]) a = a + 1'b1;
        rd_address[k] = a;
      end
      // expected outputs at the next check: reads see memory before this cycle's writes
      nxt = exp_q;
      for (int k = 0; k < M; k++) if (rd_en[k]) nxt[k] = mem[rd_address[k]];
      if (rd_en == '1) n_four_reads++;
      if (rd_en == '0) n_rd_gated++;
      if (rd_en != '0 && rd_en != '1) n_port_hold++;
      if (wr_en == '1) n_two_writes++;
      if (wr_en == '0) n_wr_gated++;
      if (wr_en == '1 && wr_address[0] == wr_address[1]) n_same_word++;
      if (rd_en[1] && last_written.size() > 0 && rd_address[1] == last_written[0]) n_read_after_write++;
      last_written.delete();
      for (int p = 0; p < P; p++) if (wr_en[p]) begin mem[wr_address[p]] = wr_data[p]; last_written.push_back(wr_address[p]); end
      @(posedge clk); #1;
      exp_q = nxt;
    end
    @(posedge clk); #(T/2);
    checks++;
    if (n_four_reads == 0 || n_two_writes == 0 || n_rd_gated == 0 || n_wr_gated == 0 ||
        n_port_hold == 0 || n_same_word == 0 || n_read_after_write == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("four_reads=%0d two_writes=%0d rd_gated=%0d wr_gated=%0d port_hold=%0d same_word=%0d read_after_write=%0d",
      n_four_reads, n_two_writes, n_rd_gated, n_wr_gated, n_port_hold, n_same_word, n_read_after_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * (NCYC + 100)); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
