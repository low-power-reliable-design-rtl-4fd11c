// tb_pl_rf_1r1w - random reads and writes on the 32 x 32 1R1W pulsed-latch
// register file against a reference array. Inputs are applied at the
// falling edge; a read requested at a rising edge is checked just before
// the next one; while rd_en is low the
// address is held, so data_out keeps reading the same word. One cycle latency.
// A second instance, dut_own, uses enable pulsers with private delay buffers
// in the data array and must give the same results.
module tb_pl_rf_1r1w;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 32, B = 32, T = 2000;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [4:0] wr_address = '0, rd_address = '0;
  logic [B-1:0] data_in = '0, data_out, data_out_own, last;
  logic [B-1:0] mem [W];
  int n_hold = 0, n_rw_same = 0;
  logic [4:0] last_ra = '0;

  pl_rf_1r1w #(.W(W), .B(B)) dut (.clk(clk), .wr_en(wr_en), .wr_address(wr_address), .data_in(data_in),
    .rd_en(rd_en), .rd_address(rd_address), .data_out(data_out));
  // Same file with a private-delay enable pulser in every data-array row.
  pl_rf_1r1w #(.W(W), .B(B), .SHARED_DELAY(1'b0)) dut_own (.clk(clk), .wr_en(wr_en), .wr_address(wr_address),
    .data_in(data_in), .rd_en(rd_en), .rd_address(rd_address), .data_out(data_out_own));

  always #(T/2) clk = ~clk;

  initial begin
    logic [B-1:0] exp;
    logic exp_valid;
    // fill every word first
    for (int a = 0; a < W; a++) begin
      @(negedge clk); wr_en = 1'b1; wr_address = 5'(a); data_in = $urandom; mem[a] = data_in; rd_en = 1'b0;
    end
    @(negedge clk); wr_en = 1'b0;
    exp_valid = 1'b0; exp = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wr_en = bit'($urandom_range(0, 1)); wr_address = 5'($urandom); data_in = $urandom;
      rd_en = bit'($urandom_range(0, 2) != 0); rd_address = (i % 9 == 0) ? wr_address : 5'($urandom);
      if (wr_en) mem[wr_address] = data_in;          // visible at this edge
      if (rd_en) begin last_ra = rd_address; exp_valid = 1'b1; end
      else n_hold++;
      exp = mem[last_ra];   // the held address keeps reading that word
      if (rd_en && wr_en && rd_address == wr_address) n_rw_same++;
      last = data_out;
      @(posedge clk); #(T/2 - 50);
      if (exp_valid) begin
        checks++;
        if (data_out !== exp) begin failures++; $display("FAIL cycle %0d data_out=%h exp=%h we=%0b wa=%0d re=%0b ra=%0d", i, data_out, exp, wr_en, wr_address, rd_en, rd_address); end
        checks++;
        if (data_out_own !== exp) begin failures++; $display("FAIL own-pulser cycle %0d data_out=%h exp=%h", i, data_out_own, exp); end
      end
    end
    checks++;
    if (n_hold == 0 || n_rw_same == 0) begin failures++; $display("FAIL coverage hold=%0d rw_same=%0d", n_hold, n_rw_same); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * 600); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
