// rf1_size_runner - drives one 1R1W pulsed-latch register file of W words
// with random traffic and checks it; used by tb_wl_rf1_sizes to run the
// same workload at several sizes.
//
// Every cycle, inputs are applied at the falling edge: a write of random
// data to a random word and a read of a random word that has already been
// written, both enabled. The read result is checked half a period after
// the rising edge that captured it (one cycle latency) against a reference
// array. Interface: clk in; done, checks, failures, n_writes out. done goes
// high after NCYC cycles.
module rf1_size_runner #(
  parameter int unsigned W    = 32,
  parameter int unsigned B    = 32,
  parameter int unsigned T    = 2000,
  parameter int          NCYC = 200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_writes
);
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;

  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_address = '0, rd_address = '0;
  logic [B-1:0] data_in = '0, data_out, exp;
  logic [B-1:0] mem [W];
  logic [W-1:0] valid = '0;

  pl_rf_1r1w #(.W(W), .B(B)) dut (.clk(clk), .wr_en(wr_en), .wr_address(wr_address), .data_in(data_in),
    .rd_en(rd_en), .rd_address(rd_address), .data_out(data_out));

  initial begin
    done = 1'b0; checks = 0; failures = 0; n_writes = 0;
    // first write: word 0, so that there is always a written word to read
    @(negedge clk);
    wr_en = 1'b1; wr_address = '0; data_in = $urandom;
    mem[0] = data_in; valid[0] = 1'b1; n_writes++;
    for (int i = 0; i < NCYC; i++) begin
      logic [AW-1:0] a;
      @(negedge clk);
      // read a word written in an earlier cycle, never the one written now
      a = AW'($urandom_range(0, W - 1));
      while (!valid[a]) a = (32'(a) + 1 < W) ? a + 1'b1 : '0;
      rd_en = 1'b1; rd_address = a; exp = mem[a];
      wr_en = 1'b1; wr_address = AW'($urandom_range(0, W - 1)); data_in = $urandom;
      if (wr_address == rd_address) wr_address = (32'(wr_address) + 1 < W) ? wr_address + 1'b1 : '0;
      mem[wr_address] = data_in; valid[wr_address] = 1'b1; n_writes++;
      @(posedge clk); #(T/2 - 50);
      checks++;
      if (data_out !== exp) begin
        failures++; $display("FAIL W=%0d cycle %0d data_out=%h exp=%h", W, i, data_out, exp);
      end
    end
    @(negedge clk); wr_en = 1'b0; rd_en = 1'b0;
    done = 1'b1;
  end
endmodule
