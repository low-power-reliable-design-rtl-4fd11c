// tb_pl_data_array - writes random words to random rows of the 32 x 32
// array through the row enables and a pulse made from clk and a 100 ps
// delayed copy; checks every row against a reference after each write, and
// that a data change after the pulse is not captured. Both row pulser styles
// are tested: dut with the shared delay chain, dut_own with an enable pulser
// of 100 ps in every row.
module tb_pl_data_array;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 32, B = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0, clk_del;
  logic [W-1:0] en = '0;
  logic [B-1:0] data_in = '0;
  logic [W-1:0][B-1:0] rows, rows_own, ref_rows;
  logic [W-1:0] valid = '0;

  pl_data_array #(.W(W), .B(B)) dut (.clk(clk), .clk_del(clk_del), .en(en), .data_in(data_in), .rows(rows));
  pl_data_array #(.W(W), .B(B), .SHARED_DELAY(1'b0), .PULSE_PS(100)) dut_own (
    .clk(clk), .clk_del(1'b0), .en(en), .data_in(data_in), .rows(rows_own)
  );
  delay_buffer #(.DELAY_PS(100)) u_del (.a(clk), .y(clk_del));

  always #1000 clk = ~clk;

  initial begin
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      int r;
      logic we;
      @(negedge clk);
      r = $urandom_range(0, W - 1); we = (i < 40) || bit'($urandom_range(0, 3) != 0);
      en = we ? (W'(1) << r) : '0;
      data_in = $urandom;
      if (we) begin ref_rows[r] = data_in; valid[r] = 1'b1; end
      @(posedge clk); #300;
      data_in = ~data_in;
      #100;
      for (int k = 0; k < W; k++) if (valid[k]) begin
        checks++;
        if (rows[k] !== ref_rows[k]) begin failures++; $display("FAIL row %0d = %h exp %h", k, rows[k], ref_rows[k]); end
        checks++;
        if (rows_own[k] !== ref_rows[k]) begin failures++; $display("FAIL own-pulser row %0d = %h exp %h", k, rows_own[k], ref_rows[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
