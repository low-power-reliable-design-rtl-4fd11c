// tb_rf_write_decoder - exhaustive check of the one-hot write decoder for
// W = 32, with and without wr_en.
module tb_rf_write_decoder;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic wr_en;
  logic [4:0] wr_address;
  logic [31:0] en;

  rf_write_decoder #(.W(32)) dut (.wr_en(wr_en), .wr_address(wr_address), .en(en));

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 32; a++) begin
        wr_en = e[0]; wr_address = 5'(a); #10;
        checks++;
        if (en !== (e[0] ? (32'd1 << a) : 32'd0)) begin failures++; $display("FAIL en=%h a=%0d", en, a); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
