// tb_rf_read_mux - fills 32 rows with random words and checks every address.
module tb_rf_read_mux;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0][31:0] rows;
  logic [4:0] addr;
  logic [31:0] data_out;

  rf_read_mux #(.W(32), .B(32)) dut (.rows(rows), .addr(addr), .data_out(data_out));

  initial begin
    for (int r = 0; r < 32; r++) rows[r] = $urandom;
    for (int n = 0; n < 3; n++)
      for (int a = 0; a < 32; a++) begin
        addr = 5'(a); #10;
        checks++;
        if (data_out !== rows[a]) begin failures++; $display("FAIL a=%0d", a); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
