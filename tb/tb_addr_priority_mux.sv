// tb_addr_priority_mux - exhaustive select patterns for four ports: the
// lowest-numbered active select wins, port 0 when none is active.
module tb_addr_priority_mux;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [3:0][4:0] addr;
  logic [3:0] sel;
  logic [4:0] addr_mux, exp;

  addr_priority_mux #(.M(4), .AW(5)) dut (.addr(addr), .sel(sel), .addr_mux(addr_mux));

  initial begin
    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 4; k++) addr[k] = 5'(k * 7 + n + 1);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s); #10;
        if (s[0]) exp = addr[0];
        else if (s[1]) exp = addr[1];
        else if (s[2]) exp = addr[2];
        else if (s[3]) exp = addr[3];
        else exp = addr[0];
        checks++;
        if (addr_mux !== exp) begin failures++; $display("FAIL sel=%b got %0d exp %0d", sel, addr_mux, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
