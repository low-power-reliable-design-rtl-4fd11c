// tb_delay_buffer - checks that delay_buffer reproduces its input DELAY_PS
// later, and that a pulse shorter than the delay is swallowed (inertial).
module tb_delay_buffer;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic a = 1'b0, y;

  delay_buffer #(.DELAY_PS(150)) dut (.a(a), .y(y));

  task automatic chk(input logic exp, input string what);
    checks++;
    if (y !== exp) begin failures++; $display("FAIL %s: y=%0b exp=%0b at %0t", what, y, exp, $time); end
  endtask

  initial begin
    #1000;
    a = 1'b1; #149 chk(1'b0, "before delay"); #2 chk(1'b1, "after delay");
    #500 a = 1'b0; #149 chk(1'b1, "hold before fall"); #2 chk(1'b0, "fall");
    // 50 ps pulse through a 150 ps delay
    #300 a = 1'b1; #50 a = 1'b0; #101 chk(1'b0, "short pulse filtered"); #50 chk(1'b0, "short pulse filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
