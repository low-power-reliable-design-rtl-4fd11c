// tb_ctrl_gen - sweeps the supply value and checks that ctrl is 1 below the
// threshold and 0 at and above it; also checks the two operating points
// with +-5 % tolerance (0.7 V +5 % -> 1, 1.05 V -5 % -> 0).
module tb_ctrl_gen;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [15:0] vdd_mv;
  logic ctrl;

  ctrl_gen dut (.vdd_mv(vdd_mv), .ctrl(ctrl));

  task automatic chk(input int mv, input logic exp);
    vdd_mv = 16'(mv); #10;
    checks++;
    if (ctrl !== exp) begin failures++; $display("FAIL vdd=%0d mV ctrl=%0b exp=%0b", mv, ctrl, exp); end
  endtask

  initial begin
    chk(700, 1'b1); chk(735, 1'b1); chk(1050, 1'b0); chk(997, 1'b0);
    for (int mv = 500; mv <= 1200; mv += 10) chk(mv, mv < 870);
    chk(869, 1'b1); chk(870, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
