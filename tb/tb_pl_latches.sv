// tb_pl_latches - checks transparency while pulse is high and hold while
// it is low, with random data.
module tb_pl_latches;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned B = 32;
  int checks = 0, failures = 0;
  logic pulse = 1'b0;
  logic [B-1:0] d = '0, q, held;

  pl_latches #(.B(B)) dut (.pulse(pulse), .d(d), .q(q));

  initial begin
    for (int i = 0; i < 50; i++) begin
      d = $urandom; pulse = 1'b1; #10;
      checks++; if (q !== d) begin failures++; $display("FAIL transparent q=%h d=%h", q, d); end
      d = $urandom; #10;
      checks++; if (q !== d) begin failures++; $display("FAIL follow q=%h d=%h", q, d); end
      held = d; pulse = 1'b0; #10;
      d = ~held; #10;
      checks++; if (q !== held) begin failures++; $display("FAIL hold q=%h exp=%h", q, held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
