// tb_clock_gate - checks that the gated clock passes exactly the clock
// pulses whose enable was high in the preceding low phase, and that enable
// changes during the high phase do not cut a pulse.
module tb_clock_gate;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0, gclk;
  int n_g = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #1000 clk = ~clk;
  always @(posedge gclk) n_g++;

  initial begin
    bit pattern [16];
    for (int i = 0; i < 16; i++) pattern[i] = bit'($urandom_range(0, 1));
    @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); en = pattern[i];
      @(posedge clk); #1;
      checks++;
      if (gclk !== pattern[i]) begin failures++; $display("FAIL cycle %0d gclk=%0b exp=%0b", i, gclk, pattern[i]); end
      #300 en = ~pattern[i];   // change inside the high phase
      #300 checks++;
      if (gclk !== pattern[i]) begin failures++; $display("FAIL cycle %0d gclk changed with en in high phase", i); end
    end
    @(negedge clk); en = 1'b0; @(posedge clk); #1;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high when disabled"); end
    begin
      int exp = 0;
      for (int i = 0; i < 16; i++) exp += int'(pattern[i]);
      checks++;
      if (n_g != exp) begin failures++; $display("FAIL pulse count %0d exp %0d", n_g, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
