// tb_pulser_2clk - exhaustive check of the gated two-clock pulser:
// pulse = en & clk & ~clk_del.
module tb_pulser_2clk;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic en, clk, clk_del, pulse;

  pulser_2clk dut (.en(en), .clk(clk), .clk_del(clk_del), .pulse(pulse));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {en, clk, clk_del} = 3'(i);
      #10;
      checks++;
      if (pulse !== (i == 3'b110)) begin
        failures++; $display("FAIL en=%0b clk=%0b clk_del=%0b pulse=%0b", en, clk, clk_del, pulse);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
