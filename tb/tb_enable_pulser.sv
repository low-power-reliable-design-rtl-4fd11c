// tb_enable_pulser - checks that the enable pulser gives one pulse of
// DELAY_PS starting at the rising edge in each enabled cycle and none in
// disabled cycles.
module tb_enable_pulser;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned D = 120;
  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0, pulse;
  time t_rise;
  int n_pulse = 0;

  enable_pulser #(.DELAY_PS(D)) dut (.en(en), .clk(clk), .pulse(pulse));

  always #1000 clk = ~clk;
  always @(posedge pulse) begin t_rise = $time; n_pulse++; end
  always @(negedge pulse) begin
    checks++;
    if ($time - t_rise != D) begin failures++; $display("FAIL width %0t", $time - t_rise); end
  end

  initial begin
    int exp = 0;
    @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); en = bit'($urandom_range(0, 1)); exp += int'(en);
      @(posedge clk); #1;
      checks++;
      if (pulse !== en) begin failures++; $display("FAIL cycle %0d pulse=%0b en=%0b", i, pulse, en); end
    end
    @(negedge clk); en = 1'b0; @(posedge clk); #500;
    checks++;
    if (n_pulse != exp) begin failures++; $display("FAIL count %0d exp %0d", n_pulse, exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
