// tb_pulser_sw - checks the header-switch pulser (PL-SW): one pulse per rising clock
// edge, 60 ps wide with ctrl = 0 and 90 ps wide with ctrl = 1, pulse_b its
// complement, and no pulse on falling edges.
module tb_pulser_sw;
  timeunit 1ps; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 1'b0, ctrl = 1'b0, pulse, pulse_b;
  time t_rise;
  int n_pulse = 0, n_short = 0, n_long = 0;

  pulser_sw #(.SHORT_PS(60), .LONG_PS(90)) dut (.clk(clk), .ctrl(ctrl), .pulse(pulse), .pulse_b(pulse_b));

  always #500 clk = ~clk;   // 1 GHz
  always @(posedge pulse) begin t_rise = $time; n_pulse++; end
  always @(negedge pulse) if ($time > 0) begin
    time w;
    w = $time - t_rise;
    checks++;
    if (w != (ctrl ? 90 : 60)) begin failures++; $display("FAIL width %0t ctrl=%0b", w, ctrl); end
    if (ctrl) n_long++; else n_short++;
  end
  always @(pulse or pulse_b) begin
    #0 if (pulse_b !== ~pulse) begin failures++; $display("FAIL pulse_b not complement"); end
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); ctrl = bit'($urandom_range(0, 1));
      @(posedge clk); #1;
      checks++;
      if (pulse !== 1'b1) begin failures++; $display("FAIL no pulse at edge %0d", i); end
    end
    @(negedge clk); #1;
    checks++;
    if (pulse !== 1'b0) begin failures++; $display("FAIL pulse on falling edge"); end
    #600;
    checks++;
    if (n_pulse != 32 || n_short == 0 || n_long == 0) begin
      failures++; $display("FAIL counts %0d short %0d long %0d", n_pulse, n_short, n_long);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
