// tb_pl_register_selfgated - random data with adjustable activity into the
// self-gated 16-bit register. Checks that q takes d at every edge, that the
// pulser fires exactly in the cycles where d differs from q, and that the
// pulse lasts PULSE_PS.
module tb_pl_register_selfgated;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned B = 16, T = 1000, PW = 100;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [B-1:0] d = '0, q, model;
  logic pulse;
  int n_pulse = 0, n_change = 0, n_same = 0;
  time t_rise;

  pl_register_selfgated #(.B(B), .PULSE_PS(PW)) dut (.clk(clk), .d(d), .q(q), .pulse(pulse));

  always #(T/2) clk = ~clk;
  always @(posedge pulse) begin n_pulse++; t_rise = $time; end
  always @(negedge pulse) if ($time > 0) begin
    checks++;
    if ($time - t_rise != PW) begin failures++; $display("FAIL pulse width %0t", $time - t_rise); end
  end

  initial begin
    // first cycle loads a known value
    @(negedge clk); d = 16'h1234; @(posedge clk); #(T/4);
    model = 16'h1234;
    n_pulse = 0;
    for (int i = 0; i < 300; i++) begin
      int n_before;
      logic change;
      @(negedge clk);
      change = ($urandom_range(0, 99) < 30);
      if (change) d = model ^ (16'(1) << $urandom_range(0, B - 1));
      n_before = n_pulse;
      @(posedge clk); #(T/4);
      if (change) begin n_change++; model = d; end else n_same++;
      checks += 2;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
      if ((n_pulse - n_before) != int'(change)) begin failures++; $display("FAIL cycle %0d pulses %0d change %0b", i, n_pulse - n_before, change); end
    end
    checks++;
    if (n_change == 0 || n_same == 0) begin failures++; $display("FAIL coverage"); end
    $display("gated cycles %0d of %0d", n_same, n_same + n_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * 400); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
