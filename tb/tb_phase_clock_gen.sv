// tb_phase_clock_gen - checks the four phases of the internal clock
// generator: ph[i] rises i*250 ps after clk in enabled cycles, and no phase
// pulses in a cycle whose enable was low.
module tb_phase_clock_gen;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned T = 2000, N = 4, STEP = 250;
  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0;
  logic [N-1:0] ph;
  int n_ph0 = 0;   // enabled cycles in which ph[0] was seen high

  phase_clock_gen #(.N(N), .STEP_PS(STEP)) dut (.clk(clk), .en(en), .ph(ph));

  always #(T/2) clk = ~clk;

  initial begin
    int exp_n = 0;
    @(posedge clk);
    for (int c = 0; c < 20; c++) begin
      logic e;
      @(negedge clk); e = bit'($urandom_range(0, 1)) | (c < 2); en = e; exp_n += int'(e);
      @(posedge clk);
      for (int t = 0; t < 8; t++) begin
        #(STEP/2);
        // sample in the middle of interval t
        for (int i = 0; i < N; i++) begin
          logic exp;
          int tt;
          tt = t - i;   // interval relative to ph[i]'s own rise
          exp = e && tt >= 0 && tt < 4;
          if (i == 0 && t == 0 && ph[0] === 1'b1) n_ph0++;
          checks++;
          if (ph[i] !== exp) begin failures++; $display("FAIL cycle %0d interval %0d ph[%0d]=%0b exp %0b", c, t, i, ph[i], exp); end
        end
        #(STEP/2);
      end
    end
    checks++;
    if (n_ph0 != exp_n) begin failures++; $display("FAIL ph0 count %0d exp %0d", n_ph0, exp_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * 100); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
