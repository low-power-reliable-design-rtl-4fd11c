// tb_wl_selfgate_activity - the 16-bit self-gated pulsed-latch register
// under the data activities at which the gating technique is judged: 20 %,
// 25 %, 40 % and 50 %, at 1 GHz.
//
// Activity is taken as the share of cycles in which the input word differs
// from the stored word. Each level runs 400 cycles: in a changing cycle a
// random non-empty set of bits is flipped, otherwise the stored word is
// applied again. Inputs change at the falling edge. A quarter period after
// each rising edge the test checks that q holds the expected word and that
// the pulser fired exactly once in a changing cycle and not at all in a
// quiet one. For each level it reports the pulses fired against the 400 an
// ungated pulsed-latch register would fire, and fails a level where no
// cycle was gated or none fired.
module tb_wl_selfgate_activity;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned B = 16, T = 1000;
  localparam int NL = 4, NCYC = 400;
  localparam int ACT [NL] = '{20, 25, 40, 50};
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [B-1:0] d = '0, q, model;
  logic pulse;
  int n_pulse = 0;

  pl_register_selfgated dut (.clk(clk), .d(d), .q(q), .pulse(pulse));

  always #(T/2) clk = ~clk;
  always @(posedge pulse) n_pulse++;

  initial begin
    @(negedge clk); d = 16'hA5C3; @(posedge clk); #(T/4);
    model = 16'hA5C3;
    for (int l = 0; l < NL; l++) begin
      int fired, gated;
      fired = 0; gated = 0;
      for (int i = 0; i < NCYC; i++) begin
        int n_before;
        logic change;
        logic [B-1:0] flip;
        @(negedge clk);
        change = ($urandom_range(0, 99) < ACT[l]);
        flip = B'($urandom);
        if (flip == '0) flip = 16'h0001;
        d = change ? (model ^ flip) : model;
        n_before = n_pulse;
        @(posedge clk); #(T/4);
        if (change) model = d;
        if (n_pulse == n_before) gated++; else fired++;
        checks += 2;
        if (q !== model) begin failures++; $display("FAIL activity %0d: q=%h exp=%h", ACT[l], q, model); end
        if ((n_pulse - n_before) != int'(change)) begin
          failures++; $display("FAIL activity %0d cycle %0d: %0d pulses, change %0b", ACT[l], i, n_pulse - n_before, change);
        end
      end
      $display("activity %0d%%: pulses %0d of %0d cycles (%0d gated)", ACT[l], fired, NCYC, gated);
      checks++;
      if (fired == 0 || gated == 0) begin failures++; $display("FAIL activity %0d: gating not exercised", ACT[l]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * (NL * NCYC + 50)); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
