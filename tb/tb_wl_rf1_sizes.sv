// tb_wl_rf1_sizes - the 1R1W pulsed-latch register file with 32-bit words
// at 32, 64, 128, 256, 512 and 1024 words, each run for 200 cycles of random
// writes and reads at 500 MHz, the kind of traffic used to compare register
// file sizes.
//
// One rf1_size_runner per size runs in parallel on the same clock; each
// writes a random word and reads a previously written word every cycle and
// checks the read one cycle later against a reference. The test counts the
// writes done at each size and fails a size that did not complete.
module tb_wl_rf1_sizes;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned T = 2000;
  localparam int NS = 6, NCYC = 200;
  localparam int unsigned SIZES [NS] = '{32, 64, 128, 256, 512, 1024};
  logic clk = 1'b0;
  logic [NS-1:0] done;
  int c [NS], f [NS], nw [NS];
  int checks = 0, failures = 0;

  always #(T/2) clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_size
    rf1_size_runner #(.W(SIZES[s]), .B(32), .T(T), .NCYC(NCYC)) u_run (
      .clk(clk), .done(done[s]), .checks(c[s]), .failures(f[s]), .n_writes(nw[s])
    );
  end

  initial begin
    wait (&done);
    for (int s = 0; s < NS; s++) begin
      $display("W=%0d: writes=%0d read_checks=%0d failures=%0d", SIZES[s], nw[s], c[s], f[s]);
      checks += c[s] + 1;
      failures += f[s];
      if (nw[s] < NCYC || c[s] != NCYC) begin failures++; $display("FAIL size %0d did not complete", SIZES[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * (NCYC + 50)); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
