// tb_vp_read_logic - drives the virtual read logic with four phase clocks
// (250 ps apart, 2 ns period) and a behavioural data multiplexer over a
// random 32-word table. Each cycle enables a random set of ports with random
// addresses; at the end of the cycle every enabled port must show its word
// and every disabled port its previous value. Also checks the order in
// which the address latch takes the addresses inside one cycle.
module tb_vp_read_logic;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned M = 4, AW = 5, B = 32, T = 2000;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [M-1:0] ph;
  logic [M-1:0] rd_en = '0;
  logic [M-1:0][AW-1:0] rd_address = '0;
  logic [AW-1:0] rd_address_current;
  logic [B-1:0] data_out;
  logic [M-1:0][B-1:0] rd_data, exp_data;
  logic [B-1:0] table_mem [32];
  int n_all4 = 0;

  vp_read_logic #(.M(M), .AW(AW), .B(B)) dut (.ph(ph), .rd_en(rd_en), .rd_address(rd_address),
    .rd_address_current(rd_address_current), .data_out(data_out), .rd_data(rd_data));

  assign data_out = table_mem[rd_address_current];

  always #(T/2) clk = ~clk;
  assign ph[0] = clk;
  for (genvar i = 1; i < M; i++) begin : g_ph
    delay_buffer #(.DELAY_PS(i * T / (2 * M))) u_d (.a(clk), .y(ph[i]));
  end

  initial begin
    for (int a = 0; a < 32; a++) table_mem[a] = $urandom;
    exp_data = '0;
    // first cycle: all ports, so every output is defined
    @(posedge clk);
    for (int c = 0; c < 300; c++) begin
      rd_en = (c == 0) ? '1 : M'($urandom);
      for (int k = 0; k < M; k++) rd_address[k] = AW'($urandom);
      if (rd_en == '1) n_all4++;
      for (int k = 0; k < M; k++) if (rd_en[k]) exp_data[k] = table_mem[rd_address[k]];
      // address latch order: mid-interval 2k+1 must hold port k's address
      for (int k = 0; k < M; k++) begin
        #(T / (2 * M) + T / (4 * M));
        if (rd_en[k]) begin
          checks++;
          if (rd_address_current !== rd_address[k]) begin
            failures++; $display("FAIL cycle %0d slot %0d current=%0d exp %0d", c, k, rd_address_current, rd_address[k]);
          end
        end
        if (k < M - 1) #(T / (4 * M));
      end
      #(T / (8 * M));
      for (int k = 0; k < M; k++) begin
        checks++;
        if (rd_data[k] !== exp_data[k]) begin failures++; $display("FAIL cycle %0d port %0d = %h exp %h", c, k, rd_data[k], exp_data[k]); end
      end
      @(posedge clk);
    end
    checks++;
    if (n_all4 == 0) begin failures++; $display("FAIL no cycle with four reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * 400); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
