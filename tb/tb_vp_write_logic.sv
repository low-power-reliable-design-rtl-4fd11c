// tb_vp_write_logic - drives the virtual write logic with two write phases
// (2 ns period, 500 ps apart). In every quarter of the cycle it checks that
// the port selector passes the right port (port 0 in the first half, port 1
// in the second) and that the data-array clock is high only in the second
// interval of an enabled port's half.
module tb_vp_write_logic;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned P = 2, AW = 5, B = 32, T = 2000;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [P-1:0] phw;
  logic [P-1:0] wr_en = '0;
  logic [P-1:0][AW-1:0] wr_address = '0;
  logic [P-1:0][B-1:0] wr_data = '0;
  logic wr_en_current, clkw_data_array;
  logic [AW-1:0] wr_address_current;
  logic [B-1:0] wr_data_current;
  int n_both = 0, n_trig = 0;

  vp_write_logic #(.P(P), .AW(AW), .B(B)) dut (.phw(phw), .wr_en(wr_en), .wr_address(wr_address),
    .wr_data(wr_data), .wr_en_current(wr_en_current), .wr_address_current(wr_address_current),
    .wr_data_current(wr_data_current), .clkw_data_array(clkw_data_array));

  always #(T/2) clk = ~clk;
  assign phw[0] = clk;
  delay_buffer #(.DELAY_PS(T / (2 * P))) u_d (.a(clk), .y(phw[1]));

  initial begin
    @(posedge clk);
    for (int c = 0; c < 200; c++) begin
      wr_en = P'($urandom);
      if (wr_en == '1) n_both++;
      for (int k = 0; k < P; k++) begin wr_address[k] = AW'($urandom); wr_data[k] = $urandom; end
      for (int q = 0; q < 2 * P; q++) begin
        int port;
        logic exp_clk;
        #(T / (4 * P));
        port = q / 2;
        exp_clk = wr_en[port] && (q % 2 == 1);
        if (exp_clk) n_trig++;
        checks += 4;
        if (wr_en_current !== wr_en[port]) begin failures++; $display("FAIL c%0d q%0d en_cur", c, q); end
        if (wr_address_current !== wr_address[port]) begin failures++; $display("FAIL c%0d q%0d addr_cur", c, q); end
        if (wr_data_current !== wr_data[port]) begin failures++; $display("FAIL c%0d q%0d data_cur", c, q); end
        if (clkw_data_array !== exp_clk) begin failures++; $display("FAIL c%0d q%0d clkw=%0b exp %0b", c, q, clkw_data_array, exp_clk); end
        if (q < 2 * P - 1) #(T / (4 * P));
      end
      @(posedge clk);
    end
    checks++;
    if (n_both == 0 || n_trig == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(T * 300); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
