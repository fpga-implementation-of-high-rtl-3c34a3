// mdclcg_period_tb: maximal-period check of the modified dual-CLCG at a
// reduced width of 8 bits (the 32-bit period, 2^32 clocks, is too long to
// simulate). After reset it runs 2^9 clocks and checks that every LCG state
// first returns to its seed after exactly 2^8 clocks, and that the output bit
// stream then repeats with period 2^8: zi(t + 256) = zi(t).
module mdclcg_period_tb;
  localparam int N = 8;
  localparam int PERIOD = 1 << N;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic zi, zi_valid;
  logic [N-1:0] seed [4];
  logic [N-1:0] cur [4];
  int first [4];
  logic zs [2*PERIOD];

  mdclcg #(.N(N), .R1(6), .R2(4), .R3(3), .R4(2),
           .B1(8'd1), .B2(8'd3), .B3(8'd5), .B4(8'd7),
           .X0(8'd1), .Y0(8'd2), .P0(8'd3), .Q0(8'd4)) dut (.clk, .rst_n, .zi, .zi_valid);

  always #5 clk = ~clk;

  assign cur[0] = dut.u_lcg_x.state;
  assign cur[1] = dut.u_lcg_y.state;
  assign cur[2] = dut.u_lcg_p.state;
  assign cur[3] = dut.u_lcg_q.state;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = '{8'd1, 8'd2, 8'd3, 8'd4};
    first = '{0, 0, 0, 0};
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cur[k] !== seed[k]) begin failures++; $display("FAIL seed %0d", k); end
    end
    for (int t = 1; t <= 2 * PERIOD; t++) begin
      @(posedge clk); #1;
      zs[t-1] = zi;
      for (int k = 0; k < 4; k++)
        if (cur[k] == seed[k] && first[k] == 0) first[k] = t;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (first[k] != PERIOD) begin failures++; $display("FAIL LCG %0d period %0d", k, first[k]); end
    end
    for (int t = 0; t < PERIOD; t++) begin
      checks++;
      if (zs[t] !== zs[t + PERIOD]) begin failures++; $display("FAIL zi not periodic at %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
