// mdclcg_tb: end-to-end test of the 32-bit modified dual-CLCG generator at its
// default parameters. A reference model steps the four LCGs with ordinary
// 64-bit arithmetic (a = 65, 4097, 9, 513; b = 1, 3, 5, 7; seeds 1, 2, 3, 4),
// forms B = x' > y', C = p' > q' and Z = B ^ C, and the testbench compares zi
// with Z on every clock for 4000 clocks, with a reset in the middle.
// It checks that zi_valid rises exactly one clock after reset (one bit per
// clock from then on) and counts how often each mechanism occurred: seed
// load, B = 1, C = 1, both zi values, and the mod-2^32 reduction in every LCG.
// A mechanism that never occurred counts as a failure.
module mdclcg_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic zi, zi_valid;

  localparam longint unsigned A [4] = '{65, 4097, 9, 513};
  localparam longint unsigned B [4] = '{1, 3, 5, 7};
  localparam longint unsigned S [4] = '{1, 2, 3, 4};

  longint unsigned st [4];
  int n_seed = 0, n_b = 0, n_c = 0, n_z1 = 0, n_z0 = 0, n_bits = 0;
  int n_wrap [4] = '{0, 0, 0, 0};

  mdclcg dut (.clk, .rst_n, .zi, .zi_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) st[k] = S[k];
    n_seed++;
    checks++;
    if (zi_valid !== 1'b0) begin failures++; $display("FAIL zi_valid high in reset"); end
  endtask

  task automatic step_and_check(int t);
    logic bz, cz, z;
    for (int k = 0; k < 4; k++) begin
      longint unsigned full;
      full = A[k] * st[k] + B[k];
      if ((full >> 32) != 0) n_wrap[k]++;
      st[k] = full & 64'hffff_ffff;
    end
    bz = st[0] > st[1];
    cz = st[2] > st[3];
    z  = bz ^ cz;
    @(posedge clk); #1;
    checks++;
    if (zi_valid !== 1'b1) begin failures++; $display("FAIL zi_valid low at t=%0d", t); end
    checks++;
    if (zi !== z) begin failures++; $display("FAIL t=%0d zi=%b want=%b", t, zi, z); end
    n_bits++;
    if (bz) n_b++;
    if (cz) n_c++;
    if (z) n_z1++; else n_z0++;
  endtask

  initial begin
    time t0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    do_reset();
    t0 = $time;
    for (int t = 1; t <= 4000; t++) begin
      step_and_check(t);
      if (t == 2000) do_reset();
    end
    // One output bit per clock after the first: 4000 bits in 4000 + 1 clocks.
    checks++;
    if (($time - t0) / 10 != 4001) begin failures++; $display("FAIL clock count %0d", ($time - t0) / 10); end
    $display("seed loads %0d, B=1 %0d, C=1 %0d, zi=1 %0d, zi=0 %0d, bits %0d", n_seed, n_b, n_c, n_z1, n_z0, n_bits);
    $display("mod 2^32 reductions per LCG: %0d %0d %0d %0d", n_wrap[0], n_wrap[1], n_wrap[2], n_wrap[3]);
    checks++; if (n_seed < 2) begin failures++; $display("FAIL seed load not repeated"); end
    checks++; if (n_b == 0) begin failures++; $display("FAIL B never 1"); end
    checks++; if (n_c == 0) begin failures++; $display("FAIL C never 1"); end
    checks++; if (n_z1 == 0 || n_z0 == 0) begin failures++; $display("FAIL zi constant"); end
    for (int k = 0; k < 4; k++) begin
      checks++; if (n_wrap[k] == 0) begin failures++; $display("FAIL LCG %0d never wrapped", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
