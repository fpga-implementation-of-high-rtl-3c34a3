// pg_logic_tb: checks the prefix network at widths 32, 16 and 7 (odd) against
// a bit-serial reference: G_{i:0} = g[i] | p[i] & G_{i-1:0}, G_{0:0} = g[0].
// Inputs are random (p and g never both set, as the base logic produces),
// plus long propagate chains that carry a generate from bit 0 to the top.
module pg_logic_tb;
  int checks = 0, failures = 0;

  logic [32:0] p32, g32, gp32;
  logic [16:0] p16, g16, gp16;
  logic [7:0]  p7,  g7,  gp7;

  pg_logic          dut32 (.p(p32), .g(g32), .gpre(gp32));
  pg_logic #(.N(16)) dut16 (.p(p16), .g(g16), .gpre(gp16));
  pg_logic #(.N(7))  dut7  (.p(p7),  .g(g7),  .gpre(gp7));

  function automatic logic [32:0] ref_prefix(logic [32:0] p, logic [32:0] g, int n);
    logic [32:0] r = '0;
    logic carry = 1'b0;
    for (int i = 0; i <= n; i++) begin
      carry = g[i] | (p[i] & carry);
      r[i]  = carry;
    end
    return r;
  endfunction

  task automatic check_all();
    logic [32:0] w;
    #1;
    w = ref_prefix(p32, g32, 32);
    checks++;
    if (gp32 !== w) begin failures++; $display("FAIL n32 p=%h g=%h got=%h want=%h", p32, g32, gp32, w); end
    w = ref_prefix(33'(p16), 33'(g16), 16);
    checks++;
    if (gp16 !== w[16:0]) begin failures++; $display("FAIL n16 p=%h g=%h got=%h want=%h", p16, g16, gp16, w[16:0]); end
    w = ref_prefix(33'(p7), 33'(g7), 7);
    checks++;
    if (gp7 !== w[7:0]) begin failures++; $display("FAIL n7 p=%h g=%h got=%h want=%h", p7, g7, gp7, w[7:0]); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Generate at bit 0, propagate everywhere else: carry must reach the top.
    p32 = ~33'd1; g32 = 33'd1; p16 = ~17'd1; g16 = 17'd1; p7 = ~8'd1; g7 = 8'd1;
    check_all();
    // Single break in the chain at each position.
    for (int k = 1; k <= 32; k++) begin
      p32 = ~33'd1; p32[k] = 1'b0; g32 = 33'd1;
      p16 = ~17'd1; g16 = 17'd1; if (k <= 16) p16[k] = 1'b0;
      p7  = ~8'd1;  g7  = 8'd1;  if (k <= 7)  p7[k]  = 1'b0;
      check_all();
    end
    for (int t = 0; t < 2000; t++) begin
      logic [32:0] r1, r2;
      r1 = {1'($urandom), 32'($urandom)};
      r2 = {1'($urandom), 32'($urandom)};
      // Bias toward propagate so long carry chains occur.
      if (t % 2 == 0) r1 = r1 | {1'($urandom), 32'($urandom)};
      p32 = r1; g32 = r2 & ~r1;
      p16 = r1[16:0]; g16 = r2[16:0] & ~r1[16:0];
      p7  = r1[7:0];  g7  = r2[7:0]  & ~r1[7:0];
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
