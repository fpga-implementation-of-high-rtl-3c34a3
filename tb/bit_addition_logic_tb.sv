// bit_addition_logic_tb: drives random and corner operands into a 32-bit
// bit_addition_logic and checks, per bit, that s + 2*cy equals the number of
// ones among a, b, c, and that s + 2*cy equals a + b + c as whole words.
module bit_addition_logic_tb;
  localparam int N = 32;
  logic [N-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  bit_addition_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N+1:0] want, got;
    #1;
    for (int i = 0; i < N; i++) begin
      int ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
      checks++;
      if (int'(s[i]) + 2 * int'(cy[i]) != ones) begin
        failures++; $display("FAIL bit %0d a=%h b=%h c=%h", i, a, b, c);
      end
    end
    want = (N+2)'(a) + (N+2)'(b) + (N+2)'(c);
    got  = (N+2)'(s) + ((N+2)'(cy) << 1);
    checks++;
    if (got !== want) begin
      failures++; $display("FAIL word a=%h b=%h c=%h got=%h want=%h", a, b, c, got, want);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; check();
    a = '0; b = '0; c = '0; check();
    for (int t = 0; t < 500; t++) begin
      a = $urandom; b = $urandom; c = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
