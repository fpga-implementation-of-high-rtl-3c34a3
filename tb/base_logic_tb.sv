// base_logic_tb: drives random s, cy and cin into a 32-bit base_logic and
// checks each position against the value it must encode: p[i] + 2*g[i] is the
// two-bit sum of s[i] and the carry from the right (cin at bit 0), and at
// position N only cy[N-1] is present.
module base_logic_tb;
  localparam int N = 32;
  logic [N-1:0] s, cy;
  logic         cin;
  logic [N:0]   p, g;
  int checks = 0, failures = 0;

  base_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      s = $urandom; cy = $urandom; cin = 1'($urandom);
      if (t == 0) begin s = '1; cy = '1; cin = 1'b1; end
      #1;
      for (int i = 0; i <= N; i++) begin
        int want;
        if (i == 0)      want = int'(s[0]) + int'(cin);
        else if (i == N) want = int'(cy[N-1]);
        else             want = int'(s[i]) + int'(cy[i-1]);
        checks++;
        if (int'(p[i]) + 2 * int'(g[i]) != want || (p[i] && g[i])) begin
          failures++; $display("FAIL pos %0d s=%h cy=%h cin=%b p=%b g=%b", i, s, cy, cin, p[i], g[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
