// sum_logic_tb: drives random propagate and carry vectors into a 32-bit
// sum_logic and checks every sum bit and the carry out bit by bit.
module sum_logic_tb;
  localparam int N = 32;
  logic [N:0] p, gpre, sum;
  logic       carryout;
  int checks = 0, failures = 0;

  sum_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      p = {1'($urandom), 32'($urandom)};
      gpre = {1'($urandom), 32'($urandom)};
      #1;
      for (int i = 0; i <= N; i++) begin
        logic carry_in;
        carry_in = (i == 0) ? 1'b0 : gpre[i-1];
        checks++;
        if (sum[i] !== (p[i] != carry_in)) begin
          failures++; $display("FAIL bit %0d p=%h gpre=%h sum=%h", i, p, gpre, sum);
        end
      end
      checks++;
      if (carryout !== gpre[N]) begin
        failures++; $display("FAIL carryout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
