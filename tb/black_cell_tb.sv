// black_cell_tb: applies all 16 input combinations to black_cell and checks
// the group generate and propagate against the prefix-operator truth table.
module black_cell_tb;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  black_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      checks++;
      // Group generates if the high part generates, or it propagates and the low part generates.
      if (g_out !== (g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0))) begin
        failures++; $display("FAIL g v=%b g_out=%b", v[3:0], g_out);
      end
      checks++;
      if (p_out !== (p_hi && p_lo)) begin
        failures++; $display("FAIL p v=%b p_out=%b", v[3:0], p_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
