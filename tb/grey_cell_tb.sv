// grey_cell_tb: applies all 8 input combinations to grey_cell and checks the
// group generate against the prefix-operator truth table.
module grey_cell_tb;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  grey_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      checks++;
      if (g_out !== (g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0))) begin
        failures++; $display("FAIL v=%b g_out=%b", v[2:0], g_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
