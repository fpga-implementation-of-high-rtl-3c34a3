// magnitude_comparator_tb: checks the 32-bit unsigned greater-than on equal,
// neighbouring, extreme and random pairs, with the reference taken from the
// first differing bit scanned from the top.
module magnitude_comparator_tb;
  localparam int N = 32;
  logic [N-1:0] a, b;
  logic         gt;
  int checks = 0, failures = 0;

  magnitude_comparator dut (.*);

  function automatic logic ref_gt(logic [N-1:0] x, logic [N-1:0] y);
    for (int i = N - 1; i >= 0; i--)
      if (x[i] != y[i]) return x[i];
    return 1'b0;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (gt !== ref_gt(a, b)) begin
      failures++; $display("FAIL a=%h b=%h gt=%b", a, b, gt);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; check();
    a = '1; b = '1; check();
    a = 32'h8000_0000; b = 32'h7fff_ffff; check();
    a = 32'h7fff_ffff; b = 32'h8000_0000; check();
    for (int t = 0; t < 1000; t++) begin
      a = $urandom; b = $urandom;
      if (t % 4 == 1) b = a;
      if (t % 4 == 2) b = a ^ (32'd1 << (t % 32));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
