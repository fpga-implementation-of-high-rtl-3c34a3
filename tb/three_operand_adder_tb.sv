// three_operand_adder_tb: checks {carryout, sum} = a + b + c + cin for the
// 32-bit adder (default width) and a 16-bit one. Vectors: the published
// example a=1, b=2, c=4, cin=0 (sum 7), all-zero and all-one operands with and
// without carry-in, carry chains that run the full width, and random words.
module three_operand_adder_tb;
  int checks = 0, failures = 0;
  int n_cout = 0;  // vectors that set the carry out

  logic [31:0] a32, b32, c32;
  logic [32:0] s32;
  logic        co32, cin32;
  logic [15:0] a16, b16, c16;
  logic [16:0] s16;
  logic        co16, cin16;

  three_operand_adder           dut32 (.a(a32), .b(b32), .c(c32), .cin(cin32), .sum(s32), .carryout(co32));
  three_operand_adder #(.N(16)) dut16 (.a(a16), .b(b16), .c(c16), .cin(cin16), .sum(s16), .carryout(co16));

  task automatic apply(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic cin);
    longint unsigned want32, want16;
    a32 = a; b32 = b; c32 = c; cin32 = cin;
    a16 = a[15:0]; b16 = b[15:0]; c16 = c[15:0]; cin16 = cin;
    #1;
    want32 = longint'(a) + longint'(b) + longint'(c) + longint'(cin);
    want16 = longint'(a[15:0]) + longint'(b[15:0]) + longint'(c[15:0]) + longint'(cin);
    checks++;
    if ({co32, s32} !== 34'(want32)) begin
      failures++; $display("FAIL n32 a=%h b=%h c=%h cin=%b got=%h want=%h", a, b, c, cin, {co32, s32}, want32);
    end
    checks++;
    if ({co16, s16} !== 18'(want16)) begin
      failures++; $display("FAIL n16 a=%h b=%h c=%h cin=%b got=%h want=%h", a[15:0], b[15:0], c[15:0], cin, {co16, s16}, want16);
    end
    if (co32) n_cout++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'd1, 32'd2, 32'd4, 1'b0);
    checks++;
    if (s16 !== 17'd7 || co16 !== 1'b0 || s32 !== 33'd7) begin
      failures++; $display("FAIL published example");
    end
    apply('0, '0, '0, 1'b0);
    apply('0, '0, '0, 1'b1);
    apply('1, '1, '1, 1'b0);
    apply('1, '1, '1, 1'b1);
    apply('1, 32'd1, '0, 1'b0);
    apply('1, '0, '0, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 32'h8000_0000, 1'b1);
    for (int k = 0; k < 32; k++) begin
      apply(~(32'd1 << k), 32'd1 << k, 32'd1, 1'b0);
      apply(32'hffff_ffff >> k, 32'd0, 32'd0, 1'b1);
    end
    for (int t = 0; t < 3000; t++) begin
      apply($urandom, $urandom, $urandom, 1'($urandom));
    end
    checks++;
    if (n_cout == 0) begin failures++; $display("FAIL carry out never set"); end
    $display("carry-out vectors: %0d", n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
