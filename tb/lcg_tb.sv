// lcg_tb: runs the default 32-bit lcg (a = 65, b = 1) for 3000 clocks against
// a reference x' = (a*x + b) mod 2^32, one step per clock, including a reset
// in the middle. An 8-bit instance (a = 17, b = 3) is run for 2^8 steps to
// check that its state first returns to the seed after exactly 256 clocks.
module lcg_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic [31:0] st32, nx32;
  logic [7:0]  st8,  nx8;
  longint unsigned model;
  int n_wrap = 0;   // steps where a*x+b exceeded 2^32 and was reduced

  lcg                                           dut32 (.clk, .rst_n, .state(st32), .next_state(nx32));
  lcg #(.N(8), .R(4), .B(8'd3), .SEED(8'd5))    dut8  (.clk, .rst_n, .state(st8),  .next_state(nx8));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_return, base;
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    model = 1;
    checks++;
    if (st32 !== 32'd1 || st8 !== 8'd5) begin failures++; $display("FAIL seed %h %h", st32, st8); end
    first_return = 0;
    base = 0;
    for (int t = 1; t <= 3000; t++) begin
      longint unsigned full;
      full = 65 * model + 1;
      if (full >> 32 != 0) n_wrap++;
      checks++;
      if (nx32 !== 32'(full)) begin failures++; $display("FAIL next t=%0d got=%h want=%h", t, nx32, 32'(full)); end
      @(posedge clk); #1;
      model = full & 64'hffff_ffff;
      checks++;
      if (st32 !== 32'(model)) begin failures++; $display("FAIL state t=%0d got=%h want=%h", t, st32, model); end
      if (st8 == 8'd5 && first_return == 0) first_return = t - base;
      if (t == 1500) begin
        rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
        model = 1;
        checks++;
        if (st32 !== 32'd1) begin failures++; $display("FAIL reset mid-run"); end
        // The 8-bit instance restarts too: count its period from here.
        first_return = 0;
        base = t;
      end
      if (t == 1500 + 256 + 1) begin
        checks++;
        if (first_return != 256) begin failures++; $display("FAIL 8-bit period %0d", first_return); end
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL no modular reduction exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
