// mdclcg: modified dual coupled-LCG pseudorandom bit generator, N bits wide.
// Four LCGs x, y, p, q run side by side, each x_{i+1} = a*x_i + b mod 2^N
// with a = 2^R + 1, the product-plus-increment done by one three-operand adder.
// Two coupled pairs give B_i = (x_{i+1} > y_{i+1}) and C_i = (p_{i+1} > q_{i+1}),
// and the output bit is their modulo-2 sum Z_i = B_i ^ C_i. One bit is
// produced on every clock, none is skipped, and the period is that of the
// LCGs, 2^N.
// Timing: with rst_n low on a clock edge the four LCGs load their seeds and
// zi_valid drops. On each later edge the LCGs step and zi takes Z_i computed
// from the values they step to, so zi_valid rises one clock after reset and
// stays high. Multipliers a1 = 65 and a2 = 4097 are the published constants;
// a3, a4, the increments and the seeds are this design's choice.
module mdclcg #(
  parameter int unsigned  N  = 32,
  parameter int unsigned  R1 = 6,   // a1 = 2^R1 + 1
  parameter int unsigned  R2 = 12,  // a2 = 2^R2 + 1
  parameter int unsigned  R3 = 3,   // a3 = 2^R3 + 1
  parameter int unsigned  R4 = 9,   // a4 = 2^R4 + 1
  parameter logic [N-1:0] B1 = 1,
  parameter logic [N-1:0] B2 = 3,
  parameter logic [N-1:0] B3 = 5,
  parameter logic [N-1:0] B4 = 7,
  parameter logic [N-1:0] X0 = 1,
  parameter logic [N-1:0] Y0 = 2,
  parameter logic [N-1:0] P0 = 3,
  parameter logic [N-1:0] Q0 = 4
) (
  input  logic clk,
  input  logic rst_n,     // synchronous, active low: load the seeds
  output logic zi,        // pseudorandom bit
  output logic zi_valid   // zi holds a generated bit
);
  logic [N-1:0] x_nx, y_nx, p_nx, q_nx;  // next states
  logic         bi, ci;

  lcg #(.N(N), .R(R1), .B(B1), .SEED(X0)) u_lcg_x (.clk, .rst_n, .state(), .next_state(x_nx));
  lcg #(.N(N), .R(R2), .B(B2), .SEED(Y0)) u_lcg_y (.clk, .rst_n, .state(), .next_state(y_nx));
  lcg #(.N(N), .R(R3), .B(B3), .SEED(P0)) u_lcg_p (.clk, .rst_n, .state(), .next_state(p_nx));
  lcg #(.N(N), .R(R4), .B(B4), .SEED(Q0)) u_lcg_q (.clk, .rst_n, .state(), .next_state(q_nx));

  magnitude_comparator #(.N(N)) u_cmp_b (.a(x_nx), .b(y_nx), .gt(bi));
  magnitude_comparator #(.N(N)) u_cmp_c (.a(p_nx), .b(q_nx), .gt(ci));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zi       <= 1'b0;
      zi_valid <= 1'b0;
    end else begin
      zi       <= bi ^ ci;
      zi_valid <= 1'b1;
    end
  end
endmodule
