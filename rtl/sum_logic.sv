// sum_logic: fourth stage of the three-operand adder.
// Each sum bit is the position's propagate XORed with the carry into it, the
// group generate of everything below: sum[0] = p[0], sum[i] = p[i]^gpre[i-1].
// The carry out is the group generate of the whole word, gpre[N].
// Combinational, one XOR delay.
module sum_logic #(
  parameter int unsigned N = 32  // operand width
) (
  input  logic [N:0] p,        // propagate per position
  input  logic [N:0] gpre,     // group generate G_{i:0}
  output logic [N:0] sum,      // S_N..S_0
  output logic       carryout  // G_{N:0}
);
  assign sum      = p ^ {gpre[N-1:0], 1'b0};
  assign carryout = gpre[N];
endmodule
