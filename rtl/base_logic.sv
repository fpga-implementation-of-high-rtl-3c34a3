// base_logic: second stage of the three-operand adder (the "saltire" cells).
// Bit i of the bitwise sum s is paired with the carry of its right-hand
// neighbour cy[i-1] (the external carry-in at bit 0) and turned into
// propagate/generate: p[i] = s[i]^cy[i-1], g[i] = s[i]&cy[i-1]. There are N
// such cells. Position N has only the top carry cy[N-1] to add, so it is a
// plain wire: p[N] = cy[N-1], g[N] = 0. Combinational, one gate delay.
module base_logic #(
  parameter int unsigned N = 32  // operand width
) (
  input  logic [N-1:0] s,    // bitwise sums S'
  input  logic [N-1:0] cy,   // bitwise carries
  input  logic         cin,  // external carry input
  output logic [N:0]   p,    // propagate P_N..P_0
  output logic [N:0]   g     // generate  G_N..G_0
);
  logic [N-1:0] cy_in;  // carry arriving at each position
  assign cy_in = {cy[N-2:0], cin};

  assign p[N-1:0] = s ^ cy_in;
  assign g[N-1:0] = s & cy_in;
  assign p[N]     = cy[N-1];
  assign g[N]     = 1'b0;
endmodule
