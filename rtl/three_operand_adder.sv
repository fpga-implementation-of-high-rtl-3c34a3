// three_operand_adder: adds three N-bit operands and a carry-in,
// {carryout, sum} = a + b + c + cin, as an N+2-bit result.
// Four stages, all combinational:
//   1. bit_addition_logic: a row of full adders turns a+b+c into s + 2*cy
//      with no carry propagation.
//   2. base_logic: s[i] paired with cy[i-1] (cin at bit 0) gives per-position
//      propagate/generate for positions 0..N.
//   3. pg_logic: a log-depth prefix network of black and grey cells forms the
//      carry G_{i:0} into every position.
//   4. sum_logic: sum[i] = p[i] ^ G_{i-1:0}, carryout = G_{N:0}.
// Compared with a carry-save adder followed by a ripple adder, the carry path
// grows with log2(N) instead of N. Port names and widths follow the
// published 16- and 32-bit versions; N defaults to 32, the width used in the
// random bit generator.
module three_operand_adder #(
  parameter int unsigned N = 32  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N:0]   sum,      // S_N..S_0
  output logic         carryout  // bit N+1 of the result
);
  logic [N-1:0] s, cy;
  logic [N:0]   p, g, gpre;

  bit_addition_logic #(.N(N)) u_bit_add (.a(a), .b(b), .c(c), .s(s), .cy(cy));
  base_logic         #(.N(N)) u_base    (.s(s), .cy(cy), .cin(cin), .p(p), .g(g));
  pg_logic           #(.N(N)) u_pg      (.p(p), .g(g), .gpre(gpre));
  sum_logic          #(.N(N)) u_sum     (.p(p), .gpre(gpre), .sum(sum), .carryout(carryout));
endmodule
