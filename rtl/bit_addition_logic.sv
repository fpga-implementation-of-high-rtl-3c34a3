// bit_addition_logic: first stage of the three-operand adder.
// A row of N full adders reduces the three operands bit by bit, without any
// carry travelling between bits: s[i] = a[i]^b[i]^c[i] and cy[i] is the
// majority of a[i], b[i], c[i]. Afterwards a+b+c = s + 2*cy.
// Combinational, one full-adder delay.
module bit_addition_logic #(
  parameter int unsigned N = 32  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,   // bitwise sums S'
  output logic [N-1:0] cy   // bitwise carries, weight 2^(i+1)
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      s[i]  = a[i] ^ b[i] ^ c[i];
      cy[i] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
    end
  end
endmodule
