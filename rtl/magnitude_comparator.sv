// magnitude_comparator: unsigned greater-than of two N-bit words,
// gt = (a > b). Forms the coupling bits B and C of the modified dual-CLCG.
// Combinational; written as a plain comparison, left to synthesis.
module magnitude_comparator #(
  parameter int unsigned N = 32  // word width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         gt
);
  assign gt = (a > b);
endmodule
