// grey_cell: generate-only prefix cell of the carry network.
// G_{i:j} = G_{i:k} | (P_{i:k} & G_{k-1:j}). Used where the merged group reaches
// bit 0 (j = 0): its propagate is never needed, so only the generate is formed.
// Purely combinational.
module grey_cell (
  input  logic g_hi,   // G_{i:k}
  input  logic p_hi,   // P_{i:k}
  input  logic g_lo,   // G_{k-1:0}
  output logic g_out   // G_{i:0}
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
