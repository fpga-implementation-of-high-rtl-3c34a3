// black_cell: prefix operator cell of the carry network.
// Merges a higher group (i:k) with the adjacent lower group (k-1:j) into the
// group i:j: G_{i:j} = G_{i:k} | (P_{i:k} & G_{k-1:j}), P_{i:j} = P_{i:k} & P_{k-1:j}.
// Used wherever the merged group does not yet reach bit 0, so its propagate
// is still needed by later rows. Purely combinational.
module black_cell (
  input  logic g_hi,   // G_{i:k}
  input  logic p_hi,   // P_{i:k}
  input  logic g_lo,   // G_{k-1:j}
  input  logic p_lo,   // P_{k-1:j}
  output logic g_out,  // G_{i:j}
  output logic p_out   // P_{i:j}
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
