// pg_logic: third stage of the three-operand adder, the parallel-prefix
// carry network. From per-position propagate/generate p[i], g[i]
// (i = 0..N) it forms the group generate gpre[i] = G_{i:0}, the carry into
// position i+1.
//
// Shape (sparse Kogge-Stone on the odd positions, Han-Carlson style):
//   * LEVELS rows work only on odd positions. In row l an odd position i,
//     holding the group i : i-2^l+1, merges with position i-2^l, which holds
//     the adjacent group just below it. Row 0 merges i with i-1 (raw even
//     position). A merge whose result reaches bit 0 is a grey cell (generate
//     only); any other merge is a black cell. Where i-2^l < 0 the position
//     already reaches bit 0 and is passed through unchanged.
//   * One last row of grey cells finishes the even positions i >= 2:
//     G_{i:0} = g[i] | p[i] & G_{i-1:0}. Position 0 is its own group.
// LEVELS = clog2(largest odd position + 1), so for N = 16 there are four odd
// rows and the even row, log2(N)+1 cell delays in all. Combinational.
module pg_logic #(
  parameter int unsigned N = 32  // operand width; positions 0..N
) (
  input  logic [N:0] p,     // propagate per position
  input  logic [N:0] g,     // generate per position
  output logic [N:0] gpre   // group generate G_{i:0}
);
  localparam int unsigned MAXODD = (N % 2 == 1) ? N : N - 1;
  localparam int unsigned LEVELS = $clog2(MAXODD + 1);

  // Row r holds the groups after r odd rows; row 0 is the input.
  logic [N:0] gl [LEVELS+1];
  logic [N:0] pl [LEVELS+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_row
    localparam int D = 2 ** lv;
    for (genvar i = 0; i <= N; i++) begin : g_pos
      if ((i % 2 == 1) && (i - D >= 0)) begin : g_merge
        if (i - 2 * D + 1 <= 0) begin : g_grey
          grey_cell u_cell (
            .g_hi (gl[lv][i]),
            .p_hi (pl[lv][i]),
            .g_lo (gl[lv][i-D]),
            .g_out(gl[lv+1][i])
          );
          // Propagate of a group reaching bit 0 is never used again.
          assign pl[lv+1][i] = pl[lv][i];
        end else begin : g_black
          black_cell u_cell (
            .g_hi (gl[lv][i]),
            .p_hi (pl[lv][i]),
            .g_lo (gl[lv][i-D]),
            .p_lo (pl[lv][i-D]),
            .g_out(gl[lv+1][i]),
            .p_out(pl[lv+1][i])
          );
        end
      end else begin : g_pass
        assign gl[lv+1][i] = gl[lv][i];
        assign pl[lv+1][i] = pl[lv][i];
      end
    end
  end

  // Last row: even positions take the carry from the odd position below.
  for (genvar i = 0; i <= N; i++) begin : g_even
    if (i % 2 == 1 || i == 0) begin : g_done
      assign gpre[i] = gl[LEVELS][i];
    end else begin : g_grey
      grey_cell u_cell (
        .g_hi (gl[LEVELS][i]),
        .p_hi (pl[LEVELS][i]),
        .g_lo (gl[LEVELS][i-1]),
        .g_out(gpre[i])
      );
    end
  end
endmodule
