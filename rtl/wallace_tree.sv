// wallace_tree: carry-save reduction of ROWS partial-product rows to two rows.
//
// Each level takes the rows in groups: every four rows go through a row of exact 4:2
// compressors (the lateral cout of bit i feeds cin of bit i+1, which does not ripple because
// cout never depends on cin), three leftover rows go through a row of full adders (3:2), and one
// or two leftover rows pass to the next level unchanged. Levels repeat until two rows remain;
// fam_pkg::tree_levels() gives their number (6 rows -> 4 -> 2, two levels). All rows are W bits
// wide and already sign-extended, so every carry out of bit W-1 is dropped and the result is
// exact modulo 2^W:  sum + carry = (rows[0] + ... + rows[ROWS-1]) mod 2^W.
// Interface: rows[ROWS] in, sum and carry out. Purely combinational.
// Follows the document: a Wallace-style reduction from full adders and exact compressors down
// to the last two rows. This design's own choices: the row-wise grouping, full sign extension
// instead of a sign-extension-prevention scheme, and no half adders (a row of them would leave
// the row count unchanged).
module wallace_tree
  import fam_pkg::*;
#(
  parameter int W    = 17,  // row width
  parameter int ROWS = 6    // rows to add (5 Booth rows + 1 row of sign corrections for N = 8)
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  localparam int L = tree_levels(ROWS);

  // Each level holds its own input rows (cur) and output rows (nxt), so no array is both read
  // and written by the same level.
  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int R   = rows_at(ROWS, l);
    localparam int RN  = rows_after(R);
    localparam int NQ  = R / 4;
    localparam int REM = R % 4;

    logic [W-1:0] cur [ROWS];
    logic [W-1:0] nxt [ROWS];
    if (l == 0) begin : g_first
      assign cur = rows;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end

    // Rows of 4:2 compressors.
    for (genvar g = 0; g < NQ; g++) begin : g_quad
      logic [W:0] lat;      // lateral carries between neighbouring compressors
      logic [W-1:0] s_row, c_row;
      assign lat[0] = 1'b0;
      for (genvar i = 0; i < W; i++) begin : g_bit
        compressor_4_2 u_cmp (
          .x1   (cur[4*g][i]),
          .x2   (cur[4*g+1][i]),
          .x3   (cur[4*g+2][i]),
          .x4   (cur[4*g+3][i]),
          .cin  (lat[i]),
          .sum  (s_row[i]),
          .carry(c_row[i]),
          .cout (lat[i+1])
        );
      end
      assign nxt[2*g]   = s_row;
      assign nxt[2*g+1] = {c_row[W-2:0], 1'b0};
    end

    if (REM == 3) begin : g_csa
      // One row of full adders on the three leftover rows.
      logic [W-1:0] s_row, c_row;
      for (genvar i = 0; i < W; i++) begin : g_bit
        fa u_fa (
          .p (cur[4*NQ][i]),
          .q (cur[4*NQ+1][i]),
          .ci(cur[4*NQ+2][i]),
          .s (s_row[i]),
          .co(c_row[i])
        );
      end
      assign nxt[2*NQ]   = s_row;
      assign nxt[2*NQ+1] = {c_row[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign nxt[2*NQ+r] = cur[4*NQ+r];
      end
    end

    // Slots above the live rows of the next level hold zero.
    for (genvar r = RN; r < ROWS; r++) begin : g_zero
      assign nxt[r] = '0;
    end
  end

  if (L > 0) begin : g_out_tree
    assign sum   = g_level[L-1].nxt[0];
    assign carry = g_level[L-1].nxt[1];
  end else if (ROWS == 2) begin : g_out_two
    assign sum   = rows[0];
    assign carry = rows[1];
  end else begin : g_out_one
    assign sum   = rows[0];
    assign carry = '0;
  end
endmodule
