// compressor_tree: Wallace-style reduction of ROWS rows of W bits to two rows.
//
// Each level splits its rows into groups of five, each reduced to two rows by a row
// of comp52 cells; a leftover of four rows goes through a row of comp42 cells, a
// leftover of three through a row of comp32 cells, and one or two leftover rows pass
// straight on. The cells of a row are linked column to column only through their
// carry-outs, which never depend on their carry-ins, so no level has a ripple path.
// Carry rows are shifted up one column. Levels repeat until two rows are left: sum
// and carry, with
//   sum + carry = sum of all input rows (mod 2^W).
// Carries out of column W-1 are dropped, which is exact modulo 2^W; the top bits of
// the cells' carry vectors are therefore unused.
// For 14 rows (11 partial products, the negation row and two accumulator rows of a
// 32-bit MAC) this gives 14 -> 6 -> 3 -> 2, three levels.
//
// Combinational. The use of 3:2, 4:2 and 5:2 compressors in a Wallace tree follows
// the published architecture; the greedy grouping per level is this design's choice.
module compressor_tree
  import mac_pkg::*;
#(
  parameter int ROWS = 14,
  parameter int W    = 64
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  localparam int LEVELS = tree_levels(ROWS);

  // lvl[l] holds the rows entering level l; only the first tree_rows_at(ROWS, l) are
  // used, the rest are tied to zero.
  logic [LEVELS:0][ROWS-1:0][W-1:0] lvl;

  assign lvl[0] = rows;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int R    = tree_rows_at(ROWS, l);
    localparam int N5   = R / 5;
    localparam int REM  = R % 5;
    localparam int NEXT = tree_next_rows(R);

    // 5:2 groups
    for (genvar k = 0; k < N5; k++) begin : g_c52
      logic [W-1:0] s, c, co1, co2;
      for (genvar j = 0; j < W; j++) begin : g_col
        comp52 u_cell (
          .a     (lvl[l][5*k+0][j]),
          .b     (lvl[l][5*k+1][j]),
          .c     (lvl[l][5*k+2][j]),
          .d     (lvl[l][5*k+3][j]),
          .e     (lvl[l][5*k+4][j]),
          .cin1  ((j == 0) ? 1'b0 : co1[(j == 0) ? 0 : j-1]),
          .cin2  ((j == 0) ? 1'b0 : co2[(j == 0) ? 0 : j-1]),
          .sum   (s[j]),
          .carry (c[j]),
          .cout1 (co1[j]),
          .cout2 (co2[j])
        );
      end
      assign lvl[l+1][2*k]   = s;
      assign lvl[l+1][2*k+1] = {c[W-2:0], 1'b0};
    end

    if (REM == 4) begin : g_c42
      logic [W-1:0] s, c, co;
      for (genvar j = 0; j < W; j++) begin : g_col
        comp42 u_cell (
          .a     (lvl[l][5*N5+0][j]),
          .b     (lvl[l][5*N5+1][j]),
          .c     (lvl[l][5*N5+2][j]),
          .d     (lvl[l][5*N5+3][j]),
          .cin   ((j == 0) ? 1'b0 : co[(j == 0) ? 0 : j-1]),
          .sum   (s[j]),
          .carry (c[j]),
          .cout  (co[j])
        );
      end
      assign lvl[l+1][2*N5]   = s;
      assign lvl[l+1][2*N5+1] = {c[W-2:0], 1'b0};
    end else if (REM == 3) begin : g_c32
      logic [W-1:0] s, c;
      for (genvar j = 0; j < W; j++) begin : g_col
        comp32 u_cell (
          .a     (lvl[l][5*N5+0][j]),
          .b     (lvl[l][5*N5+1][j]),
          .c     (lvl[l][5*N5+2][j]),
          .sum   (s[j]),
          .carry (c[j])
        );
      end
      assign lvl[l+1][2*N5]   = s;
      assign lvl[l+1][2*N5+1] = {c[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign lvl[l+1][2*N5+r] = lvl[l][5*N5+r];
      end
    end

    for (genvar r = NEXT; r < ROWS; r++) begin : g_zero
      assign lvl[l+1][r] = '0;
    end
  end

  assign sum   = lvl[LEVELS][0];
  assign carry = (tree_rows_at(ROWS, LEVELS) > 1) ? lvl[LEVELS][1] : '0;

endmodule
