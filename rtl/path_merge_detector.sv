// path_merge_detector: path merging detection unit of the variable truncation
// length scheme.
//
// Checking all 64 rows of a survivor-memory column for equality is costly, so
// the states are split into groups of four consecutive states 4g..4g+3 (the
// four radix-2x2 sources of a state) and only the first CHECK_GROUPS groups
// (12 groups = 48 states) are checked.  A column counts as merged when every
// checked group holds four equal 2-bit entries in it.
//
// The merged column P is the start of the run of merged columns that reaches
// back to the oldest up-to-date column: P = min k such that every column from
// k to valid_col (and k >= FIRST_COL) is merged.  Demanding an unbroken run,
// rather than taking any single merged column, keeps chance agreements near
// the front of the memory from cutting the truncation short.  Columns 0..2
// are never searched: a row's first three columns are its own six state bits,
// so they never agree across a group.  Outputs for the next advance:
//   gate[k] (G_k) = k <= P : rows 1..63 of column k keep exchanging;
//   sel[k]  (S_k) = k >  P : row 0 of column k shifts directly.
// Row 0 shifting directly out of column P is exact, because its four
// two-stage sources (group 0) agree there.  Behind P the other rows go
// stale, so the unit remembers the last column all rows updated (valid_col)
// and searches only up to it.  If column valid_col itself is not merged,
// P = valid_col + 1: the exchanged region grows by one column per advance
// until the paths merge again.  The effective truncation length is 2*(P+1)
// stages and adapts to the channel.
//
// Interface: gate, sel and merge_col are combinational from mem and the
// valid_col register, which takes P at every advance (en).  Reset (active low,
// synchronous) sets valid_col to COLS-1.  Group checking, the 48 checked
// states and G/S follow the document; the search rule, FIRST_COL and
// valid_col are this design's.
module path_merge_detector
  import vd_pkg::*;
#(
  parameter int unsigned COLS         = 32,
  parameter int unsigned CHECK_GROUPS = 12,
  parameter int unsigned FIRST_COL    = 3,
  localparam int unsigned CW          = $clog2(COLS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  logic [NSTATES-1:0][COLS-1:0][1:0] mem,
  output logic [COLS-1:0]                   gate,
  output logic [COLS-1:0]                   sel,
  output logic [CW-1:0]                     merge_col,
  output logic [CW-1:0]                     valid_col
);

  logic [COLS-1:0] col_eq;   // every checked group equal in column k

  always_comb begin
    for (int k = 0; k < int'(COLS); k++) begin
      col_eq[k] = 1'b1;
      for (int g = 0; g < int'(CHECK_GROUPS); g++) begin
        if (mem[4*g][k] != mem[4*g+1][k] || mem[4*g][k] != mem[4*g+2][k] ||
            mem[4*g][k] != mem[4*g+3][k])
          col_eq[k] = 1'b0;
      end
    end
  end

  always_comb begin
    logic run;
    run = 1'b1;
    merge_col = (valid_col == CW'(COLS - 1)) ? valid_col : valid_col + 1'b1;
    for (int k = int'(COLS) - 1; k >= int'(FIRST_COL); k--) begin
      if (CW'(k) <= valid_col) begin
        run = run && col_eq[k];
        if (run) merge_col = CW'(k);
      end
    end
    for (int k = 0; k < int'(COLS); k++) begin
      gate[k] = (CW'(k) <= merge_col);
      sel[k]  = (CW'(k) >  merge_col);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  valid_col <= CW'(COLS - 1);
    else if (en) valid_col <= merge_col;
  end

endmodule
