// re_survivor_memory: register-exchange survivor memory with per-column clock
// gating, the storage half of the variable-truncation-length scheme.
//
// Every trellis state owns a row of COLS columns; a column holds the two
// information bits of one radix-2x2 step ([0] earlier stage, [1] later), so
// COLS = 32 columns give a truncation length of 64 stages.  On each advance:
//  * column 0 of row s takes the information bits of its last two
//    transitions, which are the state bits s[4] and s[5];
//  * column k of row s takes column k-1 of its two-stage survivor
//    predecessor q = {p[4:0], d1[p]} with p = {s[4:0], d2[s]} (the exchange),
//    picked from the four candidate rows {s[3:0], 00..11} by a tree of three
//    2-to-1 multiplexers;
//  * for rows 1..63, column k (k >= 1) only loads when gate[k] (G_k) is set:
//    behind the merged column all paths are taken as equal and those
//    registers are left idle (clock gated);
//  * row 0 is the fixed output row.  Where sel[k] (S_k) is set, its column k
//    loads its own column k-1 (a plain shift) instead of exchanging.
// The decoded pair is column COLS-1 of row 0.
//
// Interface: the memory advances at the rising edge when en is high.  mem
// exposes all bits to the path merging detection unit.  Columns 0..2 of every
// row always hold the row's own six state bits, i.e. constants; they are
// kept as registers so that all columns look alike, and synthesis removes
// them.  Reset (active low,
// synchronous) clears the memory, which matches an encoder that starts in
// state 0.  The structure, the fixed-state output from state 0, G and S
// follow the document; gating is written as a load enable, which synthesis
// maps to clock-gating cells, and the column format is this design's.
module re_survivor_memory
  import vd_pkg::*;
#(
  parameter int unsigned COLS = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  logic [NSTATES-1:0]                d1,
  input  logic [NSTATES-1:0]                d2,
  input  logic [COLS-1:0]                   gate,
  input  logic [COLS-1:0]                   sel,
  output logic [NSTATES-1:0][COLS-1:0][1:0] mem,
  output logic [1:0]                        dec
);

  for (genvar s = 0; s < int'(NSTATES); s++) begin : g_row
    localparam state_t S   = state_t'(s);
    // intermediate predecessors of s and their own predecessors: the four
    // two-stage sources of s are the consecutive states {s[3:0], 00..11}
    localparam state_t P0  = {S[M-2:0], 1'b0};
    localparam state_t P1  = {S[M-2:0], 1'b1};
    localparam state_t Q00 = {P0[M-2:0], 1'b0};
    localparam state_t Q01 = {P0[M-2:0], 1'b1};
    localparam state_t Q10 = {P1[M-2:0], 1'b0};
    localparam state_t Q11 = {P1[M-2:0], 1'b1};

    // exchange value of every column: two 2-to-1 multiplexers steered by the
    // first-stage decisions, then one steered by the second-stage decision
    logic [COLS-1:1][1:0] exch;
    always_comb begin
      for (int k = 1; k < int'(COLS); k++) begin
        logic [1:0] a0, a1;
        a0 = d1[P0] ? mem[Q01][k-1] : mem[Q00][k-1];
        a1 = d1[P1] ? mem[Q11][k-1] : mem[Q10][k-1];
        exch[k] = d2[s] ? a1 : a0;
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        mem[s] <= '0;
      end else if (en) begin
        mem[s][0] <= {S[M-1], S[M-2]};
        for (int k = 1; k < int'(COLS); k++) begin
          if (s == 0) begin
            mem[s][k] <= sel[k] ? mem[0][k-1] : exch[k];
          end else if (gate[k]) begin
            mem[s][k] <= exch[k];
          end
        end
      end
    end
  end

  assign dec = mem[0][COLS-1];

endmodule
