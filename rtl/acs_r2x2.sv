// acs_r2x2: radix-2x2 add-compare-select array for all 64 trellis states.
//
// Two trellis stages are completed in one clock by two chained layers of
// radix-2 ACS cells with no register between them.  The first layer computes
// the path metric of every intermediate state p at time t-1 from its
// predecessors {p[4:0],0} and {p[4:0],1} at time t-2 and the stage-1 branch
// metrics; the second layer computes the metric of every state s at time t
// from its intermediate predecessors and the stage-2 branch metrics.  Each
// intermediate result is computed once and shared by the two states it
// feeds, so the array holds 128 cells: per state four adders, two 2-way
// comparators and two 2-to-1 multiplexers.
//
// Interface: purely combinational.  pm holds the path metrics at t-2,
// bm[k][c] the branch metric of stage k (0 = earlier) for code word c.
// pm_next are the metrics at t, d1[p] the decision of intermediate state p,
// d2[s] that of final state s.  The radix-2x2 structure and the shared cells
// follow the document; the tie rule is this design's (see acs_r2).
module acs_r2x2
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = 9,
  parameter int unsigned BM_W = 6
) (
  input  logic [NSTATES-1:0][PM_W-1:0]   pm,
  input  logic [1:0][7:0][BM_W-1:0]      bm,
  output logic [NSTATES-1:0][PM_W-1:0]   pm_next,
  output logic [NSTATES-1:0]             d1,
  output logic [NSTATES-1:0]             d2
);

  logic [NSTATES-1:0][PM_W-1:0] pm_mid;

  for (genvar s = 0; s < int'(NSTATES); s++) begin : g_state
    localparam state_t S  = state_t'(s);
    localparam state_t P0 = {S[M-2:0], 1'b0};
    localparam state_t P1 = {S[M-2:0], 1'b1};
    localparam cw_t    C0 = branch_cw(P0, S[M-1]);
    localparam cw_t    C1 = branch_cw(P1, S[M-1]);

    // first stage: intermediate state s at time t-1
    acs_r2 #(.PM_W(PM_W), .BM_W(BM_W)) u_mid (
      .pm0(pm[P0]), .pm1(pm[P1]), .bm0(bm[0][C0]), .bm1(bm[0][C1]),
      .pm_out(pm_mid[s]), .dec(d1[s])
    );

    // second stage: final state s at time t
    acs_r2 #(.PM_W(PM_W), .BM_W(BM_W)) u_fin (
      .pm0(pm_mid[P0]), .pm1(pm_mid[P1]), .bm0(bm[1][C0]), .bm1(bm[1][C1]),
      .pm_out(pm_next[s]), .dec(d2[s])
    );
  end

endmodule
