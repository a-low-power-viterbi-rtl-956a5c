// sst_vtl_viterbi_decoder: low-power 64-state Viterbi decoder for the rate-1/3
// MB-OFDM UWB convolutional code, combining scarce state transition (SST) and
// a register-exchange survivor memory with variable truncation length.
//
// Data path, two trellis stages per clock:
//   sst_unit            pre-decodes the hard decisions, re-encodes them and
//                       inverts the soft values the re-encoded bits mark, so
//                       the decoder sees mostly zeros (registered, 1 clock);
//   bm_unit             branch metrics of both stages (combinational);
//   acs_r2x2 + pm_unit  radix-2x2 add-compare-select over 9-bit modular path
//                       metrics, two decisions per state per clock;
//   re_survivor_memory  64 x 32 x 2-bit register exchange, output row 0;
//   path_merge_detector finds the merged column and gates the rows behind it;
//   sst_output          o = i XOR n with i delayed to match.
//
// Interface: present a pair of received symbols on in_sym ([0] earlier; per
// symbol [2]=A, [1]=B, [0]=C soft values, 0 = confident 0, 7 = confident 1)
// with in_valid high.  There is no back-pressure.  Every valid pair advances
// the decoder once; after COLS+1 advances out_valid pulses with each newly
// decoded pair on out_bits ([0] earlier).  With continuous input the latency
// is COLS+1 = 33 clocks; a stream is flushed by feeding further symbols (the
// encoder's zero tail and beyond).  merge_col reports the current merged
// column; the effective truncation length is 2*(merge_col+1) stages, and
// valid_col the last column in which all rows are up to date.  Reset
// is active low and synchronous; the encoder is assumed to start in state 0.
// The architecture follows the document; the handshake and the one-clock
// register after the SST unit are this design's choices.
module sst_vtl_viterbi_decoder
  import vd_pkg::*;
#(
  parameter int unsigned COLS         = 32,
  parameter int unsigned CHECK_GROUPS = 12,
  parameter int unsigned PM_W         = 9,
  parameter int unsigned BM_W         = 6,
  localparam int unsigned CW          = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  sym_t [1:0]       in_sym,
  output logic             out_valid,
  output logic [1:0]       out_bits,
  output logic [CW-1:0]    merge_col,
  output logic [CW-1:0]    valid_col
);

  logic                         adv;       // decoder advances this clock
  sym_t [1:0]                   y;
  logic [1:0]                   i_bits;
  logic [1:0][7:0][BM_W-1:0]    bm;
  logic [NSTATES-1:0][PM_W-1:0] pm, pm_next;
  logic [NSTATES-1:0]           d1, d2;
  logic [NSTATES-1:0][COLS-1:0][1:0] mem;
  logic [COLS-1:0]              gate, sel;
  logic [1:0]                   n_bits;
  logic [CW:0]                  fill_q;    // advances seen, saturating at COLS

  sst_unit #(.STEPS_P(2)) u_sst (
    .clk, .rst_n, .in_valid, .r(in_sym), .y_valid(adv), .y, .i(i_bits)
  );

  bm_unit #(.STEPS_P(2), .BM_W(BM_W)) u_bm (.y, .bm);

  acs_r2x2 #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
    .pm, .bm, .pm_next, .d1, .d2
  );

  pm_unit #(.PM_W(PM_W)) u_pm (
    .clk, .rst_n, .en(adv), .pm_next, .pm
  );

  re_survivor_memory #(.COLS(COLS)) u_sm (
    .clk, .rst_n, .en(adv), .d1, .d2, .gate, .sel, .mem, .dec(n_bits)
  );

  path_merge_detector #(.COLS(COLS), .CHECK_GROUPS(CHECK_GROUPS)) u_pmd (
    .clk, .rst_n, .en(adv), .mem, .gate, .sel, .merge_col, .valid_col
  );

  sst_output #(.COLS(COLS)) u_out (
    .clk, .rst_n, .en(adv), .i(i_bits), .n(n_bits), .o(out_bits)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= adv && (fill_q >= (CW+1)'(COLS - 1));
      if (adv && fill_q != (CW+1)'(COLS)) fill_q <= fill_q + 1'b1;
    end
  end

endmodule
