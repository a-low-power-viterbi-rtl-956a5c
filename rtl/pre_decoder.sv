// pre_decoder: inverse of the MB-OFDM convolutional encoder, the first half of
// the scarce-state-transition (SST) unit.
//
// It forms i(D) = r_A(D)S_A(D) + r_B(D)S_B(D) + r_C(D)S_C(D) over GF(2) from
// the hard decisions of the received symbols, with S_A, S_B and S_C from
// vd_pkg.  Because G_A S_A + G_B S_B + G_C S_C = 1 exactly, an error-free code
// sequence is turned back into its information sequence with no delay.  The
// circuit is three shift registers of past hard decisions and XOR trees,
// unrolled to STEPS symbols per clock.
//
// Interface: h[k] = {A,B,C} hard decisions of step k (k=0 earliest); i[k] is
// the pre-decoded bit of that step, combinational from h and the registers.
// The registers shift when en is high; reset (active low, synchronous) clears
// them.  The polynomials are the document's; the unrolling is this design's.
module pre_decoder
  import vd_pkg::*;
#(
  parameter int unsigned STEPS_P = STEPS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  cw_t  [STEPS_P-1:0]     h,
  output logic [STEPS_P-1:0]     i
);

  // Past hard decisions per code bit: ha_q[j] = r_A at time t-1-j.
  logic [M-1:0] ha_q, hb_q, hc_q;
  logic [M-1:0] ha_end, hb_end, hc_end;

  always_comb begin
    logic [M-1:0] ha, hb, hc;
    ha = ha_q; hb = hb_q; hc = hc_q;
    for (int k = 0; k < int'(STEPS_P); k++) begin
      // taps[j] = r_{t-j}
      i[k] = (^({ha, h[k][2]} & S_A)) ^ (^({hb, h[k][1]} & S_B)) ^ (^({hc, h[k][0]} & S_C));
      ha = {ha[M-2:0], h[k][2]};
      hb = {hb[M-2:0], h[k][1]};
      hc = {hc[M-2:0], h[k][0]};
    end
    ha_end = ha; hb_end = hb; hc_end = hc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ha_q <= '0; hb_q <= '0; hc_q <= '0;
    end else if (en) begin
      ha_q <= ha_end; hb_q <= hb_end; hc_q <= hc_end;
    end
  end

endmodule
