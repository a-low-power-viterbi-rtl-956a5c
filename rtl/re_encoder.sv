// re_encoder: the rate-1/3, 64-state convolutional encoder of the MB-OFDM UWB
// system, used as the re-encoder of the scarce-state-transition (SST) unit.
//
// A 6-bit shift register holds the last six information bits; each code bit
// is the XOR of the input and the register taps selected by G_A, G_B and G_C
// (vd_pkg).  The encoder is unrolled STEPS times so that it keeps pace with
// the radix-2x2 decoder, which completes two trellis stages per clock.
//
// Interface: u[k] is the information bit of step k (k=0 earliest); c[k] is
// its code word {A,B,C}, combinational from u and the register.  When en is
// high the register takes in all STEPS bits at the rising clock edge.  Reset
// (active low, synchronous to clk) clears the register, i.e. the all-zero
// state.  The polynomials and the encoder structure follow the document; the
// unrolling, the enable and the reset are this design's choices.
module re_encoder
  import vd_pkg::*;
#(
  parameter int unsigned STEPS_P = STEPS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [STEPS_P-1:0]     u,
  output cw_t  [STEPS_P-1:0]     c
);

  logic [M-1:0] hist_q;      // hist_q[j] = u_{t-1-j}
  logic [M-1:0] hist_end;

  always_comb begin
    logic [M-1:0] h;
    h = hist_q;
    for (int k = 0; k < int'(STEPS_P); k++) begin
      c[k] = encode_step(u[k], h);
      h    = {h[M-2:0], u[k]};
    end
    hist_end = h;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  hist_q <= '0;
    else if (en) hist_q <= hist_end;
  end

endmodule
