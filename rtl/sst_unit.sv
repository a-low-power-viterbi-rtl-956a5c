// sst_unit: scarce-state-transition front end of the decoder.
//
// The hard decisions of the received soft symbols r are pre-decoded to an
// estimate i of the information bits, i is re-encoded to a code sequence z,
// and every 3-bit soft value whose re-encoded bit is 1 is inverted:
// y = r XOR {3{z}}.  On a clean channel y is all zero, so the Viterbi decoder
// behind it sees an almost all-zero input and its state register contents
// rarely change; the decoder then estimates the error n in i, and the final
// output is o = i XOR n (see sst_output).
//
// Interface: r[k] (k=0 earliest of the STEPS symbols in a clock) is taken
// when in_valid is high.  y, i and y_valid are registered: they appear one
// clock after the input.  Reset is active low and synchronous.  The
// algorithm and the soft-value inversion follow the document; the output
// register and the valid flag are this design's choices.
module sst_unit
  import vd_pkg::*;
#(
  parameter int unsigned STEPS_P = STEPS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  sym_t [STEPS_P-1:0]     r,
  output logic                   y_valid,
  output sym_t [STEPS_P-1:0]     y,
  output logic [STEPS_P-1:0]     i
);

  cw_t  [STEPS_P-1:0] hard;
  cw_t  [STEPS_P-1:0] z;
  logic [STEPS_P-1:0] i_pre;
  sym_t [STEPS_P-1:0] y_d;

  always_comb begin
    for (int k = 0; k < int'(STEPS_P); k++)
      for (int b = 0; b < int'(NOUT); b++)
        hard[k][b] = r[k][b][SOFT_W-1];
  end

  pre_decoder #(.STEPS_P(STEPS_P)) u_pre (
    .clk, .rst_n, .en(in_valid), .h(hard), .i(i_pre)
  );

  re_encoder #(.STEPS_P(STEPS_P)) u_reenc (
    .clk, .rst_n, .en(in_valid), .u(i_pre), .c(z)
  );

  always_comb begin
    for (int k = 0; k < int'(STEPS_P); k++)
      for (int b = 0; b < int'(NOUT); b++)
        y_d[k][b] = r[k][b] ^ {SOFT_W{z[k][b]}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
      i       <= '0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        y <= y_d;
        i <= i_pre;
      end
    end
  end

endmodule
