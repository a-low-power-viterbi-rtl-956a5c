// sst_output: final stage of scarce-state-transition decoding, o = i XOR n.
//
// The pre-decoded bits i leave the SST unit together with the symbols they
// belong to, but the Viterbi decoder's correction n for them comes out of
// the survivor memory COLS advances later.  A COLS-deep shift register of
// bit pairs, advanced by the same enable as the survivor memory, keeps i
// aligned with n; the decoded information pair is their XOR.
//
// Interface: i is taken at the rising edge when en is high; o = n XOR the
// oldest stored pair, combinational.  Reset (active low, synchronous) clears
// the line.  The XOR follows the document; the delay line is this design's
// way of aligning the two sequences.
module sst_output #(
  parameter int unsigned COLS = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] i,
  input  logic [1:0] n,
  output logic [1:0] o
);

  logic [COLS-1:0][1:0] line_q;

  always_ff @(posedge clk) begin
    if (!rst_n)  line_q <= '0;
    else if (en) line_q <= {line_q[COLS-2:0], i};
  end

  assign o = n ^ line_q[COLS-1];

endmodule
