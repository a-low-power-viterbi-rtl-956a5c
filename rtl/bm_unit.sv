// bm_unit: branch metric unit for the rate-1/3, 3-bit soft-decision decoder.
//
// For each of the STEPS trellis stages handled in a clock and each of the 8
// possible code words {A,B,C}, the metric is the L1 distance between the soft
// symbol and the code word's ideal values 0 or 7, which reduces to adding
// either the soft value or its bitwise complement:
//   BM(c) = sum over x in {A,B,C} of (c_x ? ~y_x : y_x).
// The largest metric is 21; it is carried in BM_W = 6 bits.
//
// Interface: purely combinational; bm[k][c] is the metric of step k for code
// word c (bit 2 = A, bit 0 = C).  The formula follows the document (extended
// from two to three code bits); nothing in it is this design's own.
module bm_unit
  import vd_pkg::*;
#(
  parameter int unsigned STEPS_P = STEPS,
  parameter int unsigned BM_W    = 6
) (
  input  sym_t [STEPS_P-1:0]             y,
  output logic [STEPS_P-1:0][7:0][BM_W-1:0] bm
);

  always_comb begin
    for (int k = 0; k < int'(STEPS_P); k++) begin
      for (int c = 0; c < 8; c++) begin
        logic [BM_W-1:0] acc;
        acc = '0;
        for (int b = 0; b < int'(NOUT); b++)
          acc += BM_W'(c[b] ? soft_t'(~y[k][b]) : y[k][b]);
        bm[k][c] = acc;
      end
    end
  end

endmodule
