// acs_r2: one radix-2 add-compare-select cell.
//
// It adds a branch metric to each of two predecessor path metrics, compares
// the sums and passes on the smaller one together with the decision bit
// (0: predecessor 0 survives, 1: predecessor 1 survives).  Path metrics are
// PM_W-bit unsigned numbers that are allowed to wrap: the comparison is
// modular, a sum counts as smaller when the MSB of the wrapped difference
// sum0 - sum1 is set, which is exact as long as all path metrics of the
// trellis lie within half the number range of each other.
//
// Interface: purely combinational.  Equal sums keep predecessor 0 (this
// design's choice); the modular comparison follows the document.
module acs_r2 #(
  parameter int unsigned PM_W = 9,
  parameter int unsigned BM_W = 6
) (
  input  logic [PM_W-1:0] pm0,
  input  logic [PM_W-1:0] pm1,
  input  logic [BM_W-1:0] bm0,
  input  logic [BM_W-1:0] bm1,
  output logic [PM_W-1:0] pm_out,
  output logic            dec
);

  logic [PM_W-1:0] sum0, sum1, diff;

  always_comb begin
    sum0   = pm0 + PM_W'(bm0);
    sum1   = pm1 + PM_W'(bm1);
    diff   = sum1 - sum0;            // negative (MSB set) when sum1 < sum0
    dec    = diff[PM_W-1];
    pm_out = dec ? sum1 : sum0;
  end

endmodule
