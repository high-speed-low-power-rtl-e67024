// acs_unit: one add-compare-select unit.
//
// Adds each of two branch metrics to the path metric of the matching
// predecessor state, compares the two sums and selects the smaller one as the
// new path metric of the state. dec is 1 when the path from predecessor 1 wins;
// on a tie predecessor 0 is kept (own choice). Sums wrap modulo 2**PM_W and
// are compared by the sign of their difference, so no normalisation is needed
// as long as all path metrics stay within 2**(PM_W-1) of each other.
//
// Timing: purely combinational; the path metric memory lives in acsu.
module acs_unit
  import viterbi_pkg::*;
#(
  parameter int BM_W = BM_W_DEFAULT,
  parameter int PM_W = PM_W_DEFAULT
) (
  input  logic [PM_W-1:0] pm0,
  input  logic [PM_W-1:0] pm1,
  input  logic [BM_W-1:0] bm0,
  input  logic [BM_W-1:0] bm1,
  output logic [PM_W-1:0] pm_new,
  output logic            dec
);

  logic [PM_W-1:0] sum0, sum1, diff;

  always_comb begin
    sum0   = pm0 + PM_W'(bm0);
    sum1   = pm1 + PM_W'(bm1);
    diff   = sum1 - sum0;
    dec    = diff[PM_W-1];      // sum1 < sum0 (modulo compare)
    pm_new = dec ? sum1 : sum0;
  end

endmodule
