// acs_unit -- dual-mode add-compare-select cell.
//
// Adds a branch metric to each of two incoming path metrics, compares the two
// sums and passes on the survivor. In turbo mode (mode_min = 0) the larger sum
// survives (Max-Log-MAP recursion); in Viterbi mode (mode_min = 1) the smaller
// one does (distance metric). Path metrics use modulo normalisation: they are
// allowed to wrap around in W bits and are compared through the sign of their
// W-bit difference, which is correct as long as the true spread of the
// metrics stays below 2^(W-1). Branch metrics arrive already sign- or
// zero-extended to W bits. Purely combinational; a tie keeps branch 0.
// TW is the metric width used in max (turbo) mode: a cell built W = 11 bits
// wide for the Viterbi metrics can run the 9-bit turbo metrics by comparing
// the sign of the low TW bits of the difference (the low bits of a sum do
// not depend on the high bits); only pm_out[TW-1:0] is meaningful then.
// The dual-mode cell and modulo normalisation follow the design; the tie rule
// is this implementation's choice.
module acs_unit #(
  parameter int W  = 11,
  parameter int TW = W
) (
  input  logic         mode_min,
  input  logic [W-1:0] pm0,
  input  logic [W-1:0] bm0,
  input  logic [W-1:0] pm1,
  input  logic [W-1:0] bm1,
  output logic [W-1:0] pm_out,
  output logic         dec      // 1: branch 1 survives
);
  logic [W-1:0] sum0, sum1, diff;

  always_comb begin
    sum0 = pm0 + bm0;
    sum1 = pm1 + bm1;
    diff = sum1 - sum0;
    if (mode_min) dec = diff[W-1];                      // sum1 < sum0
    else          dec = !diff[TW-1] && (diff[TW-1:0] != '0);  // sum1 > sum0
    pm_out = dec ? sum1 : sum0;
  end
endmodule
