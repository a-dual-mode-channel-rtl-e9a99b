// turbo_tmu -- transition metric unit of the turbo decoder.
//
// Forms the eight branch metrics of one trellis step of the 8-state
// constituent code as gamma(u,x0,x1) = (x + La)*u + y0*x0 + y1*x1 with
// u, x0, x1 in {0,1}: terms multiplied by zero are dropped, which leaves the
// differences between branch metrics (all that the recursions use) unchanged.
// The systematic and parity LLRs (3.3 format) are brought to the 2-bit
// fraction of the metrics by dropping one LSB; the a-priori value is 4.2.
// Outputs are indexed {u, x0, x1} and are 6.2 numbers (8 bits). sla is the
// common term x + La, which the LLR unit removes to form extrinsic values.
// gamma[{0,0,0}] is the constant zero and the single-term metrics only
// sign-extend into their upper bits; they are kept so that all eight metrics
// share one index and format.
// Combinational.
module turbo_tmu
  import dmcd_pkg::*;
(
  input  llr_t x,
  input  llr_t y0,
  input  llr_t y1,
  input  ext_t la,
  output gam_t gamma [8],
  output gam_t sla
);
  gam_t xs, y0s, y1s, las;
  always_comb begin
    xs  = gam_t'(x)  >>> 1;
    y0s = gam_t'(y0) >>> 1;
    y1s = gam_t'(y1) >>> 1;
    las = gam_t'(la);
    sla = xs + las;
    gamma[3'b000] = '0;
    gamma[3'b001] = y1s;
    gamma[3'b010] = y0s;
    gamma[3'b011] = y0s + y1s;
    gamma[3'b100] = sla;
    gamma[3'b101] = sla + y1s;
    gamma[3'b110] = sla + y0s;
    gamma[3'b111] = sla + y0s + y1s;
  end
endmodule
