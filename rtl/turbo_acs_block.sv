// turbo_acs_block -- one trellis step of the 8-state constituent code.
//
// Eight acs_unit cells in max mode. With BACKWARD = 0 it computes the forward
// metrics alpha_k(s') = max over the two branches (s,u) into s' of
// alpha_{k-1}(s) + gamma_k(s,u); with BACKWARD = 1 it computes the backward
// metrics beta_{k-1}(s) = max over the two branches leaving s of
// beta_k(s') + gamma_k(s,u). Branch metrics come from turbo_tmu, indexed
// {u, y0, y1}. Path metrics are TPM_W-bit modulo-normalised numbers.
//
// The cells are the dual-mode kind, VPM_W bits wide, so that they can be lent
// to the Viterbi decoder: while ext_en is high they take their operands from
// the ext_* ports instead of the turbo trellis, select the minimum and return
// their results on ext_pm_out / ext_dec (cell t on index t). In the chip, the
// cells of the alpha and beta1 blocks serve both decoders the same way; the
// operand multiplexer in front of each cell is this implementation's.
// Combinational; the callers hold the metric registers.
module turbo_acs_block
  import dmcd_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  tpm_t pm_in  [8],
  input  gam_t gamma  [8],
  output tpm_t pm_out [8],
  input  logic ext_en,
  input  vpm_t ext_pm0 [8],
  input  vpm_t ext_bm0 [8],
  input  vpm_t ext_pm1 [8],
  input  vpm_t ext_bm1 [8],
  output vpm_t ext_pm_out [8],
  output logic [7:0] ext_dec
);
  for (genvar t = 0; t < 8; t++) begin : g_state
    tpm_t pa, pb, ba, bb;
    always_comb begin
      logic [2:0] p0, p1, n0, n1;
      logic [1:0] c0, c1;
      if (!BACKWARD) begin
        p0 = rsc_prev(3'(t), 1'b0);
        p1 = rsc_prev(3'(t), 1'b1);
        c0 = rsc_par(p0, 1'b0);
        c1 = rsc_par(p1, 1'b1);
        pa = pm_in[p0];
        pb = pm_in[p1];
        ba = tpm_t'(gamma[{1'b0, c0}]);
        bb = tpm_t'(gamma[{1'b1, c1}]);
      end else begin
        n0 = rsc_next(3'(t), 1'b0);
        n1 = rsc_next(3'(t), 1'b1);
        c0 = rsc_par(3'(t), 1'b0);
        c1 = rsc_par(3'(t), 1'b1);
        pa = pm_in[n0];
        pb = pm_in[n1];
        ba = tpm_t'(gamma[{1'b0, c0}]);
        bb = tpm_t'(gamma[{1'b1, c1}]);
      end
    end
    vpm_t op_pa, op_ba, op_pb, op_bb, res;
    logic res_dec;
    assign op_pa = ext_en ? ext_pm0[t] : vpm_t'(pa);
    assign op_ba = ext_en ? ext_bm0[t] : vpm_t'(ba);
    assign op_pb = ext_en ? ext_pm1[t] : vpm_t'(pb);
    assign op_bb = ext_en ? ext_bm1[t] : vpm_t'(bb);
    acs_unit #(.W(VPM_W), .TW(TPM_W)) u_acs (
      .mode_min(ext_en), .pm0(op_pa), .bm0(op_ba), .pm1(op_pb), .bm1(op_bb),
      .pm_out(res), .dec(res_dec));
    assign pm_out[t]     = res[TPM_W-1:0];
    assign ext_pm_out[t] = res;
    assign ext_dec[t]    = res_dec;
  end
endmodule
