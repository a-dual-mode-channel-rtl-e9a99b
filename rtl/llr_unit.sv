// llr_unit -- a-posteriori LLR and extrinsic value of one trellis step.
//
// Sixteen cells, one per trellis branch (s,u), each add the forward metric
// alpha_{k-1}(s), the branch metric gamma_k(s,u) and the backward metric
// beta_k(s') of the state the branch enters. The largest sum over the u=1
// branches minus the largest over the u=0 branches is the Max-Log-MAP LLR
// L(u_k). The extrinsic value is L(u_k) - (x + La), saturated to the 4.2
// format (+7.75 / -8.00). Because the path metrics are modulo-normalised,
// each metric set is first taken relative to its state 0, which makes the
// sums ordinary signed numbers. L(u_k) is saturated to 10 bits (8.2).
// Combinational.
module llr_unit
  import dmcd_pkg::*;
(
  input  tpm_t alpha [8],
  input  tpm_t beta  [8],
  input  gam_t gamma [8],
  input  gam_t sla,
  output logic signed [LOUT_W-1:0] llr,
  output ext_t lex
);
  localparam int SW = 12;
  typedef logic signed [SW-1:0] s_t;

  function automatic s_t rel(input tpm_t a, input tpm_t ref0);
    logic signed [TPM_W-1:0] d;
    d = $signed(a - ref0);
    return s_t'(d);
  endfunction

  function automatic s_t sat_to(input s_t v, input int w);
    s_t hi, lo;
    hi = s_t'((1 <<< (w - 1)) - 1);
    lo = -s_t'(1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  s_t m [2][8];   // m[u][s]
  s_t max1, max0, l_full, e_full;

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [2:0] ns;
        logic [1:0] c;
        ns = rsc_next(3'(s), u[0]);
        c  = rsc_par(3'(s), u[0]);
        m[u][s] = rel(alpha[s], alpha[0]) + s_t'(gamma[{u[0], c}]) + rel(beta[ns], beta[0]);
      end
    end
    max1 = m[1][0];
    max0 = m[0][0];
    for (int s = 1; s < 8; s++) begin
      if (m[1][s] > max1) max1 = m[1][s];
      if (m[0][s] > max0) max0 = m[0][s];
    end
    l_full = max1 - max0;
    e_full = l_full - s_t'(sla);
    llr = LOUT_W'(sat_to(l_full, LOUT_W));
    lex = ext_t'(sat_to(e_full, EXT_W));
  end
endmodule
