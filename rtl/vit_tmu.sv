// vit_tmu -- transition metric unit of the Viterbi decoder.
//
// The 256 states of a trellis step are processed 16 at a time over 16
// cycles. In cycle `grp` ACS unit i produces the new state s' = 16*grp + i,
// whose two predecessors are p = (2*s' mod 256) + b, b = 0, 1, and whose input
// bit is u = s'[7]. For each of these 32 branches a TMU cell generates the
// branch codeword from the generators of the selected rate (tap bit 8 = the
// current input u, bits 7..0 = the state p, newest bit first) and accumulates
// the distance between the 4-bit soft inputs and the codeword bits:
// |r| for a 0, |15 - r| for a 1. The result lies in 0..90 at rate 1/6.
// Combinational.
module vit_tmu
  import dmcd_pkg::*;
(
  input  vit_rate_e  rate,
  input  logic [3:0] grp,
  input  soft_t      sym [NV],
  output logic [BM_W-1:0] bm [16][2]    // [ACS unit][predecessor LSB]
);
  always_comb begin
    int nout;
    nout = conv_nout(rate);
    for (int i = 0; i < 16; i++) begin
      for (int b = 0; b < 2; b++) begin
        logic [7:0] sn, p;
        logic [8:0] reg9;
        logic [BM_W-1:0] acc;
        sn   = {grp, 4'(i)};
        p    = {sn[6:0], b[0]};
        reg9 = {sn[7], p};
        acc  = '0;
        for (int v = 0; v < NV; v++) begin
          if (v < nout) begin
            if (^(conv_poly(rate, v) & reg9)) acc += BM_W'(4'd15 - sym[v]);
            else                              acc += BM_W'(sym[v]);
          end
        end
        bm[i][b] = acc;
      end
    end
  end
endmodule
