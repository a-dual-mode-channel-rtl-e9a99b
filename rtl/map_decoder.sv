// map_decoder -- sliding-window Max-Log-MAP soft-in/soft-out decoder.
//
// Decodes one constituent code of the turbo code over a block of N steps.
// The block is cut into sub-blocks of L steps. In each period of L cycles
// three recursions run side by side, each on its own sub-block:
//   beta1  backward over sub-block p-1, started from equal metrics; its final
//          metrics are a reliable starting point for the sub-block before it;
//   alpha  forward over sub-block p-2, its metrics pushed into a LIFO;
//   beta2  backward over sub-block p-3, started from beta1's result of the
//          previous period; with the alpha LIFO (read in reverse) and its own
//          branch metrics it feeds the LLR unit.
// Sub-block p is written into the input cache at the same time, into the
// places beta2 has just read. A second LIFO puts the LLRs back in forward
// order. Step k of the block is fetched at grid cycle k-1 (fetch_en,
// fetch_k; fetch_data one cycle later), and its LLR leaves as out_valid,
// out_k, out_llr, out_lex 4L+1 cycles after it was fetched, in increasing k.
// Steps from N up to the next multiple of L are padded with zero inputs,
// which leaves equal backward metrics at the block end: the final state is
// treated as unknown (the tail symbols are not used). The forward recursion
// starts in state 0. One run takes (ceil(N/L)+4)*L + 2 cycles; `done` pulses
// at its end.
// In Viterbi mode the 16 cells of the alpha and beta1 blocks are lent out
// through the acs_ext_* ports (see turbo_acs_block); the decoder must then be
// idle, as its recursions see foreign results.
// The schedule, the cache of three sub-blocks, the TMU/ACS/LLR split and the
// LIFOs follow the design; the padding and the fetch timing are this
// implementation's choices.
module map_decoder
  import dmcd_pkg::*;
#(
  parameter int L = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] blk_len,
  output logic              fetch_en,
  output logic [ADDR_W-1:0] fetch_k,
  input  cache_word_t       fetch_data,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_k,
  output logic signed [LOUT_W-1:0] out_llr,
  output ext_t              out_lex,
  output logic              busy,
  output logic              done,
  // ACS cells of the alpha and beta1 blocks lent out (cells 0-7: alpha,
  // 8-15: beta1) while acs_ext_en is high and the decoder is idle
  input  logic              acs_ext_en,
  input  vpm_t              acs_ext_pm0 [16],
  input  vpm_t              acs_ext_bm0 [16],
  input  vpm_t              acs_ext_pm1 [16],
  input  vpm_t              acs_ext_bm1 [16],
  output vpm_t              acs_ext_pm_out [16],
  output logic [15:0]       acs_ext_dec
);
  localparam int EW = $clog2(L);
  localparam int CW = ADDR_W + 1;

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_RUN} st_e;
  st_e st;

  logic [ADDR_W-1:0] n_len;
  logic [CW-1:0]     c, c1;
  logic [EW-1:0]     j, j1;
  logic [1:0]        ps;
  logic              run, run1;
  logic              stop;

  assign run  = (st == S_RUN) && !stop;
  assign stop = (j == '0) && (c >= CW'(n_len) + CW'(4 * L));

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; j <= '0; ps <= '0; n_len <= '0;
      run1 <= 1'b0; c1 <= '0; j1 <= '0;
    end else begin
      run1 <= run;
      c1   <= c;
      j1   <= j;
      unique case (st)
        S_IDLE: if (start) begin
          n_len <= blk_len;
          st    <= S_PRE;
        end
        S_PRE: begin
          st <= S_RUN; c <= '0; j <= '0; ps <= '0;
        end
        S_RUN: if (stop) begin
          st <= S_IDLE;
        end else begin
          c <= c + 1'b1;
          if (int'(j) == L - 1) begin
            j  <= '0;
            ps <= (ps == 2'd2) ? 2'd0 : ps + 2'd1;
          end else begin
            j <= j + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE) || run1;
  assign done = run1 && !run;

  // ---------------- fetch ----------------
  always_comb begin
    fetch_en = 1'b0;
    fetch_k  = '0;
    if (st == S_PRE) begin
      fetch_en = n_len != '0;
      fetch_k  = '0;
    end else if (run) begin
      fetch_en = (c + 1'b1) < CW'(n_len);
      fetch_k  = ADDR_W'(c + 1'b1);
    end
  end

  // ---------------- input cache ----------------
  logic [1:0]       rd_slot  [3];
  logic [EW-1:0]    rd_entry [3];
  logic [CACHE_W-1:0] rd_data [3];
  logic [EW-1:0]    jr;
  assign jr = EW'(L - 1 - int'(j));

  always_comb begin
    rd_slot[0]  = (ps == 2'd2) ? 2'd0 : ps + 2'd1;   // alpha : sub-block p-2
    rd_entry[0] = j;
    rd_slot[1]  = (ps == 2'd0) ? 2'd2 : ps - 2'd1;   // beta1 : sub-block p-1
    rd_entry[1] = jr;
    rd_slot[2]  = ps;                                // beta2 : sub-block p-3
    rd_entry[2] = jr;
  end

  input_cache #(.L(L)) u_cache (
    .clk, .rst_n,
    .rd_slot, .rd_entry, .rd_data,
    .wr_en   (run),
    .wr_slot (ps),
    .wr_entry(j),
    .wr_data ((c < CW'(n_len)) ? fetch_data : '0),
    .flip    (run && int'(j) == L - 1)
  );

  // ---------------- transition metrics ----------------
  cache_word_t cw [3];
  gam_t        gam [3][8];
  gam_t        sla [3];
  for (genvar r = 0; r < 3; r++) begin : g_tmu
    assign cw[r] = cache_word_t'(rd_data[r]);
    turbo_tmu u_tmu (.x(cw[r].x), .y0(cw[r].y0), .y1(cw[r].y1), .la(cw[r].la),
                     .gamma(gam[r]), .sla(sla[r]));
  end

  // ---------------- recursions ----------------
  tpm_t alpha_q [8], alpha_cur [8], alpha_nx [8];
  tpm_t beta1_q [8], beta1_cur [8], beta1_nx [8], beta1_save [8];
  tpm_t beta2_q [8], beta2_cur [8], beta2_nx [8];
  tpm_t alpha_rd [8];
  logic [8*TPM_W-1:0] alpha_push, alpha_pop;

  localparam tpm_t ALPHA_OTHER = tpm_t'(-128);   // -32.0 for states other than 0

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      alpha_cur[s] = (c1 == CW'(2 * L)) ? ((s == 0) ? '0 : ALPHA_OTHER) : alpha_q[s];
      beta1_cur[s] = (j1 == '0) ? '0 : beta1_q[s];
      beta2_cur[s] = (j1 == '0) ? beta1_save[s] : beta2_q[s];
      alpha_push[s*TPM_W +: TPM_W] = alpha_cur[s];
      alpha_rd[s] = alpha_pop[s*TPM_W +: TPM_W];
    end
  end

  turbo_acs_block #(.BACKWARD(1'b0)) u_acs_a (
    .pm_in(alpha_cur), .gamma(gam[0]), .pm_out(alpha_nx),
    .ext_en(acs_ext_en), .ext_pm0(acs_ext_pm0[0:7]), .ext_bm0(acs_ext_bm0[0:7]),
    .ext_pm1(acs_ext_pm1[0:7]), .ext_bm1(acs_ext_bm1[0:7]),
    .ext_pm_out(acs_ext_pm_out[0:7]), .ext_dec(acs_ext_dec[7:0]));
  turbo_acs_block #(.BACKWARD(1'b1)) u_acs_b1 (
    .pm_in(beta1_cur), .gamma(gam[1]), .pm_out(beta1_nx),
    .ext_en(acs_ext_en), .ext_pm0(acs_ext_pm0[8:15]), .ext_bm0(acs_ext_bm0[8:15]),
    .ext_pm1(acs_ext_pm1[8:15]), .ext_bm1(acs_ext_bm1[8:15]),
    .ext_pm_out(acs_ext_pm_out[8:15]), .ext_dec(acs_ext_dec[15:8]));
  // beta2's cells are not lent out
  vpm_t       b2_unused_pm [8];
  logic [7:0] b2_unused_dec;
  turbo_acs_block #(.BACKWARD(1'b1)) u_acs_b2 (
    .pm_in(beta2_cur), .gamma(gam[2]), .pm_out(beta2_nx),
    .ext_en(1'b0), .ext_pm0(acs_ext_pm0[0:7]), .ext_bm0(acs_ext_bm0[0:7]),
    .ext_pm1(acs_ext_pm1[0:7]), .ext_bm1(acs_ext_bm1[0:7]),
    .ext_pm_out(b2_unused_pm), .ext_dec(b2_unused_dec));

  always_ff @(posedge clk) begin
    if (run1) begin
      alpha_q <= alpha_nx;
      beta1_q <= beta1_nx;
      beta2_q <= beta2_nx;
      if (int'(j1) == L - 1) beta1_save <= beta1_nx;
    end
  end

  logic alpha_full, llr_full;
  lifo #(.DEPTH(L), .W(8 * TPM_W)) u_alpha_mem (
    .clk, .rst_n, .clr(st == S_PRE), .push(run1),
    .din(alpha_push), .dout(alpha_pop), .full(alpha_full));

  // ---------------- LLR ----------------
  logic signed [LOUT_W-1:0] llr_b;
  ext_t                     lex_b;
  llr_unit u_llr (.alpha(alpha_rd), .beta(beta2_cur), .gamma(gam[2]), .sla(sla[2]),
                  .llr(llr_b), .lex(lex_b));

  logic [LOUT_W+EXT_W-1:0] llr_pop;
  lifo #(.DEPTH(L), .W(LOUT_W + EXT_W)) u_llr_lifo (
    .clk, .rst_n, .clr(st == S_PRE), .push(run1),
    .din({llr_b, lex_b}), .dout(llr_pop), .full(llr_full));

  always_comb begin
    out_k     = ADDR_W'(c1 - CW'(4 * L));
    out_valid = run1 && (c1 >= CW'(4 * L)) && (c1 - CW'(4 * L) < CW'(n_len));
    out_llr   = llr_pop[EXT_W +: LOUT_W];
    out_lex   = ext_t'(llr_pop[EXT_W-1:0]);
  end

  logic unused;
  assign unused = alpha_full ^ llr_full;
endmodule
