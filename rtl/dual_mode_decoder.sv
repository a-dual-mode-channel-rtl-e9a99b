// dual_mode_decoder -- dual-mode turbo / Viterbi channel decoder for 3GPP2.
//
// One chip decodes either the rate-1/5 turbo code (blocks of 378 to 20,730
// bits, ITER iterations of a sliding-window Max-Log-MAP decoder) or the
// constraint-length-9 convolutional codes of rates 1/2, 1/3, 1/4 and 1/6
// (256-state Viterbi decoder, one bit every 19 cycles). `mode` selects the
// core. Each core runs on its own gated clock (clock_gate), so the unused
// one is stopped, as in the chip; it also receives no start or data. The 24 dual-mode ACS cells
// (max for turbo, min for Viterbi) sit in the turbo core; in Viterbi mode 16
// of them, those of the alpha and beta1 recursions, do the Viterbi decoder's
// add-compare-select work, while the turbo core is idle.
//
// Turbo port: pulse t_start with t_blk_len; the decoder reads the received
// LLRs (x, y0, y1, y0', y1', 3.3 format) through t_sym_rd_* with one cycle of
// latency and returns hard decisions on t_dec_* (natural-order address),
// then pulses t_done. Viterbi port: pulse v_start with v_rate, then one
// trellis step of 4-bit soft symbols per v_sym_valid/v_sym_ready handshake;
// decoded bits leave on v_out_valid/v_out_bit. Change `mode` only while the
// turbo core is idle, and set it at least one cycle before the start pulse
// of the core it selects (the clock gate opens one cycle after `mode`); an
// assertion checks the first rule. Its reset condition is the
// one synchronous use of rst_n (a lint tool may report rst_n as used both
// synchronously and asynchronously; no flip-flop depends on it that way).
module dual_mode_decoder
  import dmcd_pkg::*;
#(
  parameter int MAX_N = 20730,
  parameter int ITER  = 6,
  parameter int L     = 20,
  parameter int TL    = 48
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dec_mode_e         mode,
  // turbo mode
  input  logic              t_start,
  input  logic [ADDR_W-1:0] t_blk_len,
  output logic              t_sym_rd_en,
  output logic [ADDR_W-1:0] t_sym_rd_addr,
  input  llr_t              t_sym_rd_data [5],
  output logic              t_dec_valid,
  output logic [ADDR_W-1:0] t_dec_addr,
  output logic              t_dec_bit,
  output logic [3:0]        t_iter,
  output logic              t_phase2,
  output logic              t_busy,
  output logic              t_done,
  output logic              t_il_dup,
  // Viterbi mode
  input  logic              v_start,
  input  vit_rate_e         v_rate,
  input  logic              v_sym_valid,
  output logic              v_sym_ready,
  input  soft_t             v_sym [NV],
  output logic              v_out_valid,
  output logic              v_out_bit
);
  logic turbo_sel, vit_sel;
  assign turbo_sel = (mode == MODE_TURBO);
  assign vit_sel   = (mode == MODE_VITERBI);

  // the Viterbi core's 16 ACS operations run on the cells of the turbo
  // core's alpha and beta1 blocks
  vpm_t        acs_pm0 [16], acs_bm0 [16], acs_pm1 [16], acs_bm1 [16];
  vpm_t        acs_pm_out [16];
  logic [15:0] acs_dec;

  // each core runs on its own gated clock: the unused one is stopped
  logic clk_t, clk_v;
  clock_gate u_cg_turbo   (.clk, .en(turbo_sel), .gclk(clk_t));
  clock_gate u_cg_viterbi (.clk, .en(vit_sel),   .gclk(clk_v));

  turbo_decoder #(.MAX_N(MAX_N), .ITER(ITER), .L(L)) u_turbo (
    .clk(clk_t), .rst_n,
    .start(t_start && turbo_sel), .blk_len(t_blk_len),
    .sym_rd_en(t_sym_rd_en), .sym_rd_addr(t_sym_rd_addr), .sym_rd_data(t_sym_rd_data),
    .dec_valid(t_dec_valid), .dec_addr(t_dec_addr), .dec_bit(t_dec_bit),
    .iter_no(t_iter), .phase2(t_phase2), .busy(t_busy), .done(t_done), .il_dup(t_il_dup),
    .acs_ext_en(vit_sel), .acs_ext_pm0(acs_pm0), .acs_ext_bm0(acs_bm0),
    .acs_ext_pm1(acs_pm1), .acs_ext_bm1(acs_bm1),
    .acs_ext_pm_out(acs_pm_out), .acs_ext_dec(acs_dec));

  logic v_ready_core, v_valid_core;
  viterbi_decoder #(.TL(TL), .EXT_ACS(1'b1)) u_viterbi (
    .clk(clk_v), .rst_n,
    .start(v_start && vit_sel), .rate(v_rate),
    .sym_valid(v_sym_valid && vit_sel), .sym_ready(v_ready_core), .sym(v_sym),
    .out_valid(v_valid_core), .out_bit(v_out_bit),
    .acs_pm0, .acs_bm0, .acs_pm1, .acs_bm1, .acs_pm_out, .acs_dec);
  assign v_sym_ready = v_ready_core && vit_sel;
  assign v_out_valid = v_valid_core && vit_sel;

  // the mode may change only while the turbo core is idle
  logic mode_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mode_q <= 1'b0;
    else        mode_q <= mode;
  mode_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  t_busy |-> (mode == dec_mode_e'(mode_q)))
    else $error("mode changed while the turbo decoder was busy");
endmodule
