// turbo_decoder -- iterative 3GPP2 turbo decoder built on one MAP decoder.
//
// A decoding iteration is split into two phases that use the same
// map_decoder. Phase 1 (first constituent decoder) reads the systematic
// value x[k], the parities y0[k], y1[k] and the a-priori value Le[k] in
// natural order and writes its extrinsic output back to Le[k]. Phase 2
// (second constituent decoder) reads x[pi(k)], y0'[k], y1'[k] and Le[pi(k)]
// and writes its extrinsic output to Le[pi(k)]; since every location is read
// before it is rewritten, one extrinsic memory serves as interleaver and
// de-interleaver. Two memories of MAX_N words hold the systematic values
// (filled during the first phase) and the extrinsic values; the parities
// are read from the symbol buffer outside the decoder at every phase.
// Interleaved addresses come from two on-the-fly generators, one for the
// read side and one, a block later, for the write side.
//
// The ACS cells of the alpha and beta1 recursions can be lent to the Viterbi
// decoder through acs_ext_* (see map_decoder) while this decoder is idle.
//
// Interface: pulse `start` with blk_len (a block size of the standard).
// The decoder reads the received block through sym_rd_* (5 LLRs per step:
// x, y0, y1, y0', y1' in 3.3 format, data one cycle after the request).
// After ITER iterations the hard decisions of the second phase leave as
// dec_valid / dec_addr / dec_bit (natural-order address, bit = LLR > 0), then
// `done` pulses. Each phase takes about (ceil(N/L)+4)*L cycles, so a block
// takes about 2*ITER*(N+4L) cycles at one trellis step per cycle.
module turbo_decoder
  import dmcd_pkg::*;
#(
  parameter int MAX_N = 20730,
  parameter int ITER  = 6,
  parameter int L     = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] blk_len,
  output logic              sym_rd_en,
  output logic [ADDR_W-1:0] sym_rd_addr,
  input  llr_t              sym_rd_data [5],
  output logic              dec_valid,
  output logic [ADDR_W-1:0] dec_addr,
  output logic              dec_bit,
  output logic [3:0]        iter_no,
  output logic              phase2,
  output logic              busy,
  output logic              done,
  output logic              il_dup,     // duplicated interleaver address used
  // 16 ACS cells lent to the Viterbi decoder while the turbo decoder is idle
  input  logic              acs_ext_en,
  input  vpm_t              acs_ext_pm0 [16],
  input  vpm_t              acs_ext_bm0 [16],
  input  vpm_t              acs_ext_pm1 [16],
  input  vpm_t              acs_ext_bm1 [16],
  output vpm_t              acs_ext_pm_out [16],
  output logic [15:0]       acs_ext_dec
);
  localparam int MW = $clog2(MAX_N);

  typedef enum logic [1:0] {T_IDLE, T_LAUNCH, T_WAIT} tst_e;
  tst_e st;
  logic [ADDR_W-1:0] n_len;
  logic [3:0]        iter;
  logic              ph;
  logic              first, last;

  assign first   = (iter == '0) && !ph;
  assign last    = (int'(iter) == ITER - 1) && ph;
  assign iter_no = iter;
  assign phase2  = ph;

  logic map_start, map_busy, map_done;
  logic fetch_en;
  logic [ADDR_W-1:0] fetch_k;
  cache_word_t fetch_data;
  logic out_valid;
  logic [ADDR_W-1:0] out_k;
  logic signed [LOUT_W-1:0] out_llr;
  ext_t out_lex;

  assign map_start = (st == T_LAUNCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; n_len <= '0; iter <= '0; ph <= 1'b0;
    end else begin
      unique case (st)
        T_IDLE: if (start) begin
          n_len <= blk_len; iter <= '0; ph <= 1'b0; st <= T_LAUNCH;
        end
        T_LAUNCH: st <= T_WAIT;
        T_WAIT: if (map_done) begin
          if (last) st <= T_IDLE;
          else begin
            if (ph) iter <= iter + 1'b1;
            ph <= !ph;
            st <= T_LAUNCH;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  assign busy = (st != T_IDLE);
  assign done = (st == T_WAIT) && map_done && last;

  // ---------------- interleaver address generators ----------------
  logic [ADDR_W-1:0] il_rd_addr, il_wr_addr;
  logic              dup_r, dup_w;
  turbo_interleaver u_il_rd (
    .clk, .rst_n, .init(st == T_LAUNCH), .blk_len(n_len),
    .adv(fetch_en && ph), .addr(il_rd_addr), .dup_used(dup_r));
  turbo_interleaver u_il_wr (
    .clk, .rst_n, .init(st == T_LAUNCH), .blk_len(n_len),
    .adv(out_valid && ph), .addr(il_wr_addr), .dup_used(dup_w));
  assign il_dup = (fetch_en && ph && dup_r) || (out_valid && ph && dup_w);

  // ---------------- MAP decoder ----------------
  map_decoder #(.L(L)) u_map (
    .clk, .rst_n, .start(map_start), .blk_len(n_len),
    .fetch_en, .fetch_k, .fetch_data,
    .out_valid, .out_k, .out_llr, .out_lex,
    .busy(map_busy), .done(map_done),
    .acs_ext_en, .acs_ext_pm0, .acs_ext_bm0, .acs_ext_pm1, .acs_ext_bm1,
    .acs_ext_pm_out, .acs_ext_dec);

  // ---------------- fetch side ----------------
  logic [ADDR_W-1:0] rd_addr;
  logic [ADDR_W-1:0] fetch_k_q;
  logic              fetch_q;
  logic [EXT_W-1:0]  sys_q, ext_q;
  assign rd_addr     = ph ? il_rd_addr : fetch_k;
  assign sym_rd_en   = fetch_en;
  assign sym_rd_addr = fetch_k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_q <= 1'b0; fetch_k_q <= '0;
    end else begin
      fetch_q <= fetch_en; fetch_k_q <= fetch_k;
    end
  end

  sram_1r1w #(.DEPTH(MAX_N), .W(LLR_W)) u_sys_mem (
    .clk, .rd_en(fetch_en && !first), .rd_addr(MW'(rd_addr)), .rd_data(sys_q),
    .wr_en(fetch_q && first), .wr_addr(MW'(fetch_k_q)), .wr_data(sym_rd_data[0]));

  always_comb begin
    fetch_data.x  = first ? sym_rd_data[0] : llr_t'(sys_q);
    fetch_data.y0 = ph ? sym_rd_data[3] : sym_rd_data[1];
    fetch_data.y1 = ph ? sym_rd_data[4] : sym_rd_data[2];
    fetch_data.la = first ? '0 : ext_t'(ext_q);
  end

  // ---------------- write-back side ----------------
  logic [ADDR_W-1:0] wb_addr;
  assign wb_addr = ph ? il_wr_addr : out_k;

  sram_1r1w #(.DEPTH(MAX_N), .W(EXT_W)) u_ext_mem (
    .clk, .rd_en(fetch_en), .rd_addr(MW'(rd_addr)), .rd_data(ext_q),
    .wr_en(out_valid), .wr_addr(MW'(wb_addr)), .wr_data(out_lex));

  assign dec_valid = out_valid && last;
  assign dec_addr  = wb_addr;
  assign dec_bit   = out_llr > 0;

  logic unused;
  assign unused = map_busy ^ fetch_q;
endmodule
