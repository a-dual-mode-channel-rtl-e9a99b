// viterbi_decoder -- 256-state soft-decision Viterbi decoder for the 3GPP2
// convolutional codes (constraint length 9, rates 1/2, 1/3, 1/4, 1/6).
//
// Sixteen dual-mode ACS units (min mode) update the 256 path metrics of a
// trellis step in 16 cycles, 16 states per cycle; vit_tmu supplies the 32
// branch metrics of each cycle. Path metrics are 11-bit modulo-normalised
// numbers kept in two banks (read one, write the other, swap per step).
// While the new metrics are produced, the path metric unit (PMU) keeps the
// state with the smallest one, which starts the next trace-back. The 16
// decision bits of each cycle go to vit_smu, which uses three more cycles
// per step for its trace-back and decode pointers: one decoded bit every 19
// cycles.
//
// Interface: pulse `start` with `rate` to clear the decoder (all paths start
// in state 0). Then present one trellis step per sym_valid/sym_ready
// handshake: sym[v] are the 4-bit soft values of the code symbols (0 = sure
// '0', 15 = sure '1'; entries beyond the rate's symbol count are ignored).
// Decoded bits leave in order on out_valid/out_bit, 3L steps after their
// own step entered (the decoder runs continuously; to flush the last bits
// send 3L more steps of all-zero code symbols). The 16 ACS units, 19-cycle
// step and bit widths follow the design; the two-bank path metric store is
// this implementation's choice.
//
// With EXT_ACS = 0 the module has its own 16 ACS cells. With EXT_ACS = 1, as
// in dual_mode_decoder, it presents the 16 operand sets on acs_pm0/bm0/pm1/
// bm1 and takes the survivors and decisions from acs_pm_out/acs_dec in the
// same cycle: the cells of the turbo decoder's alpha and beta1 blocks do the
// work, as in the chip. Branch metrics reach the 11-bit cells zero-extended from
// 7 bits, so the upper four bits of acs_bm0/acs_bm1 are always zero.
module viterbi_decoder
  import dmcd_pkg::*;
#(
  parameter int TL      = 48,
  parameter bit EXT_ACS = 1'b0   // 1: use the ACS cells behind acs_*
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  vit_rate_e  rate,
  input  logic       sym_valid,
  output logic       sym_ready,
  input  soft_t      sym [NV],
  output logic       out_valid,
  output logic       out_bit,
  // operands for, and results from, 16 ACS cells outside this module
  // (used when EXT_ACS = 1)
  output vpm_t       acs_pm0 [16],
  output vpm_t       acs_bm0 [16],
  output vpm_t       acs_pm1 [16],
  output vpm_t       acs_bm1 [16],
  input  vpm_t       acs_pm_out [16],
  input  logic [15:0] acs_dec
);
  localparam vpm_t PM_OTHER = vpm_t'(400);

  vit_rate_e rate_q;
  soft_t     sym_q [NV];
  logic      act;
  logic [4:0] cyc;
  logic      b;
  vpm_t      pm [2][256];

  assign sym_ready = !act || (cyc == 5'd18);

  // ---------------- branch metrics and ACS ----------------
  logic [BM_W-1:0] bm [16][2];
  vit_tmu u_tmu (.rate(rate_q), .grp(cyc[3:0]), .sym(sym_q), .bm);

  vpm_t        pm_new [16];
  logic [15:0] dec;
  for (genvar i = 0; i < 16; i++) begin : g_acs
    logic [7:0] p0;
    assign p0 = {cyc[2:0], 4'(i), 1'b0};
    assign acs_pm0[i] = pm[b][p0];
    assign acs_bm0[i] = VPM_W'(bm[i][0]);
    assign acs_pm1[i] = pm[b][p0 | 8'd1];
    assign acs_bm1[i] = VPM_W'(bm[i][1]);
    if (EXT_ACS) begin : g_ext
      assign pm_new[i] = acs_pm_out[i];
      assign dec[i]    = acs_dec[i];
    end else begin : g_own
      acs_unit #(.W(VPM_W)) u_acs (
        .mode_min(1'b1),
        .pm0(acs_pm0[i]), .bm0(acs_bm0[i]), .pm1(acs_pm1[i]), .bm1(acs_bm1[i]),
        .pm_out(pm_new[i]), .dec(dec[i]));
    end
  end

  // ---------------- path metric unit: best state ----------------
  vpm_t       grp_best_pm, best_pm;
  logic [7:0] grp_best_st, best_st;
  always_comb begin
    vpm_t d;
    grp_best_pm = pm_new[0];
    grp_best_st = {cyc[3:0], 4'd0};
    for (int i = 1; i < 16; i++) begin
      d = pm_new[i] - grp_best_pm;
      if (d[VPM_W-1]) begin
        grp_best_pm = pm_new[i];
        grp_best_st = {cyc[3:0], 4'(i)};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0; cyc <= '0; b <= 1'b0; rate_q <= RATE_1_2;
      best_pm <= '0; best_st <= '0;
      for (int s = 0; s < 256; s++) begin pm[0][s] <= '0; pm[1][s] <= '0; end
      for (int v = 0; v < NV; v++) sym_q[v] <= '0;
    end else if (start) begin
      act <= 1'b0; cyc <= '0; b <= 1'b0; rate_q <= rate;
      for (int s = 0; s < 256; s++) pm[0][s] <= (s == 0) ? '0 : PM_OTHER;
    end else begin
      if (sym_valid && sym_ready) begin
        sym_q <= sym;
        act   <= 1'b1;
        cyc   <= '0;
      end else if (act) begin
        if (cyc == 5'd18) act <= 1'b0;
        else cyc <= cyc + 1'b1;
      end
      if (act && cyc < 5'd16) begin
        for (int i = 0; i < 16; i++) pm[!b][{cyc[3:0], 4'(i)}] <= pm_new[i];
        if (cyc == 5'd0) begin
          best_pm <= grp_best_pm; best_st <= grp_best_st;
        end else begin
          vpm_t d;
          d = grp_best_pm - best_pm;
          if (d[VPM_W-1]) begin best_pm <= grp_best_pm; best_st <= grp_best_st; end
        end
        if (cyc == 5'd15) b <= !b;
      end
    end
  end

  // ---------------- survivor memory ----------------
  vit_smu #(.TL(TL)) u_smu (
    .clk, .rst_n, .clr(start), .cyc, .act, .wr_word(dec),
    .best_state(best_st), .out_valid, .out_bit);
endmodule
