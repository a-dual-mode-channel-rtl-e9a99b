// tb_dual_mode_decoder -- end-to-end test of the whole decoder at its default
// sizes (blocks up to 20,730 bits, 6 iterations, L = 20, trace-back 48).
// Runs a noisy turbo block of the largest size, switches to Viterbi mode for
// a rate-1/6 frame, back to turbo mode for the smallest block, and to Viterbi
// mode again at rate 1/2. Every decoded bit is compared with the sent data,
// the turbo block time with (ceil(N/20)+4)*20+3 cycles per phase and the
// Viterbi step spacing with 19 cycles. It also counts how often the design's
// mechanisms were used: mode switches, the duplicated interleaver address,
// extrinsic clipping, wrap-around of modulo-normalised path metrics (turbo and
// Viterbi), the 6 second-phase runs of a turbo block and the turbo core's ACS
// cells working for the Viterbi decoder, and the clock of each core stopped by
// its clock gate; each must occur.
module tb_dual_mode_decoder;
  import dmcd_pkg::*;
  import turbo_ref_pkg::*;

  localparam int MAXN = 20730;
  localparam int TL   = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  dec_mode_e mode = MODE_TURBO;
  logic t_start = 0;
  logic [ADDR_W-1:0] t_blk_len = '0;
  logic t_sym_rd_en; logic [ADDR_W-1:0] t_sym_rd_addr;
  llr_t t_sym_rd_data [5];
  logic t_dec_valid, t_dec_bit, t_phase2, t_busy, t_done, t_il_dup;
  logic [ADDR_W-1:0] t_dec_addr;
  logic [3:0] t_iter;
  logic v_start = 0;
  vit_rate_e v_rate = RATE_1_2;
  logic v_sym_valid = 0, v_sym_ready;
  soft_t v_sym [NV];
  logic v_out_valid, v_out_bit;

  dual_mode_decoder dut (.*);

  llr_t sym [MAXN][5];
  always_ff @(posedge clk) if (t_sym_rd_en) t_sym_rd_data <= sym[t_sym_rd_addr];

  int checks = 0, failures = 0;
  bit dec [MAXN];
  int dec_cnt [MAXN];
  bit vgot [$];
  int n_mode_sw = 0, n_dup = 0, n_clip = 0, n_awrap = 0, n_vwrap = 0, n_phase = 0, n_lent = 0,
      n_tstop = 0, n_vstop = 0;
  logic a_msb_q = 0, v_msb_q = 0, ph_q = 0;
  dec_mode_e mode_q = MODE_TURBO;

  always @(posedge clk) begin
    if (t_dec_valid) begin dec[t_dec_addr] = t_dec_bit; dec_cnt[t_dec_addr]++; end
    if (v_out_valid) vgot.push_back(v_out_bit);
    if (t_il_dup) n_dup++;
    if (mode != mode_q) n_mode_sw++;
    mode_q = mode;
    if (dut.u_turbo.u_map.run1 && (dut.u_turbo.u_map.u_llr.e_full > 31 ||
                                   dut.u_turbo.u_map.u_llr.e_full < -32)) n_clip++;
    if (dut.u_turbo.u_map.run1) begin
      if (a_msb_q && !dut.u_turbo.u_map.alpha_q[0][TPM_W-1]) n_awrap++;
      a_msb_q = dut.u_turbo.u_map.alpha_q[0][TPM_W-1];
    end
    if (v_msb_q && !dut.u_viterbi.pm[0][0][VPM_W-1]) n_vwrap++;
    v_msb_q = dut.u_viterbi.pm[0][0][VPM_W-1];
    if (dut.u_turbo.u_map.acs_ext_en && dut.u_viterbi.act && dut.u_viterbi.cyc < 5'd16) n_lent++;
    if (t_busy && t_phase2 && !ph_q) n_phase++;
    ph_q = t_phase2;
  end
  always @(posedge clk) begin
    #1;   // just after the rising edge: a stopped core's clock is still low
    if (!dut.clk_t) n_tstop++;
    if (!dut.clk_v) n_vstop++;
  end

  task automatic turbo_block(input int n, input int sigma_x8);
    bit u[], up[], y0[], y1[], y0p[], y1p[];
    int pi_seq[];
    int raw_err, err, cnt_err, cyc, expect_cyc, ph0;
    il_sequence(n, pi_seq);
    u = new[n]; up = new[n];
    foreach (u[k]) u[k] = 1'($urandom);
    foreach (up[k]) up[k] = u[pi_seq[k]];
    rsc_encode(u, y0, y1);
    rsc_encode(up, y0p, y1p);
    raw_err = 0;
    for (int k = 0; k < n; k++) begin
      sym[k][0] = chan(u[k], 8, sigma_x8);
      sym[k][1] = chan(y0[k], 8, sigma_x8);
      sym[k][2] = chan(y1[k], 8, sigma_x8);
      sym[k][3] = chan(y0p[k], 8, sigma_x8);
      sym[k][4] = chan(y1p[k], 8, sigma_x8);
      if ((sym[k][0] > 0) != u[k]) raw_err++;
      dec_cnt[k] = 0;
    end
    ph0 = n_phase;
    @(negedge clk); t_blk_len = ADDR_W'(n); t_start = 1;
    @(negedge clk); t_start = 0;
    cyc = 1;
    while (!t_done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    err = 0; cnt_err = 0;
    for (int k = 0; k < n; k++) begin
      if (dec[k] != u[k]) err++;
      if (dec_cnt[k] != 1) cnt_err++;
    end
    expect_cyc = 12 * (((n + 19) / 20 + 4) * 20 + 3);
    $display("turbo N=%0d: raw errors %0d, decoded errors %0d, cycles %0d (expected %0d), %.2f cycles/bit",
             n, raw_err, err, cyc, expect_cyc, real'(cyc) / n);
    checks++; if (err != 0) begin failures++; $display("FAIL: turbo bit errors"); end
    checks++; if (cnt_err != 0) begin failures++; $display("FAIL: turbo addresses not decided once"); end
    checks++; if (cyc != expect_cyc) begin failures++; $display("FAIL: turbo cycle count"); end
    checks++; if (raw_err == 0) begin failures++; $display("FAIL: channel made no errors"); end
    checks++; if (n_phase - ph0 != 6) begin failures++; $display("FAIL: %0d phase changes", n_phase - ph0); end
  endtask

  function automatic bit [8:0] gen(input int r, input int v);
    int g [4][6] = '{'{'o753, 'o561, 0, 0, 0, 0},
                     '{'o557, 'o663, 'o711, 0, 0, 0},
                     '{'o765, 'o671, 'o513, 'o473, 0, 0},
                     '{'o457, 'o755, 'o511, 'o637, 'o625, 'o727}};
    return 9'(g[r][v]);
  endfunction

  task automatic vit_frame(input int r, input int nbits, input int noise);
    int nout, raw_err, err, gap_err, cyc, last_acc;
    bit u [];
    bit [8:0] sr;
    nout = (r == 0) ? 2 : (r == 1) ? 3 : (r == 2) ? 4 : 6;
    u = new[nbits + 3 * TL + 8];
    foreach (u[k]) u[k] = (k < nbits) ? 1'($urandom) : 1'b0;
    vgot.delete();
    @(negedge clk); v_rate = vit_rate_e'(r); v_start = 1;
    @(negedge clk); v_start = 0;
    sr = '0; raw_err = 0; gap_err = 0; cyc = 0; last_acc = -1;
    foreach (u[k]) begin
      sr = {u[k], sr[8:1]};
      for (int v = 0; v < NV; v++) begin
        int s;
        bit cbit;
        cbit = (v < nout) ? ^(gen(r, v) & sr) : 1'b0;
        s = (cbit ? 15 : 0) + int'($urandom_range(0, 2 * noise)) - noise;
        if (s < 0) s = 0;
        if (s > 15) s = 15;
        if (v < nout && ((s >= 8) != cbit)) raw_err++;
        v_sym[v] = soft_t'(s);
      end
      v_sym_valid = 1;
      @(posedge clk);
      while (!v_sym_ready) begin @(posedge clk); cyc++; end
      cyc++;
      if (last_acc >= 0 && k > 1 && cyc - last_acc != 19) gap_err++;
      last_acc = cyc;
      @(negedge clk);
    end
    v_sym_valid = 0;
    repeat (40) @(negedge clk);
    err = 0;
    for (int k = 0; k < nbits; k++) if (k >= vgot.size() || vgot[k] != u[k]) err++;
    $display("viterbi rate idx %0d: %0d bits, raw errors %0d, decoded errors %0d, gap errors %0d",
             r, nbits, raw_err, err, gap_err);
    checks++; if (err != 0) begin failures++; $display("FAIL: viterbi bit errors"); end
    checks++; if (gap_err != 0) begin failures++; $display("FAIL: viterbi step spacing"); end
    checks++; if (raw_err == 0) begin failures++; $display("FAIL: channel made no errors"); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NV; v++) v_sym[v] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    turbo_block(20730, 6);
    mode = MODE_VITERBI;
    vit_frame(3, 500, 11);
    mode = MODE_TURBO;
    turbo_block(378, 6);
    mode = MODE_VITERBI;
    vit_frame(0, 300, 8);
    $display("mechanisms: mode switches %0d, duplicated interleaver address %0d, extrinsic clipping %0d, alpha wrap %0d, Viterbi metric wrap %0d, phase-2 starts %0d, ACS cycles lent to Viterbi %0d, cycles with the turbo clock stopped %0d, with the Viterbi clock stopped %0d",
             n_mode_sw, n_dup, n_clip, n_awrap, n_vwrap, n_phase, n_lent, n_tstop, n_vstop);
    checks++; if (n_mode_sw < 3) failures++;
    checks++; if (n_dup == 0) failures++;
    checks++; if (n_clip == 0) failures++;
    checks++; if (n_awrap == 0) failures++;
    checks++; if (n_vwrap == 0) failures++;
    checks++; if (n_lent == 0) failures++;
    checks++; if (n_tstop == 0) failures++;
    checks++; if (n_vstop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
