// tb_turbo_acs_block -- checks one forward and one backward trellis step of
// the 8-state code against a reference written from the encoder equations
// (feedback a = u^s2^s3, y0 = a^s1^s3, y1 = a^s1^s2^s3, next = {a,s1,s2}),
// with metrics placed around random offsets so that they wrap. It then lends
// the cells of the forward block to an outside user (ext_en = 1) and checks
// that each one returns the smaller of its two 11-bit modulo sums and the
// matching decision bit, and that the turbo outputs come back afterwards.
module tb_turbo_acs_block;
  import dmcd_pkg::*;
  tpm_t pm_in [8], fw_out [8], bw_out [8];
  gam_t gamma [8];
  logic ext_en = 1'b0;
  vpm_t ext_pm0 [8], ext_bm0 [8], ext_pm1 [8], ext_bm1 [8], ext_pm_out [8], unused_pm [8];
  logic [7:0] ext_dec, unused_dec;
  turbo_acs_block #(.BACKWARD(1'b0)) dut_f (.pm_in, .gamma, .pm_out(fw_out),
    .ext_en, .ext_pm0, .ext_bm0, .ext_pm1, .ext_bm1, .ext_pm_out, .ext_dec);
  turbo_acs_block #(.BACKWARD(1'b1)) dut_b (.pm_in, .gamma, .pm_out(bw_out),
    .ext_en(1'b0), .ext_pm0, .ext_bm0, .ext_pm1, .ext_bm1,
    .ext_pm_out(unused_pm), .ext_dec(unused_dec));

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int base, m [8], g [8], ef [8], eb [8];
      base = int'($urandom_range(0, 511));
      for (int s = 0; s < 8; s++) begin
        m[s] = base + int'($urandom_range(0, 100));
        pm_in[s] = tpm_t'(m[s]);
        g[s] = int'($urandom_range(0, 60)) - 30;
        gamma[s] = gam_t'(g[s]);
      end
      for (int s = 0; s < 8; s++) begin ef[s] = -100000; eb[s] = -100000; end
      for (int s = 0; s < 8; s++) begin
        for (int u = 0; u < 2; u++) begin
          int s1, s2, s3, a, y0, y1, ns, v;
          s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
          a = u ^ s2 ^ s3; y0 = a ^ s1 ^ s3; y1 = a ^ s1 ^ s2 ^ s3;
          ns = (a << 2) | (s1 << 1) | s2;
          v = m[s] + g[(u << 2) | (y0 << 1) | y1];
          if (v > ef[ns]) ef[ns] = v;
          v = m[ns] + g[(u << 2) | (y0 << 1) | y1];
          if (v > eb[s]) eb[s] = v;
        end
      end
      #1;
      for (int s = 0; s < 8; s++) begin
        checks += 2;
        if (fw_out[s] !== tpm_t'(ef[s])) failures++;
        if (bw_out[s] !== tpm_t'(eb[s])) failures++;
      end
    end
    // lent to the Viterbi decoder: min selection on 11-bit modulo metrics
    ext_en = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int base, a0, a1, s0, s1;
      base = int'($urandom_range(0, 2047));
      for (int c = 0; c < 8; c++) begin
        a0 = base + int'($urandom_range(0, 700));
        a1 = base + int'($urandom_range(0, 700));
        ext_pm0[c] = vpm_t'(a0); ext_pm1[c] = vpm_t'(a1);
        ext_bm0[c] = vpm_t'($urandom_range(0, 90)); ext_bm1[c] = vpm_t'($urandom_range(0, 90));
      end
      #1;
      for (int c = 0; c < 8; c++) begin
        s0 = int'(ext_pm0[c]) + int'(ext_bm0[c]);
        s1 = int'(ext_pm1[c]) + int'(ext_bm1[c]);
        // compare without wrap: both sums relative to base
        s0 = ((s0 - base) % 2048 + 2048) % 2048;
        s1 = ((s1 - base) % 2048 + 2048) % 2048;
        checks += 2;
        if (ext_dec[c] !== (s1 < s0)) failures++;
        if (ext_pm_out[c] !== vpm_t'(((s1 < s0) ? s1 : s0) + base)) failures++;
      end
    end
    ext_en = 1'b0;
    #1;
    checks++;
    if (fw_out[0] !== dut_f.g_state[0].pa + dut_f.g_state[0].ba &&
        fw_out[0] !== dut_f.g_state[0].pb + dut_f.g_state[0].bb) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
