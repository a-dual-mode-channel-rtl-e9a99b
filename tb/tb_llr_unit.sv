// tb_llr_unit -- checks the LLR unit against a reference that evaluates
// max over u=1 minus max over u=0 of alpha(s)+gamma(s,u)+beta(next(s,u))
// with unwrapped integers, then saturates L to 10 bits and L-(x+La) to the
// 4.2 extrinsic range. The metric sets carry random offsets so that they wrap.
module tb_llr_unit;
  import dmcd_pkg::*;
  tpm_t alpha [8], beta [8];
  gam_t gamma [8];
  gam_t sla;
  logic signed [LOUT_W-1:0] llr;
  ext_t lex;
  llr_unit dut (.*);

  int checks = 0, failures = 0, clipped = 0;
  logic clk = 0;
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v, input int w);
    if (v > (1 << (w - 1)) - 1) return (1 << (w - 1)) - 1;
    if (v < -(1 << (w - 1))) return -(1 << (w - 1));
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ab, bb, a [8], b [8], g [8], mx [2], l, e, sl;
      ab = int'($urandom_range(0, 511));
      bb = int'($urandom_range(0, 511));
      for (int s = 0; s < 8; s++) begin
        a[s] = int'($urandom_range(0, 120)) - 60;
        b[s] = int'($urandom_range(0, 120)) - 60;
        g[s] = int'($urandom_range(0, 80)) - 40;
        alpha[s] = tpm_t'(ab + a[s]);
        beta[s]  = tpm_t'(bb + b[s]);
        gamma[s] = gam_t'(g[s]);
      end
      sl = int'($urandom_range(0, 80)) - 40;
      sla = gam_t'(sl);
      mx[0] = -100000; mx[1] = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int s1, s2, s3, aa, y0, y1, ns, v;
          s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
          aa = u ^ s2 ^ s3; y0 = aa ^ s1 ^ s3; y1 = aa ^ s1 ^ s2 ^ s3;
          ns = (aa << 2) | (s1 << 1) | s2;
          v = a[s] + g[(u << 2) | (y0 << 1) | y1] + b[ns];
          if (v > mx[u]) mx[u] = v;
        end
      l = mx[1] - mx[0];
      e = l - sl;
      if (e > 31 || e < -32) clipped++;
      #1;
      checks += 2;
      if (int'(llr) != sat(l, LOUT_W)) failures++;
      if (int'(lex) != sat(e, EXT_W)) begin
        failures++;
        if (failures < 5) $display("FAIL lex %0d exp %0d", lex, sat(e, EXT_W));
      end
    end
    checks++; if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
