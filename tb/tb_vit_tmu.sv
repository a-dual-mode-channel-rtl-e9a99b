// tb_vit_tmu -- checks all 32 branch metrics of every cycle at every rate
// against a reference encoder step built from the octal generators of the
// standard and the distance |r - 15*c| summed over the code symbols.
module tb_vit_tmu;
  import dmcd_pkg::*;
  vit_rate_e rate;
  logic [3:0] grp;
  soft_t sym [NV];
  logic [BM_W-1:0] bm [16][2];
  vit_tmu dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gen(input int r, input int v);
    int g [4][6] = '{'{'o753, 'o561, 0, 0, 0, 0},
                     '{'o557, 'o663, 'o711, 0, 0, 0},
                     '{'o765, 'o671, 'o513, 'o473, 0, 0},
                     '{'o457, 'o755, 'o511, 'o637, 'o625, 'o727}};
    return g[r][v];
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      int r, nout;
      r = t % 4;
      nout = (r == 0) ? 2 : (r == 1) ? 3 : (r == 2) ? 4 : 6;
      rate = vit_rate_e'(r);
      for (int v = 0; v < NV; v++) sym[v] = soft_t'($urandom);
      for (int gi = 0; gi < 16; gi++) begin
        grp = 4'(gi);
        #1;
        for (int i = 0; i < 16; i++)
          for (int b = 0; b < 2; b++) begin
            int ns, p, u, reg9, e;
            ns = gi * 16 + i;
            p = ((ns << 1) & 255) | b;       // predecessor state
            u = ns >> 7;                     // input bit of the branch
            reg9 = (u << 8) | p;
            e = 0;
            for (int v = 0; v < nout; v++)
              e += ($countones(gen(r, v) & reg9) % 2) ? 15 - int'(sym[v]) : int'(sym[v]);
            checks++;
            if (int'(bm[i][b]) != e) failures++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
