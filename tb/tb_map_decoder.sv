// tb_map_decoder -- runs the sliding-window MAP decoder on constituent-code
// blocks whose systematic values are erased (set to 0) at about one position
// in four, so that those bits can only be recovered from the parities through
// the forward and backward recursions. Checks the order of the outputs
// (k = 0..N-1, one per cycle), the output latency and run time, the sign of
// L(u) at every position and the sign of the extrinsic value at the erased
// positions. A second set of blocks with noisy inputs and random a-priori
// values is compared value for value with a reference model of the
// windowed Max-Log-MAP schedule written with plain integers.
module tb_map_decoder;
  import dmcd_pkg::*;
  import turbo_ref_pkg::*;
  localparam int L = 20, MAXN = 1146;
  logic clk = 0, rst_n = 0, start = 0;
  logic [ADDR_W-1:0] blk_len = '0;
  logic fetch_en; logic [ADDR_W-1:0] fetch_k;
  cache_word_t fetch_data;
  logic out_valid; logic [ADDR_W-1:0] out_k;
  logic signed [LOUT_W-1:0] out_llr;
  ext_t out_lex;
  logic busy, done;
  // ACS cells are not lent out in this test
  logic acs_ext_en = 1'b0;
  vpm_t acs_ext_pm0 [16] = '{default: '0}, acs_ext_bm0 [16] = '{default: '0};
  vpm_t acs_ext_pm1 [16] = '{default: '0}, acs_ext_bm1 [16] = '{default: '0};
  vpm_t acs_ext_pm_out [16];
  logic [15:0] acs_ext_dec;
  map_decoder #(.L(L)) dut (.*);
  always #5 clk = !clk;

  cache_word_t mem [MAXN];
  always_ff @(posedge clk) if (fetch_en) fetch_data <= mem[fetch_k];

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int ref_llr [MAXN], ref_lex [MAXN];

  function automatic int sat(input int v, input int w);
    if (v > (1 << (w - 1)) - 1) return (1 << (w - 1)) - 1;
    if (v < -(1 << (w - 1))) return -(1 << (w - 1));
    return v;
  endfunction

  // branch metric of step k for the branch leaving s with input u
  function automatic int gam(input int n, input int k, input int s, input int u, output int ns);
    int s1, s2, s3, a, y0, y1, xs, y0s, y1s, las;
    s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
    a = u ^ s2 ^ s3; y0 = a ^ s1 ^ s3; y1 = a ^ s1 ^ s2 ^ s3;
    ns = (a << 2) | (s1 << 1) | s2;
    if (k >= n) return 0;
    xs = int'(mem[k].x) >>> 1; y0s = int'(mem[k].y0) >>> 1; y1s = int'(mem[k].y1) >>> 1;
    las = int'(mem[k].la);
    return u * (xs + las) + y0 * y0s + y1 * y1s;
  endfunction

  function automatic void backward(input int n, input int k, inout int b [8]);
    int nb [8], ns, v;
    for (int s = 0; s < 8; s++) begin
      nb[s] = -1000000;
      for (int u = 0; u < 2; u++) begin
        v = gam(n, k, s, u, ns);
        v += b[ns];
        if (v > nb[s]) nb[s] = v;
      end
    end
    b = nb;
  endfunction

  task automatic reference(input int n);
    int m, a [][8], b [8], binit [8], ns, v, mx [2];
    m = (n + L - 1) / L;
    a = new[m * L + 1];
    for (int s = 0; s < 8; s++) a[0][s] = (s == 0) ? 0 : -128;
    for (int k = 0; k < m * L; k++) begin
      for (int s = 0; s < 8; s++) a[k+1][s] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          v = a[k][s] + gam(n, k, s, u, ns);
          if (v > a[k+1][ns]) a[k+1][ns] = v;
        end
    end
    for (int blk = 0; blk < m; blk++) begin
      for (int s = 0; s < 8; s++) binit[s] = 0;
      for (int k = (blk + 2) * L - 1; k >= (blk + 1) * L; k--) backward(n, k, binit);
      b = binit;
      for (int k = (blk + 1) * L - 1; k >= blk * L; k--) begin
        mx[0] = -1000000; mx[1] = -1000000;
        for (int s = 0; s < 8; s++)
          for (int u = 0; u < 2; u++) begin
            v = a[k][s] + gam(n, k, s, u, ns) + b[ns];
            if (v > mx[u]) mx[u] = v;
          end
        if (k < n) begin
          ref_llr[k] = sat(mx[1] - mx[0], LOUT_W);
          ref_lex[k] = sat(mx[1] - mx[0] - ((int'(mem[k].x) >>> 1) + int'(mem[k].la)), EXT_W);
        end
        backward(n, k, b);
      end
    end
  endtask

  task automatic run_exact(input int n);
    bit u[], y0[], y1[];
    int mism, nout;
    u = new[n];
    foreach (u[k]) u[k] = 1'($urandom);
    rsc_encode(u, y0, y1);
    for (int k = 0; k < n; k++) begin
      mem[k].x  = chan(u[k], 8, 10);
      mem[k].y0 = chan(y0[k], 8, 10);
      mem[k].y1 = chan(y1[k], 8, 10);
      mem[k].la = ext_t'(int'($urandom_range(0, 40)) - 20);
    end
    reference(n);
    @(negedge clk); blk_len = ADDR_W'(n); start = 1;
    @(negedge clk); start = 0;
    mism = 0; nout = 0;
    while (!done) begin
      if (out_valid) begin
        nout++;
        if (int'(out_llr) != ref_llr[out_k] || int'(out_lex) != ref_lex[out_k]) begin
          mism++;
          if (mism < 4) $display("k=%0d llr %0d/%0d lex %0d/%0d", out_k, out_llr, ref_llr[out_k], out_lex, ref_lex[out_k]);
        end
      end
      @(negedge clk);
    end
    $display("exact N=%0d: %0d outputs, %0d differ from the reference", n, nout, mism);
    checks++; if (nout != n) failures++;
    checks++; if (mism != 0) failures++;
  endtask

  task automatic run(input int n);
    bit u[], y0[], y1[], erased[];
    int cyc, first_out, next_k, order_err, llr_err, lex_err, nerased;
    u = new[n]; erased = new[n];
    foreach (u[k]) begin u[k] = 1'($urandom); erased[k] = ($urandom_range(0, 3) == 0); end
    rsc_encode(u, y0, y1);
    nerased = 0;
    for (int k = 0; k < n; k++) begin
      mem[k].x  = erased[k] ? llr_t'(0) : chan(u[k], 8, 0);
      mem[k].y0 = chan(y0[k], 8, 0);
      mem[k].y1 = chan(y1[k], 8, 0);
      mem[k].la = '0;
      nerased += erased[k];
    end
    @(negedge clk); blk_len = ADDR_W'(n); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; first_out = -1; next_k = 0; order_err = 0; llr_err = 0; lex_err = 0;
    while (!done) begin
      if (out_valid) begin
        if (first_out < 0) first_out = cyc;
        if (int'(out_k) != next_k || cyc - first_out != next_k) order_err++;
        if ((out_llr > 0) != u[out_k]) llr_err++;
        if (erased[out_k] && ((out_lex > 0) != u[out_k])) lex_err++;
        next_k++;
      end
      @(negedge clk); cyc++;
    end
    $display("N=%0d erased %0d: outputs %0d, first at cycle %0d, run %0d cycles, order errors %0d, LLR errors %0d, extrinsic errors %0d",
             n, nerased, next_k, first_out, cyc, order_err, llr_err, lex_err);
    checks++; if (next_k != n) failures++;
    checks++; if (order_err != 0) failures++;
    checks++; if (first_out != 4 * L + 3) failures++;
    checks++; if (cyc != ((n + L - 1) / L + 4) * L + 2) failures++;
    checks++; if (llr_err != 0) failures++;
    checks++; if (lex_err != 0) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(378);
    run(570);
    run(1146);
    run_exact(378);
    run_exact(1146);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
