// tb_viterbi_decoder -- end-to-end test of viterbi_decoder at all four rates.
// A reference convolutional encoder (generators of the standard, written
// out here in octal) encodes random bits followed by zero flush bits; the
// code bits become 4-bit soft values with random noise. The testbench checks
// every decoded bit, the spacing of 19 cycles between accepted steps, and
// that the decoder corrects the errors the channel made.
module tb_viterbi_decoder;
  import dmcd_pkg::*;

  localparam int TL = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic start = 0;
  vit_rate_e rate = RATE_1_2;
  logic sym_valid = 0, sym_ready;
  soft_t sym [NV];
  logic out_valid, out_bit;

  // own ACS cells (EXT_ACS = 0): the external ACS inputs are unused
  vpm_t acs_pm0 [16], acs_bm0 [16], acs_pm1 [16], acs_bm1 [16];
  vpm_t acs_pm_out [16] = '{default: '0};
  logic [15:0] acs_dec = '0;
  viterbi_decoder #(.TL(TL)) dut (.*);

  int checks = 0, failures = 0;
  bit got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_bit);

  function automatic bit [8:0] gen(input int r, input int v);
    int g [4][6] = '{'{'o753, 'o561, 0, 0, 0, 0},
                     '{'o557, 'o663, 'o711, 0, 0, 0},
                     '{'o765, 'o671, 'o513, 'o473, 0, 0},
                     '{'o457, 'o755, 'o511, 'o637, 'o625, 'o727}};
    return 9'(g[r][v]);
  endfunction

  task automatic run(input int r, input int nbits, input int noise);
    int nout, raw_err, err, last_acc, gap_err, cyc;
    bit u [];
    bit [8:0] sr;
    nout = (r == 0) ? 2 : (r == 1) ? 3 : (r == 2) ? 4 : 6;
    u = new[nbits + 3 * TL + 8];
    foreach (u[k]) u[k] = (k < nbits) ? 1'($urandom) : 1'b0;
    got.delete();
    @(negedge clk); rate = vit_rate_e'(r); start = 1;
    @(negedge clk); start = 0;
    sr = '0; raw_err = 0; gap_err = 0; last_acc = -1; cyc = 0;
    foreach (u[k]) begin
      sr = {u[k], sr[8:1]};
      for (int v = 0; v < NV; v++) begin
        int s;
        bit cbit;
        cbit = (v < nout) ? ^(gen(r, v) & sr) : 1'b0;
        s = (cbit ? 15 : 0) + (noise ? int'($urandom_range(0, 2 * noise)) - noise : 0);
        if (s < 0) s = 0;
        if (s > 15) s = 15;
        if (v < nout && ((s >= 8) != cbit)) raw_err++;
        sym[v] = soft_t'(s);
      end
      sym_valid = 1;
      @(posedge clk);
      while (!sym_ready) begin @(posedge clk); cyc++; end
      cyc++;
      if (last_acc >= 0 && k > 1 && cyc - last_acc != 19) gap_err++;
      last_acc = cyc;
      @(negedge clk);
    end
    sym_valid = 0;
    repeat (40) @(negedge clk);
    err = 0;
    for (int k = 0; k < nbits; k++) if (k >= got.size() || got[k] != u[k]) err++;
    $display("rate idx %0d: %0d bits, raw symbol errors %0d, decoded errors %0d, outputs %0d, gap errors %0d",
             r, nbits, raw_err, err, got.size(), gap_err);
    checks++; if (err != 0) failures++;
    checks++; if (got.size() < nbits) failures++;
    checks++; if (gap_err != 0) failures++;
    if (noise > 0) begin checks++; if (raw_err == 0) failures++; end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NV; v++) sym[v] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 300, 0);
    run(0, 400, 9);
    run(1, 400, 10);
    run(2, 400, 10);
    run(3, 400, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
