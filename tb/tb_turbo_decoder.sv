// tb_turbo_decoder -- end-to-end test of turbo_decoder.
// Encodes random blocks with a reference 3GPP2 turbo encoder, passes them
// through a noisy channel, decodes them and compares the decisions with the
// sent bits. Checks that every address is decided exactly once, that the
// decoder corrects the channel errors, that the duplicated interleaver path is
// exercised and that a block takes 2*ITER phases of (ceil(N/L)+4)*L+3 cycles.
module tb_turbo_decoder;
  import dmcd_pkg::*;
  import turbo_ref_pkg::*;

  localparam int MAXN = 1146;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic start = 0;
  logic [ADDR_W-1:0] blk_len = '0;
  logic sym_rd_en; logic [ADDR_W-1:0] sym_rd_addr;
  llr_t sym_rd_data [5];
  logic dec_valid, dec_bit, busy, done, phase2, il_dup;
  logic [ADDR_W-1:0] dec_addr;
  logic [3:0] iter_no;

  // ACS cells are not lent out in this test
  logic acs_ext_en = 1'b0;
  vpm_t acs_ext_pm0 [16] = '{default: '0}, acs_ext_bm0 [16] = '{default: '0};
  vpm_t acs_ext_pm1 [16] = '{default: '0}, acs_ext_bm1 [16] = '{default: '0};
  vpm_t acs_ext_pm_out [16];
  logic [15:0] acs_ext_dec;
  turbo_decoder #(.MAX_N(MAXN), .ITER(6), .L(20)) dut (.*);

  llr_t sym [MAXN][5];
  always_ff @(posedge clk) if (sym_rd_en) sym_rd_data <= sym[sym_rd_addr];

  int checks = 0, failures = 0;
  bit dec [MAXN];
  int dec_cnt [MAXN];
  int dup_seen = 0;
  always @(posedge clk) begin
    if (dec_valid) begin dec[dec_addr] = dec_bit; dec_cnt[dec_addr]++; end
    if (il_dup) dup_seen++;
  end

  task automatic run_block(input int n, input int sigma_x8);
    bit u[], up[], y0[], y1[], y0p[], y1p[];
    int pi_seq[];
    int raw_err, err, dup_err, cyc, expect_cyc;
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
    @(negedge clk); blk_len = ADDR_W'(n); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    err = 0; dup_err = 0;
    for (int k = 0; k < n; k++) begin
      if (dec[k] != u[k]) err++;
      if (dec_cnt[k] != 1) dup_err++;
    end
    expect_cyc = 12 * (((n + 19) / 20 + 4) * 20 + 3);
    $display("N=%0d sigma=%0d/8 raw errors=%0d decoded errors=%0d cycles=%0d (expected %0d)",
             n, sigma_x8, raw_err, err, cyc, expect_cyc);
    checks++; if (dup_err != 0) begin failures++; $display("FAIL: %0d addresses not decided once", dup_err); end
    checks++; if (err != 0) begin failures++; $display("FAIL: %0d bit errors", err); end
    checks++; if (cyc != expect_cyc) begin failures++; $display("FAIL: cycle count"); end
    if (sigma_x8 > 0) begin
      checks++; if (raw_err == 0) begin failures++; $display("FAIL: channel made no errors"); end
    end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(378, 0);
    run_block(378, 12);
    run_block(570, 12);
    run_block(1146, 12);
    checks++; if (dup_seen == 0) begin failures++; $display("FAIL: duplicated generator never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
