// tb_turbo_interleaver -- for every block size of the standard, compares the
// generator's address sequence (one address per cycle) with the sequence
// written from the standard's step list, and checks that it is a permutation
// and that the duplicated generator was needed.
module tb_turbo_interleaver;
  import dmcd_pkg::*;
  import turbo_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, adv = 0, dup_used;
  logic [ADDR_W-1:0] blk_len = '0, addr;
  turbo_interleaver dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, dups = 0;
  int sizes [18] = '{378, 402, 570, 762, 786, 1146, 1530, 1554, 2298, 2322, 3066, 3090,
                     3858, 4602, 6138, 9210, 12282, 20730};
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (sizes[i]) begin
      int pi_seq[];
      int err;
      bit seen [];
      il_sequence(sizes[i], pi_seq);
      seen = new[sizes[i]];
      @(negedge clk); init = 1; blk_len = ADDR_W'(sizes[i]);
      @(negedge clk); init = 0; adv = 1;
      err = 0;
      for (int k = 0; k < sizes[i]; k++) begin
        #1;
        if (int'(addr) != pi_seq[k]) err++;
        if (int'(addr) < sizes[i]) seen[addr] = 1;
        if (dup_used) dups++;
        @(negedge clk);
      end
      adv = 0;
      foreach (seen[a]) if (!seen[a]) err++;
      checks++;
      if (err != 0) begin failures++; $display("FAIL N=%0d: %0d mismatches", sizes[i], err); end
    end
    checks++; if (dups == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
