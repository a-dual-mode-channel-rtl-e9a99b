// tb_vit_smu -- drives the survivor memory unit with decision columns built
// around a random true path: the decision bit of the path's state points to
// its true predecessor, all other decision bits are random, and the best
// state is the path's state. The trace-back must then follow the path, so
// the decoded bits must equal the path's input bits in order. Also checks
// that outputs appear once per 19-cycle step, in its last cycle, and that a
// second stream after clr decodes as well.
module tb_vit_smu;
  localparam int TL = 48;
  logic clk = 0, rst_n = 0, clr = 0, act = 0;
  logic [4:0] cyc = '0;
  logic [15:0] wr_word = '0;
  logic [7:0] best_state = '0;
  logic out_valid, out_bit;
  vit_smu #(.TL(TL)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  bit got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_bit);
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every output must come in cycle 18 of a step
  int bad_slot = 0;
  always @(posedge clk) if (out_valid && !(act && cyc == 5'd18)) bad_slot++;

  task automatic run_stream(input int nsteps);
    int err;
    bit u [];
    logic [7:0] s, sp;
    u = new[nsteps];
    foreach (u[k]) u[k] = 1'($urandom);
    got.delete();
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    s = '0;
    for (int t = 0; t < nsteps; t++) begin
      logic [255:0] col;
      sp = s;
      s = {u[t], sp[7:1]};
      col = 256'($urandom) ^ (256'($urandom) << 32) ^ (256'($urandom) << 64) ^ (256'($urandom) << 96)
          ^ (256'($urandom) << 128) ^ (256'($urandom) << 160) ^ (256'($urandom) << 192)
          ^ (256'($urandom) << 224);
      col[s] = sp[0];
      for (int c = 0; c < 19; c++) begin
        act = 1; cyc = 5'(c);
        wr_word = col[c * 16 +: 16];
        best_state = s;
        @(negedge clk);
        if (t % 7 == 3 && c == 18) begin act = 0; @(negedge clk); end   // idle gap
      end
    end
    act = 0;
    repeat (4) @(negedge clk);
    err = 0;
    for (int k = 0; k < got.size(); k++) begin
      checks++;
      if (got[k] != u[k]) begin err++; failures++; end
    end
    $display("steps %0d, decoded %0d, errors %0d", nsteps, got.size(), err);
    // outputs start in the seventh phase of H = TL/2 steps
    checks++; if (got.size() != nsteps - 6 * (TL / 2)) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_stream(20 * TL);
    run_stream(9 * TL);     // a second stream after clr
    checks++; if (bad_slot != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
