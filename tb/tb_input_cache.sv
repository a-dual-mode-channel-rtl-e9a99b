// tb_input_cache -- runs the cache through the sliding-window schedule
// (write sub-block p while the three recursions read sub-blocks p-2 forward,
// p-1 and p-3 backward) and checks every word read against the words written.
module tb_input_cache;
  localparam int L = 20, W = 24;
  logic clk = 0, rst_n = 0;
  logic [1:0] rd_slot [3];
  logic [4:0] rd_entry [3];
  logic [W-1:0] rd_data [3];
  logic wr_en = 0, flip = 0;
  logic [1:0] wr_slot = '0;
  logic [4:0] wr_entry = '0;
  logic [W-1:0] wr_data = '0;
  input_cache #(.L(L), .W(W)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  logic [W-1:0] blk [12][L];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (blk[b, e]) blk[b][e] = W'($urandom);
    for (int p = 0; p < 3; p++) begin rd_slot[p] = '0; rd_entry[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 12; p++) begin
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        rd_slot[0] = 2'((p + 1) % 3); rd_entry[0] = 5'(j);
        rd_slot[1] = 2'((p + 2) % 3); rd_entry[1] = 5'(L - 1 - j);
        rd_slot[2] = 2'(p % 3);       rd_entry[2] = 5'(L - 1 - j);
        wr_en = 1; wr_slot = 2'(p % 3); wr_entry = 5'(j); wr_data = blk[p][j];
        flip = (j == L - 1);
        @(posedge clk); #1;
        if (p >= 2) begin checks++; if (rd_data[0] !== blk[p-2][j]) failures++; end
        if (p >= 1) begin checks++; if (rd_data[1] !== blk[p-1][L-1-j]) failures++; end
        if (p >= 3) begin checks++; if (rd_data[2] !== blk[p-3][L-1-j]) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
