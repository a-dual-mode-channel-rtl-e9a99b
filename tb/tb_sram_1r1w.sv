// tb_sram_1r1w -- random reads and writes against an array model: one-cycle
// read latency, read data held between reads, old data on a same-address
// read and write.
module tb_sram_1r1w;
  localparam int DEPTH = 300, W = 6;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [$clog2(DEPTH)-1:0] rd_addr = '0, wr_addr = '0;
  logic [W-1:0] rd_data, wr_data = '0;
  sram_1r1w #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, same = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = a[8:0]; wr_data = W'(a * 7); model[a] = W'(a * 7);
    end
    // one read first, so that the held read data is defined from here on
    @(negedge clk); wr_en = 0; rd_en = 1; rd_addr = '0; expect_q = model[0];
    @(posedge clk); #1;
    checks++;
    if (rd_data !== expect_q) failures++;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en = 1'($urandom); wr_en = 1'($urandom);
      rd_addr = 9'($urandom_range(0, DEPTH - 1));
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : 9'($urandom_range(0, DEPTH - 1));
      wr_data = W'($urandom);
      if (rd_en) expect_q = model[rd_addr];
      if (rd_en && wr_en && rd_addr == wr_addr) same++;
      @(posedge clk); #1;
      if (wr_en) model[wr_addr] = wr_data;
      checks++;
      if (rd_data !== expect_q) failures++;
    end
    checks++; if (same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
