// tb_lifo -- pushes consecutive blocks of numbered words and checks that each
// block comes back reversed during the next block, and that `full` rises
// after the first block.
module tb_lifo;
  localparam int DEPTH = 20, W = 16;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, full;
  logic [W-1:0] din, dout;
  lifo #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      for (int j = 0; j < DEPTH; j++) begin
        @(negedge clk);
        push = 1;
        din = W'(blk * 256 + j);
        #1;
        if (blk > 0) begin
          checks++;
          if (dout !== W'((blk - 1) * 256 + DEPTH - 1 - j)) begin
            failures++;
            $display("FAIL blk %0d j %0d dout %0h", blk, j, dout);
          end
        end
        // idle cycles in between must not disturb the order
        if (j == 7) begin @(negedge clk); push = 0; end
      end
      if (blk == 0) begin @(negedge clk); push = 0; checks++; if (!full) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
