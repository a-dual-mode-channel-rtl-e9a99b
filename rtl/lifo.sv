// lifo -- block-reversing last-in-first-out buffer.
//
// Takes one word per cycle (push) and returns, in the same cycle, the word of
// the previous block of DEPTH words in reverse order: the word read out is
// the one stored at the address about to be overwritten. The address runs
// up through one block and down through the next, so a single DEPTH-word
// memory suffices; it is read before it is written at each address (one read
// and one write per cycle). Used to put backward-computed LLRs and Viterbi
// decoded bits back into forward order, and as the forward-metric (alpha)
// store of the sliding-window MAP decoder, which is read in reverse.
// dout is valid once one whole block has been pushed (full).
module lifo #(
  parameter int DEPTH = 20,
  parameter int W     = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,     // restart at address 0, forget contents
  input  logic         push,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         full     // a whole previous block is available
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] cnt;
  logic          dir;
  logic [AW-1:0] addr;

  assign addr = dir ? AW'(DEPTH - 1 - int'(cnt)) : cnt;
  assign dout = mem[addr];

  always_ff @(posedge clk) begin
    if (push) mem[addr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      dir  <= 1'b0;
      full <= 1'b0;
    end else if (clr) begin
      cnt  <= '0;
      dir  <= 1'b0;
      full <= 1'b0;
    end else if (push) begin
      if (int'(cnt) == DEPTH - 1) begin
        cnt  <= '0;
        dir  <= !dir;
        full <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
