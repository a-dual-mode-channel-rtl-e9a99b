// input_cache -- three-sub-block input cache of the sliding-window MAP decoder.
//
// Holds three consecutive sub-blocks of L trellis steps (3L words of
// {La, y1, y0, x}, 60 x 24 bits at L = 20), so that the forward recursion
// (alpha), the warm-up backward recursion (beta1) and the final backward
// recursion (beta2) each read their sub-block from here instead of from the
// large memories. It has three synchronous read ports (data one cycle after
// the address) and one write port.
//
// While beta2 reads the oldest sub-block in reverse order, the newest
// sub-block is written, word j into the place beta2 has just read (entry
// L-1-j). A sub-block therefore lies in its slot in forward or in reverse
// order; one direction bit per slot records which, and `flip` toggles it when
// a slot has been rewritten. Readers and the writer give (slot, entry) and
// the cache maps it to a physical address. A read and a write of one address
// in one cycle return the old word.
// The chip builds this from a dual-port SRAM accessed twice per datapath cycle
// with an output register on one port; here the four ports are modelled
// directly at the datapath clock.
module input_cache
  import dmcd_pkg::*;
#(
  parameter int L = 20,
  parameter int W = CACHE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           rd_slot [3],
  input  logic [$clog2(L)-1:0] rd_entry [3],
  output logic [W-1:0]         rd_data [3],
  input  logic                 wr_en,
  input  logic [1:0]           wr_slot,
  input  logic [$clog2(L)-1:0] wr_entry,
  input  logic [W-1:0]         wr_data,
  input  logic                 flip       // wr_slot now fully rewritten
);
  localparam int EW = $clog2(L);
  localparam int AW = $clog2(3 * L);
  logic [W-1:0] mem [3 * L];
  logic [2:0]   dir;

  function automatic logic [AW-1:0] phys(input logic [1:0] slot, input logic d,
                                         input logic [EW-1:0] e);
    int off;
    off = d ? (L - 1 - int'(e)) : int'(e);
    return AW'(int'(slot) * L + off);
  endfunction

  always_ff @(posedge clk) begin
    for (int p = 0; p < 3; p++)
      rd_data[p] <= mem[phys(rd_slot[p], dir[rd_slot[p]], rd_entry[p])];
    if (wr_en) mem[phys(wr_slot, !dir[wr_slot], wr_entry)] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dir <= '0;
    else if (flip) dir[wr_slot] <= !dir[wr_slot];
  end
endmodule
