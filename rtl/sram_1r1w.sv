// sram_1r1w -- embedded SRAM with one read and one write per datapath cycle.
//
// In the chip the systematic, extrinsic and survivor memories are single-port
// SRAMs clocked at twice the datapath rate, so that each datapath cycle holds
// one read slot followed by one write slot. This model gives the same
// behaviour at the datapath clock: a synchronous read (data one cycle after
// rd_en, held until the next read) and a write in the same cycle. A read and a
// write of the same address in one cycle return the old contents (read slot
// first). Contents are not initialised.
module sram_1r1w #(
  parameter int DEPTH = 20730,
  parameter int W     = 6
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
