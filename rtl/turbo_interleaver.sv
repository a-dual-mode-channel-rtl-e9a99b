// turbo_interleaver -- on-the-fly 3GPP2 turbo interleaver address generator.
//
// Produces the interleaved address sequence pi(0), pi(1), ... for a block of
// N symbols without an address table. For an (n+5)-bit counter c the
// tentative address is
//   { bitrev5(c[4:0]), ((c[n+4:5] + 1) * T_n[c[4:0]]) mod 2^n }
// with T_n the standard's lookup table and n the smallest value with
// N <= 2^(n+5). Tentative addresses >= N are invalid. Two generators work on
// c and c+1 at once; whenever the first gives an invalid address the second
// one's is used (even counter values always give a valid one), so a valid
// address is available every cycle and the MAP decoder never stalls.
// Interface: `init` loads N and clears the counter; `addr` is valid from the
// next cycle on; `adv` moves to the next address (combinational output,
// registered counter).
module turbo_interleaver
  import dmcd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic [ADDR_W-1:0] blk_len,
  input  logic              adv,
  output logic [ADDR_W-1:0] addr,
  output logic              dup_used   // the second generator supplied addr
);
  logic [ADDR_W-1:0] cnt, n_len;
  logic [3:0]        n;

  function automatic logic [3:0] il_param(input logic [ADDR_W-1:0] len);
    for (int k = 4; k <= 10; k++)
      if (int'(len) <= (1 << (k + 5))) return 4'(k);
    return 4'd10;
  endfunction

  function automatic logic [ADDR_W:0] tentative(input logic [ADDR_W-1:0] c,
                                                input logic [3:0] nn);
    logic [9:0]  msb, mask, prod;
    logic [4:0]  lsb, rev;
    mask = 10'((1 << nn) - 1);
    msb  = 10'(c >> 5);
    lsb  = c[4:0];
    for (int b = 0; b < 5; b++) rev[b] = lsb[4-b];
    prod = (((msb + 10'd1) & mask) * il_table(nn, lsb)) & mask;   // low 10 bits suffice
    return (ADDR_W+1)'((int'(rev) << nn) | int'(prod));
  endfunction

  logic [ADDR_W:0] t0, t1;
  logic            v0;

  always_comb begin
    t0 = tentative(cnt, n);
    t1 = tentative(cnt + 1'b1, n);
    v0 = t0 < {1'b0, n_len};
    addr     = v0 ? t0[ADDR_W-1:0] : t1[ADDR_W-1:0];   // t1 < 2^(n+4) < N always
    dup_used = !v0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      n     <= 4'd4;
      n_len <= '0;
    end else if (init) begin
      cnt   <= '0;
      n     <= il_param(blk_len);
      n_len <= blk_len;
    end else if (adv) begin
      cnt <= cnt + (v0 ? ADDR_W'(1) : ADDR_W'(2));
    end
  end
endmodule
