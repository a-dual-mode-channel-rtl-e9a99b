// vit_smu -- survivor memory management of the Viterbi decoder
// (modified three-pointer even algorithm).
//
// The survivor memory holds 3L columns of 256 decision bits, as 16-bit words
// (word w of a column = decisions of states 16w..16w+15), split into six
// banks of H = L/2 columns. Each trellis step takes 19 single-port accesses:
//   cycles 0..15  WR   one decision word per cycle into the current column;
//   cycle 16      TB1  one trace-back step in the bank written last;
//   cycle 17      TB2  one trace-back step three banks back;
//   cycle 18      DC   one decode step five banks back.
// One trace-back step reads the decision bit D of the current state S and
// moves to S = (S << 1) | D. In each phase of H steps (one bank written), TB1
// traces bank b-1 from the best state of its last column, TB2 continues the
// trace that TB1 ended in the previous phase through bank b-3, and DC
// continues the trace TB2 ended in the previous phase through bank b-5,
// emitting the input bit S[7] at every step. A decoded bank therefore lies at
// least L steps behind the start of its trace-back. DC produces bits in
// reverse order; a LIFO of H bits returns them in order during the next
// phase (out_valid / out_bit at cycle 18, from the seventh phase on).
// The bank organisation and the 16+2+1 cycle schedule follow the design;
// the exact pointer assignment and the best-state start of TB1 are this
// implementation's choices.
module vit_smu
  import dmcd_pkg::*;
#(
  parameter int TL = 48             // truncation length L (even)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic [4:0]  cyc,          // 0..18 position within the step
  input  logic        act,          // step in progress
  input  logic [15:0] wr_word,
  input  logic [7:0]  best_state,   // best state of the column just written (cycle 16)
  output logic        out_valid,
  output logic        out_bit
);
  localparam int H     = TL / 2;
  localparam int DEPTH = 6 * H * 16;
  localparam int AW    = $clog2(DEPTH);
  localparam int HW    = $clog2(H);

  logic [2:0]    wb;           // bank being written
  logic [HW-1:0] j;            // column within the bank
  logic [3:0]    phase_cnt;    // saturating count of phases
  logic [7:0]    best_prev;
  logic [7:0]    tb1_s, tb2_s, dc_s, tb1_end, tb2_end;
  logic [6:0]    cur_s;        // low 7 bits of the state of the read in flight
  logic [1:0]    pend;         // which pointer the read data belongs to (0 none)

  function automatic logic [2:0] bank_minus(input logic [2:0] b, input int d);
    return 3'((int'(b) + 6 - d) % 6);
  endfunction

  function automatic logic [AW-1:0] addr_of(input logic [2:0] b, input logic [HW-1:0] col,
                                            input logic [3:0] w);
    return AW'((int'(b) * H + int'(col)) * 16 + int'(w));
  endfunction

  logic [HW-1:0] jr;
  assign jr = HW'(H - 1 - int'(j));

  // state used by the pointer that reads in this cycle
  logic [7:0] s_tb1, s_tb2, s_dc;
  assign s_tb1 = (j == '0) ? best_prev : tb1_s;
  assign s_tb2 = (j == '0) ? tb1_end   : tb2_s;
  assign s_dc  = (j == '0) ? tb2_end   : dc_s;

  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [15:0]   rd_data;

  always_comb begin
    rd_en = 1'b0; rd_addr = '0;
    wr_en = act && (cyc < 5'd16);
    wr_addr = addr_of(wb, j, cyc[3:0]);
    if (act) begin
      unique case (cyc)
        5'd16: begin rd_en = 1'b1; rd_addr = addr_of(bank_minus(wb, 1), jr, s_tb1[7:4]); end
        5'd17: begin rd_en = 1'b1; rd_addr = addr_of(bank_minus(wb, 3), jr, s_tb2[7:4]); end
        5'd18: begin rd_en = 1'b1; rd_addr = addr_of(bank_minus(wb, 5), jr, s_dc[7:4]); end
        default: ;
      endcase
    end
  end

  sram_1r1w #(.DEPTH(DEPTH), .W(16)) u_surv (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data(wr_word));

  // single-port rule: never a read and a write in the same cycle
  always_comb assert (!(rd_en && wr_en)) else $error("survivor memory accessed twice in a cycle");

  logic [7:0] nxt;
  assign nxt = {cur_s, rd_data[cur_s[3:0]]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= '0; j <= '0; phase_cnt <= '0; best_prev <= '0;
      tb1_s <= '0; tb2_s <= '0; dc_s <= '0; tb1_end <= '0; tb2_end <= '0;
      cur_s <= '0; pend <= '0;
    end else if (clr) begin
      wb <= '0; j <= '0; phase_cnt <= '0; best_prev <= '0;
      tb1_s <= '0; tb2_s <= '0; dc_s <= '0; tb1_end <= '0; tb2_end <= '0;
      cur_s <= '0; pend <= '0;
    end else begin
      // consume the data of the previous cycle's read
      pend <= '0;
      unique case (pend)
        2'd1: begin tb1_s <= nxt; if (int'(j) == H - 1) tb1_end <= nxt; end
        2'd2: begin tb2_s <= nxt; if (int'(j) == H - 1) tb2_end <= nxt; end
        2'd3: dc_s <= nxt;
        default: ;
      endcase
      if (act) begin
        unique case (cyc)
          5'd16: begin cur_s <= s_tb1[6:0]; pend <= 2'd1; end
          5'd17: begin cur_s <= s_tb2[6:0]; pend <= 2'd2; end
          5'd18: begin
            cur_s <= s_dc[6:0]; pend <= 2'd3;
            best_prev <= best_state;
            if (int'(j) == H - 1) begin
              j  <= '0;
              wb <= (wb == 3'd5) ? 3'd0 : wb + 3'd1;
              if (phase_cnt != 4'hF) phase_cnt <= phase_cnt + 1'b1;
            end else begin
              j <= j + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // bit re-ordering
  logic dc_push, lifo_out, lifo_full;
  assign dc_push = act && (cyc == 5'd18);
  lifo #(.DEPTH(H), .W(1)) u_lifo (
    .clk, .rst_n, .clr, .push(dc_push), .din(s_dc[7]), .dout(lifo_out), .full(lifo_full));

  assign out_valid = dc_push && (phase_cnt >= 4'd6);
  assign out_bit   = lifo_out;

  logic unused;
  assign unused = lifo_full;
endmodule
