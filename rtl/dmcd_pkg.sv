// dmcd_pkg -- shared types, word widths and code definitions of the dual-mode
// (turbo / Viterbi) channel decoder for 3GPP2.
//
// Word widths follow the fixed-point study of the design: 6-bit channel LLRs in
// 3.3 format, 6-bit extrinsic values in 4.2 format, 8-bit branch metrics and
// path-metric spreads in 6.2 format (one more bit for modulo normalisation),
// 4-bit soft inputs and 10-bit path-metric spreads (plus the modulo bit) in
// Viterbi mode. The constituent RSC code, the convolutional generators and
// the turbo interleaver are the ones of the 3GPP2 (cdma2000) standard.
// The interleaver lookup table is the standard's table; its values are taken
// from the standard, the design only says that such a table exists.
package dmcd_pkg;

  typedef enum logic {MODE_TURBO = 1'b0, MODE_VITERBI = 1'b1} dec_mode_e;
  typedef enum logic [1:0] {RATE_1_2 = 2'd0, RATE_1_3 = 2'd1, RATE_1_4 = 2'd2,
                            RATE_1_6 = 2'd3} vit_rate_e;

  // ---------------- turbo mode ----------------
  localparam int LLR_W  = 6;    // channel LLR, 3.3
  localparam int EXT_W  = 6;    // extrinsic / a-priori, 4.2
  localparam int GAM_W  = 8;    // branch metric, 6.2
  localparam int TPM_W  = 9;    // path metric, 6.2 + modulo bit
  localparam int LOUT_W = 10;   // a-posteriori LLR, 8.2
  localparam int ADDR_W = 15;   // symbol address (max block 20,730)
  localparam int CACHE_W = 4 * LLR_W; // {a-priori, y1, y0, x}

  // ---------------- Viterbi mode ----------------
  localparam int SOFT_W = 4;    // 16-level soft input, 0 = strong '0', 15 = strong '1'
  localparam int BM_W   = 7;    // branch metric 0..90
  localparam int VPM_W  = 11;   // 10-bit path metric + modulo bit
  localparam int NV     = 6;    // maximum number of code symbols per bit (rate 1/6)

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [GAM_W-1:0] gam_t;
  typedef logic [TPM_W-1:0]        tpm_t;
  typedef logic [VPM_W-1:0]        vpm_t;
  typedef logic [SOFT_W-1:0]       soft_t;

  // One entry of the turbo input cache.
  typedef struct packed {
    ext_t la;   // a-priori value
    llr_t y1;   // second parity
    llr_t y0;   // first parity
    llr_t x;    // systematic
  } cache_word_t;

  // Constituent RSC encoder, transfer function [1, (1+D+D^3)/(1+D^2+D^3),
  // (1+D+D^2+D^3)/(1+D^2+D^3)]. State s = {s1,s2,s3}, s1 the newest register.
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  // Parity outputs {y0, y1} of the transition leaving s with input u.
  function automatic logic [1:0] rsc_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a ^ s[2] ^ s[0], a ^ s[2] ^ s[1] ^ s[0]};
  endfunction

  // Predecessor of state ns reached with input u.
  function automatic logic [2:0] rsc_prev(input logic [2:0] ns, input logic u);
    return {ns[1], ns[0], u ^ ns[2] ^ ns[0]};
  endfunction

  // Convolutional generators (octal in the standard), bit 8 taps the current
  // input, bit 0 the oldest register.
  function automatic logic [8:0] conv_poly(input vit_rate_e r, input int v);
    logic [8:0] g;
    g = '0;
    unique case (r)
      RATE_1_2: case (v) 0: g = 9'o753; 1: g = 9'o561; default: g = '0; endcase
      RATE_1_3: case (v) 0: g = 9'o557; 1: g = 9'o663; 2: g = 9'o711; default: g = '0; endcase
      RATE_1_4: case (v) 0: g = 9'o765; 1: g = 9'o671; 2: g = 9'o513; 3: g = 9'o473;
                         default: g = '0; endcase
      RATE_1_6: case (v) 0: g = 9'o457; 1: g = 9'o755; 2: g = 9'o511; 3: g = 9'o637;
                         4: g = 9'o625; 5: g = 9'o727; default: g = '0; endcase
      default: g = '0;
    endcase
    return g;
  endfunction

  function automatic int conv_nout(input vit_rate_e r);
    case (r)
      RATE_1_2: return 2;
      RATE_1_3: return 3;
      RATE_1_4: return 4;
      default:  return 6;
    endcase
  endfunction

  // Turbo interleaver lookup table, indexed by the 5 counter LSBs, for
  // interleaver parameter n = 4..10 (odd multipliers, so every row is a
  // bijection modulo 2^n).
  localparam int unsigned IL_T4 [32] = '{5,15,5,15,1,9,9,15,13,15,7,11,15,3,15,5,
                                         13,15,9,3,1,3,15,1,13,1,9,15,11,3,15,5};
  localparam int unsigned IL_T5 [32] = '{27,3,1,15,13,17,23,13,9,3,15,3,13,1,13,29,
                                         21,19,1,3,29,17,25,29,9,13,23,13,13,1,13,13};
  localparam int unsigned IL_T6 [32] = '{3,27,15,13,29,5,1,31,3,9,15,31,17,5,39,1,
                                         19,27,15,13,45,5,33,15,13,9,15,31,17,5,15,33};
  localparam int unsigned IL_T7 [32] = '{15,127,89,1,31,15,61,47,127,17,119,15,57,123,95,5,
                                         85,17,55,57,15,41,93,87,63,15,13,15,81,57,31,69};
  localparam int unsigned IL_T8 [32] = '{3,1,5,83,19,179,19,99,23,1,3,29,17,25,29,13,
                                         1,13,1,9,15,3,1,13,1,9,15,3,1,67,15,13};
  localparam int unsigned IL_T9 [32] = '{13,335,87,15,15,1,333,11,13,1,121,155,1,175,421,5,
                                         509,215,47,425,295,229,427,83,409,387,193,57,501,313,489,391};
  localparam int unsigned IL_T10[32] = '{1,349,303,721,973,703,761,327,453,95,241,187,497,909,769,349,
                                         71,557,197,499,409,259,335,253,677,717,313,757,189,15,75,163};

  function automatic logic [9:0] il_table(input logic [3:0] n, input logic [4:0] idx);
    logic [9:0] v;
    case (n)
      4'd4:    v = 10'(IL_T4[idx]);
      4'd5:    v = 10'(IL_T5[idx]);
      4'd6:    v = 10'(IL_T6[idx]);
      4'd7:    v = 10'(IL_T7[idx]);
      4'd8:    v = 10'(IL_T8[idx]);
      4'd9:    v = 10'(IL_T9[idx]);
      default: v = 10'(IL_T10[idx]);
    endcase
    return v;
  endfunction

endpackage
