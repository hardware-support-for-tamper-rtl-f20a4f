// des_pkg: tables and combinational functions of the Data Encryption Standard.
//
// The XOM instruction decryption path uses DESX, whose core is DES. This package holds
// the fixed DES tables (initial and final permutation, expansion E, P-box, the eight
// S-boxes, key permutations PC-1 and PC-2 and the left-shift schedule) exactly as the
// DES standard defines them, and functions that apply them. Every permutation is pure
// wiring once elaborated; the S-boxes are 6-to-4 lookup tables.
//
// Bit numbering follows the standard: table entry t[i] names the input bit, counted
// from 1 at the most significant end, that lands in output bit i (also from the MSB).
// A 64-bit block is held as logic [63:0] with bit 63 being the standard's bit 1.
// Decryption uses the same round with the sixteen round keys in reverse order.
package des_pkg;

  typedef logic [63:0] block_t;
  typedef logic [47:0] subkey_t;
  typedef subkey_t     subkeys_t [16];

  localparam byte unsigned IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10,  2, 60, 52, 44, 36, 28, 20, 12,  4,
    62, 54, 46, 38, 30, 22, 14,  6, 64, 56, 48, 40, 32, 24, 16,  8,
    57, 49, 41, 33, 25, 17,  9,  1, 59, 51, 43, 35, 27, 19, 11,  3,
    61, 53, 45, 37, 29, 21, 13,  5, 63, 55, 47, 39, 31, 23, 15,  7
  };
  localparam byte unsigned FP_T [64] = '{
    40,  8, 48, 16, 56, 24, 64, 32, 39,  7, 47, 15, 55, 23, 63, 31,
    38,  6, 46, 14, 54, 22, 62, 30, 37,  5, 45, 13, 53, 21, 61, 29,
    36,  4, 44, 12, 52, 20, 60, 28, 35,  3, 43, 11, 51, 19, 59, 27,
    34,  2, 42, 10, 50, 18, 58, 26, 33,  1, 41,  9, 49, 17, 57, 25
  };
  localparam byte unsigned E_T [48] = '{
    32,  1,  2,  3,  4,  5,  4,  5,  6,  7,  8,  9,  8,  9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32,  1
  };
  localparam byte unsigned P_T [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,  1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9, 19, 13, 30,  6, 22, 11,  4, 25
  };
  localparam byte unsigned PC1_T [56] = '{
    57, 49, 41, 33, 25, 17,  9,  1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27, 19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,  7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29, 21, 13,  5, 28, 20, 12,  4
  };
  localparam byte unsigned PC2_T [48] = '{
    14, 17, 11, 24,  1,  5,  3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8, 16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };
  localparam byte unsigned SHIFT_T [16] = '{
     1,  1,  2,  2,  2,  2,  2,  2,  1,  2,  2,  2,  2,  2,  2,  1
  };
  // S-box n (0..7), entry row*16+col, row = outer input bits, col = inner four bits.
  localparam logic [3:0] SBOX_T [8][64] = '{
    '{14,  4, 13,  1,  2, 15, 11,  8,  3, 10,  6, 12,  5,  9,  0,  7,
       0, 15,  7,  4, 14,  2, 13,  1, 10,  6, 12, 11,  9,  5,  3,  8,
       4,  1, 14,  8, 13,  6,  2, 11, 15, 12,  9,  7,  3, 10,  5,  0,
      15, 12,  8,  2,  4,  9,  1,  7,  5, 11,  3, 14, 10,  0,  6, 13},
    '{15,  1,  8, 14,  6, 11,  3,  4,  9,  7,  2, 13, 12,  0,  5, 10,
       3, 13,  4,  7, 15,  2,  8, 14, 12,  0,  1, 10,  6,  9, 11,  5,
       0, 14,  7, 11, 10,  4, 13,  1,  5,  8, 12,  6,  9,  3,  2, 15,
      13,  8, 10,  1,  3, 15,  4,  2, 11,  6,  7, 12,  0,  5, 14,  9},
    '{10,  0,  9, 14,  6,  3, 15,  5,  1, 13, 12,  7, 11,  4,  2,  8,
      13,  7,  0,  9,  3,  4,  6, 10,  2,  8,  5, 14, 12, 11, 15,  1,
      13,  6,  4,  9,  8, 15,  3,  0, 11,  1,  2, 12,  5, 10, 14,  7,
       1, 10, 13,  0,  6,  9,  8,  7,  4, 15, 14,  3, 11,  5,  2, 12},
    '{ 7, 13, 14,  3,  0,  6,  9, 10,  1,  2,  8,  5, 11, 12,  4, 15,
      13,  8, 11,  5,  6, 15,  0,  3,  4,  7,  2, 12,  1, 10, 14,  9,
      10,  6,  9,  0, 12, 11,  7, 13, 15,  1,  3, 14,  5,  2,  8,  4,
       3, 15,  0,  6, 10,  1, 13,  8,  9,  4,  5, 11, 12,  7,  2, 14},
    '{ 2, 12,  4,  1,  7, 10, 11,  6,  8,  5,  3, 15, 13,  0, 14,  9,
      14, 11,  2, 12,  4,  7, 13,  1,  5,  0, 15, 10,  3,  9,  8,  6,
       4,  2,  1, 11, 10, 13,  7,  8, 15,  9, 12,  5,  6,  3,  0, 14,
      11,  8, 12,  7,  1, 14,  2, 13,  6, 15,  0,  9, 10,  4,  5,  3},
    '{12,  1, 10, 15,  9,  2,  6,  8,  0, 13,  3,  4, 14,  7,  5, 11,
      10, 15,  4,  2,  7, 12,  9,  5,  6,  1, 13, 14,  0, 11,  3,  8,
       9, 14, 15,  5,  2,  8, 12,  3,  7,  0,  4, 10,  1, 13, 11,  6,
       4,  3,  2, 12,  9,  5, 15, 10, 11, 14,  1,  7,  6,  0,  8, 13},
    '{ 4, 11,  2, 14, 15,  0,  8, 13,  3, 12,  9,  7,  5, 10,  6,  1,
      13,  0, 11,  7,  4,  9,  1, 10, 14,  3,  5, 12,  2, 15,  8,  6,
       1,  4, 11, 13, 12,  3,  7, 14, 10, 15,  6,  8,  0,  5,  9,  2,
       6, 11, 13,  8,  1,  4, 10,  7,  9,  5,  0, 15, 14,  2,  3, 12},
    '{13,  2,  8,  4,  6, 15, 11,  1, 10,  9,  3, 14,  5,  0, 12,  7,
       1, 15, 13,  8, 10,  3,  7,  4, 12,  5,  6, 11,  0, 14,  9,  2,
       7, 11,  4,  1,  9, 12, 14,  2,  0,  6, 10, 13, 15,  3,  5,  8,
       2,  1, 14,  7,  4, 10,  8, 13, 15, 12,  9,  0,  3,  5,  6, 11}
  };

  // Initial permutation of a 64-bit block.
  function automatic block_t des_ip(block_t x);
    block_t r;
    for (int i = 0; i < 64; i++) r[63-i] = x[64-int'(IP_T[i])];
    return r;
  endfunction

  // Final permutation (inverse of the initial permutation).
  function automatic block_t des_fp(block_t x);
    block_t r;
    for (int i = 0; i < 64; i++) r[63-i] = x[64-int'(FP_T[i])];
    return r;
  endfunction

  // Expansion of a 32-bit half block to 48 bits.
  function automatic logic [47:0] des_expand(logic [31:0] x);
    logic [47:0] r;
    for (int i = 0; i < 48; i++) r[47-i] = x[32-int'(E_T[i])];
    return r;
  endfunction

  // P-box permutation of the 32 S-box output bits.
  function automatic logic [31:0] des_pbox(logic [31:0] x);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[31-i] = x[32-int'(P_T[i])];
    return r;
  endfunction

  // The eight S-boxes: 48 bits in, 32 bits out.
  function automatic logic [31:0] des_sbox(logic [47:0] x);
    logic [31:0] r;
    logic [5:0]  b;
    for (int i = 0; i < 8; i++) begin
      b = x[47-6*i -: 6];
      r[31-4*i -: 4] = SBOX_T[i][{b[5], b[0], b[4:1]}];
    end
    return r;
  endfunction

  // Round function f(R, K).
  function automatic logic [31:0] des_f(logic [31:0] r, subkey_t k);
    return des_pbox(des_sbox(des_expand(r) ^ k));
  endfunction

  // Permuted choice 1: 64-bit key (parity bits ignored) to the 56-bit C0D0.
  function automatic logic [55:0] des_pc1(block_t key);
    logic [55:0] r;
    for (int i = 0; i < 56; i++) r[55-i] = key[64-int'(PC1_T[i])];
    return r;
  endfunction

  // Permuted choice 2: 56-bit CiDi to the 48-bit round key.
  function automatic subkey_t des_pc2(logic [55:0] cd);
    subkey_t r;
    for (int i = 0; i < 48; i++) r[47-i] = cd[56-int'(PC2_T[i])];
    return r;
  endfunction

  // 56 key bits to the standard 64-bit key layout: a zero parity bit is placed at the
  // least significant position of every byte (PC-1 ignores those bits).
  function automatic block_t des_key56_to_64(logic [55:0] k);
    block_t r;
    for (int i = 0; i < 8; i++) r[8*i +: 8] = {k[7*i +: 7], 1'b0};
    return r;
  endfunction

  // The sixteen round keys K1..K16 (index 0..15) of a 64-bit key.
  function automatic subkeys_t des_subkeys(block_t key);
    subkeys_t    ks;
    logic [55:0] cd;
    logic [27:0] c, d;
    cd = des_pc1(key);
    c  = cd[55:28];
    d  = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      if (SHIFT_T[i] == 8'd1) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end else begin
        c = {c[25:0], c[27:26]};
        d = {d[25:0], d[27:26]};
      end
      ks[i] = des_pc2({c, d});
    end
    return ks;
  endfunction

  // Whole-block DES, used by testbenches as a software model built from the same
  // tables (the tables themselves are checked against published test vectors).
  function automatic block_t des_block(block_t x, block_t key, logic decrypt);
    subkeys_t    ks;
    logic [31:0] l, r, t;
    block_t      y;
    ks = des_subkeys(key);
    y  = des_ip(x);
    l  = y[63:32];
    r  = y[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ des_f(r, decrypt ? ks[15-i] : ks[i]);
      l = t;
    end
    return des_fp({r, l});
  endfunction

endpackage
