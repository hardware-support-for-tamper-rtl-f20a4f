// des_round: one round of DES, purely combinational.
//
// The 64-bit block is split into a left half (bits 63..32) and a right half (31..0).
// The right half is widened to 48 bits by the expansion permutation, mixed with the
// 48-bit round key by xor, reduced back to 32 bits by the eight S-boxes, reordered by
// the P-box and xored into the left half. The halves then swap: the new left half is
// the old right half and the new right half is the mixed value. This is the structure
// of the DES round; the tables are the standard's (des_pkg). There is no register, so
// a pipeline places registers between instances as it needs.
//
// Ports: blk_i, the block entering the round; subkey_i, the round key; blk_o, the
// block leaving it. Decryption uses the same round with round keys in reverse order.
module des_round
  import des_pkg::*;
(
  input  block_t  blk_i,
  input  subkey_t subkey_i,
  output block_t  blk_o
);

  logic [31:0] left, right;

  assign left  = blk_i[63:32];
  assign right = blk_i[31:0];
  assign blk_o = {right, left ^ des_f(right, subkey_i)};

endmodule
