// xom_tb_pkg: program images and a reference model for the XOM fetch tests.
//
// xom_prog builds what the board-level cache holds: plain code, encrypted XOM blocks and
// encrypted session keys. An XOM block is written line by line: six instructions, then
// the 64-bit MAC (hash h = rotl(h, 8) ^ word of the three plaintext words), each 64-bit
// word DESX-encrypted under the chained line key (next key: K ^ MAC[63:8], K1 ^ MAC).
// The class also keeps the plaintext, and its model steps through the program as the
// processor should: XOM jumps to XPC, EXOM returns after the entry instruction, a
// branch word (top nibble B) is taken the first time it is met, a block whose first line
// is tampered is skipped straight back to the link address, and the MAC slots read as
// NOPs. Testbenches compare every issued instruction with the model.
package xom_tb_pkg;
  import des_pkg::*;
  import xom_pkg::*;

  localparam logic [31:0] HALT = 32'hEEEE_EEEE;

  function automatic block_t desx_enc(block_t p, desx_key_t k);
    return k.k1 ^ des_block(p ^ k.k1, des_key56_to_64(k.k), 1'b0);
  endfunction

  class xom_prog;
    logic [255:0] mem   [logic [31:0]];   // line address -> line, as stored in memory
    logic [31:0]  plain [logic [31:0]];   // byte address -> plaintext instruction
    bit           taken [logic [31:0]];   // branches already taken
    bit           bad   [logic [31:0]];   // XOM blocks (by XPC) whose first line is tampered
    logic [31:0]  pc, link;
    bit           xmode;

    function void put(logic [31:0] a, logic [31:0] w);
      logic [31:0] la = {a[31:5], 5'd0};
      if (!mem.exists(la)) mem[la] = '0;
      mem[la][32*a[4:2] +: 32] = w;
      plain[a] = w;
    endfunction

    function logic [255:0] line(logic [31:0] la);
      return mem.exists(la) ? mem[la] : '0;
    endfunction

    // An encrypted block of n lines at base (line aligned). code[i] is instruction i,
    // six per line. tamper flips one ciphertext bit in the first line.
    function void put_block(logic [31:0] base, logic [31:0] code[$], desx_key_t k, bit tamper);
      int n = (code.size() + 5) / 6;
      for (int l = 0; l < n; l++) begin
        logic [255:0] pl = '0, cl;
        block_t h = '0;
        logic [31:0] la = base + 32'(32 * l);
        for (int s = 0; s < 6; s++) begin
          logic [31:0] w = (6 * l + s < code.size()) ? code[6*l+s] : INSN_NOP;
          pl[32*s +: 32] = w;
          plain[la + 32'(4*s)] = w;
        end
        plain[la + 24] = INSN_NOP;
        plain[la + 28] = INSN_NOP;
        for (int i = 0; i < 3; i++) begin
          h = {h[55:0], h[63:56]} ^ pl[64*i +: 64];
          cl[64*i +: 64] = desx_enc(pl[64*i +: 64], k);
        end
        cl[255:192] = desx_enc(h, k);
        if (tamper && l == 0) cl[77] ^= 1'b1;
        mem[la] = cl;
        k.k  = k.k ^ h[63:8];
        k.k1 = k.k1 ^ h;
      end
      if (tamper) bad[base] = 1'b1;
    endfunction

    function void put_key(logic [31:0] kaddr, logic [1023:0] c, int kbits);
      for (int i = 0; i < kbits / 256; i++) mem[kaddr + 32'(32*i)] = c[256*i +: 256];
    endfunction

    // Moves the model to the next instruction that should be issued.
    function void settle();
      for (int guard = 0; guard < 16; guard++) begin
        logic [31:0] w = plain.exists(pc) ? plain[pc] : '0;
        if (!xmode && w == OP_XOM) begin
          logic [31:0] xpc = plain[pc + 8];
          link = pc + 12;
          if (bad.exists(xpc)) pc = link;
          else begin pc = xpc; xmode = 1'b1; end
        end else if (xmode && w == OP_EXOM) begin
          pc = link; xmode = 1'b0;
        end else return;
      end
    endfunction

    function logic [31:0] expect_insn();
      return plain.exists(pc) ? plain[pc] : '0;
    endfunction

    // Advance past the instruction just issued; returns 1 for a taken branch.
    function bit step();
      logic [31:0] w = expect_insn();
      bit br = (w[31:28] == 4'hB) && !taken.exists(pc);
      if (br) begin
        taken[pc] = 1'b1;
        pc = {4'h0, w[27:0]};
      end else pc = pc + 4;
      settle();
      return br;
    endfunction

    function void interrupt(logic [31:0] vec);
      pc = vec; xmode = 1'b0;
      settle();
    endfunction

    function void reset(logic [31:0] p);
      pc = p; xmode = 1'b0;
      settle();
    endfunction
  endclass

endpackage
