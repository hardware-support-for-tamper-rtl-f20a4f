// tb_des_round: checks the DES round against published DES test vectors.
//
// Sixteen des_round instances are chained between the initial and final permutation,
// once with the round keys in order (encryption) and once reversed (decryption). The
// expected ciphertexts are the well-known vectors for key 133457799BBCDFF1 and for the
// NBS key 0123456789ABCDEF, which were not produced by this design's tables. A single
// round is also checked against its defining equations with random data.
module tb_des_round;
  import des_pkg::*;

  logic        clk = 1'b0;
  int unsigned checks = 0, failures = 0;

  block_t   pt, key, enc_out, dec_in, dec_out;
  subkeys_t ks;
  block_t   e_chain [17];
  block_t   d_chain [17];

  assign ks = des_subkeys(key);
  assign e_chain[0] = des_ip(pt);
  assign d_chain[0] = des_ip(dec_in);
  for (genvar r = 0; r < 16; r++) begin : g_chain
    des_round u_e (.blk_i(e_chain[r]), .subkey_i(ks[r]),    .blk_o(e_chain[r+1]));
    des_round u_d (.blk_i(d_chain[r]), .subkey_i(ks[15-r]), .blk_o(d_chain[r+1]));
  end
  assign enc_out = des_fp({e_chain[16][31:0], e_chain[16][63:32]});
  assign dec_out = des_fp({d_chain[16][31:0], d_chain[16][63:32]});

  // A single round on its own.
  block_t  one_in, one_out;
  subkey_t one_k;
  des_round u_one (.blk_i(one_in), .subkey_i(one_k), .blk_o(one_out));

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 64'h1334_5779_9BBC_DFF1; pt = 64'h0123_4567_89AB_CDEF; dec_in = 64'h85E8_1354_0F0A_B405;
    #1;
    check("encrypt vector 1", enc_out, 64'h85E8_1354_0F0A_B405);
    check("decrypt vector 1", dec_out, 64'h0123_4567_89AB_CDEF);
    // Round key K1 of this key is a published intermediate value.
    checks++;
    if (ks[0] !== 48'h1B02_EFFC_7072) begin failures++; $display("FAIL K1 %h", ks[0]); end
    key = 64'h0123_4567_89AB_CDEF; pt = 64'h4E6F_7720_6973_2074; dec_in = 64'h3FA4_0E8A_984D_4815;
    #1;
    check("encrypt vector 2", enc_out, 64'h3FA4_0E8A_984D_4815);
    check("decrypt vector 2", dec_out, 64'h4E6F_7720_6973_2074);
    // Round trip with random keys and data.
    for (int i = 0; i < 20; i++) begin
      key = {$urandom, $urandom}; pt = {$urandom, $urandom};
      #1;
      dec_in = enc_out;
      #1;
      check("round trip", dec_out, pt);
    end
    // Single round: left' = right, right' = left ^ f(right, k).
    for (int i = 0; i < 20; i++) begin
      one_in = {$urandom, $urandom}; one_k = {$urandom, $urandom};
      #1;
      check("round swap", {32'h0, one_out[63:32]}, {32'h0, one_in[31:0]});
      check("round mix", {32'h0, one_out[31:0] ^ one_in[63:32]},
            {32'h0, des_pbox(des_sbox(des_expand(one_in[31:0]) ^ one_k))});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #5 clk = ~clk;
endmodule
