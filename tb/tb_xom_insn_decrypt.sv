// tb_xom_insn_decrypt: self-checking test of the XOM instruction decryption unit.
//
// The testbench encrypts lines itself: it computes each line's MAC with the hash rule
// (h = rotl(h, 8) ^ word), encrypts every word with DESX under the chained key using a
// software DES model, and follows the key chain (K ^ MAC[63:8], K1 ^ MAC) line by line.
// It checks the plaintext, the NOPs in the MAC slots, the authentication flag, a
// tampered line being rejected, chain restart, and the W + 18 cycle line latency.
// A first check decrypts a published DES vector with K1 = 0.
module tb_xom_insn_decrypt;
  import des_pkg::*;
  import xom_pkg::*;

  localparam int unsigned LINE_BITS = 256;
  localparam int unsigned W = LINE_BITS / 64;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 key_load, restart, clear, in_valid, in_ready, out_valid, out_ok;
  desx_key_t            key;
  logic [LINE_BITS-1:0] in_line, out_line;

  xom_insn_decrypt #(.LINE_BITS(LINE_BITS)) dut (
    .clk, .rst_n, .key_load_i(key_load), .key_i(key), .restart_i(restart), .clear_i(clear),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_line_i(in_line),
    .out_valid_o(out_valid), .out_line_o(out_line), .out_auth_ok_o(out_ok)
  );

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0, t_in = 0;
  always @(posedge clk) begin
    if (in_valid && in_ready) t_in = cyc;
    cyc++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t desx_enc(block_t p, desx_key_t k);
    return k.k1 ^ des_block(p ^ k.k1, des_key56_to_64(k.k), 1'b0);
  endfunction

  // Encrypts one line of W-1 plaintext words and returns it with the chained next key.
  function automatic logic [LINE_BITS-1:0] enc_line(logic [LINE_BITS-1:0] plain, desx_key_t k,
                                                    output block_t mac);
    logic [LINE_BITS-1:0] c;
    block_t h = '0;
    for (int i = 0; i < W - 1; i++) begin
      h = {h[55:0], h[63:56]} ^ plain[64*i +: 64];
      c[64*i +: 64] = desx_enc(plain[64*i +: 64], k);
    end
    c[64*(W-1) +: 64] = desx_enc(h, k);
    mac = h;
    return c;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic send_line(logic [LINE_BITS-1:0] l);
    @(negedge clk);
    in_valid = 1'b1; in_line = l;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
  endtask

  initial begin
    desx_key_t            k0, kc;
    logic [LINE_BITS-1:0] pl, cl, exp;
    block_t               mac;
    key_load = 0; restart = 0; clear = 0; in_valid = 0; in_line = '0; key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Published DES vector through the pipeline: K1 = 0, key 133457799BBCDFF1.
    @(negedge clk);
    key = '{k: '0, k1: '0};
    for (int i = 0; i < 8; i++) key.k[7*i +: 7] = 7'(64'h1334_5779_9BBC_DFF1 >> (8*i + 1));
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    send_line({192'h0, 64'h85E8_1354_0F0A_B405});
    check("DES vector word 0", out_line[63:0] == 64'h0123_4567_89AB_CDEF);
    check("garbage line rejected", !out_ok);

    // A chain of authentic lines under a random session key.
    k0 = '{k: {$urandom, $urandom}, k1: {$urandom, $urandom}};
    @(negedge clk);
    key = k0; key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    kc = k0;
    for (int n = 0; n < 6; n++) begin
      for (int i = 0; i < W; i++) pl[64*i +: 64] = {$urandom, $urandom};
      pl[LINE_BITS-1 -: 64] = '0;
      cl  = enc_line(pl, kc, mac);
      exp = {{2{INSN_NOP}}, pl[LINE_BITS-65:0]};
      send_line(cl);
      check("plaintext line", out_line == exp);
      check("line authentic", out_ok);
      check("latency W+18", cyc - t_in == W + 18);
      kc.k  = kc.k ^ mac[63:8];
      kc.k1 = kc.k1 ^ mac;
    end

    // Tampering with one ciphertext bit makes the MAC check fail.
    for (int i = 0; i < W; i++) pl[64*i +: 64] = {$urandom, $urandom};
    cl = enc_line(pl, kc, mac);
    cl[$urandom_range(LINE_BITS - 1)] ^= 1'b1;
    send_line(cl);
    check("tampered line rejected", !out_ok);

    // Replaying a later line without its predecessors fails; restart returns to line 0.
    @(negedge clk);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    for (int i = 0; i < W; i++) pl[64*i +: 64] = {$urandom, $urandom};
    cl = enc_line(pl, k0, mac);
    send_line(cl);
    check("restart uses session key", out_ok && out_line[63:0] == pl[63:0]);
    cl = enc_line(pl, k0, mac);
    send_line(cl);
    check("same key twice fails after chaining", !out_ok);

    // Clear erases the key: the old chain no longer decrypts.
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    cl = enc_line(pl, k0, mac);
    send_line(cl);
    check("cleared key rejects", !out_ok);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
