// tb_xom_session_key_unit: RSA session key recovery and the session key cache.
//
// Runs at a 256-bit modulus to stay short. The testbench holds the public half of the
// key pair (N, e = 65537), encrypts random 120-bit session keys itself with wide
// arithmetic, and checks that the unit returns them: first through RSA (miss, long
// latency), then from the cache (hit, two cycles). It also fills the cache beyond its
// four entries and checks that the oldest key is decrypted again by RSA.
module tb_xom_session_key_unit;
  import xom_pkg::*;
  localparam int unsigned K = 256;
  localparam logic [K-1:0] N = 256'heb786bb8c1d9f205955e1140e43b266ce1b112735f5661fa03f1229cedccd433;
  localparam logic [K-1:0] D = 256'h568bf44bfc343718864604e16d01b0a52ff2e9bb1016e6adf211fb5db0aecb81;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req, busy, done, hit;
  logic [K-1:0] rkey;
  desx_key_t    key;
  xom_session_key_unit #(.KEY_BITS(K), .RSA_N(N), .RSA_D(D)) dut (
    .clk, .rst_n, .req_i(req), .req_key_i(rkey), .busy_o(busy), .done_o(done), .hit_o(hit),
    .key_o(key));

  int unsigned checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Public-key encryption c = m^65537 mod N.
  function automatic logic [K-1:0] rsa_enc(logic [K-1:0] m);
    logic [2*K-1:0] r, b;
    b = {{K{1'b0}}, m};
    r = b;
    for (int i = 0; i < 16; i++) r = (r * r) % {{K{1'b0}}, N};
    r = (r * b) % {{K{1'b0}}, N};
    return r[K-1:0];
  endfunction

  task automatic request(logic [K-1:0] c, logic [119:0] exp, logic exp_hit);
    int unsigned t0;
    @(negedge clk);
    rkey = c; req = 1'b1; t0 = cyc;
    @(negedge clk);
    req = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (key !== exp) begin failures++; $display("FAIL key %h expected %h", key, exp); end
    checks++;
    if (hit !== exp_hit) begin failures++; $display("FAIL hit %b expected %b", hit, exp_hit); end
    checks++;
    if (exp_hit ? (cyc - t0 != 2) : (cyc - t0 < K * K)) begin
      failures++; $display("FAIL latency %0d (hit %b)", cyc - t0, exp_hit);
    end
  endtask

  initial begin
    logic [119:0] sk [6];
    req = 0; rkey = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) sk[i] = {$urandom, $urandom, $urandom, $urandom};
    request(rsa_enc(K'(sk[0])), sk[0], 1'b0);   // first entry: RSA
    request(rsa_enc(K'(sk[0])), sk[0], 1'b1);   // again: cache
    for (int i = 1; i < 5; i++) request(rsa_enc(K'(sk[i])), sk[i], 1'b0);
    request(rsa_enc(K'(sk[4])), sk[4], 1'b1);
    request(rsa_enc(K'(sk[0])), sk[0], 1'b0);   // evicted by the fifth key
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
