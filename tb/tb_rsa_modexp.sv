// tb_rsa_modexp: checks modular exponentiation against wide arithmetic.
//
// 64-bit operands. The expected c^d mod n is computed in the testbench by
// square-and-multiply on 128-bit products with the % operator; exponents 1 and 10 are
// checked against known values. The cycle count is checked against
// (K + popcount(d)) * (K + 2) + K + 1.
module tb_rsa_modexp;
  localparam int unsigned K = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  logic [K-1:0] c, d, n, m;
  rsa_modexp #(.KEY_BITS(K)) dut (.clk, .rst_n, .start_i(start), .c_i(c), .d_i(d), .n_i(n),
                                  .busy_o(busy), .done_o(done), .m_o(m));

  int unsigned checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] ref_pow(logic [K-1:0] base, logic [K-1:0] e, logic [K-1:0] md);
    logic [2*K-1:0] r = 1, b;
    b = {{K{1'b0}}, base} % {{K{1'b0}}, md};
    for (int i = K - 1; i >= 0; i--) begin
      r = (r * r) % {{K{1'b0}}, md};
      if (e[i]) r = (r * b) % {{K{1'b0}}, md};
    end
    return r[K-1:0];
  endfunction

  task automatic run(logic [K-1:0] cc, logic [K-1:0] dd, logic [K-1:0] nn, logic [K-1:0] exp);
    int unsigned t0;
    @(negedge clk);
    c = cc; d = dd; n = nn; start = 1'b1; t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (m !== exp) begin failures++; $display("FAIL %h^%h mod %h = %h exp %h", cc, dd, nn, m, exp); end
    checks++;
    if (cyc - t0 != (K + $countones(dd)) * (K + 2) + K + 1) begin
      failures++; $display("FAIL cycles %0d", cyc - t0);
    end
  endtask

  initial begin
    logic [K-1:0] nn, dd, cc;
    start = 0; c = '0; d = '0; n = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      nn = {1'b1, 31'($urandom), $urandom};
      dd = {$urandom, $urandom};
      cc = {$urandom, $urandom};
      run(cc, dd, nn, ref_pow(cc, dd, nn));
    end
    nn = 64'hE3D6_3B1F_0A6C_7C55;
    run(64'h1234_5678, 64'd1, nn, 64'h1234_5678);
    run(64'd2, 64'd10, nn, 64'd1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
