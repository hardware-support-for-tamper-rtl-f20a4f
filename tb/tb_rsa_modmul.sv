// tb_rsa_modmul: checks the bit-serial modular multiplier against wide arithmetic.
//
// Random 64-bit operands with a full-length odd or even modulus; the expected product
// is computed with a 128-bit multiply and remainder. The KEY_BITS + 1 cycle latency from
// start to done is checked too.
module tb_rsa_modmul;
  localparam int unsigned K = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  logic [K-1:0] a, b, n, p;
  rsa_modmul #(.KEY_BITS(K)) dut (.clk, .rst_n, .start_i(start), .a_i(a), .b_i(b), .n_i(n),
                                  .busy_o(busy), .done_o(done), .p_o(p));

  int unsigned checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*K-1:0] exp;
    int unsigned    t0;
    start = 0; a = '0; b = '0; n = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      n = {1'b1, 31'($urandom), $urandom};
      a = (i % 5 == 0) ? '1 : {$urandom, $urandom};
      b = {$urandom, $urandom} % n;
      if (i == 1) b = n - 1;
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      exp = ({{K{1'b0}}, a} * {{K{1'b0}}, b}) % {{K{1'b0}}, n};
      checks++;
      if (p !== exp[K-1:0]) begin
        failures++;
        $display("FAIL %h*%h mod %h = %h, expected %h", a, b, n, p, exp[K-1:0]);
      end
      checks++;
      if (cyc - t0 != K + 1) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
