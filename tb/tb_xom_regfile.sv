// tb_xom_regfile: XOM tags on registers and their invalidation on exit.
//
// Writes random values in normal and XOM mode, keeps a model of value, valid and XOM
// tag per register, pulses flush and checks that exactly the registers last written in
// XOM mode read as zero and invalid while the others keep their values.
module tb_xom_regfile;
  localparam int unsigned N = 32;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          mode, flush, we, rv0, rv1;
  logic [4:0]    wa, ra0, ra1;
  logic [31:0]   wd, rd0, rd1;
  xom_regfile dut (.clk, .rst_n, .xom_mode_i(mode), .flush_i(flush), .we_i(we), .waddr_i(wa),
                   .wdata_i(wd), .raddr0_i(ra0), .rdata0_o(rd0), .rvalid0_o(rv0),
                   .raddr1_i(ra1), .rdata1_o(rd1), .rvalid1_o(rv1));

  int unsigned checks = 0, failures = 0;
  logic [31:0] mv [N];
  bit          mval [N], mx [N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      ra0 = 5'(i); ra1 = 5'(N - 1 - i);
      #1;
      checks++;
      if (rv0 !== mval[i] || rd0 !== (mval[i] ? mv[i] : 32'h0)) begin
        failures++; $display("FAIL r%0d: %h/%b expected %h/%b", i, rd0, rv0, mv[i], mval[i]);
      end
      checks++;
      if (rd1 !== (mval[N-1-i] ? mv[N-1-i] : 32'h0)) begin
        failures++; $display("FAIL port 1 r%0d", N - 1 - i);
      end
    end
  endtask

  initial begin
    mode = 0; flush = 0; we = 0; wa = '0; wd = '0; ra0 = '0; ra1 = '0;
    for (int i = 0; i < N; i++) begin mv[i] = '0; mval[i] = 0; mx[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int round = 0; round < 4; round++) begin
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        mode = (n >= 15);
        we = 1'b1; wa = 5'($urandom); wd = $urandom;
        mv[wa] = wd; mval[wa] = 1; mx[wa] = mode;
      end
      @(negedge clk);
      we = 1'b0;
      check_all();
      flush = 1'b1;
      @(negedge clk);
      flush = 1'b0; mode = 1'b0;
      for (int i = 0; i < N; i++) if (mx[i]) begin mval[i] = 0; mv[i] = '0; mx[i] = 0; end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
