// tb_xom_xram: XRAM access rules and its erasure on XOM exit.
//
// In XOM mode stores and loads behave as a memory (checked against a model); outside
// XOM mode every access faults and reads zero; after the exit flush, data stored in the
// previous XOM session reads as zero even in a new XOM session.
module tb_xom_xram;
  localparam int unsigned W = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        mode, flush, req, we, ack, fault;
  logic [5:0]  addr;
  logic [31:0] wd, rd;
  xom_xram #(.WORDS(W)) dut (.clk, .rst_n, .xom_mode_i(mode), .flush_i(flush), .req_i(req),
                             .we_i(we), .addr_i(addr), .wdata_i(wd), .ack_o(ack),
                             .fault_o(fault), .rdata_o(rd));

  int unsigned checks = 0, failures = 0;
  logic [31:0] model [W];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic w, logic [5:0] a, logic [31:0] d, logic [31:0] exp, logic efault);
    @(negedge clk);
    req = 1'b1; we = w; addr = a; wd = d;
    @(negedge clk);
    req = 1'b0;
    checks++;
    if (!ack || fault !== efault || (!w && rd !== exp)) begin
      failures++;
      $display("FAIL %s @%0d: ack %b fault %b data %h expected %h", w ? "store" : "load", a,
               ack, fault, rd, exp);
    end
  endtask

  initial begin
    mode = 0; flush = 0; req = 0; we = 0; addr = '0; wd = '0;
    for (int i = 0; i < W; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); mode = 1'b1;
    for (int i = 0; i < 100; i++) begin
      automatic logic [5:0] a = 6'($urandom);
      if ($urandom_range(1)) begin
        automatic logic [31:0] d = $urandom;
        access(1'b1, a, d, '0, 1'b0);
        model[a] = d;
      end else access(1'b0, a, '0, model[a], 1'b0);
    end
    // Outside XOM mode: every access faults, nothing is read or written.
    @(negedge clk); mode = 1'b0;
    for (int i = 0; i < 10; i++) access(1'b0, 6'(i), '0, '0, 1'b1);
    access(1'b1, 6'd3, 32'hDEAD_BEEF, '0, 1'b1);
    // Exit flush, then a new XOM session sees nothing of the old one.
    @(negedge clk); mode = 1'b1;
    @(negedge clk); flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    for (int i = 0; i < W; i++) access(1'b0, 6'(i), '0, '0, 1'b0);
    access(1'b1, 6'd5, 32'h1234_5678, '0, 1'b0);
    access(1'b0, 6'd5, '0, 32'h1234_5678, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
