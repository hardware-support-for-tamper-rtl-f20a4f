// tb_xom_dcache: write-back data cache with XOM tags and the exit flush.
//
// Random loads and stores in normal and XOM mode over a small address range (so lines
// are evicted and written back) are checked against a flat memory model. After each
// flush the testbench checks that flush_done came, that every word stored in XOM mode
// has reached the board-level memory, that dirty XOM lines were written back, and that
// no line still carries the XOM tag while valid.
module tb_xom_dcache;
  localparam int unsigned S = 8, LW = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             mode, flush, fdone, req, we, ack, mreq, mwe, mack;
  logic [31:0]      addr, wd, rd, maddr;
  logic [32*LW-1:0] mwd, mrd;
  xom_dcache #(.SETS(S), .LINE_WORDS(LW)) dut (
    .clk, .rst_n, .xom_mode_i(mode), .flush_i(flush), .flush_done_o(fdone), .req_i(req),
    .we_i(we), .addr_i(addr), .wdata_i(wd), .ack_o(ack), .rdata_o(rd), .mem_req_o(mreq),
    .mem_we_o(mwe), .mem_addr_o(maddr), .mem_wdata_o(mwd), .mem_ack_i(mack), .mem_rdata_i(mrd));

  int unsigned checks = 0, failures = 0, n_wb = 0, n_flush_wb = 0;
  logic [31:0] golden [logic [31:0]];   // word address -> value the CPU must read
  logic [31:0] dmem   [logic [31:0]];   // word address -> value in board-level memory
  bit          xw     [logic [31:0]];   // words stored in XOM mode since the last exit

  // Board-level memory: answers two cycles after a request.
  int unsigned wait_n = 0;
  always @(posedge clk) begin
    if (mreq && !mack) wait_n <= wait_n + 1; else wait_n <= 0;
    if (mack && mwe) begin
      n_wb++;
      if (dut.state_q == 3'd4) n_flush_wb++;
      for (int i = 0; i < LW; i++) dmem[maddr + 32'(4*i)] = mwd[32*i +: 32];
    end
  end
  assign mack = mreq && wait_n == 2;
  always_comb
    for (int i = 0; i < LW; i++)
      mrd[32*i +: 32] = dmem.exists(maddr + 32'(4*i)) ? dmem[maddr + 32'(4*i)] : 32'h0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic w, logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    req = 1'b1; we = w; addr = a; wd = d;
    do @(negedge clk); while (!ack);
    req = 1'b0;
    if (w) begin
      golden[a] = d;
      if (mode) xw[a] = 1'b1;
    end else begin
      logic [31:0] exp = golden.exists(a) ? golden[a] : 32'h0;
      checks++;
      if (rd !== exp) begin failures++; $display("FAIL load %h = %h expected %h", a, rd, exp); end
    end
  endtask

  initial begin
    mode = 0; flush = 0; req = 0; we = 0; addr = '0; wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int session = 0; session < 4; session++) begin
      xw.delete();
      for (int n = 0; n < 300; n++) begin
        automatic logic [31:0] a = {22'd0, 8'($urandom), 2'b00} & 32'h0000_01FC;
        mode = (n >= 100);
        access(1'($urandom_range(1)), a, $urandom);
      end
      // Exit: flush.
      @(negedge clk); flush = 1'b1;
      @(negedge clk); flush = 1'b0;
      while (!fdone) @(negedge clk);
      mode = 1'b0;
      foreach (xw[a]) begin
        checks++;
        if (!dmem.exists(a) || dmem[a] !== golden[a]) begin
          failures++; $display("FAIL XOM store to %h not in memory after flush", a);
        end
      end
      checks++;
      if ((dut.valid_q & dut.xom_q) != '0) begin failures++; $display("FAIL XOM line left valid"); end
    end
    checks++;
    if (n_flush_wb == 0) begin failures++; $display("FAIL no write-back during a flush"); end
    checks++;
    if (n_wb == n_flush_wb) begin failures++; $display("FAIL no eviction write-back"); end
    $display("write-backs %0d, of which during flush %0d", n_wb, n_flush_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
