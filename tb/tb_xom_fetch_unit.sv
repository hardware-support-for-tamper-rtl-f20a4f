// tb_xom_fetch_unit: XOM entry, decrypted fetch, chaining, exit and interrupts.
//
// The fetch unit runs with the real instruction cache (4 sets, so XOM lines get evicted),
// instruction decryption unit and mode controller, and a behavioural session key unit
// that answers after 100 cycles with a fixed key. A host model takes every issued
// instruction, compares it with the reference model in xom_tb_pkg, and redirects fetch
// one cycle after a taken branch. The program enters XOM three times:
//   1. a six-line block with a forward branch (intermediate lines must be decrypted), a
//      backward branch to an evicted line (chain restart) and EXOM at the end;
//   2. a block whose first line is tampered (authentication failure, exit);
//   3. block 1 again, interrupted (exit, fetch from the interrupt vector).
// Each mechanism is counted and must have happened. The key read from KAddr must reach
// the key unit unchanged.
module tb_xom_fetch_unit;
  import des_pkg::*;
  import xom_pkg::*;
  import xom_tb_pkg::*;

  localparam int unsigned KB = 1024;
  localparam logic [31:0] VEC = 32'h0000_3000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          issue_valid, issue_ready, redirect, irq, irq_taken, auth_fail;
  logic [31:0]   issue_insn, issue_pc, redirect_pc;
  logic          xom_mode, enter, exit_req, exit_done, flush, scan_allow;
  exit_cause_e   exit_cause, last_cause;
  logic          key_req, key_done;
  logic [KB-1:0] enc_key;
  desx_key_t     key_out;
  logic          dec_valid, dec_ready, dec_restart, dec_out_valid, dec_out_ok;
  logic [255:0]  dec_line, dec_out_line, ic_line, ic_fill_line, imem_line;
  logic [31:0]   ic_addr, ic_fill_addr, imem_addr;
  logic          ic_hit, ic_fill, ic_fill_xom, imem_req, imem_ack;

  // No data cache here: its flush is reported done one cycle after the flush pulse.
  logic flush_d = 1'b0;
  always @(posedge clk) flush_d <= flush;

  xom_fetch_unit #(.KEY_BITS(KB)) dut (
    .clk, .rst_n,
    .issue_valid_o(issue_valid), .issue_insn_o(issue_insn), .issue_pc_o(issue_pc),
    .issue_ready_i(issue_ready), .redirect_i(redirect), .redirect_pc_i(redirect_pc),
    .irq_i(irq), .irq_vector_i(VEC), .irq_taken_o(irq_taken), .auth_fail_o(auth_fail),
    .xom_mode_i(xom_mode), .enter_o(enter), .exit_o(exit_req), .exit_cause_o(exit_cause),
    .exit_done_i(exit_done), .key_req_o(key_req), .enc_key_o(enc_key), .key_done_i(key_done),
    .dec_valid_o(dec_valid), .dec_ready_i(dec_ready), .dec_line_o(dec_line),
    .dec_restart_o(dec_restart), .dec_out_valid_i(dec_out_valid), .dec_out_line_i(dec_out_line),
    .dec_out_ok_i(dec_out_ok), .ic_addr_o(ic_addr), .ic_hit_i(ic_hit), .ic_line_i(ic_line),
    .ic_fill_o(ic_fill), .ic_fill_addr_o(ic_fill_addr), .ic_fill_line_o(ic_fill_line),
    .ic_fill_xom_o(ic_fill_xom), .imem_req_o(imem_req), .imem_addr_o(imem_addr),
    .imem_ack_i(imem_ack), .imem_line_i(imem_line));

  xom_icache #(.SETS(4)) u_ic (
    .clk, .rst_n, .xom_mode_i(xom_mode), .flush_i(flush), .addr_i(ic_addr), .hit_o(ic_hit),
    .line_o(ic_line), .fill_i(ic_fill), .fill_addr_i(ic_fill_addr), .fill_line_i(ic_fill_line),
    .fill_xom_i(ic_fill_xom));

  xom_insn_decrypt u_dec (
    .clk, .rst_n, .key_load_i(key_done), .key_i(key_out), .restart_i(dec_restart),
    .clear_i(flush), .in_valid_i(dec_valid), .in_ready_o(dec_ready), .in_line_i(dec_line),
    .out_valid_o(dec_out_valid), .out_line_o(dec_out_line), .out_auth_ok_o(dec_out_ok));

  xom_mode_ctrl u_mode (
    .clk, .rst_n, .enter_i(enter), .exit_i(exit_req), .exit_cause_i(exit_cause),
    .writes_pending_i(1'b0), .dc_flush_done_i(flush_d), .xom_mode_o(xom_mode), .flush_o(flush),
    .exit_done_o(exit_done), .last_cause_o(last_cause), .scan_allow_o(scan_allow));

  xom_prog       prog;
  desx_key_t     K0;
  logic [KB-1:0] CKEY;
  int unsigned   checks = 0, failures = 0, issued = 0, xom_issued = 0;
  int unsigned   n_enter = 0, n_exom = 0, n_auth = 0, n_irq = 0, n_restart = 0, n_skip = 0;
  int unsigned   n_xhit = 0, n_key = 0;
  bit            halted = 0, irq_armed = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s (pc %h)", s, issue_pc);
  endtask

  // Board-level cache: a line three cycles after the request.
  int unsigned mem_wait = 0;
  always @(posedge clk) begin
    if (imem_req && !imem_ack) mem_wait <= mem_wait + 1; else mem_wait <= 0;
  end
  assign imem_ack  = imem_req && mem_wait == 3;
  assign imem_line = prog.line(imem_addr);

  // Session key unit model: fixed key after 100 cycles; the key bits must arrive intact.
  int unsigned key_wait = 0;
  logic        key_busy = 1'b0;
  always @(posedge clk) begin
    key_done <= 1'b0;
    if (key_req) begin
      key_busy <= 1'b1; key_wait <= 0;
      checks++;
      if (enc_key !== CKEY) begin fail("encrypted key read from KAddr"); $display("%h\n%h", enc_key, CKEY); end
    end else if (key_busy) begin
      key_wait <= key_wait + 1;
      if (key_wait == 100) begin key_done <= 1'b1; key_busy <= 1'b0; n_key++; end
    end
  end
  assign key_out = K0;

  // Host: check every issued instruction against the model.
  logic br_pend = 1'b0;
  logic [31:0] br_tgt;
  always @(posedge clk) if (rst_n) begin
    if (issue_valid && issue_ready) begin
      checks++;
      if (issue_pc !== prog.pc || issue_insn !== prog.expect_insn()) begin
        fail($sformatf("issued %h at %h, expected %h at %h", issue_insn, issue_pc,
                       prog.expect_insn(), prog.pc));
      end
      issued++;
      if (xom_mode) xom_issued++;
      if (issue_insn == HALT) halted = 1'b1;
      if (prog.step()) begin br_pend <= 1'b1; br_tgt <= {4'h0, issue_insn[27:0]}; end
    end
    if (irq_taken) begin
      n_irq++;
      prog.interrupt(VEC);
    end
    if (auth_fail) n_auth++;
    if (enter) n_enter++;
    if (exit_req && exit_cause == EXIT_EXOM) n_exom++;
    if (dec_restart) n_restart++;
    if (dec_out_valid && dec_out_ok && u_dec.out_valid_o && ic_fill_addr != {issue_pc[31:5], 5'd0}
        && xom_mode) n_skip++;
    if (xom_mode && ic_hit && !dut.win_hit && dut.state_q == 0) n_xhit++;
  end

  always @(negedge clk) begin
    redirect <= 1'b0;
    if (br_pend) begin
      redirect <= 1'b1; redirect_pc <= br_tgt; br_pend <= 1'b0;
    end
    // Third entry: interrupt after a few XOM instructions.
    irq <= irq_armed && xom_mode && xom_issued > 70;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired: state %0d pc %h entries %0d issued %0d halted %0d", dut.state_q,
             dut.pc_q, n_enter, issued, halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] blk1[$], blk2[$];
    prog = new();
    K0   = '{k: 56'h0123_4567_89AB_CD, k1: 64'hFEDC_BA98_7654_3210};
    CKEY = {32{$urandom}};
    // Plain code.
    for (int i = 0; i < 64; i++) prog.put(32'(4*i), 32'h1000_0000 | 32'(4*i));
    prog.put(32'h08, OP_XOM); prog.put(32'h0C, 32'h800); prog.put(32'h10, 32'h1000);
    prog.put(32'h24, OP_XOM); prog.put(32'h28, 32'h800); prog.put(32'h2C, 32'h2000);
    prog.put(32'h40, OP_XOM); prog.put(32'h44, 32'h800); prog.put(32'h48, 32'h1000);
    prog.put(32'h4C, HALT);
    prog.put(VEC, 32'h1000_3000); prog.put(VEC + 4, HALT);
    prog.put_key(32'h800, CKEY, KB);
    // Block 1: six lines at 0x1000; line 0 branches to line 3, line 3 back to line 1,
    // line 4 back to line 0 (evicted by then), EXOM in line 5.
    for (int i = 0; i < 36; i++) blk1.push_back(32'h2000_0000 | 32'(i));
    blk1[3]  = 32'hB000_1060;
    blk1[20] = 32'hB000_1020;
    blk1[26] = 32'hB000_1000;
    blk1[31] = OP_EXOM;
    prog.put_block(32'h1000, blk1, K0, 1'b0);
    for (int i = 0; i < 12; i++) blk2.push_back(32'h3000_0000 | 32'(i));
    prog.put_block(32'h2000, blk2, K0, 1'b1);
    prog.reset(32'h0);

    issue_ready = 1'b1; redirect = 1'b0; redirect_pc = '0; irq = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_enter == 3);
    irq_armed = 1'b1;
    wait (halted);
    repeat (5) @(posedge clk);

    checks++; if (n_enter != 3)   fail($sformatf("XOM entries %0d", n_enter));
    checks++; if (n_exom != 1)    fail($sformatf("EXOM exits %0d", n_exom));
    checks++; if (n_auth != 1)    fail($sformatf("authentication failures %0d", n_auth));
    checks++; if (n_irq != 1)     fail($sformatf("interrupt exits %0d", n_irq));
    checks++; if (n_restart == 0) fail("chain restart never happened");
    checks++; if (n_skip == 0)    fail("no intermediate line decrypted");
    checks++; if (n_xhit == 0)    fail("no XOM line hit in the cache");
    checks++; if (n_key != 3)     fail($sformatf("key requests %0d", n_key));
    checks++; if (!scan_allow)    fail("scan locked after exit");
    $display("entries %0d exom %0d auth %0d irq %0d restarts %0d skipped-line decrypts %0d xom hits %0d issued %0d",
             n_enter, n_exom, n_auth, n_irq, n_restart, n_skip, n_xhit, issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
