// tb_xom_top: the whole XOM design end to end, at its default parameters.
//
// A host model stands in for the core: it takes issued instructions, checks each one
// against the reference model of xom_tb_pkg, redirects fetch after taken branches and
// performs "action" instructions (top byte C1: register write, C2: XRAM store, C3: data
// cache store). The testbench encrypts a random 120-bit session key with the chip's
// public key (N from xom_key_pkg, e = 65537) using wide arithmetic, so the 1024-bit RSA
// decryption in the design must recover it. The program enters XOM three times:
//   1. a 66-line block: a forward branch (intermediate lines decrypted), a backward
//      branch to a line evicted from the 64-set cache (chain restart), register, XRAM
//      and data cache stores, and EXOM right after a store (exit waits for the write);
//   2. a block whose first line is tampered (authentication failure);
//   3. block 1 again (session key from the key cache), ended by an interrupt.
// After every exit it checks that XOM registers read invalid and zero while a register
// written in normal mode survives, that XRAM refuses access, and that the stores made
// in XOM mode reached memory. Every mechanism is counted and must have happened.
module tb_xom_top;
  import des_pkg::*;
  import xom_pkg::*;
  import xom_tb_pkg::*;

  localparam logic [31:0] VEC  = 32'h0000_3000;
  localparam logic [31:0] DBAS = 32'h0000_4000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          issue_valid, issue_ready, redirect, irq, irq_taken, auth_fail, wpend;
  logic [31:0]   issue_insn, issue_pc, redirect_pc;
  logic          xom_mode, flush_xom, scan_allow, key_done, key_hit;
  exit_cause_e   last_cause;
  logic          rf_we, rv0, rv1;
  logic [4:0]    rf_wa, rf_ra0, rf_ra1;
  logic [31:0]   rf_wd, rd0, rd1;
  logic          dc_req, dc_we, dc_ack;
  logic [31:0]   dc_addr, dc_wd, dc_rd;
  logic          xr_req, xr_we, xr_ack, xr_fault;
  logic [7:0]    xr_addr;
  logic [31:0]   xr_wd, xr_rd;
  logic          imem_req, imem_ack, dmem_req, dmem_we, dmem_ack;
  logic [31:0]   imem_addr, dmem_addr;
  logic [255:0]  imem_line;
  logic [127:0]  dmem_wd, dmem_rd;

  xom_top dut (
    .clk, .rst_n,
    .issue_valid_o(issue_valid), .issue_insn_o(issue_insn), .issue_pc_o(issue_pc),
    .issue_ready_i(issue_ready), .redirect_i(redirect), .redirect_pc_i(redirect_pc),
    .irq_i(irq), .irq_vector_i(VEC), .irq_taken_o(irq_taken), .auth_fail_o(auth_fail),
    .writes_pending_i(wpend), .xom_mode_o(xom_mode), .flush_xom_o(flush_xom),
    .scan_allow_o(scan_allow), .last_exit_cause_o(last_cause), .key_done_o(key_done),
    .key_hit_o(key_hit),
    .rf_we_i(rf_we), .rf_waddr_i(rf_wa), .rf_wdata_i(rf_wd), .rf_raddr0_i(rf_ra0),
    .rf_rdata0_o(rd0), .rf_rvalid0_o(rv0), .rf_raddr1_i(rf_ra1), .rf_rdata1_o(rd1),
    .rf_rvalid1_o(rv1),
    .dc_req_i(dc_req), .dc_we_i(dc_we), .dc_addr_i(dc_addr), .dc_wdata_i(dc_wd),
    .dc_ack_o(dc_ack), .dc_rdata_o(dc_rd),
    .xr_req_i(xr_req), .xr_we_i(xr_we), .xr_addr_i(xr_addr), .xr_wdata_i(xr_wd),
    .xr_ack_o(xr_ack), .xr_fault_o(xr_fault), .xr_rdata_o(xr_rd),
    .imem_req_o(imem_req), .imem_addr_o(imem_addr), .imem_ack_i(imem_ack),
    .imem_line_i(imem_line),
    .dmem_req_o(dmem_req), .dmem_we_o(dmem_we), .dmem_addr_o(dmem_addr),
    .dmem_wdata_o(dmem_wd), .dmem_ack_i(dmem_ack), .dmem_rdata_i(dmem_rd));

  xom_prog     prog;
  desx_key_t   K0;
  int unsigned checks = 0, failures = 0, issued = 0, xom_issued = 0, cyc = 0;
  int unsigned n_enter = 0, n_exom = 0, n_auth = 0, n_irq = 0, n_restart = 0, n_skip = 0;
  int unsigned n_xhit = 0, n_rsa = 0, n_khit = 0, n_stall = 0, n_flush_wb = 0, n_exit = 0;
  int unsigned t_key_req = 0, rsa_cycles = 0;
  bit          halted = 0, irq_armed = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s (cycle %0d)", s, cyc);
  endtask

  // Board-level cache, instruction side: three cycles per line.
  int unsigned iw = 0;
  always @(posedge clk) if (imem_req && !imem_ack) iw <= iw + 1; else iw <= 0;
  assign imem_ack  = imem_req && iw == 3;
  assign imem_line = prog.line(imem_addr);

  // Board-level cache, data side: two cycles per line.
  logic [127:0] dmem [logic [31:0]];
  int unsigned  dw = 0;
  always @(posedge clk) begin
    if (dmem_req && !dmem_ack) dw <= dw + 1; else dw <= 0;
    if (dmem_ack && dmem_we) begin
      dmem[dmem_addr] = dmem_wd;
      if (dut.u_dcache.state_q == 3'd4) n_flush_wb++;
    end
  end
  assign dmem_ack = dmem_req && dw == 2;
  assign dmem_rd  = dmem.exists(dmem_addr) ? dmem[dmem_addr] : '0;

  // Host actions, performed in order by a worker.
  logic [31:0] actq [$];
  bit          worker_busy = 0;
  assign wpend = (actq.size() != 0) || worker_busy;

  always @(negedge clk) if (rst_n) begin
    if (!worker_busy && actq.size() != 0) begin
      automatic logic [31:0] a = actq.pop_front();
      worker_busy = 1;
      case (a[31:24])
        8'hC1: begin
          rf_we = 1'b1; rf_wa = a[20:16]; rf_wd = {16'h0, a[15:0]};
          @(negedge clk); rf_we = 1'b0;
        end
        8'hC2: begin
          xr_req = 1'b1; xr_we = 1'b1; xr_addr = a[23:16]; xr_wd = {16'h0, a[15:0]};
          @(negedge clk); xr_req = 1'b0;
        end
        default: begin
          dc_req = 1'b1; dc_we = 1'b1; dc_addr = DBAS + 32'(4 * a[23:16]);
          dc_wd = {16'h0, a[15:0]};
          do @(negedge clk); while (!dc_ack);
          dc_req = 1'b0;
        end
      endcase
      worker_busy = 0;
    end
  end

  // Issue checking, branch redirect and event counting.
  logic        br_pend = 1'b0;
  logic [31:0] br_tgt;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (issue_valid && issue_ready) begin
      checks++;
      if (issue_pc !== prog.pc || issue_insn !== prog.expect_insn())
        fail($sformatf("issued %h at %h, expected %h at %h", issue_insn, issue_pc,
                       prog.expect_insn(), prog.pc));
      issued++;
      if (xom_mode) xom_issued++;
      if (issue_insn == HALT) halted = 1'b1;
      if (issue_insn[31:28] == 4'hC) actq.push_back(issue_insn);
      if (prog.step()) begin br_pend <= 1'b1; br_tgt <= {4'h0, issue_insn[27:0]}; end
    end
    if (irq_taken) begin n_irq++; prog.interrupt(VEC); end
    if (auth_fail) n_auth++;
    if (dut.u_fetch.enter_o) n_enter++;
    if (dut.u_fetch.exit_o && dut.u_fetch.exit_cause_o == EXIT_EXOM) n_exom++;
    if (dut.u_fetch.dec_restart_o) n_restart++;
    if (dut.u_fetch.ic_fill_o && xom_mode && dut.u_fetch.ic_fill_addr_o != {dut.u_fetch.pc_q[31:5], 5'd0})
      n_skip++;
    if (xom_mode && dut.u_fetch.ic_hit_i && !dut.u_fetch.win_hit && dut.u_fetch.state_q == 0) n_xhit++;
    if (dut.u_mode.state_q == 3'd2 && wpend) n_stall++;
    if (dut.u_fetch.key_req_o) t_key_req = cyc;
    if (key_done) begin
      if (key_hit) n_khit++;
      else begin n_rsa++; rsa_cycles = cyc - t_key_req; end
    end
  end

  always @(negedge clk) begin
    redirect <= 1'b0;
    if (br_pend) begin redirect <= 1'b1; redirect_pc <= br_tgt; br_pend <= 1'b0; end
    irq <= irq_armed && xom_mode && xom_issued > 1200;
  end

  // After every exit: XOM state gone, normal state kept, XOM stores in memory.
  always @(negedge xom_mode) if (rst_n) begin
    n_exit++;
    rf_ra0 = 5'd5; rf_ra1 = 5'd1;
    #1;
    checks++; if (rv0 || rd0 != 0) fail("XOM register still readable after exit");
    checks++; if (!rv1 || rd1 != 32'h1111) fail("normal-mode register lost");
    rf_ra0 = 5'd6;
    #1;
    checks++; if (rv0 || rd0 != 0) fail("second XOM register still readable after exit");
    checks++; if (!scan_allow) fail("scan still locked after exit");
    if (n_exit == 1) begin
      checks++;
      if (!dmem.exists(DBAS) || dmem[DBAS][32*3 +: 32] != 32'h7777 || dmem[DBAS + 16][32*1 +: 32] != 32'h9999)
        fail("XOM data stores not written back at exit");
    end
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired: pc %h state %0d entries %0d", dut.u_fetch.pc_q, dut.u_fetch.state_q, n_enter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // c = m^65537 mod N with the public key.
  function automatic logic [1023:0] rsa_enc(logic [1023:0] m);
    logic [2047:0] r, b, n;
    n = {1024'h0, xom_key_pkg::RSA_N};
    b = {1024'h0, m};
    r = b;
    for (int i = 0; i < 16; i++) r = (r * r) % n;
    r = (r * b) % n;
    return r[1023:0];
  endfunction

  initial begin
    logic [31:0] blk1[$], blk2[$];
    prog = new();
    K0   = '{k: {$urandom, 24'($urandom)}, k1: {$urandom, $urandom}};
    // Plain code: a normal-mode register write, then three XOM entries.
    for (int i = 0; i < 64; i++) prog.put(32'(4*i), 32'h1000_0000 | 32'(4*i));
    prog.put(32'h04, 32'hC101_1111);
    prog.put(32'h08, OP_XOM); prog.put(32'h0C, 32'h800); prog.put(32'h10, 32'h1000);
    prog.put(32'h24, OP_XOM); prog.put(32'h28, 32'h800); prog.put(32'h2C, 32'h8000);
    prog.put(32'h40, OP_XOM); prog.put(32'h44, 32'h800); prog.put(32'h48, 32'h1000);
    prog.put(32'h4C, HALT);
    prog.put(VEC, 32'h1000_3000); prog.put(VEC + 4, HALT);
    prog.put_key(32'h800, rsa_enc(1024'(K0)), 1024);
    // Block 1: 66 lines from 0x1000. Line 64 (0x1800) shares a cache set with line 0.
    for (int i = 0; i < 66 * 6; i++) blk1.push_back(32'h2000_0000 | 32'(i));
    blk1[1]   = 32'hC105_AAAA;                 // r5  = AAAA
    blk1[2]   = 32'hC203_5555;                 // XRAM[3] = 5555
    blk1[4]   = 32'hC303_7777;                 // mem[DBAS + 12] = 7777
    blk1[5]   = 32'hB000_1060;                 // forward to line 3
    blk1[20]  = 32'hB000_1020;                 // back to line 1
    blk1[64*6+1] = 32'hB000_1000;              // from line 64 back to evicted line 0
    blk1[65*6]   = 32'hC106_BBBB;              // r6 = BBBB
    blk1[65*6+1] = 32'hC305_9999;              // mem[DBAS + 20] = 9999
    blk1[65*6+2] = OP_EXOM;
    prog.put_block(32'h1000, blk1, K0, 1'b0);
    for (int i = 0; i < 12; i++) blk2.push_back(32'h3000_0000 | 32'(i));
    prog.put_block(32'h8000, blk2, K0, 1'b1);
    prog.reset(32'h0);

    issue_ready = 1'b1; redirect = 1'b0; redirect_pc = '0; irq = 1'b0;
    rf_we = 0; rf_wa = '0; rf_wd = '0; rf_ra0 = '0; rf_ra1 = '0;
    dc_req = 0; dc_we = 0; dc_addr = '0; dc_wd = '0;
    xr_req = 0; xr_we = 0; xr_addr = '0; xr_wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_enter == 3);
    irq_armed = 1'b1;
    wait (halted);
    repeat (10) @(posedge clk);
    // XRAM refuses access outside XOM mode.
    @(negedge clk); xr_req = 1'b1; xr_we = 1'b0; xr_addr = 8'd3;
    @(negedge clk); xr_req = 1'b0;
    checks++; if (!xr_fault || xr_rd != 0) fail("XRAM readable outside XOM mode");

    checks++; if (n_enter != 3)    fail($sformatf("XOM entries %0d", n_enter));
    checks++; if (n_exom != 1)     fail($sformatf("EXOM exits %0d", n_exom));
    checks++; if (n_auth != 1)     fail($sformatf("authentication failures %0d", n_auth));
    checks++; if (n_irq != 1)      fail($sformatf("interrupt exits %0d", n_irq));
    checks++; if (n_exit != 3)     fail($sformatf("exits %0d", n_exit));
    checks++; if (n_rsa != 1)      fail($sformatf("RSA decryptions %0d", n_rsa));
    checks++; if (n_khit != 2)     fail($sformatf("key cache hits %0d", n_khit));
    checks++; if (n_restart == 0)  fail("chain restart never happened");
    checks++; if (n_skip == 0)     fail("no intermediate line decrypted");
    checks++; if (n_xhit == 0)     fail("no XOM line hit in the cache");
    checks++; if (n_stall == 0)    fail("exit never waited for pending writes");
    checks++; if (n_flush_wb == 0) fail("no dirty XOM line written back at exit");
    checks++;
    if (rsa_cycles < 1_000_000 || rsa_cycles > 2_000_000)
      fail($sformatf("RSA took %0d cycles, outside one to two million", rsa_cycles));
    $display("entries %0d exom %0d auth %0d irq %0d restarts %0d skipped-line decrypts %0d",
             n_enter, n_exom, n_auth, n_irq, n_restart, n_skip);
    $display("xom cache hits %0d rsa %0d (%0d cycles) key cache hits %0d write stalls %0d flush write-backs %0d issued %0d",
             n_xhit, n_rsa, rsa_cycles, n_khit, n_stall, n_flush_wb, issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
