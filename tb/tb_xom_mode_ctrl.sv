// tb_xom_mode_ctrl: entry, the ordered exit sequence and the scan lock.
//
// Checks that entry sets the mode bit, that an exit waits for pending writes, pulses
// flush exactly once, waits for the data cache's flush-done, then clears the bit and
// reports the cause; that scan is refused in XOM mode; and that requests in the wrong
// mode are ignored.
module tb_xom_mode_ctrl;
  import xom_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enter, exit_req, wp, dc_done, mode, flush, done, scan;
  exit_cause_e cause, last;
  xom_mode_ctrl dut (.clk, .rst_n, .enter_i(enter), .exit_i(exit_req), .exit_cause_i(cause),
                     .writes_pending_i(wp), .dc_flush_done_i(dc_done), .xom_mode_o(mode),
                     .flush_o(flush), .exit_done_o(done), .last_cause_o(last),
                     .scan_allow_o(scan));

  int unsigned checks = 0, failures = 0, nflush = 0;
  always @(posedge clk) if (flush) nflush++;

  task automatic check(string s, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_enter();
    @(negedge clk); enter = 1'b1; @(negedge clk); enter = 1'b0;
  endtask

  initial begin
    enter = 0; exit_req = 0; wp = 0; dc_done = 0; cause = EXIT_EXOM;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("normal after reset", !mode && scan);
    // Exit in normal mode is ignored.
    exit_req = 1'b1; @(negedge clk); exit_req = 1'b0;
    repeat (3) @(negedge clk);
    check("exit ignored in normal mode", !mode && nflush == 0);
    for (int c = 0; c < 3; c++) begin
      pulse_enter();
      check("mode set", mode && !scan);
      // Exit with writes pending: no flush until they drain.
      wp = 1'b1; cause = exit_cause_e'(c);
      exit_req = 1'b1; @(negedge clk); exit_req = 1'b0;
      repeat (5) @(negedge clk);
      check("waits for pending writes", mode && nflush == c);
      wp = 1'b0;
      repeat (3) @(negedge clk);
      check("one flush pulse", nflush == c + 1);
      check("still in XOM until data cache done", mode && !scan);
      dc_done = 1'b1; @(negedge clk); dc_done = 1'b0;
      check("exit done", done);
      @(negedge clk);
      check("mode cleared", !mode && scan);
      check("cause recorded", last == exit_cause_e'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
