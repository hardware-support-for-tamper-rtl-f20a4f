// tb_xom_icache: hits, misses, the XOM tag match and the XOM flush.
//
// Fills random lines in normal and XOM mode and checks lookups against a model of a
// direct-mapped cache in which a hit also needs the line's XOM tag to equal the mode.
// After a flush only the lines filled in normal mode remain.
module tb_xom_icache;
  localparam int unsigned S = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         mode, flush, hit, fill, fxom;
  logic [31:0]  addr, faddr;
  logic [255:0] line, fline;
  xom_icache #(.SETS(S)) dut (.clk, .rst_n, .xom_mode_i(mode), .flush_i(flush), .addr_i(addr),
                              .hit_o(hit), .line_o(line), .fill_i(fill), .fill_addr_i(faddr),
                              .fill_line_i(fline), .fill_xom_i(fxom));

  int unsigned  checks = 0, failures = 0;
  bit           mv [S], mx [S];
  logic [31:0]  mt [S];
  logic [255:0] md [S];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(logic [31:0] a, logic m);
    int i = int'(a[7:5]);
    bit eh = mv[i] && mt[i] == {a[31:5], 5'd0} && mx[i] == m;
    mode = m; addr = a;
    #1;
    checks++;
    if (hit !== eh || (eh && line !== md[i])) begin
      failures++; $display("FAIL lookup %h mode %b: hit %b expected %b", a, m, hit, eh);
    end
  endtask

  initial begin
    mode = 0; flush = 0; fill = 0; fxom = 0; addr = '0; faddr = '0; fline = '0;
    for (int i = 0; i < S; i++) begin mv[i] = 0; mx[i] = 0; mt[i] = '0; md[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      automatic logic [31:0] a = {22'($urandom_range(3)), 10'($urandom)};
      @(negedge clk);
      lookup(a, 1'($urandom));
      lookup(a, ~mode);
      if ($urandom_range(2) == 0) begin
        automatic int i = int'(a[7:5]);
        fill = 1'b1; faddr = a; fxom = 1'($urandom); fline = {8{$urandom}};
        @(negedge clk);
        fill = 1'b0;
        mv[i] = 1; mx[i] = fxom; mt[i] = {a[31:5], 5'd0}; md[i] = fline;
      end
      if (n % 50 == 49) begin
        @(negedge clk);
        flush = 1'b1;
        @(negedge clk);
        flush = 1'b0;
        for (int i = 0; i < S; i++) if (mx[i]) mv[i] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
