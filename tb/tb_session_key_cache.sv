// tb_session_key_cache: hits, misses and round-robin replacement of the key cache.
module tb_session_key_cache;
  localparam int unsigned K = 64, S = 16, E = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         hit, fill;
  logic [K-1:0] lk, fk;
  logic [S-1:0] hd, fd;
  session_key_cache #(.KEY_BITS(K), .SK_BITS(S), .ENTRIES(E)) dut (
    .clk, .rst_n, .lookup_key_i(lk), .hit_o(hit), .hit_data_o(hd), .fill_i(fill),
    .fill_key_i(fk), .fill_data_i(fd));

  int unsigned checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(logic [K-1:0] k, logic eh, logic [S-1:0] ed);
    @(negedge clk);
    lk = k;
    #1;
    checks++;
    if (hit !== eh || (eh && hd !== ed)) begin
      failures++; $display("FAIL lookup %h: hit %b data %h expected %b %h", k, hit, hd, eh, ed);
    end
  endtask

  initial begin
    logic [K-1:0] keys [8];
    logic [S-1:0] vals [8];
    fill = 0; lk = '0; fk = '0; fd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin keys[i] = {$urandom, $urandom}; vals[i] = S'($urandom); end
    look(keys[0], 1'b0, '0);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      fill = 1'b1; fk = keys[i]; fd = vals[i];
      @(negedge clk);
      fill = 1'b0;
      // The last E keys filled are present, older ones replaced.
      for (int j = 0; j <= i; j++) look(keys[j], (i - j) < E, vals[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
