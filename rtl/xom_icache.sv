// xom_icache: L1 instruction cache with XOM tags.
//
// Direct mapped, one line per set. Each line carries a valid tag and an XOM tag saying
// whether it was filled through the decryption path. A lookup hits only when the line
// is valid, its address tag matches and its XOM tag equals the current mode: plaintext
// decrypted for XOM code is never fetched in normal mode, and ciphertext fetched in
// normal mode is never executed as XOM code. The flush pulse of an XOM exit invalidates
// every XOM-tagged line in one cycle. Size and organisation are this design's choices.
//
// Interface: combinational lookup (addr_i, xom_mode_i -> hit_o, line_o); fill_i writes
// fill_line_i for fill_addr_i with XOM tag fill_xom_i at the clock edge. Addresses are
// byte addresses; the low log2(LINE_BITS/8) bits select a byte in the line.
module xom_icache #(
  parameter int unsigned SETS      = 64,
  parameter int unsigned LINE_BITS = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 xom_mode_i,
  input  logic                 flush_i,
  input  logic [31:0]          addr_i,
  output logic                 hit_o,
  output logic [LINE_BITS-1:0] line_o,
  input  logic                 fill_i,
  input  logic [31:0]          fill_addr_i,
  input  logic [LINE_BITS-1:0] fill_line_i,
  input  logic                 fill_xom_i
);

  localparam int unsigned OFS = $clog2(LINE_BITS / 8);
  localparam int unsigned IDX = $clog2(SETS);
  localparam int unsigned TAG = 32 - OFS - IDX;

  logic [LINE_BITS-1:0] data_q [SETS];
  logic [TAG-1:0]       tag_q  [SETS];
  logic [SETS-1:0]      valid_q, xom_q;

  logic [IDX-1:0] idx, fidx;
  assign idx  = addr_i[OFS +: IDX];
  assign fidx = fill_addr_i[OFS +: IDX];

  assign hit_o  = valid_q[idx] && tag_q[idx] == addr_i[31 -: TAG] && xom_q[idx] == xom_mode_i;
  assign line_o = data_q[idx];

  always_ff @(posedge clk) begin
    if (fill_i) begin
      data_q[fidx] <= fill_line_i;
      tag_q[fidx]  <= fill_addr_i[31 -: TAG];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      xom_q   <= '0;
    end else begin
      if (flush_i) valid_q <= valid_q & ~xom_q;
      if (fill_i) begin
        valid_q[fidx] <= 1'b1;
        xom_q[fidx]   <= fill_xom_i;
      end
    end
  end

endmodule
