// session_key_cache: cache of decrypted XOM session keys.
//
// Public-key decryption of a session key costs over a million cycles, while one program
// normally uses a single session key for all its XOM entries. This small fully
// associative cache remembers the plaintext session key for each encrypted key already
// decrypted, so only the first entry into a program's XOM code pays for RSA. The whole
// encrypted key is the tag; replacement is round robin. Entry count, tag and policy are
// this design's choices.
//
// Interface: lookup_key_i is compared with every valid tag combinationally, giving
// hit_o and hit_data_o in the same cycle. fill_i writes fill_key_i/fill_data_i into the
// next entry of the round-robin pointer at the clock edge. Entries are never exposed
// other than through a matching lookup.
module session_key_cache #(
  parameter int unsigned KEY_BITS = 1024,
  parameter int unsigned SK_BITS  = 120,
  parameter int unsigned ENTRIES  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [KEY_BITS-1:0] lookup_key_i,
  output logic                hit_o,
  output logic [SK_BITS-1:0]  hit_data_o,
  input  logic                fill_i,
  input  logic [KEY_BITS-1:0] fill_key_i,
  input  logic [SK_BITS-1:0]  fill_data_i
);

  localparam int unsigned PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [KEY_BITS-1:0] tag_q  [ENTRIES];
  logic [SK_BITS-1:0]  data_q [ENTRIES];
  logic [ENTRIES-1:0]  valid_q;
  logic [PW-1:0]       ptr_q;

  always_comb begin
    hit_o      = 1'b0;
    hit_data_o = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && tag_q[i] == lookup_key_i) begin
        hit_o      = 1'b1;
        hit_data_o = data_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      ptr_q   <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag_q[i]  <= '0;
        data_q[i] <= '0;
      end
    end else if (fill_i) begin
      tag_q[ptr_q]   <= fill_key_i;
      data_q[ptr_q]  <= fill_data_i;
      valid_q[ptr_q] <= 1'b1;
      ptr_q          <= (ptr_q == PW'(ENTRIES - 1)) ? '0 : ptr_q + PW'(1);
    end
  end

endmodule
