// rsa_modmul: bit-serial modular multiplier, p = a * b mod n.
//
// Interleaved (shift-and-add) multiplication: the partial result r starts at zero and,
// for each bit of a from the most significant down, becomes 2r + a_i * b, brought back
// below n by at most two conditional subtractions of n. One bit is handled per clock,
// so done_o rises KEY_BITS + 1 clock edges after the edge that samples start_i.
// The multiplier's radix and structure are this design's choice; the architecture only
// asks for an RSA decryption unit of reasonable size.
//
// Interface: start_i (one cycle, with a_i, b_i, n_i stable until done_o) starts a
// product; done_o pulses for one cycle with p_o valid; busy_o is high in between.
// Operands must satisfy b < n; a may be any KEY_BITS value.
module rsa_modmul #(
  parameter int unsigned KEY_BITS = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  logic [KEY_BITS-1:0] a_i,
  input  logic [KEY_BITS-1:0] b_i,
  input  logic [KEY_BITS-1:0] n_i,
  output logic                busy_o,
  output logic                done_o,
  output logic [KEY_BITS-1:0] p_o
);

  localparam int unsigned CW = $clog2(KEY_BITS + 1);

  logic [KEY_BITS+1:0] r_q, t0, t1, t2, n_ext;
  logic [CW-1:0]       bit_q;     // index of the bit of a handled this cycle
  logic                a_bit;

  assign n_ext = {2'b00, n_i};
  assign a_bit = a_i[bit_q];

  always_comb begin
    t0 = {r_q[KEY_BITS:0], 1'b0} + (a_bit ? {2'b00, b_i} : '0);
    t1 = (t0 >= n_ext) ? t0 - n_ext : t0;
    t2 = (t1 >= n_ext) ? t1 - n_ext : t1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q    <= '0;
      bit_q  <= '0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
      p_o    <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        r_q    <= '0;
        bit_q  <= CW'(KEY_BITS - 1);
        busy_o <= 1'b1;
      end else if (busy_o) begin
        r_q <= t2;
        if (bit_q == '0) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
          p_o    <= t2[KEY_BITS-1:0];
        end else begin
          bit_q <= bit_q - CW'(1);
        end
      end
    end
  end

endmodule
