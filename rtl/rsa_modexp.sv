// rsa_modexp: modular exponentiation m = c^d mod n for RSA decryption.
//
// Left-to-right binary exponentiation on one rsa_modmul: the result starts at 1 and,
// for every exponent bit from the most significant down, is squared and, when the bit
// is one, multiplied by c. All KEY_BITS exponent bits are processed, leading zeros
// included. Each modular product takes KEY_BITS + 2 cycles, so a decryption takes
// (KEY_BITS + popcount(d)) * (KEY_BITS + 2) + KEY_BITS + 1 cycles from start_i to
// done_o: some 1.6 million for a 1024-bit
// key with a balanced exponent, inside the one-to-two-million-cycle range expected for
// 1024-bit RSA. The algorithm is this design's choice.
//
// Interface: start_i starts with c_i, d_i, n_i held stable until done_o; done_o pulses
// for one cycle with m_o. n must have its top bit set (a full-length modulus) and c < 2n;
// c is reduced once below n before the loop.
module rsa_modexp #(
  parameter int unsigned KEY_BITS = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  logic [KEY_BITS-1:0] c_i,
  input  logic [KEY_BITS-1:0] d_i,
  input  logic [KEY_BITS-1:0] n_i,
  output logic                busy_o,
  output logic                done_o,
  output logic [KEY_BITS-1:0] m_o
);

  localparam int unsigned CW = $clog2(KEY_BITS + 1);

  typedef enum logic [2:0] {S_IDLE, S_SQ, S_SQ_WAIT, S_MUL, S_MUL_WAIT, S_NEXT} state_e;

  state_e              state_q;
  logic [KEY_BITS-1:0] r_q, c_q, mm_a, mm_b, mm_p;
  logic [CW-1:0]       bit_q;
  logic                mm_start, mm_busy, mm_done;

  rsa_modmul #(.KEY_BITS(KEY_BITS)) u_mul (
    .clk, .rst_n,
    .start_i (mm_start),
    .a_i     (mm_a),
    .b_i     (mm_b),
    .n_i     (n_i),
    .busy_o  (mm_busy),
    .done_o  (mm_done),
    .p_o     (mm_p)
  );

  assign mm_start = (state_q == S_SQ) || (state_q == S_MUL);
  assign mm_a     = r_q;
  assign mm_b     = (state_q == S_MUL || state_q == S_MUL_WAIT) ? c_q : r_q;
  assign busy_o   = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      r_q     <= '0;
      c_q     <= '0;
      bit_q   <= '0;
      done_o  <= 1'b0;
      m_o     <= '0;
    end else begin
      done_o <= 1'b0;
      case (state_q)
        S_IDLE: if (start_i) begin
          r_q     <= KEY_BITS'(1);
          c_q     <= (c_i >= n_i) ? c_i - n_i : c_i;
          bit_q   <= CW'(KEY_BITS - 1);
          state_q <= S_SQ;
        end
        S_SQ:      state_q <= S_SQ_WAIT;
        S_SQ_WAIT: if (mm_done) begin
          r_q     <= mm_p;
          state_q <= d_i[bit_q] ? S_MUL : S_NEXT;
        end
        S_MUL:      state_q <= S_MUL_WAIT;
        S_MUL_WAIT: if (mm_done) begin
          r_q     <= mm_p;
          state_q <= S_NEXT;
        end
        S_NEXT: begin
          if (bit_q == '0) begin
            done_o  <= 1'b1;
            m_o     <= r_q;
            state_q <= S_IDLE;
          end else begin
            bit_q   <= bit_q - CW'(1);
            state_q <= S_SQ;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The multiplier is only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) mm_start |-> !mm_busy);

endmodule
