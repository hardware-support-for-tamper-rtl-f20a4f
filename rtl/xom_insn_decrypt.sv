// xom_insn_decrypt: XOM instruction decryption unit (DESX, MAC check, CBC chaining).
//
// In XOM mode every instruction line fetched from the board-level cache passes through
// this unit before it is written into the L1 instruction cache. A line holds W = 4
// 64-bit words (two instructions each); the last word is the line's 64-bit MAC. Each
// word is decrypted with DESX: P = K1 ^ DES_decrypt_K(C ^ K2), with the 120-bit session
// key split into a 56-bit DES key K and a 64-bit whitening key K1; K2 is taken equal to
// K1 here, since the derivation of the second whitening key is this design's choice.
//
// Pipeline, one register per step, 19 registers per word:
//   stage 1      xor K2 and initial permutation
//   stages 2-17  the sixteen DES rounds (des_round), round keys in reverse order
//   stage 18     final permutation and xor K1
//   stage 19     MAC stage: hash update, or for the MAC word the compare and next key
// The words of one line enter on consecutive cycles. The line's plaintext leaves with
// the two MAC instruction slots replaced by NOPs, so instruction addresses are kept.
// The hash is h = rotl(h, 8) ^ word over the three plaintext words, starting at zero,
// and the line is authentic when the decrypted MAC equals h (this hash is this design's
// choice; the architecture only asks for a MAC check). Cipher-block chaining: once an
// authentic line is done, the key for the next line becomes K ^ MAC[63:8], K1 ^ MAC.
// Because of that dependence a new line is accepted only after the previous line has
// left the pipeline: a line of W words takes W + 18 cycles from acceptance to out_valid.
//
// Interface: key_load_i loads a new session key (and restarts the chain from it);
// restart_i returns the chain to the session key; clear_i erases both keys (XOM exit).
// in_valid_i/in_ready_o accept a ciphertext line; out_valid_o is a one-cycle pulse
// with out_line_o and out_auth_ok_o.
module xom_insn_decrypt
  import des_pkg::*;
  import xom_pkg::*;
#(
  parameter int unsigned LINE_BITS    = 256,
  parameter int unsigned PIPE_LATENCY = 19   // registers per word; fixed by the structure
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_load_i,
  input  desx_key_t            key_i,
  input  logic                 restart_i,
  input  logic                 clear_i,
  input  logic                 in_valid_i,
  output logic                 in_ready_o,
  input  logic [LINE_BITS-1:0] in_line_i,
  output logic                 out_valid_o,
  output logic [LINE_BITS-1:0] out_line_o,
  output logic                 out_auth_ok_o
);

  localparam int unsigned W  = LINE_BITS / 64;
  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned NS = 18;                   // stages before the MAC stage

  initial begin
    assert (PIPE_LATENCY == NS + 1) else $error("PIPE_LATENCY must be 19");
    assert (W >= 2 && LINE_BITS % 64 == 0) else $error("LINE_BITS must be a multiple of 64, >= 128");
  end

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;

  state_e               state_q;
  desx_key_t            sess_key_q, cur_key_q;
  logic [LINE_BITS-1:0] in_buf_q;
  logic [IW-1:0]        issue_idx_q;
  logic [63:0]          hash_q;
  logic [LINE_BITS-1:0] out_buf_q;

  // Pipeline registers: data, valid and word index per stage (index 1..NS used).
  block_t               st_d [NS+1];
  logic                 st_v [NS+1];
  logic [IW-1:0]        st_i [NS+1];

  // Round keys from the current chain key; pure wiring of the key schedule.
  subkeys_t             ks;
  assign ks = des_subkeys(des_key56_to_64(cur_key_q.k));

  // Word entering stage 1 this cycle.
  logic                 issue;
  logic [IW-1:0]        issue_idx;
  block_t               issue_word;

  always_comb begin
    issue      = 1'b0;
    issue_idx  = '0;
    issue_word = in_line_i[63:0];
    if (state_q == S_IDLE && in_valid_i) begin
      issue = 1'b1;
    end else if (state_q == S_ISSUE) begin
      issue      = 1'b1;
      issue_idx  = issue_idx_q;
      issue_word = in_buf_q[64*issue_idx_q +: 64];
    end
  end

  assign in_ready_o = (state_q == S_IDLE) && !key_load_i && !restart_i && !clear_i;

  // Rounds 1..16 between stage r and stage r+1.
  block_t round_out [16];
  for (genvar r = 0; r < 16; r++) begin : g_round
    des_round u_round (
      .blk_i    (st_d[r+1]),
      .subkey_i (ks[15-r]),
      .blk_o    (round_out[r])
    );
  end

  // Stage 18 result as seen by the MAC stage.
  block_t plain;
  assign plain = st_d[NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= NS; s++) begin
        st_v[s] <= 1'b0;
        st_d[s] <= '0;
        st_i[s] <= '0;
      end
    end else begin
      st_v[1] <= issue && !clear_i;
      st_i[1] <= issue_idx;
      st_d[1] <= des_ip(issue_word ^ cur_key_q.k1);
      for (int r = 0; r < 16; r++) begin
        st_v[r+2] <= st_v[r+1] && !clear_i;
        st_i[r+2] <= st_i[r+1];
        st_d[r+2] <= round_out[r];
      end
      st_v[NS] <= st_v[NS-1] && !clear_i;
      st_i[NS] <= st_i[NS-1];
      st_d[NS] <= des_fp({st_d[NS-1][31:0], st_d[NS-1][63:32]}) ^ cur_key_q.k1;
    end
  end

  // Control, MAC stage and key chain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      sess_key_q    <= '0;
      cur_key_q     <= '0;
      in_buf_q      <= '0;
      issue_idx_q   <= '0;
      hash_q        <= '0;
      out_buf_q     <= '0;
      out_line_o    <= '0;
      out_valid_o   <= 1'b0;
      out_auth_ok_o <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      if (clear_i) begin
        state_q    <= S_IDLE;
        sess_key_q <= '0;
        cur_key_q  <= '0;
        in_buf_q   <= '0;
        hash_q     <= '0;
        out_buf_q  <= '0;
        out_line_o <= '0;
      end else if (key_load_i) begin
        sess_key_q <= key_i;
        cur_key_q  <= key_i;
      end else if (restart_i) begin
        cur_key_q <= sess_key_q;
      end else begin
        case (state_q)
          S_IDLE: if (in_valid_i) begin
            in_buf_q    <= in_line_i;
            issue_idx_q <= IW'(1);
            hash_q      <= '0;
            state_q     <= S_ISSUE;
          end
          S_ISSUE: begin
            issue_idx_q <= issue_idx_q + IW'(1);
            if (issue_idx_q == IW'(W - 1)) state_q <= S_DRAIN;
          end
          default: ;
        endcase

        if (st_v[NS]) begin
          if (st_i[NS] != IW'(W - 1)) begin
            hash_q                         <= {hash_q[55:0], hash_q[63:56]} ^ plain;
            out_buf_q[64*st_i[NS] +: 64]   <= plain;
          end else begin
            out_valid_o   <= 1'b1;
            out_auth_ok_o <= (plain == hash_q);
            out_line_o    <= {{2{INSN_NOP}}, out_buf_q[LINE_BITS-65:0]};
            if (plain == hash_q) begin
              cur_key_q.k  <= cur_key_q.k ^ plain[63:8];
              cur_key_q.k1 <= cur_key_q.k1 ^ plain;
            end
            state_q <= S_IDLE;
          end
        end
      end
    end
  end

endmodule
