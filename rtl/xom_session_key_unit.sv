// xom_session_key_unit: XOM session key decryption unit.
//
// On entry to XOM mode the fetch unit hands over the encrypted session key read from
// KAddr (the whole key at once). The unit decrypts it with the chip's RSA private key
// (m = c^D mod N) and returns the 120-bit DESX session key, the low 120 bits of m, which
// goes to the instruction decryption unit. Decrypted keys are kept in a session key
// cache: a key seen before is returned two cycles after the request instead of after
// the 1.6 million cycles of RSA. The private key is held as constants (parameters whose
// defaults come from xom_key_pkg) and has no read path.
//
// Interface: req_i (one cycle, req_key_i held until done_o) starts a request; done_o
// pulses with key_o and hit_o (1 when served from the cache). busy_o is high from the
// request until done_o. Taking the key from the low bits of the RSA plaintext, without a
// padding check, is this design's choice.
module xom_session_key_unit
  import xom_pkg::*;
#(
  parameter int unsigned         KEY_BITS      = 1024,
  parameter int unsigned         CACHE_ENTRIES = 4,
  parameter logic [KEY_BITS-1:0] RSA_N         = KEY_BITS'(xom_key_pkg::RSA_N),
  parameter logic [KEY_BITS-1:0] RSA_D         = KEY_BITS'(xom_key_pkg::RSA_D)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_i,
  input  logic [KEY_BITS-1:0] req_key_i,
  output logic                busy_o,
  output logic                done_o,
  output logic                hit_o,
  output desx_key_t           key_o
);

  localparam int unsigned SK_BITS = $bits(desx_key_t);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_RSA} state_e;

  state_e              state_q;
  logic                c_hit, exp_start, exp_busy, exp_done;
  logic [SK_BITS-1:0]  c_data;
  logic [KEY_BITS-1:0] exp_m;

  session_key_cache #(.KEY_BITS(KEY_BITS), .SK_BITS(SK_BITS), .ENTRIES(CACHE_ENTRIES)) u_cache (
    .clk, .rst_n,
    .lookup_key_i (req_key_i),
    .hit_o        (c_hit),
    .hit_data_o   (c_data),
    .fill_i       (exp_done),
    .fill_key_i   (req_key_i),
    .fill_data_i  (exp_m[SK_BITS-1:0])
  );

  rsa_modexp #(.KEY_BITS(KEY_BITS)) u_rsa (
    .clk, .rst_n,
    .start_i (exp_start),
    .c_i     (req_key_i),
    .d_i     (RSA_D),
    .n_i     (RSA_N),
    .busy_o  (exp_busy),
    .done_o  (exp_done),
    .m_o     (exp_m)
  );

  assign exp_start = (state_q == S_LOOKUP) && !c_hit;
  assign busy_o    = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done_o  <= 1'b0;
      hit_o   <= 1'b0;
      key_o   <= '0;
    end else begin
      done_o <= 1'b0;
      case (state_q)
        S_IDLE:   if (req_i) state_q <= S_LOOKUP;
        S_LOOKUP: begin
          if (c_hit) begin
            done_o  <= 1'b1;
            hit_o   <= 1'b1;
            key_o   <= c_data;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_RSA;
          end
        end
        S_RSA: if (exp_done) begin
          done_o  <= 1'b1;
          hit_o   <= 1'b0;
          key_o   <= exp_m[SK_BITS-1:0];
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) exp_start |-> !exp_busy);

endmodule
