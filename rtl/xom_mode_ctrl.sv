// xom_mode_ctrl: the XOM mode bit and the XOM exit sequence.
//
// The mode bit lives in the status register and can only be changed here: enter_i sets
// it once the session key is ready, and an exit request clears it. An exit is requested
// by the EXOM instruction, by an interrupt taken in XOM mode, or by a line that fails
// authentication. Exit runs in order: wait until the host reports no pending writes,
// pulse flush_o (registers, caches, XRAM, reorder buffer and the decryption keys drop
// everything tagged XOM), wait for the data cache to finish writing back its dirty XOM
// lines, then clear the bit and pulse exit_done_o. Scan test access is refused while
// the bit is set (scan_allow_o). The ordering of these steps is this design's choice.
//
// Interface: enter_i and exit_i are one-cycle requests; exit_cause_i says why; an exit
// request outside XOM mode and an entry inside it are ignored. dc_flush_done_i is the
// data cache's end-of-flush pulse.
module xom_mode_ctrl
  import xom_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enter_i,
  input  logic        exit_i,
  input  exit_cause_e exit_cause_i,
  input  logic        writes_pending_i,
  input  logic        dc_flush_done_i,
  output logic        xom_mode_o,
  output logic        flush_o,
  output logic        exit_done_o,
  output exit_cause_e last_cause_o,
  output logic        scan_allow_o
);

  typedef enum logic [2:0] {S_NORMAL, S_XOM, S_DRAIN, S_FLUSH, S_WAIT_DC} state_e;
  state_e state_q;

  assign xom_mode_o   = (state_q != S_NORMAL);
  assign flush_o      = (state_q == S_FLUSH);
  assign scan_allow_o = !xom_mode_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_NORMAL;
      exit_done_o  <= 1'b0;
      last_cause_o <= EXIT_EXOM;
    end else begin
      exit_done_o <= 1'b0;
      case (state_q)
        S_NORMAL: if (enter_i) state_q <= S_XOM;
        S_XOM: if (exit_i) begin
          last_cause_o <= exit_cause_i;
          state_q      <= S_DRAIN;
        end
        S_DRAIN:   if (!writes_pending_i) state_q <= S_FLUSH;
        S_FLUSH:   state_q <= S_WAIT_DC;
        S_WAIT_DC: if (dc_flush_done_i) begin
          state_q     <= S_NORMAL;
          exit_done_o <= 1'b1;
        end
        default: state_q <= S_NORMAL;
      endcase
    end
  end

  // Scan must never be allowed while XOM state exists on chip.
  assert property (@(posedge clk) disable iff (!rst_n) xom_mode_o |-> !scan_allow_o);

endmodule
