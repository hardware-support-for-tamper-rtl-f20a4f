// xom_fetch_unit: instruction fetch unit with the XOM entry, exit and decryption paths.
//
// In normal mode the unit fetches like any fetch unit: the Fetch PC selects a line from
// the L1 instruction cache into the instruction window (one line), a miss reads the line
// from the board-level cache, and instructions go to the issue path one per cycle. The
// Fetch PC is loaded from PC + 4, from the host's branch redirect (the other potential
// PCs), from KAddr while the session key is read, and from the XPC register.
//
// XOM entry. The entry instruction is three words: the opcode, KAddr and XPC. On seeing
// the opcode the unit stops issuing (no speculation past it), reads KAddr and XPC from
// the window into registers, then reads the encrypted session key at KAddr a whole line
// at a time and passes all KEY_BITS bits at once to the session key unit. It waits for
// key_done_i ("decryption complete"), asks the mode controller to set the XOM bit,
// loads XPC into the Fetch PC and starts a decryption chain at the XPC line.
//
// XOM fetch. With the mode bit set, a miss is filled through the instruction decryption
// unit instead of straight from memory (the regular/decrypted path select of the fill
// mux is the mode bit) and the line is cached with its XOM tag. Line keys are chained,
// so lines can only be decrypted in order from the XPC line: a miss beyond the chain
// decrypts every line up to it, and a miss behind it restarts the chain from the XPC
// line with the session key. A miss below the XPC line or a line that fails its MAC
// check ends XOM execution (auth_fail_o).
//
// XOM exit. EXOM, an interrupt in XOM mode, or an authentication failure stops fetch and
// requests an exit; once exit_done_i arrives, fetch resumes at the link address (the
// word after the entry instruction, as a return from the XOM subroutine) or, for an
// interrupt, at irq_vector_i with irq_taken_o. The instruction encodings, the one-line
// window, chain restart and the return to the link address are this design's choices.
//
// Memory port: imem_req_o held with imem_addr_o (line address) until imem_ack_i, which
// brings imem_line_i; the request is withheld while the decryption unit is not ready. The key is stored in KEY_BITS/LINE_BITS consecutive lines from
// KAddr (line aligned), the lowest address holding the least significant bits.
module xom_fetch_unit
  import xom_pkg::*;
#(
  parameter int unsigned KEY_BITS  = 1024,
  parameter int unsigned LINE_BITS = 256,
  parameter logic [31:0] RESET_PC  = 32'h0000_0000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host core
  output logic                 issue_valid_o,
  output logic [31:0]          issue_insn_o,
  output logic [31:0]          issue_pc_o,
  input  logic                 issue_ready_i,
  input  logic                 redirect_i,
  input  logic [31:0]          redirect_pc_i,
  input  logic                 irq_i,
  input  logic [31:0]          irq_vector_i,
  output logic                 irq_taken_o,
  output logic                 auth_fail_o,
  // mode controller
  input  logic                 xom_mode_i,
  output logic                 enter_o,
  output logic                 exit_o,
  output exit_cause_e          exit_cause_o,
  input  logic                 exit_done_i,
  // session key decryption unit
  output logic                 key_req_o,
  output logic [KEY_BITS-1:0]  enc_key_o,
  input  logic                 key_done_i,
  // instruction decryption unit
  output logic                 dec_valid_o,
  input  logic                 dec_ready_i,
  output logic [LINE_BITS-1:0] dec_line_o,
  output logic                 dec_restart_o,
  input  logic                 dec_out_valid_i,
  input  logic [LINE_BITS-1:0] dec_out_line_i,
  input  logic                 dec_out_ok_i,
  // L1 instruction cache
  output logic [31:0]          ic_addr_o,
  input  logic                 ic_hit_i,
  input  logic [LINE_BITS-1:0] ic_line_i,
  output logic                 ic_fill_o,
  output logic [31:0]          ic_fill_addr_o,
  output logic [LINE_BITS-1:0] ic_fill_line_o,
  output logic                 ic_fill_xom_o,
  // board-level cache
  output logic                 imem_req_o,
  output logic [31:0]          imem_addr_o,
  input  logic                 imem_ack_i,
  input  logic [LINE_BITS-1:0] imem_line_i
);

  localparam int unsigned OFS    = $clog2(LINE_BITS / 8);
  localparam int unsigned WSEL   = $clog2(LINE_BITS / 32);
  localparam int unsigned KLINES = KEY_BITS / LINE_BITS;
  localparam int unsigned KW     = (KLINES > 1) ? $clog2(KLINES) : 1;

  typedef enum logic [3:0] {
    F_RUN,        // issue instructions
    F_KADDR,      // read the KAddr word
    F_XPC,        // read the XPC word
    F_KEY,        // read the encrypted key, line by line
    F_KEYDEC,     // wait for the session key unit
    F_MISS,       // plain fill from the board-level cache
    F_XMISS,      // next line of the decryption chain: read
    F_XDEC,       // next line of the decryption chain: decrypt
    F_EXIT        // wait for the exit sequence
  } state_e;

  state_e               state_q, ret_q;
  logic [31:0]          pc_q, xpc_q, kaddr_q, link_q, chain_start_q, chain_next_q;
  logic [LINE_BITS-1:0] win_line_q;
  logic [31:0]          win_addr_q;
  logic                 win_valid_q;
  logic [KEY_BITS-1:0]  key_buf_q;
  logic [KW-1:0]        key_cnt_q;
  logic                 irq_exit_q;

  function automatic logic [31:0] line_of(logic [31:0] a);
    return {a[31:OFS], OFS'(0)};
  endfunction

  // The word at the Fetch PC, when the window holds its line.
  logic        win_hit;
  logic [31:0] word;
  assign win_hit = win_valid_q && win_addr_q == line_of(pc_q);
  assign word    = win_line_q[32*pc_q[2 +: WSEL] +: 32];

  // Instruction cache lookup always at the Fetch PC.
  assign ic_addr_o = pc_q;

  // Fill mux: regular path in normal mode, decrypted path in XOM mode.
  assign ic_fill_line_o = xom_mode_i ? dec_out_line_i : imem_line_i;
  assign ic_fill_xom_o  = xom_mode_i;
  assign ic_fill_o      = (state_q == F_MISS  && imem_ack_i)
                       || (state_q == F_XDEC && dec_out_valid_i && dec_out_ok_i);
  assign ic_fill_addr_o = (state_q == F_XDEC) ? chain_next_q : line_of(pc_q);

  assign imem_req_o  = (state_q == F_MISS) || (state_q == F_KEY) || (state_q == F_XMISS && dec_ready_i);
  assign imem_addr_o = (state_q == F_KEY)   ? kaddr_q + 32'(key_cnt_q) * 32'(LINE_BITS / 8)
                     : (state_q == F_XMISS) ? chain_next_q
                     :                        line_of(pc_q);

  assign dec_valid_o = (state_q == F_XMISS) && imem_ack_i;
  assign dec_line_o  = imem_line_i;
  assign enc_key_o   = key_buf_q;
  assign enter_o     = (state_q == F_KEYDEC) && key_done_i;

  assign issue_valid_o = (state_q == F_RUN) && win_hit && !redirect_i
                      && !(xom_mode_i && irq_i)
                      && !(word == OP_XOM && !xom_mode_i)
                      && !(word == OP_EXOM && xom_mode_i);
  assign issue_insn_o  = word;
  assign issue_pc_o    = pc_q;

  // Next state on a window miss from a word-reading state.
  function automatic state_e miss_state(logic xmode);
    return xmode ? F_XMISS : F_MISS;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= F_RUN;
      ret_q         <= F_RUN;
      pc_q          <= RESET_PC;
      xpc_q         <= '0;
      kaddr_q       <= '0;
      link_q        <= '0;
      chain_start_q <= '0;
      chain_next_q  <= '0;
      win_line_q    <= '0;
      win_addr_q    <= '0;
      win_valid_q   <= 1'b0;
      key_buf_q     <= '0;
      key_cnt_q     <= '0;
      irq_exit_q    <= 1'b0;
      exit_o        <= 1'b0;
      exit_cause_o  <= EXIT_EXOM;
      key_req_o     <= 1'b0;
      dec_restart_o <= 1'b0;
      irq_taken_o   <= 1'b0;
      auth_fail_o   <= 1'b0;
    end else begin
      exit_o        <= 1'b0;
      key_req_o     <= 1'b0;
      dec_restart_o <= 1'b0;
      irq_taken_o   <= 1'b0;
      auth_fail_o   <= 1'b0;
      case (state_q)
        F_RUN, F_KADDR, F_XPC: begin
          if (state_q == F_RUN && xom_mode_i && irq_i) begin
            exit_o       <= 1'b1;
            exit_cause_o <= EXIT_IRQ;
            irq_exit_q   <= 1'b1;
            state_q      <= F_EXIT;
          end else if (state_q == F_RUN && redirect_i) begin
            pc_q <= redirect_pc_i;
          end else if (!win_hit) begin
            // Bring the line into the window: from the cache, or by a fill.
            if (ic_hit_i) begin
              win_line_q  <= ic_line_i;
              win_addr_q  <= line_of(pc_q);
              win_valid_q <= 1'b1;
            end else if (xom_mode_i && line_of(pc_q) < chain_start_q) begin
              exit_o       <= 1'b1;
              exit_cause_o <= EXIT_AUTH;
              auth_fail_o  <= 1'b1;
              state_q      <= F_EXIT;
            end else begin
              if (xom_mode_i && line_of(pc_q) < chain_next_q) begin
                dec_restart_o <= 1'b1;
                chain_next_q  <= chain_start_q;
              end
              ret_q   <= state_q;
              state_q <= miss_state(xom_mode_i);
            end
          end else begin
            case (state_q)
              F_KADDR: begin
                kaddr_q <= line_of(word);
                pc_q    <= pc_q + 32'd4;
                state_q <= F_XPC;
              end
              F_XPC: begin
                xpc_q     <= word;
                link_q    <= pc_q + 32'd4;
                key_cnt_q <= '0;
                state_q   <= F_KEY;
              end
              default: begin
                if (word == OP_XOM && !xom_mode_i) begin
                  pc_q    <= pc_q + 32'd4;
                  state_q <= F_KADDR;
                end else if (word == OP_EXOM && xom_mode_i) begin
                  exit_o       <= 1'b1;
                  exit_cause_o <= EXIT_EXOM;
                  state_q      <= F_EXIT;
                end else if (issue_ready_i) begin
                  pc_q <= pc_q + 32'd4;
                end
              end
            endcase
          end
        end
        F_MISS: if (imem_ack_i) begin
          win_line_q  <= imem_line_i;
          win_addr_q  <= line_of(pc_q);
          win_valid_q <= 1'b1;
          state_q     <= ret_q;
        end
        F_KEY: if (imem_ack_i) begin
          key_buf_q[LINE_BITS*key_cnt_q +: LINE_BITS] <= imem_line_i;
          if (key_cnt_q == KW'(KLINES - 1)) begin
            key_req_o <= 1'b1;
            state_q   <= F_KEYDEC;
          end else begin
            key_cnt_q <= key_cnt_q + KW'(1);
          end
        end
        F_KEYDEC: if (key_done_i) begin
          key_buf_q     <= '0;
          pc_q          <= xpc_q;
          chain_start_q <= line_of(xpc_q);
          chain_next_q  <= line_of(xpc_q);
          win_valid_q   <= 1'b0;
          state_q       <= F_RUN;
        end
        F_XMISS: if (imem_ack_i) state_q <= F_XDEC;
        F_XDEC: if (dec_out_valid_i) begin
          if (!dec_out_ok_i) begin
            exit_o       <= 1'b1;
            exit_cause_o <= EXIT_AUTH;
            auth_fail_o  <= 1'b1;
            state_q      <= F_EXIT;
          end else begin
            chain_next_q <= chain_next_q + 32'(LINE_BITS / 8);
            if (chain_next_q == line_of(pc_q)) begin
              win_line_q  <= dec_out_line_i;
              win_addr_q  <= chain_next_q;
              win_valid_q <= 1'b1;
              state_q     <= ret_q;
            end else begin
              state_q <= F_XMISS;
            end
          end
        end
        F_EXIT: begin
          win_valid_q <= 1'b0;
          if (exit_done_i) begin
            pc_q        <= irq_exit_q ? irq_vector_i : link_q;
            irq_taken_o <= irq_exit_q;
            irq_exit_q  <= 1'b0;
            state_q     <= F_RUN;
          end
        end
        default: state_q <= F_RUN;
      endcase
    end
  end

  // A new decryption is only offered when the decryption unit can take it.
  assert property (@(posedge clk) disable iff (!rst_n) dec_valid_o |-> dec_ready_i);

endmodule
