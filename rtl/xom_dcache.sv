// xom_dcache: write-back data cache with valid, dirty and XOM tags.
//
// Direct mapped, write-allocate, one request at a time. Each line carries a valid, a
// dirty and an XOM tag; the XOM tag records whether the line was last written in XOM
// mode (a store in normal mode clears it). On the flush pulse of an XOM exit the cache
// walks every set: a dirty XOM line is written back, so all writes of the XOM code
// reach memory, and every XOM line is then invalidated, so nothing of it stays readable
// on chip. flush_done_o pulses when the walk ends (SETS cycles plus the write-backs).
// Size and organisation are this design's choices.
//
// CPU side: hold req_i (we_i, addr_i byte address, wdata_i) until ack_o, which comes
// with rdata_o; a hit is acknowledged on the next cycle. Memory side (board-level
// cache): mem_req_o is held with mem_we_o, mem_addr_o (line address) and mem_wdata_o
// until mem_ack_i, which brings mem_rdata_i for reads. A flush waits for the current
// request to finish and takes priority over the next one.
module xom_dcache #(
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       xom_mode_i,
  input  logic                       flush_i,
  output logic                       flush_done_o,
  input  logic                       req_i,
  input  logic                       we_i,
  input  logic [31:0]                addr_i,
  input  logic [31:0]                wdata_i,
  output logic                       ack_o,
  output logic [31:0]                rdata_o,
  output logic                       mem_req_o,
  output logic                       mem_we_o,
  output logic [31:0]                mem_addr_o,
  output logic [32*LINE_WORDS-1:0]   mem_wdata_o,
  input  logic                       mem_ack_i,
  input  logic [32*LINE_WORDS-1:0]   mem_rdata_i
);

  localparam int unsigned LB  = 32 * LINE_WORDS;
  localparam int unsigned OFS = $clog2(LINE_WORDS * 4);
  localparam int unsigned IDX = $clog2(SETS);
  localparam int unsigned TAG = 32 - OFS - IDX;
  localparam int unsigned WW  = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_WB, S_FILL, S_FLUSH, S_FLUSH_WB, S_DONE} state_e;

  state_e          state_q;
  logic [LB-1:0]   data_q [SETS];
  logic [TAG-1:0]  tag_q  [SETS];
  logic [SETS-1:0] valid_q, dirty_q, xom_q;
  logic            flush_pend_q;
  logic [IDX-1:0]  fidx_q;

  logic [IDX-1:0] idx;
  logic [TAG-1:0] tag;
  logic [WW-1:0]  word;
  logic           hit;
  assign idx  = addr_i[OFS +: IDX];
  assign tag  = addr_i[31 -: TAG];
  assign word = addr_i[2 +: WW];
  assign hit  = valid_q[idx] && tag_q[idx] == tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      valid_q      <= '0;
      dirty_q      <= '0;
      xom_q        <= '0;
      flush_pend_q <= 1'b0;
      fidx_q       <= '0;
      flush_done_o <= 1'b0;
      ack_o        <= 1'b0;
      rdata_o      <= '0;
      mem_req_o    <= 1'b0;
      mem_we_o     <= 1'b0;
      mem_addr_o   <= '0;
      mem_wdata_o  <= '0;
      for (int i = 0; i < SETS; i++) begin
        data_q[i] <= '0;
        tag_q[i]  <= '0;
      end
    end else begin
      ack_o        <= 1'b0;
      flush_done_o <= 1'b0;
      if (flush_i) flush_pend_q <= 1'b1;
      case (state_q)
        S_IDLE: begin
          if (flush_pend_q || flush_i) begin
            flush_pend_q <= 1'b0;
            fidx_q       <= '0;
            state_q      <= S_FLUSH;
          end else if (req_i && !ack_o) begin
            if (hit) begin
              ack_o   <= 1'b1;
              rdata_o <= data_q[idx][32*word +: 32];
              if (we_i) begin
                data_q[idx][32*word +: 32] <= wdata_i;
                dirty_q[idx]               <= 1'b1;
                xom_q[idx]                 <= xom_mode_i;
              end
            end else if (valid_q[idx] && dirty_q[idx]) begin
              mem_req_o   <= 1'b1;
              mem_we_o    <= 1'b1;
              mem_addr_o  <= {tag_q[idx], idx, OFS'(0)};
              mem_wdata_o <= data_q[idx];
              state_q     <= S_WB;
            end else begin
              mem_req_o  <= 1'b1;
              mem_we_o   <= 1'b0;
              mem_addr_o <= {tag, idx, OFS'(0)};
              state_q    <= S_FILL;
            end
          end
        end
        S_WB: if (mem_ack_i) begin
          dirty_q[idx] <= 1'b0;
          mem_we_o     <= 1'b0;
          mem_addr_o   <= {tag, idx, OFS'(0)};
          state_q      <= S_FILL;
        end
        S_FILL: if (mem_ack_i) begin
          mem_req_o    <= 1'b0;
          data_q[idx]  <= mem_rdata_i;
          tag_q[idx]   <= tag;
          valid_q[idx] <= 1'b1;
          dirty_q[idx] <= 1'b0;
          xom_q[idx]   <= 1'b0;
          state_q      <= S_IDLE;
        end
        S_FLUSH: begin
          if (valid_q[fidx_q] && xom_q[fidx_q] && dirty_q[fidx_q]) begin
            mem_req_o   <= 1'b1;
            mem_we_o    <= 1'b1;
            mem_addr_o  <= {tag_q[fidx_q], fidx_q, OFS'(0)};
            mem_wdata_o <= data_q[fidx_q];
            state_q     <= S_FLUSH_WB;
          end else begin
            if (xom_q[fidx_q]) begin
              valid_q[fidx_q] <= 1'b0;
              xom_q[fidx_q]   <= 1'b0;
            end
            fidx_q <= fidx_q + IDX'(1);
            if (fidx_q == IDX'(SETS - 1)) state_q <= S_DONE;
          end
        end
        S_FLUSH_WB: if (mem_ack_i) begin
          mem_req_o       <= 1'b0;
          mem_we_o        <= 1'b0;
          dirty_q[fidx_q] <= 1'b0;
          valid_q[fidx_q] <= 1'b0;
          xom_q[fidx_q]   <= 1'b0;
          data_q[fidx_q]  <= '0;
          fidx_q          <= fidx_q + IDX'(1);
          state_q         <= (fidx_q == IDX'(SETS - 1)) ? S_DONE : S_FLUSH;
        end
        S_DONE: begin
          flush_done_o <= 1'b1;
          state_q      <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_req_o && !mem_ack_i |=> mem_req_o);

endmodule
