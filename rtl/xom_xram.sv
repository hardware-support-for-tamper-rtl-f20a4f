// xom_xram: XRAM, the secure scratch pad of XOM code.
//
// XOM code keeps temporary values here through XOM-flavoured loads and stores. Access is
// only possible in XOM mode; outside it a request is refused (fault_o) and returns
// zero. Every word carries a valid and an XOM tag; a store sets both. On the flush
// pulse of an XOM exit all XOM-tagged words become invalid, and an invalid word reads
// as zero, so nothing left in the array can be read back after the exit. The data array
// itself is a plain memory. Size and the refusal outside XOM mode are this design's.
//
// Interface: req_i with we_i, addr_i, wdata_i; the response comes one cycle later:
// ack_o with rdata_o (loads) and fault_o.
module xom_xram #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     xom_mode_i,
  input  logic                     flush_i,
  input  logic                     req_i,
  input  logic                     we_i,
  input  logic [$clog2(WORDS)-1:0] addr_i,
  input  logic [XLEN-1:0]          wdata_i,
  output logic                     ack_o,
  output logic                     fault_o,
  output logic [XLEN-1:0]          rdata_o
);

  logic [XLEN-1:0]  mem_q [WORDS];
  logic [WORDS-1:0] valid_q, xom_q;

  always_ff @(posedge clk) begin
    if (req_i && we_i && xom_mode_i) mem_q[addr_i] <= wdata_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      xom_q   <= '0;
      ack_o   <= 1'b0;
      fault_o <= 1'b0;
      rdata_o <= '0;
    end else begin
      ack_o   <= req_i;
      fault_o <= req_i && !xom_mode_i;
      rdata_o <= '0;
      if (flush_i) begin
        valid_q <= valid_q & ~xom_q;
        xom_q   <= '0;
      end else if (req_i && xom_mode_i) begin
        if (we_i) begin
          valid_q[addr_i] <= 1'b1;
          xom_q[addr_i]   <= 1'b1;
        end else if (valid_q[addr_i]) begin
          rdata_o <= mem_q[addr_i];
        end
      end
    end
  end

endmodule
