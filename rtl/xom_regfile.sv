// xom_regfile: register file with valid and XOM tags.
//
// Every register carries a valid tag and an XOM tag. A write sets valid and records in
// the XOM tag whether the processor was in XOM mode. On the flush pulse of an XOM exit,
// every register whose XOM tag is set is marked invalid and its value is zeroed, so
// code running after the exit sees nothing the XOM code computed. An invalid register
// reads as zero with its valid flag low. The tags have no write port of their own:
// only writes and the flush change them. Register count and width are this design's.
//
// Interface: one write port (we_i, waddr_i, wdata_i), two combinational read ports
// (raddr*_i -> rdata*_o, rvalid*_o). A write in the flush cycle is ordered after the
// flush: it lands and is tagged with the current mode.
module xom_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     xom_mode_i,
  input  logic                     flush_i,
  input  logic                     we_i,
  input  logic [$clog2(NREGS)-1:0] waddr_i,
  input  logic [XLEN-1:0]          wdata_i,
  input  logic [$clog2(NREGS)-1:0] raddr0_i,
  output logic [XLEN-1:0]          rdata0_o,
  output logic                     rvalid0_o,
  input  logic [$clog2(NREGS)-1:0] raddr1_i,
  output logic [XLEN-1:0]          rdata1_o,
  output logic                     rvalid1_o
);

  logic [XLEN-1:0]  data_q [NREGS];
  logic [NREGS-1:0] valid_q, xom_q;

  assign rvalid0_o = valid_q[raddr0_i];
  assign rdata0_o  = valid_q[raddr0_i] ? data_q[raddr0_i] : '0;
  assign rvalid1_o = valid_q[raddr1_i];
  assign rdata1_o  = valid_q[raddr1_i] ? data_q[raddr1_i] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      xom_q   <= '0;
      for (int i = 0; i < NREGS; i++) data_q[i] <= '0;
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        if (we_i && waddr_i == i[$clog2(NREGS)-1:0]) begin
          data_q[i]  <= wdata_i;
          valid_q[i] <= 1'b1;
          xom_q[i]   <= xom_mode_i;
        end else if (flush_i && xom_q[i]) begin
          data_q[i]  <= '0;
          valid_q[i] <= 1'b0;
          xom_q[i]   <= 1'b0;
        end
      end
    end
  end

endmodule
