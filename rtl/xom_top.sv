// xom_top: XOM (execute-only memory) support around a processor core.
//
// XOM lets code encrypted for one particular chip run on it without the plaintext ever
// leaving the chip. This top connects the units that a core needs for it:
//   - xom_fetch_unit: fetch, XOM entry (key read, stall, jump to XPC) and exit;
//   - xom_session_key_unit: RSA decryption of the session key, with a key cache;
//   - xom_insn_decrypt: DESX decryption, MAC check and key chaining of code lines;
//   - xom_icache: L1 instruction cache filled through the plain or decrypted path;
//   - xom_mode_ctrl: the XOM mode bit, the exit sequence and the scan lock;
//   - xom_regfile, xom_dcache, xom_xram: state carrying XOM tags, cleaned on exit.
// The execution units and reorder buffer of the core are outside. The core sees the
// issue path, the branch redirect, the register file ports, the data cache port and
// the XRAM port; flush_xom_o tells its reorder buffer and execution units to drop
// XOM-tagged entries, and writes_pending_i tells the exit sequence when all its stores
// have left. The board-level cache is reached through separate instruction-line and
// data-line ports. The session key goes from the key unit straight into the
// instruction decryption unit (key_done loads it), as the key never passes through
// software-visible state.
module xom_top
  import xom_pkg::*;
#(
  parameter int unsigned         KEY_BITS   = 1024,
  parameter int unsigned         IC_SETS    = 64,
  parameter int unsigned         DC_SETS    = 64,
  parameter int unsigned         DC_WORDS   = 4,
  parameter int unsigned         XRAM_WORDS = 256,
  parameter int unsigned         NREGS      = 32,
  parameter logic [31:0]         RESET_PC   = 32'h0000_0000,
  parameter logic [KEY_BITS-1:0] RSA_N      = KEY_BITS'(xom_key_pkg::RSA_N),
  parameter logic [KEY_BITS-1:0] RSA_D      = KEY_BITS'(xom_key_pkg::RSA_D)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // issue path and control from the core
  output logic                       issue_valid_o,
  output logic [31:0]                issue_insn_o,
  output logic [31:0]                issue_pc_o,
  input  logic                       issue_ready_i,
  input  logic                       redirect_i,
  input  logic [31:0]                redirect_pc_i,
  input  logic                       irq_i,
  input  logic [31:0]                irq_vector_i,
  output logic                       irq_taken_o,
  output logic                       auth_fail_o,
  input  logic                       writes_pending_i,
  output logic                       xom_mode_o,
  output logic                       flush_xom_o,
  output logic                       scan_allow_o,
  output exit_cause_e                last_exit_cause_o,
  output logic                       key_done_o,
  output logic                       key_hit_o,
  // register file
  input  logic                       rf_we_i,
  input  logic [$clog2(NREGS)-1:0]   rf_waddr_i,
  input  logic [31:0]                rf_wdata_i,
  input  logic [$clog2(NREGS)-1:0]   rf_raddr0_i,
  output logic [31:0]                rf_rdata0_o,
  output logic                       rf_rvalid0_o,
  input  logic [$clog2(NREGS)-1:0]   rf_raddr1_i,
  output logic [31:0]                rf_rdata1_o,
  output logic                       rf_rvalid1_o,
  // data cache, core side
  input  logic                       dc_req_i,
  input  logic                       dc_we_i,
  input  logic [31:0]                dc_addr_i,
  input  logic [31:0]                dc_wdata_i,
  output logic                       dc_ack_o,
  output logic [31:0]                dc_rdata_o,
  // XRAM
  input  logic                       xr_req_i,
  input  logic                       xr_we_i,
  input  logic [$clog2(XRAM_WORDS)-1:0] xr_addr_i,
  input  logic [31:0]                xr_wdata_i,
  output logic                       xr_ack_o,
  output logic                       xr_fault_o,
  output logic [31:0]                xr_rdata_o,
  // board-level cache, instruction lines
  output logic                       imem_req_o,
  output logic [31:0]                imem_addr_o,
  input  logic                       imem_ack_i,
  input  logic [255:0]               imem_line_i,
  // board-level cache, data lines
  output logic                       dmem_req_o,
  output logic                       dmem_we_o,
  output logic [31:0]                dmem_addr_o,
  output logic [32*DC_WORDS-1:0]     dmem_wdata_o,
  input  logic                       dmem_ack_i,
  input  logic [32*DC_WORDS-1:0]     dmem_rdata_i
);

  localparam int unsigned LINE_BITS = 256;

  logic                 enter, exit_req, exit_done, flush, dc_flush_done;
  exit_cause_e          exit_cause, last_cause;
  logic                 key_req, key_busy, key_done, key_hit;
  logic [KEY_BITS-1:0]  enc_key;
  desx_key_t            sess_key;
  logic                 dec_valid, dec_ready, dec_restart, dec_out_valid, dec_out_ok;
  logic [LINE_BITS-1:0] dec_line, dec_out_line;
  logic [31:0]          ic_addr, ic_fill_addr;
  logic                 ic_hit, ic_fill, ic_fill_xom;
  logic [LINE_BITS-1:0] ic_line, ic_fill_line;

  assign flush_xom_o       = flush;
  assign last_exit_cause_o = last_cause;
  assign key_done_o        = key_done;
  assign key_hit_o         = key_hit;

  xom_mode_ctrl u_mode (
    .clk, .rst_n,
    .enter_i          (enter),
    .exit_i           (exit_req),
    .exit_cause_i     (exit_cause),
    .writes_pending_i (writes_pending_i),
    .dc_flush_done_i  (dc_flush_done),
    .xom_mode_o       (xom_mode_o),
    .flush_o          (flush),
    .exit_done_o      (exit_done),
    .last_cause_o     (last_cause),
    .scan_allow_o     (scan_allow_o)
  );

  xom_fetch_unit #(.KEY_BITS(KEY_BITS), .LINE_BITS(LINE_BITS), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .issue_valid_o, .issue_insn_o, .issue_pc_o, .issue_ready_i,
    .redirect_i, .redirect_pc_i, .irq_i, .irq_vector_i, .irq_taken_o, .auth_fail_o,
    .xom_mode_i      (xom_mode_o),
    .enter_o         (enter),
    .exit_o          (exit_req),
    .exit_cause_o    (exit_cause),
    .exit_done_i     (exit_done),
    .key_req_o       (key_req),
    .enc_key_o       (enc_key),
    .key_done_i      (key_done),
    .dec_valid_o     (dec_valid),
    .dec_ready_i     (dec_ready),
    .dec_line_o      (dec_line),
    .dec_restart_o   (dec_restart),
    .dec_out_valid_i (dec_out_valid),
    .dec_out_line_i  (dec_out_line),
    .dec_out_ok_i    (dec_out_ok),
    .ic_addr_o       (ic_addr),
    .ic_hit_i        (ic_hit),
    .ic_line_i       (ic_line),
    .ic_fill_o       (ic_fill),
    .ic_fill_addr_o  (ic_fill_addr),
    .ic_fill_line_o  (ic_fill_line),
    .ic_fill_xom_o   (ic_fill_xom),
    .imem_req_o, .imem_addr_o, .imem_ack_i, .imem_line_i
  );

  xom_session_key_unit #(.KEY_BITS(KEY_BITS), .RSA_N(RSA_N), .RSA_D(RSA_D)) u_skey (
    .clk, .rst_n,
    .req_i     (key_req),
    .req_key_i (enc_key),
    .busy_o    (key_busy),
    .done_o    (key_done),
    .hit_o     (key_hit),
    .key_o     (sess_key)
  );

  xom_insn_decrypt #(.LINE_BITS(LINE_BITS)) u_idec (
    .clk, .rst_n,
    .key_load_i    (key_done),
    .key_i         (sess_key),
    .restart_i     (dec_restart),
    .clear_i       (flush),
    .in_valid_i    (dec_valid),
    .in_ready_o    (dec_ready),
    .in_line_i     (dec_line),
    .out_valid_o   (dec_out_valid),
    .out_line_o    (dec_out_line),
    .out_auth_ok_o (dec_out_ok)
  );

  xom_icache #(.SETS(IC_SETS), .LINE_BITS(LINE_BITS)) u_icache (
    .clk, .rst_n,
    .xom_mode_i  (xom_mode_o),
    .flush_i     (flush),
    .addr_i      (ic_addr),
    .hit_o       (ic_hit),
    .line_o      (ic_line),
    .fill_i      (ic_fill),
    .fill_addr_i (ic_fill_addr),
    .fill_line_i (ic_fill_line),
    .fill_xom_i  (ic_fill_xom)
  );

  xom_regfile #(.NREGS(NREGS), .XLEN(32)) u_rf (
    .clk, .rst_n,
    .xom_mode_i (xom_mode_o),
    .flush_i    (flush),
    .we_i       (rf_we_i),
    .waddr_i    (rf_waddr_i),
    .wdata_i    (rf_wdata_i),
    .raddr0_i   (rf_raddr0_i),
    .rdata0_o   (rf_rdata0_o),
    .rvalid0_o  (rf_rvalid0_o),
    .raddr1_i   (rf_raddr1_i),
    .rdata1_o   (rf_rdata1_o),
    .rvalid1_o  (rf_rvalid1_o)
  );

  xom_dcache #(.SETS(DC_SETS), .LINE_WORDS(DC_WORDS)) u_dcache (
    .clk, .rst_n,
    .xom_mode_i   (xom_mode_o),
    .flush_i      (flush),
    .flush_done_o (dc_flush_done),
    .req_i        (dc_req_i),
    .we_i         (dc_we_i),
    .addr_i       (dc_addr_i),
    .wdata_i      (dc_wdata_i),
    .ack_o        (dc_ack_o),
    .rdata_o      (dc_rdata_o),
    .mem_req_o    (dmem_req_o),
    .mem_we_o     (dmem_we_o),
    .mem_addr_o   (dmem_addr_o),
    .mem_wdata_o  (dmem_wdata_o),
    .mem_ack_i    (dmem_ack_i),
    .mem_rdata_i  (dmem_rdata_i)
  );

  xom_xram #(.WORDS(XRAM_WORDS), .XLEN(32)) u_xram (
    .clk, .rst_n,
    .xom_mode_i (xom_mode_o),
    .flush_i    (flush),
    .req_i      (xr_req_i),
    .we_i       (xr_we_i),
    .addr_i     (xr_addr_i),
    .wdata_i    (xr_wdata_i),
    .ack_o      (xr_ack_o),
    .fault_o    (xr_fault_o),
    .rdata_o    (xr_rdata_o)
  );

endmodule
