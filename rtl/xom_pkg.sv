// xom_pkg: constants and types shared by the XOM (execute-only memory) blocks.
//
// The instruction word is 32 bits. The entry instruction is three words long, the
// opcode word followed by its two operands as literal words, KAddr (address of the
// encrypted session key) and XPC (first instruction of the encrypted block). EXOM is a
// single word. These encodings, the NOP word and the 32-byte line are choices of this
// design; the 120-bit DESX session key (56-bit DES key plus 64-bit whitening key), the
// 64-bit MAC in the last two instruction slots of a line and the 19-cycle word latency
// of the decryption pipeline follow the architecture description.
package xom_pkg;

  localparam logic [31:0] OP_XOM    = 32'hFC00_0000;    // XOM  (followed by KAddr, XPC)
  localparam logic [31:0] OP_EXOM   = 32'hFC00_0001;    // EXOM
  localparam logic [31:0] INSN_NOP  = 32'h0000_0000;    // replaces the MAC slots

  // DESX session key: DES key k (56 bits) and whitening key k1 (64 bits).
  typedef struct packed {
    logic [55:0] k;
    logic [63:0] k1;
  } desx_key_t;

  // Why an XOM exit sequence was started.
  typedef enum logic [1:0] {
    EXIT_EXOM = 2'd0,   // EXOM instruction
    EXIT_IRQ  = 2'd1,   // interrupt taken in XOM mode
    EXIT_AUTH = 2'd2    // a decrypted line failed its MAC check
  } exit_cause_e;

endpackage
