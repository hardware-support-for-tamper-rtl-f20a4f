# XOM: execute-only memory support for a processor

Software vendors would like to ship code that a customer can run but can neither read, copy
to another machine nor modify. Software alone cannot give that guarantee: in the end the
processor must see plain instructions, and a debugger can watch them. XOM ("eXecute-Only
Memory") moves the guarantee into the processor. Code is shipped encrypted for one chip. The
chip decrypts it on the instruction fetch path, so plaintext exists only inside the chip,
and it checks each line so that tampered code is refused. When the protected code finishes,
is interrupted or is rejected, every register, cache line and scratch-pad word it wrote is
made unreadable.

This repository holds synthesizable SystemVerilog for those additions around an existing core:
the fetch unit with its XOM entry and exit, the two decryption units, and the tagged state that
is cleaned on exit. The core's own execution units and reorder buffer are not part of it. They
connect through ports.

## How a protected call runs

Protected code is entered through a three-word instruction, `XOM KAddr, XPC`, and left through
`EXOM`.

1. **Entry.** Fetch sees the `XOM` opcode and stops issuing. It does not fetch past the opcode
   speculatively. It reads the two operand words into registers. `KAddr` is the address of the
   encrypted session key. `XPC` is the first protected instruction.
2. **Session key.** Fetch reads the 1024-bit encrypted session key from `KAddr`, one 256-bit
   line at a time. It then hands all 1024 bits at once to the session key unit. That unit
   decrypts the key with the chip's RSA private key, or finds it in its key cache. It then loads
   the 120-bit DESX session key straight into the instruction decryption unit. Fetch stalls
   until then.
3. **XOM mode.** The mode bit is set and the Fetch PC is loaded from `XPC`. From now on, an
   instruction-cache miss is filled through the decryption unit instead of straight from
   memory. The select of that fill multiplexer is the mode bit. Decrypted lines enter the L1
   instruction cache with their XOM tag set. A line hits only in the mode it was filled in.
4. **Exit.** `EXOM`, an interrupt in XOM mode, or a line that fails its MAC check starts the
   exit sequence. The sequence runs in this order:
   - wait until the core reports no pending writes;
   - pulse `flush_xom`, which invalidates XOM-tagged registers, instruction-cache lines and
     XRAM words, erases the decryption keys, and tells the core to drop XOM-tagged reorder
     buffer entries;
   - wait while the data cache writes back its dirty XOM lines and invalidates them;
   - clear the mode bit.

   Fetch then resumes at the word after the entry instruction, as a return from a subroutine.
   After an interrupt it resumes at the interrupt vector instead. Scan test access is refused
   (`scan_allow_o` is low) for as long as the mode bit is set.

An interrupted or rejected call cannot be resumed: all its state is gone. The protected code
has to be written so that it can be restarted from the beginning.

## The instruction decryption unit (`xom_insn_decrypt`)

This is the part with the most structure, and the one that sets the cost of XOM execution.

**Line format.** A 32-byte line holds eight 32-bit instructions, or four 64-bit words. The
last word, in instruction slots 6 and 7, is the line's 64-bit MAC. Every word, MAC included,
is encrypted with DESX:

    C = K2 ^ DES_K(P ^ K1)          P = K1 ^ DES_K^-1(C ^ K2)

The 120-bit session key is a 56-bit DES key `K` and a 64-bit whitening key `K1`. Here
`K2 = K1`. In the session key (struct `desx_key_t`), `K` is bits 119..64 and `K1` is bits
63..0. The 56 DES key bits are spread over the 64-bit DES key layout with zero parity bits:
byte *i* of the 64-bit key is `{K[7i+6:7i], 0}`.

**Pipeline.** Each word passes 19 registers:

| stage | work |
|---|---|
| 1 | xor `K2`, initial permutation |
| 2 to 17 | the 16 DES rounds (`des_round`), round keys K16 down to K1 |
| 18 | final permutation, xor `K1` |
| 19 | MAC stage: hash update, or compare and next key for the MAC word |

The permutations are pure wiring. A round is expansion, xor with the round key, S-boxes,
P-box, xor into the left half, and a swap of the halves. The tables are those of the DES
standard (`des_pkg`). The round keys are computed combinationally from the current key
register, and all four words of a line use the same key.

**MAC and chaining.** The hash of a line is `h = rotl(h, 8) ^ w` over its three plaintext
words, starting from zero. The line is accepted when the decrypted MAC word equals `h`. The
two MAC slots then leave as NOPs (`32'h0`), so instruction addresses do not move. When a line
is accepted, the key for the next line becomes `K ^ MAC[63:8]` and `K1 ^ MAC`. This cipher-block
chaining ties every line to all the lines before it. Two consequences follow:

- A new line can start only when the previous line has left the pipeline. A line takes
  W + 18 = 22 cycles from acceptance to `out_valid`.
- Lines can only be decrypted in order, starting from the `XPC` line. The fetch unit keeps the
  address of the next line in the chain.
  - A miss further ahead decrypts every line in between and caches each of them. Forward
    branches in protected code are therefore expensive.
  - A miss on an earlier line that has been evicted restarts the chain from the `XPC` line
    with the session key.
  - A miss below the `XPC` line is treated like an authentication failure.

## The session key unit (`xom_session_key_unit`)

The encrypted session key is an RSA ciphertext under the chip's 1024-bit public key. The unit
computes `m = c^D mod N` and uses the low 120 bits of `m` as the session key.

`rsa_modexp` performs left-to-right square-and-multiply over all 1024 exponent bits, on a
bit-serial interleaved modular multiplier (`rsa_modmul`). In each cycle that multiplier does
`r = 2r + a_i*b` followed by two conditional subtractions of `N`. A decryption therefore takes
`(1024 + popcount(D)) * 1026 + 1025` cycles. That is 1,569,781 cycles for the default key,
within the one to two million cycles expected for 1024-bit RSA.

Because this costs so much, decrypted keys go into a 4-entry, fully associative
`session_key_cache`. Its tag is the whole encrypted key and it replaces entries round robin.
A program entering its protected code again gets its key two cycles after the request.

The private key is held as constants in `xom_key_pkg` (`RSA_N`, `RSA_D`). Nothing in the design
can read them out. The values there are a test key pair whose public exponent is 65537. A real
part would program its own.

## Tagged state

| block | tags | on XOM exit |
|---|---|---|
| `xom_regfile` (32 x 32) | valid, XOM per register | XOM registers invalid and zeroed; invalid reads give 0 |
| `xom_icache` (64 sets x 32 B, direct mapped) | valid, XOM per line | XOM lines invalid |
| `xom_dcache` (64 sets x 16 B, write-back) | valid, dirty, XOM per line | dirty XOM lines written back, then invalid |
| `xom_xram` (256 x 32) | valid, XOM per word | XOM words invalid (read as 0) |

A tag records whether the item was last written in XOM mode. For the data cache this means a
store in normal mode clears the tag. XRAM is the scratch pad of protected code. It answers only
in XOM mode, and outside XOM mode every access raises `fault_o`. No tag has a write port of its
own.

## Instruction and memory formats

| item | value |
|---|---|
| `XOM` opcode | `32'hFC00_0000`, followed by the `KAddr` word and the `XPC` word |
| `EXOM` | `32'hFC00_0001` |
| NOP (MAC slots) | `32'h0000_0000` |
| encrypted key | four consecutive lines from `KAddr` (line aligned); lowest address = least significant 256 bits |

`XOM` is recognised only in normal mode, and `EXOM` only in XOM mode. In the other mode each is
issued to the core like any other word.

## Top level (`xom_top`)

| group | ports |
|---|---|
| issue path | `issue_valid_o`, `issue_insn_o`, `issue_pc_o`, `issue_ready_i` |
| control from the core | `redirect_i`/`redirect_pc_i` (branch targets), `irq_i`, `irq_vector_i`, `irq_taken_o`, `writes_pending_i` |
| status | `xom_mode_o`, `flush_xom_o`, `scan_allow_o`, `auth_fail_o`, `last_exit_cause_o`, `key_done_o`, `key_hit_o` |
| register file | one write port, two read ports with valid flags |
| data cache | `dc_*`: hold `req` until `ack` |
| XRAM | `xr_*`: answer one cycle later |
| board-level cache | `imem_*` (256-bit instruction lines), `dmem_*` (128-bit data lines); hold `req` until `ack` |

All state is reset by the asynchronous active-low `rst_n`. The parameters are `KEY_BITS` (1024),
`IC_SETS`, `DC_SETS`, `DC_WORDS`, `XRAM_WORDS`, `NREGS`, `RESET_PC`, `RSA_N` and `RSA_D`. The line
size is fixed at 256 bits.

## Which parts follow the architecture and which are choices made here

These parts follow the XOM architecture as proposed:
- the mode bit and its set and clear points;
- the fetch path through a decryption unit when the bit is set;
- the XPC register and the Fetch PC multiplexer;
- the stall on session key decryption;
- RSA with a 1024-bit key for session keys, and caching the result;
- DESX with a 120-bit key;
- the 19-cycle word latency (initial permutation, 16 rounds, final permutation, MAC check and
  next key);
- a 64-bit MAC in the last two slots of a line, replaced by NOPs;
- a next-line key that depends on the MAC and the current key;
- valid and XOM tags on registers and caches, invalidated on exit;
- writing back dirty data-cache lines at exit, and waiting for pending writes;
- XRAM reached only in XOM mode;
- exit on interrupt;
- scan refused in XOM mode.

These are choices made here, because the architecture leaves them open:
- all encodings and sizes;
- the derivation of `K2`;
- the hash and the exact next-key function;
- the RSA algorithm and message format (no padding check);
- the key-cache organisation;
- chain restart, and the treatment of misses below `XPC`;
- returning to the link address on `EXOM`;
- refusing XRAM outside XOM mode;
- the order of the exit steps.

Known departures and limits:
- The MAC is an xor-and-rotate hash under encryption. It is not a cryptographic one-way hash.
- `K2 = K1` is weaker than DESX with independent whitening keys.
- The RSA unit is not constant time. Its run time depends on the number of one bits in `D`.
- Store ordering in XOM mode is the core's responsibility. This design only waits for
  `writes_pending_i` to fall.

## Not included

- **Core execution units and reorder buffer.** They are the host core's. `flush_xom_o` is
  provided for their XOM tags.
- **Board-level cache and memory.** These are external.
- **Scan chains.** Split chains for sensitive and other logic, and unbonded or cut test pads,
  belong to DFT insertion and packaging. Only the scan lock signal is provided.

## Files

`rtl/` holds one module or package per file:
- `des_pkg`, `xom_pkg`, `xom_key_pkg`;
- `des_round`, `xom_insn_decrypt`;
- `rsa_modmul`, `rsa_modexp`, `session_key_cache`, `xom_session_key_unit`;
- `xom_mode_ctrl`, `xom_fetch_unit`;
- `xom_icache`, `xom_dcache`, `xom_regfile`, `xom_xram`;
- `xom_top`.

`tb/` holds one self-checking testbench per module (`tb_<module>`) and `xom_tb_pkg`. That
package builds encrypted program images and holds a reference model of what the processor
should issue. Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/des_pkg.sv rtl/xom_pkg.sv rtl/xom_key_pkg.sv tb/xom_tb_pkg.sv \
        tb/tb_xom_top.sv --top-module tb_xom_top
    ./obj_dir/Vtb_xom_top

`tb_xom_top` runs the whole design at its default parameters, including one full 1024-bit RSA
decryption. It takes about 1.6 million cycles and a few seconds. The program enters protected
code three times:
1. a 66-line block with a forward branch, a backward branch to an evicted line, register,
   XRAM and data-cache stores, and `EXOM`;
2. a block with a tampered line;
3. the first block again, with its key from the key cache, cut off by an interrupt.

The testbench checks the following:
- every issued instruction, against the reference model;
- the state left after each exit;
- the RSA cycle count;
- that each mechanism occurred: chain restart, skipped-line decryption, key-cache hit,
  write-pending stall, flush write-back, and each of the three exit causes.

The block testbenches are built the same way, with a different top module. `tb_des_round`
checks the round against the published DES test vectors: key `133457799BBCDFF1` gives
`0123456789ABCDEF -> 85E813540F0AB405`, and the standard's `0123456789ABCDEF` key gives
`"Now is t" -> 3FA40E8A984D4815`.
