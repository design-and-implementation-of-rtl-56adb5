# A unified hash engine for MD5, SHA-256 and RIPEMD-160, with a Tiger datapath

MD5, SHA-256 and RIPEMD-160 work the same way. Each pads a message into
512-bit blocks and then runs 64 or 80 steps per block over 32-bit words.
Every step combines a Boolean function of three words, a message word, a
round constant, a rotation and some 32-bit additions. The algorithms differ
only in which function, word, constant and rotation each step uses, and in
how the state is kept. This engine builds the shared hardware once. A
microcoded control unit then drives it with a different control word for
every step of every algorithm, one step per clock cycle. RIPEMD-160 runs two
lines of computation side by side, so the engine has two compressors: the
*main* (top) compressor runs MD5, SHA-256 or the left RIPEMD-160 line, and
the *parallel* (bottom) compressor runs the right RIPEMD-160 line in the
same cycle.

Tiger is a 64-bit hash with S-box lookups, three passes and a key schedule.
It has too little in common with the other three to share their step logic.
It gets its own datapath, which works on 64-bit values as pairs of 32-bit
halves (the *Tiger core*). That datapath sits beside the 32-bit engine in the
same top module.

## Using the chip

The top module is `hash_chip` (`rtl/hash_chip.sv`). Everything is
synchronous to `clk`. `rst` is an active-high synchronous reset.

**MD5, SHA-256, RIPEMD-160.**

1. Set `algo` (0 MD5, 1 SHA-256, 2 RIPEMD-160) and pulse `restart` for one
   cycle. `algo` is latched on that cycle.
2. The chip reads the message from an external byte memory. It raises
   `mem_rd` for one cycle. The memory answers, one or more cycles later, with
   `mem_ack` high and the next byte on `mem_data`.
3. A byte of `00H` ends the message. A message therefore contains no zero
   bytes, and its length is a whole number of bytes.
4. When the last block is done, `digest_valid` goes high. It stays high,
   with the digest on `digest`, until the next `restart`. The digest is
   left-aligned: its first byte is in bits 255:248. MD5 uses the top 128
   bits and RIPEMD-160 the top 160. The unused low bits are zero.

`algo = 3` on the 32-bit engine raises `error` and stops it until the next
`restart`. `block_done` pulses at the end of every 512-bit block.
`pad_fsm_state` and `ucode_step` show the padding state and the microcode
step, for debugging.

**Tiger.**

1. Put a padded 512-bit block on `tiger_block`. Word *x_i* is
   `tiger_block[64*i +: 64]`, with the message bytes in little-endian order.
2. Pulse `tiger_start`. Set `tiger_first` with the first block of a
   message; the core then starts from the Tiger IV. Without `tiger_first`
   it chains from the previous result.
3. 29 cycles later `tiger_done` pulses. `tiger_hash` then holds
   `{c, b, a}`.

Each round makes eight S-box lookups. They go out on `tiger_sbox_addr[0..7]`
as `{table number - 1, byte}` (10 bits). Their 64-bit values must come back
on `tiger_sbox_val[0..7]` in the same cycle, from combinational logic. The
Tiger S-box tables are not part of this RTL; see "Limits" below.

## Message intake: the padding block (`padding_fsm`)

The padding block is a state machine with a 16-word (512-bit) block buffer.
It reads one byte per request and packs it into the current word:

- little endian within the word for MD5 and RIPEMD-160;
- big endian for SHA-256.

When it reads the `00H` terminator, it pads the message one byte per
cycle:

1. It appends `80H`.
2. It appends zero bytes up to byte 56 of a block. If fewer than 8 bytes
   of the block are left after the `80H`, it fills this block with zeros
   and opens one more block.
3. It appends the message length in bits as a 64-bit number: little endian
   for MD5 and RIPEMD-160, big endian for SHA-256.

When the buffer holds a full block, the padding block raises `block_ready`.
The control unit answers with `transfer`. The 16 words then move into the
message register file at one word per cycle. `xfer_done` marks the last word,
and `last_block` says whether this is the final block.

After a transfer the buffer is free again. The padding block reads the next
block while the datapath hashes the current one. Reading takes two cycles
per byte, and hashing a block takes 82 to 98 cycles. So for long messages the
byte interface sets the speed, not the datapath.

## The microcode control unit (`microcode_cu`)

The control unit has two parts: a small sequencer and a control store.

The sequencer goes through these states:

| State | What happens | Cycles |
|---|---|---|
| IDLE | wait for `restart` | |
| LOADIV | the chaining variables load the IV of the algorithm | 1 |
| WAIT_BLK | wait for the padding block's `block_ready` | |
| XFER | the block moves into the message register file | 16 |
| INIT | the working variables load from the chaining variables | 1 |
| ROUNDS | one step per cycle | 64 MD5, 64 SHA-256, 80 RIPEMD-160 |
| CVUPD | the working variables are added into the chaining variables | 1 |
| DONE | `digest_valid` is high | |
| ERROR | `algo = 3` was requested | |

After CVUPD the sequencer goes back to WAIT_BLK, or to DONE after the last
block.

The control store holds one 50-bit control word (`hash_pkg::ctrl_t`) for
each step of each algorithm: 208 entries in all. It is written as a constant
function of (algorithm, step), which synthesis turns into a ROM. Each entry
gives:

- the message word for each compressor (a 4-bit index into the message
  register file);
- the ROM address of the round constant for each compressor;
- the rotation amount for each compressor;
- the Boolean function for each compressor;
- for SHA-256, whether the step uses an expanded schedule word, and the
  SHA register file slot to write.

The step tables are those of the algorithm definitions:

- MD5 message orders: ρ₂(i) = 1+5i, ρ₃(i) = 5+3i, ρ₄(i) = 7i mod 16.
- The MD5 rotation amounts.
- The RIPEMD-160 word orders r and r′ and rotations s and s′.

## The shared datapath

**Main compressor (`main_compressor`).** It holds the eight working
variables A..H and does one step per clock.

- MD5 and the left RIPEMD-160 line share one path. The path is: primitive
  function → three-input adder (A + f + X) → two-input adder (+ constant) →
  circular left shift → final adder. The final adder adds B for MD5 and E for
  RIPEMD-160.
- RIPEMD-160 also rotates C by 10 as it moves into D.
- SHA-256 computes Ch through the same primitive function block. Maj,
  Σ0, Σ1 and the T1/T2 additions have their own logic.

**Parallel compressor (`parallel_compressor`).** It holds A..E of the right
RIPEMD-160 line and does the same step form as the left line, with its own
message word, constant, rotation and function. It is only used for
RIPEMD-160.

**Primitive function block (`prim_func`).** It computes one of seven Boolean
functions of three words:

| Select | Function | Used as |
|---|---|---|
| `PF_XOR3` | x⊕y⊕z | MD5 H, RIPEMD-160 f1 |
| `PF_CH` | (x∧y)∨(¬x∧z) | MD5 F, SHA-256 Ch, RIPEMD-160 f2 |
| `PF_ORNX` | (x∨¬y)⊕z | RIPEMD-160 f3 |
| `PF_MUXZ` | (x∧z)∨(y∧¬z) | MD5 G, RIPEMD-160 f4 |
| `PF_XORN` | x⊕(y∨¬z) | RIPEMD-160 f5 |
| `PF_MD5I` | y⊕(x∨¬z) | MD5 I |
| `PF_MAJ` | majority | SHA-256 Maj |

**Constant ROM (`rom_table`).** It has two read ports, one per compressor,
and 138 words:

| Addresses | Contents |
|---|---|
| 0–63 | MD5 T[1..64] |
| 64–127 | SHA-256 K[0..63] |
| 128–132 | RIPEMD-160 left-line constants |
| 133–137 | RIPEMD-160 right-line constants |

The address is 8 bits wide, and reads past the table return 0.

**Message register file (`msg_reg_file`).** It holds 16 × 32 bits. The
padding block writes it through one port. It has two combinational read
ports, one per compressor.

**SHA-256 message schedule (`sha_proc_block`, `sha_reg_file`).** The SHA
register file is a 16-word window, and W[t] lives in slot t mod 16. At step
t, the read ports select slots t, t+1, t+9 and t+14 (mod 16). These hold
W[t−16], W[t−15], W[t−7] and W[t−2]. The processing block computes

    W[t] = σ1(W[t−2]) + W[t−7] + σ0(W[t−15]) + W[t−16]

with σ0 = ROTR7 ⊕ ROTR18 ⊕ SHR3 and σ1 = ROTR17 ⊕ ROTR19 ⊕ SHR10. The two
logical right shifts go through the 64-bit shifter block (`shifter64`) with
only its low half in use.

- For t < 16, the step uses the message word and writes it into the window.
- From t = 16 on, the step uses the computed word and writes that into the
  window.

A 2:1 multiplexer picks between the two.

**Building blocks.** The compressors are built from these modules:

- `cl_shifter`: 32-bit variable rotate left;
- `mux2_32` and `mux4_32`: 32-bit multiplexers;
- `adder2_32` and `adder3_32`: 32-bit adders, modulo 2³².

## Chaining variables and digest (`cv_update`, `digest_gen`)

`cv_update` holds CVQ_A..CVQ_H.

- **At the start of a message**, each of CVQ_A..CVQ_E loads its word of the
  IV through a 4:1 multiplexer. The inputs are the MD5, SHA-256 and
  RIPEMD-160 values, plus 0 for CVQ_E under MD5. CVQ_F..CVQ_H load the
  SHA-256 IV.
- **At the end of a block**, a 2:1 multiplexer picks one of two sums for
  each register:
  - MD5 and SHA-256: CVQ_x + x_top.
  - RIPEMD-160: the two lines are combined crosswise. Here tt is the top
    (left) line and tb the bottom (right) line:
    - A ← CVQ_B + C_tt + D_tb
    - B ← CVQ_C + D_tt + E_tb
    - C ← CVQ_D + E_tt + A_tb
    - D ← CVQ_E + A_tt + B_tb
    - E ← CVQ_A + B_tt + C_tb

`digest_gen` builds the output from the chaining variables. For MD5 and
RIPEMD-160 it byte-swaps every word, since those algorithms output
little-endian words. For SHA-256 it passes the words as they are.

## The Tiger core (`tiger_core` and its parts)

Tiger keeps three 64-bit registers a, b, c and eight message words
x0..x7. The core stores all of them as 32-bit halves in a 28 × 32 register
file (`tiger_reg_file`). The file holds x0..x7, a, b, c and the saved copies
aa, bb, cc, and each register has its own write enable.

A block takes 29 cycles:

| Cycles | Work |
|---|---|
| 1 | load x0..x7. Load a, b, c from the IV (first block) or keep the previous result. Save them as aa, bb, cc. |
| 8 | pass 1, multiplier 5 |
| 1 | key schedule |
| 8 | pass 2, multiplier 7 |
| 1 | key schedule |
| 8 | pass 3, multiplier 9 |
| 1 | feedforward, low 32-bit halves |
| 1 | feedforward, high 32-bit halves |

The feedforward is a ^= aa, b −= bb, c += cc.

The core's parts are:

- **`pass_round_select`.** Tiger calls its round function as round(a,b,c),
  round(b,c,a), round(c,a,b), and so on. Instead of moving the registers,
  this block rotates which register plays which role, based on the pass and
  round numbers. There are two copies, one for each 32-bit half.
- **`tiger_proc_block`.** It does one round:
  - c ^= x;
  - a −= t1[c0] ⊕ t2[c2] ⊕ t3[c4] ⊕ t4[c6];
  - b += t4[c1] ⊕ t3[c3] ⊕ t2[c5] ⊕ t1[c7];
  - b is multiplied by 5, 7 or 9, done as shift-and-add (or subtract).

  It sends out the eight S-box addresses.
- **`key_schedule`.** It applies Tiger's 16-operation key schedule to x0..x7
  in one cycle. Its `~x << 19` and `~x >> 23` terms use `complement_block`
  (32 XOR gates acting as switchable inverters) and `shifter64` (a 64-bit
  logical left/right shifter on two 32-bit halves).
- **`addsub64`.** A 64-bit adder/subtractor that works on one 32-bit half per
  cycle. A flip-flop carries the carry (or borrow) from the low half to the
  high half. The feedforward uses two of them.

## Timing

For the 32-bit engine, with a memory that answers every read in the next
cycle:

- 1 cycle to load the IV.
- Per block: 16 transfer cycles, 1 cycle to load the working variables, 64
  or 80 step cycles, and 1 cycle for the chaining update.
- Reading the next block overlaps with hashing the current one.
- Each byte takes two cycles (request, acknowledge), and so does the
  terminator.

Measured whole-message cycle counts, from `restart` to `digest_valid`:

| Message | MD5 | SHA-256 | RIPEMD-160 |
|---|---|---|---|
| empty | 149 | 149 | 165 |
| 206 bytes | 598 | 598 | 617 |
| 740 bytes | 1780 | 1780 | 1796 |
| 1023 bytes | 2470 | 2470 | 2502 |

The first design this architecture follows reported about 240, 1140 and 3490
cycles for the first three MD5 cases. The end-to-end testbench checks that
this engine stays within those counts.

The Tiger core takes 29 cycles per block.

## How this design departs from the original description

The architecture follows a published unified design. Where that description
is incomplete or contradicts the algorithms, this RTL does the following:

- **SHA-256 functions.** The published equations for Σ/σ are SHA-512's
  (e.g. ROTR 28/34/39), which do not apply to 32-bit words. This RTL uses
  the SHA-256 rotations.
- **Key schedule shift.** The Tiger key schedule diagram shows a left shift
  of 17. The written schedule and Tiger's definition use 19, and so does this
  RTL.
- **Tiger feedforward.** The feedforward is written there as XOR for all
  three registers. This RTL uses Tiger's a ^= aa, b −= bb, c += cc.
- **ROM address.** The constant ROM was drawn with a 7-bit address. The 138
  constants need 8 bits.
- **Control store.** The original control store was 235 words of 93 bits,
  with a separate select line for every datapath register. This control
  word has 50 bits and 208 step entries. Its layout is this design's own.
- **Schedules not given.** The MD5 rotation amounts and the RIPEMD-160 word
  orders and rotations were not given. They come from the algorithm
  definitions.
- **Padding controller.** The state sequence of the padding controller, the
  memory handshake timing and the overlap of reading with hashing are this
  design's own.
- **Tiger integration.** Tiger was intended to run on the shared 32-bit
  datapath, with its padding done by the shared padding block. That
  integration was left open, and here Tiger has a separate core that takes
  already padded blocks. Of the Tiger blocks, only `shifter64` is shared:
  the SHA-256 schedule uses its low 32 bits for SHR3 and SHR10.
- **Key schedule timing.** The key schedule was drawn as a shared XOR unit
  and adder/subtractor stepped by a key decoder. Here it is combinational
  logic that finishes in one cycle.
- **`addsub64`.** It merges the two-input and three-input adders of the
  original drawing into one addition with a carry-in. The function is the
  same.
- **`shifter64`.** It is combinational, although the original drawing gives
  it a clock.
- **Parallel compressor.** The original drawing of the bottom compressor
  has eight registers and SHA-style paths, left over from an earlier
  SHA-1 design (it even rotates by 30 where RIPEMD-160 rotates by 10). Here
  MD5 and SHA-256 use only the main compressor, so the bottom compressor
  holds just the five RIPEMD-160 right-line registers and rotates by 10.
- **Tiger register file.** It has no read enables; every register can always
  be read.
- **Encodings.** The algorithm encoding (0 MD5, 1 SHA-256, 2 RIPEMD-160,
  3 Tiger), the primitive-function encoding and the digest alignment are
  this design's own.

## Limits

- **No zero bytes.** The message may not contain a `00H` byte, because that
  byte ends the message.
- **Tiger S-box tables.** The four 256 × 64-bit Tiger S-box tables are not
  included. Connect a table that returns `t[n+1][byte]` for address
  `{n, byte}` in the same cycle.
- **Tiger padding.** The Tiger core does not pad. The caller supplies padded
  blocks.

## Files

| File | Content |
|---|---|
| `rtl/hash_pkg.sv` | algorithm and function encodings, IVs, ROM layout, control word |
| `rtl/hash_chip.sv` | top level |
| `rtl/padding_fsm.sv`, `rtl/microcode_cu.sv` | message intake and control |
| `rtl/main_compressor.sv`, `rtl/parallel_compressor.sv` | step datapaths |
| `rtl/prim_func.sv`, `rtl/rom_table.sv`, `rtl/cl_shifter.sv`, `rtl/mux2_32.sv`, `rtl/mux4_32.sv`, `rtl/adder2_32.sv`, `rtl/adder3_32.sv` | datapath parts |
| `rtl/msg_reg_file.sv`, `rtl/sha_reg_file.sv`, `rtl/sha_proc_block.sv` | message storage and SHA-256 schedule |
| `rtl/cv_update.sv`, `rtl/digest_gen.sv` | chaining variables and output |
| `rtl/tiger_core.sv`, `rtl/tiger_reg_file.sv`, `rtl/tiger_proc_block.sv`, `rtl/pass_round_select.sv`, `rtl/key_schedule.sv`, `rtl/addsub64.sv`, `rtl/complement_block.sv`, `rtl/shifter64.sv` | Tiger datapath |
| `tb/hash_ref_pkg.sv` | reference models (MD5, SHA-256, RIPEMD-160, Tiger compression) used by the testbenches |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

The reference models compute their own constants:

- MD5 T[i] = ⌊2³² · |sin i|⌋;
- SHA-256 K and IV from the fractional parts of cube and square roots of
  primes.

So they do not share tables with the RTL. The reference models themselves
are checked against published digests of "abc" and of the empty message.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` at the end and
has a cycle watchdog. To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/hash_pkg.sv tb/hash_ref_pkg.sv tb/hash_chip_tb.sv \
        --top-module hash_chip_tb
    ./obj_dir/Vhash_chip_tb

Replace `hash_chip_tb` with `<module>_tb` to test a single module.

`hash_chip_tb` runs the whole chip at its default parameters:

- the standard test strings ("abc", the empty string, "message digest");
- random messages of lengths that hit every padding case, for each
  algorithm (padding fits in the last block; padding needs an extra block;
  exact multiples of 64 bytes; multi-block messages);
- the 0, 206, 740 and 1023-byte messages from the table above, with the
  cycle check;
- the `algo = 3` error;
- a slow memory for every other random message, answering each read after
  1 to 4 cycles;
- three chained Tiger blocks against the Tiger reference, using a random
  S-box table.

It counts the multi-block, extra-padding-block, error, memory-wait and Tiger
chaining cases, and fails if any of them never happened. It runs in about 15 seconds.
