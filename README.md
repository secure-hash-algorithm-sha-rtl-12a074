# SHA-256 block engine with an on-the-fly message schedule

This is a small, iterative SHA-256 hash accelerator. It does one round per clock
cycle. The usual iterative design first expands the 16 words of a block into all
64 message words W_0..W_63 and only then runs the rounds. This design does not.
It computes each message word in the same cycle as the round that uses it. The
schedule therefore needs only a 16-word sliding window, and only one word
register changes per cycle. One 512-bit block takes 70 clock cycles from the
host's hash command to a valid digest:

| cycles | step |
|---|---|
| 1 | the host interface takes the command |
| 1 | padding: the message is padded into one 512-bit block and registered |
| 1 | the working variables A..H are loaded from the chaining value H0..H7 |
| 64 | rounds t = 0..63, each computing W_t and updating A..H |
| 2 | final addition H += A..H, four adders shared over two cycles |
| 1 | the digest register takes H; `digest_valid` rises |

The design targets a small FPGA. The published implementation of this
architecture on a Spartan-6 ran at 83.1 MHz. At that clock, 512 bits every 70
cycles give 607.9 Mbit/s. That figure comes from the cycle count above; it is not
a measured timing result of this RTL.

## Datapath

```
 text_i ──► host_if ──msg (16 x 32)──► padding ──block (512)──► bit_select ─┐ word t (t<16)
            (MSG buffer,                (1 cycle)                           ▼
             length, commands)                                       msg_scheduler ── W_t
                 ▲                                                   (16-word window,
                 │ digest                                             sigma0, sigma1)
                 │                                                          │
            hash_regs ◄── A..H ── compress (A..H, T1/T2, Ch, Maj, SUM0, SUM1, K table)
            (H0..H7, 4 shared adders, digest register)
                 ▲
            controller: IDLE → LOAD → ROUND x64 → FIN x2 → OUT, round counter t
```

All of `sha256_core` runs on one clock. Registers use enables, never gated clocks.
Reset is synchronous and active high.

### The message schedule in the round cycle (`sha256_msg_scheduler`)

This is the part that differs most from a textbook implementation. The window
`win[0..15]` holds W[t-16]..W[t-1]. `win[0]` is the oldest word. In round t a
mux picks W_t:

* t < 16: word t of the padded block, sliced out by `sha256_bit_select` with the
  low four bits of the round counter;
* t ≥ 16: `sigma1(win[14]) + win[9] + sigma0(win[1]) + win[0]`, which is
  σ1(W[t-2]) + W[t-7] + σ0(W[t-15]) + W[t-16];
* zero when no round is running.

W_t goes straight into T1 of the same round. On the clock edge the window shifts
by one and W_t enters at `win[15]`. So the critical path runs from the window
through σ0/σ1 and three adders, then through the five-input T1 sum, and then
through the A or E adder. That is the price of the single-cycle scheme. It is
also what limits the clock.

### The round (`sha256_compress`)

```
T1 = H + SUM1(E) + Ch(E,F,G) + K_t + W_t
T2 = SUM0(A) + Maj(A,B,C)
H←G  G←F  F←E  E←D+T1  D←C  C←B  B←A  A←T1+T2
```

Each logic function is its own small module: `sha256_ch`, `sha256_maj`,
`sha256_sum0` (rotations 2/13/22), `sha256_sum1` (6/11/25), `sha256_sigma0`
(rotations 7/18, shift 3) and `sha256_sigma1` (17/19, shift 10). The round
constants sit in `sha256_k_rom`, a 64-entry constant table read without a clock.
K_t is the first 32 bits of the fractional part of the cube root of the
(t+1)-th prime.

### Final addition and chaining (`sha256_hash_regs`)

H0..H7 hold the chaining value. Reset and the INIT command load the FIPS 180-4
initial value. After round 63, four 32-bit adders update H0..H3 in one cycle and
H4..H7 in the next. Then H is copied into a separate digest register. The host
reads that register while the next block may already be running. H is not reset
between blocks, so starting block after block hashes a long message.

### Padding (`sha256_padding`)

On its load edge the padding block builds the final block of a message of
`len` bits:

* it keeps the first `len mod 512` message bits (the first bit at bit 511);
* it appends a single 1 bit and then zeros;
* it writes the 64-bit length into bits 63:0.

This pads in one cycle and only within one block, so it needs
`len mod 512 ≤ 447`. For a longer tail the block is flagged with `length_error`.
In that case the host must pad the message itself, which spills into one more
block. With padding off (HASH_RAW) the buffer passes through unchanged.

## Host interface (`sha256_top`, `sha256_host_if`)

| port | width | direction | meaning |
|---|---|---|---|
| `clk`, `rst` | 1 | in | clock, synchronous active-high reset |
| `cmd_i` | 3 | in | command code, taken on an edge where `cmd_w_i` is high |
| `cmd_w_i` | 1 | in | command strobe |
| `text_i` | 32 | in | command data |
| `text_o` | 32 | out | digest word selected by the last READ |
| `cmd_o` | 4 | out | `{busy, digest_valid, length_error, buffer_full}` |

| `cmd_i` | name | action |
|---|---|---|
| 001 | INIT | new message: H ← IV, buffer and length cleared |
| 010 | WRITE | `text_i` → next buffer word (word 0 first, big-endian); dropped after 16 words |
| 011 | LEN | `text_i` = low word of the total message length in bits |
| 111 | LEN_HI | `text_i` = high word of the message length (cleared by INIT) |
| 100 | HASH_PAD | hash the buffer as the padded last block |
| 101 | HASH_RAW | hash the buffer as a complete block |
| 110 | READ | `text_o` ← digest word `text_i[2:0]` (0 = H0) on the next edge |

While `busy` is high, every command except READ is ignored. A hash command
resets the write pointer, so the next block starts again at word 0.
`digest_valid` rises in the cycle the core finishes, exactly 70 cycles after the
edge that took the hash command.

To hash a message of L bytes:

1. Send INIT.
2. For each whole 64-byte block: send 16 WRITEs, then HASH_RAW, then wait for `!busy`.
3. For the rest, if it has at most 55 bytes: send its words, then LEN and LEN_HI (8·L), then HASH_PAD.
4. If the rest has 56 to 63 bytes: pad it yourself (0x80, zeros, 64-bit length)
   and send the resulting two blocks with HASH_RAW.
5. Read the eight digest words.

## What follows the published design and what does not

Taken from the published design:

* the split into padding, bit selection, message scheduler, compression function
  and H0..H7 registers with a final adder;
* a message schedule computed one word per cycle, in the round's own cycle;
* the K constant table inside the compression function;
* 70 cycles per 512-bit block;
* single-cycle, single-block padding;
* clock enables in place of gated clocks;
* the host port names and widths (`cmd_i[2:0]`, `cmd_w_i`, `text_i[31:0]`,
  `text_o[31:0]`, `cmd_o[3:0]`, `clk`, `rst`), and WRITE as command code 010.

Choices made for this RTL:

* **Command encoding and status bits.** Only the port names and the code for
  writing text are given. All other codes, and the meaning of the `cmd_o` bits,
  are this design's own.
* **Cycle budget.** Only the 70-cycle total, one padding cycle and 64 round
  cycles are fixed. Two accounts of the remaining cycles disagree: one gives 2
  cycles to outputting the hash, the other 3 to padding and 1 to output. Here
  the remaining cycles are spent as in the first table above. The two-cycle
  final addition with four shared adders is this design's reading of the
  "arithmetic resource sharing" optimisation.
* **σ0 uses a right shift by 3**, as FIPS 180-4 defines it. The published
  formula lists a shift by 10 for σ0 as well as for σ1. With 10 the result is no
  longer SHA-256.
* **Padding limits.** Padding covers only a final block with at most 447 message
  bits. Longer tails and longer messages are sent as finished blocks.
  `length_error` flags a violation.
* The K table and the initial value are the standard FIPS 180-4 numbers. They
  are not printed with the design.
* **Resources.** The published Spartan-6 implementation reports 505 slices,
  1397 LUTs and 931 flip-flops. This RTL keeps a 512-bit message buffer
  separate from the 512-bit padded block, plus a 512-bit schedule window and the
  digest register, so a straight synthesis will use more storage than that.
  No FPGA mapping of this RTL has been done.

## Files

| file | contents |
|---|---|
| `rtl/sha256_pkg.sv` | types, initial value, command codes |
| `rtl/sha256_top.sv` | top level: host interface and core |
| `rtl/sha256_host_if.sv` | command decoder, message buffer, digest read-back |
| `rtl/sha256_core.sv` | block engine |
| `rtl/sha256_controller.sv` | state machine and round counter |
| `rtl/sha256_padding.sv` | padding block |
| `rtl/sha256_bit_select.sv` | word selection from the block |
| `rtl/sha256_msg_scheduler.sv` | W_t generation and window |
| `rtl/sha256_compress.sv` | working variables and round logic |
| `rtl/sha256_k_rom.sv` | round constants |
| `rtl/sha256_hash_regs.sv` | H0..H7, final addition, digest register |
| `rtl/sha256_{ch,maj,sum0,sum1,sigma0,sigma1}.sv` | logic functions |
| `tb/sha256_ref_pkg.sv` | software model of SHA-256 used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every module has a self-checking testbench. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model in
`tb/sha256_ref_pkg.sv` is written independently of the RTL: bit loops,
shift-pair rotations and a fully expanded schedule. It derives the round
constants at run time from exact integer cube roots.

* `tb_sha256_top` runs the whole design through its port, with no parameters
  changed. It checks these messages against the model:
  * the published vectors for "", "abc" and the 448-bit two-block message;
  * a string of '6' characters;
  * random messages of up to 250 bytes.

  It checks the 70-cycle latency of every block. It also counts padded blocks,
  unpadded chained blocks, length errors, full-buffer drops, commands ignored
  while busy, and INITs, and fails if any of them never happens.
* `tb_sha256_core` checks the same vectors and random messages at the core,
  with a 69-cycle latency per block.
* `tb_sha256_controller` checks the cycle-exact schedule of every control output.
* The unit testbenches cover:
  * padding for every tail length 0..447 and the error above it;
  * word selection and all 64 scheduler words;
  * 64 random rounds of the compression logic;
  * all 64 constants;
  * the two-half final addition;
  * 2000 random operands for each logic function.

The controller and host interface carry assertions: `done` and `start` are
single-cycle pulses, and a start never reaches a busy core.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sha256_pkg.sv tb/sha256_ref_pkg.sv \
          tb/tb_sha256_top.sv --top-module tb_sha256_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_sha256_top` with any other testbench name. The full top-level test
takes a few seconds.
