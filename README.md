# Streaming SHA-2 hash core

This core computes SHA-256 hashes, and SHA-224, SHA-384 or SHA-512 through a
parameter. The user feeds the message in **one byte per clock cycle**, marks the
last byte, and later reads the digest. The user never pads the message and never
pauses inside a message. The core compresses each block while the next one is
still arriving. A SHA-256 block is 64 bytes and its compression takes 64 rounds,
one per cycle, so the rounds keep up with the input exactly. No message buffer
is needed, and messages can be of any length up to the standard's 2^64 bits.

Two details make this work without a gap between blocks:

* **The digest update is part of the final round.** Adding the block's result
  to the running hash value usually costs one extra cycle per block. Here it is
  computed in the same cycle as round 63.
* **Part of each round is computed a round early.** The term `h + K[t] + W[t]`
  is summed one round ahead, because the next round's `h` is already known: it
  is the current `g`.

A latch-based clock gate stops the clock of the round datapath whenever no
block is being loaded or compressed.

```
 user bytes ──► padder ──► message scheduler ──► compression ──► digest
                  │        (block buffer +          function
                  │         16-word window)            ▲
                  └────────────► control unit ─────────┘
                                     │ core_en
                                clock gate ──► gated clock of window, a..h, H
```

## Using the core

`sha2_core #(.VARIANT(sha2_pkg::SHA256))` has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `test_en` | in | 1 | forces the gated clock on (tie to 0 in normal use) |
| `in_valid`, `in_data`, `in_last` | in | 1, 8, 1 | message byte; `in_last` marks the final byte |
| `in_ready` | out | 1 | a byte is taken in a cycle with `in_valid && in_ready` |
| `digest` | out | 224/256/384/512 | H0‖H1‖…, H0 in the top bits, truncated for SHA-224/384 |
| `digest_valid` | out | 1 | one-cycle pulse; `digest` holds its value until the next message |

The protocol:

* `in_ready` is high for the whole time a message is being accepted. The user
  may send a byte every cycle, or leave gaps (`in_valid` low) at will.
* After the byte with `in_last`, `in_ready` goes low while the padder emits
  the padding. For SHA-256 that is 9 to 72 cycles. Then the next message may
  start at once, even while the previous one is still being compressed.
* Digests come out in message order. Say the final byte of a message is taken
  in cycle `n`, and padding the message adds `P` bytes. Then `digest_valid` is
  high in cycle `n + P + R + 2`, where `R` is 64 rounds (SHA-224/256) or 80
  rounds (SHA-384/512). The 2 extra cycles are one in the padder and one in
  the digest register.
* A message must contain at least one byte, and only whole bytes.

## Timing of the block pipeline

These numbers are for SHA-256. Suppose the padder emits byte 63 of block `k`
in cycle `c`. In that same cycle, the scheduler loads its 16-word window
straight from the block buffer, with the byte arriving in that cycle merged in.
The compression function loads its starting values. Rounds 0–63 then run in
cycles `c+1 … c+64`.

Meanwhile the bytes of block `k+1` are written into the buffer. At full input
rate, the last of them arrives in cycle `c+64`. That is exactly round 63 of
block `k`, and the control unit loads block `k+1` in that cycle. So in one and
the same clock edge:

* the hash value takes `H + (a..h after round 63)`;
* the working variables take that same sum, or the initial hash value if block
  `k+1` starts a new message;
* the window takes the new block;
* the precompute register takes `h_start + K[0] + W[0]` of the new block.

This is the longest path of the design: a full round, then the hash addition,
then a three-input add for the precompute register. It occurs only at block
boundaries.

A block can never arrive before the rounds of the previous block are done. The
input delivers at most one byte per cycle, and a block has at least as many
bytes as it needs rounds (64 ≥ 64 for SHA-256, 128 ≥ 80 for SHA-512). The
assertion `a_block_overrun` in the control unit checks this. If the user
pauses, the datapath finishes its block, waits with its clock gated, and starts
the next block the cycle after that block's last byte leaves the padder.

## The units

**Padder** (`sha2_padder`). It forwards the message bytes through one
register. After `in_last` it appends the byte `0x80`, then zero bytes, then
the message length in bits as a big-endian field. The field is 8 bytes for
SHA-224/256 and 16 bytes for SHA-384/512. It fills the last block to its end.
If the `0x80` byte falls too late in a block to leave room for the length,
the padding runs on into one more block.

Each output byte carries:

* its position in the block;
* a block-end flag;
* a first-block-of-message flag;
* a last-block-of-message flag, read only together with the block-end flag.

The byte counter has 61 bits, enough for 2^64 − 8 bits.

**Message scheduler** (`sha2_msg_scheduler`). It has two registers:

* A block buffer of 64 bytes (128 for SHA-384/512). It runs on the free clock
  and is written at the position the padder gives, so it is addressed by a
  write pointer, not shifted.
* A window of sixteen words holding `W[t..t+15]`. It runs on the gated clock.
  It is loaded from the buffer as big-endian words. Each round it shifts by one
  word and appends
  `W[t+16] = σ1(W[t+14]) + W[t+9] + σ0(W[t+1]) + W[t]`.

The message expansion therefore costs no cycles: `W[t]` is always at the head
of the window. `W[t+1]` sits next to it, ready for the precompute register.

**Compression function** (`sha2_compression`). It holds:

* the working variables `a..h`;
* the hash value `H0..H7`;
* the precompute register `hkw`, which holds `h + K[t] + W[t]`.

Each round computes `T1 = hkw + Σ1(e) + Ch(e,f,g)` and
`T2 = Σ0(a) + Maj(a,b,c)`. It also forwards `g + K[t+1] + W[t+1]` into `hkw`
for the next round. In the final round the output `hash_new = H + next(a..h)`
is valid. The core registers it as the digest at the end of a message. The
assertion `a_hkw_forwarded` checks in every round that `hkw` equals
`h + K[t] + W[t]`.

**Control unit** (`sha2_control`). This is the round counter. It loads a block
when the padder signals block end. It counts rounds 0…R−1 and flags the final
round (`fin`), and the final round of a message (`fin_last`). It drives the
clock-gate enable `core_en = load | run`.

**Clock gate** (`sha2_clock_gate`). A latch is transparent while `clk` is low
and holds the enable. It feeds an AND with `clk`. An enable that changes while
the clock is high cannot shorten or create a pulse. Synthesis reports one latch
bit here; that latch is intended. On an FPGA or ASIC this module is normally
replaced by the vendor's clock-gating cell or clock-enable buffer.

Where the gate sits in the clock tree:

| clock | registers |
|---|---|
| gated | expansion window, `a..h`, `H`, `hkw` |
| free-running | padder, block buffer, round counter, digest register |

The gate saves power in the gaps: when the user pauses, between messages, and
in the 48 idle cycles per 128-byte block of SHA-384/512.

## Variants and constants

`sha2_pkg` defines the variant enum, the round functions and the constants.
Words are carried as 64 bits everywhere. The 32-bit variants use bits [31:0]
only, so synthesis removes the upper halves for them.

| | SHA-224 | SHA-256 | SHA-384 | SHA-512 |
|---|---|---|---|---|
| word / block | 32 / 512 | 32 / 512 | 64 / 1024 | 64 / 1024 |
| rounds | 64 | 64 | 80 | 80 |
| length field | 64 bits | 64 bits | 128 bits | 128 bits |
| digest | 224 | 256 | 384 | 512 |

The constants follow the SHA-2 standard (FIPS 180-4):

* `K64[i]` is the first 64 bits of the fractional part of the cube root of the
  i-th prime, for i = 0…79. The SHA-256 constants are its upper 32 bits.
* `IV_LO[i]` and `IV_HI[i]` are the first 64 bits of the fractional parts of
  the square roots of primes 1–8 and 9–16. They serve SHA-512 and SHA-384
  directly. SHA-256 takes the upper halves of `IV_LO`; SHA-224 takes the lower
  halves of `IV_HI`.

## Design decisions and limits

* **Byte-wide input.** This follows from one requirement: the number of read
  cycles per block must at least equal the number of rounds. 512 bits over 64
  rounds gives 8 bits per cycle.
* **Buffer plus window.** The incoming block sits in a 512-bit buffer, separate
  from the 16-word expansion window, so the registers total 1024 bits.
  A single 512-bit register cannot hold both the live window of one block and
  the bytes of the next.
* **Round pipelining.** Only the one-round-ahead `h + K + W` precomputation is
  implemented. No deeper pipelining or unrolling is done.
* **Message format.** Only whole-byte messages are accepted, and an empty
  message cannot be expressed.
* **Reset.** Reset is asynchronous and active low. Reset values are the initial
  hash for `a..h`/`H` and zero elsewhere. The block buffer is not reset.
* **Throughput.** At SHA-256, one 512-bit block is hashed every 64 cycles, or
  8 bits per clock. SHA-384/512 gives the same 8 bits per clock, input-bound.
  No power, area or frequency numbers are claimed for this RTL.

## Verification

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_sha2_core` | SHA-256 core at default parameters (details below) |
| `tb_sha2_variants` | the same messages through SHA-224, SHA-384 and SHA-512 cores |
| `tb_sha2_padder` | padded stream, positions and flags, SHA-256 and SHA-512 (details below) |
| `tb_sha2_msg_scheduler` | `W[t]`/`W[t+1]` for 64 rounds of 4 blocks against an independent expansion; next block written during expansion; scrambled write order |
| `tb_sha2_compression` | the chaining value after each block against an independent SHA-256 model and the standard's digest of "abc" (details below) |
| `tb_sha2_control` | every output, every cycle, against a cycle model, for random block spacings, SHA-256 and SHA-512 |
| `tb_sha2_clock_gate` | enable changes in both clock phases; pulse count and no glitches |

**`tb_sha2_core`** streams 19 messages. They include "abc" and lengths
1–1000 bytes around every block and padding boundary. Messages are sent three
ways: back to back, with random stalls, and after waiting for the previous
digest. For every message it checks:

* the digest against expected values computed independently in software;
* the latency from the final byte to `digest_valid`;
* that the gated clock pulses exactly in the enabled cycles.

It also counts each mechanism and fails if one never happened: back-to-back
blocks, a start from idle, padding spilling into an extra block, bytes read
during compression, overlapping messages, stalls and gated cycles.

**`tb_sha2_padder`** compares the whole padded stream, positions and flags
against a reference padding. It also checks that `in_ready` stays low for
exactly the number of padding bytes.

**`tb_sha2_compression`** runs five blocks:

* chained blocks of one message;
* a new message loaded in the final round of the previous block;
* a block started from idle.

Each testbench's header comment says how its messages and expected values are
made. Shared test code:

* `sha2_tb_stream` plays the user process and checks digests.
* `sha2_tb_vectors` holds the messages and expected digests.
* `sha2_tb_ref` is a plain SHA-256 reference model.

To run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/sha2_pkg.sv tb/sha2_tb_vectors.sv tb/sha2_tb_ref.sv tb/tb_sha2_core.sv \
  --top-module tb_sha2_core -o sim
./obj_dir/sim
```

For another testbench, replace `tb_sha2_core` in both places. Each one runs in
well under a second.

## Files

| file | content |
|---|---|
| `rtl/sha2_pkg.sv` | variant enum, constants, round functions, `state_t` |
| `rtl/sha2_core.sv` | top level |
| `rtl/sha2_padder.sv` | padder unit |
| `rtl/sha2_msg_scheduler.sv` | block buffer and expansion window |
| `rtl/sha2_compression.sv` | rounds, precomputation, digest update |
| `rtl/sha2_control.sv` | round counter and sequencing |
| `rtl/sha2_clock_gate.sv` | latch-based clock gate |
| `tb/*.sv` | testbenches and shared test code |
