# Grain-128AEAD hardware core

Grain-128AEAD is a lightweight stream cipher that provides authenticated
encryption with associated data. It takes a 128-bit key and a 96-bit nonce and
produces a 64-bit tag. Its whole state is two 128-bit shift registers and two
64-bit registers. The cipher is built for small hardware, but it can also run
fast: each clock can compute several cipher steps, because the feedback
functions do not read the newest bits of the registers. This RTL implements
the cipher as one synthesizable core. A parameter `P` sets how many cipher
steps it takes per clock, from 1 (bit-serial) to 64. The default, 32, is the
highest level that works by simply copying the feedback logic. At 64 the
copies are chained together ("unrolled").

At the default settings the core goes from `start` to its first message chunk
in 16 clocks. It then encrypts and authenticates 16 message bits per clock.

## The cipher in one page

The core has two parts.

**Pre-output generator.** It holds an LFSR `S = s0..s127` and an NFSR
`B = b0..b127`. Index 0 is the bit that leaves next and new bits enter at
index 127. One step computes:

```
LFSR feedback   L(S) = s0 + s7 + s38 + s70 + s81 + s96
NFSR feedback   s0 + F(B),
                F(B) = b0 + b26 + b56 + b91 + b96 + b3b67 + b11b13 + b17b18
                     + b27b59 + b40b48 + b61b65 + b68b84 + b22b24b25
                     + b70b78b82 + b88b92b93b95
pre-output      y = h + s93 + b2 + b15 + b36 + b45 + b64 + b73 + b89
                h = b12s8 + s13s20 + b95s42 + s60s79 + b12b95s94
```

Additions are XOR and products are AND.

**Authentication module.** It holds a 64-bit shift register `R` and a 64-bit
accumulator `A`.

After initialization the pre-output bits alternate. Even bits are keystream,
`z_i = y_{384+2i}`, and the ciphertext bit is `c_i = m_i + z_i`. Odd bits are
authentication bits, `z'_i = y_{384+2i+1}`. For every message bit the core
does two things:

- If `m_i = 1`, it XORs `R` into `A`.
- It shifts `z'_i` into `R` at `r63`.

The message is padded with a single 1 bit. After that bit has been processed,
`A` is the tag.

A bit marked as associated data is authenticated but not encrypted: its
keystream bit is treated as 0. Such bits may appear anywhere in the stream.

## One run, step by step

| phase | cipher steps | clocks (default P = 32) | what is shifted in |
|---|---|---|---|
| load | 128 | 4 | NFSR gets `k0..k127`. LFSR gets `IV0..IV95`, 31 ones and a zero |
| init | 256 | 8 | normal feedback + `y` into both registers |
| key re-introduction | 128 | 4 | LFSR feedback + `k_t`, NFSR normal. `y256..y319` go to `A`, `y320..y383` go to `R` |
| run | 2 per message bit | 1 per 16 message bits | normal feedback |

From `start` to `ready` takes 512/P clocks. A single 64-bit block is finished
640/P clocks after `start`. The key is needed twice: at load and again during
key re-introduction. The core therefore reads it from the `key` port, and the
host must hold that port stable until `ready`. Key storage stays outside the
cipher.

The accumulator is filled the way the hardware description of the cipher
suggests, through the register. The first 64 pre-output bits of key
re-introduction shift into `R`. In the clock that produces `y320`, `R` is
copied into `A` while the next bits begin to shift in.

## Several steps per clock (`grain_pregen`)

`grain_pregen` builds P stages in a chain. Stage `k` receives the two register
windows as they stand after `k` steps. It holds its own copy of `grain_f`,
`grain_g` and `grain_h`, and passes on both windows shifted by one, with the
new feedback bit at index 127. The register is loaded from the last stage.
Written this way, the code is simple to read and the same code covers every P.

- **P ≤ 32.** A step never reads a bit that an earlier step in the same clock
  produced. The highest feedback tap, `s96`/`b96`, is still inside the old
  state for `k ≤ 31`. The chain is therefore only wiring, and synthesis gives
  P independent copies of f, g and h. This is the parallelism the cipher was
  designed to have.
- **P = 64.** Stage `k ≥ 32` reads bit 96 of its window, and that bit is the
  feedback output of stage `k−32`. So `f_32` takes the output of `f_0`, and
  likewise for g and h. The longest path roughly doubles.

The same chain runs in every phase. Each step chooses its feedback with the
mode: load bit, feedback plus `y`, feedback plus key bit, or plain feedback.
During initialization each `y` therefore feeds back into the later steps of
the same clock.

## Keystream and authentication bits per clock

In each clock the P-bit pre-output word is split into even and odd bits. This
split plays the role of the multiplexer in the cipher's block diagram. The
core handles W = P/2 message bits per clock:

- `z` = bits 0, 2, 4, … of the word
- `z'` = bits 1, 3, 5, … of the word

At P = 1 the core alternates between two kinds of clock. The first takes a
message bit and produces its keystream bit. The second produces `z'` and
updates the accumulator. The input shows this by dropping `in_ready` every
other clock.

## Authentication module (`grain_auth`)

W message bits in one clock need register bits that are not yet in `R`. Message bit
`m_{i+u}` must be multiplied with `r_{j+u}` as `R` stands after `u` shifts.
That value is `r_{j+u}` for `j+u < 64`, and otherwise the newly generated
`z'_{i+j+u-64}`. The module forms the vector `{z' bits, R}`, 64+W bits long.
For each set message bit `u` it XORs the 64-bit slice that starts at `u` into
`A`, then shifts `R` by W. This gives exactly the same result as applying the
one-bit rule W times.

`AUTH_PIPE = 1` (the default) inserts a register stage in front of the module.
The stage holds the pre-output bits, the message bits and the controls. It
cuts the path from the shift registers through `y` into the accumulator, which
is the critical path at high P. Every update moves one clock later and the
result does not change. The tag is ready one clock later.

## Controller (`grain_ctrl`)

There are two implementations, chosen by `OPT_CTRL`. Both give identical
outputs in every clock.

- **Counter FSM** (`OPT_CTRL = 0`). States IDLE, LOAD, INIT, KEYMIX, RUN and
  DONE, with a cycle counter.
- **Divider and thermometer register** (`OPT_CTRL = 1`, the default). A
  `K = log2(128/P)`-bit divider advances a 4-bit register once every 128 cipher
  steps, and the register fills with ones. Bit 1 ends loading, bit 3 ends the
  feedback part of initialization and bit 4 starts running. That is `4 + K`
  flip-flops for the schedule, plus a busy flag and a done flag. A phase that
  stays on uses its bit directly. A one-phase window is the AND of one bit and
  the inverse of the next. The accumulator move, 448 steps after `start`,
  falls halfway between two ticks. It is decoded from the divider's half
  count.

`slice` is the low counter or divider bits. It selects which P-bit slice of
the key and nonce is used in the current loading or key re-introduction clock.

## Interface of `grain128aead`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears all state) |
| `start` | in | 1 | begin loading; restarts the core in any phase |
| `key` | in | 128 | `key[i] = k_i`, stable until `ready` |
| `iv` | in | 96 | `iv[i] = IV_i`, stable during loading |
| `ready` | out | 1 | running phase |
| `in_valid` / `in_ready` | in / out | 1 | chunk handshake. If `in_valid` is low, the cipher waits (stall) |
| `in_data` | in | W | message bits, bit 0 first |
| `in_ad` | in | W | 1 = associated-data bit (authenticated, sent through unencrypted) |
| `in_last` | in | 1 | the chunk contains the padding bit |
| `out_valid`, `out_data` | out | 1, W | ciphertext, one clock after the chunk is accepted |
| `tag`, `tag_valid` | out | 64, 1 | `tag[j] = a_j`. Valid 1 clock after the last chunk, plus 1 with `AUTH_PIPE`, plus 1 at P = 1. Held until the next `start` |

The host takes care of the padding. It appends a 1 after the last message bit,
fills the rest of that chunk with zeros and raises `in_last`. Zero message
bits leave the accumulator unchanged, so the fill does not change the tag. The
ciphertext bits of the padding and the fill have no meaning.

**Bit order.** In the hex notation of the cipher's published test vectors,
`k_0` is the most significant bit of the first byte, and the same holds for
the nonce, the message, the keystream and the tag. The key
`0x0123…` therefore has `k0..k7 = 0,0,0,0,0,0,0,1`. To build the port values,
reverse the bits of the whole hex number. `tb/grain_ref_pkg.sv` has
`rev128`, `rev96` and `rev64` for this.

| key | nonce | message stream | keystream (first 128 bits) | tag |
|---|---|---|---|---|
| 0 | 0 | `80` | `c800a52f948b89b85cee6cfd8571f90f` | `aab555c073e67664` |
| `0123456789abcdef123456789abcdef0` | `0123456789abcdef12345678` | `ff80` | `c2b918c6baf6dea0865200d46858a37b` | `782f4c4a8907ba7f` |

## Parameters

| module | parameter | default | range |
|---|---|---|---|
| `grain128aead` | `P` | 32 | 1, 2, 4, 8, 16, 32, 64 (elaboration error otherwise) |
| | `AUTH_PIPE` | 1 | 0: no register stage in front of the authentication module |
| | `OPT_CTRL` | 1 | 0: counter FSM controller |

The straightforward implementation of the cipher is `AUTH_PIPE = 0`,
`OPT_CTRL = 0`. The high-speed form at P = 32 and 64 is the default.

## Files

| file | content |
|---|---|
| `rtl/grain_pkg.sv` | sizes, step modes, phase enum |
| `rtl/grain_f.sv`, `rtl/grain_g.sv`, `rtl/grain_h.sv` | LFSR feedback, NFSR feedback, pre-output function |
| `rtl/grain_pregen.sv` | LFSR, NFSR and the P-stage step chain |
| `rtl/grain_auth.sv` | register, accumulator, accumulator logic, pipeline stage |
| `rtl/grain_ctrl.sv` | phase controller, both variants |
| `rtl/grain128aead.sv` | top: wiring, keystream/auth split, message interface |
| `tb/grain_ref_pkg.sv` | bit-serial model of the cipher, used as the reference |
| `tb/tb_*.sv`, `tb/*_bench.sv`, `tb/grain_top_driver.sv` | testbenches |

## Verification

Every testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. The reference is
`grain_ref_pkg`, a one-bit-per-step model that takes its taps from lists and
shares no code with the RTL. The model reproduces both published test
vectors.

| testbench | what it covers |
|---|---|
| `tb_grain_f`, `tb_grain_g`, `tb_grain_h` | the three functions against tap lists: f on random and single-bit windows, g on random, sparse and all-ones windows, h on random and dense random windows |
| `tb_grain_pregen` | every pre-output bit of load, init, key re-introduction and 2048 running steps, with pauses, at P = 1, 8, 32, 64 |
| `tb_grain_auth` | initialization and move, chunked accumulation and tag timing at P = 1, 2, 32, 64, with and without the pipeline stage |
| `tb_grain_ctrl` | both controllers against the phase schedule at P = 1, 8, 32, 64, with restarts |
| `tb_grain128aead` | the whole core at P = 1, 2, 4, 16, 32, 64 with mixed options |
| `tb_grain128aead_full` | the core at its default parameters |
| `tb_grain128aead_blocks` | one 64-bit block and then 1000 blocks (64,000 bits), streamed at full rate at P = 32, 64 and 1: every ciphertext bit, the tag and the clock count |

The two core testbenches run both published vectors. Each is run once for the
tag and once with a zero message, to read back the keystream. They also run
random messages of up to 300 bits with associated-data bits, random stalls and
restarts during initialization. They check the clock counts: 512/P clocks to
`ready`, 640/P clocks for one 64-bit block, and the tag latency. A mechanism
that never occurs counts as a failure.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
          rtl/grain_pkg.sv tb/grain_ref_pkg.sv tb/tb_grain128aead.sv --top tb_grain128aead
./obj_dir/Vtb_grain128aead
```

The RTL files carry no timescale, and the testbenches do, so `--timescale`
sets one for the RTL. Verilator finds the other modules through `-I`. Use the
same command for the other testbenches. `tb_grain_ctrl` does not need
`tb/grain_ref_pkg.sv`. Each simulation takes a few seconds at most.

## Departures, gaps and choices

- **Not built:** the Galois-transformed shift registers and the transformed
  pre-output function. They are the high-speed option for P ≤ 16. They need
  the moved tap positions and a remapped initial state, and those are not
  specified here. The registers in this core are in Fibonacci form
  throughout.
- The limit of 2^80 keystream bits per key and nonce is not enforced. The host
  must keep to it.
- This design chose the following itself: the message handshake, the
  padding-by-host convention, the registered ciphertext output, `start`
  acting as a restart, zero reset values, and the decoding of the accumulator
  move from the divider's half count.
- The parallel accumulator rule for a general W is the natural extension of
  the one-bit rule with "future" register bits. Tests confirm that it matches
  the serial model bit for bit.
- A key and nonce pair must never be reused. The core does not check this.
- The core has no protection against fault injection.
