# Pipelined Keccak-512 hash engine

This is a hardware engine for Keccak-512: the sponge function over the 1600-bit permutation
Keccak-f[1600], with a bit rate of r = 576 and a capacity of c = 1024. It was chosen as SHA-3
in its original padding. A message arrives as a stream of 64-bit words and leaves as a 512-bit
digest. The engine has two parts:

* a **padder**, which packs the words into 576-bit blocks and applies Keccak's padding;
* a **permutation core**, which XORs each block into the 1600-bit state and applies the 24
  rounds of Keccak-f[1600].

The main idea is to speed up the round logic by **pipelining** it. By default a register cuts
each round in two: the first sits after theta and rho/pi, the second after chi and iota. This
roughly halves the longest combinational path, so the clock can run faster. Two independent
sponge states then circulate through the two halves, so both halves do useful work on every
cycle. The engine also has an iterative (non-pipelined) core that applies two full rounds per
cycle. This core serves as the reference point, and one parameter selects it.

The digests match published Keccak-512 values (see *Verification*).

## Block structure

```
 in[63:0], in_ready,      +---------------+  576-bit block  +--------------------+  1600-bit state
 is_last, byte_num  ----> | keccak_padder | ---------------> | keccak_f_pipe      | ---- truncate ---> out[511:0]
 buffer_full       <----  |  (9 x 64-bit  |  out_ready/last  |   (PIPELINED = 1)  |   to lanes 0..7    out_ready
                          |   shift buf)  | <--------------- | or keccak_f_iter   |
                          +---------------+      f_ack       |   (PIPELINED = 0)  |
                                                             +--------------------+
```

| file | role |
|---|---|
| `rtl/keccak_pkg.sv` | sizes, types, and the functions that compute the round constants and rho offsets |
| `rtl/keccak_theta.sv`, `keccak_rho_pi.sv`, `keccak_chi.sv`, `keccak_iota.sv` | the four steps of a round, combinational |
| `rtl/keccak_round_const.sv` | maps a round number to its round constant |
| `rtl/keccak_round.sv` | one whole round (the four steps in series) |
| `rtl/keccak_padder.sv` | word packing and padding |
| `rtl/keccak_f_iter.sv` | iterative core: state register, XOR for absorbing, first-round multiplexer, round counter, `ROUNDS_PER_CYCLE` rounds |
| `rtl/keccak_f_pipe.sv` | pipelined core with `STAGES` pipeline registers (2 or 4) |
| `rtl/keccak_top.sv` | padder + core + truncation |

The state is one flat 1600-bit vector. Lane (x, y) occupies bits `[64*(5y+x) +: 64]`. The
step modules map one 1600-bit state to another. `keccak_rho_pi` is pure wiring. The round
constants are computed when the design elaborates, from the LFSR that defines them. The rho
offsets come from the usual (t+1)(t+2)/2 walk. The RTL holds no typed-in tables.

## The pipelined core (`keccak_f_pipe`)

This is the least obvious part of the design.

**Why the pipeline needs more than one message.** In a sponge, block k+1 of a message can only
be absorbed once block k has gone through all 24 rounds. A round pipeline therefore cannot
speed up a single message: with two registers, one block takes 2 cycles per round, 48 cycles
in all. The pipeline pays off only when the slots hold *different* sponge states. In this
design, those are the last block of one message and the first block(s) of the next.

**Tokens.** Each pipeline register carries a tag beside its 1600 bits:

* `valid`;
* `round`: the round being computed, or in the last register, the round just completed;
* `last`: this block is the final block of its message.

The round number of the state entering iota selects the round constant. Every cycle the token
in the last register decides what enters the first step (theta):

| token in last register | what enters theta |
|---|---|
| valid, round < 23 | the same state, round + 1 |
| round 23, `last` set | nothing from it: the state is the result. `out_ready` is high this cycle and the slot is free |
| round 23, `last` clear | the state XOR the next padded block, round 0 (`ack` to the padder). If the padder has no block yet, **all registers hold** (stall) |
| empty or just finished | a new message's first block XORed into a zero state, but only if no message is still absorbing (`open_q`); otherwise a bubble |

At most one message is "open" (has blocks left to absorb). Any block the padder offers belongs
either to that message or, if none is open, starts a new one. Results come out in message
order.

**STAGES = 4.** Setting this parameter gives each of theta, rho/pi, chi and iota a register of
its own. Four tokens are then in flight, and a round takes 4 cycles (96 per block). This is
the four-stage schedule where a block re-enters theta on the cycle after it leaves iota. The
two-register cut stays the default.

**Timing.** At the default of two registers:

* A block is absorbed in the cycle `ack` is high.
* Its permuted state is on `out` 48 cycles later.
* A 64-byte message sent to an idle engine gives its digest 57 cycles after its first word:
  9 cycles to fill the block, plus 48 in the core.

## The iterative core (`keccak_f_iter`)

There is one 1600-bit state register. On `first_round`, which means the core is idle and a
block is offered, a multiplexer picks the absorbed state (the register XOR the block, or zero
XOR the block for a new message). Otherwise it picks the register itself. `ROUNDS_PER_CYCLE`
instances of `keccak_round` follow in series; the default is 2. A counter supplies the round
numbers. With the default of 2, a block takes 12 cycles, and the first two rounds are computed
in the same cycle as the absorbing XOR.

## Padder and message format

* **Word format.** One 64-bit word per cycle, accepted while `in_ready` is high and
  `buffer_full` is low. Message byte k of a word is in bits `[8k+7:8k]`, so a word is a
  little-endian Keccak lane.
* **Block packing.** The buffer shifts left by 64 bits for each word. After 9 words, the first
  word sits in bits `[575:512]` and becomes lane 0.
* **End of message.** The last word carries `is_last` and `byte_num` valid bytes (0 to 7). A
  message whose length is a multiple of 8 bytes ends with an extra word that has
  `is_last = 1` and `byte_num = 0`.
* **Padding.** Keccak pad10\*1 at byte level: byte 0x01 after the message, then zero bytes,
  then 0x80 in the last byte of the block. When both fall on the same byte it becomes 0x81.
  The padder inserts the zero words and the closing word itself, one per cycle. `buffer_full`
  stays high while it does so.
* **Handshake with the core.** A full block is offered with `out_ready`; `out_last` marks the
  final block of a message. The block stays on offer until `f_ack`.

Digest format: `out[511:448]` is lane 0, down to `out[63:0]` for lane 7, and each lane is
little-endian. To get the usual byte-string digest, byte-reverse each 64-bit lane and
concatenate lanes 0 to 7.

Reset is synchronous and active high (`rst`) in every block.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `keccak_top.PIPELINED` | 1 | 1: pipelined core, 0: iterative core |
| `keccak_top.PIPE_STAGES` / `keccak_f_pipe.STAGES` | 2 | pipeline registers per round (2 or 4) |
| `keccak_top.ROUNDS_PER_CYCLE` / `keccak_f_iter.ROUNDS_PER_CYCLE` | 2 | rounds per cycle of the iterative core (must divide 24) |

Rate, capacity, lane width and digest width are fixed in `keccak_pkg` (576, 1024, 64, 512).

## Departures and choices to be aware of

* **Pipeline depth.** The round is specified with two pipeline registers, but its schedule is
  also drawn with four stages and four blocks in flight. The two-register version is the
  default; the four-stage one is `PIPE_STAGES = 4`.
* **Which blocks share the pipeline, and the stall.** These rules are this design's own. Blocks
  of one message cannot overlap, so the in-flight states belong to different messages. Only
  one message absorbs at a time.
* **End of message.** This is marked by a separate `is_last` input rather than by `in_ready`
  going low. `in_ready` low cannot tell a pause from the end of the message, or say how many
  bytes of the last word are valid.
* **Padding granularity.** Padding works on whole bytes, not bits. Bit-length messages are not
  supported.
* **Truncation.** The digest is cut down from the 1600-bit state in the top. The cores
  themselves output the full state.
* **Round count.** The core applies the full 24 rounds of Keccak-f[1600]. The round steps are
  the standard Keccak definitions.
* **Squeezing.** A 512-bit digest fits in the first 576 bits of the state, so it is read
  after the final absorbing permutation with no further permutations. Longer outputs, which
  would need more squeezing, are not supported.
* **Output timing.** `out_ready` is a one-cycle strobe, and the core has no output
  back-pressure. Capture `out` in the cycle `out_ready` is high.
* **Not modelled.** FPGA-specific mapping and timing are not modelled. A generic synthesis of
  the default top gives about 3800 flip-flop bits: the 576-bit buffer, two 1600-bit pipeline
  registers, and control.

## Verification

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
The testbenches compare against `tb/keccak_ref_pkg.sv`, a behavioural model written separately
as plain loops over a 5×5 lane array. It uses the published round-constant and rotation
tables. The model is itself checked against known answers:

* the first lane of Keccak-f[1600] applied to the zero state, `f1258f7940e1dde7`;
* the Keccak-512 digests of the byte strings 00 01 02 … of lengths 0, 1, 7, 8, 71, 72, 143
  and 200. These cover the empty message, block boundaries, and the 0x81 case.

What each testbench covers:

| testbench | what it checks |
|---|---|
| `tb_keccak_theta`, `_rho_pi`, `_chi`, `_iota`, `_round`, `_round_const` | each step against the model (single-bit and random states); all 24 constants; 24 chained rounds on the zero state |
| `tb_keccak_padder` | blocks for many lengths, random pauses and slow acknowledges; block on offer 9 cycles after its first word |
| `tb_keccak_f_iter` | random multi-block messages; latency 12 cycles |
| `tb_keccak_f_pipe`, `tb_keccak_f_pipe4` | random multi-block messages; latency 48 / 96 cycles; 2 / 4 tokens in flight; stalls |
| `tb_keccak_top` | default build end to end: known answers, random messages, 57-cycle latency. Each mechanism is counted and must occur at least once: padding words, 0x81, closing word, multi-block messages, `buffer_full` back-pressure, overlapping messages, pipeline stall |
| `tb_keccak_top_pipe4`, `tb_keccak_top_iter` | the same for the other two builds |

All testbenches pass. Each runs in well under a second once compiled.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/keccak_pkg.sv tb/keccak_ref_pkg.sv tb/tb_keccak_top.sv \
  --top-module tb_keccak_top -Mdir obj_top -o sim
./obj_top/sim
```

The packages are listed first; `-y` lets Verilator find every module by its file name. Swap
the testbench file and `--top-module` to run the others. To use the engine from your own testbench, copy the
`send_msg` task of `tb_keccak_top`. It handles the word packing, `is_last`/`byte_num`, and
waiting on `buffer_full`.
