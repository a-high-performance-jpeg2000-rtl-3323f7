# JPEG2000 tile encoder: a lifting DWT and three EBCOT/MQ coder pairs

This is a synthesizable SystemVerilog encoder for JPEG2000 Part I. It takes
one image tile at a time and returns one arithmetic-coded byte stream per
code block.

Entropy coding is by far the slowest part of JPEG2000. A 32 x 32 code block
with 16-bit precision can need tens of thousands of coder steps. The wavelet
transform of a whole 128 x 128 tile is much cheaper, at about 100k cycles.
The design therefore uses:

- one simple lifting DWT engine that works in place in the tile memory;
- three complete entropy-coder pairs that code the HL, LH and HH code blocks
  of a level in parallel. A pair is a bit-plane coder (BPC) plus a binary
  arithmetic coder (BAC).

Each BPC and its BAC are decoupled by a 128-entry FIFO of context/decision
pairs (the CXD buffer). The two coders have very different and
data-dependent rates. The FIFO lets the bit-plane coder run ahead instead of
waiting on every arithmetic-coding step.

A code-block decoder (bit-plane decoder plus MQ decoder) sits beside the
encoder. It turns one code-block stream back into coefficients.

Rate control and packet (bit-stream) formation are not part of the hardware.
The host receives each code block's bytes, its number of coded bit planes and
its position. It assembles the JPEG2000 code stream from them.

Default configuration:

| parameter | value |
|---|---|
| tile size | 128 x 128 |
| decomposition levels | 5 |
| code blocks | 32 x 32 |
| wavelets | (5,3) reversible, (9,7) irreversible |
| internal precision | 16 bits |
| CXD buffers | 128 entries |

```
 pixels ──► DWT (memory + lifting processor + controller)
              │ one coefficient per cycle, HL / LH / HH in turn
   ┌──────────┼──────────────┐
   ▼          ▼              ▼
  DF 0       DF 1           DF 2         two's complement → sign-magnitude,
   ▼          ▼              ▼           quantization, top-bit-plane detection
  SM 0 (HL)  SM 1 (LH)      SM 2 (HH)    code-block memories, read by bit plane
   ▼          ▼              ▼
  BPC 0      BPC 1          BPC 2        EBCOT context modelling
   ▼          ▼              ▼
  CXD 0      CXD 1          CXD 2        128 x 6 FIFOs
   ▼          ▼              ▼
  BAC 0      BAC 1          BAC 2        MQ coder → code bytes
            (global controller sequences all of it; pair 0 also codes the final LL)
```

## Operating the encoder (`jp2k_top`)

1. Write the N x N tile through `pix_we / pix_addr / pix_data`.
   - The address is `row * N + column` and the pixels are 8-bit unsigned.
   - The top subtracts 128 (the JPEG2000 DC level shift).
2. Set the configuration and keep it stable while the tile runs:
   - `filter` is `FILT_53` or `FILT_97`;
   - `levels` is 1..5;
   - `bypass_en` turns on bypass;
   - `qen` and `qscale[3]` set up quantization.
3. Pulse `start`. The encoder then:
   1. runs the forward DWT;
   2. codes every code block of level 1, 2, …, `levels`;
   3. finally codes the LL band.
4. When a code block starts on pair k, `cb_valid[k]` pulses, together with:
   - `cb_level` and `cb_by / cb_bx`, the block's row and column in units of
     code blocks;
   - `cb_band[k]`;
   - `cb_numbps[k]`, the number of magnitude bit planes that are coded.
5. The code bytes appear on `cs_valid[k] / cs_byte[k]`. `cs_end[k]` pulses
   after the last byte of the block. There is no backpressure on the bytes.
6. `done` pulses when the last block is finished.

Sub-bands larger than 32 x 32 are split into 32 x 32 code blocks. With the
defaults, level 1 has four blocks per sub-band and every later level has one.

Per-band quantization:

- `qscale[k]` is the reciprocal of the step size, with 8 fraction bits (256 = no
  scaling).
- `qscale[k]` applies to sub-band k (HL, LH, HH) at every level. The LL band
  uses `qscale[0]`.
- Per-level step sizes would need a small extension of the global
  controller.

## The lifting DWT (`dwt`, `dwt_processor`, `dwt_memory`, `dwt_controller`)

Every lifting step of both wavelets, forward or inverse, has the form

    x_new = x_old ± round(a · (x_left + x_right))

**Processor.** It evaluates this form for one sample per cycle. It is built
from:

- an input register;
- a 16-bit adder for the neighbour sum;
- two parallel branches for the product:
  - a shifter for the (5,3) factors −1/2 and 1/4, taking 1 stage;
  - a pipelined 16 x 10 multiplier for the (9,7) factors, taking 4 stages;
- a second 16-bit adder that applies the product to `x_old`.

The latency is 4 cycles through the shifter and 7 through the multiplier.

**Fixed point.**

- (9,7) factors are 10-bit signed numbers with 8 fraction bits: α = −406,
  β = −14, γ = 226, δ = 114 (divide by 256).
- Products are rounded to nearest, with halves rounded up. With this
  rounding the (5,3) steps are exactly the reversible integer lifting of
  JPEG2000. A (5,3) forward transform followed by the inverse returns the
  tile bit for bit.
- The (9,7) path is lossy. A round trip is within a few grey levels.

**Scaling step.** The (9,7) filter ends each level with one "modified scaling"
pass instead of scaling rows and columns separately:

- LL samples are multiplied by 1/K² (169/256);
- HH samples are multiplied by K² (387/256);
- HL and LH are left alone, because their row and column factors cancel.

**Memory and schedule.** The memory is the whole tile (N x N x 16). It has two
synchronous read ports and one write port, and the transform works in place:

- At level l the current LL band occupies every 2^l-th row and column.
- An address is `(row << l) * N + (col << l)`.
- One "iteration" applies one lifting step to all columns, or all rows, of
  the band. (5,3) needs 4 iterations per level; (9,7) needs 8 plus the
  scaling pass.

**Per sample.** For each sample the controller reads:

- the right neighbour on port A;
- the old value on port B.

The left neighbour is the previous sample's right neighbour, kept in a
register. At the band edges the missing neighbour is mirrored (symmetric
extension).

**Iteration cost.** Each iteration costs:

- 1 set-up cycle;
- M·M/2 sample cycles;
- M "preload" cycles for a predict step, which fetch the first even sample of
  each line;
- a 9-cycle drain, because the next iteration reads what this one writes.

For a 128 x 128 tile and five levels this is about 100k cycles.

**External port.** The DWT also has an external load/read port, which is
active while the DWT is idle. The inverse transform is implemented and
tested. The top only uses the forward direction.

## From coefficients to code blocks (`global_controller`, `data_formatter`, `subband_memory`)

After the DWT, the global controller copies one code block of each of HL, LH
and HH:

- The copy reads one coefficient per cycle, taking the three bands in turn.
  One memory read port is therefore enough for all three coders.
- Coefficient (i, j) of a level-l band lies at row `2i·2^(l-1)`, plus
  `2^(l-1)` for LH and HH. Its column is `2j·2^(l-1)`, plus `2^(l-1)` for HL
  and HH.

Each coefficient passes through its **data formatter**:

- it is converted to sign-magnitude;
- it is optionally quantized: `floor(|x| · qscale / 256)`, saturated to 15
  bits, and a zero keeps no sign;
- it is ORed into a detector whose result is the number of bit planes that
  hold a one. The bit-plane coder starts from that plane, and the host needs
  it for the packet header.

The formatter also has a decode direction (sign-magnitude to two's
complement, with the inverse scaling). The code-block decoder in the top
uses it.

The **sub-band memory** is written one word at a time and read bit-plane-wise:

- One 64-bit row holds the four words of one column of a four-row strip.
- Bit `4b + r` of the row is bit b of strip row r.
- One read returns the four magnitude bits of any plane, plus the four sign
  bits.
- The strips are stored one after the other, at address `strip · 32 + column`.

When the three blocks are in place, the controller:

1. starts the three BPCs;
2. waits until every BPC has finished and every BAC has emitted its last
   byte;
3. moves to the next code block.

Copying and coding do not overlap: each sub-band memory holds one block.

## Bit-plane coding (`bpc_encoder`)

This is the EBCOT context modeller in **vertically causal** mode. It codes the
block from plane `numbps − 1` down to 0:

- The first plane gets only the clean-up pass.
- Every later plane gets three passes: significance propagation (SP),
  magnitude refinement (MRP) and clean-up (CP).

Samples are visited strip by strip (4 rows), column by column, and top to
bottom inside a column.

**State bits.** Per sample the coder keeps four state bits in R x C bit arrays:

| bit | meaning |
|---|---|
| σ | significant |
| η | coded in this plane; cleared after each clean-up pass |
| σ′ | refined before |
| χ | sign |

The eight-neighbour context is read from these arrays combinationally. In VC
mode the row below a strip counts as insignificant. Neighbours outside the
block are insignificant.

**Primitives and contexts.** The numbering is shared with the MQ coder:

| primitive | contexts | how the context and data are formed |
|---|---|---|
| zero coding | 0–8 | From the neighbour counts. There is one table for LL/LH, HL (H and V swapped) and HH. |
| sign coding | 9–13 | From the horizontal and vertical sign contributions. The data is sign ⊕ the table's XOR bit. |
| magnitude refinement | 14–16 | 16 for a sample refined before, 14/15 for the first refinement with no/some significant neighbours. |
| run-length | 17, then 18 | Context 17 is used when a strip column and its neighbourhood are all insignificant. It is followed by the 2-bit zero index in context 18 (UNIFORM) when a one is found. |

**Bypass (`bypass_en`).** This is JPEG2000's "lazy" mode:

- From the fifth coded plane on, the SP and MRP bits (magnitude and sign) are
  not arithmetic coded.
- They leave the BPC with context code 19 (`CX_RAW`).
- The end of the block is the pair with context 31 (`CX_END`).

Both codes belong to this design's internal interface.

**Speed.** The coder spends:

- one cycle per visited sample and per emitted pair;
- two cycles per strip column for the memory read.

It stalls when its CXD buffer is full.

## CXD buffer (`cxd_buffer`)

The CXD buffer is a first-word-fall-through FIFO of 6-bit `{context[4:0],
decision}` entries:

- It has a write pointer (the BPC side) and a read pointer (the BAC side).
- Both pointers are cleared when the BAC is restarted for a new block.
- Both sides use valid/ready handshakes.

## MQ coding (`bac_encoder`)

This is the standard JPEG2000 MQ coder:

- a 47-entry Qe table with NMPS/NLPS/SWITCH;
- a 19 x 7-bit Info table of (Q-index, MPS) pairs;
- registers A (16 bits) and C (32 bits), with the counter CT and the byte
  register B.

One 16-bit adder does all the arithmetic. `C + Qe` takes one cycle for the low
half, plus a second cycle only when that carries into the upper half.

Coding cost:

- An MPS without renormalisation takes 5 cycles: wait, Info read, Qe read,
  arithmetic, and the C addition.
- Each renormalisation shift and each byte output adds one cycle.

The Info table is re-initialised in 19 cycles at every code block. Contexts 0,
17 and 18 start at Q-index 4, 3 and 46; all others start at 0.

**Byte stream of a block.** The host should know these conventions:

- The coder's first, dummy byte is suppressed.
- A 0xFF byte is followed by a byte with only 7 code bits (bit stuffing).
- Switching from arithmetic coding to raw bits terminates the MQ codeword
  (the standard FLUSH). Raw bits are then packed MSB first, with only 7 bits
  in the byte after a 0xFF.
- Switching back pads the partial raw byte with zeros. The coder restarts
  (A = 0x8000, C = 0, CT = 12) and keeps the context states.
- `CX_END` terminates the open segment the same way.

This segment-termination scheme is this design's choice. A decoder has to
follow the same scheme. In JPEG2000 terms it is "bypass with termination at
every coding-mode change".

## Decoding a code block (`bpc_decoder`, `bac_decoder`)

The top also holds a code-block decoder. It is independent of the encoder,
so it can run at the same time. It has three parts:

- a bit-plane decoder;
- an MQ decoder;
- a fourth data formatter in decode mode.

In the decoder the two coders cannot be decoupled by a FIFO. The bit-plane
decoder needs each decision before it can form the next context. The link
is therefore a plain handshake: the bit-plane decoder offers one context on
`cx_valid / cx`, and the MQ decoder answers with `d_valid / d`.

**Bit-plane decoder.** It walks the same passes, scan order and contexts as
the encoder. It keeps the same state arrays (significance, visited,
refined, sign), plus a magnitude array that the decisions fill in. It
differs from the encoder at run-length coding: the encoder knows all four
bits of a strip column before it starts, while the decoder learns them one
decision at a time. So the run decision and the two position bits are
separate states. When the block is finished, the words are read out as
sign-magnitude values.

**MQ decoder.** It is the standard JPEG2000 decoder on the encoder's
registers. Compares and subtractions use the upper 16 bits of the 32-bit C
register. The byte counter starts at 8 per byte, and at 7 after a 0xFF
byte, which undoes the bit stuffing. A 0xFF followed by a byte above 0x8F is
a marker: it is not consumed, and ones are shifted in. Without
renormalisation, one decision takes 4 cycles after the context is taken.

**Using it.**

1. Pulse `dec_start` with the block's `dec_band`, `dec_numbps` (the
   `cb_numbps` the encoder reported) and `dec_size`.
2. Offer the block's bytes on `dec_in_valid / dec_in_byte`, taking
   `dec_in_ready` into account. After the last byte, keep offering 0xFF.
3. Wait for `dec_done`.
4. Read the coefficients with `dec_rd_en / dec_rd_row / dec_rd_col`. They
   come out as two's complement values on `dec_out_valid / dec_out_data`.
   With `qen` set, they are multiplied by `qscale[0]` / 256.

Raw (bypass) segments are not decoded. To decode them, the decoder would
need to know where each raw segment starts in the byte stream, and the
encoder does not report segment lengths. So only blocks coded with
`bypass_en = 0` can be decoded.

## Where this design departs from the architecture it implements

- **DWT timing.** A predict iteration costs one extra read cycle per line, and
  every iteration ends with a pipeline drain. The often-quoted cost of
  "latency + N·N/2 per iteration" is therefore slightly exceeded: by
  M + 10 cycles per predict iteration and 10 per update iteration. The
  scaling pass uses the full 7-stage path.
- **Entropy-coder state.** The BPC keeps its state bits in full block-sized
  bit arrays. The alternative, shift registers with small per-strip state
  memories, would hold the same information. The controllers have fewer
  states than a hand-optimised design (12 in the BPC, 16 in the BAC).
- **Schedule.** The DWT finishes the whole tile before entropy coding
  starts. The transform is a small share of the total time. An overlapped
  schedule, where level i is coded while the DWT works on level i+1, would
  need double-buffered coefficient storage.
- **Not built:**
  - decoding of raw (bypass) segments;
  - the decoder-side tile flow: decoded blocks going back into the DWT
    memory, followed by the inverse DWT;
  - rate control and packet formation.

  The inverse DWT is present and tested in `tb_dwt`, but the top always runs
  the DWT forward. The decoder handles one code block at a time, and the
  host moves the blocks.
- **Restrictions:**
  - Code-block height must be a multiple of 4, so the top needs sub-bands at
    least 4 samples high.
  - With N = 128 this allows 5 levels, the default.

## Verification

Each testbench is self-checking. It ends with `TB_RESULT checks=… failures=…`
and has a cycle watchdog. The testbenches are:

| testbench | what it checks |
|---|---|
| `tb_dwt_processor` | random lifting operations of all three kinds against `x_old ± round(a·(l+r))`, and the 4/7-cycle latency |
| `tb_dwt_memory` | two read ports and one write port with random traffic, including read-during-write |
| `tb_dwt` | 16 x 16 tile, 3 levels: (5,3) forward (exact) and inverse (perfect reconstruction); (9,7) forward and inverse (exact against the model, within ±10 of the tile). Checks the cycle count of each transform |
| `tb_data_formatter` | encode/decode, quantization (extreme scales and values), plane count |
| `tb_subband_memory` | a 32 x 32 block, every strip column, every plane |
| `tb_cxd_buffer` | queue model with full, empty and clear events |
| `tb_bpc_encoder` | 8 blocks (4 x 4 up to 32 x 32, all bands, all-zero block, bypass, random backpressure): every context/decision pair, and a cycle bound |
| `tb_bac_encoder` | 10 random pair streams, including raw segments, against a reference MQ coder, byte for byte |
| `tb_bac_decoder` | 12 streams from the reference MQ coder (skewed and random contexts, 0xFF bytes): every decision must come back |
| `tb_bpc_decoder` | 8 blocks from the reference EBCOT coder, with the bench playing the MQ decoder: every context is checked, and so is every decoded word |
| `tb_jp2k_top` | end to end with a 32 x 32 tile, 8 x 8 code blocks and 8-entry FIFOs: three tiles ((5,3)/(9,7), 1–3 levels, quantization, bypass, a flat tile); the blocks coded without bypass are then decoded through the top's decoder ports |
| `tb_jp2k_full` | end to end at the default size: 128 x 128, 5 levels, (9,7) with quantization and bypass, then (5,3) lossless; all 25 lossless blocks are decoded again |

The expected values in `tb_jp2k_top` and `tb_jp2k_full` come from
`jp2k_ref_pkg`. This is a plain procedural model of the DWT, the EBCOT
passes and the MQ coder, written from the algorithm rather than from the RTL
structure.

`tb_jp2k_top` checks every code block's position, band, plane count and
complete byte stream. It also counts how often each mechanism occurred, and
each must occur at least once:

- FIFO full / BPC stall;
- bypass bits;
- run-length coding;
- LPS coding;
- carry into the upper half of C;
- 0xFF bytes;
- all-zero blocks;
- split sub-bands;
- the LL band;
- decoded blocks.

Each decoded coefficient must equal the signed magnitude that was coded.

At the default size one 128 x 128 tile takes about 306k cycles with (9,7) and
bypass, and 286k with (5,3) without bypass. That was measured on a synthetic
image of gradients, an edge pattern and noise.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_jp2k_top \
    rtl/jp2k_pkg.sv tb/jp2k_ref_pkg.sv rtl/*.sv tb/tb_jp2k_top.sv
./obj_dir/Vtb_jp2k_top
```

Use the same command for the other testbenches; only `tb_bac_encoder`,
`tb_bpc_encoder`, the two decoder benches, `tb_dwt` and the two top-level
benches need
`tb/jp2k_ref_pkg.sv`. All testbenches drive their inputs on the falling clock
edge.

## Files

| file | contents |
|---|---|
| `rtl/jp2k_pkg.sv` | widths, filter coefficients, context codes, the `cxd_t` pair, MQ tables, and the ZC/SC/MR context functions |
| `rtl/jp2k_top.sv` | the encoder and the code-block decoder |
| `rtl/global_controller.sv` | the tile sequence |
| `rtl/dwt*.sv` | the DWT and its processor, memory and controller |
| `rtl/data_formatter.sv`, `rtl/subband_memory.sv` | the path from the DWT to the coders |
| `rtl/bpc_encoder.sv`, `rtl/cxd_buffer.sv`, `rtl/bac_encoder.sv` | one coder pair |
| `rtl/bpc_decoder.sv`, `rtl/bac_decoder.sv` | the code-block decoder |
| `tb/` | the testbenches above and the reference package |
