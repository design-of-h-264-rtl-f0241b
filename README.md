# H.264/AVC baseline intra codec core (luma 4x4 path)

This is a hardware core that encodes and decodes H.264/AVC intra macroblocks with
one shared datapath. Encoding and decoding run the same prediction,
transform, quantization and reconstruction units. A switch chosen per
macroblock decides whether the loop is closed (encoding) or whether levels
flow straight through (decoding). The design targets HD sizes, which it
reaches in two ways:

* **Four-pixel parallelism.** Every unit processes one row of a 4x4 block per
  clock, so a 4x4 block takes four cycles in any stage.
* **Cheaper mode decision.** Plane prediction is not generated at all, which
  removes the costliest prediction mode. The other modes are ranked with an
  *enhanced SATD*. Instead of a Hadamard, this cost uses the 4x4 integer
  transform itself, with each coefficient weighted so that the cost tracks
  what quantization will make of it. The transform that feeds the cost is
  therefore the one that feeds the quantizer. No separate cost transform is
  needed, and the best candidate's coefficients are kept for quantization
  instead of being recomputed.

The RTL implements the complete intra 4x4 luma path for encoding and for
decoding. Between the reconstruction loop and the entropy coder it has a
ping-pong coefficient buffer, and it includes an Exp-Golomb coder used for
the per-macroblock QP delta. The 16x16 luma and chroma modes exist inside the
units: 16x16 and chroma prediction, the Hadamard transforms, DC quantization
and the 16x16/chroma cost. However, the controller does not yet sequence
them. CAVLC is not included. The entropy coder's side of the coefficient
buffer is brought out as a port.

## Data flow

```
 encode:  source buffer -> (source - prediction) -> forward 4x4 transform
            -> enhanced-SATD cost / best-block registers
            -> quantizer -> coefficient ping-pong buffer (port A)
                         -> de-quantizer -> inverse transform -> + prediction (FIFO) -> clip
            -> boundary buffer (reference samples for the next block)
 decode:  coefficient buffer (port A) -> de-quantizer -> inverse transform
            -> + prediction (generated in step) -> clip -> boundary buffer and source buffer
```

| Module | Role |
|---|---|
| `h264_intra_codec` | Top level: wiring, encode/decode switch, QP capture and mb_qp_delta coding |
| `schedule_ctrl` | Block-serial controller, mode sequencing, most-probable-mode derivation |
| `intra_pred_gen` | Prediction generator, one row of four samples per cycle, all non-plane modes |
| `fwd_transform` / `inv_transform` | 4x4 integer DCT merged with the 4x4 and 2x2 Hadamard transforms |
| `cost_mode_decision` | Enhanced-SATD cost, best-mode and best-block registers, 4x4 total |
| `quantizer` / `dequantizer` | Four lanes: multiply, add, shift |
| `recon_unit` | Prediction FIFO (encoder) or direct prediction (decoder), add and clip |
| `boundary_buffer` | Reconstructed samples of the macroblock and its neighbours; yields the 13 reference samples of any 4x4 block |
| `source_buffer` | 96 x 32-bit single-port SRAM: the source macroblock, or the decoded pixels |
| `coef_buffer` | Two 104 x 64-bit banks, swapped at every macroblock start |
| `expgolomb_codec` | ue(v)/se(v) Exp-Golomb encoder and decoder, combinational |
| `fast3step_md` | Three-step fast mode decision: seven of the nine 4x4 modes, chosen per macroblock with `fast_md` |
| `fwd_transform8` | Eight-input 4x4 transform (two rows per cycle), beside the codec on `t8_*` ports |
| `fast_intra_pred8` | Eight-pixel prediction (two rows per cycle) from two four-pixel generators, beside the codec on `p8_*` ports |
| `h264_pkg` | Types, mode enum, quantization tables, lambda table, clip |

## The encoding loop and its timing

The hardest part to follow is how a candidate mode travels through the
pipeline while the controller already asks for the next one. For each 4x4
block in Z-scan order, `schedule_ctrl` does the following.

1. **Source read, 4 cycles.** It reads the block's four source rows into a
   register.
2. **Prediction, 4 cycles per mode.** For every usable mode it requests the
   four prediction rows, back to back. Usable means the reference samples
   exist: vertical-type modes need the top, horizontal-type modes need the
   left, and diagonal-down-right, vertical-right and horizontal-down need
   all three. Modes that are not usable are skipped and cost no cycles. DC
   is always usable.
3. **Drain, 6 cycles.** The last candidate's rows pass through the pipeline:
   one cycle in the predictor, four in the transform and one in the cost
   unit.
4. **Quantization, 4 cycles.** It quantizes the rows of the best block
   register. Meanwhile it requests the best mode's prediction again and
   pushes it into the reconstruction FIFO.
5. **Reconstruction wait, 7 cycles.** The last reconstructed row reaches the
   boundary buffer. The next block needs these samples, so blocks do not
   overlap.

Each candidate row carries a tag: its mode, and whether it was the first mode
of the block. The tag is delayed to match the transform latency, so the cost
unit knows which mode a row belongs to. The first candidate loads the best
registers unconditionally. Later candidates replace them only with a strictly
lower cost, so ties go to the earlier mode. Modes are tried in the order
0 to 8.

With all nine modes usable, a block takes 4 + 36 + 6 + 4 + 7 + 1 = 58
cycles, and a macroblock takes **at most 930 cycles**. That is within the
document's bound of 1,080 cycles per macroblock, but that bound also covers
16x16 and chroma. Decoding takes **194 cycles** per macroblock. Per block it
reads four level rows, then the de-quantizer, inverse transform and
reconstruction follow. The prediction is generated exactly when the residual
arrives, so no FIFO is needed.

**Fast mode decision.** With `fast_md` high at `start`, `fast3step_md`
chooses the candidates instead of trying all nine. It first tries modes 0,
1 and 2, then 3 and 4. As soon as the costs of vertical (0) and horizontal
(1) are known, a single comparison picks the last pair. If vertical costs
no more than horizontal, the pair is the two modes next to vertical (5 and
7); otherwise it is the two next to horizontal (6 and 8). That makes seven
modes instead of nine and **at most 802 cycles** per macroblock. When only
one of the top and left neighbours exists, the pair follows the one that
exists. `fast_vert` reports the side taken for the last block.

Intermediate results stay inside a 4x4 block, so the transforms work in
place. Rows enter one per cycle and are row-transformed on entry into one of
two register banks. Output rows are formed from the four stored rows, which
is the column transform. The first output row appears four cycles after the
first input row. With two banks, back-to-back blocks stream without a gap.
The inverse transform works rows first and then columns, as the standard
requires for bit-exact decoding. Residual blocks get the final
`(x + 32) >> 6`.

## Cost and mode decision

For each candidate, the cost is

```
cost = ( sum over 16 coefficients of |Y(i,j)| * w(i,j) ) >> 5  +  4*lambda(QP) * [mode != most probable mode]
```

The weight `w` is 32 when i and j are both even, 20 when both are odd, and
25 otherwise. These values follow the ratios of the quantizer's scaling
classes. The most probable mode is min(left mode, upper mode), or DC when
either neighbour is missing. Neighbour modes from other macroblocks enter
through `top_mb_modes` and `left_mb_modes`. The best costs of the sixteen
blocks are added into a 4x4 total, with 6·lambda more after every fourth
block. lambda(QP) follows the usual exponential table, `QP2QUANT[max(0, QP-12)]`.

Two descriptions of the penalty disagree. One says the cost term is zero for
the most probable mode and 4·lambda otherwise. The other describes a
non-zero initial cost *for* the most probable mode. This design follows the
first, which is also the cost equation as written.

## Quantization

* **Quantizer:** `level = sign(c) * ((|c| * quant_coef + qp_const) >> (15 + QP/6))`,
  with `qp_const = 2^(15+QP/6) / 3` (the intra rounding). DC blocks shift one
  bit more and use twice the constant.
* **De-quantizer, 4x4 blocks:** `c = (level * dequant_coef) << (QP/6)`.
* **De-quantizer, luma DC:** `((f * dq00) << (QP/6) + 2) >> 2`.
* **De-quantizer, chroma DC:** `((f * dq00) << (QP/6)) >> 1`.

Both coefficient tables come from the standard and live in `h264_pkg` as
functions of `QP % 6` and the position class.

## Memories and the entropy interface

* **Source buffer** (96 words of 32 bits). Word `4*y + x/4` holds luma pixels
  x..x+3 of row y, with pixel x+k in bits `[8k+7:8k]`. Words 64 to 95 are
  reserved for chroma. The outside world reaches it through `ext_src_*`
  while the core is idle. It writes the source before encoding and reads
  the decoded pixels after decoding.
* **Coefficient ping-pong buffer** (two banks of 104 words of 64 bits).
  Word `4*blk + row` holds the four 16-bit levels of one row; blk is the
  Z-scan index. Words 64 to 103 are reserved for chroma and DC. Port A
  belongs to the reconstruction loop and port B (`ent_*`) to the entropy
  coder. Each `start` swaps them. While macroblock n is encoded, port B
  reads macroblock n-1. For decoding, write the levels through port B and
  then start; the swap hands them to the loop. An assertion forbids swapping
  during an access.
* **Neighbour context.** The core has no line buffer; that belongs in
  external frame memory. The 20 samples above the macroblock (16 plus 4 from
  the upper-right macroblock), the corner and the 16 left samples enter
  through ports, together with the four availability flags. Alternatively,
  `left_from_prev` reuses column 15 of the macroblock just reconstructed.
* **QP.** QP is captured at `start`. In encoding, `qpd_code`/`qpd_len` give
  the se(v) code of mb_qp_delta, which is QP minus the previous
  macroblock's QP. In decoding with `qpd_from_stream`, the QP is parsed from
  `hdr_win` (next stream bits, first bit in the MSB), modulo 52, and
  `hdr_len` reports how many bits the code used.

* **Eight-pixel units.** `fwd_transform8` takes two residual rows per cycle
  and returns two coefficient rows. It holds the first pair, and when the
  second pair arrives it forms the column transform; rows 0-1 leave then
  and rows 2-3 one cycle later. `fast_intra_pred8` runs two four-pixel
  generators on the even and odd row of a pair. In DC mode both rows take
  the average of one of them. Both units belong to the eight-pixel encoder
  variant. They are not in the four-pixel loop; the top brings out their
  ports (`t8_*`, `p8_*`) so they can be used on their own.

## Using the core

Each macroblock goes through these steps:

1. Load the source pixels (encode), or write the levels through `ent_*`
   (decode).
2. Set the context and QP inputs. For decoding, also set `dec_modes`.
3. Pulse `start` with `dec_mode`.
4. Wait for the one-cycle `done`.

`blk_modes` returns the chosen modes and `rec_mb` the reconstructed
macroblock.

Implementation figures from a generic synthesis of the whole top (no
technology library, all units including the eight-pixel ones): about 4,500
cells and 5,800 flip-flop bits, plus 17,288 memory bits. Most of the
flip-flops are in the boundary buffer, which holds the whole
reconstructed macroblock, and in the transform register banks. No
timing analysis has been done. The clock rates quoted below are the ones the
architecture is meant for, not measured results.

Throughput against common rates, luma only:

| Workload | Rate needed | Result |
|---|---|---|
| 720p30 encoding, 108,000 MB/s | 930 cycles/MB → 100.4 MHz | Fits a 117 MHz clock |
| 720p30 encoding, fast mode decision | 802 cycles/MB → 86.6 MHz | Fits a 117 MHz clock |
| 1080p30 decoding, 243,000 MB/s | 194 cycles/MB → 47.1 MHz | Fits a 58 MHz clock |
| 1080p30 encoding | 226 MHz | Does not fit |

## Verification

Each unit has a self-checking testbench in `tb/` that compares against
independent models:

* prediction against the per-pixel equations of the standard;
* transforms against matrix products;
* quantization against 64-bit integer arithmetic;
* the Exp-Golomb coder against a bit-by-bit code builder.

The top-level testbench `tb_h264_intra_codec` runs the core at its default
parameters. It contains a complete behavioural reference encoder and checks
the following for eight macroblocks:

* the chosen modes, every reconstructed pixel, and the levels read back
  through the entropy port;
* the cycle budget (at most 1,080 cycles per encoded macroblock, at most 236
  per decoded one);
* the mb_qp_delta codes;
* decoding of every other macroblock from its levels, with the QP taken from
  the stream. The decoded result must reproduce the encoder's reconstruction
  exactly, in `rec_mb` and in the source buffer;
* macroblocks encoded with the fast mode decision, against the reference
  run with the same seven-mode rule (at most 802 cycles);
* the eight-pixel transform on two back-to-back blocks, and the eight-pixel
  prediction of block 0 in all nine modes.

It also fails if any of these events never occurs: a non-zero QP delta,
encoding, decoding, a bank swap, a most-probable-mode hit or miss, a skipped
unusable mode, replacement of the best block, clipping in reconstruction,
either side of the fast decision, or use of the eight-pixel units.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl rtl/h264_pkg.sv \
  rtl/boundary_buffer.sv rtl/coef_buffer.sv rtl/cost_mode_decision.sv rtl/dequantizer.sv \
  rtl/expgolomb_codec.sv rtl/fwd_transform.sv rtl/intra_pred_gen.sv rtl/inv_transform.sv \
  rtl/quantizer.sv rtl/recon_unit.sv rtl/schedule_ctrl.sv rtl/source_buffer.sv \
  rtl/fast3step_md.sv rtl/fwd_transform8.sv rtl/fast_intra_pred8.sv \
  rtl/h264_intra_codec.sv tb/tb_h264_intra_codec.sv --top-module tb_h264_intra_codec
./obj_dir/Vtb_h264_intra_codec
```

A unit testbench needs only `rtl/h264_pkg.sv`, the unit and its testbench.
Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Where this design departs from or adds to the architecture it follows

* **Only the luma 4x4 path is scheduled.** Intra 16x16 luma and chroma 8x8
  are supported by the units and tested there, but the controller does not
  run them. The top ties their controls off. A macroblock is therefore
  always coded as I_NxN, and `use_i16` is never acted on.
* **No CAVLC encoder or decoder.** The coefficient buffer's port B is the
  place to attach them. The Exp-Golomb coder handles only mb_qp_delta; the
  4x4 modes enter and leave as plain 4-bit values.
* **The schedule is block-serial and this design's own.** It does not use
  the overlapped scheduling of the original architecture. It still meets
  the 1,080-cycle budget for the part it covers.
* **Details chosen here.** The memory word layouts, the FIFO depth (8
  rows), one-cycle latencies in the predictor, quantizer and de-quantizer,
  skipping unusable modes, and the registered-read memories are all choices
  made for this design.
* **Line buffer.** The frame-wide line buffer above the macroblock row
  belongs to external memory and is not modelled.
* **Second encoder only in parts.** The document also describes a second,
  eight-pixel encoder. Its fast mode decision is here as an option of the
  four-pixel loop. Its eight-pixel prediction and eight-input transform
  exist as separate units. The encoder built around them (its own
  controller, quantizer width and reconstruction) is not. The transform
  keeps the two-cycle transpose delay but not the 2x2x2x2 register array.
  The pairing of the last two fast-decision modes is this design's reading
  of the decision flow.
