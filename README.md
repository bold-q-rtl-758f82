# BOLD-Q: an LNS-MX accelerator with Dual-Bias quantization

This is the RTL of an inference accelerator for large language models in which
every operand is stored in a *logarithmic number system* (LNS) and grouped in
blocks of 32, as in Microscaling (MX). Each block has its own scale factor.
Because the operands are logarithms, the multiplier of a MAC becomes an 8-bit
adder. Only accumulation needs linear values: a tiny 8-entry table converts
each product back, and a single encoder per array column converts the column
sum to the log domain again.

Plain 4-bit block formats lose accuracy when one or two outliers stretch a
block's range. BOLD-Q handles this with a **Dual-Bias**: two small per-block
offsets that move the two highest quantization bins of the 4-bit format
upward. The remaining bins keep their spacing, so the bulk of the block keeps
its resolution while the outliers still get a bin close to them. For weights,
the Dual-Bias is chosen offline by a search. For activations and the KV cache,
hardware computes it at run time from the gaps between the block's three
largest magnitudes.

The design is a 32 x 32 weight-stationary systolic array. Its precision is
W4/A8: 4-bit weights and 8-bit activations. Around the array sit:

```
 weight buffer --4-bit W + Dual-Bias--> [32 preprocessing units] --Aligned_W[7:0]-->  |
                                                                                      v
 activation buffer --LNS8 IAct[7:0]--> [ 32 x 32 LNS-MAC PEs, weights stationary,      ]
                                       [ activations move right, sums move down       ]
                                                   | 32 x 32-bit column sums
                                       [ 32 lin-to-log encoders -> LNS16 ]
                                       [ 32 dequantizers: + sf_w + sf_a  ]
                                                   | one 32-element LNS16 block
                                       [ quantization module: ADBQ + re-quantization ]
                                                   v
                                       quant buffer (next-layer block + Dual-Bias + scale)
```

## Number formats

Every format is a sign plus an unsigned fixed-point log magnitude. The
magnitude field minus a fixed offset gives log2|x|. A magnitude field of zero
means the value 0.

| name | where | layout | value |
|---|---|---|---|
| LNS4_E2M1 | weights, 4-bit KV / activations | `{s, code[2:0]}` | code 1..7 -> 2^((code-4)/2) = 2^-1.5 ... 2^+1.5; code 0 -> 0 |
| LNS4_E0M3 | static Dual-Bias (weights) | `{s, m[2:0]}` | ±m/8 |
| LNS4_E2M2 | dynamic Dual-Bias (ADBQ) | `b[3:0]` unsigned 2.2 | b/4, 0 ... 3.75 |
| LNS8 activation (E4M3) | IAct, 8-bit OAct | `{s, mag[6:0]}` | 2^(mag/8 - 4) |
| Aligned_W | preprocessing output | `{s, mag[6:0]}` | 2^(mag/8 - 3) |
| scale factor (LNS8_E5M3) | per block | `sf[7:0]` | 2^(sf/8 - 16) |
| column sum | PE chain | 32-bit two's complement | acc * 2^-14 |
| LNS16 | encoder / dequantizer output | `{s, mag[14:0]}` unsigned 5.10 | 2^(mag/1024 - 14) after the encoder, 2^(mag/1024 - 16) after dequantization |
| Dual-Bias | metadata | `{Bias[3:0], Sub-Bias[3:0]}` | see below |

Every block carries 16 bits of metadata: an 8-bit Dual-Bias and an 8-bit
scale factor (`blk_meta_t`).

Dual-Bias moves only the two highest LNS4 bins:

```
code 7:  2^(1.5 + Sub-Bias + Bias)
code 6:  2^(1.0 + Sub-Bias)
code 1..5: unchanged (2^-1.5 ... 2^0.5)
```

The offsets of the two 8-bit operand formats are this design's choice. Each
is set so that the 32-bit column sum cannot overflow on normal data:

- Re-quantization puts a block's largest activation at 2^7.875 (magnitude 95
  of 127).
- The largest weight bin with a static bias is 2^3.25.
- The product of these two is 2^11.1. A sum of 32 such products is 2^16.1,
  which is 2^30.1 accumulator LSBs, below 2^31.

With the offsets above, the aligned weight covers every weight bin with any
Dual-Bias (-1.5 ... +9) without clamping. In the activation format, values
more than about 2^-11.75 below the block maximum are flushed to zero. A
product that does not fit in 32 bits anyway saturates in the PE. Such a
product needs a large run-time bias on the weight side.

## The datapath, block by block

**Preprocessing unit** (`boldq_preproc`, one per column). It implements Dual-Bias
once per column, so the PEs need no bias logic:

1. *Bias Gen* decodes the two bias nibbles in the encoding selected by
   `W_mode`: E0M3 for offline weight biases, E2M2 for run-time biases of 4-bit
   KV data. From the weight code it selects Sub-Bias+Bias (code 7), Sub-Bias
   (code 6) or nothing.
2. A fixed-point adder adds the selected bias to the weight's log value.
3. *Align* re-offsets the sum into the 8-bit operand field.

The unit is combinational.

**LNS-MAC PE** (`boldq_pe`). The PE works in four steps:

1. `P = IAct.mag + Aligned_W.mag` is an 8-bit add. The product sign is the
   XOR of the two signs.
2. `P[2:0]` addresses a LUT of `round(128*2^(m/8))` = 128, 140, 152, 166, 181,
   197, 215, 235 (Q1.7).
3. The LUT value is shifted left by `P[7:3]` to form `Psum`.
4. `Psum` is added to the incoming sum, or subtracted from it for a negative
   product.

The PE holds its weight register while `w_load` is low and shifts weights
down while it is high. It registers its activation output and its sum
output: one cycle per hop.

**Array** (`boldq_sa`). It chains the preprocessing row and the PE grid.

- **Weight load.** One row of 4-bit weights is fed per `w_load` cycle. The
  row of reduction index ROWS-1 goes first, so after ROWS cycles row k sits
  in PE row k.
- **Input skew.** An activation vector `a_vec` enters whole. Element k is
  delayed k cycles.
- **Output de-skew.** Column c's bottom output is delayed COLS-1-c cycles, so
  all 32 sums of one vector leave together.
- **Throughput and latency.** The array accepts one vector per cycle. Its
  latency is ROWS+COLS-1 = 63 cycles.

**Encoder** (`boldq_encoder`, one per column). It computes log2|acc| by
Mitchell's approximation:

- The integer part is the position k of the leading one.
- The fraction m is the 10 bits below the leading one.

It then adds a correction for the error `log2(1+m) - m`:

- a two-segment piecewise-linear term, `min(m, 1-m)/4`;
- a 16-entry residual LUT indexed by `m[9:6]`.

Each residual entry is the mid-range of `log2(1+m) - m - min(m,1-m)/4` over
its sixteenth of [0,1), in units of 2^-10. The entries are 6, 13, 15, 13, 7,
-3, -16, -31, -35, -23, -14, -8, -3, 0, 2, 2. The measured error is below
9/1024 in log2. Sums of 0 and ±1 encode as zero.

**Dequantizer** (`boldq_dequant`, one per column). Multiplying by the weight
block's and the activation block's scale factors is an addition in the log
domain: `mag_out = mag_in + 128*(sf_w + sf_a) - 30*1024`. The result then
has the LNS16 offset of 16. Underflow flushes to zero; overflow saturates.

**ADBQ** (`boldq_adbq`). It computes the Dual-Bias at run time, for the
32 dequantized outputs of one vector:

1. A chain of compare-and-insert stages finds the three largest magnitudes
   L1 ≥ L2 ≥ L3.
2. The gaps are d12 = L1-L2 and d23 = L2-L3.
3. `Bias = max(RTN(d12 - 0.5), 0)` and `Sub-Bias = max(RTN(d23 - 0.5), 0)`.
   RTN rounds to the E2M2 grid (step 0.25, ties up, clamped at 3.75). The
   native bin step is 0.5, so only the part of a gap beyond 0.5 turns into
   bias.
4. The scale factor comes from the top-1 value and is rounded up to the
   1/8 step, so that nothing overflows:
   - 4-bit target: top-1 lands on the biased top bin. Top-2 then falls near
     2^(1+Sub-Bias), and top-3 near 2^0.5.
   - 8-bit target: top-1 lands at 2^7.875, and the Dual-Bias is reported
     as 0.

**Quantization module** (`boldq_quant`). It runs ADBQ and then re-quantizes
each element. It first computes `y8 = round(mag/128) - sf`, the element's log
relative to the scale in 1/8 steps. Then:

- **8-bit target:** `OAct = {s, y8 + 32}`.
- **4-bit target:** `OAct[3:0]` holds the nearest of the seven (biased) bins
  in the log domain. Ties go to the lower code. Values below 2^-2.5 become
  code 0.

The module has one register stage.

**Buffers** (`boldq_wbuf`, `boldq_abuf`, `boldq_qbuf`):

- **Weight buffer.** Two tiles, one reduction row per word, plus per-tile,
  per-column metadata.
- **Activation buffer.** 64 vectors with per-vector metadata. It has a
  synchronous read port for streaming and a combinational metadata port,
  used when a vector's result leaves the array.
- **Quant buffer.** 64 result blocks with metadata.

Data reads are synchronous (one cycle).

## Controller and host interface (`boldq_top`)

A host fills the weight buffer (`wb_*`) and the activation buffer (`ab_*`).
It then pulses `start`, with these settings:

- `cfg_tile`: the weight tile to use;
- `cfg_a_base`, `cfg_n_vec`: the first activation vector and the number of
  vectors;
- `cfg_q_base`: the first quant buffer address for results;
- `cfg_w_mode`: the bias encoding (`WM_E0M3` static, `WM_E2M2` run-time);
- `cfg_q_mode`: the re-quantization target (`QM_A8` or `QM_A4`).

The controller runs in three phases:

1. **LOAD.** ROWS cycles load the tile through the preprocessing row.
2. **STREAM.** One activation vector enters per cycle.
3. **DRAIN.** The controller waits until every result has been quantized and
   written to the quant buffer.

`done` pulses 2*ROWS + COLS + n + 4 cycles after `start`. For 32 vectors at
the default size, that is 132 cycles. `busy` is high during the operation.
Two assertions guard the sequencing: weight loading and streaming never
overlap, and no more results are written than were requested. The host reads
results through `qb_raddr`/`qb_rdata`/`qb_rmeta`.

4-bit data reaches the array through the weight path. The intended use is a
4-bit KV cache block produced with `QM_A4`, loaded as a "weight" tile, and run
with `WM_E2M2` so that its run-time Dual-Bias is applied. The activation
input of the PEs is 8-bit only. The end-to-end test exercises this path. It
reads 32 4-bit result blocks from the quant buffer and writes block j as
column j of a weight tile, together with its Dual-Bias and scale factor. It
then multiplies that tile with 8-bit vectors and checks the result against
the exact reference.

## What is this design's own

The following choices fill in details that the architecture description
leaves open:

- the offsets of every LNS field and the zero encoding;
- the LNS16 layout;
- the encoder's correction segments and table;
- the scale-factor rule of ADBQ;
- the placement of 4-bit codes in `OAct[3:0]`;
- the handling of ties, zeros, underflow and saturation;
- the skew registers, the controller and the host ports;
- the buffer sizes.

These items are not built:

- the offline Dual-Bias search for weights, which runs in software;
- the off-chip memory and host that would stream a whole model through the
  buffers;
- layer-to-layer transfer from the quant buffer back into the input buffers,
  which is left to the host;
- a W4/A4 path with 4-bit activations on the PE activation input.

Nothing has been synthesized for timing. The target of the architecture is
500 MHz.

## Accuracy

- **Encoder.** The error is at most 9/1024 in log2 (about 0.6 % in value),
  over 20,000 random sums.
- **Conversion error of the PE LUT.** `tb_boldq_accerr` runs 10,016 dot
  products of length 32 through the full array. It compares each one with
  the exact sum of the LNS products. The mean error is about 0.05 % of
  Σ|product|, for both same-sign and random-sign operands. The test fails
  above 0.26 %.
- **End-to-end results.** The top-level test compares the quant-buffer
  contents with dot products computed in real arithmetic.

## Files

- `rtl/boldq_pkg.sv`: formats, sizes, metadata type
- `rtl/boldq_preproc.sv`, `rtl/boldq_pe.sv`, `rtl/boldq_sa.sv`: preprocessing row, PE, array
- `rtl/boldq_encoder.sv`, `rtl/boldq_dequant.sv`: lin-to-log encoder, dequantizer
- `rtl/boldq_adbq.sv`, `rtl/boldq_quant.sv`: run-time Dual-Bias, quantization module
- `rtl/boldq_wbuf.sv`, `rtl/boldq_abuf.sv`, `rtl/boldq_qbuf.sv`: buffers
- `rtl/boldq_top.sv`: the accelerator
- `tb/boldq_ref_pkg.sv`: reference model in real arithmetic, shared by the tests
- `tb/tb_<module>.sv`: one self-checking test per module. The tests of the
  array, the quantization module and the top count how often each mechanism
  occurs (both bias encodings, both targets, non-zero Bias and Sub-Bias,
  top-bin codes, zeros).
- `tb/tb_boldq_accerr.sv`: accumulation-error measurement.

Each test prints `TB_RESULT checks=N failures=M` and exits. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/boldq_pkg.sv tb/boldq_ref_pkg.sv tb/tb_boldq_top.sv \
    --top-module tb_boldq_top -Mdir obj_top && obj_top/Vtb_boldq_top
```

The top-level test uses the default sizes: a 32 x 32 array, 2 weight tiles,
64 activation and 64 result blocks. It runs four operations:

1. static bias, 8-bit target;
2. run-time bias, 4-bit target;
3. static bias, 4-bit target;
4. the 4-bit results of operation 2, reloaded as a tile with their run-time
   Dual-Bias, with an 8-bit target.

Building it takes under a minute, and the simulation runs in well under a
second. The array test uses an 8 x 6 instance. The sizes are parameters
(`ROWS`, `COLS`, `WTILES`, `ADEPTH`, `QDEPTH`), and the block size follows
`COLS`.
