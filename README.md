# A cost-shared, division-free 8x8 quantizer for six video standards

Video codecs quantize transform coefficients in different ways. MPEG-2/4, VC-1
and MJPEG define quantization as a division by an entry of an 8x8 matrix.
H.264/AVC, AVS and HEVC define it as a multiplication by a factor followed by a
right shift. This design brings all six onto one recipe. Each division by a
matrix entry `qm` becomes a multiplication by a precomputed factor
`MF ~ 2^8 / qm`, followed by a shift. After that, every standard uses the same
three steps:

```
step 1   p = (w << r) * MF[i][j]
step 2   q = p + (offset << qbits)
step 3   y = q >>> (n + qs_bit)
```

Here `w` is the transform coefficient at position (i, j) of the 8x8 block and
`y` is the quantized level. So one multiplier, one adder and two shifters serve
all six standards. Only the factor tables and four small numbers differ from one
standard to the next. One controller handles all of them. The six standards are
H.264/AVC, AVS, VC-1, MPEG-2/4, MJPEG and HEVC.

The SystemVerilog here is synthesizable. It accepts one coefficient per clock and
returns each level four clocks later.

## The per-standard parameters

| standard  | r | offset        | qbits      | n + qs_bit        | factor table                       |
|-----------|---|---------------|------------|-------------------|------------------------------------|
| H.264     | 0 | f (0 .. 0.5)  | 16 + QP/6  | 16 + QP/6         | 6 matrices, picked by QP mod 6     |
| AVS       | 0 | 1             | 14         | 15                | 64 factors, one per QP             |
| VC-1      | 4 | 0             | 0          | 8 + 5             | one 8x8 matrix (intra)             |
| MPEG-2/4  | 4 | 0             | 0          | 8 + 5             | the same matrix as VC-1            |
| MJPEG     | 0 | 0             | 0          | 8                 | one 8x8 matrix (luminance)         |
| HEVC      | 0 | 1             | M - 2 + DB | 21 + QP/6 - M - DB | 6 factors, picked by QP mod 6      |

`M = log2(8) = 3`. `DB = BIT_DEPTH - 8`; the default `BIT_DEPTH` is 10, so for
HEVC `qbits = 3` and the shift is `16 + QP/6`.

What the non-obvious entries mean:

* **VC-1 and MPEG-2/4** are treated as one scheme. The quantization step is
  fixed at 32 (`qs_bit = 5`). The factor is `round(256 / qm)` of the MPEG-2
  default intra matrix, stored in 5 bits. The DC entry, 256/8 = 32, is stored
  as 31. The coefficient is shifted left by 4 before the multiplication, which
  keeps more precision, so the final shift is 8 + 5 = 13. QP is ignored.
* **MJPEG** uses `MF ~ 256 / qm` of the luminance matrix and a plain 8-bit
  shift. QP is ignored.
* **H.264** has six distinct factors for each value of QP mod 6. They are placed
  in the 8x8 block by position class. Indices 0 and 4 form group A, odd indices
  form group B, and indices 2 and 6 form group C. The pair of groups of (row,
  column) picks the factor, which gives six classes: AA, BB, CC, AB, AC and BC.
  QP values six apart use the same matrix; only the shift changes.
* **AVS** uses one factor per QP for the whole block. The factor halves every
  8 QP steps. The AVS scaling-matrix step is assumed to happen before this unit.

### Offset and rounding

The offset enters in 1.16 fixed point. The datapath forms
`(offset << qbits) >> 16`. For H.264 this is exactly `f * 2^(16+QP/6)`, and
`h264_f` is `f * 2^16`. For AVS it is `2^14`, and for HEVC it is `2^3`.

Step 3 is an arithmetic shift, so negative levels round toward minus infinity.
No sign-magnitude treatment is applied. If your encoder expects H.264-style
sign-magnitude rounding, it must be added around `quant_core`.

## Pipeline

```
            stage 1               stage 2                 stage 3               stage 4
in_w ----> [w] ----------------> [w] -----------------> ( w<<r ) * MF --[p]--+
           row_col_gen           table output regs                          (+)-- >>> shift --[y]--> out_y
           quant_ctrl --[tag]--> MUX2 -> MF ---------->  offset<<qbits--[o]--+
           (one table enable)    qp_proc -> [r,offset,qbits,shift]
```

1. `row_col_gen` counts the coefficients of the block (row-major) and gives
   the row and column. `quant_ctrl` registers the coefficient's tag: its
   standard, QP, H.264 offset, row, column, end-of-block flag and error flag.
   From that tag it raises the enable of the one table the standard uses.
2. The enabled table loads its output register. The other tables hold their
   output ("sleep"). MUX2 picks the factor with a select registered alongside.
   `qp_proc` decodes the parameter table above from the stage-1 tag, and the
   result is registered here.
3. The shared multiplier forms `(w <<< r) * MF`. The offset shifter forms the
   rounding term.
4. The shared adder and the right shifter produce the level into the output
   register.

A coefficient accepted in cycle t (with `in_valid` high) appears on `out_y`
in cycle t+4, with `out_valid` high. If the first coefficient is driven in
clock cycle 1, its level is out in cycle 5. One level leaves per cycle. There is
no gap between blocks and no gap between standards.

## Blocks, standards and the controller

The standard, QP and `h264_f` are sampled with the **first** coefficient of
each 8x8 block and held until its 64th coefficient. Changing the pins in the
middle of a block has no effect. A new standard takes effect at the next block
boundary, with no bubble.

`in_valid` low is a bubble. The row-column generator holds its position, and
the block simply continues when `in_valid` returns. So the upstream transform
can stall at any time. The quantizer itself never stalls, so there is no ready
signal.

`select_standard` codes:

| code | standard |
|------|----------|
| 0    | H.264    |
| 1    | AVS      |
| 2    | VC-1     |
| 3    | MPEG-2/4 |
| 4    | MJPEG    |
| 5    | HEVC     |

Codes 6 and 7 are not standards. Such a block still passes through the
pipeline, but its levels are 0 and `out_err` is high.

## Widths

| quantity          | width                                               |
|-------------------|-----------------------------------------------------|
| coefficient `w`   | `W_W` = 20 bits, signed                              |
| factor `MF`       | 16 bits, unsigned                                    |
| QP                | 6 bits                                               |
| shift             | 5 bits; the largest is 24 (H.264 at QP 51)           |

No standard multiplies by more than 1 overall (`MF * 2^r / 2^shift <= 1`). So the
level fits in the same `W_W` bits as the coefficient. The product is
`W_W + 24` bits wide.

## Files

| file | content |
|------|---------|
| `rtl/dfqa_pkg.sv` | standard codes, pipeline tag and parameter structs, all factor constants, the H.264 position-class function |
| `rtl/row_col_gen.sv` | row-column generator |
| `rtl/quant_ctrl.sv` | block FSM, configuration hold, table enables, tag pipeline |
| `rtl/qp_proc.sv` | per-standard parameter decoder (the table above) |
| `rtl/lut_h264.sv` | LUT_H_0 .. LUT_H_5 and MUX1 |
| `rtl/lut_avs.sv`, `rtl/lut_vc1_mpeg.sv`, `rtl/lut_mjpeg.sv`, `rtl/lut_hevc.sv` | the other tables |
| `rtl/mf_lut_bank.sv` | all tables, enables and MUX2 |
| `rtl/quant_core.sv` | shared multiply / add / shift, stages 3 and 4 |
| `rtl/multi_quant_top.sv` | the complete quantizer |

Top-level ports of `multi_quant_top`:

| port | direction | meaning |
|------|-----------|---------|
| `clk` | in | clock |
| `rst_n` | in | synchronous, active-low reset |
| `in_valid` | in | a coefficient is present this cycle |
| `in_w[W_W]` | in | the signed coefficient |
| `select_standard[3]` | in | standard code |
| `qp[6]` | in | QP |
| `h264_f[16]` | in | H.264 offset f times 2^16 |
| `out_valid`, `out_y[W_W]` | out | the level |
| `out_row`, `out_col` | out | position of the level |
| `out_std` | out | standard of the level |
| `out_last` | out | level (7,7) of a block |
| `out_err` | out | the block had an unused standard code |
| `busy` | out | a block is partly received |

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`:

* `multi_quant_top_tb` runs the quantizer at its default parameters on about
  50 blocks, back to back, across all six standards. QPs include 0 and the
  maximum. The test covers random full-scale and extreme coefficients, the
  published first-coefficient examples of each standard, input bubbles, pin
  changes inside blocks, and unused codes. Each level is compared with a model
  that recomputes the position classes, shifts and offsets independently. The
  test checks the 4-cycle latency of every level and an unbroken one-per-cycle
  output run. It also counts how often each mechanism happened, and fails if
  one never did.
* `dfqa_example_tb` quantizes a complete 8x8 block of a natural image in H.264
  (QP 0) and in AVS (QP 10). It compares the levels with a floating-point
  reference, within one level of rounding.
* `frame_rate_tb` streams a whole 1080p 4:2:0 frame: 48,600 blocks, with the
  standard changing from block to block, and every level checked. It takes
  3,110,400 coefficients + 4 cycles, which is 16.6 ms per frame (60 fps) at
  187.3 MHz. A 720p frame needs 1,382,400 cycles, which gives 135 fps at the
  same clock. At about 142 MHz the same counts give 45 fps (1080p) and
  102 fps (720p).
* The table testbenches compare against the published matrices. The VC-1 /
  MPEG-2/4 table is also checked against `256/qm` within one. `quant_core_tb`
  compares the datapath with 64-bit arithmetic on random inputs.

To simulate with plain Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dfqa_pkg.sv \
    tb/multi_quant_top_tb.sv --top-module multi_quant_top_tb -o sim
./obj_dir/sim
```

Any other testbench works the same way: replace the testbench file and the
`--top-module` name.

## Where this RTL goes beyond, or stops short of, the published design

* **Rate.** The throughput is one coefficient per clock. The published timing
  text also speaks of five cycles between consecutive outputs. The published
  frame-rate figures need one per clock: 60 fps of 1080p 4:2:0 at 187.3 MHz is
  3,110,400 coefficients × 60 = 186.6 M/s. The per-clock rate was kept.
* **Parameter decoding.** The published design computes the per-standard
  parameters in software. Here `qp_proc` decodes them in hardware from
  `select_standard` and QP.
* **Controller details.** The controller's states, the per-block latching of
  the configuration, the standard codes, the error flag, the reset and all
  widths are this design's own choices.
* **Scope.** Only 8x8 blocks are supported. For MPEG-2/4 only the intra matrix
  is held, and for MJPEG only the luminance matrix. The alternative with a
  per-entry shift (a second table of shift amounts) is not built. Neither is a
  non-intra table or any inverse quantization.
* **The transform that feeds this unit** is a separate multi-standard design
  and is not included. Its output connects to `in_w`.
* **Printed example differences.** The printed H.264 worked example was
  rounded to nearest. This RTL shifts, so some levels are one lower. One
  published VC-1 value (634 for coefficient 10447) does not match its own
  formula, which gives 632. The RTL follows the formula.
