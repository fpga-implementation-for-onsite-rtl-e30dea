# Stream datapath for GPR clutter removal (RNMF target update)

A ground penetrating radar (GPR) scan of buried objects comes back as a B-scan: an image
of 256 depth samples by 183 traces. Most of what the image holds is clutter, mainly the
ground-surface reflection, which is nearly the same in every trace. The buried target
shows up as a faint hyperbola. Robust non-negative matrix factorisation (RNMF) splits the
image `X` into a rank-one clutter part `W·H` and a sparse target part. `W` is a column of
256 values and `H` is a row of 183. Each RNMF iteration recomputes the target as

```
T      = X - W*H                               (element by element, 46848 pixels)
target = sign(T) * max(0, |T| - 0.00015)       (soft threshold / shrinkage)
```

and then updates `W` and `H` from it. The iteration count is 10000, so these two
element-wise passes over 46848 single-precision values dominate the run time on a small
embedded processor.

This RTL moves both passes into FPGA fabric as AXI-Stream units. DMA engines feed them
from DDR memory, so the data never goes through the processor:

```
            DMA_1 (W_temp) ──► ┌───────────────────────── target_ip ─────────────────────────┐
            DMA_2 (H_temp) ──► │  fp_mul_axis  W*H  ──►  fp_sub_axis  X - W*H  ──► T        │──► DMA_0 write (T)
            DMA_0 (X)      ──► │                          ▲ X (held until its product arrives) │
                               └──────────────────────────────────────────────────────────────┘
            DMA_3 read (T) ──► soft_threshold_stream ──► DMA_3 write (target)
```

`gpr_rnmf_accel` is the top. It holds `target_ip` and `soft_threshold_stream` side by
side and brings out all six stream interfaces. The processor, the four DMA engines, the
DDR controller and the AXI interconnect are vendor parts. They are not in this RTL.
Between the two passes, `T` goes back to memory, and the processor starts the second
DMA once the first has finished.

## Data layout and the three input streams

The image is stored column by column (one trace after another). Pixel `(row r, column c)`
is at index `k = r + 256·c`. `T = X - W*H` needs `W[r]` and `H[c]` next to `X[k]`, and a
DMA can only stream contiguous memory. So the software expands the two factors into
arrays of the image's size:

* `W_temp[k] = W[k mod 256]`: all of `W` repeated 183 times;
* `H_temp[k] = H[k div 256]`: each `H` value repeated 256 times.

Three read channels then stream `X`, `W_temp` and `H_temp` with equal lengths, and beat
`k` of every stream belongs to pixel `k`. Each transfer marks its last beat with TLAST.
One write channel stores `T`.

All streams share one beat format, `gpr_pkg::axis_beat_t`: a 32-bit IEEE-754 single and a
TLAST bit. In the RTL each channel is a `*_tvalid`/`*_tready` pair plus that struct. The
clock is the 100 MHz fabric clock. The reset is active low and synchronous.

## target_ip: T = X - W*H

This unit chains two floating-point operators:

* `fp_mul_axis` takes `W` on operand A and `H` on operand B.
* `fp_sub_axis` takes `X` on operand A and the product on operand B, and computes A − B.

Both operators are blocking joins. An operation starts only when both operand channels
are valid and the pipeline can advance. Both beats are then taken in the same clock. Each
input's TREADY therefore waits for the other input's TVALID. This is AXI-legal: ready may
depend on valid, but valid never depends on ready.

This has a consequence that surprises people at first. `X` is not taken together with
`W` and `H`. It waits at the subtractor, with TVALID high and TREADY low, for as long as
the multiplier needs for the matching product. After that start-up, the chain takes one
pixel per clock:

| event                                       | clock                 |
|---------------------------------------------|-----------------------|
| `W[k]`, `H[k]` taken                        | t                     |
| product leaves the multiplier; `X[k]` taken | t + 9                 |
| `T[k]` valid at the output                  | t + 20                |
| whole image, no stalls                      | 46848 + 20 clocks ≈ 0.47 ms |

TLAST is ANDed through both operators. `T` carries TLAST only when `X`, `W` and `H` all
mark the same last beat. The product and the difference are rounded separately, with no
fused multiply-add, so the results match the plain C loop `X[k] - W[r]*H[c]` on a CPU
that does not contract the expression. A worked example is one of the tests:
0.43865281 − 0.19797084² = 0.39946038 (`0x3ECC8612`).

The multiplier's 9-clock latency and the AND rule for TLAST come from the configuration
of the original vendor operator. The original does not give the subtractor's latency.
11 clocks is that operator family's full-latency setting for single precision, and it
is a parameter (`SUB_LATENCY`).

## soft_threshold_stream: the shrinkage core

For each sample `x` this core computes `sign(x) · max(0, |x| − 0.00015)` at one sample per
clock, with a latency of 15 clocks. A 46848-sample image takes 46848 + 15 = 46863
clocks. The core matches the original C code bit for bit. That takes more care than the
formula suggests:

* **The subtraction is done in double precision.** In C, `0.00015` is a `double`, so
  `fabsf(x) - 0.00015` is computed as a double and then rounded to a float when it is
  stored. The core does the same:
  * `fp_widen` extends `|x|` to binary64, which is exact.
  * `fp_addsub` subtracts the binary64 constant `0x3F23A92A30553261`.
  * `fp_narrow` rounds the result to binary32, to nearest, ties to even.

  A single-precision subtraction of `(float)0.00015` would give different results near
  the threshold. The test deliberately puts samples a few ulps on either side of it.
* **`max(0, ·)`**: a negative difference, −0 or NaN gives +0.
* **The sign multiply is done on the sign bit.** The factor is −1, 0 or +1, so the
  multiplication is exact and no multiplier is needed:
  * a negative `x` gives the negated magnitude, so a small negative `x` yields **−0.0**
    (`0x80000000`), just as `-1.0f * 0.0f` does in C;
  * a positive `x` gives the magnitude;
  * `x = ±0` gives +0.
* **A NaN input gives +0.** The C code leaves the sign variable at its previous value for
  a NaN, which is not a usable definition, so this is this design's own choice.

**TLAST is counted, not copied.** The core counts accepted samples and sets TLAST on
sample `N_SAMPLES − 1` of every frame (default 46848). After that sample the count
starts again at 0. Input TLAST is accepted and ignored. The core has no start/done
control: it runs for as long as samples arrive.

**Structure and timing.** Both stream ports go through `axis_reg_slice`, a two-entry skid
buffer that registers TVALID, TDATA and TREADY, so no combinational path crosses the core.
The arithmetic sits between the slices, followed by a 13-stage `stall_pipe`. The total
is 1 + 13 + 1 = 15 clocks.

## Floating-point arithmetic

`fp_addsub`, `fp_multiply`, `fp_widen` and `fp_narrow` are format-generic combinational
modules, with exponent and fraction widths as parameters. They follow IEEE-754 with these
exceptions, which are the usual FPGA-operator simplifications:

* rounding is always to nearest, ties to even;
* **flush to zero**: subnormal inputs read as zero, and results below the smallest normal
  number become a zero of the result's sign;
* every NaN produced is the quiet NaN `0x7FC00000` (or its binary64 equivalent);
  inf − inf and inf · 0 give NaN, and overflow gives infinity;
* an exact cancellation gives +0; (−0) − (+0) gives −0.

## Pipelines and backpressure

Every unit uses the same stall discipline (`stall_pipe`). The whole pipeline advances when
its last stage is empty or being read, and freezes otherwise. That condition is also the
input's TREADY. So backpressure on an output stops the unit without losing or repeating
a beat, and with no backpressure a new beat enters every clock. Both `stall_pipe` and
`axis_reg_slice` assert that an output beat, once presented, stays stable until it is
taken.

Each operator computes its whole result in the first stage and then only delays it.
The latencies match the original implementation, but this version is not yet pipelined
for 100 MHz: the double-precision adder in the shrinkage core in particular is one long
combinational path. To close timing, spread the arithmetic over the existing delay
stages, or let synthesis retime registers into it. The cycle behaviour at the ports does
not change either way.

## Parameters

| module                  | parameter        | default | meaning |
|-------------------------|------------------|---------|---------|
| `gpr_rnmf_accel`        | `N_SAMPLES`      | 46848   | samples per image (256 × 183), sets the shrinkage TLAST |
|                         | `MUL_LATENCY`    | 9       | multiplier latency, clocks |
|                         | `SUB_LATENCY`    | 11      | subtractor latency, clocks (not given by the original) |
|                         | `SHRINK_LATENCY` | 15      | shrinkage core latency, clocks (at least 3) |
| `soft_threshold_stream` | `THRESHOLD`      | binary64 of 0.00015 | shrinkage threshold |

Constants shared by the modules (image size, format widths, the threshold, the beat
struct) are in `rtl/gpr_pkg.sv`.

## What is outside this RTL

The full system around these units is made of vendor parts:

* a MicroBlaze soft processor with a 64 KB cache, which runs RNMF and builds
  `W_temp` and `H_temp`;
* four simple-mode AXI DMA engines with 26-bit length registers, enough for one
  187,392-byte array;
* a DDR2 memory controller, the AXI interconnect, a timer, GPIO, a UART and a clock/reset
  block.

The units were also tested on a Zynq-7000 board. There the Cortex-A9 runs the
software, and the DMA engines reach DDR through the processor's high-performance slave
ports. Their exact arrangement there is not recorded in detail. An earlier approach fed a single `X − W·H`
unit through memory-mapped AXI-Lite registers, one element per register write, and
also tried up to 16 such units in parallel. It was slower than software and was
abandoned in favour of the streaming units above, so it is not included.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. The reference
values come from `tb/tb_fp_pkg.sv`, which computes in the simulator's double-precision
`real` arithmetic and rounds to single precision by scaling and rounding, not by bit
manipulation. A product of two singles is exact in a double. So is a difference when
the exponents differ by less than 29, and the tests keep to that range. So the reference
rounds only once, and its result is the correctly rounded one.

| testbench | what it covers |
|-----------|----------------|
| `tb_fp_mul_axis` | 3000+ random and directed products (zeros, ∞, NaN, ∞·0, overflow, flush to zero, subnormal inputs); exact 9-clock latency; independent gaps on A and B; random backpressure; the join; TLAST AND |
| `tb_fp_sub_axis` | the same for A − B, with near-cancelling pairs, ∞ − ∞, signed zeros, overflow and flush to zero; 11-clock latency |
| `tb_target_ip` | `T = X − W*H` on 3000+ triples, including the worked example; 20 clocks from `W`/`H` taken to `T`; `X` waiting for its product; gaps, backpressure, TLAST |
| `tb_soft_threshold_stream` | 4 frames of 1000 samples: values a few ulps around the threshold, ±0, small negatives (→ −0), subnormals, ∞, NaN; 15-clock latency; a frame in N + 15 clocks; TLAST every N samples whatever the input TLAST says |
| `tb_gpr_rnmf_accel` | the top at its default size: two RNMF iterations on a synthetic 256 × 183 image with a target hyperbola. `X`, `W_temp` and `H_temp` are streamed the way the DMAs stream them, and every `T` and every shrunk sample is checked. It also checks one TLAST per image on each output and a shrinkage pass of exactly 46863 clocks. It counts operand gaps, `X` waits, `T` backpressure, TLASTs and kept-positive, kept-negative and cut-to-zero outputs, and fails if any count is zero |

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/gpr_pkg.sv tb/tb_fp_pkg.sv tb/tb_gpr_rnmf_accel.sv --top-module tb_gpr_rnmf_accel
./obj_dir/Vtb_gpr_rnmf_accel
```

Replace the testbench name to run any of the others. The full-size run takes under a
second.

## Files

* `rtl/gpr_pkg.sv`: shared constants and the `axis_beat_t` beat struct
* `rtl/gpr_rnmf_accel.sv`: the top
* `rtl/target_ip.sv`, `rtl/fp_mul_axis.sv`, `rtl/fp_sub_axis.sv`: the `T = X − W*H` unit
* `rtl/soft_threshold_stream.sv`: the shrinkage core
* `rtl/fp_addsub.sv`, `rtl/fp_multiply.sv`, `rtl/fp_widen.sv`, `rtl/fp_narrow.sv`:
  combinational IEEE-754 arithmetic
* `rtl/stall_pipe.sv`, `rtl/axis_reg_slice.sv`: the pipeline and the register slice
* `tb/tb_fp_pkg.sv`: reference arithmetic for the testbenches
* `tb/tb_*.sv`: the testbenches listed above
