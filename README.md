# Streaming template matcher with pixel rearrangement

This is an FPGA-oriented pipeline for the expensive step of coarse-to-fine
template matching. The matcher looks for an `m x m` template in an `n x n`
base image using the normalized correlation coefficient. Ordinary
coarse-to-fine matching searches a blurred, low-resolution image first, and
it can miss the template. Pixel rearrangement avoids that miss:

* The base image is reduced to `I'` by keeping every k-th pixel in both
  directions, so `I'(x, y) = I(kx, ky)`, which is `n/k x n/k` pixels.
* The template is split into `k*k` low-resolution templates:
  `T'_{s,t}(x, y) = T(kx+s, ky+t)`, for `0 <= s, t < k`. Each is `m' x m'`
  pixels, with `m' = m/k`.

Say the template occurs in the base image at `(px, py)`. Then one of the
`k*k` templates is an exact subsample of `I'`, at
`((px+s)/k, (py+t)/k)`. Here `s = -px mod k` and `t = -py mod k`.
Matching `I'` against all `k*k` templates therefore always finds a
candidate at the true position. A full-resolution check of the few
candidates then settles the answer.

The RTL here does the low-resolution matching, which is by far the largest
share of the work. It reads `I'` in raster order at one pixel per clock. For
every `m' x m'` window, it reports which of the `k*k` templates correlate
with the window by at least a threshold `t`. A host does everything else:
- subsampling the image;
- splitting the template;
- precomputing the template constants;
- the full-resolution refinement.

The default configuration is `n = 1024`, `m = 16`, `k = 4`. That means a
256 x 256 `I'`, sixteen 4 x 4 templates and sixteen matching units. These
work in parallel with 320 multipliers. A frame takes 65536 + 15 clocks.

## The pipeline

```
in_pixel ─► input reg ─► line_buffers ─┬─► sum_module ──── +1 ─┐ sum(I')
                         (3 row FIFOs)  ├─► squared_sum_module ─┤ sum(I'^2)
                          one column    │                       ▼
                          per clock     └─► template_matching_unit × k²
                                              product_sum_module (m'×m' DSP MACs)
                                              comparator_module (4 multipliers)
                                                        │
                                             output reg ─► out_match[k²], out_x, out_y
```

**Line buffers** (`line_buffers`). These are `m'-1` row FIFOs, each one
block RAM deep enough for a row of `I'`. With every new pixel they supply
the `m'-1` pixels above it, so one column of the window arrives per clock.
All FIFOs share one address counter. Each RAM is read when a pixel arrives
and written one clock later at the same address. FIFO 0 is written with
the new pixel, and FIFO j with the word FIFO j-1 just returned. This maps
onto a simple dual-port RAM.

**Window sums** (`sum_module`, `squared_sum_module`). Every unit needs
`sum(I')` and `sum(I'^2)` of the window, and these do not depend on the
template. One copy of each serves all units. Each module works in three
steps:
1. An adder tree adds the incoming column.
2. A shift register keeps the last `m'` column sums.
3. A second adder tree adds those sums.

The squared-sum module first squares each pixel through a 256-entry
look-up table (`x*x` at address `x`) and does not use multipliers.

**Product sum** (`product_sum_module`, `dsp_mac`). Each window row has a
chain of `m'` multiply-add DSP slices, wired as a transposed FIR filter.
The row's newest pixel is broadcast to all slices of the chain. Slice `d`
multiplies it by `T'(d, row)` and adds the P register of slice `d-1`. That
register still holds the partial sum of the earlier pixels. When a pixel
reaches the end of the chain, the chain holds `sum_d T'(d,row)·I'(x+d,row)`
for the window whose right edge is the new column. An adder tree then adds
the `m'` row results. `dsp_mac` models only the part of a DSP48E1-style
slice that this needs: a 25 x 18 signed multiply, A/B, M and P registers
with clock enables, and the PCIN cascade input.

## The matching condition

This part takes the most care. With `s = m'^2`, the correlation
coefficient is:

```
        s·Σ I'T' − Σ I' · Σ T'
R = ─────────────────────────────────────────────────
    sqrt( (s·Σ I'^2 − (Σ I')^2) · (s·Σ T'^2 − (Σ T')^2) )
```

Evaluating `R >= t` needs a square root and a division. For `t >= 0`, both
sides can be squared, which gives an exact test without either:

```
N   = s·ΣI'T' − ΣI'·ΣT'                       (numerator, may be negative)
V_I = s·ΣI'^2 − (ΣI')^2                       (≥ 0)
C_T = round(t^2 · 2^16) · (s·ΣT'^2 − (ΣT')^2)  (template only, loaded by the host)

match  ⇔  N ≥ 0  and  N^2 · 2^16 ≥ C_T · V_I
```

`m'` is a power of two, so every multiplication by `s` is a shift. The
comparator needs exactly four multipliers: `ΣI'·ΣT'`, `(ΣI')^2`, `N^2` and
`C_T·V_I`. For 8-bit pixels and `m' = 4`, the widths are:
- `ΣI'` uses 12 bits;
- `ΣI'^2` and `ΣI'T'` use 20 bits;
- `N` is 25 bits, signed;
- `V_I` uses 24 bits;
- `C_T` uses 41 bits;
- the final compare is 67 bits.

All of these are exact. The only rounding is in the threshold `t^2`, which
has 16 fraction bits. As a result, the hardware decision equals
`R^2 >= round(t^2·2^16)/2^16` exactly, for windows with a non-negative
numerator.

Things to know when using this condition:

* Only non-negative thresholds make sense. The `N >= 0` term rejects
  anti-correlated windows.
* A flat window (`V_I = 0`) has `N = 0`, so it passes the test. A flat
  template (`C_T = 0`) matches every window with `N >= 0`. The host should
  treat such candidates as undefined, or avoid flat templates.
* The test is `R >= t`, not `R > t`.

## Interface and timing

| port | meaning |
|---|---|
| `cfg` (`tm_pkg::tm_cfg_t`) | `we`, `unit`, `addr`, `data`: one register write into unit `unit` |
| `in_valid`, `in_sof`, `in_pixel` | one pixel of `I'`, raster order; `in_sof` on the first pixel of a frame |
| `out_valid`, `out_x`, `out_y`, `out_match` | one result per window; `(out_x, out_y)` is its top-left pixel in `I'`; bit `s*k+t` of `out_match` is the decision for `T'_{s,t}` |

Configuration addresses inside a unit:

| address | value |
|---|---|
| `y*m' + x` | template pixel `T'(x, y)` |
| `0xFE` (`CFG_ADDR_SUM_T`) | `ΣT'` |
| `0xFF` (`CFG_ADDR_C_T`) | `C_T` as defined above |

* Write all units before a frame starts. A write during a frame corrupts
  the results in flight.
* The result for the pixel on the input pins in clock `c` appears on the
  output pins in clock `c + 15`. In general the latency is
  `2·log2(m') + 11`.

The 15 stages break down as follows:

| stages | what |
|---|---|
| 1 | input register |
| 1 | line-buffer read |
| 6 | squared sum: table read, 2 tree levels, shift register, 2 tree levels |
| 6 | comparator: multipliers in 2 stages, subtract, multipliers in 2 stages, compare |
| 1 | output register |

The plain sum is 1 clock faster than the squared sum and is delayed by one
register to line up. The product sum takes 5 clocks (DSP A/B, M and P
registers, then 2 tree levels) and is likewise delayed by 1 clock inside
each unit. A gap-free frame takes `(n/k)^2 + 15` clocks, which is 65551 at
the defaults.

Results exist only for windows that lie wholly inside `I'`, that is for
pixels with column and row `>= m'-1`. The pixels of the first `m'-1`
columns and rows produce no output. `in_valid` may drop between any two
pixels. Every register that holds history (FIFOs, shift registers, DSP
chains) advances only on valid data, so gaps do not change any result; the
result just follows its pixel by 15 clocks. Reset (`rst_n`, synchronous,
active low) clears:
- the template registers;
- the valid pipeline;
- the position counters.

## The host's side

To use the block, the host:
1. Subsamples the image and splits the template, as above.
2. Computes `ΣT'` and `C_T` for each of the `k*k` templates and writes
   them, with the template pixels, through `cfg`.
3. Streams `I'`.
4. Maps each reported `(x, y)` with set bit `u = s*k+t` to the
   full-resolution position `(k·x − s, k·y − t)`. It discards positions
   that fall outside `0 .. n−m`.
5. Computes the full-resolution correlation for each remaining position and
   keeps the best.

The end-to-end testbenches do exactly this in SystemVerilog.

## Files

| file | contents |
|---|---|
| `rtl/tm_pkg.sv` | configuration record and addresses, threshold format, latency functions |
| `rtl/template_matcher.sv` | top level |
| `rtl/line_buffers.sv` | row FIFOs |
| `rtl/sum_module.sv`, `rtl/squared_sum_module.sv` | window sums |
| `rtl/template_matching_unit.sv` | template registers + product sum + comparator |
| `rtl/product_sum_module.sv`, `rtl/dsp_mac.sv` | DSP-chain product sum |
| `rtl/comparator_module.sv` | matching condition |
| `rtl/adder_tree.sv`, `rtl/pipe_delay.sv` | pipelined adder tree, delay line |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_template_matcher.sv` | end to end, 64 x 64 image, three frames, gaps, template reloads |
| `tb/tb_template_matcher_full.sv` | end to end at the default 1024 / 16 / 4 size, one frame |

Top-level parameters are `N`, `M`, `K` and `PIXEL_W`, with defaults 1024,
16, 4 and 8. `N/K` and `M/K` must be powers of two, with `M/K >= 2`.
Besides the defaults, the end-to-end test has also passed with
`N=64, M=16, K=2` (m' = 8, four units, latency 17) and with
`N=128, M=32, K=8` (64 units); set `N`, `M`, `K` in the test's
localparams and on its instance to repeat that.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/tm_pkg.sv \
    tb/tb_template_matcher_full.sv --top-module tb_template_matcher_full
./obj_dir/Vtb_template_matcher_full
```

Replace the testbench name to run any other test. The full-size test runs
in about a second. It checks all 64009 windows × 16 templates against a
direct evaluation of the condition, and checks the 65551-clock frame time.
It also finds, by host-side refinement, the exact place the template was
cut from.

The block tests compare against independently computed values:
- line buffers: every tap;
- window sums: every window, including all-ones data for the widest values;
- DSP model: streaming and stalled enables;
- comparator: 4000 random, correlated, anti-correlated and flat cases,
  checked against both exact 128-bit arithmetic and floating-point `R`;
- matching unit: planted exact and noisy copies of the template.

Each test also checks its module's latency, and each one fails on a
deliberately broken copy of its module.

## How far it goes, and where it departs from the reference implementation

* It is the same architecture, written as portable RTL. Block RAMs are
  inferred arrays, and the DSP slices are a generic registered
  multiply-add. Nothing here has been placed or timed on an FPGA. The
  reference implementation reports the following on a Virtex-6 LX240T,
  none of which was reproduced:
  - about 280 MHz;
  - 352 DSP slices;
  - 3 block RAMs;
  - 455 CLBs.
* This design uses `m^2 + 4k^2 = 320` multipliers. The difference from 352
  slices is expected: in DSP slices, the comparator's 25 x 25 and 41 x 24
  products each need more than one slice.
* The reference counts 3 block RAMs. Here the three FIFOs and the square
  table are four separate arrays. The table's four read ports per clock
  need more RAM ports, or replicated tables, when mapped.
* The 15-clock latency matches the reference total. The split into stages
  is this design's own.
* These are this design's choices:
  - the threshold format (`t^2` with 16 fraction bits folded into `C_T`);
  - the configuration port;
  - the valid/start-of-frame input protocol with gaps allowed;
  - the output format: per-window match vector plus position.
* Pixel width is 8 bits, as a parameter. The widths elsewhere follow from
  it and are exact.
