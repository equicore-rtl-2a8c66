# Equicore: a sparse, shift-quantized Clebsch-Gordan tensor product engine

Equivariant neural networks combine features with the **Clebsch-Gordan tensor
product (CGTP)**. Two irreducible representations (irreps) go in: `I_x`, with
`m_x` rows of `2*l_x+1` components, and `I_y`, with `m_y` rows of
`2*l_y+1` components. One irrep comes out: `I_z`, with `m_z` rows of
`2*l_z+1` components:

    I_z[w][k] = sum_(u,v) W[u,v][w] * sum_(i,j) CG[i][j][k] * I_x[u][i] * I_y[v][j]

`CG` is a constant three-dimensional tensor of Clebsch-Gordan coefficients,
fixed by `(l_x, l_y, l_z)`. More than 80 % of its entries are zero for most
orders. This RTL computes the product with three ideas:

* **Sparse bypass.** The outer product `I_x (x) I_y` is never formed. The
  engine walks a list of only the non-zero CG elements. Each element's
  `(i, j)` position fetches one component of `I_x` and one of `I_y`. When
  several non-zeros share the same `(i, j)` and differ only in `k`, the list
  packs them together. The `I_x * I_y` product is then computed once and
  reused for each of them.
* **Merged shift quantization.** Irreps, weights and CG values are all Int8,
  each with a 3-bit power-of-two scale `n`, so that `value = int * 2^-n`.
  A product of three such numbers is an integer product scaled by
  `2^-(n_x+n_y+n_cg)`. Dequantization is therefore one arithmetic shift by
  the summed exponent. No multiplier is spent on scale factors.
* **Packed multipliers.** Each processing element computes two 8-bit
  products with one multiplier, in the way a DSP48 slice does. Two operands
  share the multiplier at a fixed bit spacing, and a constant on the
  adder input removes the borrow between the two result fields.

## The CG stream

The CG tensor of one layer is stored as a stream of 20-bit words:

| bit 19 | bits 18..0 | meaning |
|---|---|---|
| 1 (Head) | `pad[2:0], id_x[7:0], id_y[7:0]` | position `(i, j)` shared by the bodies that follow |
| 0 (Body) | `value[7:0], n_cg[2:0], id_z[7:0]` | one non-zero: Int8 value, its shift, and its output component `k` |

A Head is followed by one or more Bodies, and the bodies of one head must
have different `id_z`. The first body after a head uses a freshly computed
`I_x * I_y` product. Every later body of the same head reuses it, so the
L-PE does not fire for it. The unit counts both cases (`stat_lpe`,
`stat_bypass`).

The list is built offline. For each non-zero `cg`, `n_cg` is the shift in
0..7 that minimises `|clip(round(cg * 2^n)) * 2^-n - cg|`. For example,
`+-1/sqrt(6)` becomes `+-52` with `n_cg = 7`. For the `l=1 x l=1 -> l=1`
product the list has six heads `(i, j)` with `i != j`. Each has one body with
`k = 3-i-j` and value `+52` if `j = (i+1) mod 3`, else `-52`.

## Number formats

| quantity | format |
|---|---|
| irrep / weight words on the load port | 16-bit signed fixed point, 12 fraction bits, plus 3-bit shift `n` |
| stored irreps, weights, CG values | Int8 plus 3-bit shift |
| L-PE product `I_x * I_y` | 16-bit signed integer |
| tile sums `T[pair][k]` | 40-bit signed fixed point, 12 fraction bits |
| output `I_z` | 16-bit signed fixed point, 12 fraction bits, saturated |

Quantization on load (`quant_unit`) gives `q = clip(round(x * 2^n), -128, 127)`,
with ties rounded away from zero. The R-PE turns `q_x*q_y*q_cg` into a tile
term `floor(q_x*q_y*q_cg * 2^12 / 2^(n_x+n_y+n_cg))`. The shift `n_x` belongs
to the `I_x` row, so every row has its own scale. The DSP array multiplies a
tile sum by an Int8 weight and shifts the product right by that weight's `n_w`.

## Inside one unit (`equicore_unit`)

    CG buffer -> cg_decoder --Head--> xReg/yReg -> 4 x l_pe -> oBRAM regs
                            --Body--------------------------> 4 x r_pe -> bram_tiles[pair][id_z]
    bram_tiles -> dsp_array (32 lanes, x W, >> n_w) -> adder_tree -> chunk accumulator -> I_z buffer

Each of the 4 L-PEs handles two `I_x` rows (packed), so a pass covers 8 rows
of `I_x` against one row of `I_y`. The controller runs:

1. **For each `I_y` row `v`, and for each group of 8 `I_x` rows:**
   * **CLEAR**: zero the tile entries `k = 0..nz-1` of the group's pairs
     (`nz` cycles).
   * **STREAM**: one CG word per cycle. A Head reads `I_x[u][id_x]` for the
     8 rows and `I_y[v][id_y]`. The L-PEs multiply them, and the products
     stay in their output registers (the oBRAM). A Body sends the held
     products and the CG value to the R-PEs. The dequantized results are
     added into `T[v*m_x+u][id_z]` one cycle later. Rows beyond `m_x` are
     masked.
   * **DRAIN**: 2 cycles.
2. **REDUCE**: for each output channel `w` and each component `k`, the
   engine walks the `m_x*m_y` pairs in chunks of 32. The DSP array forms
   `(T * W) >> n_w` per pair, and the adder tree sums the chunk. The
   partial sums accumulate, and the last one is saturated to 16 bits and
   stored. The pipeline issues one chunk per cycle and takes 2 cycles to
   empty.

From the cycle that takes `start` to the first cycle with `done` high:

    passes * (nz + cg_len + 2) + m_z * nz * ceil(m_x*m_y / 32) + 2,
    passes = m_y * ceil(m_x / 8)

The unit and system testbenches check this count exactly; at system level
the clock hand-over adds one core cycle.

### Packed multiply (`l_pe`, `r_pe`)

The L-PE computes `P = (x1 * 2^18 + x0) * y + 2^17`. Because
`|x0*y| <= 2^14`, the lower 18 bits hold `x0*y + 2^17` with no borrow.
`P >> 18` is exactly `x1*y`, and flipping bit 17 of the lower field gives
`x0*y`. The R-PE uses the same scheme with 26-bit spacing, because its
operands are 16-bit products and its results need 24 bits.

## System (`equicore_top`)

`N_CORES = 96` units sit behind a memory controller (`mem_ctrl`).

The system uses two clocks. The units run on `clk_core`, at 500 MHz in the
intended device. The memory controller and quantizer run on `clk_periph`,
at half that rate. The two clocks must come from one source with aligned
rising edges. Under that condition, a peripheral-domain register holds
still for two core cycles. `clk_bridge` uses a toggle flag to copy each load
word, and each start, into the core domain exactly once. The bridge adds one
core cycle to the unit's cycle count. `busy`, `done`, `rd_data` and `stat_*`
are core-domain levels, and they are stable while the peripheral side reads
them. All other ports belong to `clk_periph`.

Each unit runs the same layer (the same CG list and weights) on a different
sample of the batch. The count is 3,840 DSPs divided by 40 per unit (4 L-PE, 4 R-PE and
32 in the DSP array).

Load port: one word per cycle (`wr_valid`), to unit `wr_core` or, with
`wr_bcast`, to all units. Words for `BUF_IX`, `BUF_IY` and `BUF_W` are
quantized on the way in. The controller counts clipped words in `sat_count`.
All writes reach the units about one peripheral cycle later.

| `wr_buf` | `wr_addr` | `wr_data` |
|---|---|---|
| `BUF_IX` (0) | `{u, e}`, with `e` in the low `clog2(2*L_MAX+1)` bits | 16-bit fixed point; `wr_shift` = `n_x` of row `u` |
| `BUF_IY` (1) | `{v, e}` | as above, `n_y` of row `v` |
| `BUF_W` (2) | `{pair, w}`, with `w` in the low `clog2(MZ_MAX)` bits, `pair = v*m_x + u` | 16-bit fixed point; `wr_shift` = `n_w` |
| `BUF_CG` (3) | word index | raw 20-bit CG word |
| `BUF_CFG` (4) | 0: `m_x`, 1: `m_y`, 2: `m_z`, 3: `nz = 2*l_z+1`, 4: CG stream length | value |

Run a layer as follows:

1. Load the buffers.
2. Pulse `start`.
3. Wait for `done`, which is the AND of all units' done flags. `busy` is
   their OR.
4. Read `I_z[w][k]` of unit `rd_core` at `rd_addr = {w, k}`. `rd_data`
   follows the address by one core cycle.

The unit holds each buffer as an array: `I_x`, `I_y`, CG, weights,
`I_z` and the tiles.

## Sizes

| parameter | default | origin |
|---|---|---|
| `N_LPE` (L-PE = R-PE count) | 4 | as published |
| `NDSP` | 32 | as published |
| `N_CORES` | 96 | derived from the published DSP total |
| `L_MAX` | 5 (11 components) | highest order evaluated |
| `MX_MAX`, `MZ_MAX` | 128 | largest multiplicity evaluated |
| `MY_MAX` | 16 | own choice |
| `CG_DEPTH` | 512 words | own choice |
| Int8 data, 3-bit shifts, 8-bit indexes | | as published |

At these sizes, a layer like `16x1o (x) 16x1e -> 32x1o` fits, and so does
any order up to 5 at small multiplicity. `m_y` above 16, or more than 2048
`(u, v)` pairs, does not fit.

## How far to trust it, and where it departs

* The arithmetic is bit-exact against an independent reference in every
  testbench. Quantization in the reference uses real arithmetic.
* The published design reaches 500 MHz in the core by placing the PE
  registers in the logic columns between DSP and BRAM columns, and by using
  DSP cascade paths. This RTL keeps the two clock rates but contains no
  placement or device primitives, so none of that timing work carries
  over. The clock hand-over is valid only for the aligned 2:1 clock pair
  described above.
* The R-PE's packed word is wider than one DSP48E2 port. It is written as a
  word-level multiply.
* The BRAM tiles do their read-modify-write in one cycle with an
  asynchronous read, which suits distributed RAM. A block-RAM version would
  need a forwarding path.
* These are this design's own choices: the 16-bit fixed-point input format,
  the 40-bit tile accumulators, the CG word encoding, the loop order, the
  buffer depths, the address map, broadcast loading and the split of work
  across units by sample.
* Each unit keeps its own copy of the CG list and the weights, even though
  all units use the same ones. The published system draws a single on-chip
  memory shared through the controller.
* At the default depths, one unit's weight buffer alone is about 2.9 Mbit
  (2048 pairs x 128 channels x 11 bits). Ninety-six of them would far
  exceed the block and ultra RAM of a VU37P-class device. Reduce
  `MY_MAX`/`MZ_MAX`, or stream weights per pass, before you implement the
  design on such a part.
* A pass takes 8 `I_x` rows, one for each packed L-PE lane. The published
  text gives "for example 4" rows per load.
* Off-chip memory (HBM) is not modelled. Its side is the load and read
  ports.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing -Irtl -Itb rtl/equicore_pkg.sv tb/tb_equicore_top.sv \
              --top-module tb_equicore_top -Mdir obj && obj/Vtb_equicore_top

* The system testbenches generate `clk_periph` from `clk_core` by division,
  and drive the ports on `clk_periph`.
* `tb_equicore_top` runs 3 units at reduced sizes. It covers three layers
  and checks that each mechanism occurs: broadcast and unicast loads,
  quantizer clipping, L-PE firing and bypass, a partial row group, several
  `I_y` rows and several DSP-array chunks.
* `tb_equicore_top_full` runs the system at its default sizes (96 units)
  on the `16x1o (x) 16x1e -> 32x1o` layer. It takes about 90 s to build
  and a few seconds to run.
* `tb_equicore_unit` adds an output-saturation case.
* `tb_workload_ablation` runs one unit at default sizes through an order
  sweep (`l = 0..5`, all multiplicities 8) and a multiplicity sweep
  (`l = 3`, `m = 4, 8, 16`). Its CG tensors have the non-zero pattern of
  the real basis and random values. It prints these cycle counts:

  | l | m | CG words | L-PE firings | bypassed | cycles |
  |---|---|---|---|---|---|
  | 0 | 8 | 2 | 8 | 0 | 58 |
  | 1 | 8 | 22 | 72 | 32 | 266 |
  | 2 | 8 | 74 | 200 | 192 | 730 |
  | 3 | 8 | 158 | 392 | 480 | 1450 |
  | 4 | 8 | 274 | 648 | 896 | 2426 |
  | 5 | 8 | 422 | 968 | 1440 | 3658 |
  | 3 | 4 | 158 | 196 | 240 | 698 |
  | 3 | 16 | 158 | 1568 | 1920 | 6242 |

  At `l = 0` the CG tensor is dense (a single element), so nothing is
  bypassed.

Every testbench has a cycle watchdog.

Files in `rtl/`:

* `equicore_pkg`: widths, CG word types and buffer codes
* `quant_unit`
* `mem_ctrl`
* `clk_bridge`
* `cg_decoder`
* `l_pe`
* `r_pe`
* `bram_tiles`
* `dsp_array`
* `adder_tree`
* `equicore_unit`
* `equicore_top`
