# Faithfully rounded truncated multiplier from FPGA tiles

A `WX × WY` unsigned multiplication has `WX + WY` result bits, but a datapath
usually keeps only the top `WP` of them. Computing the full product and then
rounding wastes most of the low partial products. This multiplier never
computes many of them: it returns `P` such that

    |P · 2^lP − X·Y| < 2^lP,      lP = WX + WY − WP

(*faithful rounding*: the error is below one unit in the last place of `P`),
and spends as little logic as it can on the bits below `2^lP`.

On an FPGA the partial products are produced by sub-multipliers of a few fixed
shapes: LUT-based tiles (1×1, 1×2, 2×3, 3×3), a 2×k tile built on the carry
chain, and the 24×17 multiplier of a DSP block. The multiplier is described as
a *board* of partial-product positions covered by such *tiles*. The idea this
design implements is that the board does not have to be covered up to a fixed
diagonal border: any set of positions may be left uncovered, as long as their
total weight stays within the error budget that faithful rounding allows. A
large tile (typically the DSP) that reaches below the border computes exact
low-weight products for free, and that slack is spent by leaving positions out
elsewhere, so fewer small, inefficient tiles are needed along the border.

## The board and the tiles

Position `(x, y)` of the board stands for the partial product `X[x]·Y[y]`,
of weight `2^(x+y)`. A tile placed at `(x, y)` with extent `wa × wb` multiplies
`X[x +: wa]` by `Y[y +: wb]`; its product enters the sum shifted left by `x + y`.
Tiles may stick out beyond the most significant edge of the board; the bits
they would read there are zero.

| shape | module           | positions | cost (LUTs)   | DSPs |
|-------|------------------|-----------|---------------|------|
| 1×1   | `mult_lut_tile`  | 1         | 1.65          | 0    |
| 1×2   | `mult_lut_tile`  | 2         | 2.3           | 0    |
| 2×3   | `mult_lut_tile`  | 6         | 6.25          | 0    |
| 3×3   | `mult_lut_tile`  | 9         | 9.9           | 0    |
| 2×k   | `mult_2xk`       | 2k        | 1.65k + 2.3   | 0    |
| 24×17 | `dsp_mult_24x17` | 408       | 26.65         | 1    |

The costs (for a Xilinx 7-series device, compressor-tree cost of 0.65 LUT per
bit included) are kept in `tmul_pkg::tile_cost_x100` in hundredths of a LUT and
are used only to report the cost of a tiling. Every tile in the RTL is an
unsigned multiplier; the LUT tiles and the DSP tile are written as products
(the LUT tiles as summed AND rows) and left to synthesis to map, the 2×k tile
as two AND rows added on one adder, which is what lets it use the carry chain.

## The error budget

This is the part that decides what may be left out.

Rounding the approximate sum `P̃` to `WP` bits is done by adding a round bit
of weight `2^(lP−1)` and truncating; that step alone may err by up to
`2^(lP−1)`. So the approximation itself must stay strictly within
`±2^(lP−1)`.

Leaving positions out only ever makes the sum smaller: if the uncovered
positions have total weight `E`, the approximation error lies in `[−E, 0]`.
Adding a constant `C` shifts this to `[C − E, C]`. Both ends must be inside
the budget:

    C < 2^(lP−1)            (the error when every left-out product is 0)
    E − C < 2^(lP−1)        (the error when every left-out product is 1)

so at most `E < 2^lP − 2^l_ext` of weight can be left out, where `C` is made of
bits `l_ext … lP−2`. Bits of `C` above `lP−2` would break the first bound;
bits below `l_ext` would cost compressor bits for little gain.

`l_ext` comes from a classical greedy computation for truncated array
multipliers (functions `trunc_lext` and `trunc_t` in `tmul_pkg`). With
`Δlow(l)` the weight of all partial products in columns below `l`,

1. `l_ext` starts at 0 and grows while `2^(l_ext+1) + Δlow(l_ext+1) < 2^lP`;
2. `t` starts at 0 and grows while `(t+2)·2^l_ext + Δlow(l_ext) < 2^lP`.

`t` is the number of partial products that could also be dropped in column
`l_ext` of a plain truncated array. `Δlow` is summed from the real column
heights, so rectangular boards are handled too. Example: a 7×7 multiplier
with a 7-bit result has `lP = 7`, `l_ext = 4` (three guard columns) and `t = 3`.

A fixed-border design would cover exactly the columns from `l_ext` up, minus
`t` positions. Here the tiling is judged only by `E`. Since a large tile
covers positions far below `l_ext` exactly, `E` can stay within budget even
when the tiles elsewhere start *above* `l_ext`. In the default 26×26
configuration `l_ext = 21`, yet the LUT tiles start at the diagonal
`x + y = 23`, because the DSP tile covers everything of weight `2^11` and up
in its rectangle.

The multiplier checks both bounds on its `TILING` parameter at elaboration
(`tiling_faithful`) and stops with an error if they do not hold. It also
needs the tiles not to overlap; `tiling_overlaps` checks that and is run by
the testbenches.

## Choosing the tiling

A cost-optimal tiling is an integer linear program: one binary variable per
tile shape and position, one per board position (covered or not), one per bit
of `C`. The constraints are exact coverage or omission of each position, the
two error bounds above, and a DSP limit. The objective is the LUT cost of the
tiles plus 0.65 LUT per one bit of `C`. That program is solved offline by a
solver; it is not hardware and is not part of this RTL.

`trunc_mult` therefore takes its tiling as a parameter, and by default uses
`tmul_pkg::build_tiling(WX, WY, WP, NUM_DSP)`, a simple deterministic tiler
evaluated at elaboration. It honours the same constraints, but it is a
heuristic, so its tilings are valid but not always cheapest:

* with `NUM_DSP = 1` one 24×17 DSP tile goes into the most significant corner
  at `(max(0, WX−24), max(0, WY−17))`;
* the rows below it (and the columns beside it) are cut into bands of two,
  with one band of three first when their number is odd;
* a band is covered from a diagonal border `L` to the most significant edge.
  A 2-row band of length ≥ 4 gets one 2×k tile, length 3 a 2×3 tile, shorter
  ones 1×2 tiles. A 3-row band gets 3×3 tiles with a 2×3 or a 1×2 + 1×1
  remainder next to the border;
* `L` starts at `lP` and is lowered until the uncovered weight `E` fits the
  budget. `C` is then the multiple of `2^l_ext` with the fewest one bits that
  satisfies both bounds.

Default tiling (26×26, `WP = 26`, one DSP), 105.75 LUTs + 1 DSP by the cost
table:

| tile   | at (x, y) | extent |
|--------|-----------|--------|
| DSP    | (2, 9)    | 24×17  |
| 2×3    | (21, 0)   | 2×3    |
| 3×3    | (23, 0)   | 3×3    |
| 2×k    | (19, 3)   | 7×2    |
| 2×k    | (17, 5)   | 9×2    |
| 2×k    | (15, 7)   | 11×2   |
| 2×k    | (0, 22)   | 2×4    |

with `C = 0x1E00000` (bits 21 to 24) and border `L = 23`.

A hand-made or externally optimised tiling can be passed instead. Fill a
`tmul_pkg::tiling_t`: `tiles[0..n-1]` with shape, `x`, `y`, `wa`, `wb`, then
`n` and `c_const`. Tiles use 7-bit coordinates. At most `MAX_TILES = 96` tiles
fit, and constants are 128 bits wide, so board sides up to 64 bits work.

## Datapath

`trunc_mult` is combinational:

1. Each tile gets its slices of `X` and `Y` (zero-padded above the MSB) and
   instantiates its tile module. A DSP or 2×k tile placed rotated gets its
   operands swapped.
2. Each tile product, shifted to weight `x + y`, is one word of
   `WX + WY + 1` bits. One more word holds `C` plus the round bit
   `2^(lP−1)`.
3. `compressor_tree` adds all words with layers of 3:2 carry-save
   compressors and one final adder.
4. `P` is bits `WX+WY−1 … lP` of the sum. If the sum reaches `2^(WX+WY)`,
   `P` saturates to all ones. This can happen only when `WP` is narrower than
   about `min(WX, WY)`, and the saturated value is still faithful.

Tile products are added in full, including bits below `l_ext`. That keeps the
error exactly as the budget above assumes. With `WP = WX + WY` nothing is
left out, `C = 0`, and the result is the exact product.

There are no registers. To pipeline, place registers around the block, or
retime inside it in synthesis. The block has no latency, reset or handshake.

## Files

| file | contents |
|------|----------|
| `rtl/tmul_pkg.sv` | tile types, cost table, truncation parameters, error checks, default tiler |
| `rtl/trunc_mult.sv` | the multiplier (top) |
| `rtl/mult_lut_tile.sv` | 1×1 … 3×3 LUT tiles |
| `rtl/mult_2xk.sv` | 2×k carry-chain tile |
| `rtl/dsp_mult_24x17.sv` | DSP tile |
| `rtl/compressor_tree.sv` | 3:2 carry-save adder tree |
| `tb/tmul_tb_pkg.sv` | reference model used by the multiplier testbenches |
| `tb/*_tb.sv`, `tb/trunc_mult_checker.sv` | testbenches |

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/tmul_pkg.sv rtl/*.sv tb/tmul_tb_pkg.sv tb/trunc_mult_tb.sv \
        --top-module trunc_mult_tb -Mdir obj_tmtb && ./obj_tmtb/Vtrunc_mult_tb

(`rtl/tmul_pkg.sv` is listed first so that the package is known before its
users. Verilator warns that it sees the file twice; that is harmless.) For the
other testbenches, replace the last file and the top module name. The
size-sweep testbench also needs `tb/trunc_mult_checker.sv`.

* `trunc_mult_tb` covers the default 26×26 → 26 multiplier with 20,000 random
  and corner operands. Each output is compared bit for bit with the
  reference model, and checked against the faithful bound using the exact
  product. The test counts left-out products that were 1, tile bits used
  below the border, and results rounded up and down, and fails if any of
  these never happens.
* `trunc_mult_sweep_tb` covers 39 sizes from two series. One is square
  multipliers (`WX = WY = WP` from 2 to 32 without a DSP, 16 to 32 with one).
  The other is 32×32 with `WP` from 1 to 64, with and without a DSP. The
  checks are the same, at 300 vectors per size, and it also hits output
  saturation and exact (nothing left out) sizes. It takes about
  1.5 minutes to build.
* `trunc_mult_custom_tb` passes a hand-written tiling through `TILING`
  (20×28 board, 20-bit output). The tiling uses every tile shape, including a
  rotated DSP tile and both orientations of the 1×2 tile, plus the largest
  allowed `C`. The checks are the same as above.
* `tmul_pkg_tb` checks the truncation parameters (7×7: `l_ext = 4`,
  `t = 3`) and `Δlow` against its closed form `(n−1)·2^n + 1`. It compares
  the closed-form error with a position-by-position sum, checks default
  tilings over many sizes for overlaps, faithfulness, tile shapes and the
  range of `C`, and prints the default tiling.
* `mult_lut_tile_tb`, `mult_2xk_tb`, `dsp_mult_24x17_tb` and
  `compressor_tree_tb` test the parts on their own, exhaustively where the
  input space allows.

The reference model in `tb/tmul_tb_pkg.sv` takes the exact product, subtracts
the partial products of every uncovered position (found by walking the
tiles), adds `C` and the round bit, and keeps the top bits. It shares no
structure with the RTL.

## Where this departs from the published method, and limits

* **Tiling.** The published tilings are cost-optimal solutions of the integer
  program. The default tiler here is a heuristic that meets the same error
  constraints. Expect somewhat more LUTs than an optimal tiling. For example
  the logic-only 26×26 tiling costs 406 LUTs by the cost table. The tiling
  can be replaced through the `TILING` parameter.
* **Tile internals.** The LUT-level mappings of the 3×3, 2×3 and 2×k tiles are
  not reproduced. The tiles are written behaviourally and left to synthesis.
  The compressor tree is a word-level 3:2 tree, not an FPGA-specific bit-heap
  compressor.
* **Numbers.** Only unsigned operands are supported. Output saturation is this
  design's own addition for very narrow outputs.
* **Timing.** The block is combinational, with no pipeline stages.
* **Tiler scope.** The tiler places at most one DSP tile. `NUM_DSP` values
  above 1 are treated as 1.
