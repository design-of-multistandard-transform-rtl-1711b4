# Multistandard 2-D transform core with common sharing distributed arithmetic

Video codecs need a forward 2-D block transform, and each standard defines its
own: the DCT of MPEG-1/2/4, the integer transforms of H.264 (8x8 and 4x4) and
of VC-1 (8x8, 8x4, 4x8, 4x4). All of them share one structure. Every 8-point
transform matrix follows the DCT sign pattern and is built from seven
coefficients c1..c7. Every 4-point matrix is built from c2, c4 and c6. Only the
values of the coefficients differ between standards.

This core exploits that. It does no multiplication. Each coefficient is
written as a few signed powers of two, called canonic signed digits (CSD). The
core forms a handful of shared sums of inputs, and each CSD digit position only
selects one of those sums through a multiplexer. Switching standard therefore
changes only multiplexer selects, and one datapath covers all seven transform
types. This scheme is called common sharing distributed arithmetic (CSDA). It
combines factor sharing (one set of input combinations serves every
coefficient) with distributed arithmetic (the inner products are evaluated per
bit position and added with shifts).

The core takes eight samples per clock and returns eight coefficients per
clock, for every transform type.

## Data flow

```
           row pass                        column pass
in_data ─► Core-1 ─► TMEM (64 x 12 bit) ─► Core-2 ─► out_data
 8 x 9b    mst_core_1d   tmem               mst_core_1d   8 x 16b
           9b → 12b                         12b → 16b
```

`mst_2d` is the top. Core-1 and Core-2 are two instances of the same
`mst_core_1d` with different word lengths. The TMEM transposes the tile
between them.

Inside `mst_core_1d`:

```
x[0..7] ─► sbf ─┬─ a[0..3] ─► csda_e ─ digit sums Z0 Z2 Z4 Z6 ─┐ reg ─► 8 x ecat ─► perm ─► reg ─► t[0..7]
                └─ b[0..3] ─► csda_o ─ digit sums Z1 Z3 Z5 Z7 ─┘
```

| module | role |
|---|---|
| `sbf` | selected butterfly: splits the transform into an even and an odd half |
| `csda_e` | even half: Z0, Z2, Z4, Z6 as per-digit partial sums |
| `csda_o` | odd half: Z1, Z3, Z5, Z7, or a whole second 4-point transform |
| `ecat` | one per output: weights and adds the digit sums, then rounds |
| `perm` | puts the eight results in output order |
| `tmem` | 8x8 transpose between the passes |
| `mst_pkg` | types, coefficient values, CSD recoding, shift table |

## The eight-point decomposition

With a_i = x_i + x_{7-i} and b_i = x_i − x_{7-i} (i = 0..3), the 8-point
transform splits into two 4x4 products:

```
[Z0 Z2 Z4 Z6] = Ce · a      Ce = [ c4  c4  c4  c4 ]
                                 [ c2  c6 -c6 -c2 ]
                                 [ c4 -c4 -c4  c4 ]
                                 [ c6 -c2  c2 -c6 ]

[Z1 Z3 Z5 Z7] = Co · b      Co = [ c1  c3  c5  c7 ]
                                 [ c3 -c7 -c1 -c5 ]
                                 [ c5 -c1  c7  c3 ]
                                 [ c7 -c5  c3 -c1 ]
```

The even half splits once more. With A0 = a0+a3, A1 = a1+a2, B0 = a0−a3 and
B1 = a1−a2:

```
Z0 = c4 (A0 + A1)      Z2 = c2 B0 + c6 B1
Z4 = c4 (A0 − A1)      Z6 = c6 B0 − c2 B1
```

`Ce` is exactly the 4-point transform matrix. The even half therefore computes
a 4-point transform in any case.

## How a product becomes additions (csda_e, csda_o, ecat)

Each coefficient c is recoded at elaboration into its non-adjacent CSD form,
c = Σ_j d_j 2^j with d_j ∈ {−1, 0, +1}. For an output Z = Σ_i c_i·v_i this gives

```
Z = Σ_j 2^j · y_j,     y_j = Σ_i d_{i,j} · v_i
```

The CSDA units output the y_j: one partial sum per output and per digit
position (`NDIG` = 7 positions, enough for the largest coefficient, 63). An
`ecat` tree then shifts and adds them.

The sharing is in how y_j is formed:

- **Z0 and Z4.** The input combinations A0+A1 and A0−A1 are built once. Each
  digit of c4 only selects +, − or 0 of them.
- **Z2 and Z6.** B0, B1, B0+B1 and B0−B1 are built once. Each digit position
  of the pair (c2, c6) selects one of them with a sign. For example, digits
  (+1, +1) select B0+B1, and (+1, −1) select B0−B1.
- **Odd half.** b0±b1 and b2±b3 are built once. Each digit position of each
  row selects one term per pair and adds the two.

The digit tables for all modes are constants, derived from the coefficient
values by `mst_pkg::csd_digit`. The runtime mode only indexes them. Synthesis
therefore sees multiplexers over a few shared adders, not multipliers. To add
or change a standard, edit `mst_pkg::coef` and `mst_pkg::out_shift`; the
digit tables follow automatically.

Partial sums carry three bits more than their inputs, so the negation of the
most negative sum cannot overflow.

## Four-point transforms at full rate

In a 4-point mode the eight lanes carry two independent 4-sample vectors:

- `sbf` bypasses its butterfly. Lanes 0..3 go to the even half as `a`, and
  lanes 4..7 go to the odd half as `b`.
- `csda_e` computes the 4-point transform of `a` with the same structure as
  before.
- `csda_o` switches its matrix from `Co` to `Ce` (the digit selects change) and
  computes the 4-point transform of `b`.
- `perm` regroups the outputs. In an 8-point mode T = Z. In a 4-point mode
  T0..T3 = Z0, Z2, Z4, Z6 (first vector) and T4..T7 = Z1, Z3, Z5, Z7 (second
  vector).

So a 4-point transform also runs at eight samples per clock.

## Coefficients and scaling

| mode | c1 | c2 | c3 | c4 | c5 | c6 | c7 | shift |
|---|---|---|---|---|---|---|---|---|
| MPEG-1/2/4 8-pt | 63 | 59 | 53 | 45 | 36 | 24 | 12 | 6 |
| H.264 8-pt | 12 | 8 | 10 | 8 | 6 | 4 | 3 | 3 |
| H.264 4-pt | – | 2 | – | 1 | – | 1 | – | 0 |
| VC-1 8-pt | 16 | 16 | 15 | 12 | 9 | 6 | 4 | 4 |
| VC-1 4-pt | – | 22 | – | 17 | – | 10 | – | 4 |

The H.264 and VC-1 values are the integer matrices of those standards. The
MPEG values are round(64·cos(kπ/16)), a 6-bit fractional approximation of the
DCT basis; that precision is a choice of this implementation.

As is usual for these cores, the normalisation of each standard is left to
the quantiser. Each adder tree only divides by 2^shift, so that the results
fit the next word length:

- Core-1 maps 9-bit residuals to 12 bits, the TMEM word.
- Core-2 maps 12 bits to 16 bits.

Before the shift, the tree adds half an output LSB. This rounds half up,
instead of truncating, and is the error compensation of the tree. A result
outside the output range saturates. With the shifts above this cannot happen
for any 9-bit input, but the guard is cheap.

## Transpose memory (tmem)

The TMEM holds one 8x8 tile in 64 twelve-bit registers and still runs at full
rate. It does this by flipping its access orientation every tile:

1. Tile n is written row by row: input vector k goes into row k.
2. In the eight cycles after its last row, tile n is read column by column.
   In the same cycles, tile n+1 is written column by column, each vector into
   the column just read. A register that is read and overwritten in the same
   cycle delivers its old value.
3. Tile n+1 is then read row by row, while tile n+2 is written row by row.
   And so on.

Reading always starts the cycle after a tile's last write and never pauses.
The input may pause. An assertion checks that a write never overtakes the
read. The column-pass mode of a tile is latched with its last row.

## Tiles, modes and timing at the top

- **Tile.** Eight consecutive `in_valid` rows of eight 9-bit residuals form a
  tile. The first row after reset starts a tile, and every eighth valid row
  ends one.
- **`in_type`** (`mst_pkg::xform_e`) selects MPEG 8x8, H.264 8x8 or 4x4, or
  VC-1 8x8, 8x4, 4x8 or 4x4. It must stay the same for all rows of a tile.
  Each core takes its own 1-D mode from it (`row_mode`, `col_mode`). Sizes are
  width x height: VC-1 8x4 means 8-point rows and 4-point columns.
- **Small blocks are packed.** A 4-wide block sits in lanes 0..3 or 4..7, and
  a 4-high block in rows 0..3 or 4..7. An 8x4 or 4x8 tile holds two blocks,
  and a 4x4 tile holds four.
- **Output.** Output vector k is column k of the 2-D result. For 4-high
  blocks, `out_data[0..3]` belongs to the upper block and `out_data[4..7]` to
  the lower one. `out_mode` gives the column-pass mode.
- **Latency.** Each core has two register stages: one after the CSDA units,
  one after the trees and the permutation. When rows arrive back to back, a
  tile's first output column appears 12 cycles after its first row (5 cycles
  after its last row). The eight columns follow on consecutive cycles.
- **Throughput.** Tiles may follow each other with no gap, so the core
  sustains 8 pixels per clock. At 160 MHz that is 1.28 G pixels/s. A
  4928x2048 picture at 24 frames/s needs 242 M pixels/s, so 30.3 MHz would
  already suffice.
- **Reset and handshake.** Reset is asynchronous and active low, and clears
  every register. There is no back-pressure.

## Where this implementation makes its own choices

The published CSDA-MST architecture fixes the block structure (selected
butterfly, even and odd CSDA, eight error-compensated adder trees,
permutation, two 1-D cores around a 64 x 12-bit TMEM), the 8-point and
4-point decompositions, the permutation, and the eight-paths-per-clock rate.
Everything below was chosen here:

- **Sharing pattern.** The published design chooses specific shared factors
  per coefficient. Here each coefficient is in plain CSD form, and the sharing
  is the set of input combinations listed above. The results are the same,
  but the adder count is not tuned to match the published figure.
- **Coefficients.** The coefficient values, the MPEG precision, and the
  per-mode output shifts are listed in the table above.
- **Error compensation.** The trees round half up and saturate.
- **Word lengths.** The input is 9 bits, the Core-2 output is 16 bits, and the
  internal widths follow from these. The 12-bit TMEM word is given by the
  architecture.
- **TMEM schedule.** The TMEM uses the orientation-flipping schedule.
- **Interface.** The top uses tile packing for small blocks, outputs columns,
  has two pipeline stages per core, and uses a valid-only handshake.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.
`tb/mst_ref_pkg.sv` is the reference model. It writes out the H.264 and VC-1
matrices in full, computes the MPEG matrix with `$cos`, and rounds the same
way as the hardware.

| testbench | what it checks |
|---|---|
| `sbf_tb` | butterfly and bypass, all modes, extreme inputs |
| `csda_e_tb`, `csda_o_tb` | Σ y_j·2^j equals the exact matrix rows, all modes |
| `ecat_tb` | rounding per mode, saturation reached |
| `perm_tb` | both orderings |
| `mst_core_1d_tb` | Core-1 and Core-2 word lengths, mode changing every cycle, idle cycles, 2-cycle latency |
| `tmem_tb` | 200 tiles, back to back and with pauses, both orientations, start one cycle after the last write |
| `mst_2d_tb` | 140 tiles through the top at default sizes; see below |
| `mst_cinema_tb` | a full 4928x2048 frame (157,696 tiles) streamed back to back |

`mst_2d_tb` runs every transform type, with mode switches and pauses. It
checks every coefficient, the 12-cycle latency, and eight coefficients per
output cycle. It fails if any of these never occurred: a transform type, a
4-point row or column pass, a mode switch, back-to-back tiles, or a paused
input.

`mst_cinema_tb` rotates the transform type from one tile stripe to the next
and checks every coefficient. The frame takes 1,261,580 clocks: 8 clocks per
tile plus the 12-cycle latency, which is exactly 8 pixels per clock. At
24 frames/s that needs a 30.3 MHz clock.

To run one with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mst_pkg.sv tb/mst_ref_pkg.sv rtl/sbf.sv rtl/csda_e.sv rtl/csda_o.sv \
  rtl/ecat.sv rtl/perm.sv rtl/mst_core_1d.sv rtl/tmem.sv rtl/mst_2d.sv \
  tb/mst_2d_tb.sv --top-module mst_2d_tb
./obj_dir/Vmst_2d_tb
```

For another testbench, change `--top-module` and the testbench file. Each
simulation takes under a second, except the full frame, which takes a few
seconds.

## Limits

- The core computes only the forward transform. Inverse transforms are not
  part of this design.
- No gate count, clock rate or power figure has been measured for this RTL.
  The rate quoted above is the clock rate of the published design, not a
  result of this code.
- Tile alignment depends only on counting valid rows from reset. There is no
  start-of-tile signal to resynchronise a stream that loses a row.
