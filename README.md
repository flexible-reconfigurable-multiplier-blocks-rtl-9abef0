# MFAB: cascadable 8x8 multiplier blocks for FPGA fabrics

Multiplying in the general logic of an FPGA is slow and costs much area, mostly
because the partial products have to travel through programmable routing. The
MFAB (modified flexible array block) is a hard 8x8 multiplier tile meant to be
placed in an FPGA fabric. Its key property is that tiles placed next to each
other join up through short, fixed wires: a rectangle of m by n tiles behaves as
one 8m x 8n multiplier, with signed (two's complement) or unsigned operands.
Only the operands, an 8-bit addend and the result go through the programmable
routing: A7:0, B7:0, Σ7:0 and Q15:0, 40 signals per tile. On its own a tile
computes

    Q = A * B + Σ

which gives multiply-accumulate and FIR-filter taps without extra logic.

Inside, a tile uses radix-4 recoding of the multiplier (overlapped
multiple-bit scanning, often called modified Booth). Each group of
multiplier bits selects 0, ±A or ±2A, so 8 multiplier bits need only 4
partial-product rows. The rows are summed in a carry-save array, and that
array carries on across tile borders.

This repository holds synthesizable SystemVerilog for the tile and for a
rectangular fabric of tiles, with self-checking testbenches. Everything is
combinational: there are no clocks or registers.

## The tile

A tile has four parts:

| part | module | what it does |
|---|---|---|
| digit decoders | `mfab_booth_dec` | one per digit row; turns {b(2k+1), b(2k), b(2k-1)} into select lines `one`, `two`, `neg` |
| reduction array | `mfab_array` | 8 x 4 units that form the partial-product bits and add them in carry-save form, plus a layer for Σ |
| extra units | `mfab_array`, `mfab` | sign handling, used only on the MSB edges of a multiplier |
| final adders | `mfab_csel_adder` | two 8-bit carry-select adders: the low adder and the high adder |

Six configuration bits place a tile inside a larger multiplier:

| bit | high when |
|---|---|
| `ma` | A7 of this tile is the sign bit of a signed multiplicand |
| `mb` | B7 of this tile is the sign bit of a signed multiplier |
| `cl` | a tile holding lower multiplicand bits sits to the left |
| `cr` | a tile holding higher multiplicand bits sits to the right |
| `ct` | a tile holding lower multiplier bits sits above |
| `cb` | a tile holding higher multiplier bits sits below |

A lone 8x8 multiplier has `cl = cr = ct = cb = 0`. `ma` and `mb` choose the
signedness of A and B. They matter only on the tiles that hold the top bits
of A (`cr = 0`) or of B (`cb = 0`). When an edge bit is low, the tile ignores
every link input on that side, so unrelated multipliers can sit next to each
other.

## Tiling larger multipliers

The multiplicand A runs left to right: column 0 holds A7:0, column 1 holds
A15:8, and so on. The multiplier B runs top to bottom. Each tile gets its own
copy of its A slice and its B slice from the routing. Every tile of column
i therefore gets the same A slice, and every tile of row j the same B slice.
Tile (row j, column i) adds its Σ at weight 2^(8(i+j)). Σ is read as an
unsigned number.

The m + n bytes of the product come out along two edges:

* **low adder, left column** (`cl = 0`): the tile in row j gives product bits
  8j..8j+7 on `Q[7:0]`;
* **high adder, bottom row** (`cb = 0`): the tile in column i gives product
  bits 8(n+i)..8(n+i)+7 on `Q[15:8]`.

Halves of Q that a tile does not produce are driven to zero. The result is
A·B plus every tile's Σ at its weight, modulo 2^(8(m+n)). Example: a 16x16 multiplier from 2 x 2 tiles.

| tile (row, col) | cl cr ct cb | A slice | B slice | Q[7:0] | Q[15:8] |
|---|---|---|---|---|---|
| (0,0) | 0 1 0 1 | A7:0 | B7:0 | P7:0 | – |
| (0,1) | 1 0 0 1 | A15:8 | B7:0 | – | – |
| (1,0) | 0 1 1 0 | A7:0 | B15:8 | P15:8 | P23:16 |
| (1,1) | 1 0 1 0 | A15:8 | B15:8 | – | P31:24 |

`ma` is set on (0,1) and (1,1) for a signed A. `mb` is set on (1,0) and (1,1)
for a signed B.

`mfab_fabric` is an M x N rectangle of tiles with every neighbour link wired.
Its defaults are M = N = 2, the 16x16 arrangement. Its ports are the
per-tile `cfg`, `a`, `b`, `sigma` and `q`, indexed `[row][column]`. The same
fabric can be set up as one 16x16, two 16x8, two 8x16 or four 8x8
multipliers just by changing `cfg`.

## How the carry-save array crosses tile borders

This is the part that takes the most thought.

**Row frames.** Digit row k of the whole multiplier is the multiplicand times
digit d_k, shifted left by 2k. In tile column i, unit p of row k has weight
2^(8i + 2k + p). The array keeps a sum bit s[p] and a carry bit c[p] per
position, in the frame of the row it has just added. A tile runs five layers
of full adders:

1. a **Σ layer**, in the frame of the tile's first digit row. It adds Σ to the
   state arriving from the tile above.
2. four **digit layers**. Each one adds one partial-product row. Unit p
   selects A[p] (for ±1) or A[p-1] (for ±2) and inverts the bit when the digit
   is negative. A[-1] is A7 of the left neighbour.

**Shifts.** Before the Σ layer, and before each later digit layer, the frame
moves up two positions:

* positions 0 and 1 of the state leave to the left neighbour (`xl_out`);
* positions 6 and 7 are filled from the right neighbour (`xr_in`);
* the carry out of unit 7 of each layer goes right (`cy_out` → `cy_in`), where
  it fills carry slot 0 of that layer's result.

After its last digit layer, a tile passes its whole state down (`s_bot`,
`c_bot` → `s_top`, `c_top`). The lowest digit of a tile borrows B7 of the tile
above as its overlap bit (`b_msb` → `b_top_msb`).

No link makes a real combinational loop: layer l of a tile depends only on
layer l-1 of its neighbours. Some lint tools treat each link vector as a
single net and report a loop anyway; that report can be ignored.

**Left edge: low adder.** In the leftmost column, the bits that would leave
to the left are finished product bits, in carry-save form. Each digit row
gives two positions. Four rows give 8 sum bits and 8 carry bits. The low
adder adds them, with the carry from the low adder above. Carry slot 0 of each
digit layer, which has no left neighbour here, takes the +1 that completes a
negative digit's two's complement.

**Right edge: extra units and sign extension.** With A extended by one bit
(A7 for signed, 0 for unsigned), each row is an (8m+2)-bit two's-complement
number. Its sign s sits at position 9 of the rightmost tile. Rather than
extend the sign across the whole product, the rightmost tile adds:

* position 8: the extended multiplicand bit;
* position 9: the inverted sign, ~s;
* position 10: a constant 1.

The top-right tile of the multiplier also adds one more 1 at position 9, in its
Σ layer. Modulo 2^(8(m+n)) these constants add up to exactly the missing sign
extensions. The rightmost tile keeps these extra positions (state bits 8..12)
and passes them down with the rest of the state. In other columns, bits 8..12
are unused.

**Bottom edge: high adder.** After the last digit row, the state's positions
2..9 in each bottom tile are the upper product bits, still in carry-save form.
For a signed B the recoding is complete. For an unsigned B one more digit
exists, equal to B7 (0 or +1). Instead of a fifth array row, its partial
product B7·A is added as a third operand, in a row of full adders in front of
the high adder. The carry of that row and the high adder's carry both run to
the right. In the bottom-left tile, the extra row's carry slot 0 takes the
carry out of the low-adder chain. That is how the two chains join.

**Depth.** A multiplier n tiles tall has 5n full-adder layers in its array.
Then come the extra row and the two carry chains: down the left column and
across the bottom row. Each chain passes through one 8-bit carry-select adder
per tile.

## Relation to the published MFAB

These points follow the published description:

* the 8x8 tile built from radix-4 digit decoders, an 8 x 4 reduction array,
  edge-only extra units and two final adders;
* the six configuration bits and their meanings;
* the summing input Σ;
* carry-select final adders;
* dedicated links to the four neighbours;
* 8m x 8n signed/unsigned tiling;
* the 16x16 example built from four tiles.

These are this design's own choices:

* the bit-level organisation of the array;
* all link signals (`xl_out`/`xr_in`, `cy_*`, `s_/c_top/bot`, the adder carries);
* the ~s/constant-1 sign-extension scheme;
* adding the unsigned-multiplier digit in front of the high adder;
* the separate Σ layer;
* Σ treated as unsigned;
* zeroing the unused Q halves;
* the carry-select split point (half the width).

Two places depart from, or settle, the published description:

* **Which operand is decoded.** One sentence says the decoders scan bits of
  the multiplicand, while the configuration-bit definitions call A the
  multiplicand and B the multiplier. Here B is recoded and A is multiplied,
  matching the configuration bits.
* **Where the second adder sits.** The description puts the second final
  adder beside the multiplicand-MSB side. Here it is used on the
  multiplier-MSB edge (`cb = 0`), because that is where this array's final
  carry-save state leaves. The first adder is on the multiplicand-LSB edge,
  as described.

Not provided:

* the FPGA's programmable routing and its configuration memory (here, the
  fabric's ports stand in for them);
* any accumulator register for MAC use; that would sit in the surrounding
  fabric.

The published transistor counts and full-adder delays are not reproduced or
checked.

## Files

| file | contents |
|---|---|
| `rtl/mfab_pkg.sv` | sizes, configuration struct `mfab_cfg_t`, digit struct `booth_t`, link struct `xfer_t` |
| `rtl/mfab_booth_dec.sv` | radix-4 digit decoder |
| `rtl/mfab_array.sv` | reduction array and right-edge extra units |
| `rtl/mfab_csel_adder.sv` | carry-select adder (`W`, `SPLIT`) |
| `rtl/mfab.sv` | one tile |
| `rtl/mfab_fabric.sv` | M x N fabric (top level) |
| `tb/tb_mfab_booth_dec.sv` | all 8 decoder inputs |
| `tb/tb_mfab_csel_adder.sv` | all 8-bit inputs, random 12-bit |
| `tb/tb_mfab_array.sv` | all A, B; weighted sum of the carry-save outputs |
| `tb/tb_mfab.sv` | lone tile: all A, B in all four sign modes, random Σ; ignores idle links |
| `tb/mfab_fabric_tester.sv` | reusable stimulus/checker for a fabric of any size |
| `tb/tb_mfab_fabric.sv` | default 2x2 fabric: 16x16, 2 x 16x8, 2 x 8x16, 4 x 8x8, all sign modes, Σ |
| `tb/tb_mfab_fabric_sizes.sv` | 4x4 (32x32), 8x8 (64x64) and 3x2 (24x16) fabrics |

## Simulating

The testbenches use plain Verilator 5 and print one line of the form
`TB_RESULT checks=N failures=F`. For example, the end-to-end test:

    verilator --binary --timing --assert -Wno-UNOPTFLAT -Irtl -Itb \
      rtl/mfab_pkg.sv rtl/mfab_booth_dec.sv rtl/mfab_csel_adder.sv \
      rtl/mfab_array.sv rtl/mfab.sv rtl/mfab_fabric.sv \
      tb/mfab_fabric_tester.sv tb/tb_mfab_fabric.sv \
      --top-module tb_mfab_fabric
    ./obj_dir/Vtb_mfab_fabric

For the other tests, swap in their files and top module. Each test finishes
in well under a minute.

To try another fabric size, instantiate `mfab_fabric #(.M(..), .N(..))` with
an `mfab_fabric_tester` of the same size, as `tb_mfab_fabric_sizes` does.

## How far it has been checked

Every product is compared against wide integer arithmetic in the testbench:

* the lone tile exhaustively over A and B in all four signed/unsigned modes;
* the fabrics with random and extreme operands (0, all ones, most
  negative, most positive);
* tile shapes 8x8 up to 64x64, including uneven ones.

The tester counts how often each mechanism ran and fails if one never did:

* each tiling;
* each sign mode;
* a negative signed multiplicand;
* an unsigned multiplier with its top bit set;
* a non-zero Σ.

Each testbench was also run against a deliberately broken copy of its module
and failed, as it should.

Not checked:

* timing or area of any kind;
* fabrics where unrelated multipliers are placed in irregular (not
  grid-aligned) patterns. The edge-bit masking that makes those work is
  exercised only by the regular tilings above and by the lone-tile test,
  which drives random values on every link.
