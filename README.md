# Tile-based address mapper with power-of-two tiles

A two-dimensional W x H data array is normally stored row-major: element
(x, y) lives at address `W*y + x`. Storing it in rectangular m x n tiles
instead, one tile per memory row, keeps neighbouring elements in the same
memory row and cuts row switching in the memory. The price would normally be a
more complicated address calculation. This design shows that there is no price
when the tile height n is a power of two, as it always is when a tile has to
fill one memory row of 2^k words. The tiled mapping then reduces to **one
multiplication by a constant and one addition**, the same hardware as
row-major. The tiled mapper also feeds the multiplier with a less active
operand, so it should switch less than a row-major mapper.

The RTL is an address generator for one array. A symbolic address
generator steps through array indices (x, y). A symbolic-to-physical
converter turns each pair into a linear memory address, which is split into a
memory row and column.

Default configuration: 90 x 90 array, 8 x 4 tiles (m = 8 wide, n = 4 high),
memory of 256 rows x 32 words. This gives 7-bit indices and a 13-bit address.

## The mapping

Tiles are ordered row-major across the array. Inside a tile, words are
ordered column-major: down a tile column of n words, then on to the next
column. This is one of the four "4D" tiled layouts. For an element (x, y) the
address is the sum of four counts:

```
f_rc(x,y) = (y - y mod n)*W        all complete tile rows above
          + (x - x mod m)*n        complete tiles to the left, same tile row
          + (x mod m)*n            complete columns to the left, same tile
          + (y mod n)              words above, same column
```

The two middle terms add up to `x*n`, so

```
f_rc(x,y) = W*(y - y mod n) + x*n + (y mod n)
```

(m drops out; it only has to satisfy m*n = words per memory row).

With n = 2^k:

* `y mod n` is the low k bits of y;
* `y - y mod n` is y with the low k bits cleared;
* `x*n + y mod n` is the bit concatenation `{x, y[k-1:0]}`. No adder is needed,
  because the shifted x has zeros where y's low bits go.

What remains is `W * {y[hi:k], k'b0}  +  {x, y[k-1:0]}`. That is one constant
multiplier and one adder. Row-major `W*y + x` needs the same two units.

Worked values for the default 90 x 90 array:

| (x, y)  | address | why                                              |
|---------|---------|--------------------------------------------------|
| (0, 1)  | 1       | next word down the first tile column             |
| (1, 0)  | 4       | next tile column; a column holds n = 4 words     |
| (0, 4)  | 360     | first word of the second tile row: 90*4          |
| (89,87) | 7919    | last tiled word: 90*84 + 89*4 + 3 = 90*88 - 1     |
| (0, 88) | 7920    | first word of the leftover rows                  |
| (89,89) | 8099    | last word: 90*90 - 1                             |

## The leftover rows and the region detector

When H is not a multiple of n, the bottom `H mod n` rows do not fill a tile
row. The array is split at `H' = H - (H mod n)`:

* region one, `y < H'`: tiled, using the equation above;
* region two, `y >= H'`: row-major, `W*y + x`.

Region one ends at address `W*H' - 1` and region two starts at `W*H'`, so
the whole array covers `0 .. W*H-1` with no gaps. The testbenches check this.

Both regions use a multiply by W and an add, so the converter shares one
multiplier and one adder between them through two 2:1 multiplexors:

```
              sel=0 (tiled)            sel=1 (row-major)
adder in      {x, y[1:0]}    (9 b)     {2'b00, x}   (9 b)
mult  in      {y[6:2], 2'b00} (7 b)    y            (7 b)
addr = W * (mult in) + (adder in)      13 bits
```

(bit positions for n = 4 and 7-bit indices).

The select signal `y >= H'` needs no comparator. H' is a multiple of n.
Every y in region two lies in `H' .. H'+n-1`, so with its low k bits cleared it
equals H'. Within the legal range `0 <= y < H`, this is the same as asking
whether y has a 1 in every upper-bit position where H' has a 1:

* a bit-wise superset of H' is never smaller than H';
* no y < H' is a superset of H'.

So the detector is one AND gate over a few bits of y. For H = 90,
H' = 88 = `1011000b`, and the select is `y[6] & y[4] & y[3]`. For a 75-high
array, H' = 72 = `1001000b`, and rows 72, 73 and 74 (`10010xx`) all give
`y[6] & y[3] = 1`. `region_detect` builds the mask from H' at elaboration
time. When `H mod n = 0` there is no region two. The converter then leaves
out the multiplexors and the detector and uses the narrower datapath described
under "Adder pruning" below.

The detector is only correct for `y < H`. Outside that range the address is
undefined.

## Modules

| file | what it is |
|---|---|
| `rtl/tile_map_pkg.sv` | default sizes and `region_e` (`REGION_TILED`, `REGION_ROW_MAJOR`) |
| `rtl/tile_addr_mapper_top.sv` | top: generator followed by converter, with the address also split into row and column |
| `rtl/sym_addr_gen.sv` | symbolic address generator: registered (x, y), raster order |
| `rtl/addr_converter.sv` | symbolic-to-physical converter: the shared datapath above |
| `rtl/region_detect.sv` | the AND-gate region-two detector |
| `rtl/const_mult.sv` | multiply by a constant (shift-and-add over the 1-bits of the constant) |
| `rtl/rc_adder.sv` | ripple-carry adder written as a full-adder chain |

### Top-level interface (`tile_addr_mapper_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high; restarts at (0, 0); has priority over `next` |
| `next` | in | 1 | step to the next element at the rising edge |
| `x`, `y` | out | 7, 7 | current indices (registers) |
| `last` | out | 1 | current element is (W-1, H-1) |
| `phys_addr` | out | 13 | physical address of (x, y) |
| `mem_row` | out | 8 | `phys_addr[12:5]`, the memory row |
| `mem_col` | out | 5 | `phys_addr[4:0]`, the memory column |
| `region_row_major` | out | 1 | (x, y) lies in the leftover row-major rows |

Timing: x and y change at a clock edge when `next` is high. The address
outputs are combinational from x and y and are valid in the same cycle, after
the multiplier and adder delay. There is no output register and no pipeline.
The memory is not part of the design; connect it to `mem_row` and `mem_col`.

### Parameters

`W`, `H` (array size), `M`, `N` (tile size), `P`, `Q` (memory rows and words per
row) on the top and the converter. Index and address widths are derived with
`$clog2`. Elaboration stops with an error unless all of these hold:

* N is a power of two;
* `M*N = Q` (a tile is one memory row);
* `W*H <= P*Q`.

The mapper is built for one array size. W is built into the multiplier, and
H' is built into the detector. A second array with different dimensions needs
its own instance.

## What is and is not implemented

* **Converter, detector, multiplier, adder:** complete. For the default size
  and for 80 x 80, 75 x 75 and square sizes up to 500 x 500, they were checked
  exhaustively against the unsimplified four-term equation.
* **Symbolic address generator:** the interface (`next`, `reset`, indices out)
  is complete. It only produces a raster scan. Real applications drive the
  converter from their own loop-nest address unit. Replace `sym_addr_gen`, or
  drive `addr_converter` directly, to use another access order.
* **Other tile orders:** only the row-major-tiles / column-major-inside
  ordering (f_rc) is built. The same power-of-two reduction applies to the
  other three 4D orderings, but their handling of leftover rows and columns
  is not worked out here.
* **Memory:** not included.
* **Tile alignment:** when W is not a multiple of m, the last tile in each tile
  row is narrower than m. Tiles in later tile rows then start part-way into a
  memory row. For 90 x 90, the second tile row starts at address 360, which is
  word 8 of memory row 11. This follows from the mapping equation itself.
  Choose W as a multiple of m if every tile must sit in exactly one memory row.
* **Adder pruning:** when `H mod n = 0`, the converter multiplies only the
  upper bits of y, sends `y mod n` straight to the address LSBs, and uses an
  adder k bits narrower. When H is not a multiple of n, the shared datapath
  needs the full-width operands for the row-major rows, so no stages are
  removed there.

## Simulation

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. The package has to
be read first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tile_map_pkg.sv \
    tb/tile_addr_mapper_top_tb.sv --top-module tile_addr_mapper_top_tb -Mdir obj
./obj/Vtile_addr_mapper_top_tb
```

| testbench | what it checks |
|---|---|
| `tile_addr_mapper_top_tb` | Runs the top at default size. Three passes over all 8100 elements, with random `next` gaps and a reset in mid-pass. Checks indices, address, row/column split and region every cycle. Checks every address is used exactly once per pass. Counts tiled and row-major conversions, tile-row crossings, wraps, hold cycles and resets. |
| `addr_converter_tb` | All index pairs of 90 x 90, 80 x 80 (no leftover rows) and 75 x 75. Also checks bijectivity and the hand-worked addresses above. |
| `addr_converter_sizes_tb` | K x K for K = 10, 64, 75, 127, 255, 500, each with a memory just large enough (up to an 18-bit address). |
| `region_detect_tb` | Every y for H = 90, 75, 80; the 72/73/74 rows of the 75-high array. |
| `sym_addr_gen_tb` | Random stepping, hold, reset priority, wrap after exactly W*H steps, `last`. |
| `const_mult_tb`, `rc_adder_tb` | Exhaustive or random comparison with `*` and `+`. |

The testbenches run in well under a second each.

## Why the tiled mapper should switch less

In the tiled region, the multiplier sees y with its low k bits held at zero.
A scan that moves through a tile changes mostly those low bits of y. They
bypass the multiplier and enter the adder directly, in its k lowest
positions. x moves k positions up in the adder, away from the low stages. In
a ripple-carry adder, activity in the low bits costs the most, because carries
propagate upwards through the stages above. So when x changes more often than
y's low bits, shifting x upwards lowers the adder's activity as well.
This RTL has no power measurement
of its own. The effect depends on the access sequence, and only a raster
sequence is built here.
