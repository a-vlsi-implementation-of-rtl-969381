# 16 x 16 two-dimensional DCT built from Booth multiply-accumulate cells

This is synthesizable SystemVerilog for a streaming two-dimensional Discrete Cosine Transform
(DCT) engine for image compression. It takes 16 x 16 pixel blocks, one pixel per clock, and
returns the 256 transform coefficients of each block, one per clock, with no gaps between
blocks.

The main idea is brute-force parallelism with very regular hardware. The 2D DCT is split into
two 1D DCTs: one over the rows, then one over the columns of the row results. Each 1D pass uses
16 multiply-accumulate (MAC) cells that run side by side. MAC `u` computes frequency `u`. It
takes one product per clock, so a 16-point transform finishes every 16 clocks. That keeps pace
with a pixel stream of one word per clock.

Each MAC is a 16 x 16-bit radix-4 (modified Booth) multiplier array in carry-save form,
followed by a 32-bit conditional sum adder. The accumulator feeds back into the top row of the
array, so the multiply and the accumulate share one pass through the array and one final add.

## The transform and its number format

For N = 16 the one-dimensional DCT is

    C(u) = (2 m(u) / N) * sum_{j=0..15} a[j] cos((2j+1) u pi / 32),   m(0) = 1/sqrt(2), m(u>0) = 1

The 2D transform applies it to every row, then to every column of the result:

    Y(q,p) = (4 m(q) m(p) / 256) * sum_r sum_c x[r][c] cos((2r+1) q pi / 32) cos((2c+1) p pi / 32)

The 2D transform is computed from 16-bit integer words in these steps:

| quantity | format |
|---|---|
| pixel `in_data` | signed 16-bit integer; values in -256..255 cannot overflow |
| coefficient b(u,j) | `round(2^15 * m(u) * cos((2j+1) u pi / 32))`: the scaled cosine `2 m(u)/N * cos` with 18 fraction bits; fits a signed 16-bit word (largest magnitude 32610) |
| MAC result | 32-bit two's complement, wraps modulo 2^32 |
| row result (in the transposition memory) | MAC result `>>> 15`, low 16 bits: 3 fraction bits |
| output `out_data` | MAC result `>>> 17`, low 16 bits: `16 * Y(q,p)` (4 fraction bits) |

Both shifts truncate; they do not round. Compared with the exact transform, the error on
random 9-bit data is below 0.2 in `Y`. The shifts are the top-level parameters `ROW_SHIFT` and
`COL_SHIFT`. The coefficients are generated at elaboration from a 17-entry quarter-wave table,
`COS_Q15[k] = round(2^15 cos(k pi / 32))`, and the symmetries of the cosine (`dct_pkg`).

## Dataflow

    in_data --> row MAC set (16 MACs + 16 ROMs) --16 words / 16 clk--> transposition memory
                                                                          | 1 word / clk
    out_data <-- output shift register <--16 words / 16 clk-- column MAC set (16 MACs + 16 ROMs)

* **Row MAC set** (`mac_set`). Every MAC sees the same pixel. MAC `u` multiplies it by
  `b(u, c)`, where `c` is the pixel's column, taken from its own ROM (`coef_rom`, 16 words of
  16 bits = 256 bits). After the 16th pixel of a row, the 16 MACs hold the row's 16 DCT outputs.
  On that same clock they are written in parallel into the transposition memory. The next
  row's first pixel restarts the accumulations (`clr`).
* **Transposition memory** (`transpose_mem`): 16 x 16 words. See the next section.
* **Column MAC set**: the same module as the row set. It receives one word per clock: for
  row frequency `p`, the 16 row results `X[0][p] .. X[15][p]`. After 16 clocks MAC `q` holds
  `Y(q,p)`.
* **Output shift register** (`piso_shift_reg`). It takes the 16 column results in parallel
  and shifts them out one per clock. It is reloaded on the clock that sends its last word, so
  the output never pauses.

Output order inside a block is column by column: `Y(0,0), Y(1,0) ... Y(15,0), Y(0,1) ...`.
Here `q` is the vertical frequency (the column pass) and `p` the horizontal one (the row pass).
`out_sob` marks `Y(0,0)`.

## One memory for two blocks

While the column set reads block *k* from the transposition memory, the row set is already
writing block *k+1* into it. A 16 x 16 array can do both because the storage orientation
alternates from block to block:

* Block *k* was stored as rows: `mem[r][p] = X[r][p]`. The column set reads it one column at a
  time, column `p` during clocks `16p .. 16p+15` of block *k+1*.
* Block *k+1* is stored as columns: row `r` of its results goes to `mem[.][r]`, on the last
  clock of input row `r`, which is clock `16r + 15`.

So column `p` is overwritten on exactly the clock that reads its last word. The read is
combinational and the write lands at the clock edge, so the old word is read first, and no
column is overwritten before it has been read. For block *k+2* the roles swap: the block is
stored as rows again and read row by row. The top keeps one orientation bit. It toggles at
every block boundary, and the read side always uses its inverse.

## Control and timing

`dct2d_top` holds the control: an 8-bit pixel counter `{row, column}`, the orientation bit, a
flag that is set once the first block is stored, and a one-word read register between the
memory and the column set. All of this advances only on clocks with `in_valid` high. A low
`in_valid` stalls the whole pipeline, and all state holds.

* Rate: one block per 256 accepted pixels.
* Latency: the first coefficient of a block is registered on the clock edge that accepts the
  274th pixel counted from that block's first pixel. That is 256 clocks for the row pass, 1
  for the read register, 16 for the first column, and 1 for the output register. With a
  continuous stream the output is then valid on every clock.
* Because the pipeline moves only with the input, the last block comes out only while the
  next block (or 274 pixels of anything) streams in.
* `rst` is synchronous and active high. It clears the counters, the accumulators and the
  valid flags. The contents of the memory are not cleared and are never used before they
  are written.

## Inside a MAC

`booth_mac` computes `c[i] = a[i] * b[i] + c[i-1]`, with `c[-1] = 0` when `clr` is high.
It uses three parts:

1. **Recoding** (`booth_recoder`). The coefficient `b` is split into 8 overlapping bit
   triples `b[2i+1], b[2i], b[2i-1]`. Each triple gives a digit in -2..+2, carried as the
   select lines `one`, `two` and `neg`. This halves the number of partial-product rows from
   16 to 8.
2. **Carry-save array** (`booth_mult_array`, built from `mult_cell`). Row `i` is shifted two
   columns left of row `i-1` and spans columns `2i..31`, which gives a trapezoid. Each cell
   does the following:
   * It picks `A_j` (digit ±1), `A_(j-1)` (digit ±2) or 0, and inverts the pick for a
     negative digit.
   * It adds that bit to the sum from the cell above and the carry from the cell above-right.
   * Top-row cells are half adders. Their second input is the matching bit of the
     accumulator, which is how the accumulate enters.
   * Cells above the top of the multiplicand get its sign bit, which sign-extends each row to
     bit 31.
   * The +1 that completes the two's complement of a negative row goes into the carry
     vector at that row's lowest column. No carry ever reaches that slot.
   * When a column's last row is done, its sum and pending carry go to the two output
     vectors.
3. **Final adder** (`cond_sum_adder`). First, each bit's sum and carry are worked out for
   both possible carry-ins. Five levels of 2:1 multiplexers then merge groups of 1, 2, 4, 8
   and 16 bits, so the critical path is one multiplexer per level.

The result is loaded into the accumulator register on every enabled clock. `c_next`, the
value it is about to take, is brought out so that the finished inner product can be used on
the clock of the last term.

## Departures and choices

Taken from the design: the block size, the 16-bit operands and 32-bit accumulation, the
two sets of 16 MACs with one 256-bit ROM each, one MAC operation per clock, radix-4 Booth
recoding with half adders in the top row and full adders below, a carry-save array, a 32-bit
conditional sum adder, a 16 x 16 transposition memory and a word-serial output shift register.

Choices made here, where the design gives only the function:

* The number scaling, the truncation and the output order.
* The `in_valid` stall, `out_valid`/`out_sob`, and the synchronous reset.
* The alternating-orientation use of the single transposition memory.
* Where the accumulate operand and the Booth "+1" bits enter the array.
* The exact gate-level content of the recoder, the multiplier cell and the adder.

Left out because they are circuit or layout matters with no logic of their own: the two
transistor-level variants of the multiplier cell (they are logically identical, and one RTL
cell stands for both), transistor sizing, the physical arrangement of each MAC set (4 x 4 or
8 x 2), pads, pad and clock drivers, and power distribution. Timing figures for a
transistor-level circuit (about 29 ns through a MAC, hence a 34 MHz clock) do not apply to
this RTL.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | widths, the Booth digit type, the cosine table and `dct_coef()` |
| `rtl/dct2d_top.sv` | top level and control |
| `rtl/mac_set.sv` | 16 MACs with their ROMs |
| `rtl/booth_mac.sv` | one MAC: array + adder + accumulator |
| `rtl/booth_mult_array.sv`, `rtl/mult_cell.sv`, `rtl/booth_recoder.sv` | Booth carry-save multiplier (widths are parameters; 4 x 4 -> 8 is a handy small instance for study) |
| `rtl/cond_sum_adder.sv` | conditional sum adder (width `W`, a power of two) |
| `rtl/coef_rom.sv` | per-MAC coefficient ROM |
| `rtl/transpose_mem.sv` | transposition memory |
| `rtl/piso_shift_reg.sv` | output shift register |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/dct_ref_pkg.sv` | reference coefficients and exact 2D DCT in real arithmetic, for the testbenches |

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=<n> failures=<m>`. For
example, the end-to-end test:

    verilator --binary --timing --assert --top-module tb_dct2d_top -y rtl -y tb +libext+.sv \
        rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct2d_top.sv -o sim
    ./obj_dir/sim

`tb_dct2d_top` runs the top at its default parameters. It sends six data blocks through the
chip: random pixels, a flat block and a full-range checkerboard, with random stalls in some
blocks. Two blocks of zeros follow to push the data out. It checks the following:

* every word against a bit-exact integer model;
* every word against the exact real-valued DCT, within 1.0;
* the 274-pixel latency and the 256-clock block rate;
* `out_sob`.

It also counts the stalls and the blocks read in each memory orientation, and fails if any
of them never occurs. Verilator takes a few minutes to build it, because it has 32 full MAC
arrays, and under a second to run it.

The unit testbenches do the following:

* The recoder and the multiplier cell are tested exhaustively.
* The array, the adder and the MAC are compared with `*` and `+` on corner and random
  operands. This includes the pattern A = FFFF, B = 8001, C = 0, the longest sum path through
  the array.
* The ROMs are compared with the cosine.
* The memory and the shift register are run the way the top uses them.
