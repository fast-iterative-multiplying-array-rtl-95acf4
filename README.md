# Fast iterative multiplying array

An unsigned N x M multiplier built as a regular array of large cells
("macrocells"). Each cell generates and adds a whole rectangular block of
partial products. Its internal adders are ordered so that the signals that
travel the length of the array pass through as little logic as possible. The
RTL is combinational and fully parameterised. The defaults give a 4 x 10 bit
multiplier made of cells with K1 = 2 and K2 = 5.

The array design, including the cell structure, the two-table compressor and
the final adder, is a published architecture; this code is an independent
implementation of it. Where that description leaves something open, or where
this RTL deliberately differs from it, the section
[Departures and design choices](#departures-and-design-choices) says so.

## The idea

In a classic iterative array multiplier every cell is a full adder, so the
carry-save part needs about n full-adder delays. Tree multipliers are
logarithmic but irregular. This array sits between the two. It keeps a
regular, iterative layout, but each cell does much more work: it adds K2
partial-product rows over K1 adjacent bit weights.

The outputs of a cell fall into two classes:

* **Non-propagating: U.** This is the high half of the cell's own block sum.
  It depends only on the factor bits, never on what neighbouring cells
  produce. U is passed to the left neighbour in a ripple fashion. Because
  U_out does not depend on U_in, the ripple costs no time: every U in the
  array is valid one compressor delay plus one adder delay after the factors
  arrive.
* **Propagating: V, x, y and z.** These carry the results of the cells above
  into the cells below. They are wired in a carry-save pattern: V goes
  straight down and x, y, z go down and one column left. Inside the cell,
  these signals pass through only one to three K1-bit carry look-ahead
  adders.

Below the last row, a ripple chain of small "additive cells" turns the
carry-save result into the product.

## Geometry: rows, columns and cells

Factor B is cut into R = ceil(M/K2) **rows** of K2 bits. The product weights
are cut into **columns** of K1 bits. The cell in row r, column c owns every
partial product a_i * b_j where b_j is one of the row's bits and i+j is one of
the column's weights. In a dot diagram that set is a rectangle K1 dots wide
and K2 dots tall. Each of its K2 rows is one b bit ANDed with K1 consecutive
a bits, and the a window moves down by one bit per row. A cell therefore
reads K2 bits of B and K1+K2-1 bits of A.

Row r spans the columns floor(r*K2/K1) through floor((r*K2 + K2 + N - 2)/K1),
which are exactly the columns holding its products. The default 4 x 10 array
looks like this (columns are numbered from the least significant end, and each
column is 2 bits of the product):

```
column:          7      6      5      4      3      2      1      0
weights:      15..14 13..12 11..10  9..8   7..6   5..4   3..2   1..0
row 0 (b0..b4)                            [C3]   [C2]   [C1]   [C0]
row 1 (b5..b9)          [C6]   [C5]   [C4]   [C3]   [C2]
final adder    [A]    [A]    [A]    [A]    [A]    [A]    [A]    (V of column 0 is final)
```

Connections:

* **V (K1 bits):** goes from a cell to the cell of the same column in the next
  row. Where a row has no cell in a column, V passes down unchanged. Column 0
  and column 1 of the default array pass straight to the bottom.
* **x, y, z (1 bit each):** have the weight of the column to the left. They
  go to the next row, one column left.
* **U (K1 bits):** goes to the left neighbour in the same row. The U of a
  row's leftmost cell has nowhere to go in its own row, so it enters the next
  row as the V input of the column just past the row.
* **Final adder:** column 0 never receives x, y or z, so its V is already
  product bits 1..0. Every other column feeds one additive cell. The
  additive cells form a ripple chain with carry-in 0.

The array keeps one column beyond the product width, because it receives the
last cell's U, x, y and z. For an N x M product these bits are always zero.
An assertion checks this, together with the carry out of the final adder.

## Inside a macrocell

```
 factor bits ──► COM ──► hi1 (K1) ┐
                     ──► hi2 (K1-1)┴─► CLA1 ─────────────────────► U_out
                     ──► lo1 (K1) ┐
                     ──► lo2 (K1) ┴─► CLA2 (cin = x_in) ─► x_out
                                          │ sum
                                U_in ──► CLA3 (cin = y_in) ─► y_out
                                          │ sum
                                V_in ──► CLA4 (cin = z_in) ─► z_out
                                          │ sum
                                          ▼
                                        V_out
```

The cell keeps the identity

```
block + x_in + y_in + z_in + U_in + V_in = V_out + 2^K1 * (U_out + x_out + y_out + z_out)
```

where `block` is the sum of the cell's partial products. The macrocell
testbench checks this identity on random inputs.

**Why the block fits.** K2 numbers of K1 bits add up to at most 2*K1 bits
when K2 <= 2^K1 + 1. That bound gives the pairs (K1, K2) = (2, 5), (3, 9) and
(4, 17). Elaboration stops with an error for K1 < 2, K2 < 2 or K2 > 2^K1 + 1.
The top level also requires K2 >= K1, which keeps the rows from colliding.

**COM, the compressor.** COM splits the block into an upper part of
K2' = ceil(K2/2) rows and a lower part of K2'' = floor(K2/2) rows. Each part
goes to its own read-only table, addressed by that part's factor bits:

| table | A bits | B bits | address bits | word | K1=2, K2=5 |
|-------|--------|--------|--------------|------|------------|
| 1 | a_win[K2'' +: K2'+K1-1] | b_win[0 +: K2'] | 2K2'+K1-1 | 2K1 bits | 2^7 x 4 |
| 2 | a_win[0 +: K2''+K1-1] | b_win[K2' +: K2''] | 2K2''+K1-1 | 2K1-1 bits | 2^5 x 3 |

The two tables hold 608 bits, against 2^11 x 4 = 8192 bits for one table
over the whole block. Each word is split at bit K1 into a high and a low half.

* The high halves (hi1, hi2) are added by CLA1 to give U. This never carries
  out, because the block sum is below 2^(2*K1).
* The low halves (lo1, lo2) are added by CLA2 with x_in as the carry-in.
* Each table is a memory array filled at start-up from a constant function,
  `fima_pkg::rom_word`. The word at address {b, a} is the sum over rows j of
  b[j] * a[KS-1-j +: K1], so no data file is involved.

**The adder chain.** CLA2, CLA3 and CLA4 are in series, so the cell's outputs
become valid in the order x, y, z, V. In gate-delay terms, with t_COM for
COM and t_c / t_s for a CLA's carry-out / sum:

* x is ready at t_COM + t_c.
* y is ready at t_COM + t_s + t_c.
* z is ready at t_COM + 2 t_s + t_c.
* V is ready at t_COM + 3 t_s.

Down the array, x grows by t_c per row and V by t_s per row. The carry-save
part therefore takes (R + 2) t_s + t_COM.

**The K1-bit carry look-ahead adder** (`fima_cla`) forms every carry as a
two-level sum of products of generate terms, propagate terms and the
carry-in. Its widest term has K1+1 inputs. The cost model behind the
architecture assumes an adder with that fan-in, about 3 gate delays to the
carry-out and 6 to the sum. RTL cannot pin down gate delays, so none of the
delay figures above is checked by simulation.

## Final adder

Each additive cell (`fima_additive_cell`) works in two steps:

1. A full adder compresses the column's x, y and z into a sum bit (weight 1)
   and a carry bit (weight 2).
2. A K1-bit CLA of the same kind as in the macrocells adds V, the two
   full-adder bits and the carry from the previous column.

V + x + y + z + cin is at most 2^K1 + 3, so K1 bits plus one carry-out are
enough for K1 >= 2. The cells are chained ripple-carry fashion
(`fima_final_adder`). A multilevel look-ahead over the column carries would
also work, but it is not built here.

## Departures and design choices

* **One more cell in misaligned rows.** When r*K2 is not a multiple of K1, a
  row's products start in the middle of a column. Such a row then needs
  ceil((N+K2-1)/K1) + 1 cells rather than ceil((N+K2-1)/K1). In the 4 x 10
  array, the second row covers weights 5..12, which takes five cells
  (columns 2..6). The reference drawing of that array shows four cells in
  the second row, which would leave a3*b9 out of the product. The RTL
  follows the weights. The extra cell (row 1, column 6) holds only a3*b9.
* **A is wired directly.** In the reference layout the A lines are threaded
  through the cells and handed from row to row. Here each cell gets its
  K1+K2-1 bit window of A straight from a zero-padded copy of the factor.
  The logic is the same; only the routing differs.
* **Adder names.** CLA1 is the adder of the two high halves, which drives U.
  CLA2 starts the chain of the low halves. This follows the cell drawing.
  Some prose descriptions of the cell swap the names CLA1 and CLA2; the
  function is the same either way.
* **Table size.** The split-table compressor of a K1 = 2, K2 = 5 cell is
  2^7 x 4 + 2^5 x 3 = 608 bits. This is the size built here. It is sometimes
  quoted as 578 bits.
* **CLA netlist, full adder and table programming** are this design's own.
  Only their function, width and fan-in bound are given by the
  architecture.
* **No clock, no reset, no handshake.** The architecture is a purely
  combinational array, so the product is valid after the array delay.
  Registers, if needed, belong around `fima_multiplier`.

## Files

| file | contents |
|------|----------|
| `rtl/fima_pkg.sv` | row/column extents, the K2 bound, table contents (`rom_word`) |
| `rtl/fima_cla.sv` | W-bit carry look-ahead adder |
| `rtl/fima_com_rom.sv` | one compressor table (memory array, asynchronous read) |
| `rtl/fima_com.sv` | COM: two tables and the hi/lo split |
| `rtl/fima_macrocell.sv` | COM + CLA1..CLA4 |
| `rtl/fima_full_adder.sv` | 1-bit full adder |
| `rtl/fima_additive_cell.sv` | full adder + K1-bit CLA |
| `rtl/fima_final_adder.sv` | ripple chain of additive cells |
| `rtl/fima_multiplier.sv` | top: the array and its final adder |
| `tb/*_tb.sv` | self-checking testbenches, one per module, plus workloads |
| `tb/fima_square_check.sv` | helper used by the workload testbenches |

Parameters of `fima_multiplier`:

* `N`: width of a (default 4).
* `M`: width of b (default 10).
* `K1`: product bits per column (default 2).
* `K2`: bits of b per row (default 5).

The output p is N+M bits wide.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each one has a watchdog that records a failure if the run hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module fima_multiplier_tb \
    rtl/fima_pkg.sv tb/fima_multiplier_tb.sv
./obj_dir/Vfima_multiplier_tb
```

Swap the top-module name to run another testbench. What each one covers:

* `fima_multiplier_tb` runs the default 4 x 10 array over all 2^14 factor
  pairs. It also counts, and requires at least once, each array mechanism:
  * U rippling inside a row;
  * a row's last U entering the next row;
  * x, y and z carries between rows;
  * carries reaching the final adder;
  * a carry rippling through the final adder;
  * activity in the extra cell.
* `fima_workload_tb` runs square arrays with n = 8, 16, 24 and 32.
  `fima_workload48_tb` runs n = 40 and 48. Both build each size twice, with
  (K1, K2) = (2, 5) and with (3, 9). Each instance gets the all-ones operands
  and 3000 random pairs.
* The cell testbenches check COM and its tables exhaustively at K1 = 2,
  K2 = 5. They check the macrocell with random inputs against the identity
  above, and also test which outputs may depend on which inputs. The CLA,
  full adder and additive cell are checked exhaustively.

These arrays are fully combinational and unrolled, so Verilator's C++ build
dominates the run time. Most testbenches build in well under a minute. The
two workload testbenches build for several minutes.
