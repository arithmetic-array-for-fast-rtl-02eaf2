# Pipelined macrocellular inner-product array

This design computes the inner product of two vectors of two's complement
fractions. It accepts one operand pair per clock:

    S = X_1*Y_1 + X_2*Y_2 + ... + X_M*Y_M

The result is a two's complement fraction. It uses two main ideas:

* **2x2-bit macrocells.** The signed multiplier is an array of cells that
  each multiply two bit pairs (a 2x2-bit full multiplication) instead of
  gated full adders. This gives a quarter as many cells and half as many cell
  levels. A correction derived from Baugh and Wooley's method makes a single
  array handle two's complement operands.
* **Pipelining without input skew.** Flip-flops are placed only on the
  *additive* connections between cells. The operand bits reach every cell in
  the same clock, so a cell adds the products of the current pair to partial
  sums left by earlier pairs. Addition does not care about order, so this is
  harmless. Once the last pair has entered, N-1 zero pairs empty the pipe,
  and the accumulator then holds the exact sum. The pipeline needs no
  registers to delay the operands or to realign the product.

With n-bit operands the result has 2n-1 bits. A vector of M pairs takes
M + N - 1 clock periods. The clock period is K cell delays plus one
flip-flop. K is the *pipelining degree*: the number of cell levels per pipe
stage.

## Number format

An operand of n bits `x0 x1 ... x(n-1)` has the value

    X = -x0 + x1*2^-1 + x2*2^-2 + ... + x(n-1)*2^-(n-1)

In the RTL the vector's MSB is `x0`, the sign bit. The result
`S0 S1 ... S(2n-2)` uses the same format, with its LSB at weight 2^-(2n-2).
Bits of weight 2^1 and above are never formed, so all arithmetic is modulo 2.
A sum outside [-1, 1) wraps around; the design assumes |S| < 1. The one
product that overflows on its own is (-1)*(-1) = +1, which reads as -1.

As plain integers, `result` equals
`sum($signed(x)*$signed(y)) mod 2^(2n-1)`. The testbenches use this to check
it.

## The product matrix

Write X = -x0 + X* and Y = -y0 + Y*, and replace -X* and -Y* by the
complemented bits plus one LSB. Working modulo 2, the product becomes a sum
of single-bit terms with no negative weights:

    X*Y =  x0*y0 + (x0 xor y0)                      weight 2^0
         + sum_{i,j>=1} x_i*y_j * 2^-(i+j)
         + sum_{i>=1}  x0*~y_i * 2^-i
         + sum_{i>=1}  y0*~x_i * 2^-i
         + (x0 + y0) * 2^-(n-1)

The matrix is split into 2x2 blocks. Block (p, q) pairs X bits (2p, 2p+1)
with Y bits (2q, 2q+1), where p, q = 0 .. n_r-1 and n_r = ceil(n/2). Inside
a block, the product of the two more significant bits has local weight 4, the
two cross products weight 2, and the product of the two less significant
bits weight 1. There are three block types:

| cell | block            | weight 4 | weight 2             | weight 1    | count       |
|------|------------------|----------|----------------------|-------------|-------------|
| M1   | p >= 1, q >= 1   | x_a y_b  | x_a y_b+1, x_a+1 y_b | x_a+1 y_b+1 | (n_r-1)^2   |
| M2   | p = 0, q >= 1    | x0 ~y_b  | x0 ~y_b+1, x1 y_b    | x1 y_b+1    | n_r-1       |
| M2   | q = 0, p >= 1    | ~x_a y0  | ~x_a+1 y0, x_a y1    | x_a+1 y1    | n_r-1       |
| M3   | p = q = 0        | x0 y0    | x0 ~y1, ~x1 y0       | x1 y1       | 1           |

The second M2 row is the same cell with X and Y exchanged.

The leftover terms are injected as additive inputs. x0 and y0 at weight
2^-(n-1) enter the top cell of the middle column. x0 xor y0 at weight 2^0
enters an extra additive cell left of M3.

An odd n is padded with a zero LSB. This does not change the value, so the
array is always built for 2*n_r bits.

## Cells

Every macrocell adds its four products to five additive inputs: v0, v11 and
v12 from above, and u0, u1 from the right. It is **two independent
circuits**:

    low:   2*w12 + w0           = p00 + u0 + v0                   (0..3)
    high:  8*w3 + 4*w2 + 2*w11  = 4*p11 + 2*(p01+p10+u1+v11+v12)  (0..14)

The carry w12 of the low circuit does not ripple into the high circuit. It
leaves downwards next to w11 as a second bit of weight 2. So the product
leaves the array in a redundant code: two bits at every odd weight. w0, w11
and w12 go down to the next cell. w2 and w3 have the weights of the next
column's 1 and 2, so they go left as its u0 and u1. `pma_mc_adder` holds this
arithmetic, and `pma_m1`, `pma_m2` and `pma_m3` only form the products.

The additive cell A (`pma_acell`) turns the redundant code back into two's
complement and accumulates at the same time:

    8*w3 + 4*w2 + 2*w1 + w0 = (v0 + u0 + c0) + 2*(v11 + v12 + u1 + c1)   (0..11)

Here v is the product from above, u the carry from the A cell on the right,
and c two stored result bits. w1 and w0 are the new result bits. w3 and w2 go
to the left neighbour.

## Array geometry

Cells of equal weight form a column: column c holds the blocks with
p + q = c, where c = 0 .. 2n_r-2. Column heights rise from 1 to n_r and fall
back to 1, so the multiplier is a triangle. Below it is a row of 2n_r A cells
(columns -1 .. 2n_r-2) whose outputs are the result bits. For n = 6:

```
                                  [M2 2,0]  <- v = (x0, 0, y0)
                       [M2 1,0]   [M2 0,2]   [M1 2,1]
          [A*]  [M3]   [M2 0,1]   [M1 1,1]   [M1 1,2]   [M1 2,2]
  A row:  [A]   [A]    [A]        [A]        [A]        [A]
          S0    S1 S2  S3 S4      S5 S6      S7 S8      S9 S10
```

Connections:

* wd goes to the cell below. The bottom cell of a column feeds the A cell
  below it.
* wl goes to the cell on the left in the same row.
* In the left half, the column on the right is one cell taller. The top cell
  of that taller column sends its wl down-left, into the v inputs of the
  shorter column's top cell.
* Top cells with nothing above them get v = 0. The exception is the middle
  column's top cell, which gets the x0 and y0 constants.
* A* is the extra A cell. It adds x0 xor y0 to M3's wl, and its sum goes
  down into the A cell that produces S0.
* The A cells pass carries right to left. Each A cell's result bits come back
  through the accumulator flip-flops as its c inputs: 2n-1 flip-flops in all.

Inside a column, the interior M1 cells sit at the bottom and the border M2
cells at the top. The arithmetic does not depend on this order.

## Pipelining and the zero flush

This part needs the most care.

**Levels.** Every connection runs down, left, or down-left. Give each cell
the level e = 2n_r - row - column, where row 0 is the A row and column -1 is
the sign column. Then every connection goes from level e to e+1, and the
down-left connections go from e to e+2. The top cells have level 1. The A
cell that produces S0 has level 2n_r+1.

**Cuts.** A pipe stage is K consecutive levels. A cut lies after levels K,
2K, and so on. A connection gets one flip-flop for each cut it crosses, so
`pma_pipe_reg` is given DEPTH 0, 1 or 2. With this rule the number of signals
crossing cut b is 5n_r, 5n_r-1 and 5n_r-3 for the first three cuts, then 5
fewer every second cut. For n = 6 and K = 1 that is 15, 14, 12, 9, 7 and 4
flip-flops, plus 11 in the accumulator.

The carry chain of the A row is cut as well. The accumulator therefore stays
redundant while pairs stream in, and never waits for a full-width carry.

**Only additive paths are cut.** x and y drive all cells in the same cycle.
A cell below a cut therefore adds the products of pair p to the partial sums
that pair p-1 (or p-2, ...) left in the cut's flip-flops. In the middle of a
vector the accumulator holds no particular S_p. Every bit of every product
still reaches the accumulator exactly once.

**Flush.** Once the last pair has entered, zero pairs push what is left in
the cut flip-flops down into the accumulator. Zero pairs produce no products,
and an A cell whose only input is its own stored bits produces no carry. So
after one cycle per cut, all pipeline flip-flops are zero and the accumulator
is exact. The sequencer sends N-1 zero pairs, where N = ceil(2n_r/K) + 1 is
the number of stages. When K does not divide 2n_r this is one more than the
number of cuts, which is harmless.

| n  | K | stages N | clocks for M = 20 | gate delays (M+N-1)(2K+2) |
|----|---|----------|-------------------|---------------------------|
| 32 | 1 | 33       | 52                | 208                       |
| 32 | 2 | 17       | 36                | 216                       |
| 32 | 3 | 12       | 31                | 248                       |
| 32 | 4 | 9        | 28                | 280                       |
| 32 | 5 | 8        | 27                | 324                       |

The gate-delay column assumes two gate levels per cell and per latch, as the
cost model behind this design does. The clock counts are checked in
simulation.

A K of at least 2n_r+1 puts no cut in the array. That is the unpipelined
array: one clock per pair, and a flush of one zero pair, which is not needed.

## Top level and interface (`pma_top`)

`pma_top` connects the sequencer `pma_ctrl` to the array `pma_array`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset (all flip-flops to 0) |
| in_valid / in_ready | in / out | 1 | an operand pair is accepted when both are high |
| in_last | in | 1 | marks the M-th pair of a vector |
| x, y | in | N_BITS | X_p and Y_p |
| busy | out | 1 | a vector is being accumulated or flushed |
| result_valid | out | 1 | `result` holds S; stays high until the next vector's first pair is accepted |
| result | out | 2*N_BITS-1 | S, with sign bit S0 as the MSB |

Timing for a vector whose M pairs arrive in consecutive cycles t, ...,
t+M-1:

* The pair is used in the cycle it is accepted; there is no input register.
* in_ready is low from cycle t+M to cycle t+M+N-2, while N-1 zero pairs are
  fed.
* result_valid is high from cycle t+M+N-1 onward.
* The next vector may start in that same cycle. Its first pair raises
  `acc_clear`, so the A cells add 0 instead of the old result.
* Gaps in the stream (in_valid low in the middle of a vector) become zero
  pairs. A gap delays the result by one cycle and does not change it.

Parameters of `pma_top` and `pma_array`:

* `N_BITS` is the operand width, default 32.
* `K` is the pipelining degree, default 2. For 32-bit operands, K = 2 gives
  the best speed per gate; K = 1 is the fastest per vector when vectors are
  long.

`pma_ctrl` takes `FLUSH`, which is N-1; `pma_top` computes it with
`pma_pkg::n_stages`.

Size at the defaults: 256 macrocells and 33 A cells. Counting only signals
that carry data, the array has 727 flip-flops: 664 in the pipeline and 63 in
the accumulator. After synthesis 725 remain, because two flip-flops only feed
the dropped bit of weight 2^1. The RTL also registers some constant-zero
inputs, such as the unused v12 of the down-left connections; synthesis
removes those flip-flops. The sequencer has 8 flip-flops.

## Files

| file | contents |
|------|----------|
| `rtl/pma_pkg.sv` | bundle types `mc_v_t` (v/wd) and `mc_u_t` (u/wl), cell kinds, geometry functions (n_r, N, column height, cell placement, level, cuts) |
| `rtl/pma_mc_adder.sv` | the two-circuit adder shared by all macrocells |
| `rtl/pma_m1.sv`, `pma_m2.sv`, `pma_m3.sv` | the three macrocells |
| `rtl/pma_acell.sv` | additive cell A |
| `rtl/pma_pipe_reg.sv` | pipeline element of DEPTH flip-flops (0 = wire) |
| `rtl/pma_array.sv` | the array: cell placement, wiring, cuts, accumulator |
| `rtl/pma_ctrl.sv` | zero-flush sequencer and handshake |
| `rtl/pma_top.sv` | top level |
| `tb/tb_pma_m1.sv`, `tb_pma_m2.sv`, `tb_pma_m3.sv`, `tb_pma_acell.sv` | exhaustive cell tests |
| `tb/tb_pma_pipe_reg.sv` | delay of DEPTH 0, 1, 3 |
| `tb/tb_pma_array.sv` + `pma_array_check.sv` | random inner products for n = 6 (K = 1, 2), n = 7 (K = 3), n = 8 unpipelined, and n = 32 (K = 2), checked at exactly M+N-1 clocks |
| `tb/tb_pma_ctrl.sv` | sequencer against a cycle model, with random gaps |
| `tb/tb_pma_top.sv` | end-to-end test at the default size: 40 vectors with gaps, back-to-back starts, wrap-around and refused offers during the flush, each counted |
| `tb/tb_pma_workloads.sv` + `pma_workload_run.sv` | n = 32 with K = 1..5 at M = 20 and 150, and n = 16 and 24 at K = 2: result and operation time |

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/pma_pkg.sv tb/tb_pma_top.sv --top-module tb_pma_top -o sim
./obj_dir/sim
```

Each takes well under a second. The simulator is two-state; every register
that is read is reset.

## What follows the published design and what does not

Taken from the published design:

* the two's complement product matrix
* the three macrocell types and their split into two independent circuits
* the additive row with accumulator feedback
* the array layout for n = 6
* flip-flops on additive connections only
* the stage count N = ceil(2n_r/K) + 1 and the N-1 zero pairs
* the operation time M + N - 1 clocks

Choices made here:

* **Flip-flops instead of latches.** The original counts four-gate
  level-sensitive latches of two gate levels. Edge-triggered flip-flops are
  used here.
* **Cells written as additions.** The original realises each cell in two
  gate levels, 81 to 95 gates per cell, but does not give that logic. Here
  each cell is an addition, so its delay and size depend on synthesis. The
  gate-delay figures above are those of the original model, not of this RTL.
* **Cut positions.** The cut positions come from the level numbering above.
  It reproduces the original latch count exactly.
* **Order of cells in a column.** It follows the n = 6 drawing; for other n
  it is a rule chosen here.
* **Padding for odd n.**
* **Interface details.** The valid/ready handshake, `in_last`, `acc_clear`
  (S_0 = 0), `busy`, `result_valid` and the asynchronous reset are this
  design's own.
* **No overflow detection.** Sums wrap modulo 2.

The original's cost and efficiency formulas (gate counts, efficiency
1/(cost*time)) are analysis, not hardware, and are not modelled.
