# Bit-serial squarers with least input-to-output delay

These circuits square a binary number that arrives one bit per clock, least
significant bit first. Each bit of the square comes out as soon as the
operand bits it depends on have arrived. An N-bit operand gives a 2N-bit
square, y_0 .. y_(2N-1). In the first clock y_0 comes out, together with y_1,
which is always 0. Each following clock gives the next bit. In the clock that
receives the last operand bit, the circuit already holds everything needed
for the upper half of the square. Some of the circuits then output that half
all at once. The others output it one bit per clock in the N-1 clocks after.

Each squarer comes from a serial multiplier, cut down for the case where both
factors are the same number. The RTL has six such squarers, built from two
kinds of parts. An **array generator** holds the operand bits received so far
and forms, with AND gates, the terms of the squarer array. A **summer** adds
those terms up and puts out the square bits. All parameters default to N = 5,
the size used in every worked example of the method. Every module is written
for a general N.

## The reduced squarer array

The array of a multiplier X·X has the terms x_i·x_l at weight 2^(i+l). Since
x_i·x_l = x_l·x_i, the terms below the anti-diagonal repeat those above it. So
the lower half can be dropped and the upper half counted twice, which means
moving it one place to the left. The anti-diagonal terms x_i·x_i are simply
x_i, because a bit times itself is itself. This leaves the **reduced array**:

    x_i        at weight 2^(2i)
    x_i·x_l    at weight 2^(i+l+1)      for i > l

It has about half the terms of a multiplier array. No term has weight 2^1,
which is why y_1 = 0.

Take the terms that use x_j and no higher bit. They form a diagonal
D_j = {x_j, x_j·x_(j-1), …, x_j·x_0}, with weights 2^(2j), 2^(2j), 2^(2j-1), …,
2^(j+1). The diagonal can be formed as soon as x_j arrives. So, with S_(-1) = 0,

    S_j = S_(j-1) + x_j + D_j      and      S_(N-1) = X².

During step t_j no later diagonal reaches below weight 2^(j+2). The bits y_j
and y_(j+1) of S_j are therefore final, and the circuit can put them out.

## Steps and timing (all squarers)

* `start` is high in the clock whose rising edge samples x_0 on the `x` pin.
  That edge begins step **t_0**. The edge that ends step t_j samples
  x_(j+1). The operand bits must follow one another without gaps.
* During step t_j the outputs are combinational from registers:
  `step` = j, `busy` = 1, and `y_pair` = {y_(j+1), y_j}. The column scheme is
  different; see below.
* In the last step, `square_valid` = 1 and `square` holds the complete
  square.
* A new `start` may come with the edge that ends the last step, so
  operations can run back to back. A `start` in the middle of an operation
  aborts that operation and begins a new one.
* The reset `rst_n` is asynchronous and active low.

```
 clock edge     E0        E1        E2        E3        E4        E5
 pin x          x0        x1        x2        x3        x4       (next x0)
 start          1         0         0         0         0        (1)
 step               t0        t1        t2        t3        t4
 y_pair            y1 y0     y2 y1     y3 y2     y4 y3     y5 y4
 square                                                  y9..y0   (N=5, parallel schemes)
```

| squarer (top prefix) | module | accepts | steps | square |
|---|---|---|---|---|
| `dcpa` | `sq_diag_cpa` | unsigned | N | 2N bits in t_(N-1) |
| `dcsa` | `sq_diag_csa` | unsigned | N | 2N bits in t_(N-1) |
| `dser` | `sq_diag_csa_serial` | unsigned | 2N-1 | one new bit per step up to y_(2N-1) in t_(2N-2), and all 2N bits then |
| `col` | `sq_column` | unsigned | (N-1)/2 + N | two bits per step from t_((N-1)/2) on, and all 2N bits in the last step |
| `text` | `sq_tc_ext` | two's complement | 2N-2 | 2N-1 bits in t_(2N-3) |
| `tneg` | `sq_tc_neg` | two's complement | N | 2N-1 bits in t_(N-1) |

`serial_squarers_top` puts all six side by side. They share only the clock
and reset. Each one's pins carry its prefix, for example `start_dcpa`, `x_dcpa`
and `square_dcpa`.

## Array generator by diagonal (`diag_array_gen`)

This is an N-stage shift register with the newest bit in cell 0, plus N-1
two-input AND gates: `d[k] = x_j & x_(j-1-k)`. `start` loads x_0 and clears
the other cells, so that the diagonals of the first steps are short. With
neither `start` nor `shift` high, the register holds its content. Output
`xj` and `d[0]` have the weight of x_j, which is 2^(2j). Each further `d[k]`
is one place lower.

## The moving frame of the summers

This is the key to reading the summer RTL. The generator's outputs are on
fixed wires, but their weight grows by a factor of four from step to step.
So the summer does not work in absolute weights. It works in a frame tied to
x_j. Bit `i` of a summer row has relative position **p = i − SW**, where
p = 0 is the column of x_j (weight 2^(2j)) and SW is the register length.
Within one step nothing moves. At the end of the step the useful part of
S_j is written back **shifted right by two places**, so the same bit sits two
places lower relative to the next, four-times-heavier x_(j+1). Two things
follow:

* A square bit stays in the register, one place further right each step,
  until it drops off the end. With SW = 2N-2, y_0 is still held in t_(N-1).
  That is why the parallel schemes can give all 2N bits in that step.
* The final bits y_(j+1) and y_j sit at p = 1−j and p = −j. So they appear
  at a different place in the row each step. The squarer picks them out with
  a multiplexer on `step`.

### Carry-propagate summer (`cpa_summer`)

The register holds S_(j-1) in p = −1 … −SW. Only the N-1 columns
p = 0 … −(N-2) receive new terms, and each holds exactly two: x_j or a
register bit, plus a d bit. These columns go through an (N-1)-stage adder,
whose N output bits cover p = +1 … −(N-2). The lower SW−N+2 register bits
pass through unchanged. For N = 5 that is a 4-stage adder and 8 register
cells, 5 of which only keep low square bits. The adder's carry chain limits
the clock rate; a carry-lookahead adder can take its place.

The summer has two extra inputs that the two's-complement squarers use.
`shift_one` writes back shifted by one place instead of two. `cin` is a
carry-in at the lowest adder column.

### Carry-save summer (`csa_summer`)

The partial sum is kept as two rows: a sum register r in p = −1 … −SW and a
carry register c in p = −2 … −(CW+1). Each step, four rows (x_j, D_j, c, r)
are reduced to two with no carry propagation:

* Column p = 0 gets a half adder. Its carry goes to place p = +1 of the sum
  row, which is otherwise empty.
* Every lower column with three inputs gets a full adder. Its carry goes one
  column up, into the carry row.

Both rows are written back shifted by two. With this arrangement the carry
register needs only N-2 cells and the sum register 2N-2 cells (3 and 8 for
N = 5). An assertion checks that no carry falls outside the carry register.
Below weight 2^(j+1) no carries exist, so the sum row alone gives y_j and
y_(j+1).

* `SERIAL = 0` (`sq_diag_csa`): in t_(N-1) an extra parallel adder,
  `total = sum_row + carry_row`, merges the two rows into the complete square.
* `SERIAL = 1` (`sq_diag_csa_serial`): after t_(N-1) the generator gets
  zeros. The summer keeps running half adders over the two rows for N-1 more
  steps. Each step the lowest carry moves up by one place, so exactly one more
  square bit becomes final per clock. Here the registers are longer (2N-4
  carry cells and 4N-4 sum cells), so that the complete square is still held
  in the last step.

## Array generator by column (`col_array_gen`, `col_summer`, `sq_column`)

This scheme forms the array column by column, two columns per clock. An
N-cell shift register holds x_(j−c) in cell c during step t_j. Zeros are
shifted in after the operand. The AND gates sit at fixed cell pairs, placed
symmetrically about the centre cell C0 = (N−1)/2. With m = j − C0:

* column 2m gets the centre cell (x_m) and the pairs (C0−k, C0+1+k);
* column 2m+1 gets the pairs (C0−k, C0+k), k ≥ 1.

For N = 5 the outputs are zero in t_0 and t_1. Column 0 comes in t_2, columns
2 and 3 in t_3, 4 and 5 in t_4, and the last column in t_6. The summer counts
the ones of both columns and adds them to a carry:
acc = carry + ones(even) + 2·ones(odd). The two low bits of acc are
{y_(2m+1), y_2m}, and acc/4 is kept as the carry. So `y_pair` is two *new*
bits per step, valid when `y_valid` is high, from t_C0 to the last step. The
summer's internals (counters, carry register and result register) are this
design's own. The source states only what the summer must do.

## Two's-complement squarers

The sign bit s = x_(N-1) has weight −2^(N−1). The square of the most negative
number, −2^(N−1), needs 2N−1 bits. Excluding that value saves one bit. Both
squarers accept the full range by default and give 2N−1 bits. When the most
negative value is excluded, y_(2N−2) is simply 0. The sign-extension squarer
also has a parameter `FULL_RANGE`. Setting it to 0 excludes the most negative
value, which lets that squarer finish one step earlier. All arithmetic is modulo
2^(2N−1). Bits the summer forms at or above that weight are
pseudo-significant and are dropped.

**Sign extension (`sq_tc_ext`).** Copies of s to the left turn X into an
unsigned number with the same square modulo 2^(2N−1). After t_(N−1) every new
diagonal of the extended number is the same, s·x_(N−2) … s·x_0, one place
higher each time. Its s·s terms land above the result. So the generator
*holds* its register from t_(N−1) on, and the carry-propagate summer writes
back shifted by **one** place for the remaining N−2 steps (t_N … t_(2N−3)).
During those steps y_(j+1) always sits at p = 2−N. The summer register has
3N−4 cells so that y_0 survives to the last step. With `FULL_RANGE = 0` the
squarer needs one step less and stops at t_(2N−4).

**Negative-weight sign (`tc_diag_array_gen`, `sq_tc_neg`).** Only the last
diagonal, −s·x_k at weight 2^(N+k), is negative. Since −a = ā − 1, it is
replaced by the complemented terms plus one 1 at weight 2^N. The rest of the
sum cancels modulo 2^(2N−1). During t_(N−1) the generator inverts its D
outputs with XOR gates and raises `aux`. The summer adds `aux` as the
carry-in of its adder, at the column of the lowest complemented term. The
squarer finishes in N steps, like an unsigned one.

## Files

`rtl/`:

* `sq_step_ctrl` is the step counter that all squarers share.
* The generators are `diag_array_gen`, `tc_diag_array_gen` and
  `col_array_gen`.
* The summers are `cpa_summer`, `csa_summer` and `col_summer`.
* The six squarers are `sq_*`, and `serial_squarers_top` holds all six.

Every file begins with a comment on its function, ports and timing.

`tb/`: each module has a self-checking testbench `tb_<module>.sv`:

* The squarer testbenches apply every 5-bit operand, with random gaps,
  back-to-back operations and aborted operations. In every step they compare
  the step index, `y_pair` and the square-valid cycle with `*` products.
* The summer and generator testbenches act as the neighbouring block and
  check each step arithmetically. For example, the rows together must be
  worth (x_j…x_0)² · 2^(SW−2j).
* `tb_sq_sizes` uses the helper `sq_size_check` to check every squarer
  exhaustively at N = 3, 4, 5, 6, 7 and 8. It includes the sign-extension
  squarer with `FULL_RANGE = 0`.
* `tb_serial_squarers_top` runs all six squarers at once, at the default
  parameters. It counts each mechanism: back-to-back operations, restarts,
  parallel and serial upper halves, idle column steps, shift-by-one steps,
  complemented diagonals, negative and most-negative operands, and held
  carry-save carries. A mechanism that never occurs counts as a failure.

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`.

## Simulating

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_serial_squarers_top tb/tb_serial_squarers_top.sv
./obj_dir/Vtb_serial_squarers_top
```

Use the same command with another `tb_<module>` for a single block. The
simulator has two states, so every register that is read is reset or loaded
by `start`. Lint with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/<module>.sv`. Two kinds of lint warnings remain, and both are harmless.
SYNCASYNCNET comes from the reset also disabling the carry-save assertion.
PINCONNECTEMPTY comes from unused summer outputs.

To change the operand width, set `N` on `serial_squarers_top` or on a single
squarer. The module code is general in N (N ≥ 3). The block testbenches use
N = 5. `tb_sq_sizes` covers N = 3 to 8 exhaustively, and builds with the extra
option `-Itb -y tb`.

## Trust and departures from the original description

All 13 block testbenches pass, and so does the width sweep. For each
module, a copy with one deliberate fault makes its testbench fail. Synthesis is small: between 17 and 32 flip-flops
per squarer at N = 5. The following points are this design's own choices,
or differ from the published schemes:

* **Interface.** The `start` strobe, the restart rule, the reset, and the
  `step`/`y_pair`/`square` port layout are not part of the method. The
  output `y_pair` repeats y_j, which the previous step already gave as its
  y_(j+1).
* **Negative-weight squarer.** The original uses a five-stage adder and feeds
  back six bits. Here it uses the same (N−1)-stage adder and 2N−2-cell
  register as the unsigned summer, with the extra 1 as the adder's carry-in.
  The value is the same.
* **Sign-extension squarer.** Its register is 3N−4 cells, so the whole
  square is available in parallel at the end. That is one cell more than
  `FULL_RANGE = 0` needs.
* **Carry-save summer, serial variant.** The registers have 2N−4 and 4N−4
  cells, where the original drawing shows 7 and 13 for N = 5. The serial
  bits are the same. The parallel variant keeps the original N−2 and 2N−2
  cells.
* **Column summer.** The counters, carry register and result register are
  this design's own. So is the gate placement for N other than 5, which is
  derived from the symmetry of the N = 5 case.
* **Carry-lookahead.** The faster adder that the method allows for the
  carry-propagate summer is not built. A plain `+` is used, and synthesis
  picks the adder.
