# Adders and cyclic shifters as algebraic expressions

A module generator that can only emit one fixed adder or one fixed shifter
pins down the area/time trade-off of every design that uses it. The idea
behind this RTL is to describe a whole family of adders, and a whole family of
cyclic shifters, by a small algebra, so that one choice of algebraic terms is
one concrete circuit:

* **Adders** are expressions over a *carry monoid* of (generate, propagate)
  tuples. An expression such as `(G4,P4) o (G2,P2)` says "a 4-bit
  look-ahead block above a 2-bit one, abutted". Replacing `o` by `*` puts a
  carry-select interface at that boundary. Carry-ripple, carry-select and
  parallel-prefix adders are all points of this space.
* **Cyclic shifters** are sets of *generator permutations* of the group of
  rotations. One generator `(1 2 ... n)` gives a ring shift register;
  `log n` generators that rotate by powers of two give a barrel shifter;
  splitting the ring into column cycles and row cycles gives a square array.

The SystemVerilog here implements those structures as parameterised modules
and puts one of each side by side in `design_space_top`.

## The carry monoid

For bit `i`, `g = a & b` and `p = a ^ b`. Two adjacent groups of bits combine
with

    (g, p) o (g', p') = (g | (p & g'), p & p')      left operand = more significant

This operator is associative with identity `(0, 1)`, so any bracketing of a
run of bits gives the same group tuple `(G, P)`. A *monoid element of span i*
is a carry-look-ahead segment covering `i` contiguous bits; an adder of `N`
bits is any sequence of elements whose spans add up to `N`.

`gp_combine` is one `o` node. `pp_block` is a K-bit parallel-prefix block
that outputs the prefix tuple of every position of the segment. It is the
Brent-Kung construction of a K-bit block from a K/2-bit block, unrolled into
levels: adjacent pairs are combined going up, the half-size prefix gives the
odd positions, and one more node per even position finishes the job going
down. K does not have to be a power of two.

### Segments and the two operators

`cla_segment` is the circuit of one element: the per-bit `g`/`p`, a
`pp_block`, and the sum bits. Its `SELECT` parameter chooses how it joins the
segment below:

| operator | `SELECT` | structure | carry out of the segment |
|---|---|---|---|
| `o` | 0 | abutted: internal carries are `G \| (P & cin)`, the carry ripples on | `G \| (P & cin)` |
| `*` | 1 | carry-select: sums and carry-out are formed for carry-in 0 and 1, a mux row picks one with `cin` | `cin ? G \| P : G` |

The carry-select segment does **not** duplicate its prefix block. With
carry-in 0 the segment's carry is `G`; with carry-in 1 it is `G | P`. Both
sum sets are formed from the one set of prefix outputs. Both operators give the
same sum. They differ in structure: with `*` the carry-in reaches the outputs
through one mux level rather than through the AND-OR carry logic.

### `monoid_adder`: an expression as parameters

`monoid_adder #(N, NB, SPAN, SEL)` builds `NB` segments. `SPAN` is a packed
array of 16-bit spans and `SEL` a bit per element. Element 0 is the least
significant, so in a concatenation the last field is element 0. `SEL[j]` is
the operator between element `j` and `j-1`. `SEL[0]` has no effect because the
adder's carry-in is fixed at 0. A spans/`N` mismatch stops elaboration.

| design | parameters |
|---|---|
| default: 6-bit `(G4,P4) o (G2,P2)` | `N=6, NB=2, SPAN={16'd4,16'd2}, SEL=2'b00` |
| carry-ripple with look-ahead k | `NB=N/k, SPAN={NB{16'(k)}}, SEL='0` |
| carry-select with look-ahead k | `NB=N/k, SPAN={NB{16'(k)}}, SEL='1` |
| parallel-prefix | `NB=1, SPAN=16'(N)` |
| plain ripple-carry | `k=1`, `SEL='0` |
| any mix | e.g. `SPAN={16'd8,16'd16,16'd5,16'd3}, SEL=4'b1010` |

The expected asymptotic costs are as follows. Carry-ripple with look-ahead k
has area ~ n log k and delay ~ (n log k)/k. Carry-select with look-ahead k has
area ~ 2n/k + 1.2n and delay ~ k + n/k. Parallel-prefix has area ~ (n log n)/2
and delay ~ log n.

## The shifting group

All shifters rotate in the same direction: the permutation `(1 2 ... n)`
moves the bit in position 1 to position 2. With position 1 as bit 0, a
rotation by `c` moves `din[i]` to `dout[(i + c) mod N]`, which is a rotate
toward the MSB.

* **`linear_shifter` (G1).** A ring of `N` `shift_cell`s. Each step moves
  every bit one place up, and the top cell feeds cell 0. A counter runs `c`
  steps.
* **`barrel_shifter` (G2).** `log2 N` stages of 2:1 muxes. The stage for
  amount bit `i` rotates by `2^i` or passes the word unchanged. Each cell
  therefore reads two bits of the stage before it, `j` and `j - 2^i`. It is
  combinational.
* **`square_shifter` (G3).** The word is laid out column by column in a
  `ROWS x COLS` array of `shift_cell`s. The default is square, `ROWS = sqrt N`
  (8 x 8 for 64 bits):

      row 7 | x7   x15  ...  x63
       ...  |  .    .         .
      row 0 | x0   x8   ...  x56
              col0 col1      col7

  Each cell has two inputs:
  * An **up** shift takes the value of the cell below. The top of each column
    feeds the bottom of the next column, so the word rotates by 1.
  * A **right** shift takes the value of the cell to the left, with the last
    column wrapping to the first. The word rotates by `ROWS`.

  The amount is split into `c_right = c div ROWS` (the high bits) and
  `c_up = c mod ROWS` (the low bits). The array does all right steps first,
  then all up steps. That is at most 14 steps for 64 bits, against 63 for the
  ring. `ROWS` also sets the aspect ratio: `ROWS = 4` gives 4 x 16 for 64 bits.
* **`kcopy_shifter` (G4, G5, G6).** These are the three structures above,
  with every input bit available `K` times. This design reads that as `K`
  copies of the input bus. Copy `m` is wired in already rotated by `m*N/K`.
  The high `log2 K` bits of the amount select a copy, and a base shifter rotates
  it by the residual `r = c mod (N/K)`:
  * `KIND = SHIFT_LINEAR`: a ring of at most `N/K - 1` steps.
  * `KIND = SHIFT_BARREL`: only `log2(N/K)` barrel stages, with the result
    registered.
  * `KIND = SHIFT_SQUARE`: the square array, which needs fewer right steps.

### Sequential shifter timing

The sequential shifters share one handshake:

* `start` is taken on a clock edge while `busy` is low. That edge loads `din`
  and `amt`.
* `done` is high for one cycle when `dout` holds the result.
* `dout` then keeps the result until the next start.
* A `start` while `busy` is ignored.
* Reset is asynchronous, active low, and clears every cell.

Clock edges after the start edge until `done` is high:

| module | edges |
|---|---|
| `linear_shifter` | `c + 1` |
| `square_shifter` | `c div ROWS + c mod ROWS + 1` |
| `kcopy_shifter`, linear | `r + 1` |
| `kcopy_shifter`, square | `r div ROWS + r mod ROWS + 1` |
| `kcopy_shifter`, barrel | 0: result and `done` come on the start edge itself; `busy` is always 0 |

The K-copy barrel shifter has no busy state, so a `start` on every cycle
starts a new rotation every cycle.

## Top level

`design_space_top` (defaults `N_ADD=32, K_ADD=4, N_SH=64, K_SH=4`) holds the
following:

* Three 32-bit adders on the shared operands `add_a`/`add_b`: carry-ripple
  with look-ahead 4, carry-select with look-ahead 4, and parallel-prefix.
* The 6-bit `(G4,P4) o (G2,P2)` adder, on its own operands `fig1_a`/`fig1_b`.
* Six 64-bit shifters on the shared `sh_din`/`sh_amt`:
  * the combinational barrel shifter, on `barrel_dout`;
  * five sequential shifters, started together by `sh_start`: linear, square,
    and K-copy linear, barrel and square.
* The sequential shifters' `busy`/`done` bits are packed
  `{ksq, kbar, klin, sq, lin}`.

These are alternatives of one design space placed next to each other; nothing
connects them. Bit 3 of `sh_busy` is always 0, because the K-copy barrel
shifter is never busy.

## What is this design's own

The structures above follow the algebraic model. The following are choices
made here:

* **Word sizes.** The adders are 32 bits with look-ahead 4. The shifters are
  64 bits, which is an even power of two so that the array can be square, with
  `K = 4`.
* **The start/busy/done handshake and the reset.**
* **The rotation direction**, fixed by reading position 1 as bit 0.
* **How the carry-select sums are formed.** They come from the shared prefix
  outputs. A bit slice that shares carry-in 0/1 logic at a cost of about three
  gates is only referenced in the literature and not reproduced.
* **The meaning of "k copies of each input bit"**, as pre-rotated input
  buses. The cost model only says these shifters exist and what they cost, so
  `kcopy_shifter` should be trusted less than the other blocks.
* **The amount split of the square array.** `c_up` is the low half of the
  amount bits and `c_right` the high half. This is the only split under which
  the two phases add up to `c`.
* **The adder's carry-in**, fixed at 0. There is no carry-in port.

## Not included

* **The generators.** The software chooses an expression or a generator set
  from a user's area/time target, using the cost tables, and writes a
  netlist. It is not hardware, so it is not included. Here the choice is made
  by hand through the parameters.
* **A multiplier.** A multiplier generator is mentioned as future work,
  without any structure to implement.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_gp_combine` | every input of the operator, and the identity |
| `tb_pp_block` | K = 4 exhaustively; K = 3, 6 and 32 randomly, against a serial fold |
| `tb_cla_segment` | 4-bit segments of both kinds exhaustively, with carry-in; 5-bit segments randomly |
| `tb_monoid_adder` | the 6-bit default exhaustively; 32-bit ripple, select, prefix, look-ahead-1 and mixed expressions on corner and random operands |
| `tb_shift_cell` | load, hold, both shift inputs and their priority, on random controls |
| `tb_barrel_shifter` | every amount, 64 and 16 bits |
| `tb_linear_shifter`, `tb_square_shifter` (8x8 and 4x16) | every amount: data, exact cycle count, start while busy ignored |
| `tb_kcopy_shifter` | all three kinds, every amount (so every copy): data and exact cycle count |
| `tb_worked_examples` | the 6-bit adder, the 4-bit permutation `(1 3)(2 4)` as a rotation by 2, and 16-bit ring and 4x4 array against a 16-bit barrel shifter |
| `tb_design_space_top` | the whole top at its default parameters |

`tb_design_space_top` checks every output and cycle count of the top. It also
counts several events and fails if any of them never happens:

* carries across segment boundaries;
* carries through a whole segment;
* carry-out;
* the 6-bit adder's inner carry;
* zero shifts;
* the right and up phases of the square array;
* non-zero copy selection and a zero residual;
* ignored starts.

To simulate, for example the top-level test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_design_space_top \
        rtl/modgen_pkg.sv rtl/*.sv tb/tb_design_space_top.sv
    ./obj_dir/Vtb_design_space_top

`modgen_pkg.sv` must come first. It is listed a second time by `rtl/*.sv`,
which verilator accepts. For a unit test, replace the testbench and the
`--top-module`.

Lint (`verilator --lint-only -Wall`) reports no circuit problems. It leaves
these warnings:

* `SYNCASYNCNET`: the reset is used both in asynchronous flip-flop resets and
  in the synchronous `disable iff` of the handshake assertions.
* An unused constant of the package.
