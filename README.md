# Parallel carry-free signed-digit adder built from tri-state gates

This is RTL for an adder that has no carry chain. It works on binary
signed-digit (BSD) numbers: each digit is -1, 0 or +1, and the weights are
the usual powers of two. The design comes from an optical computer proposal.
There, the three digit values are three states of a light beam:

| digit | light state                                | code in this RTL |
|-------|--------------------------------------------|------------------|
| -1    | horizontally polarised light (`LHP`)        | `2'b11`          |
|  0    | light of no intensity, darkness (`LNI`)     | `2'b00`          |
| +1    | vertically polarised light (`LVP`)          | `2'b01`          |

Each digit is a 2-bit two's-complement code, so a code read as a signed number
is the digit's value. The code `2'b10` is never produced, and every gate reads
it as 0.

BSD numbers are redundant: most values have many spellings. For example,
+1 is `01` and also `1(-1)`. The adder uses this freedom to absorb every carry
within two positions. Every sum digit is therefore ready after the same three
steps, whatever the word length. Many such adders sit side by side, so many
additions run at once.

## The three-step addition

The adder adds X = (x[n-1] .. x[0]) and Y = (y[n-1] .. y[0]). It does so in
three steps, and each step is done at every digit position at the same time.

**Step one (T&W).** At each position, split the digit sum into a transfer
digit T that moves one place left and a weight digit W that stays:

    x[i] + y[i] = 2*T[i+1] + W[i]

T is the sign of x+y, and W is what is left over:

| x+y | -2 | -1 | 0 | 1 | 2 |
|-----|----|----|---|---|---|
| T   | -1 | -1 | 0 | 1 | 1 |
| W   |  0 | +1 | 0 | -1| 0 |

T is exactly the tri-state OR gate (see below). The rule is chosen on purpose
so that W never has the same sign as the T it sends out. When x+y = 1, step
one writes 2 - 1, not 0 + 1.

**Step two (T'&W').** At each position, add the incoming transfer T[i] to
W[i], and split the result again:

    T[i] + W[i] = 2*T'[i+1] + W'[i]

T' is non-zero only when T[i] and W[i] are both +1 or both -1. That is the
tri-state AND gate. In every other case the pair sums to -1, 0 or +1, and
that sum becomes W'.

**Step three (T).** Sum[i] = W'[i] + T'[i]. This step cannot overflow.
Suppose T'[i] = +1. Then T[i-1] = W[i-1] = +1. W[i-1] = +1 means that
x+y = -1 at position i-1, so step one sent T[i] = -1. With T[i] = -1, the
possible values of W'[i] are only -1 and 0, and the sum is 0 or +1. The case
T'[i] = -1 is the mirror image. So step three can use the tri-state OR (the
sign of the sum), and the OR equals the true sum in every case that can occur.

The result is carry-free. Sum digit i depends only on the operand digits at
positions i, i-1 and i-2. The adder is three functional blocks deep for any n.

Two n-digit operands can sum to more than n digits can hold. For example, the
largest 15-digit value is 32767, and 30224 + 30291 = 60515. Each adder row
therefore has one more unit than the operand has digits. Unit n gets operand
digits 0 and turns the transfers from position n-1 into sum digit n. The
(n+1)-digit sum is exact for all inputs. The transfers out of unit n are
always 0.

## Tri-state gates (`tri_gate`, `bsd_pkg`)

The gates work on digits. `tri_gate` selects one of six gates with its `OP`
parameter. The truth tables are in `bsd_pkg`:

| B  | A  | OR | AND | XOR |
|----|----|----|-----|-----|
| -1 | -1 | -1 | -1  |  1  |
| -1 |  0 | -1 |  0  | -1  |
| -1 |  1 |  0 |  0  |  0  |
|  0 |  0 |  0 |  0  |  0  |
|  0 |  1 |  1 |  0  |  1  |
|  1 |  1 |  1 |  1  | -1  |

The gates are symmetric in A and B. The one-input gates read only `a`:

| A  | inverter `G_INV` | true detector `G_TD` | false detector `G_FD` |
|----|------------------|----------------------|-----------------------|
| -1 |  1               | 0                    | -1                    |
|  0 | -1               | 1                    |  0                    |
|  1 |  0               | 1                    | -1                    |

The adder itself is built from only three of these gates: OR, AND and XOR.
The one-input gates are kept as library cells. Their tables are reproduced as
published, and nothing in the adder exercises them. Note that this inverter
is a cyclic shift (-1 -> 1 -> 0 -> -1), not a negation. Negation comes from
XOR instead: XOR(x, x) = 2x mod 3 = -x.

## Gate networks of the steps

Each functional block is a small network of library gates:

| block       | output | network                                  | gates  |
|-------------|--------|------------------------------------------|--------|
| `tw_step1`  | T      | `OR(x, y)`                               | 1      |
|             | W      | `r = XOR(XOR(x,y), AND(x,y))`; `W = XOR(r, r)` | 4 |
| `tw_step2`  | T'     | `AND(t, w)`                              | 1      |
|             | W'     | `XOR(XOR(t, w), T')`                     | 1 more |
| `sum_step3` | Sum    | `OR(w', t')`                             | 1      |

Here is why the W' network works. XOR is a+b mod 3, so it equals a+b
whenever |a+b| <= 1. It gives the wrong digit only for 1+1 and -1-1. In those
two cases AND is non-zero, and XOR-ing it in adds 1 or -1 mod 3, which brings
the result back to 0. W is the same expression, negated.

The longest path through the adder is 6 gates deep: 3 gate levels for W in
step one (the first XOR and the AND run in parallel), 2 for W' in step two
and 1 for the sum. The depth does not depend on N.

## Module hierarchy

    optical_adder            M blocks side by side (default M = 6, N = 15)
      bsd_adder_block        one row: N+1 BAUs, transfers wired to the left neighbour
        bau                  one digit position, steps one to three
          tw_step1           T and W, five gates
          tw_step2           T' and W', three gates
          sum_step3          Sum = OR(w', t')
            tri_gate         one gate of the library
    bsd_pkg                  digit type digit_t, gate selector gate_e, gate functions

Ports of `optical_adder`. All digit vectors are packed arrays of `digit_t`,
and index 0 is the least significant digit.

| port      | dir | shape              | meaning                                |
|-----------|-----|--------------------|----------------------------------------|
| `a`, `b`  | in  | `[M-1:0][N-1:0]`   | operand pair of each block             |
| `sum`     | out | `[M-1:0][N:0]`     | N+1-digit sum of each block            |
| `step1_t` | out | `[M-1:0][N:0]`     | T after step one (index 0 always 0)    |
| `step1_w` | out | `[M-1:0][N:0]`     | W after step one                       |
| `step2_t` | out | `[M-1:0][N:0]`     | T' after step two (index 0 always 0)   |
| `step2_w` | out | `[M-1:0][N:0]`     | W' after step two                      |

The step outputs show the intermediate digits of the algorithm. Leave them
open if they are not needed; synthesis removes what is unused. Some of these
outputs are always 0: `step1_t[k][0]`, `step2_t[k][0]` and `step1_w[k][N]`.
They are kept so that the step vectors line up with the sum.

The design is purely combinational. It has no clock, no reset and no
handshake. A sum is valid once the three blocks have settled. To pipeline
the adder, put registers around it, or between the steps inside `bau`.

## Where this RTL departs from the source

- **W and W' use this design's own gate networks.** The source draws each
  of them as a small network of tri-state gates. With the gate tables above,
  those networks do not reproduce the W and W' tables. The tables themselves
  are consistent with the step equations, so the RTL builds W and W' from
  OR/AND/XOR networks that reproduce them exactly (see "Gate networks of the
  steps"). T, T' and the sum use the gates the source names: OR, AND and
  OR.
- **N+1 units per row.** The source describes a row as n units for n-bit
  words, but its figures and worked examples show n+1 result digits. This
  RTL follows the figures.
- **The third worked example.** The source gives operands -4136 and 32644
  and a sum of 28509. These operands sum to 28508, and this design returns
  28508. The other five examples match the published result rows digit for
  digit.
- **Digit encoding and timing** (the 2-bit codes, combinational with no
  clock) are this design's own choices. The source describes only light
  states and parallel optical evaluation.
- **Not built:** the optics (light sources, polarisation rotators,
  detectors), and subtraction and multiplication. The source mentions
  subtraction and multiplication, but it gives a design only for addition.
  In BSD, subtraction only needs the subtrahend's digits negated (+1 and -1
  swapped) before the addition.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_tri_gate` checks all six gates over every input.
- `tb_tw_step1` and `tb_tw_step2` check every input pair against the step
  tables and the step equations.
- `tb_sum_step3` checks that the sum step adds correctly wherever the sum
  fits in one digit.
- `tb_bau` checks all 81 input combinations of one unit.
- `tb_bsd_adder_block` runs the six published 15-digit examples. It compares
  the sum rows digit by digit where the operand spellings are given, and the
  W, T, W' and T' rows of the first example. It then runs 2000 random
  additions. Each one checks the sum value and the step equations at every
  position, and also checks the carry-free property: changing operand
  digit j changes no sum digit above j+2.
- `tb_optical_adder` runs the full default size (6 x 15). It applies the six
  examples to the six blocks at once, then runs 3000 random batches. In each
  batch it checks that changing one block leaves the other blocks' sums
  unchanged. It counts positive and negative transfers in both steps, sums
  that need the extra top digit, and negative sums. Any of these that never
  occurs counts as a failure.

Each testbench has been shown to fail against a broken copy of its module.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/bsd_pkg.sv \
        tb/tb_optical_adder.sv --top-module tb_optical_adder -Mdir obj
    ./obj/Vtb_optical_adder

Replace the testbench name to run another one. The full-size run takes well
under a second.

## Changing the design

- **Word length and number of blocks:** `optical_adder #(.M(..), .N(..))`,
  or `bsd_adder_block #(.N(..))` for a single row. Nothing else depends on
  the sizes. The logic grows linearly in M*N, and the depth stays at three
  functional blocks.
- **Gate behaviour:** edit the functions in `bsd_pkg`. The adder's
  correctness depends only on `tri_or`, `tri_and` and `tri_xor`.
- **Encoding:** `digit_t` is an enum, so a different code assignment needs
  only the enum values changed. The gate functions compare against the
  names, not the raw bits.
