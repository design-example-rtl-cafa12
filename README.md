# Division by a small constant as a ripple array

Dividing a binary number by a fixed small divisor β (3, 10, ...) needs no
general divider. Long division in base 2 handles the dividend one bit at a
time, from the most significant end. It carries only a partial remainder from
one bit to the next, and that remainder is always less than β. So the whole
division is a one-dimensional chain of identical 1-bit cells, shaped like a
ripple-carry adder run backwards. The "carry" is the partial remainder, a few
bits wide, and it moves from the most significant bit towards the least
significant one.

This repository holds synthesizable SystemVerilog for that idea and for two
applications of it:

* a 4-bit divide-by-3 array, built from a hand-derived 1-bit cell;
* a 14-bit binary to 4-digit decimal converter, built from three cascaded
  divide-by-10 arrays.

Everything is combinational. There is no clock, no register and no reset. An
output is valid once the carry has rippled through its chain.

## The arithmetic

An n-bit array with carry-in `c_n` and dividend `a` produces an n-bit quotient
`s` and a remainder `c_0`:

    2^n * c_n + a = β * s + c_0,      0 <= c_n, c_0 < β

The carry-in is the part of the dividend above bit n-1. With `c_n = 0` the
array gives plain `a / β` and `a mod β`. With a nonzero `c_n`, several arrays
can be cascaded into a wider divider: the remainder of the upper array becomes
the carry-in of the lower one.

Each cell handles one bit. It takes the carry `c` (< β) from its more
significant neighbour and its dividend bit `a`. It forms `2c + a` and splits it
into quotient bit `s` and outgoing carry `d`:

    2 * c + a = β * s + d,            0 <= c, d < β

Since `c <= β-1`, `2c + a <= 2β-1`. The quotient of one cell is therefore a
single bit, and the cell only has to decide whether `2c + a >= β`. The carry
needs `m` bits, the smallest `m` with `2^m >= β`: 2 bits for β = 3 and 4 bits
for β = 10.

Carry values of β or more never occur inside an array, provided the external
`c_n` is below β. Cells may do anything with them.

## The divide-by-3 cell (`div3b1`)

For β = 3 the cell has three inputs (`c1 c0 a`) and three outputs
(`s d1 d0`). Its truth table:

| c | a | 2c+a | s | d |
|---|---|------|---|---|
| 0 | 0 | 0    | 0 | 0 |
| 0 | 1 | 1    | 0 | 1 |
| 1 | 0 | 2    | 0 | 2 |
| 1 | 1 | 3    | 1 | 0 |
| 2 | 0 | 4    | 1 | 1 |
| 2 | 1 | 5    | 1 | 2 |
| 3 | x | -    | don't care | don't care |

Using the two don't-care rows, Karnaugh maps give these equations:

    s  = c1 | a & c0
    d1 = ~a & c0 | a & c1
    d0 = ~a & c1 | a & ~c1 & ~c0

The module offers three equivalent descriptions, selected by the parameter
`ARCH` of type `divconst_pkg::div3_arch_e`:

| `ARCH`        | description                                                  |
|---------------|--------------------------------------------------------------|
| `DIV3_SOP`    | the equations above (default)                                |
| `DIV3_TABLE`  | `{s,d1,d0}` read from an 8-entry constant array indexed by `{c,a}` |
| `DIV3_DIVREM` | `s = {c,a} / 3`, `d = {c,a} % 3` with the language operators |

All three agree on the six legal rows. For `c = 3` they differ. The table
returns `000` there, because a two-state constant cannot hold a don't care.
The other two return whatever their logic produces. A synthesis tool is
expected to reduce all three to a few gates.

## The arrays (`div3bn`, `divk_b1`, `divk_bn`)

`div3bn` chains `N` `div3b1` cells (default `N = 4`). The carry net `cc[N:0]`
runs from `cc[N] = ec` down to `ed = cc[0]`. Cell `i` reads `cc[i+1]` and
`ea[i]`, writes `cc[i]`, and produces `es[i]`. At the default size it satisfies
`16*ec + ea = 3*es + ed`.

`divk_b1` is the cell for any β >= 2 (parameter `BETA`, default 10). It uses
the plainest circuit for the relation above. It builds `t = {c, a}`, compares
it with β, and subtracts β when `t >= β`. The carry width `M` comes from
`divconst_pkg::carry_width(BETA)`.

`divk_bn` is the general array: `N` `divk_b1` cells with the same wiring as
`div3bn`. The defaults (`BETA = 10`, `N = 14`) are those of the converter's
first stage.

## Binary to decimal (`bin2dec`)

Repeated division by the target radix turns a binary number into decimal
digits: every division by 10 strips off the lowest digit as its remainder. Four
digits cover 0..9999, and 9999 needs 14 bits. Each stage is only as wide as its
input can be:

| stage | array width | input range | remainder | quotient range |
|-------|-------------|-------------|-----------|----------------|
| 1     | 14 bits     | 0..9999     | `d[0]`    | 0..999 (10 bits) |
| 2     | 10 bits     | 0..999      | `d[1]`    | 0..99 (7 bits)   |
| 3     | 7 bits      | 0..99       | `d[2]`    | 0..9 = `d[3]`    |

All carry-ins are 0. The output is a packed array of four `bcd_digit_t`, with
`d[0]` the least significant digit. The longest path ripples through
14 + 10 + 7 = 31 cells.

Inputs from 10000 to 16383 fit the port but are outside the converter's range.
To report them, this design adds an output, `in_range`, which is high exactly
when `a <= 9999`. It comes from the arrays' own quotients:
`a <= 9999` ⇔ stage-1 quotient <= 999 ⇔ stage-3 quotient <= 9. The stage-1
quotient must also fit in the 10 bits passed on. Out of range, the digits are
not meaningful.

## Top level (`divconst_top`)

The top places the two applications side by side. They share no signals.

| port           | dir | width | meaning                                  |
|----------------|-----|-------|------------------------------------------|
| `div3_ec`      | in  | 2     | divide-by-3 carry-in, 0..2               |
| `div3_ea`      | in  | 4     | divide-by-3 dividend                     |
| `div3_ed`      | out | 2     | remainder, 0..2                          |
| `div3_es`      | out | 4     | quotient                                 |
| `b2d_a`        | in  | 14    | binary input                             |
| `b2d_d`        | out | 4×4   | decimal digits, `[0]` least significant  |
| `b2d_in_range` | out | 1     | `b2d_a <= 9999`                          |

Shared types and constants are in `divconst_pkg`: `carry_width()`, the
`div3_arch_e` enum, `bcd_digit_t`, and the converter's sizes.

## Where this design makes its own choices

* **Width parameter.** `div3bn`'s `N` is the dividend width (4). It is not the
  index of the most significant bit.
* **Cell architecture.** The divide-by-3 cell's three architectures live in one
  module, chosen by a parameter. The default is the equations.
* **General cell.** The internals of the general β cell (compare and subtract)
  are this design's own. Only its input/output relation is specified.
* **Range flag.** `in_range` on the converter is an addition.
* **No checks on bad carries.** There are no run-time checks for carry-ins of β
  or more. The results for them are unspecified.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
arithmetic done in the testbench, prints `TB_RESULT checks=N failures=M`, and
stops itself with a watchdog. All of them are exhaustive over the legal
inputs:

* `tb_div3b1`: all three architectures, every legal `(c, a)`.
* `tb_div3bn`: the 4-bit array in all three architectures, plus an 8-bit
  array, over every `ec` in 0..2 and every dividend.
* `tb_divk_b1`: β = 10, 3, 5, 7 and 16, every legal carry.
* `tb_divk_bn`: 14 bits by 10 with every carry-in 0..9 and every dividend,
  plus 8 bits by 3 and 6 bits by 7.
* `tb_bin2dec`: all 16384 inputs; digits below 10000 and `in_range` everywhere.
* `tb_divconst_top`: the whole design at its default parameters. It runs both
  applications exhaustively. It also counts the events below, and an event
  that never occurs counts as a failure:
  * nonzero carry-ins to the divide-by-3 array;
  * each remainder value;
  * each digit value at each position;
  * flagged out-of-range inputs.

Each testbench was also run against a deliberately broken copy of its module,
and each one detected the break.

To simulate one, for example the top:

    verilator --binary --timing --assert -Wall -Wno-UNUSEDPARAM \
        rtl/divconst_pkg.sv rtl/div3b1.sv rtl/div3bn.sv rtl/divk_b1.sv \
        rtl/divk_bn.sv rtl/bin2dec.sv rtl/divconst_top.sv \
        tb/tb_divconst_top.sv --top-module tb_divconst_top
    ./obj_dir/Vtb_divconst_top

Each simulation takes well under a second. Lint with `verilator --lint-only
-Wall` gives only `UNUSEDPARAM` warnings: some of the package's constants are
not read by every module.

## Files

| file | contents |
|------|----------|
| `rtl/divconst_pkg.sv` | package: carry width, cell architecture enum, digit type, converter sizes |
| `rtl/div3b1.sv` | 1-bit divide-by-3 cell, three architectures |
| `rtl/div3bn.sv` | N-bit divide-by-3 array |
| `rtl/divk_b1.sv` | 1-bit divide-by-β cell |
| `rtl/divk_bn.sv` | N-bit divide-by-β array |
| `rtl/bin2dec.sv` | 14-bit binary to 4-digit decimal converter |
| `rtl/divconst_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
