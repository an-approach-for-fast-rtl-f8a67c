# Fast multi-operand BCD addition with signed digit codes

A conventional BCD adder sums two numbers at a time. After every 4-bit
digit add it checks the result and adds 6 when the result is over 9, and
the decimal carry ripples from the lowest digit to the highest. Summing
many numbers that way repeats the ripple once per operand.

This design sums a whole *column* of decimal digits first, with every
column working at the same time. Carries cross column boundaries only at the
end, in a few parallel passes. Two ideas make it work:

* **Signed digit codes.** Before it is added, every digit is recoded so that
  0..5 stay as they are and 6..9 become small negative numbers: the digit
  minus ten, in 4-bit two's complement. Adding two codes is an ordinary 4-bit
  binary add. The overflow and sign bits of that add show the small
  correction it needs, if any. The add also yields a *decimal* carry worth ten.
* **Counted carries.** Inside a column the decimal carries are only
  counted. The column ends as a pair: a sum digit, and the number of tens it
  passes to its left neighbour. Afterwards every column adds its right
  neighbour's count, all columns in the same pass. The passes repeat until no
  carry is left.

The same machinery drives a BCD multiplier. All partial products are formed
at once. The multiplier then sums them column by column and absorbs the
carries in the same way.

The RTL is SystemVerilog-2017 and synthesizable. It is written for
clarity, not for a particular technology. Nothing in it has been timed
against a cell library.

## The digit code

| digit | code | read as signed |
|-------|------|----------------|
| 0..5  | 0000..0101 | 0..5 |
| 6     | 1100 | -4 |
| 7     | 1101 | -3 |
| 8     | 1110 | -2 |
| 9     | 1111 | -1 |

Read as an unsigned number, the code of a digit d >= 6 is d + 6. So a code
`S` with its top bit set is worth `S - 6`, and one with the top bit clear is
worth `S`. This design relies on that rule (`sd_decode` in `bcd_pkg`). Inside
a column, a partial sum can also be 0110 or 0111. By the same rule these are
6 and 7, so the datapath holds twelve patterns: 0000..0111 and 1100..1111.
The patterns 1000..1011 appear only as raw sums, and the correction always
removes them.

## Correcting the sum of two codes (`sd_digit_adder`)

The two 4-bit codes are added as unsigned numbers. That add yields a carry
out of bit 3, and an overflow bit: set when the carry into bit 3 differs from
the carry out of it. Overflow and the new sign bit select one of four cases:

| case | overflow | sign | correction | decimal carry |
|------|----------|------|------------|---------------|
| i    | yes | + | add 1010, drop the carry of that add | carry of the first add |
| ii   | yes | - | add 0110, keep the carry of that add | first carry OR correction carry |
| iii  | no  | + | none | carry of the first add |
| iv   | no  | - | add 1010 **only if the sum is 1000..1011**, drop its carry | carry of the first add |

Why it works, in short: add the two codes' worth (per the rule above), and
compare with the raw binary sum. They differ by a multiple of 6, set by how
many top bits the inputs had, the carry out, and the sign of the result. The
table adds or removes exactly that 6.
* Case ii is two positive digits whose sum spills into the sign bit, for
  example 5 + 5 = 1010. The correction adds 6 and produces the decimal carry.
* In case iv, a sum of 1000..1011 comes with a carry out: the 16 already
  counted ten plus a surplus of 6, which is removed. A sum of 1100..1111 is
  already a valid code for 6..9 and must stay as it is.
* Case i needs an input of the form 10xx, which this datapath never holds.
  It is built as specified but never taken; synthesis finds its count output
  constant zero.

The restriction in case iv is this design's reading of the method. The
method's rule text says to add 1010 to every negative sum without overflow.
Its own worked steps, however, keep 1111 (6 + 3 = 9) and 1101 unchanged, and
correct only 1011. Adding 1010 to 1111 would give 1001, which the code rule
reads as 3. The testbench checks all 144 pairs of the twelve patterns
exhaustively: with the restriction, the value is exact and the result is
always one of the twelve patterns.

## Summing a column (`column_accumulator`)

The column's digits are recoded (`sd_encoder`). Then they are added one by one
into a running partial sum: a chain of `N_OPS-1` corrected digit adders. The
decimal carries are counted. The result is `10 * carry_cnt + value(sum)`.
For example, the column 9, 8, 9, 8, 9, 8 gives a count of 5 and a sum of
0001 (51). The chain is combinational. With at most 11 operands, a column's
count stays at or below 9, so it fits one BCD digit.

## Absorbing the carries (`carry_resolver`)

`W` columns go in, each a sum code `S[i]` and a count `C[i]`. One count is
worth one unit of the column to its left. In one pass, every column `i > 0`
adds the recoded `C[i-1]` to `S[i]` with a corrected digit adder, and the
decimal carries produced (0 or 1) form the new count vector. Nothing ripples
within a pass, so a pass is one digit-adder delay. When no count is left, the
codes are decoded to BCD.

Example, six three-digit addends 929 + 838 + 619 + 788 + 159 + 278:

| | thousands | hundreds | tens | units |
|---|---|---|---|---|
| column sums (count, code) | - | 3, 0011 | 2, 1100 | 5, 0001 |
| after pass 1 | 3 | 3+2 = 5 | 6+5 = 11: 1, carry 1 | 1 |
| after pass 2 | 3 | 5+1 = 6 | 1 | 1 |

The result is 3611, after two passes. The number of passes depends on the data:
* 0 when no column produced a carry;
* mostly 1 or 2 for random operands;
* up to `W-1` when a carry has to run through a string of nines (990 + 5 + 5).

Timing is one pass per clock. `start_i` loads the columns; `done_o` pulses
`passes_o + 1` cycles later. The result then holds until the next start. The
resolver asserts that no carry ever has to leave the top column; every user
sizes `W` so that this cannot happen.

## Multiplying (`bcd_multiplier`)

Multiplying two N-digit numbers X and M takes three phases:

1. **Partial products** (`partial_product_row`, one per digit `m[j]`, all
   running in parallel). Each digit product `x[i]*m[j]` gives two digits,
   `r[i]` (tens) and `s[i]` (units), from `digit_multiplier`. Each tens digit
   then has to be added to the units digit one place to the left, and that
   add can carry again. This is the same carry absorption, so the row feeds
   the `r` digits in as counts and the recoded `s` digits in as sums. Example:
   899 x 6 gives the terms 48 54 54. They become 4, 13, 9, 4 and then
   5, 3, 9, 4 = 5394.
2. **Column sums.** Row `j` is shifted left by `j` digits. Each of the 2N
   product columns sums the row digits that fall into it with a
   `column_accumulator`; missing positions are 0. For 899 x 678 the rows are
   5394, 6293 and 7192, and the column totals are 5, 9, 18, 14, 12, 2.
3. **Final absorption.** One `carry_resolver` over 2N columns, giving
   609522 in the example.

A small controller starts all rows together. When the slowest row has
finished, it starts the final absorption. Latency from `start_i` to `done_o`
is `3 + row_passes_o + final_passes_o` cycles.

## Modules

| module | role | clocked |
|---|---|---|
| `bcd_pkg` | digit/code types, `sd_encode`, `sd_decode`, correction-case enum | - |
| `sd_encoder` | digit to code | no |
| `sd_digit_adder` | two codes to corrected code and decimal carry | no |
| `column_accumulator` | one column to (count, code) | no |
| `carry_resolver` | parallel carry absorption passes | yes |
| `digit_multiplier` | digit x digit to two digits | no |
| `partial_product_row` | X x one digit | yes |
| `bcd_multi_operand_adder` | `N_OPS` numbers of `N_DIGITS` digits to an `N_DIGITS+1`-digit sum | yes |
| `bcd_multiplier` | N x N digits to a 2N-digit product | yes |
| `fast_bcd_top` | adder and multiplier side by side, independent handshakes | yes |

Conventions used throughout:
* Digits are unpacked arrays of 4-bit BCD, and index 0 is the least
  significant digit.
* Reset is asynchronous and active low.
* `start_i` is a one-cycle pulse, accepted while the unit is idle.
* Operands must stay steady until `done_o`, a one-cycle pulse.
* `busy_o` is high between the two.

The adder also reports `case_cnt_o`: for the operands now applied, how many
column additions took each correction case.

## Parameters and limits

| parameter | default | limit | why |
|---|---|---|---|
| `fast_bcd_top.ADD_OPS` / `bcd_multi_operand_adder.N_OPS` | 6 | 2..10 | sum must fit `N_DIGITS+1` digits |
| `ADD_DIGITS` / `N_DIGITS` | 3 | >= 1 | |
| `MUL_DIGITS` / `bcd_multiplier.N` | 3 | 2..11 | column counts must fit one digit |
| `column_accumulator.N_OPS` | 6 | 2..11 | count must fit one digit |
| `carry_resolver.W` | 4 | >= 2 | set by the user |

The defaults are the sizes of the method's worked examples: six three-digit
addends, and a three-by-three digit product. Sizes outside the limits stop
elaboration with an `$error`.

## Where the design departs from, or adds to, the method

* Case iv corrects only 1000..1011; see above.
* Case iii keeps 0110 and 0111 as they are, as the method says. The decoder
  therefore reads any code with a clear top bit as its binary value.
* A carry count of 6..9 is recoded like a digit before it is added to the
  neighbouring column. The method's example only adds counts up to 5, where
  recoding changes nothing.
* The following are this design's own choices:
  * the clocked schedule (one pass per cycle);
  * the handshake and reset;
  * the way the multiplier waits for its slowest row;
  * the digit product circuit (a binary multiply, then a split into tens and
    units by comparison).
* No speed or area figures are claimed. The column chain is
  `N_OPS-1` digit adders deep and combinational. Whether a pass per cycle,
  or several, suits a given clock is left to the integrator.

## Simulating

Each module has a self-checking testbench in `tb/`. Each compares the
results with integer arithmetic, checks the cycle counts, and prints
`TB_RESULT checks=N failures=M`. What they cover:
* `tb_sd_digit_adder` covers every code pair.
* `tb_fast_bcd_top` runs the whole unit at its default sizes, with the adder
  and the multiplier working at the same time. It runs all the worked
  examples and thousands of random operand sets. It also requires that
  correction cases ii, iii and iv occur, that adder runs with 0, 1, 2 and 3
  passes occur, and that multi-pass rows and final absorptions occur.

With Verilator 5 (list the package first):

```
verilator --binary --timing --assert -Irtl rtl/bcd_pkg.sv \
    $(ls rtl/*.sv | grep -v bcd_pkg) tb/tb_fast_bcd_top.sv --top tb_fast_bcd_top
./obj_dir/Vtb_fast_bcd_top
```

Replace `tb_fast_bcd_top` with any other testbench name to test one module.
Each full run takes well under a second.

Lint reports two warnings:
* `SYNCASYNCNET`: the reset is used asynchronously in the flops and in the
  `disable iff` of the assertions.
* `PINCONNECTEMPTY`: the rows' `done_o` is left open, because the multiplier
  watches `busy_o` instead.
