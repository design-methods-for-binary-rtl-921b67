# 16-bit binary to BCD converter from weighted-sum look-up tables

This converter turns a 16-bit unsigned binary number `x` (0..65535) into
five BCD digits `y4 y3 y2 y1 y0` without any iterative shift-and-add-3
loop and without one huge conversion table. Its idea is that every power
of two can be written out in decimal, so the contribution of the input bits
to each decimal position is a *weighted sum* of those bits:

```
z_j = sum_i  d_j(2^i) * x_i        d_j(v) = j-th decimal digit of v
x   = 10^4 z4 + 10^3 z3 + 10^2 z2 + 10 z1 + z0
```

Each `z_j` is small (at most 75) and is evaluated by a short chain of small
memories (a *LUT cascade*). Where it pays, a sum is split into two halves
over disjoint inputs, each half gets its own cascade, and a binary adder
joins them (an *arithmetic decomposition*). The last memory of every
position returns its sum already split into a decimal digit and a carry,
and a ripple of four decimal adders folds the carries upward. All of it is
combinational: 14 small ROMs, three binary adders and four decimal adders.

## The weights

The decimal digits of `2^15 .. 2^0` give the weights. Reading down a
column gives the decimal expansion of one power of two (e.g. `2^15 =
32768`).

| position | 2^15 | 2^14 | 2^13 | 2^12 | 2^11 | 2^10 | 2^9 | 2^8 | 2^7 | 2^6 | 2^5 | 2^4 | 2^3 | 2^2 | 2^1 | 2^0 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| 10^4 | 3 | 1 | | | | | | | | | | | | | | |
| 10^3 | 2 | 6 | 8 | 4 | 2 | 1 | | | | | | | | | | |
| 10^2 | 7 | 3 | 1 | 0 | 0 | 0 | 5 | 2 | 1 | | | | | | | |
| 10^1 | 6 | 8 | 9 | 9 | 4 | 2 | 1 | 5 | 2 | 6 | 3 | 1 | | | | |
| 10^0 | 8 | 4 | 2 | 6 | 8 | 4 | 2 | 6 | 8 | 4 | 2 | 6 | 8 | 4 | 2 | 1 |

So, for instance, `z4 = x14 + 3 x15` and
`z2 = (x7 + x13) + 2 x8 + 3 x14 + 5 x9 + 7 x15`. Zero weights simply
leave an input out of a position.

## How one position is evaluated: the LUT cascade

A cascade cell (`ws_lut`) is a ROM addressed by `{rail, x_sub}`: `rail`
is the partial sum handed on by the previous cell, `x_sub` the few input
bits that enter at this cell. The cell stores `rail + sum w_i x_i`. Its
output is just wide enough for the largest partial sum, so the rail stays
narrow (2 to 5 bits here) and each ROM stays small. Inputs are taken in
order of increasing weight so that the rail grows slowly; neighbouring
cells are merged where that does not cost memory.

The last cell of a position stores `{z / 10, z % 10}` instead of `z`:
the low four bits are a BCD digit, the upper bits the carry into the
next position. The ROM contents are not typed in anywhere: `ws_lut`
computes them at elaboration time from its `WEIGHTS`, `RAIL_W`, `X_N`,
`OUT_MODE`, `MODULUS` and `LOW_W` parameters, using exactly the formula
above.

## The units position (the subtle one)

`z0 = x0 + 2c` with

```
c = (x1+x5+x9+x13) + 2(x2+x6+x10+x14) + 3(x4+x8+x12) + 4(x3+x7+x11+x15)    0..37
```

Two facts shrink this position:

* `2c` is even, so `x0` is the least-significant bit of `y0` as it
  stands, and only `c` needs memories.
* The units digit of `2c` is `2 (c mod 5)` and the carry out of it is
  `c / 5`. So the last cell stores `{c / 5, c % 5}` with a 3-bit low
  field; `y0 = {c % 5, x0}` and the 3-bit carry (0..7) goes to the tens
  adder.

`c` is decomposed into two halves that each fit a 4-bit number:

```
A = x13 + 2(x6+x10+x14) + 3 x12 + 4 x7         0..14   cells: {x13,x6,x10,x14} -> 3-bit rail -> {x12,x7}
B = x1+x5+x9 + 2 x2 + 3(x4+x8) + 4 x3           0..15   cells: {x1,x5,x9} -> 2-bit rail -> {x2,x4,x8,x3}
A + B                                           0..29   4-bit binary adder, 5-bit sum
c = (A + B) + 4(x11 + x15)                      0..37   last cell, 7 address bits, 6 outputs
```

## The other positions

| position | module | structure | value range | digit / carry out |
|---|---|---|---|---|
| tens | `ws_digit1` | `P = 6x6+4x11+3x5+2x7` (one cell) + `Q = 6x15+5x8+2x10+x9+x4` (one cell), 4-bit adder, last cell adds `8x14+9(x12+x13)` | 0..56 | 4 bits / 3 bits (0..5) |
| hundreds | `ws_digit2` | cell `x7+x13+2x8+3x14` on a 3-bit rail, last cell adds `5x9+7x15` | 0..19 | 4 bits / 1 bit |
| thousands | `ws_digit3` | `A = x10+4x12+2x15` (one cell) + `B = 2(3x14+x11)`, 4-bit adder, last cell adds `8x13` | 0..23 | 4 bits / 2 bits (0..2) |
| 10^4 | `ws_digit4` | one cell `x14+3x15` | 0..4 | 3-bit value, no carry |

In the thousands position the `B` cell stores only `3x14 + x11` (0..4,
three bits) and a constant 0 is appended below its output to double it.
That keeps the cell at three output bits although `6x14 + 2x11` reaches 8.

## The decimal ripple

Four decimal adders (`bcd_adder`) combine the positions:

```
y0 = units digit                         (no adder)
y1 = d1 + k0            (+0)     -> c1   k0 = units carry, 0..7
y2 = d2 + k1            + c1     -> c2   k1 = tens carry, 0..5
y3 = d3 + k2            + c2     -> c3   k2 = hundreds carry, 0..1
y4 = z4 + k3            + c3             k3 = thousands carry, 0..2
```

Each adder forms the binary sum `t = a + b + cin` and, if `t >= 10`,
outputs `t - 10` with `cout = 1`. With these operand ranges `t` never
exceeds 16, so one correction suffices. `y4` is at most 6, so its top bit
is tied to 0 and the last adder's carry-out and sum bit 3 are unused
(the lint tools report those two unused bits; they are intentional).

## Memory budget

| position | cells (memory bits) | total |
|---|---|---|
| units | 48, 128, 16, 256, 768 | 1216 |
| tens | 64, 128, 1792 | 1984 |
| hundreds | 48, 160 | 208 |
| thousands | 24, 12, 192 | 228 |
| 10^4 | 12 | 12 |
| **all** | 14 cells | **3648** |

A cell with `a` address bits and `o` output bits holds `2^a * o` bits.
For comparison, a single ROM holding the whole conversion needs
`2^16 * 19 = 1,245,184` bits. The structure has also been accounted at
3788 bits, because it counts two cells larger than their inputs require:
the second cell of the `A` half of the units position (3-bit rail plus
x12, x7: 5 address bits, 128 bits, counted as 256), and the `B` cell of
the thousands position (x14, x11: 2 address bits, 12 bits, counted as 24).
This RTL builds them at the size their inputs need; the function is the
same either way.

## Interface and timing

```systemverilog
module bin2dec16 (
  input  logic [15:0]           x,   // unsigned binary
  output bin2dec_pkg::bcd_t [4:0] y  // y[0] units ... y[4] ten-thousands
);
```

There is no clock and no reset: the output follows the input
combinationally. The longest path is two ROM levels, a 4-bit binary adder,
one ROM level and the four-adder decimal ripple. If the converter is used
in a clocked design, register `x` and/or `y` around it; the ROMs are
asynchronous-read and map to LUT logic or distributed ROM.

## Files

| file | contents |
|---|---|
| `rtl/bin2dec_pkg.sv` | widths, the `bcd_t` digit type, the `lut_out_e` cell output encoding |
| `rtl/ws_lut.sv` | one cascade cell; ROM computed from its parameters |
| `rtl/bin_adder.sv` | binary adder joining two decomposed halves |
| `rtl/bcd_adder.sv` | decimal digit adder with carry in/out |
| `rtl/ws_digit0.sv` .. `rtl/ws_digit4.sv` | the cascades of the five decimal positions |
| `rtl/bin2dec16.sv` | top: the five cascades and the decimal ripple |
| `tb/tb_ref_pkg.sv` | reference `ws_ref(j, x)` computed by integer division |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops through
a watchdog if it stalls.

* `tb_bin2dec16` applies all 65536 inputs and checks each digit against
  `(x / 10^j) % 10`. It also counts, from the reference sums, that every
  carry path was exercised: a carry out of each cascade, a decimal carry
  out of each of the first three adders, a full three-carry ripple (1000
  inputs) and the `x0` bypass. All counts are non-zero.
* `tb_ws_digit0..3` apply all 65536 inputs to one position and check the
  digit and carry against the reference sum, and that the largest sum
  reaches the top of the position's range (75, 56, 19, 23).
* `tb_ws_lut` checks four cell shapes (binary and split outputs, with and
  without a rail) at every address, and their memory sizes.
* `tb_bin_adder` and `tb_bcd_adder` are exhaustive over their operand
  ranges.

Run one with Verilator, for example:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bin2dec_pkg.sv tb/tb_ref_pkg.sv tb/tb_bin2dec16.sv --top-module tb_bin2dec16
./obj_dir/Vtb_bin2dec16
```

The full 16-bit run takes well under a second.

## Where this RTL makes its own choices

* No registers, no clock, no reset: the converter is described as pure
  look-up tables and adders.
* The decimal adders use compare-with-10 and subtract. Other decimal
  adder circuits (for example excess-6 coding with a correcting subtractor)
  would do equally well.
* The cell output encodings (`{z/10, z%10}`, and `{c/5, c%5}` for the
  units position) are derived from the digit and carry bus widths and the
  `x0` bypass. The thousands `B` cell storing a halved value with a zero
  appended is likewise a reading of the bus widths.
* Two cells are smaller than in the 3788-bit count (see *Memory
  budget*).

## Changing it

* Another cell layout: change the `ws_lut` instances in a `ws_digitN`
  module. The elaboration-time checks in `ws_lut` stop elaboration if
  `OUT_W` cannot hold the largest stored value.
* Another radix pair: the same scheme holds for any source radix `p`
  and target radix `q`. Replace the decimal digits of `2^i` by the base-`q`
  digits of `p^i` in the weights, set `MODULUS` to `q`, and replace
  `bcd_adder` by a base-`q` digit adder. The cell module needs no change
  for binary inputs.
