# 8x8 Dadda multiplier with 5:2 compressors

An unsigned 8-bit by 8-bit multiplier whose partial product matrix is
reduced by a Dadda-style tree in which the last, widest stage is a row of
exact 5:2 compressors. A 5:2 compressor takes five bits of one column plus
two carries from the column below and leaves one bit in its own column and
one in the next, passing two more carries sideways. A row of them turns five
rows of bits into two in the delay of three full adders, with no carry
ripple along the row. With one ordinary half/full adder stage in front, the
eight-row matrix is down to two rows after two stages, where a half/full
adder Dadda tree needs four (8 -> 6 -> 4 -> 3 -> 2). A carry-propagate adder
then adds the two rows.

The whole multiplier is combinational: `p = a * b` for 8-bit `a`, `b` and a
16-bit `p`, with no clock, reset or registers.

## Structure

```
a,b ──> partial_product_gen ──pp[8][8]──> dadda_reduction_8x8 ──row_a,row_b──> final_adder ──> p
                                            stage 1: 9 FA + 6 HA
                                            stage 2: HA, 4:2, 8 x 5:2, FA, HA
```

| file | module | what it is |
|---|---|---|
| `rtl/dadda_pkg.sv` | package | `N = 8`, `PW = 16`, operand/product/matrix types |
| `rtl/dadda_multiplier_8x8.sv` | top | wires the three parts together |
| `rtl/partial_product_gen.sv` | `partial_product_gen #(N)` | AND array, `pp[i][j] = a[j] & b[i]` (weight `2^(i+j)`) |
| `rtl/dadda_reduction_8x8.sv` | reduction tree | the two stages below |
| `rtl/compressor_5_2.sv` | exact 5:2 compressor | three full adders in series |
| `rtl/compressor_4_2.sv` | exact 4:2 compressor | two full adders in series |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | cells | |
| `rtl/final_adder.sv` | `final_adder #(W)` | `s = a + b` |

## The compressors

Every input of a compressor has the same weight as its Sum output; every
other output has twice that weight.

**5:2** — inputs X1..X5, Cin1, Cin2; outputs Sum, Carry, Cout1, Cout2:

```
FA1: X1 + X2 + X3      -> s1,  Cout1
FA2: s1 + X4 + X5      -> s2,  Cout2
FA3: s2 + Cin1 + Cin2  -> Sum, Carry

X1+X2+X3+X4+X5+Cin1+Cin2 = Sum + 2*(Carry + Cout1 + Cout2)
```

**4:2** — inputs X1..X4, Cin; outputs Sum, Carry, Cout:

```
FA1: X1 + X2 + X3  -> s1,  Cout
FA2: s1 + X4 + Cin -> Sum, Carry
```

The point of this input order is that the Cout outputs depend only on the
X inputs. Wiring a compressor's Couts to the Cins of the next more
significant one therefore creates no path that ripples along the row. The
longest path through a 5:2 row is FA1 -> FA2 -> FA3 of one compressor,
or FA1 -> FA2 of one compressor and then the last FA of the next.

## The reduction tree

Columns are numbered by weight, 0 to 15. The 8x8 AND array puts
1,2,3,4,5,6,7,8,7,6,5,4,3,2,1 bits into columns 0..14.

**Stage 1** is a Dadda stage: as few half and full adders as possible, with
each column's carries counted in the next column. It brings the column
heights to what stage 2 consumes:

```
column   0 1 2 3 4 5 6 7 8 9 10 11 12 13 14 15
before   1 2 3 4 5 6 7 8 7 6  5  4  3  2  1  0
after    1 2 3 4 5 5 5 5 5 5  5  5  1  2  1  1
```

Full adders sit in columns 6, 7, 7, 8, 8, 9, 9, 10 and 12, half adders in
columns 5, 6, 7, 8, 13 and 14.

**Stage 2** is the compressor stage and leaves at most two bits per column:

| column | cell | result |
|---|---|---|
| 0, 1 | none | 1 and 2 bits |
| 2 | half adder on two of the three bits | sum + the third bit; the carry becomes the 4:2's Cin |
| 3 | 4:2 compressor on four bits + that carry | Sum; Carry into column 4, Cout into column 4's Cin1 |
| 4..11 | one 5:2 compressor each, on the column's five bits | Sum here, Carry in the next column; Cout1/Cout2 into the next compressor's Cin1/Cin2 |
| 12 | full adder on the column's bit + column 11's Cout1, Cout2 | sum + column 11's Carry |
| 13 | half adder on its two bits | sum + column 12's carry |
| 14, 15 | none | 2 bits and 1 bit |

Column 4's compressor gets the 4:2's Cout on Cin1 and a constant 0 on Cin2.
Sums and untouched bits form `row_a`, carries form `row_b`. `row_b` bits 0,
3 and 15 are always zero. The two rows always add up to `a*b`, so the final
16-bit addition can never overflow and its carry out is dropped.

## How far this follows the design it was built from

Taken from the design: unsigned 8x8 operands; exact (not approximate)
compressors; the 5:2 compressor as three full adders in series with ports
X1..X5, Cin1, Cin2, Sum, Carry, Cout1, Cout2; the 4:2 compressor as two full
adders in series with Cin from the lower compressor and Cout to the higher
one; and the column sequence of the compressor stage (half adder, then 4:2,
then 5:2 compressors up the middle, then a full adder and a half adder at the
top end).

This implementation's own choices:

- **Stage 1.** The column-by-column description treats columns 4..11 as
  holding five bits each, but the 8x8 array has up to eight bits per column.
  The description is therefore read as the last stage, and the Dadda adder
  stage in front of it is this implementation's.
- Which input of a compressor meets which full adder. The order above keeps
  Cout independent of Cin.
- The AND-array partial products and the final adder, written as a plain `+`
  so that synthesis (or an FPGA carry chain) picks its structure.
- No pipeline registers.

Not built:

- Other sizes. The tree is wired by hand for 8x8, and the package's `N` only
  sizes types. A 16x16 or 32x32 version (a 32-bit variant was also
  evaluated) needs a new reduction tree.
- Signed operands.
- The reconfigurable approximate compressors that earlier work uses as a
  point of comparison.
- Circuit-level delay and power figures for the compressor (about 25.5 ns
  and 29 uW in a transistor-level simulation). These describe an
  implementation, not function.

## Testbenches

Each testbench in `tb/` checks itself, prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_half_adder`, `tb_full_adder` | all input combinations |
| `tb_compressor_4_2` | all 32 input combinations against the weighted-sum identity; Cout unchanged when Cin flips |
| `tb_compressor_5_2` | all 128 combinations against the identity; Cout1/Cout2 unchanged by Cin1/Cin2 |
| `tb_partial_product_gen` | every bit of the array for all 65536 operand pairs |
| `tb_final_adder` | corner cases and 20000 random pairs |
| `tb_dadda_reduction_8x8` | `row_a + row_b = a*b` for all 65536 AND arrays; 50000 random bit matrices against their weighted sum |
| `tb_dadda_multiplier_8x8` | `p = a*b` for all 65536 pairs. It also counts how often each carry path of the compressor stage is used: the HA carry into the 4:2, the 4:2 Cout into the 5:2 chain, both Cins of a 5:2 set at once, the chain's last Couts into the column-12 FA, the column-13 HA carry, and a carry in the final adder. A path that is never used counts as a failure. |

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/dadda_pkg.sv tb/tb_dadda_multiplier_8x8.sv \
  --top-module tb_dadda_multiplier_8x8 -o sim
./obj_dir/sim
```

The package is given first; `-Irtl` lets Verilator find every module in
`rtl/<module>.sv`. For another block, swap in its testbench.

Each testbench runs in well under a second. The multiplier testbench checks
the design exhaustively at its only size.
