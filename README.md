# 4x4 Vedic multiplier with MUX-based full adders

This is a combinational unsigned 4x4-bit multiplier. It is organised after the
*Urdhva Tiryagbhyam* ("vertically and crosswise") rule of Vedic arithmetic.
Every bit of one operand is ANDed with every bit of the other. The sixteen
products are then summed column by column, one column per output weight, and
each column passes its carry on to the next one, as in long multiplication by
hand. The goal is a short critical path. Columns are first reduced in parallel
by small adders. A single ripple row then resolves them. Every full adder is
built from one XOR gate and two 2:1 multiplexers instead of the usual
XOR/AND/OR form.

```
p[7:0] = a[3:0] * b[3:0]      (unsigned, purely combinational)
```

## The method in one picture

Write the operands along two sides of a 4x4 grid. Cell (i, j) holds
`a[i] & b[j]`, of weight 2^(i+j). The cells with the same i + j lie on one
diagonal ("crosswise line"). Working from the right, each diagonal's bits
are added to the carry left over from the previous diagonal. The LSB of that
sum is the product bit and the rest is the carry into the next diagonal.
For 1111 x 1111 the diagonals hold 1, 2, 3, 4, 3, 2, 1 ones and the result is
11100001 (225).

## Column map of `vedic_mul4x4_mux`

Understanding the design mostly means understanding this map. The work is
split into two rows of adders:

* **Top row.** Each column is reduced on its own, in parallel with the
  others. A three-bit column gets a full adder (FA). The four-bit column gets
  the four-input adder. A two-bit column gets a half adder (HA).
* **Bottom row.** The top-row results are added to the carries from the
  column to the right. This gives one product bit per column.

| column (weight) | partial products          | top row                                   | bottom row                                        | out  |
|-----------------|---------------------------|-------------------------------------------|---------------------------------------------------|------|
| 0 (1)           | a0b0                      | none                                      | none                                              | p[0] |
| 1 (2)           | a0b1, a1b0                | HA -> sum is p[1]                         | none                                              | p[1] |
| 2 (4)           | a0b2, a1b1, a2b0          | FA                                        | HA(FA sum, col-1 HA carry)                        | p[2] |
| 3 (8)           | a0b3, a1b2, a2b1, a3b0    | four-input adder -> s0 (8), s1 (16), c0 (32) | FA(s0, col-2 FA carry, col-2 HA carry)         | p[3] |
| 4 (16)          | a1b3, a2b2, a3b1          | FA                                        | FA(FA sum, s1, col-3 carry)                       | p[4] |
| 5 (32)          | a2b3, a3b2                | FA(a2b3, a3b2, col-4 top FA carry)        | FA(FA sum, c0, col-4 carry)                       | p[5] |
| 6 (64)          | a3b3                      | none                                      | FA(a3b3, col-5 top FA carry, col-5 carry)         | p[6], carry = p[7] |

Column 5 has only two products, so its top FA has a free input. That input
takes the carry of the column-4 top FA. This keeps the column-4 carry out of
the bottom row. Every bottom-row adder has exactly three inputs, except the
column-2 HA. The longest path runs from the operands through the column-2 FA
(or the four-input adder) and then along the bottom ripple from column 3 to
column 6.

In total the multiplier uses 16 AND gates, 2 half adders and 8 MUX full adders
(one of them inside the four-input adder), plus the 2 half adders inside the
four-input adder.

## MUX full adder (`mux_full_adder`, `mux2`)

```
sel   = b ^ c
sum   = sel ? ~a : a        // a ^ b ^ c
carry = sel ?  a : b        // majority(a, b, c)
```

If b and c are equal, the sum parity is just a, and the carry equals their
common value. If they differ, exactly one of them is 1. The sum is then ~a
and the carry is a. The XOR output drives the select of both multiplexers.
In a transistor implementation each multiplexer is a two-transistor pass
gate, and there is no direct path from supply to ground. That is where the
intended power and delay savings come from. At RTL it is just two selectors
and an XOR.

## Four-input adder (`four_bit_adder`)

This block counts the ones among four bits `a b c d` and returns
`{c0, s1, s0}` (0 to 4). It is a full adder on `a b c` and a half adder
adding the FA sum to `d` (-> `s0`). A second half adder adds the two carries
(-> `s1`, `c0`). In the multiplier it takes the one column with four
products. Its three outputs then land in columns 3, 4 and 5.

## Files

| file | contents |
|------|----------|
| `rtl/vedic_pkg.sv` | widths (`OPERAND_W = 4`, `PRODUCT_W = 8`) and the operand, product and partial-product types |
| `rtl/vedic_mul4x4_mux.sv` | the multiplier (top) |
| `rtl/four_bit_adder.sv` | four-input one-bit adder |
| `rtl/mux_full_adder.sv` | XOR + two-multiplexer full adder |
| `rtl/mux2.sv` | 2:1 multiplexer |
| `rtl/half_adder.sv` | half adder |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in  | 4 | multiplicand, unsigned |
| `b` | in  | 4 | multiplier, unsigned |
| `p` | out | 8 | product `a * b` |

There is no clock, reset or handshake. `p` settles one combinational delay
after `a` or `b` changes. To use the multiplier in a clocked datapath,
register its inputs and/or outputs outside it. A published Xilinx
implementation of this structure reports 14.793 ns total delay (8.300 ns
logic, 6.493 ns routing) and 9 logic levels. That figure depends on the
device and tools. Nothing in this RTL reproduces or checks it.

## How far it is verified

Every testbench is exhaustive over its inputs:

* `tb_vedic_mul4x4_mux` applies all 256 operand pairs. It checks each product
  against `a * b`, and also against a step-by-step model of the
  vertically-and-crosswise method (per-diagonal sums with carries). It checks
  12 x 13 = 156 and 1111 x 1111 = 11100001 by name. It fails if some
  mechanism is never exercised: a carry out of each of diagonals 1 to 5, the
  four-input adder's carry (only at 15 x 15) or a product with its MSB set.
* `tb_four_bit_adder`, `tb_mux_full_adder`, `tb_half_adder` and `tb_mux2`
  check their full truth tables. The full-adder test also confirms that both
  select cases (b = c and b != c) occur.

Each testbench also fails when a relevant bug is injected into its module.
For example: the wrong four-input-adder output feeding column 5, swapped
carry-multiplexer inputs, or an OR in place of the half-adder carry AND.

## Choices made in this implementation

* **Operand interpretation.** Operands are unsigned. No signed mode is
  described, and the worked examples are all unsigned.
* **Full adders.** All full adders, including the one inside the four-input
  adder, are the MUX type. A variant with plain gate-level full adders exists
  only as a point of comparison and is not provided.
* **Multiplexer select polarity.** The structure does not fix which
  multiplexer input goes with select 0. It is chosen so that b = c gives
  sum = a and carry = b, which is the only assignment that adds correctly.
* **Adder pins.** The assignment of column bits to the a/b/c pins of each full
  adder is free, since the full adder is symmetric. It is chosen for
  readability.
* **Baseline not included.** The older structure is not included: four 2x2
  Vedic multipliers combined by three 4-bit ripple-carry adders. It is the
  baseline this design improves on.
* **Fixed size.** The width is fixed at 4x4. The hand-placed column map
  exists only for this size. The widths are therefore package constants, not
  module parameters.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/vedic_pkg.sv tb/tb_vedic_mul4x4_mux.sv --top-module tb_vedic_mul4x4_mux
./obj_dir/Vtb_vedic_mul4x4_mux
```

A passing run ends with `TB_RESULT checks=525 failures=0`. The other
testbenches build the same way with their own top module name. Lint the
design alone with

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/vedic_pkg.sv rtl/vedic_mul4x4_mux.sv
```
