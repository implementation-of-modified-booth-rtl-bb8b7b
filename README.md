# Modified Booth–Wallace tree multiplier (16 × 16, signed)

A combinational multiplier that attacks the two costs of array multiplication at
once. **Radix-4 (modified) Booth recoding** halves the number of partial products:
a 16-bit operand yields 8 rows instead of 16. A **Wallace tree** of full and half
adders then compresses those 8 rows to 2 in four adder delays, and a single
carry-propagate adder produces the 32-bit two's complement product. A small
board-level wrapper shows the product in hexadecimal on eight seven-segment
displays, as in an FPGA demonstration with operands on switches.

```
 x[15:0] ─────────────┐
                      ▼
 y[15:0] ─► {y,0} ─► 8 × (booth_encoder ─► booth_pp_gen) ─► align (<<2i, sign-extend to 32 b)
                                                               │ 8 rows
                                                               ▼
                                                        wallace_tree  (8→6→4→3→2 rows)
                                                               │ sum, carry
                                                               ▼
                                                        ripple_adder ─► prod[31:0]
                                                               │
                                            booth_wallace_de2_top: 8 × hex7seg ─► hex_n[0..7]
```

## Booth recoding: from 16 rows to 8

One operand, `y`, is recoded. A 0 is appended below its LSB, and the result is cut
into eight overlapping three-bit groups `{y[2i+1], y[2i], y[2i-1]}`, i = 0..7. Each
group is a radix-4 digit d_i = −2·y[2i+1] + y[2i] + y[2i−1] in {−2, −1, 0, +1, +2}:

| group | digit | group | digit |
|-------|-------|-------|-------|
| 000   | 0     | 100   | −2    |
| 001   | +1    | 101   | −1    |
| 010   | +1    | 110   | −1    |
| 011   | +2    | 111   | 0     |

Then y = Σ d_i · 4^i, so x·y = Σ (d_i·x) · 4^i. Each term d_i·x is easy to form:
zero, x, or x shifted left once, negated when the digit is negative. Negation is
done as two's complement, by inverting and adding one (`booth_pp_gen`).

Example: x = 60 and y = 150 = 0000_0000_1001_0110₂. The groups from the LSB up
are 100, 011, 010, 100, 001, 000, 000, 000. That gives digits −2, +2, +1, −2, +1,
0, 0, 0 and rows −120, +480, +960, −7680, +15360. Their sum is 9000 (0x2328).

For an odd width N, y is first extended by one copy of its sign bit so that it
splits into whole groups, which gives (N+1)/2 rows.

Width detail: a row is held as an 18-bit signed number (N+2), not 17. The one
case that needs the extra bit is −2·(−32768) = +65536. Each row is sign-extended
to 32 bits and shifted left by 2i before it enters the tree. Working on full
sign-extended rows keeps the tree simple. The cost is adders in the upper columns
that a hand-optimised layout, using sign-extension-prevention bits, would remove.

## Wallace tree: 8 rows to 2

At every level the rows are taken in groups of three. Each group passes through
one full adder per bit position. The sum bits form a new row of the same weight.
The carry bits form a row shifted left by one. Two leftover rows go through half
adders. One leftover row passes unchanged. For the 8 partial products PP1..PP8:

| level | inputs                     | outputs          | rows after |
|-------|----------------------------|------------------|-----------:|
| 1     | PP1, PP2, PP3 (FA)         | sum1, carry1     |            |
|       | PP4, PP5, PP6 (FA)         | sum2, carry2     |            |
|       | PP7, PP8 (HA)              | sum3, carry3     | 6          |
| 2     | sum1, carry1, sum2 (FA)    | sum4, carry4     |            |
|       | carry2, sum3, carry3 (FA)  | sum5, carry5     | 4          |
| 3     | sum4, carry4, sum5 (FA)    | sum6, carry6     |            |
|       | carry5 (passes)            |                  | 3          |
| 4     | sum6, carry6, carry5 (FA)  | prod_sum, prod_carry | 2      |

The critical path runs through four full adders and then the final adder. That is
where the speed comes from: a plain row-by-row accumulation of 8 rows would put
7 carry-propagate adders in series. `wallace_tree` computes this schedule from
its `ROWS` parameter with constant functions, so the same rule also works for
other row counts. The testbench checks 2, 3, 5, 8 and 13 rows.

All tree arithmetic is modulo 2^32. Carries out of bit 31 are dropped, which is
correct because the rows are sign-extended two's complement numbers and the true
product always fits in 32 bits.

## Final adder

`ripple_adder` adds `prod_sum` and `prod_carry` with a chain of 32 full adders.
A ripple chain is the simplest choice, not a tuned one. On an FPGA the
synthesis tool maps a plain `a + b` onto the dedicated carry chain, and a
carry-lookahead or prefix adder would suit an ASIC better. Either can replace
this module without changing its ports.

## Display wrapper

`booth_wallace_de2_top` takes two 16-bit operands `sw_x`, `sw_y` and drives eight
displays `hex_n[0..7]`. `hex_n[7]` shows the most significant nibble. Each
display is a `hex7seg` decoder with active-low segments ordered `{g,f,e,d,c,b,a}`,
and 'b' and 'd' are shown in lower case. The wrapper does not fix how 32 operand
bits reach a board. A board with fewer switches needs a pin assignment or a
small operand loader in front of it.

## Modules

| file | role | parameters (default) |
|------|------|----------------------|
| `rtl/booth_pkg.sv` | `booth_op_e`: the five Booth operations | – |
| `rtl/booth_encoder.sv` | 3-bit group → operation | – |
| `rtl/booth_pp_gen.sv` | operation, x → one signed N+2-bit row | `N` (16) |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit cells of the tree and the final adder | – |
| `rtl/wallace_tree.sv` | ROWS rows → sum row + carry row | `ROWS` (8), `W` (32) |
| `rtl/ripple_adder.sv` | final carry-propagate adder | `W` (32) |
| `rtl/booth_wallace_mult.sv` | the multiplier: x, y → prod | `N` (16; any N ≥ 3) |
| `rtl/hex7seg.sv` | nibble → seven-segment pattern | – |
| `rtl/booth_wallace_de2_top.sv` | multiplier + 8 displays (top) | – |

Everything is combinational. There is no clock, no reset and no handshake, and
`prod` is valid one propagation delay after the operands change. Anyone who
needs a pipelined version would add registers between the tree levels and before
the final adder.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `booth_encoder_tb`: all 8 groups, checked against the digit formula above.
- `booth_pp_gen_tb`: all five operations, with edge and random `x` at N = 16 and
  every `x` at N = 6, checked against integer `digit * x`.
- `wallace_tree_tb`: random rows at 2, 3, 5, 8 and 13 rows. It checks that
  sum + carry equals the sum of the inputs and that the carry row has no bit 0.
- `ripple_adder_tb`: long carry chains and random values at W = 32, and every
  pair at W = 4.
- `booth_wallace_mult_tb`: the 60 × 150 example, the extreme operands (−32768²,
  −32768 × 32767, …), 20,000 random pairs at N = 16, and every pair at N = 8, 7 and 3. The odd
  widths exercise the sign extension of y.
- `hex7seg_tb`: all 16 glyphs, written out as lists of lit segments.
- `booth_wallace_de2_top_tb`: end-to-end test at the default size. It decodes
  the displays back into a number and compares it with x·y over about 5,000
  operand pairs. It also counts coverage and fails if any of these never
  occurs: one of the five Booth digits, a negative, positive or zero product,
  the most negative operand, or one of the 16 hex digits.

To run one with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module booth_wallace_de2_top_tb \
    -y rtl -y tb +libext+.sv rtl/booth_pkg.sv tb/booth_wallace_de2_top_tb.sv
./obj_dir/Vbooth_wallace_de2_top_tb
```

Lint notes: Verilator reports `PINCONNECTEMPTY` for the full and half adders at
bit 31. Their carry-out is left unconnected on purpose, because it lies outside
the 32-bit result.

## Where this design makes its own choices

- **Signed operands.** Both operands and the product are two's complement. The
  Booth recoding, the sign-extended rows and the count of 8 rows for 16 bits all
  assume this. Unsigned 16-bit operands would need a ninth row.
- **Group bit order.** The group's most significant bit is y[2i+1], which carries
  weight −2. This is the standard radix-4 recoding, and the example above
  works out with it.
- **Tree wiring.** The order in which rows are grouped follows the level table
  above. Other groupings give the same result at the same depth.
- **Final adder, row width, display polarity and digit order** are choices of
  this design, as described in their sections.
- **Not reproduced.** The published evaluation reports delay and LUT count on an
  Altera Cyclone II, about 18 ns and 713 LUTs, against a conventional array
  multiplier, a Booth-only multiplier and a Wallace-only multiplier. None of
  those baselines is included, and timing and area depend on the target and
  the tools.
