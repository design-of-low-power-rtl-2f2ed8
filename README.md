# Reversible Vedic 8x8 multiplier

An unsigned 8-bit by 8-bit multiplier (16-bit product) built only from
*reversible* logic gates, arranged by the Urdhva Tiryakbhyam ("vertically and
crosswise") rule of Vedic arithmetic.

Two ideas meet here:

* **Vertically and crosswise.** Split each operand into a high and a low half.
  The product is `hi*hi` (the vertical product on the left), `lo*lo` (the
  vertical product on the right) and the two crosswise products `hi*lo` and
  `lo*hi` in the middle, all formed at once and then added with shifts. Apply
  that recursively: 8x8 from four 4x4 multipliers, 4x4 from four 2x2, and
  the 2x2 from single-bit ANDs and two half adders.
* **Reversible gates.** Every gate maps its inputs one-to-one onto its outputs
  (as many outputs as inputs, no information thrown away). A function such as
  AND is therefore computed on a gate's third line with a constant 0 input,
  and the gate's other outputs are either passed on to the next gate or left
  as *garbage outputs*. In a reversible circuit no signal fans out and nothing
  feeds back.

The whole design is one combinational network: no clock, no registers, no
reset.

## Gate library

| module         | lines | outputs                                             | quantum cost | used as                        |
|----------------|-------|-----------------------------------------------------|--------------|--------------------------------|
| `feynman_gate` | 2x2   | P = A, Q = A ^ B                                    | 1            | merging two carries (XOR)      |
| `toffoli_gate` | 3x3   | P = A, Q = B, R = AB ^ C                            | 5            | AND (C = 0), passing A and B on |
| `peres_gate`   | 3x3   | P = A, Q = A ^ B, R = AB ^ C                        | 4            | half adder (C = 0): Q sum, R carry |
| `hng_gate`     | 4x4   | P = A, Q = B, R = A^B^C, S = (A^B)C ^ AB ^ D        | 6            | full adder (D = 0): R sum, S carry |

Quantum costs are the usual published figures for these gates and live in
`rev_pkg` with the derived block costs.

## The 2x2 multiplier (`vedic_2x2`)

```
s0 = a0 b0
s1 = a1 b0 ^ a0 b1          c1 = a1 b0 & a0 b1
s2 = c1 ^ a1 b1             s3 = c1 & a1 b1
```

Four Toffoli gates make the four partial products. Because a wire may not
fan out, each gate passes its operands on to the next one:

```
TG1(a0, b0, 0)             -> s0, copies of a0 and b0
TG2(a1, b0 copy, 0)        -> a1b0
TG3(b1, a0 copy, 0)        -> a0b1
TG4(a1 copy, b1 copy, 0)   -> a1b1
PG1(a1b0, a0b1, 0)         -> s1, c1
PG2(c1, a1b1, 0)           -> s2, s3
```

Six gates, six constant inputs, six garbage outputs, quantum cost 28.

## Building 4x4 and 8x8 (`vedic_4x4`, `vedic_8x8`)

Both levels have the same shape; for the 8x8 with nibbles `aL aH bL bH`:

```
m0 = aL*bL   m1 = aH*bL   m2 = aL*bH   m3 = aH*bH        (four 4x4 multipliers)

RCA1:  m1 + m2                         -> sum1, ca1
RCA2:  sum1 + {0000, m0[7:4]}          -> sum2, ca2
FG  :  ca1 ^ ca2                       -> cm
RCA3:  m3 + {000, cm, sum2[7:4]}       -> s[15:8]   (carry out always 0)

s[7:4] = sum2[3:0]      s[3:0] = m0[3:0]
```

The 4x4 is the same with 2-bit halves, 2x2 sub-multipliers and 4-bit adders.
All adder carry-ins are constant 0.

**The carry merge is the subtle point.** The middle sum
`m1 + m2 + m0[7:4]` is 9 bits wide, and it is formed in two adders, so it can
overflow in either: `ca1` from RCA1 or `ca2` from RCA2. Both carries carry
the same weight (2^12 in the product) and must reach bit 4 of RCA3's second
operand. They can never both be 1: if `ca1` is set then
`sum1 = m1 + m2 - 256 <= 194`, and adding at most 15 cannot carry again. So
their XOR equals their sum, and a single Feynman gate combines them exactly
while staying reversible. Drop `ca2` and the multiplier is wrong for 524 of
the 65,536 operand pairs, for example `8Fh * 9Fh`, where
`m1 + m2 = 255` and `m0[7:4] = 14`.

## Adders (`rev_rca`)

`rev_rca #(WIDTH)` is a ripple carry adder with one HNG gate per bit:
`A = a[i]`, `B = b[i]`, `C` = carry in, `D = 0`; `R` is `sum[i]`, `S` the carry
to the next bit. `WIDTH` defaults to 8 (the 8x8 level); the 4x4 level uses
`WIDTH = 4`. An 8-bit adder has 16 garbage outputs and quantum cost 48.

## Garbage outputs

Every block brings its garbage out on a `garbage` port rather than leaving
gate outputs unconnected, so the complete reversible netlist stays visible
at the top. Widths come from `rev_pkg`:

| block       | garbage bits | layout (LSB first)                                                  |
|-------------|--------------|---------------------------------------------------------------------|
| `vedic_2x2` | 6            | TG2.Q, TG3.Q, TG4.P, TG4.Q, PG1.P, PG2.P                            |
| `rev_rca`   | 2*WIDTH      | per bit i: [2i] = P (copy of a[i]), [2i+1] = Q (copy of b[i])      |
| `vedic_4x4` | 50           | m0..m3 (6 each), RCA1..RCA3 (8 each), Feynman P, RCA3 carry out     |
| `vedic_8x8` | 250          | m0..m3 (50 each), RCA1..RCA3 (16 each), Feynman P, RCA3 carry out   |

Many garbage bits are plain copies of inputs or constant (the final carry
outs), so a synthesis tool reduces them to wires. Leave the port open when
only the product is wanted.

## Costs, and where this RTL departs from the published design

| block     | quantum cost here | published | garbage here | published |
|-----------|------------------:|----------:|-------------:|----------:|
| 2x2       | 28                | 28        | 6            | 6         |
| 8-bit RCA | 48                | 48        | 16           | 16        |
| 4x4       | 185               | 144       | 50           | 44        |
| 8x8       | 885               | 720       | 250          | -         |

* The 4x4 is specified as four 2x2 multipliers (28 each) and three 4-bit HNG
  adders (24 each). Those parts alone cost 184, so the published 144 cannot be
  reached with them; this RTL keeps the stated parts. The published 8x8 cost
  (720 = 4 x 144 + 3 x 48) inherits the same difference.
* The published 8x8 block diagram routes only `ca1` into the last adder. Here
  `ca2` is merged in through a Feynman gate (see above); without it the
  product is wrong for some operands.
* The operand halves each feed two sub-multipliers, i.e. they fan out, as in
  the published block diagram. No Feynman copy gates are inserted for them.
* The published timing (20.2 ns), power (0.278 mW) and area (108 LUTs on a
  Spartan-6) are results of a vendor FPGA flow and are not claims of this RTL.

## Files

| file                     | contents |
|--------------------------|----------|
| `rtl/rev_pkg.sv`         | gate quantum costs, garbage widths, derived block costs |
| `rtl/feynman_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/peres_gate.sv`, `rtl/hng_gate.sv` | the gates |
| `rtl/rev_rca.sv`         | HNG ripple carry adder |
| `rtl/vedic_2x2.sv`, `rtl/vedic_4x4.sv` | sub-multipliers |
| `rtl/vedic_8x8.sv`       | top: `a[7:0]`, `b[7:0]` in, `s[15:0]`, `garbage[249:0]` out |
| `tb/tb_<module>.sv`      | one self-checking testbench per module |

## Verification

Every testbench is exhaustive and compares against plain integer arithmetic:

* gates: all input patterns; the output patterns must also be all different
  (the gate is a permutation);
* `tb_rev_rca`: all 2^17 inputs of the 8-bit adder and all 2^9 of a 4-bit
  one, including `10h + 41h = 51h`; garbage must equal the operand copies;
* `tb_vedic_2x2`, `tb_vedic_4x4`: all operand pairs; product plus garbage must
  differ for every pair (no information lost); the 4x4 bench counts both
  middle-carry cases and fails if either never occurs;
* `tb_vedic_8x8`: all 65,536 operand pairs at the default configuration,
  directed cases `6*3`, `10h*41h`, `8Fh*9Fh`, `FFh*FFh`, the same
  no-information-lost check over all 266 output bits, the final carry out
  held at 0, and counts of the `ca1` (2,994) and `ca2` (524) events.

Each bench prints `TB_RESULT checks=N failures=M` and has a time-out watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/rev_pkg.sv tb/tb_vedic_8x8.sv --top-module tb_vedic_8x8
./obj_dir/Vtb_vedic_8x8
```

Replace `tb_vedic_8x8` with any other testbench name. The package must come
first on the command line; `-y rtl` lets Verilator find the sub-modules. For
lint only: `verilator --lint-only -Wall -Irtl -y rtl rtl/rev_pkg.sv rtl/vedic_8x8.sv`
(it reports the unused cost constants of `rev_pkg`, which are documentation).
