# Five-tap FIR filter with 4x4 Vedic (vertical-and-crosswise) multipliers

This is a small direct-form FIR filter,

    y(n) = h0*x(n) + h1*x(n-1) + h2*x(n-2) + h3*x(n-3) + h4*x(n-4)

Each of its five tap multipliers is a 4x4-bit *Urdhva Tiryakbhyam* multiplier.
The name is Sanskrit for "vertically and crosswise". The multiplier forms all
sixteen partial-product bits at once with AND gates. It then adds them column
by column, each column being one "vertical/crosswise" step. An ordinary array
multiplier adds them row by row instead. The idea is that a short, flat adder
network replaces a deep row-by-row carry chain. Column 3 of a 4x4 product holds
four partial products, and a dedicated four-input adder (the *special adder*)
sums them in a single step.

Samples and coefficients are 4-bit unsigned numbers. The output is 16 bits
wide.

## Block structure

```
fir_vedic                     filter top: delay line, 5 multipliers, adder chain
└── vedic_mul4  (x5)          4x4 vertical-and-crosswise multiplier
    ├── half_adder    (x2)
    ├── full_adder    (x7)
    └── special_adder (x1)    four-input one-bit adder, {c1,c0,sum} = a+b+c+d
fir_pkg                       widths and types shared by the above
```

| File | Contents |
|---|---|
| `rtl/fir_pkg.sv` | `SAMPLE_W = 4`, `COEF_W = 4`, `PROD_W = 8`; types `sample_t`, `coef_t`, `prod_t` |
| `rtl/half_adder.sv` | s = a^b, c = a&b |
| `rtl/full_adder.sv` | s = a^b^ci, co = majority |
| `rtl/special_adder.sv` | 4:3 counter |
| `rtl/vedic_mul4.sv` | the multiplier |
| `rtl/fir_vedic.sv` | the filter (top) |

## The multiplier: columns, not rows

Write the operands as U3..U0 and V3..V0. Column k of the product collects every
partial product UiVj with i + j = k:

| Column | Partial products | Count |
|---|---|---|
| T0 | U0V0 | 1 |
| T1 | U1V0, U0V1 | 2 |
| T2 | U2V0, U1V1, U0V2 | 3 |
| T3 | U3V0, U2V1, U1V2, U0V3 | 4 |
| T4 | U3V1, U2V2, U1V3 | 3 |
| T5 | U3V2, U2V3 | 2 |
| T6 | U3V3 | 1 |

Each column keeps the low bit of its total as a product bit. Its carries go to
the columns above. The reduction uses exactly **7 full adders, 2 half adders
and 1 special adder**, in two rows:

| Column | First row (partial products) | Second row (sum + incoming carries) | Output |
|---|---|---|---|
| 0 | – | – | T0 = U0V0 |
| 1 | HA(U1V0, U0V1) → T1, carry k1 | – | T1 |
| 2 | FA(U2V0, U1V1, U0V2) → s2, a2 | HA(s2, k1) → T2, b2 | T2 |
| 3 | SA(U0V3, U1V2, U2V1, U3V0) → s3, C0, C1 | FA(s3, a2, b2) → T3, a3 | T3 |
| 4 | FA(U1V3, U2V2, U3V1) → s4, a4 | FA(s4, C0, a3) → T4, b4 | T4 |
| 5 | FA(U2V3, U3V2, C1) → s5, a5 | FA(s5, a4, b4) → T5, b5 | T5 |
| 6 | – | FA(U3V3, a5, b5) → T6, T7 | T6, T7 |

The special adder's C0 has weight 2, so it goes one column up. Its C1 has
weight 4, so it skips a column and enters column 5. This design chose the
routing of carries into the second row. The column contents, the adder count
and the first-row grouping are given by the architecture being implemented.
The routing was picked so that those counts come out exactly.

The product is the full 8 bits T7..T0, so 15 x 15 = 225 is exact.

### The special adder

`special_adder` adds four bits of equal weight. It returns the count as
`{c1, c0, sum}`, where sum has weight 1, c0 weight 2 and c1 weight 4:

* `sum = a ^ b ^ c ^ d`
* `c1  = a & b & c & d` (all four set)
* `c0  = (at least two set) & ~c1` (two or three set)

The interface follows the original specification: four inputs, a sum, and a
two-bit carry with C0 as the LSB and C1 as the MSB. Boolean expressions for C0
and C1 were also published with it, but they do not produce a count. For
example, with only B set they give the value 3. So the carry logic here is
written from the stated function instead.

## The filter

```
 x ──┬──[D]── d11 ──[D]── d12 ──[D]── d13 ──[D]── d14
     │         │            │            │            │
   h0 ×      h1 ×         h2 ×         h3 ×         h4 ×      (vedic_mul4)
     │m1       │m2          │m3          │m4          │m5
     └────────(+)── d1 ────(+)── d2 ────(+)── d3 ────(+)── d4 = y
```

* **Delay line.** There are `TAPS-1` = 4 registers of 4 bits. They shift on
  every rising edge of `clk`. The synchronous active-high reset `rst` clears
  them.
* **Multipliers.** One `vedic_mul4` per tap. Each is purely combinational.
* **Adder chain.** This is a linear chain of `Y_W`-bit adders, as in the
  classic direct form. It is not an adder tree.
* **Timing.** There is no pipeline register anywhere in the datapath, so `y`
  follows `x` combinationally within the same cycle. The delayed terms change
  at each rising edge. After reset, a constant input reaches its steady-state
  output after four clock edges. The critical path is one multiplier plus four
  adders.

### Ports and parameters of `fir_vedic`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `rst` | in | 1 | synchronous, active high; clears the delay line |
| `x` | in | 4 | input sample, unsigned |
| `h` | in | `TAPS` x 4 (packed, `h[0]` = h0) | coefficients, unsigned |
| `y` | out | `Y_W` | output, unsigned |

| Parameter | Default | Note |
|---|---|---|
| `TAPS` | 5 | must be ≥ 2 |
| `Y_W` | 16 | 11 bits is the minimum for 5 taps (5 x 225 = 1125); with 16 bits the top five bits are always zero |

The multiplier is fixed at 4x4. Wider samples or coefficients would need a
larger vertical-and-crosswise multiplier, which is not part of this design.

### Worked example

Set the coefficients h0..h4 = 5, 4, 3, 2, 1 and hold the input at 1 after
reset. The output then steps through the partial sums of the adder chain:

| Edges after reset | y |
|---|---|
| 0 | 5 |
| 1 | 9 |
| 2 | 12 |
| 3 | 14 |
| 4 and later | 15 |

## Choices made in this design

These points were not specified and were decided here:

* Reset is synchronous and active high. It clears only the delay line.
* The output is not registered.
* Samples and coefficients are unsigned.
* The output is 16 bits wide. The filter was specified both with a 16-bit
  output and with a 10-bit one. A 10-bit output would overflow at full scale.
* The carry wiring of the multiplier's second adder row is this design's own
  (see the table above).
* The carry logic of the special adder is written from its function, not from
  the published equations (see above).
* The multiplier was described as using a "carry-skip technique", but this was
  not explained. No carry-skip logic is included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_half_adder` | all 4 input pairs |
| `tb_full_adder` | all 8 input triples |
| `tb_special_adder` | all 16 inputs: the count `{c1,c0,sum}` and the XOR sum |
| `tb_vedic_mul4` | 0001 x 0010 = 00000010, then all 256 operand pairs against integer multiplication |
| `tb_fir_vedic` | runs at the default parameters; details below |
| `tb_fir_worked_example` | the worked example at the default parameters; details below |

`tb_fir_vedic` covers:

* the worked example above, including the four-edge settling time;
* full scale: every input 15, giving y = 1125;
* 20,000 random cycles against a reference model, with random coefficient
  changes and random resets.

It counts how often a reset, a coefficient change, a full-scale output and a
complete refill of the delay line occurred. It fails if any of them never
happened.

`tb_fir_worked_example` also runs the worked example. Once the delay line is
full, it reads the tap products and the adder chain through hierarchical
references. It checks that m1..m5 = 5, 4, 3, 2, 1, that the partial sums are
9, 12, 14 and 15, and that the output is `0000000000001111`.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl rtl/fir_pkg.sv tb/tb_fir_vedic.sv \
          -y rtl --top-module tb_fir_vedic -o sim
./obj_dir/sim
```

Replace `tb_fir_vedic` with any other testbench name. The filter testbench
takes a few seconds. The others take well under a second.

## Not included

The comparison baseline, an FIR filter built with Booth-recoded multipliers,
is not part of this design. Reported FPGA figures for this filter (25 LUTs,
11.91 ns, 0.227 W on a Xilinx device) come from a vendor flow. They are not
reproduced by the RTL here.
