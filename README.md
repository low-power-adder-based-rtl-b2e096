# Low-leakage adder based filter section for a QRS detector

A wearable or implanted ECG monitor spends most of its life idle between
samples, so the leakage current of its logic matters as much as its switching
power. The front end of a QRS (heartbeat) detector is a chain of small digital
filters, and the most frequently used operator in those filters is the adder.
This design takes that adder and rebuilds its 1-bit full adder from cells with
taller transistor stacks (an AOI21 and an AO22 instead of XOR, AND and OR
cells). Series-connected OFF transistors leak less than a single one, so the
adder leaks less at the cost of area and delay, and every filter built from it
inherits the saving.

The RTL follows that hierarchy:

```
qrs_filter          one filter section: Z^-1 delay elements + processing element
 +- delay_reg       Z^-1 element (x[n-1], y[n-1] output register, y[n-2], c[n-1])
 +- filter_pe       4 coefficient multipliers + 2 three-input adders
     +- coef_mult   fixed-point coefficient multiply
     +- adder3      three-operand adder = two chained ripple adders
         +- rca_adder   WIDTH-bit ripple-carry adder, one full adder per bit
             +- fa_stacked   low-leakage full adder
                 +- cell_aoi21, cell_ao22   Boolean models of the stacked cells
```

All data types and default widths live in `rtl/qrs_filter_pkg.sv`.

## The low-leakage full adder

`fa_stacked` is the core of the design. It never uses an XOR cell; the two
exclusive-ORs a full adder needs are both made from AND-OR-Invert structures:

```
n_ab = ~(a | b)                           NOR
p    = AOI21(a, b, n_ab) = ~((a & b) | n_ab)   = a ^ b     propagate
n_pc = ~(p | ci)                          NOR
s    = ~((p & ci) | n_pc)                      = p ^ ci    sum
co   = AO22(p, ci, a, b) = (p & ci) | (a & b)             carry
```

The trick in `p`: `~(a|b)` is 1 only for `a=b=0`, and `a&b` is 1 only for
`a=b=1`, so the AOI21 output is 1 exactly when the operands differ. The sum
stage repeats the same pattern with `p` and `ci`. The carry reuses `p` in an
AO22, exactly like the conventional `(a^b)&ci | a&b` carry.

In the RTL the AOI21 and AO22 are separate modules (`cell_aoi21`,
`cell_ao22`) so that the cell boundaries stay visible; the NORs and the sum
stage are plain expressions. The stacked transistor structure itself, which is
where the leakage saving comes from, is below the level of RTL: a synthesis
tool will map these expressions to whatever cells its library offers. To keep
the saving, map `cell_aoi21`/`cell_ao22` to the library's AOI21/AO22 cells and
keep the hierarchy (or use dont_touch) so the tool does not restructure them.

Pin pairing: `cell_aoi21` is `y = ~((a & b) | c)` and `cell_ao22` is
`y = (a & b) | (c & d)`, the usual meanings of those cell names.

## Ripple-carry adders

`rca_adder #(WIDTH)` chains WIDTH full adders; it returns `sum`, `cout` and a
two's-complement overflow flag `ovf` (carry into the top bit differs from the
carry out). The original characterisation used 4, 8, 16 and 32-bit adders,
with area exactly proportional to width and delay nearly so, which is what a
ripple chain gives; the default here is 16, the filter's word width.

For reference, the published 65 nm figures for these adders (proposed cell
against the library's standard full adder) were about 31 % less leakage and
20 % less dynamic power, for 21 % more area and 60–75 % more delay, at every
width. In the complete filter section the reported saving was 11 % of leakage
for 5 % more area. These numbers come from gate-level synthesis in a 65 nm
library and cannot be reproduced from this RTL.

`adder3` adds three words modulo 2^WIDTH with two chained `rca_adder`s. A
carry-save row followed by one ripple adder would be faster; the chained form
was chosen as the simplest correct one.

## The filter section

`qrs_filter` computes, for each accepted sample,

```
y[n] = a1*x[n] + a2*x[n-1] + b2*y[n-1] + b3*y[n-2] + c[n-1]
```

The processing element `filter_pe` has two adders, arranged as in the
original block diagram:

```
right adder:  r    = a2*x[n-1] + b3*y[n-2] + c[n-1]
left adder:   y[n] = a1*x[n]   + b2*y[n-1] + r
```

`c` is the partial sum of a following section, entering through its own
Z^-1 (`cascade_in`). The original diagram shows this input continuing to the
right with dashes; it is brought out as a port so sections can be chained.
Tie it to 0 for a single second-order section (two zeros, two poles).
`x_chain_out` (x[n-1]) and `y_chain_out` continue the delay lines toward
such a following section.

### Number formats

| item | format | default |
|---|---|---|
| samples, partial sums (`data_t`) | two's complement | 16 bits |
| coefficients (`coef_t`) | two's complement, `COEF_FRAC` fraction bits | 16 bits, Q1.14, range [-2, 2) |

Each product is `(x * coef) >>> 14`, truncated to 16 bits (rounding toward
minus infinity). All additions wrap modulo 2^16; there is no saturation, so
coefficient sets and input ranges must keep the filter in range. Change the
widths in `qrs_filter_pkg`.

### Interface and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset clearing all history |
| `sample_en` | in | take `x_in` and `cascade_in` on this rising edge |
| `x_in` | in | sample x[n] |
| `coefs` | in | struct `{a1, a2, b2, b3}` |
| `cascade_in` | in | partial sum from a following section |
| `y_out` | out | y[n], registered |
| `out_valid` | out | high for one cycle, one cycle after `sample_en` |
| `x_chain_out`, `y_chain_out` | out | delay-line continuations |

Latency is one clock: the sum is combinational from `x_in` and the delay
registers, and is captured in the output register on the edge where
`sample_en` is high. With `sample_en` low every register holds, so the section
can run from a fast clock at ECG sample rates (a few hundred Hz). The critical
path is one multiplier plus two three-input adders, i.e. four 16-bit ripple
chains.

## Where this RTL departs from, or adds to, the original

- **Output register.** In the original diagram the output feeds the b2
  multiplier directly, with the only output delay element between the b2 and b3
  taps. Taken literally that is a combinational loop. Here the output is
  registered, so b2 weights y[n-1] and b3 weights y[n-2].
- **Widths, coefficient format, wrap-around, enable and reset** are not given
  by the original and are this design's choices (see above). Coefficients are
  inputs rather than constants because no coefficient values were published.
- **Multipliers** are plain signed `*`; only the adders use the low-leakage
  full adder, as in the original.
- **Three-input adders** are two chained ripple adders.
- **Not included:** the other stages of the QRS detector (low-pass and
  high-pass filters with specific coefficients, derivative, squaring,
  moving-window integration, peak detection). They were only named, without
  coefficients, window lengths or thresholds, so they cannot be written
  faithfully. The conventional XOR/AND/OR full adder used as the comparison
  baseline is not part of the design; the full-adder testbench uses its
  equations as a reference.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_cell_aoi21`, `tb_cell_ao22` | full truth tables |
| `tb_fa_stacked` | all 8 input cases against `a+b+ci` and against the XOR/AND/OR full adder |
| `tb_rca_adder` | 4-bit exhaustively; 8, 16, 32-bit with carry/overflow corners and random operands |
| `tb_adder3`, `tb_coef_mult`, `tb_filter_pe` | corners and random operands against integer arithmetic |
| `tb_delay_reg` | reset, load, hold with random enables |
| `tb_qrs_filter` | end to end at default sizes against a reference model |

`tb_qrs_filter` checks an impulse response against hand-computed values
(`a1=0.25, a2=0.5, b2=0.5, b3=-0.125` gives `0.25, 0.625, 0.28125, 0.0625,
-0.0039`), runs a synthetic heartbeat-like pulse train through that section,
then 4000 clocks of random coefficients, samples, cascade inputs and enable
gaps, and finally a reset with history in the delay lines. It counts that
feedback, cascade input, held cycles, arithmetic wrap-around and reset each
occurred, and checks `out_valid` timing and the chain outputs on every cycle.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qrs_filter_pkg.sv \
    tb/tb_qrs_filter.sv --top-module tb_qrs_filter -o sim
./obj_dir/sim
```

Replace `tb_qrs_filter` with any other testbench name. `-Irtl` lets Verilator
find each module in the file of the same name. Lint with
`verilator --lint-only -Wall -Irtl rtl/qrs_filter_pkg.sv rtl/qrs_filter.sv`;
the only warning is for the product bits that `coef_mult` drops
(above and below the kept 16-bit window), which is intended.
