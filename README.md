# 4-bit absolute value detector with a carry-free conditional increment

This is a small combinational circuit. It takes a 4-bit two's-complement
sample `a` and a 3-bit unsigned threshold `d`. It produces the magnitude
`x = |a|` and a detect flag `y = (|a| > d)`.

The main idea is to drop one input code. The sample -8 (`4'b1000`) is
declared out of range, so the supported range -7..+7 is symmetric and every
magnitude fits in three bits. With -8 treated as a don't-care, the "+1" of
two's-complement negation no longer needs an adder with a carry chain. Each
magnitude bit becomes a flat sum of products. This cuts the longest
gate-level path from 13 stages to 7. A logical-effort estimate puts the
minimum delay at about 43 tau (the delay of a unit inverter driving an
equal inverter). The same estimate gives 68.5 tau for the ripple-carry
version. The design has no clock and no pipeline.

## Datapath

```
 a[3:0] ──┬── a[3] = sign ───────────────┬───────────────┐
          │                              │               │
          └── a[2:0] ─► cond_invert ─► b ┴► cond_increment ─► x[2:0] ─► magnitude_comparator ─► y
                        (b = a ^ sign)      (x = b + sign,               (y = x > d)
                                             -8 ignored)                     ▲
                                                                    d[2:0] ──┘
```

`abs_value` wraps the first two stages. `abs_detector` is the top level.

### Sign detection and conditional inversion

The sign is the MSB `a[3]`, taken as a plain wire. `cond_invert` XORs each
magnitude bit with it. A positive sample passes unchanged. A negative
sample becomes its ones' complement `b`, so `|a| = b + 1` for negative
samples and `|a| = b` for positive ones. In both cases `|a| = b + sign`.

### The trimmed conditional increment (`cond_increment`)

This is the part of the design that needs the closest reading. Exact
3-bit addition of `sign` to `b` would be:

```
x0 = sign ^ b0
x1 = b1 ^ (sign & b0)
x2 = b2 ^ (sign & b1 & b0)
```

Only one input pair produces `sign = 1, b = 3'b111`: the excluded sample
-8. That pair is the only one where `b2 = 1` and the carry into bit 2 are
both set. For every other input, the XOR on bit 2 can therefore be
replaced by an OR. The RTL uses these sums of products:

| bit | expression | gates |
|-----|------------|-------|
| x2 | `b2 \| sign & b1 & b0` | one 3-input AND into a 2-input OR |
| x1 | `b1 & ~b0 \| ~sign & b1 \| sign & ~b1 & b0` | inverters, 3-input AND, 3-input OR |
| x0 | `sign ^ b0` | one XOR |

Without the don't-care, `x2` needs four product terms:
`~s b2 + s b2 ~b1 + s ~b2 b1 b0 + s b2 b1 ~b0`. It then sits on the
longest path. With the don't-care, `x1` carries the longest path.

These are the Karnaugh maps behind the table. Rows are `sign,b2` and
columns are `b1,b0`, both in Gray order 00, 01, 11, 10. `-` marks the
excluded -8 cell.

```
      x2              x1              x0
     00 01 11 10     00 01 11 10     00 01 11 10
00    0  0  0  0      0  0  1  1      0  1  1  0
01    1  1  1  1      0  0  1  1      0  1  1  0
11    1  1  -  1      0  1  -  1      1  0  -  1
10    0  0  1  0      0  1  0  1      1  0  0  1
```

If -8 does arrive anyway, the circuit outputs `x = 3'b100` (4).
`abs_value` has an assertion that reports this input in simulation.

### Comparator (`magnitude_comparator`)

The comparator works MSB first. Bit `i` decides `y = 1` when `x[i] = 1`,
`d[i] = 0` and all higher bit pairs are equal. Each equality is an XNOR.
For three bits:

```
y = x2 & ~d2
  | eq2 & x1 & ~d1
  | eq2 & eq1 & x0 & ~d0          eqN = ~(xN ^ dN)
```

A lower bit only matters when every higher bit agrees. Equal operands give
`y = 0`. The RTL writes this as a loop over a width parameter `W`
(default 3). For `W = 3` the loop produces exactly the three terms above.

## Timing

Everything is combinational: `x` and `y` settle one propagation delay
after `a` or `d` changes. There are no registers and no reset.

The longest path counted in gate stages is XOR, inverter, 3-input AND,
3-input OR (giving `x1`), then XNOR, 4-input AND, 3-input OR (giving `y`).
That is 7 stages. The logical-effort estimates behind the delay figures:

| | stages | path effort F | effort per stage f | minimum delay |
|--|--|--|--|--|
| ripple-carry increment | 13 | about 6424 | 1.96 | 68.5 tau |
| trimmed increment (this RTL) | 7 | about 516 | 2.44 | 43 tau |

Both assume a path electrical effort of 32/2 = 16 and a parasitic-to-gate
capacitance ratio of 1. These are transistor-level estimates and the RTL
does not enforce them. A synthesis tool will restructure the equations for
its own cell library.

The delay model `delay ∝ VDD / (VDD − VT)²` with VT = 0.2 V says that
lowering the supply from 1 V to 0.775 V makes the circuit 1.5 times slower.
It also cuts energy to about 0.6 of its original value. This is a choice of
operating point and changes nothing in the logic.

## Interfaces

`abs_detector` (top):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in | 4 | two's-complement sample, `a[3]` is the sign; -8 not allowed |
| `d` | in | 3 | unsigned threshold |
| `x` | out | 3 | `|a|` |
| `y` | out | 1 | `|a| > d` |

Shared widths and types (`sample_t`, `mag_t`) live in `abs_det_pkg`.

## Interpretations and departures

- **Meaning of `y`.** The detect output is read as a strict "greater than"
  of the magnitude over `d`. This fits the three product terms, the
  inverted `d` inputs and the MSB-first rule "the number with the 1 in
  this bit is larger". No equality term is present, so equal operands give
  0. If your application needs `>=`, add the all-equal product term
  `eq2 & eq1 & eq0` to the OR.
- **`x` is a port.** In the published design the magnitude is only an
  internal net. It is brought out here for observation and reuse.
- **Not included.** The ripple-carry increment built from generic full
  adders is not included. It is the baseline that the trimmed increment
  replaces. `tb_cond_increment` still checks the trimmed `x2` against the
  untrimmed four-term expression on every legal input.
- **Parameters.** `cond_invert` (`MAG_W`) and `magnitude_comparator` (`W`)
  take width parameters whose defaults are the design's 3 bits.
  `cond_increment` is fixed at 3 bits, because its simplification exists
  only for the 4-bit input.
- **Gate structure.** The RTL states the published equations. It does not
  instantiate gates or fix their sizes.

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and calls `$finish`. A watchdog ends the
run with a failure if it hangs.

```sh
verilator --binary --timing --assert --top-module tb_abs_detector \
  rtl/abs_det_pkg.sv rtl/cond_invert.sv rtl/cond_increment.sv \
  rtl/abs_value.sv rtl/magnitude_comparator.sv rtl/abs_detector.sv \
  tb/tb_abs_detector.sv
./obj_dir/Vtb_abs_detector
```

| testbench | what it covers |
|-----------|----------------|
| `tb_cond_invert` | all 3-bit and 5-bit values with both signs |
| `tb_cond_increment` | all legal `(sign, b)` pairs against integer addition and the untrimmed `x2` |
| `tb_abs_value` | every sample from -7 to +7 |
| `tb_magnitude_comparator` | all pairs at widths 3 and 4; decisions at each bit and the equal case |
| `tb_abs_detector` | all 120 legal `(a, d)` pairs plus 200 random ones, at default configuration |

`tb_abs_detector` also counts how often each mechanism ran. The
mechanisms are: positive pass-through, negative invert-and-increment,
increment carrying into `x2`, a comparator decision at each bit, equal
operands, and both output values. The test fails if any count is zero.
For the other testbenches, swap the `--top-module` name and the last file.
