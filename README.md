# Approximate adder/subtractor FIR filter

A linear-phase FIR filter uses many more adder/subtractors than multipliers:
an n-tap folded filter has n-1 buffers, n/2 multipliers and n-1
adder/subtractors. This design makes every one of those adders cheaper and
faster by giving up one LSB of accuracy. In a one's-complement
adder/subtractor, a sum of two operands of opposite sign produces an
"end-around" (rotated) carry. Adding that carry back in costs a second carry
chain, roughly a third of the unit's delay and area. This adder drops it. The
result is then one LSB low whenever the signs differ and the true result is
positive, and exact in every other case.

The RTL has that adder/subtractor and a 16-tap folded FIR filter built around
it. The filter uses pipelined shift-and-add multipliers, and every addition in
it is approximate.

## Number format

All data is **sign-magnitude**: bit W-1 is the sign and the low W-1 bits are
the magnitude. For example, -5 on a 4-bit bus is `1101`. This format makes the
approximate rule cheap, and it makes multiplication trivial: multiply the
magnitudes and XOR the signs. Inside the adder, one's complement is only an
intermediate form.

- `sm_ones_comp` converts between the two forms. It inverts the magnitude bits
  of a negative word and passes a positive one unchanged. The mapping is its
  own inverse, so the same circuit serves the adder's inputs and its output.
- Zero has two encodings: `+0` (all zeros) and `-0` (sign 1, magnitude 0).
  Both are valid inputs everywhere. The hardware can produce `-0` in two
  ways: a difference of equal magnitudes, or a product with a zero magnitude
  and a negative sign. Note that `-0` added to a positive value counts as an
  opposite-sign addition. It therefore comes out one LSB low, like any other
  positive opposite-sign result.

## The approximate adder/subtractor (`approx_addsub`)

Inputs are `a_i` and `b_i` (W bits each) and `sub_i`. With `sub_i = 1` the
sign of `b` is flipped first, so the unit computes a-b. The unit is purely
combinational.

| case | operation | result |
|------|-----------|--------|
| signs equal (both + or both -) | add the magnitudes, keep the sign of `a` | exact |
| signs differ, true result < 0 | one's-complement add, no carry produced | exact |
| signs differ, true result = 0 | one's-complement add, no carry | `-0` (exact value) |
| signs differ, true result > 0 | one's-complement add, carry out **dropped** | one LSB low |

Worked 4-bit examples (sign-magnitude in, 5-bit sign-magnitude out):

| a | b | result |
|---|---|--------|
| `0101` (+5) | `0010` (+2) | `0_0111` (+7) |
| `1101` (-5) | `0010` (+2) | `1_0011` (-3) |
| `0101` (+5) | `1010` (-2) | `0_0010` (+2, true +3) |
| `1101` (-5) | `1010` (-2) | `1_0111` (-7) |

The equal-sign path matters. If two negative operands were sent through the
carry-dropping one's-complement path, the error would be large, not one LSB.
Routing them to a plain magnitude addition keeps them exact.

Implementation: both operands pass through a one's-complement converter. A
single core adder adds either the two magnitudes (equal signs) or the two
one's-complement words (signs differ). For different signs, the W-bit
one's-complement sum goes back through a converter and the carry out of the
top bit is ignored.

The output `y_o` is W+1 bits wide, with the sign in bit W. That extra
magnitude bit means an equal-sign sum can never overflow. `carry_drop_o` goes
high exactly when a carry was dropped, that is, when `y_o` is one LSB below
the exact result. With uniformly random operands this happens for about one
result in four: the signs differ half the time, and half of those results are
positive.

## The filter (`approx_fir_top`)

```
 din_i ──┬─► REG ─► REG ─► ... ─► REG      (15 registers, fir_delay_line)
         │x0    x1     x2          x15
         ▼
   pre-adder k:  x[k] ± x[15-k]           (8 × approx_addsub, + register)
         ▼
   multiplier k: × coef_i[k]              (8 × ppsa_mult, 15 stages)
         ▼
   adder tree:   8 → 4 → 2 → 1            (7 × approx_addsub, register per level)
         ▼
       dout_o
```

- **Delay line** (`fir_delay_line`): 15 registers in one shift chain. Tap 0 is
  the incoming sample. The chain advances only on clocks with
  `in_valid_i = 1`.
- **Pre-adders**: tap k and tap 15-k share one multiplier. With
  `pre_sub_i = 0` they are added (a symmetric filter). With `pre_sub_i = 1`
  the later one is subtracted (an antisymmetric filter). Each output is 17
  bits wide and registered.
- **Multipliers** (`ppsa_mult`): parallel shift-and-add, pipelined one
  coefficient bit per stage. Stage k adds `a << k` to the partial product when
  coefficient magnitude bit k is 1. With 16-bit coefficients this gives 15
  stages and a new product every clock. The product is 32 bits wide: a sign
  and 31 magnitude bits.
- **Adder tree** (`fir_adder_tree`): 4 + 2 + 1 approximate adders with a
  register layer after each level. Each level widens the word by one bit, so
  the 35-bit output never overflows.

Every stage is a single adder, a single shift-and-add step or a register
transfer between two register layers. The clock period is therefore set by
one approximate adder, which is where dropping the rotated carry pays off.

### Interface and timing

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_ni` | 1 | clock; active-low synchronous reset (clears the history and the valid pipeline) |
| `in_valid_i`, `din_i` | 1, 16 | one sample per clock at most |
| `pre_sub_i` | 1 | 0: x[k]+x[15-k], 1: x[k]-x[15-k] |
| `coef_i[8]` | 16 each | sign-magnitude coefficients C0..C7, held steady while samples flow |
| `out_valid_o`, `dout_o` | 1, 35 | filter output, sign-magnitude |

The output for a sample appears **18 clocks** after the clock that accepts
it: 1 pre-adder layer, 15 multiplier stages and 3 tree levels. In general,
LATENCY = CW + log2(TAPS/2). Throughput is one sample per clock. Gaps in
`in_valid_i` just pass down the valid pipeline; nothing stalls.

### Accuracy

The filter output is exactly (exact FIR result) − (sum of dropped carries),
where:

- a dropped carry in pre-adder k counts as coefficient Ck (sign included),
  because the error is multiplied;
- a dropped carry in the tree counts as one output LSB.

The test for 128 taps feeds random full-scale data through random
coefficients. It gives these error powers, relative to the power of the
exact output:

| taps | data / coefficient width | error below signal |
|------|--------------------------|--------------------|
| 128 | 8 / 8 bits | about 48 dB |
| 128 | 16 / 16 bits | about 93 dB |

The error falls by roughly 6 dB per extra bit of data bus, so the scheme is
meant for wide buses (16 bits or more). The one-LSB errors are always
downward, so the error is a bias as well as noise. That is acceptable in a
filter but not in a general-purpose ALU.

## Parameters

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| `approx_fir_top` | `TAPS` | 16 | even; TAPS/2 must be a power of two |
| | `DW` | 16 | sample width, sign included |
| | `CW` | 16 | coefficient width, sign included; sets the multiplier depth (CW-1) |
| | `NPROD`, `LEVELS`, `OW`, `LATENCY` | derived | leave at their defaults |
| `approx_addsub`, `sm_ones_comp` | `W` | 16 | operand width |
| `ppsa_mult` | `AW`, `BW` | 17, 16 | operand widths; `PW` = AW+BW-1 |
| `fir_adder_tree` | `N`, `IW` | 8, 32 | input count (power of two), input width |
| `fir_delay_line` | `TAPS`, `DW` | 16, 16 | |

## What follows the method and what is a design choice

These follow the method as it is described:

- the equal-sign / different-sign rule;
- the dropped rotated carry;
- the one's-complement conversions;
- the folded 16-tap structure: 15 buffers, 8 multipliers and 15
  adder/subtractors, all of the approximate kind;
- the pipelined shift-and-add multiplier with a latency of several clocks;
- the 16-bit data bus.

These are this design's own choices:

- reading the data format as sign-magnitude (the description works it out
  only in examples);
- the subtract control and `pre_sub_i`;
- the one-bit growth per adder (no overflow, no truncation);
- register placement: after the pre-adders, after each multiplier bit and
  after each tree level;
- 16-bit coefficients supplied as input ports, because no values are given;
- the valid flag and the synchronous reset;
- the `carry_drop_o` observation output;
- the multiplier keeping the XOR sign on a zero product.

Not built:

- The filter described has an input block labelled PSC in front of the delay
  line. Nothing about its function is given, so it is left out. `din_i` is
  where its output connects.
- The exact one's- and two's-complement adder/subtractors are only the
  comparison baselines, so they are not built either.

## Files

`rtl/`:

- `approx_addsub.sv`: approximate adder/subtractor (uses `sm_ones_comp.sv`)
- `sm_ones_comp.sv`: sign-magnitude / one's-complement converter
- `ppsa_mult.sv`: pipelined shift-and-add multiplier
- `fir_delay_line.sv`: sample buffer chain
- `fir_adder_tree.sv`: approximate adder tree
- `approx_fir_top.sv`: the filter

`tb/`:

- `sm_ref_pkg.sv`: integer reference models of the approximate add and the
  sign-magnitude product
- `tb_sm_ones_comp.sv`: exhaustive at 6 bits, random at 16 bits
- `tb_approx_addsub.sv`: the four worked cases; exhaustive add and subtract
  at 6 bits; random at 16 bits, including the one-in-four error rate
- `tb_ppsa_mult.sv`: exact latency (15), then streaming random and extreme
  operands
- `tb_fir_delay_line.sv`: reset, random shift enable, every tap every clock
- `tb_fir_adder_tree.sv`: bit-exact against the reference tree, plus the
  error-equals-dropped-carries identity
- `tb_approx_fir_top.sv`: the full filter at default size, bit-exact against
  a model; checks the accuracy identity and the 18-clock latency for every
  output, and counts each mechanism (both kinds of dropped carry, two
  negative operands, subtract mode, input gaps, reset with outputs in flight)
- `tb_fir_noise.sv`: 128-tap filters with 8-bit and 16-bit buses; checks the
  error bound and prints the error power

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_approx_fir_top tb/sm_ref_pkg.sv tb/tb_approx_fir_top.sv
./obj_dir/Vtb_approx_fir_top
```

Replace the top module and file to run any other testbench. Lint a module
with:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/approx_fir_top.sv
```

The only lint warnings are the unused `carry_drop_o` observation wires
(`pre_drop` in the top, `drop` in the tree). They are left connected so a
testbench or waveform viewer can see where carries were dropped.
