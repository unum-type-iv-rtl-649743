# Unum Type-IV floating-point unit

Unum Type-IV is a floating-point format in which every word says how long its
own exponent is. A small fixed field at the top of the word holds the exponent
size; the exponent field follows, and whatever bits are left form the
fraction. Numbers near 1 need few exponent bits and therefore keep a long
significand; very large and very small numbers spend bits on the exponent and
lose precision. Precision tapers off smoothly instead of being constant over
a fixed range and then ending at infinity or zero.

The format also has no special values: no NaN, no infinities, one zero, no
redundant encodings. Every bit pattern is a real number. Operations that
would leave the representable range do not produce a special value; they
raise a flag instead (overflow, underflow, divide by zero).

This repository holds a parameterised, pipelined SystemVerilog FPU for the
format. It adds, subtracts, multiplies and divides, with round-to-nearest-even
or truncation chosen at elaboration time. It also holds self-checking
testbenches for every unit and for the whole FPU, including a
nearest-neighbour classifier that runs on it.

## The number format

A Unum-IV⟨DATA_W, EXP_SZ_W⟩ word is laid out, MSB first, as

```
| ExpSz (EXP_SZ_W bits) | E (ExpSz bits) | F (FracSize bits) |
FracSize = DATA_W - EXP_SZ_W - ExpSz
```

The value is r = s · 2^e. Its parts are:

- **ExpSz** is an unsigned count of explicit exponent bits, from 0 to
  M = 2^EXP_SZ_W − 1. Because ExpSz + FracSize is constant, every exponent
  bit costs one fraction bit.
- **Exponent e.** E is a 1's complement number with a hidden MSB. The hidden
  bit is the inverse of E's top bit, so a stored top bit of 1 means positive.
  - For a positive exponent, e = E.
  - For a negative exponent, e = E − (2^ExpSz − 1).
  - With ExpSz = 0 there is no E field and e = 0.
  - Each exponent has exactly one encoding: it uses the fewest bits that
    hold |e|.
  - The normal range is e ∈ [1 − 2^M, 2^M − 1].
- **Significand s.** The significand is a 2's complement fixed-point number
  with one integer bit. That integer bit is hidden and equals the inverse of
  F's top bit.
  - A normal significand is therefore s ∈ [0.5, 1) or s ∈ [−1, −0.5).
  - The hidden bit carries the sign, so there is no separate sign field.
- **Subnormals.** The pattern ExpSz = M with E all zeros would be the most
  negative 1's complement exponent. It is reserved instead.
  - It means e = 2 − 2^M.
  - The hidden significand bit then equals F's top bit rather than its
    inverse.
  - This gives a gradual underflow: values below the smallest normal number
    lose precision a bit at a time instead of flushing to zero.
- **Zero** is the subnormal pattern with F = 0: ExpSz all ones, and everything
  else zero.

A few ⟨8,2⟩ examples show how this works:

| Word | ExpSz | E | F | Value |
|---|---|---|---|---|
| `0x20` | 0 | – | 100000 | +0.5 · 2^0 = 0.5 |
| `0x00` | 0 | – | 000000 | −1 · 2^0 = −1 |
| `0x70` | 1 | 1 | 10000 | +0.5 · 2^1 = 1 |
| `0xC0` | 3 | 000 | 000 | zero |

The ranges that follow from the format, for the configurations built and
simulated here, are:

| Configuration | minpos | maxpos | fraction bits |
|---|---|---|---|
| ⟨8,2⟩ | 1.95e−3 | 112 | 3 … 6 |
| ⟨16,3⟩ | 1.84e−40 | 1.67e38 | 6 … 13 |
| ⟨32,3⟩ | 2.80e−45 | 1.70e38 | 22 … 29 |
| ⟨32,4⟩ (default) | 3.45e−9868 | 7.08e9863 | 13 … 28 |
| ⟨64,4⟩ | 8.03e−9878 | 7.08e9863 | 45 … 60 |

⟨32,4⟩ covers a far wider range than IEEE binary64. It also keeps up to 28
fraction bits near 1, where binary32 has 23. That is why it is the default
configuration.

## Architecture

```
        a ─► unpack A ─┐         ┌─► add/sub (6) ──┐
                       ├─ ctrl ──┼─► multiply (4) ─┼─► pack (3+ROUNDING) ─► ctrl ─► o, flags, done
        b ─► unpack B ─┘         └─► divide (5+MAN_MAX_W+EXTRA) ┘
             (3 stages)
```

Between the stages, a number travels in a fixed unpacked form (`unum4_pkg`):

- a zero flag;
- a signed exponent, wide enough for any product, quotient or
  renormalisation: 2^EXP_SZ_W + clog2(MAN_MAX_W) + 3 bits;
- a normalised 2's complement significand of
  MAN_MAX_W = DATA_W − EXP_SZ_W + 1 bits. That is the longest fraction plus
  its hidden bit.

The processing units append a guard bit, a round bit and a sticky bit. Their
results are therefore MAN_MAX_W + 3 bits wide. Every datapath element is sized
for the widest exponent and the longest significand that the configuration
allows. This is the price of the variable field widths.

### Unpack (`unum4_unpack`, 3 stages)

The unpack unit cuts a word into its fields. Stage 1 registers the word.
Stage 2:

- reads ExpSz;
- uses barrel shifters to cut the ExpSz-bit exponent field and the
  left-aligned fraction out of the word;
- detects the subnormal pattern.

Stage 3:

- restores both hidden bits;
- evaluates the 1's complement exponent;
- normalises a subnormal operand with the leading-digit detector and a left
  shift, lowering its exponent to match;
- flags zero.

Every later unit can therefore assume normalised operands.

### Add/subtract (`unum4_addsub`, 6 stages)

The add/subtract unit works in these stages:

1. Subtraction negates b. The significands get a second integer bit so that
   −(−1) = +1 fits.
2. The exponent-difference unit picks the larger exponent and the alignment
   distance. The distance saturates, so that far-apart operands only
   contribute a sticky bit.
3. The smaller operand is shifted right arithmetically. The shift keeps a
   guard bit and a round bit, and ORs everything shifted out into a sticky
   bit.
4. The aligned significands are added.
5. The leading-digit detector and the shifter normalise the sum. A carry
   shifts right by one; a cancellation shifts left.
6. The result is registered.

### Multiply (`unum4_mul`, 4 stages)

The multiply unit:

1. registers the operands;
2. forms the full signed product and adds the exponents;
3. normalises the product and folds the discarded low bits into the sticky
   bit;
4. registers the result.

Both inputs are normalised, so the product needs at most a 2-place
normalisation.

### Divide (`unum4_div`, 5 + MAN_MAX_W + EXTRA stages)

The divide unit is a shift-and-subtract (restoring) serial divider on
magnitudes:

1. The first stage takes |a| and |b| and the quotient sign, subtracts the
   exponents, and flags a zero divisor.
2. The divider forms |ma| / (2·|mb|), which lies in [0.25, 1]. It produces
   one quotient bit per cycle: MAN_MAX_W + 1 + EXTRA bits in all, plus a
   sticky bit from the final remainder.
3. A sign stage negates the quotient, carrying the sticky bit along.
4. A final stage normalises the quotient.

EXTRA is 3 when rounding is on, for the guard, round and sticky quotient bits,
and 0 for truncation. The divider is iterative and accepts one division at a
time.

### Pack (`unum4_pack`, 3 + ROUNDING stages)

Packing is the hardest part of the design. The number of fraction bits that
survive depends on the exponent that is being packed.

- **Range check.**
  - e > 2^M − 1 is an overflow.
  - A magnitude below minpos, the smallest positive subnormal, is an
    underflow.
  - An exponent below the normal range is denormalised: the barrel shifter
    shifts right to the subnormal exponent and keeps a sticky bit.
  - ExpSz is set to the bit length of |e|, found with the leading-digit
    detector, or to M for a subnormal.
  - ExpSz fixes FracSize.
- **Rounding** (present only when ROUNDING = 1). The significand is rounded
  to FracSize fraction bits, to nearest with ties to even. The rounding uses
  the bit just below the cut (guard), the next one (round), and the OR of
  everything further down (sticky).
- **Renormalise and encode the exponent.**
  - A rounding carry turns 0.11…1 into 1.0. The unit then shifts and raises
    e, which can itself overflow.
  - Rounding can also land on −0.5 exactly. The unit then shifts the other
    way and lowers e.
  - A subnormal that rounds up to 0.5 becomes the smallest normal number.
  - The E field is e for e > 0 and e − 1 for e < 0, in ExpSz bits.
- **Assemble** {ExpSz, E, F}.

When ROUNDING = 0, the bits below the cut are simply dropped. On a 2's
complement significand this truncates toward −∞ for both signs.

### Control logic (`unum4_ctrl`)

The control logic sequences one operation at a time.

- **Start.** A `start` strobe is accepted only while the FPU is idle. It
  latches `op` and sends a valid token into the unpack units. A start while
  busy is ignored.
- **Dispatch.** When the unpacked operands come out, `op` steers them to one
  unit: 0 add, 1 subtract, 2 divide, 3 multiply.
- **Completion.** When the pack unit delivers, `done` strobes for one cycle.
  `o` and the three exception strobes come with it.
- **Exceptions.** On an exception the result is not passed on: `o` is the
  zero word and the flag says why.

### Auxiliary units

| Module | Function |
|---|---|
| `unum4_bshift` | barrel shifter: arithmetic right shift with sticky, or left shift |
| `unum4_adder` | adder/subtractor |
| `unum4_expdiff` | exponent difference: larger exponent, swap, saturated distance |
| `unum4_lzd` | leading zeros/ones detector: number of copies of the sign bit |
| `unum4_serial_div` | shift-and-subtract serial divider, one quotient bit per cycle |
| `unum4_multiplier` | signed multiplier |
| `unum4_norm` | normaliser built from `unum4_lzd` and `unum4_bshift` |

## Interface and timing

| Port | Width | Dir | Meaning |
|---|---|---|---|
| `clk` | 1 | in | clock |
| `rst` | 1 | in | asynchronous active-high reset (all flops) |
| `start` | 1 | in | strobe: `a`, `b`, `op` valid, start an operation |
| `op` | 2 | in | 0 add, 1 subtract, 2 divide, 3 multiply |
| `a`, `b` | DATA_W | in | operands |
| `o` | DATA_W | out | result, valid while `done` |
| `done` | 1 | out | one-cycle strobe: result ready |
| `div_by_zero` | 1 | out | strobe with `done`: divisor was zero |
| `underflow` | 1 | out | strobe with `done`: nonzero result below minpos |
| `overflow` | 1 | out | strobe with `done`: exponent above 2^M − 1 |

Latency from the cycle where `start` is sampled to `done` is
3 + unit + (3 + ROUNDING) + 1 cycles. The unit term is 6 for add and
subtract, 4 for multiply, and 5 + MAN_MAX_W + EXTRA for divide.

| Operation | ⟨32,4⟩, ROUNDING=1 | ⟨16,3⟩, ROUNDING=1 | ⟨16,3⟩, ROUNDING=0 |
|---|---|---|---|
| add/sub | 14 | 14 | 13 |
| multiply | 12 | 12 | 11 |
| divide | 45 | 30 | 26 |

The processing and pack units are themselves fully pipelined, apart from the
divider. The control logic nevertheless keeps a single operation in flight,
so that units with different latencies never meet at the pack unit. To issue
the next operation, wait for `done`; `start` may be raised in the same cycle
that `done` is seen.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `DATA_W` | 32 | word width |
| `EXP_SZ_W` | 4 | width of the exponent-size field |
| `ROUNDING` | 1 | 1: round to nearest, ties to even; 0: truncation |

All internal widths are derived from these three parameters by functions in
`unum4_pkg`. Configurations of interest are ⟨16,3⟩, ⟨32,3⟩, ⟨32,4⟩ and
⟨64,4⟩, each in both rounding modes. All of them elaborate.

## Verification

Every testbench checks itself. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

The reference model (`tb/unum4_ref_pkg.sv`) works independently of the RTL.
It decodes words into real values, computes the exact result, and encodes it
back with the same rounding rules. Its arithmetic is double precision;
where that would not be exact, the testbenches limit the operands or switch
to integer arithmetic, as described below.

| Testbench | Checks |
|---|---|
| `tb_unum4_fpu` | whole FPU in eight configurations side by side; see below |
| `tb_unum4_fpu_full` | whole FPU at its defaults (⟨32,4⟩, rounding), instantiated with no parameters, 4000 operations |
| `tb_unum4_knn` | nearest-neighbour classifier on the default FPU (see below) |
| `tb_unum4_unpack`, `_addsub`, `_mul`, `_div`, `_pack` | each unit on its own: significand to the last bit including the sticky, exponent, flags, latency |
| `tb_unum4_ctrl` | dispatch, ignored starts, strobe timing, forcing zero on exceptions |
| `tb_unum4_bshift`, `_adder`, `_expdiff`, `_lzd`, `_serial_div`, `_multiplier` | auxiliary units |

`tb_unum4_fpu` covers these configurations:

- ⟨16,3⟩, ⟨8,2⟩ and ⟨32,3⟩, each in both rounding modes;
- ⟨64,4⟩ in both rounding modes. The reference model computes in double
  precision, which cannot hold 60-bit fractions, so operands here have short
  significands and small exponents. Add, subtract and multiply results then
  fit a double and are checked bit-exactly. Half of the divisions use a
  dividend that is the exact product of the divisor and a short number, so
  the quotient must come back bit-exactly. The other divisions are checked
  in wide integer arithmetic: the exact quotient must lie in the rounding
  interval of the returned word.

For each configuration it compares every result, flag and latency with the
reference model. It also counts each mechanism and fails if any one never
occurred. The mechanisms are:

- each operation;
- overflow, underflow and divide by zero;
- subnormal operands and subnormal results;
- zero results;
- rounding up and a rounding carry into the next exponent;
- starts ignored while busy.

`tb_unum4_knn` classifies test points by a majority vote of their 10 nearest
labelled points. It computes every squared distance on the FPU, as two
subtractions, two multiplications and one addition, and checks each result
against the reference model, which here works in exact integer arithmetic.
It runs two sets of 10 random benchmarks:

- Points are packed near 1: training points lie in [0.99999, 1] and test
  points in [0.9, 1].
- Points lie anywhere in [0, 1e22]. Squared distances then reach about
  1e44, beyond binary32.

Each benchmark has 40 training points in 3 classes and 8 test points. In both
sets the FPU classification agrees with a double-precision classification
for every test point.

### Running a simulation

Plain Verilator 5 is enough. Packages go first on the command line; `-I`
makes Verilator find every other module by file name.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/unum4_pkg.sv tb/unum4_ref_pkg.sv tb/tb_unum4_fpu.sv \
    --top-module tb_unum4_fpu --Mdir obj_fpu
./obj_fpu/Vtb_unum4_fpu
```

Replace `tb_unum4_fpu` with any other testbench name. The unit testbenches
that do not use the reference model need only `rtl/unum4_pkg.sv` before
their own file. Each testbench runs in seconds.

## Design choices and departures

What follows covers the places where this implementation had to choose, or
where it reads its source specification in a particular way.

- **Field order.** The order {ExpSz, E, F} from the MSB down is this design's
  choice.
- **Operation codes.** Add = 0 and subtract = 1 come from the specification.
  Divide = 2 and multiply = 3 follow the order in which it lists the
  operations.
- **Division latency.** This is read as 5 + MAN_MAX_W + EXTRA cycles. The
  divider produces MAN_MAX_W + 1 + EXTRA quotient bits within that count. The
  extra bit is needed because the quotient |a|/(2|b|) can be as small as
  0.25, so one leading bit may be lost in normalisation. Another reading of
  the specification would add one more cycle.
- **Stage contents.** The stage counts of every unit follow the
  specification: unpack 3, add/sub 6, multiply 4, pack 3 + ROUNDING. What
  each stage does is this design's choice.
- **One operation in flight.** The specification does not say whether
  operations may overlap. Overlapping them would need a result queue or
  scheduling, because the latencies differ.
- **Result on exception.** The specification says the computation is
  interrupted and a flag is raised. Here `o` is forced to zero, so that a
  wrong value is never passed on silently.
- **Underflow** is raised when a nonzero result's magnitude is below the
  smallest positive subnormal. Results between that and the smallest normal
  number are delivered as subnormals.
- **Overflow** is raised when the exponent, after any rounding carry, exceeds
  2^M − 1. There is no saturation to maxpos.
- **Truncation** means cutting a 2's complement significand. That rounds
  toward −∞ for negative results, not toward zero.
- **Ties to even** look at the last kept bit of the 2's complement fraction.
- **Subnormal operands** are normalised in the unpack unit. The processing
  units therefore never see them.
- **Not included:**
  - conversion between decimal (or IEEE) values and the format;
  - any of the implementation figures (area, power, clock frequency) of a
    particular ASIC flow. Such figures depend on the technology and tools.
