# Generic IEEE-754 floating point adder, subtractor and multiplier

A floating point unit that adds, subtracts and multiplies IEEE 754 binary
numbers, written once for every binary interchange format. A single parameter,
`WIDTH`, chooses single (32-bit), double (64-bit) or quadruple (128-bit)
precision, and the exponent and mantissa widths follow from it. The unit
handles subnormal numbers, infinities and NaNs, supports all four IEEE rounding
directions and raises the overflow, underflow, inexact and invalid flags. Its
results are bit-exact IEEE 754 results. This was checked against an exact
reference model in all three formats.

The RTL implements the architecture of the paper *Architecture and Design of
Generic IEEE-754 Based Floating Point Adder, Subtractor and Multiplier*. That
architecture has a controller, an adder, a subtractor, a multiplier, a rounding
unit and an exception unit. The block structure, the top-level ports and the
way work is split between the blocks come from that architecture. The pipeline
timing, the code values, the guard bits and several corner-case rules are this
design's own choices. The section *Where this design makes its own choices* at
the end lists them.

## Block structure

```
 A, B ──►┌────────────┐ intA, intB ┌────────────┐
 opcode ►│ controller │───────────►│ adder      │──┐
 rmode ─►│ (operand   │ add_enable │ subtractor │  │ sign, exponent,
 load  ─►│ registers, │ sub_enable │ multiplier │  │ significand + G,R,S
         │ routing)   │ multi_en.  └────────────┘  ▼
         └────────────┘                  ┌──────────┐   ┌────────────┐ out, ready
               │ intA, intB, path, rmode │ rounding │──►│ exceptions │ overflow, underflow,
               └──► operand delay reg ──►└──────────┘   └────────────┘ inexact, invalid
```

| module | role |
|---|---|
| `fpu_top` | the unit; parameter `WIDTH` = 32, 64 or 128 |
| `fpu_controller` | operand registers; picks the unit; orders the operands; starts the unit |
| `fp_adder` | adds two magnitudes |
| `fp_subtractor` | subtracts the smaller magnitude from the larger |
| `fp_multiplier` | multiplies |
| `fp_rounding` | rounds to the format; denormalizes tiny results |
| `fp_exceptions` | special operands, overflow, flags; output register |
| `fp_rshift_sticky` | right shifter that ORs lost bits into a sticky bit |
| `fpu_pkg` | opcode, rounding-mode and path enums; `exp_width()` |

## The controller: turning add and subtract into magnitude operations

The adder and subtractor only combine magnitudes. Each passes the sign of its
first operand straight through to the result. The controller makes this work.
When an operation is loaded, the controller works out the *effective* operation
from the opcode and the two signs. Subtraction counts as addition of B with its
sign inverted:

| opcode | signs of A and B | unit used | result sign |
|---|---|---|---|
| add | alike | adder | sign of A |
| add | unlike | subtractor | sign of the larger-magnitude operand |
| subtract | unlike | adder | sign of A |
| subtract | alike | subtractor | sign of A if \|A\| ≥ \|B\|, else the inverse of B's sign |
| multiply | any | multiplier | sign A XOR sign B (formed in the multiplier) |

For addition and subtraction the controller also compares the two magnitudes.
It places the larger one in `intA` and the smaller in `intB`, and gives `intA`
the result sign. It compares the exponent and mantissa fields as one unsigned
integer, which orders IEEE magnitudes correctly. Because of this ordering the
units never shift the larger operand, and the subtractor never produces a
negative difference. For multiplication the operands pass through unchanged.

The controller then raises exactly one of `add_enable`, `sub_enable` or
`multi_enable` for one cycle. An assertion checks this.

## Inside the arithmetic units

All three units take the operand fields apart in the same way. A normal number
gets a hidden leading 1. A subnormal number (exponent field 0) gets a leading
0 and counts as exponent 1. Each unit delivers an *intermediate result* made
of three parts:

- the sign;
- a signed, biased exponent, `EXP_W+2` bits wide, which may lie outside the
  format's range;
- a significand of `MAN_W+1` bits with three more bits below it: guard, round
  and sticky. The sticky bit is the OR of every bit lost further down.

**Adder.** The exponent difference `e1 − e2` sets how far the smaller
significand shifts right. The shift keeps the guard, round and sticky bits.
The two significands are then added. A carry out is handled by a one-bit right
shift (the lost bit goes into the sticky bit) and an exponent increment. Two
subnormals can add up to a normal number without special handling: the
leading bit simply appears.

**Subtractor.** Alignment is the same as in the adder. The shifted significand
is subtracted from the larger one. Cancellation then leaves leading zeros, so
the normalizer counts them, shifts left and decrements the exponent. The shift
stops at exponent 1, so a difference below the normal range comes out already
in subnormal form. The reduced sticky bit is enough here. When the operands
are two or more places apart, the difference loses at most one leading bit, so
the guard and round bits still lie above the sticky bit. When they are closer,
no bit is shifted out at all. An exact zero difference gives a zero
significand.

**Multiplier.** The result sign is the XOR of the operand signs. The result
exponent is `e1 + e2 − bias`. The significands multiply into a product of
`2(MAN_W+1)` bits. The normalizer counts the product's leading zeros and shifts
its leading 1 to the top. A product of normal numbers has at most one leading
zero, but subnormal operands can give many. The normalizer keeps the top
`MAN_W+3` bits and a sticky bit. The exponent is corrected by the shift and may
end far below 1.

## Rounding and subnormal results

`fp_rounding` first handles an intermediate exponent below 1. It shifts the
significand right by `1 − exponent`, with sticky, and sets the exponent to 1.
This is gradual underflow: the result becomes subnormal, or rounds to zero.
Rounding then uses the last kept bit (L), guard (G) and the OR of round and
sticky (R):

| `rmode` | direction | round up when |
|---|---|---|
| 0 | to nearest, ties to even | G and (R or L) |
| 1 | toward +∞ | (G or R) and positive |
| 2 | toward −∞ | (G or R) and negative |
| 3 | toward zero | never |

A carry out of the increment renormalizes the significand and raises the
exponent. A subnormal that rounds up to 2^emin simply gains its leading bit,
which turns it into the smallest normal number. The exponent is left unbounded
above; the exception unit detects overflow. The rounding unit also reports:

- **inexact**: G or R was set;
- **tiny**: the value was below the normal range before rounding;
- **zero**: the intermediate significand was exactly zero.

## Special cases and flags

`fp_exceptions` gets the operands of the result it is finishing and applies
these rules in order:

| case | result | flags |
|---|---|---|
| either operand NaN | quiet NaN `0 11…1 10…0` | invalid if a NaN is signalling |
| ∞ − ∞ (effective subtraction), 0 × ∞ | quiet NaN | invalid |
| other infinite operand | ∞ with the result sign | – |
| exact zero from the subtractor | +0, or −0 when rounding toward −∞ | – |
| other exact zero | zero with the computed sign | – |
| rounded exponent ≥ all ones | ∞, or the largest finite number in directions that point back toward zero | overflow, inexact |
| anything else | the rounded value | inexact from rounding; underflow if tiny and inexact |

Division by zero, the fifth IEEE exception, cannot occur because the unit has
no divider, so it has no output.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | clock, rising edge |
| `reset` | in | 1 | synchronous, active high |
| `enable` | in | 1 | clock enable for the whole unit; low freezes every register |
| `load` | in | 1 | accept `A`, `B`, `opcode`, `rmode` on this enabled edge |
| `A`, `B` | in | `WIDTH` | operands |
| `opcode` | in | 2 | 0 add, 1 subtract (A − B), 2 multiply |
| `rmode` | in | 2 | 0 nearest-even, 1 toward +∞, 2 toward −∞, 3 toward zero |
| `out` | out | `WIDTH` | result |
| `ready` | out | 1 | `out` and the flags hold a new result |
| `overflow`, `underflow`, `inexact`, `invalid` | out | 1 each | IEEE flags of that result |

The unit is a three-stage pipeline. It has three register stages:

1. the controller's operand registers;
2. the result registers of the adder, subtractor or multiplier;
3. the output register in the exception unit. The rounding logic sits between
   stages 2 and 3.

An operation loaded on enabled edge *n* appears on `out` after enabled edge
*n+2*. At that point `ready` is high, so there are three enabled edges from
load to result. `load` may be high on every enabled edge, giving one result per
cycle. While `enable` is low nothing moves, and `ready` and `out` keep their
values. A consumer should therefore take `ready` as valid only in cycles where
`enable` is high. `out` and the flags hold until the next result.

```
clock   _/‾\_/‾\_/‾\_/‾\_/‾\_
load    ‾‾‾‾\___________        (enable high throughout)
A,B     =X1==
stage   ctrl  unit  out
ready   ____________/‾‾‾\___
out     ============= R1 ====
```

## Parameters and sizes

`fpu_top` has one parameter, `WIDTH` (default 32). It sets
`EXP_W = exp_width(WIDTH)`: 8, 11 or 15, or 5 for 16-bit half precision. It
also sets `MAN_W = WIDTH − 1 − EXP_W`. The submodules take `EXP_W` and `MAN_W`
directly and work for any format with `MAN_W ≥ 2`.

After coarse synthesis, the single-precision unit has about 290 flip-flops. Its
largest cell is the 24 × 24 significand multiplier, which is purely
combinational. The pipeline does not split the multiplier, the alignment
shifter or the normalizers. At 128 bits the single-stage 113 × 113 multiplier
will set the clock rate.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

- `tb/fp_ref_pkg.sv` is the reference model. It does not use a fixed-width
  datapath. Each operand becomes an exact integer times a power of two. Sums
  and products are formed exactly, and each result is rounded by finding its
  leading 1 and comparing the dropped remainder with half an ulp. One shortcut
  keeps the integers small: when two addends are more than 2P+6 places apart,
  the smaller one shrinks to a single unit far below the result.
- `tb_fp_adder`, `tb_fp_subtractor`, `tb_fp_multiplier` feed single-precision
  operand pairs to each unit, ordered as the controller orders them. They
  check:
  - the one-cycle `ready` pulse, including across stalls;
  - that the intermediate result is normalized;
  - that rounding it in every mode gives the reference result and flags;
  - a few hand-worked cases.
- `tb_fp_rounding` covers random exponents from deep underflow to past
  overflow, exact ties and directed cases.
- `tb_fp_exceptions` runs every operand class, every path and rounding mode,
  and overflowing, subnormal and zero results. Its expected values come from
  the IEEE rules written out in the testbench.
- `tb_fpu_controller` checks routing, ordering and the enable pulses. It also
  checks that the reordered, re-signed operand pair means the same operation
  as A op B in every rounding mode.
- `tb_fpu_top` is the end-to-end test at the default 32-bit size. It runs
  100,000 random operations through the whole unit using `tb/fpu_stim.sv`, with
  back-to-back loads and random stalls. It checks every result, every flag and
  the three-edge latency. It counts how often each mechanism occurred and fails
  if any never did. The mechanisms are:
  - each operation and each routing;
  - operand swap, adder carry and deep cancellation;
  - each rounding mode and each flag;
  - NaN, infinity, subnormal and zero results;
  - stall and back-to-back loads.
- Both end-to-end benches start with 14 hand-derived vectors, built from the
  format's fields. They cover exact sums and products, ±0 from x − x, ties in
  both directions, overflow to ∞ and to the largest finite number, a tie
  underflowing to zero, the subnormal boundary, ∞ − ∞ and 0 × ∞. Each vector
  is checked against the unit and, as a check on the model, against the
  reference model.
- `tb_fpu_formats` runs the same stream, 50,000 operations each, on the unit
  built for 64 and for 128 bits.

Each block's testbench was also run against a deliberately broken copy of the
block. Every broken copy was caught. The breaks included a lost sticky bit,
ties rounded away from zero, wrong routing, and the rounding mode taken from
the wrong pipeline stage.

To simulate with Verilator 5 from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv --top-module tb_fpu_top
./obj_dir/Vtb_fpu_top
```

To run another bench, replace `tb_fpu_top` with its name. Each run takes well
under a minute.

## Where this design makes its own choices

The architecture names the blocks and describes what each does. It leaves
these points open, and the RTL settles them as follows:

- **Routing rule.** The controller description says an addition goes to the
  subtractor when "either" operand is negative, and a subtraction goes to the
  adder in the same case. The RTL reads this as "the signs differ". A sum of
  two negative numbers is therefore done by the adder, with a negative result.
- **Operand ordering.** The controller orders the operands by magnitude for
  both the adder and the subtractor, so the smaller operand is always the one
  that gets shifted.
- **Alignment.** One description of the algorithm speaks of the difference of
  the two *mantissas*. The shift here is set by the difference of the
  *exponents*, as the block diagrams show.
- **Subnormals.** Subnormals are fully supported: as operands, through gradual
  underflow in the rounding unit, and through the subtractor's clamped
  normalization.
- **Guard bits.** Three guard bits (guard, round, sticky) are carried from
  every unit to the rounding unit.
- **Underflow.** Tininess is detected before rounding. IEEE 754 permits this
  choice.
- **NaN results.** Every NaN result is the canonical quiet NaN. No operand
  payload is propagated.
- **Encodings.** Opcode and rounding-mode encodings, the synchronous reset,
  `enable` as a whole-unit clock enable, and the three-stage pipeline with one
  result per cycle are all this design's choices.
- **Operand delay register.** The top has an operand delay register that
  carries the operands, the path and the rounding mode alongside the unit
  result, so the exception unit examines the operands of the result it is
  finishing.
- **Default width.** The default `WIDTH` is 32. The 64- and 128-bit formats
  use the same RTL with `WIDTH` overridden.
- **FPGA implementation.** The original work targets a Virtex-4 FPGA but
  reports no implementation. This RTL is generic, with no vendor primitives,
  and no timing figures come with it.
