# A floating-point unit whose number format is a synthesis parameter

Embedded software often needs floating point but not the full precision of
IEEE single or double precision, and FP arithmetic is a large share of the
energy and area of a small CPU. This unit lets the format itself be chosen when
the hardware is built: two parameters, `E` (exponent bits) and `M` (stored
mantissa bits), fix the width of every signal, so the same RTL yields IEEE half,
single or double precision, or a non-standard format such as 1+6+11 = 18 bits,
with area and delay that shrink with the format. This is the idea of
*transprecision* computing: each application gets the precision it needs and no
more.

The unit is fully combinational. It has no clock and no registers, so it fits
inside one pipeline stage of a CPU. It performs five operations:

| code | operation | result |
|---|---|---|
| 0 `OP_ADD` | sum | `a + b` |
| 1 `OP_SUB` | subtraction | `a - b` |
| 2 `OP_MUL` | multiplication | `a * b` |
| 3 `OP_F2I` | float to integer | `a` truncated to a `W`-bit integer |
| 4 `OP_I2F` | integer to float | the `W`-bit integer `a`, rounded to the format |

Here `W = 1 + E + M` is the word width, at most 64.

## Number format and special values

A word is `{sign, exponent[E-1:0], mantissa[M-1:0]}`, with a biased exponent
(bias `2^(E-1) - 1`) and a hidden leading one, as in IEEE 754. An exponent of all
ones encodes infinity (mantissa 0) or NaN (any other mantissa). A NaN whose
mantissa MSB is 0 is signalling.

**Denormals are not supported.** Any operand with a zero exponent field is read as
a zero of its sign, whatever its mantissa: this is flush-to-zero, the policy of
the ARM VFP. A result too small for a normal number is also replaced by zero
(see underflow below). This saves the wide shifters that gradual underflow
needs. The price is some accuracy near the bottom of the range.

## Interface

```
module fpu_core #(int unsigned E = 8, int unsigned M = 23) (
  input  logic [W-1:0] a, b,
  input  logic [2:0]   operation,   // fpu_pkg::fpu_op_e
  input  fpu_ctrl_t    control,     // {exc_en, int_signed}
  output logic [W-1:0] result,
  output fpu_status_t  status       // {invalid, overflow, underflow, inexact}
);
```

The default is single precision (`E=8, M=23`), the reference format when
comparing sizes. `control` sets the unit up for the current operation:

* `int_signed` sets how the conversions read the integer. When it is set, the
  integer operand of `OP_I2F` and the integer result of `OP_F2I` are two's
  complement. When it is clear, they are unsigned. For `OP_I2F` this bit is what
  decides the sign of the result.
* `exc_en` enables the exceptions. When it is clear, `status` reads 0. The result
  is the same either way, and there is no trap.

The integer is `W` bits wide: 32 bits for single precision and 16 bits for half
precision. It enters on `a` and leaves on `result`. Codes 5 to 7 are undefined:
they return 0 and raise `invalid`.

Timing: `result` and `status` are valid one combinational propagation delay
after the inputs change. The delay of a wrapping pipeline stage must cover the
slowest path, which is the adder's alignment, normalisation and rounding.

## Exceptions

| flag | raised when | result |
|---|---|---|
| `inexact` | rounding or truncation changed the value | rounded value |
| `overflow` | rounded exponent above the format's maximum | infinity of the result's sign |
| `underflow` | rounded exponent below the minimum normal | zero of the result's sign |
| `invalid` | inf - inf, inf * 0, a signalling NaN operand, float-to-int of NaN, infinity or out-of-range value, undefined opcode | NaN (canonical quiet NaN `0 11..1 10..0`) for arithmetic; saturated integer for conversions |

Overflow and underflow also raise `inexact`. Underflow is decided *after*
rounding: a product that is just below the smallest normal number but rounds up
to it is not an underflow. A quiet NaN operand gives the canonical NaN without
raising `invalid`.

## How the operations are computed

Each operation has its own unit (`fpu_addsub`, `fpu_mul`, `fpu_f2i`, `fpu_i2f`).
All of them see the operands all the time, and `fpu_core` multiplexes the result
and flags of the selected unit to the outputs. `fpu_unpack` decodes and
classifies an operand. `fpu_round` is the rounding stage shared by the three
units that produce a float.

### Rounding stage (`fpu_round`)

The input is a nonzero value in three parts:

* a signed exponent that is wide enough never to wrap;
* an `M+1`-bit significand whose leading one is at the top;
* a **guard** bit (the first bit below the significand) and a **sticky** bit
  (the OR of every bit below that).

The stage rounds to nearest with ties to even. It increments when
`guard & (sticky | lsb)`. A carry out of the significand leaves it at `1.00…0`
and adds one to the exponent. Then it checks the range. An exponent of
`2^E - 1` or more means overflow. An exponent of 0 or less means underflow.
Otherwise it packs the word.

### Adder/subtractor (`fpu_addsub`), the longest path

1. **Swap.** Compare the two magnitudes, which are simply the words without
   their sign bits, and call the larger one *big*. The result's sign is big's
   sign. The operation is an effective subtraction when the two signs differ,
   with `b`'s sign flipped first for `OP_SUB`.
2. **Align.** Put both significands in an `M+4`-bit field: the significand and
   three extra bits (guard, round, sticky). Shift the small one right by the
   exponent difference, and OR every bit that falls off into its bottom bit. A
   difference of `M+4` or more leaves only that sticky bit.
3. **Add or subtract.** The result is `M+5` bits wide and is never negative,
   because big is the larger magnitude.
4. **Normalise.** After a carry, shift right by one place, keeping the bit that
   falls off as sticky, and add one to the exponent. Otherwise, shift left by
   the leading-zero count and subtract that count from the exponent. A long
   left shift only happens when the exponents differ by at most one. In that
   case nothing was shifted out and the three extra bits are exact. This is
   why three bits are enough for a correctly rounded result.
5. **Round.** The top `M+1` bits go to `fpu_round` with the next bit as guard
   and the OR of the last two as sticky.

Special operands bypass this path. An exact cancellation (`x - x`) gives `+0`. A
sum of two zeros gives `-0` only if both are `-0`. If one operand is zero, the
result is the other operand unchanged.

### Multiplier (`fpu_mul`)

The two `M+1`-bit significands are multiplied exactly into a `2M+2`-bit product
in [1, 4). If the product is 2 or more, it is read one place lower and the
exponent is incremented. Below the kept `M+1` bits, the next bit is the guard
and the OR of the rest is the sticky. The exponent is `ea + eb - bias`,
computed with two spare bits so that overflow and underflow are both visible.
`inf * 0` is invalid. Any other product with an infinity is infinity. A product
with a zero is a zero carrying the XOR of the signs.

### Float to integer (`fpu_f2i`)

Conversion truncates toward zero, as a C cast does. The significand is shifted
left by the unbiased exponent into a field of `W + M + 1` bits. The upper
`W + 1` bits hold the integer part and the lower `M` bits the fraction that is
dropped, which raises `inexact` if it is nonzero. A value below 1 gives 0 with
`inexact`. A value that does not fit the signed or unsigned range raises
`invalid` and saturates to the nearest limit: for example `-5.0` converted to
unsigned gives 0. An infinity saturates in the same way, and a NaN gives 0.

### Integer to float (`fpu_i2f`)

A negative two's-complement operand is negated, which also handles the most
negative value. The magnitude is normalised by its leading-zero count. Its top
`M+1` bits become the significand, the next bit the guard and the rest the
sticky, and the shared rounding stage rounds the result. For formats with a
small exponent range, a large integer can overflow to infinity. For example,
unsigned 65535 in half precision rounds to 65536 and overflows, and any value
of 2^16 or more in an 18-bit `E=5` format does too. Zero converts to `+0`.

## Choosing a format

Any `E >= 2`, `M >= 2` with `1 + E + M <= 64` elaborates. An initial assertion
rejects wider formats. These are the formats the unit was evaluated at, all of
which this RTL has been simulated at:

| name | E | M | bits |
|---|---|---|---|
| half | 5 | 10 | 16 |
| m11_e6 | 6 | 11 | 18 |
| m12_e5 | 5 | 12 | 18 |
| m13_e6 | 6 | 13 | 20 |
| m14_e5 | 5 | 14 | 20 |
| m16_e7 | 7 | 16 | 24 |
| m17_e6 | 6 | 17 | 24 |
| single | 8 | 23 | 32 |
| m37_e10 | 10 | 37 | 48 |
| m38_e9 | 9 | 38 | 48 |
| double | 11 | 52 | 64 |

For a fixed word width, more exponent bits buy dynamic range and more mantissa
bits buy precision. Half precision overflows at 65504, while E=6 formats reach
about 4.3e9. On a Kintex-7 FPGA with DSP blocks disabled, the reduced formats
from 16 to 24 bits were reported at roughly 38% to 67% of the LUTs of single
precision. Their delay was about 20 ns, against 25 ns for single and 29 ns for
double. Those figures are not reproduced here.

`M` counts stored mantissa bits only. Half precision has `M = 10`; it is
sometimes described as having an 11-bit mantissa, which counts the hidden bit.

## Verification

Every testbench checks itself against a reference model, `tb/fpu_ref_pkg.sv`,
and prints `TB_RESULT checks=N failures=F`. The package holds two models:

* **Double-based model.** It decodes the operands to a simulator `real` (IEEE
  double) and does the operation in double. It then rounds the double to the
  target format by integer arithmetic on its bit pattern, comparing the
  discarded bits with one half. For `M <= 25`, double has more than twice the
  format's precision, so this gives the correctly rounded result. For
  addition it also tracks the exact error of the double sum (a two-sum), so
  that ties and `inexact` are exact too.
* **Exact integer model** (`ref_add_x`, `ref_mul_x`, `ref_i2f_x`). It holds
  each value as a 256-bit integer times a power of two and forms the exact sum
  or product. It rounds the same way, by comparison with one half. It serves
  every format up to double precision. In a sum, an operand more than 120
  places below the other is replaced by a unit in the last place, since it
  can then only act as a sticky bit.

| testbench | what it covers |
|---|---|
| `tb_fpu_addsub` | adder at single, half and E6/M11: ties, cancellation, signed zeros, overflow, underflow, specials, denormal inputs, 20 000 random pairs per format, half of them with nearby exponents |
| `tb_fpu_mul` | multiplier at single, half and E7/M16: normalisation, ties, overflow, underflow, inf*0, specials, random pairs steered toward the range limits |
| `tb_fpu_f2i` | float to integer at single/32-bit and half/16-bit, signed and unsigned, integer limits and one step beyond, fractions, specials |
| `tb_fpu_i2f` | integer to float at single, half and E5/M12, including the most negative integer, ties to even, and overflow to infinity |
| `tb_fpu_core` | the whole unit at its defaults (single precision), 50 000 mixed operations with random control words and undefined opcodes. It counts each operation and exception, denormal inputs, NaN results, masked status, both integer modes and undefined opcodes, and fails if any of them never occurred |
| `tb_fpu_formats` | `fpu_core` built at all eleven formats above, 6 000 fully random operations each, checked against the exact model. For `M <= 25` the double-based model must agree as well, so the two models check each other |

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpu_core \
  -y rtl -y tb +libext+.sv rtl/fpu_pkg.sv tb/fpu_ref_pkg.sv tb/tb_fpu_core.sv
./obj_dir/Vtb_fpu_core
```

The other testbenches run the same way, with their own module name. Each of
them finishes in well under a second.

## Design choices beyond the specification

The unit was specified by its operations, its flush-to-zero policy, its
exception rules and its control inputs. What follows was chosen for this RTL:

* Rounding is round to nearest with ties to even. It is the only mode, and
  there is no rounding-mode input.
* Float to integer truncates toward zero.
* On out-of-range, infinite and NaN conversions, the integer saturates, or is 0
  for a NaN (ARM VFP behaviour), and `invalid` is raised.
* The integer width equals the word width `W`.
* The operation codes, the bit order of `control` and `status`, and the
  behaviour of undefined codes were chosen here.
* The `control` input that "assigns the sign" in conversions is read as the
  signed/unsigned selector.
* Underflow is detected after rounding.
* NaN results are canonical, and only signalling NaNs raise `invalid`.
* The internal structure of each unit is this RTL's own: a single-path adder,
  a full-width multiplier and a shared rounding stage.

## Files

| file | contents |
|---|---|
| `rtl/fpu_pkg.sv` | operation codes, control and status types |
| `rtl/fpu_core.sv` | the unit: operation units and output multiplexer |
| `rtl/fpu_addsub.sv` | adder/subtractor |
| `rtl/fpu_mul.sv` | multiplier |
| `rtl/fpu_f2i.sv` | float-to-integer converter |
| `rtl/fpu_i2f.sv` | integer-to-float converter |
| `rtl/fpu_round.sv` | shared round-to-nearest-even and range stage |
| `rtl/fpu_unpack.sv` | operand field decoder and classifier |
| `tb/fpu_ref_pkg.sv` | reference model and random operand generator |
| `tb/tb_*.sv` | testbenches listed above |
