# A single MLP neuron with a Taylor-series tan-sigmoid

A multilayer-perceptron neuron does two things. It forms the inner product
of its inputs with its weights, and it passes that sum through a sigmoid
activation. Both need care in hardware. The inner product wants operands to
stream in cheaply. A sigmoid such as tanh contains exponentials, which cannot
be built directly.

This RTL keeps the inner-product part small. Inputs and weights are shifted
one pair per clock into two short shift registers, and a combinational
multiply-accumulate (MAC) sums their products. For the activation it uses
truncated Taylor series of `e^x` and `e^-x`:

```
y = sum_{n=0..K} x^n / n!              (approximates e^x)
z = sum_{n=0..K} (-1)^n x^n / n!       (approximates e^-x)
f = (y - z) / (y + z)                  (approximates tanh x)
```

Tanh is the chosen sigmoid, not the logistic `1/(1 + e^-x)`. Evaluated the
same way, the logistic needs `e^-x` alone for large positive `x`. That series
alternates, and its truncation error swamps the tiny true value. The ratio
above is far more forgiving. For large positive `x`, `y` is huge and an error
in the small `z` barely moves the quotient. The same holds with the roles
swapped for large negative `x`. With order `K = 40` the result tracks tanh to
within one or two output LSBs over the whole range `-20 <= x <= 20`.

## Structure

```
            in_valid/in_ready
 p ──► shift_reg (input register,  R stages) ──┐
 w ──► shift_reg (weight register, R stages) ──┴► mac_unit ──► lin_out (2W bits)
                                                      │
                         every R-th accepted pair     ▼
                         (controller in neuron) ─► tansig_activation ──► act_out, act_valid
```

| File | Module | Role |
|---|---|---|
| `rtl/neuron_pkg.sv` | package | shared default widths, order and formats |
| `rtl/shift_reg.sv` | `shift_reg` | serial-in, parallel-out operand register (used twice) |
| `rtl/mac_unit.sv` | `mac_unit` | combinational sum of `R` products, `2*W` bits |
| `rtl/tansig_activation.sv` | `tansig_activation` | sequential Taylor-series tanh with divider |
| `rtl/neuron.sv` | `neuron` | top: registers, MAC, pair counter, activation |

## Operand registers and MAC

Each accepted pair `(p, w)` enters stage 0 of its register, and older words
move one stage along. The MAC multiplies stage `j` of one register with stage
`j` of the other and adds the `R` products. `lin_out` is therefore the inner
product of the last `R` accepted pairs. It is valid in the cycle after each
accept, and it is also the neuron's linear output, `g(z) = z`.

For example, entering inputs 7, 8, 9 with weights 6, 7, 8 into a 3-stage
neuron that starts from reset gives `lin_out` = 42, 98 and then 170.

The MAC result is `2*W` bits wide and wraps if the sum needs more. With
`R = 3` this can only happen when operands are near full scale.

## The tan-sigmoid unit

This unit is the hardest part of the design to follow.

**Argument.** `x_in` is a signed fixed-point number with `IN_FRAC` fractional
bits. It is clamped to `±X_MAX` (20) and converted to an internal argument
with `X_FRAC` = 24 fractional bits. The `clamped` output reports a clamped
argument. In the neuron, `IN_FRAC = 0`, so the linear output counts as an
integer.

**Series, one term per clock.** Recomputing `x^n / n!` from scratch would need
powers and factorials. Instead the unit keeps the previous term and forms

```
t_n = (t_{n-1} * x) * (1/n)
```

It uses one multiply by `x` and one multiply by a constant reciprocal. The
`K` reciprocals `round(2^32 / n)` are computed at elaboration time, with no
table file. Each cycle adds `t_n` to `y`, and adds it to or subtracts it from
`z` by the parity of `n`. The accumulators are 64 bits wide with 30
fractional bits. `e^20 ≈ 4.85e8` needs 29 integer bits, so there is headroom.
For `|x| <= 20` the largest single term is about `4.3e7`.

**Ratio.** `y + z = 2·(even terms)` is always positive. `y - z = 2·(odd
terms)` carries the sign. A restoring divider produces one integer bit and
`OUT_FRAC` = 14 fraction bits, one bit per clock. The quotient is truncated
toward zero and returned as a signed 16-bit value, where 16384 means 1.0.

**Saturation.** With an odd order, the odd sum can exceed the even sum by
more than a factor of two for large `|x|`. A quotient of magnitude 2 or more
is reported as `±(2 - 2^-14)` with `sat` set. For even orders, including the
default 40, this cannot happen.

**Timing.** The unit samples `start` while idle. Its result appears with a
one-cycle `done` pulse `K + OUT_FRAC + 2` clock edges later: 1 load, `K`
terms, 1 divider set-up and `OUT_FRAC + 1` quotient bits. At the defaults
that is 56 cycles. A `start` while `busy` is ignored.

**Accuracy against order.** This is measured by `tb_tansig_k_sweep` over
`x = -20 … 20` in steps of 1/4:

| order K | largest deviation from tanh |
|---|---|
| 10 | 0.52 |
| 20 | 0.15 |
| 40 | 0.00006 (one output LSB) |

The low orders fail at large `|x|`, where the truncated series are dominated
by their last terms.

## Neuron control and handshake

`neuron` accepts a pair when `in_valid && in_ready`. It counts accepted pairs,
and the `R`-th pair of each set raises an internal `launch` one cycle later.
By then `lin_out` holds the full inner product, and `launch` starts the
activation on it. `in_ready` is low during the launch cycle and while the
activation is busy. A producer that holds `in_valid` high is simply stalled.
This keeps exactly one set in flight, so `lin_out` at launch belongs to that
set.

`act_valid` pulses `K + ACT_FRAC + 3` clock edges after the edge that accepted
the last pair of a set. At the defaults that is 57 edges. `act_out`,
`act_sat` and `act_clamped` hold until the next result. Reset is synchronous
and active low, and it clears both registers, so `lin_out` starts at 0.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 32 | input and weight width (signed) |
| `R` | 3 | pairs per neuron (register depth) |
| `K` | 40 | Taylor order of each series (`K >= 1`) |
| `ACT_IN_FRAC` | 0 | fractional bits of `lin_out` as seen by the activation |
| `ACT_W`, `ACT_FRAC` | 16, 14 | activation output format |

`tansig_activation` also has `X_MAX` (20), `X_FRAC` (24), `AW`/`AFRAC`
(64/30, the accumulators), `RB` (32, the reciprocals) and `IN_W` (64).
`AW` must hold `e^X_MAX` with `AFRAC` fractional bits. Raise `AW` before you
raise `X_MAX`.

## What is taken as given and what is this design's own

These parts follow the source design:
- Inner product from input and weight shift registers and a combinational
  MAC.
- 32-bit operands, 3 inputs and a `2*W`-bit result.
- Tan-sigmoid built from truncated series of both exponentials and their
  ratio.
- Order 40 and the range ±20.

These are choices made here:
- The shift enable. The original registers shift on every clock.
- The synchronous reset.
- The valid/ready handshake and the stall rule.
- Launching one activation per `R` pairs.
- The one-term-per-clock recurrence and the reciprocal table.
- All fixed-point formats.
- The clamp, the saturation rule and the restoring divider.

These are not built:
- The logistic (log-sigmoid) variant. It was only a comparison and is
  inferior.
- A full multilayer network of these neurons. No layer sizes, interconnect or
  weight loading are defined for it.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Each has a watchdog.

- `tb_shift_reg`: random data and enable against a model of the stages,
  including a mid-run clear.
- `tb_mac_unit`: the 42/98/170 example, then 2000 random small and
  full-range operand sets against 64-bit arithmetic.
- `tb_tansig_activation`: orders 40, 10 and 5, integer and fractional
  arguments. Each result is checked against a double-precision evaluation of
  the same truncated series (within 4 LSB). Order 40 is also checked against
  `$tanh`. The test also checks the clamp and saturation flags, the latency,
  and that a start while busy is ignored.
- `tb_tansig_k_sweep`: the order comparison above.
- `tb_neuron`: the whole neuron at its default parameters. It covers the
  example, then 80 random sets with gaps in `in_valid`. Every cycle it checks
  `lin_out`, and it checks each activation against `tanh` and its latency. It
  requires that stalls and clamped arguments both occurred.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/neuron_pkg.sv \
          tb/tb_neuron.sv --top-module tb_neuron -o sim
./obj_dir/sim
```

Replace `tb_neuron` with any other testbench name. Lint the design with
`verilator --lint-only -Wall -Irtl -y rtl rtl/neuron_pkg.sv rtl/neuron.sv`.
The only warnings are for package constants that a given module does not
use.

## Limits worth knowing

- One activation takes 56 cycles against one cycle per input pair. A neuron
  with few inputs is bound by its activation unit. Pipelining the series
  would need a multiplier pair per term.
- The fixed point truncates toward minus infinity in the series and toward
  zero in the divider. The error against tanh stays within a few LSBs at
  order 40, but it is not rounded to nearest.
- An integer `lin_out` larger than 20 in magnitude simply saturates the
  activation near ±1. Use `ACT_IN_FRAC` to scale the linear output if
  operands carry fractional bits.
