# ROBA: a 64-bit rounding-based approximate multiplier

This multiplier trades a little accuracy for a lot less hardware. It gets rid
of the partial-product array. Each operand is rounded to its nearest power of
two, `Ar` and `Br`, and the product is estimated as

    A*B  ~=  Ar*B + A*Br - Ar*Br

Every term on the right has a power of two as a factor, so each one is a
left shift, not a multiplication. The whole multiplier is three shifters, one
adder and one subtractor, plus sign handling at both ends. The default build
takes 64-bit two's-complement operands and gives a 128-bit product. The logic
is purely combinational: it has no clock, no registers and no pipeline.

## How large the error is

The exact product is

    A*B = Ar*B + A*Br - Ar*Br + (A - Ar)*(B - Br)

so the estimate leaves out only `(A - Ar)*(B - Br)`. Both factors of that term
are small next to the operands. The rounding error of either operand is at
most a third of its value.

- If either operand is a power of two (or zero), the result is exact.
- The worst relative error is 1/9, about 11.1%. It happens when both operands
  sit at a rounding midpoint, `1.5 * 2^k`.
- The sign of the error depends on whether the two operands were rounded in
  the same direction. Rounding both up, or both down, gives an estimate below
  the exact product. Rounding one up and the other down gives one above it.
- Over all 8-bit operand pairs, the mean relative error is about 2.8%. Random
  64-bit operands give about the same figure. Both testbenches print it.

Example: `0xaaff * 0xbbcc`. Both operands round to `0x8000`. The estimate is
`0x8000 * (0xaaff + 0xbbcc - 0x8000) = 0x7365_8000`. The exact product is
`0x7D70_8834`, so the estimate is 7.9% low.

## Rounding to the nearest power of two (`rounding`)

Take an operand whose leading one is at bit `p`. It lies between `2^p` and
`2^(p+1)`, and the midpoint between the two is `3 * 2^(p-1)`: bits `p` and
`p-1` set, all lower bits clear. So the rule needs no comparator. If bit
`p-1` is set, the operand rounds up to `2^(p+1)`; otherwise it rounds down to
`2^p`. Exact midpoints round up. Zero stays zero.

The block outputs three things:

- `xr`, the rounded value.
- `exp_o`, its exponent.
- `nz`, a flag that is set when the operand is not zero.

The shifters use only the exponent and the flag. `xr` is N+1 bits wide
because an unsigned N-bit operand can round up to `2^N`. With signed
operands the magnitude is at most `2^(N-1)`, so it never needs the extra bit.

## Datapath (`roba_multiplier`)

    a, b --> sign_detector --> data_a, data_b, sign
    data_a --> rounding --> ar, exp_a, nz_a
    data_b --> rounding --> br, exp_b, nz_b
    brxa  = data_a << exp_b   (shifter, zero if b == 0)
    arxb  = data_b << exp_a   (shifter, zero if a == 0)
    arxbr = ar     << exp_b   (shifter, zero if b == 0)
    adder_out = brxa + arxb   (adder)
    sub_out   = adder_out - arxbr   (subtractor)
    out = sign ? -sub_out : sub_out (sign_set)

The internal signal names are the ones used throughout the RTL.

**Why 128-bit arithmetic that wraps is enough.** With unsigned 64-bit
operands, both can round up to `2^64`. `Ar*Br` is then `2^128`, and that
does not fit. The shifters, the adder and the subtractor all work modulo
`2^128`. The final estimate itself always lies in `[0, 2^128)`, so the
wrapped intermediate values still give it exactly. Three facts bound it:

- An operand is at least three quarters of its rounded value. So
  `Ar*B + A*Br - Ar*Br >= 0.5*Ar*Br >= 0`.
- If A was rounded up, then `A*Br - Ar*Br <= 0`, so the estimate is at most
  `Ar*B <= 2^N * (2^N - 1)`. The same holds with the operands swapped.
- If neither operand was rounded up, the omitted term
  `(A - Ar)*(B - Br)` is not negative. The estimate is then at most `A*B`.

**Signed operands.** `sign_detector` sets `sign = a[N-1] XOR b[N-1]`. It
replaces each negative operand with its magnitude, `0 - x`, using two
instances of the `subtractor` module. The most negative value, `-2^(N-1)`,
has magnitude `2^(N-1)`, which still fits N unsigned bits. `sign_set` negates
the unsigned estimate when `sign` is set.

## Modules

| module | function | parameters (default) |
|---|---|---|
| `roba_multiplier` | top: `a`, `b` (N bits) to `out` (2N bits) | `N` = 64, `SIGNED_OPS` = 1 |
| `sign_detector` | magnitudes and product sign | `N`, `SIGNED_OPS` |
| `rounding` | nearest power of two: value, exponent, non-zero flag | `N`, `EW` = `$clog2(N+1)` |
| `shifter` | `din * 2^amt`, zero when `en` is low | `WI` = 64, `WO` = 128, `SW` = 7 |
| `adder` | `a + b` modulo `2^W` | `W` = 128 |
| `subtractor` | `a - b` modulo `2^W` | `W` = 128 |
| `sign_set` | two's-complement negation under `sign` | `W` = 128 |

`SIGNED_OPS = 0` treats both operands as unsigned N-bit numbers and skips the
sign handling. Signed operation is a build-time parameter, not a port.
`N` is a parameter; the testbenches use 8 and 64.

## What this design chose

The design comes from a 64-bit multiplier whose flow is: sign detection,
rounding, three shifters, an adder, a subtractor and a final sign set. That
flow is followed here. These details were not specified, and were chosen
here:

- **Tie rule.** A midpoint `3*2^(p-1)` rounds up. Rounding it down would be
  just as near.
- **Signed/unsigned selection.** The multiplier handles both signed and
  unsigned numbers. Here the choice is a parameter, because the top level
  has only the two operand inputs and the product output.
- **Magnitude and sign logic.** Magnitudes are formed as `0 - x`, and the
  sign is the XOR of the operands' top bits.
- **Adder and subtractor structure.** They are written as plain `+` and `-`
  and left to synthesis.
- **Timing.** The datapath is combinational. It has no registers, no
  handshake and no reset. The result is valid one combinational delay after
  the operands change.

Known departures:

- **A published simulation shows the exact product.** A published simulation
  of the reference design gives `0x7D70_8834` for `0xaaff * 0xbbcc`, which is
  the exact product. The datapath above cannot produce that value; it gives
  `0x7365_8000`. The reference design's own accuracy figure (about 95%) and
  its signal names show the estimate above. This RTL follows that datapath,
  and its testbench expects `0x7365_8000`.
- **The reference schematic shows more instances than the flow uses.** It
  contains four shifters, two adders and two extra subtractors. The flow
  uses three shifters and one adder. Here the two extra subtractors are the sign
  detector's negators. The spare shifter and adder have no known role and
  are not built.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|---|---|
| `tb_roba_multiplier` | default build (64-bit, signed). Covers the `0xaaff * 0xbbcc` vector, zero operands, power-of-two operands (exact), midpoint ties, the most negative operand, and 5000 random pairs of mixed magnitude and sign. Counts each mechanism (rounding up, rounding down, zero operand, exact power-of-two product, negative result) and fails if any never occurs. |
| `tb_roba_multiplier_8bit` | all 65536 operand pairs at N = 8, in signed and unsigned mode; prints the mean relative error |
| `tb_rounding` | exhaustive at N = 8; midpoints, powers of two and random values at N = 64 |
| `tb_shifter`, `tb_adder`, `tb_subtractor`, `tb_sign_set`, `tb_sign_detector` | corner values and random values at the widths the top uses |

The reference models in the testbenches work in their own way. Rounding is
done by comparing distances to every power of two. The estimate is computed
with real multiplications in wider arithmetic. Adders and subtractors use
ripple carry over 32-bit words.

To simulate, for example, the top-level test:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        tb/tb_roba_multiplier.sv --top-module tb_roba_multiplier -Mdir obj
    ./obj/Vtb_roba_multiplier

Each test finishes in well under a second.
