# 2-digit DBNS FIR filter

This is a FIR filter that never multiplies binary numbers. Both the input samples and the
coefficients are held in the **double-base number system (DBNS)**: each value is a sum of two
*digits*, and each digit is

    s * 2^b * 3^t        s in {-1, 0, +1},  b and t small signed integers

In this form a multiply of two digits is cheap. Add the binary exponents, add the ternary
exponents, multiply the signs. The hard part is turning the product back into binary so
that it can be accumulated. Here `3^t` is looked up in a small ROM as a binary floating-point
number. The binary exponents are then added, and a barrel shifter produces a fixed-point
product. This "half-index" style does the multiply in the exponent domain and the sum in
ordinary binary, so the filter output is a plain two's-complement number.

Using two digits for both operands has two effects. The coefficients can be mapped directly
from a floating-point filter design with very small error. And the ternary exponents stay
short (4 bits), which keeps the `3^t` ROM tiny: 31 entries per ALU.

## Arithmetic of one node (`dbns_alu`)

One node computes `y_out = y_in + h_c * h_d` for a coefficient digit `h_c` and a data digit
`h_d`. It takes five steps:

1. **Exponent adders.** `b = b_c + b_d` (6 bits) and `t = t_c + t_d` (5 bits, -16..14).
   The sign of the product is `neg_c XOR neg_d`, and the product is zero if either digit is zero.
2. **Ternary ROM** (`dbns_ternary_rom`). `3^t` becomes `M_T * 2^(b_T - (MW-1))`.
   `M_T` is an MW-bit mantissa (default 16) with its top bit set and is rounded to nearest.
   The table is computed at elaboration by `dbns_pkg::ternary_entry()` in exact integer
   arithmetic.
3. **Exponent sum.** `e = b_T + b`.
4. **Shifter** (`dbns_fp2fix`). `M_T` is shifted by `e - (MW-1) + FRAC_W` into an `ACC_W`-bit
   signed word with `FRAC_W` fractional bits (defaults 32 and 16).
   - Bits shifted out on the right are truncated.
   - A product whose leading one would land at or above bit `ACC_W-1` saturates to the
     largest magnitude and raises `sat`.
   - The sign is applied last.
5. **Accumulate.** The signed product is added to `y_in` in two's complement. The sum wraps
   and does not saturate.

Exponent ranges are wide: the product exponent spans about 2^-58 to 2^52. So the fixed-point
window (`ACC_W`, `FRAC_W`) decides what is representable. The defaults suit 10-bit integer
samples and coefficients below 1. Products under 2^-16 vanish, and the output can reach
±32768.

Accuracy of a single product: a relative error of at most 2^-MW from the rounded mantissa,
plus less than one LSB from truncation.

## Systolic channel (`dbns_systolic_cell`, `dbns_channel`)

Each channel is a linear systolic convolver of `NTAPS` nodes:

    x ──► [W0] ─D─► [W1] ─D─► ... ─D─► [W(N-1)] ─D─►
    0 ──► [W0] ─2D► [W1] ─2D► ... ─2D► [W(N-1)] ─2D► y

Samples and partial sums move in the same direction. A sample advances one node per clock,
and a partial sum advances one node every two clocks, so each partial sum meets every sample
it needs exactly once. No broadcast or long adder chain is needed, and each node's only
combinational path is one ALU.

Each node owns its output registers: one register on the data path and two on the sum path.
A chain of N nodes therefore computes

    y(n) = sum_i W[i] * x(n - 2N + i)

With `W[i] = h[N-1-i]` this is the FIR filter `y(n) = sum_k h[k] x(n - (N+1) - k)`.
The top level does this weight reversal, so callers give coefficients in natural order.

## Four channels (`dbns2_fir`)

A coefficient `c0 + c1` times a sample `d0 + d1` expands into four digit products:

    (c0+c1)(d0+d1) = c0*d0 + c0*d1 + c1*d0 + c1*d1

The filter therefore has four identical channels, one per pair of coefficient digit and data
digit. Channel `(cd, dd)` holds coefficient digit `cd` of every tap and is fed data digit
`dd`. `dbns_channel_sum` adds the four channel outputs in binary and registers the result.

| Signal | Width | Meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; synchronous reset, active low, clears all pipeline registers |
| `x_bin` | `DW` = 10 | two's-complement input sample, one per clock |
| `coef[NTAPS]` | 2 × 11 bits each | 2-digit coefficients, static; `coef[k]` multiplies the sample k cycles older |
| `y_out` | `ACC_W` = 32 | output, `FRAC_W` = 16 fractional bits |
| `sat` | 1 | some product saturated in the previous cycle |

**Timing:** `y_out(n) = sum_k coef[k] * xd(n - (NTAPS+2) - k)`, where `xd` is the 2-digit form
of the sample. The latency of NTAPS+2 cycles is NTAPS+1 cycles through a channel plus one in
the summer. At the default 53 taps the first output of a sample appears 55 clock edges after
it is taken. The throughput is one sample per clock.

## Digit format (`dbns_pkg`)

`dbns_digit_t` is 11 bits: `{nz, neg, b[4:0], t[3:0]}`, with `b` and `t` in two's
complement. `nz=0` means the digit is zero, whatever the other fields hold. A 2-digit word
`dbns2_t` is `dbns_digit_t [1:0]`, and its value is `d[0] + d[1]`. The exponent widths
`DBNS_BW = 5` and `DBNS_TW = 4` are package constants, because every type depends on them.

## Input conversion (`dbns_bin2dbns2`)

Samples enter as 10-bit binary. A table indexed by the magnitude (0..512) gives two digits,
and for negative samples the sign of each non-zero digit is flipped. The table is built
greedily:

- the first digit is the digit `2^b 3^t` (b in -16..15, t in -8..7) closest to the magnitude;
- the second digit is the one closest to the remainder, or zero if nothing is closer;
- ties go to the smaller `b`, then the smaller `t`.

The 513 entries are in `rtl/dbns_bin2dbns2.hex`, one per line as `{second digit, first digit}`.
That file is valid only for `DW = 10` and the default exponent widths. To change them,
regenerate it with the rule above. The table is loaded with `$readmemh` in an `initial`
block. Check that your synthesis flow honours this; if it does not, turn the table into a
`case` ROM.

**This conversion is not exact.** Two digits with these exponent ranges cannot represent
every 10-bit integer; 466 is one example. The table is exact for 496 of the 1024 samples.
For the rest the two digits lie within 0.36 of the sample, so rounding the DBNS value gives
the sample back. The filter computes with the DBNS value.

## How far to trust it

- **Follows the source design:** the digit definition, the node's structure (exponent adders,
  `3^t` ROM, exponent-sum adder, shifter, binary accumulation), the systolic array with D and
  2D delays, one channel per digit pair, the final sum of the channels, 53 taps, 5-bit binary
  and 4-bit ternary exponents, and 10-bit samples.
- **This design's own choices:**
  - the sign encoding;
  - the mantissa width and its rounding;
  - the fixed-point window, truncation and product saturation;
  - wrapping accumulation;
  - the register placement at node outputs, which sets the exact latency;
  - the synchronous reset;
  - coefficients arriving on a static port;
  - the greedy input-conversion table.
- **Differences from the source design:**
  - The input conversion is approximate, whereas the source design describes an exact
    one-to-one map of 10-bit data.
  - A 57-tap hybrid variant with 10-bit exponents and 1-digit coefficients was also built in
    silicon. It is not this configuration.
  - Coefficient design is an offline procedure and is not included: a Remez design, then the
    nearest 2-digit DBNS form of each coefficient.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. A watchdog ends the run if it hangs.
Example with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/dbns_pkg.sv tb/dbns_tb_pkg.sv tb/tb_dbns2_fir.sv --top-module tb_dbns2_fir
    ./obj_dir/Vtb_dbns2_fir

Run it from the folder that holds `rtl/`, because the converter reads
`rtl/dbns_bin2dbns2.hex` by that relative path.

`tb/dbns_tb_pkg.sv` holds the reference model. It computes digit values in real arithmetic
directly from `s 2^b 3^t`, and it has its own greedy 2-digit mapper.

| Testbench | What it checks |
|---|---|
| `tb_dbns_ternary_rom` | all 31 ROM entries against `3^t` to half a mantissa step |
| `tb_dbns_fp2fix` | 4000 random shifts: left, right, underflow to zero and saturation, bit-exact |
| `tb_dbns_alu` | 5000 random digit pairs over the full exponent range, including saturation |
| `tb_dbns_systolic_cell` | D / 2D delays and the node result, cycle by cycle |
| `tb_dbns_channel` | a 7-node channel against a direct convolution |
| `tb_dbns_channel_sum` | the registered wrapping sum |
| `tb_dbns_bin2dbns2` | all 1024 samples against the testbench's own greedy mapping |
| `tb_dbns2_fir_response` | impulse response of the full 53-tap filter on the hardware; magnitude response against the unmapped design (measured: largest error 1.5e-4, stop band -75.6 dB, DC gain 1.000005) |
| `tb_dbns2_fir` | the full 53-tap filter at default parameters (details below) |

`tb_dbns2_fir` uses a windowed-sinc low-pass (cut-off 0.382 of Nyquist) mapped to 2-digit
DBNS. It runs four phases:

- an impulse, which checks the output values and the exact 55-cycle latency;
- 1500 random samples against a direct convolution;
- 400 more samples with random, asymmetric coefficients, so that tap order matters;
- a forced saturation;
- a reset in mid-stream.

It runs in well under a second.

## Changing sizes

- `NTAPS`, `MW`, `ACC_W` and `FRAC_W` are parameters of `dbns2_fir`. `ACC_W` must exceed
  `MW`. Widen `ACC_W` or move `FRAC_W` if your data or coefficients use more of the exponent
  range.
- The exponent widths live in `dbns_pkg`. The ROM follows them automatically, but the
  converter table does not.
