# FIR filter with Urdhva-Tiryagbhyam (vertically and crosswise) multipliers

This is a small FIR filter in which every multiplier is an *Urdhva*
multiplier. The Urdhva-Tiryagbhyam rule ("vertically and crosswise") comes
from Vedic arithmetic. It forms all the digit-by-digit partial products of a
multiplication at once and then adds them in parallel. It does not shift and
add partial products one after another. In hardware the rule is applied to
binary digits:

- a 2x2 multiplier is four AND gates and two half adders;
- a 4x4 multiplier is four 2x2 multipliers plus a short adder network;
- wider multipliers repeat the same step with wider digits.

The default configuration is a four-tap filter, `y[n] = h0 x[n] + h1 x[n-1] +
h2 x[n-2] + h3 x[n-3]`, with unsigned 4-bit samples and coefficients and a
10-bit output. It is built in both standard FIR structures, the direct form
and the transposed form. A stand-alone multiply-accumulate (MAC) unit with the
same multiplier sits beside them.

## Module hierarchy

```
vedic_fir                    top: both filter forms + MAC unit
├── fir_direct               direct form, TAPS multipliers
│   └── urdhva_nxn  (xTAPS)
├── fir_transposed           transposed form, TAPS multipliers
│   └── urdhva_nxn  (xTAPS)
└── mac_unit                 acc <= acc + a*b
    └── urdhva_nxn

urdhva_nxn #(N)              N = 2 -> urdhva_2x2, N = 4 -> urdhva_4x4,
                             N >= 8 -> four urdhva_nxn #(N/2) + adders
urdhva_4x4                   four urdhva_2x2, two adder4, one half_adder
urdhva_2x2                   four AND gates, two half_adder
adder4                       4-bit ripple-carry adder
half_adder
vedic_pkg                    DEFAULT_DATA_W, prod_width(), sum_width()
```

## The Urdhva multiplier

### 2x2 cell (`urdhva_2x2`)

For `a = a1a0` and `b = b1b0`:

| product bit | how it is formed                                   |
|-------------|----------------------------------------------------|
| p0          | a0·b0 (vertical)                                   |
| p1, c1      | half adder of a1·b0 and a0·b1 (crosswise)          |
| p2, p3      | half adder of a1·b1 and c1 (vertical, plus carry)  |

### 4x4 from four 2x2 cells (`urdhva_4x4`)

The 4-bit operands are split into 2-bit digits, `X = {xh, xl}` and
`Y = {yh, yl}`. The four 2x2 cells produce four 4-bit partial products:

| name | product | weight |
|------|---------|--------|
| s0   | xl·yl   | 1      |
| s1   | xl·yh   | 4      |
| s2   | xh·yl   | 4      |
| s3   | xh·yh   | 16     |

These partial products are combined in four steps:

1. **First 4-bit adder.** It adds the two crosswise terms: `s2 + s1 -> t, c1`.
2. **Second 4-bit adder.** It adds `t` to the bits that share its weight. Those
   are the top half of `s0` and the bottom half of `s3`:
   `t + {s3[1:0], s0[3:2]} -> p[5:2], c2`.
3. **Half adder.** It adds the two carries: `c1 + c2 -> hs, hc`.
4. **Final 2-bit add.** `s3[3:2] + {hc, hs} -> p[7:6]`. This add cannot
   overflow because the product fits in 8 bits.

The low bits pass straight through: `p[1:0] = s0[1:0]`.

Worked example: 13 × 11 with `X = 1101` and `Y = 1011`.

- The partial products are s3 = 0110, s2 = 1001, s1 = 0010 and s0 = 0011.
- The first adder gives 1001 + 0010 = 1011, with no carry.
- The second adder gives 1011 + 1000 = 0011, with carry 1.
- The half adder gives hs = 1 and hc = 0.
- The final add gives 01 + 01 = 10.
- The product is `10 0011 11` = 143.

### Wider operands (`urdhva_nxn`)

`urdhva_nxn #(N)` applies the same four steps with N/2-bit digits. This works
for any N that is a power of two:

- for N = 2 it instantiates the gate-level 2x2 cell;
- for N = 4 it instantiates the 4x4 multiplier above;
- for N = 8, 16, ... it instantiates four copies of itself at N/2.

At the recursive levels the two N-bit adders are plain `+` operators. The
synthesis tool picks their adder architecture. An elaboration-time assertion
rejects an N that is not a power of two.

All multipliers are purely combinational.

## The two filter structures

Both filters compute the same convolution. They have the same ports and the
same timing.

**Direct form (`fir_direct`).** A delay line holds the TAPS−1 previous
samples. The present sample and each delayed sample feed one multiplier,
together with their coefficients. The TAPS products are then summed in one
multi-operand addition.

**Transposed form (`fir_transposed`).** All multipliers take the present
sample at once. The delay registers sit between the adders of a chain:

```
z[TAPS-1] <= h[TAPS-1]*x
z[k]      <= h[k]*x + z[k+1]          for 1 <= k < TAPS-1
y         <= h[0]*x + z[1]
```

`z[1]` always holds the combined contribution of all past samples, so no
sample delay line is needed. The long adder tree of the direct form becomes
one adder per tap.

**Shared details of both forms:**

- Samples are accepted on a `x_valid` strobe. With gaps in the strobe, the
  delay state simply waits.
- `y` and `y_valid` are registered. They appear exactly one clock after the
  sample that produced them.
- The active-low asynchronous reset clears the delay state. After reset the
  filter behaves as if it had seen only zero samples.
- The output width is `2*DATA_W + ceil(log2(TAPS))`, which cannot overflow.
  For the default (4 taps, 4 bits) that is 10 bits, and the largest possible
  output is 4 × 15 × 15 = 900.

## Top level (`vedic_fir`)

Both filter forms run side by side on the same `x`, `x_valid` and `h`:

- `form_sel` picks which form drives `y`/`y_valid`: 0 = direct,
  1 = transposed. Both forms have identical latency and results, so the
  select may change at any clock.
- `forms_agree` is high whenever the two forms produce the same output. It
  works as a built-in cross-check.
- The MAC unit has its own ports: `mac_en`, `mac_clr`, `mac_a`, `mac_b` and
  `mac_acc`.

| parameter | default | meaning                                         |
|-----------|---------|-------------------------------------------------|
| TAPS      | 4       | number of filter taps (at least 2)              |
| DATA_W    | 4       | sample/coefficient width, a power of two        |
| ACC_W     | 16      | MAC accumulator width                           |

The coefficients `h[0..TAPS-1]` are input ports. Hold them constant while
samples stream. Changing them mid-stream gives outputs that mix the old and
new coefficient sets.

## MAC unit (`mac_unit`)

This is the usual multiplier → adder → accumulator-register loop. The
accumulator changes on the next clock edge as follows:

| `clr` | `en` | accumulator after the clock |
|-------|------|-----------------------------|
| 0     | 1    | `acc + a*b`                 |
| 1     | 1    | `a*b` (a new sum starts)    |
| 1     | 0    | 0                           |
| 0     | 0    | unchanged                   |

The accumulator wraps modulo 2^ACC_W, and no overflow flag is provided. Its
value includes a pair one clock after that pair is presented.

## Design choices

The following parts follow the Urdhva FIR design:

- the gate structure of the 2x2 cell;
- the four-cell, two-adder, half-adder construction of the 4x4 multiplier,
  including its worked example;
- the four-product filter of order 4;
- the direct and transposed structures;
- the general MAC loop.

The following are this implementation's own choices:

- **Number of taps.** The general filter equation sums from k = 0 to N, which
  would give five taps for N = 4. The design follows the four-product
  expansion for N = 4 instead. `TAPS` changes this.
- **Both forms with a run-time select.** The source material shows both
  structures but does not say which one it builds. Here both are built, with
  `form_sel` and `forms_agree`.
- **MAC unit placement.** The MAC unit is not placed inside the filter. The
  filters use one multiplier per tap.
- **Interface.** The widths of the output and the accumulator, the `x_valid`
  strobe, the one-clock output register, the asynchronous reset and the MAC
  `en`/`clr` handshake are all this implementation's choices.
- **Adders.** `adder4` is a ripple-carry adder. The last 2-bit add of the 4x4
  multiplier and the adders of the recursive levels are plain `+` operators.
- **Wider multipliers.** The recursive extension to N > 4 applies the stated
  rule that the method works for any NxN size. Only the 2x2 and 4x4 levels are
  given gate by gate.
- **Unsigned data.** All arithmetic is unsigned. Signed data would need a
  sign-handling wrapper around the multiplier.

Not modelled:

- power and FPGA placement (the design was originally characterized on an
  Altera Cyclone III at about 69 mW total);
- any claim about speed or area relative to other multipliers. The RTL gives
  the structure, not those measurements.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench           | what it checks                                                                  |
|---------------------|---------------------------------------------------------------------------------|
| `tb_half_adder`     | all 4 input pairs                                                               |
| `tb_urdhva_2x2`     | all 16 operand pairs                                                            |
| `tb_adder4`         | all 256 operand pairs, including carry out                                      |
| `tb_urdhva_4x4`     | the 13 × 11 = 143 example and all 256 pairs                                     |
| `tb_urdhva_nxn`     | N = 2, 4, 8 exhaustively; N = 16, 32 at 20 000 random pairs plus corner cases   |
| `tb_mac_unit`       | 4000 random clocks against a reference accumulator; a known dot product (370); wrap, clear and load each counted |
| `tb_fir_direct`     | through `fir_stream_check`: the impulse response, random streams with `x_valid` gaps under many coefficient sets, and the one-clock latency; run at 4 taps × 4 bits and at 5 taps × 8 bits |
| `tb_fir_transposed` | the same as `tb_fir_direct`, for the transposed form                            |
| `tb_vedic_fir`      | the top at its default parameters: 6000 samples with random `form_sel` switching, MAC traffic driven at the same time, every output against a reference convolution, `forms_agree` on every clock, and the accumulator driven past 2^16. It counts form switches, sample gaps, outputs from each form, and MAC clears, loads and wraps, and fails if any of these never happened. |

To run one testbench with plain Verilator (5.x), from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary -Wall -Wno-fatal --top-module tb_vedic_fir \
    -Irtl -Itb rtl/vedic_pkg.sv tb/tb_vedic_fir.sv -Mdir obj_tb
./obj_tb/Vtb_vedic_fir
```

Pass `vedic_pkg.sv` first. Verilator finds the other modules through `-I`.
Every testbench finishes in well under a second.

To change the design, edit the parameters on `vedic_fir`:

- `TAPS` and `DATA_W` propagate to both filters and to the MAC unit;
- `DATA_W` must stay a power of two;
- the output width follows automatically.
