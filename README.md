# Direct-form-II IIR filter with decoder-based multipliers

This is a small recursive (IIR) digital filter for 8-bit samples. It is written so that the
multiplier is the part worth looking at. The filter is a canonic direct-form-II structure: one
delay line holds the internal state `v`, and that line feeds both the pole (feedback) section and
the zero (output) section. At the default second order the filter has five 8x8 multipliers, and
they set its speed and size. Each multiplier is built from four 4x4 cells. Every 4x4 cell decodes
its multiplier nibble into one-hot select lines and gates a precomputed multiple of the
multiplicand through an AND-OR plane. This is the "BCD decoder" style of small multiplier.

## What the filter computes

With `ORDER = 2` (the default), and the coefficient names used at the ports:

```
v(n) = ( x(n) + a[0]*v(n-1) + a[1]*v(n-2) )              mod 2^8
y(n) = ( h[0]*v(n) + h[1]*v(n-1) + h[2]*v(n-2) )          mod 2^16
```

For general `ORDER`, `a[k]` weights `v(n-1-k)` and `h[k]` weights `v(n-k)`.

Points to keep in mind:

* **Feedback is added, not subtracted.** The textbook form writes `v(n) = x(n) - a1 v(n-1) - ...`.
  Here the adder in the loop is a plain adder, so to get a negative pole coefficient you supply it
  in two's complement (for example `8'hF8` for -8). The reference simulation this design was
  checked against needs the feedback to be added: with `a[0]=2`, `h=(2,3,4)` and `x=1,1,2`, the
  filter gives `y = 2, 9, 11`.
* **All arithmetic is unsigned and modular.** The state `v` is 8 bits wide. Only the low byte of
  the 16-bit feedback sum reaches the loop adder, so the state wraps modulo 256. Products are exact
  16-bit values and the output sum wraps modulo 65536. Because the state keeps only the low byte,
  it is the same whether you read a coefficient as signed or unsigned. The output `y` is an
  unsigned sum of unsigned products, so a negative `v` or coefficient does **not** give a signed
  16-bit `y`.
* **No scaling, no saturation.** A filter with real-valued coefficients has to be pre-scaled by
  the user into these integer words. Stable behaviour over many samples depends entirely on the
  coefficients chosen.

## Timing

The datapath is not pipelined. `y` is a combinational function of `x`, the coefficients and the
delay-line registers:

* A new sample on `x` shows up at `y` in the same clock cycle, after the combinational delay of
  multiplier → 8-bit adder → multiplier → 16-bit adder.
* On each rising edge of `clk`, the delay line shifts: `v(n-1) ← v(n)` and `v(n-2) ← v(n-1)`.
* One sample is processed per clock cycle. Hold `x` stable around the rising edge.
* `rst_n` is an asynchronous, active-low reset that clears the delay line.

The critical path runs through two multipliers in series: the feedback product, then `h[0]*v(n)`.

## Structure

```
           a[0]──►(×)◄── v(n-1) ◄─[dff8]◄─┬── v(n) ──►(×)◄── h[0]
           a[1]──►(×)◄── v(n-2) ◄─[dff8]◄─┘ (chain)    │
                  │  │                                  ▼
                adder16 ── low byte ──► adder8 ◄── x   adder16 ──► y
                                                        ▲
           h[1]*v(n-1) + h[2]*v(n-2) ─── adder16 ───────┘
```

| module | role |
|---|---|
| `iir_df2` | top: delay line, tap multipliers, adder trees; parameter `ORDER` (default 2) |
| `bcd_mult8` | 8x8 → 16-bit multiplier made of four `bcd_mult4` cells |
| `bcd_mult4` | 4x4 → 8-bit multiplier: 4-to-16 decoder plus AND-OR select of `a*k` |
| `adder16` | 16-bit product adder (wraps) |
| `adder8` | 8-bit loop adder forming `v(n)` (wraps) |
| `dff8` | 8-bit delay register with asynchronous reset |
| `iir_pkg` | widths (`DATA_W=8`, `PROD_W=16`) and the `data_t`/`prod_t` types |

The feedback products are summed by a chain of `adder16`s, and so are the delayed output taps
`h[1..ORDER]`. A final `adder16` adds `h[0]*v(n)`. At order 2 that makes three 16-bit adders,
one 8-bit adder and two registers. `ORDER = 3` gives the third-order layout: three registers,
seven multipliers and five 16-bit adders.

## The multiplier

`bcd_mult8` splits `x` and `y` into high and low nibbles and forms the four nibble products. It
adds them in two rows and then combines the rows:

```
row0 = xl*yl + (xh*yl << 4)          12 bits
row1 = xl*yh + (xh*yh << 4)          12 bits
p    = row0 + (row1 << 4)            16 bits
```

`bcd_mult4` never builds a carry chain on its `b` input. It decodes `b` into 16 one-hot lines.
Line `k` carries the constant multiple `a*k`, and the product is the OR of all lines, each gated
by its select bit. The literature describes this decoder style of 4x4 cell only by name. The
version here is the simplest circuit that fits the description. If you want a different
decoder-based cell, replace this module. Its interface is just `a`, `b` (4 bits each) and `p`
(8 bits).

## Departures and open points

* A reset was added. The reference design has bare D registers, but its simulation starts from a
  zero state.
* Which coefficient feeds which tap is taken from the reference netlist: `A0` feeds `v(n-1)` and
  `A1` feeds `v(n-2)`. The reference block diagram numbers the same taps from 1.
* One value in the reference simulation is not reproduced: the output after the second clock
  edge with `x=2`. That value would need `v(n-2)` to still be zero at that point. The values
  before it (0, 2, 9, 11) are reproduced exactly.
* Only the decoder-based multiplier is included. Array, multiplexer-based, split parallel and
  Vedic multipliers are the usual alternatives for this slot, and the filter does not depend on
  which one is used. Any 8x8 → 16 unsigned combinational multiplier with ports `x`, `y`, `p` can
  stand in for `bcd_mult8`.
* The maximum frequency of the non-pipelined path depends on the target technology. It has not
  been characterised here.

## Simulating

Every testbench checks itself. Each one prints `TB_RESULT checks=N failures=M` and stops with
`$finish`, and each has a watchdog. Build any of them with plain Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/iir_pkg.sv tb/tb_iir_df2.sv --top-module tb_iir_df2 -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_iir_df2` | default second-order filter. It replays the reference stimulus (a[0]=2, a[1]=-8 and +8, h=2,3,4, x=0..4) with fixed expected outputs. It then runs 5000 random cycles with random coefficients against an integer model, with a reset in the middle. It counts feedback use, state wrap, output wrap and reset, and fails if any of them never happens. |
| `tb_iir_df2_order3` | `ORDER=3`: impulse echo through the last tap, a period-3 recursion through the oldest pole tap, then 4000 random cycles against the model |
| `tb_bcd_mult8` | all 65536 operand pairs |
| `tb_bcd_mult4` | all 256 operand pairs |
| `tb_adder16`, `tb_adder8` | corners and 2000 random pairs, including wrap-around |
| `tb_dff8` | reset, one-edge delay, hold between edges, asynchronous clear |

Every simulation finishes in well under a second.
