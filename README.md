# Flipping 9/7 2-D DWT with fixed-width PEB Booth multipliers

This design computes a one-level 2-D discrete wavelet transform with the CDF 9/7
filter pair, the wavelet of JPEG 2000's lossy mode. The input is an 8-bit image
(512 x 512 by default) streamed two pixels per clock. The output is the four
subbands LL, LH, HL and HH. Two ideas keep the hardware small and the clock
period short:

* **Flipping.** Lifting computes the 9/7 transform as four predict/update steps.
  Each step multiplies a *sum* by a constant, so the multiplier sits in series
  with the adders. The flipped form divides each step by its constant. Now the
  multiplier acts on a single delayed sample, alongside the additions rather
  than after them. Every stage then has the same arithmetic unit: one
  multiplier and two adders.
* **Fixed-width PEB Booth multiplication.** Each 12 x 12 multiplication keeps
  only the upper 12 columns of its partial-product array. The 12 low columns are
  never built. Their expected contribution is added back as a small bias, worked
  out from the one truncated column that is actually observed. This is a
  "probability-estimation bias", PEB.

Everything is 12-bit two's complement. There are three 1-D units: one for rows
and two for columns. Each 1-D unit has six multipliers, eight adders and four
delays.

## The flipping recursion

Each input pair `x(2n-1), x(2n)` produces one low-band and one high-band
coefficient. The four stages are:

```
r1(n) = x(2n)  + x(2n-2) + c1 * x(2n-1)        c1 = 1/alpha
r2(n) = r1(n)  + r1(n-1) + c2 * x(2n-2)        c2 = 1/(alpha*beta)
r3(n) = r2(n)  + r2(n-1) + c3 * r1(n-1)        c3 = 1/(beta*gamma)
r4(n) = r3(n)  + r3(n-1) + c4 * r2(n-1)        c4 = 1/(gamma*delta)
v_l(n)   = (alpha*beta*gamma*delta*K) * r4(n)        low band
v_h(n-1) = (alpha*beta*gamma/K)       * r3(n-1)      high band
```

alpha..K are the standard 9/7 lifting constants:

| constant | value |
|---|---|
| alpha | -1.586134342 |
| beta | -0.052980119 |
| gamma | 0.882911076 |
| delta | 0.443506852 |
| K | 1.149604399 |

`r_k(n)` is the lifting value `s`/`d` of step k, divided by the product of all
constants used so far. The two output multipliers undo that division and apply
the usual K scaling.

In hardware (`flip_dwt1d`), stage k has one delay register `R` on its upper
input, which yields `a(n-1)`. Its arithmetic unit adds `a(n) + a(n-1)` and the
product. The AU's pass-through output `y = a(n-1)` becomes the next stage's
multiplied operand. That is why stage k+1 multiplies the *delayed* value of
stage k-1. The high band comes out one pair later than the low band. It is the
delayed `r3` that sits in the fourth delay register.

### Constant format

The constants range from 0.038 to 21.4, but the multiplier returns about
`x*M/2^12`. Each constant `c` is therefore held as a 12-bit mantissa `M` and an
exponent `S`, with `c ≈ M * 2^(S-12)`. The multiplier output is shifted left
by `S`, or arithmetically right by `-S`. The shift is only wiring. `S` is chosen
so that `|M|` uses the full 12 bits:

| constant | value | S | M (12-bit) | represented |
|---|---|---|---|---|
| 1/alpha | -0.63046 | 1 | -1291 | -0.63037 |
| 1/(alpha beta) | 11.9000 | 5 | 1523 | 11.8984 |
| 1/(beta gamma) | -21.3782 | 6 | -1368 | -21.375 |
| 1/(gamma delta) | 2.55378 | 3 | 1308 | 2.55469 |
| alpha beta gamma / K | 0.064540 | -2 | 1057 | 0.064514 |
| alpha beta gamma delta K | 0.037829 | -3 | 1240 | 0.037842 |

The mantissas are computed in `dwt_pkg` from the real constants, so they track
`DW` when the word width changes. A large exponent costs resolution. With
`S = 6`, the product of stage 3 moves in steps of 64 LSB. This is the price of
the flipping form's large constants at a 12-bit word.

## The arithmetic unit (`flip_au`)

`z = c*x2 + x1 + x3`, `y = x3`. `x1 + x3` goes through one ripple-carry adder
(RCA-1). The product from `peb_booth_mult` is added in a second ripple-carry
adder (RCA-2). The products do not depend on the additions, so the path through
one AU is one multiplier plus one adder.

## The fixed-width PEB Booth multiplier (`peb_booth_mult`)

This is the least obvious part of the design.

**Booth encoding** (`booth_encoder`). The 12-bit coefficient is recoded into six
radix-4 digits `d_i ∈ {-2,-1,0,1,2}`, with `c = Σ d_i 4^i`. Each digit comes from
the bit triplet `c[2i+1], c[2i], c[2i-1]` and is output as `one`, `two` and
`neg` flags. The all-ones triplet encodes zero, not negative zero.

**Selection** (`booth_selector`). Row i is `0`, `x` or `2x`, as a 13-bit word,
inverted when the digit is negative. The `+1` that completes the negation is
kept as a separate `neg` bit at the row's lowest column. Row i holds
`d_i*x - neg_i` and has weight `4^i`.

**Sign extension.** Each row's sign bit is inverted. A constant `-2^(12+2i)` is
added per row. These constants all land in the kept upper columns, so
`mu_adder` adds one constant, `-Σ 4^i mod 2^12`.

**Truncation and bias.** The full array has 24 columns. Columns 0..11 (TP) are
dropped entirely, including every `neg` bit, because they sit in even columns
below 12. Columns 12..23 (MP) are summed. The dropped part is estimated as

```
sigma = A' + floor((TP_major + B') / 2)
```

* `TP_major` is the number of ones in column 11, the top truncated column. It is
  bit `11-2i` of row i, one bit per row, so 0..6.
* `3n/32 + 0.5 = A' + B'/2` is the expected carry out of the lower truncated
  columns plus rounding. For n = 12 it is 1.625, which gives `A' = 1` and
  `B' = 1`. `B'` is the fraction rounded to 0 or 1.
* `peb_bias` counts the column and adds the constants. `dwt_pkg::peb_a/peb_b`
  derive `A'` and `B'` for any even N.

The result `QP = MP + sigma` is a 12-bit approximation of `x*c / 2^12`. The
testbench measures it against the exact product over 50,000 random operand
pairs:

* mean error: +0.13 LSB
* largest error: 1.6 LSB

## Number range

The pixel is level-shifted to −128..127 and then aligned to the 12-bit word by
`DW - PIX_W - 6` bits. At the defaults this is a right shift by 2, so row
inputs are in −32..31. The worst-case gain from the row input to any adder
inside a 1-D unit is about 52, so the row unit cannot overflow. The column units
see the row outputs, which are larger. A column adder can wrap for extreme
content, such as full-swing binary noise. In practice even that did not happen
in the tests. Nothing saturates: words wrap modulo 2^12, as plain ripple-carry
adders do.

The alignment is the only place where the word width and the pixel width meet.
Widening `DW` gives `DW-14` fractional pixel bits, so precision improves. At
`DW = 20`, a constant image reproduces the gain of 2 of LL to better than 0.5%.
At `DW = 24`, the 1-D unit stays within 0.18 pixel units of the real-valued
equations.

## 2-D organisation (`dwt2d_flip`)

```
 pixels (2/clk) ─► row unit ─┬─ even rows ─► line buffer (IMG_W/2 × {L,H})
   level shift               │                       │ read at same column
                             └─ odd rows ──► L,H ─┐  ▼
                                     column unit L (x(2n-1)=even L, x(2n)=odd L) ─► LL, LH
                                     column unit H (x(2n-1)=even H, x(2n)=odd H) ─► HL, HH
```

* **Row unit.** A `flip_dwt1d` with single delays. Within each pair,
  `pix_a = p[r][2k]` plays `x(2n-1)` and `pix_b = p[r][2k+1]` plays `x(2n)`. Its
  delays read as zero for the first pair of every row.
* **Line buffer.** Row outputs of even rows are stored by column index. During
  the following odd row, each new (L, H) pair meets its even-row partner, and
  the two form one vertical input pair.
* **Column units.** The vertical recursion must run separately for each of the
  `IMG_W/2` columns. Each column unit is therefore a `flip_dwt1d` whose four
  delays are `IMG_W/2`-entry memories, indexed by the column (`slot`). Its
  arithmetic is shared by all columns. A column's state advances only when that
  column's next row pair arrives. The delays read as zero for the first row pair
  of a frame.
* **Memory.** 256 × 24 bits of line buffer and 2 × 4 × 256 × 12 bits of column
  state, 30,720 bits at 512 × 512. The full image is never stored. It is expected
  to be in an external frame memory that streams it in raster order.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of counters and valids |
| `in_valid` | in | 1 | `pix_a`/`pix_b` hold the next pair; may go low at any time to pause |
| `pix_a`, `pix_b` | in | PIX_W | pixels `2k` and `2k+1` of the current row, raster order |
| `out_valid` | out | 1 | `ll, lh, hl, hh` are valid |
| `out_row`, `out_col` | out | log2(IMG_H)-1, log2(IMG_W/2) | subband position of the quadruple |
| `ll`, `lh`, `hl`, `hh` | out | DW | coefficients, two's complement, in the word scale described above |
| `frame_done` | out | 1 | high with the last quadruple of a frame |

* Even rows produce no output. Each odd-row input pair produces one quadruple,
  two clocks after it is taken: one register in the row unit, one in the column
  units.
* A 512 × 512 frame takes 131,072 input cycles. `frame_done` rises 131,073
  cycles after the first pair.
* Along a row or column, the high band is one position behind the low band. The
  quadruple at `(m, k)` holds `v_l` of pair k and `v_h` of pair k-1 along rows,
  and the same pairing along columns.

## What this design decides for itself

* **Border handling.** Zero start, not symmetric extension. The first four or so
  coefficients of every row and column differ from a symmetrically extended
  9/7 transform. The high band of the last pair in each row is not produced.
* **Block size.** Two pixels per clock. An organisation for 16 pixels per clock
  (block size 16) is not included.
* **Registers.** Each 1-D unit has one output register. Between its delays, the
  four-stage chain is combinational.
* **Number format.** The mantissa/exponent constant format, the pixel alignment,
  and wrap-around instead of saturation.
* **Adders.** The MU's column adder is written at word level. Synthesis picks
  its structure. The two AU adders are explicit ripple chains.

## Files

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | 9/7 constants, exponents, mantissa and PEB-constant functions, Booth digit type |
| `rtl/booth_encoder.sv`, `booth_selector.sv`, `peb_bias.sv`, `mu_adder.sv` | the parts of the multiplier |
| `rtl/peb_booth_mult.sv` | fixed-width PEB Booth multiplier |
| `rtl/rca.sv` | ripple-carry adder |
| `rtl/flip_au.sv` | arithmetic unit |
| `rtl/flip_dwt1d.sv` | 1-D flipping unit, optional interleaved delays |
| `rtl/dwt2d_flip.sv` | 2-D top |
| `tb/tb_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dwt2d_flip_full` |

Parameters: `DW` (word and multiplier width, default 12, must be even), `PIX_W`
(8), `IMG_W`/`IMG_H` (512, `IMG_W/2` and `IMG_H` powers of two), and
`flip_dwt1d`'s `DEPTH`.

## Verification

Each testbench compares against `tb_ref_pkg`. That package computes the same
arithmetic with plain integers:

* the fixed-width product, as the exact product minus the value of the truncated
  columns (found from the Booth digits), plus the bias;
* the recursion and the 2-D transform, on whole arrays.

Testbench coverage:

* **Multiplier parts.** The encoder is tested exhaustively over all 4096
  coefficients. The bias circuit is tested exhaustively, at N = 12 and N = 16.
  The selector and the column adder get random inputs. The RCA is tested
  exhaustively at 6 bits and randomly at 12.
* **Multiplier.** The six DWT constants are tested against every 12-bit data
  value, plus random operands and error statistics.
* **1-D unit.** Checked bit-exact with idle cycles, with four interleaved slots,
  and against the real-valued equations at 24 bits.
* **2-D top, small images.** Six 16 × 8 frames back to back with random pauses,
  checked bit-exact. The testbench also checks tags, latency and `frame_done`.
  A constant 16 × 16 image is run at 20 bits. Every mechanism (row start, line
  buffer write and read, column start, pause, frame done) is counted and must
  occur.
* **2-D top, full size.** One full 512 × 512 frame at default parameters,
  bit-exact over all 65,536 quadruples, including the frame cycle count.

All pass. Each testbench also failed against a deliberately broken copy of its
module.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dwt_pkg.sv tb/tb_ref_pkg.sv tb/tb_dwt2d_flip_full.sv \
    --top-module tb_dwt2d_flip_full -o sim
./obj_dir/sim
```

Each ends by printing `TB_RESULT checks=N failures=M`.
