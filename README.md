# Adaptive 8-point / dual 4-point DCT

In interlaced video, the two fields of a frame are scanned at different times.
If something moves between the fields, the even and odd lines of a block no
longer match. An 8x8 DCT of such a block then puts a lot of energy into the
highest vertical frequencies, and quantisation wipes that energy out. A coder
does better if, for each block, it can also transform the two fields on their
own: a 4-point DCT down the even lines and another down the odd lines. It then
keeps whichever result is better.

This RTL computes both options from the same eight samples at the same time,
using one set of constant multipliers:

* the 8-point DCT `X(0..7)` of `x[0..7]` (frame mode);
* the 4-point DCT `Xe(0..3)` of `x[0], x[2], x[4], x[6]` (even field);
* the 4-point DCT `Xo(0..3)` of `x[1], x[3], x[5], x[7]` (odd field).

The core is a 1-D transform. A full 2-D coder would run it on rows and
columns, with a transposition memory in between, and would add a rule for
choosing frame or field mode. Neither of those is included here.

## The decomposition

Let `s_n = x[n] + x[7-n]` and `d_n = x[n] - x[7-n]`, for n = 0..3. Write
`a_i = cos(i*pi/16)`. The 8-point DCT then splits into two 4x4 products:

```
 [X0]   [a4  a4  a4  a4] [s0]      [X1]   [a1  a3  a5  a7] [d0]
 [X2] = [a2  a6 -a6 -a2] [s1]      [X3] = [a3 -a7 -a1 -a5] [d1]
 [X4]   [a4 -a4 -a4  a4] [s2]      [X5]   [a5 -a1  a7  a3] [d2]
 [X6]   [a6 -a2  a2 -a6] [s3]      [X7]   [a7 -a5  a3 -a1] [d3]
```

Every column of the left matrix uses the same three magnitudes (a2, a4, a6).
Every column of the right matrix uses the same four (a1, a3, a5, a7). So
when pair n arrives, the core forms the products `a2*s_n`, `a4*s_n`,
`a6*s_n` and `a1..a7 * d_n` once. It routes each product to the accumulator
that needs it, with the right sign, and adds it in. After four pairs the
eight accumulators hold `X(0..7)`.

The field transforms need the samples themselves, but these can be recovered
from `s` and `d`:

```
x[n] = (s_n + d_n) / 2        x[7-n] = (s_n - d_n) / 2
```

So each field coefficient is half of a sum, over n, of one a2/a4/a6 product
of `s_n` plus one a2/a4/a6 product of `d_n`. The products of `s_n` are the
ones the even half of the 8-point transform already makes. Only one more
three-coefficient block is needed: the a2/a4/a6 products of `d_n`.

```
Xe(0) = 1/2 sum  a4 s (+ + + +)            +  a4 d (+ - + -)
Xe(1) = 1/2 sum (a2 a2 a6 a6) s (+ - + -)  + (a2 a2 a6 a6) d (+ + + +)
Xe(2) = 1/2 sum  a4 s (+ + - -)            +  a4 d (+ - - +)
Xe(3) = 1/2 sum (a6 a6 a2 a2) s (+ - - +)  + (a6 a6 a2 a2) d (+ + - -)
Xo(0) = 1/2 sum  a4 s (+ + + +)            +  a4 d (- + - +)
Xo(1) = 1/2 sum (a2 a2 a6 a6) s (- + - +)  + (a2 a2 a6 a6) d (+ + + +)
Xo(2) = 1/2 sum  a4 s (+ + - -)            +  a4 d (- + + -)
Xo(3) = 1/2 sum (a6 a6 a2 a2) s (- + + -)  + (a6 a6 a2 a2) d (+ + - -)
```

The brackets list, for n = 0, 1, 2, 3 in turn, which coefficient is used and
its sign.

## Datapath

```
 x[n] ---+--> (+) s_n --> B1 (a2,a4,a6) --+--> R0, Sa..Sc --> 4 x Acc        --> X(0) X(2) X(4) X(6)
         |                                 +--> R7, signs  --+
 x[7-n] -+--> (-) d_n --> B1 (a2,a4,a6) -----> R8, signs  --+-> 8 x (+,Acc,/2) --> Xe(0..3) Xo(0..3)
                     \--> B2 (a1,a3,a5,a7) -> R1..R6, Sd..Sf -> 4 x Acc        --> X(1) X(3) X(5) X(7)
                                        |
                                 pipeline register
```

| Block | Module | What it does |
|---|---|---|
| butterfly | `adct_butterfly` | `s_n`, `d_n`, one bit wider than the samples |
| B1 (two copies) | `adct_b1` | a2, a4, a6 products of `s_n` or of `d_n` |
| B2 | `adct_b2` | a1, a3, a5, a7 products of `d_n` |
| constant multiplier | `adct_const_mult` | one shift-and-add network per coefficient (canonical signed digits) |
| R | `adct_swap` | 2x2 crossbar; a 4-bit constant says on which n it crosses |
| S | `adct_sign` | conditional negation; a 4-bit constant says on which n it negates |
| R1..R6 | `adct_odd_perm` | six R blocks that put a1..a7 in the order each odd output needs |
| Acc | `adct_acc` | sums four terms; pair 0 reloads it |
| +, Acc, /2 | `adct_acc_half` | adds the s-side and d-side terms, sums four pairs, halves the total |
| controller | `adct_ctrl` | 2-bit pair counter n, with first/last flags |
| even section | `adct_even8` | X(0), X(2), X(4), X(6) |
| odd section | `adct_odd8` | X(1), X(3), X(5), X(7) |
| field section | `adct_field4` | Xe(0..3), Xo(0..3) |
| top | `adct` | wires the above together; one pipeline register |

`adct_pkg` holds the shared types (`idx_t` for n, `pat_t` for the per-n
patterns). It also holds the constant functions that compute the
coefficients (`coef`) and their signed-digit recoding (`csd_mask`) at
elaboration time.

## The routing schedule

This is the part that is least obvious from the code. Each R and S block is
set by the pair index n alone. Its setting is a 4-bit parameter: bit n = 1
means "cross" or "negate" on pair n.

Even 8-point section (inputs: products of `s_n`):

| Block | Feeds | Pattern (bit 3..0) | Effect for n = 0,1,2,3 |
|---|---|---|---|
| none | X(0) | none | a4, all + |
| Sa | X(4) | `0110` | a4: + - - + |
| R0 | X(2) / X(6) | `0110` | X(2) gets a2 a6 a6 a2; X(6) gets the other one |
| Sb | X(2) | `1100` | + + - - |
| Sc | X(6) | `1010` | + - + - |

Odd 8-point section (inputs: a1, a3, a5, a7 products of `d_n`). R1..R6 sit
on neighbouring lines, in four columns: R1 on lines (0,1) and R2 on (2,3);
then R3 on (1,2); then R4 on (0,1) and R5 on (2,3); then R6 on (1,2). This
is an odd-even transposition network, so it can produce any order of its
four lines. Each switch's pattern is chosen so that the network sorts the
products into the order needed for pair n:

| n | to X(1) X(3) X(5) X(7) | switches that cross |
|---|---|---|
| 0 | a1 a3 a5 a7 | none |
| 1 | a3 a7 a1 a5 | R1 R2 R3 |
| 2 | a5 a1 a7 a3 | R3 R4 R5 |
| 3 | a7 a5 a3 a1 | all six |

Signs on the odd outputs: X(1) none; Sd on X(3) `1110`; Se on X(5) `0010`;
Sf on X(7) `1010`.

Field section: R7 (on the `s` products) and R8 (on the `d` products) both
cross a2 and a6 on n = 2 and 3. The sixteen terms use ten sign blocks. Two
terms need none: `a4*s` for Xe(0)/Xo(0), and R8's first output for
Xe(1)/Xo(1). Two signed streams are each shared by an Xe output and an Xo
output: `a4*s (+ + - -)` for Xe(2)/Xo(2), and R8's second output
`(+ + - -)` for Xe(3)/Xo(3). The instance names in `adct_field4` say which
output each sign block feeds.

## Number format and scaling

| Quantity | Width (defaults) | Notes |
|---|---|---|
| sample `x` | `IN_W` = 9, signed | 8-bit pixels or their frame differences |
| `s_n`, `d_n` | `IN_W+1` = 10 | |
| coefficient | `round(cos(i*pi/16) * 2^COEF_FRAC)`, `COEF_FRAC` = 12 | a1 = 4017, a2 = 3784, a3 = 3406, a4 = 2896, a5 = 2276, a6 = 1567, a7 = 799 |
| products | `IN_W+1+COEF_FRAC` = 22 | exact |
| outputs | `OUT_W = IN_W+COEF_FRAC+3` = 24, signed | exact, with `COEF_FRAC` fraction bits |

Nothing is rounded inside the core. The `/2` of the field outputs is exact,
because each pair's two terms add to twice a coefficient times one sample.
The outputs are the plain matrix sums above, with row 0 weighted by
`a4 = cos(pi/4)`. To get the orthonormal DCT:

* 8-point: `X(k) / 2^(COEF_FRAC+1)`;
* 4-point: `Xe(k) * sqrt(1/2) / 2^COEF_FRAC` (and the same for `Xo`).

With 12 fraction bits, these differ from the real-valued DCT by less than
0.25 for 9-bit inputs. In practice a quantiser would absorb these factors.

## Interface and timing (`adct`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a sample pair is on `x_lo` / `x_hi` |
| `x_lo`, `x_hi` | in | `IN_W` | `x[n]` and `x[7-n]`; pair n = 0, 1, 2, 3 in turn |
| `out_valid` | out | 1 | one-cycle pulse: all 16 results below are new |
| `X8[0:7]` | out | `OUT_W` each | 8-point DCT `X(k)` |
| `Xe[0:3]`, `Xo[0:3]` | out | `OUT_W` each | 4-point DCTs of the even and odd samples |

* Pair n is sampled on a rising edge when `in_valid` is high. The internal
  counter assigns n, so pairs must arrive in order. Idle cycles are allowed
  anywhere: between pairs, and between vectors.
* Throughput: one vector per four valid cycles, back to back. That is 2
  samples per clock, so a 10 ns/pixel rate needs a 50 MHz clock.
* Latency: the products register takes pair 3. On the next rising edge the
  accumulators register the results, and `out_valid` is high for that one
  cycle. The outputs hold until the next vector finishes.
* Reset clears the pair counter and all registers. A vector cut short by
  reset is dropped.
* An assertion in `adct` checks that the three sections finish together.

## Design choices

The following follow the architecture this design implements: the
sum/difference decomposition, the split into B1/B2 product blocks, R blocks
and sign blocks, the accumulator-per-output structure with `/2` on the field
outputs, and the sharing of one B1 between the even 8-point outputs and the
field outputs. The following are this implementation's own choices:

* **Word lengths and scaling** (table above).
* **Multipliers.** Each coefficient gets its own signed-digit shift-and-add
  network. A primitive-operator graph that shares partial sums between the
  coefficients of one B block would be smaller. That optimisation is not
  done here.
* **Permutation network topology** for R1..R6 (odd-even transposition). All
  the per-n swap and sign patterns come from the matrices above.
* **Ten sign blocks in the field section.** A layout with a dedicated sign
  block on more of the sixteen terms (up to twelve) works just as well. The
  patterns in the tables are what matters.
* **One pipeline stage**, between the multipliers and the accumulators. If
  the target clock needs it, a register after the butterfly would be the
  next one to add.
* **Interface**: the valid-qualified pair interface, the internal pair
  counter, and the asynchronous reset.

Not included: the frame/field decision rule, and the 2-D row/column
organisation with its transposition memory. Neither is specified here.

## Verification

Each module has a self-checking testbench in `tb/`. The reference model,
`tb/adct_ref_pkg.sv`, does not use the decomposition. It evaluates every
DCT matrix entry `cos((2m+1)k*pi/2N)` in real arithmetic, rounds it to
`COEF_FRAC` bits, and sums over the samples. With the same rounded
coefficients the hardware result must match exactly.

* `tb_adct` runs the top at its default parameters: 316 vectors, about
  10 000 checks. It checks every output exactly, and against the real-valued
  orthonormal DCT to within 0.25. It checks the latency, and that there is
  one result per vector. It also requires each of these to happen at least
  once:
  * back-to-back vectors;
  * pauses between pairs;
  * full-scale inputs;
  * a reset in the middle of a vector;
  * every pair index;
  * vectors whose even and odd samples differ. For these it checks that the
    field transforms have zero AC while the frame transform's X(7) does not.
* `tb_adct_interlace` transforms, column by column, two 8x8 blocks of an
  interlaced picture at the default parameters. One block is still. In the
  other, the odd field is shifted by 16 pixels (half the period of the
  picture's pattern). It checks every coefficient. It also checks where the
  energy lands. For the moving block, 93 % of the frame-mode energy falls in
  X(4..7), and next to none in the upper field coefficients. For the still
  block, the frame mode keeps the upper band empty.
* The section tests (`tb_adct_even8`, `tb_adct_odd8`, `tb_adct_field4`)
  drive products and compare against the definitions. `tb_adct_odd_perm`
  checks the routing table above.
* The unit tests cover the butterfly, both product blocks, R, S, both
  accumulators and the counter.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_adct \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/adct_pkg.sv tb/adct_ref_pkg.sv tb/tb_adct.sv
./obj_dir/Vtb_adct
```

For lint: `verilator --lint-only -Wall rtl/adct_pkg.sv rtl/*.sv --top-module adct`.
The one remaining warning, `SYNCASYNCNET`, comes from the reset used in the
assertion's `disable iff`, and is harmless.

## Changing it

* `IN_W` and `COEF_FRAC` on `adct` set all widths; everything below follows
  from them.
* To support a different ordering of the coefficients on the lines, change
  the 4-bit `SWAP`/`NEG` parameters on the R and S instances. The tables
  above give the rule: bit n applies to pair n.
* Fewer fraction bits make the multipliers smaller. The testbenches set the
  fraction bits in a local `F` (and `IN_W` in `tb_adct`); keep them equal to the
  RTL's. The 0.25 tolerance against the real DCT in `tb_adct` must grow as
  `COEF_FRAC` shrinks.
