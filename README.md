# 8×8 2-D DCT and folded 2-D IDCT by the direct (complex-rotation) method

The usual way to build an 8×8 two-dimensional DCT is row-column: 8 one-dimensional
DCTs on the rows, a transpose, and 8 more on the columns. That is 16 one-dimensional
transforms in all. This design uses a direct method instead. The block is permuted and
pre-added so that the whole 2-D transform turns into **four complex 8-point DCTs**. Each
complex DCT is two real 1-D DCTs, so the count falls to 8. A few adders and sign changes
rebuild the 64 coefficients from their outputs. The structure is regular: all four complex
DCTs are identical and are followed by the same butterfly. The inverse transform can
therefore be folded onto **one** complex IDCT that handles one quarter of the block per
clock.

The RTL contains both directions:

* `dct2d_parallel`: a fully parallel forward 2-D DCT. It takes 64 pixels in and gives 64
  coefficients out every clock, with a latency of 2 clocks.
* `idct2d_folded`: the inverse, folded by four. It takes two coefficient columns per clock
  and gives two pixel rows per clock, so one block is done every 4 clocks. The first rows
  appear 7 clocks after a block's first beat.
* `dct_idct_top`: both, side by side, with separate ports.

Default sizes:

* Input pixels: 9-bit signed.
* Coefficients: 12-bit signed, the orthonormal DCT rounded to integers.
* Internal word: 18 bits.
* Constant multipliers: 12-bit coefficients.

At these sizes the IDCT meets the IEEE 1180 / CCITT accuracy limits (see *Accuracy*).

## The algorithm

Notation:

* x(n1,n2) is the block and X(k1,k2) its orthonormal DCT.
* Y is the unscaled transform: Y(k1,k2) = Σ x(n1,n2)·cos(π(2n1+1)k1/16)·cos(π(2n2+1)k2/16).
* X = ¼·c(k1)·c(k2)·Y, with c(0) = 1/√2 and c(k) = 1 otherwise.
* W32 = e^(−j2π/32).

### 1. Index mapping (`row_map`)

Each 8-point axis is reordered to p = 0, 2, 4, 6, 7, 5, 3, 1: the even samples rising,
then the odd samples falling. After this, cos(π(2n+1)k/16) becomes cos(π(4n+1)k/16), and
every kernel becomes a power of W32 with exponent (4n+1)k.

The columns of row n1 are then reordered again, in an order that depends on the row:

    4·n2 + 1 = (4t + 1)(4·n1 + 1)  mod 32

Here n2 is the old column position and t the new one, called y(n1,t). This makes every
row share the same set of frequency sums. The map is a different fixed permutation for
each of the eight rows. `row_map` holds all eight as a constant table and selects one
with `n1`. `INVERSE=1` gives the reverse permutation, which the IDCT uses to put rows
back into natural order.

### 2. Pre-addition (`pre_adder`, Stage 1)

Each mapped row is folded into five sequences:

    u(n1,0) = Σ_t y(n1,t)                        real
    u(n1,4) = Σ_t (−1)^t y(n1,t)                 real
    u(n1,2) = (y0 + y4 − y2 − y6) − j(y1 + y5 − y3 − y7)
    u(n1,1) = (y0 − y4) − j(y2 − y6) + σ·W8·[(y1 − y5) − j(y3 − y7)]
    u(n1,5) = (y0 − y4) − j(y2 − y6) − σ·W8·[(y1 − y5) − j(y3 − y7)]

In these formulas:

* W8 = (1 − j)/√2.
* σ = (−1)^n1.
* yt stands for y(n1,t).

Only the W8 product needs multipliers: two constant multiplications by 1/√2 per row.
Even and odd rows differ only in the sign σ, which is the `ODD` parameter.

The two real sequences are packed into one complex set, u(n1,0) − j·u(n1,4). That leaves
four complex input sets, numbered by k2 = 0, 1, 2, 5.

### 3. Complex DCT, −j and rotation (`cdct8`, `rot_mj`)

For each set, the complex 8-point DCT is computed once:

    U_b = Σ_n1 u(n1) · W32^((4·n1+1)·b),   b = 0..7

Its real and imaginary parts come from two real 1-D DCTs, C_b(Re u) and C_b(Im u), plus 16
adders. This works because the sine sum at index b equals the cosine sum at index 8 − b:

    Re U_b = C_b(Re u) + C_{8−b}(Im u)
    Im U_b = C_b(Im u) − C_{8−b}(Re u)

The value that is actually needed is U(k1,k2) with frequency k1 + k2, which runs past 7.
Write k1 + k2 = 8a + b. Then U(k1,k2) = (−j)^a · U_b.

`rot_mj` therefore rotates the eight outputs by k2 positions, like a barrel shifter. It
multiplies by −j the outputs that wrapped around, where a = 1:

| k2 | outputs multiplied by −j |
|----|---------------------------|
| 0  | none                      |
| 1  | k1 = 7                    |
| 2  | k1 = 6, 7                 |
| 5  | k1 = 3 … 7                |

Multiplying by −j is a swap of the real and imaginary parts plus one negation, so no
multiplier is needed.

### 4. Post-addition (`post_adder`, `substage3`)

One complex set k2 gives two columns of Y, k2 and 8 − k2. Each output pair uses U(k1)
and U(8 − k1):

    P(k1) = ½ (Re U(k1) − Im U(8−k1)),   Q(k1) = ½ (−Im U(k1) − Re U(8−k1)),   k1 = 1..7
    P(0)  = Re U(0),                       Q(0)  = −Im U(0)

For sets 1, 2 and 5, column k2 is P and column 8 − k2 is Q.

Set 0 is packed as u0 − j·u4, so P is column 0 directly. Q holds a mixture of the column-4
terms, which a third butterfly stage (`substage3`) untangles:

    Y(0,4) = Q4        Y(4,4) = Q0/2
    Y(1,4) = (Q5+Q3)/2 Y(7,4) = (Q3−Q5)/2
    Y(2,4) = (Q6+Q2)/2 Y(6,4) = (Q2−Q6)/2
    Y(3,4) = (Q7+Q1)/2 Y(5,4) = (Q1−Q7)/2

`coef_scale` then applies ¼·c(k1)·c(k2). It rounds and saturates to 12 bits.

### 5. The inverse, reversed and folded

Every step above can be inverted. The row maps and the −j rotation are permutations with
sign changes. The butterflies are 2×2 and can be inverted. The complex DCT has the
inverse

    u(n1) = ⅛ Σ_b U_b · W32^(−(4·n1+1)·b)

which is again two real 1-D IDCTs plus 16 adders (`cidct8`). The pre-addition can be
inverted as well. Its inverse needs only the same two 1/√2 multiplications per row
(`pre_adder_inv`).

Each of the four sets needs its own copy of this chain up to the complex IDCT. In the
inverse, the sets are therefore **sent in one after another**, and one chain serves all
four. The sets differ in only four places:

* the scaling factors of their columns;
* the rotation amount k2;
* which outputs are multiplied by the conjugate factor;
* whether the third substage is used. Only set 0 uses it; multiplexers bypass it for sets
  1 to 3.

## The folded IDCT in detail (`idct2d_folded`)

### Input beats

A block enters as four beats with `in_valid` high. The beats may be consecutive or have
idle cycles between them:

| beat | `in_col_a` (column k2) | `in_col_b` (column 8−k2) |
|------|------------------------|--------------------------|
| 0    | 0                      | 4                        |
| 1    | 1                      | 7                        |
| 2    | 2                      | 6                        |
| 3    | 5                      | 3                        |

Each column holds eight 12-bit coefficients, indexed by k1. A beat counter inside the
module tracks the set number. After reset it expects beat 0.

### Pipeline for one beat

```
[reg] -> coef_unscale x2  ->  substage3_inv (set 0) / bypass  ->  post_adder_inv
   -> rot_mj (INVERSE)  -> [reg] -> cidct8 -> 4 transpose memories (4x4 each)
   -> pre_adder_inv (even row) + pre_adder_inv (odd row) -> row_map (INVERSE) x2
   -> round, clip -> [reg] -> out_row_a / out_row_b
```

### Scaling is done once, at the input

`coef_unscale` multiplies by 1/(2·c(k1)·c(k2)):

* ½ in general;
* 1/√2 for the first row and column;
* 1 for the DC term.

This single step undoes the kernel factor and also supplies the ⅛ of the complex IDCT.
No other scaling is needed on the way, so no bits are lost to shifts in the middle.

### Transpose memories (`transpose4x4`)

For one set, the complex IDCT gives u for all eight mapped rows n1. A reversed pre-adder,
however, needs all four sets for a single row. The four 4×4 memories do this regrouping:

* Memory 0 holds Re u of rows 0, 2, 4, 6.
* Memory 1 holds Im u of rows 0, 2, 4, 6.
* Memories 2 and 3 hold the same for rows 1, 3, 5, 7.

Each memory is written one vector of four words per beat and read one vector per clock.
Each read gives, for one row pair (2g, 2g+1), the values from all four sets.

Streaming back to back needs only one 4×4 array per memory, because the write direction
alternates:

* one block is written as rows and read as columns;
* the next is written as columns, into exactly the cells being read in that cycle, and
  read as rows.

Reads are combinational from the array, so each cell is read before the clock edge that
overwrites it. An assertion checks that the next block's writes never overtake the reads of
the block before.

### Output rows

Each clock gives two rebuilt mapped rows. They pass through the even and the odd reversed
pre-adder, then the inverse row maps, then rounding and the output register. The pixel
rows leave in pairs in this order:

    (0,2), (4,6), (7,5), (3,1)

This is the even-then-reversed-odd permutation of step 1. `out_row_a_idx` and
`out_row_b_idx` give the row numbers.

### Timing

| clock | what happens |
|-------|--------------|
| 0     | beat 0 presented and captured |
| 1     | set 0 scaled, inverse substages, rotation; result registered |
| 2     | complex IDCT of set 0; written into the transpose memories |
| 5     | complex IDCT of set 3 (last beat); the write completes the block |
| 6     | first transpose read, reversed pre-adders, row maps, rounding |
| 7     | first row pair, (0,2), valid at the output |
| 10    | last row pair, (3,1), valid |

At 4 clocks per block, the next block's first row pair follows at clock 11. Output is
continuous while input is. The forward DCT (`dct2d_parallel`) registers the mapped rows
after Stage 1 and registers the result, so its latency is 2 clocks at one block per clock.

## Number formats and rounding

All formats are two's complement. `rtl/dct_pkg.sv` holds the widths and shared helpers:

| name     | default | meaning |
|----------|---------|---------|
| `PIX_W`  | 9       | pixel width, range −256…255 |
| `DCT_W`  | 12      | coefficient width, range −2048…2047 |
| `INT_W`  | 18      | internal word |
| `COEF_W` | 12      | constant coefficients cos(kπ/16), 11 fraction bits |
| `FRAC_F` | 1       | fraction bits of the internal word, forward direction |
| `FRAC_I` | 4       | fraction bits of the internal word, inverse direction |

How values are rounded:

* The cosine constants come from an integer table of cos(kπ/16)·2^30. That table is
  rounded to `COEF_W` bits during elaboration, so no real arithmetic reaches synthesis.
* Each constant product is rounded back to an internal word, half up.
* Each 1-D (I)DCT output keeps its sum of products at full width and rounds once.
* The halvings of the post-adder round half up.
* The reversed pre-adder leaves out its final ⅛ and returns 8·y. The final rounding to a
  pixel therefore sees `FRAC_I + 3` fraction bits.
* That final rounding is **half to even**, then the result is clipped to −256…255.
  Rounding half up here would give a mean error of about +0.02 per pixel. Half to even
  removes that bias.
* Inside the datapath nothing saturates. The widths hold any 12-bit coefficient input
  without overflow. Only the forward output saturates to `DCT_W`, and only the inverse
  output clips to `PIX_W`.

## Accuracy

`tb/tb_ieee1180.sv` runs the IEEE 1180 procedure on the full design:

* 10,000 random pixel blocks per range;
* a double-precision DCT of each, rounded and clipped to 12 bits;
* the hardware IDCT, compared with the double-precision IDCT rounded and clipped to 9
  bits.

Results at the default sizes (12-bit coefficients, 18-bit internal word):

| measure                 | limit   | −256…255 | −5…5   | −300…300 |
|-------------------------|---------|----------|--------|----------|
| peak pixel error        | ≤ 1     | 1        | 1      | 1        |
| overall mean sq. error  | ≤ 0.02  | 0.0146   | 0.0074 | 0.0139   |
| peak mean sq. error     | ≤ 0.06  | 0.0178   | 0.0091 | 0.0164   |
| overall mean error      | ≤ 0.0015| 0.0000   | 0.0001 | 0.0001   |
| peak mean error         | ≤ 0.015 | 0.0048   | 0.0023 | 0.0040   |

All limits are met.

The mean-square error is higher than the figures published for this architecture
(0.0089, 0.0014 and 0.0103 overall). The mean errors are lower. Most of the squared
error comes from the 12-bit cosine constants:

* with 13-bit constants, the −256…255 overall MSE drops to 0.0127;
* the internal word could shrink to 16 bits with 12-bit constants and still pass
  (overall MSE 0.0200);
* 11-bit constants do **not** pass with this rounding scheme (overall MSE 0.026 at 17
  bits), although the published analysis names 11/17 bits as sufficient.

The forward DCT is checked against a double-precision orthonormal DCT and agrees within
one unit on every coefficient.

## Where this RTL departs from, or adds to, the source architecture

* **Inverse-path factors.** In the inverse direction the rotation multiplies by **+j**,
  not by −j, where the forward path used −j. The source description speaks of
  multiplexers that "multiply by −j or not". Since (−j)·(+j) = 1, +j is the factor that
  actually inverts the forward step. The difference is only which part gets negated.
* **Scaling placement.** The source keeps the ⅛ inside the complex IDCT and says nothing
  about where the DCT normalisation goes. Here all of it is one multiplication at the IDCT
  input, and one at the forward output.
* **Cost of the inverse path.** The source counts the folded IDCT as two 1-D IDCTs, one
  transpose memory (four 4×4 memories), 76 extra adders and 4 extra constant multipliers.
  This RTL has the same structure: two reversed pre-adders, which hold the four 1/√2
  multipliers. In addition:
  - The input scaling (`coef_unscale`) adds 1/√2 multipliers for the first row and column.
  - The 1-D transforms are plain even/odd matrix products, 28 constant multiplications
    each, not a fast factorisation. Any fast 1-D DCT/IDCT with the same numbering can
    replace `dct8_real` and `idct8_real`.
  - The two reversed pre-adders produce two rows per clock, so the folded IDCT keeps up
    with one set per clock.
* **Forward direction is not folded.** The forward transform is built only in its
  parallel form (64 in, 64 out). The folding is described for the inverse only.
* **Choices the algorithm leaves open**, which are this design's own:
  - the set order;
  - the port layout;
  - the pipeline registers;
  - reset (asynchronous, active low, clearing valids and counters only);
  - the fixed-point split of the 18-bit word;
  - all rounding modes.

## Files

| file | role |
|------|------|
| `rtl/dct_pkg.sv` | widths, types (`word_t`, `cword_t` complex, `pix_t`, `coef_t`), cosine table, permutation helpers, rounding multiply |
| `rtl/row_map.sv` | permutation + row-dependent map (and inverse) |
| `rtl/pre_adder.sv`, `rtl/pre_adder_inv.sv` | Stage 1 and its reverse |
| `rtl/dct8_real.sv`, `rtl/idct8_real.sv` | real 8-point kernels on the (4n+1) numbering |
| `rtl/cdct8.sv`, `rtl/cidct8.sv` | complex 8-point DCT / IDCT from two real kernels |
| `rtl/rot_mj.sv` | −j (or +j) and rotation by k2 |
| `rtl/post_adder.sv`, `rtl/post_adder_inv.sv` | butterflies between U and Y |
| `rtl/substage3.sv`, `rtl/substage3_inv.sv` | column-4 butterfly for set 0 (inverse with bypass) |
| `rtl/coef_scale.sv`, `rtl/coef_unscale.sv` | output / input normalisation |
| `rtl/transpose4x4.sv` | 4×4 transpose memory, alternating direction |
| `rtl/dct2d_parallel.sv` | parallel forward 2-D DCT |
| `rtl/idct2d_folded.sv` | folded inverse 2-D DCT |
| `rtl/dct_idct_top.sv` | top: both transforms |

Tests:

* Each module has a self-checking testbench `tb/tb_<module>.sv`. Each compares against
  the reference model in `tb/dct_ref_pkg.sv` (double-precision DCT/IDCT and helpers).
* `tb/tb_dct_idct_top.sv` runs the whole top at its defaults. It covers:
  - streaming forward blocks, with latency checked;
  - IDCT blocks back to back and with gaps, with latency and throughput checked;
  - DCT→IDCT round trips;
  - IEEE 1180 statistics on 400 blocks per range.

  It also counts, and requires, each mechanism: set-0 substage and bypass, both transpose
  directions, simultaneous transpose read and write, output clipping and gapped input.
* `tb/tb_ieee1180.sv` is the full 10,000-block accuracy run.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 is enough. The package must come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -yrtl \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_idct_top.sv \
    --top-module tb_dct_idct_top -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run any other test. The full-size runs
take well under a second of simulation.

To try other widths, change the parameters in `rtl/dct_pkg.sv`. The defaults leave
14 integer bits in the inverse path. Narrower splits have passed the accuracy test
but have not been checked for overflow against worst-case 12-bit inputs.

Verilator gives two harmless warnings:

* `SYNCASYNCNET`, because `rst_n` is also used by the `disable iff` of the transpose
  memory's assertion.
* `UNUSEDPARAM` for the package widths when the package is linted alone.
