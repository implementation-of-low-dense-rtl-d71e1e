# Recursive multiplier-free approximate DCT with reconfigurable length, and a Vedic multiplier

The discrete cosine transform (DCT) is costly in hardware because every output
is a weighted sum of all inputs with irrational cosine weights. This design
replaces the weights with small integers (0, +1 and -1), so the transform
needs only adders. It then grows the transform to larger lengths by
recursion: an N-point transform is one level of N adders followed by two
N/2-point transforms. Because of this recursion, the same adder units can
compute one long transform or several short ones in parallel. A mux layer
chooses the mode.

Alongside the transforms, the design contains an unsigned multiplier built
after the Urdhva-Tiryagbhyam ("vertically and crosswise") scheme of Vedic
mathematics. In this scheme every partial product of the operand halves is
formed at the same time and then summed by carry look-ahead adders. The
multiplier is 32 bits wide by default.

All datapaths are combinational. The top level adds one output register
stage.

## The recursion

The exact N-point DCT matrix is

    c(i,j) = e(i) * sqrt(2/N) * cos((2j+1) i pi / 2N),   e(0) = 1/sqrt(2), e(i>0) = 1

Its even rows, restricted to the first N/2 columns, form the N/2-point DCT.
Its rows are also even or odd symmetric about the middle. So the matrix
factors into three parts:

1. an **input adder unit**: `a(i) = x(i) + x(N-1-i)` and
   `b(i) = x(i) - x(N-1-i)` for i = 0..N/2-1 (N adders);
2. two N/2-point transforms, one on `a` and one on `b`;
3. an **output permutation** with no logic: the transform of `a` gives the
   even coefficients `F(2k)`, and the transform of `b` gives the odd
   coefficients `F(2k+1)`.

In the exact factorisation, the `b` half needs a different matrix: the odd
rows of the N-point matrix. The approximation uses the same 8-point kernel
for both halves. The recursion stops at 8 points. Each step therefore costs
N more additions:

| length | additions | built as |
|---|---|---|
| 8  | 22  | `dct8_approx` |
| 16 | 16 + 2*22 = 60 | `dct16_reconfig` in 16-point mode |
| 32 | 32 + 2*60 = 152 | `dct32_reconfig` in 32-point mode |
| 64 | 64 + 2*152 = 368 | `dct_approx_n` (default length) |

In general, an N-point transform costs N(log2 N - 1/4) additions and has
log2 N adder delays. The transform is not normalised. The factor 1/sqrt(2)
of the exact factorisation is left out, as are the different norms of the
approximate rows. The outputs are integers that carry a gain, and a
quantiser that follows should absorb it. Every stage widens its result by one
bit, so no output can overflow. With 8-bit samples, the outputs are 11 bits
(8-point), 12 bits (16-point), 13 bits (32-point) and 14 bits (64-point).

## The 8-point kernel (`dct8_approx`)

The kernel matrix is `T = round(2*C8)`, the exact 8-point DCT matrix doubled
and rounded entry by entry:

```
 1  1  1  1  1  1  1  1
 1  1  1  0  0 -1 -1 -1
 1  0  0 -1 -1  0  0  1
 1  0 -1 -1  1  1  0 -1
 1 -1 -1  1  1 -1 -1  1
 1 -1  0  1 -1  0  1 -1
 0 -1  1  0  0  1 -1  0
 0 -1  1 -1  1 -1  1  0
```

Its rows are mutually orthogonal. The matrix is computed in three adder
columns of 8, 8 and 6 adders, 22 in all, with no shifts:

- Column 1 forms butterflies: `a(i) = x(i)+x(7-i)` and `c(i) = x(i)-x(7-i)`.
- Column 2 forms the even terms `a0+a3`, `a1+a2`, `a0-a3` and `a2-a1`, and
  the odd terms `c0+c1`, `c0-c1`, `c2+c3` and `c2-c3`.
- Column 3 forms `F0` and `F4` from the even terms. `F2` and `F6` pass
  through unchanged. The four odd outputs are:
  - `F1 = (c0+c1)+c2`
  - `F5 = (c0-c1)+c3`
  - `F3 = c0-(c2+c3)`
  - `F7 = (c2-c3)-c1`

The flow graph this follows fixes the three-column structure and the count
of 22 additions. It does not give the individual signs. The rounded-2*C8
matrix is this design's reading, and it fits that structure exactly.

## Reconfigurable engines

### 16/8 points (`dct16_reconfig`)

This engine has one 16-point input adder unit and two 8-point kernels, U0
and U1. The control input is `sel16`:

- **Inputs:** 16 two-input muxes choose what each kernel gets. With
  `sel16=1`, U0 gets `a(0..7)` and U1 gets `b(0..7)`. With `sel16=0`, U0 gets
  `x(0..7)` and U1 gets `x(8..15)`.
- **Outputs:** 14 two-input muxes put the results in order. With `sel16=1`,
  `f[2i]=U0[i]` and `f[2i+1]=U1[i]`. With `sel16=0`, `f[0..7]=U0` and
  `f[8..15]=U1`.

`f[0]` and `f[15]` come from the same kernel output in both modes, which is
why only 14 output muxes are needed. In 16-point mode, this engine is the
fixed 16-point approximate DCT.

### 32/16/8 points (`dct32_reconfig`)

This engine has one 32-point input adder unit, two 16-point input adder
units and four 8-point kernels, U0 to U3. The mode `size`
(`dct_pkg::dct_size_e`) drives three control blocks:

| control block | muxes | decision | effect |
|---|---|---|---|
| 1 | 32 x 2:1 | is the size 32? | the 16-point adders get the 32-point `a`/`b`, or `x[0..15]`/`x[16..31]` |
| 2 | 32 x 2:1 | is the size above 8? | the kernels get the 16-point `a`/`b`, or `x` in blocks of 8 |
| 3 | 30 x 3:1 | size | output order, as below (`f[0]`, `f[31]` fixed) |

| mode | output order |
|---|---|
| `DCT_32` | `f[4i]=U0[i]`, `f[4i+1]=U2[i]`, `f[4i+2]=U1[i]`, `f[4i+3]=U3[i]` |
| `DCT_16` | `f[2i]=U0[i]`, `f[2i+1]=U1[i]`, `f[16+2i]=U2[i]`, `f[17+2i]=U3[i]` |
| `DCT_8`  | `f[8n+i]=Un[i]` |

The 32-point order comes from applying the recursion twice. In 16-point mode,
the engine computes two independent 16-point transforms, of `x[0..15]` and
of `x[16..31]`. In 8-point mode, it computes four independent 8-point
transforms. The encoding 2'd3 is not a legal size, and the engine treats it
as `DCT_16`.

### Fixed length, any power of two (`dct_approx_n`)

`dct_approx_n` unrolls the recursion for one fixed length N, 64 by default.
It has no muxes.

- **Adder levels.** There are L = log2(N/8) levels of input adder units.
  Level s works on 2^s segments. The sums from segment j become segment 2j
  of the next level, and the differences become segment 2j+1.
- **Kernels.** 2^L 8-point kernels transform the last segments.
- **Output order.** Output i of kernel j goes to `f[i*2^L + bitreverse(j)]`.
  Each level sends sums to even and differences to odd coefficients, which
  builds the index up bit by bit in reverse order.

At N = 64 the engine uses 64 + 2*32 + 4*16 + 8*22 = 368 adders.

## The Vedic multiplier

### 2x2 unit (`vedic_2x2`)

Four AND gates form the bit products:

- `r0 = a0.b0` (vertical).
- The crosswise sum `a0.b1 + a1.b0` goes to a half adder. Its sum is `r1`.
- A second half adder adds `a1.b1` to the carry of the first. Its outputs
  are `r2` and `r3`.

### Merging four half-width products (`vedic_combine`)

For operands of 2H bits, `a = {ah, al}` and `b = {bh, bl}`, the inputs are
the four 2H-bit products `p_ll`, `p_lh`, `p_hl` and `p_hh`. Three 2H-bit
carry look-ahead adders merge them:

```
adder 1:  m  = p_lh + p_hl                          carry ca1
adder 2:  t  = m + (p_ll >> H)                      carry ca2
adder 3:  hi = p_hh + {ca1|ca2, t[2H-1:H]}
product = {hi, t[H-1:0], p_ll[H-1:0]}
```

`ca1` and `ca2` both have weight 2^(2H). They can never both be 1, because
`p_lh + p_hl + (p_ll >> H) < 2^(2H+1)`, so one OR gate merges them. The
carry out of adder 3 is always 0, and an assertion checks this. The
published 4x4 diagram leaves open where `ca2` goes. The OR is this design's
choice.

### Sizes

- `vedic_4x4` is four 2x2 units and one merge.
- `vedic_8x8` is four 4x4 units and one merge.
- `vedic_mult` is the general multiplier, with a default width of 32. It
  multiplies every 8-bit chunk of `a` with every 8-bit chunk of `b` in
  sixteen 8x8 units, all in parallel. Two levels of merges follow: four
  16-bit products, then the 32-bit product. Widths 2, 4 and 8 map to the
  hand-built units. The width must be a power of two.

Going beyond 8 bits with the same scheme is this design's extension.

### The adder (`cla_adder`)

`cla_adder` is a flat carry look-ahead adder. Each carry is a two-level sum
of products of the generate and propagate terms and the carry-in. This is
fine at the widths used here, which are at most 32 bits. A grouped
look-ahead adder would scale better beyond that.

## Top level (`dct_vedic_top`)

The top holds four independent datapaths side by side: the 16/8-point
engine, the 32/16/8-point engine, the fixed 64-point engine and the 32-bit
multiplier. They share only
`clk` and `rst_n`.

- **Operation:** each datapath has a `*_valid_i` input. When it is high, the
  result is captured in an output register, and `*_valid_o` is high one clock
  later.
- **Throughput:** a new operation can start on every clock.
- **Reset:** `rst_n` is synchronous and active low. It clears only the valid
  flags.
- **Parameters:** `DATA_W` (sample width, 8 by default), `DCTN_N` (length
  of the fixed engine, 64 by default) and `MULT_W` (multiplier width, 32 by
  default).

The sample width, the output register and the valid/reset handling are this
design's own choices.

## Where this departs from or goes beyond the source description

- **Kernel signs.** The signs of the 8-point kernel come from the
  rounded-2*C8 matrix. They are not read off a printed matrix.
- **Scaling.** The output scaling (1/sqrt(2), row norms) is left out.
- **Adder type.** The 4x4 multiplier's adders are described both as
  ripple-carry and as carry look-ahead. Carry look-ahead is used here.
- **`ca2`.** The routing of `ca2` in the merge network is this design's
  choice.
- **Wider multipliers.** Multipliers wider than 8 bits repeat the 4x4/8x8
  construction.
- **Multiplier and transform.** The multiplier is not wired into the
  transforms. Nothing says where a multiplication would occur: the
  approximate DCT itself is multiplier-free.
- **Not built:**
  - a reconfigurable engine above 32 points (64 points exist only at a
    fixed length);
  - an inverse DCT;
  - any pipelining inside the adder trees.

## Verification

Each module has a self-checking testbench in `tb/`. It ends with a line
`TB_RESULT checks=N failures=M`.

- **Transform references.** `tb/dct_ref_pkg.sv` computes the kernel from the
  cosine definition with `$cos` and rounding. It checks that the rows are
  orthogonal. It builds the 16- and 32-point references by applying the
  recursion in software.
- **Transform tests.** The testbenches apply impulses, full-scale values and
  random vectors in every mode.
- **Fixed-length tests.** `tb_dct_approx_n` builds the 8-, 16-, 32- and
  64-point matrices from the recursion's matrix definition. It checks that
  their rows are orthogonal and compares all four lengths of the engine with
  them.
- **Multiplier tests.** The 2x2, 4x4 and 8x8 multipliers and the 4-bit adder
  are tested exhaustively. `vedic_mult` is tested with corner cases, the
  pair 0x38000000 x 0x338FFFFF = 0x0B477FFFC8000000 and random operands at
  32 and 16 bits.
- **End to end.** `tb_dct_vedic_top` runs the top at its default parameters.
  It sends 400 operations into all four datapaths with random idle cycles,
  and checks every result and the one-clock latency. It counts how often each
  mode, each mode switch, each idle cycle and the reset happened, and fails if
  any never happened.

Simulating with Verilator 5, for example the top:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_vedic_top.sv --top-module tb_dct_vedic_top
./obj_dir/Vtb_dct_vedic_top
```

Replace the testbench name to run another block. Each testbench runs in well
under a second.

## Files

- `rtl/dct_pkg.sv`: size enum
- `rtl/dct8_approx.sv`, `rtl/input_adder_unit.sv`: transform building blocks
- `rtl/dct16_reconfig.sv`, `rtl/dct32_reconfig.sv`: reconfigurable engines
- `rtl/dct_approx_n.sv`: fixed-length engine
- `rtl/half_adder.sv`, `rtl/vedic_2x2.sv`, `rtl/cla_adder.sv`,
  `rtl/vedic_combine.sv`, `rtl/vedic_4x4.sv`, `rtl/vedic_8x8.sv`,
  `rtl/vedic_mult.sv`: multiplier
- `rtl/dct_vedic_top.sv`: top level
- `tb/dct_ref_pkg.sv` and `tb/tb_*.sv`: reference models and testbenches
