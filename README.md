# Two low-power multipliers: an ANT multiplier with a fixed-width replica, and an approximate multiplier built on altered partial products

This RTL implements two multipliers that lose exactness on purpose to save power and area. They
are unrelated circuits and share no logic. The top level, `approx_mult_top`, places them side by
side with separate ports.

1. **`ant_multiplier`**: a 16x16 signed multiplier that uses *algorithmic noise tolerance*
   (ANT). The full-precision main multiplier may run below its critical supply voltage, so it
   can produce large errors. A small **reduced-precision replica** (RPR) computes a coarse product
   beside it. When the two disagree by more than a threshold, the replica's value is output.
   The replica here is an 8-bit *fixed-width* multiplier with truncation-error compensation.
   That makes it about half the size of a full-width replica.
2. **`approx_mult8`**: an 8x8 unsigned multiplier whose partial-product reduction tree is
   approximate. Pairs of partial products are recoded into propagate/generate bits. The rare
   generate bits are merged with OR gates. Everything else is reduced with approximate
   half-adders, full-adders and 4-2 compressors. An exact ripple-carry adder finishes the sum.

Everything is plain synthesizable SystemVerilog-2017. It has no vendor cells and no memories.

## 1. The ANT multiplier

```
 x,y (16b) ─┬─► bw_mult (16x16 Baugh-Wooley) ──► [reg] ya_q ──┐
            │                                                 ├─► ant_ecb ─► y_hat (32b), use_rpr
            └─► x[15:8],y[15:8] ─► fixed_width_rpr (8b) ─► [reg] yr_q ─┘
```

### Main block, `bw_mult`
This is a signed NxN Baugh-Wooley multiplier (default N = 16). Each partial product x[i]&y[j] is
placed in column i+j. It is inverted when exactly one of i, j is the sign position. Ones are
added at columns N and 2N-1, and the sum modulo 2^2N is the two's-complement product. The rows
are added with word adders, so synthesis picks the reduction tree. In the intended use, this
block's supply is scaled below its critical voltage and timing errors appear in its output.
That is electrical behaviour and is not modelled. The testbenches imitate it by overriding the
main product (see §4).

### Replica, `fixed_width_rpr`
The replica receives the **upper 8 bits** of each operand and returns only the **upper 8 bits**
of its 16-bit product. The Baugh-Wooley bit matrix is split into three parts:

| part | columns (N = 8) | treatment |
|---|---|---|
| most significant part (MSP) | 8..15 | kept exactly |
| input correction vector (ICV) | 7 | kept and added with its weight |
| minor input correction vector (MICV) | 6 | kept and added with its weight |
| truncated part | 0..5 | not built; replaced by a constant |

The constant is the mean value of the truncated columns plus half an output LSB for rounding.
Column c holds c+1 AND bits, each 1 with probability 1/4, so the constant is
`((N-3)*2^(N-2) + 1)/4 + 2^(N-1)`, rounded, which is 208 for N = 8. The compensation terms are
added beside the kept array, not in series with it.

Measured over all 65536 operand pairs, the error against x*y/2^8 is at most 1.25 LSB, with a
mean of +0.06 LSB. Add the operand bits the replica never sees, and the replica stays within
about 2.3 of its LSBs of the true 32-bit product.

**Departure:** the split into MSP / ICV / MICV / truncated part follows the published
structure. The exact compensation formula, a variable correction derived from statistics, was
not available. The constant-plus-two-columns scheme above is this design's own.

### Error-correction block, `ant_ecb`
`yr` is shifted left by 24, to the weight of the product's upper 8 bits. The block forms
`ya - yr·2^24` and compares its magnitude with `TH`. If it is larger, `y_hat = yr·2^24` and
`use_rpr = 1`; otherwise `y_hat = ya`.

The threshold is `TH_RPR_LSB = 3` replica LSBs, set in `ant_pkg`, which is 3·2^24. It is this
design's choice. It sits just above the replica's own worst-case error, so an error-free main
block is never overridden. A single wrong bit at position 27 or above in the main product is
always caught, and one at position 23 or below never is. In the testbench sweep, 50 random
operand pairs per bit, flips of bits 26 to 31 were all corrected and flips of bits 0 to 25 were
all passed through. Passing small errors through is the intended ANT trade-off.

### Timing and interface
- `x`, `y` are sampled on the rising edge of `clk`.
- Registers sit after the main block and after the replica. No register follows the
  multiplexer.
- So `y_hat` and `use_rpr` are valid one cycle after the operands, and a new operand pair can be
  accepted every cycle.
- `rst_n` is an asynchronous, active-low reset that clears both registers. The reset is this
  design's choice.
- `ya_q` and `yr_q` are brought out for observation.

## 2. The approximate multiplier, `approx_mult8`

### Altered partial products
The 64 partial products are a(m,n) = alpha[m] & beta[n]. In columns 3 to 11, every pair
a(m,n), a(n,m) with m > n is replaced by:
- p(m,n) = a(m,n) | a(n,m), and
- g(m,n) = a(m,n) & a(n,m).

Since a(m,n) + a(n,m) = p + g, this step is exact. A generate bit is 1 with probability only
1/16, so all generate bits of a column are merged by **one OR gate** into G3..G11. The OR inputs
per column are 2, 2, 3, 3, 4, 3, 3, 2, 2. The OR is wrong only when two or more of them are 1.

### Approximate cells
Each cell is wrong by at most one unit at its own column.

| cell | equations | wrong cases |
|---|---|---|
| `approx_ha` | S = x1\|x2, C = x1&x2 | 1 of 4 (11 → 3) |
| `approx_fa` | W = x1\|x2, S = W^x3, C = W&x3 | 2 of 8 (110 → 1, 111 → 2) |
| `approx_comp42` | W1 = x1&x2, W2 = x3&x4, S = (x1^x2)\|(x3^x4)\|(W1&W2), C = W1\|W2 | 5 of 16 (four ones → 3, and 0101/0110/1001/1010 → 1) |

The compressor has only two outputs. An all-zero input gives zero.

### Reduction tree
The carry C_i is produced in column i and added in column i+1.

| stage | columns | cells |
|---|---|---|
| 1 | 12, 11, 4 | half-adders |
| 1 | 10, 9, 5 | full-adders |
| 1 | 8, 7, 6 | 4-2 compressors |
| 2 | 2 | half-adder on a(2,0), a(0,2); a(1,1) passes |
| 2 | 3..13 | one full-adder each, on three bits (S_i, G_i, C_{i-1}, or the leftover partial products) |

This leaves two rows, x and y, of 15 bits. `rca` adds them exactly, giving the 16-bit product.
Column 14 holds a(7,7) and the carry out of column 13.

The exact port order of each cell is written out in `approx_mult8.sv`. Which bit drives which
cell input is this design's choice: bits are taken in the order of the published diagram. This
matters because the cells are not symmetric. The handling of column 14 is also this design's
own, because the diagram does not show it.

### Accuracy
Over all 65536 operand pairs:
- mean error distance: 1677 (2.6 % of the 65025 maximum product);
- largest error: 17948, against a worst-case bound of 29764 derived from the cell errors;
- exact results: 18 % of pairs;
- a zero operand, or an operand of one, always gives the exact product;
- a k-input generate OR is wrong for 256 (k = 2), 736 (k = 3) or 1411 (k = 4) of the 65536
  pairs. This is exactly the probability that two or more of k independent bits, each 1 with
  probability 1/16, are 1.

The largest errors come from the approximate full-adders in the top columns when both operands
are close to 255.

## 3. Files

`rtl/` (one module or package per file):

| file | contents |
|---|---|
| `ant_pkg.sv` | ANT sizes: `MAIN_W` = 16, `RPR_W` = 8, `TH_RPR_LSB` = 3 |
| `bw_mult.sv` | signed Baugh-Wooley multiplier, parameter `N` |
| `fixed_width_rpr.sv` | fixed-width replica, parameter `N` |
| `ant_ecb.sv` | subtract / compare / select |
| `ant_multiplier.sv` | the ANT multiplier |
| `approx_ha.sv`, `approx_fa.sv`, `approx_comp42.sv` | approximate cells |
| `rca.sv` | ripple-carry adder, parameter `W` |
| `approx_mult8.sv` | the approximate multiplier |
| `approx_mult_top.sv` | both designs; ports prefixed `ant_` and `am_` |

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`), plus `gmean_filter_tb.sv`.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## 4. Simulating

With Verilator 5:

```
verilator --binary --timing --assert rtl/*.sv tb/approx_mult_top_tb.sv --top-module approx_mult_top_tb
./obj_dir/Vapprox_mult_top_tb
```

Replace the testbench and top-module names to run any other test.

- **Module testbenches.** Each module's testbench compares it with an independent reference.
  The cells are checked against their truth tables written out by hand. `approx_mult8` is checked
  exhaustively against a column-by-column model. `fixed_width_rpr` is checked against the
  identity `(x*y - truncated part + constant) >> N`. `bw_mult` and `rca` are checked against the
  `*` and `+` operators.
- **`ant_multiplier_tb` and `approx_mult_top_tb`.** These imitate a voltage-overscaled main block
  by `force`-ing the main product for one cycle with one bit flipped. A flip in bits 27 to 30 must
  be replaced by the replica value. A flip in the low bits must pass through unchanged.
  `approx_mult_top_tb` runs both designs at their default sizes and counts clean results,
  corrections, small errors passed, and exact and approximate results from `approx_mult8`. It
  fails if any of these never happens.
- **`gmean_filter_tb`.** This runs a 3x3 geometric-mean denoising filter (the ninth root of the
  product of a neighbourhood) on a generated, noisy 48x48 8-bit image. It runs once with exact
  and once with approximate 8x8 products. The running product is kept as an 8-bit mantissa and an
  exponent, and the root is taken in real arithmetic. The approximate result reaches about
  29.6 dB PSNR against the exact one; the test requires at least 25 dB.
  - This is a stand-in for the 16-bit-pixel filtering experiment the method was evaluated with.
    A 16x16 version of this multiplier is not specified, so that experiment cannot be run as it
    was.
  - For reference, the evaluation reports 37.7 dB and 1.90 µJ saved for the 16-bit approximate
    multiplier on its first test image.

## 5. Known gaps and how far to trust it

- The ANT replica's compensation and the threshold are reasonable choices that work. They are
  not the original values, so area and accuracy figures will differ from published ones.
- Voltage overscaling is not modelled. The ANT logic is only shown to react correctly to
  injected errors.
- Not built, because not specified:
  - the 16-bit approximate multiplier used for image filtering;
  - the second approximate variant ("Multiplier2") named in the results;
  - a signed/Booth version of the approximate scheme;
  - an error-tolerant adder for an FFT, which is only mentioned.
- All blocks are combinational except the two pipeline registers in `ant_multiplier`. There is
  no handshake; add valid bits outside if needed.
