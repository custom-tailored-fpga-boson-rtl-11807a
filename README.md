# FPGA permanent engines for boson sampling

Simulating a boson-sampling experiment classically comes down to computing
matrix permanents. A permanent looks like a determinant without the signs, but
no elimination trick applies, so the best known exact algorithms still take
exponential time. This RTL implements two streaming engines built around the
Balasubramanian–Bax–Franklin–Glynn (BB/FG) formula:

* **`glynn_perm_top`** computes the permanent of an n × n complex matrix
  (n ≤ 40). It walks a Gray code over the sign vectors, spread over four
  parallel column-sum kernels and four product trees, so four of the
  2^(n-1) terms are finished every clock cycle. It also has a two-board
  ("dual") mode that splits the work between two devices.
* **`rep_perm_top`** computes the permanent of a matrix whose rows and columns
  repeat, which is what happens when several photons share an optical mode.
  It uses a mixed-radix Gray code and binomial weights. This needs far fewer
  terms than expanding the matrix.

`boson_sampling_top` puts both engines side by side, each with its own ports.
All parameters default to the full size: 40 rows, columns or photons.

## The formula and how the work is split

For an n × n matrix A, with δ ranging over the sign vectors in {+1, −1}^n and
δ₀ fixed at +1:

    perm(A) = 2^-(n-1) · Σ_δ (Π_k δ_k) · Π_j s_j(δ),     s_j(δ) = Σ_i δ_i a_ij

If the δ vectors are visited in reflected binary Gray-code order,
consecutive vectors differ in one sign. Each step then changes every
column sum by ±2·a_ij for a single row i. That is O(n) additions plus one
n-fold product per term, rather than O(n²).

The engine sets δ₀ = +1 and also enumerates δ₁ and δ₂ in hardware. That
gives four **prefixes** p = 0..3: bit 1 of p negates row 1 and bit 0
negates row 2. The remaining rows 3..n−1 follow a Gray code of n−3 bits.
For one Gray code, the column sums of the four prefixes differ only by
constants. So the engine keeps four sets of column sums, updates them all
with the same ±2·a_ij, and evaluates four terms per cycle. A full run takes
2^(n-3) cycles.

The columns are also split four ways:

```
 row stream ──► colsum_init ×4 ──► colsum_update ×4 ──┐  (kernel k: columns kQ..kQ+Q-1,
 (one row/cycle)  (initial sums)    (matrix in FFs,    │   all four prefixes)
                                     own Gray counter) │
                                                       ▼  regrouped by prefix
                                  product_tree ×4 (one per prefix, N leaves each)
                                                       │
                                                       ▼
                                  perm_accum: acc += Σ_p sign_p · P_p ──► result
```

Each column kernel stores its Q = N/4 columns of the matrix (all rows) in
flip-flops. It also runs its own copy of the Gray counter. All four
counters start on the same cycle, so they stay in lock step. Each cycle a
kernel sends its Q column sums for every prefix. Product tree p collects
prefix p from all four kernels and so gets all N column sums.

**Signs.** A term's sign Π δ_k is the parity of the Gray code: the code
gains or loses exactly one set bit per step, so this is the counter's low
bit. Each set bit of the prefix flips the sign once more. In dual mode, a
negated row 3 flips it again on board 1. `perm_accum` applies these signs.

**Matrices smaller than 40.** n is set at run time. Rows at or beyond n
are left out of the sums, and the Gray code has only n−3 bits. Columns at
or beyond n reach the product trees as exactly 1, so they do not change
the product. The junk a host may put in unused columns is ignored.

**Dual mode.** Two boards, each loaded with the same matrix, also fix δ₃:
board 0 takes +1 and board 1 takes −1. The Gray code then covers rows
4..n−1, so each board runs 2^(n-4) cycles. The host adds the two results.

## Number format

All values are signed fixed point with two integer bits (sign and one):

| where | width | format |
|---|---|---|
| matrix entries, column sums | 64 per part | Q2.62 |
| product tree, level 0 → 1 → 2 → 3.. | 64 → 93 → 110 → 127 | Q2.(W−2) |
| binary accumulator | 131 | Q6.125 |
| repeated-row accumulator | 167 | Q42.125 |

The host must **normalise** the matrix so that every column sum, for every
sign vector, stays within the unit disc. Scaling each column by its
worst-case column sum is enough. All products then stay in [−1, 1] as well.

A worst-case analysis puts the largest partial sum over the sign vectors
at ±27 for n = 40. Six integer bits in the binary accumulator are
therefore enough. The repeated engine weights each term by a binomial coefficient.
Those coefficients sum to 2^(n-1) at most, so that accumulator has 42
integer bits.

Both engines output the raw sum, which is 2^(n-1) · perm of the normalised
matrix. Dividing by 2^(n-1) and undoing the column scaling is left to the
host.

**Product tree.** The tree is binary. For 40 leaves its levels hold 20,
10, 5, 2, 1 and 1 complex multipliers. An odd value left over at a level
goes to the next level through a 3-cycle delay line. The word widths grow
towards the root, where there are few multipliers and precision is cheap.
Each complex multiplier (`cmul`) uses Knuth's three-multiplication form:
x = c(a+b), re = x − b(c+d), im = x + a(d−c). It is pipelined in three
stages. The exact product is truncated to the output width, dropping low
bits (rounding towards −∞).

## Repeated rows and columns

Say row k of an m × m matrix appears M_k times, column j appears N_j
times, and n = ΣM_k = ΣN_j is the photon count. Grouping the sign vectors
of the expanded n × n matrix by how many copies of each row are negated
(Δ_k) gives

    perm = 2^-(n-1) Σ_Δ Π_k (−1)^Δ_k C(M'_k, Δ_k) · Π_j (Σ_k (M_k − 2Δ_k) a_kj)^N_j

Row 0 is the **anchor**: one of its photons always has a + sign, so Δ₀
runs over 0..M₀−1 with M'₀ = M₀−1. Every other row has M'_k = M_k. The
host must place a row with M₀ ≥ 1 first. The sum has Π(M'_k+1) terms.

**Mixed-radix Gray code (`ngray_counter`).** The Δ vectors are visited so
that one Δ_k moves by ±1 per step. Each digit is held in
*direction-encoded* form: a counter d_k modulo 2(M'_k+1). The Gray digit is
d_k on the way up and 2M'_k+1−d_k on the way down. A step sends a carry
into digit 0. A digit at the top of either half keeps its Gray value and
passes the carry on. The first digit that does not pass the carry moves by
one.

For non-anchor multiplicities (1, 2, 2) the counter produces these 18
codes (digit 0 first), checked in `tb_ngray_counter`:

    000 100 110 010 020 120 121 021 011 111 101 001 002 102 112 012 022 122

**Binomial weight (`binom_update`).** The product of binomials b is updated
incrementally. When digit k moves from Δ to Δ+1, b becomes b·(M−Δ)/(Δ+1).
When it moves to Δ−1, b becomes b·Δ/(M−Δ+1). These divisions are always
exact. Each one is done by multiplying with a "magic" reciprocal
⌈2^52/d⌉ and shifting right by 52. The reciprocals come from a constant
table computed at elaboration. The result is exact for every dividend below
2^46 and every divisor up to 63.

**Powers (`rep_colsum`).** The column sums Σ_k (M_k − 2Δ_k) a_kj are kept
like the binary engine's: loading adds M_k·a_kj, and each step adds or
subtracts 2·a_kj. To raise column j to the power N_j, column j is copied
into N_j consecutive leaves ("photon slots") of the same product tree, and
slots at or beyond n are fed exactly 1. The slot-to-column map is computed
once per operation from the N_j.

## Interfaces and timing

Both engines use the same protocol. The host pulses `start` with the size
(`n`, or `m` with the multiplicities). The engine then raises `row_ready`
and takes one matrix row per cycle while `row_valid` is high. Row k
arrives on `row_data[0..N-1]` as `cplx_t` values, `{re, im}` in Q2.62. The
engine computes and pulses `done` for one cycle. The result stays on
`perm_re`/`perm_im` until the next start, and the engine accepts a new
`start` on the cycle after `done`. The multiplicity inputs of the repeated
engine must be held until `done`.

With `row_valid` held high, the number of cycles from `start` to `done` is:

* binary engine: n + 2^(n−3) + 3 + 3·L, where L = 6 tree levels for
  N = 40. In dual mode, 2^(n−4) replaces 2^(n−3). Valid for 3 ≤ n ≤ 40
  (4 ≤ n in dual mode).
* repeated engine: m + Π_k(M'_k+1) + 3 + 3·L.

A 40 × 40 permanent therefore takes about 2^37 cycles: 491 s at 280 MHz,
or half that per board in dual mode.

`rst_n` is an asynchronous active-low reset of the control state.
Datapath registers are not reset, because they are always written before
they are read.

## Where this RTL departs from the original FPGA design

* **Coefficient loop.** The original pipelines the binomial update over 9
  cycles. To keep one term per cycle, it interleaves several Gray-code walks
  that start at even intervals of the sequence. Here the update is
  combinational, so the loop is one cycle long and there is a single walk.
  The repeated engine is therefore complete in function but not in
  structure, and at a high clock rate its coefficient path is the critical
  path.
* **Multipliers.** They are written as plain `*`. The original tiles them
  onto 18 × 25 DSP blocks with a Karatsuba scheme.
* **Host link and board.** The original sits behind a PCIe streaming
  framework on a four-die (SLR) device with DDR4. Here the engines expose
  plain stream ports, and placement is left to the tools.
* **Engines side by side.** The two engines were separate device images
  originally. Here they share a top level.
* **Host tasks.** Normalisation, the final 2^-(n-1) scaling and adding the
  two boards' dual-mode results are host tasks, as in the original.
* **Assumed details.** The following were chosen for this RTL: the
  number format with two integer bits, truncation instead of rounding, the
  one-row-per-cycle loading, the handshake, the choice of row 3 for the
  dual-board split, the padding of unused columns with 1, and the
  photon-slot expansion for column powers.

## Files

| file | role |
|---|---|
| `rtl/perm_pkg.sv` | widths, complex types, tree-level helper functions |
| `rtl/boson_sampling_top.sv` | both engines side by side |
| `rtl/glynn_perm_top.sv` | binary engine: control FSM, kernel and tree wiring |
| `rtl/colsum_init.sv` | initial column sums of one column group |
| `rtl/colsum_update.sv` | matrix storage and Gray-code column sums, four prefixes |
| `rtl/gray_counter.sv` | binary reflected Gray code |
| `rtl/product_tree.sv`, `rtl/cmul.sv` | pipelined complex product tree |
| `rtl/perm_accum.sv` | signed four-stream accumulator |
| `rtl/rep_perm_top.sv` | repeated engine: control, coefficient register, wiring |
| `rtl/ngray_counter.sv` | direction-encoded mixed-radix Gray code |
| `rtl/binom_update.sv` | binomial update by magic-number division |
| `rtl/rep_colsum.sv` | column sums with multiplicities, photon slots |
| `rtl/rep_accum.sv` | weighted accumulator |
| `tb/perm_ref_pkg.sv` | double-precision reference permanents |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_accuracy_sweep.sv` | binary engine accuracy, n = 3 … 20, full size |
| `tb/tb_rep_photons.sv` | repeated engine with 20, 30 and 40 photons, full size |
| `tb/tb_batch.sv` | back-to-back batches on both engines, full size |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. A watchdog counts a failure if it hangs. For example, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/perm_pkg.sv tb/perm_ref_pkg.sv rtl/*.sv tb/tb_boson_sampling_top.sv \
  --top-module tb_boson_sampling_top -Mdir obj -o sim && obj/sim
```

`tb_boson_sampling_top` runs the full-size design with default parameters.
It drives the binary engine with 6 × 6, 7 × 7 (with gaps in the row
stream) and 10 × 10 matrices, and runs a 9 × 9 matrix on both boards of a
dual pair. It drives the repeated engine with two multiplicity patterns,
one of them with a row and a column of multiplicity zero. Results must
match a double-precision reference to a relative error of 1e-9, latencies
must match the formulas above exactly, and each mechanism must occur at
least once. Building takes under a minute and running it well under a
second. `tb_glynn_perm_top` and `tb_rep_perm_top` sweep more sizes on
reduced engines (N = 8). The unit testbenches compare bit-exactly against
integer models, except the product tree's, which compares against
floating point.

`tb_rep_photons` runs the repeated engine of the full-size design with
20, 30 and 40 photons spread over two to five modes, so that all 40 leaves
of the product tree are used and the binomial weights approach 2^35. Its
reference expands the weighted Glynn sum term by term in double precision;
results must agree to 1e-13 of the sum of the term magnitudes. `tb_batch`
runs a batch of eight 8 × 8 matrices back to back on the binary engine
of the full-size design, starting each one on the cycle after the previous `done`, and
checks that the whole batch takes exactly eight times (latency + 1)
cycles. It then runs a batch of six repeated-engine permanents that keep
the rows and change the column multiplicities.

`tb_accuracy_sweep` runs the binary engine of the full-size design on one
random matrix of each size n = 3 … 20, with entries scaled so that every
signed column sum stays inside the unit square. It prints the relative
error against a double-precision Glynn sum for each size and fails above
1e-9. The errors seen are 1e-16 to 1e-13, which is the precision of the
double reference itself, not of the engine. It takes about 20 seconds
to run.

The largest sizes simulated end to end are n = 20 for the binary engine
and 40 photons for the repeated engine. A 40 × 40 run is 1.4·10^11 cycles
and can only be done in hardware.
