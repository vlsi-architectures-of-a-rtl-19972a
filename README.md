# Wiener filter estimation for AV1 loop restoration

AV1's loop-restoration stage can apply a separable 7x7 Wiener filter to a
reconstructed frame. The encoder picks the filter by least squares: from the
autocovariance `H` of the degraded pixels' 7x7 windows and their
cross-correlation `M` with the source pixels, it searches for a vertical
filter `a` and a horizontal filter `b` that bring the filtered frame closest
to the source. The two filters are found in turns: improve `a` while `b` is
held fixed, then improve `b` while the new `a` is held fixed.

This RTL gathers `H` and `M` from pixel windows, then runs one turn: from
`H`, `M` and a starting `b_in` it returns the updated pair `(a, b)`. Everything is 64-bit integer
arithmetic, and every step is bit-exact with a plain sequential C-style
model.

Three rules keep the problem small:

- **Symmetric taps.** `f[i] = f[6-i]`.
- **Normalised taps.** The seven taps sum to `S = 2^16`. A tap is stored as an integer scaled by `S`.
- **Only three free taps.** The centre tap is `S - 2*(f0 + f1 + f2)`.

So each update solves a 3x3 linear system.

## The arithmetic of one update

Take `update_a` (with `b` fixed) as the example. `update_b` is its mirror
image.

1. **Statistics, folded to 4.** `H` is seen as a 7x7 grid of 7x7 blocks
   `H_ij`. The window index `t` folds onto `min(t, 6-t)`, so that taps that
   must be equal share one unknown. For each block:

       B[fold k][fold l] += ((H_ij[k][l] * b(i)) >> 16) * b(j) >> 16
       A[fold j]         +=  (M[i][j] * b(i)) >> 16

   `>>` is an arithmetic shift. It undoes the `S` scaling of a tap.

2. **Enforcement.** Substituting the centre tap turns the 4x4 normal
   equations `B x = A` into a 3x3 system:

       b'[i]    = A[i]    - (2*A[3] + B[i][3] - 2*B[3][3])
       a'[i][j] = B[i][j] - (2*B[i][3] + 2*B[3][j] - 4*B[3][3])

   From here on the matrix is called `a` and the vector `b`, as in the solver
   code. Matrix elements are also named flat, `A_n = a[n/4][n%4]` (row stride
   4), so the pivot column is `A0, A4, A8`.

3. **Partial pivoting, stage 0.** Three comparators order `|A0|`, `|A4|` and
   `|A8|`. The largest row moves to the top. The other two rows end up as an
   adjacent-swap pass from the bottom row upward leaves them, and a row moves
   only when it is strictly larger.

4. **Forward elimination, stage 0.** Rows 1 and 2 are eliminated with row 0:

       x -= (((c >> 8) * x_pivotrow) / A0) << 8

   Here `c` is the row's column-0 element. The pre-shift by 8 keeps the
   product inside 64 bits. Division truncates toward zero.

5. **Pivoting and elimination, stage 1.** Rows 1 and 2 swap when
   `|A5| < |A9|`. Then row 2 is eliminated with row 1.

6. **Back-substitution.**

       X2 = (b2 << 16) / A10
       X1 = ((b1 - (A6*X2 >> 16)) << 16) / A5
       X0 = ((b0 - (A1*X1 >> 16) - (A2*X2 >> 16)) << 16) / A0

7. **Symmetrization.** The taps are `X0 X1 X2 (S - 2ΣX) X2 X1 X0`.

`update_b` uses the same steps with the roles of the indices exchanged:

    B[fold i][fold j] += Σ_k Σ_l ((H_ij[k][l] * a(k)) >> 16) * a(l) >> 16
    A[fold i]         += (M[i][j] * a(j)) >> 16

`update_a` adds a whole folded 4x4 block into its matrix on every clock
(feedback form). `update_b` reduces each block to one number and stores it
into a single matrix element (storing form).

## Hardware structure

    wiener_filter_top
    ├── pre_processing  running sums H_ij[k][l] += X[k][i]·X[l][j], M[i][j] += Y·X[j][i]
    │                   (2401 + 49 products per window, one window per clock)
    └── wiener_filter_core       inputs H (block port), M, b_in
        ├── update_a    counters i,j · 49 parallel H·b(i)·b(j) products · M select · 4x4 + 4 accumulators
        │   └── gauss_solver
        │       ├── enforcement              (combinational, registered after)
        │       ├── partial_pivoting K=0     (combinational, registered after)
        │       ├── forward_elimination K=0  (6 restoring dividers in parallel)
        │       ├── partial_pivoting K=1
        │       ├── forward_elimination K=1  (2 restoring dividers)
        │       ├── back_substitution        (3 restoring dividers, used in sequence)
        │       └── symmetrization
        └── update_b    same, with a 49-product contraction and a 49-input sum per block
            └── gauss_solver

### Statistics (`pre_processing`)

For each pixel of a region, the caller streams two things:

- the 7x7 window `X[r][c]` of the degraded frame around the pixel
- the source pixel `Y`

The block keeps running sums. `H_ij[k][l]` is the sum of `X[k][i]·X[l][j]`,
so block `(i, j)` pairs window columns `i` and `j` and its element `(k, l)`
pairs rows `k` and `l`. The block indices go with the horizontal filter and
the in-block indices with the vertical filter. `M[i][j]` is the sum of
`Y·X[j][i]`.

The expectation is a plain sum, since a common scale does not change the
least-squares solution. The mean is not removed inside the block. If a true
covariance is wanted, stream samples with the mean already taken off.
Pixels are `PIX_W = 16` bits, signed. All 2450 sums are 64-bit registers.

`wf_pkg` holds the shared types (`word_t`, `lin_sys_t`) and constants
(`WORD_W = 64`, `WIN = 7`, `S_LOG2 = 16`, `FE_SHIFT = 8`).

### The restoring divider

Every division goes through `restoring_divider`, which handles one bit per
clock:

1. Shift the `{partial remainder, dividend}` pair left by one bit.
2. Trial-subtract the divisor, 65 bits wide.
3. Keep the difference only if it is not negative.
4. Shift the complemented sign of the difference into the quotient.

A 64-step counter ends the division. Signed operands are divided as
magnitudes. One extra clock then applies the signs, so the result is the
C-style truncated quotient and remainder. The critical path is a single
adder. The price is a latency of `W+1 = 65` clocks per division.

### Pipelining

Registers sit after every multiplier, adder and subtractor of the solver
stages, and between all the accumulation stages of `update_a`. The two
exceptions are:

- The enforcement step, a chain of three add/subtract operations.
- The two adder trees of `update_b`, which are 7-input sums.

## Interface and timing

`wiener_filter_top` (pixels in, filters out):

| signal | dir | meaning |
|---|---|---|
| `clear` | in | Empties the statistics. A window still in flight is dropped. |
| `win_valid`, `win_x[7][7]`, `win_y` | in | One window and its source pixel per clock. |
| `start`, `b_in[7]` | in | Runs one iteration on the statistics gathered so far. The core starts once the last window has been added. |
| `busy` | out | High from `start` until `done`. Windows and `clear` are ignored meanwhile, so `H` and `M` stay frozen while they are read. |
| `done` | out | One-cycle pulse. `a_out[7]`, `b_out[7]`, `a_singular` and `b_singular` then hold. `busy` is already low in this cycle. |

The top's latency is 809 clocks from `start`, or 810 if a window is still
in flight at `start`.

`wiener_filter_core` (statistics in, filters out):

| signal | dir | meaning |
|---|---|---|
| `start` | in | Starts an iteration while idle. `b_in[7]` and `m_in[7][7]` are sampled on this edge. |
| `h_req`, `h_i`, `h_j` | out | Block `H_{h_i,h_j}` is wanted. |
| `h_valid`, `h_blk[7][7]` | in | The block is taken on every clock with `h_valid` high. Then `(i, j)` advances, with `j` fastest. |
| `done` | out | One-cycle pulse with the results. |

The core requests all 49 blocks twice, once for each update. The source must
drive `h_blk` for the index it sees in the same cycle. A zero pivot anywhere
in an update raises that update's `*_singular` flag, and the update then
returns its fixed input unchanged: `a = b_in`, or `b = a`.

Latencies, counted in clocks from the `start` edge to the `done` pulse with
`h_valid` held high:

| block | clocks |
|---|---|
| `restoring_divider` | W+1 = 65 |
| `forward_elimination` | W+3 = 67 |
| `back_substitution` | 3(W+1)+11 = 206 |
| `gauss_solver` | 5(W+1)+22 = 347 |
| `update_a`, `update_b` | 403 (49 blocks, 6 to drain the pipeline, solver, output register) |
| `wiener_filter_core` | 808 |
| `wiener_filter_top` | 809 (810 with a window in flight) |

Each clock with `h_valid` low adds one clock.

## How far it follows the source design, and where it does not

These parts follow the source description:

- the block partition
- the three-comparator stage-0 pivoting and the one-comparator stage-1 pivoting
- the multiply / divide / left-shift / subtract elimination
- the back-substitution datapath with its shifters
- the restoring divider's registers
- the 64-bit word

The following are this implementation's own choices, because the source
leaves them open:

- **Shift amounts.** 16 in back-substitution, 8 in elimination, 1 and 2 in
  enforcement.
- **`>> 16` rescaling in the accumulation.**
- **Stage-0 order and ties.** The order of the two non-pivot rows after
  stage 0, and how ties are broken.
- **Enforcement matrix terms.** Derived from the centre-tap substitution.
- **Index roles in `H_ij` and `M`.** Which indices pair with which filter.
- **Storing form of `update_b`.**
- **Signed division.** Magnitudes plus a sign step.
- **Interfaces.** The H request/valid port and all the other handshakes.
- **Reset.** Asynchronous, active low.
- **Statistics block.** Only the definitions of `H` and `M` exist for it.
  The sum-over-region form, the pixel width, the missing mean removal and
  the fully parallel structure are all choices made here.
- **Singular fallback.**

Known differences:

- **Latency.** The reported figures are a latency of 1.59 µs and about
  88 Msamples/s at roughly 100 MHz. This schedule needs 808 clocks
  (8.1 µs at 100 MHz) for one iteration. Most of that is five sequential
  65-clock divisions. The schedule behind the reported figure is not
  described in enough detail to reproduce.
- **Divider latency.** The reported divider latency, 1.59 µs at 153.6 MHz,
  is also longer than this divider's 65 clocks.
- **Not included.**
  - The dual-port RAM buffers that would feed the blocks.
  - Only one iteration per `start`. Further iterations are made by feeding
    `b_out` back as `b_in`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares against
`wf_ref_pkg`, a sequential reference written independently of the RTL
structure:

- pivoting as a bubble pass
- elimination and back-substitution as loops
- native truncating division

The package also generates `H` and `M` from a synthetic frame: a random
source image with a separable `[1 2 1]/4` blur and small noise applied.

| testbench | what it covers |
|---|---|
| `tb_restoring_divider` | Random and corner operands, both signs, divide by zero, latency. |
| `tb_enforcement`, `tb_symmetrization` | Random vectors; the taps sum to `S`. |
| `tb_partial_pivoting` | Small values, so ties happen. All four stage-0 orders and the stage-1 swap must occur. |
| `tb_forward_elimination`, `tb_back_substitution` | Random systems, zero pivots, latency. |
| `tb_update_a`, `tb_update_b` | Frame statistics, `h_valid` stalls, a singular all-zero case, latency 403. |
| `tb_pre_processing` | Random windows. It reads back every H block and M, checks `pending` timing, and checks that `clear` drops a window in flight. |
| `tb_wiener_filter_core` | Full size, on frame statistics and random statistics. It must see at least one of each: a stall, a stage-0 reorder, a stage-1 swap, a singular `a`, a singular `b`. It checks latency 808. |
| `tb_wiener_filter_top` | Pixels to filters at full size. It must see at least one of each: windows ignored while busy, a start waiting for the last window, sums over two regions without `clear`, an empty (singular) region. |

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

To simulate, for example the full design:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/wf_pkg.sv tb/wf_ref_pkg.sv tb/tb_wiener_filter_top.sv \
        --top-module tb_wiener_filter_top -o sim && obj_dir/sim

The full-size end-to-end run takes a few seconds. Every module in `rtl/`
passes `verilator --lint-only -Wall`. The remaining warnings are for unused
divider outputs (remainder, busy).
