# RGMIU: a fully pipelined Gram-matrix inverter for massive-MIMO zero forcing

A massive-MIMO base station with M antennas serving K users recovers the users'
symbols by zero forcing: ŝ = G⁻¹ · Hᴴy, where G = HᴴH is the K × K Gram matrix
of the channel H. Inverting G is the expensive part. This core does it exactly,
with the **recursive Gram matrix inversion update** (RGMIU). The recursion starts
from the 1 × 1 inverse 1/G₁₁ and, at each iteration, grows the inverse of the
leading m × m block of G into the inverse of the leading (m+1) × (m+1) block.
After K − 1 iterations it holds G⁻¹.

Each iteration gets its own hardware, and every loop inside it is unrolled. The
whole inversion is therefore one pipeline. It accepts a new K × K matrix **every
clock cycle** and returns its inverse a fixed number of cycles later. At the
default K = 8 that is 192 cycles. Throughput is set only by the clock: one
inverse per cycle, or K · log₂(constellation size) detected bits per cycle.
With 8 users and 64-QAM that is 48 bits per cycle.

Gram-matrix formation (HᴴH, Hᴴy) and the final product G⁻¹ · Hᴴy are *not* part
of this core. G comes in on a port, and G⁻¹ goes out on a port.

## The recursion

The inverse B_m of the leading m × m block is known. The next column of G is
split into the part above the diagonal, y1 = G(1:m, m+1), and the diagonal
entry z = G(m+1, m+1). Then:

| step | operation | hardware (`rtl/`) |
|---|---|---|
| 1, 2 | pick z and y1 out of G | wiring in `rgmiu_iter` |
| 3 | y2 = B_m · y1 | `rgmiu_step3` |
| 4 | c = 1 / (z − y1ᴴ y2) | `rgmiu_step4` + `recip` |
| 5 | y3 = c · y2 | `rgmiu_step5` |
| 6 | Γ = B_m + c · y2 y2ᴴ  (formed as B_m + y3 y2ᴴ) | `rgmiu_step6` |
| 7 | B_{m+1} = [ Γ  −y3 ; −y3ᴴ  c ] | `rgmiu_step7` |

This is the block-matrix inversion formula. Here z − y1ᴴ y2 is the Schur
complement of the known block. It is real and positive when G is positive
definite, so each iteration needs only one *real* division. The number of
iterations is always K − 1, whatever the channel. Unlike iterative solvers such
as Gauss-Seidel or Neumann series, the result is the exact inverse, up to the
word length.

The same iteration also serves another purpose. When a user joins a group
whose inverse is already known, a single `rgmiu_iter` stage produces the new
inverse. The testbench of `rgmiu_iter` exercises exactly this case.

## Pipeline structure

```
 G ──► rgmiu_init ──► rgmiu_iter N=1 ──► rgmiu_iter N=2 ──► … ──► rgmiu_iter N=K-1 ──► G⁻¹
       B1 = 1/G11     B1 → B2            B2 → B3                 B(K-1) → B(K)
       17 cycles      25 cycles          25 cycles               25 cycles
```

Every stage passes the whole of G along, delayed by its own latency, so that
later stages find their column of G aligned with their incoming B. Only the
upper triangle and the diagonal of G are ever read.

Inside one `rgmiu_iter` stage (input B of size N), the steps run in series:

```
 cycle   0        2                 21      22        24      25
         │ step 3 │ step 4          │ st. 5 │ step 6  │ st. 7 │
  B ─────┼────────┼─────────────────┼───────┼─►Γ      │       │
  y1,z ──┼─►y2 ───┼─►(z − y1ᴴy2)─►1/x─►c ───┼─►y3 ────┼─►B_{N+1}
```

- **Step 3** (2 cycles): N² complex products are registered, then the row sums
  are registered.
- **Step 4** (2 + 17 cycles): the real part of y1ᴴ y2 is computed, subtracted
  from z and rounded. It then goes through the reciprocal pipeline. Only the
  real part is computed because B is Hermitian, so y1ᴴ y2 = y1ᴴ B y1 is real.
- **Step 5** (1 cycle): c times each entry of y2.
- **Step 6** (2 cycles): the N² products y3(i) · conj(y2(j)) are registered,
  then added to B(i,j).
- **Step 7** (1 cycle): the grown matrix is assembled; this needs only
  negation and conjugation.

`pipe_delay` shift registers carry y1, z, y2, y3, c and B to the step that needs
them. The latencies are constants in `rgmiu_pkg`:

- `DIV_LAT = W + 1 = 17`
- `ITER_LAT = DIV_LAT + 8 = 25`
- total latency `17 + 25·(K − 1)`: 42, 92, 142, 192 and 292 cycles for
  K = 2, 4, 6, 8 and 12.

**Multiplier count.** Each stage uses real multipliers as follows:

- steps 3 and 6 use 4N² each (N² complex multipliers of four real
  multipliers and two adders, `cmult`);
- steps 4 and 5 use 2N each.

That is 8N² + 4N per stage, and 1232 for the whole K = 8 core. The count grows
as K³, which is what limits the fully unrolled approach to about 8–12 users on
a large FPGA.

## Number format and accuracy

- **Words.** Every value between steps is a 16-bit two's-complement word with
  14 fractional bits, covering [−2, 2). A complex value (`cplx_t`) is a pair of
  such words.
- **Input scaling.** G must be scaled so that its diagonal is around 1. With
  G = HᴴH / M and unit-variance channel entries this holds naturally. The
  entries of the inverse then stay below 2 in magnitude for well-conditioned
  channels.
- **Rounding.** Products are kept at full precision (33 bits per real part)
  inside a step and summed there. Each step rounds its result once: to
  nearest, ties up, with saturation (`round_sat`).
- **Reciprocal.** `recip` computes round(2²⁸ / d) with a restoring divider that
  resolves one quotient bit per pipeline stage. It takes 15 bit stages plus an
  input and an output register, so it accepts a divisor every cycle. It
  saturates to the largest word when d ≤ 0.5. That covers d ≤ 0, which a
  non-positive-definite input would cause.

Measured against a double-precision inverse of the same quantised G, for
random 128-antenna i.i.d. channels, the largest error of any entry was:

| users | 2 | 4 | 6 | 8 | 12 |
|---|---|---|---|---|---|
| largest error (LSB = 2⁻¹⁴) | 1 | 1.6 | 2.1 | 2.8 | 4 |

At 12 users with 128 antennas the smallest eigenvalue of G can approach 0.5,
and then entries of G⁻¹ can reach the ±2 limit of the format. In that regime,
scale G down by a power of two and scale the result back.

## Interface (`rgmiu_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset, which clears only the valid flags |
| `g_empty_n` | in | the input FIFO presents a matrix on `g_i` (first-word fall-through) |
| `g_read` | out | pop the input FIFO this cycle |
| `g_i` | in | `cplx_t [K-1:0][K-1:0]`: G, all entries in parallel, indexed `[row][col]` |
| `b_full_n` | in | the output FIFO can take a matrix |
| `b_write` | out | push `b_o` this cycle |
| `b_o` | out | `cplx_t [K-1:0][K-1:0]`: G⁻¹, all entries in parallel |

The entire pipeline advances in every cycle in which `b_full_n` is high. It
freezes as a whole when `b_full_n` is low. When the input FIFO is empty, a
bubble (an invalid slot) enters the pipeline. Two assertions state the
handshake rules: never pop an empty FIFO, and never push a full one. The
imaginary part of the last diagonal entry of `b_o` is constant zero by
construction.

## Departures from the published HLS design

This RTL follows the published HLS implementation of RGMIU in its structure:

- one stage per iteration;
- steps 3–7 in series;
- every loop unrolled;
- initiation interval 1;
- 16-bit words;
- complex multipliers of four real multipliers and two adders;
- all entries of G and G⁻¹ in parallel through FIFOs.

It differs in the following:

- **Latency.** The HLS design used a 26-cycle divider and tool-chosen
  pipelining, with about 0.97 µs (≈ 366 cycles) for 8 users. Here the divider
  takes 17 cycles, each stage 25 cycles, and the whole core 192 cycles for 8
  users. Only the one-matrix-per-cycle throughput is the same.
- **Fractional bits.** Most of the HLS design's variables had 15 fractional
  bits, with formats mixed where needed. Here a single format with 14
  fractional bits is used throughout, because diagonal values around 1.0 need
  an integer bit.
- **Strategies.** The HLS study compared three synthesis strategies: a
  baseline, a deeper-pipelined version for a faster clock, and a
  multiplier-limited version. All three are the same architecture under
  different tool settings. This RTL is the baseline. Deeper pipelining, or
  mapping multipliers to LUTs, is left to the synthesis tool or to added
  registers.
- **Updates.** Updating an existing inverse (one user added, or one user's
  channel replaced) is not a mode of `rgmiu_top`. Adding a user is one
  `rgmiu_iter` stage used on its own. Removing a user is not built.
- **Boundaries.** There is no reset of the data registers, no input
  validation, and no pre- or post-processing.

## Files

| file | content |
|---|---|
| `rtl/rgmiu_pkg.sv` | word format, types, latencies, rounding helpers |
| `rtl/rgmiu_top.sv` | the core: init stage + K−1 iteration stages, FIFO handshake |
| `rtl/rgmiu_init.sv` | B1 = 1/G11 |
| `rtl/rgmiu_iter.sv` | one iteration, steps 1–7, with alignment delays |
| `rtl/rgmiu_step3.sv` … `rgmiu_step7.sv` | the arithmetic of each step |
| `rtl/cmult.sv` | complex multiplier, full-precision output, optional conjugate |
| `rtl/recip.sv` | pipelined reciprocal |
| `rtl/pipe_delay.sv` | typed shift register with enable |
| `tb/tb_*.sv` | self-checking testbenches (one per module) |
| `tb/tb_cplx_pkg.sv` | double-precision helpers: random channels, Gram matrices, Gauss-Jordan inverse, bit-exact models of the rounding and the reciprocal |
| `tb/tb_rgmiu_run.sv`, `tb/tb_rgmiu_workloads.sv` | the core at 4 and 12 users |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

- **Arithmetic blocks.** The testbenches for `cmult`, `recip`, `rgmiu_step3` …
  `rgmiu_step7` and `rgmiu_init` compare bit-exactly against integer models.
  They feed random inputs, extreme words included, one per cycle with random
  stall cycles. A reference pipeline advances only when the enable is high, so
  these testbenches check latency and stall behaviour as well as values.
- **One iteration.** `tb_rgmiu_iter` (N = 3, K = 5) starts from the quantised
  exact 3 × 3 inverse and checks the 4 × 4 result against double precision,
  to 8 LSB.
- **Whole core.** `tb_rgmiu_top` runs the core at its default K = 8 in three
  phases:
  1. one matrix through an idle pipeline, with an exact latency check
     (192 cycles);
  2. a burst of 40 matrices that must leave on consecutive cycles;
  3. 160 matrices with random input bubbles and output stalls.

  Every entry must match the double-precision inverse to 16 LSB. Bubbles,
  stalls and back-to-back outputs are counted, and each must occur.
- **Other sizes.** `tb_rgmiu_workloads` does the same at 4 and 12 users.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rgmiu_pkg.sv tb/tb_cplx_pkg.sv tb/tb_rgmiu_top.sv --top-module tb_rgmiu_top
./obj_dir/Vtb_rgmiu_top
```

Simulation takes seconds. The C++ build of the full K = 8 core takes about a
minute and a half, and the 12-user build several minutes.

To change the number of users, set `K` on `rgmiu_top`. To change the word
format, edit `W` and `FRAC` in `rgmiu_pkg`. The reciprocal assumes
2·FRAC ≥ W − 1, and the testbench models assume W = 16 and FRAC = 14.
