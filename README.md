# Wilson-Dirac operator accelerator for a lattice-QCD conjugate-gradient solver

Solving the lattice Dirac equation `D psi = eta` with conjugate gradients
spends nearly all its time multiplying a spinor field by the Wilson-Dirac
operator. This RTL is the hardware half of such a solver: a double-precision
pipeline that evaluates the operator's stencil at one lattice site per clock
cycle, fed from on-chip memories organised so that every operand of a site
can be read in a single cycle. A host processor runs the conjugate-gradient
loop (scalar products, vector updates, stopping test) and calls the
accelerator for `D`, `D-dagger` or `D-dagger D`.

At its default size the design holds an 8^4 lattice (4096 sites). Each
site costs 1464 double-precision floating-point operations, all in flight at
once, with a latency of 142 cycles.

## The operator

For site `n`, with gauge links `U_mu(n)` (3x3 complex matrices) and a spinor
field `psi` (4 spin x 3 colour complex numbers per site):

    (D psi)(n) = (m_q + 4) psi(n)
               + 1/2 * sum_{mu=0..3} [ U_mu(n)          (1 - gamma_mu) psi(n + mu)
                                     + U_mu(n - mu)^dag (1 + gamma_mu) psi(n - mu) ]

`D-dagger` is the same expression with the signs of the two projectors
swapped (gamma5-hermiticity). The sign in front of the sum is `+`, as given.
The gamma matrices are in the DeGrand-Rossi basis. In that basis each row of
`1 +- gamma_mu` has exactly one off-diagonal entry, `+-1` or `+-i`. The
lattice is periodic in all four directions. Sites are numbered
`n = x + LX*(y + LY*(z + LZ*t))`.

The hardware leans on one property. After projection, the lower two spin
components are the upper two times a phase (`+-1` or `+-i`). So only the
upper half (two colour vectors) is multiplied by `U`, and the lower half is
rebuilt afterwards. Multiplying by a phase is only a sign flip and a
real/imaginary swap, so it costs no arithmetic. The tables for this are in
`lqcd_pkg` (`proj_partner`, `proj_phase`, `recon_src`, `recon_phase`).

## The stencil pipeline

Every adder and multiplier is an IEEE-754 double unit with a latency of 14
cycles (`LAT`). The stencil is split into four stages, and each stage is a
fixed number of these layers:

| stage | module | work | double ops | cycles |
|---|---|---|---|---|
| 1 | `gauge_mem`, `spinor_mem` | read 8 links, 8 neighbour spinors and the centre spinor | 0 | 1 |
| 2 | `spin_project` | 16 colour-vector additions: the projected half spinors | 96 | 14 |
| 3 | 16 x `su3_matvec` | 8 `U h` and 8 `U-dagger h`, 5 layers | 1152 | 70 |
| 4 | `spin_accumulate` | rebuild lower halves, sum tree, mass term, halve | 216 | 57 |
| | | total | 1464 | 142 |

The layering inside stages 3 and 4 was chosen to hit exactly these counts
and depths:

* **su3_matvec** (72 operations, 5 layers):
  1. 36 real products.
  2. 18 add/subs that form the 9 complex products. For `U-dagger` the
     conjugate is formed with the signs swapped.
  3. to 5. Each row adds its three complex products in turn into an
     accumulator that starts at zero.

  The add-to-zero step is kept so that the operation count and depth come
  out as specified.
* **spin_accumulate** (216 operations, 4 layers plus 1 cycle):
  1. Pairwise sums of the 8 terms, and `coef * psi(n)` alongside.
  2. Pairwise sums again.
  3. The total of the hopping terms.
  4. The total plus the mass term.

  A final register cycle halves every double by decrementing its exponent.
  `coef` is `2*(m_q+4)`, so this gives `(m_q+4) psi + 1/2 sum` without a
  further multiply.

The operation order is fixed, so results are reproducible bit for bit. The
testbenches check them against an IEEE double model that uses the same order.
Links, the centre spinor, the dagger bit, the site index and the valid bit
travel through `pipe_delay` chains beside the arithmetic.

The floating-point units (`fp64_add`, `fp64_mul`) round to nearest even. They
treat subnormal inputs as zero and flush subnormal results to zero. Overflow
gives infinity, and every NaN comes out as the quiet NaN `0x7FF8000000000000`.
Each unit computes its result in its first register stage, followed by 13
plain registers. The intent is that synthesis retiming spreads the logic over
those registers, but that has not been tried on a device.

## Memory organisation

A memory block gives one word per port per cycle. A stencil needs 8 links and
9 spinors in one cycle, so the data is duplicated:

* **gauge_mem** has eight banks, one word (18 doubles) per site. Bank `mu`
  holds `U_mu(m)` at address `m`. Bank `4+mu` holds the same link again, at
  address `m + mu`. All eight links of site `n` then sit at address `n`.
  Loading link `U_mu(m)` writes both copies in the same cycle. The top
  computes `m + mu` with a second `lattice_nbr`.
* **spinor_mem** holds nine identical copies of the field, one word (24
  doubles) per site. Every write goes to all copies. Copy `k` is read at the
  address of neighbour `k`; copy 8 is read at the centre site.
* A second `spinor_mem` receives the first-pass result of `D-dagger D`.
  Each site of the second pass needs its neighbours' first-pass results, so
  the second pass can start only after the first has fully drained.

All reads are synchronous, and that read register is stage 1. Memory
contents are not reset.

## Control and timing (`dslash_ctrl`, `dslash_accel`)

1. Load the fields with `ld_psi_*` (one spinor per cycle) and `ld_u_*` (one
   link per cycle; both ports may be used in the same cycle). Loading while
   `busy` is high is not allowed, and an assertion checks it.
2. Set `coef` and `op` (`OP_D`, `OP_DDAG`, `OP_DDAGD`), and pulse `start`.
   `start` is ignored while busy.
3. Each pass issues sites `0..V-1` on consecutive cycles, starting the cycle
   after it begins. The result of each site appears on `res_valid` /
   `res_site` / `res_data` 142 cycles after issue, in site order, one per
   cycle. The result port has no back-pressure: the receiver must take one
   spinor per cycle.
4. A pass lasts `V + 142` cycles. `done` pulses one cycle after the last
   result. `OP_DDAGD` runs two passes back to back, and only the second pass
   is streamed out.

With `V = 4096` a pass takes 4238 cycles. At 1464 operations per site and a
500 MHz clock (a clock rate no simulation here confirms), that is
`4096*1464*5e8/4238 = 707` GFLOP/s.

## Files

| file | content |
|---|---|
| `rtl/lqcd_pkg.sv` | types (`complex_t`, `su3_vector_t`, `su3_matrix_t`, `su3_spinor_t`, `half_spinor_t`, `op_e`), phase helpers, gamma tables |
| `rtl/fp64_add.sv`, `rtl/fp64_mul.sv` | pipelined double adder and multiplier |
| `rtl/pipe_delay.sv` | register chain for side data |
| `rtl/spin_project.sv`, `rtl/su3_matvec.sv`, `rtl/spin_accumulate.sv` | stages 2, 3, 4 |
| `rtl/dslash_kernel.sv` | stages 2-4 wired together, tags and delay lines |
| `rtl/lattice_nbr.sv` | periodic neighbour addresses |
| `rtl/gauge_mem.sv`, `rtl/spinor_mem.sv` | field stores |
| `rtl/dslash_ctrl.sv` | site sweep and pass sequencing |
| `rtl/dslash_accel.sv` | top level |
| `tb/dirac_ref_pkg.sv` | reference stencil in `real` arithmetic, built from explicit gamma matrices; random fields |
| `tb/tb_*.sv` | one self-checking testbench per module |

Packed layout: double `c` of a spinor is bits `[64c +: 64]`, with
`c = 6*spin + 2*colour + (1 for the imaginary part)`. A matrix is
`[row][col]` with the same complex layout.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example, for the
top level at full size:

    verilator --binary --timing --assert -j 8 --top-module tb_dslash_accel \
        -y rtl -y tb +libext+.sv rtl/lqcd_pkg.sv tb/dirac_ref_pkg.sv tb/tb_dslash_accel.sv
    ./obj_dir/Vtb_dslash_accel

This builds in about a minute and runs in about 6 seconds. The run:

* loads a random 8^4 gauge and spinor field;
* applies `D`, `D-dagger` and `D-dagger D`, and checks all 12,288 result
  spinors bit for bit;
* checks the 142-cycle latency, the one-result-per-cycle rate and the
  `V + 142` pass time;
* counts the boundary wrap-arounds, the two-pass run and the ignored start.

Two more testbenches use the accelerator as a whole:

* `tb_dslash_accel_sizes` builds the design for a 6^3x8 and an 8^3x12
  lattice side by side and checks `D-dagger D` on both. It builds in about
  3 minutes and runs in 15 seconds.
* `tb_cg_solve` acts as the host of a conjugate-gradient solve of
  `D-dagger D x = b` on a 4^4 lattice. It converges in about 14 iterations,
  and the solution is then checked with the reference operator.

`tb_dslash_kernel` checks the stencil alone, with random gaps in its input
stream. The stage testbenches check each stage against the explicit-gamma
reference. The floating-point testbenches compare 4000 operations each with
the simulator's IEEE arithmetic: cancellations, near-cancellations, zeros,
infinities and NaN.

To change the lattice, set `LX`, `LY`, `LZ`, `LT` on `dslash_accel`. Memory
depth and address width follow from them. `LAT` changes the latency of every
floating-point unit, and every delay line follows it.

## How far it follows the source design, and where it departs

Taken from the source design:

* Double precision throughout, with 14-cycle adders and multipliers.
* The four stages with their cycle counts and operation counts (1, 14, 70,
  57 cycles; 0, 96, 1152, 216 operations; 142 cycles and 1464 operations in
  all).
* One site per cycle.
* Eight separately stored, duplicated link banks.
* The half-spinor trick.
* `D-dagger D` computed entirely in the accelerator.
* The lattice sizes: 8^4 is the default, and 8^3x12 and 6^3x8 are reachable
  through the parameters.

Choices made here, where the source says nothing:

* The gamma basis, and where the factor 1/2 is applied.
* The internal layering of stages 3 and 4, beyond their counts and depths.
* Nine replicated copies of the spinor field, with a second store for
  `D-dagger D`.
* The load, result and start/done interfaces, and the fact that the result
  port has no back-pressure.
* Periodic boundaries and the site numbering.
* Flush-to-zero and NaN handling.
* Single-stage arithmetic followed by retiming registers.

Not built:

* Versions with initiation intervals of 2, 4 or 120 that share arithmetic
  units.
* A second kernel instance working on half of the lattice.
* The processor side: the CG loop, DMA, DRAM and the vendor data movers.
  The load and result ports are where the data movers would connect.

Not verified:

* Timing closure and resource use on a device. The design has roughly 1464
  double-precision units and about 150 Mbit of field storage at 8^4.
* Behaviour with subnormal numbers.
