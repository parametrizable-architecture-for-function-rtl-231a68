# Table-driven recursive function evaluation (CBRM) — rotation unit

Many functions can be produced point by point from a two-term recurrence

    Psi(i+1) = alpha * Psi(i) + beta * G(i)

where alpha and beta stay fixed for a whole run and G is an auxiliary function:
a constant, another function evaluated the same way, or Psi itself. This
convolution-based recursive method (CBRM) needs two multiplications and an
addition per point. The hardware here does without multipliers. alpha and beta
are fixed, so every product they can take part in is stored in a table, the
**Convolution-LUT**. One point then costs some table reads, a carry-save
reduction and one adder.

The design in this repository evaluates a pair of such functions that feed
each other:

    x(i+1) = cos(dtheta) * x(i) - sin(dtheta) * y(i)
    y(i+1) = cos(dtheta) * y(i) + sin(dtheta) * x(i)

This rotates a point by `dtheta` at every step, giving `R cos(theta_i)` and
`R sin(theta_i)` for evenly spaced angles. That is the rotation example the
method was presented with: n = 32-bit operands, k = 8-bit blocks, t = 4
blocks. Both functions share one 1 MiB table, and the default build gives one
new (x, y) point every clock.

## How one evaluation works

### Operands are cut into digit blocks

A table indexed by two whole 32-bit operands would be far too large. Each
operand's N-bit magnitude is therefore split into `T = N/K` blocks of K bits,
and linearity is used:

    alpha*Psi + beta*G = sum over j of 2^(j*K) * (alpha*Psi_j + beta*G_j)

One table serves every block, because the bracket depends only on the two
K-bit digits `Psi_j`, `G_j` and on the operand signs.

### Table address and contents

Operands are in **sign-magnitude** form: a sign bit plus an N-bit magnitude.
The table address is 2K+2 bits:

    addr = { sign_own, sign_other, own_block[K-1:0], other_block[K-1:0] }

The word at `addr` is N bits, in two's complement, with `F = N-K-2` fraction
bits:

    word = round( ((sign_own ? -1 : 1)*alpha*own_block
                 + (sign_other ? -1 : 1)*beta*other_block) * 2^F )

There are K+1 integer bits plus a sign. That is enough for any alpha and beta
with |alpha| + |beta| <= 2. For K = 1 the table has 16 words, which take the
values 0, ±beta, ±alpha and ±alpha±beta.

The table size is `2^(2K+2)` words of N bits:

| N  | K=1  | K=2   | K=4   | K=8     |
|----|------|-------|-------|---------|
| 16 | 32 B | 128 B | 2 KiB | 512 KiB |
| 32 | 64 B | 256 B | 4 KiB | 1 MiB   |

The table is a writable memory (`conv_lut`). The same chip can be loaded for
another alpha and beta, which means another function or another step size.
The formula above is all that is needed to fill it.

### Adding the partial results

The T words that come back are sign-extended, and word j is shifted left by
`j*K`. They are then summed. The accumulator is `N + (T-1)*K + 2` bits wide,
which is enough for any table contents. The result is a two's-complement number
with F fraction bits. It is recoded to sign-magnitude (`sm_recode`). A
"complement" unit negates the sum, and a mux keeps the sum or its negation
according to the sign. The magnitude is then rounded half away from zero to an
integer and cut to N bits. A zero result always gets a positive sign. `ovf`
flags a magnitude that does not fit in N bits (the wrapped value is kept).

The recoded result is again a sign-magnitude operand, so it can be fed straight
back as the next `Psi` or `G`.

### Two ways to add: reduction and serial

The `SCHEME` parameter of the top (`cbrm_pkg::scheme_e`) selects one of two
addition schemes.

* **`SCHEME_REDUCTION`** (default): all T table reads happen at once through T
  read ports per function. A tree of 4:2 counters (3:2 counters for an odd
  group of three; `reduction_tree`) reduces the T rows to two, and one
  carry-propagate adder (`cpa_adder`) finishes. For T = 4 the tree is a single
  4:2 level. The path table → counters → adder → recode is one clock period,
  so the unit gives **one point per clock**.
* **`SCHEME_SERIAL`**: one table read per function per clock
  (`cbrm_serial_datapath`). A single adder in a loop accumulates from the most
  significant block down, `acc <= (acc << K) + word`. The unit gives **one
  point every T clocks** and needs only 2 table read ports in all. With K = 1
  this is the fully bit-serial form, and the table has only 16 words.

## The rotation unit (`cbrm_rotation_unit`)

    start/psi0/g0 ──► input mux ──► Psi, G ─┬─► block split ─► Convolution-LUT (shared)
                         ▲                  │                  │            │
                         │                  │       Psi words  ▼            ▼  G words
                         │                  │        counters + adder   counters + adder
                         │                  │        + recode           + recode
                         └──── Psi/G registers ◄──────────┴─────────────────┘

* The Psi path reads `{sPsi, sG, Psi_j, G_j}` and computes `alpha*Psi + beta'*G`.
* The G path reads `{sG, sPsi, G_j, Psi_j}` and computes `alpha*G + beta*Psi`.
* When `rot_mode = 1`, the Psi path inverts the sign of G in its addresses. This
  turns the table's `+beta` into the `-beta` that the x coordinate needs. One
  table loaded with `alpha = cos`, `beta = sin` then serves both coordinates.
  With `rot_mode = 0` both paths use `+beta`, which is the symmetric recursion
  `Psi' = aPsi + bG`, `G' = aG + bPsi`.
* With `g_const = 1` the G register keeps `g0` for the whole run, so the unit
  evaluates a single function whose auxiliary term is a constant. With
  `alpha = 1`, Psi grows by `beta*g0` per point (a linear function). With
  `beta = 0`, Psi is multiplied by `alpha` per point (a geometric sequence).
* The input muxes choose `psi0`/`g0` in the clock where `start` is accepted,
  and the fed-back results after that.

### Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of control and registers (not of the table) |
| `lut_we`, `lut_waddr`, `lut_wdata` | in | 1, 2K+2, N | table load port, one word per clock; must not be used while `busy` (assertion) |
| `start` | in | 1 | one-clock request, ignored while `busy` |
| `num_iter` | in | IW (16) | number of points to produce; 0 does nothing |
| `rot_mode` | in | 1 | 1: rotation (`-beta` on the x path); 0: symmetric recursion |
| `g_const` | in | 1 | 1: hold G at `g0` for the whole run (constant auxiliary term); 0: evaluate G |
| `psi0_sign/_mag`, `g0_sign/_mag` | in | 1, N | initial point, sign-magnitude |
| `busy` | out | 1 | a run is in progress |
| `out_valid` | out | 1 | `psi_*`/`g_*` hold a new point for this clock |
| `done` | out | 1 | with `out_valid`: the last point of the run |
| `ovf` | out | 1 | with `out_valid`: a magnitude of this point overflowed N bits |
| `psi_sign/_mag`, `g_sign/_mag` | out | 1, N | current point |

### Timing

* Reduction scheme: `start` is sampled at edge 0. Point 1 is visible after that
  same edge, and point i after edge i-1. `out_valid` is high for exactly
  `num_iter` consecutive clocks, and `busy` falls with the last point.
* Serial scheme: point i is visible after edge `i*T`. `out_valid` pulses once
  every T clocks.
* The table reads are asynchronous (combinational). In the reduction scheme the
  clock period must cover table read + one counter level + a `N+(T-1)K+2`-bit
  adder + the recode negation and rounding increment.

### Using it

1. Pick a step `dtheta`. For every address `a` in `0 .. 2^(2K+2)-1`, write the
   word given by the formula above, with `alpha = cos(dtheta)` and
   `beta = sin(dtheta)`.
2. Pulse `start` with `rot_mode = 1`, the start point
   (for example `psi0 = R`, `g0 = 0`) and `num_iter`. Keep `R` below `2^(N-1)`
   so that neither coordinate overflows.
3. Collect a point on every `out_valid`.

## Accuracy

These results come from simulation at the default size (N = 32, K = 8), starting
from (2^30, 0). The absolute error is that of the last point, scaled to R = 1,
taken as the larger of the x and y errors:

| dtheta | after 12 points | after 36 points |
|--------|-----------------|-----------------|
| pi/4   | 1.5e-8 | 4.7e-8 |
| pi/72  | 2.8e-9 | 5.6e-9 |
| pi/360 | 5.6e-9 | 7.0e-9 |

The serial scheme gives bit-identical results. The error grows with the number
of points, as expected of any recurrence. Each step adds at most about
`0.5 * 2^((T-1)K - F) + 0.5` LSB from rounding the table words and the result.
With N = 64 and K = 8 (a 2 MiB table) the worst error over 36 steps of pi/72 is
about 1e-15. For 36 steps of pi/72 the worst error is about 2e-8 at N = 32, whatever
K is, and between 2e-4 and 1.1e-3 at N = 16.

## Departures from the original description, and choices made here

* **Registers and control.** The published datapath shows no storage. Here the
  results are registered, and a small controller adds `start`, `num_iter`,
  `out_valid`, `done` and `busy`.
* **The sign of beta.** The original text writes the coupled recursion as
  `Psi' = aPsi + bG`, `G' = aG + bPsi`, while the rotation needs `x' = ax - by`.
  `rot_mode` provides both forms from one table.
* **Table word width.** The block diagrams label the table outputs with the
  block width k. The stated memory sizes (`2^(2k+2)` words of n bits) imply
  n-bit words, and k bits could not hold `alpha*a + beta*b`, so the words here
  are N bits.
* **Number format.** The following were not specified and are choices made here:
  the fraction length `F = N-K-2`, round-half-away-from-zero, the positive
  zero, the overflow flag and the address bit order.
* **4:2 counter construction.** Each 4:2 counter is two chained 3:2 counters.
  Larger T uses a greedy tree of 4:2 counters, plus one 3:2 counter where three
  rows are left over.
* **Memory.** The table is modelled as one array with 2T asynchronous read ports
  (8 ports at the default size). In silicon this would be a multiport memory
  or several copies of one table. Its single write port is a choice made here.
* **Not included.** The bit-serial CORDIC that the method was compared against
  is not part of this design. The gate-count and nanosecond estimates of the
  original work depend on its technology and are not reproduced here; this
  RTL only fixes the structure (which LUT, counter and adder lie on the
  clock path).

## Files

| file | contents |
|------|----------|
| `rtl/cbrm_pkg.sv` | defaults (N=32, K=8), `scheme_e`, sizing functions |
| `rtl/cbrm_rotation_unit.sv` | top: shared table, two evaluation paths, muxes, control |
| `rtl/conv_lut.sv` | Convolution-LUT, multi-read-port writable table |
| `rtl/cbrm_datapath.sv` | reduction-scheme evaluation path (one clock) |
| `rtl/cbrm_serial_datapath.sv` | serial-scheme evaluation path (T clocks) |
| `rtl/reduction_tree.sv`, `rtl/csa42.sv`, `rtl/csa32.sv` | 4:2 / 3:2 counter tree |
| `rtl/cpa_adder.sv` | final adder |
| `rtl/sm_recode.sv` | complement / mux / rounding back to sign-magnitude |
| `tb/tb_cbrm_pkg.sv` | reference model: table-word formula and bit-exact evaluation |
| `tb/tb_*_harness.sv` | parametrized drivers that the testbenches instantiate at several sizes or schemes |
| `tb/tb_*.sv` | self-checking testbenches (see below) |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog.

* `tb_conv_lut`, `tb_reduction_tree`, `tb_cpa_adder`, `tb_sm_recode`: unit
  tests against independently computed values.
* `tb_cbrm_datapath`, `tb_cbrm_serial_datapath`: each evaluation path at three
  sizes (K = 1, 2/3, 4), compared bit for bit with the reference model. The
  serial test also checks latency and back-to-back launches.
* `tb_cbrm_rotation_unit`: both schemes side by side at N=16, K=4. It covers
  rotations (checked bit-exact and against cos/sin), the symmetric recursion,
  overflow, an ignored `start`, single-point and empty requests, a constant G
  (`g_const`: linear and geometric runs), and the exact clock of every point. It counts each mechanism and fails if one never
  happened.
* `tb_cbrm_full`: the default build (N=32, K=8, 1 MiB table, no parameter
  overrides) running the three rotation steps above for 36 points each.
* `tb_cbrm_serial_full`: the same runs with the serial scheme.
* `tb_cbrm_n64`: N=64, K=8.
* `tb_cbrm_sizes`: the whole unit at N = 16 and 32 with K = 1, 2, 4 and 8
  (tables from 16 to 2^18 words), plus the serial scheme at N = 16, K = 1.
  Each runs 36 rotation steps of pi/72, checked bit for bit.

Run a testbench with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cbrm_pkg.sv tb/tb_cbrm_pkg.sv tb/tb_cbrm_full.sv \
        --top-module tb_cbrm_full -o sim
    ./obj_dir/sim

The other modules are found through `-Irtl -Itb`. The full-size runs take about
a second each: most of that time goes into loading the 2^18-word table.
