# Parallel Jacobi eigenvalue array with μ-rotation CORDIC elements

This RTL computes the eigenvalues of a real symmetric N×N matrix with the
parallel Jacobi method. It runs on a square array of (N/2)×(N/2) processor
elements (PEs). Each PE holds a 2×2 block of the matrix. The main idea is to
make every PE as small as possible. A PE has no multiplier and no full CORDIC.
It rotates with *μ-rotations*: a few shift-and-add operations that rotate by an
angle whose tangent is close to a power of two. A coarse angle makes each
Jacobi step less exact, so more sweeps are needed. But the Jacobi method
converges with any angle close enough to the optimal one. The saved area goes
into parallelism: the default build is a 25×25 array that works on a 50×50
matrix.

The design follows the architecture published as "A VLSI design concept for
parallel iterative algorithms": the Brent–Luk array, the simplified μ-rotation
PE with two adders, two shifters and four multiplexers, the 32-bit μ-rotation
angle table with its method, cycle and repeat columns, and the 25×25 / 50×50
main configuration. Much of the detail is this implementation's own. The
section "What is taken from the source and what is not" lists it.

## The algorithm in hardware terms

* **Sub-problem.** For a symmetric 2×2 block `[a b; b d]` the rotation angle
  θ with `tan 2θ = τ = 2b/(d−a)` sets the off-diagonal to zero. `Q(θ) = [c −s; s c]`.
* **Step.** Diagonal PE(p,p) works out an angle for its own block. It sends it
  to every PE in PE row p, which use it as θ_r, and in PE column p, which use it
  as θ_c. Every PE then replaces its block B with `Q(θ_r)·B·Q(θ_c)ᵀ`. So one step
  solves N/2 sub-problems in parallel.
* **Interchange.** After each step the matrix elements move between
  neighbouring PEs, so that the diagonal PEs get new index pairs. The ordering
  is the round-robin ("chess tournament") ordering with index 0 fixed. The
  upper index of each PE moves one PE to the right, and the lower index moves
  one PE to the left. At the ends an index turns around: upper becomes lower
  in the last PE, and the lower index of PE 0 becomes the upper index of PE 1.
  An element moves at most one PE, diagonally or inside its own PE. The same
  permutation applies to rows and columns, so the matrix stays symmetric.
* **Sweep.** N−1 steps form a sweep: every index pair (i, j) is a diagonal
  sub-problem exactly once. After a set number of sweeps the diagonal holds
  the eigenvalues, in permuted order.

## μ-rotations: the angle set

This is the least obvious part of the design. The PE does not rotate by θ.
It picks one of 32 fixed rotations. Index k (1..32) has tangent about
t = 2⁻ᵏ. Each rotation is a short sequence of shift-add steps on a vector
(x, y), built by one of four methods. The method boundaries and the costs are
those of the published angle table for 32-bit accuracy:

| k | method | rotation (x part; y is the mirror) | cycles | repeat R |
|---|---|---|---|---|
| 1..4 | IV | x − 2^−(2k+2)·x − σ·2^−k·y, then divide by the norm 1+u, u = 2^−(2k+2), with factors (1−u)(1+u²)(1+u⁴)(1+u⁸) | 6, 5, 5, 4 | 1 |
| 5..7 | III | x − 2^−(2k+1)·x − σ·2^−k·y + σ·2^−(3k+3)·y | 3 | 2 |
| 8..15 | II | x − 2^−(2k+1)·x − σ·2^−k·y | 2 | 3,3,3,3,3,3,4,5 |
| 16..32 | I | x − σ·2^−k·y | 1 | 6 (k ≤ 27), then 5,4,3,2,1 |

The datapath has two adders, so a cycle does two shift-adds, one on x and one
on y. Each form is chosen to keep the vector length to better than 2⁻³²:

* I: error t²/2
* II: error t⁴/8
* III: error t⁶/128
* IV: made exact by the norm division

These error bounds are exactly why the method changes at k = 16, 8 and 5. The
resulting tan 2θ_k matches the published table's angle column to within
3·10⁻⁶ relative (for example k = 1: 1.49068, k = 5: 0.0625841).

**Repeat scheme ("6-CORDIC").** The slowest index (k = 1) takes 6 cycles, and
the step timing is set for it. In repeat mode a slot for index k therefore
also runs indices k+1, …, k+R−1, with R from the table. This fills the slot
(never more than 6 cycles) and turns by a larger, more useful angle. For
example, k = 8 runs 8, 9 and 10, and k = 14 runs 14, 15, 16 and 17. With
`repeat_en = 0` ("μ-CORDIC") a slot runs only index k.

**Angle search.** A diagonal PE forms p = a01 + a10 and d = a11 − a00. It
compares |τ| = |p/d| with a table of 32 thresholds, without dividing:
`|p|·2⁴⁸ ≥ |d|·THR[k]`. A binary search over k = 1..33 takes six cycles on one
multiplier, and it picks the smallest k that passes. k = 33, or p = 0, means
"no rotation". The sign is sign(p)·sign(d).

The thresholds (Q2.48, in `evd_pkg`) are `THR[k] = tan(2·√(φ_k·φ_{k+1}))`,
with φ_33 = φ_32/2. φ_k is the total angle one slot turns for index k: the
atan of the method's sine and cosine terms, summed over the repeated indices
in repeat mode. So the search chooses the slot angle nearest to θ on a log
scale. There are separate tables for the two modes. Picking by the
single-rotation angle and then repeating could turn by more than 2θ, and that
does not converge.

## Processor element

`evd_pe` holds the block `a[2][2]` and contains:

* one rotation controller (`mu_rotation_ctrl`);
* two datapaths (`mu_cordic_datapath`), each with its own aux register pair;
* in a diagonal PE, the angle search.

A step has two phases that use the same hardware:

* **left phase:** the columns (a00, a10) and (a01, a11) rotate by θ_r, one on each datapath;
* **right phase:** the rows (a00, a01) and (a10, a11) rotate by θ_c.

With Q = [c −s; s c] both phases are the same vector rotation
x' = c·x − s·y, y' = s·x + c·y.

Each datapath computes one inner iteration per cycle:

```
first muxes  (S0): x-side = S0 ? x_a : x        y-side = S0 ? y_a : y
second muxes (S1): straight, or crossed (x adder gets the y-side operand)
shifters         : >>> kx, >>> ky  (arithmetic, truncating)
adders           : x' = x ± ..., y' = y ± ...    (sub_x, sub_y)
aux outputs      : x'_a, y'_a = first-mux outputs
```

The aux registers keep the operands from before the rotation. In the first
cycle of a rotation, S0 = 0: the shifters read the live x and y, and the aux
registers capture them. In later cycles, S0 = 1: the II/III correction terms
are taken from the captured originals while x and y change. The norm-division
cycles of method IV use the live values with S0 = 0 and straight muxes.

## Timing

The controller (`evd_controller`) gives every step the same fixed schedule:

| slot | cycles |
|---|---|
| angle search | 7 |
| left rotation | 7 (one start cycle and up to 6 rotation cycles) |
| right rotation | 7 |
| interchange | 1 |

* One step is **22 cycles**, and one sweep is **22·(N−1) cycles**: 1078 for
  N = 50.
* After the last input word, the first output word comes
  22·(N−1)·sweeps + 4 cycles later.
* Loading takes N² cycles and readout takes N² cycles.

An assertion checks that no PE is still rotating when a rotation slot ends.

## Interface (`jacobi_evd_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `num_sweeps[7:0]`, `repeat_en` | in | begin a run with that many sweeps; the mode is sampled at `start` |
| `in_valid`, `in_ready`, `in_data[W-1:0]` | in/out/in | matrix, row-major, N² words |
| `out_valid`, `out_row`, `out_col`, `out_data` | out | result matrix, row-major, one word per cycle, no back-pressure |
| `busy`, `done` | out | run in progress; one-cycle pulse at the end |
| `mon_*` | out | sweep and step counters, interchange strobe, and each diagonal PE's command, μ-rotation start and method |

Parameters:

* `M` = 25 (PEs per side); N = 2M.
* `W` = 32 (word width).

Numbers are W-bit two's complement integers. The rotations keep the Frobenius
norm, so no element can grow beyond the norm of the input. Scale the input so
that the norm stays below 2^(W−1). The testbenches use |a| ≤ 2^30/N.

## What is taken from the source and what is not

From the source:

* the array organisation: 2×2 blocks, angles from the diagonal PEs along rows
  and columns, neighbour interchange, N−1 steps per sweep;
* the PE datapath's parts and control names: S0, S1, kx, ky, σx, σy, aux
  values x_a and y_a;
* the 32-entry μ-rotation set with its method, cycle and repeat columns;
* the use of stored tangent values instead of an arctangent;
* the 6-cycle critical path;
* the 32-bit word;
* the 25×25 array for a 50×50 matrix;
* stopping after a preset number of sweeps;
* the two modes compared there (one μ-rotation per step, or the repeated "6-CORDIC").

This implementation's own choices:

* the shift-add form of each method (they match every published cost and
  cycle count);
* the reading of "repeat three times from index k" as indices k..k+R−1;
* the search thresholds and the binary search on one multiplier;
* what the aux path carries;
* two datapaths per PE and the left/right phase split;
* the fixed slot lengths and the controller;
* the interchange permutation (the standard one for this array);
* broadcasting the angle on one net per row and column, where the source
  relays it PE to PE (a relay that only passes the value on is the same wire);
* the streaming input and output formats, the handshakes and the reset.

Not built:

* a stop on a measured off-diagonal norm, which the source names as the
  alternative to a fixed sweep count;
* the full-CORDIC baselines used only for comparison.

## How far it can be trusted

Measured in simulation:

* On random 50×50 matrices after 12 sweeps (6-CORDIC), the eigenvalues are
  within 2.3·10⁻⁶ of the matrix norm of double-precision Jacobi results.
* On 8×8 matrices the error is about 2·10⁻⁷.
* Sweeps until the off-diagonal norm falls below 10⁻⁵ of the matrix norm
  (6-CORDIC / μ-CORDIC):

  | array | 2×2 | 5×5 | 10×10 | 25×25 |
  |---|---|---|---|---|
  | sweeps | 8 / 9 | 9 / 9 | 9 / 10 | 10 / 10 |

Limits:

* The shifters truncate, which biases the result slightly towards −∞.
* A shift by 32 (index 32, and the last norm factor of index 1) adds the sign
  bit, not zero.
* The off-diagonal norm therefore levels off at a few 10⁻⁶ of the matrix norm
  at N = 50, and lower for small N. Running more sweeps does not go below that
  level.
* For a block with τ → ∞ (θ = 45°), the largest μ-rotation (about 28°) removes
  only part of the off-diagonal in one step. Later sweeps finish the job.
* Area and clock rate on any device have not been measured.

## Files

`rtl/`:

| file | contents |
|---|---|
| `evd_pkg.sv` | shared types, the angle table functions, the thresholds and the interchange permutation |
| `mu_cordic_datapath.sv` | one inner iteration of the μ-rotation datapath |
| `mu_rotation_ctrl.sv` | the rotation controller |
| `angle_search.sv` | the angle search of the diagonal PEs |
| `evd_pe.sv` | the processor element |
| `evd_array.sv` | the PE array with the interchange |
| `evd_controller.sv` | the step and sweep sequencer |
| `evd_input_regs.sv`, `evd_output_regs.sv` | the input and output register stages |
| `jacobi_evd_top.sv` | the top level |

`tb/`:

* one self-checking testbench per module (`tb_<module>.sv`);
* `tb_jacobi_evd_top.sv`: 8×8 end to end, both modes, counts of every mechanism;
* `tb_jacobi_evd_full.sv`: the default 50×50 build end to end;
* `tb_evd_sweeps.sv` with `evd_sweep_probe.sv`: sweeps against array size.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/evd_pkg.sv \
    tb/tb_jacobi_evd_full.sv --top-module tb_jacobi_evd_full -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The 50×50 run takes a few
seconds. To change the size, set `M` on `jacobi_evd_top`. The angle tables do
not depend on M or on the number of sweeps. Keep W = 32: the angle set and the
thresholds are fixed for 32-bit words.
