# Pipelined OMP engine for compressive-sensing reconstruction

Compressive sensing takes a signal that has only a few non-zero coefficients and samples it
with far fewer measurements than samples: `y = Theta x`, with `y` holding M measurements, `x`
holding N coefficients (only m of them non-zero), and `Theta` the M x N reconstruction matrix.
Orthogonal matching pursuit (OMP) gets `x` back greedily. It runs m iterations, and each one:

1. picks the column ("atom") of `Theta` that correlates most with the current residual `r`;
2. adds it to the chosen set `Theta_i`;
3. solves the least-squares problem `x_i = (Theta_i^T Theta_i)^-1 Theta_i^T y`;
4. updates the residual `r = y - Theta_i x_i`.

Step 3 is the expensive one, and it repeats every iteration. This RTL splits one OMP
iteration into seven pipeline stages. Each stage has exactly one *time slot* of 32 clocks, so
the engine works on up to seven measurement vectors (frames) at once. The least-squares step
uses no general matrix inverter. It runs as a chain of three systolic arrays:
LDL^T decomposition, inversion of the triangular factor, then composition of the inverse.
The Gram matrix `C = Theta_i^T Theta_i` comes from a multiplier-free unit based on
distributed arithmetic (DA). A sum-of-products unit with one multiplier per sample can be
selected in its place.

The default configuration is N = 256, M = 64, m = 16 with 16-bit data words. The
architecture follows the published design "High-throughput and low-area implementation of
orthogonal matching pursuit algorithm for compressive sensing reconstruction". The section
"Departures from the published architecture" lists where this RTL differs.

## The seven stages

| Stage | Module | Work in one 32-clock slot | Clocks used |
|---|---|---|---|
| 1 | `corr_unit` (rows 0..M/2-1) | partial correlations `<theta_n, r>` of all N atoms | 29 |
| 2 | `corr_unit` (rows M/2..M-1) | adds the second half, giving the full correlations | 29 |
| 3 | `tree_cmp` | `argmax_n |<theta_n, r>|` over atoms not yet chosen; the winner joins the frame's set | 1 + log2 N = 9 |
| 4 | `da_matmul` (16 x `da_lut`), or `sop_matmul` when `SOP = 1` | new row of `C` for the new atom | 18 |
| 5 | `ldl_unit` (`pe1a`, `pe1b`) | `C = L D L^T` | 2m-1 = 31 |
| 6 | `inv_unit` (`pe2`), then `comp_unit` (`pe3`) | `A = L^-1`, then `C^-1 = A^T D^-1 A` | 15 + 16 = 31 |
| 7 | `resid_unit` | `b_i = <theta_new, y>`, `x = C^-1 b`, `r = y - Theta_i x` | 1 + 8 + 16 = 25 |

Every unit reads a slot counter `cyc` (0..31) and schedules its own work by that count. Each
unit finishes by the clock edge that ends cycle 30. Its result is then stable during cycle 31,
when the top captures it at the slot boundary.

## The frame ring (`omp_top`)

A frame carries its own state from stage to stage:

- its tag and iteration count;
- `y` and the current `r`;
- the bit mask and ordered list of chosen atoms;
- the m x m matrix `C`;
- the vector `b` of `<theta_k, y>` for the chosen atoms.

At every slot boundary each frame moves one stage down. A frame leaving stage 7 returns to
stage 1 for its next iteration, unless it has finished all m iterations. A finished frame is
output. Its slot in stage 1 is then free, and a new frame can take it.

Results that a unit produces during the slot are copied into boundary registers at the slot
boundary. These are the partial and full correlations, `L` and `1/D`, and `C^-1`. The
producing unit can then start on its next frame while the next stage reads the copy.

- **Throughput:** at full load, seven frames finish every 7 x 16 slots. That is one frame of
  256 coefficients per 512 clocks.
- **Latency:** a frame is accepted at a slot boundary. It appears on `out_valid` one clock
  after the boundary that ends its 7m-th slot: 7 x 16 x 32 + 1 = 3585 clocks.
- **Input stall:** `in_ready` is high only in the last cycle of a slot, and only if no frame
  is coming back to stage 1. While seven frames are in flight, new frames wait. A waiting
  frame gets in when one finishes.

The Theta store (`theta_mem`) is shared by all frames. It is loaded one atom per clock before
frames are offered. An assertion in `omp_top` flags a Theta write while frames are in flight.

## Solving the least-squares problem without a divider array

**Incremental Gram matrix.** `Theta_i` gains exactly one column per iteration. So `C` gains
one row (and, by symmetry, one column), and the rest of `C` stays the same. Stage 4 computes
only that new row: `c_{i,q} = <theta_new, theta_q>` for the chosen atoms q = 0..i. The row is
written into the frame's copy of `C`.

Before the first iteration, the frame's `C` is set to the identity matrix. The arrays always
work on the full 16 x 16 matrix. In iteration i the unused lower-right block stays the
identity, which has three effects:

- the factorisation never divides by zero;
- `C^-1` is block-diagonal with an identity block;
- the unused coefficients come out exactly zero, because their entries of `b` are zero.

**Distributed arithmetic (`da_lut`, `da_matmul`).** Each group of four samples of the new atom
is loaded into a 15-register table. The table holds all sums of subsets of the four samples;
address 0 is the constant 0. The other atom's four samples do not enter a multiplier. Their
bits address the table, one bit plane per clock, least significant plane first. A shift
accumulator adds each selected entry to half of its previous value. On the sign plane it
subtracts instead.

The accumulator has 16 spare low bits, so the halving is exact. After 16 planes it holds the
exact integer `sum theta_p * theta_q`. `da_matmul` has M/4 = 16 such tables. It uses 16 lanes,
one per entry of the new row, which share those tables. Each lane has its own multiplexers,
accumulators and adder tree.

**LDL^T array (`ldl_unit`).** The array is triangular: a `pe1a` on each diagonal position and
a `pe1b` below the diagonal. Column j is solved in two clocks:

- At cycle 2j, `pe1a(j)` computes `d_jj = c_jj - s` and registers both `d_jj` and `1/d_jj`.
- At cycle 2j+1, every `pe1b(i,j)` registers `l_ij = (c_ij - s) / d_jj`.

In both cycles the PEs of row j drive their `l_jk` onto the column buses. A multiplexer in
each `pe1b` chooses between its own value and the value from above. Every row then adds up
`sum_k l_ik l_jk d_kk` from left to right, each PE adding its own term. The last diagonal
element is ready after 31 clocks.

**Inversion (`inv_unit`).** `A = L^-1` has a unit diagonal, and
`a_ij = -sum_{k=j}^{i-1} l_ik a_kj`. Each `pe2` starts from its `l_ij`. At step t, the PE
t places below the diagonal in every column finishes its element and sends it down its
column. Every PE below it multiply-accumulates that element with an `l` value. The `l`
values move one PE to the left per step. Fifteen steps finish the 16 x 16 inverse.

**Composition (`comp_unit`).** `c^-1_ij = sum_k a_ki a_kj / d_kk`. Each `pe3` is a
three-input multiply-accumulator. In step k, row k of `A` and `1/d_kk` are broadcast to all
PEs, so the result is ready after 16 steps. The array holds the lower triangle and the
diagonal; the upper half of the output is wired from the lower half.

**Residual (`resid_unit`).** The new element `b_i = <theta_new, y>` takes one clock with M
multipliers. Then `x = C^-1 b` takes eight clocks, handling two columns of `C^-1` per clock.
Then `r = y - Theta_i x` takes 16 clocks, adding one atom per clock into M accumulators.

## Number formats

| Quantity | Format |
|---|---|
| Theta | 16-bit two's complement, Q1.15 |
| y, r | 16-bit, Q4.12 |
| correlations | 40 bits, full product precision |
| C, L, D, 1/D, A, C^-1, x | 32-bit Q8.24 (`omp_pkg::fx_t`) |

The DA result (scale 2^-30) is shifted right by 6 bits into Q8.24. Rounding is truncation
throughout. Results are saturated when written back to a 16-bit word or to Q8.24. The
reciprocal is a plain fixed-point division, `2^48 / d`.

## Interface of `omp_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the slot counter, valid bits and output valid |
| `theta_wr_en`, `theta_wr_col`, `theta_wr_data[M]` | in | write one atom (Q1.15) of Theta |
| `in_valid`, `in_y[M]`, `in_tag` / `in_ready` | in / out | frame input; taken when both valid and ready are high |
| `out_valid`, `out_tag`, `out_idx[m]`, `out_x[m]` | out | one-clock result: chosen atoms in order of choice and their coefficients (Q8.24) |
| `slot_start`, `frames_in_flight` | out | status |

The output has no back-pressure.

## Departures from the published architecture

- **New row only.** Stage 4 computes only the new row of `C`, with 16 lanes sharing the DA
  tables. The row goes straight into a parallel register. The published unit hands all
  m(m+1)/2 elements over through a serial-in, parallel-out register. That cannot deliver 136
  DA results of 16 clocks each within one 32-clock slot.
- **Sum-of-products unit.** `sop_matmul` also computes only the new row, one element per
  clock. Each of its M partial product generators is a plain multiplier. Its serial-in,
  parallel-out register has m outputs, not m(m+1)/2.
- **Table fill.** The DA table is filled in one clock by 11 adders. The published table
  generator needs only seven adders.
- **Fewer PE registers.** In `pe1b`, the registers on `l_out` and `s_out` are left out: the
  row sum and the column bus settle within a clock. In `pe2`, one register on the `l` path
  is left out, and a finished element reaches its whole column in the same clock. These
  changes keep the 31- and 15-clock latencies within one slot.
- **Where `Theta_i^T y` is formed.** It is formed one element per iteration in the residual
  stage and stored with the frame. The published text does not give it a stage.
- **Masking.** Atoms already chosen are masked in the comparator. Ties go to the lower atom
  index.
- **Composition formula.** The array computes `(L^-1)^T D^-1 L^-1`. The published
  element-wise formula for this step carries a sign and index typo.
- **Divider.** The reciprocal is a generic divider, not a library divider IP.
- **Frame scheduling.** The frame ring, the valid/ready input, the tags and the reset are
  this design's own. With seven stages the latency is 7 x m slots (3585 clocks). The
  published text quotes both 512 clocks per frame, which this design matches as throughput,
  and 8192 clocks to reconstruct one signal.

This RTL does not provide the eleven-stage configurable version for up to 1024 x 256
matrices and m up to 30.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_omp_full` | `omp_top` at its default size (N=256, M=64, m=16), nine frames back to back |
| `tb_omp_sop` | the same test at the default size with the sum-of-products stage 4 (`SOP = 1`) |
| `tb_omp_top` | the same test at N=32, M=16, m=4, with the sum-of-products stage 4 (`SOP = 1`) |
| `tb_omp_recovery` | recovery of Figure-10-style signals: N=256, M=100, m=10 and m=15, 24 frames each |
| `tb_corr_unit`, `tb_tree_cmp`, `tb_da_lut`, `tb_da_matmul`, `tb_sop_matmul` | exact integer results, read in the last cycle of a slot |
| `tb_ldl_unit`, `tb_inv_unit`, `tb_comp_unit`, `tb_resid_unit` | against floating-point models, within 1e-4 to 1e-5 (r within 2 LSB) |
| `tb_pe1a`, `tb_pe1b`, `tb_pe2`, `tb_pe3`, `tb_theta_mem` | each processing element and the Theta store on its own |

The three end-to-end tests build a random column-normalised Theta and m-sparse signals. They
compare every frame with a floating-point OMP run on the same quantised data. The engine must
choose the same atoms in the same order, and give coefficients within 1e-3. The tests also
check the 3585-clock latency (at the default size). They fail if any of these mechanisms never
happens: several frames in flight, a frame recirculating, and a new frame stalled by a full
ring. At the default size all 9 frames match.

`tb_omp_recovery` uses `tb/omp_recovery_run.sv` to build two engines with M=100 and m=10 or
m=15. Here atoms can be close to tied, so the rounding in the engine may pick them in a
different order from the floating-point OMP. The test therefore compares the chosen atoms as
a set, and only for frames the floating-point OMP recovers exactly. It needs at least 90 % of
frames recovered at m=10 and 80 % at m=15. The signals depend on the simulator seed. With
`+verilator+seed+1` the result is 23 of 24 and 20 of 24; with seed 7 it is 24 of 24 and 23 of
24. The published rates for these two points are about 100 % and 97 % over 1000 signals, so
24 signals per point give only a rough comparison. This test takes about two minutes to build.

Running a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/omp_pkg.sv tb/tb_omp_full.sv --top-module tb_omp_full
./obj_dir/Vtb_omp_full
```

The full-size test builds in about 40 s and runs in under a second.

## Changing the size

`omp_top` takes the parameters `N`, `M`, `MS` (m), `TW` (tag width) and `SOP` (stage-4
multiplier: 0 for DA, 1 for sums of products). The word formats and
the slot length are in `omp_pkg`. Each stage must fit its slot, which sets these limits:

- `2*MS - 1 <= SLOT - 1`: the LDL array;
- `(MS-1) + MS <= SLOT - 1`: stage 6;
- `1 + ceil(MS/2) + MS <= SLOT - 1`: the residual stage;
- `MS + 2 <= SLOT - 1`: the sum-of-products unit, if selected.

With `SLOT = 32`, m can be at most 16. `M` must be a multiple of 4 for the DA tables. The
correlation stages adjust how many atoms they handle per clock to N.
