# Symmetric eigen-solver kernels: QR and Jacobi in single precision

This design computes all eigenvalues and eigenvectors of a real symmetric
n x n matrix held in IEEE-754 single precision. It contains two independent
accelerator kernels that solve the same problem in different ways:

* **QR kernel** (`qr_kernel`). It first reduces the matrix to upper
  Hessenberg form with Givens rotations. It then repeats shifted QR sweeps
  until the diagonal stops changing.
* **Jacobi kernel** (`jcb_kernel`). It repeatedly finds the largest
  off-diagonal element (the *pivot*) and removes it with one Jacobi
  rotation. It stops when an iteration leaves the diagonal unchanged.

Each kernel behaves like a high-level-synthesis accelerator block:

* It has an AXI4-Lite control slave with the usual start/done/idle/ready
  handshake, interrupt registers and argument registers.
* It has one AXI4 master (`gmem`) that reads the input matrix.
* It has a second AXI4 master (`gmem1`) that writes the eigenvalues
  (`out_matrix1`) and the eigenvectors (`out_matrix2`).

The matrix and the eigenvector matrix are copied into on-chip RAM for the
whole computation. Off-chip memory is touched only at the start and at the
end. The top level, `eig_top`, places both kernels side by side. A host can
run them one at a time or both at once.

The design follows a study of how well FPGAs suit the classic dense
eigen-solvers. That study built both algorithms as HLS kernels, both for a
Zynq board (PYNQ-Z2) and for an Alveo U200 data-centre card. Its reported
iteration counts serve as a reference here. For the 10 x 10 test matrix
a(i,j) = min(i,j)+1, the RTL takes 14 QR iterations and 85 Jacobi
iterations, the same numbers the study reports.

## Number format and arithmetic units

Every value is binary32. The arithmetic units are built here and not taken
from a vendor library:

| unit | latency | notes |
|---|---|---|
| `fp32_add` | combinational | round to nearest even; subnormal inputs and results flushed to zero |
| `fp32_mul` | combinational | same rules |
| `fp32_div` | 28 cycles, 1 for special operands | restoring radix-2; start/busy/done handshake |
| `fp32_sqrt` | 28 cycles, 1 for special operands | digit-by-digit; same handshake |

Flushing subnormals to zero is a choice of this design. It only matters for
values below 1.2e-38, so it does not change the iteration counts above.
NaN handling is minimal: NaN in gives a quiet NaN out.

## Matrix storage and rotation engines

`mat_ram` is a dual-port RAM with synchronous read. Each port takes one word
per cycle. Each kernel has two instances:

* A, the working matrix;
* V, the eigenvector matrix, which starts as the identity.

Both are row-major. The word index is `row*dim + col`. `MAX_DIM` (default
500) sets the depth to `MAX_DIM*MAX_DIM`. 500 is the largest size that the
on-chip variant of the original work was run at.

Many units share each RAM. Every unit drives a request record (`ram_req_t`:
enable, write, address, data). An idle unit drives all zeros, and the kernel
ORs the records together. Assertions in the kernels check two rules: at most
one unit enables a port, and a port that nobody enables carries no stray
address bits. Breaking the second rule corrupts the active unit's address,
so if you add a unit, make sure it drives `RAM_IDLE` while it is idle.

Rotations are applied by three blocks:

* `givens_rot` rotates one pair: `x' = c x - s y`, `y' = s x + c y`.
* `givens_ag` applies one rotation to rows i, j or to columns i, j of a
  matrix in RAM. It reads both elements in one cycle and writes both back in
  the next, so a pass takes 2·dim+1 cycles.
* `givens_gag` forms Gᵀ·A·G. It does a row pass, then a column pass on the
  result. For Jacobi it then also writes exact zeros to a(i,j) and a(j,i),
  which is 4·dim+6 cycles, or one more with the zeroing.

Each kernel has one GAG engine working on A and one AG engine working on V.
The two engines run at the same time.

## The QR kernel

Sequence (states in `qr_kernel`):

1. **LOAD**: `kernel_io` reads dim² words over `gmem` into A and writes the
   identity into V.
2. **Hessenberg reduction**: for p = 1..n-2 and q = p+1..n-1, take a rotation
   from a(p,p-1) and a(q,p-1) and apply it to A (GAG) and V (AG). This zeroes
   a(q,p-1).
3. **Shifted QR loop**, once per iteration:
   * **SHIFT**: the shift is a(n-1,n-1). If another diagonal element
     equals it exactly, the shift is lowered by 1. This avoids a singular
     shifted matrix.
   * **SUB**: save the diagonal, then subtract the shift from it.
   * **Sweep**: for i = 0..n-2, take a rotation from a(i,i) and a(i+1,i),
     then apply it to A and V.
   * **ADD**: add the shift back.
   * **CONV**: stop if every diagonal element equals its saved value bit
     for bit, or after `MAX_ITER` iterations.
4. **STORE**: the diagonal goes to `out_matrix1` and V to `out_matrix2`,
   both over `gmem1`.

`qr_calc_givens` picks s and c from the pair (e1, e2) = (pivot, element to
remove):

* e2 = 0 gives s = 0 and c = sign(e1).
* e1 = 0 gives s = -sign(e2) and c = 0.
* Otherwise it divides the smaller element by the larger, so that the
  quotient t satisfies |t| ≤ 1.
* It then forms `u = sqrt(1+t²)` with the sign of the larger element, and
  derives c and s from t and u.

This makes s·e1 + c·e2 = 0, so the rotation removes e2. The unit shares one
adder, one multiplier, one divider and one square root, and finishes in at
most 91 cycles.

Two readings here are this design's own. First, the exact test behind "lower
the shift by one". Second, the order of the Hessenberg loop. Both were
chosen because, with them, a bit-accurate float model of the loop gives the
published 14 iterations at n = 10.

## The Jacobi kernel

The Jacobi kernel keeps a **pivot table** `pv_q[]`, one entry per row k.
Entry k holds the column j > k with the largest |a(k,j)|. On a tie, the first
such column wins.

Sequence:

1. **LOAD**, as for QR. Then **PV**: `jcb_update_pivot` scans every row
   0..n-2 and fills the table.
2. **Loop**, once per iteration:
   * **SAVE**: save the diagonal.
   * **FIND**: `jcb_find_largest` reads a(k, pv(k)) for rows 0..n-2 and
     keeps the first row with the largest magnitude. This gives k, l and
     a(k,l).
   * If the pivot is zero, the rotation is skipped.
   * Otherwise `jcb_calc_givens` computes the rotation from a(k,k), a(k,l)
     and a(l,l):

     ```
     w = (a(l,l) - a(k,k)) / (2 a(k,l))
     t = -w - sqrt(w² + 1) if w < 0, else -w + sqrt(w² + 1)
     s = t / sqrt(1 + t²),  c = 1 / sqrt(1 + t²)
     ```

     (at most 150 cycles). GAG then applies the rotation to A and zeroes
     a(k,l) and a(l,k). AG applies it to V.
   * **UPK / UPL**: scan rows k and l again to refresh their table entries.
     Row l is not scanned when l = n-1, because the last row has no entry.
   * **CONV**: stop if the diagonal is unchanged, or after `MAX_ITER`
     iterations.
3. **STORE**, as for QR.

The Jacobi stop rule ("the diagonal did not move in one iteration") is
coarse. At n = 10 it stops with off-diagonal entries of about 1e-4 of the
largest eigenvalue. The residuals |Av - λv| are therefore about 1e-4
relative, against about 1e-6 for QR. This matches a float32 software model
of the same loop, and the iteration count at n = 10 (85) matches the
published one.

## Control interface

| offset | register | bits |
|---|---|---|
| 0x00 | AP_CTRL | 0 start (cleared when the kernel takes it), 1 done, 2 idle, 3 ready, 7 soft reset |
| 0x04 | GIE | 0 global interrupt enable |
| 0x08 | IER | 0 done, 1 ready |
| 0x0c | ISR | 0 done, 1 ready; write 1 to clear |
| 0x10 | in_matrix | byte address of the n x n input (row-major) |
| 0x18 | out_matrix1 | byte address of the n eigenvalues |
| 0x20 | out_matrix2 | byte address of the n x n eigenvectors, row-major, eigenvector k in column k |
| 0x28 | dim | n (1 ≤ n ≤ MAX_DIM) |

Notes on the registers:

* The done and ready bits clear when AP_CTRL is read.
* `irq` = GIE & (ISR ≠ 0).
* Bit 7 holds the whole kernel in reset while it is set. This is this
  design's own addition.
* The offsets follow the original HLS interface. The behaviour of the
  individual bits follows the common HLS convention.

To run a kernel: write the three addresses and `dim`, then write 1 to
AP_CTRL. Then wait for `irq`, or poll until done or idle is set. Each kernel
also has an `iterations` output that holds the iteration count of its last
run.

`axi_master` makes single-beat AXI4 transfers (length 0, 4 bytes, all
strobes) with one transaction outstanding. The data mover is therefore
simple but slow: a word costs at least three cycles. This hardly matters,
because the iterations dominate the run time.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `MAX_DIM` | 500 | largest n; sets each RAM to MAX_DIM² words |
| `MAX_ITER` | 1,000,000 | iteration cap of each loop (this design's choice) |

At the defaults the two kernels hold 4 × 250,000 words (4 MB) of RAM. The
original work evaluated sizes up to 10,000 by keeping the matrix in
off-chip DDR. That variant is not built here, so matrices larger than
500 x 500 do not fit.

## Verification

The testbenches in `tb/` all check themselves and print
`TB_RESULT checks=<n> failures=<n>`.

* **Arithmetic units**: random and corner operands are compared with
  reference rounding written in the testbench (`tb_fp_pkg`), which does not
  rely on `shortreal`. The tests also check the latencies.
* **Rotation engines, pivot search, diagonal unit**: each runs on a small
  RAM instance. The results are compared with the same single-precision
  steps done in the testbench, and the cycle counts are checked.
* **Bus blocks**: they are tested against `axi_mem_model`, an AXI memory
  that stalls each channel for a random 0 to 3 cycles, and against a host
  model for the control slave.
* **End to end (`tb_eig_top`)**: this test uses the default parameters
  (MAX_DIM = 500). It drives both kernels at the same time through their
  control slaves. It runs the min(i,j)+1 matrix at n = 10 and at n = 20,
  and then 3·I at n = 6, where the Jacobi pivot is zero. For each run it checks:
  * the iteration counts (14/85, 82/212 and 1/1);
  * the sorted eigenvalues against their closed form;
  * the residual |Av - λv| for every pair;
  * that V is orthonormal;
  * the done/idle/ISR behaviour.

  It also counts each mechanism and fails if one never occurs. The counted
  mechanisms are: Hessenberg rotations, sweep rotations, the shift
  correction, each branch of the QR rotation formula, Jacobi rotations,
  zero-pivot skips, skipped last-row rescans, interrupts, bus stalls, and
  cycles with both kernels busy.

The largest matrix simulated end to end is 20 x 20. At that size the test
expects 82 QR and 212 Jacobi iterations, which are the counts of a float32
software model of the same loops. A QR iteration costs
roughly 4·n² + 100·n cycles, and a Jacobi iteration roughly 6·n + 200
cycles. At n = 10 the whole QR run took about 25,000 cycles and the Jacobi
run about 23,000.

To simulate with Verilator (5.x), for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal rtl/eig_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv \
    tb/axi_mem_model.sv tb/tb_eig_top.sv --top-module tb_eig_top
./obj_dir/Vtb_eig_top
```

Other testbenches build the same way with their own top module.

## Known limitations and departures from the original

* Only the on-chip-RAM variant is built. The off-chip variant and the
  platform around the kernels are not part of this RTL: the AXI
  interconnect, the Zynq processor, the Alveo shell, PCIe and DDR. The AXI
  ports of `eig_top` are where they would connect.
* The HLS pipelining and unrolling of the original loops are not copied.
  Every loop here handles one element pair per two cycles. The cycle counts
  are therefore not comparable with the published run times. Only the
  iteration counts and the results are.
* The "shift minus one" test, the Hessenberg loop order, the tie rule of
  the pivot search and the exact zeroing after a Jacobi rotation are
  readings of the method. They are chosen so that the published iteration
  counts come out at n = 10.
* For n = 20 the QR iteration count from this reading (82) is higher than
  the published 33. The Jacobi count (212) is close to the published 219.
  The exact shift test of the original is the likely difference.
* The control slave's ap_reset bit and the handling of auto-restart bits
  are this design's own. Auto-restart is not supported.
* Many AXI output fields are constants (burst type, size, length,
  strobes), because every transfer is a single word.
