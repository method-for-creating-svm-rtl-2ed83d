# SVM training and classification accelerator

This is an FPGA accelerator that trains and runs a Support Vector Machine (SVM)
classifier entirely in programmable logic. A processor describes a two-class
problem in a few registers and starts the IP. The IP then does the rest:

- it fetches the labelled training vectors and the unlabelled test vectors from
  DDR memory;
- it solves the SVM training problem, a convex quadratic program, with a
  pairwise (two-variable) optimiser;
- it derives the hyperplane offset `z` and the weight vector `w`;
- it classifies the test vectors;
- it writes everything back to DDR.

Three kernels are built in: linear, polynomial and RBF (Gaussian). With the
polynomial and RBF kernels the same hardware separates classes that no straight
hyperplane can.

The design targets an SoC FPGA with a hard ARM processor, such as a Cyclone V
SoC. It is an AXI peripheral with three ports:

- an AXI4-Lite slave port for the registers;
- an AXI4 burst master port to DDR;
- an AXI4-Stream input that can deliver the data set directly, for example
  from a camera or sensor, instead of from DDR.

```
 processor --AXI4-Lite--> axi_lite_slave_ipif --> svm_slave_regs --cfg/start--> svm_user_logic
 sensor ----AXI4-Stream (data set, optional)-----------------------------------> |  svm_addr_gen
 DDR <------AXI4 burst---- axi_master_burst <--------- command/data ------------+  data RAM, Q RAM
                                                                                    stage 1 svm_qmatrix  (kernel unit)
                                                                                    stage 2 svm_optimizer (divider)
                                                                                    stage 3 svm_tester   (kernel unit)
```

The top level is `svm_ip`. Every file in `rtl/` starts with a comment that
gives its function, interface and timing.

## The problem being solved

The training set has `m` vectors `A_i`, each with `nf` features, and labels
`B_i` of +1 or -1. Training finds the multipliers `alpha` that minimise the SVM
dual

```
  1/2 * alpha' Q alpha  -  sum(alpha)      Q_ij = B_i * B_j * K(A_i, A_j)
  subject to  0 <= alpha_i <= C   and   sum(B_i * alpha_i) = 0
```

A new vector `x` is then classified by the sign of

```
  f(x) = sum over support vectors j of  alpha_j * B_j * K(x, A_j)  +  z
```

The support vectors are the training vectors with `alpha_j > 0`. The kernels are:

| kernel     | KERNEL[1:0] | K(x, y)                       |
|------------|-------------|-------------------------------|
| linear     | 0           | x . y                         |
| polynomial | 1           | (gamma * x . y + coef0)^degree |
| RBF        | 2           | exp(-gamma * \|x - y\|^2)     |

## Number format

Every value is a signed 32-bit Q16.16 fixed-point word. This covers features,
kernel values, alphas, gradients, `C`, `eps`, `gamma`, `coef0`, `z` and `w`.
Real value = word / 65536. The range is about ±32768 and the resolution is
1.5e-5.

Products are formed at 64 bits and then truncated back to Q16.16. The kernel
accumulates its dot products and squared distances at 64 bits. Apart from the
divider, nothing saturates. **Scale the features to roughly [-1, 1].** With
large features or a high polynomial degree the kernel values overflow and wrap.

## A job, step by step

`svm_user_logic` runs the steps below. Stage 1 overlaps the preload. Every
later step waits for the one before, because it needs all of that step's
results.

1. **Preload.** From `m`, `t` and `nf`, the address generator works out the
   size of the data set: `4*(m*(nf+1) + t*nf)` bytes. It reads that many bytes
   from `SRC_ADDR`. The DDR layout is as follows:
   - each training vector is `nf` feature words followed by one label word
     (greater than 0 means +1, anything else means -1);
   - the `t` test vectors follow, `nf` words each.

   With `SOURCE = 1` the same words arrive on the AXI4-Stream input instead,
   in the same order. `TREADY` is high until the expected number of words has
   been taken. There is no `TLAST`: the word count follows from `m`, `t` and
   `nf`. Gaps in `TVALID` only slow the preload down.

   Features go into the data RAM: feature `f` of vector `v` is at address
   `v*NF_MAX + f`, and test vector `k` is stored as vector `m + k`. The labels
   go into an `M_MAX`-bit register. The byte count can be read from
   `TOTAL_BYTES`.
2. **Stage 1, kernel matrix** (`svm_qmatrix`). Q is symmetric, so only the
   lower triangle is evaluated: row `i`, columns `j <= i`. For each pair, both
   vectors are streamed through a kernel unit, one feature pair per clock,
   using the two read ports of the data RAM. The result
   `Q_ij = ±K(A_i, A_j)` is written to the Q RAM at `{i, j}`. Off the
   diagonal it is also written to `{j, i}` on the next clock. The sign is the
   XOR of the two label bits.

   Row `i` needs only vectors `0..i`. The stage therefore starts together with
   the preload. It begins row `i` as soon as training vector `i` and its label
   have arrived, so the first rows are built while the data are still coming
   in.
3. **Stage 2, optimisation** (`svm_optimizer`). See the next section.
4. **Stage 3, testing** (`svm_tester`). For each test vector it takes the
   training vectors in turn and skips any with `alpha = 0`. For each support
   vector it evaluates the kernel, multiplies by `alpha_j`, and adds or
   subtracts the result according to `B_j`. It then adds `z` and writes +1 if
   the sum is > 0, or -1 otherwise.
5. **Write-back.** At `DST_ADDR` it writes `nf + 1 + m + t` words, in this
   order: `w[0..nf-1]`, `z`, `alpha[0..m-1]`, then the predictions
   `[0..t-1]` as 32-bit integers +1 / -1.
6. `irq` pulses for one clock, and `STATUS.done` stays set until the next start.

## Stage 2: the optimiser

This is the core of the design. It is a two-variable (SMO-style) solver for
the dual above. Its state is two register arrays of `M_MAX` words: `alpha` and
the gradient `Gr = Q*alpha - 1`.

**Initialisation.** Every `alpha` is set to 0 and every `Gr` to -1.
`alpha = 0` satisfies both constraints, so it is a valid (admissible) starting
point. This takes `m` clocks.

**One iteration** takes about `2m + 60` clocks.

1. *Select the pair* (`m` clocks). The optimiser scans all vectors and computes
   `v_t = -B_t * Gr_t` for each.
   - `i` is the vector with the largest `v_t` among those whose alpha can still
     move up along the constraint: `B=+1, alpha<C` or `B=-1, alpha>0`.
   - `j` is the vector with the smallest `v_t` among those whose alpha can move
     down: `B=+1, alpha>0` or `B=-1, alpha<C`.

   This is the first-order "maximal violating pair" rule.
2. *Stop test.* The optimiser stops when `v_i - v_j <= eps` (the
   Karush-Kuhn-Tucker conditions hold to within `eps`) or when `MAX_ITER`
   iterations have run. `STATUS.converged` tells which of the two happened.
3. *Step* (about 52 clocks). It reads `Q_ii`, `Q_jj` and `Q_ij` from the Q RAM
   (2 clocks) and forms the curvature along the constraint:
   `quad = Q_ii + Q_jj - 2*B_i*B_j*Q_ij`. Values of `quad` <= 0 are replaced by
   one LSB. The numerator is `Gr_i - Gr_j` for equal labels and `-Gr_i - Gr_j`
   for unequal labels. The sequential divider `svm_div` forms the step
   `numerator / quad`.
4. *New alphas* (2 clocks). The unconstrained update is applied:
   - equal labels: `alpha_i - step` and `alpha_j + step`;
   - unequal labels: both alphas `+ step`.

   The pair is then clipped back into the box `[0, C]` while keeping
   `sum(B*alpha)` unchanged. This uses the standard two-variable case analysis
   on the sum or the difference of the old alphas. The changes `d_i` and `d_j`
   are kept.
5. *Gradient update* (`m + 1` clocks). For every `k`:
   `Gr_k += Q_ki*d_i + Q_kj*d_j`. Because Q is symmetric, the two columns
   needed are read as rows `{k, i}` and `{k, j}` on the two Q RAM ports, one
   `k` per clock.

**Displacement.** Two formulas are available. Bit 8 of the KERNEL register
selects one. Both use the sum `s_t = sum_x alpha_x B_x K(A_x, A_t)`, which
the gradient already holds: `s_t = B_t * (Gr_t + 1)`. Both are gathered in one
scan of the training vectors.

- *Average (bit 8 = 0, default).* `z` is the mean of `B_s - s_s` over the
  support vectors `s`, which simplifies to `mean(-B_s * Gr_s)`. It is computed
  with one division. Every `alpha > 0` counts, including alphas at the bound
  `C`. With no support vector, `z = 0`.
- *Midpoint (bit 8 = 1).* `z = -1/2 * (max of s_t over class -1 + min of s_t
  over class +1)`. It is taken over all training vectors of each class, with
  no division, and `z = 0` if a class is empty. On separable data the two
  formulas agree closely. On overlapping classes the midpoint follows the
  most extreme points and can move a long way; the average is more robust.

**Weight vector.** For each feature `f`:
`w_f = sum_j alpha_j * B_j * A_jf`. This takes `m + 2` clocks per feature and
uses one data RAM port. For the linear kernel, `(w, z)` is the separating
hyperplane. For the other kernels, `w` is computed the same way but has no
geometric meaning.

The datapath blocks of the optimiser map onto this algorithm as follows. The
label product and Mul1 build Q. Add1, Mul2 and Add2 form `quad`. Div1 forms the
step. Add3 and Add4 form the new alphas, and Sub1 and Sub2 form their changes.
Mul3, Mul4, Add5 and the accumulator register update the gradient. The `> 0`
comparison, M3, Mul5 and MAC2 build `w`. The optimiser does not shrink its
working set, so there is no gradient-reconstruction step.

## The kernel unit

`svm_kernel` takes one feature pair per clock and accumulates either `x*y` or
`(x-y)^2` at 64 bits. After the last pair it finishes as follows:

- **linear:** the result is ready 1 clock after the last pair;
- **polynomial:** one multiply forms `gamma*dot + coef0`, then `degree`
  repeated multiplies form the power. Total `degree + 3` clocks;
- **RBF:** `exp(-t)` is evaluated as `2^(-u)` with `u = t * log2(e)`. The
  integer part of `u` is a right shift. The fractional part `f` uses
  `2^-f ≈ 1 - 0.67157 f + 0.17157 f^2`, which is exact at f = 0, 0.5 and 1 and
  within 0.25 % in between. Total 5 clocks.

Stage 1 and stage 3 each have their own kernel unit instance.

## Data movement

- `svm_addr_gen` cuts a transfer into INCR bursts of at most 16 beats and never
  lets a burst cross a 4 KB boundary. It issues one burst and waits for it to
  complete before issuing the next.
- `axi_master_burst` runs one burst at a time, with 32-bit beats.
  - Reads: `RREADY` is held high, so the user logic must accept a word on
    every clock. The data RAM write port does this.
  - Writes: the user logic presents the word at its current index, and
    `wr_pop` advances the index.
  - Any `SLVERR` or `DECERR` response sets `STATUS.axi_err` until reset.
  - Assertions check the AXI rule that a valid signal, once raised, stays high
    with a stable payload until it is accepted.
- `axi_lite_slave_ipif` handles one AXI4-Lite transaction at a time. A write
  is taken when address and data are both valid. Every response is OKAY.

## Register map (AXI4-Lite, byte offset = 4 × index)

| idx | name        | access | meaning |
|-----|-------------|--------|---------|
| 0   | CTRL        | W      | bit 0: start (ignored while busy) |
| 1   | STATUS      | R      | bit 0 busy, bit 1 done (sticky), bit 2 converged, bit 3 AXI error |
| 2   | NUM_TRAIN   | RW     | m, 1..M_MAX |
| 3   | NUM_TEST    | RW     | t, 0..T_MAX |
| 4   | NUM_FEAT    | RW     | nf, 1..NF_MAX |
| 5   | KERNEL      | RW     | bits 1:0 kernel, bits 7:4 polynomial degree, bit 8 z formula (0 average, 1 midpoint) |
| 6   | GAMMA       | RW     | Q16.16 (reset value 1.0) |
| 7   | COEF0       | RW     | Q16.16 (reset value 1.0) |
| 8   | C           | RW     | Q16.16 box bound (reset value 1.0) |
| 9   | EPS         | RW     | Q16.16 stop tolerance (reset value 66 ≈ 0.001) |
| 10  | MAX_ITER    | RW     | iteration limit (reset value 1000) |
| 11  | SRC_ADDR    | RW     | DDR byte address of the data set |
| 12  | DST_ADDR    | RW     | DDR byte address of the results |
| 13  | TOTAL_BYTES | R      | bytes moved by the last preload |
| 14  | ITERATIONS  | R      | iterations the optimiser ran |
| 15  | N_SV        | R      | number of alphas > 0 |
| 16  | BIAS        | R      | z, Q16.16 |
| 17  | SOURCE      | RW     | bit 0: data set from DDR at SRC_ADDR (0) or from the stream input (1) |

The hardware does not check the sizes. Values above the `M_MAX`, `T_MAX` or
`NF_MAX` parameters overwrite memory.

## Sizes, memory and run time

| parameter | default | meaning |
|-----------|---------|---------|
| `M_MAX`   | 256     | training vectors |
| `T_MAX`   | 256     | test vectors |
| `NF_MAX`  | 8       | features per vector |

None of these defaults is a published figure. Eight features is the width of
the Pulsar (HTRU2) data set, a typical target problem.

The Q RAM dominates memory use: `M_MAX^2` words, 2 Mbit at the defaults. The
data RAM is `(M_MAX + T_MAX) * NF_MAX` words. The alpha and gradient arrays are
registers.

Approximate clock counts:

| step | clocks |
|------|--------|
| stage 1 | `m(m+1)/2 * (nf + 1 + kernel latency) + m(m-1)/2` |
| one optimiser iteration | `2m + 60` |
| stage 3 | `t * (m + n_sv * (nf + 2 + kernel latency))` |
| preload | about 1 word per clock, plus the stalls of the DDR side |

Measured in simulation with random DDR stalls: a full-size job (`m = t = 256`,
`nf = 8`, linear kernel, 31 iterations) takes about 463 000 clocks. Stage 1
takes most of that, about 362 000. Larger problems need a larger `M_MAX`, and the Q RAM grows
with its square: the full Pulsar set (about 16 000 training vectors) would need
about 1 GB of Q memory. It cannot be trained in one pass on chip.

## Where the design makes its own choices

The method this RTL implements describes the blocks of the accelerator and the
three stages. It leaves the following open, and this implementation decides
them:

- the Q16.16 number format;
- the kernel formulas, the polynomial and RBF parameters, and the exponential
  approximation;
- the first-order pair-selection rule, the clipping rule and the stop test;
- the formula for `z`. The method gives two, an average over the support
  vectors and a class max/min midpoint, and does not say which the hardware
  uses. Both are built and a register bit selects one. The index sets of the
  midpoint formula are taken here as all training vectors of each class;
- the register map, the DDR layouts, 16-beat bursts with one burst in flight,
  and the reset values.

The method prepares the problem the way a general convex quadratic
program solver expects it: an objective matrix and vector, inequality
constraints (`G`, `h`) and an equality constraint (`D`, `z_const`). This design
never builds those matrices. It solves the same program with the pairwise
method above, which keeps the box and equality constraints by construction
and needs only Q, the alphas and the gradient.

The method also aims at training on a continuous data stream, for example
from a camera. Here that is a plain 32-bit AXI4-Stream input that replaces the
DDR read of the data set. Each job still takes a fixed-size data set, and its
results still go to DDR.

The method says the stages run in parallel where possible but gives no
schedule. Here only stage 1 overlaps the preload. The other stages cannot
start before their predecessor has finished. Stages 1 and 3 each have their
own kernel unit.

The method works with a processor, AXI interconnects, a timer, a UART and a
DDR3 controller. Those are platform parts and are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
with values worked out independently, usually in `real` arithmetic, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_svm_kernel` | all three kernels against `real` formulas, and their latencies |
| `tb_svm_div` | exact quotients, saturation, divide by zero, 50-clock latency |
| `tb_svm_dp_mem` | both read ports, read-before-write |
| `tb_svm_qmatrix` | every Q entry for each kernel, each entry written once, rows held back until their vectors have arrived, clock count |
| `tb_svm_optimizer` | box and equality constraints, KKT gap, `z` by both formulas, `w`, a two-point case with a known answer, clipping at C, the iteration limit |
| `tb_svm_tester` | decision values and signs for each kernel with sparse alphas, and the run time |
| `tb_svm_addr_gen` | byte counts, burst coverage, the 16-beat and 4 KB rules |
| `tb_axi_master_burst` | read and write bursts of 1..256 beats against a stalling memory |
| `tb_axi_lite_slave_ipif`, `tb_svm_slave_regs` | register access, strobes, the start/done protocol |
| `tb_svm_user_logic` | complete jobs at reduced sizes, one of them fed from the stream input with random gaps |
| `tb_svm_ip` | the whole IP at its default sizes: linear jobs (with each `z` formula, and with the data set arriving on the stream input), polynomial and RBF jobs, a small-C job, an iteration-limited job, and a full-size 256/256/8 job; it also counts every mechanism (each kernel, clipping at C, both stop reasons, 4 KB burst cuts, DDR stalls, stage 1 overlapping the preload, skipped non-support vectors, both classes) |

`tb_svm_workloads` runs the IP at its default sizes on data shaped like two
classic problems, each split 90 % training and 10 % testing:

- **Iris-shaped:** 150 samples, 4 features, 3 species. There are three
  one-vs-rest jobs on 135 training and 15 test vectors, one with each kernel.
  Each job classifies all 15 test vectors correctly.
- **Pulsar-shaped (HTRU2):** 8 features, about one positive in ten. The real
  set is too large for the on-chip Q memory, so the test uses the largest
  slice that fits: 256 training and 256 test vectors. With each kernel, about
  95 % of the test vectors are classified correctly.

The samples are synthetic. They are drawn from normal distributions that
mimic each data set's classes.

`tb/axi_ddr_model.sv` is a behavioural AXI4 memory that stalls at random. It
is used only by the testbenches.

To run a testbench, for example the whole IP, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/svm_pkg.sv tb/tb_svm_ip.sv --top-module tb_svm_ip
./obj_dir/Vtb_svm_ip +verilator+rand+reset+2
```

Replace `tb_svm_ip` with any other testbench name. The full-size run of
`tb_svm_ip` takes well under a second of simulation time.

## Known limits

- There is no overflow protection in the kernel or in the gradient
  accumulation. Keep the features, `gamma` and `C` moderate.
- Bounded support vectors (`alpha = C`) are included in the average that gives
  `z` in the default mode. On overlapping classes this shifts `z` compared with solvers that
  average only over the free support vectors.
- Multi-class problems need one run per class (one-vs-rest), driven by the
  processor.
- With two-state simulation, memory contents start random. Every location is
  written before it is read, but only within the configured `m`, `t` and `nf`.
