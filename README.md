# Neuro-fuzzy system with on-chip iPSO training

This is a single-precision floating-point neuro-fuzzy system (NFS) that trains itself in hardware.
The network is a two-input, four-rule Sugeno system in the ANFIS form. Its twenty parameters (membership-function
centres and widths, and the rule coefficients) are not found by gradient descent. An *improved particle swarm
optimiser* (iPSO) searches for them instead: a swarm of 100 candidate parameter vectors is scored on a training set,
and each generation moves every candidate towards its own best position and towards the swarm's best position.
A small normally distributed term is added so that the swarm does not stall in a local minimum.

The design also contains an approximation of the Gaussian membership function that needs no multiplier and no
table. The usual `exp(-((x-m)/sigma)^2)` is replaced by a rational function built from three adders and one divider.

Everything is written in synthesizable SystemVerilog, with all numbers in IEEE-754 single precision.

## The network (`nfs_core`, `gauss_mf`)

Two inputs, `x` and `y`, are each fuzzified by two membership functions (MFs): A1 and A2 on `x`, B1 and B2 on `y`.
Each of the four rules `i` computes:

| layer | operation |
|---|---|
| 1 | `mu_A1(x), mu_A2(x), mu_B1(y), mu_B2(y)` |
| 2 | firing strength `w_i = mu_A(x) * mu_B(y)`, with pairs A1B1, A1B2, A2B1, A2B2 |
| 3 | normalised firing `wn_i = w_i / (w_1 + w_2 + w_3 + w_4)` |
| 4 | `wn_i * f_i`, where `f_i = p_i x + q_i y + r_i` |
| 5 | `z = sum_i wn_i f_i` |

Two MF approximations can be chosen with the `MF_TYPE` parameter (`nfs_pkg::mf_type_e`):

* `MF_EQ9` is the multiplier-free form. For `x < m` it gives `1 + (x-m)/(sigma + |x-m|)`, and for `x >= m` it gives
  `1 + (m-x)/(sigma + |m-x|)`. Both branches equal `sigma / (sigma + |x-m|)`. The curve peaks at 1 at `x = m` and
  falls off more slowly than a Gaussian. It costs three adders and one divider.
* `MF_EQ10` gives `sigma^2 / (sigma^2 + (x-m)^2)`, a Cauchy-shaped bell. It costs two adders, two multipliers and
  one divider.

`gauss_mf` is a 4-stage pipeline with one floating-point operator per stage. `nfs_core` is an 11-stage pipeline,
so `z` appears 11 clocks after `x` and `y` enter. The consequents `f_i` are computed while the MFs are computed.
The 20 parameters come in as an array, and they must not change while a sample is in flight.

A parameter vector (a *particle*) is laid out as follows:

| index | contents |
|---|---|
| 0..7 | `m, sigma` of A1, A2, B1, B2 (centre at the even index, width at the odd index) |
| 8..19 | `p, q, r` of rules 1 to 4 |

## Training: the four stages

`nfs_ipso_trainer` holds the swarm in separate single-port RAMs (`bram`). Because each matrix has its own RAM,
all of them can be read in the same clock:

| RAM | size | contents |
|---|---|---|
| P | N x D | particles |
| Pbest | N x D | each particle's best position so far |
| Vm | N x D | velocities |
| En | N | fitness of each Pbest |
| gbest | D | the global best particle |
| x, y, yd | SAMPLES | the training or test samples |

Element `k` of particle `i` is stored at address `i*D + k`. The defaults are N = 100, D = 20, SAMPLES = 100 and
G_MAX = 1000 generations.

1. **Initiation (`pso_init`).** A memory controller fills P and Pbest with the same random numbers in [0, 1].
   During this phase `out_flg` is `01`. It then fills Vm with random numbers, with `out_flg` at `10`.
2. **Local best (`pso_local_best`).** For each particle, the 20 words are read from P into the network's parameter
   registers. Every sample is then run through `nfs_core`. `fitness_unit` accumulates
   `En = 1/2 * sum_j (yd_j - z_j)^2`. It works in three steps (error, square, then add half) on one shared
   floating-point unit. If the stored fitness is larger than the new one, the new fitness goes to En and the
   particle is copied to Pbest. In the first generation nothing is stored yet, so every particle becomes its own
   local best.
3. **Global best (`pso_global_best`).** En is scanned for its minimum, and that row of Pbest is copied to gbest.
4. **Update (`pso_update`).** For each element, P, Pbest, Vm and gbest are read in the same clock, and then

   ```
   v' = 0.76 * [ v + 2.1*r1*(pbest - p) + 2.1*r2*(gbest - p) ] + 2^-12 * lambda
   v' restricted to [-1, 1]
   p' = p + v'
   p' restricted to [-2.5, 2.5] for centres, [0.1, 2] for widths, [-100, 100] for rule coefficients
   ```

   `r1` and `r2` are uniform in [0, 1). `lambda` is approximately normal and is first restricted to
   [-2^-12, 2^-12]. The restriction is the `fp_restrict` clamp.

Stages 2, 3 and 4 repeat until G_MAX generations are done. The `iteration` counter advances after stage 4, and
stage 2 follows while the counter is below G_MAX. The gbest reported at the end is the one chosen by the last
stage 3, so it was scored on the training set. The last update moves the swarm, but its result is not scored.

### Random numbers

`lcg_rng` implements `X(n+1) = (a*X(n) + b) mod c` with `a = 1664525`, `b = 1013904223` and `c = 2^32`. Its
uniform output is the top 23 bits of the state, read as a fraction in [0, 1). `normal_rng` adds the top halves of
four such generators and scales the sum to zero mean and unit variance. The initial swarm, `r1`, `r2` and `lambda`
each use their own generator with a fixed seed, so a training run is repeatable.

## Floating point (`fp32_pkg`, `fp_unit`)

All arithmetic is done by functions in `fp32_pkg`: `fp_add`, `fp_sub`, `fp_mul`, `fp_div`, `fp_half`, `fp_lt`,
`fp_clamp` and `fp_from_int`. Results are rounded to nearest, ties to even. These simplifications are deliberate:

* subnormal numbers are flushed to zero;
* there is no NaN: `0/0` gives 0, and `x/0` gives a signed infinity;
* an overflow gives a signed infinity.

Each pipeline stage of the datapaths holds at most one operation per operator. `fp_unit` wraps the functions as a
registered one-operation-per-clock unit, and the fitness unit uses it. The divider is a plain combinational
`/` and `%` on 50-bit operands. It is the slowest path, and pipelining it is the first thing to change for a high
clock rate.

## Using the top level

1. While the trainer is idle, write the samples with `td_we`, `td_addr`, `td_x`, `td_y` and `td_yd`.
2. Pulse `start`. `busy` stays high and `stage` shows the running stage (1, 2 or 3 for stages 2, 3 and 4).
   `iteration` counts the generations.
3. When `done` rises, `gb_fitness` holds the training fitness of the best particle and `gb_index` its row.
   Read the trained vector with `gb_raddr`; `gb_rdata` is valid one clock later.
4. To test the trained network, load a test set into the same sample RAMs and pulse `test_start`. The network is
   built from gbest and run over the samples, and `test_fitness` holds the result when `done` rises again.
5. Every network output, in training and in test, is shown on `nfs_z_valid`, `nfs_z_index` and `nfs_z`. A
   classifier, for example a plate/no-plate decision, can be built on it.

`lb_updates`, `vel_clips` and `pos_clips` count local-best replacements and restrictions.

## Licence-plate feature front end (`plate_feature_extractor`)

The network was also used to decide whether a candidate image region holds a licence plate. The top contains
the image front end of that system. It sits beside the trainer, has its own ports and shares nothing with it.

1. While it is idle, write an 8-bit grey image of `IMG_W x IMG_H` pixels (default 128 x 32) with `img_we`,
   `img_addr` (`row*IMG_W + col`) and `img_data`. The image goes into an 8-bit RAM.
2. Pulse `fe_start`. Each interior pixel is filtered with the Sobel kernel for vertical edges,
   `[-1 0 1; -2 0 2; -1 0 1]`. It becomes a 1 in a binary image when `|Gx| > THRESH` (default 128). Border
   pixels are not filtered.
3. When `fe_done` rises, `fe_edge_count` holds the number of edge pixels. `fe_mean` holds the mean of the binary
   image, and `fe_variance` holds its variance, `mean*(1-mean)`. Both are single-precision floats.

The six non-zero neighbours are read one per clock, so a pixel takes 7 clocks. At the default size this gives
126*30*7 + 3 = 26463 clocks.

### Timing at the defaults

| step | clocks |
|---|---|
| initiation | 2*N*D + 1 = 4001 |
| stage 2, per particle | D + 4 + 18*SAMPLES, plus D if its local best is replaced (about 1824 to 1844) |
| stage 3 | N + D + 3 = 123 |
| stage 4 | 9*N*D + 1 = 18001 |

One generation takes about 2.0e5 clocks, and a full 1000-generation training about 2.0e8 clocks.

## Where this implementation departs from the original design

* **Latency.** The original reports about 5.4e5 clocks per generation, spent mostly in a network that takes about
  51 clocks per evaluation. It also reports a 7-clock global-best search and a 700-clock swarm update. Its
  arithmetic library and the parallelism behind those numbers are not available. This version uses single-cycle
  operators, a serial stage 3 and stage 4, and a sample-serial stage 2. The schedule is therefore different, but
  the results of each stage are the same.
* **Number format details.** Rounding and the treatment of special values are as described above.
* **Restriction.** The original restriction routine clamps to a symmetric `[-L, L]`. A general `[lo, hi]` clamp
  is used here, because the widths need the asymmetric interval [0.1, 2].
* **Rule wiring.** The rules use the usual grid pairing A1B1, A1B2, A2B1, A2B2.
* **Choices of this design.** These are not in the original: the random-number constants and seeds, the
  generation of `lambda` (a sum of four uniform numbers), the layout of a particle, the host interface and the
  test mode.
* **Not built.** Several parts of the licence-plate system are not included:
  * the third image feature, which comes from a separate statistical method;
  * the three-input, six-rule network that the features feed, whose rule structure is not specified;
  * the Ethernet link, which is vendor IP;
  * the packet parser and the coefficient return path, whose formats are not given;
  * the plate/no-plate decision block, whose rule is not given.

  The image size and the threshold of the feature front end are this design's own choices.

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The shared package `tb/tb_fp_pkg.sv` converts between `real` and the 32-bit
format and contains a double-precision model of the network. Expected values come from that model, not from the
RTL's arithmetic.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/fp32_pkg.sv rtl/nfs_pkg.sv tb/tb_fp_pkg.sv tb/tb_nfs_ipso_trainer.sv \
  --top-module tb_nfs_ipso_trainer
./obj_dir/Vtb_nfs_ipso_trainer
```

* `tb_nfs_ipso_trainer` trains on the first benchmark: `y(k+1) = y(k)/(1+y(k)^2) + u(k)^3` with
  `u(k) = cos(2*pi*k/100)`. It uses 8 particles, 20 samples and 10 generations, then tests with
  `u(k) = sin(2*pi*k/100)`. It checks:
  * the stage order;
  * that the global best never gets worse and improves at least once;
  * that the read-back parameters reproduce the reported training and test fitness in the model;
  * that initiation, local-best replacement, velocity restriction and position restriction each happen.
  It also runs the feature front end on one image and compares the features with a model.
* `tb_nfs_ipso_trainer_full` runs the same test with the trainer's defaults: 100 particles, 100 samples and 1000
  generations, about 2e8 clocks. It takes several minutes in Verilator.

To make a smaller or larger trainer, override `N`, `SAMPLES`, `G_MAX` and `MF_TYPE` on `nfs_ipso_trainer`.
Addresses are 16 bits wide (`nfs_pkg::RAM_AW`), so `N*20` must stay below 65536.
