# Tensorial-kernel SVM with neural-network SVD for tactile data

This is synthesizable SystemVerilog for a touch-modality classifier for
electronic skin. The input is a tactile tensor: a 4 x 4 taxel array
sampled 20 times, 320 values in all. The classifier is a support vector
machine (SVM) whose kernel compares tensors through their subspaces. Each
mode unfolding of the input is reduced to a few right singular vectors,
and these are compared with the singular vectors stored for every
training tensor.

A singular value decomposition (SVD) is normally the expensive step. An
iterative one-sided Jacobi engine is the usual choice in hardware. Here
two small *shallow neural networks* replace it. They are trained offline
to output the truncated right singular vectors directly. In hardware each
network is only two fully connected layers: a fixed amount of
multiply-accumulate work, with no iteration and no convergence test. The
networks, the tensorial kernel and the SVM decision run on one shared,
sequential datapath (a cascade), clocked at 100 MHz in the reference
implementation.

The architecture is the NN-based tensorial SVM published by Younes,
Ibrahim, Rizk and Valle ("A Shallow Neural Network for Real-Time Embedded
Machine Learning for Tensorial Tactile Data Processing"). That design was
produced with high-level synthesis. This RTL is an independent
register-transfer implementation of it. Where the publication gives no
detail, this RTL makes its own choices; the section *Departures and
choices* lists them.

## The computation

A raw touch recording is 10 s of 4 x 4 frames, 30,000 frames in all.
The optional pre-processing step reduces it to the tensor. Frames outside
the interval from 3.5 s to 7 s are mostly silence, so they are dropped.
That leaves 10,500 frames, which are cut into 20 bins of 525. Each bin is
replaced by its per-taxel mean.

For a test tensor `phi` (I1 x I2 x I3 = 4 x 4 x 20):

1. **Unfold.** Three matrices are formed: X1 (4 x 80), X2 (4 x 80) and
   X3 (20 x 16). Each row of X_k is one index of mode k.
2. **Singular vectors.** A network maps each matrix to the first t right
   singular vectors V (n x t):
   - **NN1** maps a 4 x 80 matrix to V of 80 x 4, with 140 hidden neurons.
     It is used for X1 and X2.
   - **NN2** maps a 20 x 16 matrix to V of 16 x 2, with 40 hidden neurons.
     It is used for X3.
3. **Kernel factors.** For each training tensor i and each mode z, this
   unit computes
   `k_z = exp(-gamma * (t - trace(Z^T Z)))`, with `Z = Vx^T Vy`.
   Here Vx is the network output and Vy is the stored V of tensor i.
   `trace(Z^T Z)` equals t when the two subspaces are the same, and it
   falls towards 0 as they become orthogonal.
4. **Kernel.** `K_i = k_1 * k_2 * k_3`.
5. **Decision.** `y = sum_i beta_i K_i + b`. The label is the sign of y
   (binary problem).

Each network computes `Y_h = f_h(W_h X + b_h)` and then
`V = f_O(W_O Y_h + b_O)`. The two activation functions are:

- `f_h(z) = max(beta*z, z)`: LeakyReLU, with beta = 0.01.
- `f_O`: hard tanh. It clamps to [-1, 1], the range of singular-vector
  elements.

## Block structure

```
 raw_* --> preprocess --+
 ten_* -----------------+--> unfold --X1,X2,X3--> matrix_mux --S0=0--> shallow_nn NN1 --+
                                  (MUX S0,S1,          (4x80 ->80x4)   |  V (test)
                                   DeMUX S0)  --S0=1--> shallow_nn NN2 --+----> kernel_unit --> kernel_memory --K--> classifier --> label, score
                                                        (20x16->16x2)          ^  (k_z(i))         (k1*k2*k3)          ^
 nn_*  --> nn_memory (weights of both networks) --------^                     |                                    |
 svm_*, coef_* --> svm_memory (training V's, beta_i, b) ------------------------+------------------------------------+
                         tsvm_ctrl sequences everything
```

| Module | Role |
|---|---|
| `nn_tsvm_top` | Top level. It wires the blocks above and exposes the load ports. |
| `tsvm_ctrl` | The sequencer FSM of the cascade. It drives the MUX/DeMUX selects S0 and S1. |
| `preprocess` | Reduces a raw 30,000-frame recording to the 4x4x20 tensor (window, then bin means) and writes it into `unfold`. |
| `unfold` | The tensor buffer. It streams X1, X2 and X3 in parallel, one element of each per cycle. |
| `matrix_mux` | MUX (S0, S1) over X1/X2/X3, and DeMUX (S0) to NN1 or NN2. |
| `shallow_nn` | One network: input buffer, hidden layer, Y_h buffer, output layer, and the V buffer ("vector to array"). |
| `fc_layer` | One fully connected layer, evaluated neuron by neuron. |
| `prune_mac` | Multiply-accumulate that skips pruned (zero) weights and biases. |
| `leaky_relu`, `hard_tanh` | The two activation functions. |
| `nn_memory` | Weights and biases of both networks, one read port. |
| `svm_memory` | Training singular vectors, plus the coefficients beta_i and b. |
| `kernel_unit` | One kernel factor k_z. It contains `exp_unit`. |
| `exp_unit` | Bit-serial `exp(-x)`. |
| `kernel_memory` | Holds k1, k2, k3 for every training tensor and forms their product K. |
| `classifier` | Accumulates beta_i K_i, adds b, and outputs the sign. |
| `nn_pkg` | Number formats, the activation enum and helper functions. |

## The shallow network engine

`shallow_nn` runs its two layers one after the other. Each layer
(`fc_layer`) handles one output neuron at a time:

1. It reads the bias, then the weights `W[j][i]` together with the inputs
   `x[i]`. All memories are synchronous, like block RAM, so the data
   arrives one cycle after the address.
2. It accumulates in `prune_mac`.
3. It rescales the sum to a data word, saturating, and applies the
   activation.
4. It writes `y[j]`.

A neuron therefore takes IN + 3 cycles. A whole network takes
`H*(M*N+3) + N*T*(H+3) + 2` cycles:

| Network | Cycles | Time at 100 MHz |
|---|---|---|
| NN1 | 90,982 | 0.91 ms |
| NN2 | 14,298 | 0.14 ms |

**Pruning.** An operation whose coefficient has magnitude <= 1e-4 is
skipped. The multiply is not enabled, and a zero bias counts as absent.
With 12 fraction bits, 1e-4 is below one LSB, so the default threshold
`PRUNE_THR = 0` skips exactly the zero words. Skipping saves multiplier
activity, not cycles: the schedule stays fixed. Each skipped operation
pulses `skip` for observation.

**Memory layout.** A network's region in `nn_memory` holds, back to
back:

1. `W_h`: H x (M*N), row-major.
2. `b_h`: H words.
3. `W_O`: (N*T) x H, row-major.
4. `b_O`: N*T words.

In the top level, NN1 occupies words 0 to 90,019 and NN2 occupies words
90,020 to 104,171. The input matrix is taken in row-major order. The
output vector is read as V in row-major order: element (r, c) of V is
output neuron r*T + c.

## Kernel factor arithmetic

This is the subtlest part of the datapath.

`kernel_unit` runs the t*t entries of `Z = Vx^T Vy` one after another.
Each entry `Z[i][j] = sum_r Vx[r][i] Vy[r][j]` takes n multiply-accumulate
cycles. The entry is then truncated to 12 fraction bits, squared and
added to `trace(Z^T Z)`. The unit then forms
`(t - trace) * GAMMA_Q / 2^12`:

- A negative difference is clamped to 0, so k is never above 1.
- `GAMMA_Q` is `1/(2 sigma^2)` in Q.12. Its default, 1.0, is this
  design's choice, because sigma is a trained hyper-parameter.

The result goes to `exp_unit`, which evaluates `exp(-x)` as a product of
the constants `exp(-2^(k-12))` for the set bits k of x. Each constant is
rounded to 16 fraction bits, and one bit is handled per cycle. The result
is within about 24 LSB (2^-16) of the exact value.

The truncation of each Z entry limits accuracy. Against real arithmetic,
the kernel factors agree within about 1.5% of full scale.

Latency of one factor: `t*t*n + 25` cycles, which is 1,305 for NN1's
shape and 89 for NN2's.

## Control sequence and timing

`tsvm_ctrl` runs one classification as follows. For z = 1, 2, 3:

1. Stream X_z through the MUX/DeMUX into its network's input buffer
   (about 320 cycles). The select encoding is:
   - S0=0, S1=0: X1 to NN1.
   - S0=0, S1=1: X2 to NN1.
   - S0=1: X3 to NN2.
2. Run the network.
3. Compute k_z for all NT training tensors. Each result goes into
   `kernel_memory`.

Finally, one pass over i reads `K_i = k1*k2*k3` and `beta_i`, one per
cycle. The classifier accumulates them, adds b and raises `done`.

With the default NT = 200, the measured latency from `start` to `done` is
737,834 cycles, which is 7.4 ms at 100 MHz. The real-time limit for touch
is 400 ms. About 70% of the time is spent in the kernel factors, which
grow linearly with NT: NT = 900 takes 2.63 M cycles (26.3 ms).

## Number format

Data words are signed 16-bit with 12 fraction bits (range [-8, 8)). This
covers tensor samples, weights, biases, singular-vector elements, beta_i
and b. The other formats are:

| Quantity | Format |
|---|---|
| Products and accumulators | 48 bits, 24 fraction bits |
| Kernel values | Unsigned 17 bits, 16 fraction bits (1.0 is exact) |
| Score | 48 bits, 28 fraction bits |

Rescaling is by arithmetic right shift (truncation), followed by
saturation to 16 bits.

## Using the design

Parameters of `nn_tsvm_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `NT` | 200 | Number of training tensors. It sizes `svm_memory`, `kernel_memory` and the address ports. |
| `GAMMA_Q` | 4096 | 1/(2 sigma^2) in Q.12. |
| `PRUNE_THR` | 0 | Raw magnitude threshold for pruning. |
| `BETA_Q` | 655 | LeakyReLU slope, as beta * 2^16. |

The tensor and network sizes are local parameters fixed to the 4x4x20
configuration. `shallow_nn` itself is fully parameterized by
`M, N, H, T`.

Load the memories while the design is idle. All data words are Q3.12.

| Port | Contents and address |
|---|---|
| `ten_we/addr/data` | Tensor element (i1, i2, i3) at `i1 + 4*i2 + 16*i3`. |
| `raw_valid/first/frame` | Alternatively, a raw recording: one 16-taxel frame per `raw_valid`, taxel (i1, i2) at `i1 + 4*i2`, `raw_first` on frame 0. Send frames only while `raw_ready` is high; it drops for 16 cycles after each bin. `raw_done` pulses when the tensor is complete. |
| `nn_we/addr/data` | Network weights: NN1 region from 0, NN2 region from 90,020 (layout above). |
| `svm_we/addr/data` | Training tensor i from `i*672`: V1 (80x4) at +0, V2 (80x4) at +320, V3 (16x2) at +640, each row-major. |
| `coef_we/addr/data` | `beta_i` at address i, and `b` at address NT. |

To classify, pulse `start`. `busy` stays high until `done` pulses. After
that, `label` (1 = positive class) and `score` are held until the next
start. Reset is synchronous and active low (`rst_n`). It clears the
control state and accumulators, not the memories.

### Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nn_tsvm_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/nn_pkg.sv tb/tb_nn_tsvm_top.sv -o sim
obj_dir/sim
```

The same command works for any `tb/tb_<module>.sv`.

| Testbench | What it does | Run time |
|---|---|---|
| `tb_nn_tsvm_top` | The complete classifier at its default sizes: streams a raw 30,000-frame recording through `preprocess`, loads random networks and a 200-tensor training set, and runs two classifications (positive and negative). | About 10 s |
| `tb_nn_tsvm_scaling` | The same with NT = 900. | About 15 s |
| `tb_nn_scaling` | `shallow_nn` alone at hidden/output sizes 40/32, 140/320, 400/256 and 400/6400, including a full 80x80 V. | About 8 s |

`tb_nn_tsvm_top` compares every network output bit-exactly, checks all
600 kernel factors and the decision value against real-arithmetic
models, and counts each mechanism: pruning, the negative LeakyReLU
branch, hard-tanh saturation both ways, each MUX route, both labels and
the tensor words written by the pre-processing. The pre-processed tensor
must be within one LSB of the exact bin means.
The shared integer and real reference models are in `tb/tb_ref_pkg.sv`.

## Departures and choices

- **Arithmetic.** The reference implementation evaluates the networks in
  floating point. This RTL uses the fixed-point formats above. The
  networks and layer structure are unchanged. Accuracy depends on the
  trained weights fitting Q3.12, which has not been verified with real
  trained weights. None were available, so all tests use synthetic data.
- **Latency.** The reference reports 14.5 ms for the three SVDs and 36 ms
  per classification with NT = 200. This datapath, with one MAC per
  cycle, needs 1.96 ms and 7.4 ms.
- **The rank term.** The rank term in the kernel formula is taken to be
  t, the number of kept singular vectors.
- **Sigma.** Sigma (GAMMA_Q) is a parameter with default 1.0.
- **Clamp.** k is clamped at 1.
- **Exponential.** The exponential method (bit-serial constant product)
  is this design's own.
- **Kernel memory.** The kernel memory keeps all 3 x NT factors, so each
  network runs once per unfolding. The publication shows the kernel
  memory and the three factors but not its organisation.
- **Unfolding order.** For X1 the column index is `i2 + 4*i3`, for X2 it
  is `i1 + 4*i3`, and for X3 it is `i1 + 4*i2`. The select encoding of
  the MUX/DeMUX, the memory layouts and the load ports are also this
  design's own.
- **Pruning.** Pruning skips operations but does not shorten the
  schedule.
- **Pre-processing in hardware.** The reference applies the
  pre-processing offline to the dataset. Here it is an optional block in
  front of the tensor buffer. It streams the frames through 16 running
  sums, so the truncated recording is never stored. The published
  pseudocode's loop bounds are inclusive, which would take one frame too
  many. This design uses the interval [10,500, 21,000) and 20 bins of
  exactly 525 frames. The mean is a multiply by round(2^24/525) followed
  by a rounding shift.
- **Not included.** The offline parts are not hardware and are not
  included: network training, hyper-parameter search and computing the
  training V matrices.
