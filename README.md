# A trainable fast-transform network in hardware

Fast trigonometric transforms (Fourier, Hartley, cosine, sine, Walsh-Hadamard,
Haar, Vilenkin-Chrestenson) can all be written as one shared graph of small
4-point *primitive operations* (POs). Only the coefficients inside each PO
change from one transform to another. This is the "unified" or
U-transformation algorithm. If each PO is replaced by four linear neurons, the
graph turns into a neural network whose weights *are* the transform
coefficients. Training that network with back-propagation then finds the
coefficients of a transform. The target can be a known one, or a new one that
gives a signal the spectrum you want.

This repository holds synthesizable SystemVerilog for such a **transformation
synthesis unit (TSU)**: the network, its storage, a processing-element array,
and a layer sequencer. In an adaptive DSP system the TSU sits next to a
transform execution unit. The TSU picks the coefficients and the execution
unit runs the transform. The execution unit and the host processor are not
part of this RTL.

Sizes, at the default N = 16:

| quantity | formula | N = 16 | N = 256 |
|---|---|---|---|
| layers (stages) m | log2 N − 1 | 3 | 7 |
| neurons | N·m | 48 | 1792 |
| weights | 4·N·m | 192 | 7168 |
| weights of a one-layer N×N linear network, for comparison | N² | 256 | 65536 |
| storage bits M | N·m·(4·N_w + N_y + N_δ) | 4608 | 172032 |

## The graph (`ugraph_addr`)

This is the part that is easiest to get wrong. An N-point U-transformation
consists of two N/2-point U-transformations and then a *join stage* of N/4
four-point POs. Unrolled, that gives m = log2 N − 1 stages, each with N/4 POs
over N data lines.

Stage s works on blocks of S = 2^(s+1) lines. Each block has two halves of
L = S/2 lines. In the block starting at `base`, join-stage PO number q touches
these lines:

```
q = 0 :  base + {0,  L/2,  L,    L + L/2}
q > 0 :  base + {q,  L-q,  L+q,  S-q}
```

So line k of each half is paired with its mirror line L−k, as in fast
Hartley-style algorithms for real data. Example for N = 16, stage 3:
{0,4,8,12}, {1,7,9,15}, {2,6,10,14}, {3,5,11,13}. Stage 1 joins the
consecutive groups {0..3}, {4..7}, and so on.

Two properties matter for the hardware:

* **The graph works in place.** A PO writes its four outputs back onto the
  same four lines it read. No transposition step is needed between stages.
  Each neuron can therefore be stored at (layer, line).
* **Each line feeds exactly one PO in the next stage.** The error of a neuron
  in layer l−1 at line q therefore comes entirely from the single PO of
  layer l that holds line q. That PO computes the error and writes it
  straight into the record at (l−1, q). No error ever has to be accumulated
  across POs.

The construction rule (two halves plus a join stage of N/4 four-point POs) is
the method's own. The mirror pairing inside a join stage is this design's
choice. If your coefficient tables assume a different pairing, change only
`ugraph_addr` and the `line_of` function in `tb/tsu_ref_pkg.sv`. Inputs are
read, and outputs written, in data-line order. Any reordering to natural
order (for example bit reversal) is left to the host.

## One PE = one PO = four neurons (`neuron_pe`)

Neuron k of a PE holds weights `w_k[0..3]`, where `w_k[n]` plays the role of
the PO coefficient V(n,k). All four neurons share the PO's four inputs `x`.

* **Operative mode:** `y_k = Σ_i x_i · w_k[i]`
* **Correction mode:**
  * own error: `δ_k = z_k − y_k` in the output layer. In an inner layer,
    `δ_k` is the value that the next layer stored earlier in the same pass.
  * error sent back to the neuron that drives input i:
    `δ_prev[i] = Σ_k δ_k · w_k[i]`
  * weight update: `w_k[i] ← w_k[i] + 2^−j · δ_k · x_i`

The learning rate is limited to η = 2^−j, so multiplying by η is a shift.
The error sent back uses the weights from before the update. All 16 products
of each equation are computed in parallel, in one combinational step.

**Number formats** (set in `tsu_pkg`, chosen by this design):

* weights: 16-bit Q2.14, range [−2, 2)
* y and δ: 16-bit Q8.8
* every right shift rounds to nearest (half up)
* every result saturates to 16 bits

The weight-update shift is (2·8 − 14) + j = 2 + j bits. To change widths,
edit `tsu_pkg`. Its `sat16` helper assumes 16-bit fields.

## Storage unit (`neuron_mem`, `sample_buf`)

Each neuron is one 96-bit record `{w3, w2, w1, w0, y, δ}` (`tsu_pkg::neuron_t`),
stored at word (layer−1)·N + line. `neuron_mem` is a register file with one
port per neuron of the PE array (P = 4K) in each of two port groups, plus a
host port:

| port group | layer it addresses | reads | writes (each field has its own enable) |
|---|---|---|---|
| own | current layer | whole record | weights, y, δ |
| prev | current layer − 1 | y (the PO inputs) | δ (the error sent back) |
| host | any layer | whole record | one weight |

Reads are combinational and writes happen on the clock edge. Memories are not
reset. The host loads the weights, and a run always writes y and δ before it
reads them.

Two `sample_buf` instances (N × 16 bits) hold the training input x, which
feeds layer 1, and the reference z, which the output layer is compared with.

## Operational unit and schedule (`pe_array`, `tsu_ctrl`)

The array has K PEs, 1 ≤ K ≤ N/4. The default K = N/4 maps a whole layer
onto the array. In step t, PE k handles PO t·K + k. One step takes one
clock, so one layer takes ⌈N/(4K)⌉ clocks. If K does not divide N/4, the last
step of each layer leaves some PEs idle. `po_valid` marks which PEs hold a
real PO, and the write enables of the other PEs are masked.

* **Evaluation run** (`train = 0`): layers 1 … m in order, writing y.
  This takes m·⌈N/(4K)⌉ clocks.
* **Training run** (`train = 1`): the same forward pass, then layers m … 1 in
  reverse order in correction mode. Each layer writes its new weights. Layer m
  also writes its own δ = z − y, and every layer above 1 writes the errors of
  the layer below it. This takes 2·m·⌈N/(4K)⌉ clocks.

With `start` high at clock edge 0, the steps fill edges 1 … m·⌈N/(4K)⌉, or twice
that when training. `done` is high during the clock after the last step.
`busy` is high from the edge after `start` until the last step. A `start`
while `busy` is ignored. At the defaults, an evaluation takes 3 clocks and a
training iteration 6.

## Using it (`tsu_top`)

1. Write every weight: set `h_layer`, `h_line`, `h_widx`, `h_wd` and pulse
   `h_we_w`. The four neurons of a PO sit on the PO's four lines, and neuron k
   uses output k's coefficients.
2. Write the N input samples (`smp_ref = 0`) and, for training, the N
   reference samples (`smp_ref = 1`) through `smp_we/smp_addr/smp_data`.
3. Pulse `start` with `train` and `eta_j` set, then wait for `done`.
4. Read any neuron's record on `h_rd`, addressed by `h_layer/h_line`. The
   output-layer `y` values are the transform outputs. The weights are the
   synthesized coefficients.

Training is one sample per run. Looping over a training set, and deciding when
to stop, is up to the host. Host writes are only allowed while `busy` is low,
and an assertion checks this.

## How far to trust it

The testbenches compare every output with a separately written
integer-arithmetic model in `tb/tsu_ref_pkg.sv`: flat arrays,
division-based line indexing, and matrix-style PO evaluation. The comparison
is bit-exact.

* `tb_tsu_top` (default N = 16, K = 4, nothing overridden):
  * Loads the 4-point Walsh-Hadamard coefficients everywhere. The output
    energy must then equal exactly 4^m times the input energy.
  * Perturbs the weights and trains the network back toward that transform
    over 150 single-sample iterations, comparing all 48 records after every
    iteration.
  * The squared output error falls about 100-fold.
  * Checks every run length, and counts that each mechanism occurred:
    operative steps, correction steps, output-layer errors, errors sent back,
    weight corrections, evaluation runs, training runs, and two learning
    rates.
* `tb_tsu_workload` runs four syntheses in a few seconds:
  * N = 64 with K = 4, toward a normalized (±0.5) Walsh-Hadamard target.
  * The 256-point size with K = 16 (4 steps per layer), toward the same kind
    of target.
  * N = 64 with K = 2 (8 steps per layer), synthesizing a transform that maps
    a sampled cosine onto a spectrum of prescribed form, a straight line.
    This is the "spectral image of prescribed form" use of the network. Its
    squared error falls about 2,000-fold.
  * N = 32 with K = 3, where the PE count does not divide the 8 POs of a
    layer, so the last step of each layer leaves one PE idle.
* Block testbenches `tb_ugraph_addr`, `tb_neuron_pe`, `tb_pe_array`,
  `tb_neuron_mem`, `tb_sample_buf` and `tb_tsu_ctrl` check each unit against
  the model, against structural properties of the graph, or against
  cycle-by-cycle schedules.

What is *not* verified: coefficient sets for the Fourier, Hartley, cosine,
sine, Haar and Vilenkin-Chrestenson transforms. Their per-PO matrices are not
given here, so it is not shown that each of them maps onto this exact line
pairing.

## Where this departs from, or fills in, the method

* **Line pairing, widths, formats, rounding, saturation, the host interface
  and reset** are this design's choices (see above).
* **Correction-mode operation count.** The method quotes 5 multiplications
  and 4 additions per inner-layer neuron. Applying its three correction
  equations literally (four weight updates plus the error sent back) takes 8
  multiplications and 7 additions per neuron, with the η multiply done as a
  shift. The equations are followed, not the count.
* **The η shift** is arithmetic, keeping the sign, with rounding, because δ·x
  is signed. The method calls it a logical shift.
* **The default size is N = 16**, the graph size the method draws. Its
  headline example is a 256-point network. That size is a parameter
  (`tsu_top #(.N(256), .K(...))`) and is simulated by `tb_tsu_workload`.
* **The memory is a multi-ported register file**, which is fine at N = 16. At
  N = 256 a real implementation would bank the records by line instead.

## Simulating

Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/tsu_pkg.sv tb/tsu_ref_pkg.sv tb/tb_tsu_top.sv --top-module tb_tsu_top
./obj_dir/Vtb_tsu_top
```

Swap in another `tb/tb_*.sv` and its `--top-module` to run the others. Each
testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

## Files

| file | contents |
|---|---|
| `rtl/tsu_pkg.sv` | widths, fixed-point formats, neuron record type, PE mode enum, rounding/saturation helpers |
| `rtl/ugraph_addr.sv` | data lines of each PO in each stage |
| `rtl/neuron_pe.sv` | four neurons, operative and correction modes |
| `rtl/pe_array.sv` | K PEs with their line addresses |
| `rtl/neuron_mem.sv` | neuron record storage |
| `rtl/sample_buf.sv` | input / reference sample buffer |
| `rtl/tsu_ctrl.sv` | layer sequencer |
| `rtl/tsu_top.sv` | the synthesis unit |
| `tb/tsu_ref_pkg.sv` | reference model |
| `tb/tsu_train_run.sv` | parameterized synthesis run used by `tb_tsu_workload` |
| `tb/tb_*.sv` | testbenches |
