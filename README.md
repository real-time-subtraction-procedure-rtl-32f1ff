# Power-line interference remover for the ECG (subtraction procedure)

An ECG picked up near mains wiring carries a 50 Hz (or 60 Hz) sine on top of
the heart signal. A notch filter would remove it, but it would also smear the
sharp QRS complex. The *subtraction procedure* avoids that. Wherever the ECG is
locally a straight line (the P–Q, S–T and T–P stretches), the interference can
be measured exactly and stored. Inside the QRS complex the ECG hides the
interference, so the last measured period is replayed instead. The estimate is
then subtracted from the signal.

This RTL implements the procedure as a **process network**: independent
hardware nodes, each firing once per sample, joined by FIFO links. Each node
works only when its inputs hold data and its outputs have room. There is no
global schedule. The design streams samples in real time for as long as they
keep coming.

## The algorithm, sample by sample

`N` is the number of samples in one mains period, `fs / f_mains`. The default
`N = 5` fits 250 samples/s with 50 Hz mains. `N` must be odd.

The criterion for sample `X_c` needs the sample one period ahead, `X_(c+N)`.
So when sample `X_j` arrives, the network decides about sample `c = j - N`:

| step | node | formula |
|------|------|---------|
| curvature | linearity criterion | `D_c = X_(c-N) - 2·X_c + X_(c+N)` |
| decision | linearity criterion | `cr = 1` (linear) when `abs(D_c) < M`, where `M` is the dynamic threshold |
| linear estimate | linear ("K-filter") | `B_c = X_c - (X_(c-h) + … + X_(c+h)) / N`, with `h = (N-1)/2` |
| restored estimate | non-linear ("B-filter") | `B*_c = pli_(c-N)`, the estimate used one period earlier |
| selection | switch | `pli_c = cr ? B_c : B*_c` |
| output | subtract | `Y_c = X_c - pli_c` |

`D_c` compares a sample with its neighbours one full period away. A periodic
interference cancels exactly in `D_c`. What remains is the curvature of the
ECG, which is small on linear stretches and large in the QRS. Over one full
period the interference also averages to zero. On a straight line, the
centred mean equals the centre value. So `X_c` minus the mean is the
interference.

The restored estimate comes from the output itself. The switch feeds every
`pli` back to the non-linear node, which keeps the last `N` values in its
temporal buffer. This is a true loop: sample `j` cannot be restored before the
switch has decided sample `j-1`. The feedback link therefore holds one zero
token after reset, the interference of "iteration 0". Samples before the first
input count as zero.

## The dynamic threshold

A fixed `M` fails because ECG amplitude differs between patients and leads.
`dyn_threshold` derives `M` from the signal. It updates four values for every
new sample `x`, with `k = 1/500` (`D500`):

- `mmax`, the upper envelope. It jumps up to `x` when `x` is above it.
  Otherwise it decays towards `x` by `abs(mmax - x)·k`.
- `mmin`, the lower envelope. It is the mirror image of `mmax`: it jumps down
  to `x` and otherwise moves up towards `x` by `abs(x - mmin)·k`.
- `mpp = mmax - mmin`, the peak-to-peak amplitude.
- `mmu`, a slow floor of `mpp`. It drops at once to `mpp` when `mpp` is lower.
  Otherwise it creeps up by `abs(mpp)·k`.

The threshold is `M = mmu · 0.1` (`D01`). All four values start at zero. So
`M` is zero at first, and every sample counts as non-linear until the
envelopes have grown. During that time the output interference is the zero
history. The threshold settles after a few hundred samples.

In this design every value is updated from the values already computed for
the same sample. A register-by-register implementation could let the
intermediate products lag by one sample. This changes `M` only slightly.

## Number format

Samples are 32-bit signed fixed-point numbers with 16 fraction bits (Q16, so
1.0 = 65536). `pli_pkg` holds the type `sample_t`, the constants and the
product helper `qmul`. `qmul` forms the full 64-bit product and keeps bits
47..16, which rounds towards minus infinity. `D500 = 131` and `D01 = 6554` are
1/500 and 0.1 rounded to Q16.

- The linear filter divides by `N` with truncation towards zero.
- The curvature `abs(D)` saturates at the largest sample value.
- Nothing else saturates. The input should stay well inside ±16384.0. An
  ECG in millivolts is far inside this range.

## The process network

| node | module | reads | writes |
|------|--------|-------|--------|
| ND_3 stream in | `nd_stream_in` | `data_in` stream | X to ND_4, ND_7, ND_9 |
| ND_4 linearity criterion | `nd_linearity_criterion` (contains `dyn_threshold`) | X | cr to ND_8, ND_12 |
| ND_6 non-linear | `nd_non_linear` | pli feedback | B* to ND_8 |
| ND_7 linear | `nd_linear` | X | B to ND_8 |
| ND_8 switch | `nd_cr_switch` | cr, B, B* | pli to ND_9, ND_11, ND_6 |
| ND_9 subtract | `nd_subtract` | X, pli | Y to ND_10 |
| ND_10 / ND_11 / ND_12 | `nd_stream_out` ×3 | Y / pli / cr | output streams |

Each arrow in the table is a `kpn_fifo`. Its depth is `LINK_DEPTH`, 4 by
default. The feedback link ND_8 → ND_6 is built with `INIT_TOKENS = 1`. Each
node keeps its own copy of the sample history it needs: 2N samples in the
criterion, N + h in the linear node, N in the subtractor, and N − 1 in the
temporal buffer.

**Firing.** Every node is built around `kpn_node_ctrl`, which runs three
phases:

1. READ waits until every input link is non-empty.
2. EXECUTE lasts one cycle. The node computes from the link heads, registers
   its results and pops every input.
3. WRITE waits until every output link has space, then pushes to all of them
   in the same cycle.

A node therefore needs at least 3 cycles per sample. The loop ND_6 → ND_8 →
ND_6 limits the network to **one sample every 6 cycles** when nothing stalls.
At 200 MHz that is about 33 million samples/s, far above any ECG rate.

`kpn_node_ctrl` also counts iterations from 1 to `WIDTH` and then wraps. The
output nodes attach this number to each token.

## Top-level interface (`pli_remover_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 5 | samples per mains period, odd |
| `WIDTH` | 1024 | iteration counter range; output tags run 1..WIDTH |
| `LINK_DEPTH` | 4 | tokens per FIFO link |

- **Input.** `data_in_valid` / `data_in_ready` / `data_in` form a valid/ready
  stream. Hold `valid` and `data` until `ready` is seen.
- **Outputs.** There are three valid/ready streams:
  - `data_out` is the filtered ECG;
  - `pli_out` is the interference estimate;
  - `cr_out` is the criterion, where 1 means linear.

  Each stream has an `_iter` tag. A token stays steady until it is taken.
  Each stream applies back-pressure on its own; a stalled stream halts the
  network once the links fill.
- **Alignment.** The output with tag `j` belongs to input sample `j - N`. The
  first `N` outputs describe the zero history before the first sample.
- **Deviation-tracker signals.** `dt_valid`, `dt_cr`, `dt_pli` and `dt_lin`
  are strobed once per sample, when the switch fires. They carry the signals
  that a frequency-deviation tracker reads (see below).
- **Clock and reset.** `clk` drives everything. `rst_n` is an asynchronous,
  active-low reset that clears all state.

## Where this design makes its own choices

- **No frequency-deviation tracking.** The full algorithm has a node
  (`deviation_tracking`) that follows drifts of the mains frequency. It feeds
  correction coefficients to the two filters. Its equations are not
  available, so it is not built. The filters here assume that `N` is exactly
  an integer. The signals that tracker would read are on the `dt_*` ports.
  The links that would carry its results, and two inputs the chosen filters
  do not need (X into the non-linear node, pli into the linear node), are
  left out.
- **Filter shapes.** The design chooses the exact form of the curvature
  `D`, the moving-average linear filter and the one-period copy as restoring
  filter. These are the simplest forms that do the job.
- **Polarity of `cr`.** Here `cr = 1` means linear, i.e. `abs(D) < M`. Plots
  of the criterion elsewhere may show the opposite polarity, high during the
  QRS. Invert `cr_out` if that is what you need.
- **Threshold details.** The lower envelope is taken as the mirror of the
  upper one. The updates within one sample are not lagged (see above). The
  coefficient values 1/500 and 0.1 are read from the constant names `d500`
  and `d01`.
- **Sizes.** `N`, `WIDTH`, `LINK_DEPTH`, the handshakes and the reset style
  are all chosen here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. `tb_ref_pkg` is a
reference model of the whole procedure. It is written in plain 64-bit integer
arithmetic and also generates a synthetic test ECG: beats every 200 samples
with a sharp QRS and a broad T wave, slow baseline wander, and a sine with
`N` samples per period.

- `tb_pli_remover_top` runs the top at its default parameters. It streams
  1300 samples, about 5 s at 250 samples/s, with random input gaps and random
  output stalls. It then switches to full speed. It compares every token of
  all three output streams, their tags and the `dt_*` tap with the model. It
  checks that the rate is at most 8 cycles per sample; 6 is measured.
- The same test checks that the residual interference energy falls to under
  a quarter of the input's. About 1/5000 is measured.
- The test also counts each mechanism and fails if one never happens: linear
  and non-linear decisions, a full link, a stalled output, a node waiting for
  input, and a wrap of the iteration counter.
- The unit testbenches drive each node's links at random and compare every
  token with an independent computation:
  - `tb_kpn_fifo`
  - `tb_kpn_node_ctrl` (phase model and the 3-cycle firing)
  - `tb_dyn_threshold` (all five tracked values after every sample)
  - `tb_nd_linearity_criterion`, `tb_nd_linear`, `tb_nd_non_linear`,
    `tb_nd_cr_switch`, `tb_nd_subtract`
  - `tb_nd_stream_in`, `tb_nd_stream_out`

To run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pli_pkg.sv tb/tb_ref_pkg.sv tb/tb_pli_remover_top.sv \
    --top-module tb_pli_remover_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_pli_remover_top
```

The testbenches use `$urandom` and need no other files. Assertions in the
RTL check the link rules: no push into a full FIFO, no pop from an empty one,
and an offered output token stays steady until it is taken.

## Files

- `rtl/pli_pkg.sv`: sample type, fixed-point constants and helpers.
- `rtl/kpn_fifo.sv`: FIFO link.
- `rtl/kpn_node_ctrl.sv`: read/execute/write shell.
- `rtl/nd_*.sv`: the nodes.
- `rtl/dyn_threshold.sv`: the threshold.
- `rtl/pli_remover_top.sv`: the network.
- `tb/`: the testbenches and the reference package.
