# Window-skipping parallel turbo decoder (LTE, Max-Log-MAP)

An iterative turbo decoder spends most of its energy re-processing parts of the
frame that have already converged. This design cuts that work out: the frame is
split into windows of W trellis steps, and a window whose LLRs have become
reliable is skipped in every later iteration. The SISO does not compute it and
the frame memories are not read or written for it.

The design follows the technique described in M. Martina, C. Condo, M. Ruo Roch
and G. Masera, "Computation reduction for turbo decoding through
window-skipping". It is built around a parallel LTE turbo decoder with the
reference sizes of that work:

| quantity | value |
|---|---|
| frame length N | 6144 trellis steps |
| parallel SISOs P | 8, each owning M = N/P = 768 steps |
| window length W | 32 steps, so M_W = M/W = 24 windows per SISO |
| iterations | 8 (16 half iterations) |
| algorithm | Max-Log-MAP, extrinsic scaling delta = 0.75 |
| channel LLRs | 5 bits |
| extrinsic / a-priori LLRs | n_e = 8 bits |
| state metrics | n_s = 12 bits |
| code | LTE: 8-state RSC, feedback 1+D^2+D^3, parity 1+D+D^3, QPP interleaver |

## The skipping rule

During a window, each a-priori LLR is compared with a threshold theta when it
is read, and each extrinsic LLR is compared with theta when it is produced.
The skip flag of the window is the AND of all 2W comparisons:

    sigma(i,j) = AND over l of ( |apr(i,j,l)| >= theta  and  |ext(i,j,l)| >= theta )

Here i is the SISO and j is the window. Once sigma is 1, the window is not
processed again in that frame: its extrinsic LLRs and hard decisions stay as
they were. The threshold is a run-time input. The published evaluation uses
theta = 4, 8, 10 and 11; theta = 10 is the largest saving reported without
loss in bit-error rate.

## Why skipping does not break the recursions

A sliding-window decoder must start the forward (alpha) and backward (beta)
recursions of each window from border metrics. This design uses
*border-metric inheritance* instead of training recursions:

* **Backward borders.** At the end of its backward pass, window j stores
  beta at its first step. At the next iteration, that value starts the
  backward pass of window j-1. Entry 0 of SISO i+1 starts the last window of
  SISO i. A skipped window writes nothing, so its neighbour reuses the older
  value. Nothing extra is needed.
* **Forward borders inside a SISO.** Normally window j+1 starts from the alpha
  that window j has just produced. If window j was skipped, that alpha does
  not exist. Storing all end-of-window alphas would cost Q·n_s bits per
  window. Instead, the SISO stores only s_hat, the index of the best state at
  the end of each window (3 bits). After a skipped window, the next window
  starts from a saturated vector: metric 0 for s_hat and -2^(n_s-1) = -2048
  for every other state. This is reasonable because a skipped window has
  converged, so one state dominates.
* **Forward borders between SISOs.** Window 0 of SISO i starts from the end
  metrics of the last window of SISO i-1. These come from the previous
  iteration, or from an older one if that window has been skipped since. SISO 0
  starts from the known encoder state 0.

The state metrics are normalised every step so that the best state has metric
0, and they are clamped at -2048. The saturated vector of the s_hat rule is
therefore an ordinary metric vector for the rest of the datapath.

## Architecture

```
            load port                              read-out port
               |                                         ^
   +-----------v-----------------------------------------+----------+
   |  sys mem (8 x 768 x 5)  par mem (8 x 768 x 10)  ext mem (8 x 768 x 9)|
   +-----------+------------------+------------------------^--------+
               |  bank network (identity / QPP permutation)|
   +-----------v------------------v------------------------+--------+
   |  SISO 0  <->  SISO 1  <->  ...  <->  SISO 7   (inter-SISO borders)|
   +-------------------------------^--------------------------------+
                                   | win_start / fwd / bwd / win_end
                              turbo_ctrl  (skip_req of every SISO)
```

### Frame memories and the bank network

There are three memories, each split into P single-port banks of M words
(`llr_bank_mem`). Bank i holds steps i·M to i·M+M-1 in natural order.

* **Systematic memory:** the systematic channel LLRs.
* **Parity memory:** the parity LLRs of both encoders. Those of encoder 2 are
  stored in the interleaved order in which encoder 2 sees them.
* **Extrinsic memory:** the extrinsic LLR of each step and its hard decision,
  in natural order. One half iteration reads a-priori LLRs from it, and the
  same locations receive the new extrinsic LLRs.

In the first half iteration, SISO i reads and writes bank i directly. In the
second half iteration, it works on interleaved step t' = i·M + t, which lives
at natural index pi(t'). For the LTE QPP interleaver, the P indices
pi(i·M + t) fall into P different banks at the same offset pi(t) mod M. So a
P x P permutation of the banks serves all SISOs in one cycle with no
conflicts. An assertion in `turbo_decoder` checks this property during every
second half iteration.

### Lockstep schedule (`turbo_ctrl`)

All SISOs work on window j of their own sub-frame at the same time. This keeps
the interleaved accesses conflict free. Each window slot runs as follows:

| phase | cycles | what happens |
|---|---|---|
| SLOT | 1 | Each SISO reports whether its window j is flagged. If every SISO skips it, the slot ends here. |
| READ + DRAIN | W + 1 | Frame memories are read (1-cycle latency) and each active SISO runs its forward recursion. |
| BWD | W | Backward recursion. The extrinsic LLR of step W-1 down to 0 is written back in the same cycle. |
| END | 1 | Border beta, s_hat and the new sigma are stored. |

A computed slot takes 2W+3 = 67 cycles and a fully skipped slot takes 1
cycle. One frame takes

    1 + (2·ITER·M_W − S)·(2W+3) + S   cycles,

where S is the number of fully skipped slots. Without skipping, that is 25 729
cycles at the reference sizes.

When only some SISOs skip a slot, those SISOs stay idle and their banks are
not enabled. This saves energy and memory bandwidth, but not time.

### SISO (`siso`)

| module | role |
|---|---|
| `bmu` | The four branch metrics u·(Lsys+Lapr) + p·Lpar, with a positive LLR favouring bit 1. |
| `acs_unit` ×2 | Forward and backward max-select recursions, with normalisation and saturation. |
| `alpha_mem` | The W alpha vectors of the current window (3072 bits). |
| `llr_unit` | Computes the extrinsic LLR from alpha_l, the branch metrics and beta_(l+1), scales it by 0.75 (`3x >>> 2`, floor), saturates it to 8 bits and takes the hard decision from the a-posteriori LLR. |
| `beta_border_mem` | The inherited backward borders: M_W vectors per constituent code. |
| `window_status_mem` | sigma and s_hat per window and per constituent code. |
| `skip_detector` | The running AND of the threshold tests. |
| `state_argmax` | Finds s_hat. |
| `alpha_init_mux` | Picks the first alpha of a window: fresh, from s_hat, from the neighbour, or the start state. |
| W-word input buffer | Keeps the LLRs read in the forward pass for the backward pass, so each LLR is read from the frame memories once per window. |

### Memory budget at the reference sizes

| memory | bits |
|---|---|
| state-metric memories (8 SISOs) | 24 576 |
| backward borders | 18 432 per constituent code (36 864 total) |
| s_hat | 576 per constituent code (1 152 total) |
| skip flags | 192 per constituent code (384 total) |
| frame memories | 6144 × (5 + 10 + 9) = 147 456 |

## Interface of `turbo_decoder`

| signals | use |
|---|---|
| `in_valid, in_k, in_sys, in_par1, in_par2` | Load one step while `busy` is low. `in_par2` is the parity of interleaved step `in_k`. Loading a step also clears its extrinsic LLR, so load every step of a frame. |
| `start, theta[7:0], skip_en` | Start decoding. Keep `theta` and `skip_en` stable until `done`. |
| `busy, done` | `busy` is high while decoding. `done` pulses for one cycle at the end. |
| `out_en, out_k, out_bit` | Hard decision of bit `out_k`, valid one cycle after `out_en` (only while `busy` is low). |
| `cnt_cycles, cnt_win_done, cnt_win_skip, cnt_slot_skip, cnt_shat_init` | Per-frame statistics, cleared by `start`. |

The reset (`rst_n`) is asynchronous and active low. Parameters: `N`, `P`,
`W`, `ITER`, and the QPP coefficients `F1`, `F2`. The parameters must meet
these conditions:

* N must be divisible by P·W.
* F1 and F2 must form a valid QPP for N.

LTE lists a coefficient pair for every block size; for N a power of two, any
odd F1 with an even F2 works.

## Choices made in this implementation

These points are not fixed by the original technique:

* **Interleaver.** The interleaver is the LTE QPP with the K = 6144
  coefficients (263, 480). The address is computed directly with multipliers
  and a modulo.
* **Frame termination.** The frame is treated as unterminated, with no tail
  bits. The backward recursion at the end of the frame starts with all states
  equally likely.
* **Window schedule.** Within a window, the forward pass runs first, then the
  backward pass; windows do not overlap. This costs about 2W cycles per window.
  A pipelined schedule would roughly halve that, but needs a more elaborate
  state-metric memory.
* **Skipping across SISOs.** In the lockstep organisation, a window skipped by
  only some SISOs saves energy and bandwidth. Only a slot skipped by all SISOs
  saves time.
* **Fresher inter-SISO border.** The last window of SISO i takes its backward
  border from entry 0 of SISO i+1, which was already refreshed in the same half
  iteration. This is one iteration fresher than plain inheritance.
* **Two sets of status memories.** Border metrics, s_hat and sigma are kept
  separately for each constituent code. The published memory figures count
  one set.
* **Permanent skip flag.** Once set, sigma stays set until the next frame.
* **Hard decisions.** A window writes its hard decisions whenever it is
  computed, in either half iteration. A window skipped until the end keeps the
  decision from the last time it was computed.
* **Other details.** The load and read-out ports, the statistics counters, the
  tie-break of s_hat (the lowest state wins), the rounding of delta, and the
  10-bit branch metric width are also this implementation's choices.

## Measured behaviour

`tb_workload_snr` decodes random frames at the reference configuration, with
two frames per point. It quantises the channel LLRs 2y/σ² to 5 bits in two
ways: as integers (LLR step 1) and with one fractional bit (LLR step 1/2).
The tables give bit errors, and the share of skipped windows in brackets.

LLR step 1:

| Eb/N0 | no skipping | theta=4 | theta=8 | theta=10 | theta=11 |
|---|---|---|---|---|---|
| 1.2 dB | 0 | 0 (24 %) | 0 (10 %) | 0 (3.5 %) | 0 (1.8 %) |
| 1.5 dB | 0 | 3 (40 %) | 0 (25 %) | 0 (16 %) | 0 (13 %) |
| 1.8 dB | 0 | 1 (47 %) | 0 (35 %) | 0 (27 %) | 0 (24 %) |

LLR step 1/2:

| Eb/N0 | no skipping | theta=4 | theta=8 | theta=10 | theta=11 |
|---|---|---|---|---|---|
| 1.2 dB | 0 | 11 (41 %) | 0 (33 %) | 0 (30 %) | 0 (28 %) |
| 1.5 dB | 0 | 7 (47 %) | 2 (40 %) | 0 (36 %) | 0 (35 %) |
| 1.8 dB | 0 | 0 (56 %) | 0 (49 %) | 0 (45 %) | 0 (44 %) |

The trends match the published ones:

* A lower threshold skips more windows and starts to cost bit errors.
* theta >= 10 costs nothing measurable.
* The skip share grows with SNR.

With integer LLRs, theta = 10 skips 3.5 % to 27 % of the windows. This is
close to the published 5 % at 1.2 dB rising to 20 % at 1.8 dB. A finer LLR
step makes the extrinsic LLRs cross the threshold sooner and skips far more.
The channel quantisation is therefore part of tuning theta. Two frames per
point say nothing about BERs near 10^-6.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_bmu` | The branch metric unit. |
| `tb_acs_unit` | The recursion unit, against an edge-enumerating reference. |
| `tb_llr_unit` | The LLR unit, against an edge-enumerating reference. |
| `tb_skip_detector` | The skip criterion. |
| `tb_state_argmax` | The s_hat search. |
| `tb_alpha_init_mux` | The alpha initialisation choices. |
| `tb_alpha_mem`, `tb_beta_border_mem`, `tb_window_status_mem`, `tb_llr_bank_mem` | The memories, against array models. |
| `tb_qpp_interleaver` | All 6144 addresses, plus the permutation and contention-free properties. |
| `tb_turbo_ctrl` | Slot order, step indices, skip handling and the cycle formula. |
| `tb_siso` | One SISO, bit-exact against a reference Max-Log-MAP model with border inheritance, skipping and s_hat initialisation. |
| `tb_turbo_decoder` | Five frames at N=256, P=4, W=8. |
| `tb_turbo_decoder_full` | The same five frames with every parameter at its default. |
| `tb_workload_snr` | The tables above. |

The end-to-end testbenches (`tb_turbo_decoder`, `tb_turbo_decoder_full`)
contain their own encoder and AWGN channel. For every frame they check:

* every decoded bit;
* the window accounting and the cycle formula;
* that each mechanism occurred at least once: a slot skipped by all SISOs, a
  partial skip, an s_hat start, and a frame decoded with skipping off.

To run a testbench with Verilator 5 from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdec_pkg.sv \
    tb/tb_turbo_decoder_full.sv -y rtl --top-module tb_turbo_decoder_full -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run any other testbench.
The full-size decoder simulates a frame in well under a second.
