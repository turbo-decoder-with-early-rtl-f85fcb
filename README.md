# LTE turbo decoder with per-bit early stopping

This is a parallel turbo decoder for the LTE code (two 8-state recursive
systematic convolutional codes with a QPP interleaver, code blocks of up to
6144 bits). It saves work by freezing every bit that is already decided. Each
extrinsic LLR in memory carries a status bit. Once the magnitude of a new
extrinsic value is above a programmable threshold, the status bit is set.
From then on the bit's extrinsic value is never written again, its A+Γ terms
are not stored, and the LLR unit has nothing to do for it. When every bit of
the block is frozen by the end of a half iteration, the decoding stops early.
At high SNR this removes most memory writes and many iterations. When
nothing freezes, the decoder behaves like a plain max-log-MAP turbo decoder
with a 0.75 extrinsic scaling factor.

Default configuration:

- 16 MAP decoders run in parallel on 16 sub-blocks.
- Each sub-block is processed in sliding windows of 64 steps.
- Soft inputs are 4 bits wide, state metrics 10 bits, and extrinsic values
  7 bits plus the status bit.
- For K = 6144 and 7 full iterations, a decoding takes 10 949 cycles. That is
  112 Mb/s at 200 MHz.

Everything here is synthesizable SystemVerilog (`rtl/`), with a self-checking
testbench for every block (`tb/`).

## Decoding schedule

A single MAP decoder per sub-block plays both component decoders in turn:

| Half iteration | Systematic `ys` and extrinsic `Le` | Parity |
|---|---|---|
| Even | natural order | `yp1` |
| Odd | QPP-interleaved order, π(i) = (f1·i + f2·i²) mod K | `yp2`, read in natural order |

In odd halves the new extrinsic values are written back to the interleaved
address, which de-interleaves them for free.

Within a half iteration, each decoder goes through its sub-block window by
window. First comes a forward recursion over the window, then a backward
recursion over the same window in reverse. The two recursions run one after
the other, not overlapped.

`tdec_ctrl` drives all decoders in lockstep. With `lw` the length of a window
(the last window of a sub-block may be shorter), a half iteration is:

| Phase | Cycles | What happens |
|---|---|---|
| init | 1 | Address generators load their start values; the stop register is set to 1 |
| forward, per window | lw+1 | Cycle c < lw issues the memory read of step ws+c. Cycle c ≥ 1 runs the forward ACS on the data read one cycle earlier. |
| backward, per window | lw+1 | Cycle c < lw reads the window buffers. Cycle c ≥ 1 runs the backward ACS, the LLR, the extrinsic, the TCU and the write-back. |
| check | 1 | End if the stop register is 1 or the iteration limit is reached |

So one half iteration takes 2 + 2·(Ks + number of windows) cycles, and a
decoding takes halves × that + 1. The first two terms are the cost of not
overlapping memory latency between phases. They make this design about 2%
slower than the ideal estimate of 2·Ks cycles per half iteration.

The last half iteration writes nothing back. Only its hard decisions matter.

## The MAP decoder (`map_decoder`)

Datapath of one step:

```
ys,yp,Lu ─► BMU ─► γ ─► SMU (8 ACS) ─► A or B register
                     │        └─► 16 × (A+γ) ─► A+Γ memory (window)
ys,yp,Lu,status ─► a-priori buffer (window)       │
                                        backward: A+Γ + B ─► LLRU ─► λ
Le = sat7( 0.75 · (λ/2 − (ys+Lu)) ),  hard decision = λ > 0
```

### Branch metrics (`bmu`)

The two codeword bits give four metrics: γ10 = s − yp and γ00 = −s − yp,
where s = ys + Lu, plus their negations γ01 and γ11. The usual factor ½ is
dropped. The LLR unit therefore produces λ = 2·LLR, and the extrinsic
formula uses λ/2.

### State metrics (`smu`, `acs`)

The SMU has eight add-compare-select units. Its `bwd` input switches them
between the forward trellis (predecessors) and the backward one (successors).

Metrics are 10-bit unsigned and are allowed to wrap (modulo normalisation).
Comparison uses a > b ⇔ MSB(a) ⊕ MSB(b) ⊕ (low9(a) < low9(b)). This is
correct as long as all metrics of a step are within 512 of each other. That
holds with 4-bit inputs and 7-bit a-priori values, and is checked by
`tb_smu` and bit-exactly by `tb_map_decoder`.

The forward pass also produces the 16 branch sums A(s′) + γ, rebased to
state 0 so that each fits in 11 signed bits. These go into the A+Γ memory,
one 176-bit word per step of the window.

### LLR (`llru`, `cs_max`)

In the backward pass, each branch's stored A+γ is added to the B of its
target state (also rebased). Two 8-input compare-select trees take the
maxima over the u = 1 and u = 0 branches. λ is their difference.

### Extrinsic scaling

Le = (x >>> 1) + (x >>> 2), where x = λ/2 − (ys + Lu). The result saturates
to −64..63.

### Sliding-window initialisation

This is the part that needs the most care.

- **Backward metrics at a window end.** In the first iteration they start at
  zero. At the end of every backward recursion, the metrics reached at the
  window start are saved in the *beta stakes* memory. One slot is kept per
  window and per half-iteration type (natural or interleaved). They are used
  as the start of the previous window in the next iteration of the same type.
  The stake for the last window of a sub-block comes from the next decoder:
  the metrics it reaches at its own sub-block start are handed over on
  `nb_beta_in`.
- **Forward metrics at a sub-block start.**
  - For the block start they are {0, −256, …} (state 0 known).
  - For the other sub-blocks they are all zero in the first iteration.
  - Later they are the final forward metrics of the previous decoder from the
    last half iteration of the same type (`nb_alpha_in`).

  Without this handover, a bit at a sub-block start whose interleaved
  position is also a sub-block start stays unreliable for ever. The QPP
  interleaver does map p·Ks onto sub-block starts, so such a bit never
  freezes and the block never stops early.
- **Block end.** The trellis is treated as unterminated, so the backward
  recursion starts from zero metrics. Tail bits are not decoded.

### Frozen bits

When the status bit read with the a-priori value is 1:

- the SMU still runs, since the recursions need the branch metrics;
- the A+Γ memory is neither written in the forward pass nor read in the backward pass;
- the LLR unit result is ignored and the TCU suppresses the write-back;
- the hard decision is taken from the sign of ys + Lu, which is dominated by
  the frozen, large Lu.

## Stopping criterion (`tcu`, `early_stop`)

Each decoder has one threshold compare unit. If the incoming status is 1, it
does nothing and disables the write. Otherwise it writes the new value with
status = (|Le| > threshold).

The early stopping unit is a one-bit register driven by `tdec_ctrl`'s
`es_sel`:

| `es_sel` | When | Action |
|---|---|---|
| 1 | init cycle | set the register |
| 0 | forward recursion | hold |
| 2 | backward step | register ← register AND (AND of all decoders' status bits) |

After the last window the register says whether every bit of the block is
frozen. The controller then ends the decoding.

Idle decoders (see below) count as frozen.

Useful thresholds are about 40–60 at rate 1/3 and somewhat lower at rate
1/2. Lower values stop earlier but cost error-rate performance.

## Parallel memory access

### Banks

The block is cut into N contiguous sub-blocks of Ks = K/N bits. Bank b holds
the ys/yp1/yp2 values and the LLR word (7-bit Le plus status) of indices
b·Ks … b·Ks+Ks−1.

### Address generation

Every decoder has a QPP interleaver (`qpp_interleaver`) made of two
multiplier-free generators:

- **Forward (`qpp_fwd_gen`)** uses π(i+1) = π(i) + g(i) and
  g(i+1) = g(i) + z. Each sum is followed by a conditional subtraction of K.
  Here g(i) = (2·f2·i + f2 + f1) mod K and z = 2·f2 mod K.
- **Backward (`qpp_bwd_gen`)** inverts the recursion:
  g(i−1) = g(i) − z, then π(i−1) = π(i) − g(i−1). It is seeded from the
  forward generator's next values in the last forward step of each window,
  and yields the window's addresses in reverse order.

### Routing

The QPP interleaver is contention free for these sub-blocks. At any step the
N interleaved addresses therefore fall into N different banks, all at the
same offset.

- **Common address.** `min_addr`, a log2(N)-level compare-select tree, finds
  the smallest address. Its offset addresses every bank.
- **Master network (`batcher_net`).** A bitonic (Batcher) sorter with
  log2(N)(log2(N)+1)/2 stages sorts the N addresses in ascending order. Sorted
  position b then belongs to bank b. The sort carries each decoder's write
  data {we, status, Le} to its bank.
- **Slave network.** It reuses the master's swap decisions, applying the
  stages in reverse order. It returns the read data {ys, status, Le} from the
  banks to the decoders. Its swap decisions are registered, because read
  data comes back one cycle after the address. Writes in the backward
  recursion go through the master network directly, keyed by the backward
  generator's addresses.
- **Natural half.** In even half iterations all decoders use the same local
  offset, so the network passes data straight through.
- **Parity.** `yp` is always read at the natural offset.

## Top level (`turbo_decoder`)

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_MAP` | 16 | MAP decoders and banks, power of two |
| `MAX_K` | 6144 | largest block; bank depth = MAX_K/N_MAP |
| `WIN` | 64 | sliding window length |

The decoder count is a build-time choice. A build with N_MAP = P has banks
of MAX_K/P entries. At run time it can use fewer decoders, but then the
block may not exceed (MAX_K/N_MAP) × (decoders used). Builds with 1, 4, 16
and 64 decoders are simulated. The window length WIN is a build parameter
too; 64 is the default and 128 is also simulated (K = 6144 on 16 decoders
then takes 10 865 cycles, 113.1 Mb/s, because there are fewer window borders).

| N_MAP | Cycles for K = 6144, 7 iterations | Throughput at 200 MHz |
|---|---|---|
| 1 | 174 749 | 7.0 Mb/s |
| 16 | 10 949 | 112.2 Mb/s |
| 64 | 2 773 | 443.1 Mb/s |

### Configuration

Hold these constant while `busy`:

- `cfg_k`: block length K.
- `cfg_map_log2`: log2 of the decoders to use. K must be a multiple of that
  count, and K/count must not exceed the bank depth.
- `cfg_iters`: maximum full iterations.
- `cfg_thr`: threshold, 0..63.
- `cfg_z`: 2·f2 mod K.
- `cfg_pi0[p]` = π(p·Ks − 1) mod K and `cfg_g0[p]` = g(p·Ks − 1) mod K: the
  values of the index *before* decoder p's sub-block, taken modulo K (so
  K − 1 for p = 0).

Unused decoders are parked on keys above every real address so the sorter
keeps them out of the way. They write nothing.

### Loading

While idle, `ld_we` with `ld_bank` = i / Ks and `ld_addr` = i mod Ks stores
ys(i), yp1(i) and yp2(i). `yp2` is the second encoder's parity at step i of
the interleaved sequence. Loading also clears that index's extrinsic value
and status.

### Run

- Pulse `start`.
- `done` pulses at the end.
- `halves` gives the half iterations performed.
- `stopped` says the criterion ended the decoding.

### Output

During every backward recursion, each active decoder p presents `hd_bit[p]`
for natural index `hd_addr[p]` under `hd_valid[p]`. Keep the values seen in
the last half iteration, i.e. the last ones before `done`.

### Size

After coarse synthesis at the defaults:

- about 7 200 flip-flops;
- 335 kbit of memory:
  - 74 kbit input;
  - 49 kbit LLR;
  - 13 kbit per MAP decoder, mostly A+Γ.

## Where this departs from the original design description

- **Neighbour handover.** Forward metrics are handed from each decoder to the
  next, and backward stakes from each decoder to the previous one, as
  described above. The description only specifies zero-initialised stakes
  saved between iterations. Without the handover the early stop could not
  trigger (see "Sliding-window initialisation").
- **Two metric registers.** Forward and backward metrics have separate
  registers; the description shows one state-metrics register.
- **Branch metric scale.** The branch metrics omit the ½ factor, and the A+Γ
  terms are stored rebased in 11 bits.
- **Frozen-bit hard decision.** It uses the sign of ys + Lu.
- **LLR unit not isolated.** For frozen bits the A+Γ read is skipped, so half of the LLR unit's inputs hold still. The unit itself is neither clock- nor operand-gated; its result is simply discarded.
- **Unterminated trellis.** There is no trellis termination or tail handling.
- **Cycle-level timing.** The timing is this design's own: one extra cycle
  per phase for memory latency, plus one init cycle and one check cycle per
  half iteration. Measured throughput is 112.2 Mb/s, against the 110 Mb/s
  quoted for the same configuration.
- **Host-side choices.** The host interface and the host-side precomputation
  of the QPP start values are this design's own choices.
- **No baseline decoder.** The 8-bit-extrinsic decoder without stopping
  criterion, used as a baseline for comparison, is not included.

## Files

| File | Content |
|---|---|
| `rtl/tdec_pkg.sv` | widths, types, control word, trellis functions, modulo compare |
| `rtl/turbo_decoder.sv` | top level |
| `rtl/tdec_ctrl.sv` | sequencer |
| `rtl/map_decoder.sv` | one max-log-MAP decoder |
| `rtl/bmu.sv`, `smu.sv`, `acs.sv`, `llru.sv`, `cs_max.sv` | MAP datapath |
| `rtl/qpp_fwd_gen.sv`, `qpp_bwd_gen.sv`, `qpp_interleaver.sv` | address generation |
| `rtl/min_addr.sv`, `batcher_net.sv`, `sorter2.sv`, `select2.sv` | routing |
| `rtl/tcu.sv`, `early_stop.sv` | stopping criterion |
| `rtl/input_mem_bank.sv`, `sp_ram.sv` | memories |

## Verification

Every module in `rtl/` except the small helpers has a testbench `tb/tb_<module>.sv`. The helpers
(`acs`, `cs_max`, `sorter2`, `select2`) are covered through their parents.
Each testbench compares against values computed independently in the
testbench and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_bmu`, `tb_smu`, `tb_llru`, `tb_tcu` | random or exhaustive stimulus against integer models; `tb_smu` includes metric wrap-around |
| `tb_early_stop` | the register behaviour for each `es_sel` value |
| `tb_qpp_fwd_gen`, `tb_qpp_bwd_gen`, `tb_qpp_interleaver` | every address against π(i) computed directly; includes the real window schedule |
| `tb_min_addr`, `tb_batcher_net` | sorting, payload and inverse routing, for random and QPP address sets |
| `tb_sp_ram`, `tb_input_mem_bank` | memories against array models |
| `tb_tdec_ctrl` | the complete event sequence, cycle counts and the stop input, for random K and decoder counts |
| `tb_map_decoder` | bit-exact against a plain-integer max-log-MAP over four half iterations, with stakes and frozen bits |
| `tb_turbo_decoder` | 4 decoders, K = 1056 and K = 40. An encoder and a noise model feed the decoder, and the decoded bits and cycle counts are checked. It counts each mechanism: early stop, iteration limit, idle decoders, interleaved routing, frozen bits, stake reuse, short last window. |
| `tb_turbo_decoder_p1`, `tb_turbo_decoder_p64` | builds with 1 and 64 MAP decoders decoding K = 6144 (and K = 3072 on 32 of 64). Measured 7.0 and 443.1 Mb/s, against published figures of 6.9 and 439.4 Mb/s for those decoder counts. |
| `tb_turbo_decoder_w128` | build with a 128-bit window: K = 6144 in three windows per decoder (10 865 cycles, 113.1 Mb/s), early stop on a clean channel, K = 3072 on 8 decoders and K = 1056 in one partly filled window. |
| `tb_turbo_decoder_full` | the default top. K = 6144 on 16 decoders runs at the iteration limit without errors, then through a clean channel where it stops early after 8 half iterations. K = 3072 on 8 of the 16 decoders with threshold 45 covers the power-measurement set-up. Throughput is checked against 110 Mb/s · P/16 ± 5% (measured 112.2 and 56.1 Mb/s). It also counts extrinsic write-backs against a decoder without the criterion: 100% at threshold 63, 74% at threshold 45 through the noisy channel, 39% when it stops early. |

Run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/tdec_pkg.sv \
    tb/tb_turbo_decoder_full.sv --top-module tb_turbo_decoder_full
./obj_dir/Vtb_turbo_decoder_full
```

The full-size run takes a few seconds.

What is not verified: error-rate curves over SNR (the testbenches use a
crude Gaussian approximation and only check error-free decoding at moderate
noise), builds other than 1, 4, 16 and 64 decoders, window lengths other than
64 and 128, and anything after synthesis.
