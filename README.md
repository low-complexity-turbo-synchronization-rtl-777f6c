# Turbo synchronization without initial carrier synchronization

A burst receiver for QPSK with a rate-1/3 binary turbo code. It decodes bursts whose carrier
frequency offset is too uncertain for a conventional coarse estimate. The SNR is below 0 dB and
the bursts are short, so a data-aided or blind estimator cannot get close enough for turbo
synchronization to take over. Instead the receiver tries a grid of **trial frequencies**. Each
trial is corrected and briefly decoded, and it is scored by how well the burst matches the
decoder's soft symbol estimates. The best trial then enters **turbo synchronization**: decoder
iterations alternate with a fine frequency and phase estimate that uses the decoder's own soft
decisions.

Decoding a trial costs one or two full turbo iterations, so the receiver cuts the number of
trials it decodes. A cheap test runs first. The trial-corrected burst is correlated with the
known unique words, and the correlation gives a phase estimate for the trial. If the
correlation's magnitude is below a threshold, the trial is dropped before any decoding.
Depending on the threshold, roughly 40 % to 60 % of the trials are dropped this way. The same
hardware does all the work for both steps: frequency/phase correction, correlation with soft
symbols, and the decoder.

## Burst and number formats

```
| start UW (40 sym) | code word (3K/2 QPSK symbols) | end UW (24 sym) |      L = 3K/2 + 64
```

* The main configuration is K = 832 information bits, a 2496-bit code word (1248 symbols) and
  L = 1312. The memories are sized for K up to 5124, a 15 372-bit code word and L up to 7750.
* Code-word bit order: for each information bit k come s_k, then p1_k, then p2_k. Symbol m
  carries bit 2m on I and bit 2m+1 on Q. Bit 0 maps to +1.
* The unique words are one QPSK sequence taken from a length-127 LFSR (x^7+x^6+1, seed 0x5A),
  two bits per symbol (`ts_pkg::uw_sym/uw_next`). Replace it with the real UW if you have one.
* Received samples are 8-bit signed I and Q (`cplx_t`).
* Phases are 16-bit words, with 2^16 = one turn. Frequencies are signed 24-bit phase
  increments per symbol, with 2^24 = one turn per symbol. A grid step of 2e-4 cycles/symbol is
  therefore 3355.
* LLRs are log P(0)/P(1). Channel LLRs are 6 bit (±31). Extrinsic and APP LLRs are 8 bit. The
  LLR-to-soft-symbol table takes one LLR unit as 1/4.
* Component code: 16-state RSC, feedback 1+D^3+D^4 (octal 23) and feed-forward 1+D+D^3+D^4
  (octal 33). The trellis starts in state 0 and is not terminated (the code word is exactly
  3K bits).
* Interleaver: QPP, pi(i) = (f1·i + f2·i²) mod K. For K = 832, f1 = 25 and f2 = 52.

The code polynomials, interleaver, unique words, bit order and all widths except the 6-bit
decoder input are this design's choices. The source design does not publish them.

## Architecture

```
           +--------------------- Sym RAM (2 pages) ----------------------+
           |                                                              |
           v                                                              v
   Pre: F/P correction      LLR-In RAM        MAP decoder      LLR-Out RAM     Post: LLR->symbol
        UW correlation  -->  (2 pages,   -->  (Max-Log-MAP, -->  (2 pages,  -->  correlation
        phase estimate       3 banks)         half iteration)    3 banks)        F/P estimate
        threshold test
        QPSK -> LLR
           ^                                   ^                                  ^
           +---------------------------- Control ---------------------------------+
```

| module | role |
|---|---|
| `turbo_sync_top` | wires everything; burst write port, configuration, results, decoded-bit read port |
| `ctrl_unit` | trial loop, exclusion, selection, turbo-synchronization loop, page swaps |
| `pre_unit` | rotation by −(f·l+φ); UW correlation k, arg k, \|k\| ≥ threshold; demapping to LLRs |
| `map_decoder` | one half iteration of Max-Log-MAP, with extrinsic and APP outputs |
| `qpp_interleaver` | interleaver addresses, stepped forward and backward |
| `post_unit` | tanh soft symbols; half-burst correlations φ0, φ1; \|c\|, Δf, Δφ |
| `llr_ram` | double-buffered 3-bank LLR memory (used for both LLR-In and LLR-Out) |
| `pingpong_ram` | double-buffered burst memory with two read ports |
| `cordic_rotate`, `cordic_vector`, `seq_div` | arithmetic helpers |
| `ts_pkg` | widths, `cplx_t`, trellis and UW functions |

### What one burst goes through (`ctrl_unit`)

1. **Trial loop**, for i = 0 … n_trials−1 with f_i = f_start + i·f_step:
   * Pre corrects the 64 UW symbols with f_i and computes k = Σ r(l)e^{−j2πf_i l}·u*(l). If
     |k| < thresh, the trial is excluded.
   * Otherwise Pre corrects the code-word symbols with f_i and φ_i = arg k. It writes the
     channel LLRs into the free LLR-In page, and the page is swapped.
   * The MAP decoder runs `trial_iters` full iterations. Each full iteration is two half
     iterations: decoder 1, then decoder 2. The decoder writes APP LLRs into the free LLR-Out
     page, and the page is swapped.
   * Post scores the trial: |c| = |Σ_l r_{f_i,φ_i}(l)·s_e*(l)| over the whole burst. The UW
     positions use the known symbols. The largest |c| wins.
2. **Turbo synchronization** from the winner, for `max_iters` iterations:
   * Pre re-corrects the burst with the current (f, φ).
   * The decoder runs one full iteration and keeps its extrinsic information.
   * Post measures the residual offset, and f and φ are updated.
3. `done` is raised. `f_est`/`phi_est` hold the final estimate, and the decoded bits are read
   through `dec_raddr`/`dec_bit`.

The three memories are double buffered and their pages are swapped as described. The
controller itself is sequential: Pre, MAP and Post never work on different trials at the same
time. That pipelining is what the double buffering exists for, and it is the main thing
missing (see *Departures*).

### The MAP decoder (`map_decoder`)

This is the most involved block. One `start` runs one half iteration.

* **Inputs.** With `half = 0` the decoder reads the systematic and parity-1 LLRs in natural
  order. With `half = 1` it reads the systematic LLR at pi(k) and the parity-2 LLR at k.
* **A priori values.** These come from an internal extrinsic memory indexed by natural bit
  position. Decoder 1 reads and writes it at k, and decoder 2 reads and writes it at pi(k). One
  memory therefore does both the interleaving and the deinterleaving. `first = 1` zeroes the a
  priori input.
* **Branch metric.** γ(u,p) = [u=0]·(λs+λa) + [p=0]·λp. Using indicator terms instead of ±½
  keeps the output LLRs in the same scale as the inputs.
* **Forward pass.** k = 0 … K−1 at one step per clock, all 16 ACS in parallel. Each step stores
  the 16 metrics α_k (16 bit, normalised to state 0) in an internal memory.
* **Turnaround.** There is one idle clock between the passes. The interleaver generator then
  simply reverses (`qpp_interleaver` keeps pi(i) and its increment, so stepping back costs two
  modular subtractions).
* **Backward pass.** k = K−1 … 0, starting from β = 0 for all states (open trellis end). From
  α_k, γ_k and β_{k+1} the decoder forms the 32 transition metrics and takes four maxima: u=0,
  u=1, p=0, p=1.
* **Outputs of the backward pass.**
  * APP of the information bit: Λu = max(u=0) − max(u=1).
  * APP of the parity bit: Λp = max(p=0) − max(p=1). Turbo synchronization needs both.
  * Extrinsic: 0.75·(Λu − λs − λa), computed as (3x)>>>2 and saturated.
  * Writes to LLR-Out: decoder 1 writes Λp1 at k. Decoder 2 writes Λs at pi(k) and Λp2 at k.
    After a full iteration the page holds every code bit's APP.
* **Timing.** 2K + 4 clocks from `start` to `done`.

### Fine frequency and phase estimate (`post_unit`)

Post corrects the burst with the (f, φ) currently in use, so it measures the *residual* offset.
It splits the burst at L/2 and accumulates φ0 and φ1, the correlations with the soft symbols
s_e = tanh(Λ_I/2) + j·tanh(Λ_Q/2) over each half. A pipelined vectoring CORDIC then gives
arg φ0, arg φ1 and arg(φ0+φ1), plus |φ0+φ1|. The centres of the two halves are L/2 symbols
apart, so:

* Δ = arg φ1 − arg φ0 = 2π·Δf·L/2
* Δf = Δ / (π·L). In frequency-word units this is (Δ_phase-word · 2^9) / L, from a 26-clock
  divider.
* Δφ = arg(φ0+φ1) − Δ. The correlation's phase refers to the burst centre, and subtracting Δ
  refers it back to l = 0.

The controller adds Δf and Δφ to f and φ. The same |φ0+φ1| serves as the trial score.

### Timing

Everything streams at one symbol or one trellis step per clock.

| step | clocks |
|---|---|
| Pre, UW correlation | 64 + ~35 |
| Pre, correction and demapping | 3K/2 + ~20 |
| MAP half iteration | 2K + 4 |
| Post | L + ~65, including the divider |

With the main configuration (K = 832, 61 trials, 2 iterations per trial, 8 turbo-sync
iterations), a burst takes about 3.1·10^5 clocks in simulation. The exact count depends on how
many trials pass the threshold.

## Departures from the published design

* **No concurrency between units.** In the published architecture, Pre, MAP and Post work
  concurrently on different trials. Fine synchronization uses iteration n while the decoder
  runs iteration n+2. Here the units run in turn, and fine synchronization uses iteration n for
  iteration n+1. The memories are double buffered as published, so a pipelined controller can
  be added without touching the datapath.
* **Decoder schedule.** The published decoder is a windowed serial MAP with three recursion
  units running in parallel (about K clocks per half iteration, 0.02–0.06 payload bit/clock).
  This one makes two full passes (2K clocks) and stores all forward metrics (K × 256 bits).
  Its throughput is roughly half of that.
* **Rate 1/3 only.** Depuncturing for the higher code rates (up to 9/10) is not implemented.
  The puncturing patterns are unknown.
* **Restart for turbo synchronization.** Decoding of the selected trial restarts with cleared
  extrinsic information instead of continuing from the trial's own iterations.
* **Estimator equations.** The frequency estimate uses the factor and sign that make it
  consistent with the signal model r(l) = s(l)·e^{j(2πf0·l+Φ)} and with the phase estimate:
  f = arg(φ1·φ0*)/(π·L).
* **Exclusion test.** It is applied to the UW correlation |k| in Pre. The threshold is in the
  units of `uw_mag`: the raw correlation times the CORDIC gain of about 1.65 (twice: once from
  the rotator and once from the vectoring stage). Thresholds from other implementations have
  to be rescaled.
* **Correlation of the whole burst.** The trial score and the fine estimate use the whole burst,
  with the known symbols on the UW positions.
* **CORDIC gains are not compensated.** They only scale LLRs and correlations.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_map_decoder` | Four half iterations, K = 64, noisy channel. Every extrinsic and APP LLR is compared bit-exactly with an integer Max-Log-MAP model in the testbench. The run time is checked as 2K+4 clocks, and the final decisions must be error-free. |
| `tb_qpp_interleaver` | Forward and backward walks against (f1·i+f2·i²) mod K. The forward walk must be a permutation. |
| `tb_pre_unit` | UW phase estimate within 1°. \|k\| within 2 % of the expected value. Accept and exclude decisions. Every LLR's bank, address, sign and magnitude. One symbol per clock. |
| `tb_post_unit` | Δf within 1 % and Δφ within 1.5° on an uncorrected burst. Near-zero residuals on a corrected one. \|c\| for hard and for soft (tanh) symbols within 2 %. |
| `tb_ctrl_unit` | Command counts, MAP half order and `first` flag, selected trial, final f/φ, counters and page swaps, all against stand-in units. |
| `tb_llr_ram`, `tb_pingpong_ram` | Every word of both pages through all ports. |
| `tb_turbo_sync_top` | End to end at the default sizes. Two K = 832 bursts at Es/N0 ≈ −0.5 dB, with offsets of +2.37e-3 and −4.11e-3 cycles/symbol. The grid has 61 trials over ±6e-3 with 2 iterations per trial and 8 turbo-sync iterations. The second burst is written into the free Sym RAM page while the first is decoded. Checks: the selected trial is next to the true offset, the final frequency error is below a quarter grid step, there are no bit errors, and each mechanism (exclusion, acceptance, change of best trial, turbo-sync iterations, swaps of all three page selects) occurs. |

In the end-to-end run the final frequency errors are 1·10^−6 and 2.8·10^−5 cycles/symbol
(at most 0.15 of a grid step), and both bursts decode with no errors. At high SNR the trial score |c| separates trials poorly, because
the soft symbols then mostly follow the received samples. The scheme is meant for, and tested
near, its low-SNR operating point.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_turbo_sync_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ts_pkg.sv tb/tb_turbo_sync_top.sv
./obj_dir/Vtb_turbo_sync_top            # add +verbose for a per-trial trace
```

Any other testbench is built the same way. The full end-to-end run takes about a second.

## Changing it

* **Sizes.** Set `KMAX`/`LMAX` on `turbo_sync_top`. K, L, the interleaver coefficients and the
  trial grid are run-time inputs.
* **Widths.** Sample, LLR and metric widths are in `ts_pkg`.
* **Code.** Another component code means changing `rsc_next`/`rsc_parity` in `ts_pkg`. The
  decoder's ACS loops use only those two functions.
* **Iterations.** `trial_iters` trades trial-selection reliability for time. The published choice
  is 1 or 2. `max_iters` is the number of turbo-synchronization iterations (8 here).
