# Turbo decoder with turbo synchronisation and a re-encoding stop rule

A burst-mode receiver has to remove a residual carrier frequency and phase
offset before it can decode, and a turbo decoder has to decide how many
iterations to spend on each block. This design does both inside one loop:

* **Turbo synchronisation.** After every full decoder iteration the
  a-posteriori LLRs of *all* codeword bits (systematic and both parity
  streams) are turned into soft reference symbols. These symbols strip the
  modulation from the received burst, and a frequency and phase estimate is
  made from the result. The burst is de-rotated with that estimate and
  demapped into fresh channel LLRs for a later iteration. The estimator
  runs beside the decoder, so it costs no decoding time.
* **Valid-codeword iteration control.** The hard decisions of every
  half-iteration are re-encoded. The re-encoded parity is compared with the
  decoder's own hard parity decisions. Decoding stops as soon as both
  conditions hold for two successive half-iterations: the parity agrees in
  each, and no systematic decision changed between them. The decisions then
  form a codeword of the turbo code, so more iterations cannot change the
  result. No CRC or other added redundancy is needed. The parity APP LLRs
  are computed anyway for the synchroniser, so the check costs little
  hardware.

The decoder is a binary turbo decoder with 8-state component codes and
Max-Log-MAP decoding with an extrinsic scaling factor of 0.75. Channel LLRs
are 6-bit. It takes information words of up to 5124 bits (codewords up to
15372 bits) and runs at most 8 iterations (16 half-iterations) by default.

## Structure

```
              run  stop                         codeword_valid
               |    |                 +------------------------------+
               v    v                 |                              |
          +----------------+  APP beats (Λs, Λp, index)   +---------------------+
 r(l) --> |  turbo_decoder |--------------+-------------->|  iteration_control  |
 (via     |  map_decoder   |              |               |  turbo_encoder (2x   |
 fine_    |  LLR banks 0/1 |<--+          |               |  rsc_encoder), "="  |
 sync)    +----------------+   |          v               +---------------------+
                               |   +-------------+
                 new LLRs      +---|  fine_sync  |<-- r(l) samples
                 (other bank)      +-------------+
```

| module | role |
|---|---|
| `turbo_sync_decoder` | top; sequencing of synchroniser, decoder and stop rule; bank swapping |
| `turbo_decoder` | serial turbo decoder: one MAP unit, interleaver table, extrinsic memory, two channel-LLR banks |
| `map_decoder` | Max-Log-MAP unit for one component code, APP of systematic *and* parity bits |
| `iteration_control` | re-encoding check, hard-decision store (also the decoded output) |
| `turbo_encoder`, `rsc_encoder` | re-encoder: two 8-state RSC encoders |
| `fine_sync` | soft symbols, Z(0)/Z(1) correlation, offset estimate, de-rotation, demapping |
| `cordic_vec`, `cordic_rot`, `sdiv_iter` | helpers of `fine_sync`: arg(), rotation, division by the burst length |
| `tsync_pkg` | widths, `app_beat_t`, trellis functions |

## The stop rule in detail

The serial decoder produces one *APP beat* per trellis step (`app_beat_t`).
A beat holds the APP LLR of the systematic bit, the APP LLR of the parity
bit of the component code being decoded, the step index `j` and the natural
bit index `nat`. In the first half-iteration the beats come in natural
order (`nat = j`). In the second they come in interleaved order
(`nat = il[j]`). The re-encoder therefore needs no interleaver memory.
Component encoder 1 encodes the hard systematic decisions of the first
half-iteration. Component encoder 2 encodes those of the second, because
they already arrive in interleaved order.

For every beat `iteration_control`:

1. re-encodes `sign(Λs)` and compares the parity with `sign(Λp)`. A
   difference counts as a parity mismatch.
2. compares `sign(Λs)` with the decision stored for `nat` in the previous
   half-iteration. A difference counts as a systematic change. It then
   stores the new decision.

One cycle after the last beat it pulses `chk_done` and sets
`codeword_valid` if all of these hold:

* this half-iteration had no parity mismatch;
* the previous half-iteration had no parity mismatch;
* no systematic decision changed.

The first half-iteration of a block can never be valid, because there is
nothing to compare it with. The decoder waits for `chk_done` after each
half-iteration. With `ic_en` set, a valid codeword ends the block. The check
can fail on a correct word whose parity decisions are still wrong. It cannot
pass on a word that is not a codeword. Compared with a genie that stops at
the first correct word, it costs at most about one half-iteration.

## Iteration schedule and banks

```
iteration      0          1          2          3
decoder LLRs   bank0(c)   bank0(c)   bank1(0)   bank0(1)   (c = coarse, (n) = from APP of iteration n)
APP written    APP0       APP1       APP0       APP1
fine_sync                 APP0->b1   APP1->b0   APP0->b1
```

* `run` first makes `fine_sync` zero every LLR position of both banks and
  then demap the loaded burst, as received, into LLR bank 0 (`cmd_init`).
  Punctured positions keep LLR 0. The decoder then starts.
* At the end of full iteration *n*, the APP bank of iteration *n* is handed
  to `fine_sync`. It writes the LLR bank the decoder is not reading. The
  decoder meanwhile runs iteration *n+1*.
* At the next boundary the banks swap. Iteration *n+2* therefore decodes
  LLRs synchronised with the APP values of iteration *n*.
* If `fine_sync` is still busy at a boundary, the decoder is held: a stall,
  counted in `n_stall_cycles`.

One estimation takes about N + 110 cycles for N transmitted bits (3K + 110
at rate 1/3), and one iteration about
4K + 20 cycles. Stalls therefore only occur for blocks of a few hundred
bits or fewer.

Each estimate is made against the stored burst and applied to it. It is the
total remaining offset, not an increment, so estimation errors do not
accumulate.

## Serial MAP unit

`map_decoder` runs one half-iteration as two passes over the block, at one
trellis step per cycle:

* **Backward pass** (steps K-1 down to 0): computes the backward metrics β.
  β(j+1) is stored at address j. The end state is unknown: blocks are not
  terminated, so all end states start equal.
* **Forward pass** (steps 0 up to K-1): updates the forward metrics α
  (starting in state 0). From α, the stored β and the branch metric it forms:
  * `APP(sys) = max_{u=0}(α+γ+β) − max_{u=1}(α+γ+β)`
  * `APP(par) = max_{p=0}(α+γ+β) − max_{p=1}(α+γ+β)`
  * `ext = (3·(APP(sys) − sys − apr)) >>> 2`, saturated to 8 bits.

The branch metric is `γ = [u=0]·(sys+apr) + [p=0]·par`, with
`LLR = ln P(0)/P(1)`. State metrics are 14 bits and are normalised to
state 0 at every step. APP values are saturated to 10 bits.

The outputs come in natural step order, two cycles after the forward input.
This lets the re-encoder and the synchroniser take them as a stream.
`turbo_decoder` feeds the unit through a two-stage registered address
pipeline: interleaver table, then LLR and extrinsic memories. It writes the
extrinsic value back in place at `nat`, so one memory serves as both
interleaver and deinterleaver buffer. In the first half-iteration of a
block the a-priori input is forced to zero.

A half-iteration takes 2K + about 8 cycles, so a block with 8 iterations
takes about 32K cycles. That is about 0.03 decoded bits per cycle, or
7 Mbit/s at 233 MHz.

## Fine synchroniser

A burst carries N transmitted code bits. A position table gives, for each
transmitted bit n, its codeword position: the information index k and the
bit type (s, p1 or p2). The table is the puncturing pattern; positions not
listed are not transmitted. The transmitted bits are taken in pairs m:

* **QPSK:** pair m is symbol m, first bit on I, second on Q. L = N/2.
* **16-QAM (Gray):** pairs 2l and 2l+1 are the I and Q rails of symbol l.
  The first bit of a pair is the sign, the second the amplitude (0: outer
  level 3A, 1: inner level A). L = N/4.

Bit 0 is sent with the positive sign. Both passes below run at one pair per
cycle.

* **Pass A (estimation data).** Reads the APP LLRs of both bits of each
  pair and maps each to `t = 63·tanh(|Λ| / 2^tanh_sh / 8)` with the LLR's
  sign, from a 32-entry table. For QPSK the soft reference rails are the two
  t values. For 16-QAM a rail is `t0·(126 + t1) >>> 7`, the expected Gray
  level scaled to the same range. It accumulates
  `Z(k) = Σ r(l)·conj(s_e(l))` over the first (k=0) and second (k=1) half
  of the burst.
* **Angles.** An iterative CORDIC gives θ0 = arg Z(0), θ1 = arg Z(1) and
  θs = arg(Z(0)+Z(1)). Angles are in units of 2π/65536.
* **Frequency.** The two half-sums are L/2 symbols apart, so
  `d = θ1 − θ0 = π·f0·L`. The phase step per symbol is `2d/L`, computed by
  a sequential divider as a Q16.16 value (`est_step`, f0·2^32).
* **Phase.** The whole-burst sum sits at the burst centre, so the start
  phase is `φ = θs − d` (`est_phi`). This carries a bias of −π·f0 from the
  half-symbol offset of the centre, negligible at the offsets the
  estimator can resolve (|f0| < 1/L).
* **Pass B (correction).** A 12-stage pipelined CORDIC rotates r(l) by
  −(φ + l·step). With v = x·1.647 the rail of the pair, the new LLRs are
  `clip(v >>> demap_sh, ±31)` for QPSK bits and 16-QAM sign bits, and
  `clip((|v| − qam_thr) >>> demap_sh, ±31)` for 16-QAM amplitude bits
  (max-log, with `qam_thr` = 2A·1.647). They are written through two lanes
  into the decoder's idle bank, at the positions from the table.

No noise variance is used: Max-Log-MAP is insensitive to the LLR scale
apart from the extrinsic scaling and the clipping. `demap_sh` and `tanh_sh`
are set to match the received amplitude.

## Using it

1. Set `blk_len` = K (even, 2..5124), `max_half` (16), `ts_en`, `ic_en`,
   `demap_sh`, `tanh_sh`, `n_tx` = N (a multiple of 2 for QPSK, of 4 for
   16-QAM, at most 3K), `qam16` and `qam_thr`.
2. Write the interleaver: `il_we`, `il_addr = j`, `il_data` = the natural
   index of the j-th bit seen by component code 2.
3. Write the position table: `pos_we`, `pos_addr = n`, `pos_k` and
   `pos_t` = the codeword position of transmitted bit n. Write the L
   received samples (`r_we`, `r_addr`, `r_i`, `r_q`, 8-bit
   signed). These are coarse-synchronised: timing, gain and burst detection
   are done upstream.
4. Pulse `run` and wait for `done`.
5. Read `half_iters`, `stopped_early`, `codeword_valid`, `est_step` and
   `est_phi`. Read the decoded bits through `rd_addr`/`rd_bit`
   (combinational).

`stop` ends decoding at the next half-iteration boundary. `ts_en = 0` decodes
with the initial demapping only. `ic_en = 0` runs exactly `max_half`
half-iterations. All memories are plain arrays. Reads are registered,
except the hard-decision store, which is read combinationally.

## Where this departs from or extends the reference architecture

* The reference decoder is a windowed serial MAP with three recursion units
  in parallel, at about K cycles per half-iteration. Here a full-block
  two-pass schedule is used instead. It is simpler, needs a K × 8-metric β
  memory, and has half the throughput.
* Only the number of trellis states (8) is fixed by the reference. The
  polynomials 13/15 (octal, as in 3GPP) and the open trellis are choices
  made here. The interleaver is a loadable table.
* The reference evaluation uses 16-QAM Gray at rate 0.443 and QPSK at
  rate 0.8, but gives neither the puncturing pattern nor the bit-to-symbol
  mapping. Here the pattern is a loadable position table and the mapping is
  the pair scheme above. The 16-QAM soft symbol and the amplitude-bit
  demapping are this design's choices.
* The estimator uses the conjugate of the reference symbol. Its frequency
  formula divides the half-burst phase difference by π·L, as derived above,
  which is consistent with the phase-offset formula that removes
  `L·f0·π`.
* Coarse synchronisation is outside the design.
* All widths other than the 6-bit channel LLRs, and every table and
  scaling, are this design's choices.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_rsc_encoder` | parity against a feedback-sequence model, restarts, idle cycles |
| `tb_turbo_encoder` | s/p1/p2 against the model on u and on permuted u |
| `tb_iteration_control` | valid / parity error / changed word / new block; counts; 1-cycle latency; stored bits |
| `tb_map_decoder` | every APP, extrinsic, index and flag bit-exact against an integer Max-Log-MAP model; input bubbles; latency ≤ 2K+4 |
| `tb_turbo_decoder` | all beats of all half-iterations bit-exact against a reference turbo decoder; max half-iterations, stop request, hold, bank select, half-iteration period |
| `tb_fine_sync` | QPSK and 16-QAM, rate 1/3 and punctured: initial demapping within 1-2 LSB, punctured positions zero; frequency and phase estimates against injected offsets; sign of every corrected LLR; run times |
| `tb_turbo_sync_decoder` | end to end at default sizes, including K = 5124 at rate 1/3, K = 1136 at rate 0.8 on QPSK and K = 1056 at rate 0.443 on 16-QAM: noisy bursts with carrier offsets decode without error, while the same rate-0.8 and 16-QAM bursts keep bit errors with turbo synchronisation off, and iteration control stops the 16-QAM block before 16 half-iterations; early stop, max half-iterations, external stop, sync updates, stalls and the turbo-sync-off mode each occur |

The reference models are in `tb/tsync_ref_pkg.sv`. To run a testbench with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/tsync_pkg.sv tb/tsync_ref_pkg.sv tb/tb_turbo_sync_decoder.sv \
    --top-module tb_turbo_sync_decoder
./obj_dir/Vtb_turbo_sync_decoder
```

Replace the testbench name to run another one. The communication
performance (FER curves, average half-iterations against FER) is not
reproduced by these testbenches. They check function, not statistics.
