# Folded 16-channel correlation integral processor

Before an epileptic seizure, neural firing becomes more organised, and the
EEG/ECoG becomes less chaotic. The correlation integral (CI) tracks this. It
embeds the signal in a 7-dimensional phase space and counts how many pairs of
phase-space vectors lie close together. With a fixed distance threshold,
the CI of ECoG drops clearly during a seizure, so its trend serves as an
early-warning feature. This RTL computes the CI of 16 EEG/ECoG channels in real time. It
is meant to sit after the analog front end of an implantable closed-loop
neuromodulator, where a classifier would use the CI to decide when to
stimulate.

Power budget, not speed, drives the design. The processor runs from a
4096 Hz clock and spends most of its power on leakage. So it works to keep both
the area and the arithmetic small:

* **Small window.** Each CI covers only N = 10 vectors, taken one every
  24 samples (about 1 s of signal). That gives 45 vector pairs per CI.
* **Differential update.** Two consecutive windows share 9 vectors, so each
  update computes only the 9 new pairs. The 9 pairs of the vector that leaves
  the window are subtracted from the old CI.
* **Channel folding.** The 16 channels share one vector collector, one
  16-bank vector memory, one distance unit and one accumulator. Each channel
  runs as a thread on the shared hardware.

## Signal and vectors

| quantity | value |
|---|---|
| channels | 16, time-multiplexed, one sample per clock |
| sample | 9 bits, two's complement, 256 Hz per channel |
| clock | 4096 Hz (16 x 256) |
| embedding dimension p | 7 |
| component spacing tau | 4 samples (15.6 ms) |
| vector period sigma | 24 samples (93.75 ms) |
| window N | 10 vectors |
| vector word | 7 x 9 = 63 bits |

Vector `V_m` of a channel is `(x[24m], x[24m+4], ..., x[24m+24])`. Because
sigma = (p-1)·tau, the last sample of one vector is the first sample of the
next. Consecutive vectors therefore tile the signal with no gaps and no
overlap beyond that shared sample. The literature value for tau on ECoG is
about 14 ms, or 3.6 samples. Rounding it up to 4 samples is what makes the
tiling exact.

The CI output `ci[c]` is the number of vector pairs in the window whose
Euclidean distance is at most `eps`. It ranges from 0 to 45. The normalised
correlation integral is this count times a constant: `ci/45` for the
unordered-pair definition.

## Collecting vectors from a multiplexed stream (`ci_vcp`)

A single-channel processor would need a FIFO of 7 sample registers. The FIFO
shifts once every tau samples, so its contents are always the last 7 taps.
Every 24 samples those 7 taps form a complete vector.

For 16 channels, the 16 FIFOs are folded into one systolic register array of
7 columns, each 16 registers deep. Each column shifts down by one register on
every input sample. So the bottom of each column always holds the state of
the channel whose sample is on the input now. For that channel:

* **Tap sample** (the channel's sample index is a multiple of 4): column 0
  takes the new sample, and column k takes the bottom value of column k-1.
  This is the FIFO shift.
* **Any other sample:** each column writes its own bottom value back into its
  top, which leaves the channel's FIFO unchanged.

When the channel's sample index is a multiple of 24 and at least 7 taps have
been collected, the vector packer outputs the 7 new top values as one 63-bit
word. Component 0, the oldest sample, is in the low bits. All 16 channels
complete their vectors in the same 16-sample frame. The first vectors appear
at sample 24 of each channel.

The array holds 7 x 16 x 9 = 1008 bits and needs no address logic. The only
control is a channel counter, a frame phase counter (mod 24) and a saturating
count of taps.

## Vector memory (`ci_vector_memory`)

The vector memory is one 160 x 63-bit array. Bank c (entries `10c .. 10c+9`)
holds the last 10 vectors of channel c. It has one write port and one
synchronous read port, and the read data appears the cycle after the read
request. A read and a write of the same entry in the same cycle returns the
old data.

All banks use the same slot as a ring buffer. The newest vector `V_i` is
written over `V_{i-10}`, the vector that has just left the window.

## Threads on shared hardware (`ci_mt_fsm`)

The scheduler starts once the last channel of a frame has written its vector.
It then runs the 16 threads in channel order, 12 cycles each. Thread c
(`w` is the slot of the newest vector) runs as follows:

| cycle k | memory read | DCTC | RAOU |
|---|---|---|---|
| 0 | bank c, slot w (`V_i`) | | |
| 1 | slot w-1 | load `V_i` into the reference register | |
| 2 .. 10 | slot w-k (k ≤ 9) | compare `V_i` with `V_{i-(k-1)}` | shift the result into VD register c |
| 11 | | | update bank c |

After the last thread, the slot advances (mod 10). A count of stored vectors
also grows until it reaches 9. While the window is still filling, the result
for a partner vector that does not exist yet is forced to 0.

**Timing.** The last update of a frame comes 195 cycles after the sample that
completed the frame. The next frame is 384 cycles later. The 0.1 s feature
update period is 409.6 cycles. Throughput is therefore about 2x what real time
needs. An assertion flags a frame that arrives while the threads are still
running.

## Distance and threshold (`ci_dctc`)

The DCTC holds the thread's newest vector in a reference register. Each cycle
it compares that vector with the vector on the memory read port:

```
dist2 = sum_k (A_k - B_k)^2        7 10-bit differences, 18-bit squares
theta = dist2 <= eps * eps
```

The test uses the squared Euclidean distance, so no square root is needed and
the result is exact. A distance equal to `eps` counts as a match. `eps` is
11 bits wide, enough for the largest possible distance, sqrt(7)·511.

## Differential accumulation (`ci_raou`)

Each update replaces `V_{i-10}` with `V_i`:

```
CI_i = CI_{i-1} + sum_{d=1..9} theta(V_i, V_{i-d})  -  sum_{j=i-9..i-1} theta(V_{i-10}, V_j)
```

The first sum is exactly the 9 results the DCTC has just produced. The second
sum involves pairs computed over the previous 9 updates, one in each. Each
channel's bank keeps three kinds of register:

* **VD register (9 bits).** Holds the 9 new results. Bit d-1 holds the result
  for `V_{i-d}`.
* **History VD registers (9 x 4 bits).** Hold one counter per older vector in
  the window: the number of later vectors it has matched so far. Let
  `h[k]` be the counter of `V_{i-(k+2)}`. Each update does:
  * `h'[0] = VD[0]`: the match of `V_{i-1}` with `V_i` starts its count.
  * `h'[k] = h[k-1] + VD[k]`: every counter ages by one vector and adds its
    match with `V_i`.
  * `h[8]` drops out. By then `V_{i-10}` has been compared with all 9 vectors
    that came after it, so `h[8]` is exactly the second sum.
* **CI register (6 bits).** Each update does `CI += popcount(VD) - h[8]`.

Keeping one counter per vector takes 36 bits per channel. Storing every pair
bit of the window would take 45. While the window is filling, the counters of
missing vectors are zero. Every partial CI is therefore the exact pair count
of the vectors that exist. `ci_full[c]` is set from the first update that
covers 10 vectors, which is the channel's 10th vector at sample 240.

## Top level (`ci_processor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `in_valid` | in | 1 | a sample is present |
| `in_sample` | in | 9 | sample of channel `in_ch` |
| `eps` | in | 11 | distance threshold, in sample units; hold constant |
| `in_ch` | out | 4 | channel that the next accepted sample belongs to |
| `ci[16]` | out | 6 each | pair count of each channel (0..45) |
| `ci_full` | out | 16 | count covers a full 10-vector window |
| `ci_upd`, `ci_upd_ch` | out | 1, 4 | pulse: `ci[ci_upd_ch]` has just changed |
| `busy` | out | 1 | threads are running |

After reset, the first accepted sample belongs to channel 0. Channels then
follow in fixed order, and there is no frame marker. If `eps` changes, the
running count mixes results from both thresholds until 10 new vectors have
passed. Reset clears all control and accumulation state. Sample and vector
storage is not reset, and it is never read before it has been written.

All sizes are parameters of `ci_processor` (`NCH`, `SAMPLE_W`, `P`, `TAU`,
`SIGMA`, `NVEC`, `EPS_W`). Their defaults are in `ci_pkg`. `SIGMA` must be a
multiple of `TAU`. The schedule needs `NCH*(NVEC+2)` cycles per frame, which
must be less than `NCH*SIGMA` at full input rate.

## Where this departs from, or goes beyond, its source description

The following come from the source description of the processor: the
structure (one VCP with a systolic register array and vector packer, a
16-bank 160 x 63-bit vector memory, one shared DCTC, per-channel VD, history
VD and CI registers, and a multi-thread FSM), the differential update, and all
sizes except tau.

The following are this design's own choices:

* tau = 4 samples, where the source gives "about 14 ms".
* Two's complement samples.
* The Euclidean norm, and counting a distance equal to `eps` as a match.
* Recirculation inside the systolic columns.
* The packing order of the vector word.
* Memory ports and read latency.
* The 12-cycle thread schedule, and starting it after the whole frame.
* History kept as one match counter per vector.
* The warm-up behaviour.
* The reset scheme.
* The CI output as a raw count, without normalisation.

The rest of the detection system is not included: front-end amplifiers and
ADC, the input FIFO, the FIR filter, the other features (curve length,
rhythmic discharge, phase coherence), the k-NN classifier and the stimulator.
The CI processor's input and output ports are where it would connect to
them. The vector memory is written as a register array, not as a foundry
SRAM macro.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_ci_vcp` drives a random stream with idle cycles. It checks every vector,
  and the absence of vectors at other times, against stored samples.
* `tb_ci_vector_memory` runs random reads and writes against a model,
  including a read and write of the same entry.
* `tb_ci_dctc` checks `dist2` against integer arithmetic over random,
  extreme and near vectors. It also checks `theta`, including distances exactly
  equal to `eps`.
* `tb_ci_raou` invents pair results for 16 channels updated in random order.
  It recounts every CI from a full pair table, so the differential update is
  checked against a direct count.
* `tb_ci_mt_fsm` checks every cycle of 13 rounds against the schedule above.
  This covers ring-buffer wrap and the end of warm-up.
* `tb_ci_processor` runs the top at default sizes, at full input rate, for
  26 vector periods of random-amplitude noise. It recomputes each CI from the
  raw samples by brute force. It also checks the update latency: at most 195
  cycles, and under 0.1 s. It counts warm-up updates, full-window updates,
  updates with a nonzero history subtraction, ring-buffer wrap-around,
  matching and non-matching pairs, and a thread run for every channel. Each
  must occur at least once.
* `tb_ci_seizure_trend` runs a synthetic scenario. Half the channels switch
  from low-amplitude background noise to a large rhythmic triangle-wave
  discharge, and input samples arrive with idle cycles in between. Every CI
  is checked against the brute-force count. The test also checks that the CI
  of the switched channels falls (typically from about 36 to about 5 with
  `eps` = 110), while the background channels stay near 45.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ci_pkg.sv rtl/ci_*.sv \
    tb/tb_ci_processor.sv --top-module tb_ci_processor -Mdir obj -o sim
./obj/sim
```

For a single block, pass `rtl/ci_pkg.sv`, the block's file and its
testbench. All testbenches finish in well under a second.
