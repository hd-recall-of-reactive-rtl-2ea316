# Early-fusion hyperdimensional classifier for GSR, ECG and EEG features

This is the RTL of an inference engine that classifies emotion from three
physiological signals at once: galvanic skin response (GSR, 32 features),
electrocardiogram (ECG, 77 features) and electroencephalogram (EEG, 105
features). It answers two binary questions per sample: how strong the emotion
is (arousal) and whether it is positive or negative (valence).

The engine uses hyperdimensional computing (HDC). Every quantity is a binary
hypervector (HV) of D = 2,000 bits. Only three operations are used:

* **binding**: bitwise XOR. The result is unlike both inputs.
* **bundling**: bitwise majority over many HVs. The result is like all inputs.
* **permutation**: a one-bit cyclic shift. It marks position in time.

Random HVs of this size are almost orthogonal, so a bundle of many bound HVs
still keeps each contribution recoverable. That is why sensor streams can be
merged early without a loss in accuracy.

The design follows a published HDC multi-modal classifier, reduced for an ASIC.
Its main idea is **early fusion**. The three modalities are bundled right after
spatial encoding. Only one temporal encoder is needed, not one per modality.
The original architecture fused late, after three temporal encoders.

## Data flow

```
 feature beats ──► spatial_sequencer ──► rows c of ──► 3 x spatial_encoder ──► majority3 ──► temporal_encoder ──► associative_memory (arousal) ─┐
 (105 per sample)                        iM, P+, P-      GSR / ECG / EEG        (early        (N = 3 N-gram)  └─► associative_memory (valence) ─┴─► result
                                         (hv_memory x3)                          fusion)
```

| Quantity | Value |
|---|---|
| HV dimension D | 2,000 |
| Temporal N-gram N | 3 |
| Channels GSR / ECG / EEG | 32 / 77 / 105 |
| Shared memories | item memory (iM), positive projection (P+), negative projection (P-) |
| Rows per memory | 105, the largest modality |
| HVs stored | 3 x 105 = 315 |
| Classes per task | 2 (arousal, valence) |
| Sample period | 105 clocks |
| Latency, last beat to result | 4 clocks |

Three memory-saving choices shape the datapath:

* All modalities share one item memory.
* All modalities share one pair of projection memories.
* Both classification tasks share the same encoder. Only the associative
  memories differ.

Without this sharing, 642 HVs would be needed instead of 315. The source
reports that the memories still take about half the area and power after
synthesis.

## Spatial encoding: the expensive part

Spatial encoding turns one sample of one modality (32, 77 or 105 feature
values) into one HV. For every channel `c`:

1. The feature's sign picks a projection HV. `P+[c]` is used if the value is
   >= 0, and `P-[c]` if it is negative. In the original algorithm a ternary
   {-1, 0, +1} projection vector is multiplied by the feature and then
   binarized. Storing the two binarized outcomes replaces every multiplier with
   a multiplexer. Only the sign of a feature matters; its magnitude is unused.
2. The projection HV is bound with the channel's item HV:
   `B[c] = iM[c] ^ P±[c]`.
3. The `B[c]` of all channels are bundled. D counters each count the ones at
   their bit position. Bit i of the spatial HV is 1 when its count exceeds
   `channels/2` (integer division). The counters are 6 bits wide for GSR and 7
   bits for ECG and EEG.

**Lockstep schedule.** The three encoders do not run one after another. On
each clock, `spatial_sequencer` takes one *beat* holding feature `c` of all
three modalities. It reads row `c` of the three shared memories, and all three
encoders use that same row. Channel `c` of GSR, ECG and EEG therefore use the
same item and projection HVs. This works because sharing across modalities is
what makes one 105-row memory enough.

The smaller modalities are masked for `c >= 32` (GSR) and `c >= 77` (ECG):
their encoders ignore those beats. A sample therefore takes 105 beats.

Pipeline timing, for a beat accepted at clock t:

| Clock | What happens |
|---|---|
| t | memory read of row c is issued |
| t+1 | rows are out; encoders add the bound bits |
| t+1, last beat | majority is taken and stored in each encoder's output register |

The first beat of a sample loads the counters instead of adding to them, so
samples follow each other with no gap. While one result waits downstream, the
counters already take the next sample. Only the last beat of the next sample
is held back (`feat_ready` low) while the previous result has not been taken.
This is the only stall in the front end.

## Early fusion and the temporal N-gram

`majority3` fuses the three spatial HVs bit by bit:
`(a & b) | (b & c) | (c & a)`.

`temporal_encoder` keeps the last two fused HVs. For each new fused HV S(t) it
outputs

```
G(t) = S(t) ^ rho(S(t-1)) ^ rho^2(S(t-2))
rho(x)[i] = x[(i+1) mod D]        (one-bit cyclic right shift)
```

This is the same as "permute the running HV, then bind it with the next one",
repeated N times. In hardware it is two HV registers and a 3-input XOR per
bit. The window slides: every sample yields one N-gram, nothing is
recomputed. After reset, the first N-1 = 2 samples only fill the window and
produce no result. Only reset empties the window.

## Associative memories

Each task has its own `associative_memory` holding two class HVs in
registers. Two HVs are too few to justify an SRAM. A query is XORed with each
class HV, and the ones are counted (popcount) to give the Hamming distance.
The class at the smaller distance is the label; on a tie the lower class index
wins. Both classes are compared in the same clock. The label and both
distances are registered one clock after the query is accepted.

The same N-gram goes to both memories (a fork), and their results leave
together on one handshake (a join).

## Interface of `hdc_fusion_top`

All streams use valid/ready: a transfer happens on a clock edge where both
are high. Reset `rst_n` is asynchronous and active low. It clears all
registers, counters, class HVs and the temporal window, but not the three HV
memories.

**Loading.** Before inference, load the memories and class HVs, one HV per
clock.

| Port | Meaning |
|---|---|
| `mem_wr_en`, `mem_wr_sel`, `mem_wr_addr`, `mem_wr_data` | Writes row `addr` of the item (`MEM_ITEM`), positive projection (`MEM_PROJ_POS`) or negative projection (`MEM_PROJ_NEG`) memory |
| `am_wr_en`, `am_wr_task`, `am_wr_class`, `am_wr_data` | Writes class HV `class` of the arousal (`TASK_AROUSAL`) or valence (`TASK_VALENCE`) memory |

The design contains no training logic. Memory contents and class HVs come
from an offline model, and they must be the ones used in training.

**Features.** `feat_valid` / `feat_ready` / `feat_data[2:0]`. One sample is
105 beats. In beat `c`:

* `feat_data[0]` is GSR feature `c`.
* `feat_data[1]` is ECG feature `c`.
* `feat_data[2]` is EEG feature `c`.

Lanes past a modality's channel count are ignored. Features are 16-bit two's
complement words, of which only the sign bit is used. The sample boundary is
implied by the beat count.

**Results.** `res_valid` / `res_ready` carry:

* `res_arousal` and `res_valence`, the labels.
* `res_dist_arousal[k]` and `res_dist_valence[k]`, the Hamming distance to
  each class.

There is one result per sample, starting with the third sample.

**Timing.** With no back-pressure, one sample enters every 105 clocks. A
sample's result appears 4 clocks after its last beat is accepted:

1. memory read
2. encoder register
3. N-gram register
4. associative memory register

The source synthesized its version for a 3 ns clock. At that clock, 105
clocks per sample is about 0.3 us. This is far faster than the physiological
signals change.

Parameters (`D`, `N`, channel counts, `FW`, `NCLS`) default to the values
above and can be reduced for fast experiments. The derived widths follow
from them.

## Files

| File | Content |
|---|---|
| `rtl/hdc_pkg.sv` | Sizes, memory-select and task enums, `cnt_width()` |
| `rtl/hv_memory.sv` | D-bit x DEPTH memory with 1 write and 1 read port, one-clock read |
| `rtl/spatial_sequencer.sv` | Beat counter, memory read, encoder controls, last-beat stall |
| `rtl/spatial_encoder.sv` | Sign-selected projection, binding, per-bit counters, majority |
| `rtl/majority3.sv` | Early-fusion bundler |
| `rtl/temporal_encoder.sv` | N-gram with sliding window |
| `rtl/associative_memory.sv` | Class HV registers, Hamming distance, arg-min |
| `rtl/popcount.sv` | Two-level adder tree counting the ones of a vector (16-bit chunks, then their sum) |
| `rtl/hdc_fusion_top.sv` | The complete datapath |
| `tb/tb_*.sv` | One self-checking testbench per module |

Handshake rules are written as assertions:

* Pending outputs hold steady.
* The spatial result is never overwritten.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Each computes its expected values itself,
without using the DUT.

```
verilator --binary --timing --assert -Irtl rtl/hdc_pkg.sv tb/tb_hdc_fusion_top.sv \
          --top-module tb_hdc_fusion_top
./obj_dir/Vtb_hdc_fusion_top
```

Replace the testbench name to run any other one.

`tb_hdc_fusion_top` runs the full-size design with default parameters. It
compiles in about 20 s and simulates in under a second. It:

* loads random memories;
* streams 9 random samples, with bubbles in the feature stream and long
  result back-pressure;
* recomputes every spatial HV, fused HV, N-gram, distance and label in
  behavioural code, and compares them with the DUT.

It counts, and requires at least once:

* positive and negative projection selection
* masked lanes
* input bubbles
* stalls of the last beat
* the warm-up of the temporal window
* both labels of both tasks

It also checks the 105-clock sample period and the 4-clock latency.

`tb_amigos_inference` runs the length of the evaluated inference task at
full size. It streams 380 samples of 214 features (the emotion data set after
downsampling) and checks all 378 results. The recorded features are not
included; the values are random, so this tests the hardware, not the
accuracy. It also checks that the rate holds at one sample per 105 clocks for
the whole run. It simulates in about 12 s.

The unit testbenches use small sizes. They cover:

* odd and even channel counts for the majority threshold;
* the one-clock read and hold of the memory;
* the rotation direction of the N-gram;
* tie-breaking in the associative memory;
* the exact stall condition of the sequencer.
* the adder-tree popcount at 2,000 and 37 bits (`tb_popcount`).

The full-size top synthesizes with a generic coarse flow (yosys with a
SystemVerilog front end) in a few minutes. The result is about 54,000
word-level cells, 60,000 flip-flop bits and three memories of 210,000 bits
each. Most of the flip-flops are in the spatial encoders. Per bit position, the
GSR encoder has a 6-bit counter and the ECG and EEG encoders 7-bit ones, each
plus one output bit. That is 14,000 bits for GSR and 16,000 each for ECG and
EEG.

## What follows the source and what is this design's own

Taken from the source design:

* early fusion after the spatial encoders, with 3-input majority;
* D = 2,000 and N = 3;
* the channel counts;
* the shared item and projection memories (315 HVs);
* sign-multiplexed projection vectors and XOR binding;
* per-bit counter bundling with a `> channels/2` threshold;
* a permute-and-bind temporal encoder built from a one-bit cyclic right shift;
* XOR/popcount Hamming distance with least-distance wins;
* class HVs in registers, not SRAM;
* valid/ready handshakes between blocks;
* processing all modalities of one channel in the same step.

Chosen here, where the source gives no detail:

* the beat format and the 16-bit feature width;
* the one-clock memory read latency;
* the pipelining and the last-beat-only stall;
* a zero feature selecting the positive projection;
* tie-breaking toward the lower class;
* asynchronous active-low reset;
* plain write ports for loading;
* comparing both classes in parallel;
* the 4-clock latency.

Not included:

* **The late-fusion baseline.** It has one temporal encoder per modality,
  fused before the associative memory. The source synthesized it only for
  comparison; it was about 4% larger and 6% more power-hungry.
* **The memory-mapped processor wrapper.** The source wrapped its datapath as
  a peripheral of a RISC-V core, but its register map and bus are not
  described. The top's load, feature and result ports are where such a
  wrapper connects.
* **Technology SRAM or ROM macros.** `hv_memory` is a generic array meant to
  be mapped onto them.
* **Feature extraction and training.** Both were outside the inference
  ASIC.
* **A further memory-compression scheme.** A common bank of 105 HVs would be
  addressed by a seeded pseudo-random generator across four dual-port banks.
  It was only proposed, not designed.
