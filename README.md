# Folded HDC sensor-fusion classifier with rule-90 item memories

This is a hyperdimensional-computing (HDC) classifier for wearable biosignals. A sample
holds 214 physiological features, one per channel: 32 galvanic-skin-response, 77 ECG and
105 EEG features, each quantised to {-1, 0, +1}. Once per sample the classifier gives two
one-bit decisions, high or low valence and high or low arousal.

HDC represents everything as very wide binary vectors (D = 2000 bits here) and uses three
cheap operations on them:
- binding: XOR;
- bundling: bit-wise majority;
- permutation: a one-bit rotation.

In a classic HDC processor the dominant cost is the item memory, which holds one
pseudo-random identifier vector per channel. This design stores no identifiers. It
regenerates them every time with the rule-90 cellular automaton, one step per channel. It
also *folds* the front end, processing D/F = 500 bits at a time, so the wide accumulators
shrink by a factor F = 4. The price is F passes over the channels per sample.

## Dataflow

```
features[214] ─► HV generator ─► spatial encoder ─► fuser ─► hvout[2000] ─► temporal encoder ─► associative memory ─► decision
                 (iM ⊕ CiM,       (per-modality      (majority  (assembled     (3-gram: XOR of       (Hamming distance
                  500 b/cycle)     majority)          of 3)      fold by fold)  rotated samples)      to 4 prototypes)
```

| block | module | what it holds |
|---|---|---|
| HV generator | `hv_generator` | the 214 feature codes; 3 constant CiM vectors; one 500-bit iM register |
| rule 90 | `ca_rule90` | combinational: `next = rotl(v) ^ rotr(v)` |
| spatial encoder | `spatial_encoder` | 500 saturating 6-bit counters |
| fuser | `fuser` | 500 2-bit counters and the 2000-bit `hvout` |
| temporal encoder | `temporal_encoder` | 3 × 2000-bit ngram registers |
| associative memory | `associative_memory` | 4 × 2000-bit prototypes, 4 × 11-bit distances, a 10-bit popcount |
| control | `hdc_controller` | the schedule below |
| top | `hdc_top` | wiring only |

Shared constants and the controller's state type are in `hdc_pkg`.

## Identifiers from rule 90, one fold at a time

Rule 90 replaces every cell with the XOR of its two neighbours. The grid wraps around, so
one step is `rotl(v) ^ rotr(v)`. Starting from a random seed, successive steps give vectors
that are nearly orthogonal to each other, so each can serve as a channel identifier.

The seed is the continuous-item-memory (CiM) vector of feature value −1. The CiM is three
constant vectors, one per feature value. Identifiers are generated independently inside
each 500-bit fold:

```
iM(channel c, fold f) = rule90^(c+1)( CiM[-1][f*500 +: 500] )
```

So the HV generator needs a single 500-bit register. At the start of every fold it loads
`rule90(seed fold)`, and it steps once per channel. The vector that channel c contributes
is `iM(c, f) XOR CiM[feature_c][f*500 +: 500]`.

Things to know when changing it:
- Channels must be visited in order. Random access would mean re-running the automaton
  from the seed.
- A narrow grid produces few distinct vectors before it repeats. Below about 20 bits per
  fold (F = 100 at D = 2000) the identifiers collapse and classification is lost, so keep
  D/F well above that.
- Rule 90 ignores complementing: `rule90(~v) == rule90(v)`. Seeding from a CiM that differs
  from another only by whole complemented folds gives the same identifiers.
- First-iM choice: the first channel uses one rule-90 step of the seed, not the seed
  itself. With the seed itself, channel 0 with feature −1 would bind to the all-zero vector.

The CiM vectors are elaboration-time constants (tie cells in silicon). The base vector is
made of successive xorshift32 words of `CIM_SEED`. Code k flips the first k·(D/2)/(X−1)
bits, so the vectors for +1, 0 and −1 are 0, D/4 and D/2 bits from the base. Feature codes
are **0 = +1, 1 = 0, 2 = −1**.

## Schedule of one sample

Cycle by cycle, as sequenced by `hdc_controller`:

```
accept         1 cycle    in_valid && in_ready, features captured
for f in 0..F-1:
  IM_INIT      1 cycle    iM <= rule90(seed fold f)
  CHAN         T cycles   channel c: SE adds iM ^ CiM[code_c]; iM <= rule90(iM)
                          first channel of modality m>0: SE restarts, fuser adds majority(m-1)
  FUSE_LAST    1 cycle    fuser adds majority(last modality)
  WRITE        1 cycle    hvout[f*500 +: 500] <= majority of the fuser counters
TE_WAIT        1 cycle    temporal encoder shifts hvout in (waits while the AM is busy)
AM_START       1 cycle    associative memory starts on the new ngram vector
```

That is F·(T+3)+3 = **871 cycles per sample** at the defaults. The target of one
classification per millisecond at 909 kHz allows 909 cycles. The associative memory needs
Y·G+2 = 802 cycles (4 classes × 200 folds of 10 bits, then a compare cycle and a done
cycle). It runs while the front end encodes the next sample, so at the defaults it never
holds anything up.

If G is made larger than the encoding time allows, the temporal encoder's shift waits for
the search to finish. The query the search reads therefore never changes under it, and
only throughput drops.

Majorities:
- Spatial encoder: bit = 1 when 2·count > n, where n is the modality's channel count. Ties
  (possible with 32 GSR channels) give 0. The counters saturate at 63. That is always above
  the threshold of 53 for the largest modality, so saturation never changes a majority.
- Fuser: bit = 1 when at least 2 of the 3 modality bits are set. Each modality weighs the
  same whatever its channel count.

## Temporal encoding and decisions

The three ngram registers hold the current fused vector, the previous one rotated right
once, and the one before rotated right twice. Their XOR is the query. Until three samples
have arrived, no search is started and no decision is produced.

The associative memory holds four prototypes in this order:

| address | class |
|---|---|
| 0 | valence low |
| 1 | valence high |
| 2 | arousal low |
| 3 | arousal high |

Each decision picks the nearer of its two prototypes. `decision[0]` is valence and
`decision[1]` is arousal, and 1 means high. A tie goes to low. `distances` shows all four
Hamming distances. The prototypes come from offline training and are written whole through
`proto_we`/`proto_addr`/`proto_wdata`.

## Interface (`hdc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | sample handshake; `in_ready` is high only while idle |
| `in_features` | in | 214 × 2 | feature code per channel, GSR first, then ECG, then EEG |
| `proto_we`, `proto_addr`, `proto_wdata` | in | 1, 2, 2000 | prototype write |
| `dec_valid` | out | 1 | one-cycle pulse when `decision`/`distances` change |
| `decision` | out | 2 × 1 | valence, arousal (1 = high) |
| `distances` | out | 4 × 11 | Hamming distance to each prototype |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `D` | 2000 | hypervector dimension |
| `F` | 4 | folds in the front end |
| `G` | 200 | folds in the associative memory |
| `N` | 3 | ngram length |
| `X` | 3 | number of feature levels |
| `M` | 3 | number of modalities |
| `MOD_CH` | '{32, 77, 105} | channels per modality |
| `GROUPS` | 2 | decisions |
| `CPG` | 2 | classes per decision |
| `CIM_SEED` | 32'h2545F491 | seed of the CiM base vector |

Constraints on the parameters:
- D must be divisible by both F and G.
- Pick G so that `GROUPS*CPG*G + 2 <= F*(T+3) + 1`, or samples will wait for the search.
- The same RTL runs the keyword-spotting setup: D = 10000, N = 20, two modalities of 4 and
  30 features, 20 feature levels and one decision among 10 classes.

Synthesis at the defaults gives about 13,000 flip-flop bits and 8,000 prototype bits. The
largest parts are the temporal encoder (6,000 bits) and the hvout register.

## How far it follows the source architecture

Taken from the source architecture:
- the block structure and its widths: D/F-bit HV generator, spatial encoder and fuser
  folds; an unfolded hvout, temporal encoder and prototypes; D/G-bit distance folds
  through one adder;
- the sizes D = 2000, F = 4, N = 3, ternary features, 32/77/105 channels and the 6-bit
  saturating counters;
- rule-90 identifier generation seeded by the −1 CiM, one channel per cycle, majority
  bundling, XOR binding, the right-shift permutation and the nearest-prototype decision;
- overlapping the search with the next sample's encoding.

This design's own choices:
- the CiM contents and the feature-code order;
- applying one rule-90 step before the first channel;
- the controller, its 3-cycle overhead per fold and the stall;
- G = 200;
- the valid/ready input and the prototype write port;
- tie rules, zero reset and the warm-up rule;
- rotation as a wrap-around shift.

Not included:
- The keyword-spotting feature extraction (spectrograms, LPC). It exists only as a
  software flow, with no hardware architecture to build.
- The SVM and stored-item-memory (ROM) processors. They serve only as points of
  comparison for this design.

The energy, frequency and area results come from a 28 nm implementation flow and cannot
be reproduced from RTL. The cycle counts above are checked by the testbenches.

## Simulation

Each testbench is self-checking and ends with `TB_RESULT checks=… failures=…`. The
end-to-end benches compare against `tb/hdc_ref_pkg.sv`. This bit-level reference model
works on whole vectors with exact counts and no folding.

| testbench | what it runs |
|---|---|
| `tb_hdc_top_full` | default sizes: 20 back-to-back samples, every decision and distance, 871-cycle interval ≤ 909, no stall |
| `tb_hdc_top` | D = 120, 5/7/9 channels, G = 40, random gaps; makes saturation, stalls, modality switches, warm-up and both decision values happen, and checks each latency |
| `tb_hdc_fold_sweep` | D = 2000, 214 channels at F = 1, 2, 8, 16, 50, 100, 1000; each within 227·F cycles |
| `tb_hdc_kws` | the keyword-spotting configuration |
| `tb_hdc_channel_sweep` | 3, 64 (10/23/31) and 214 channels at D = 2000, F = 4 |
| `tb_ca_rule90`, `tb_hv_generator`, `tb_spatial_encoder`, `tb_fuser`, `tb_temporal_encoder`, `tb_associative_memory` | one block each |

`hdc_bench_point` is a helper that the sweep and keyword-spotting benches instantiate. It
is not a bench on its own.

To run one bench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/hdc_pkg.sv tb/hdc_ref_pkg.sv tb/tb_hdc_top_full.sv --top-module tb_hdc_top_full -o sim
./obj_dir/sim
```

The full-size bench builds in seconds and simulates in well under a second. The fold sweep
takes about 20 s to simulate.
