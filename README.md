# Low-power Viterbi decoder with scarce state transition and variable truncation length

A Viterbi decoder spends most of its power in two places: the add-compare-select (ACS) array, whose path metrics and decisions toggle every clock, and the survivor memory, which in a register-exchange design copies every state's whole history into the next state every clock. This decoder cuts both.

* **Scarce state transition (SST).** The received stream is first turned into a stream that is mostly zero when the channel is clean. A cheap algebraic pre-decoder estimates the information bits, and a re-encoder turns that estimate back into code bits. Every received soft value whose re-encoded bit is 1 is then inverted. The Viterbi core now only has to find the *errors* in the pre-decoded estimate. In a clean channel its survivor paths run almost entirely through state 0.
* **Variable truncation length (VTL).** Survivor paths merge a short way back in the trellis, and sooner the cleaner the channel. Once they have merged, keeping 64 copies of the same history is wasted work. A detector finds the column of the register-exchange memory where the paths have merged. Behind that column only the row of state 0 keeps moving; the other 63 rows are clock-gated.

The decoder is built for the rate-1/3, 64-state convolutional code of MB-OFDM UWB. It takes 3-bit soft decisions and completes two trellis stages per clock with a radix-2x2 ACS, so it decodes 2 bits per clock (500 Mbit/s at 250 MHz).

## Data path

```
in_sym (2 symbols x 3 soft values x 3 bit)
   |
sst_unit ----------------------------- i (pre-decoded bits) ---------+
   | y (transformed soft values), registered                          |
bm_unit            branch metrics, 2 stages x 8 code words            |
   |                                                                  |
acs_r2x2  <-->  pm_unit     64 states, two radix-2 layers per clock   |
   | d1, d2 (decisions)                                               |
re_survivor_memory  <-->  path_merge_detector                         |
   | n (row 0, last column)                                           |
sst_output  o = n XOR i delayed by the memory depth  <----------------+
   |
out_bits (2 per clock)
```

| Module | Role |
|---|---|
| `vd_pkg` | Code polynomials, types, branch code-word function, trellis numbering |
| `sst_unit` | Hard decision, `pre_decoder`, `re_encoder`, soft-value inversion, output register |
| `pre_decoder` | Inverse of the encoder on hard decisions |
| `re_encoder` | The convolutional encoder, two bits per clock |
| `bm_unit` | Branch metrics |
| `acs_r2x2`, `acs_r2` | Radix-2x2 ACS array and its radix-2 cell |
| `pm_unit` | Path metric registers with the start condition |
| `re_survivor_memory` | Register-exchange memory with per-column gating and direct-shift select |
| `path_merge_detector` | Group equality checks, merged column, gating (`G`) and select (`S`) signals |
| `sst_output` | Delay line for the pre-decoded bits and the final XOR |
| `sst_vtl_viterbi_decoder` | Top level |

## The code and the SST transformation

The encoder has a 6-bit shift register. Its generator polynomials are

```
G_A = 1 + D^2 + D^3 + D^5 + D^6
G_B = 1 + D + D^2 + D^4 + D^6
G_C = 1 + D + D^2 + D^3 + D^6
```

The pre-decoder applies a right inverse of this encoder:

```
S_A = D + D^2 + D^3 + D^4
S_B = D + D^2 + D^3 + D^4 + D^5
S_C = 1 + D + D^2 + D^5
i(D) = r_A(D) S_A(D) + r_B(D) S_B(D) + r_C(D) S_C(D)     (GF(2))
```

`G_A S_A + G_B S_B + G_C S_C` is exactly 1, not a power of D. So the pre-decoder returns an error-free code sequence's information bits with **no delay**. Both the pre-decoder and the re-encoder are shift registers and XOR trees, unrolled to two symbols per clock.

Soft values are 3-bit numbers. 0 means "surely code bit 0", 7 means "surely code bit 1", and the MSB is the hard decision. The SST output is `y = r XOR {3{z}}`, where `z` is the re-encoded bit. Because the code is linear, `y` is again a noisy code sequence: it belongs to the information sequence `u XOR i`. The Viterbi core decodes it to `n`, and the decoder's output is `o = i XOR n`.

How much SST helps depends strongly on the signal-to-noise ratio. Each pre-decoded bit combines 13 hard decisions, so one wrong hard decision anywhere in that window corrupts it. At Eb/N0 up to 4 dB the share of 1s in `y` is still about 49–50%, the same as in the raw input. It falls to 47.5% at 5 dB and 43% at 6 dB, and `y` becomes almost all zero on a clean channel. (These figures are from the AWGN test below.)

## Radix-2x2 ACS and modular path metrics

States are numbered with the newest information bit as the MSB. The two predecessors of state `s` are `{s[4:0],0}` and `{s[4:0],1}`, and the information bit of a transition into `s` is `s[5]`.

One clock covers two trellis stages with two chained layers of radix-2 add-compare-select cells and no register between them:

1. the first layer computes the metric of every intermediate state at time t-1;
2. the second layer computes the metric of every state at time t from those.

Each intermediate metric is computed once and shared by the two states it feeds. That gives 4 adders, 2 two-way comparators and 2 two-to-1 multiplexers per state. A radix-4 ACS would need a 4-way comparator and a 4-to-1 multiplexer per state instead. Each state produces two decisions per clock: `d1` for the intermediate state and `d2` for the final state.

Branch metrics are L1 distances to the ideal values 0 and 7. They reduce to adding either the soft value or its complement for each of the three code bits, with a maximum of 21. They are carried in 6 bits.

Path metrics are 9 bits and are never normalised; they simply wrap. Comparisons are modular: `a < b` when the MSB of `(a - b) mod 512` is set. This is exact as long as all metrics lie within 256 of each other. Every state can be reached from the best state in 6 stages, so the spread is at most 6·21 = 126, plus 42 for the two branch metrics added inside a clock.

At reset, state 0 starts at 0 and all other states at 64, which stands in for infinity. Ties keep predecessor 0.

## Survivor memory with variable truncation length

This is the part that needs the closest reading.

### Layout

Each state owns a row of 32 columns. A column holds the two information bits of one clock ([0] the earlier stage), so the memory covers 64 trellis stages, the maximum truncation length. On each advance:

* **Column 0** of row `s` receives `{s[5], s[4]}`, the bits of its last two transitions. These bits are constants.
* **Column k** of row `s` receives column k-1 of its two-stage survivor predecessor. The four candidate rows are the consecutive states `{s[3:0], 00..11}`. A tree of three 2-to-1 multiplexers picks one: two steered by `d1` of the intermediate states, then one steered by `d2[s]`.
* **Output.** Decoding uses a fixed state, state 0. The decoded pair is column 31 of row 0. No best-state search is needed.

### Merge detection

Comparing all 64 rows of a column is expensive. Instead, the states are split into 16 groups of four consecutive states, `4g..4g+3`. Each group is exactly the four two-stage sources of some state. A column counts as **merged** when every checked group holds four equal entries. Only the first 12 groups (48 states) are checked; in simulation this gives the same bit-error rate as checking all 16 groups (see the measurements below).

Columns 0–2 are never searched. The first three columns of a row are its own six state bits, which always differ within a group.

### Choosing the merged column P

The detector keeps `valid_col`, the last column in which every row is up to date. It then takes as merged column `P` the start of the **unbroken run** of merged columns that ends at `valid_col`:

```
P = min k >= 3 such that columns k..valid_col are all merged
P = valid_col + 1 (at most 31)   if column valid_col itself is not merged
```

A first version took the *lowest* merged column instead. Chance agreements near the front of the memory then cut the truncation short, and the bit errors at 2 dB doubled. The run rule gives the same error rate as a decoder without variable truncation.

### Control signals

For the next advance the detector drives two signals per column:

* `G_k = (k <= P)`: rows 1..63 of column `k` are clocked (exchange). Beyond `P` they are gated and hold stale bits.
* `S_k = (k > P)`: row 0 of column `k` shifts from its own column k-1 instead of exchanging.

Shifting row 0 directly out of column `P` is exact, because its four sources (group 0) agree there. Behind `P`, the row-0 path is taken as the merged path and the other rows are dropped.

Afterwards `valid_col` becomes `P`. While the paths keep merging, the exchanged region stays short. When they stop merging, it grows by one column per advance, the same speed at which unmerged data moves back through the memory.

The effective truncation length is `2·(P+1)` stages; the top level brings `P` out as `merge_col`.

Clock gating is written as a register load enable per column. Synthesis maps it to integrated clock-gating cells.

### Aligning the pre-decoded bits

`sst_output` keeps the pre-decoded bits in a 32-deep shift register that advances together with the survivor memory. The pair that leaves it therefore belongs to the same symbols as the pair that leaves row 0.

## Interface and timing (`sst_vtl_viterbi_decoder`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; the encoder is assumed to start in state 0 |
| `in_valid` | in | 1 | `in_sym` holds a pair of received symbols |
| `in_sym` | in | `sym_t [1:0]` | `[0]` earlier symbol; per symbol `[2]`=A, `[1]`=B, `[0]`=C, 3-bit soft values |
| `out_valid` | out | 1 | one-clock pulse: `out_bits` holds a newly decoded pair |
| `out_bits` | out | 2 | decoded information bits, `[0]` earlier |
| `merge_col` | out | 5 | merged column P used at the current advance |
| `valid_col` | out | 5 | last column in which all rows are current |

There is no back-pressure. Every valid pair advances the whole decoder once: the SST unit at the edge that samples the pair, and the rest at the next edge.

With continuous input, a pair sampled at a clock edge comes out 33 clocks later (COLS + 1). Output starts after 33 advances. A stream is flushed by feeding more symbols, for example the encoder's zero tail followed by zeros.

Parameters of the top: `COLS` (32; truncation length = 2·COLS), `CHECK_GROUPS` (12), `PM_W` (9), `BM_W` (6). The code itself (64 states, rate 1/3, 3-bit soft values, 2 stages per clock) is fixed in `vd_pkg`.

Size after generic synthesis: about 4,660 flip-flops. Most of them are the 64×32×2-bit survivor memory and the 64×9-bit path metrics.

## Measured behaviour

`tb_awgn_workload` sends 200,000 information bits per point through BPSK over AWGN. The receiver quantises with 8 uniform levels of width 0.5. Five decoders see the same symbols:

* the decoder with 12 checked groups (the default);
* the same decoder with 4, 8 and all 16 groups checked;
* a software conventional decoder: register exchange on the raw symbols, 64 stages, output from state 0, no SST and no variable truncation.

| Eb/N0 | errors, 4 groups | errors, 8 groups | errors, 12 groups | errors, 16 groups | errors, conventional | mean truncation, 12 groups (stages) | idle memory columns, rows 1–63, 12 groups |
|---|---|---|---|---|---|---|---|
| 2 dB | 708 | 664 | 647 | 645 | 644 | 22.0 | 67.7% |
| 3 dB | 75 | 68 | 60 | 60 | 62 | 19.1 | 72.4% |
| 4 dB | 0 | 0 | 0 | 0 | 0 | 17.5 | 75.0% |
| 5 dB | 0 | 0 | 0 | 0 | 0 | 16.6 | 76.5% |
| 6 dB | 0 | 0 | 0 | 0 | 0 | 15.9 | 77.6% |

With 12 or 16 groups, the variable truncation costs no error performance against the fixed 64-stage decoder. Checking fewer groups declares merges too early, and the errors rise at low Eb/N0. 12 groups is the smallest setting that matches the full check. The cleaner the channel, the more of the memory sits idle.

Power, gate count and clock frequency in silicon have not been measured; they depend on the cell library and on how the enables are mapped to clock gates.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with an independent model. The models are written from the tap lists and formulas, not from the RTL package. Each testbench prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_re_encoder` | against a bit-serial reference encoder, random enable |
| `tb_pre_decoder` | code words decode back to the information bits with no delay; arbitrary streams match the GF(2) convolution |
| `tb_sst_unit` | `y` and `i` against a reference pre-decoder/re-encoder, with hard errors and idle cycles; clean stretches give all-zero hard decisions |
| `tb_bm_unit` | every metric against the distance formula |
| `tb_acs_r2x2` | metrics (mod 512) and both decision vectors against an integer reference, including forced ties and wrapped metrics |
| `tb_pm_unit` | reset values, load enable |
| `tb_re_survivor_memory` | the whole memory every clock against a reference array, with plain exchange and random `G`/`S` |
| `tb_path_merge_detector` | `P`, `G`, `S` and `valid_col` for memories with controlled group equality |
| `tb_sst_output` | delay and XOR |
| `tb_sst_vtl_viterbi_decoder` | end to end at default size: clean channel, sparse errors and 2 dB AWGN. Checks exact output where it must be exact and the 33-clock latency. Counts idle inputs, SST activity, merged columns, growth of the exchanged region and path-metric wrap-around; each must occur |
| `tb_awgn_workload` | the table above |

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/vd_pkg.sv tb/tb_sst_vtl_viterbi_decoder.sv \
          --top-module tb_sst_vtl_viterbi_decoder -o sim
./obj_dir/sim
```

The testbenches rely only on two-state behaviour and `$urandom`. The end-to-end test runs in well under a second; the AWGN sweep, with five decoders, takes about 2 minutes.

## Where this design makes its own choices

* **How the merged column is found.** The run rule above, the skipped first three columns and the `valid_col` bookkeeping for stale rows are this design's own. The group structure, the 48 checked states, the fixed output from state 0, and the `G`/`S` semantics (gate the other rows, shift row 0 directly) come from the architecture as described.
* **Sharing in the ACS.** Intermediate metrics are computed once and shared between the two states they feed. The cost per state then matches a count of four adders, two comparators and two multiplexers; a per-state drawing of the radix-2x2 cell would duplicate them.
* **"Truncation length 64".** This is read as 64 trellis stages, so the memory has 32 two-bit columns.
* **Branch metric width.** Branch metrics are 6 bits wide as specified, although 5 bits would hold the maximum of 21. The top bit is always 0.
* **Clock gating.** It is modelled as register enables. No library gating cell is instantiated.
* **Interface and pipeline.** The handshake, the register after the SST unit, the reset values (path metric 64 for non-zero states, zeroed memory) and the tie rule are not prescribed by the architecture.
* **Not included.** Chip-level items are not part of the RTL: pads and package, the conventional and SST-only comparison versions, and power and area figures.
