# Low-complexity frame synchronizer for a 528 MS/s OFDM receiver

An OFDM-based ultra-wideband (UWB) receiver samples 528 million complex
samples per second. Before the FFT can run, the receiver has to do three
things. It has to notice that a packet has arrived. It has to find where each
OFDM symbol starts (the FFT window). It has to find where the repeated
synchronisation preamble ends and the channel estimation symbols begin.
A direct design runs a 128-tap matched filter at full rate, and that costs a
lot of area and power.

This RTL does the whole job at 132 MHz on four parallel sample paths, with
three ideas that keep it small:

* **Tap reduction.** The matched filter uses only every fourth received
  sample. It correlates 32 samples with 32 of the 128 chips instead of all
  128, which cuts the work by four.
* **Register sharing.** All four parallel sub filters read the same 32-word
  register file. Each sub filter uses its own quarter of the chips, so one
  cycle still gives four neighbouring sample offsets. The register file is
  address-based: one word is written per cycle and nothing shifts.
* **Dynamic threshold.** Preamble timing compares consecutive sync symbols.
  The threshold is a quarter of the previous correlation (a 2-bit shift), not
  a fixed number, so it follows the channel.

One auto-correlator serves both packet detection and preamble timing.

## Signal format the design expects

* Frame format, taken from the LDPC-COFDM UWB proposal:
  * Each symbol is 165 samples (312.5 ns): a 32-sample cyclic prefix, 128
    samples of payload, and 5 guard samples.
  * The preamble is 21 packet sync (PS) symbols, then 3 frame sync (FS)
    symbols, then 6 channel estimation (CES) symbols, then data.
  * PS and FS carry a 128-chip ±1 sync sequence. FS is the negated PS.
* Input `adc[0..3]`: in clock cycle t the four paths carry samples 4t..4t+3
  of the stream. Each sample is 5-bit signed I and Q, as `sample_t`. A new
  group arrives every cycle; there is no valid strobe and no stall.
* The 128-chip sync sequence is defined in `fsync_pkg::sync_seq()`. It is a
  127-chip maximal-length sequence followed by one −1 chip:
  * The sequence comes from the 7-bit LFSR `x^7 + x^6 + 1` with an all-ones
    seed.
  * Its periodic autocorrelation sidelobe is 16 of 128.
  * The sidelobe of the reduced 32-chip correlations is at most 14 of 32.
  * Replace this function if your system uses another sequence. The matched
    filter and the testbenches take the sequence from it.

## Flow (`control_unit`)

| phase | what runs | leaves when |
|---|---|---|
| `ST_PD` packet detection | auto-correlator, lag 3 symbols | two blocks in a row pass the threshold |
| `ST_FWD` FFT window detection | register file fills (32 cycles), matched filter + peak sorter scan 165 offsets (42 cycles) | the peak sorter is done |
| `ST_ALIGN` | the boundary is stepped by whole symbols until it lies ahead of the incoming samples | one cycle per step |
| `ST_PTD` preamble timing | auto-correlator, lag 1 symbol, one window per symbol | frame sync found, or timeout after 32 windows |
| `ST_GATE` | FFT gate cuts a 128-sample window every 165 samples | `frame_end` input |

## The tap-reduction matched filter with a shared register file

This is the least obvious part of the design.

Write the reduced correlation for sample offset m as

    Λ(m) = | Σ_{k=0..31} r[m + 4k + j] · s[4k + j] |²

Here j is a fixed chip phase (0..3). Suppose the register file holds
r[b], r[b+4], …, r[b+124], which are 32 samples from path 0 only. Sub filter
j multiplies them with chips s[j], s[j+4], …, s[j+124]. The result is exactly
Λ(m) for m = b − j. So from one set of stored samples, the four sub filters
give the four offsets b−3 … b in the same cycle. Each cycle b moves on by 4,
so the filter covers every sample offset at 528 MS/s. It needs only one
32-word register file, where four independent filters would need four.

The chips are ±1, so each "multiplier" is an add or subtract
(`sub_matched_filter`). The correlation power is I² + Q² after a two-stage
pipeline.

The register file (`addr_regfile`) writes one word per cycle at a wrapping
address. Stored data never moves, so after each write the oldest sample is
at the write address, not at word 0. The design does not re-route 32 data
words. It rotates the 128 one-bit taps instead (`tap_reduction_mf`): each
word `a` has a 4-bit tap register (one bit per sub filter), and every write
shifts all tap registers one place. Clearing the register file reloads the
taps in their starting order. Register-file words keep the 4 most
significant bits of the 5-bit ADC samples.

The peak sorter (`peak_sorter`) takes four powers per cycle and keeps the
five largest, with their sample offsets, over one symbol (165 offsets).
* Ties keep the earlier offset.
* The largest entry is the peak.
* If other top-5 candidates lie up to 5 samples before the peak, the earliest
  of them is the boundary. This catches a weak first path that arrives ahead
  of a stronger echo. When it happens, the `precursor` output is set.

Latency: the boundary is reported about 76 cycles after the packet hit.

## The shared auto-correlator and its exact odd lags

`shared_autocorr` computes the two correlations the receiver needs:

    packet detection:  A = Σ r[i]·conj(r[i+495]),  P = Σ |r[i+495]|²   (42 products)
    preamble timing:   D = Σ r[i]·conj(r[i+165])                      (32 products)

**Packet detection.**
* A block passes when |A|²·256 ≥ `pd_thr`·P² (with P ≠ 0).
* A packet is declared when two blocks in a row pass.
* The path select rotates every 10 cycles, about a quarter symbol. This
  spreads the samples over all four paths.

**Preamble timing.**
* One window is taken per symbol: the 32 samples s, s+4, …, s+124 of its sync
  sequence.
* The window is aligned to the boundary found by the matched filter.
* The test is the dynamic threshold

      |D_Y + D_{Y-1}|² ≥ |D_{Y-1} + D_{Y-2}|² / 4

  Across the PS→FS edge, D turns negative, the sum collapses, and the test
  fails. That failure is the frame sync event.
* The comparison starts only once three D values exist.
* The first channel estimation symbol then starts four symbols after the last
  packet sync symbol, and the FFT gate is started there.

**Exact odd lags.** The auto-correlator handles one sample per cycle, but 495
and 165 are not multiples of 4. Between writing a sample and reading it
back, the path select may have moved.
* The multiplexer looks at a five-sample window: the previous cycle's four
  paths plus path 0 of the current cycle.
* Each word of the circular delay line stores the sample, the path it came
  from, and two block flags (`mark`, `last`).
* The delay in cycles is D = (L+2)/4 and the remainder is E = L − 4D:
  * packet detection: D = 124, E = −1
  * preamble timing: D = 41, E = +1
* With write position kw = sel + (E<0) and read position kw + E, the partner
  sample is always exactly L samples later.
* Blocks are defined when the older sample is written and evaluated when its
  partner arrives. The result of a block appears D + 3 cycles after its last
  sample was written.

The symbol power P is computed from the same products. A real receiver could
use its AGC's estimate instead.

## FFT gate (`fft_gate`)

The gate starts at the first CES symbol. It opens a 128-sample window every
165 samples until `frame_end`.
* A window may begin on any path, so the output keeps the four-path format
  with a lane mask `fft_mask`.
* `fft_first` marks the cycle that holds the window's first sample.
* `fft_type` is 0 for the six CES windows and 1 for data windows.
* `fft_sym_cnt` counts windows.
* The output is one cycle behind the input.

## Multi-band variant: band detection and training AGC

The same synchronizer idea also serves a multi-band OFDM receiver, where
symbols hop over three sub-bands. Until the receiver knows the hop timing, it
stays on sub-band 1. It then sees a 128-sample burst once every three symbols
(495 samples) and nothing in between. Two extra blocks handle that phase. They
sit in the top beside the main synchronizer and have their own `mb_*` ports.

**`band_detect`, the dynamic searching window.**
* S(k) is the energy of the 128 samples starting at k. It peaks when the
  window covers the burst.
* The block compares S(k) with S(k−8), which gives a rising/falling flag
  f(k) for every sample.
* A burst is announced at k when f is 1 at k−2, k−6, …, k−30 and 0 at
  k+2, k+6, …, k+30.
* Flags spaced four apart all come from the same path, so each path keeps a
  16-bit flag history. A hit is that history reading `FF00`.
* S is updated four times per cycle from a 32-cycle ring of per-sample
  powers.
* Because the comparison distance is 8, the pattern centres on b + 4 for a
  burst that starts at b.
* The block reports that index and the energy of the best window.
* After a report it ignores hits for 8 cycles, so each burst gives exactly
  one report.

**`training_agc`, the VGA gain loop.**
* Each band-detector energy goes through a 22-comparator table. The table
  gives the gain error in whole dB over ±10 dB. Its boundaries are
  `P_TARGET·10^((i−10.5)/10)`, computed in integer arithmetic at
  elaboration.
* Inside the table range, the gain moves by the error.
* Outside it, a binary search halves the distance to 70 dB (signal too weak)
  or to 0 dB (signal too strong).
* Gains trained on a training packet, one for the noise floor and one for the
  signal, can be stored with `mb_train_save` and restored with
  `mb_train_load`. After a restore, only fine steps remain.

Not built for this variant:
* the hop-timing controller that switches RF sub-bands;
* the finer auto-correlator (reduction factor 2) used to confirm a window;
* the boundary refinement by the matched filter.

## 802.11a variant (`wlan_frame_sync`)

The same ideas were first worked out for an IEEE 802.11a receiver (20 MS/s,
64-point FFT). This synchronizer takes one sample per valid cycle and has
two stages.

**Packet detection (`wlan_packet_detect`).** The short preamble repeats every
16 samples. For each sample the block sums 48 lagged products
C = Σ r[i−16]·conj(r[i]), which is three short-symbol pairs, and the power
P = Σ |r[i]|². A sample passes when |C|² · 256 ≥ thr · P². Because the test
is normalised, it works before the AGC settles. The first passing value
opens a decision window. The packet is announced only if all of the next 32
values pass. One failure cancels the candidate (`cand`, `cancel`). Running
sums keep the cost at a 64-sample shift register and a few multipliers.

**FFT window detection (`mst_matched_filter`).** A full detector would
correlate 64 samples with the 64-sample long training symbol. This one uses
only the 16 coefficients with the largest magnitude (the most-significant
taps). Each real and imaginary part is rounded to 0, ±1/64, ±1/32, ±1/16 or
±1/8, so every product is a shift. The coefficients are computed from the
802.11a long training symbol when the design is elaborated. `N_TAPS` can be
raised up to the full 64 taps; 20 taps hold up better on channels with a
long delay spread. Above 20 taps the accumulator is two bits wider.

**Pre-cursor search.** After an announcement, `wlan_frame_sync` looks at 160
window starts. It keeps the five largest correlation powers. Among those at
most five samples before the peak, it picks the earliest, so a weak first
path beats a stronger echo. It reports `boundary` (a long training symbol
start) and `precursor`. `rearm` starts the search for the next packet.

Own choices: the 8-bit sample width, the 32-value decision window, the
160-position search and the threshold format. Not built: carrier-offset
compensation, the channel equaliser, and detection of the end of the short
preamble.

## Top-level ports (`frame_sync_top`)

| port | dir | meaning |
|---|---|---|
| `adc[4]` | in | samples 4t..4t+3 (5-bit I/Q) |
| `pd_thr[7:0]` | in | packet threshold on \|A\|²/P², in 1/256 |
| `frame_end` | in | end of frame; back to packet detection |
| `fft_valid`, `fft_data[4]`, `fft_mask`, `fft_first`, `fft_type`, `fft_sym_cnt` | out | gated FFT input |
| `pkt_detect`, `boundary_valid`, `fft_boundary`, `precursor`, `frame_sync`, `ptd_timeout` | out | status pulses; `fft_boundary` is the sample index of a sync sequence start |
| `state`, `samp_idx` | out | current phase; wrapping index of `adc[0]` |
| `mb_adc[4]`, `mb_clr` | in | multi-band sample input (indexed by `samp_idx`); restart of the band search |
| `mb_train_sel`, `mb_train_save`, `mb_train_load` | in | store/restore trained gains (slot 0 noise, 1 signal) |
| `mb_band_valid`, `mb_band_idx`, `mb_band_pow` | out | band burst report |
| `mb_gain`, `mb_gain_est`, `mb_gain_coarse` | out | VGA gain (dB), table error, binary-search step |
| `w_valid`, `w_re`, `w_im`, `w_thr`, `w_rearm` | in | 802.11a sample input (8-bit I/Q), packet threshold, search for the next packet |
| `w_pkt_detect`, `w_pkt_idx`, `w_pkt_cand`, `w_pkt_cancel` | out | 802.11a packet announcement and decision window |
| `w_boundary_valid`, `w_boundary`, `w_precursor` | out | 802.11a FFT window boundary |

All sample indices are 16-bit and wrapping. Only differences of indices are
compared.

## Where this RTL departs from, or adds to, the underlying method

* **Symbol power.** P is computed in the auto-correlator. The method takes it
  from the AGC, which is not part of this RTL.
* **Guard interval.** The guard interval is taken as 5 samples, so a symbol
  is 165 samples. This comes from the 312.5 ns symbol at 528 MS/s.
* **Sync sequence.** See above; it is this design's own choice.
* **Pre-cursor window.** 5 samples, the value the method uses for its
  802.11a matched filter.
* **First dynamic threshold.** It uses the first two D values. The method
  seeds it from the packet detection value, which has a different scale once
  the power normalisation is removed.
* **Packet detection block.** 42 products, ⌊164/4⌋+1. Blocks are free-running,
  not aligned to symbols. The select period is 10 cycles.
* **Additions of this design:**
  * the ALIGN step;
  * the 32-window timeout in preamble timing;
  * the `frame_end` input;
  * the gate's lane-mask output;
  * the clear and full signals of the register file.
* **Multi-band variant:**
  * It gets its own sample input and runs in parallel.
  * Its lookup-table target (an energy of 8192 per 128 samples) and its
    whole-dB steps are this design's own choices.
  * The reset gain of 35 dB, the hold-off and the save/load strobes are this
    design's own choices.
* **802.11a variant:** see its section above for its own choices.
* Blocks outside the synchronizer (ADC, AGC of the UWB receiver,
  carrier-offset estimation, FFT) are not included.

## Simulating

Each testbench in `tb/` checks itself against values it computes on its own,
has a watchdog, and ends with a line `TB_RESULT checks=N failures=M`.
With Verilator 5:

    verilator --binary -Wall -Wno-UNUSEDSIGNAL --top-module tb_frame_sync_top \
        rtl/fsync_pkg.sv rtl/*.sv tb/tb_frame_sync_top.sv
    ./obj_dir/Vtb_frame_sync_top

List `fsync_pkg.sv` first. For another block, swap in its testbench.

`tb_frame_sync_top` runs the top at its default sizes on 25,000 samples. The
main stream holds three packets:
1. a clean preamble;
2. a two-path channel whose first path is weaker than the echo, which
   exercises the pre-cursor search;
3. an endless run of packet sync symbols, which exercises the timeout.

It checks the following:
* the detected boundary;
* the frame sync position;
* every gated sample and lane mask;
* the CES/data tags;
* that each mechanism (path rotation, single passing blocks, packets,
  boundaries, pre-cursor, frame sync, timeout, CES and data windows) happened
  at least once.

A second stream drives the multi-band ports. It has 50 bursts whose amplitude
follows the AGC gain, so the loop is closed. The test checks:
* one band report per burst at its exact index;
* the reported energy;
* a binary-search step followed by lookup steps;
* a gain within 4 dB of the target at the end;
* restoring a saved gain.

A third stream drives the 802.11a ports, one sample every other cycle. It
holds a periodic stretch too short to be a packet and two frames, the second
over a two-path channel. The test checks each announcement, the cancelled
candidate, each boundary at a long training symbol start, and the
pre-cursor pick on the second frame.

The block testbenches test the register file, sub filter, tap-reduction
filter (against a direct 128-sample reduced correlation), peak sorter,
auto-correlator (against exact lagged correlations), gate, control unit,
band detector (against a direct evaluation of the window equation), AGC
(against the update rule, plus a closed loop over targets from 2 to 68 dB),
802.11a packet detector (against direct sums and its own window state
machine), 802.11a matched filter (against coefficients written out as plain
numbers) and 802.11a synchronizer (against a direct TOP-5 search) each on
their own.

## Size

| block | registers (approx.) |
|---|---|
| register file | 32 × 8 bits |
| tap store | 128 bits |
| auto-correlator delay line | 124 × 14 bits |
| peak sorter | 5 entries |
| band detector power ring | 32 × 4 × 10 bits |
| 802.11a packet detector shift register | 64 × 16 bits |
| 802.11a matched filter window | 64 × 16 bits (16 positions tapped) |
| 802.11a pre-cursor list | 5 entries |
