# Multi-track read/write channel for a stationary-head tape recorder

A stationary-head tape deck writes and reads eight parallel tracks at a low
tape speed (4.76 cm/s, 96 kbit/s channel bit rate per track). At that speed,
shocks and vibration easily move the tape speed by 10 % or more, and the tracks
also drift in time against each other by ten or more bit intervals. So each
track needs its own clock recovery, but each of these PLLs would have to be wide
enough to follow fast speed changes, and wide PLLs are noisy and lose lock.

The main idea of this design is the **multi-track PLL**. One frequency detector
watches the zero crossings of all eight tracks at once and turns them into a
single speed estimate. Every track's oscillator gets that estimate as a
**feed-forward** frequency control, on an extra input next to its own loop
filter. The speed change is then handled outside every loop. The per-track
loops only absorb the phase differences between tracks and can be narrow. The
estimate has to be low-pass filtered, which makes it late. Each track's samples
are therefore delayed by the same amount (T1) before its PLL, so the correction
arrives together with the speed error it describes.

Around that core the RTL has everything else the channel needs in logic:

* the ETM 8-to-10 dc-free channel code;
* the tape block and frame format on the write side;
* a digital IIR + FIR equalizer;
* full-response bit detection;
* block synchronisation and decoding on the read side.

## Signal path

```
write, per track:
  bytes -> tape_formatter (ETM encoder inside) -> channel bit -> write amplifier

read, 8 tracks, one sample per clock (3.2 samples per channel bit):
  6-bit ADC sample -> equalizer --+--------------------------------> freq_detector
                                  |                                        | ctrl (common)
                                  v                                        v
                             delay_line T1 -> phase_detector -> loop_filter -> (+) -> dco
                                   |              ^                                |
                                   |              +-------- oscillator phase ------+
                                   v
                             bit detector (sign at bit centre) -> tape_deformatter -> bytes
                             \______________________ track_pll ____________________/
```

`mtr_top` holds eight of each per-track chain, one `freq_detector`, and the
write formatters. The head, read amplifiers, analog anti-aliasing and
pre-equalization filters, the A-to-D converters and the crystal are outside the
RTL. The design receives 6-bit samples and one clock. Error correction and
source coding are not part of it either.

## The multi-track PLL

### Speed from zero-crossing intervals (`freq_detector`)

After equalization the signal crosses zero only on bit boundaries. So the time
between two crossings of one track is a whole number of channel bits. For each
track, a counter measures that interval `D` in samples. The detector then:

1. **Rounds** `D` to a whole number of bits `n`, against the current period
   estimate `P`. It compares `2·D` with `(2k+1)·P` for k = 0 … NMAX. Intervals
   under half a bit (noise) and over NMAX = 7 bits are dropped. Using the
   running estimate instead of the nominal 3.2 keeps the rounding right during
   large speed deviations.
2. **Per-bit period** `D/n`, computed with a small reciprocal table `2^16/n`.
3. **Combines** the tracks. The errors `D_i/n_i − P` of all tracks that ended
   an interval in this cycle are summed.
4. **Low-pass filters** the sum: `P_acc += Σ(D_i/n_i − P)`, `P = P_acc >>> K`.
   `P` is in samples per bit with 10 fraction bits. It is clamped to between
   half and twice the nominal 3.2.
5. **Converts** the estimate to an oscillator step:
   `ctrl = 2^26 / P − 20480`, where 20480 = 2^16 / 3.2 is the nominal step.

With random data each track ends an interval about every 6.4 samples, so eight
tracks give about 1.25 intervals per sample. The filter's time constant is then
about 2^K / 1.25 ≈ 51 samples (16 bits) for K = 6. This is why the default T1
is 48 samples. If you change K, change T1 in `mtr_top` with it.

The detector uses crossings at sample resolution, with no interpolation. Each
interval is therefore off by up to a sample, but the error averages out over
the thousands of intervals per filter time constant. In simulation the estimate
settles to within 0.3 % of the true period at nominal, −10 % and +8 % speed.

### One track (`track_pll`)

* `delay_line`: T1 samples of delay.
* `phase_detector`: at every sign change of the delayed signal, takes the
  oscillator phase. Bit centres are at phase 0 (the accumulator's wrap) and
  boundaries at half a turn. So `pe = phase − 2^15 − BIAS`, taken as a signed
  16-bit value. BIAS = half a nominal step, because a crossing lies on average
  half a sample before the sample that shows it.
* `loop_filter`: a PI filter. It applies a one-shot phase correction
  `−pe >>> KP` and updates an integrator `−pe >>> KI`, which is limited to
  ±FLIM. Defaults: KP = 4, KI = 11, FLIM = 2048 (±10 % of the nominal step).
* `dco`: the adder and oscillator. It is a 16-bit phase accumulator stepped once
  per sample by `20480 + ctrl + freq_adj + phase_adj`. An assertion checks that
  the step stays positive and below one turn, so no bit centre is lost or
  counted twice.
* Bit detector: at each wrap, the sign of whichever delayed sample lies nearer
  the bit centre (the one just before it or just after it). A positive signal is
  a 1.

The loop gains are narrow on purpose. With the feed-forward control inverted,
the full eight-track test fails. A single track without feed-forward pulls in
a 2 % offset on its own but not a 4 % one. With feed-forward it runs error-free
through ±20 % speed shocks and a 12 % offset.

## ETM channel code (`mtr_pkg`, `etm_encoder`, `etm_decoder`)

Each byte becomes a 10-bit word (rate 8/10, 25 % overhead). The code is dc-free
so that low-frequency overwrite noise can be filtered off without hurting the
signal. The rule the RTL uses:

* Take the running digital sum (RDS) of the NRZ sequence, counting +1 for a one
  and −1 for a zero. It must stay within six values, here numbered 0…5.
* Words start and end only at RDS 3 (state σ0) or RDS 1 (state σ1).

Counting the words this rule allows gives 197 (σ0→σ0), 155 (σ0→σ1),
155 (σ1→σ0) and 131 (σ1→σ1). These are the counts of the ETM code. The
six-value band also limits runs to five equal bits.

The standard ETM table is not reproduced. The byte-to-word assignment here is
this design's own, and is built so that decoding needs no state:

* 89 zero-disparity words are allowed from both states. The largest of them,
  `1101010100`, is kept back as the **block sync pattern**. The other 88, in
  ascending order, encode bytes 0…87 on both pages.
* Bytes 88…255 take the words allowed from only one state, in ascending order:
  σ0-only words on page σ0 and σ1-only words on page σ1.

Every word therefore stands for exactly one byte, so the decoder is a single
1024-entry lookup (`etm_decoder`). Any other word is flagged as invalid, and an
error never spreads beyond one byte. Constant functions in `mtr_pkg` build both
tables at elaboration, so there are no data files.

The sync pattern is not guaranteed to be absent from the data stream across
word boundaries. The deformatter makes up for this by confirming a sync before
trusting it.

## Tape format (`tape_formatter`, `tape_deformatter`)

* A **tape block** is 51 symbols sent MSB first (510 channel bits):
  * the sync pattern;
  * the ETM word of the block number (0…31);
  * the ETM word of the frame number modulo 256;
  * 48 data words.
* A **tape frame** is 32 blocks followed by an **inter-frame gap**. The gap is
  at least 64 channel bits of the dc-free pattern `1100`. It is the format's
  elastic part: the formatter stretches it four bits at a time until the source
  offers the first byte of the next frame (`gap_stretch`). A byte missing
  inside a frame is sent as 0x00 and flagged on `underrun`.

The deformatter runs four states:

| state | what it does |
|---|---|
| HUNT | looks for the sync pattern anywhere |
| CHECK | a candidate was seen; the next sync must come exactly one block later |
| LOCK | decodes the symbols and outputs every data byte with frame, block and index |
| GAP | entered when a sync is missing after block 31; the first sync in the gap goes straight back to LOCK |

A sync missing anywhere else drops the deformatter back to HUNT. The block used
for confirmation is not output, so after a cold start the first block is lost.
Across a gap no block is lost.

## Equalizer (`equalizer`)

The target response is cos³(ωT) full response: zero crossings on bit
boundaries and little inter-symbol interference at the bit centres. The filter
has two sections:

* IIR: `v[n] = x[n] + (a·v[n−1]) >>> 8`, saturated to 12 bits.
* FIR: `y[n] = (Σ c[k]·v[n−k]) >>> 8` over 7 taps, saturated.

The coefficients are 10-bit signed inputs with 8 fraction bits, shared by the
tracks. They are inputs because the channel response differs between normal
and reverse play and between home-recorded and pre-recorded tape. No coefficient
sets are built in: compute them for your head and tape. The latency is two
cycles.

## Top-level interface and timing (`mtr_top`)

Everything runs on one clock, the sample clock (3.2 × 96 kHz = 307.2 kHz in the
recorder; any faster clock works with the enables).

* **Write:** `wr_bit_en` sends one channel bit per track on `wr_bit`. Bytes
  arrive per track on `wr_valid`/`wr_data`/`wr_ready`.
* **Read:** `adc_valid` with `adc[t]` (6-bit two's complement) gives one sample
  per track. The outputs per track are:
  * decoded bytes: `rd_valid`, `rd_data`, `rd_err`, `rd_frame`, `rd_blk`, `rd_idx`;
  * recovered bits: `rd_bit_valid`, `rd_bit`;
  * sync status: `rd_locked`, `rd_lock_event`, `rd_gap_event`;
  * phase errors: `rd_pe_valid`, `rd_pe`.

  `speed_period`, `speed_ctrl` and `speed_events` show the common speed
  estimate.

Parameters of `mtr_top`: `TRACKS` = 8, `ADC_W` = 6, `BLOCKS` = 32 (these follow
the recorder), and `W`, `CW_EQ`, `NTAPS`, `PH_W`, `CW`, `T1` (this design's
choices). The oscillator's nominal step, 20480, fixes the 3.2 oversampling.
Change it together with `OSR_NUM`/`OSR_DEN` of `freq_detector` and `BIAS` in
`track_pll`. Registers use an asynchronous active-low reset.

## What follows the recorder and what is this design's own

Taken from the recorder's description:

* 8 tracks and the 6-bit converter;
* 3.2× oversampling;
* the ETM constraints (six-value digital sum, two states, state-independent
  decoding) and its word counts;
* the 51/3/48-symbol block, the 32-block frame and the nominal gap of 64;
* an IIR followed by an FIR equalizer with a full-response target;
* the multi-track PLL structure: a frequency detector over all tracks,
  low-pass filtered and fed forward to every oscillator through an adder, a
  T1 delay before each phase comparator, and per-track phase comparator, loop
  filter and digitally controlled oscillator.

This design's own choices:

* all word widths;
* the ETM byte-to-word table and the sync word;
* the gap pattern and its unit (bits);
* the content of the two identification symbols;
* the sync confirmation logic;
* the equalizer orders;
* how the frequency detector turns intervals into a speed (rounding against the
  running estimate, reciprocal table, first-order filter, divider);
* the phase detector without interpolation;
* the PI loop filter and its gains;
* the nearest-sample bit decision;
* the T1 value.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_etm_encoder` | every (state, byte) pair and 4000 random bytes with sync words; RDS band, word boundary states, uniqueness of decoding, against an independent reference (`etm_ref_pkg`) |
| `tb_etm_decoder` | all 1024 words |
| `tb_tape_formatter` | three frames parsed bit by bit, gap pattern and stretching, RDS over the whole stream |
| `tb_tape_deformatter` | noise before the first sync, three frames, a corrupted word, exact byte count |
| `tb_equalizer` | bit-exact model, coefficient sets, saturation, 2-cycle latency |
| `tb_freq_detector` | 8 tracks at nominal, −10 %, +8 %: estimate within 2 % after settling and within 2.5 % on every settled cycle, response within 400 samples |
| `tb_delay_line`, `tb_phase_detector`, `tb_loop_filter`, `tb_dco` | models of each unit; wrap count at 10 % slow |
| `tb_track_pll` | every recovered bit compared at nominal, 2 % off without feed-forward, 12 % slow with it; no slips |
| `tb_mtr_top` | full size (8 tracks, 32-block frames); see below |
| `tb_speed_shock` | full size; the same tapes played with ±10 % and ±20 % sinusoidal speed shocks, each at about 1875 and about 594 bits per cycle; every byte must come back on every track |

`tb_mtr_top` runs the whole design at its default size, with 8 tracks and
32-block frames:

* It writes two frames per track, with the gaps stretched.
* It plays them back through a channel model (`tb_chan_pkg`). The model adds
  12 bits of skew between tracks, an echo that the IIR removes, noise, and a
  speed profile of nominal, then ±9 % shocks, then a ramp to −7 %.
* Every byte after the confirmation block must come back, on all tracks.
* It also counts gap stretches, sync locks, gap bridging, phase corrections and
  feed-forward excursions in both directions. Each must have happened at least
  once.

To run one testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mtr_pkg.sv tb/etm_ref_pkg.sv tb/tb_chan_pkg.sv tb/tb_mtr_top.sv \
    --top-module tb_mtr_top -Mdir obj_tb_mtr_top
./obj_tb_mtr_top/Vtb_mtr_top
```

Replace `tb_mtr_top` with any other testbench name. The packages that a
testbench does not use do no harm.

## Limits

* Speed tolerance has been simulated up to ±20 % sinusoidal shocks, a 7 % ramp
  and a 12 % steady offset, all without a byte lost. Deeper or more abrupt
  shocks are inside the detector's range (half to twice nominal) but have not
  been tested. An instant speed step is not handled cleanly: the phase loops
  slip bits until the filtered speed estimate catches up.
* The sync pattern can occur by chance inside data. Confirmation handles this,
  but a false lock right after a dropout costs a block.
* No equalizer coefficients for a real head are given. The testbenches use
  simple synthetic channels.
