# WCDMA cell search engine with frequency- and clock-error compensation

A handset that has just been switched on must find a base station before it knows
the timing, the scrambling code or the exact carrier frequency. WCDMA does this in
three steps:

1. **Slot synchronisation.** Every cell sends the same 256-chip primary
   synchronisation code (PSC) at the start of each 2560-chip slot. A matched filter
   finds the slot boundary.
2. **Frame synchronisation and code group.** In each slot the cell also sends one of
   16 secondary synchronisation codes (SSC). The sequence of 15 SSCs in a frame is a
   code word of a comma-free Reed–Solomon (CFRS) code. The code word names one of 64
   code groups, and its cyclic shift gives the frame boundary.
3. **Scrambling code.** The cell's common pilot (CPICH) is scrambled by one of the 8
   codes of the group. De-spreading with all eight and taking a majority vote over a
   frame identifies the code.

A cheap handset crystal may be off by up to 12 ppm. At a 2-GHz carrier that is a
frequency offset of up to 24 kHz. Over 256 chips this rotates the carrier phase by up
to 3.2 turns, which destroys the coherent correlations. The same error makes the ADC
sample clock drift by more than one chip within a 30-ms search. This engine therefore
has two algorithms on one piece of hardware:

* **Primary** is for idle- and active-mode search, when the frequency is already
  locked. One stage-1 module runs and all compensation is bypassed.
* **Enhanced** is for the initial search. The offset range is split into two
  frequency *bins*, and a stage-1 module runs for each bin. Every stage module has
  its own *preprocessing block* that compensates the bin's assumed errors:
  * **SPR** (sample point reordering) drops or stuffs single ADC samples to follow the
    assumed clock drift.
  * **RSPF** (random sample per frame) picks one of the two samples of each chip,
    chosen again at random every frame.
  * **FOC** (frequency offset compensation) de-rotates each chip by the bin's assumed
    offset.

  The bin with the stronger stage-1 peak wins. Its offset is the coarse frequency
  estimate, and its corrections are used in stages 2 and 3 of the same trial.

## Block diagram

```
             smp (2 x 4-bit I/Q, 2 samples/chip)
   ┌──────────────┬─────────┴────┬──────────────┐
 preproc 0     preproc 1      preproc 2      preproc 3        SPR -> RSPF -> FOC each
 (bin 0)       (bin 1)        (winner bin)   (winner bin)
   │              │              │              │
 stage1 (a)    stage1 (b)      stage2         stage3
   │ h,peak       │ h,peak       │ g, frame     │ k, votes
   └── bin decision ──► hand-over 1 ──► hand-over 2 ──► result
                         (h, bin,       (frame, g,
                          SPR state)     bin, SPR state)
```

`cse_top` also holds a chip timer: `slot_pos` (0..2559) and `frame_pos` (0..38399).
It counts the chips of preprocessing block 0. All four preprocessing blocks have the
same fixed latency, so every stage sees the same timing. All results are given as
positions on this timer.

## Trials and pipelining

One *trial* is a stage-1 dwell, then stage 2, then stage 3. The stages overlap
across trials:

* **Stage 1** runs dwells back to back while a search is active. A dwell lasts
  `N_SLOTS` = 15 slots, i.e. one frame.
* When a dwell ends, the bin decision is made. The slot boundary, the winning bin and
  that bin's SPR state and RSPF choice go into **hand-over register 1**. If a newer result arrives
  before stage 2 is free, it replaces the older one.
* **Stage 2** takes hand-over 1 when it is idle. Its SPR and RSPF are loaded with
  the stored state. It opens its first window at the next chip whose `slot_pos` equals the slot
  boundary.
* After 15 windows and CFRS decoding, stage 2 fills **hand-over 2**: the frame
  boundary, group, bin and its own SPR state and RSPF choice. Stage 3 takes it when idle and starts
  at the next frame boundary.
* When stage 3 passes the vote threshold, `result_valid` pulses. It carries the slot
  boundary `h_hat`, the frame boundary `fb_pos`, the group `g_hat`, the code `k_hat`,
  the winning bin `bin_hat` and its phase step `freq_est`. The search then stops.
* When stage 3 does not pass the threshold, `trials_failed` counts up and the search
  goes on with the trials already in the pipeline.

When a new search starts, it discards the results of stages that were started by the
previous search.

`start` launches a search and latches `mode` (0 = primary, 1 = enhanced). In
enhanced mode, `en_spr`, `en_rspf` and `en_foc` choose which compensations are active.

## Preprocessing (`preproc` = `spr` → `rspf` → `foc`)

**SPR** is a tapped delay line of 2·HALF+1 samples (HALF = 4), with a multiplexer and
a reordering controller.

* The controller adds the bin's drift to a signed fraction accumulator for every
  sample. The drift is in units of 2⁻²⁴ sample per sample, so 12 ppm ≈ 201.
* When the accumulator passes +1, the multiplexer moves one tap towards the newer end
  and one sample is **dropped**. This is the case when the ADC runs fast.
* When it passes −1, the multiplexer moves one tap towards the older end and one
  sample is **repeated**.
* The selection saturates at ±HALF. HALF = 4 samples covers 2.76 samples, the drift
  of 1.38 chips in 30 ms at 12 ppm.
* At selection 0 the delay is HALF samples. HALF must be even, so that the delay is
  a whole number of chips and RSPF still pairs the two samples of one chip.

The SPR state (selection and fraction) is restarted at every stage-1 dwell. It is
copied into stage 2's SPR and later into stage 3's. The reordering therefore
continues the trial's own timing reference and does not start again from zero. The
copy is taken when the earlier stage ends and loaded when the next stage starts. The
next stage may still be busy, so a state can wait in a hand-over register for up to
one frame. While it waits, the top level keeps stepping it with its bin's drift, using
the same rule as the SPR controller. The loaded state is therefore the one the SPR
would have reached had it kept running.

**RSPF** holds the first sample of each chip. At the second sample it outputs either
the held sample or the current one. The chip phase is a toggle counted from reset. It
is the same in all blocks because all blocks see the same samples.

A 16-bit LFSR draws a new choice at the start of every stage-1 dwell. A dwell is one
frame, so every frame of search gets a new sampling point. Stages 2 and 3 do not
draw their own choice. They load the one their trial's stage 1 used, together with
the SPR state. This matters:

* Stage 3 works on the cell's frames, which start at the cell's frame boundary, not
  at the timer's.
* When clock drift has moved the sample pairs across a chip edge, the two samples of
  a pair belong to neighbouring chips.
* A new draw in the middle of a stage-3 frame would then move the timing by a whole
  chip halfway through the vote.

**FOC** multiplies each chip by cos θ + j sin θ using four multipliers and two
adders. θ advances by `phase_step`/2¹⁶ of a turn per chip, so one LSB is 58.6 Hz and
±12 kHz is ∓205. cos and sin come from a 64-entry register file of 6-bit words,
indexed by the top 6 phase bits. It must be loaded through `lut_*` before use, e.g.
with round(31·cos(2πa/64)) and round(31·sin(2πa/64)), and can be rewritten at any
time. Products are scaled by 2⁻⁵ with rounding and saturated back to 4 bits. A
bypassed FOC still registers its input, so latency does not depend on the mode.

The total latency from ADC sample to chip is fixed. At the timer, the chip at cell
chip index c appears at timer position c + 2.

## Stage 1: hierarchical Golay correlator and accumulation

The PSC is hierarchical: PSC(16i + j) = o(i)·a(j), with

* a = + + + + + + − − + − + − + − − +
* o = + + + − − + − − + + + − + − + +

`egc` correlates in two levels:

1. A 16-tap ±1 filter for a (15 adders).
2. A 4-stage **Golay correlator** for o, working on the level-1 output with taps 16
   chips apart. Stage n computes
   `a_n = a_{n-1} + w_n·b_{n-1}(t − 16·D_n)` and `b_n = a_{n-1} − w_n·b_{n-1}(t − 16·D_n)`,
   with D = (2, 1, 4, 8) and w = (−, +, −, −). This takes 7 adders. The recursion
   generates o reversed, which is exactly the impulse response a correlator needs.

The delays (32, 16, 64 and 128 words of 13 bits) are **pointer-based FIFOs**
(`ptr_delay`). The words stay in place and one pointer walks round the array, so each
chip toggles one word instead of shifting the whole chain. The output is
Σₖ PSC(k)·x(t−255+k), 13 bits signed.

The sequence a has no power-of-two Golay structure, so level 1 is a plain filter.
This gives 22 adders in total, not the 13 that a fully Golay-structured PSC
correlator would need.

`stage1` runs two `egc`s, one for I and one for Q, and then:

* It forms yI² + yQ² (24 bits) and keeps the top 12 bits.
* It adds the result into a 2560 × 16-bit memory (`s1_ram`, 5.12 kB) at hypothesis
  h = slot_pos − 255 (mod 2560). The first slot of a dwell writes; the other 14 read,
  add and write back. 15 × (2¹² − 1) fits in 16 bits.
* During the last slot it tracks the maximum. h_hat is the slot boundary with the
  largest sum, and ties keep the earlier hypothesis.

A read–add–write needs 2 clock cycles per chip. At the reference 15.36-MHz clock
there are 4.

## Stage 2: coherent SSC detection and the systolic CFRS decoder

In each of 15 slots, `stage2` de-spreads the first 256 chips after the slot boundary.
It has 34 accumulators: 16 SSCs plus the PSC, each on I and Q.

* SSC j is Hadamard row 16j of order 256, times the z sequence built from a.
* The PSC correlation is the phase reference. For each j it forms
  z_j = yI,PSC·yI,SSCj + yQ,PSC·yQ,SSCj. One multiplier pair serves all 16 codes, one
  per cycle, after the window.
* It drops the 10 LSBs of z_j and takes the largest z_j as that slot's symbol.

`cfrs_decoder` is a 1 × 15 **systolic array** that scores all 64 × 15 = 960
hypotheses in 960 cycles:

* The 15 received symbols sit in a ring that rotates by one position per cycle.
* Code word g is broadcast one symbol per cycle. Processing element s compares the
  broadcast symbol with ring tap (15 − s) mod 15 and counts matches for shift s.
* After 15 cycles a comparator tree takes the best of the 15 counters.

The score of hypothesis (g, s) is the number of k with rx[k] = cw_g[(k+s) mod 15],
i.e. 15 minus the Hamming distance. g_hat is the group. s_hat is the frame slot of
the first window, so the frame boundary is t0 − s_hat·2560, where t0 is the timer
position of the first window. Decoding (961 cycles) finishes long before the next
slot's window (10240 cycles).

The code-word table is not built in. Load it through `cb_we/cb_group/cb_pos/cb_sym`
with symbol values 0..15, where symbol j means SSC j. For the standard table,
subtract one from its 1..16 numbering.

## Stage 3: eight de-scramblers and majority vote

Each `descrambler` does the following for its code:

* Multiplies the chip by the conjugate of its code chip:
  dI = rI·cI + rQ·cQ and dQ = rQ·cI − rI·cQ.
* Accumulates over one 256-chip symbol.
* Outputs accI² + accQ².

After each symbol, a comparator tree gives one vote to the strongest of the eight
codes; ties go to the lower code number. After `N_SYM` = 150 symbols (one frame) the
largest vote count is compared with `threshold`. Only a count strictly greater than
the threshold is a detection.

The engine does not generate scrambling codes. For each chip it shows the group
(`scr_group`) and the chip index within the frame (`scr_idx`). It expects the sign
bits of the eight codes' I and Q chips on `scr_code_i/scr_code_q` in the same cycle,
where 1 means −1. The index runs 0, 1, 2… from the frame boundary. A sequential code
generator, reset when `scr_idx` is 0, therefore fits this port.

## Word lengths

| signal | width |
|---|---|
| ADC sample, chip (I and Q) | 4 bits signed |
| PSC correlation (stage 1), SSC/PSC correlations (stage 2) | 13 bits signed |
| stage-1 energy → truncated partial result | 24 → 12 bits (12 LSBs dropped) |
| stage-1 accumulator field | 16 bits |
| stage-2 coherent combination → truncated | 27 → 17 bits (10 LSBs dropped) |
| stage-3 symbol accumulator / energy | 14 bits signed / 28 bits |
| FOC coefficients / phase accumulator | 6 bits signed / 16 bits |
| SPR drift fraction | 24 bits |

## Parameters

`cse_top` has three parameters:

* `SLOT_LEN` = 2560 chips per slot. A frame is always 15 slots, and stage 3 uses
  `SLOT_LEN·15/256` symbols.
* `N_SLOTS` = 15, the slots per stage-1 dwell.
* `SPR_HALF` = 4.

Smaller `SLOT_LEN` values are useful for faster simulation. `SLOT_LEN` must be at
least 256 plus a few chips, and a multiple of 256 if stage 3 is to cover a whole
frame.

Timing assumptions:

* Samples may arrive at most every second clock.
* The 7.68-MHz sample rate with a 15.36-MHz clock is the reference case.
* The engine expects exactly two samples per chip.

## Where this design goes beyond, or departs from, the original architecture

The architecture follows a published cell-search engine:

* the three stages and their dwell lengths;
* two stage-1 bins, and a preprocessing block per stage module;
* the SPR, RSPF and FOC structures;
* a Golay correlator for the PSC and the 5.12-kB accumulation SRAM;
* 12- and 10-bit truncation;
* the 1 × 15 systolic CFRS decoder;
* eight de-scramblers with majority vote;
* pointer-based de-spreader buffers;
* the primary/enhanced mode switch.

The following are this design's own choices:

* **Magnitude.** Exact squares are used. The published design uses a low-power
  magnitude approximation whose formula is not available.
* **PSC correlator.** It uses 22 adders instead of 13 (see stage 1).
* **Stage-1 truncation.** The original description gives the truncated stage-1
  partial result as both 11 and 12 bits. This design keeps 12 bits, the value that
  matches the 2-byte fields and the 5.12-kB memory.
* **FOC bypass.** A bypassed FOC passes its input through its output register instead
  of a wire. This keeps the latency of every preprocessing block the same in both
  modes, so one chip timer serves all of them.
* **Stage-2 phase reference.** It comes from a PSC correlator inside stage 2, and
  one multiplier pair is shared by the 16 codes.
* **RSPF timing.** The draw happens once per stage-1 dwell, and the choice is handed
  to stages 2 and 3, instead of each block drawing at every frame.
* **Engine control.** The hand-over registers, the SPR state hand-over (stepped while
  it waits), the warm-up of one slot after reset, the discarding of results from earlier searches, and
  stopping at the first success.
* **Configuration and encodings.** The FOC table format, the SPR accumulator format
  and tap count, the RSPF LFSR, the threshold (programmable) and all tie rules.
* **External tables and codes.** The scrambling-code generator and the CFRS table
  are outside the engine or loaded into it.

There are also configurations this design does not support:

* Partial-symbol de-spreading (PSD) and multiple timing candidates (MTC). These are
  alternatives to the chosen algorithm, not part of it.
* More than two stage-1 bins.

## Simulating

Every module in `rtl/` is one file. `cse_pkg.sv` holds the shared constants, the
structs and the closed-form PSC/SSC chip functions. The testbenches in `tb/` print
`TB_RESULT checks=N failures=M`, and each has a watchdog. Examples with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cse_pkg.sv tb/cse_tb_pkg.sv tb/tb_cse_top.sv --top-module tb_cse_top -Mdir obj -o sim
obj/sim
```

Swap in any other testbench in the same way. `tb/cse_tb_pkg.sv` provides
pseudo-random stand-ins for the CFRS table and the scrambling codes, and a
received-signal generator. The generator gives PSC + SSC + CPICH, each multiplied by
1 + j, with an optional frequency offset.

| testbench | what it shows |
|---|---|
| `tb_cse_full` | all defaults, 2560-chip slots. A primary search of a clean cell: slot and frame boundary, group and code exact (about 155 000 chips). Then an enhanced search with the ADC clock 12 ppm fast, an 18-kHz carrier offset and bins at ±12 kHz / ±12 ppm. Bin 1 must win, group and code must be right, timing within 3 chips, threshold 100 of 150 votes. Each succeeds on the first trial: 143 701 chips (37 ms). The mirror case (ADC slow, −18 kHz, bin 0 must win) takes 135 938 chips. The first case with RSPF off (FOC+SPR only) takes 161 264 chips |
| `tb_cse_top` | 512-chip slots. A primary search, then an enhanced search under 1/320 cycle/chip offset (12 kHz) and a 40-ppm clock error. Bin 1 must win. Stage-3 failures occur under an unreachable threshold and then success. SPR drops/stuffs, RSPF changes, FOC, SPR hand-over and the stepping of a waiting SPR state are each counted and required |
| `tb_stage1`, `tb_stage2`, `tb_stage3` | each stage alone at 512-chip slots, with clean and noisy signals, wrap-around boundaries, threshold failure and dwell-length checks. Stage 1 must hold `busy` until the cycle before `done`, so that a back-to-back dwell cannot take over the previous dwell's result |
| `tb_egc`, `tb_cfrs_decoder`, `tb_descrambler` | bit-exact checks against direct correlation, exhaustive scoring and direct energy; exact decoder latency (961 cycles) |
| `tb_spr`, `tb_rspf`, `tb_foc`, `tb_preproc` | drop/stuff against a reference controller, saturation, load/restart, RSPF selection and bypass, FOC rotation against the integer complex product, table refresh |
| `tb_ptr_delay`, `tb_s1_ram` | delay depth; full-size memory write/read and read-during-write |

## How far to trust it

Every module passes its testbench. Each testbench was also run against a copy of its
module with one deliberate bug, and it detects that bug.

The two enhanced-mode tests show that the compensation mechanisms work together.
`tb_cse_top` exaggerates the clock error so that drops happen within short frames.
`tb_cse_full` runs the worst case at full size, 12 ppm. These are single runs on a
noise-free channel, not a performance evaluation.

In the full-size runs, every search succeeds on its first trial. With SPR off,
none of the three finds the cell within 12 frames. A single noise-free channel cannot
show the benefit of RSPF, which is diversity across trials.

Detection statistics under fading and noise, as in a link-level study, have not been
reproduced. The PSC, SSC and z sequences are built from their standard definitions.
The CFRS table and the scrambling codes are external or loaded, so real-signal
interoperability depends on loading the standard table and attaching a standard
code generator.
