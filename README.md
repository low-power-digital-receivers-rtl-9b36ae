# Sequence-detecting wireline receivers and a burst-mode receiver controller

A wireline link that loses 27 to 35 dB at its Nyquist frequency smears every
bit over its neighbours. The usual cure digitises each sample with a flash ADC
and cancels that inter-symbol interference (ISI) in DSP. That costs a lot of power.

The receivers here take the opposite view. After light passive equalisation,
each sample depends on only four bits: the current bit B0, the one before it
(B+1), the one after it (B-1) and the one two before (B+2). There are only 16
possible noise-free sample levels. A handful of comparators can tell which one
was sent, so the receiver decides whole 4-bit *sequences* instead of single
bits. The ISI becomes information rather than noise: every bit is decided
several times, as B0, as B+1, as B-1 and as B+2 of its neighbours.

This repository holds synthesizable SystemVerilog for the digital part of three
receivers built on this and related ideas:

| Receiver | Top of its logic | Rate | What it adds |
|---|---|---|---|
| ADC-less sequence detector and equaliser | `sd_rx10` | 10 Gb/s, 4 paths at 2.5 GHz | position prediction by edge samples, 2-tap sequence DFE |
| Sequence detector with 1-bit data trace-back | `tbk_rx16` | 16 Gb/s, 4 paths at 4 GHz | fixed position comparators, check comparators, strong-bit trace-back |
| Burst-mode optical receiver controller | `bmrx_ctrl` | 7-10 Gb/s, logic at 1/8 rate | DC-offset recovery in 6 cycles, timing-skew adaptation |

`digital_rx_top` places the three side by side, each with its own clock, reset
and ports. They share nothing.

## 1. Sequences, banks and positions

Order the four taps by weight. In the channels considered,
h0 > h+1 > h-1 > h+2, so a sequence is written `{B0, B+1, B-1, B+2}` with B0
as the MSB (`seqrx_pkg::seq_t`). With a 1 counting +h and a 0 counting -h,
the example channel used throughout (h0 = 260, h+1 = 160, h-1 = 120,
h+2 = 80 mV) gives these levels:

| bank B0B+1 | B-1B+2 = 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| 11 | 220 | 380 | 460 | 620 |
| 10 | -100 | 60 | 140 | 300 |
| 01 | -300 | -140 | -60 | 100 |
| 00 | -620 | -460 | -380 | -220 |

The taps are not binary-weighted, so the levels of different banks overlap:
0111 (100) lies above 1000 (-100). **Within** a bank they never overlap,
because h-1 > h+2. The receivers exploit this:

* Decide which two adjacent banks the sample can be in. That choice is the
  *position*: bottom covers banks 01/00, mid covers 10/01, top covers 11/10.
* Inside each of the two banks, two comparators on the levels 01 and 10 split
  the bank into three regions. If k of them read 1, the sample is one of the
  in-bank codes k or k+1 (k = 0: 00/01, k = 1: 01/10, k = 2: 10/11). This
  gives four candidate sequences, two per bank (`seq_gen`).
* The two banks of a position differ in B+1; the two candidates of a bank
  differ in B+2 (and sometimes B-1). B+1 and B+2 are earlier bits, already
  decided, so a 2-tap decision-feedback equaliser picks one candidate. This is
  the *sequence DFE* (`seq_dfe_quad`).

The four floating comparators thus serve whichever two banks the position
selects. `seq_ref_mux` switches their references: the upper pair moves between
banks 11 and 01, and the lower pair between 10 and 00.

## 2. The 10 Gb/s receiver: predict, verify, correct

### Prediction from the edge sample

Each of the four interleaved paths samples the signal twice. It samples once at
the data/data edge, half a unit interval (UI) before the data sample, with two *edge comparators*, and once at
the data instant with the four floating comparators. The edge sample predicts
where the data sample will be. Cedge1 = Cedge0 = 1 predicts top, 0/0 predicts
bottom, 0/1 predicts mid, and the impossible 1/0 is read as mid. The edge
comparators fire on the rising clock edge. The data comparators fire on the
falling edge, 2 UI later, which leaves time for the reference multiplexer to
settle.

### Verification and the error-tolerance rule

The prediction can be one step off. `seq_gen` checks it using only the four
floating comparator outputs:

* **All four read 1** at bottom or mid: the sample is above both covered banks.
  The position moves up one step. The old upper pair's results become the new
  lower pair's, and the new upper bank gets its most probable reading, 00.
* **All four read 0** at mid or top: the sample is below both banks. The
  position moves down. The old lower pair becomes the new upper pair, and the
  new lower bank gets 11.
* Anything else is accepted as it is. All-ones at top and all-zeros at
  bottom cannot move further.

The "most probable" reading is exact when moving from bottom to mid or from
top to mid. It is also exact for the middle banks 10 and 01. It is a guess
only when moving from mid to top into bank 11, or from mid to bottom into
bank 00. There, the rule recovers only the half of the bank nearer the old
position: 1100 and 1101 (B-1 = 0), or 0010 and 0011 (B-1 = 1). A one-step
misprediction of 1110, 1111, 0000 or 0001 stays wrong. The testbenches respect
this. Their model of which predictions are recoverable is
`tb_rx_model_pkg::allowed_pos`.

### The sequence DFE, loop-unrolled

Path 0 carries the oldest bit of each group of four. For path k, B+1 is B0 of
path k-1 and B+2 is B0 of path k-2. Paths 0 and 1 reach back to paths 2 and 3
of the previous cycle through two history flip-flops. Within a path, both B+1
outcomes are prepared in parallel. In each bank, the B+2 bit picks the
candidate whose LSB matches it, and B+1 then picks the bank. The serial chain
through the four paths is one 2:1 multiplexer per path. All four decisions are
registered once per quarter-rate cycle.

**Timing.** A sample that is valid before a rising edge, and held through the
following falling edge, is decided at the next rising edge: one cycle of
latency. `bits[k]` is B0 of path k, with path 0 first in time. Reset clears the
DFE history to 0.

## 3. The 16 Gb/s receiver: trace-back on strong bits

At 16 Gb/s the edge-sample prediction is dropped. Two *fixed* data comparators
(CFIX1, CFIX0) give the position from the data sample itself. They are placed
between the banks: between 0111 and 1100 (+160 mV in the example) and between
0011 and 1000 (-160 mV). The same verification, candidates and sequence DFE as above
follow. The fixed comparators fire on the rising edge, and the floating and
check comparators on the falling edge.

The DFE's weakness is error propagation. A noisy sample can land in the wrong
bank, and the DFE then chooses the wrong B0. Two *check comparators* per path
give a second opinion, and a *strong* neighbour decides who is right.

### Check comparators (`chk_ref_mux`)

| position | upper check | lower check |
|---|---|---|
| top | not clocked | between 1101 and 0111 (+240) |
| mid | between 1100 and 0110 (+80) | between 1001 and 0011 (-80) |
| bottom | between 1000 and 0010 (-240) | not clocked |

An unclocked comparator gets the common-mode reference (code 0). It keeps its
last decision, which the logic ignores.

### Strong bits (`strong_detect`)

A sample is a **strong 1** when both fixed comparators say top and the lower
check reads 1. The sample is then above every level that has B0 = 0, so its B0
needs no feedback. A sample is a **strong 0** when both fixed comparators say
bottom and the upper check reads 0.

### The alternative (`tbk_alt_gen`)

Every DFE decision is given exactly one alternative. For B0 = 1 the lower
check decides. A 0 means the sample may belong to the bank below, so the
alternative is *outside the bank*: B0 and B-1 are flipped. A 1 means only B-1
is in doubt, so the alternative is *within the bank*: B-1 alone is flipped.
For B0 = 0 the upper check decides, with the polarity reversed. Either way the
alternative has the opposite B-1 to the DFE decision.

### The trace-back (`tbk_select_quad`)

B-1 of the current decision is a guess of the *next* bit. When the next sample
is strong and the current one is not, that guess can be checked. The output is
whichever of the DFE sequence and its alternative has B-1 equal to the strong
next bit. The check is skipped if the current position was overwritten by the
error-tolerance rule, or if `tb_en` is low. With trace-back off, the output is
the DFE output delayed, which suits low-loss channels and saves power.

Two worked cases, with the sent bits 1 1 0 1 1 in time order, make the
current sample 0111 (100 mV) and the next one 1011 (300 mV, a strong 1):

* Noise of +130 mV gives 230 mV: position top, lower check 0. The DFE picks
  1101, so B0 is wrong. The alternative is "outside", 0111. The strong next bit
  (1) matches its B-1, so 0111 is output.
* Noise of -200 mV gives -100 mV: position mid, upper check 0. The DFE picks
  0101, so B-1 is wrong. The alternative is "within", 0111. It is selected.

**Timing.** Path 3's next bit is path 0 of the following cycle. The DFE
results are therefore held one cycle, and the choice is registered. `tb_seq`
and `tb_bits` appear two quarter-rate cycles after `dfe_seq`. `tb_applied`
and `tb_changed` flag per path where the check ran and where it changed the
decision. Trace-back results are not fed back into the DFE. Both outputs are
brought out.

## 4. The burst-mode optical receiver controller

A burst-mode optical receiver must settle within a few nanoseconds of each
burst. The settling covers the DC level of a DC-coupled front end and the
sampling phase. `bmrx_ctrl` runs both from one comparator, clocked by C8 (1/8
of the data rate).

**DC recovery (`dc_recovery_ctrl`).** The burst begins with a 1010 preamble.
Two neighbouring samples, one of a 1 and one of a 0, add to the offset:
S(n) + S(n-T). Only the sign of that sum is used. A 5-bit SAR drives the offset
DAC for six C8 cycles: one resets the SAR and five decide a bit each. At
10 Gb/s, C8 is 1.25 GHz and the recovery takes 4.8 ns. A positive sum raises
the code here. The DAC is assumed to subtract.

**Skew adaptation (`skew_adapt`).** On ordinary data after the preamble, the
same comparator switches to difference mode. Now `cmp_mode` is 1 and the
comparator gives the sign of S(n) - S(n-T) between two equal consecutive bits.
On a settled "1 1" (pattern 011x), a rising slope means the phase is early:
vote to sample later ("right"). On "0 0" (100x), a falling slope means the
same. The mirror patterns x110 and x001 vote to sample earlier. `slope_detector`
encodes these four rules.

`majority_voter` sums the votes over each C16 window (every second C8 cycle).
During the strobe cycle it reports the majority of the whole window. A
5-bit SAR then moves the phase-rotator code one bit per window. The code
changes at the edge that opens the next window, so each window sees a single
trial code. A tie or an empty window takes no step. A larger code means a later
phase. The search runs once per burst.

**Sequence (`bmrx_ctrl`).** `burst_start` starts DC recovery with the
comparator in sum mode. Once DC recovery is done *and* `preamble_end` has been
seen, skew adaptation starts in difference mode. When it finishes, `locked`
rises. The DAC and phase codes are held until the next `burst_start`.

## 5. Module map

```
digital_rx_top
├── sd_rx10                      10 Gb/s receiver
│   ├── sd_rx_path  x4           2 edge + 4 floating comparators per path
│   │   ├── strongarm_cmp x6     behavioural comparator + latch
│   │   ├── seq_ref_mux
│   │   └── seq_gen
│   └── seq_dfe_quad
├── tbk_rx16                     16 Gb/s receiver with trace-back
│   ├── tbk_rx_path x4           2 fixed + 4 floating + 2 check comparators
│   │   ├── strongarm_cmp x8
│   │   ├── seq_ref_mux, chk_ref_mux
│   │   ├── seq_gen
│   │   └── strong_detect
│   ├── seq_dfe_quad
│   ├── tbk_alt_gen x4
│   └── tbk_select_quad
└── bmrx_ctrl                    burst-mode controller
    ├── dc_recovery_ctrl ── sar_search
    └── skew_adapt
        ├── slope_detector
        ├── majority_voter
        └── sar_search
```

`seqrx_pkg` holds the sequence type, the position enum (`POS_BOT`, `POS_MID`,
`POS_TOP`), the bit indices of a sequence and small helper functions.

## 6. Interfaces and number formats

* **Samples and references** are signed `REF_W`-bit integers (default 12),
  1 LSB = 1 mV. The sample-and-hold, the passive equaliser and the reference
  generator are analog. Their outputs enter as ports: `edge_s`, `data_s`,
  `edge_ref`, `fix_ref`, `bank_ref[bank][j]` (j = 1: level 10, j = 0: level 01)
  and `chk_ref_tbl` (in the table order above: top-lower, mid-upper,
  mid-lower, bottom-upper). References are programmable, as on a chip whose
  thresholds are tuned to the measured channel taps.
* **`strongarm_cmp`** is a behavioural model of a sampled comparator with a
  latch: `q <= vin > vref` on its clock edge when `en` is high. It is written
  as plain clocked logic, so it synthesises, but it stands for an analog
  circuit.
* **Burst-mode controller:** `cmp_out` is the shared comparator's output.
  `bits`/`bits_valid` carry recovered data d(n-2..n+1) for the slope rules.
  `dac_code` and `pr_code` drive the offset DAC and the phase rotator, which
  are not included.
* **Parameters:** `NPATH` = 4 interleaved paths, `DAC_W` = 5, `PR_W` = 5,
  `CNT_W` = 6 (voter count). The 4-bit sequence width is fixed by the
  structure.

## 7. Where this RTL goes beyond or departs from the source description

* Mid-to-top and mid-to-bottom corrections recover only the near half of banks
  11 and 00 (Section 2). This follows from the correction rule as described;
  nothing was added to widen it.
* The position-comparator bubble (1/0) is read as mid in both receivers.
* The trace-back pipeline is two cycles deep, and `tb_en` acts on the selection
  stage. Trace-back does not feed the DFE.
* The majority voter's window alignment, tie rule and count width, the
  phase-code polarity, the DAC sign convention and the SAR form are choices
  made here. The source names these functions without giving their insides.
* The end of the preamble is an input; how it is detected is left to the
  surrounding system.
* Clock recovery (the third edge comparator of each 10 Gb/s path and the
  injection-locked oscillator of the burst-mode receiver) is not included. The
  receivers take their clocks as inputs.
* Channels whose tap values fall outside the working range described under
  Verification need a different position scheme. The source does not give one.
* The noise-margin analysis with 5 to 7 channel taps needs longer sequences
  than the 4-bit structure built here.

## 8. Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each compares
the module against an independent model, counts checks and failures, ends with
a `TB_RESULT checks=N failures=M` line and has a watchdog. The channel model
shared by the receiver testbenches is `tb/tb_rx_model_pkg.sv`.

* `tb_sd_rx10`: 12,000 random bits through the channel model. Predictions are
  spread over bottom, mid and top, including recoverable one-step errors. Every
  decision must be exact. Corrections up and down are counted and must occur.
* `tb_tbk_rx16`: random bits with ±20 mV noise plus the two trace-back cases
  above, injected at random. With trace-back on, every output bit must be
  right. With it off, the output must equal the delayed DFE output.
* `tb_dc_recovery_ctrl`, `tb_skew_adapt`, `tb_bmrx_ctrl`: an analog
  offset model (clamped sum) and a sampling-phase model (slope votes that point
  to a hidden optimum, random at the optimum). The residual offset must be below
  1 LSB, done must come after exactly six C8 cycles, and the phase code must end
  within 1 of the optimum.
* `tb_digital_rx_top` runs all three receivers at once at the default
  parameters. It counts each mechanism: predictions of each position,
  corrections up and down, both trace-back repairs, trace-back changes and
  bypass, DC recoveries, skew adaptations, comparator mode switches, and early
  and late preamble ends. It fails if any count stays at zero.
* `tb_channel_sweep` runs the two wireline receivers over three 4-tap
  channels. The references are recomputed for each channel and nothing else
  changes. Samples carry ±10 mV noise. In the 10 Gb/s receiver this flips
  the floating comparator whose reference a sample sits on, and the DFE must
  absorb that error. Every decision must be exact. The working range is the set of tap
  values with h0 > h-1 + h+2, which the fixed comparators need, and
  h+1 < h-1 + h+2, so that neighbouring banks overlap as the three positions
  assume. Outside that range, for example h+1 = 180 mV with h-1 + h+2 = 170 mV,
  the 10 Gb/s edge prediction no longer matches where the sequences fall.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/seqrx_pkg.sv tb/tb_rx_model_pkg.sv tb/tb_digital_rx_top.sv \
    --top-module tb_digital_rx_top
./obj_dir/Vtb_digital_rx_top
```

Replace `digital_rx_top` with any module name to run that module's testbench.
Packages must come first on the command line. The testbenches use
`$urandom` and are two-state clean: every register is reset or initialised.
