# Wavelet QRS detector with radio packetiser

A wearable ECG node spends most of its energy on the radio. This design shrinks
what has to be sent: instead of streaming the raw ECG, it finds each heartbeat
(the QRS complex) on the node and sends one bit per sample, five to a byte. The
receiver then gets the beat times, and from them the RR intervals and heart
rate, for a tenth of the radio traffic. When the full waveform is needed, it
can still send the raw ECG, with or without the beat marks.

Detection uses a wavelet transform instead of heavy filtering. A quadratic
spline wavelet at scale 3 acts as a smoothed derivative. Each R wave turns into
a pair of coefficients of opposite sign: a positive maximum, a zero crossing,
then a negative minimum. A small set of comparators and two short state
machines recognise that pair. The detector stores no samples beyond the
13-sample filter history. It does one step per sample at 300 samples per second.

The RTL follows the processor described in *"A 0.83-µW QRS Detection Processor
Using Quadratic Spline Wavelet Transform for Wireless ECG Acquisition in
0.35-µm CMOS"*. That description fixes the structure, the widths, the wavelet,
the decision rules and the timing constants. The section
[Choices made here](#choices-made-here) lists every value this RTL had to
choose for itself.

## Signal path

```
            adc_start                 +------------------- qrs_processor -------------------+
 control  ------------> SAR ADC       |                                                     |
 _logic                 (off-chip     |  ecg_avg      qswt_filter           mmpr            |
   |  run, mode          model)  10b  |  4 codes  12b  scale-3     14b   feature extraction  | 1b
   |                   -------------->|  -> sum  ----> wavelet   ------>  + FSM 1 + FSM 2  --+---+
   |                   adc_data/done  |                                                     |   |
   |                                  +-----------------------------------------------------+   |
   |                                                 | sample (12b)                   qrs_indication
   |                                                 v                                          v
   +------------------------------------------> wireless_ctrl  -- SPI -->  CC2500 radio (off-chip)
```

| Module | Role |
|---|---|
| `qrs_chip` | Top level. It wires the blocks below and brings out the ADC and radio pins. |
| `control_logic` | Synchronises the Enable and Mode pins. While enabled, it requests one ADC conversion every `ADC_DIV` clocks. |
| `ecg_avg` | Adds four 10-bit conversions into one 12-bit two's complement sample. |
| `qswt_filter` | Scale-3 quadratic spline wavelet transform, 12-bit in, 14-bit out. |
| `mmpr` | Recognises modulus maxima pairs. It holds `zero_cross_det`, `peak_det`, `threshold_adj`, a two-sample delay, `mmpr_fsm1` and `mmpr_fsm2`. |
| `qrs_processor` | `ecg_avg`, `qswt_filter` and `mmpr` in a chain. |
| `wireless_ctrl` | Configures the CC2500 after reset. Then packs results into 12-byte packets and writes them to the radio's TX FIFO over SPI. |
| `qrs_pkg` | Widths, timing constants, enums for the states and codes, and the radio byte layouts. |

### Clocks

Everything runs from one clock, `clk`. In the intended system that is the
76.8 kHz system clock. The slower rates are clock enables:

* `control_logic` pulses `adc_start` every 64 clocks, giving 1200 conversions per second.
* `ecg_avg` emits one sample per four conversions, every 256 clocks (300 samples per second).
  This strobe is the "processor clock": every register in the filter and the recognition stage moves only on it.
* `wireless_ctrl` runs at the full clock rate for its SPI shifting.

The SAR ADC has its own 13.2 kHz conversion clock. That clock belongs to the
analog converter and is not generated here; `adc_start` and `adc_done` form
the only handshake. A 10-bit SAR converter needs about 11 clock periods per conversion:
one to sample and one per bit. At 13.2 kHz, that matches the 1200
conversions per second requested here.

To run the processor from a real 300 Hz clock instead, drive `clk` at 300 Hz and
hold the enables high. The logic does not assume the 256:1 ratio, except for
the radio throughput noted below.

## The wavelet filter (`qswt_filter`)

The transform uses the "à trous" scheme, which inserts zeros between filter
taps instead of down-sampling, so the output stays at the input rate:

```
s1[n] = x[n] + 3x[n-1] + 3x[n-2] + x[n-3]                 H(z)   (x 8)
s2[n] = s1[n] + 3s1[n-2] + 3s1[n-4] + s1[n-6]             H(z^2) (x 8)
w[n]  = floor( 2 (s2[n] - s2[n-4]) / 64 ) = (s2[n] - s2[n-4]) >>> 5     G(z^4)
```

Together these form a 14-tap antisymmetric FIR filter with taps
`[1 3 6 10 11 9 4 -4 -9 -11 -10 -6 -3 -1] / 32`. All sums are exact, at 15, 18
and 19 bits, and the result is truncated once at the end. For a 12-bit input,
|w| ≤ 8190, so the 14-bit output never saturates. A rising input gives a
positive coefficient.

`w` is registered. It updates on the enable that takes in `x`, and the
coefficient includes that sample.

## Recognising a QRS complex (`mmpr`)

This is the heart of the design and the part that most needs reading.

### Features, computed in parallel each sample

* **Zero crossing** (`zero_cross_det`). A sample compared with the previous one gives
  code 1 when the sign goes from ≤0 to >0, and code 2 when it goes from ≥0 to <0.
  The 1-bit flag `zc` is also set when a coefficient is exactly zero.
* **Peak** (`peak_det`). The first difference `d[n] = w[n] - w[n-1]` goes through a
  second zero-crossing detector. Code 2 (falling difference) marks a local
  maximum and code 1 a local minimum. The peak sample is the one before the
  sample that reveals it. With the registered flag, its amplitude is the
  coefficient from two samples earlier, which a two-register delay line
  (Z^-2) supplies.
* **Thresholds** (`threshold_adj`). Each side has its own set of registers.
  Positive maxima feed the positive side and negative minima feed the negative
  side, by magnitude. A peak at or beyond the side's threshold counts as a
  signal peak; otherwise it counts as noise. Each side keeps its last 8 signal
  peaks and last 8 noise peaks in shift registers with running sums, and
  computes

  `TH = ANPL + β (ASPL − ANPL)`, with `ASPL = Σsignal/8`, `ANPL = Σnoise/8` and `β = BETA_X16/16 = 0.25`.

  The outputs are `th_pos = +TH_pos` and `th_neg = −TH_neg`. After reset, the
  signal registers hold `INIT_SIGNAL` (1024) and the noise registers hold 0, so
  detection starts with thresholds of ±256.

### FSM 1: is this a maxima pair?

| State | Leaves on | Action |
|---|---|---|
| `SEEN_NONE` | a peak `> th_pos` or `< th_neg` → `SEEN_PEAK` | remember the direction |
| `SEEN_PEAK` | a valid peak of the opposite direction → `SEEN_OPPOSITE` (case 2) | candidate ← 1, confirm ← 1 |
| | else a zero crossing → `SEEN_ZERO` | candidate ← 1 |
| | else counter ≥ TOL → `SEEN_NONE` | |
| `SEEN_ZERO` | a valid opposite peak → `SEEN_OPPOSITE` (case 1) | confirm ← 1 |
| | else counter ≥ TOL → `SEEN_NONE` | |
| `SEEN_OPPOSITE` | counter ≥ RP → `SEEN_NONE` | confirm ← 0 |

A single counter runs in samples and clears on every state change. It is
compared before it is incremented. As a result, an idle `SEEN_PEAK` or
`SEEN_ZERO` times out on its 22nd sample (TOL = 21, 0.07 s), and
`SEEN_OPPOSITE` (the refractory blanking) lasts 26 samples (RP = 25).
`QRS_candidate` is a one-sample pulse. `QRS_confirm` is high for exactly the
stay in `SEEN_OPPOSITE`; an assertion checks this.

Case 2 covers a pair whose zero crossing falls between the first peak and the
next sample. The crossing then arrives together with the peak, while FSM 1 is
still in `SEEN_NONE`, and is ignored there.

### FSM 2: marking the beat

The zero crossing is where the beat is, but the pair is only known to be
complete later. FSM 2 takes the candidate pulse and waits DLY samples
(`SEEN_CANDIDATE`). It then reads `QRS_confirm` once (`SEEN_CONFIRM`). If
confirm is set, it emits a one-sample `qrs_indication`. Counted from the
sample after which the candidate pulse is high, confirm is read after sample
DLY + 2 and the indication is high after sample DLY + 3. The read must fall
between two limits:

* no earlier than the last sample at which `SEEN_ZERO` can still take an
  opposite peak (TOL + 1 = 22);
* no later than the last sample at which a case-2 pair still holds its confirm
  (RP = 25).

In general, TOL − 1 ≤ DLY ≤ RP − 2. The default, DLY = 21, places the read at
sample 23. A candidate that comes while FSM 2 is busy is ignored; the
refractory period makes that rare.

### Latency

The indication is high DLY + 4 samples after the sample that reveals the
zero crossing (case 1) or the second peak (case 2). For every synthetic beat in
the testbenches, wide and inverted ones included, that is 33 samples (110 ms)
after the R peak of the input. The beat position is therefore the indication
time minus a constant delay. On real ECG the delay may vary by a sample or so
with the shape of the complex.

## Radio packets (`wireless_ctrl`)

The `mode` pins choose what is sent:

| mode | unit | layout (MSB first) |
|---|---|---|
| 1: QRS only | 1 byte per 5 samples | `{ctrl[2:0], q[4:0]}`, oldest result in bit 4 |
| 2: raw ECG | 2 bytes per sample | `{ctrl[2:0], 0, s[11:8]}`, `{s[7:0]}` |
| 3: both | 2 bytes per sample | `{ctrl[2:0], qrs, s[11:8]}`, `{s[7:0]}` |

The three control bits are `{mode[1:0], first}`. `first` is 1 on every mode-1
byte and on the high byte of a mode 2/3 word. Bytes collect into 12-byte
packets. The mode is sampled when a packet starts, so a packet never mixes
formats. Mode 0 sends nothing. Mode 1 needs 60 bytes/s and modes 2 and 3 need
600 bytes/s, a factor of 10.

### Radio set-up

Right after reset, before it accepts any data, the controller configures
the CC2500. It sends an SRES strobe and then ten single-register writes
(a header byte with the address, then the value):

| Register | Value | Effect |
|---|---|---|
| PKTLEN (0x06) | 12 | packet length = `PKT_BYTES` |
| PKTCTRL0 (0x08) | 0x04 | fixed-length packets, CRC appended |
| FREQ2..0 (0x0D–0x0F) | 0x5D 0x93 0xB1 | carrier = FREQ × 26 MHz / 2^16 = 2433 MHz |
| MDMCFG4, MDMCFG3 (0x10, 0x11) | 0x2D, 0x3B | rate = (256 + 59) × 2^13 / 2^28 × 26 MHz = 249.9 kBaud; 541 kHz channel filter |
| MDMCFG2 (0x12) | 0x73 | MSK, 30 of 32 sync-word bits |
| MCSM0 (0x18) | 0x18 | calibrate the synthesizer on each IDLE→TX move |
| PATABLE (0x3E) | 0xFE | 0 dBm output |

The frequency word is computed at elaboration from `RF_KHZ` and `XTAL_KHZ`.
`DRATE_E`, `DRATE_M` and `PA_SETTING` are parameters as well. All other
registers keep their reset values. Samples that arrive during the set-up
(about 410 clocks with a radio that is ready within a few clocks) are not sent.

### Packet transfer

A full packet moves to a transmit buffer. It is then sent as two SPI frames.
The SPI runs in mode 0 with SCLK = clk/2, and CSn is held until the radio pulls
SO low:

1. `0x7F` (TX FIFO burst write) followed by the 12 bytes;
2. the `0x35` STX strobe.

One packet takes about 250 clocks. Packets complete at most every 6 samples
(1536 clocks), so the transmit buffer is always free. An assertion
(`a_no_overrun`) checks this. If the clock-to-sample ratio is lowered far
below 256, this no longer holds.

## Choices made here

The source description leaves these points open. This RTL settles them as
follows:

* **Low-pass taps.** The taps are `(1,3,3,1)/8`, the binomial filter of the
  quadratic spline. The high-pass is `2(1 − z^-4)` at scale 3. Its sign makes an
  R wave give a positive-then-negative pair.
* **β = 0.25.** The source describes β only as a percentage, without a value.
* **DLY = 21.** No value is given; see FSM 2 above.
* **Start-up thresholds.** Signal levels start at 1024 and noise levels at 0.
* **Threshold sides.** Positive maxima feed the positive side and negative
  minima the negative side. A peak on the wrong side of zero updates nothing.
* **What counts as a valid peak in FSM 1.** Any zero-derivative point beyond a
  threshold counts, whether it is a maximum or a minimum.
* **Coincident events in FSM 1.** An opposite peak wins over a zero crossing,
  which wins over a time-out. A repeated peak in the same direction is ignored.
* **`qrs_indication`.** It is a one-sample pulse.
* **ADC codes.** They are offset binary. The sum of four codes is used as the
  12-bit sample (four times the mean); inverting its MSB makes it two's
  complement.
* **Clocking.** One clock with enables, instead of separate 300 Hz and 76.8 kHz
  clocks. The Enable and Mode pins pass through two-flop synchronisers.
* **Radio.** The control-bit meaning is this design's. The SPI command
  sequence and the register values come from the CC2500 data sheet. The
  channel (2433 MHz), the 26 MHz crystal, MSK and CRC are this design's
  choices within the 2.4 GHz, 250 kBaud, 0 dBm, 12-byte set-up.
* **Test outputs.** `qrs_indication` and `sample_strobe` appear on the top
  level as test outputs.

## Not included

* **The 10-bit SAR ADC.** It is analog. `qrs_chip` exposes `adc_start`,
  `adc_data` and `adc_done`. `tb/ecg_adc_model.sv` models it together with a
  synthetic ECG source.
* **The CC2500 itself.** `tb/cc2500_model.sv` is a behavioural SPI slave. It
  records register writes, FIFO writes and strobes, so the register values are
  checked only against the data-sheet formulas, not on real hardware.
* **The analog front end.** Gain, baseline-wander removal and the 50/60 Hz
  notch are outside the digital design. The wavelet's high-pass response
  already suppresses slow baseline drift.

## Parameters (defaults)

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `ADC_DIV` | `qrs_chip`, `control_logic` | 64 | clocks per ADC request |
| `TOL` | `qrs_chip` … `mmpr_fsm1` | 21 | time-out of `SEEN_PEAK`/`SEEN_ZERO`, samples (0.07 s) |
| `RP` | `qrs_chip` … `mmpr_fsm1` | 25 | refractory count, samples |
| `DLY` | `qrs_chip` … `mmpr_fsm2` | 21 | marking delay, samples |
| `BETA_X16` | `qrs_chip` … `threshold_adj` | 4 | β × 16 |
| `INIT_SIGNAL` | `qrs_chip` … `threshold_adj` | 1024 | start-up signal-peak level |
| `M` | `mmpr`, `threshold_adj` | 8 | peaks averaged per level (power of two) |
| `PKT_BYTES` | `qrs_chip`, `wireless_ctrl` | 12 | radio packet size |

## Simulating

Each testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=N failures=F`, and a watchdog stops it if it hangs. To build
and run one with plain Verilator (5.x) from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/qrs_pkg.sv tb/tb_qrs_chip.sv --top-module tb_qrs_chip -Mdir obj_chip
./obj_chip/Vtb_qrs_chip
```

| Testbench | What it shows |
|---|---|
| `tb_ecg_avg` | Random codes with gaps: every fourth code gives the sum − 2048, one clock later. |
| `tb_qswt_filter` | Random and full-scale inputs against a 14-tap reference convolution built from the three stages. |
| `tb_zero_cross_det`, `tb_peak_det` | The crossing rule, and a check that every reported peak is a true local extremum. |
| `tb_threshold_adj` | A queue-based reference of the two 8-peak level pairs and the threshold formula. |
| `tb_mmpr_fsm1` | A table-driven reference model on random events. Every path is covered: both cases, both time-outs, both directions. It also checks the exact TOL and RP durations. |
| `tb_mmpr_fsm2` | Confirmed, rejected and ignored candidates, and the exact indication time. |
| `tb_mmpr` | Hand-made coefficient pairs for case 1 in each direction, case 2, a rejected candidate and a sub-threshold pair. Each indication must come exactly DLY + 4 samples after its reveal. |
| `tb_qrs_processor` | 4000 samples of synthetic ECG with baseline wander. It checks every sample, every coefficient, one indication per beat and no false ones. |
| `tb_control_logic`, `tb_wireless_ctrl` | The pin synchronisers and request period. Packet decoding in all three modes with mode changes. The radio register values, checked with the data-sheet formulas for carrier, data rate and packet length. |
| `tb_qrs_rhythm` | A detection workload: 52 s of synthetic ECG with 72 beats. The rate changes between 40 and 180 beats per minute, with alternating amplitudes, inverted complexes, bigeminy with wide beats, and strong baseline wander. It reports sensitivity and positive predictivity: both are 100 %, with a constant 33-sample latency. |
| `tb_qrs_chip` | The whole chip at default parameters: 8800 samples (29 s of signal, 2.25 M clocks), in a few seconds of simulation. |

The stimulus in `tb_qrs_chip` is:

* 30 beats;
* a slow-slope artefact, which times out in `SEEN_PEAK`;
* a step artefact, which produces a rejected candidate;
* a sharp burst that produces a case-2 pair;
* modes 1, then 3, then 2.

The test checks the detections and decodes every radio packet back into the
sample stream. It counts each mechanism and fails if any count is zero.

All the testbenches pass. Each block's own testbench has also been run against a copy of its
module with one deliberate bug, and it catches that bug.

## How far to trust it

* **Checked.** The arithmetic, the state machines and the packet formats are
  checked exactly, against independent reference models.
* **Not checked: accuracy on real ECG.** Detection on real recordings (for
  example the MIT-BIH arrhythmia database) has not been measured. Only
  synthetic ECG was used. That includes the rhythm workload above, whose beats
  are all detected, but whose shapes are far cleaner than ambulatory
  recordings.
* **Open parameters.** β, DLY and the start-up thresholds are reasoned
  choices, not published values, so accuracy on difficult recordings may
  differ from the original processor. All three are parameters.
