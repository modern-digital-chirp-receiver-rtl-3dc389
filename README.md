# Digital chirp receivers for short, fast-chirping pulses

A chirp pulse sweeps its frequency while it lasts. A pulse of only 400 ns
may sweep more than 1 GHz. A receiver that knows nothing in advance must then
find where the pulse starts and ends, and must measure how fast it chirps and
where it starts in frequency. It has to do this from a few hundred samples.
An FFT cannot resolve such a pulse finely enough in time and frequency
together.

This RTL solves the problem with three ideas:

1. **Chirp isolation by self-mixing.** A signal multiplied by a delayed,
   conjugated copy of itself loses one order of its phase polynomial. A
   linear chirp becomes a steady tone whose frequency is proportional to the
   chirp rate. A stationary tone becomes DC.
2. **Digital instantaneous frequency measurement (IFM).** Five
   autocorrelations at delays 1, 2, 8, 32 and 128 give phases. Each phase is
   unwrapped with the previous one. Together they measure a tone to better
   than 1 MHz from 256 samples.
3. **De-chirping.** Once a rate is known, the pulse is multiplied by the
   opposite chirp. This leaves a tone at the starting (carrier) frequency,
   which another IFM then measures.

Three independent receivers are built from these parts. All three run on a
2.56 GSPS, 4-bit sample stream that arrives 8 samples per 320 MHz clock.

| receiver | signals | measures | pulse width |
|---|---|---|---|
| `linear_chirp_receiver` | linear chirps, stationary tones | linear rate (MHz per 400 ns), carrier | 400 ns |
| `nonlinear_chirp_receiver` | cubic-phase chirps, linear chirps, both, tones | nonlinear rate (MHz per 400 ns²), linear rate, carrier | 400 ns |
| `variable_chirp_receiver` | linear chirps, tones | rate swept over the pulse, carrier, pulse width | 400 ns to 4 µs, not known in advance |

`chirp_receiver_top` instantiates the three receivers side by side, each with
its own input, its own thresholds and its own outputs. Each receiver's
reports also go into a report FIFO, which is emptied in bursts towards a
host link.

## Sample format and time base

- **Window.** One clock carries one window of `LANES = 8` consecutive ADC
  samples (`adc_t`, 4-bit signed, −7…7). Each receiver counts windows from
  reset. Every time (arrival, departure, pulse width) is a window index, so
  time resolution is 3.125 ns.
- **Complex samples.** After the Hilbert transform each sample is complex.
  Each of its components is trimmed to three levels, −1, 0 or +1 (`cplx2_t`).
  Every later multiplication trims its result back to the same three levels
  (`cmul`, `cmul_conj` in `chirp_pkg`). The whole signal path after the
  front end therefore uses 2-bit arithmetic.
- **Frequencies.** An IFM reports a frequency as an unsigned 16-bit
  fraction of a turn per sample, so 1 LSB = 2.56 GHz / 65536 = 39 kHz.
  Reported rates and carriers are in MHz with 4 fractional bits (MHz × 16).
- **Report.** Each receiver reports a pulse as an `rx_report_t`: class,
  arrival window, width, nonlinear rate, linear rate and carrier.

## Front end

### Arrival and departure detector (`toa_detector`)

Each window gets two cheap tests on the raw 4-bit samples:

- **Criterion 1:** the mean magnitude is at least 1.25 (sum |x| ≥ 10).
- **Criterion 2:** at least 3 samples have magnitude ≥ `C2_MAG` (3 LSB).

A window *hits* if either test passes. When 5 of the last 6 windows hit, the
first hitting window of that group becomes a candidate arrival.

**Criterion 3** then verifies the candidate. Over the next 64 windows
(200 ns), at least 42 must have a mean magnitude of at least 1.0.

- If they do, `toa_valid` pulses. This is 64 to 72 windows after the arrival
  itself. Every later stage must allow for this delay, which is why the
  receivers keep a ring buffer of recent samples.
- If 5 of 6 windows miss during verification, the candidate is dropped as
  `aborted`.
- If too few windows pass by the end, it is dropped as `reject`.

During a pulse, 5 missing windows out of 6 mark the departure. `tod_idx` is
the first window of that missing group, and `pw` is the pulse width in
windows.

The 1.25 and 1.0 thresholds, the 5-of-6 rule, and the 42-of-64 count over
200 ns are the published design. Three points are this design's own choices:
the criterion-2 magnitude, resolution to one whole window, and the abort
rule.

### Hilbert transform (`hilbert_transform`)

This is a 43-tap type III FIR that turns the real stream into an analytic
one.

- Only the odd taps are non-zero. They are written as round(64/k), for
  k = 1, 3, …, 21 (64 21 13 9 7 6 5 4 4 3 3). This is 2/(πk) with 6
  fractional bits, so every tap is a short shift-and-add.
- The quadrature branch is scaled by 1/2 + 1/16 = 0.5625. This evens out the
  filter's gain of about 1.71 over 50–1230 MHz.
- The in-phase branch is the centre sample delayed to match the filter.
- Both branches are then trimmed to −1/0/+1 with a dead zone of ±`TRIM_THR`
  LSB.

Eight outputs are computed per clock from a 56-sample history. Output word
*k* appears `HT_LAT = 4` clocks after input word *k*.

## Measurement blocks

### Delay-and-conjugate mixer (`delay_conj_mixer`)

The mixer computes y(n) = x(n)·conj(x(n−D)) and trims the result. D is a
number of samples and need not be a multiple of 8, so each lane picks its
partner from a flattened history of ⌈D/8⌉ words.

- **Linear chirp.** A linear chirp of B MHz per 400 ns (1024 samples)
  becomes a tone at B·D/1024.
- **Cubic-phase chirp.** Two mixings with delays D1 and D2 turn a cubic
  phase of B MHz per (400 ns)² into a tone at 2·D1·D2/1024²·B. A constant
  term is also left, which only shifts the tone's phase.

### Digital IFM (`digital_ifm`)

A measurement takes 48 valid words, which is 384 samples or 150 ns.

- **History.** The first 16 words only fill the 128-sample history.
- **Accumulation.** The next 32 words (256 samples) accumulate five sums,
  S_m = Σ x(n)·conj(x(n−m)), for m = 1, 2, 8, 32, 128.
- **Phase.** One 14-step CORDIC per sum gives θ_m as a turn fraction.
- **Unwrapping.** The phases are unwrapped from the shortest delay up:

      z_m = round(m·f_prev − θ_m),   f_m = (θ_m + z_m)/m

  f_1 = θ_1 needs no unwrapping. Every m is a power of two, so the
  multiplications and divisions are shifts. The estimate carries 24
  fractional bits of a turn, and f_128 is the result.
- **Other outputs.** The block also gives the signal power Σ(|re|+|im|) and
  the DC term |Σre|+|Σim|. Both come from `power_meter` over the 256
  accumulated samples. It also gives a detection value Σ|S_m|².

`res_valid` comes ITER+3 = 17 clocks after the 48th word. Idle clocks
between words are allowed.

The power and DC terms drive the whole classification scheme:

- A stationary tone through a mixer is pure DC: DC ≈ power.
- A chirp through a mixer is a tone, so its DC is small.
- After a correct de-chirp the signal is a tone again.

### De-chirp generator (`dechirp_lut`)

The design uses 1024 de-chirp signals, for rates from 40 MHz to 1190 MHz per
period in steps of 1150/1023 MHz. Each signal is stored as the signs of cos
and −sin of the de-chirp phase:

- linear (`ORDER = 2`): φ(n) = b·n²/2048
- nonlinear (`ORDER = 3`): φ(n) = b·n³/(3·2²⁰)

Here b = rate / 2.56 GHz. The signals are not stored in a ROM. Each of the 8
lanes computes its entry from the entry number and the sample number with
one phase multiplier. This gives the same 1-bit samples as a 1024 × 384 (or
× 704) table, at the cost of multipliers instead of about 0.4–0.7 Mbit of
memory. The output is registered.

`rate_to_index` converts an IFM code on a mixed signal into a rate (MHz × 16)
and the nearest table entry. The conversion is code × 2560/65536 / GAIN,
where GAIN is the mixing gain above. The result is clamped to 0…1023.

### Range classifier (`range_classifier`)

Each class has a lower and an upper bound for every measurement. A class
matches when all of its measurements lie inside their bounds. The lowest
matching class is reported, and a pulse that matches nothing is dropped and
counted. The bounds, and an enable per class, are inputs.

The right bounds depend on the noise level and on the analog front end. They
were found by simulation, taking the extremes seen over many pulses at
5–20 dB SNR. The testbenches load simple bounds that separate their test
signals: a DC threshold of 128 out of 512, plus frequency limits.

### Pulse buffers (`sample_ring_buffer`)

This is a simple dual-port memory of 8-lane complex words: one write port,
and one read port with a registered read. The receivers write the Hilbert
output into it at the window index modulo its depth. The arrival is known
only about 70 windows late, and the de-chirp rate is known only after the
first IFM. The buffer therefore lets each receiver replay the start of a
pulse later.

## The receivers

Every receiver reports a pulse as one `rx_report_t`: class, arrival
window, pulse width in windows, nonlinear rate, linear rate and carrier
(rates and carrier in MHz × 16). The linear and nonlinear receivers take the
width from the detector. Their width is 0 if the pulse has not ended when
the report leaves. The variable receiver always has the width, since it
measures only after the departure.

### Linear chirp receiver

```
ADC ─► toa_detector ───────────────────────────────┐ arrival
ADC ─► hilbert ─► mixer(640) ─► IFM1 ─► rate, index, DC
             └──► ring buffer ─► × de-chirp(index) ─► IFM2 ─► carrier
                                      classifier ◄─┘
```

1. **Rate.** IFM1 starts on the live mixed stream 80 words (640 samples)
   after the arrival. It sees samples 640…1023 of the pulse: the 250 ns delay
   plus 150 ns of measurement. This is why the pulse must last 400 ns. A
   chirp of B MHz/400 ns gives a tone at 0.625·B.
2. **De-chirp decision.** If IFM1's DC term is below `dc_chirp_max`, a chirp
   is present and the rate picks a de-chirp entry.
3. **Carrier.** The first 384 samples are replayed from the buffer,
   de-chirped (or passed through unchanged for a tone) and measured by IFM2.
4. **Classification.** The classifier sees, in order, IFM1 DC, IFM1 power,
   IFM2 power, rate and carrier. Class 0 is a linear chirp and class 1 a
   stationary tone.

A report leaves about 225 windows after the arrival. A train of 400 ns
pulses 500 ns apart (160 windows) is therefore measured without loss. A new
arrival that comes while a pulse is still being processed is counted in
`ev_overrun`.

### Nonlinear chirp receiver

This receiver has three stages that run one after another.

1. **Stage 1, nonlinear rate.** The stream passes through mixers of 213 and
   426 samples (83 ns and 167 ns, in ratio 1:2, 250 ns in total) and then
   IFM1. A power meter also records power and DC after the first mixer.
2. **Stage 2, linear rate.** The first 704 samples are replayed and
   multiplied by the cubic de-chirp signal chosen from IFM1. They then go
   through a 320-sample (125 ns) mixer, and IFM2 measures the linear rate.
   The shorter linear delay keeps the nonlinear de-chirp signal at 275 ns
   instead of 400 ns, at some cost in linear-rate accuracy.
3. **Stage 3, carrier.** The first 384 samples are replayed again. They are
   multiplied by both de-chirp signals, and IFM3 gives the carrier.

Each de-chirp is applied only when its stage's DC term shows a chirp
(`nl_dc_max`, `lin_dc_max`).

The classifier sees ten measurements:

- DC and power after the first mixer;
- DC and power from IFM1 and from IFM2;
- power from IFM3;
- the two rates and the carrier.

It places the pulse in one of four classes: 0 nonlinear, 1 linear,
2 nonlinear + linear, 3 stationary.

**Throughput limitation.** The three stages run in sequence, so a pulse
takes about 330 windows (1 µs) from arrival to report. Pulses at least about
1.1 µs apart are all measured. In a 500 ns train every second pulse is
counted as an overrun. Measuring every pulse at 500 ns would need the three
stages pipelined across pulses, which this RTL does not do.

### Variable chirp receiver

This receiver needs no fixed pulse width. It uses the arrival and the
departure to take the first and the last 384 samples of the pulse.

- **Arrival.** The first 48 words are copied from a 256-word ring buffer
  into two stores. One keeps arrival order (FIFO). The other keeps reversed
  order, with both words and lanes reversed (FILO).
- **Departure.** The last 48 words are read back, and in one pass:
  - IFM1 gets last(n)·conj(first(n)). For a chirp sweeping B over a pulse
    of PW samples this is a tone at F1 = B·(PW−384)/PW.
  - IFM2 gets first(n)·conj(first(383−n)). This is a tone at
    2·f0 + B·383/PW.
- **Correction.** `chirp_correction` uses the measured width in two
  sequential divisions:

      B = F1·PW/(PW−384)
      f0 = (F2 − B·384/PW)/2      (modulo one turn)

  B is reported as the frequency swept over the whole pulse. A slightly
  negative F1, which a stationary pulse can give, is treated as signed.
- **Classification.** The classifier separates chirps (class 0) from tones
  (class 1). Its measurements, in order, are IFM1 DC and power, IFM2 DC and
  power, rate and carrier.

**Limits.**

- Pulses shorter than `MIN_PW_W` = 128 windows (400 ns) are counted in
  `ev_short` and not measured.
- The width is carried in 16 bits. The correction accepts widths up to
  8191 windows (25.6 µs).
- Once the last samples have been read, which is 48 clocks after the
  departure, the receiver accepts the next arrival. It holds that arrival
  until the current report is out. Pulses only 100 ns apart are therefore
  all measured.

## Report readout (`report_fifo`)

A report leaves a receiver on `*_rep` / `*_rep_valid` as soon as the pulse
is classified. The top also keeps a copy of each report in a
`report_fifo`, one per receiver, for a host link that reads in bursts.

- **Fill.** Every report is stored until the FIFO holds `RPT_DEPTH` = 8.
- **Drain.** The FIFO then raises `rd_valid[i]` and hands out its reports,
  oldest first, one per clock with `rd_ready[i]` high. The FIFO fills again
  once it is empty.
- **Drop.** A report that arrives during a burst is not stored. It is
  flagged for one clock on `rd_drop[i]`.

Index 0 is the linear receiver, 1 the nonlinear receiver and 2 the variable
receiver. `rd_draining[i]` shows that a burst is in progress. The FIFO runs
on the processing clock. A link on a different clock needs its own clock
crossing.

## Where this RTL departs from the published design

- **Thresholds are inputs.** The published classification bounds and the
  chirp-present decisions came from large simulation campaigns. Here they
  are inputs: a DC threshold per de-chirp stage and a full lo/hi table.
- **De-chirp tables are computed, not stored.** The samples are identical
  to a stored table.
- **Replay from ring buffers.** The receivers replay samples from ring
  buffers instead of streaming straight through. The detector confirms an
  arrival only after 200 ns, and the de-chirp rate is known only after IFM1.
- **Whole-window timing.** Arrival and departure are resolved to whole
  windows (3.125 ns, 8 samples). The published detector reports an average
  arrival error of about 1 ns, and how it gets below one window is not
  given. This RTL has no finer step than the window.
- **Assumed criterion-2 threshold.** The criterion-2 magnitude, 3 LSB, is
  this design's own value.
- **Nonlinear throughput.** The nonlinear receiver cannot run at a 500 ns
  repetition interval (see above).
- **Not included.** The ADC and its 1:8 demultiplexer are outside the RTL.
  So is the Ethernet link used in the lab. Each receiver's input word is a
  port, and so is the valid/ready output of each report FIFO.
- **Report FIFO sizing.** The FIFO depth (8 reports) and the dropping of
  reports during a burst are this design's own choices.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` at the end. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/chirp_pkg.sv tb/tb_chirp_pkg.sv \
    tb/tb_chirp_receiver_top.sv --top-module tb_chirp_receiver_top -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`.

`tb_chirp_pkg` synthesises the stimulus: pulses with a phase of
f0·t + ½·Blin/P·t² + ⅓·Bnl/P²·t³, plus noise of σ = 0.5 LSB, quantised to
4 bits.

| testbench | what it shows |
|---|---|
| `tb_chirp_receiver_top` | All three receivers at default sizes; builds and runs in under a minute. Classes, widths, rates and carriers are checked against the generated pulses. Every mechanism is counted and must occur: arrival, departure, abort, linear and nonlinear de-chirp, overrun, unclassified pulse, short pulse and readout burst. The linear receiver's eight reports must come back out of its FIFO in order, with the readout stalled on random clocks. |
| `tb_linear_workload` | Forty 400 ns pulses at 500 ns spacing, with random chirps (50–1180 MHz per 400 ns) and tones across 50–1230 MHz. Every pulse must be reported. Rate and carrier must be within 2 MHz on 95% of pulses, with a mean error below 1 MHz; typical means are about 0.1 MHz. |
| `tb_nonlinear_workload` | Thirty-two pulses 1.1 µs apart, cycling through the four signal types with random rates and carriers. All must be reported and classified. Errors must be within 10 MHz on 90% of pulses, with a mean below 5 MHz; typical means are 0.7–2 MHz. |
| `tb_variable_workload` | Widths from 400 ns to 4 µs in 400 ns steps, each followed by the next pulse 100 ns later, as chirps and as tones. All 20 must be reported without overrun, with rate and carrier within 3 MHz. |
| `tb_report_fifo` | The FIFO at depths 8 and 5 against a queue model, with random arrivals and readout stalls. Covers bursts, stalls and dropped reports. |
| `tb_linear_chirp_receiver` | Five pulses at 500 ns spacing. Rates come within 1 MHz and carriers within 0.5 MHz at this noise level. |
| `tb_nonlinear_chirp_receiver` | All four signal types, plus an overrun. |
| `tb_variable_chirp_receiver` | Widths from 400 ns to 1.6 µs, a short pulse and a 100 ns gap. |
| unit testbenches | Each block against an independent model: Hilbert bit-exact, IFM within 2 MHz and latency 17 clocks, mixer bit-exact, de-chirp signs against floating point, correction against integer maths, detector scenes with arrival latency 64–72 windows. |

Per-class thresholds used by the receiver testbenches are in those
testbenches.
