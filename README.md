# Aurras: active noise cancellation for an open room, in SystemVerilog

Noise-cancelling headphones can ignore the room because microphone, speaker and
ear are all in the same place. This design cancels noise from a single source in
an ordinary room. A microphone picks up the noise on its way to the listener. A
speaker between the two plays the noise inverted, timed to arrive together with
the noise itself. Two modes set how the inverted copy is formed:

* **Core mode.** The cleaned-up microphone signal is delayed by the sound's time
  of flight from the microphone to the speaker (34.5 cm, about 1 ms, 24
  samples) and negated.
* **Room-adjusted mode.** First the system measures the room. It plays an
  impulse through a separate calibration speaker and records one second of the
  room's impulse response (IR) with a calibration microphone. From then on,
  every input sample is convolved with that 24000-tap IR in real time before
  being delayed and negated. The anti-noise then carries the room's
  reverberation.

The RTL targets an FPGA with a 98.304 MHz clock and block RAM: a Spartan-7 in
the original build. Audio is signed 16-bit at 24 kHz, so exactly **4096 clocks
per sample**. That budget drives the whole architecture.

## Signal flow

```
input mic --I2S--> i2s_receiver --48k--> input_processor --24k--+--> audio_buffer <--+
                                   (DC removal, 11.5 kHz          |        |         |
                                    low-pass, keep 1 of 2)        |   convolution <--+-- ir_buffer
                                                                  |        |               ^
                                                    sw[2]: core --+--mux---+ room          |
                                                                       |                   |
                            phase_correction -> delay_line (sw[15:10]) -> output_select -> pdm_modulator -> speaker
                                                                                            (negation,
cal. mic  --I2S--> i2s_receiver --> input_processor --> ir_recorder ------------------------ sources)
                                                          |  impulse
                                                          +--> pdm_modulator -> calibration speaker
```

`aurras_top` wires this up. A second `delay_line` holds the input one second
back as a monitoring output.

## The real-time convolution

This is the part of the design that needs the most explanation.

### The budget

Each output is `y[n] = sum_{m=0}^{23999} x[n-m] * h[m]`. That is 24000
multiply-adds in at most 4096 clocks, so about six per clock. A dual-port RAM
gives only two reads per clock. The design therefore splits both operands over
**four dual-port banks of 6000 words** (`bram_dp`). Each bank delivers two
adjacent words per clock, so eight `(audio, IR)` pairs arrive per clock. Eight
multiply-accumulate lanes then finish in 3000 clocks.

### The IR buffer: stored reversed

`ir_recorder` writes IR sample `j` at position `r = 23999 - j`: bank `r / 6000`,
word `r % 6000`. Bank 0 thus holds the last quarter of the IR, last sample
first. Now index `i` of the reversed IR multiplies the `i`-th oldest sample of
the audio history. The convolution becomes a plain dot product, and the IR
banks are read at the same address sequence 0, 2, 4, ... every time.

### The audio buffer: four cascading circular banks

The audio history must shift by one every sample, and moving 24000 words per
sample is impossible. Instead, bank 3 holds the newest 6000 samples and bank 0
the oldest 6000. All four banks share one pointer `ptr`. In every bank the word
at `ptr` is that bank's newest sample and the word at `ptr+1` (wrapping) its
oldest. A new sample moves only the column at `ptr`:

```
cycle 0   read word ptr of banks 3, 2, 1
cycle 2   bank 3[ptr] <= new sample
          bank 2[ptr] <= old bank 3[ptr]    (oldest of the newest quarter moves down)
          bank 1[ptr] <= old bank 2[ptr]
          bank 0[ptr] <= old bank 1[ptr]    (old bank 0[ptr], 24000 samples old, is dropped)
cycle 3   upd_done -> convolution starts
```

That is three reads and four writes per sample. When the convolution finishes,
`ptr` advances by one. The next sample therefore lands on what is now bank 3's
oldest word.

**Example, `ptr = 2500`.** After the update, word 2500 of bank 3 is the new
sample. Words 2501 to 5999 and then 0 to 2500 of each bank run from that
bank's oldest to its newest sample. The convolution multiplies audio words
2501, 2502 of every bank by IR words 0, 1 of the same bank, then 2503, 2504 by
2, 3, and so on. It ends with audio words 2499, 2500 times IR words 5998, 5999.
Then `ptr` becomes 2501.

### The engine (`convolution`)

* The offset `k = 0, 2, ..., 5998` goes to both buffers, one per clock. The
  audio buffer adds `ptr+1` modulo 6000 itself.
* Data come back two clocks after the address is taken, three after the offset
  register changes. Each lane then adds `audio * ir` into its own 48-bit
  running sum. Separate sums mean no clock has to add eight products.
* The eight lane sums are then added one after another in seven clocks.
* The output is bits **[28:13]** of the total, taken as a plain bit slice
  (no rounding or saturation). This scaling keeps the output level close to
  the input level for a typical room IR. Too loud an IR wraps around; adjust
  `OUT_LSB` for other gains.
* `out_valid` comes about 3010 clocks after `start` at full size, well inside
  4096. `done` advances the audio pointer.

The IR buffer and the audio buffer start at zero, like FPGA block RAM after
configuration. Room mode before any measurement therefore outputs silence.
Nothing prevents the convolution from running while a measurement is writing
the IR buffer. Outputs during a measurement mix old and new IR.

## Measuring the room (`ir_recorder`, `impulse_gen`)

A rising edge on `btn[3]` starts `impulse_gen`, which follows the 24 kHz
sample strobe of the calibration microphone. It raises the calibration
speaker's sample to 0x6000 for 4 sample periods and pulses `fired` in the first
one. Call that sample tick T0. The recorder skips `delay` further samples,
where `delay` is the same flight time set on `sw[15:10]`. The sample that
arrives at tick `T(delay+1+j)` becomes IR sample `j`. After 24000 samples (one
second) the recorder pulses `done`. `ir_busy` covers the whole measurement,
including the last write.

## Microphone front end

* **`i2s_receiver`.** This is the I2S master. SCK is clk/32 (3.072 MHz), and WS
  toggles every 32 SCKs (48 kHz), changing on a falling SCK edge. The
  microphone's select pin is tied low, so data come in the WS-low half. The
  18-bit word is read MSB first in bit slots 1..18, with the standard
  one-slot delay, sampling SD on the rising SCK edge. The two LSBs are
  dropped.
* **`dc_blocker`.** These microphones sit about -900 counts off zero but do not
  drift. A rising edge on `btn[1]` averages the next 2^15 samples (0.68 s) with
  a running sum and a 15-bit arithmetic shift. The result is then subtracted
  from every sample, with saturation. Both microphones calibrate together.
* **`aa_filter`.** A 55-tap equiripple (Parks-McClellan) low-pass. The
  passband is 0-10 kHz, the stopband 13-24 kHz, and the transition is centred
  on 11.5 kHz. Rounded to Q15, the ripple is about ±0.03 dB and the stopband
  is below -65 dB. It runs on `fir_filter`, a shared engine with one
  multiplier that steps through the taps, one per clock. A sample arrives
  only every 2048 clocks, so one multiplier is enough.
* **`decimator`.** Keeps every other filtered sample: 48 kHz to 24 kHz.

## Output side

* **`phase_correction`.** An FIR filter meant to be all-pass, with 32 taps in
  Q2.14 and coefficients loaded through `coef_we/coef_addr/coef_data`. It
  cancels the speaker's phase response. After reset it is the identity.
* **`delay_line`.** A circular buffer in dual-port RAM. The read address trails
  the write address by `delay`, so the output is exactly `x[n-delay]`. 64
  words hold any delay up to the 6-bit switch range; 24 samples is nominal.
* **`output_select`.** Picks the speaker's source and negates the anti-noise
  (saturating).

  | switch (highest priority first) | speaker plays |
  |---|---|
  | sw[5] | test tone (`test_tone`: 500 Hz square wave, ±4096) |
  | sw[4] | calibration microphone, preprocessed |
  | sw[3] | input microphone, preprocessed |
  | sw[6] | input delayed by one second (monitor) |
  | none | anti-noise: −(phase-corrected, delayed mode output) |

  sw[2] selects room mode (1) or core mode (0). sw[7] and sw[8] are unused.
* **`pdm_modulator`.** A first-order delta-sigma modulator clocked at clk/16
  (6.144 MHz). It adds an offset of 1024 to the sample before modulating. A
  near-zero DC level produced an audible chirp in the original build, and the
  offset avoids it. There is one instance each for the system and
  calibration speaker channels of the stereo amplifier.

## Top-level interface (`aurras_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | 98.304 MHz clock, synchronous active-high reset |
| `btn[3:0]` | in | `btn[1]` DC calibration, `btn[3]` IR measurement; must be debounced and synchronous |
| `sw[15:0]` | in | `sw[15:10]` flight delay in samples, `sw[2]` room mode, `sw[6:3]` source select |
| `in_mic_sck/ws/sd`, `cal_mic_sck/ws/sd` | out/out/in | I2S to the two microphones |
| `coef_we`, `coef_addr`, `coef_data` | in | phase-correction coefficient load |
| `spk_pdm`, `cal_pdm` | out | PDM to the amplifier's two channels |
| `spk_sample` | out | the 16-bit sample being sent to the speaker |
| `dc_busy`, `ir_busy` | out | calibration / measurement in progress |

| parameter | default | meaning |
|---|---|---|
| `SCK_DIV` | 32 | clocks per I2S bit (must be even) |
| `AVG_SHIFT` | 15 | log2 of the DC averaging length |
| `IR_LEN` | 24000 | IR and history length; must be a multiple of 8 |
| `DELAY_DEPTH` | 64 | flight-delay buffer depth |
| `MONITOR_DELAY` | 24000 | monitor delay in samples |
| `PHASE_TAPS` | 32 | phase filter length |
| `PDM_DIV` | 16 | clocks per PDM bit |
| `TONE_PERIOD` | 48 | test tone period in samples |

For faster simulation, `SCK_DIV`, `AVG_SHIFT` and `IR_LEN` can be reduced
together. The convolution, about `IR_LEN/8 + 10` clocks, must fit within one
24 kHz period of `128*SCK_DIV` clocks. `fir_filter` needs `NTAPS+1` clocks
between samples.

At the default sizes the design holds 1.16 Mbit of RAM: 2 × 384 000 bits of
IR and audio banks, a 384 016-bit monitor delay and a 1 024-bit flight delay.
It uses 8 multipliers in the convolution plus 3 in the FIR filters.

## Where this RTL departs from the original design, or fills gaps

* **Anti-aliasing filter.** The original also used an equiripple filter with
  under 0.4 dB ripple and an 11.5 kHz cutoff, built with a vendor FIR
  generator. It did not publish the length, band edges or coefficients, so
  those here are this implementation's own. The testbench checks under 0.4 dB
  of error at DC, 1 kHz and 9 kHz, and more than 55 dB of rejection at 14, 16
  and 24 kHz.
* **Phase-correction coefficients are not included.** The original fitted them
  offline by weighted least squares to the measured phase of its particular
  speaker. Neither the coefficients nor the filter length were published. The
  filter is therefore a loadable 32-tap FIR that starts as a pass-through.
  Without your own coefficients there is no phase correction.
* **Own choices.** The switch assignment, test tone waveform, impulse
  amplitude and length, PDM offset value, and the exact point where the IR
  recording starts are this implementation's own. So are reset behaviour,
  saturation, the 48-bit accumulators, and the read-first two-clock RAMs. The
  original names SW2-SW8 as the source/mode switches without listing them.
* **Phase correction in both modes.** It sits between the mode multiplexer and
  the delay, because it corrects the speaker, which both modes drive.
* **Not built.** The 48 kHz / 32-lane variant that the original discusses as
  an upgrade, and any feedback microphone, which the original lists as future
  work. The microphones, amplifier and speakers are bought-in parts. The
  testbenches model the microphone (`tb/i2s_mic_model.sv`).

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module against a model written independently in the testbench,
checks latencies and rates, and prints
`TB_RESULT checks=N failures=M`. The system-level ones are:

* `tb_aurras_top`: the whole design at reduced size (SCK_DIV 2, 64-tap IR). It
  runs DC calibration, a core-mode level test, an IR measurement, room mode
  with noise, a delay change, a coefficient load, and every speaker source.
  Every convolution output is compared with the direct sum over the recorded
  IR. Every stage is checked against its input stream, and each mechanism is
  counted.
* `tb_aurras_full`: one complete operation with every parameter at its
  default, about 180 million clocks and 2 to 3 minutes of simulation. It
  covers a 0.68 s DC calibration, a full one-second 24000-word IR measurement,
  and room-mode outputs checked against the 24000-term sum. It also checks
  that each output is ready within the 4096-clock sample period.
* `tb_tone_workload`: the 15 tones from 50 Hz to 3.5 kHz through the full-size
  design in core mode. The speaker sample must be exactly the negated input
  24 samples earlier, with the amplitude within 0.4 dB.

Each testbench is run the same way, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aurras_pkg.sv \
    tb/tb_aurras_top.sv --top-module tb_aurras_top -Mdir obj
./obj/Vtb_aurras_top
```

The modules are found through `-Irtl`/`-Itb` by file name (one module per
file). The RAM contents start at zero and every register that is read is
reset, so the results do not depend on random initial values.

What simulation cannot show: the acoustic cancellation itself, the quality of
a measured IR, and whether this filter set suits a particular speaker.
