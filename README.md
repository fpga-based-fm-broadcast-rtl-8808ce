# FPGA FM broadcast monitor: automatic station detection, multi-channel demodulation, recording and playback

A monitoring receiver has to find out which FM stations are on the air before it can listen to them.
This design does that in the FPGA. It takes the digitised, down-converted FM band from a 12-bit ADC and runs a 2048-point FFT over one window of samples. It finds the strongest carriers in the magnitude spectrum and tunes up to eight digital demodulators to them. From then on it can:

- stream any one station to a one-bit audio output;
- record several stations at once into on-chip memory;
- play a recording back.

A small microcontroller with a display drives everything over SPI. It is the SPI master, and the FPGA answers with status bytes and the list of stations found.

```
 adc_data ─► adc_interface ─┬─► spectrum_sensor ─────────────► peaks[0..7] (bin, freq, magnitude)
 (12 bit)   (ENC = clk/10)  │   capture 2048 → fft_r2 →                 │ tunes
                            │   cordic_vec |X| → peak_detector          ▼
                            └─► channel_filter_bank ──► fm_demodulator ×8 ──► mono_filter_bank
                                8 band-pass FIRs          DDS mix, CIC ↓40,     8 low-pass FIRs
                                (same input)              CORDIC phase, Δφ            │ 250 kS/s audio
                                                                                      ▼
 spi_* ◄──► spi_slave ◄──► command_controller ──► stream / record / playback ──► record_memory
                           (commands, status,                                         │
                            station list)                                 audio ─► pwm_sdm ─► pwm_out
```

The analog parts sit outside the FPGA and are not part of this RTL:

- the RF front end: band-pass filter, LNA, an 86 MHz mixer that moves 88–108 MHz down to an IF, and IF filtering;
- the ADC chip (AD6640);
- the RC reconstruction filter after `pwm_out`;
- the microcontroller user interface.

## Clocking and sample rates

| Quantity | Value | Where it is set |
|---|---|---|
| System clock | 100 MHz, one clock domain | not a parameter |
| ADC sample rate | 10 MS/s (`ENC_DIV` = 10) | `adc_interface` |
| FFT bin spacing | 10 MHz / 2048 = 4.88 kHz | 1024 usable bins |
| Audio rate per channel | 250 kS/s, after CIC decimation by 40 | `CIC_R` |
| Stored audio rate | 50 kS/s, every 5th audio sample | `REC_DECIM` |

`adc_interface` divides the clock by `ENC_DIV` to form the ENC pin. It registers the parallel bus and takes a sample when ENC falls, marking it with a one-clock `sample_valid`. Every block after it is strobe driven: each block moves when its `*_valid` input pulses, so changing `ENC_DIV` changes the rate without other edits.

The ADC chip is rated for 65 MS/s. Its encode signal was run at 10 MHz because faster edges did not reach clean logic levels on the board, and this design keeps 10 MS/s.

A consequence: the observed IF span is 0–5 MHz, i.e. about 86–91 MHz on air, not the whole FM band. Covering the whole band needs a faster ENC, plus filter and CIC coefficients redesigned for the new rate.

## Spectrum sensing (the hard part)

`spectrum_sensor` runs one sensing pass per `start` pulse.

1. **Capture.** It passes the next 2048 ADC samples into `fft_r2`.
2. **FFT** (`fft_r2`): an in-place radix-2 decimation-in-time core.
   - Samples are written in bit-reversed order into a dual-bank RAM (real and imaginary parts).
   - One butterfly is computed per clock, so a transform takes N/2·log2 N = 11 264 clocks.
   - The arithmetic is unscaled. The data path is 12 + 11 + 1 = 24 bits wide, so no stage can overflow.
   - Twiddles are Q2.14 cosine/sine tables, computed at elaboration with `$cos`/`$sin`. No table file is needed.
   - Only the first N/2 bins are unloaded, because the input is real and the upper half mirrors the lower.
3. **Magnitude** (`cordic_vec`): a pipelined vectoring CORDIC.
   - It folds the vector into the right half-plane, then runs 18 micro-rotations with 4 guard bits.
   - It multiplies by 1/K = 0.60725 to remove the CORDIC gain.
   - It accepts one vector per clock; the result appears ITER + 1 clocks later.
   - The same module gives the phase, which the demodulator uses.
4. **Peak search** (`peak_detector`), in two passes over the spectrum.
   - *Scan:* the 1024 magnitudes stream in. The block tracks max and min, and writes every magnitude into a 1024-word FIFO (`sync_fifo`, the spectrum memory).
   - *Threshold:* midrange = (max + min) / 2.
   - *Select:* the FIFO is read back. Bins with a magnitude strictly greater than the midrange are kept, up to 20 candidates. Each candidate holds its bin number, its frequency and its magnitude.
   - *Sort:* a bubble sort does one compare-and-swap per clock, (20 − 1)² clocks in all. It is stable, so equal magnitudes keep ascending bin order.
   - *Report:* the eight strongest candidates go out as `peaks[0..7]`, strongest first, with `num_found`. `done` pulses once.

The midrange threshold assumes the spectrum is mostly empty. A station then towers over the noise floor, and (max + min)/2 separates the carriers from the floor. Sorting by magnitude and keeping only the strongest eight discards the weaker FM sidebands of a strong station, which could otherwise be mistaken for separate stations. The scheme has limits:

- A strong station can push weaker ones below the threshold. In the bench test, a carrier at 64 % of the strongest still passes.
- A station that is not bin-centred can appear in two neighbouring bins.

Frequencies are reported as `freq = bin × FREQ_STEP`, in MHz with 10 fraction bits (Q6.10). `FREQ_STEP` = 5 approximates 4.88 kHz × 1024. The value is an IF frequency: add the 86 MHz of the analog mixer to get the on-air frequency. The bin number is reported as well, and the demodulators use it directly.

Time from `start` to `done` at the defaults is 34.2 k clocks, i.e. 342 µs at 100 MHz. It splits as:

- capture: 20 480 clocks;
- FFT: 11 264 clocks;
- unload and magnitude: about 1 050 clocks;
- peak search: about 1 400 clocks.

## Channel processing

### Channel filter bank

`channel_filter_bank` has one `fir_filter` per channel, all fed the same 12-bit samples. The filter is a transposed-form FIR: a multiplier per tap, one output per input strobe, one clock latency. The output is rounded, shifted right by `SHIFT` and saturated to 16 bits.

The intent is a 200 kHz band-pass per station, up to 1000 taps. The stations are only known after sensing, so the coefficients are registers loaded at run time through `ch_coef_we`/`ch_coef_ch`/`ch_coef_addr`/`ch_coef_data`, typically by the controller after it has read the station list. The coefficient format is signed 16-bit, Q2.13. The testbenches compute Hamming-windowed band-pass coefficients from the carrier frequency.

### Demodulator

Each `fm_demodulator` is tuned with ftw = bin · 2^(32 − log2 N), so it centres exactly on the reported bin. Its stages:

- **Local oscillator** (`dds`): a 32-bit phase accumulator with a 1024-entry quarter-wave sine table. The table samples the centres of its steps, so mirroring the quadrant is exact. The other quadrants come from address mirroring and negation. The phase resolution is 12 bits, so the error is at most about 2π/4096 of full scale.
- **Mixer:** I = x·cos and Q = −x·sin, scaled back to 16 bits.
- **CIC** (`cic_decimator`): one for I and one for Q.
  - Three integrator and three comb stages, decimating by R = 40.
  - The register growth is 3·⌈log2 40⌉ = 18 bits, and the top 16 bits are kept.
  - The gain at DC is 40³ / 2^18 ≈ 0.244, the same for I and Q, so the phase is unaffected.
  - The integrators are pipelined, one register per stage.
  - The mixing image at twice the carrier frequency lands far down the CIC's sinc³ skirt.
- **Phase:** a 16-iteration `cordic_vec` computes atan2(Q, I) as a 16-bit binary angle, where 2^16 is one turn.
- **Frequency:** the output is the wrapped difference between consecutive phases. The difference approximates dφ/dt, so it is proportional to the instantaneous frequency:

  `freq_out / 2^16 = (f − f_LO) · R / f_s`, so 1 LSB = 3.815 Hz of deviation at the defaults.

  A station with ±75 kHz deviation therefore swings ±19 660 LSB, which fits in 16 bits with margin.

### Mono filter bank

`mono_filter_bank` has one 100-tap low-pass FIR per channel, after the demodulator, at the 250 kS/s audio rate. It keeps the 0–15 kHz mono band and removes the stereo pilot and subcarrier. All channels share one coefficient set, loaded through `mono_coef_*` in Q1.15.

The original description orders the chain inconsistently. One passage puts the mono filter before the demodulator; another filters after demodulation. Filtering after demodulation is the order that works: the mono band only exists as baseband after demodulation. This design uses that order.

## Recording and playback

`record_memory` holds one 4096 × 16-bit bank per channel (64 KiB in all). The audio strobe of channel 0 acts as the common tick, and every fifth tick is a storage slot, i.e. 50 kS/s. The stored words are the demodulated audio, not the raw channel.

- **Recording:**
  - `rec_start[c]` clears channel c's bank and arms it; any number of channels can record together.
  - `rec_stop_all` disarms every channel.
  - A bank that fills stops by itself and raises `full[c]`, the overflow indication. Nothing is overwritten.
  - `len[c]` gives the stored length.
- **Playback:**
  - `play_start` with `play_ch` reads one bank out at the storage rate: one word per slot, two clocks of read latency, marked with `play_valid`.
  - It ends with a `play_done` pulse after the last word, or early on `play_stop`.

## Audio output

The selected audio passes to `pwm_sdm`. That is either live audio from the streamed channel or the playback words; playback takes precedence.

`pwm_sdm` is a first-order sigma-delta modulator on the top 8 bits of the audio, converted from signed to offset binary. An 8-bit accumulator adds the sample every clock, and its carry is the output bit. The density of ones therefore equals sample/256, and the external RC filter turns that into the audio waveform.

When neither stream nor playback is active, the modulator is fed mid-scale. The output is then a steady 50 % square wave, which the filter turns into silence.

## Control protocol (SPI)

`spi_slave` is an SPI mode 0 slave, MSB first, 8-bit. It oversamples SCK, SS and MOSI with the 100 MHz clock through two-flop synchronisers, which allows an SCK of a few MHz; the user interface runs it at 2 Mb/s.

Every transfer is a full-duplex byte. The byte the FPGA returns is the reply to the *previous* byte, because `tx_byte` is reloaded one clock after each received byte and at every falling edge of SS.

`command_controller` decodes these bytes:

| Byte | Meaning | Reply in the next transfer |
|---|---|---|
| 0 | idle: stop streaming and playback | status |
| 1 | start spectrum sensing (ignored while busy) | 1 (busy) |
| 2 | read the station list; repeat the byte to step through it | number of stations, then `peaks[0].freq` low byte, high byte, `peaks[1].freq` … (2 × 8 bytes) |
| 3, *c* | stream channel *c* (stops playback) | status |
| 4, *c* | play back channel *c* (stops streaming) | status |
| 5, *c* | start recording channel *c* | status |
| 6 | stop all recording | status |
| other | no action (use it to poll) | status |

Status is:

- **200** after reset (link OK, nothing done yet);
- **1** while sensing runs;
- **0** once a sensing run has finished.

The last byte received drives `led[7:0]`.

Codes 0–4 are the ones the user-interface firmware sends. Codes 5 and 6, the channel-number byte after 3/4/5, and the status values are this design's own protocol.

## Parameters of `fm_monitor_top`

| Parameter | Default | Meaning |
|---|---|---|
| `CHANNELS` | 8 | stations demodulated at once (the eight strongest) |
| `FFT_N` | 2048 | FFT length |
| `ENC_DIV` | 10 | clock / ADC sample rate |
| `FREQ_STEP` | 5 | frequency of one bin, MHz × 1024 (set to 1024 · f_s / N / 1 MHz) |
| `CH_TAPS` | 1000 | taps per channel band-pass filter |
| `MONO_TAPS` | 100 | taps per mono low-pass filter |
| `CIC_R` | 40 | decimation from the ADC rate to the audio rate |
| `REC_DEPTH` | 4096 | words per record bank |
| `REC_DECIM` | 5 | audio samples per stored word |

Shared types are in `fm_pkg`:

- `peak_t` = {freq, bin, magnitude};
- the command enum;
- the status codes.

Size note: the default build holds 8 × 1000 + 8 × 100 coefficient registers and as many multipliers, the cost of fully parallel filters. A time-multiplexed filter would cut this a lot, but it is not done here.

## Departures from the original description

- **Vendor cores replaced.** The original used vendor FFT, CORDIC, DDS and CIC cores. Here they are written out: radix-2 FFT, pipelined CORDIC, quarter-wave DDS and CIC. The FFT is unscaled with no window.
- **Threshold:** (max + min)/2 as in the written formula. The original code shifted by two instead of one.
- **Comparison:** bins must be strictly greater than the threshold, as in the text. The original code used ≥.
- **Mono filter placement:** after the demodulator (see above).
- **Left undefined in the original, chosen here:**
  - filter coefficients loaded at run time rather than fixed per station;
  - CIC order 3 and rate 40;
  - record depth and rate, and the behaviour when a bank fills;
  - the record/stop commands and the status values.
- **Windowing and averaging** of the spectrum are named as goals in the original but never specified. They are not implemented.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…` and has a watchdog. What they check:

| Testbench | What it checks |
|---|---|
| `tb_adc_interface` | ENC high time; every ADC word captured once and in order, exactly 10 clocks apart |
| `tb_sync_fifo` | ordering, one-cycle read latency, full/empty flags, fill count |
| `tb_fft_r2` | 128- and 2048-point transforms against a floating-point DFT; cycle count N/2·log2 N |
| `tb_cordic_vec` | magnitude and angle against `$sqrt`/`$atan2` over random vectors; latency |
| `tb_peak_detector` | threshold, selection, stable sort, 20-candidate limit, processing time |
| `tb_spectrum_sensor` | full 2048-point path: tones → bins in strength order; list capped at 8; start-to-done time |
| `tb_fir_filter`, `tb_channel_filter_bank`, `tb_mono_filter_bank` | bit-exact against a convolution model, up to 1000 taps |
| `tb_dds`, `tb_cic_decimator` | sine/cosine accuracy; bit-exact CIC model; DC gain |
| `tb_fm_demodulator` | frequency steps and a 10 kHz tone against Δf·R/f_s·2^16 |
| `tb_record_memory` | multi-channel recording, stop-all, overflow, exact playback, early stop |
| `tb_pwm_sdm` | ones density = code/256 over 256 clocks; half density when disabled |
| `tb_spi_slave`, `tb_command_controller` | bytes, reply timing, the command table |

`tb_fm_monitor_top` runs the whole design at reduced size (4 channels, 256-point FFT, 48-tap channel filters) from its pins only. An ADC model produces four FM stations, and an SPI master performs:

1. sensing, with busy polling;
2. reading the station list;
3. coefficient loading;
4. streaming;
5. recording of two channels, with stop-all;
6. recording of one channel to overflow;
7. a switch from streaming to playback;
8. idle.

It checks:

- the list against the carrier bins;
- each channel's demodulated amplitude against its deviation;
- the PWM duty against the audio byte;
- playback against the recorded words.

It counts every mechanism: busy reply, ignored sense, overflow, stop-all, mode switch, playback end and so on. It fails if one never happens.

`tb_fm_monitor_full` runs the top with every parameter at its default (8 channels, 2048-point FFT, 1000-tap filters). It senses eight stations, reads the list, loads filters and demodulates all eight. It takes under a minute of simulation.

To run one testbench with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb rtl/fm_pkg.sv tb/tb_fm_monitor_top.sv \
          --top-module tb_fm_monitor_top && obj_dir/Vtb_fm_monitor_top
```

Not verified: timing closure on an FPGA at 100 MHz, behaviour with real off-air signals, and the analog parts.
