# ECHO SDR readout: FPGA channelization and demodulation

The ECHO experiment reads out large arrays of metallic magnetic calorimeters
through microwave SQUID multiplexing. Each pair of sensors detunes one
superconducting resonator. About 400 resonators, 10 MHz apart between 4 and
8 GHz, share a single feed line. A software-defined radio drives that line with
a comb of tones, one per resonator. It then recovers the amplitude and phase of
each tone after the comb has passed the detector array. An analog front end
splits the 4 GHz into five 800 MHz pieces, each with its own DAC/ADC pair. The
digital work of separating the tones happens in the FPGA.

This repository is synthesizable SystemVerilog for that FPGA processing. It
follows the channelizer architecture published for the ECHO readout (Karcher
et al., "SDR-Based Readout Electronics for the ECHO Experiment", J. Low Temp.
Phys. 2020):

* **Receive.** Each ADC's on-chip DDCs deliver two 400 MHz bands at 500 MS/s.
  Each band is duplicated. Each copy is split into 32 sub-bands of 15.625 MHz
  by a polyphase filter bank. Each sub-band is then mixed down to 0 Hz around
  its resonator and low-pass filtered by a time-multiplexed DDC.
* **Transmit.** One comb generator per DAC plays the tone comb.

At the default size (5 ADC/DAC pairs) the design has 20 channelizers and 20
DDCs, giving 640 sub-band channels for the 400 resonators.

## Signal path

```
           one ADC (two on-chip DDCs)            FPGA, 500 MHz, 1 sample/clock per band
800 MHz ──► band 0, 400 MHz @ 500 MS/s ──► band_chain ─┬─ delayed ─► channelizer ─► DDC ─► 32 sub-bands
        └─► band 1, 400 MHz @ 500 MS/s ──► band_chain   └─ mixed   ─► channelizer ─► DDC ─► 32 sub-bands
                                                         (band_duplicator)
processor ── cfg write bus ──► coefficients, NCO increments, comb samples
comb_generator ──► 2 samples/clock ──► 1 GS/s I&Q DAC
```

| Quantity | Value |
|---|---|
| ADC/DAC pairs (`N_ADC`) | 5 |
| Bands per ADC | 2 × 400 MHz, 500 MS/s complex |
| Sub-bands per channelizer (`M`) | 32, spacing f_s/32 = 15.625 MHz |
| Channelizers / DDCs | 4 per ADC, 20 in total |
| Sub-band channels | 640, each at 15.625 MS/s |
| Polyphase FIR | 18 taps × 32 coefficient sets (576, prototype of 521 fits) |
| DDC FIR | 12 symmetric taps, 6 multipliers |
| FFT | 32-point radix-2 SDF, 5 stages |

## Why every band goes through two filter banks

A critically sampled polyphase bank (decimation equal to the number of bands)
keeps its cost low, but its sub-bands only touch. Each band's low-pass must
fall off before the next band's centre, so a tone near the border between two
sub-bands is attenuated in both. Such a tone is in a *blind interval*.
Resonator frequencies are set by fabrication and cannot be placed to avoid
these intervals.

`band_duplicator` therefore feeds a second bank with a copy of the band shifted
up by half a sub-band spacing, f_m = f_s/64 = 7.8125 MHz. The rotation is
exp(+j·2π·n/64). In the shifted bank, sub-band k is centred on
(k − ½)·15.625 MHz of the original band, exactly where the plain bank is blind.
With a 5.5 MHz pass-band edge, neighbouring bands of the two banks overlap by
5.5 − (7.8125 − 5.5) ≈ 3.2 MHz. Every tone therefore lies in the flat pass band
of at least one of the 64 sub-bands per band. The other copy is only delayed by
the mixer's pipeline depth (3 clocks), so both banks see the same samples on the
same clock edge.

Which of a band's 64 sub-bands serves a given resonator is decided in software:
the processor sets the NCO of that sub-band. Both testbenches above block level
place one tone in a plain sub-band and one on a plain border. They check that
the border tone is recovered at full amplitude from the shifted bank while it
is suppressed in the plain one.

## Polyphase channelizer (`polyphase_channelizer`)

The bank takes one complex sample per clock. Its output is also one sample per
clock: the 32 sub-bands, time-interleaved, each at 1/32 of the input rate. It
has three parts.

**TDM FIR (`pfb_tdm_fir`).** This is a single 18-tap FIR whose delay elements
are 32 samples long. Sample n, in slot q = n mod 32, is filtered with
coefficient set q:

    u[n] = Σ_{l=0..17} c[l][q] · x[n − 32·l]

Each slot is therefore one branch of the polyphase decomposition. All 32
branches share the multipliers. For a low-pass prototype h[0..575], the
processor writes

    c[l][q] = h[(31 − q) + 32·l]        at configuration address 32·l + q

A 521-tap prototype is padded with zeros. Coefficients are not built in. No
fixed set is part of the design, and the bank's selectivity is whatever
prototype is loaded.

**Reorder buffer (`tdm_reorder_buffer`).** This is a ping-pong pair of 32-word
banks. Polyphase branch p is slot 31 − p. Feeding FFT input r with branch
(32 − r) mod 32 turns the forward FFT into the transform that places sub-band k
at +k·f_s/32. Combined, FFT input r reads slot (r − 1) mod 32: slot 31 first,
then slots 0 to 30. A frame leaves two clocks after its last slot arrives and
takes 32 clocks.

**FFT (`fft32_sdf`, `fft_sdf_stage`).** This is a radix-2 single-path
delay-feedback pipeline with delays 16, 8, 4, 2 and 1. Every butterfly halves
its outputs, so the result is X[k]/32. Outputs come in bit-reversed order,
tagged with k.

End to end, frame m (input samples 32m to 32m+31) gives

    Y_k[m] = (1/32) · Σ_n h[n] · x[32m + 31 − n] · exp(+j·2π·k·n/32)

Sub-band k is the input shifted down by k·15.625 MHz and filtered by h.
Sub-bands k ≥ 16 are the negative frequencies. With a prototype of DC gain 32
(peak near 1.0), the bank has unity gain. Frame m is complete at the output
only after most of frame m+1 has entered, because each SDF stage holds half a
block. The last two frames of a finite stream stay inside until more samples
arrive.

## Sub-band DDC (`tdm_ddc`, `tdm_sym_fir`)

The DDC takes the channelizer stream in its bit-reversed channel order. For
each sample of channel k:

1. Per-channel NCO state is read and updated: `acc[k] += inc[k]`, 32 bits.
2. The top 10 phase bits address cos/sin tables computed at elaboration:
   `round(cos(2πi/1024)·(2^17 − 1))`.
3. The sample is multiplied by exp(−j·phase).
4. The result goes through a 12-tap symmetric FIR. Its delay elements are 32
   samples long, so each channel is filtered on its own. The two samples sharing
   a coefficient are pre-added, so 6 real multipliers per I/Q rail suffice.

A tone at offset f_off inside sub-band k moves to 0 Hz when
`inc[k] = round(f_off / 15.625 MHz · 2^32)`. Negative offsets are allowed. The
filter coefficients are loaded at run time (6 values, Q1.17). Phase truncation
to 10 bits leaves spurs near −60 dBc. The DDC does not decimate.

## Comb generator (`comb_generator`)

The comb is periodic. The processor computes one period, the sum of the band's
tones, and writes it into an 8192-sample memory. The generator plays it
cyclically. Two consecutive samples leave per 500 MHz clock for the 1 GS/s DAC:
`dac_data[0]` first. The period length is programmable in sample pairs. With
8192 samples the tone grid is 1 GS/s / 8192 ≈ 122 kHz. A disabled generator
outputs zeros.

## Configuration bus

All run-time state is written through one bus: `echo_pkg::cfg_t` = {we,
addr[23:0], data[31:0]}, one write per clock.

| addr bits | meaning |
|---|---|
| [23] | broadcast to all chains / all comb generators |
| [22:18] | chain = 4·adc + 2·band + variant (0 delayed, 1 mixed), or DAC number for the comb |
| [17:16] | 0 polyphase coefficient, 1 DDC coefficient, 2 NCO increment, 3 comb |
| [15:0] | polyphase: 32·tap + slot; DDC coefficient: 0..5; NCO: sub-band 0..31; comb: sample index, 0x8000 period − 1 (pairs), 0x8001 enable |

Loading the same prototype into all 20 banks takes 576 broadcast writes.

## Number formats and streaming rules

* Samples are `cplx_t` {re, im}, 16 bits signed each. Coefficients, twiddles
  and tables are 18-bit Q1.17. Every product is rounded (half up) and saturated
  back to 16 bits.
* Every block accepts one sample per clock under `in_valid` and advances only on
  valid samples. Frames start at the first valid sample after reset. Pauses are
  allowed, but frames must not arrive faster than one sample per clock.
* Keep the complex magnitude of channelizer and FFT inputs within full scale. A
  value with both parts near full scale can saturate after a twiddle rotation.
* There is one clock domain and a synchronous, active-high reset. Coefficients,
  NCO increments and phases reset to zero. The comb memory is not reset.

Latencies, in clocks: duplicator 3, polyphase FIR 3, reorder buffer 2 after
frame end, FFT 5 plus the SDF hold-back of 31 samples, DDC mixer 3 and FIR 3.

## Where this design departs from, or adds to, the published one

* **Shift of the second bank.** The shift is half a sub-band spacing (f_s/64).
  The published caption writes f_m = f_s/M. The band diagram and the stated
  3.2 MHz overlap both fit f_s/(2M), and a shift by a whole spacing would
  reproduce the same band grid.
* **Left open by the source, chosen here:** word widths, rounding, the
  reorder-buffer read order (derived above), the SDF FFT architecture, the NCO
  sizes, the configuration bus and the comb playback scheme.
* **Not included:**
  * Filter coefficients: the published ones are not given, and the DDC ones
    were marked preliminary.
  * DDC decimation: no factor is given.
  * Flux-ramp demodulation and event detection: these are future work in the
    source.
  * The JESD204B links, the converters, the DMA path to the processor and the
    analog RF mixer board.
* **Not verified:** timing closure at 500 MHz and resource use. The published
  figures are 87 DSP slices per channelizer and 17 per DDC. Here the TDM FIR
  alone uses 36 multipliers, because it is written in direct form without DSP
  cascades. Full-design synthesis of all 20 chains needs a lot of memory,
  because the delay lines are written as registers. A vendor flow would map
  them to shift-register LUTs or block RAM.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/echo_pkg.sv \
  rtl/fft_sdf_stage.sv rtl/fft32_sdf.sv rtl/pfb_tdm_fir.sv rtl/tdm_reorder_buffer.sv \
  rtl/polyphase_channelizer.sv tb/tb_polyphase_channelizer.sv --top tb_polyphase_channelizer
./obj_dir/Vtb_polyphase_channelizer
```

| Testbench | What it checks |
|---|---|
| `tb_band_duplicator` | delayed copy exact; shifted copy against floating point; latency |
| `tb_pfb_tdm_fir` | exact integer model of the cycled-coefficient FIR, with pauses |
| `tb_tdm_reorder_buffer` | read order, frame timing, back-to-back and paused frames |
| `tb_fft32_sdf` | 40 frames against a floating-point DFT (≤ 3 LSB), bit-reversed tags |
| `tb_polyphase_channelizer` | whole bank against the filter-bank formula (≤ 4 LSB); a tone leaks < −60 dB into other sub-bands |
| `tb_tdm_sym_fir` | exact integer model, bit-reversed channel order, pauses |
| `tb_tdm_ddc` | bit-exact against a mixer and filter model; tones land at 0 Hz at full amplitude; detuned NCO is rejected |
| `tb_comb_generator` | cyclic playback, two period lengths, enable |
| `tb_band_chain` | two tones through both banks and DDCs; blind interval covered by the shifted bank |
| `tb_channel_response` | swept-tone response of one sub-band and its DDC against theory |
| `tb_echo_readout_top` | full default size (5 ADCs, 640 sub-bands) in DAC-to-ADC loop-back |

`tb_channel_response` sweeps a tone across the sub-band centred at −125 MHz.
It uses a 521-tap Kaiser prototype (β = 9, cut-off 7.25 MHz), which is the
length the published design uses. The measured sub-band loses 0.20 dB at
±5.5 MHz and is at least 81 dB down from ±10 MHz onward, which meets the
published specification. The DDC response is measured with the NCO at 0 Hz
and at −2 MHz. With the 12-tap filter used here it is −1.8 dB at 1 MHz,
compared with −2.78 dB for the published, undisclosed coefficients. Every
measured point agrees with the response computed from the loaded coefficients.

The top-level testbench is the end-to-end test. Each comb generator plays two
tones per band. Its samples are fed back as the ADC bands, as the hardware
prototype was tested without converters. All 20 banks are loaded by broadcast.
For every chain the test checks:

* the in-band tone at 0 Hz in its plain sub-band;
* the border tone in the shifted sub-band;
* suppression of the border tone in the plain sub-bands beside it;
* silence in an empty sub-band.

It also counts comb wrap-arounds, broadcast and addressed writes, and frames
delivered. At the default size it takes about three minutes, most of it
compilation.
