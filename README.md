# Band-switching spectrum receiver for plasma waves: digital part

A spectrum receiver for plasma waves has to cover 10 Hz to 100 kHz. The usual
way is to digitise the whole range with one wideband amplifier and run an FFT.
That has a drawback: the single gain setting must suit the strongest wave
anywhere in the range, so weaker waves at other frequencies lose sensitivity.
This receiver works differently. An analogue chip band-limits and amplifies
**one band at a time**: 10 Hz–1 kHz, 1–10 kHz or 10–100 kHz. The digital part
described here steps through the three bands in a fixed cycle. For each band
it:

* switches the analogue filters to that band,
* waits for the analogue chain to settle,
* clocks the ADC at a rate matched to the band,
* takes 256 samples and turns them into a 256-point complex spectrum.

One pass over the three bands takes 111.8 ms, and that is the receiver's time
resolution. The frequency resolution is 13 Hz, 130 Hz and 1.3 kHz in the three
bands.

This repository holds synthesizable SystemVerilog for that digital part,
meant for a small FPGA with a 10 MHz master clock. It also holds self-checking
testbenches and a behavioural model of the ADC. The analogue chain (switchable
band-limiting filter, 0/20/40 dB main amplifier, anti-aliasing filter) and the
ADC itself are analogue or third-party circuits and are not part of the RTL.

## Block structure

```
                 +--------------------------- pwr_digital_part ----------------------------+
 analog_ctrl[2] <-+                                                                        |
 sampling_clk   <-+  pwr_controller --- out_enable -----------------+                      |
                  |      |  sample_strobe, fft_start                 v                      |
 adc_data[14]  ---+-> pwr_fft256 --- re[18], im[18], valid ---> pwr_output_buffer --> fft_result[18]
                  |      +--- finish -----------------------------------------------> fft_finish
                  |  pwr_controller ---------------------------------------------> receiver_state[2]
                  +------------------------------------------------------------------------+
```

| File | Contents |
|---|---|
| `rtl/pwr_pkg.sv` | widths, default cycle counts, state and band enums |
| `rtl/pwr_controller.sv` | the six-state time sequencer |
| `rtl/pwr_fft256.sv` | 256-point FFT with a fixed 839-clock calculation time |
| `rtl/pwr_fft_butterfly.sv` | combinational radix-2 butterfly used by the FFT |
| `rtl/pwr_output_buffer.sv` | serialises each spectrum onto 18 pins |
| `rtl/pwr_digital_part.sv` | top level |
| `tb/pwr_adc_model.sv` | behavioural 14-bit ADC with a 13-clock pipeline latency |
| `tb/tb_*.sv` | testbenches (see *Verification*) |

## The observation cycle

Everything the receiver does follows from one timetable. The controller
steps through it by counting master clocks; no external event steers it.

| State | Meaning | Length (clocks @ 10 MHz) | Time | Sampling clock |
|---|---|---|---|---|
| 1A | band 1 settling; band 3 spectrum computed and sent | 200 000 | 20 ms | off |
| 1B | band 1 observation | 269 × 3000 = 807 000 | 80.7 ms | 3.333 kHz |
| 2A | band 2 settling; band 1 spectrum computed and sent | 20 000 | 2.0 ms | off |
| 2B | band 2 observation | 269 × 300 = 80 700 | 8.07 ms | 33.33 kHz |
| 3A | band 3 settling; band 2 spectrum computed and sent | 2 000 | 0.2 ms | off |
| 3B | band 3 observation | 269 × 30 = 8 070 | 0.807 ms | 333.3 kHz |

The total is 1 117 770 clocks, or 111.8 ms.

The waiting times are set by how long the analogue filters take to settle
after a band switch. The **waiting states do double duty**: while the
analogue side settles, the FFT works on the samples from the observation that
just ended and sends its result out. The shortest wait, 3A, lasts 2000 clocks.
Computing a spectrum (839 clocks) and sending it (512 clocks) takes 1351
clocks, so it fits in every wait. A static check in the top level enforces
this for any parameter set. An assertion also fires if the FFT is still busy
when an observation starts.

**Why 269 sampling periods.** The ADC is a pipeline converter. The code for
the sample taken at one rising edge of `sampling_clk` appears only 13 edges
later. An observation state therefore clocks the ADC 256 + 13 = 269 times.
The controller ignores the codes present during the first 13 periods. In
periods 13 to 268 it pulses `sample_strobe`, and the FFT takes the word on
`adc_data`. These are samples 0 to 255.

**Sampling clock timing.** In each period, `sampling_clk` is high for the
first half of the period and low for the second half. The strobe comes in
the master-clock cycle in which the clock falls. That is half a period after
the ADC's output changed, so the data are stable as long as the ADC output
settles within half a sampling period. In waiting states the sampling clock stays low.

**Sampling rates.** The dividers 3000, 300 and 30 are not stated directly in
the source material; they are derived from it. 269 periods at these rates
give the stated observation times of 81, 8.1 and 0.81 ms, and the rates
divided by 256 give the stated resolutions of 13 Hz, 130 Hz and 1.3 kHz. Each
rate is about 3.3 times the top of its band, which leaves room for the
anti-aliasing filter's roll-off.

## The FFT module

**What is given.** The interface comes from the receiver design:

* a 256-point transform of 14-bit samples;
* 18-bit real and 18-bit imaginary outputs, one frequency bin per clock
  (f0 to f255), plus an "FFT finish" flag, for 37 parallel output bits;
* a calculation time of 839 clocks (83.9 µs).

**What is this design's own.** The insides were not available, so
`pwr_fft256` is the simplest structure that meets that interface: an
**in-place, iterative radix-2 decimation-in-time FFT** on a register array
of 256 complex 24-bit words.

1. **Load.** Each strobed sample is sign-extended and written to the array at
   the *bit-reversed* address of its arrival index (sample 1 goes to address
   128, and so on). This puts the data in the order that decimation-in-time
   needs, at no cost: samples arrive at most once every 30 clocks.
2. **Compute.** There are 8 stages of 128 butterflies each. Two butterflies
   run per clock, so the transform takes 512 clocks. In stage *s*, butterfly
   *b* pairs addresses *i* and *i* + 2^s, where
   *i* = ((*b* >> *s*) << (*s*+1)) | (*b* mod 2^s). Its twiddle factor is
   W^k with *k* = (*b* mod 2^s) · 2^(7−s). The two butterflies of one clock
   never touch the same address. Each butterfly computes
   `x = a + b·W`, `y = a − b·W`, with the product rounded to the nearest
   integer.
3. **Twiddles.** W^k = cos(2πk/256) − j·sin(2πk/256) for k < 128. The table
   is computed at elaboration time with `$cos`/`$sin` as 18-bit numbers with
   16 fraction bits, so there is no table file.
4. **Word growth.** A 256-point transform of 14-bit data can grow by 8 bits,
   to 22 bits. The 24-bit internal word holds that with margin, so nothing is
   scaled between stages.
5. **Release.** The engine finishes long before the deadline. The results
   are released exactly `CALC_CYC` = 839 clocks after `start`, so the module
   keeps the fixed latency of the original. The output counter walks through
   addresses 0 to 255, which hold the bins in natural order.

**Output scaling.** Each 18-bit output is the internal value divided by 16,
rounded, and saturated to 18 bits:

    out[k] = sat18( round( X[k] / 16 ) ),   X[k] = Σ x[n] e^(−j2πkn/256)

A full-scale DC input (256 × 8191 / 16 = 131 056) just fits, so saturation
should never happen in practice. The division by 16 is an assumption: the
source gives the 18-bit width but not how the 22-bit result was reduced to
it.

**Timing.** If `start` is high in cycle *t*, then `finish` and the first
`out_valid` are high in cycle *t* + 839. `out_valid` then stays high for
exactly 256 cycles. Extra samples after the 256th, and a `start` while busy,
are ignored.

Measured against a floating-point DFT over random, tone, square-wave and DC
inputs, the largest error is below 1 output LSB.

## The result stream

The output buffer turns the 36 parallel bits into one 18-bit word per clock,
in the order real f0…f255, then imaginary f0…f255. At 10 MHz each run takes
25.6 µs. Real parts pass straight through a register. Imaginary parts are
stored in a 256 × 18 memory and read out after the last real part, with no
gap between the two runs.

For the FFT that starts in cycle *t*:

| Cycle | Result pins |
|---|---|
| *t* + 839 | `fft_finish` = 1 |
| *t* + 840 … *t* + 1095 | real parts, `result_is_im` = 0 |
| *t* + 1096 … *t* + 1351 | imaginary parts, `result_is_im` = 1 |

`result_valid` is high for the 512 words. The buffer passes data only while
the controller's `out_enable` is high, that is, in waiting states. Dropping
the enable abandons any readout in progress.

`receiver_state` shows the band of the *current* state, coded 1, 2 or 3.
The spectrum sent during a waiting state comes from the *previous* band:
data tagged 2 are band 1, tagged 3 are band 2, tagged 1 are band 3.
`analog_ctrl` carries the same band code to the analogue chip. It switches at
the start of each waiting state.

## Top-level interface (`pwr_digital_part`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 10 MHz master clock |
| `rst_n` | in | 1 | active-low reset (asynchronous assert); the receiver starts in 1A |
| `adc_data` | in | 14 | ADC word, two's complement |
| `analog_ctrl` | out | 2 | band code to the analogue chip (1, 2, 3) |
| `sampling_clk` | out | 1 | ADC sampling clock |
| `receiver_state` | out | 2 | band code of the current state |
| `fft_result` | out | 18 | result word |
| `fft_finish` | out | 1 | one-cycle pulse at the end of each calculation |
| `result_valid` | out | 1 | a result word is on `fft_result` |
| `result_is_im` | out | 1 | the word belongs to the imaginary run |

The parameters `WAIT1..3` (waiting states, in clocks), `DIV1..3` (sampling
dividers) and `CALC_CYC` default to the values above. Changing the master
clock frequency means scaling `WAIT*` and `DIV*` together.

## Where this design departs from, or adds to, the original receiver

* The FFT's internal architecture, its 24-bit internal word, its twiddle
  precision and the divide-by-16 output scaling are all choices made here.
  Only its interface, its widths and its 839-clock latency are from the
  original design.
* The sampling dividers are derived, as explained above, and are not stated
  directly.
* Several details are not specified in the source and were chosen here:
  the band codes, the sampling clock's duty cycle, the capture point at the
  falling edge, two's-complement ADC data, and the meaning of the
  controller-to-buffer control (an enable during waiting states).
* `result_valid` and `result_is_im` are extra output pins. The original
  brings out only the state, the 18-bit result and FFT finish. There, the
  reader finds words by counting clocks from FFT finish, which works here
  too.
* The main amplifier's 0/20/40 dB gain is set outside the digital part and
  is not driven by this RTL.
* The analogue chip decodes the 2-bit band code into filter settings with
  its own internal logic. That decode table is not known and is not modelled.

## Verification

Each testbench checks against values it works out independently of the RTL,
and ends with a `TB_RESULT checks=… failures=…` line.

| Testbench | What it checks |
|---|---|
| `tb_pwr_controller` | two full cycles at default timing: every state length, state order, band codes, 269 sampling edges per observation with the right period, 256 strobes placed after the 13-clock latency at the falling edge, one FFT start in the first cycle of each wait, the 1 117 770-clock cycle |
| `tb_pwr_fft256` | tones on exact bins, full-scale square wave, full-scale DC, random data; every bin against a floating-point DFT ÷ 16 (±2 LSB); exact 839-clock latency; one finish pulse; 256-cycle output; extra samples and a restart while busy are ignored |
| `tb_pwr_output_buffer` | real-then-imaginary order and timing for random spectra; input dropped while disabled; readout abandoned when the enable drops |
| `tb_pwr_digital_part` | end to end at default parameters, one full cycle: an ideal band-pass front end feeds a tone per band into the ADC model; all 512 words of each band checked against a DFT of the codes the ADC took; peak bins; tags; FFT latency from the end of observation; no output during observation; counts of every state, band switch, latency drop, FFT run and output run |
| `tb_pwr_sample_output` | a 20 kHz, 100 mV tone with the 0 dB mode gains, over eight cycles: bands 1 and 2 return empty spectra; band 3 peaks at bin 15 (19.5 kHz) with bin 16 second, once every 111.8 ms |

Every testbench runs at the RTL's default parameters. The longest, the
eight-cycle workload, takes a few seconds. To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_pwr_digital_part \
        rtl/pwr_pkg.sv tb/tb_pwr_digital_part.sv -y rtl -y tb
    ./obj_dir/Vtb_pwr_digital_part

Use the same command for the others, with the testbench name changed.

## Implementation notes

* The FFT's sample array is 2 × 256 × 24 bits. It is read at four addresses
  per clock during the computation and written at four, so it maps to
  registers, not to a block RAM. On a small FPGA you may prefer one butterfly
  per clock with a dual-port RAM. That needs 1024 clocks, more than 839, so
  it would also need a radix-4 schedule or a faster clock to keep the
  original latency.
* Each clock forms eight 24 × 18-bit products (four per butterfly).
* The imaginary-part store of the output buffer (256 × 18) is a plain
  one-read, one-write memory and maps to a block RAM.
