# Digital block of a 2x2 MIMO radio-channel hardware simulator

A hardware channel simulator sits between a transmitter and a receiver under
test and replays a radio channel in the lab. The same fading conditions can
be repeated as often as needed, so different pieces of equipment can be
compared under identical conditions. The RF front ends down-convert the
transmitted signals and digitise them. This digital block applies the
channel to the samples. After it, DACs and up-converters send the result on
to the receiver.

This RTL implements the digital block for a one-way 2x2 MIMO link:

    dac_r(t) = trunc( (h_r1 * x_1)(t) + (h_r2 * x_2)(t) ),   r = 1, 2

There are four sub-channels, h11, h12, h21 and h22, where `h_rt` runs from
transmit input `t` to receive output `r`. Each is a sparse impulse response
that changes over time. The reference case is the IEEE 802.11n (TGn)
indoor channel model B, sampled at f_s = 180 MHz as used for 802.11ac:

| path | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| delay (samples) | 0 | 2 | 4 | 5 | 7 | 9 | 11 | 13 | 14 |

The channel changes slowly. People moving through the room give a Doppler
spread of about 6 Hz and a coherence time of about 55 ms. So the channel is
played as a sequence of fixed impulse-response *profiles*, one every 55 ms
(a refresh rate of 18.18 Hz). A host computer computes each profile (for
example with a sum-of-sinusoids Rayleigh model) and loads it into the block
while the current one is still playing.

The block contains two ways of applying a profile. Both run side by side on
the same ADC samples, and the input `arch_sel` chooses which one drives the
DACs.

* **Time domain** (`arch_sel = 0`): one sparse FIR filter per sub-channel.
  Each has 9 multipliers over a 15-sample span, and its output comes a few
  cycles after its input. It is the smaller path, with the lower latency.
* **Frequency domain** (`arch_sel = 1`): one overlap-add FFT convolver per
  sub-channel, with 16-sample blocks, a 16-zero tail, a 32-point FFT, the
  product with the stored frequency response H[k], and a 32-point IFFT.

## Time-domain path: the sparse FIR (`fir14_9`)

The TGn B impulse response spans delays 0 to 14 but has only 9 non-zero
paths. The filter keeps a 15-entry delay line and multiplies only the 9
positions listed in `TAP_DELAY`:

    y(i) = sum_{k=0}^{8} h_k * x(i - d_k),   d = {0,2,4,5,7,9,11,13,14}

The coefficients are an input vector, not constants. They come from a
double-buffered store (`coef_bank`), and a swap replaces all 9 of them
between two samples. This is why the filter is hand-written and not a
fixed-coefficient FIR core. The pipeline has four stages: delay line,
product registers, sum register, and round/saturate. It takes one sample
per clock, and `y_valid` follows `x_valid` by 4 cycles.

## Frequency-domain path: overlap-add with a 32-point FFT (`freq_siso`, `fft_engine`)

Multiplying spectra gives a *circular* convolution. An older frequency-domain
scheme worked only for signals no longer than the FFT. This design uses
overlap-add to handle streams of any length:

1. Cut the input into blocks of B = 16 samples. 16 is the smallest power of
   two above the 14-sample delay spread.
2. Extend each block with 16 zeros. The convolution of 16 samples with a
   15-tap response has 30 samples, so it fits in 32 points without wrapping
   round.
3. Take the 32-point FFT, multiply bin by bin with H[k], and take the
   32-point IFFT. H[k] is the 32-point DFT of the zero-padded impulse
   response, loaded by the host.
4. Output = the first 16 result samples plus the last 16 samples of the
   previous block's result. The adder that does this is the final adder of
   the SISO channel.

`fft_engine` holds one 32-entry complex frame in registers and computes one
radix-2 butterfly per clock, so one transform takes 80 cycles:

* **Forward:** decimation in frequency, natural order in, bit-reversed order
  out. Every stage halves its values, so the result is X[k]/32 and cannot
  overflow.
* **Inverse:** decimation in time with conjugate twiddles, bit-reversed
  order in, natural order out, unscaled.

So the spectrum is never reordered. The multiplier reads H at the
bit-reversed address, and forward-then-inverse gives exactly the
convolution with no 1/N correction. Twiddles are computed during
elaboration as `round(2^14 * cos/sin(2*pi*k/32))`.

One block costs about 247 cycles: clear 1, load 17, FFT 80, multiply 34,
IFFT 80, and overlap-add 32, plus a few cycles of control. Blocks are
collected and emitted through ping-pong buffers. Each `x_valid` writes one
input sample and emits one output sample, and the output is exactly
**32 samples** (two blocks) late. The engine must finish a block before the
next one is complete, so **the input may come at most once every 16
clocks**. `overrun` reports a faster stream. The time-domain path has no
such limit.

A new profile is picked up at the first block whose processing starts after
the swap. Within a block, every input sample is therefore filtered with one
profile, and the profile change is a clean cross-fade over the 15-sample
response.

## Number formats and the DAC truncation window (`rx_combiner`, `sliding_trunc`)

| signal | bits | format |
|---|---|---|
| ADC sample | 14 | Q1.13, +-1 V full scale |
| FIR coefficient | 16 | Q2.14 |
| H[k] | 32 | {re, im}, each Q4.12 |
| SISO output | 16 | Q3.13, rounded, saturated |
| final sum | 17 | Q4.13 |
| DAC sample | 14 | window of the sum |

Each receive antenna adds its two SISO outputs into a 17-bit sum, and the
14-bit DAC needs that cut to 14 bits:

* **Brutal truncation:** keep bits [16:3]. Small outputs lose resolution and
  can even become 0.
* **Sliding window:** keep bits [13+k : k] for k = 0..3, and saturate values
  that do not fit. A reconfigurable analog amplifier after the DAC then
  multiplies by 2^k. The port `amp_k` gives that gain exponent. The right k
  is the smallest one with y_max < 2^k V.

The time-domain path uses the sliding window by default (`BRUTAL = 0`),
because it keeps that path's precision down to very small outputs. The
frequency-domain path uses brutal truncation by default (`BRUTAL = 1`), the
simpler choice when that path's own error dominates. With the 32-bit FFT
words used here, brutal truncation costs about 6 dB in either path (see the
accuracy table). `BRUTAL` is a parameter of both MIMO blocks.

The window position k comes from the host, in bits [1:0] of the profile's
header word. Receive output r takes it from the header of sub-channel
h_r1. The block does not choose k on its own.

## Profiles, host writes and refresh (`coef_bank`, `profile_dpram`, `refresh_ctrl`)

The host writes words over a plain write bus (`host_wr`: `we`, 10-bit
`addr`, 32-bit `wdata`). Address bit [9] selects the architecture, bits
[8:7] select the sub-channel (0 = h11, 1 = h12, 2 = h21, 3 = h22), and bits
[6:0] give the word:

| architecture | words 0..n-1 | last word | per MIMO profile |
|---|---|---|---|
| time, addr[9] = 0 | 0..8: taps, Q2.14 in `wdata[15:0]` | 9: header | 4 x 10 words of 16 bits |
| frequency, addr[9] = 1 | 0..31: H[k] = {re, im} | 32: header | 4 x 33 words of 32 bits |

Writes always go to the shadow bank. When the host has written a complete
profile for all four sub-channels, it pulses `host_commit`.
`refresh_ctrl` counts `REFRESH_PERIOD` cycles, by default 9,900,990, which
is 18.18 Hz at 180 MHz. At each tick (`refresh_tick`) it swaps the banks of
all eight stores if a commit is pending (`profile_swap`); otherwise it keeps
the current profile (`profile_held`). At 18.18 Hz the load is about
1.5 KB/s (time domain) or 9.6 KB/s (frequency domain), which any host link
handles. Until the first swap, the frequency path multiplies by H = 0. The
time-domain stores reset to zero.

## Timing summary

| path | rate | ADC-to-DAC latency (top ports) |
|---|---|---|
| time domain | 1 sample / clock | 7 cycles (FIR 4, adder 1, window 1, output register 1) |
| frequency domain | 1 sample / 16 clocks at most | 32 samples + 4 cycles |

## Accuracy measured in simulation

The accuracy test uses a Gaussian pulse: x_m = 0.5 V, centre 21 Ts,
sigma = 21/4 Ts, 97 samples. The pulse drives both inputs, with two
successive TGn model B profiles, and the test compares the outputs with the
ideal sum_k h_k x(t - d_k). It computes the relative error ||E|| / ||Y||
and the SNR 20 log10(||Y|| / ||E||) over 110 samples, with rms norms.
Results for pack1 (pack2 is within 0.6 dB):

| | time domain | frequency domain |
|---|---|---|
| 17-bit sum, no truncation | 0.009 %, 81.0 dB | 0.009 %, 81.5 dB |
| sliding window, k = 2 | 0.028 %, 71.2 dB | 0.026 %, 71.7 dB |
| brutal truncation, k = 3 | 0.054 %, 65.4 dB | 0.051 %, 65.9 dB |

The untruncated figure is limited mainly by the 14-bit quantisation of the
input pulse. The path amplitudes are taken as real and positive,
10^(dB/20), from the per-path powers of the two profiles. For the time
domain, the sliding window gains about 6 dB over brutal truncation here. In
the frequency domain the two FFT passes add almost no error with 32-bit
words, so that path is about as accurate as the FIR. A narrower FFT word
(`DW`) would make it less accurate.

## Where this RTL departs from, or goes beyond, the architecture

* **Serial FFT engine.** The frequency path uses a serial, one-butterfly
  FFT engine instead of a vendor streaming FFT core. It is therefore not
  real-time at 180 MHz sampling: it needs 16 clocks per sample. To stream at
  full rate, replace `fft_engine` with a pipelined FFT; the rest of
  `freq_siso` stays valid.
* **Latencies.** They are those of this RTL: 7 cycles for the time domain,
  and 32 samples plus a few cycles for the frequency domain. They do not
  reproduce the 125 ns and 46 us reported for a vendor-FPGA build of the
  two architectures.
* **Both paths in one top.** The two architectures sit in one top with a
  run-time select. In the original they are two separate FPGA designs.
* **Design choices not fixed by the architecture:** the fixed-point splits,
  the 32-bit FFT word with 8 guard bits, double buffering, the commit/tick
  handshake, the header word carrying the window position, saturation in
  the window, and asynchronous active-low reset.
* **Not in the RTL:** the ADCs, DACs, RF converters and the analog
  amplifier, the PCI link and host computer, and the generation of fading
  profiles. The top brings out sample ports, the host write bus and `amp_k`
  in their place.
* **Wider configurations are not built.** Longer impulse-response windows
  (64, 128 or 256 samples for larger environments) and a 4x2 array of
  8 SISO channels need other parameter values or more instances.
  `MAX_DELAY`/`TAP_DELAY` and `LOG2N` are parameters; the 2x2 wiring is
  fixed.

## Files

`rtl/`:

* `chsim_pkg.sv` holds the widths, formats, TGn B delays, the host bus
  struct and the twiddle functions.
* `fir14_9`, `coef_bank` and `mimo_time_domain` make up the time-domain
  path.
* `fft_engine`, `profile_dpram`, `freq_siso` and `mimo_freq_domain` make up
  the frequency-domain path.
* `rx_combiner` and `sliding_trunc` form the final adder and DAC window.
* `refresh_ctrl` is the profile refresh controller.
* `mimo_chsim_top` is the top.

`tb/`:

* Each module has a self-checking testbench, `tb_<module>.sv`.
* `tb_chan_pkg.sv` holds the two TGn B 2x2 profiles, the Gaussian pulse and
  the profile-to-word conversions.
* `tb_mimo_chsim_top` is the end-to-end test at a refresh period of 4000
  cycles. It covers swap, held tick, overrun, saturation, both windows and
  both architectures.
* `tb_table6_accuracy` reproduces the accuracy table above.
* `tb_mimo_chsim_full` runs the top with all parameters at their defaults:
  it waits through a real 9.9-million-cycle refresh period, then checks the
  Gaussian test. It takes about 10 s.

Every testbench prints `TB_RESULT checks=N failures=M`.

Simulating with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/chsim_pkg.sv tb/tb_chan_pkg.sv tb/tb_mimo_chsim_top.sv \
        --top-module tb_mimo_chsim_top -o sim
    ./obj_dir/sim

For a block test that does not use `tb_chan_pkg`, leave out
`tb/tb_chan_pkg.sv`.
