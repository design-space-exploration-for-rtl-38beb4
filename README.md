# Frequency synchronization for BPSK/QPSK bursts

This is a synthesizable SystemVerilog receiver block that finds and removes the
carrier frequency offset of short BPSK or QPSK bursts. The bursts carry no
training symbols, so the offset has to be estimated *blind*, from the data
symbols themselves:

1. The PSK modulation is stripped off each sample. The angle is multiplied by
   the modulation index M (2 for BPSK, 4 for QPSK). This leaves a pure tone at
   M times the offset.
2. A 1024-point FFT of the burst shows that tone as a spectral peak.
3. The position of the strongest bin gives the offset. The search can be
   limited to a window of bins when the possible offset range is known.
4. The stored burst is read back and rotated by the opposite frequency.

The input is one complex sample per symbol with ideal timing. Bursts can be up
to 1024 symbols long. All units accept one sample per clock cycle.

## The estimator

For a received sample `r(l) = s(l)·exp(j2π f l) + n(l)`, the modulation
removal computes

    r~(l) = |r(l)|^K · exp(j·M·arg r(l))

For a PSK symbol, `M·arg s(l)` is a multiple of 2π, so `r~` is a tone at
`M·f`. The classic approach uses `K = M`, which is simply `r^M`. That amplifies
the noise strongly ("self noise"). A smaller exponent on the magnitude gives
far better estimates at low SNR. **K = 1 is the design point.** Compared with
`r^M`, it gains about 0.8 dB in bit error rate after correction, for both
modulations and at burst lengths of 50 to 300 symbols. It costs only a few
percent more hardware.

Because the polar form is used, the structure is:

    r --> CORDIC --> |r| ------------------------------.
                 \-> arg r --x M (shift) --> sin/cos table --> x |r|^K --> r~

- `cordic_vec` delivers the magnitude and the angle.
- Multiplying the angle by M is a left shift of the angle word, modulo one
  turn.
- `sincos_lut` turns the angle back into a unit phasor.
- Two multipliers scale the phasor by `|r|`.

Setting the parameter `K` to 0, 2 or 3 gives the same structure with
`K-1` extra multipliers:

- K = 0 gives a unit phasor and needs no multipliers.
- K = 2 and K = 3 give `|r|^2·α` and `|r|^3·α`.

Two other ways to build the block are not implemented here: a direct `r^4`
made of multipliers, and `r^4/|r|^2` built with a divider. Both do worse or cost
more.

### Resolution and range

With `N = 1024` points and index M, one bin is `f_s/(N·M)`: 1/4096 of the
sample rate for QPSK and 1/2048 for BPSK. The estimate is

    f = b / (N·M)        b = signed bin number, -N/2 .. N/2-1

so the unambiguous range is `±1/(2M)` of the sample rate: ±12.5 % for QPSK
and ±25 % for BPSK. An offset that falls between two bins gets rounded to
one of them. The remaining error is at most half a bin, which over a
300-symbol QPSK burst turns the phase by at most 0.23 rad. The FFT is 1024
points long, the same as the longest burst. Shorter bursts are padded with
zeros.

### Windowing

`cfg_win_lo`/`cfg_win_hi` limit the peak search to signed bins
`lo ≤ b ≤ hi`. To search offsets within ±w of the sample rate, use bins
`±round(w·N·M)`. For example, ±2 % for QPSK is bins −82..82. Searching the
full band means `-512..511`. A narrow window keeps noise peaks far from the
true offset from being picked. When the offset range is known, this is worth
more than 1 dB at low SNR, and it costs only two comparators.

## Block map

| module | role |
|---|---|
| `freq_sync` | top level: the burst controller and the wiring of the chain below |
| `agc` | adaptive gain: 12-bit input to the `Q_W`-bit datapath, selectable effective quantization |
| `burst_buffer` | 1024 × 2·`Q_W` block RAM holding the burst |
| `mod_removal` | `|r|^K·exp(jM·arg r)` (uses `cordic_vec`, `sincos_lut`) |
| `cordic_vec` | pipelined vectoring CORDIC, magnitude and angle |
| `sincos_lut` | quarter-wave sine/cosine table, computed at elaboration |
| `fft_r2sdf` | 1024-point radix-2 single-path delay-feedback FFT (chain of `fft_sdf_stage`) |
| `fft_sdf_stage` | one butterfly stage with its delay line and twiddle table |
| `spectral_peak` | windowed search for the bin of largest power |
| `freq_correct` | phase accumulator + table + complex multiplier |
| `fs_pkg` | shared constants (`FFT_N`, phase width), `mod_e`, `bitrev()` |

## Burst flow and timing

`freq_sync` handles one burst at a time:

| phase | what happens | cycles |
|---|---|---|
| collect | `in_ready` high. Samples pass the AGC, go into the buffer and through modulation removal into the FFT. The first sample entering the FFT is flagged start-of-frame. | L (plus source stalls) |
| drain | Wait for the last tone sample (modulation removal latency 16, AGC 1) | ~17 |
| pad | Zeros complete the FFT frame to N samples | N − L |
| flush | More zeros push the frame through the FFT; `spectral_peak` searches the bins as they leave | N + ~12 |
| correct | `est_valid` pulses. The burst is read from the buffer and rotated. `out_valid` carries one sample per cycle, with `out_last` on the last one. | L + 3 |

A burst of L samples therefore takes about `2N + L + 40` cycles from its
first sample to its last output, roughly 2 100 to 3 100 cycles. `in_ready`
goes high again one cycle after `out_last`. A burst ends at `in_last`, or
after N samples if `in_last` does not come in time.

The FFT needs no frame-length counter of its own. Each stage resets its
position counter on the start-of-frame flag and passes the flag on when its
own output frame begins. A frame therefore stays aligned however many
samples came before it, and zeros fed after it are harmless.

### Latencies of the units

| unit | latency | notes |
|---|---|---|
| `agc` | 1 | |
| `cordic_vec` | ITER + 2 = 14 | |
| `mod_removal` | ITER + 4 = 16 | |
| `fft_r2sdf` | N − 1 + log2 N valid samples from `in_sof` to `out_sof` | The input must keep flowing; the output is bit-reversed, `out_bin` gives the natural bin |
| `spectral_peak` | result 2 cycles after the last bin | |
| `freq_correct` | 2 | |
| `burst_buffer` | read 1 | |

## Word widths and scaling

- **Input:** 12-bit I/Q.
- **AGC:** the gain has 12 fraction bits and starts at 1.0, which maps the
  input's full scale to the 8-bit full scale. Each sample, the gain is
  adjusted by the error between `|I|+|Q|` and 128. `cfg_qbits < 8` clears the
  low bits, to try coarser quantizations without changing the hardware.
- **CORDIC:** 8 guard bits. The angle is 12 bits (1/4096 turn), which is also
  the phase width used everywhere else. The magnitude carries the CORDIC gain
  of 1.647, which is *not* compensated. It scales every sample of a burst
  alike, so the peak position does not change.
- **Modulation removal:** 10-bit output.
- **FFT:** no scaling. Words grow to `10 + 10 + 1 = 21` bits, so no bin can
  overflow. The twiddles are 16-bit. Products are rounded back to 21 bits.
- **Peak search:** compares the power `re²+im²` (42 bits) rather than the
  magnitude. Both give the same maximum.
- **Correction:** the phase step for bin b is `b·4/M` in 1/4096 turn, exact
  for both modulations. The outputs are 9 bits wide.

## Top-level interface (`freq_sync`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_mode` | in | `mod_e` | `MOD_BPSK` (M = 2) or `MOD_QPSK` (M = 4) |
| `cfg_qbits` | in | 4 | effective quantization, 1..`Q_W` |
| `cfg_agc_freeze` | in | 1 | hold the AGC gain |
| `agc_gain` | out | 16 | current AGC gain, 4 integer and 12 fraction bits |
| `cfg_win_lo`, `cfg_win_hi` | in | 10 signed | window of searched bins |
| `in_valid`, `in_ready`, `in_last`, `in_i`, `in_q` | in/out | 12-bit I/Q | burst input (valid/ready) |
| `est_valid`, `est_bin`, `est_pow` | out | 1, 10, 42 | estimate: bin b and its power |
| `out_valid`, `out_last`, `out_i`, `out_q` | out | 9-bit I/Q | corrected burst, no back-pressure |

Parameters: `N` = 1024, `IN_W` = 12, `Q_W` = 8, `K` = 1. Keep the `cfg_*` inputs
stable while a burst is in flight.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sincos_lut` | all 4096 phases against `$cos`/`$sin`, ±1 LSB |
| `tb_cordic_vec` | 2000 random vectors: magnitude and angle against real arithmetic; latency |
| `tb_mod_removal` | random samples in both modes against `G·|r|·e^{jM·arg r}`; QPSK symbols with a common phase collapse to one point; latency |
| `tb_fft_r2sdf` | three 1024-point frames (random; tone with input gaps; zero-padded 50-sample burst) against a real-valued DFT; every bin exactly once; latency |
| `tb_spectral_peak` | six frames with different windows (full band, negative peak, dominant bin outside/inside the window, one-bin window) against a reference search |
| `tb_freq_correct` | rotation against real arithmetic for five phase steps; latency, last flag, phase restart |
| `tb_burst_buffer` | write, scrambled read-back, partial overwrite |
| `tb_agc` | settling at three input levels, frozen gain, sample-by-sample model, reduced quantization |
| `tb_freq_sync` | end to end at the default size (see below) |

`tb_freq_sync` runs the full design with all parameters at their defaults. It
sends eight bursts with AWGN:

- QPSK: 50, 150 and 300 symbols, 1.2 % offset
- BPSK: 300 symbols, −2 %
- full 1024-symbol bursts, one of them with input stalls
- an over-long burst that gets truncated
- a window that excludes the true offset
- a window that contains it
- a BPSK burst at 6-bit quantization

For each burst it checks the bin (within ±1 of `f·N·M`), that the corrected
output shows no residual frequency beyond the bin rounding, the output count,
`out_last`, and the cycle budget. It also counts each of these mechanisms and
fails if one never happened. It runs in about ten seconds.

`tb_workloads` puts four copies of the top side by side. They differ only in
K (0, 1, 2 and 4 = M), and each copy gets the same noisy bursts: 12 bursts
per operating point. An estimate counts as good when its error turns the
phase by less than 1/16 turn over the burst. One run gave these counts of
good estimates out of 12 (Es/N0 is per symbol; the exact numbers depend on
the random seed):

| bursts | K=0 | K=1 | K=2 | K=4 |
|---|---|---|---|---|
| QPSK, L = 50 / 150 / 300, 10 dB | 12/12/12 | 12/12/12 | 12/12/12 | 12/12/12 |
| QPSK, L = 50 / 150 / 300, 3 dB | 0/1/4 | 2/3/7 | 2/3/9 | 0/2/7 |
| BPSK, L = 50, 0 dB | 6 | 9 | 10 | 7 |

As expected, longer bursts and an exponent below M help at low SNR.
Twelve bursts are too few to rank K = 1 against K = 2. The testbench checks:

- every copy is right on at least 11 of 12 bursts at 10 dB (QPSK) and 8 dB
  (BPSK);
- with a ±2 % window, every estimate lies inside the window;
- an offset exactly on a bin is found exactly;
- an offset exactly halfway between bins 49 and 50 gives 49 or 50.

To run a testbench with plain Verilator (from the directory holding `rtl/`
and `tb/`):

    verilator --binary --timing --assert -Irtl rtl/fs_pkg.sv \
        tb/tb_freq_sync.sv -y rtl +libext+.sv --top-module tb_freq_sync
    ./obj_dir/Vtb_freq_sync

The other testbenches work the same way: substitute their names. Each
builds without warnings under Verilator's default settings.

## Where this design goes beyond or departs from the reference architecture

The dataflow is the reference architecture:

- modulation removal with a CORDIC, a sine/cosine table and two multipliers
  (K = 1)
- a 1024-point FFT at one sample per cycle
- a windowed maximum search
- correction by table and complex multiplication
- bursts up to 1024 symbols, BPSK and QPSK, any window

The following are this design's own:

- **Cores.** The CORDIC, the sine/cosine table and the FFT were vendor cores
  in the reference implementation. Here they are plain RTL with the same
  function: a pipelined CORDIC, a quarter-wave table, and a radix-2 SDF FFT.
  Their precision (12-bit angles, 16-bit twiddles, no FFT scaling) is chosen,
  not inherited.
- **AGC.** Only its role is known: fitting 12-bit samples to a selectable
  quantization. The loop here is a simple first-order one. Its gain carries
  over from burst to burst.
- **Controller and buffer.** One burst at a time, with a block-RAM buffer so
  the same samples can be corrected after estimation. A ping-pong buffer
  would let a new burst enter while the previous one is corrected. That is
  not implemented.
- **Default quantization of 8 bits.** Coarser quantizations from 5 to 8 bits
  behave like floating point; 9 bits is used only to rule out quantization
  effects. `Q_W` is a parameter.
- **No phase correction.** Only the frequency is removed. The constant phase
  of each burst remains, to be resolved by a later phase estimator.
- **No output back-pressure.** Output samples leave one per cycle.
- **Resources not reproduced.** No figures are given for slices, multipliers
  or block RAMs. The reference numbers were for an FPGA with vendor cores,
  and this RTL does not aim to reproduce them.
