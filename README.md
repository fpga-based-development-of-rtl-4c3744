# OFDM / DMT baseband link for in-vehicle networks

This is the digital part of a 50 Mbit/s multicarrier link, written in synthesizable
SystemVerilog. The bit stream is spread over 16 subcarriers. Fourteen of them carry
16-QAM symbols, each with 4 bits. Every symbol is sent with a cyclic guard interval,
so that a short channel echo can be removed with one complex multiply per subcarrier.

The link has two modes, chosen when the design is built:

* **OFDM:** complex baseband, a 16-point transform and two sample streams (I and Q).
  It is meant for a radio front-end with a quadrature modulator.
* **DMT:** a 32-point transform fed with a conjugate-symmetric spectrum, so the output
  is one real sample stream. It is meant for a plain wire.

Transmitter, receiver, a random bit source and a bit-error monitor all run from a
single 250 MHz clock. The receiver can be looped back to the transmitter inside one
FPGA, which makes the whole system testable without an analogue front-end.

## The numbers everything else follows from

| quantity | value | in clock cycles (4 ns) |
|---|---|---|
| payload bit period | 20 ns (50 Mbit/s) | 5 |
| bits per symbol frame | 14 subcarriers × 4 bits = 56 | – |
| frame period | 56 × 20 ns = 1120 ns | 280 |
| transform length N | 16 (OFDM), 32 (DMT) | – |
| guard interval | N/4: 4 (OFDM), 8 (DMT) samples | – |
| samples per frame | 20 (OFDM), 40 (DMT) | – |
| DAC/ADC sample period | 56 ns (OFDM), 28 ns (DMT) | 14, 7 |
| word period into the IFFT | 16 ns (OFDM), 8 ns (DMT) | 4, 2 |
| sample word | s5Q3: sign, 5 integer, 3 fraction bits (9 bits) | – |

The clock period of 4 ns is the largest common divisor of the 20 ns bit period and the
two sample periods. Every slower rate is therefore a clock enable made by a counter,
and the whole design has a single clock domain.

Two FFT bins are left empty:

* bin 0, because it is DC in the baseband;
* bin 8, the Nyquist bin.

The 56 bits of a frame fill bins 1..7 and then bins 9..15. Each bin gets 4 bits, and
the first bit of each group is the most significant bit.

## Signal path

```
 lfsr_bitgen ─► ofdm_tx ───────────────────────────────► DAC samples + frame marker
                 tx_subc_alloc   input FIFO, 56 bits/frame → 16 × 4-bit words
                 tx_frame_builder 16 × qam16_mod, zero bins 0/8, serialise (DMT: mirror)
                 fft_core (IFFT)  frame-serial radix-2, unscaled
                 gi_insert        last N/4 samples first, then the frame
                 rate_out_fifo    one sample per 14 / 7 cycles

 ADC samples + marker ─► ofdm_rx ─────────────────────► received bits, one per 20 ns
                 rx_gi_remove     input FIFO, whole frame, drop the guard, burst to FFT
                 fft_core (FFT)   scaled by 1/N
                 rx_equalizer     bins 0..15 in parallel, y = x · E(n), E = 1/H
                 16 × qam16_demod hard decisions
                 rx_bit_serializer 56 bits, one per clock
                 rate_out_fifo    one bit per 5 cycles

 bit_error_monitor: delay the sent bits by the link delay, XOR with the received
                    bits (diffsig), count compared bits and errors
```

`ofdm_top` connects these parts. The transmitter samples leave on `out_trans_re/im`
together with `tx_sample_stb` and `tx_frame_mark`. The receiver samples enter on
`inp_recv_re/im` together with `rx_sample_stb` and `rx_frame_mark`. A loopback, a
channel model or a real converter goes between the two.

## How one frame moves through the design (the tricky part)

The blocks work at three different speeds:

* bits arrive slowly, one every 5 cycles;
* the transform works in bursts at the full clock rate;
* samples leave at a fixed rate again.

FIFOs connect these speeds, and small FSMs with counters decide when to push and when
to pop.

1. **Input FIFO and the zero frame** (`tx_subc_alloc`)
   * Each input bit is pushed once per bit period, in a fixed cycle of the 5-cycle
     bit slot.
   * A 280-cycle frame timer opens a 56-cycle pop window at the start of every frame.
   * At that moment, a frame carries data only if the FIFO already holds at least 56
     bits. Only then are those bits popped and spread over the subcarriers (`sel = 1`).
   * Otherwise the frame carries zeros (`sel = 0`). This always happens for the first
     frame after reset.
   * The FSM has four states (idle, pop, push, push + pop). Push and pop happen in the
     same cycle regularly, because bits keep arriving during the pop window.
2. **Frame builder.** The 16 words are latched when the frame starts and mapped to
   16-QAM.
   * The modulators map an all-zero word to −3+3i. The builder therefore forces the
     unused bins back to 0.
   * The words are then sent serially: one every 4 cycles for OFDM, one every 2 cycles
     for DMT.
   * In DMT the serial frame is bins 0..15, then 0 for bin 16, then the complex
     conjugates of bins 15..1.
3. **IFFT.** The IFFT collects the N words, computes, and sends the N results on N
   consecutive cycles.
4. **Guard insertion** (`gi_insert`). The last N/4 results go straight out as the guard
   interval while they are stored. The stored frame is then replayed. The result is
   20 (or 40) words in a short burst.
5. **Output FIFO** (`rate_out_fifo`). Popping starts after the first word is written.
   From then on, one word leaves every 14 (or 7) cycles. A marker bit travels with the
   first guard sample. Over 280 cycles, 20 × 14 = 40 × 7 = 280, so the output FIFO
   never runs dry once it has started.
6. **Receiver input** (`rx_gi_remove`). Samples are stored from the first marker on.
   * A frame is released only when all 20 (40) of its samples are stored.
   * It is then read in one burst: N/4 words are dropped and N words go to the FFT.
   * The FFT therefore runs at the clock rate, not at the sample rate.
7. **Equalizer, demodulators, serializer.** Bins 0..15 are collected. One cycle after
   bin 15, all 16 products are formed in parallel. In DMT the upper, mirrored half is
   ignored. The 56 decided bits are shifted into the output FIFO at one per clock, and
   leave at one per 5 cycles.

**Frame timing.** There is no timing or frequency synchronisation. The receiver learns
where a frame starts from the transmitter's frame marker, which has to travel with the
samples (`tx_frame_mark` → `rx_frame_mark`). A receiver for separate nodes would need a
synchroniser in its place.

## Fixed point

* **Sample format.** Every sample and symbol is a signed 9-bit word with 3 fraction
  bits (`DW = 9`, `FRAC = 3`). The 16-QAM levels ±1 and ±3 are therefore ±8 and ±24
  in integer form.
* **Rounding.** Wherever a value is made narrower, it is rounded convergently (ties go
  to even) and saturated. The helpers `rshift_conv` and `sat` in `ofdm_pkg` do this.
* **IFFT scaling.** The IFFT is **not** scaled. The transmitted power is N times the
  symbol power, which matches the link budget the word width was chosen for.
* **FFT scaling.** The receiver FFT is scaled by 1/N, so the demodulator sees the
  original levels.
* **Internal width.** Inside the transform the word grows by log2(N)+1 bits, plus 3
  guard fraction bits. Only the output is cast back to 9 bits. `ifft_sat` and
  `fft_sat` flag a clipped output word.
* **Clipping in OFDM.** A 14-carrier OFDM symbol can peak above the s5Q3 range. The
  all-zero first frame always does: all points are −3+3i, so its first sample clips.
  For random data at the default width, simulation shows no errors from this clipping
  on a clean channel.
* **Clipping in DMT.** DMT adds up twice as many carriers into a real signal, and s5Q3
  clips often enough to cause bit errors with no noise at all: about 1 in 800 bits in
  simulation. Build DMT with `DW = 10` (s6Q3). The DMT end-to-end test does this.

## FFT core

`fft_core` is a memory-based radix-2 decimation-in-time core.

* **Load.** Input words are written in bit-reversed order.
* **Compute.** log2(N) stages follow, with one butterfly per cycle: 32 cycles for
  N = 16 and 80 cycles for N = 32. The twiddle factors come from a 32-entry Q1.14
  cosine table folded from a quarter wave (`cos32`). The table index is
  `pos << (4 − stage)`, so one table serves both sizes.
* **Output.** Results leave in natural order with `out_idx` and `out_last`.
* **Latency.** From the last input word to the first output it is N/2·log2(N) + 2
  cycles.

The butterfly is a single combinational stage: a complex multiply, rounding and two
adds. It is correct, but it is not pipelined. It is the first place to add registers
if the core has to close timing at 250 MHz on an FPGA.

## Equalizer

`rx_equalizer` multiplies every bin by a coefficient `E(n) = 1/H(n)`. This is the
zero-forcing one-tap equalizer that the cyclic guard makes possible.

* The coefficients are inputs (`eq_coef_re/im`), in the same s5Q3 format as the data,
  so a later channel estimator can drive them.
* `eq_en = 0` passes the symbols through unchanged.
* For the second-order low-pass test channel h = [0.2119, 0.5761, 0.2119], H(n) is
  the N-point DFT of h. In DMT only bins 0..15 of the 32-point DFT are used. The
  end-to-end testbenches compute these coefficients.

## Link delay and bit-error monitor

`bit_error_monitor` delays the transmitted bits by `MON_DELAY` bit periods and XORs
them with the received bits. The XOR output is `diffsig`, meant for a scope pin. The
monitor also counts the compared bits and the errors (`ber_sent`, `ber_errors`;
`ber_clr` clears both).

The delay is set by the pipeline. It was measured in simulation with a direct
loopback: **159 bits in OFDM and 186 bits in DMT** (the defaults of `ofdm_top`). Any
change to FIFO thresholds, transform latency or the loopback path changes this number.
A wrong delay shows up as a bit error rate of about 50 %.

## Files

| file | what it is |
|---|---|
| `rtl/ofdm_pkg.sv` | constants, bin map, twiddle table, rounding/saturation, Gray levels |
| `rtl/ofdm_top.sv` | source + transmitter + receiver + monitor |
| `rtl/ofdm_tx.sv`, `rtl/ofdm_rx.sv` | transmitter and receiver chains |
| `rtl/lfsr_bitgen.sv` | 15-bit LFSR, x^15 + x + 1, one bit per 5 cycles |
| `rtl/tx_subc_alloc.sv` | input FIFO and frame FSM |
| `rtl/qam16_mod.sv`, `rtl/qam16_demod.sv` | Gray 16-QAM map and hard decision (thresholds 0, ±2) |
| `rtl/tx_frame_builder.sv` | modulators, unused-bin zeroing, serialiser, DMT mirror |
| `rtl/fft_core.sv` | FFT/IFFT, 16 or 32 points |
| `rtl/gi_insert.sv` | cyclic guard insertion |
| `rtl/rate_out_fifo.sv` | FIFO with push/pop FSM that restores a fixed word rate |
| `rtl/rx_gi_remove.sv` | receiver input FIFO and guard removal |
| `rtl/rx_equalizer.sv` | subcarrier gathering and zero-forcing equalizer |
| `rtl/rx_bit_serializer.sv` | 56 decided bits back to a serial stream |
| `rtl/bit_error_monitor.sv` | delayed XOR and error counters |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO used by the blocks above |
| `tb/fir_channel.sv` | behavioural FIR channel for the testbenches (not hardware) |
| `tb/ber_link.sv` | one link over a Gaussian-noise channel with its own error-ratio measurement (test helper) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two end-to-end tests and a bit-error-ratio test |

Generic synthesis of `ofdm_top` (OFDM, defaults) gives about 2700 cells, 940 flip-flop
bits and 6.6 kbit of memory. Most of the logic is the 16 parallel complex multipliers of
the equalizer.

## Simulating

All testbenches are self-checking. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops, and each has a cycle-count watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ofdm_pkg.sv tb/tb_ofdm_top.sv --top-module tb_ofdm_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_ofdm_top` with its name.

**End-to-end tests:**

* `tb_ofdm_top` runs the default OFDM build through three phases:
  1. a direct loopback, which must give no errors;
  2. the FIR channel with the equalizer off, which must give errors;
  3. the FIR channel with the equalizer on, which must give no errors again.

  It also checks the sample, frame and bit rates and the cyclic guard. It counts the
  zero frame, the data frames, simultaneous push/pop, dropped guard samples and
  equalized symbol sets.
* `tb_ofdm_top_dmt` runs the same phases in DMT mode with 10-bit samples.
* `tb_ofdm_ber` measures the bit error ratio over a noisy channel. It runs seven links
  side by side: OFDM and DMT, each with three sample words:
  * 9-bit s5Q3, the default;
  * 16-bit s8Q7;
  * 16-bit s12Q3.

  The seventh link is DMT with the 10-bit s6Q3 word.

  Each link is a `tb/ber_link.sv` instance, with its own `ofdm_top`, noise source and
  on-chip error counters. Each sends 209460 bits at 18 dB and again at 16 dB SNR.

  The noise is Gaussian and is added to every sample. It is complex for OFDM and real
  for DMT. Its power is set from a fixed nominal signal power, P_s = 224 (OFDM) or
  448 (DMT) in constellation units. The real mean sample power is 0.625 of that. The
  nominal value carries a factor of 2 and a guard-interval factor of 0.8 that the
  actual samples do not have. With this convention the
  error ratio of an ideal floating-point link is about 1.0e-3 at 18 dB and 6.5e-3 at
  16 dB.

  One run gave these ratios at 18 dB / 16 dB:

  | word | OFDM | DMT |
  |---|---|---|
  | s5Q3 (9 bit) | 1.06e-3 / 6.9e-3 | 1.11e-2 / 2.1e-2 |
  | s8Q7 (16 bit) | 0.99e-3 / 6.1e-3 | 0.88e-3 / 6.4e-3 |
  | s12Q3 (16 bit) | 1.11e-3 / 7.2e-3 | 1.20e-3 / 6.7e-3 |
  | s6Q3 (10 bit) | - | 1.22e-3 / 6.9e-3 |

  The 9-bit DMT link is ten times worse than the others. It clips: the 32-point
  transform needs one more integer bit. With 10 bits, DMT is back near the ideal
  link. That is why DMT should be built with `DW = 10` or more.

  Each ratio must lie within a factor of two of the reference measurement for its
  combination. The 10-bit DMT link has no reference measurement, so it is held
  against the ideal-link values. The test takes about half a minute in Verilator.

**Subsystem and unit tests:**

* `tb_ofdm_tx` decodes the transmitter output with a floating-point DFT.
* `tb_ofdm_rx` feeds the receiver frames that the testbench builds itself.
* The unit testbenches compare each block with a reference model written in the
  testbench.

## Where this design departs from, or goes beyond, the reference system

* **FFT.** The reference system used a vendor FFT block. This FFT is an own, simple,
  non-pipelined core. It gives the same function and word growth, but not
  bit-identical results.
* **Frame marker.** The frame marker from transmitter to receiver stands in for
  synchronisation, which the reference system does not have either.
* **Mode selection.** The mode is a build parameter (`DMT`), not a run-time switch.
* **Configurable parts.** The equalizer coefficients and enable are ports, not
  constants. The error ratio is left to software; the hardware provides the two
  counters.
* **Design choices.** FIFO depths, the sampling phase of the input bit, the start
  value of the LFSR (all ones) and the empty-FIFO behaviour (output 0 and flag
  `underflow`) are this design's own choices.
* **Not included.** The channel models (FIR low-pass and additive white Gaussian noise)
  are test equipment, not hardware. Both exist only as testbench models, in
  `tb/fir_channel.sv` and `tb/ber_link.sv`.
* **Left to the board.** The analogue front-end (DAC/ADC) and the pin assignments
  belong to the board.
* **Timing not verified.** Timing closure at 250 MHz on an FPGA has not been checked.
