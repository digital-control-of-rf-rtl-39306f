# Digital control loop for a three-tap analog RF self-interference canceller

A full-duplex radio transmits and receives on the same frequency at the same
time, so its own transmit signal leaks into the receiver far above the
wanted signal. An analog canceller removes most of that leakage before the
receiver: it taps three delayed copies of the transmit signal, scales and
rotates each one with a vector modulator, and adds the sum, inverted, to the
received signal. What is left over (the *feedback*, or error) depends on how
well the six vector-modulator control voltages (I and Q per tap) match the
leakage channel, and that channel moves whenever something near the antenna
moves.

This RTL is the digital controller that keeps those six voltages right. It
samples the baseband I/Q of the three taps and of the feedback with an
8-channel 12-bit ADC, runs a least-mean-squares (LMS) update per tap,

    w_n  <-  w_n + mu_n * conj(x_n) * e

and writes the six weights to an 8-channel 16-bit DAC over SPI, about
247 000 times a second. A soft processor beside it (not part of this RTL)
switches taps between automatic and manual control, sets step sizes and
manual voltages, and reads debug captures, all through a custom-instruction
port.

The published design this follows was built on a Cyclone V FPGA with an
ADS5295-type ADC and an AD5676-type DAC; the RTL here is vendor-neutral
SystemVerilog (no megafunctions, PLLs or I/O primitives).

## Signal path

```
 lvds_data[8] --> ddr_in --> deserializer --> offset_remove --+--> lms_tap x3 --> offset_binary x6 --> spi_master --> DAC pins
 (sclk, 240 MHz)  (sclk)     (sclk -> pclk)   (pclk, 40 MHz)  |    (x = ch 2n,2n+1,                    (162-cycle
                                                              |     e = ch 6,7)                          update loop)
                                                              |                                               |
                                          raw frames -> ADC capture FIFO (128)     DAC words -> DAC capture FIFO (65536)
                                                                                                              |
                         ci_regs (custom instructions) <-- settings, strobes, read-backs for all of the above
```

`fdc_top` wires these together. Its ports are the two clocks, the reset,
the eight serial data lines, the custom-instruction port and the five DAC
pins.

| ADC channel | carries | DAC channel (address) | carries |
|---|---|---|---|
| 0, 1 | tap 1 I, Q | 6, 7 | tap 1 I, Q |
| 2, 3 | tap 2 I, Q | 5, 4 | tap 2 I, Q |
| 4, 5 | tap 3 I, Q | 3, 2 | tap 3 I, Q |
| 6, 7 | feedback I, Q | | |

The DAC address map is the published one; the ADC channel assignment is
this implementation's choice (`FB_I_CH`, `FB_Q_CH` and the `2n`, `2n+1`
wiring in `fdc_top`).

## Receiving the serial ADC data (the part that needs care)

Each ADC channel arrives on one differential line: 12 bits per sample, MSB
first, 40 Msample/s, so 480 Mbit/s per line. The bits are sent double data
rate against a 240 MHz bit clock. Only a frame clock comes from the ADC; a
PLL outside this RTL makes the bit clock `sclk` and the system clock `pclk`
(40 MHz) from it, and its lock signal is the design's reset `rst_n`.

**`ddr_in`** captures two bits per line per bit-clock period. The first bit
of each pair is sampled on the falling edge of `sclk` and moved across to the
rising edge by a second register (`ddr_low`); the second bit is sampled on
the rising edge directly (`ddr_high`). Both outputs therefore change
together on the rising edge.

**`deserializer`** shifts each channel's 12-bit register left by two on every
rising `sclk` edge, with `ddr_low` entering above `ddr_high`. After six edges
the register holds a whole frame, first bit in the MSB, and `pclk` copies all
eight registers out at once.

This only works with the clocks placed as follows (`T` = one bit-clock
period, frame starting at `t0`):

- `sclk` rises at `t0 - T/4`, so its falling edge at `t0 + T/4` is in the
  middle of the first bit and its rising edge at `t0 + 3T/4` in the middle
  of the second;
- the pair (bits 10, 11) is in the shift register after the rising edge at
  `t0 + 6T + 3T/4`, i.e. one edge after the frame ends;
- `pclk` must rise on the next `sclk` rising edge, `t0 + 7T + 3T/4`, the
  first one after the frame is complete. On that edge the shift register
  starts taking in the next frame while `pclk` copies the complete one,
  and the path from shift register to output register has a full
  bit-clock period.

Getting the PLL phase wrong shifts every sample by two bits, and the LMS loop
then sees garbage. The ADC model in `tb/adc_lvds_model.sv` generates the
clocks and data with exactly these phases and is the reference for them. The
output `raw` lags the frame on the line by one `pclk` period.

## Offset removal

The converter's offset (up to about ±20 mV) biases the LMS correlation, so
**`offset_remove`** estimates each channel's DC level as the mean of 2^16
consecutive samples (1.6 ms), then subtracts it from every sample. The
estimate is made once after reset and again on request (instruction 60),
and held in between; until the first estimate exists the offset is zero.
The subtraction saturates to 12 bits and is registered. The top holds the
estimator in restart for the first 7 cycles after reset, so the reset
values still in the receiver registers are not averaged in.

## The LMS tap

**`lms_tap`** is one tap's weight update, built from four small blocks:

1. **`complex_conj`** negates the Q part of the tap sample. Negating the
   most negative value (-2048) would wrap back to -2048, so that value is
   bit-inverted instead, giving +2047 (off by one LSB). `clipped` flags it.
2. **`complex_mult`** forms `conj(x) * e` from four 12x12 products and two
   adders: 24-bit products, 25-bit sums, one register (latency 1 cycle).
3. **`step_shift`** applies the step size `mu = 2^-n`, n = 0..16, as an
   arithmetic right shift of each 25-bit product. A shift of 16 (or more)
   gives exactly 0, which freezes the weight; on 25-bit data a plain shift
   by 16 would not, so this is forced.
4. **`sat_accumulator`** adds the shifted product to a 25-bit sum on the one
   cycle per DAC update when `acc_en` is high. If the two operands have the
   same sign and the sum the other one, the sum is set to the maximum of
   that sign instead of wrapping (a wrapped weight would turn the cancelling
   signal by 180 degrees). The weight is the top 16 bits of the sum.
   `clear` (the tap is under manual control) empties the sum, so automatic
   control always starts from the vector modulator's null point.

Written out, with x = xI + j xQ and e = eI + j eQ,

    wI += mu (xI eI + xQ eQ)
    wQ += mu (xI eQ - xQ eI)

The loop gain is set by the step shift and by the analog gain of the
feedback chain: the feedback shrinks as cancellation improves, so the steps
shrink with it. With no automatic gain control, convergence slows down as
cancellation grows, which is expected behaviour, not a fault.

**`offset_binary`** converts each 16-bit two's-complement weight to the
DAC's offset-binary code by inverting the MSB: weight -32768..32767 becomes
code 0..65535, and weight 0 becomes mid-scale (1.5 V on a 0-3 V output,
the vector modulator's null).

## Writing the DAC: `spi_master`

The DAC takes 24-bit frames, MSB first, sampled on falling SCLK edges while
SYNC_N is low: command `0001` (write input register), 4-bit address, 16-bit
code. A low pulse on LDAC_N moves all input registers to the outputs at
once. SCLK is the 40 MHz system clock itself.

States (`spi_state_t`):

| state | cycles | does |
|---|---|---|
| SAMPLE | 1 | latch the six words (from the taps, or the manual words for a tap under manual control); pulse LDAC_N low so the words written during the previous round appear on all outputs together |
| PREPARE | 1 | build the frame of the current channel |
| SEND | 25 | SYNC_N low, 24 bits out, then SYNC_N high |
| SWITCH | 1 | next channel, back to PREPARE; after the sixth channel, to SAMPLE |
| HALT | - | entered from SAMPLE while `halt_en` is set; SCLK stopped, no updates |

SYNC_N is high for 3 cycles between frames. One update is 6 x 27 = 162
cycles = 4.05 µs, so the DAC outputs change at 247 kHz. The accumulators must
not run faster than the weights can be applied, so `acc_en` pulses once per
update, at bit 10 of the last channel, by which time the glitch from the
previous LDAC has settled (the DAC glitch lasts about 1 µs). The effective
loop update rate is therefore 247 kHz although samples arrive at 40 MHz:
the accumulator takes one sample per update, not an average.

`da_value_out` shows the six words of the update in progress; this is what
the DAC capture FIFO records.

## Processor interface: `ci_regs`

The processor issues custom instructions: an 8-bit number `n` and a 32-bit
operand `dataa`, taken on a cycle with `clk_en` and `start` high; the result
is registered and `done` is high on the next cycle.

| n | operation |
|---|---|
| 40 | all taps automatic (`manual_control` = 000) |
| 41 | all taps manual (`manual_control` = 111) |
| 42 | `manual_control` = `dataa[2:0]` (bit t = tap t+1) |
| 43 | step shift of tap `dataa[9:8]` = `dataa[4:0]` (0..16; 16 freezes) |
| 44 | manual word of DAC word `dataa[18:16]` (0..5 in the order tap1 I, tap1 Q, ... tap3 Q) = `dataa[15:0]` (offset binary) |
| 45 | halt = `dataa[0]` |
| 46 | read the word now being written for word `dataa[2:0]` |
| 60 | restart the offset estimate |
| 61 | read `{valid, 19'b0, offset}` of ADC channel `dataa[2:0]` |
| 62 / 65 | flush the ADC / DAC capture FIFO |
| 63 / 66 | read ADC channel / DAC word `dataa[2:0]` of the oldest ADC / DAC FIFO entry; `dataa[31]` = 1 also removes the entry |
| 64 / 67 | ADC / DAC FIFO fill level |
| 68 | status word (below); clears its sticky bits |

Numbers 40 and 65 follow the published software; the others are this
design's own. Operand bits no instruction uses are ignored. After reset all
taps are manual with mid-scale words (the DAC's own power-up state), every
step shift is 0 (mu = 1) and the loop is not halted.

The published software switches to automatic control by issuing 65 and then
40: the DAC FIFO then records the convergence from its very first update.

Status word: `[2:0]` SPI state, `[5:3]` conjugation clipped per tap (live),
`[8:6]` accumulator saturated per tap (live), `[9]` offset estimate valid,
`[12:10]` ADC FIFO full / empty / capturing, `[15:13]` the same for the DAC
FIFO, `[18:16]` conjugation clipped and `[21:19]` accumulator saturated per
tap since the previous status read.

## Capture FIFOs: `capture_fifo`

Two instances of one buffer that starts capturing when it is empty and
stops when it is full, so that a flush starts a fresh, gap-free record:

- ADC: 128 raw frames (all 8 channels, 96 bits), one per cycle = 3.2 µs.
- DAC: 65536 sets of six words (96 bits), one per update = 265 ms, enough
  to watch a whole convergence.

The DAC buffer is 6.3 Mbit of memory; it is written as a plain array and
maps to block RAM.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `OFFSET_LOG2_N` | 16 | log2 of the samples averaged per offset estimate |
| `ADC_FIFO_DEPTH` | 128 | ADC capture entries |
| `DAC_FIFO_DEPTH` | 65536 | DAC capture entries |

Widths and counts (12-bit samples, 8 channels, 3 taps, 25-bit products and
sums, 16-bit words, DAC addresses, instruction numbers) are in `fdc_pkg`.
The building blocks have their own width parameters.

## Where this departs from the published design

Followed as published: the DDR receiver and shift-register structure and
bit order, the clock alignment, the 2^16-sample offset mean, the
conjugation with negative-maximum protection, 12x12 -> 25-bit complex
multiply with one cycle of latency, shift-based step size 0..16, 25-bit
saturating accumulators truncated to 16 bits and cleared under manual
control, MSB-inversion to offset binary, the SPI state machine with its
frame format, address map, 3-cycle SYNC_N gap, 162-cycle update and
accumulator enable at bit 10 of the last channel, instructions 40 and 65,
and the capture buffer sizes and start/stop rule.

Own choices or changes:

- The complex multiplier is plain multiply/add logic instead of a vendor
  megafunction; the DDR input registers are plain flip-flops instead of a
  vendor DDR primitive.
- SCLK is gated by the HALT state (re-timed on the falling clock edge)
  rather than directly by the halt input, so a halt request in the middle of
  a frame cannot cut that frame short; LDAC_N stays high while halted.
- A step shift of 16 is forced to give zero on the 25-bit product (the
  published description states the zero result for 16-bit data).
- The offset estimate is one-shot with explicit restart; the offset is zero
  before the first estimate; the corrected sample saturates; the first 7
  samples after reset are skipped.
- ADC channel assignment, all instruction numbers except 40 and 65, operand
  layouts, reset state of the settings, status word and sticky event bits.

Not included: the soft processor and its UART command interpreter, the PLL,
LVDS pad buffers, the ADC, the DAC and the analog canceller itself.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<block>.sv`) that
prints `TB_RESULT checks=N failures=M`. Most compare against an independent
model over random and extreme inputs; `tb_spi_master` decodes the SPI pins
with a DAC model and checks the 162-cycle update period, the six frames and
addresses, the 3-cycle SYNC_N gap, one `acc_en` per update and halt.

The end-to-end tests drive `fdc_top` through its pins only
(`tb/fdc_harness.sv`). An ADC model serialises frames with the clock
phases above; a DAC model decodes the SPI frames; between them a numerical
model of the canceller closes the loop: the taps carry a tone with a
different phase per tap plus a DC offset per channel, each tap is scaled by
`(code - 32768) / 32768` from its two DAC words, and the feedback is
`1.5 * sum_n (h_n - g_n) x_n` for fixed channel coefficients `h_n`. The
sequence checks, and counts as mechanisms, the offset estimate against the
injected offsets; a manual word reaching the DAC; the switch to automatic
control with 65 + 40; at least 20 dB of convergence; the DAC capture
holding consecutive updates (and stopping when full); halt (no SCLK edges,
no LDAC pulses); step shift 16 freezing the weights; accumulator saturation
under a leakage too large to cancel, then re-convergence; the protected
conjugation under a full-scale tap sample; the ADC capture holding
consecutive raw frames; return to manual control; and offset re-estimation
after the offset moves. A mechanism that never happens is a failure.

- `tb_fdc_top`: offset over 2^8 samples, 16-entry ADC and 32-entry DAC
  FIFOs, so both FIFOs fill. About 100 000 frames; well under a second.
- `tb_fdc_top_full`: every parameter at its default (2^16-sample offset,
  128 and 65536 entries). About 170 000 frames; a few seconds.

- `tb_fdc_workloads`: default sizes, wideband leakage. The transmit
  signal is 16 tones spread over 20, 40 or 80 MHz; the taps see it through
  0, 1 and 2 ns delays, the leakage through two paths at 0.4 and 1.7 ns.
  Because three fixed delays cannot match the leakage exactly, the residual
  grows with bandwidth: in this model the loop cancels 32.5, 27.3 and 25.0 dB
  at 20, 40 and 80 MHz (the 80 MHz case is aliased by the 40 MHz sampling,
  identically on taps and feedback, and still converges). The test also
  checks that every update takes 162 cycles. About 10 seconds.

In the single-tone loop model the residual power drops by about 66-74 dB from the
uncancelled level at step shift 0. These figures show that the arithmetic and
the control loop are right. They say nothing about real RF cancellation,
which is limited by the analog parts.

Running a test with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fdc_pkg.sv tb/tb_fdc_top_full.sv --top-module tb_fdc_top_full -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The testbenches use only
two-state values and `$urandom`.
