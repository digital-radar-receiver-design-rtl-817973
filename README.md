# Bandpass-sampling digital radar receiver

A radar returns a pulse on a 50 MHz intermediate frequency (IF). Instead of
mixing it down with analog parts, the receiver samples the IF directly at
40 MSPS. Because 50 MHz = 5/4 x 40 MHz, the signal folds down to
fs/4 = 10 MHz in the sampled data. At fs/4 a sine and a cosine take only the
values 1, 0, -1, 0, so the I/Q mixer needs no multipliers: each sample is
passed, zeroed or negated. A low-pass filter then decimates by eight,
leaving complex baseband at 5 MHz per channel.

This RTL contains two receivers built on that idea, plus a board watchdog:

| Part | Input | Output |
|---|---|---|
| Single-channel receiver (`rx1ch`) | one 14-bit parallel ADC at 40 MSPS, 80 MHz reference clock | I and Q words in turn on a 14-bit bus with a 10 MHz IQ clock and an IQ select line |
| Eight-channel receiver (`rx8ch`) | one 8-channel ADC with serial outputs (280 MHz DDR bit clock, frame line) | one 32-bit word per channel every 25 ns (160 MB/s) |
| Configuration watchdog (`watchdog`) | 32.768 kHz clock, disable and reload requests | PROM select, mode pins and PROG_B pulse for the FPGA |

`radar_rx_top` places all three side by side. They share no signals. Port
names are prefixed `r1_`, `r8_` and `wd_`.

## Signal path of one channel

1. **Capture.**
   - Single channel: the 80 MHz domain makes the 40 MHz ADC clock with a
     toggle register. It takes a sample on every second clock edge, half an
     ADC period after the clock it sent out.
   - Eight channels: `ddr_capture` samples each serial line on both edges of
     the bit clock. `deserializer` gathers 7 bit pairs into a 14-bit word,
     MSB first. A word starts when the frame line rises. The deserializer
     toggles a flag for each finished word.
2. **Clock crossing (eight channels only).** The toggle flag passes through
   a two flip-flop synchronizer (`sync2`) into the 160 MHz filter domain. An
   edge on it means the word register is stable, so it can be copied. The
   multi-bit word itself is never synchronized.
3. **Mixing (`iq_mixer`).** A 2-bit phase counter picks
   I = {x, 0, -x, 0} and Q = {0, x, 0, -x}. Negation is two's complement,
   saturated so that -8192 becomes +8191. With `iq_active` low the mixer
   passes x to both I and Q. This bypass is for receiving signals that are
   already at baseband.
4. **Decimating filter (`decim_filter`).**
   - A 128-tap low-pass that decimates by 8. It is built polyphase and
     transposed: each input sample meets only the 16 taps of its phase. That
     takes 16 multipliers, and each stream keeps 16 partial sums.
   - Several streams share one filter, one stream sample per clock:
     - single channel: 2 streams (I, Q) at 80 MHz;
     - eight channels: 4 streams (I0, Q0, I1, Q1) at 160 MHz.
   - Coefficients are 18 bits. `rx_pkg::lp_coef` computes them during
     elaboration as a Blackman-windowed sinc, with a stop band of about
     74 dB.
   - Set 0 has its cutoff at 2.5 MHz. Set 1 has its cutoff at 637 kHz,
     which matches a 1.57 us pulse. `filter_sel` chooses the set at run time.
   - In the eight-channel receiver the control processor can rewrite any
     tap through `coef_wr`, a struct of write enable, set, tap index and
     value. It writes one tap per filter clock, synchronous to the filter
     clock, and the change is seen by the next sample. To change a filter
     cleanly, load the set that is not selected, then switch `filter_sel`.
     Reset restores the built-in sets.
   - Results are rounded and saturated back to 14 bits. The DC gain is 1.
5. **Activity flag (`activity_detect`, eight channels only).** A channel
   counts as active while any of its last eight samples has a magnitude of
   at least 8 LSB. This shows whether an ADC input is connected and live.

## Eight-channel receiver

`chan_pair` holds two channels that share one filter. `rx8ch` has four of
them. `out_formatter` gathers the 16 filter results of one decimated instant
(8 channels x I, Q) into a bank, then sends one word per channel, channels 0
to 7, one every four filter clocks:

| Bits | 31 | 30..28 | 27..14 | 13..0 |
|---|---|---|---|---|
| Field | system trigger | channel | I | Q |

`bus_clk` is the filter clock divided by 4 (40 MHz). Data changes while
`bus_clk` is low. `bus_valid` marks the words.

The 32-bit `status` word has:

- bits 7..0: the activity flags;
- bit 8: mixing on;
- bit 9: filter set;
- bit 10: a sticky output overrun.

The control processor reads this word.

## Trigger path

The system trigger arrives asynchronously and can bounce.

- `trig_debounce` synchronizes it and follows the first change. It then
  ignores the input for a recovery time of 5 us: 400 clocks at 80 MHz, or
  800 at 160 MHz.
- `trig_delay` delays the result by 26 sample clocks, the pipeline delay of
  the data path, so that the trigger lines up with the samples it belongs to.
- The single-channel receiver sends the trigger on its own output pin.
- The eight-channel receiver puts it in bit 31 of every output word.

## Single-channel output interface

`iq_out_if` sends an I word and then a Q word for every decimated instant.
Each word lasts one 10 MHz period of `iq_clk` (8 clocks at 80 MHz).

- `iq_sel` is high for I.
- Data changes on the falling edge of `iq_clk`, so the host can sample on
  the rising edge.
- `otr_seen` latches the ADC out-of-range bit.
- `overrun` latches if results ever arrive faster than they can be sent.

## Configuration watchdog

The board holds two configuration PROMs, one parallel and one serial.
Software must disable the watchdog soon after the FPGA has loaded. If it does
not, the image is taken to be bad:

1. The watchdog switches the mode pins to the other PROM (`001` serial SPI,
   `010` parallel BPI).
2. It pulses PROG_B low so the FPGA loads again.

The timeout is 2^(timeout_sel+1) clocks, so it ranges from 2^1 to 2^32
clocks. A disable holds until the next reload. `fpga_prog_req` asks for a
reload from the current PROM.

## What is not here

These parts are bought in, analog, or software, so they are not in the RTL:

- the ADCs, clock conditioner and DCM;
- the embedded processor and its Ethernet command and TFTP software;
- the PHY, SDRAM, PROMs, fan controller and power supplies;
- the host computer.

The signals that software would drive are ports: `iq_active`, `filter_sel`,
`coef_wr`, `status`, `wd_disable` and `fpga_prog_req`. The coefficient write
port assumes the processor bus has already been brought into the filter
clock domain.

The single-channel receiver has a single coefficient set. To change it, you
rebuild the design with a different `FC`.

## Files

- `rtl/rx_pkg.sv`: widths, the output word type and the coefficient
  function.
- `rtl/*.sv`: one module per file. The files are named after the modules
  above.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/rx_ref_pkg.sv`: a bit-exact software reference for the mixer and the
  filter.
- `tb/adc_serial_model.sv`: a model of the serial ADC output.
- `tb/rx8_monitor.sv`: checks eight-channel output words against the
  reference.
- `tb/tb_radar_rx_top.sv`: runs the top at full size with the real clock
  rates: 280/160 MHz and 80 MHz plus the watchdog.
  - It checks every output word of both receivers.
  - It counts each mechanism: mixing, bypass, run-time coefficient loading,
    both coefficient sets, both triggers, the out-of-range flag, activity flags, and watchdog timeout,
    PROM switch, disable and reload.
  - It fails if any of these never happened.

Testbenches run with Verilator (`--binary --timing --assert`).

## Limits and departures

Resources:

- The single-channel filter uses 16 multipliers. The Spartan-3E XC3S250E
  meant for that board has only 12. Folding the symmetric coefficients would
  halve the count, but that structure is not built.
- The eight-channel design uses 64 multipliers (4 filters x 16). That is
  about half of the 126 DSP slices of an XC3SD3400A.

Departures from the original receivers:

- The original coefficient values are not known. The built-in sets are
  windowed sincs with the right cutoffs and stop-band depth, but their
  transition band is wider than a minimal 2.5 MHz / 20 MHz design would
  need.
- The eight-channel trigger path reuses the single-channel de-bounce and
  26-sample alignment. The alignment delay is a parameter, not derived from
  this RTL's own latency.
- Each channel pair starts the filter only when the words of both channels
  of a frame have arrived.
- The deserializer takes the frame line high for the first half of a word
  and the data MSB first.
- The watchdog was board logic. Here it is written as RTL with the same
  behaviour.

This design's own choices: output rounding, the bus handshake, the status
bits, the IQ interface's word order and select polarity, the watchdog's
timeout selection, and the coefficient write port.
