# DCP-3 transceiver peripherals in SystemVerilog

A small software-defined radio board puts an 80 Msps ADC and DAC next to
an FPGA. The FPGA does the work a processor cannot do at RF sample rates:
it tunes, filters, sets the level, and modulates or demodulates. A
processor next to it controls all of this through 16-bit I/O ports. This
RTL implements those FPGA peripherals:

* the receive and transmit tuner: DDS, quadrature mixer, CIC and a
  programmable FIR;
* level control: noise blanker, AGC and RF compressor;
* the single-carrier modem (CORDIC) and its timing aids: early/late timing
  recovery, OFDM null detector and cyclic-prefix phase correlator;
* the error-control helpers: CRC-16/CRC-32, a BCH encoder/syndrome
  unit and a programmable convolutional encoder;
* the serial ports: flash SPI, low-speed DAC SPI, UART and an I²S audio
  codec port;
* the two coordinate converters that sit beside the OFDM FFT: polar to
  rectangular for the transmit (IFFT) input, rectangular to polar for the
  receive (FFT) output.

`dcp3_top` wires them to a CPU port bus and to the converter pins.

The processor itself is not part of the RTL. Its bus is a set of top-level
ports (`io_addr`, `io_wr`, `io_wdata`, `io_rd`, `io_rdata`), so a testbench
or another CPU core can drive it.

## Signal path

```
 ADC ─► mixer ─► CIC ×2 ─► noise ─► program- ─► AGC ─► RX FIFO ─► CPU (60/61)
  12b    ▲ ▲     (I, Q)    blanker  mable FIR
         │ └── DDS cos/sin (32-bit phase, 1024-entry table + interpolation)
 DAC ◄── mixer ◄─ CIC ×2 ◄─ TX FIFO ◄─ compressor ◄─ CPU (6A/6B)
  14b, offset binary

 CPU X/Y (40/41) ─► CORDIC ─► modem FIFO ─► CPU (40/41)
                      │ magnitude ─► null detector (RSSI, DCD, SOF)
                      └ phase[15:8] ─► phase correlator (sync), timing recovery

 FFT bin X/Y (16b) ─► rect-to-polar ─► 5-bit phase, 7-bit log magnitude
 4-bit phase/level ─► polar-to-rect ─► IFFT input X/Y (14b)
```

### One clock instead of two

The original circuit runs several blocks from a 160 MHz clock and
time-shares hardware between I and Q: one table read for cosine and the
next for sine, and one multiplier pass for I and the next for Q. Here
everything runs on one 80 MHz clock (`clk`) with synchronous, active-high
reset (`rst`), and I and Q get their own hardware:

* the DDS reads its table twice per clock;
* the FIR has two accumulators fed in the same cycle;
* the CIC is instantiated twice.

Lower-rate stages are driven by valid strobes (`rdo_valid`, `in_valid`,
`out_valid`), not by separate clocks. Each block's cycle behaviour is
stated at the top of its file.

## Tuner

**DDS (`dcp_dds`).** A 32-bit phase accumulator advances by the frequency
word every clock:

* the top 10 phase bits address a 1024 × 18 sine table;
* the next 18 bits (21:4) interpolate linearly between neighbouring
  entries;
* cosine is the same lookup with 90° added.

The table is computed when the design elaborates from
`sin(2πk/1024)·131071`. It uses an integer Taylor series in `dcp_pkg`, so
no data file is needed. Latency is 4 clocks.

**Mixer (`dcp_mixer`).**

* Receive: `rx = (adc·cos) >>> 11`, and the same with sin, in 18 bits.
* Transmit: `I·cos + Q·sin`, saturated to 14 bits. The DAC takes offset
  binary, so the sign bit is inverted.
* Three sticky conditions are reported: ADC over-range, mixer overflow
  and DAC saturation.

**CIC (`dcp_cic`).** A four-stage filter with ratio 10–640. The integrators
are 56 bits, the combs 28 bits.

* The gain of a CIC grows as R⁴ (decimation) or R³ (interpolation). It is
  set by a multiplier (0–1024 receive, 0–8 transmit) and a 0–15-bit left
  shift ahead of the integrators.
* For a decimation R, choose `frac/1024 · 2^exp ≈ 2^38 / R⁴` to keep the
  18-bit output near full scale.
* The same registers serve both directions. `xmt` selects interpolation:
  the combs run at the low rate, and the integrators run every clock on
  zero-stuffed input.

**Programmable FIR (`dcp_tuner_fir`).** The hardest block to drive. The
filter is a small program of 36-bit instructions:

```
 bit 35 E   end of program (one more instruction runs after it)
 bit 33 W   write the accumulator to the output, then clear it
 32:24      index: how many samples back from the newest
 23:0       signed coefficient, 1.0 = 2^23
```

Loading the program:

* Instructions are loaded 9 bits at a time, least significant group
  first, while `ld_rst` is high. `ld_rst` also holds the filter idle.
* `dec` sets how many new samples must arrive before the program runs
  again. This is how the filter decimates.
* A program can hold several W instructions. That gives several outputs
  per run, which is how it interpolates or produces polyphase outputs.

Running it:

* Each instruction multiplies `sample[base − index]` by its coefficient
  into a 42-bit accumulator for I and one for Q.
* Results are rounded to 18 bits and saturated, with `ovf` flagged.
* The first output appears 5 clocks after its W instruction is fetched.
* A program must finish before `dec` further samples arrive. The top's
  full-size test runs a 256-tap program between samples at ratio 640.

**Noise blanker (`dcp_noise_blanker`).** Compares the top 8 bits of |I| and
|Q| with a limit. A pair that exceeds it in either axis leaves as zero. The
flag travels with the pair through a 3-deep delay, so the pair it belongs
to is the one blanked.

## Level control

**AGC (`dcp_agc`).** Gain is the top 16 bits of a 24-bit accumulator,
read as a 4-bit exponent and a 12-bit mantissa:
`out = in · (1 + mant/4096) · 2^exp / 16`, saturated to 16 bits.

Each sample:

* compute the magnitude estimate `7/8·(max + min/2)` of the output;
* subtract the set point;
* shift the error by the *attack* amount (output too high) or the
  *release* amount (output too low) and add it to the accumulator.

Hang: while the output stays below the hang threshold and the hang timer
(in units of 256 samples) is running, the gain is frozen. The timer is
reloaded whenever the output is above the threshold. The accumulator is
clamped to the gain limit.

**Compressor (`dcp_compressor`).** The same magnitude estimate selects
one of 64 gain entries (4.4 fixed point). That gain multiplies I and Q
alike, so clipping does not depend on phase. The table is loaded by
shifting, highest-magnitude entry first, and resets to 1.0 (bypass).

## Modem and OFDM timing

**CORDIC (`dcp_cordic`).** An iterative engine with 22-bit internal
paths: 16 micro-rotations, one per clock, with 18 clocks from `start` to
`done`.

* First a coarse rotation brings the vector into the right half-plane,
  using the signs of x/y in vector mode or the top bits of z in rotate
  mode.
* At the end, x and y are multiplied by 0.60725, which removes the CORDIC
  gain.
* Angles are 16-bit, with 65536 = 360°.
* Vector mode gives magnitude and `z_in + atan2(y, x)`; rotate mode turns
  (x, y) by z.

**Modem datapath (inside `dcp3_top`).**

* Writing X then Y starts one operation, and the result enters a
  15-entry output FIFO read back as X/Y.
* Receive uses vector mode, giving magnitude and phase. In FM mode the
  phase is replaced by its difference from the phase 1–16 samples earlier.
* SSB receive and all transmit use rotate mode. Transmit turns magnitude
  and phase into I/Q; FM transmit integrates the Y input into the phase.
  SSB rotates by a 16-bit BFO phase accumulator that advances by the BFO
  frequency per sample.

**Timing recovery (`dcp_timing_recovery`).** For PSK/FSK symbol timing.
Per symbol:

* it takes the early, nominal and late samples;
* it accumulates |nominal − early| and |late − nominal| in two
  interleaved 10-bit accumulators;
* it averages each over 8 symbols with a 16-stage delay line.

The two outputs tell software which way to move the sampling point.

**Null detector (`dcp_null_detector`).** Computes a moving sum of the
magnitude over one symbol length (up to 512), from a 24-bit running sum
and a RAM delay line: RSSI = (sum now − sum one symbol ago) / 64.

* It tracks the largest RSSI. `ini` makes the current value the maximum.
* The threshold is max/4 (−12 dB) or max/2 (−6 dB, H bit).
* Below the threshold, each new minimum reloads a delay counter. When
  the counter runs out without a new minimum, `sof` pulses. That marks the
  end of the null symbol, `delay` samples later.

**Phase correlator (`dcp_phase_correlator`).** Finds OFDM symbol timing
from the cyclic prefix:

* A 1024 × 8 RAM delays the CORDIC phase by one FFT length.
* It accumulates |phase − delayed phase|, with 8-bit wrap-around, in 12
  bits.
* It sums that over the prefix length with a 64-stage shift register.
* The error is small only while the prefix lines up with the end of its
  symbol. The same minimum-tracking logic as the null detector then gives
  one `sync` pulse per symbol.

The "low error" limit is a quarter of the 12-bit range (1024). This needs
prefixes of roughly 17 samples or more: with shorter ones, the summed
error of unrelated random phases never exceeds the limit between symbols.

## FFT coordinate converters

In OFDM mode each subcarrier carries a phase and a level, so the
processor works in polar form while the FFT works in Cartesian form. Two
small converters sit between them. They are table based, because CORDIC
would cost more logic for so few output bits. The FFT engine and its
buffer memories are not part of this RTL, so in `dcp3_top` both sides of
each converter are top-level ports (`fft_*`, `ifft_*`).

**Polar to rectangular (`dcp_polar_to_rect`).** Input: a 4-bit phase
(22.5° steps) and a 4-bit level code. Two 16 × 6 tables give
31·cos and 31·sin of the phase.

* Level bit 0 adds half the table value (×1.5, about 3.5 dB).
* Level bits 3:1 drive a shifter. Code 0 outputs zero, which switches the
  subcarrier off. Codes 1–7 shift left by 1–7 places, 6 dB per step.
* The outputs are 14-bit X and Y, registered one clock after the input.

**Rectangular to polar (`dcp_rect_to_polar`).** Input: one 16-bit X/Y bin
per clock. Output: a 5-bit phase (11.25° steps) and a 7-bit log magnitude,
six clocks later.

1. *Normalization.* Four stages narrow both components together:
   16 → 12 → 8 → 6 → 5 bits. A stage keeps the low bits if both values
   already fit. Otherwise it keeps the high bits and adds the shift (4, 4,
   2 or 1) to a 4-bit exponent.
2. *Fold.* Absolute values are taken, with |−16| clipped to 15. In the
   second and fourth quadrants the two are swapped, which is a −90°
   rotation. This leaves an angle between 0° and 90°.
3. *Phase.* A 256 × 4 table maps the two 4-bit values to
   round(atan2 / 11.25°), 0–8. An adder then adds the quadrant offset
   (0, 8, 16 or 24), modulo 32.
4. *Magnitude.* A 64 × 3 table is addressed by the larger value and the
   top two bits of the smaller. It gives the fine part of 4·log2|v|. The
   adder adds 4 × exponent. The result is 4·log2(√(X²+Y²)) − 12, in
   1.5 dB steps: about 0 to 50 over the input range.

Both converters compute their tables at elaboration time from integer
arithmetic. No table files are needed.

The original description says the normalizing stages shift by 8, 4, 2
or 1. Its drawing, however, shows the widths 16, 12, 8, 6 and 5, which
means shifts of 4, 4, 2 and 1. This RTL follows the widths.

## Error control and serial ports

* **CRC (`dcp_crc`).**
  * Computes CRC-32 (Ethernet, 0xEDB88320 reflected) and CRC-16
    (HDLC/AX.25, 0x8408 reflected) in parallel, two bits per clock, LSB
    first: 4 clocks per byte, 8 per word.
  * Both start at all ones.
  * Software inverts the result: "123456789" gives CBF43926 / 906E.
* **Convolutional encoder (`dcp_conv_encoder`).**
  * Four 8-bit tap masks (8PSK, QPSK and BPSK bits of channel 0; BPSK of
    channel 1) select, from the current and up to 4 earlier data bits, the
    bits to exclusive-OR.
  * The three channel-0 bits form a phase index (180°, 90°, 45° weights),
    reported in natural and in Gray order together with a magnitude byte.
  * The names U1 S10 S11 U0 S00–S03 are read here as: U = current bit,
    Snk = bit n delayed k+1 writes.
* **BCH codec (`dcp_bch`).**
  * Up to 16 independent bit streams are coded at once. Bit j of each
    written word belongs to stream j, and one stream bit is processed per
    clock.
  * Each of the 3–8 stages keeps one state bit per stream. Taps G1–G7
    select where the feedback enters, which sets the generator g(x).
  * Transmit with ACC = 1: the stages accumulate data(x)·x^LEN mod g(x).
    With ACC = 0, each write moves the next parity bit of every stream
    into the parity word (port 50).
  * Receive with ACC = 1: data and parity words are divided by g(x). The
    syndrome of the stream selected by the width register reads at port
    51; it is zero for a valid codeword.
  * Writing ACC = 1 clears the stages for a new block.
* **SPI (`dcp_spi`).**
  * Mode 0, MSB first, SCK = clk/4 (20 Mbit/s): a byte takes 32 clocks, a
    16-bit DAC word 64.
  * Flash slave select is set and cleared by port writes. The DAC instance
    selects itself for each word.
* **UART (`dcp_uart`).**
  * 8N1 with 16× oversampling and a 16-bit divisor − 1.
  * 15-entry FIFOs each way; each received byte carries a framing-error
    bit.
* **I²S (`dcp_i2s`).**
  * Master for a 1- or 2-channel codec with 24-bit samples at 32 ksps:
    two slots of 25 bit clocks, 50 system clocks per bit, 2500 per frame.
    Each slot has one delay bit, then the data MSB first.
  * A sample is written low byte first (30 right, 32 left), then the upper
    16 bits (31, 33). The upper write queues the sample and zeroes the
    low byte.
  * Each slot sends the next queued sample if it is for that channel, and
    zeros otherwise. Software must therefore alternate left and right for
    a stereo codec.
  * Every received slot is queued with a Left flag. Read 30, then 31;
    reading 31 pops. Both FIFOs hold 15 samples.
* **FIFO (`dcp_fifo`).** Shared by the UART, the modem and the
  sample paths: 16 slots, 15 used, first-word fall-through.

## CPU port map

Addresses are hexadecimal; `dcp3_top.sv` lists every field.

| Port  | Write                                   | Read                         |
|-------|-----------------------------------------|------------------------------|
| 08    | flash SPI byte                          | received byte                |
| 0A/0B | slave select off / on                   |                              |
| 10–17 | encoder data, magnitude, 4 tap masks    | binary / Gray status words   |
| 20/21 | UART data / divisor − 1                 | {FE, byte} / TXE TXR RXF RXR |
| 38/39/3B | CRC byte / word / initialise         | CRC32 low / high, 3A CRC16   |
| 40/41 | modem X / Y (Y starts)                  | X / Y (reading Y pops)       |
| 30–33 | I²S R LSB, R MSW, L LSB, L MSW          | 30/31 RX LSB/MSW, 33 flags   |
| 50/51 | BCH data / {length − 1 [15:13], G7–G1 [9:3]} | parity word / syndrome  |
| 52/53 | BCH width − 1 / ACC [15]                |                              |
| 42    | {TRE, FM delay − 1, SSB, FM}            | RSSI                         |
| 43    |                                         | modem FIFO count, E, F       |
| 44    | {CP length − 1, log2 FFT size}          | correlator average           |
| 45    | {SOF delay, H, symbol length}           | maximum RSSI                 |
| 46/47 | BFO frequency / {INI, RST, XMT}         |                              |
| 58/59 | frequency LSW / MSW (MSW updates)       | overflow flags / status      |
| 5A/5B | CIC {exp, fraction} / {tx mult, ratio}  | 5A: DDS phase                |
| 5C–5F | blanker limit, FIR decimation, FIR load, FIR RST | |
| 60–62 |                                         | RX I, RX Q (pops), counts    |
| 63–66 | AGC, hang, gain limit, compressor table | 65 AGC gain, 66 table index  |
| 68    | low-speed DAC word                      |                              |
| 6A/6B | TX I, TX Q (pushes the pair)            |                              |

* Overflow flags (58) are sticky and are cleared by reading them.
* The status port 59 shows:
  * blanking, FIR busy, AGC hang;
  * CRC, SPI and DAC busy;
  * DCD, SOF seen and sync seen;
  * FIFO empty/full, CORDIC busy and BCH busy (bit 14).
* The software has to respect some timing:
  * wait 18 clocks after writing Y before the next Y write;
  * wait 32 clocks after an SPI byte;
  * wait 4 or 8 clocks after a CRC byte or word;
  * wait WIDTH clocks after a BCH data word.

## Where this design departs from the original

* **Clocking.** One 80 MHz clock with parallel I/Q hardware replaces the
  160 MHz time-shared circuits (DDS, FIR, CRC). Latencies therefore
  differ. The DDS gives a new pair every clock, 4 clocks after the phase;
  the original takes 8 cycles per output.
* **FIR accumulators.** Plain 42-bit accumulators; the original splits the
  carry chain into three 14-bit sections.
* **Chain structure.** There is one programmable FIR in the receive chain,
  not a first and a second FIR. The transmit path has no FIR and no
  resampler: CPU samples go through the compressor straight into the
  CIC. The receive path ends in a sample FIFO at ports 60–62, which is
  not in the original port list.
* **Serial multipliers.** The AGC uses one multiplier per channel, not
  serial shift-and-add multipliers.
* **Register fields.** Bit fields the original leaves open (CIC gain and
  ratio packing, correlator and null-detector configuration, status port
  59) are this design's own.
* **Null detector re-arming.** `ini` also clears a minimum search in
  progress, so start-up transients cannot cause a false SOF.

## Not included

These parts of the board are not in this RTL:

* the 16-bit CPU and its memory;
* the resampler and its timing DDS;
* the audio FIR coprocessor;
* the FFT buffer control (sample counter, cyclic-prefix skip, buffer
  swap) and the frequency-ordered buffer;
* the FFT engine itself (vendor IP);
* the Viterbi decoder;
* the Ethernet MAC.

The FM and SSB modem functions exist only inside `dcp3_top`. They are
covered by its end-to-end test, not by a unit test of their own.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from independent models in the testbench:

* direct convolution for the CIC and FIR;
* real-valued cos/sin/atan2/log2 for the DDS, the CORDIC and the
  coordinate converters;
* bit-serial reference CRCs;
* queue models for the FIFOs and the UART.

Where a cycle count is known, it is checked:

* SPI 32/64 clocks;
* CRC 4/8 clocks;
* CORDIC 18 clocks;
* DDS 4-clock latency;
* polar-to-rectangular 1 clock and rectangular-to-polar 6 clocks;
* UART bit time;
* BCH one clock per stream bit;
* I²S bit clock (50 clocks) and frame (2500 clocks).

Top-level tests:

* `tb_dcp3_top` drives the whole top through its port bus and pins. It
  exercises 17 mechanisms: CRC, encoder, flash SPI, DAC SPI, CORDIC
  vector and rotate modes, FM receive, null-symbol SOF, cyclic-prefix
  sync, receive chain, noise blanking, transmit chain, overflow flags,
  UART loop-back, the coordinate converters, BCH encode/syndrome and I²S
  loop-back. It counts the checks that pass per mechanism and fails if
  any mechanism never happened.
* `tb_dcp3_top_full` uses the default parameters at the extremes of the
  CIC range (ratios 10 and 640) with a 256-instruction FIR program.

Run one testbench with plain Verilator, for example:

```
verilator --binary -Wno-fatal --top-module tb_dcp_cic \
          rtl/dcp_pkg.sv rtl/dcp_cic.sv tb/tb_dcp_cic.sv && ./obj_dir/Vtb_dcp_cic
```

For the top-level tests, give the package first and then the other RTL
files once each:

```
verilator --binary -Wno-fatal --top-module tb_dcp3_top \
          rtl/dcp_pkg.sv $(ls rtl/*.sv | grep -v dcp_pkg) tb/tb_dcp3_top.sv \
          && ./obj_dir/Vtb_dcp3_top
```

Width warnings from the testbenches are expected; they are not errors.

Every module has parameter defaults taken from the original sizes: 32-bit
phase, 1024-entry table, 18-bit data, 24-bit coefficients, 512-entry FIR
memories, 56-bit CIC integrators, 1024 × 8 correlator RAM and 15-entry
FIFOs. Unit testbenches use those defaults unless their header says
otherwise.
