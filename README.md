# UHF RFID reader logic with sub-symbol synchronisation

This is the FPGA logic of a software-defined EPC Class-1 Gen-2 (ISO 18000-63)
RFID interrogator. It is built for a board with a 100 MS/s dual ADC, a dual
DAC, a 1 MB SRAM and a soft processor. The processor runs the protocol. The
logic does what is too fast for software:

* it turns a command bit string into a shaped PIE (pulse-interval encoding)
  baseband for the DAC;
* it demodulates and decodes the tag's backscattered Miller-coded reply
  straight from the 100 MS/s samples, with no down-sampling.

The receiver's main idea: it does not look for whole symbols. It
correlates the signal with one subcarrier half period. This gives a
magnitude peak at every subcarrier edge where the phase stays the same, and
a dip where the tag inverts the phase. The decoder reads the bits from the
spacing between those dips. Every edge is reported with a 10 ns time stamp
and its phase. These sub-symbol time stamps are what a localisation unit
needs, and they keep the decoder locked to the tag's clock, which may be off
by several to tens of percent.

Everything runs on one 100 MHz clock.

## Block structure

```
rfid_reader_top
├── clk_reset           clock-chip start-up over SPI, self reset, SPI hand-over
├── adc_dac_interface   converter registers, DAC offset compensation
└── rfiduhf             processor-visible user logic
    ├── rfiduhf_regs    14 configuration/status registers
    ├── dp_bram         bram_tx (command bits), bram_rx (reply bits), 2 kB each
    ├── rfidtx          transmit chain
    │   ├── pie_encoder PIE state machine at 2 MHz (0.5 µs ticks) + epc_crc
    │   ├── fir_filter  51-tap reloadable pulse-shaping FIR at 2 MS/s
    │   └── cic_interp  3-stage CIC, ×50 to 100 MS/s
    └── rfidrx          receive chain
        ├── rx_debug    SRAM record/playback between the ADC and the correlator
        ├── correlator  recursive half-period correlator, I and Q
        ├── cordic      magnitude and phase of the correlation
        └── rx_decoder  preamble sync, BLF and threshold estimation, Miller decoding
```

`rfid_pkg` holds the shared types (the register-map offsets, the config
structs, the enums) and the CRC functions. `divider` is a serial divider
used by the decoder.

The following are not in the RTL. Their signals are ports of
`rfid_reader_top`:

* the processor and its bus attachment, reached through a simple host bus
  (`h_req/h_we/h_sel/h_addr/h_wdata → h_rdata/h_ack`);
* the interrupt controller, reached through the `irq_*` pulses;
* the FPGA clock manager: `clk` is its 100 MHz output, and
  `dcm_adc_locked/reset` are its status and reset;
* the clock chip, ADC, DAC and SRAM.

## Processor interface

`h_sel` picks one of four regions. `h_addr` is a byte address inside the
region.

| h_sel | region | size |
|---|---|---|
| 0 | registers | 0x00–0x34 |
| 1 | bram_tx | 512 × 32 bit |
| 2 | bram_rx | 512 × 32 bit |
| 3 | debug SRAM | 256 k × 32 bit |

Every request gets exactly one `h_ack`:

* registers and block RAMs answer on the next clock;
* the SRAM answers after its read latency;
* SRAM accesses only work while the debug unit is idle. Otherwise the
  access is acknowledged with data 0.

Register map (bit 0 = LSB):

| off | name | fields |
|---|---|---|
| 00 | adc_dcm | 7:0 version, 30 dcm locked, 31 dcm reset (pulse) |
| 04 | txconf1 | 8 busy_tx, 9 start_tx, 10 modulation (0 DSB, 1 PR-ASK), 11 carrier on, 13:12 crc, 15:14 preamble, 29:16 length |
| 08 | txconf2 | 15:0 Tone, 31:16 Tari (0.5 µs ticks) |
| 0C | txconf3 | 15:0 TRcal, 31:16 RTcal |
| 10 | txconf4 | 15:0 txpwr (FIR input level), 31:16 PW |
| 14 | txconf5 | 15:0 DAC B offset, 31:16 DAC A offset |
| 18 | coefrld | 15:0 next coefficient, 16 write, 17 load start |
| 1C | rxdebug_conf | 1 waiting, 2 busy, 3 trigger, 4 reset, 5 start, 7:6 mode, 11:8 trigger mask, 31:16 clock divider |
| 20 | rxdebug_counter | 17:0 last written address |
| 24 | rxdebug_default | 17:4 I default, 31:18 Q default |
| 28 | rxconf1 | 1 reset_rx, 2 start_rx, 3 TRext, 5:4 M (1,2,3 = 2,4,8), 31:6 threshold |
| 2C | rxconf2 | 15:0 a (half BLF period in samples), 31:16 BLF period |
| 30 | rxconf3 | 5 busy_rx, 31:6 average peak magnitude |
| 34 | rxconf4 | 15:0 bits read, 31:16 measured BLF period × 1 sample |

How the control bits behave:

* Start, reset, trigger and coefficient bits clear themselves. They give
  one-clock pulses.
* `start_tx` reads back as 1 until the transmitter reports busy.
* The crc field: 0 automatic, 1 CRC-5, 2 CRC-16, 3 none.
* The preamble field: 0 and 1 automatic, 2 frame-sync, 3 preamble.
* In automatic mode the first command bits pick both:
  * Query (`1000`) gets the preamble and CRC-5;
  * Select and the access commands (`11…`) get frame-sync and CRC-16;
  * QueryRep, ACK, QueryAdjust and NAK get frame-sync and no CRC.

## Transmit chain

**PIE state machine** (`pie_encoder`) runs on a 2 MHz clock enable, so every
timing value is a count of 0.5 µs ticks. It reads `length` bits from
bram_tx, MSB of word 0 first, and outputs a level: `txpwr` when high, 0
during a low pulse of width `PW`.

A frame is:

1. delimiter, 12.5 µs low;
2. data-0;
3. RTcal;
4. TRcal, only with a preamble;
5. the bits: data-0 = Tari, data-1 = Tone;
6. the CRC, when one is appended.

Each symbol ends with the PW low pulse. The CRC is computed while the bits
go out (`epc_crc`). For PR-ASK the sign of the level flips at every symbol.

Carrier control:

* Setting the carrier bit turns the carrier on. The first frame then waits
  1500 µs after carrier on.
* Clearing the bit turns the carrier off. It stays off for at least 1 ms
  before it can come on again.
* `busy_tx` covers the settle wait and the frame. `tx_done` is its falling
  edge.

**FIR** (`fir_filter`) has 51 taps. Two multiply-accumulators share the
taps over the 50 clocks of one 2 MS/s sample. The coefficients reset to a
triangle, 662·(26−|k−25|), which sums to 447 512.

The processor can reload the coefficients:

1. write `coefrld` with bit 17 set;
2. write 51 coefficients, each with bit 16 set.

The output is the full sum shifted right by 16 and saturated to 16 bits.
So a `txpwr` of 2^31 / Σc gives full scale, which is 4798 for the default
set.

The default triangle spans ±13 µs. That is long compared with short PIE
pulses: with Tari 12.5 µs and PW 6 µs the dips stay above half the carrier.
Load a shorter filter for short Tari (see *Limits*).

**CIC** (`cic_interp`) does 3 stages of ×50 interpolation with
differential delay 1. Its gain of 50² is divided out with a fixed-point
multiply, so a constant input gives the same constant out. The symmetric
default filter delays by 25 samples (12.5 µs). The logic adds 27 clocks in
the FIR and 5 in the CIC.

## Receive chain

### Correlator

The tag reply is a subcarrier at the backscatter link frequency (BLF). It
is set by TRcal and DR, and the tag may miss it by a large tolerance.

Take a = ⌈f_s / 2·BLF⌉, one half period in samples (a = 1000 at 50 kHz,
a = 79 at 640 kHz). The kernel is one half period of +1 followed by one
half period of −1. Correlating with it gives the recursion

    C[m] = C[m−1] + 2·x[m−a] − x[m−2a] − x[m]

This is three adds per sample per channel. Two block-RAM delay lines of
`a` samples each give x[m−a] and x[m−2a].

After `restart` (which must follow every change of `a`):

* the sum starts at zero;
* the x[m−2a] and x[m−a] terms are switched on only when the delay lines
  have filled;
* the output is flagged valid (`warm`) after 2a samples.

A constant offset in x cancels exactly. This matters because the carrier's
self-interference puts a large DC offset on the baseband, and it needs no
removal.

|C| is largest where the subcarrier changes level, once every half period.
It is small where the tag inverted the phase, because the two halves of
the kernel then see the same level.

### CORDIC

A 16-stage pipelined vectoring CORDIC turns (C_I, C_Q) into magnitude and
angle:

* the magnitude is gain-corrected to about |C|;
* the angle is 16-bit full-circle.

Since the I and Q correlations have the same shape, the magnitude does not
depend on the carrier phase. The angle is the phase of the backscatter
vector.

### Decoder (`rx_decoder`)

This is the heart of the design. Its inputs are the stream of magnitudes
`mag[m]`, one per sample, and the configuration: M, TRext, threshold and a.

**1. Start and threshold.**

* `start_rx` restarts the correlator (`corr_restart`).
* The decoder waits until the correlator is warm.
* It then waits for a magnitude above `threshold`, the first subcarrier
  edge of the reply. This raises `thr_hit` (a debug trigger and the
  `irq_rx_start` pulse).
* The threshold only has to sit above the noise. Half the expected peak is
  a good choice.

**2. Preamble: BLF and decision level.** Every Miller reply starts with a
pilot of unmodulated subcarrier: 4·M half periods, or 16·M with TRext. Its
magnitude is a train of equal peaks, one every a samples.

* The decoder finds NAVG = 4M (or 16M) peaks. Each peak is the maximum in a
  window around where it is expected.
* It sums their heights and keeps the time of the first and the last peak.
* From these it gets:
  * the average peak P, reported in rxconf3. P/2 becomes the decision
    level, so the unknown tag signal strength drops out;
  * the measured BLF period, 2·(t_last − t_first)/(NAVG−1), computed by the
    serial divider, rounded, and reported in rxconf4;
  * the tracking step â, half of that period. From here on the decoder uses
    â instead of the configured a, so a tag that is off frequency is
    followed.

**3. Edge tracking.**

* Each expected edge is searched in a window of ±â/8 around
  `last_peak + â`.
* The maximum in the window becomes the new `last_peak`. Every edge
  therefore re-times the grid, and drift over a long reply does not build
  up.
* If the maximum is at least P/2 the edge is a normal subcarrier edge. It
  is reported on `edge_valid` with its time (samples since start) and
  CORDIC angle.
* If it is below P/2 it is a phase inversion. The grid still advances by
  â.

The window is narrow on purpose. The correlation peak is a triangle of
base 2a, and its flanks reach P/2 at ±a/2. A wide window near an inversion
would pick up the flank of the neighbouring peak and miss the inversion.
When the tag is off frequency, the kernel (which is still the configured a)
no longer matches the true half period. The peak then moves by a few
samples, which ±â/8 still allows.

**4. Finding the first bit.** The pilot is followed by the Miller preamble
bits 0 1 0 1 1 1.

* The first inversion after the pilot is in the middle of the first '1'.
* From there the decoder counts boundaries: the number of half-period
  boundaries between two inversions gives the bits.
* Bits 0 and 1 of the preamble are written out first. The preamble
  therefore shows up as the first six bits of bram_rx, and the tag data
  follow.

**5. Miller decoding from inversion spacing.** In Miller-M code:

* a '1' has an inversion in the middle of the bit;
* between two '0's there is an inversion at the bit boundary;
* a bit lasts 2M half periods.

The distance d from one inversion to the next, in half periods, is then
fully decided by the last decoded bit:

| last bit | d = 2M | d = 3M | d = 4M |
|---|---|---|---|
| 1 | 1 | 0 0 | 0 1 |
| 0 | 0 | 1 | — |

Any other distance, or no inversion for more than 4M half periods, ends the
reply. The end-of-signalling dummy '1' is the last bit written.

**6. Output.**

* Bits go out on `bit_valid/bit_value`.
* They are packed MSB-first into 32-bit words of bram_rx.
* They are counted in `bits_read`.
* `done` (`irq_rx_done`) marks the end of the reply.
* A 16-bit RN16 is therefore word 0 bits 25:10, after the six preamble bits.

Limits of this scheme:

* The decision level is set once, from the pilot. A reply whose strength
  changes much while it runs is not followed.
* The reply has to start with the pilot; replies without one are not
  supported.
* Two inversions closer than 2M half periods cannot occur in valid Miller
  code. They end the reply.

### Debug recorder (`rx_debug`)

This unit sits between the ADC and the correlator. It uses the 256 k-word
SRAM. Modes (rxdebug_conf 7:6):

* **0, continuous record.** A ring buffer. It stops at a trigger, and
  `countervalue` holds the last written address.
* **1, continuous playback.** It loops until the unit is reset.
* **2, single record.** It waits for a trigger, then fills the memory once.
* **3, single playback.** It waits for a trigger, then plays the memory
  once.

While a playback waits for its trigger, the default I/Q value is sent. When
idle, the live ADC data pass through.

A clock divider (1–65535) holds each sample for `clk_div` clocks. There is
no anti-alias filter.

Triggers are the software trigger bit, OR'd with the hardware events
selected by the mask:

| bit | event |
|---|---|
| 0 | end of transmit frame |
| 1 | start_rx |
| 2 | reply threshold reached |
| 3 | reply done |

SRAM word format: {4'b0, Q[13:0], I[13:0], 4'b0}.

## Clock chip start-up (`clk_reset`)

At power-up the clock chip divides the FPGA clock by two. After the board
reset:

1. `clk_reset` sends two 24-bit SPI writes to the chip: register 0x49 =
   0x80 (divider bypass), then 0x5A = 0x01 (update). They use SPI mode 0
   and go MSB first, with SCLK at clk/16.
2. It holds the user logic in reset for 16 more clocks.
3. It hands the SPI pins to the processor.

Host-bus requests are ignored until then. The register words are this
design's reading of the chip's data sheet.

## Simulating

The tests are self-checking SystemVerilog testbenches for Verilator 5
(`--timing`). Each prints a `TB_RESULT checks=N failures=M` line.

Build and run one from the repository root like this:

    verilator --binary --timing -Wno-fatal --top-module tb_rx_decoder \
        -Mdir obj_rx_decoder rtl/rfid_pkg.sv rtl/*.sv tb/tb_rx_decoder.sv
    ./obj_rx_decoder/Vtb_rx_decoder

`rtl/rfid_pkg.sv` must come first. Listing it twice is harmless.

| testbench | what it exercises |
|---|---|
| tb_epc_crc | CRC-5/CRC-16 against a bitwise reference |
| tb_pie_encoder | frame timing of every segment, CRC and preamble selection, PR-ASK, carrier timing |
| tb_fir_filter | impulse/step response, coefficient reload, saturation |
| tb_cic_interp | response against a software CIC, gain, latency |
| tb_rfidtx | complete shaped frame at the DAC |
| tb_correlator | recursion against a direct sum, warm-up, restart |
| tb_cordic | magnitude/angle against `$atan2`/`$sqrt` |
| tb_rx_decoder | synthetic peak trains: bits, BLF and power estimates, bad interval, soft reset |
| tb_rfidrx | Miller replies as ADC samples (random M, TRext, BLF offset ±10 %, phase, DC) and record/playback |
| tb_rx_debug | all four modes, divider, triggers, host access |
| tb_adc_dac_interface, tb_clk_reset, tb_rfiduhf_regs, tb_rfiduhf | converters, start-up, register map, bus level |
| tb_rfid_reader_top | end to end at full size (see below) |
| tb_rx_pep | packet error rate of RN16 replies (M=2, 640 kHz) in Gaussian noise at four Ep/N0 levels |

`tb_rfid_reader_top` uses the top with its default parameters. It plays
the processor and a tag:

1. SPI start-up and register read-back.
2. The processor arms a single debug recording on "end of transmit frame".
3. It sends a Query with preamble and CRC-5 after the 1500 µs settle time.
4. A tag model answers with an RN16 at 100 MS/s. The RN16 is recorded in
   the SRAM model.
5. An ACK (frame-sync) returns the RN16. The tag answers with PC+EPC+CRC-16.
6. The recording is played back through the receiver and decoded again.
7. A Req_RN is sent in PR-ASK, and the carrier is switched off.

At the end it checks that each mechanism occurred at least once (DSB,
PR-ASK, threshold, BLF estimate, decode, edges, stop, record, playback). It
runs in a few seconds.

The tests use Tari = 25 µs and PW = 12.5 µs. The default triangular FIR
smears shorter pulses too much for a clean envelope.

## Limits and departures

* The FIR runs at 100 MHz with two multipliers. The reference ran it at
  200 MHz. The coefficient pulses are therefore one 100 MHz clock.
* The CORDIC is this design's own pipeline, not a vendor core.
* The processor, bus attachment, interrupt controller, clock manager and
  board chips are not modelled. The host bus is a stand-in for the real bus
  attachment.
* The register rxconf2 BLF field is stored but not used. The decoder
  measures the BLF itself.
* The window width (±â/8), the number of pilot peaks averaged (4M or 16M)
  and the stop rules are this design's choices.
* The default FIR coefficients are a placeholder triangle. Real pulse
  shaping for the spectral mask needs a designed set loaded through
  `coefrld`.
* In the reference receiver the CORDIC sits inside the correlator and the
  reply RAM inside the receiver. Here the CORDIC is a sibling of the
  correlator in `rfidrx`, and bram_rx lives in `rfiduhf` next to bram_tx.
  The data flow is the same.
* The threshold and the power estimate are treated as unsigned magnitudes.
* Tested BLF range: half periods a = 40…100 with ±10 % tag frequency
  error, a = 79 (640 kHz) and a = 1250 (40 kHz, +5 %) in `tb_rfidrx`.
  A complete Query/ACK exchange runs at a = 328 in `tb_rfid_reader_top`.
  `CORR_DEPTH` = 2048 limits a to 2047 samples, which is a BLF of about
  24.4 kHz.
* Packet error rate (from `tb_rx_pep`, RN16, M=2, BLF 640 kHz, 25 packets
  per point, Ep/N0 = samples·A²/2σ²): no errors at 41 dB and above,
  5 of 25 at 33 dB, all lost at 27 dB. Below that the pilot-based
  threshold and the peak search fail together. The decoder trades this
  sensitivity for very little logic and exact edge timing.
