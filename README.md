# Acoustic processor for a mine-countermeasure sonar

A 36-element receiving array listens for echoes of a sounding pulse. This
design turns the 36 analogue channels into 61 beams covering a 60° sector.
It delivers one magnitude per beam and range sample, in a buffer a host
reads over the VMEbus. Everything runs in one clock domain, nominally
250 MHz.

The chain has six steps:

1. **Sample.** All converters start together, four times per carrier
   period.
2. **Keep one third.** Only one conversion series in three is kept: two
   quadrature samples per channel, in a fixed rotation over three-channel
   groups.
3. **Remove the carrier.** Each kept pair becomes one complex (I, Q)
   baseband sample.
4. **Form beams.** The 36 complex samples are weighted, padded with zeros
   to 128 points and transformed by an FFT. 61 lines of the result are the
   beams.
5. **Filter.** Each beam goes through an 8th-order Butterworth low-pass,
   which improves the signal-to-noise ratio. It then goes through a
   4th-order Butterworth high-pass, which suppresses reverberation. Both
   cut-offs follow the sounding-pulse length.
6. **Store.** The beam magnitude sqrt(I² + Q²) is written to a 512K × 36
   dual-port RAM. A VMEbus interrupt tells the host the block is ready.

The original equipment runs steps 3 to 5 in software on a floating-point
DSP. Here those steps are a fixed-point hardware pipeline. The converter
card controller and the bus interface are logic in both the original and
this design.

## The sampling sequence (the part to understand first)

The carrier frequency is fc, and the converters run at fs = 4·fc
(173.6 kHz, one conversion every 5.76 µs). Every conversion samples all
channels at the same instant, but only some results are kept.

- The channels form 12 groups of three consecutive channels:
  (0,1,2), (3,4,5) and so on.
- In conversions 0 and 1 of each sequence, the first channel of every group
  is kept.
- In conversions 2 and 3, the second channel is kept.
- In conversions 4 and 5, the third channel is kept.
- Then the sequence repeats.

Each conversion therefore keeps 12 samples. Every channel gets a pair of
samples a quarter carrier period apart, which is a quadrature pair. The
pairs repeat every 6 conversions, which is 3/2 carrier periods. Those six
conversions form a **snapshot**: 72 samples, 2 per channel. The
beam-sample rate is therefore fs/6 ≈ 28.9 kHz.

The converter controller (`madc_controller`) does the following:

- It drives the common STC and CLK lines.
- It reads all 36 serial outputs at once into a serial-to-parallel shift
  register (`sample_shift_register`). Each row holds a 14-bit sample and an
  ID marker.
- It sets the marker of the rows that the current conversion keeps.
- It empties the register through row 1, one row per clock (row k takes
  row k+1), so the readout takes 36 clocks = 144 ns.
- It writes only the marked rows to the FIFO that leads to the processing
  side.

Each FIFO word is `{sof, q, sample[13:0]}`:

- `sof` marks the first word of a snapshot.
- `q` marks the second sample of a pair.

**Carrier removal.** Because fs = 4·fc, removing the carrier needs no
multipliers. The carrier phase advances by π/2 per conversion.

- The first sample of a pair is the cosine component. The negated second
  sample is the sine component.
- Both are then multiplied by (−1)^(snapshot + member). Here `member` is
  the channel's position in its group: a later member is sampled a whole
  number of half carrier periods later.

`frame_assembler` applies these signs while it sorts the 72 FIFO words into
channel order. It uses `sof` to find the snapshot boundary. If a word's
`q` tag disagrees with its position, it resynchronises and counts a
framing error.

Within one snapshot the channels are sampled at slightly different times:
members 0, 1 and 2 of a group are 0, 2 and 4 conversions apart. After
carrier removal this is only a small delay in the slowly varying envelope,
not a phase error. The design does not correct it.

## Beamformer

`beamformer_fft` takes the 36 complex samples in channel order.

- **Weighting.** Each sample is multiplied by its channel's amplitude
  weight: Q2.14 format, reset value 1.0, loaded from the bus. The original
  design uses the transmitter's weighting pattern, which is not published.
- **Loading.** The weighted sample is written into a 128-entry memory at
  its bit-reversed address. The 92 remaining entries are written with
  zeros, one per clock.
- **FFT.** An in-place radix-2 decimation-in-time FFT does one butterfly
  per clock: 7 stages × 64 butterflies = 448 clocks. Twiddles are Q1.15
  values, round(32767·cos/sin(2πk/128)), computed at elaboration. Data are
  24 bits and are not scaled between stages. The largest possible result
  is 36 × 1.0 × 2^14 < 2^20, so nothing can overflow.
- **Output.** Beams b = 0..60 are FFT lines b − 30 (modulo 128), so beam 30
  is broadside. A plane wave whose phase advances by 2πk/128 from channel
  to channel appears in beam 30 + k.

A snapshot takes 128 + 448 + 61 clocks, well inside the 8640 clocks
between snapshots.

## Filters

The same module, `iir_biquad_cascade`, is used twice:

- as a low-pass with 4 second-order sections (8th order);
- as a high-pass with 2 sections (4th order).

Both act on I and Q of each of the 61 beams. One section is computed per
clock, in transposed direct form II. The two state words per section and
beam are kept in small memories, so one arithmetic unit serves all 61
beams.

Cut-off frequencies by CONTROL[2:1]:

| pulse | low-pass | high-pass |
|---|---|---|
| 0: 4 ms | 5 kHz | 100 Hz |
| 1: 10 ms | 2 kHz | 40 Hz |
| 2: 20 ms | 1 kHz | 20 Hz |

Coefficients are Q2.30 and are computed at elaboration for the beam-sample
rate FS. They use the bilinear transform with pre-warping:

    K = tan(π·fc/FS),   z_k = sin((2k+1)·π/(4·NSEC)),   a0 = K² + 2·z_k·K + 1
    a1 = 2(K² − 1)/a0,  a2 = (K² − 2·z_k·K + 1)/a0
    low-pass:  b = K²/a0 · [1, 2, 1]      high-pass: b = 1/a0 · [1, −2, 1]

The internal state has 12 guard bits above the 24-bit data.

The states are cleared at the start of each measurement. A `fresh` bit per
beam stands in for the clearing, so no memory has to be wiped. The filters
are followed by `beam_magnitude`, an exact integer square root that
produces one bit per clock.

Between snapshots, the low-pass needs 61 × 4 clocks and the high-pass
61 × 2.

## Measurement and result buffer

`measure_ctrl` runs one measurement when CONTROL is written with bit 0 set:

1. It clears the filter states.
2. It runs the converters for RANGE snapshots (6·RANGE conversions).
3. It writes one RAM word per beam and snapshot, in order, from address 0:
   `{6'b0, beam[5:0], magnitude[23:0]}`.
4. It sets LENGTH, sets data-ready and requests the interrupt.

The 512K-word buffer holds 8594 snapshots of 61 beams: 0.297 s of echo,
about 220 m of range. A longer RANGE stops writing at the end of the
buffer and sets the `clipped` flag.

## VMEbus interface

**Slave (`vme_slave`).**

- Address windows:
  - A16 (AM 29h/2Dh), base C000h: general registers.
  - A32 (AM 09h/0Dh single cycles, 0Bh/0Fh block transfer), base
    0800_0000h, 2 MB: the RAM.
- Only D32 transfers are answered.
- In a block transfer (BLT), AS* stays low and each data strobe reads the
  next word.
- Bus inputs pass through two synchroniser flip-flops.
- D32 shows the low 32 bits of a RAM word, which hold the whole result.

**Interrupter (`vme_interrupter`).**

- Requests the programmed level.
- Answers the matching IACK cycle with its 8-bit vector and releases the
  request (release on acknowledge).
- Passes IACKIN* on to IACKOUT* when the cycle is not for it.

Registers (A16 offsets):

| offset | name | access | contents |
|---|---|---|---|
| 00h | STATUS | R | [0] data ready, [1] busy, [2] FIFO overflow, [3] converter overflow, [4] interrupt pending, [31:16] ACB0h |
| 04h | CONTROL | R/W | [2:1] pulse length; writing [0]=1 starts a measurement |
| 08h | IRQ | R/W | [2:0] level (0 = none), [15:8] vector |
| 0Ch | RANGE | R/W | [19:0] snapshots per measurement |
| 10h | LENGTH | R | [19:0] words written by the last measurement |
| 14h | ACK | W | any write clears data ready |
| 18h | WEIGHT | W | [21:16] channel, [15:0] weight (Q2.14) |

A host's sequence:

1. Write IRQ and the 36 weights.
2. Write RANGE.
3. Write CONTROL with the pulse length and the start bit.
4. Wait for the interrupt and acknowledge it.
5. Read LENGTH, then read LENGTH words of the RAM with block transfers.
6. Write ACK.

## Files

RTL in `rtl/`, one unit per file:

| file | role |
|---|---|
| `acp_pkg.sv` | shared constants, FIFO word struct, pulse-length enum, address modifiers |
| `acoustic_processor.sv` | top level |
| `madc_controller.sv`, `sample_shift_register.sv` | converter card controller |
| `sample_fifo.sv` | sample FIFO, first-word fall-through |
| `frame_assembler.sv` | snapshot assembly and carrier removal |
| `beamformer_fft.sv` | weighting and 128-point FFT |
| `iir_biquad_cascade.sv` | Butterworth low-/high-pass cascade |
| `beam_magnitude.sv` | square root of I² + Q² |
| `measure_ctrl.sv` | measurement sequencing |
| `dual_port_ram.sv` | result buffer |
| `vme_slave.sv`, `vme_interrupter.sv`, `vme_interface.sv` | bus interface |

Testbenches are in `tb/`:

- Each block has a `tb_<module>.sv`.
- `adc_bank_model.sv` is a behavioural model of the converters' serial
  outputs.
- `tb_acoustic_processor.sv` runs the whole design at its default size.
  It plays the host and makes three measurements, one per pulse length.
  Each has a tone burst arriving from a different direction: beams 37, 18
  and 30. It checks:
  - the interrupt vector, STATUS and LENGTH;
  - every word's beam field;
  - that the strongest beam during the burst is the expected one, at least
    four times the beams more than six away;
  - the conversion, marked-sample and shift counts.

- `tb_longest_range.sv` runs the longest measurement the buffer holds,
  8595 snapshots, at full size. It checks that exactly 512K words are
  written and the overflow flag is set. It also checks that the end of the
  echo is at the end of the buffer. It simulates about 0.3 s of operation,
  which takes two to three minutes.

Each testbench prints `TB_RESULT checks=N failures=M`. Simulate with
Verilator 5, for example:

    verilator --binary --timing --assert --top-module tb_acoustic_processor \
        rtl/acp_pkg.sv $(ls rtl/*.sv | grep -v acp_pkg) \
        tb/adc_bank_model.sv tb/tb_acoustic_processor.sv
    ./obj_dir/Vtb_acoustic_processor

(The package `acp_pkg.sv` must come first and appear only once.) The end-to-end run simulates about 2.2 ms of
operation in roughly a second.

## How far to trust it, and where it departs from the original

**Taken from the original design:**

- 36 channels of 14 bits, with common CLK and STC.
- fs = 4·fc, 5.76 µs between conversions.
- The two-sample, three-channel rotation over 12 groups, keeping every
  third series.
- The marker-based selection and the row-1 readout of the shift register
  (144 ns).
- A FIFO to the processing board.
- Weighting, zero padding to 128, an FFT and 61 beams in 60°.
- The Butterworth orders and the cut-off frequencies.
- The magnitude as the root of the sum of squares.
- A 512K × 36 dual-port buffer read as one block.
- A16/D32 registers, A32/D32 RAM access with BLT, and an interrupt when
  the data are ready.

**Choices of this design, not in the original:**

- The clock, SPI timing and channel grouping.
- The FIFO word and depth.
- The carrier-removal signs, the beam-to-line mapping and all fixed-point
  formats.
- The filter structure.
- The order of the low- and high-pass filters.
- The register map, base addresses, result word format and
  measurement-start mechanism.

**Departures:**

- The processing runs in fixed-point hardware, not on a floating-point
  DSP.
- The weighting pattern must be loaded, because it is not known.
- The 4 channels of the 40-channel converter card that the array does not
  use are not converted.
- The side-lobe level of −18 dB depends on the loaded weights. The
  beamformer testbench loads a cosine-on-pedestal taper,
  0.52 + 0.48·cos(π(n − 17.5)/36), and measures a highest side lobe of
  −18.3 dB. That taper is this design's own; the original weights are not
  known.
- The host-side display is not part of this design.
- The converters, optocouplers, LVDS drivers and bus transceivers are
  outside the RTL.

The filters match the analogue Butterworth responses to about 1e-5 in the
block testbench. The beamformer matches a floating-point DFT within
10 + 1e-4·|X|.
