# 8-channel FPGA beamformer for a 64-element linear-array ultrasound scanner

An ultrasound B-mode image is built one scan line at a time. A group of
transducer elements fires a pulse, and the same elements listen for the echoes.
Each element's echo must be delayed so that all elements line up on the same
point in the body. Then they are weighted and summed. The envelope of the summed
RF line gives the brightness of one image column.

This RTL is the digital part of such a system. It has 8 transmit/receive
channels, a 64-element linear probe with a 3.5 MHz centre frequency, and
12-bit ADCs at 40 MSPS. It holds:

- a **transmit beamformer controller**. It loads per-channel delays and pulse
  patterns into an external octal transmit beamformer chip and then raises
  `TX_EN`.
- a **scan controller**. It steps the high-voltage element multiplexers over
  the probe, one group of 8 adjacent elements per scan line.
- a **receive beamformer**: delay stage → apodization → summation → Hilbert
  transform → envelope detection. It turns 8 ADC streams into one envelope
  stream per line.

The analog parts are outside the RTL: the transmit beamformer chip, the ±50 V
pulsers, the T/R switches, the HV multiplexers, the receive front end with its
ADCs, and the PC that does scan conversion and display. Their connections are
top-level ports.

## How a frame is scanned

`us_beamformer_top` runs one frame for each `start_scan` pulse:

1. **Program.** `tx_bf_controller` sends one serial frame per channel to the
   transmit beamformer chip. The settings are loaded once per frame. On a
   linear array the focusing delays are the same for every aperture position,
   so there is no need to reload them for each line.
2. **For each line 0..7:**
   - `mux_sel` takes the line number. This 3-bit code drives the HV
     demultiplexers (transmit) and multiplexers (receive) together, so channel
     `c` is connected to element `8*mux_sel + c`.
   - The controller waits `SETTLE_CYCLES` for the switches to settle, and until
     the transmit controller is idle.
   - It requests `TX_EN`.
   - A receive window of `RX_SAMPLES` ADC samples opens. It starts with the
     sample taken in the cycle of the fire request.
3. `frame_done` pulses once. `pulser_en` (the pulsers' EN input) is high only
   while a frame is in progress.

The envelope comes out on `env_data` with `env_valid`. `env_first` marks the
first sample of a line, and `env_line` gives the line number. The output
carries exactly `RX_SAMPLES` valid samples per line.

The transmit chip does the fine transmit timing itself. On the rising edge of
`TX_EN`, each channel counts its 17-bit delay in 2 ns steps. Then it sends its
pulse pattern: 8 pulses by default, up to 64. The FPGA only loads those numbers
and gives the start signal.

## Serial interface to the transmit beamformer chip

The chip's settings are written, and can be read back, over a four-wire serial
interface:

| wire | direction | role |
|---|---|---|
| `tx_s_clk` | out | serial clock |
| `tx_s_data` | out | data |
| `tx_s_le` | out | ends each frame |
| `tx_s_rd` | in | readback data |

The chip's register map is not reproduced here, so the frame below is this
design's own layout. To match the real part, change `tx_frame_t` in `bf_pkg`
and the shift logic in `tx_bf_controller`.

| field     | bits | meaning                                    |
|-----------|------|--------------------------------------------|
| `rd`      | 1    | 0 = write, 1 = read                        |
| `ch`      | 3    | channel address 0..7                       |
| `delay`   | 17   | transmit delay in 2 ns steps               |
| `len`     | 7    | pattern length in pulses, 1..64            |
| `pattern` | 64   | one bit per pulse slot, slot 0 = bit 0     |

Every transaction is one 92-bit frame, sent MSB first.

- `tx_s_data` changes while `tx_s_clk` is low and is stable at its rising
  edge.
- `tx_s_rd` is sampled at the same rising edge.
- After the last bit, `tx_s_le` is high for one clock period of `tx_s_clk`.
- One `tx_s_clk` half period is `SCLK_HALF` clock cycles.

The two kinds of frame work as follows:

- **Write.** The whole frame goes out on `tx_s_data`, and the chip stores
  `{delay, len, pattern}` for channel `ch`.
- **Read.** Only `rd = 1` and `ch` are sent. During the remaining 88 bit
  periods the chip returns that channel's stored word on `tx_s_rd`.
  `tx_bf_controller` compares it with the configuration. Any difference sets
  `verify_err`, which stays set until the next readback pass.

A programming pass writes channels 0..7 and is started by the scan controller.
A readback pass (`start_verify`, accepted between frames) reads channels 0..7.

- Each pass takes `8 × 93 × 2 × SCLK_HALF` cycles: 2,976 cycles at the default
  `SCLK_HALF = 2`.
- `TX_EN` is a pulse `TXEN_CYCLES` cycles long. A fire request during a pass is
  ignored.
- The readback line has no synchronizer. `tx_s_clk` is generated by the same
  block, so the chip's answer has a whole low half period to settle.

## Receive chain

One sample per channel per clock cycle at most, marked by `adc_valid`. There is
no back-pressure: every stage moves on each valid sample.

| stage | module | latency | output width |
|---|---|---|---|
| delay (integer + fractional) | `rx_delay_stage` | 1 cycle | 12 bits per channel |
| apodization | `apodization` | 1 cycle | 20 bits per channel |
| summation | `summation` | 1 cycle | 23 bits |
| Hilbert transform | `hilbert_transform` | 1 cycle + 15 samples | I 23 bits, Q 25 bits |
| envelope | `envelope_detector` | 1 cycle | 25 bits unsigned |

Widths grow at each stage and nothing is rounded away between stages. The only
rounding is in the Q output of the Hilbert filter, and the envelope is truncated
to an integer.

### Delay stage: coarse buffer plus interpolation

The channels are sampled only a little above the Nyquist rate. Delays finer than
one sample (25 ns) therefore come from interpolation, not from oversampling.

Each channel writes its samples into a circular buffer of `DEPTH` words (256 by
default, up to 6.4 µs of delay). The delay word is `{D, f}`: an integer part
`D` (0..`DEPTH`-2) and a 2-bit fraction `f`. The output is:

    y[n] = x[n-D] + floor((x[n-D-1] - x[n-D]) * f / 4)

This is linear interpolation in quarter-sample steps (6.25 ns at 40 MSPS). When
`D = 0`, the newest sample is taken straight from the input. The buffer is not
reset, so the first `D+1` outputs after reset are undefined.

Each delay is fixed for the whole line. There is no dynamic receive focusing:
the delay does not change with depth.

### Apodization and summation

Each channel is multiplied by an unsigned 8-bit weight, read as `w/256`. The
weight shape (rectangular, Hamming, …) is chosen by whoever drives `apod_w`.
The 8 products are then added at full width.

### Hilbert transform

This is a 31-tap FIR Hilbert transformer. Its taps are the ideal response
`2/(πk)` for odd `k` (zero for even `k`), times a Hamming window. They are
scaled by 2^11, rounded, and computed at elaboration:

    c[i] = round(2048 · 2/(π k) · (0.54 + 0.46 cos(π k / 15))),   k = i − 15

- `Q = (Σ c[i]·x[n−i]) >>> 11`.
- `I` is the centre tap `x[n−15]`, so I and Q describe the same sample.
- For a 3.5 MHz echo sampled at 40 MSPS, the filter gain is within a few
  percent of 1.

### Envelope

`env = floor(sqrt(I² + Q²))`, computed exactly. The square root is found bit by
bit (restoring method, one trial per result bit, 25 trials) in one clock cycle.
This is the longest combinational path in the design. For a high clock rate,
pipeline the loop over several registers. There is no log compression; it is
left to the host.

### Tags

`rx_beamformer` carries a small tag with every sample: the window flag, the
first-sample flag and the line number. The tag comes out with the envelope
value of the same sample. The Hilbert filter reports the sample 15 positions
back, so the tag is also delayed by 15 valid samples. `out_valid` always
follows `in_valid` by exactly 5 cycles.

## Parameters

Package `bf_pkg`:

| parameter | value | origin |
|---|---|---|
| `NCH` | 8 | channels of the system |
| `NUM_ELEMENTS` | 64 | probe elements; gives 8 apertures |
| `ADC_W` | 12 | ADC resolution |
| `TXD_W` | 17 | transmit delay counter (2 ns steps; 102.4 µs needs 51,200) |
| `PAT_MAX` | 64 | longest pulse pattern |
| `FRAC_W` | 2 | design choice: quarter-sample receive delay |
| `APO_W` | 8 | design choice |

`us_beamformer_top`:

| parameter | default | meaning |
|---|---|---|
| `RX_SAMPLES` | 4096 | samples per line (102.4 µs, about 7.9 cm depth) |
| `DEPTH` | 256 | receive delay buffer per channel |
| `HILB_TAPS` | 31 | Hilbert filter length (odd) |
| `SCLK_HALF` | 2 | serial clock half period, in clock cycles |
| `TXEN_CYCLES` | 4 | `TX_EN` pulse length |
| `SETTLE_CYCLES` | 16 | wait after an element switch |

All the parameters in the second table are design choices.

## Where this RTL departs from, or adds to, the system it models

- **Transmit serial format.** The frame layout, the bit order, the timing and
  the readback protocol are assumptions, as described above. The chip model
  in `tb/` uses the same format, so it checks this controller, not the real
  part. Its pulse slot of 142 × 2 ns stands in for the chip's programmable
  pulse frequency.
- **ADC interface.** The samples are taken as parallel 12-bit words with a
  valid strobe. A real 8-channel receiver chip delivers serial LVDS data. Its
  deserializer and its SPI set-up are not included.
- **T/R switch control.** The T/R switch chips have a serial control port. It
  is not driven, because nothing is known of how it is used.
- **Host link.** There is no USB link to the PC. Configuration (`tx_cfg`,
  `rx_delay`, `apod_w`) comes in as ports and must stay stable during a frame.
  The envelope leaves as a stream.
- **Aperture grouping.** Apertures do not overlap: 8 lines per frame, one per
  group of 8 elements.
- **Fixed delays.** The receive delay is fixed per line, as noted under the
  delay stage.
- **Sequencing choices.** The settling wait and the window length are
  assumptions. So is opening the window at the fire request.
- **Pulser enable.** `pulser_en` is driven by the scan state. This too is an
  assumption.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with values it computes itself, and prints
`TB_RESULT checks=N failures=M`.

- `tb_rx_delay_stage`: random data and delays, including `D = 0` and the
  largest delay, with a change of delay mid-stream. It is checked against the
  interpolation formula.
- `tb_apodization`, `tb_summation`: random and extreme values, checked
  against exact products and sums.
- `tb_hilbert_transform`: an impulse response checked against the tap formula
  and for antisymmetry. Also a tone at fs/8, where I must be exact and Q must be
  within 3 % of the ideal quadrature.
- `tb_envelope_detector`: random and corner I/Q values, checked against an
  exact integer square root.
- `tb_rx_beamformer`: the whole chain against a reference model, including
  the 5-cycle latency and the tag alignment.
- `tb_tx_bf_controller`: a serial receiver decodes the frames, and a model
  of the chip answers readback. It checks:
  - the frame contents and the pass length;
  - that a fire request during a pass is ignored;
  - the `TX_EN` length;
  - that readback flags a changed delay or pattern, and clears on a clean
    pass.
- `tb_scan_controller`: line order, settling, the wait for a busy transmit
  controller, and exactly `RX_SAMPLES` samples per window.
- `tb_us_beamformer_top`: one full frame at the default parameters. An echo
  model sends a 3.5 MHz burst from a point target, spread over the channels by
  0.75·c² samples. The receive delays undo that spread, using the fractional
  steps. Per line, it checks:
  - 4096 envelope samples;
  - the peak within 3 samples of the expected depth;
  - the peak size within 10 % of the coherent sum;
  - a quiet envelope away from the echo.

  A behavioural model of the transmit beamformer chip (`tb/lm96570_model.sv`)
  receives the programmed settings. On every `TX_EN` it produces the pulse
  patterns. The testbench checks each channel's first pulse against its delay
  in 2 ns steps, and the pulse counts against the pattern. After the frame, a
  clean readback must pass, and a readback with one changed setting must be
  flagged.

  The testbench also counts serial frames, `TX_EN` pulses, transmit pulses,
  aperture switches, windows, ADC sample gaps and readback mismatches. Each
  must occur.

  At the default parameters, the settling wait is longer than the `TX_EN`
  pulse. So the wait for a busy transmit controller only occurs in
  `tb_scan_controller`.

## Simulating

With Verilator 5, each testbench builds from `rtl/` and `tb/`, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/bf_pkg.sv tb/tb_us_beamformer_top.sv --top-module tb_us_beamformer_top
    ./obj_dir/Vtb_us_beamformer_top

To lint the design:

    verilator --lint-only -Wall -Irtl -y rtl rtl/bf_pkg.sv rtl/us_beamformer_top.sv

The warnings that remain are package constants that a given module does not use.
The full-frame testbench runs in well under a second.
