# Eight-channel analog output controller

An FPGA that sits between a host CPU and eight 16-bit voltage-output DACs
(DAC7731-class parts) on an analog output board. The host never drives a DAC
directly. It writes samples into a 128-entry buffer per channel and sets a
conversion rate per channel. The FPGA then plays each channel's samples out
on its own timer. On the way, it corrects every sample with that channel's
gain and offset calibration and ships it to the channel's DAC over a serial
link.

The output timing is generated in hardware, not by the host. Bursty host
writes, interrupt latency or a busy bus therefore cannot make a waveform
stutter. A channel interrupts the host when its buffer runs low, so the host
can keep it filled without polling. Each of the eight channels has its own
mode, rate, trigger and interrupt settings, and runs independently of the
others.

The register map, the conversion-rate arithmetic, the correction equation, the
interrupt thresholds, the output modes and the SPI link follow a published
design for such a board, built on a Spartan-3A with DAC7731 converters. Where
that description is silent, this RTL makes its own choices; they are marked
below, and in the opening comment of each file.

## How a sample travels

```
 host bus ──► host_regmap ──► FIFO port n ──► async_fifo (128 x 16) ─┐   bus clock
                 │                                                   │ ─ ─ ─ ─ ─ ─ ─ ─
                 │ cfg n, Start Convert n           conv_timer ──► channel_ctrl
                 ▼                                    (P x T)          │ pop       8 MHz
          cal_coeff_ram ── gain n, offset n ──────────► calibrator ◄───┘       conversion
                                                           │                     clock
                                                           ▼
                                                      spi_master ──► SCLK/SDI/CS/LDAC ──► DAC n
```

1. The host writes a 16-bit sample to channel n's FIFO port (a 16-bit write is
   required). The sample goes into that channel's asynchronous FIFO in the bus
   clock domain. If the FIFO is full, the write is acknowledged and the
   sample is dropped. The host should check the FIFO-full bit first.
2. Start Convert arms the channel and restarts its conversion timer.
3. On each conversion trigger (a timer tick or an external trigger edge,
   depending on the mode), `channel_ctrl` pops one word from the FIFO.
   `calibrator` corrects it on the next clock. `spi_master` starts the DAC frame
   on the clock after that.
4. The SPI frame shifts the 16 bits out MSB first while CS and LDAC are low.
   When CS rises, the DAC updates its output.

In the conversion domain the latency from trigger to CS falling is three
clocks. A frame then lasts 33 clocks.

## Conversion rate: the double counter

The conversion period of a channel is

    T [us] = prescaler x conversion_timer / 8        (8 MHz conversion clock)

The prescaler is 8 bits and the conversion timer 16 bits (value 0 means
65536). The hardware does not multiply. `conv_timer` chains two counters:
the first counts `prescaler` clocks, and each time it wraps the second one
advances. After `conversion_timer` steps it emits a one-clock tick. So a
period is exactly `prescaler x timer` clocks. The first tick comes one full
period after Start Convert, which is why conversion starts at least 6.625 us
after the Start Convert bit is written at the fastest setting.

| setting | period | rate |
|---|---|---|
| prescaler 53, timer 1 (minimum) | 53 clocks = 6.625 us | ~150 kHz |
| prescaler 80, timer 1 (reset value, recommended) | 80 clocks = 10 us | 100 kHz |

Prescaler values below 53 are outside the specified range. The hardware
does not clamp them. A tick that comes while the previous sample is still
being sent (35 clocks of pipeline and SPI) is skipped and reported as an
*overrun*, so output timing degrades but no sample is lost. This skipping is
a choice of this design.

## Output modes

Bits 2..1 of a channel's control & status register select the mode. The
numeric encoding is this design's choice.

| code | mode | what triggers a conversion |
|---|---|---|
| 00 | off | nothing; Start Convert is ignored |
| 01 | single | the first timer tick after Start Convert; one sample, then the channel waits for the next Start Convert |
| 10 | continuous | every timer tick, until the mode is changed or the channel reset |
| 11 | external trigger | bit 3 = 0 (input): each rising edge of `trig_in[n]` (after Start Convert); bit 3 = 1 (output): timer ticks as in continuous mode, and each conversion pulses `trig_out[n]` with `trig_oe[n]` high |

Single mode uses the sample at the FIFO's read pointer (the oldest one). The
original description says it outputs "the last pointer value". Reading that
as the read pointer is this design's interpretation.

A trigger that finds the FIFO empty is an *underrun*. No frame is sent, and
the DAC keeps its last value. `underrun[n]` and `overrun[n]` are one-clock
diagnostic outputs in the conversion clock domain. They are not in the
register map.

## Calibration

Each sample is corrected as

    Result = Data x (1 + gain_err / 262144) + off_err / 4 + Volt

- `Data` is the host's sample in 16-bit two's complement.
- `Volt` is 0 for the bipolar range (-5..+5 V) and 32768 for the unipolar
  range (0..10 V).
- Each channel's range is set by the `range_unipolar[n]` board input, because
  no register selects it.
- The two scaled terms are rounded to nearest, with halves rounding up.
- The sum is saturated to the output code range. Bipolar output is two's
  complement, -32768..32767. Unipolar output is straight binary, 0..65535.

The equation and constants come from the original design. The rounding,
saturation and coefficient width are choices of this design.

A second passage of the original description mentions adding 16384 before the
SPI output for a positive range. That conflicts with the 32768 of the equation
above. This design follows the equation and does not add 16384.

Coefficients are one signed byte each, in a 16-byte on-chip memory
(`cal_coeff_ram`): byte 2n holds the offset error of channel n and byte 2n+1 its
gain error. An 8-bit gain error corrects up to ±128/262144, about ±0.05 %. The
on-chip memory stands in for the serial EEPROM of older boards, so accesses
finish at once. Hardware reset clears the coefficients to 0 (no correction).

## Register map

16-bit registers, 8-bit byte addresses, big-endian. The even byte of a word is
D15..D8 and the odd byte is D7..D0, and either byte can be written alone.

| byte addr | D15..D8 | D7..D0 |
|---|---|---|
| 00/01 | channel software reset (write 1 to bit 8+n) | write: Start Convert bit n / read: FIFO full bit n |
| 02/03 | interrupt status bit 8+n (read only) | interrupt vector (read/write) |
| 04/05 | D15 = 1 read, 0 write; D14..D8 calibration byte address | calibration write data |
| 06/07 | calibration read data | D1 write busy, D0 read complete |
| 08+6n | timer prescaler n (reset 80) | control & status n |
| 0A+6n | conversion timer n (reset 1) | |
| 0C+6n | FIFO port n (16-bit write only, reads 0) | |

Control & status bits:

| bit | meaning |
|---|---|
| 0 | FIFO empty (read only) |
| 2..1 | mode |
| 3 | external I/O: 1 = output |
| 4 | interrupt enable |
| 6..5 | interrupt threshold: 00 off, 01 = 4, 10 = 16, 11 = 64 |
| 7 | unused, reads 0 |

How to use the calibration registers:

- A calibration access runs when the high byte of 04 is written.
- To write a coefficient, put the data in 05 (earlier, or in the same 16-bit
  write) and write 04 with D15 = 0.
- To read one, write 04 with D15 = 1. One clock later "read complete" is set
  and the byte is in 06.
- A write finishes in the clock after the command, so "write busy" never reads
  as set. The bit is kept so that existing software still finds it.
- The bit positions in 07 and the read/write polarity are this design's
  choices.

The **ID memory** is a separate space, selected by `id_sel`. It holds 32 bytes,
read one byte per word on D7..D0 at byte address `addr[5:1]`. The first bytes
are "IPAC", then the manufacturer, model, revision, driver id, flags and the
byte count. These are followed by the channel count and the FIFO depth / 16.
Everything else is 0. The layout follows the common IndustryPack convention.
The manufacturer, model and revision values are `id_rom` parameters with
placeholder defaults. Set them to match the board being replaced.

**Host bus timing.** `sel` or `id_sel` is a one-clock strobe, with `we`,
`addr[7:1]`, `be[1:0]` and `wdata` valid during it. A write takes effect on
that clock edge. `ack` and `rdata` follow one clock later. An adapter to the
actual carrier bus (IndustryPack, VMEbus) is not included.

## Interrupts and refill

A channel requests service while:

- its interrupt enable bit is set,
- a threshold is chosen, and
- its FIFO holds fewer samples than the threshold.

The status bits sit in 02 D15..D8. `irq_n` is low while any of them is set.
The status is a level, not a latched event. It clears when the host has
written enough samples, or has cleared the enable bit. The intended handler
writes `128 - threshold` samples, for example 64 after a threshold-64
interrupt. That can never overflow the FIFO, because the count was below the
threshold. The count used is the FIFO's write-side view, which can only
overstate the fill, never understate it.

## Clock domains and resets

The design has two clock domains:

- `clk_bus` runs the register map, the FIFO write sides and the interrupt
  logic.
- `clk_conv` (8 MHz) runs the timers, sequencers, calibrators and SPI
  masters.

The two domains meet only in the following places:

- **The FIFOs** (`async_fifo`). These use Gray-coded read and write pointers,
  each passed to the other domain through two flops. "Full" and the fill count
  are computed on the write side and "empty" on the read side. Both are
  conservative.
- **Start Convert**, which crosses as a toggle (`pulse_sync`). It arrives two
  to three conversion clocks after the register write.
- **Software reset** (`rst_handshake`). Writing 1 to a channel's reset bit
  clears that channel's registers to their reset values, its FIFO, its timer
  and its sequencer. Both halves of the FIFO must be cleared together, so the
  request is held in the conversion domain until that domain acknowledges it.
  The bus-side reset is released last. The whole sequence takes about ten
  clocks. FIFO writes to that channel are ignored while it runs.
- **Quasi-static values.** These are the channel configuration (mode, rate,
  trigger direction) and the calibration coefficients. They are read by the
  conversion domain without synchronizers. Change them only while the channel
  is stopped (mode off, or after a software reset). This is the usual rule
  for such control registers, and the one thing software must respect.

The hardware reset `rst_n` is asynchronous, active low, and released in each
domain through `rst_sync`.

## SPI link to the DACs

Each channel has its own write-only link, with no MISO because nothing is
read back from a DAC:

- SCLK runs at the conversion clock / 2.
- SDI changes while SCLK is low and is sampled by the DAC on the rising edge.
- A bit counter runs from 15 down to 0, so bits go out MSB first.
- CS is low for the 16 bits.
- LDAC goes low with CS and rises one clock after CS rises.

The SCLK rate and the exact LDAC edges are this design's choice. `SPI_HALF`
(on `dac_channel` and `dac_board_top`) sets the SCLK half period in clocks.
Keep `2 + 32 x SPI_HALF + 1` below the shortest period you intend to use.

## Files

| file | contents |
|---|---|
| `rtl/dac_pkg.sv` | shared constants, mode/threshold enums, the per-channel `ch_cfg_t` record, register offsets |
| `rtl/dac_board_top.sv` | top level: register map, ID memory, calibration memory, eight channels, CDC glue |
| `rtl/host_regmap.sv` | bus slave and all registers |
| `rtl/id_rom.sv` | 32-byte identification memory |
| `rtl/cal_coeff_ram.sv` | calibration coefficient memory |
| `rtl/dac_channel.sv` | one channel: FIFO, timer, sequencer, calibrator, SPI master |
| `rtl/async_fifo.sv` | dual-clock 128 x 16 FIFO |
| `rtl/conv_timer.sv` | prescaler x timer double counter |
| `rtl/channel_ctrl.sv` | single / continuous / external-trigger sequencer |
| `rtl/calibrator.sv` | gain/offset correction |
| `rtl/spi_master.sv` | DAC serial link |
| `rtl/irq_gen.sv` | interrupt condition of a channel |
| `rtl/sync_ff.sv`, `rtl/pulse_sync.sv`, `rtl/rst_handshake.sv`, `rtl/rst_sync.sv` | synchronizers |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/dac7731_model.sv` | behavioural serial DAC receiver used by the channel and top-level tests |

Parameters and their defaults:

- 8 channels, 128-entry FIFOs and 16-bit samples are the board's own numbers.
  The channel count and sample width are set in `dac_pkg`. The FIFO depth is
  `DEPTH` on the top and on `dac_channel`.
- One-byte coefficients and SCLK = clk/2 are this design's choices.

The synthesized top has about 1,650 flip-flops, and 16 Kbit of FIFO memory
that maps to block RAM.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends.
Delays are written in nanoseconds. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb +libext+.sv rtl/dac_pkg.sv tb/tb_dac_board_top.sv \
    --top-module tb_dac_board_top
./obj_dir/Vtb_dac_board_top
```

Replace the testbench name to run any other test. All tests run in seconds.

`tb_dac_board_top` runs the whole design at its default size, with a host
model on the bus and a DAC model on every channel:

- **ID memory.** It reads the ID memory.
- **Calibration.** It loads and reads back coefficients for every channel.
- **ch0, ch1.** These stream the same 300-sample sine wave in continuous
  mode at 10 us per sample, through their 128-sample FIFOs. The FIFOs are
  refilled on threshold-64 interrupts.
- **ch2.** Single mode, with two Start Converts.
- **ch3.** External trigger input.
- **ch4.** External trigger output, at 13.25 us.
- **ch5.** Unipolar range at 6.625 us, including a saturating sample.
- **ch6.** Filled past full, then software-reset, then driven at a too-short
  period to force overruns.
- **ch7.** Runs dry, to force underruns.

Every DAC frame is compared with the corrected sample in order. Continuous
channels are checked for the exact frame period, and each mechanism (full,
software reset, interrupt refill, underrun, overrun, trigger output,
saturation) must occur at least once.

The module tests check, among other things:

- exact tick periods for many prescaler/timer pairs;
- the correction against a floating-point model over thousands of random
  cases;
- the SPI word 1000_0100_1101_1110, and random words, at two SCLK rates;
- the interrupt condition over every count, threshold and enable;
- FIFO order, full and empty under random two-clock traffic;
- the whole register map, including byte writes, calibration access and
  software reset.

## Limits and departures

- The 16384 offset step for a positive output range is not implemented. See
  "Calibration".
- No bus error is signalled for a write to a full FIFO. The write is
  acknowledged and dropped.
- The actual ID contents of the board being replaced are unknown. Placeholder
  values are used and no CRC byte is included.
- The host bus is a generic strobe/ack interface. The carrier-bus adapter, the
  host CPU and the DACs themselves are outside this RTL.
- The coefficient width (8 bits), the mode and threshold encodings, the
  calibration status bit positions and the single-mode reading are this
  design's interpretations.
- Prescaler values below 53 are accepted. The resulting timing is degraded
  but defined: ticks are skipped.
