# DRAD: four-channel pixel-chip DAQ logic

Testing a hybrid pixel detector at a beam line usually takes a crate of
back-end electronics, a PC and cables for each detector. DRAD replaces that
with one FPGA-plus-processor chip (a Zynq UltraScale+ MPSoC). Linux and the
control software run on the processor. The programmable logic described here
reads out up to four ROC4SENS pixel readout chips at once. For each chip it
generates the analog-readout control sequence, sets the chip's reference
voltages over I2C, clocks and captures the chip's ADC, and answers the test
beam's Trigger Logic Unit (TLU). The pixel data goes to memory through DMA.

The main idea is a split by clock domain:

| Domain  | What runs there |
|---------|-----------------|
| 100 MHz | Processor side: AXI4-Lite control and DMA |
| 40 MHz  | System clock (the LHC bunch frequency): command decoding and I2C |
| 160 MHz | Chip control lines, trigger and ADC |

Commands flow from the processor down the clock domains. Data flows back up.
Every crossing is a dual-clock FIFO, or a two-flop synchroniser for status
bits.

```
                100 MHz               40 MHz                  160 MHz
 AXI4-Lite --> axi_converter --> r4s_registers --+--> i2c_master x4 --> DAC I2C
 (processor)   (CMD / STATUS)    (cmd FIFO/ch)   |
                                                 +--> r4s_sensor x4 --> chip lines,
                                                      (cmd FIFO,         ADC, TLU
                                                       sequencer, ADC      |
                                                       capture, trigger)   | pixel stream
 DMA 1..4  <-- dma_management (FIFO 160 -> 100 MHz, one per channel) <-----+
 clock_reset_mgmt: one synchronised reset per domain, released after the clock generator locks
```

Everything in `rtl/` is synthesizable SystemVerilog-2017. These parts are
outside the RTL and connect to the top, `drad_top`, through ports:

- the clock generator (the three clocks and its lock flag),
- the processor (the AXI4-Lite slave port),
- the four DMA engines and their AXI4 interconnect (four AXI4-Stream outputs at 100 MHz),
- the chips, ADCs, DACs and TLU.

## Files

| File | Role |
|------|------|
| `rtl/drad_pkg.sv` | Shared types: command word, opcodes, pixel word, status bits |
| `rtl/drad_top.sv` | Top level: the four blocks below |
| `rtl/clock_reset_mgmt.sv`, `rtl/reset_sync.sv` | Per-domain reset, held while the clock generator is unlocked |
| `rtl/axi_converter.sv` | AXI4-Lite slave: command and status registers |
| `rtl/r4s_management.sv` | Chip management: command queues, 4 I2C masters, 4 sensor channels |
| `rtl/r4s_registers.sv` | Per-channel 100→40 MHz command FIFO and command dispatch |
| `rtl/i2c_master.sv` | Write-only I2C master for the reference DACs |
| `rtl/r4s_sensor.sv` | One channel: 40→160 MHz command FIFO, sequencer, trigger, ADC capture |
| `rtl/r4s_readout_seq.sv` | Readout and calibration control sequence of the chip |
| `rtl/tlu_trigger.sv` | TLU trigger/busy handshake and chip HOLD |
| `rtl/adc_capture.sv` | ADC power and clock, latency alignment, packing into stream words |
| `rtl/dma_management.sv` | Per-channel 160→100 MHz data FIFOs towards the DMA engines |
| `rtl/async_fifo.sv`, `rtl/sync_2ff.sv` | Clock-domain-crossing primitives |
| `tb/tb_<block>.sv` | Self-checking testbench for each block |
| `tb/tb_drad_top_full.sv` | The top at its default sizes through both validation measurements |
| `tb/r4s_chip_model.sv`, `tb/i2c_slave_model.sv`, `tb/axil_master_bfm.sv` | Behavioural stand-ins used by the testbenches |

## Controlling it: registers and commands

The processor sees a small AXI4-Lite register map. It is this design's own.

| Address | Name | Access | Meaning |
|---------|------|--------|---------|
| `0x10*i + 0x0` | CMD i (i = 0..3) | write | Push a command word into channel i's queue |
| `0x10*i + 0x4` | STATUS i | read | Status bits of channel i (below) |
| `0x40` | ID | read | `0x44524144` ("DRAD") |

- Writes elsewhere, and CMD writes without all four byte strobes, get SLVERR.
- A CMD write to a full queue is not dropped. The bus handshake stalls until
  the queue has room.

A command word carries its opcode in bits [31:28]:

| Op | Name | Arguments | Effect |
|----|------|-----------|--------|
| 0 | NOP | | Discarded |
| 1 | I2C_WRITE | [22:16] address, [15:8] byte 0, [7:0] byte 1 | One I2C write to the channel's DAC bus |
| 2 | READ_FRAME | [0] calibration | Read the whole matrix once |
| 3 | ARM | [0] calibration | Each TLU trigger starts one frame |
| 4 | DISARM | | Stop reacting to triggers |
| 5 | CAL_PIXEL | [15:8] column, [7:0] row | One-pixel calibration test |
| 6 | ADC_CTRL | [0] enable | Power the ADC up or down and start or stop its clock |

STATUS bits, read through the bus:

| Bit | Meaning |
|-----|---------|
| 0 | I2C busy |
| 1 | Last I2C write was not acknowledged |
| 2 | Readout sequence running |
| 3 | TLU BUSY |
| 4 | Armed |
| 5 | A pixel word was dropped (sticky) |
| 6 | ADC on |
| 7 | Command queue full |

Command flow through the clock domains:

1. Each channel's commands cross 100→40 MHz in a 16-entry FIFO.
2. At 40 MHz, I2C writes go to that channel's I2C master once it is idle.
3. All other commands cross into the 160 MHz domain through a second,
   4-entry FIFO inside the channel.
4. A frame command (READ_FRAME or CAL_PIXEL) waits at the head of that FIFO
   while a frame is still running, so commands never overlap.

## The readout sequence

The ROC4SENS has an analog matrix of 155 columns by 160 rows. Row and column
shift registers select one pixel at a time onto the analog output, which the
ADC digitises. `r4s_readout_seq` generates the shift-register controls at
160 MHz. The durations come from the chip's timing diagram, rounded up to
whole 6.25 ns cycles:

| Phase | Cycles | Signals |
|-------|--------|---------|
| Reset column register | 24 (150 ns) | PHI1 and PHI2 high |
| Reset row register | 24 (150 ns) | SCLK high |
| Row step, part A | 1 (5 ns) | SCLK low |
| Row step, part B | 1 (5 ns) | SCLK rising; RBI high to load the first row |
| Calibration pulse, calibration mode only | 16 | CAL_PULSE high, then falling |
| Per column: shift | 1 (5 ns) | PHI1 high |
| Per column: sample | 3 (15 ns) | PHI2 high; sample strobe in the last cycle |

- After the last column of a row the sequence goes to the next row step.
- After the last row it stops.
- LA is high while a row is being scanned.
- CAL_ENA is high for the whole frame in calibration mode.
- All outputs are registered.

Frame length:

    2*T_RST + ROWS * (2*T_SHORT + cal*T_CAL + COLS * (T_SHORT + T_SAMPLE))

At the defaults this is 99 568 cycles (622.3 µs), or 102 128 cycles
(638.3 µs) in calibration mode. That is one pixel every 25 ns, or 40 Mpixel/s
per chip.

The timing diagram gives the order and length of the phases. The level of
each line within a phase is this design's reading of it. Check it against the
chip's datasheet before connecting hardware. `T_CAL` and the calibration
pulse's position are this design's own. The phase lengths are parameters, so
they can be corrected without touching the logic.

**Calibration test (one pixel).** CAL_PIXEL runs a whole frame in
calibration mode but keeps only the pixel at the given column and row. That
word is flagged `single` and carries TLAST. How the real chip restricts the
test pulse to one pixel is not specified, so injection is left to the chip's
own CAL_ENA/CAL_PULSE logic.

## ADC capture and the pixel stream

- ADC_CTRL powers the ADC (`adc_pd` low) and starts `adc_clk` at 80 MHz
  (160/2).
- The ADC delivers a sample `ADC_LAT` = 4 clocks after the strobe. The pixel's
  row, column and flags travel down a matching pipeline, so each ADC word is
  paired with the right address.

Each word leaves as one 32-bit AXI4-Stream beat:

| Bits | Field |
|------|-------|
| [31] | triggered |
| [30] | calibration |
| [29] | first pixel of the frame |
| [28] | single-pixel test |
| [27:20] | row |
| [19:12] | column |
| [11:0] | ADC value |

TLAST marks the last pixel of a frame, or the single pixel of a CAL_PIXEL
test.

**Overflow.** The chip cannot be paused in the middle of a frame. If a word
is ready while the stream is still stalled, the word is dropped and the
sticky overflow status bit is set. The next READ_FRAME or ARM clears it.

Per channel, `dma_management` has a 1024 × 33-bit dual-clock FIFO (data plus
TLAST), so the 160 MHz side only stalls if the DMA engine stops draining. At
40 Mword/s in and up to 100 Mword/s out, a running DMA keeps up.

## Trigger handling

`tlu_trigger` takes the asynchronous TLU trigger into the 160 MHz domain
through two flops and detects its rising edge. When the channel is armed and
idle, the edge has three effects:

- it starts a frame three clocks later,
- it raises BUSY towards the TLU,
- it raises the chip's HOLD line.

BUSY and HOLD fall when the frame ends.

A trigger that arrives while BUSY is high does nothing but pulse an internal
"ignored" event. A trigger during a frame started by a command is not acted
on either. The handshake is a
plain trigger/busy level protocol with no trigger number.

## I2C for the reference DACs

`i2c_master` is a write-only, open-drain master. Outputs are enables that pull
the line low. Each write is:

    START, address + W, ACK, byte 0, ACK, byte 1, ACK, STOP

Bus timing:

- SCL is 100 kHz (`I2C_HZ`), built from four quarter-period ticks of the
  40 MHz clock.
- A bit takes 400 clocks. A whole write takes 29 bit times.

If the device does not acknowledge, the master stops early and sets the
sticky NACK status bit. The next write clears it. Clock stretching and
multi-master arbitration are not supported.

## Resets and clocks

`clock_reset_mgmt` gives each domain its own active-low reset. The reset is
asserted asynchronously by the external reset or by loss of clock-generator
lock. It is released synchronously, three clocks after both are good.

The clock generator itself is outside the RTL. The logic assumes:

- the chip clock is exactly 4× the system clock (checked at elaboration),
- the bus clock is faster than the system clock.

The crossings themselves do not depend on these ratios.

## Where this departs from, or goes beyond, the source description

The source describes the partitioning, the clock domains, the tasks of each
block and the chip's readout timing. It does not give register maps, command
encodings, FIFO depths, the ADC part or latency, the I2C speed or the row
count. These are this design's choices:

- **Encodings.** The command set, register map, status bits and pixel word
  format.
- **Sizes.** FIFO depths: 16 commands per channel at 100→40 MHz, 4 at
  40→160 MHz, 1024 pixel words at 160→100 MHz.
- **ADC.** 12-bit, latency 4 clocks, clock 80 MHz.
- **Matrix.** 160 rows. The 155 columns are given by the source.
- **I2C.** 100 kHz, two data bytes per write.
- **Calibration.** T_CAL = 16 cycles, and calibration is repeated on every
  row.
- **Timing.** Phase lengths of 5 ns and 15 ns are rounded up to 1 and 3
  cycles of 6.25 ns.
- **Vendor blocks.** The original system uses vendor FIFOs and reset blocks.
  Here they are replaced by the small generic `async_fifo` and `reset_sync`.
- **Not built.** The DMA engines, AXI interconnect, processor, clock generator
  and the analog parts (chip, ADC board, DACs, TLU, remote power switch) are
  not part of the RTL.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and ends itself, with a watchdog.

Run one with plain Verilator 5 (the package goes first):

    verilator --binary --timing -y rtl -y tb rtl/drad_pkg.sv tb/tb_r4s_sensor.sv \
              --top-module tb_r4s_sensor -o sim
    ./obj_dir/sim

Verilator has only two states and can start registers at random values
(`+verilator+rand+reset+2 +verilator+seed+N`). The testbenches are written
for that:

- everything that is read is reset,
- monitors only count after the testbench's own reset.

Testbenches:

- **Blocks.** Small sizes where a full frame would be slow. For example, the
  channel tests use 6×4 or 5×3 matrices and a 1 MHz I2C clock.
  `tb_r4s_readout_seq` also runs the full 155×160 frame and checks its
  cycle count.
- **`tb_drad_top`.** The whole logic end to end with an 8×4 matrix and
  16-word data FIFOs. It counts, and requires at least once, each mechanism:
  - reset release
  - a command write held on a full queue
  - I2C write acknowledged and not acknowledged
  - ADC switched on
  - plain frame, calibration frame and one-pixel test
  - triggered frame and ignored trigger
  - data FIFO full
  - word dropped with overflow set
  - status reads
- **`tb_drad_top_full`.** The top with no parameter overrides:
  - programs a DAC at 100 kHz,
  - reads full 155×160 frames on all four channels at once, two of them in
    calibration mode,
  - runs a one-pixel test.

  It checks every word, and the 622.3 µs and 638.3 µs frame times. It takes a
  few seconds under Verilator.
