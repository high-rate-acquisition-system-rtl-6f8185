# High-rate acquisition stage for an infrared local positioning receiver

An infrared local positioning system locates a moving emitter (an LED carried
by a person or robot) with receivers fixed on a plane such as a ceiling. Each
receiver is a quadrant photodiode under a square aperture; its analog front end
turns the four photocurrents into three voltages: the **sum** of the light
received and two **differences** (left-right and bottom-top) that tell where the
light spot falls. Four receivers give twelve signals. The emitters send coded
BPSK signals on a carrier of a few hundred kHz, so the receiver has to digitise
all twelve signals at several Msps and keep them sample-aligned for
correlation later on.

This repository holds the FPGA side of that acquisition chain: the logic that
takes the serial LVDS outputs of a 16-channel, 12-bit converter (AD9249,
run at up to 16.25 Msps per channel), turns them back into parallel samples,
optionally decimates them, moves them into the processor's clock domain, and
hands them on as one AXI4-Stream per channel. A small SPI master, configured over
AXI4-Lite, sets up the converter.

```
            AD9249 (16 ch, 12-bit serial LVDS)                FPGA
   D_B1[7:0] ──┐                       ┌──────────────────────── adc_if ───────────────┐
   D_B2[7:0] ──┼─ LVDS ─────────────►  │ lvds_ibuf ─► iddr_cap ─► framing on FCO ─►     │
   DCO, FCO ───┘                       │                          adc_prescaler         │
                                       └──────────── sample[16][12], sample_valid ──────┘
                                                     (DCO domain)      │
                                       ┌──────────── fifo_array ───────▼───────────────┐
                                       │ 16 x async_fifo (Gray pointers)               │──► m_axis[16]
                                       └───────────────────────────────────────────────┘    (aclk domain)
   SCLK, CSB, SDIO ◄─── spi3w_axil (AXI4-Lite regs) ── spi3w_ctrl (state machine) ◄── s_axil (aclk)
```

## Recovering samples from the serial link

This is the part of the design that needs the most care.

**Wire format.** Each converter channel has its own LVDS lane. A sample is sent
as a frame of 12 bits, MSB first. Bits are sent at twelve times the sample
rate: 195 Mb/s at 16.25 Msps. The bit clock **DCO** runs at half the bit rate
(97.5 MHz) and is shifted so that each of its edges, rising and falling, falls in the middle of a
bit. The frame clock **FCO** runs at the sample rate and is high for the first
six bits of every frame. The first bit of a frame is centred on a rising DCO edge.

```
 bit     | b11 | b10 | b9  | b8  | b7  | b6  | b5  | b4  | b3  | b2  | b1  | b0  | b11'
 DCO       _/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾
 FCO     ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___________________________________/‾‾‾‾
```

**Buffers and DDR capture.** `lvds_ibuf` converts every pair to a single-ended
signal. It is a behavioural stand-in for the FPGA's differential input
primitive. `iddr_cap` samples the sixteen lanes and FCO on both DCO edges. On
each rising edge it presents one *bit pair* per line: `q_rise` is the bit taken
at the previous rising edge and `q_fall` the bit taken at the falling edge that
followed. After this stage everything runs on the rising DCO edge only.

**Framing.** Each lane shifts its pairs into a 12-bit register, so six DCO
cycles make one sample. The FCO bits show where a frame starts. A frame can start
at one of two alignments:

* *Between pairs.* FCO is high in the rising-edge bit and was low in the last
  bit of the previous pair. Each shift register then still holds the complete
  previous frame.
* *Inside a pair.* FCO is low in the rising-edge bit and high in the
  falling-edge bit, which happens when frames start on a falling DCO edge. The
  previous frame is then the register's last 11 bits followed by the
  rising-edge bit of the current pair.

The previous frame is latched into `sample`. It is released (with a one-cycle
`sample_valid`) only if exactly six pairs have arrived since the previous FCO
edge. This drops the partial frame after reset and any frame of the wrong
length.

**Prescaler.** `adc_prescaler` keeps one frame in `prescale` (0 and 1 keep
all). It drops frames and does not filter. The ratio is a top-level input,
resynchronised into the DCO domain.

Latency from the last bit of a frame on the wire to `sample_valid` is two to
three DCO periods. Frames come out every 6 DCO cycles (every 6×`prescale`
cycles after decimation).

## Crossing into the processor clock: the FIFO array

The samples leave `adc_if` in the DCO domain. The rest of the system runs on
the processor's clock `aclk`. The consumer may also be slower than the
converter at times. `fifo_array` therefore holds one dual-clock FIFO per
channel (`async_fifo`: binary and Gray pointers, two-flop synchronisers, a
conservative full/empty, first-word fall-through). Each kept frame writes one
sample into every channel's FIFO. On the read side every channel is an
AXI4-Stream master: `tvalid` is high while its FIFO is not empty, `tdata` is
the 12-bit code zero-extended to 16 bits (offset binary unless the converter
is set otherwise), and a beat moves on every `aclk` edge with `tvalid` and
`tready` high.

The channels are read independently. Channel *c* of every stream still carries
the same sequence of frames, so alignment across channels is kept as long as no
FIFO overflows. When a channel's FIFO is full, that channel drops the new sample
and sets its sticky `fifo_overflow` bit (in the `aclk` domain, cleared only by
reset). With 1024-sample FIFOs at 16.25 Msps a stream may stall for up to about
63 µs without loss.

## Configuring the converter: three-wire SPI

The converter is set up through a three-wire SPI port: CSB, SCLK and one
bidirectional SDIO line. SDIO is split into `spi_sdio_o`, `spi_sdio_oe` and
`spi_sdio_i` for the I/O pad.

`spi3w_ctrl` is a two-level state machine:

| state | CSB | SCLK | SDIO | lasts |
|---|---|---|---|---|
| IDLE | high | idle | released | until `start` |
| SETUP | low | idle | first bit driven | ½ SCLK period |
| XFER / HIGH | low | active | read bits sampled on entry | ½ period per bit |
| XFER / LOW | low | idle | next bit shifted out | ½ period per bit |
| HOLD | low | idle | released | ½ period |
| GAP | high | idle | released | ½ period |

A half period is `clk_div+1` clock cycles. A transaction of *n* bits keeps
`busy` high for (2n+2)(clk_div+1) cycles. The first `n_wr` bits are driven by
the master. SDIO is then released and the remaining bits are read. The
converter's protocol is a 16-bit instruction (read flag, byte count, 13-bit
address) followed by data, so:

* register write: `LEN = n_bits 24, n_wr 24`, `TXDATA = {instr, data}`
* register read: `LEN = n_bits 24, n_wr 16`, `TXDATA = {0x8000|addr, 0x00}`, result in `RXDATA[7:0]`

`spi3w_axil` wraps the controller in an AXI4-Lite slave (offsets in `acq_pkg`):

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | R/W | bit 0 start (write 1, self clearing); bit 1 cpol |
| 0x04 | STATUS | R | bit 0 busy |
| 0x08 | CLKDIV | R/W | SCLK half period − 1, in `aclk` cycles (reset 4) |
| 0x0C | LEN | R/W | bits 5:0 n_bits, bits 13:8 n_wr (reset 24/24) |
| 0x10 | TXDATA | R/W | bits to send, right-aligned, MSB first on the wire |
| 0x14 | RXDATA | R | bits read, right-aligned |

Write address and data are accepted together, and responses are always OKAY.
The converter's own settings are the software's job and are not fixed in
hardware. These include the 12-bit output mode, the clock divider that gives
16.25 Msps from its 65 MHz oscillator, and the test patterns.

## Parameters, clocks and resets

| parameter | default | meaning |
|---|---|---|
| `NUM_CH` | 16 | converter channels (two banks of 8: D_B1 = 0–7, D_B2 = 8–15) |
| `RES` | 12 | bits per sample on the wire (must be even) |
| `FIFO_DEPTH` | 1024 | samples per channel FIFO (power of two) |
| `AXIS_W` | 16 | stream data width |
| `PRESC_W` | 16 | width of the prescale ratio |

The top `acq_top` takes them from `acq_pkg` (as `NUM_CH_P` … `PRESC_W_P`).
There are two clock domains: the converter's DCO (after its input buffer) and
`aclk`. `aresetn` resets the `aclk` side directly and the DCO side through
`rst_sync`. The DCO must be running when reset is released.

## What follows the published system and what is this design's own

The following come from the published system:

* the split into an SPI controller with a busy port behind an AXI4-Lite wrapper,
  an ADC interface and an array of asynchronous FIFOs with AXI4-Stream outputs;
* differential input buffers, DDR capture on both DCO edges, output aligned to
  the FCO rising edge, data in the DCO domain;
* a prescaler for downsampling;
* 16 channels in two banks of 8, a 12-bit serial stream, up to 16.25 Msps.

The following were not specified and were chosen here:

* the FIFO depth;
* one stream per channel and the 16-bit zero-extended `tdata`;
* the overflow flag and the drop-on-full policy;
* the register map;
* the SPI state breakdown and its timing;
* the frame-length check;
* decimation by dropping frames;
* the prescale ratio as a plain input, and the use of one DCO/FCO pair for both banks.

Not built as logic:

* the photodiode receivers;
* the analog front end with its automatic gain control (including the digitised gain);
* the converter itself;
* the processor;
* the correlation stage after the streams.

`tb/ad9249_model.sv` models the converter's outputs and SPI port for the
testbenches. `lvds_ibuf` is only a behavioural model of the FPGA input buffer.
Its fail-safe hold is written as a latch, and that latch is expected.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_lvds_ibuf`, `tb_iddr_cap`, `tb_adc_prescaler`, `tb_async_fifo` and
  `tb_fifo_array` test the leaf blocks. These cover ordering, full and empty,
  back-pressure and overflow.
* `tb_spi3w_ctrl` and `tb_spi3w_axil` write and read converter registers on the
  SPI model. They check busy timing, the SCLK edge count and the SDIO turnaround.
* `tb_adc_if` runs at the full rate. It checks every channel of every frame, the
  frame spacing (6 DCO cycles, 12 bit periods), prescale ratio 4 and the
  mid-scale test pattern, for frames starting on rising and on falling DCO edges.
* `tb_acq_top` is end to end at the default size. It covers SPI read and write
  through AXI4-Lite, the full rate, prescale 3, an overflow on one stalled
  channel while the others keep running, and a test-pattern switch. It counts
  each of these events and requires every one of them to happen.
* `tb_acq_workload` streams one full period of a 1151-chip BPSK code on a
  250 kHz carrier at 16.25 Msps. That is 74,815 samples on each of the twelve
  receiver channels. The testbench finds the code phase with a matched filter
  and then compares every captured sample with the value sent. The chips come
  from an 11-bit LFSR, which stands in for the loosely synchronised codes of the
  real system.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/acq_pkg.sv tb/tb_acq_top.sv --top-module tb_acq_top
./obj_dir/Vtb_acq_top
```

Every design file lints cleanly with `verilator --lint-only -Wall` apart from
unused-parameter notes, a note that `aresetn` feeds both the synchronous
resets and the asynchronous `rst_sync`, and the expected latch of `lvds_ibuf`. Concurrent
assertions check the AXI4-Lite and AXI4-Stream rule that a valid response or
beat stays until it is taken.

## Limits

* Timing is checked only in simulation with ideal edges. Closing timing for
  195 Mb/s capture on a real FPGA needs input delay calibration and the vendor
  DDR and buffer primitives. This RTL does neither, and nothing here shows that
  it meets timing at 97.5 MHz.
* A 90° DCO/data phase is assumed at the pins, so every DCO edge falls in the
  middle of a bit. No bit-level delay search or lane deskew is done.
* `prescale` is resynchronised bit by bit. Changing it while data flows can
  give one irregular gap before the new ratio holds.
