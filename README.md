# FOVIT: a video, voice and data multiplexer for a point-to-point fibre link

This is the digital core of a fibre-optic transceiver. It carries three independent
signals in each direction over one fibre:

- a 2.048 Mbit/s video stream, typically compressed MPEG-1 handed over by an E1 line
  interface;
- a 64 kbit/s PCM voice channel from a telephone CODEC (TP3057/TP3067 class);
- a 128 kbit/s channel between two microcontrollers, which also relays their
  RS-232 ports.

On transmit, the chip packs the three signals into 288-bit frames sent every 125 µs.
That makes 2.304 Mbit/s on the fibre. Each frame gets a frame alignment word and a
CRC-4. On receive it finds the frame boundary in the recovered bit stream and checks
the CRC. It then hands video and voice back out at 2.048 MHz and passes the
microcontroller's word to a register. Both directions work at the same time and
independently of each other.

A microcontroller manages the chip through a small asynchronous register bus. It
reads link status, error counts and interrupts. It sends and receives protocol words
and drives 16 general-purpose I/O pins.

The top module is `fovit_asic`.

## Line frame

| Bits    | Field                     | Rate        |
|---------|---------------------------|-------------|
| 0–3     | frame alignment word 1101 | –           |
| 4–259   | video                     | 2.048 Mbit/s |
| 260–267 | voice (one PCM sample)    | 64 kbit/s   |
| 268–283 | protocol word             | 128 kbit/s  |
| 284–287 | CRC-4 over bits 0–283     | –           |

- **Rate.** 288 bits × 8000 frames/s = 2.304 Mbit/s. This is exactly 9/8 of the
  2.048 MHz video clock.
- **Bit order.** Fields go out most significant bit first.
- **CRC.** The CRC uses x⁴ + x + 1 (the E1 CRC-4 polynomial). It starts from 0 in
  every frame and is computed serially as the bits go out.
- **Sizes.** The field sizes are 256/8/16/4 with a 288-bit total. That leaves 4 bits
  for the alignment word.

## Clock domains

The chip has four clocks and one clock-less bus:

| Domain    | Frequency | Origin                                               | Used by |
|-----------|-----------|------------------------------------------------------|---------|
| `tx_clk2` | 2.048 MHz | video source (E1 interface)                          | video/voice input, FSX |
| `tx_iclk` | 2.304 MHz | external transmit PLL locked to 9/8 of `tx_clk2`     | transmit framer, `las_tdata` |
| `rx_iclk` | 2.304 MHz | clock recovery on the optical receiver               | deframer, CRC check, error monitor, interrupt flags |
| `rx_clk2` | 2.048 MHz | external receive PLL locked to 8/9 of `rx_iclk`      | video/voice output, FSR |
| `cs_n`    | –         | microcontroller chip select; writes on its rising edge | register bank |

The phase-locked loops themselves are outside the chip. The chip supplies their
16 kHz phase-detector inputs:

| Output  | Division       | Meaning                      |
|---------|----------------|------------------------------|
| `clk_1` | `tx_clk2` / 128 | transmit PLL reference       |
| `clk_2` | `tx_iclk` / 144 | transmit PLL feedback        |
| `clk_3` | `rx_clk2` / 128 | receive PLL feedback         |
| `clk_4` | `rx_iclk` / 144 | receive PLL reference        |

Both 2.304 MHz clocks are inputs, because each comes from a VCO or a clock recovery
outside the chip.

Clock-domain crossings:

- Video and voice cross between 2.048 MHz and 2.304 MHz through dual-clock FIFOs
  (`async_fifo`). These use Gray-coded pointers and two-flop synchronisers.
- The transmit protocol word crosses from the bus into `tx_iclk` as a held word plus
  a toggle, which is synchronised.
- Interrupt clears cross into `rx_iclk` the same way.
- Status values, the error count and the received word are read directly from the
  bus. Each is a register that changes at most once per 125 µs frame, and the 16-bit
  ones are read through byte latches.
- Every domain has its own reset synchroniser. Reset asserts asynchronously and
  releases synchronously.

## Rate adaptation

The video and voice bits arrive at 2.048 MHz, but the framer reads them only during
their slots of the 2.304 MHz frame. The rates match on average because the PLL locks
them. Within a frame, though, the framer reads 256 video bits in 111 µs while only
about 228 arrive. The FIFOs absorb this swing.

| FIFO  | Depth    | Start level |
|-------|----------|-------------|
| video | 128 bits | 64          |
| voice | 32 bits  | 16          |

**Transmit side:**

- The PCM frame counter divides `tx_clk2` by 256, giving 125 µs frames.
- `fsx` is high for one clock at count 0. The CODEC's 8 bits are sampled on the
  rising edges at counts 1 to 8.
- Video is written on every clock.
- The framer starts a stream at a frame boundary once its FIFO has reached the start
  level. While a stream is stopped, the framer discards everything above the start
  level, so the FIFO cannot overflow before the start. It sends ones in the slot
  instead.
- If a running stream finds its FIFO empty, `tx_slip` is set and the stream stops
  and restarts. This happens if the video clock stops, for example.

**Receive side:**

- The deframer writes the received video and voice bits into two FIFOs of the same
  sizes.
- A PCM frame counter on `rx_clk2` generates `fsr` and reads the FIFOs.
- Video output starts when its FIFO holds 64 bits.
- Voice is read in an 8-clock burst after `fsr`, starting once 16 bits are present.
- An empty FIFO sets `rx_slip`, and the stream restarts.
- Overflow in any of the four FIFOs sets the `fifo_overflow` status bit.

## Frame alignment (receiver)

A 4-bit alignment word appears by chance about every 16 bits of random video. A
search that follows one candidate position at a time would keep locking onto false
positions and rarely reach the true one. Instead, `rx_line_deframer` tests all 288
bit phases at once:

1. A free-running counter runs from 0 to 287.
2. For each phase, a 288-entry table of 3-bit counters records how many consecutive
   frames have ended with the alignment word at that phase.
3. When one phase reaches `CONFIRM_FRAMES` (6), the receiver locks to it (SYNC) and
   raises the "alignment recovered" interrupt.
4. A false lock needs six random matches in a row. That is about 2·10⁻⁵ per frame
   for the whole table.
5. In SYNC, `LOSS_FRAMES` (3) consecutive frames without the word mean loss of frame
   alignment (LFA). This raises the LFA interrupt and starts a fresh search, with the
   table cleared.

Only in SYNC are received bits used:

- Video and voice are written into the FIFOs.
- The CRC is checked for every frame. The first frame after lock is not counted,
  because it began before the lock.
- A protocol word is accepted, and interrupts, only if all three hold:
  - its frame had the alignment word;
  - its CRC was good;
  - it differs from the last accepted word.

  A dark fibre reads as all zeros, which passes the CRC, so the alignment word is
  required as well. Because of the "differs" rule, the link protocol must change the
  word to send a repeat, for example with a toggle bit.

## Line-quality monitor

`crc_err_monitor` counts errored frames in a 16-bit saturating counter over a cycle
of N frames:

- N is the "CRC reset cycle" register. It resets to 8000, which is one second; 0
  means the cycle never ends.
- At the end of each cycle the count moves to the readable CRC error register. With
  N = 0 the register follows the running count.
- When the count exceeds `CRC_THRESHOLD` (default 16) within a cycle:
  - the CRC-threshold interrupt fires once;
  - the status bit stays high until the cycle ends.
- A new cycle length takes effect when the running cycle ends.

## Register bank

The bus has chip select `cs_n`, `rw` (1 = read), a 4-bit address and 8 data bits.
There is no clock: a write is registered on the rising edge of `cs_n`. A read drives
`data_o` with `data_oe` high while `cs_n` is low and `rw` is high.

| Addr | Read                                   | Write |
|------|----------------------------------------|-------|
| 0    | status: [0] in sync, [1] LFA, [2] CRC over threshold, [3] tx slip, [4] rx slip, [5] FIFO overflow, [7] command reset | command: [0] = 1 holds transmitter and receiver in reset |
| 1    | interrupt source: [0] LFA, [1] CRC threshold, [2] protocol word received, [3] alignment recovered. Reading clears the bits that were read | interrupt mask, 1 = disabled |
| 2, 3 | CRC error count, low byte then the high byte latched by the low-byte read | CRC reset cycle, low/high |
| 5, 6 | direction of IO[7:0] / IO[15:8], 1 = output | same |
| 7, 8 | pin level (inputs) or latch (outputs)  | output latch |
| 9, A | received protocol word, low then latched high | transmit protocol word, low then high. Writing A sends the word |

Address 4 reads 0.

The clear caused by reading register 1 must cross into the `rx_iclk` domain, which
takes about three of its clock periods. Until the flag domain acknowledges it, the
bits being cleared read as 0 and do not pull `irq_n` low. A further read in that
window clears nothing, and any new flag it shows is cleared by the next read. Without
this, a fast interrupt handler would see the same event twice.

`irq_n` is low while any unmasked interrupt flag is set. On the chip it is an
open-drain pin. The command reset leaves the register bank and the PLL dividers
running, so the external PLLs stay locked.

## Modules

| File                     | Contents |
|--------------------------|----------|
| `fovit_pkg.sv`           | frame layout, alignment word, CRC polynomial, register addresses, interrupt vector type |
| `fovit_asic.sv`          | top: transmitter, receiver, register bank, PLL dividers, reset gating |
| `fovit_transmitter.sv`   | `tx_pcm_side` + two `async_fifo` + `tx_line_framer` |
| `tx_pcm_side.sv`         | PCM frame counter, FSX, FIFO write strobes |
| `tx_line_framer.sv`      | line frame counter, multiplexer, CRC generator, protocol shifter, FIFO start/slip control |
| `fovit_receiver.sv`      | `rx_line_deframer` + `crc_err_monitor` + `irq_ctrl` + two `async_fifo` + `rx_pcm_side` |
| `rx_line_deframer.sv`    | alignment search, demultiplexer, CRC checker, protocol word acceptance |
| `crc_err_monitor.sv`     | CRC error count per cycle, threshold |
| `irq_ctrl.sv`            | sticky interrupt flags, clear-on-read |
| `rx_pcm_side.sv`         | PCM frame counter, FSR, FIFO read control |
| `mcu_interface.sv`       | register bank, interrupt request, general-purpose I/O |
| `async_fifo.sv`          | dual-clock FIFO with levels and overflow/underflow flags |
| `crc4.sv`                | serial CRC-4 |
| `clk_divider.sv`         | ÷N square-wave divider for the PLL clocks |
| `sync_2ff.sv`, `reset_sync.sv` | synchronisers |

Top-level parameters:

| Parameter        | Default |
|------------------|---------|
| `VID_FIFO_DEPTH` | 128     |
| `AUD_FIFO_DEPTH` | 32      |
| `CRC_THRESHOLD`  | 16      |

`rx_line_deframer` adds `CONFIRM_FRAMES` = 6 and `LOSS_FRAMES` = 3.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench              | What it does |
|------------------------|--------------|
| `tb_fovit_asic`        | Two chips joined by a modelled fibre pair, at default parameters. Unit A's clocks run 20 ppm fast and unit B's 20 ppm slow. It covers alignment, video and voice in both directions, protocol words, CRC errors from a noisy fibre, the threshold interrupt, LFA from a cut fibre and recovery, masking, a transmit slip, the command reset, GPIO and the PLL dividers. It counts each of these and fails if one never happens. |
| `tb_fovit_rs232_relay` | Two chips at default parameters. Each microcontroller model relays a serial port through the protocol registers, both ways at once: 24 bytes at the 19.2 kbit/s pace (one byte per 520.8 µs), then 24 at one byte per 250 µs. It checks order, loss, duplicates, the write-to-interrupt time (at most two frames; about 133 µs is seen) and a clean CRC count. |
| `tb_fovit_transmitter` | Finds the frames in the line output on its own. In every frame it checks the alignment word, the CRC, the video order, the voice samples and the protocol word. It also checks the FSX and frame periods, and a slip from a stopped video clock with the recovery after it. |
| `tb_fovit_receiver`    | Feeds generated frames after random bits. It checks alignment, video and voice order, FSR, the protocol word (rejected when the CRC is bad), CRC counting and the threshold, one missed alignment word against three, and the interrupt clears. |
| `tb_mcu_interface`     | Runs asynchronous bus cycles and checks every register: reset values, byte latches, clear-on-read, IRQ level and masking, GPIO, and that DATA is driven only during reads. |
| `tb_async_fifo`        | Random traffic at 2.048/2.304 MHz against a reference queue, plus full/overflow and empty/underflow. |
| `tb_crc4`              | Compares random messages with polynomial long division, and checks clear and hold. |
| `tb_clk_divider`       | Checks the period and the duty cycle. |

With Verilator 5, from the project root:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/fovit_pkg.sv tb/tb_fovit_asic.sv --top-module tb_fovit_asic --Mdir obj -o sim
./obj/sim
```

The end-to-end run simulates about 50 ms of link time in about a second.

## Departures and choices

**Frame overhead.** The original field list gives the alignment word 8 bits, but with
256 + 8 + 16 + 4 payload and CRC bits that makes 292, not the 288 that the 2.304 Mbit/s
line rate and the ×144 PLL require. This design keeps 288 bits and a 4-bit alignment
word. The short word is why alignment uses the parallel search.

**Choices made here** (the original description does not fix them):

- the alignment word 1101;
- bit order and CRC seed;
- FIFO depths and start levels;
- the CODEC timing (short frame sync, bits in the 8 clocks after it);
- the confirm and loss counts;
- the protocol acceptance rule;
- the CRC cycle and threshold;
- all register bit layouts and reset values.

**Divider assignment.** `clk_3`/`clk_4` divide `rx_clk2` by 128 and `rx_iclk` by 144.
Only this assignment gives 16 kHz from both.

**PLL clocks.** `rx_clk2` and `tx_iclk` are inputs, because they come from the
external PLLs.

**Threshold setting.** There is no register for the CRC threshold. It is a parameter.

**Not included.** The following are not part of this RTL:

- the analog PLLs and their loop filters;
- the laser driver;
- the PIN receiver and the clock recovery;
- the CODEC and the E1 line interface;
- the microcontroller and its memories;
- the board's address decoder;
- a CMI line coder.

The testbenches model the clocks and the microcontroller bus directly.
