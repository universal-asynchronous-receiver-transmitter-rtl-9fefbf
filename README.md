# UART with receive and transmit FIFOs

A Universal Asynchronous Receiver Transmitter moves bytes between a parallel
host interface and a two-wire serial line that carries no clock. Each byte
travels as a frame: one start bit (low), the data bits least significant bit
first, and one stop bit (high); the line idles high. Because sender and
receiver run from independent clocks, the receiver has to find the start of
each frame on its own and sample every bit near its middle.

This RTL implements a complete, synthesizable UART in SystemVerilog:

* a **baud rate generator** that derives two slow clocks from the system clock;
* a **receiver** that finds start bits with an 8x oversampling bit-cell clock
  and de-serialises frames;
* a **transmitter** that serialises frames at the bit clock;
* two **FIFOs**, one behind the receiver and one in front of the
  transmitter, so the host sees a simple 8-bit read/write port.

The frame format is 8N1 by default (8 data bits, no parity, 1 stop bit). The
data length is a build-time parameter. There is no parity and no error
output: a frame with a bad stop bit is dropped silently.

## Block structure

```
            +-------------+  bclkx8   +----------+ RDR / rxd_readyH  +------+  r_data, rx_empty
  rx ------>|             |---------->| uart_rx  |------------------>| fifo |<- rd_uart
            |  baud_gen   |           +----------+                   +------+
  clk ----->|             |  bclk     +----------+ DBUS / ~empty     +------+  w_data, wr_uart
            |             |---------->| uart_tx  |<------------------| fifo |-> tx_full
            +-------------+           |          |------------------>|      |
                                      +----------+   txd_doneH = rd  +------+
  tx <------------------------------------- txd
```

| Module        | Role |
|---------------|------|
| `uart`        | Top level: wires everything together, exposes the serial pins and the host port |
| `baud_gen`    | Divides `clk` into `bclkx8` (8x bit rate) and `bclk` (bit rate) |
| `uart_rx`     | Receiver: state machine, data shift register `RSR`, received data register `RDR`, two counters |
| `uart_tx`     | Transmitter: state machine, 9-bit shift register `TSR`, one counter |
| `fifo`        | First-word-fall-through FIFO, 4 words by default |
| `bit_counter` | Counter with clear/increment, used for all three counters in the receiver and transmitter |
| `edge_detect` | One-cycle pulse at the rising edge of `bclkx8` or `bclk` |
| `uart_pkg`    | Shared constants: default data width, oversampling factor, bit-cell counter width |

Everything runs on the single system clock. `bclkx8` and `bclk` are not used
as clocks. They are ordinary signals from flip-flops. The receiver and
transmitter each put them through a delay flip-flop and use `sig & ~delayed`
as a one-cycle clock enable (`bclkx8_rising`, `bclk_rising`). The design
therefore has one clock domain and no gated clocks.

## Baud rate generation

`baud_gen` counts `clk` cycles from 0 to `DIV-1`, where

    DIV = round(CLK_FREQ_HZ / (BAUD_RATE * 8))

`bclkx8` rises when the counter wraps and falls halfway through, so its period
is exactly `DIV` cycles. A 3-bit counter of `bclkx8` periods gives `bclk` as
its top bit. So `bclk` has a period of exactly `8*DIV` cycles, and each of its
rising edges falls on a `bclkx8` rising edge. At the defaults (50 MHz, 9600
baud) `DIV` is 651. One bit is then 5208 clock cycles, or 9600.6 baud, 0.006 %
fast. The rate is fixed when the design is built. There is no run-time divisor
register.

## Receiver: finding the middle of each bit

This is the part that needs the most care. The receiver's state machine
controls two counters:

* the **bit-cell counter** `ct2` (4 bits) counts `bclkx8` edges within one bit;
* the **received bit counter** `ct1` (3 bits for 8 data bits) counts data bits.

The state sequence is:

1. **IDLE** waits for a *falling edge* on `rxd`: high in the previous clock
   cycle, low now. It waits for an edge rather than a low level so that a line
   held low (a break, or a frame with a low stop bit) is not read as a string
   of start bits.
2. **START_DETECT** samples `rxd` at every `bclkx8` edge. A high sample means
   the low pulse was noise, and the receiver returns to IDLE. After 4 low
   samples the receiver is about half a bit into the start bit. It clears
   `ct2` and moves on.
3. **RECV_DATA** takes one sample every 8 `bclkx8` edges, so every sample lands
   in the middle of a data bit. Each sample is shifted into `RSR` from the top,
   so after 8 shifts `RSR[0]` holds the first bit received.
4. **STOP_BIT** waits 8 more edges to reach the middle of the stop bit. If
   `rxd` is high, it copies `RSR` into `RDR` and asserts `ok_en`. In either
   case it returns to IDLE. The stop bit's second half overlaps the next wait
   for a falling edge.

Because the start edge can fall anywhere within a `bclkx8` period, the sampling
point is off-centre by up to 1/8 of a bit. Together with the rounding of `DIV`,
this sets how much baud-rate mismatch the receiver tolerates. Over a 10-bit
frame that is roughly ±3 % in the worst case.

`rxd_readyH` is `ok_en` delayed by one flip-flop. It is a one-cycle pulse in
the cycle after `RDR` takes the new byte, about 9.5 bit periods after the start
edge. `RDR` keeps its value until the next good frame.

`rxd` goes into the state machine and shift register directly. If the serial
line comes from another clock domain, put a two-flip-flop synchroniser in
front of `rx`.

## Transmitter and its handshake with the FIFO

`TSR` is one bit wider than the data, and `txd` is `TSR[0]`:

* **IDLE**: on `txd_startH`, load `TSR = {DBUS, 1}`. The line is still high.
* **SYNCH**: at the next `bclk` edge, clear `TSR[0]`. This starts the start bit.
* **TDATA**: at each `bclk` edge, shift right with a 1 filling in from the top.
  The data bits come out, then the stop bit. The bit counter `bct` (4 bits for
  8 data bits) counts the shifts. When the stop bit has lasted one bit period,
  the state machine raises `txd_done`.
* **DONE**: one cycle, then IDLE.

`txd_doneH` is `txd_done` delayed by one flip-flop. In the top level it pops
the transmit FIFO, whose head word is on `DBUS` and whose `~empty` is
`txd_startH`. The DONE state makes IDLE look at `txd_startH` only after the
pop has taken effect. Without it, the transmitter would send the old head word
a second time.

Timing that follows from this:

* the start bit begins at the first `bclk` edge after the request, up to one
  bit period later;
* a frame lasts `DATA_BITS + 2` bit periods;
* back-to-back frames start `DATA_BITS + 3` bit periods apart (11 for 8 data bits), because the line stays high
  for one extra bit period between them.

## Host interface (`uart`)

| Port       | Dir | Width     | Meaning |
|------------|-----|-----------|---------|
| `clk`      | in  | 1         | system clock |
| `rst_n`    | in  | 1         | asynchronous reset, active low |
| `rx`       | in  | 1         | serial input |
| `tx`       | out | 1         | serial output, idles high |
| `r_data`   | out | DATA_BITS | oldest received byte (valid while `rx_empty` is low) |
| `rx_empty` | out | 1         | receive FIFO empty |
| `rd_uart`  | in  | 1         | one-cycle pulse: remove the oldest received byte |
| `w_data`   | in  | DATA_BITS | byte to send |
| `wr_uart`  | in  | 1         | one-cycle pulse: queue `w_data` for sending |
| `tx_full`  | out | 1         | transmit FIFO full: further writes are ignored |

The FIFOs are first-word fall-through: `r_data` shows the oldest word before
it is read, and after a read the next word appears in the following cycle. If
a byte arrives while the receive FIFO is full, that byte is lost (overrun).
The design has no overrun flag. A byte being transmitted stays in the transmit
FIFO until its stop bit ends, so the FIFO holds at most 4 bytes waiting,
including that one.

## Parameters

| Parameter                            | Default     | Notes |
|--------------------------------------|-------------|-------|
| `CLK_FREQ_HZ` (`uart`, `baud_gen`)   | 50 000 000  | this design's choice |
| `BAUD_RATE` (`uart`, `baud_gen`)     | 9600        | this design's choice |
| `DATA_BITS` (`uart`, `uart_rx`, `uart_tx`) | 8     | data bits per frame; counter widths follow |
| `FIFO_ADDR_W` (`uart`)               | 2           | FIFO depth is 2**FIFO_ADDR_W; this design's choice |
| `OVERSAMPLE` (`uart_pkg`)            | 8           | bit cells per bit; the receiver's thresholds assume 8 |

## What comes from the original description and what does not

These parts come from the original UART description:

* the block structure: baud generator, receiver, transmitter and two FIFOs;
* the FIFO port names and the way the FIFOs are wired to the receiver and
  transmitter;
* the receiver and transmitter internals: the state machine, counters, shift
  registers, `RDR`, and the edge-detecting flip-flops on the baud clocks;
* the signal names (`RSR`, `RDR`, `shftRSR`, `load_RDR`, `ok_en`, `rxd_readyH`,
  `TSR`, `loadTSR`, `start`, `shftTSR`, `txd_done`, `txd_doneH`, `bclkx8`,
  `bclk`);
* the 8-bit data path and the printed counter widths (3, 4 and 4 bits);
* the 8x bit-cell clock;
* the absence of error-checking logic.

The original description does not specify several details, so these are this
design's own choices:

* the state machines' states and thresholds;
* the LSB-first bit order;
* the nine-bit `TSR` with a 1 fill;
* the DONE state;
* receiving on a falling edge and dropping frames with a bad stop bit;
* the pulse form of `rxd_readyH` and `txd_doneH`;
* the baud divider;
* the FIFO depth and its full/empty behaviour;
* the reset values;
* the default clock and baud rate.

The top level connects the same generator to both the receiver and the
transmitter. The receiver takes the 8x clock and the transmitter the 1x clock.

The original description also mentions error detection in general terms. No
error detection is built beyond the stop-bit check, and there is no parity.
Sending 16 bits per frame is mentioned as a way to raise throughput. That is
available by building with `DATA_BITS = 16`, but it is not the default.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| Testbench        | What it checks |
|------------------|----------------|
| `tb_bit_counter` | clear/increment/wrap against a model, async reset |
| `tb_edge_detect` | exactly one pulse per rising edge of a random slow wave |
| `tb_baud_gen`    | `bclkx8` period = DIV, `bclk` period = 8*DIV, edge alignment; small and default instances |
| `tb_fifo`        | random traffic against a queue model, full/empty, ignored writes/reads |
| `tb_uart_rx`     | random bytes at random phase, latency (middle of stop bit), glitch rejection, dropped bad-stop frames |
| `tb_uart_tx`     | line decoding by an independent monitor, bit lengths, start delay, done pulse, back-to-back frames |
| `tb_uart`        | whole UART at 80 clocks/bit: loopback of 12 bytes, write-while-full, receive overrun, false start, bad stop bit; each mechanism must occur |
| `tb_uart_width`  | 16-bit and 5-bit builds in loopback, frame length `DATA_BITS+2` bits |
| `tb_uart_full`   | default parameters (50 MHz, 9600 baud), three bytes in loopback, bit period 5208 cycles |

All of these pass. The testbenches run in a two-state simulator and
initialise everything they read. To run one with Verilator:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_uart \
    -y rtl -y tb +libext+.sv -Irtl rtl/uart_pkg.sv tb/tb_uart.sv
./obj_dir/Vtb_uart
```

`uart_pkg.sv` must be read first. Verilator finds the other modules through
`-y`. Even at the default parameters, the full-size test takes well under a
second.

`fifo` and `uart_tx` contain concurrent assertions. The FIFO is never full
and empty at the same time, and its pointers meet when it is full or empty.
The transmit bit counter stays in range, and the line is high whenever no
frame is in progress.

## Limitations

* There is no parity, no framing-error or overrun flag, and no break
  detection.
* There is no input synchroniser on `rx`.
* The baud rate is fixed at build time.
* There is one idle bit period between back-to-back transmitted frames.
* The receiver's start detection (4 samples) and mid-bit sampling (every 8
  samples) are written for `OVERSAMPLE = 8`.
