# Multichannel UART controller with per-channel baud rates

A PC usually has one serial port at one baud rate, while the equipment it
controls (motor drives, sensor boards, sub-controllers) often runs at
different rates: 57600 here, 19200 there, 9600 elsewhere. Sharing one line
makes every device wait for the others. This controller puts several UARTs
side by side on one chip. Each one has its own baud rate generator, so all
channels can talk at the same time. A pair of asynchronous FIFOs couples the
PC's port to one equipment port, which turns the controller into a **baud
rate converter**: bytes arrive from the PC at 115200 baud and leave for the
equipment at 57600 baud, and the replies travel back the same way.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. Self-checking
testbenches are in `tb/`.

## Block map

```
            PC (115200)                                   local processor
               |                                                |
          com_rxd/com_txd                          data bus (bus_* ports)
               |                                                |
   +-----------v----------+     +----------------------------+  |
   | COM     uart_channel |<--->| fifo_block                 |  |
   +----------------------+     |  FIFO11 (COM -> COM1)      |  |
                                |   status_detector (Full11) |  |
   +----------------------+     |   status_buffer            |  |
   | UART1   uart_channel |<--->|  FIFO22 (COM1 -> COM)      |  |
   | (COM1)               |     |   status_detector (Full12) |  |
   +----------------------+     |   status_buffer            |  |
   | UART2   uart_channel |<----+----------------------------+--+
   | UART3   uart_channel |<--------------------------------------+
   | UART4   uart_channel |<--------------------------------------+
   +----------------------+
   baud_rate_unit: one baud setting register + baud_rate_gen per channel,
                   giving every channel a bit-rate enable and a 16x enable

   uart: stand-alone 9600-baud UART (ports sc_*), beside the controller
```

| Module | Role |
|---|---|
| `mc_uart_top` | Top level: five channels, FIFO block, baud rate unit, data bus decode, and the stand-alone UART |
| `uart_channel` | One UART block: Transmit Buffer, transmit shift register, receive shift register, Receive Buffer, Control and Status registers |
| `uart_tx` | Transmit shift register and its four-state machine |
| `uart_rx` | Receive shift register, receive buffer and its three-state machine, with 16x oversampling |
| `baud_rate_gen` | A 32-bit bit-rate timer and a 16-bit oversampling timer |
| `baud_rate_unit` | The baud setting registers of all channels and their timers |
| `fifo_block` | The COM <-> COM1 converter: two FIFOs with their full detectors and output buffers |
| `async_fifo` | Dual-clock FIFO with Gray-coded pointers |
| `status_detector` | Full flag of an asynchronous FIFO |
| `status_buffer` | One-word holding stage after a FIFO |
| `uart` | Single UART at a fixed rate (9600 baud from 50 MHz) |
| `uart_pkg` | State encodings, divisor formulas, register map |

Everything runs on one system clock (`clk`, 50 MHz by default). The baud rates
reach the UARTs as one-cycle **clock enables**, not as clocks.

## Serial frame and the two bit engines

The frame is always 8N1: one low start bit, eight data bits (least significant
bit first), one high stop bit. There is no parity.

### Transmitter (`uart_tx`)

There are four states: `STATE_IDLE`, `STATE_START`, `STATE_DATA` and
`STATE_STOP`. Every transition except the one out of idle waits for the
bit-rate enable `clken`:

- **IDLE**: `wr_en` loads `din` into the data register, clears `bitpos` and
  moves to START. `tx` stays high.
- **START**: on `clken`, `tx` goes low (start bit).
- **DATA**: on each `clken`, `tx` takes `data[bitpos]` and `bitpos` counts
  up. The enable that sends bit 7 also moves the machine to STOP.
- **STOP**: on `clken`, `tx` goes high (stop bit) and the machine returns to
  IDLE.

`tx_busy` is high in every state except IDLE. It falls when the stop bit
begins, and a new `wr_en` is accepted from then on. The new start bit waits
for the next enable, so the stop bit always lasts one full bit time. From
`wr_en` to the start edge takes up to one bit time, because the bit-rate timer
runs freely and is not restarted.

### Receiver (`uart_rx`): the part to read carefully

The receiver is driven by an enable at 16 times the bit rate. A 4-bit
`sample` counter times the bits:

- **RX_STATE_START**: counting begins on the first enable that sees `rx`
  low. After that, `sample` counts up on every enable. It stops on the enable
  where `sample` is 15, which is 16 enables after the first low sample. The
  machine then clears `sample`, `bitpos` and the shift register (`scratch`)
  and enters DATA.
- **RX_STATE_DATA**: `sample` counts 0..15 for each bit. At sample 8 (about
  the middle of the bit) `rx` is written into `scratch[bitpos]` and `bitpos`
  counts up. Once `bitpos` has reached 8, the enable at sample 15 moves the
  machine to STOP.
- **RX_STATE_STOP**: the machine leaves on sample 15. It leaves early if
  `rx` is already low at sample 8 or later, which means the next start bit has
  begun. On leaving, it copies `scratch` into `data`, sets `rdy` and pulses
  `done`.

What this means for timing:

- The start bit is timed from the first low sample, which comes up to one
  sample period after the falling edge. The start state lasts 16 sample
  periods. Data bit *n* is sampled 24 + 16*n sample periods after the first
  low sample. That is the ideal bit centre, and it is never more than one
  sample period late.
- `rdy` rises at the end of the stop bit. A byte is ready about 10 bit times
  after its start edge. With the transmitter's wait for its first enable, the
  stand-alone UART takes 10 to 11 bit times from `wr_en` to `rdy` in loopback.
- The stop bit's level is never checked. A frame with a bad stop bit is still
  delivered, and there is no framing-error flag.
- `rdy` stays set until `rdy_clr`. A new byte overwrites `data` whether or not
  the last one was read. `uart_channel` detects that case and reports it as
  overrun.

## Baud rate generation

`baud_rate_gen` holds two free-running dividers:

- a **32-bit** timer that gives `txclk_en` once every `tx_div` cycles;
- a **16-bit** timer that gives `rxclk_en` once every `rx_div` cycles.

The divisors are inputs, so they can change at any time.
`baud_rate_unit` keeps one pair of divisor registers (the baud setting
register) per channel. Software can rewrite them over the data bus. The reset
values are computed at elaboration as `round(CLK_HZ/baud)` and
`round(CLK_HZ/(16*baud))`:

| Channel | Reset baud | tx_div | rx_div | Receive rate error |
|---|---|---|---|---|
| 0 COM (PC) | 115200 | 434 | 27 | -0.5 % |
| 1 UART1 / COM1 | 57600 | 868 | 54 | -0.5 % |
| 2 UART2 | 19200 | 2604 | 163 | +0.2 % |
| 3 UART3 | 9600 | 5208 | 326 | +0.2 % |
| 4 UART4 | 9600 | 5208 | 326 | +0.2 % |

To change a rate, write both divisors. For another clock, set the `CLK_HZ`
parameter of `mc_uart_top`. The reset divisors follow from it.

## The COM <-> COM1 converter (`fifo_block`)

Two FIFOs carry traffic in opposite directions:

- **FIFO11**: every byte COM receives from the PC goes in. Its output feeds
  COM1's Transmit Buffer.
- **FIFO22**: every byte COM1 receives goes in. Its output feeds COM's
  Transmit Buffer.

Each FIFO has three parts:

1. **Status detector** (`status_detector`). It sets the FIFO's full flag
   (Full11 or Full12). The test is on Gray-coded pointers: the write pointer
   after the write equals the synchronised read pointer with its two top bits
   inverted.
2. **The FIFO** (`async_fifo`, 16 entries by default). It uses separate write
   and read clocks, binary plus Gray pointers with a wrap bit, and two-flop
   synchronisers. The empty flags are Empty11 and Empty12. The read port
   shows ahead: `rdata` is the oldest word whenever empty is low.
3. **Status buffer** (`status_buffer`). This one-word stage pops the FIFO
   whenever it is free and holds the word with a valid flag. The word is
   written into the UART's Transmit Buffer as soon as that buffer is empty.
   A take and a refill can happen in the same cycle.

**Flow control.** A received byte moves into the FIFO only when Full is low.
While the FIFO is full, the byte waits in the UART's Receive Buffer. Nothing
is lost until a second byte arrives on that line and overwrites the first.
That is an overrun, shown in the channel's status. The serial links
themselves have no hardware handshake. A PC that sends a long burst faster
than COM1 can drain it must therefore stay within the buffering:

    16 (FIFO) + 1 (status buffer) + 1 (Transmit Buffer) + 1 (shift register)
    + 1 (Receive Buffer) = 20 bytes

plus whatever COM1 sends during the burst. While COM1's transmitter is
disabled (shift register idle), Full11 rises after 18 bytes and a 19th waits
in COM's Receive Buffer. The top-level testbench checks exactly this case.

In `mc_uart_top`, both sides of the FIFOs use the same clock. The FIFOs keep
two clock ports so that the channels can be split into separate clock
domains.

## UART block (`uart_channel`)

Each channel has two holding registers in front of its bit engines. Writing
the **Transmit Buffer** (`tx_wr`, ignored while `tx_full`) lets software or
the FIFO block queue a second byte while the first is still shifting. The
**Receive Buffer** is the receiver's `data`/`rdy` pair. `rx_rd` takes its
byte.

| Control bit | Meaning (reset value 0x03) |
|---|---|
| 0 | transmit enable: the Transmit Buffer moves to the shift register only when set |
| 1 | receive enable: when clear, the receiver sees an idle line |
| 2 | loopback: the receiver listens to the channel's own TXD |

| Status bit | Meaning |
|---|---|
| 0 | transmitter busy |
| 1 | Transmit Buffer full |
| 2 | Receive Buffer holds a byte |
| 3 | overrun: a byte arrived before the previous one was taken (cleared by `rx_rd`) |

## Data bus (`mc_uart_top`)

The bus is a plain synchronous register bus with one access per cycle.
`bus_addr[5:3]` selects the channel: 0 is COM, 1..4 are UART1..UART4.
`bus_addr[2:0]` selects the register:

| Reg | Name | Access |
|---|---|---|
| 0 | DATA | write: Transmit Buffer of UART2..4. Read: Receive Buffer. Reading UART2..4 also takes the byte. |
| 1 | CTRL | read/write, bits as above |
| 2 | STATUS | read: bits 3:0 are the channel status, bits 7:4 are {Empty12, Full12, Empty11, Full11} |
| 3 | TXDIV | read/write: clock cycles per bit (32 bits) |
| 4 | RXDIV | read/write: clock cycles per 1/16 bit (16 bits) |

Read data is registered and appears on `bus_rdata` on the cycle after
`bus_rd`. Writes to the DATA registers of COM and UART1 are ignored, because
the FIFO block owns those data paths. A DATA write while the Transmit Buffer
is full is lost. Poll STATUS bit 1 before writing.

Top-level ports: `clk`, `rst_n` (active low, asynchronous), the bus,
`com_rxd`/`com_txd`, `ch_rxd[3:0]`/`ch_txd[3:0]` (UART1..UART4, bit 0 is
UART1), and `fifo_flags[3:0]` = {Empty12, Full12, Empty11, Full11}.

## Stand-alone UART (`uart`)

This is the single UART in its simplest form. One fixed-rate baud generator
(9600 baud from a 50 MHz `clk_50m`) drives one transmitter and one receiver,
with the ports `din[7:0]`, `wr_en`, `rdy_clr`, `rx` in and `dout[7:0]`,
`rdy`, `tx`, `tx_busy` out (plus `rst_n`). `mc_uart_top` instantiates it
beside the controller under the `sc_*` ports. It shares only clock and reset.

## Origin of the design choices

The following come from the description this RTL implements:

- the transmitter's four states and the receiver's three states, with their
  sample and bit-position conditions;
- 16x oversampling;
- the 32-bit and 16-bit baud timers and the baud setting register;
- the parts of the UART block: buffers, shift registers, control and status
  registers;
- the FIFO block: two asynchronous FIFOs with status detectors and status
  buffers between COM and COM1;
- four UARTs plus the PC port;
- the example baud rates 115200 / 57600 / 19200 / 9600;
- the 50 MHz clock and the 9600-baud loopback test of the stand-alone UART,
  with its port list.

The following are this design's own choices, because the description leaves
them open:

- the data bus protocol and register map;
- the meaning of each control and status bit, and the overrun flag;
- the FIFO depth (16) and the Gray-code full/empty method;
- what the status buffer does;
- the direction of each FIFO;
- back-pressure into the Receive Buffer;
- one system clock with clock enables;
- the reset values;
- rounding of the divisors;
- LSB-first bit order.

Where the sources disagree on the receiver's early exit from the stop state
("greater than eight" against "at least eight"), the RTL uses `sample >= 8`.

The original work also reports FPGA power, junction temperature and timing
over a range of clock frequencies, ambient temperatures and airflows. Those
are properties of a particular FPGA implementation and are not modelled
here. The stand-alone UART's 23 signal ports match the 23 I/O pins reported
for it.

## Limits

- 8N1 frames only: no parity, no 2-stop-bit mode, no framing or break
  detection.
- No hardware flow control on the serial lines. Overrun is reported, not
  prevented.
- No interrupts. Software polls STATUS.
- The number of channels is fixed at five by the top level's wiring (COM
  plus four). `baud_rate_unit` itself is parameterised by `NCH`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/uart_pkg.sv tb/tb_mc_uart_top.sv \
          --top-module tb_mc_uart_top -Mdir obj_top
obj_top/Vtb_mc_uart_top
```

Replace the testbench name to run any other. `-y rtl` lets Verilator find
each module in `rtl/<name>.sv`.

| Testbench | What it checks |
|---|---|
| `tb_uart_tx` | frame bits against a reference frame, `tx_busy` length (9 bit times from start edge), `wr_en` ignored while busy |
| `tb_uart_rx` | random bytes decoded, `rdy`/`rdy_clr`, one `done` per frame, back-to-back frames with shortened stop bits |
| `tb_baud_rate_gen` | enable periods equal the divisors, including on-the-fly changes |
| `tb_baud_rate_unit` | reset divisors for the five rates, per-channel periods, register writes reach only their channel |
| `tb_uart` | stand-alone UART at 50 MHz / 9600 baud in loopback: bytes 0..255, each returned in 10-11 bit times |
| `tb_uart_channel` | Transmit Buffer double buffering, receive, overrun, loopback, transmit and receive disable |
| `tb_status_detector` | full flag for every pointer pair, against a binary reference |
| `tb_async_fifo` | ordering through a 10/37 clock-ratio FIFO, full at 16, empty flag while draining |
| `tb_status_buffer` | order, no loss or repeat, one word per cycle at full rate |
| `tb_fifo_block` | both directions on unrelated clocks, Full11 and back-pressure without loss |
| `tb_mc_uart_top` | whole controller at default parameters: a 24-byte 115200 -> 57600 burst; back-pressure with UART1's transmitter disabled (Full11 after exactly 18 bytes, the 19th held in COM's Receive Buffer, all delivered in order after re-enabling); the 57600 -> 115200 return path; reset register values; simultaneous traffic on UART2..4; a baud change to 38400; loopback; overrun; the stand-alone UART |

All testbenches finish in seconds. `tb_mc_uart_top` and `tb_uart` run with
every parameter at its default.
