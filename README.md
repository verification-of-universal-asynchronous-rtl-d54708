# UART with baud-rate generator and HD44780 display driver

A universal asynchronous receiver/transmitter (UART) moves bytes over a single
wire per direction, without a shared clock. Each byte is wrapped in a frame
that the receiver can find and check on its own. This design is a small,
synthesizable UART with three parts:

- a baud-rate generator, a frequency divider on the system clock;
- a transmitter that turns a parallel byte into a frame on `tx`;
- a receiver that finds frames on `rx`, turns them back into bytes and reports
  parity, framing and overrun errors.

The UART sits inside an application system: characters typed on a PC terminal
arrive over RS232 and are shown on an HD44780-based 16x2 character LCD.

Everything is SystemVerilog (IEEE 1800-2017) in one clock domain with an
active-low reset.

## The frame

Each frame is 11 bits. The line idles at 1.

| send order | 0     | 1 .. 8                   | 9           | 10   |
|------------|-------|--------------------------|-------------|------|
| bit        | start | data bit 0 .. data bit 7 | parity      | stop |
| value      | 0     | the byte, LSB first      | XOR of data | 1    |

Parity is even: the parity bit is 1 when the byte holds an odd number of
ones. For example, 10101011 has five ones, so its parity bit is 1. There is
exactly one stop bit. The next start bit may follow the stop bit at once.

`uart_pkg` defines the frame type (`frame_t`, bit 0 sent first) and the
functions `parity_of` and `build_frame`.

## Baud-rate generator (`baud_gen`)

A counter runs from 0 to `DIV-1` and wraps, so one bit period lasts `DIV`
system clocks. The generator does not make a second clock. It gives one-clock
enables instead:

- `tick` is high on the last clock of each bit period. The transmitter shifts on it.
- `mid_tick` is high `DIV/2` clocks into the period. The receiver samples on it.
- `clr` restarts the count.

The default is `DIV = 8` with a 10 MHz clock, which gives 1.25 Mbit/s. That is
the rate of the reference waveforms this design follows: a 3-bit count and one
baud pulse per wrap. For a standard rate, set `DIV = f_clk / baud`:

| rate (bit/s) | DIV at 10 MHz | actual rate | error   |
|--------------|---------------|-------------|---------|
| 110          | 90909         | 110.0       | 0.0 %   |
| 9600         | 1042          | 9597        | -0.04 % |
| 115200       | 87            | 114943      | -0.2 %  |
| 230400       | 43            | 232558      | +0.9 %  |

The counter is as wide as `DIV` needs. At 9600 baud a frame lasts
11 × 104.2 µs = 1.146 ms, so about 873 frames per second.

## Transmitter (`uart_tx`)

The transmitter has a hold register `df` and a shift register `data_frame`.

- `df` keeps the frame in the order it reads on a waveform: `{start, data[7:0], parity, stop}`.
- `data_frame` keeps the same bits in send order, with the start bit in bit 0.

**Loading.** While `wr_n` is low and the shift register is empty, the byte on
`data` is framed into both registers. `loaded` pulses for one clock.

**Shifting.** On each `tick`, `data_frame[0]` goes to the registered `tx`
output, and the register shifts right with zero fill.

**Empty.** After 11 ticks the register is all zeros, which is how it marks
itself empty. The stop bit then stays on the line until the next tick, and a
new byte can be loaded on the very next clock.

So with `wr_n` held low, frames go out back to back, one every `11 × DIV`
clocks, and each one carries `data` as it was when that frame was loaded.
A host that sends a string changes `data` after each `loaded` pulse.

**Latency.** The start bit appears on `tx` at the first tick after loading.
That is 1 to `DIV` clocks later, depending on the divider's phase.

## Receiver (`uart_rx`)

This is the most involved block. The incoming line has no relation to the
local clock, so the receiver must find each frame itself and sample each bit
away from its edges.

1. **Synchroniser.** `rx` passes through two flip-flops. Nothing else looks at the raw pin.
2. **Start detection.** While idle and `rx_en` is high, a 1→0 transition starts a frame. The receiver restarts its own `baud_gen` copy on that edge, so its `mid_tick` falls in the middle of every following bit.
3. **Start check.** At the centre of the start bit the line must still be 0. If it is not, the event was a glitch and the receiver goes back to idle.
4. **Sampling.** Eleven samples, one per bit period, enter the shift register `data_frame` from the top. After the last one, bit 0 holds the start bit, bits 8..1 the byte, bit 9 the parity bit and bit 10 the stop bit.
5. **Delivery.** At the centre of the stop bit the byte is copied into the hold register `data_out`. `rx_valid` pulses for one clock and `rx_full` is set. The receiver is idle again at once, so it catches a start bit that directly follows the stop bit.

The receiver resynchronises only on the start edge. The sender's rate must
therefore match to within about ±3 % at `DIV = 8`, where the sampling point
is only known to one clock, or one eighth of a bit. The margin approaches
±4.5 % at large `DIV`. The testbench checks ±3 %.

**Hold register and flags.** A reader acknowledges a byte with a one-clock
`rd` pulse, which clears `rx_full`. An assertion flags `rd` when there is no
byte. Each received byte comes with:

- `parity_err`: the parity bit is not the XOR of the data bits;
- `frame_err`: the stop bit was 0;
- `overrun_err`: the previous byte had not been read and has been overwritten.

`parity_err` and `frame_err` describe the byte in the hold register.
`overrun_err` stays set until the next `rd`.

**Timing.** The stop bit is sampled 10.5 bit periods after the start edge on
the pin, plus about three clocks for the synchroniser and the edge detector.
`rx_valid` follows one clock after that sample.

## UART core (`uart_tx_rx`)

The core joins one free-running `baud_gen`, which paces the transmitter, with
the receiver, which carries its own restartable copy of the divider.

With `loop_en` high, the receiver listens to the core's own `tx_out` instead
of the `rx` pin. This loopback is the self-test: write a byte, and about
11 bit periods later it shows up in `data_out`. With `loop_en` low, the core
is a normal full-duplex UART.

## Application system (`uart_lcd_top`, `lcd_ctrl`)

The top connects the core to `lcd_ctrl`, an HD44780 driver on the display's
8-bit bus.

**LCD controller.** After the power-up wait (15 ms), the controller sends four
commands:

- function set `0x38`: 8-bit bus, 2 lines;
- display on `0x0C`;
- clear `0x01`;
- entry mode `0x06`.

It then takes characters with a valid/ready handshake. Every bus write works
the same way:

1. RS and DB are set with E low for one clock.
2. E is held high for at least 250 ns.
3. E falls, and the controller waits the execution time: 40 µs, or 1.64 ms after clear.

R/W is tied to 0, so the busy flag is never read and all waits come from
`CLK_HZ`. After the 16th character the cursor moves to line 2 (`0xC0`). After
the 32nd it returns to line 1 (`0x80`), and new text overwrites the old.

**Glue logic in the top.**

- While the receive hold register is full, its byte is offered to the display.
- `rd` is pulsed when the display takes the byte.
- A byte with a parity or framing error is discarded instead of shown.

A display write takes 400 clocks at 10 MHz, but a frame at `DIV = 8` takes
only 88. Characters that arrive faster than the display accepts them
therefore overrun the hold register: `overrun_err` is set and the newest byte
wins. At a real terminal rate such as 9600 baud (`DIV = 1042`), a frame takes
far longer than a display write, and no overrun occurs.

The PC, the RS232 level converter and the LCD module are outside the design.
Their signals are top-level ports: `rx`, `tx`, `lcd_rs`, `lcd_rw`, `lcd_e`
and `lcd_db`. The transmitter, `wr_n`/`data_in` and the receive status are
brought out as well.

## Where this design makes its own choices

- **Bit rate.** One bit period is 8 clocks (1.25 MHz at 10 MHz). An alternative calculation of this UART uses 7 clocks (about 1.4 MHz). Set `DIV = 7` for that.
- **Bit order.** The reference waveform shows the shift register as the bit-reverse of the hold register. Read literally, that would send the MSB first. This design sends the LSB first, as the UART convention requires. The hold register `df` still has the reference layout, so byte 10111011 gives `df = 01011101101`.
- **No second clock.** The baud signal is a clock enable, not a clock. Bit changes therefore come one system clock after the point where a separate baud clock would rise.
- **Receiver internals.** Centre sampling with a restarted divider, the synchroniser, glitch rejection, the `rd`/`rx_full` handshake and the exact meaning of the error flags are this design's own. So are the loopback switch and the `rx_en` enable, which plays the role of the "receive" setting of the original write/read pin.
- **LCD controller.** The command set and times come from the HD44780 data sheet. The line handling and the discarding of bad bytes are choices made here.

## Files

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | frame type, parity and frame-building functions |
| `rtl/baud_gen.sv` | baud-rate divider |
| `rtl/uart_tx.sv` | transmitter |
| `rtl/uart_rx.sv` | receiver with error detection |
| `rtl/uart_tx_rx.sv` | UART core with loopback |
| `rtl/lcd_ctrl.sv` | HD44780 16x2 driver |
| `rtl/uart_lcd_top.sv` | application top |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_uart_baud_rates` |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/uart_pkg.sv tb/tb_uart_lcd_top.sv \
          --top-module tb_uart_lcd_top -o sim
./obj_dir/sim
```

Swap in any other `tb_*.sv` and its module name.

| testbench | what it shows |
|---|---|
| `tb_baud_gen` | tick spacing, mid-tick position and restart, for DIV = 8 and 5 |
| `tb_uart_tx` | bit-exact frames against a frame built independently; hold-register value; back-to-back spacing of 11 bit periods |
| `tb_uart_rx` | good bytes at a random phase; ±3 % rate error; parity, framing and overrun errors; glitch rejection; `rx_en`; `rx_valid` latency |
| `tb_uart_tx_rx` | loopback of test bytes with latency checks; pin-to-pin streaming; overrun |
| `tb_lcd_ctrl` | init sequence, character and cursor writes, E pulse width, command spacing |
| `tb_uart_baud_rates` | loopback at 110, 9600, 115200 and 230400 bit/s with exact frame spacing |
| `tb_uart_lcd_top` | end to end, all parameters at their defaults, including the full 15 ms power-up; see below |

`tb_uart_lcd_top` runs the top's mechanisms and counts each one: display
initialisation, loopback, characters on the rx pin, rejected parity and
framing errors, overrun, the moves to line 2 and back to line 1, and frames
on the tx pin. It takes a few seconds.

The testbenches use only `$urandom`, with no constraints. They reset every
state they read, so they run on a two-state simulator.
