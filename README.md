# Slow serial transmitter/receiver pair (1 or 10 baud)

This is a minimal asynchronous serial link for an FPGA board with a 50 MHz
clock. A transmitter sends bytes as frames: one low start bit, eight data bits
and one high stop bit, on a line that idles high. A receiver on the same board
reads the frames back from that line. A `speed` switch selects 1 baud or 10
baud. The rates are deliberately low, so the bits can be watched on an LED or
a display.

The receiver is the interesting part. The line carries no clock, so the
receiver samples it at 16 times the baud rate. It restarts a divide-by-16
counter on the falling edge of each start bit. This puts every sample near the
middle of a bit, whatever the phase between the two ends.

The RTL is a SystemVerilog re-implementation of a small student UART design
(originally VHDL for a Spartan-3E board). The frame format, the state machines,
the divider counts and the top-level glue follow that design. Where this code
differs, the differences are listed under [Departures](#departures-from-the-original-design).

## Files

| file | module | role |
|---|---|---|
| `rtl/uart_pkg.sv` | package | frame state enum, rate-select enum, bit-index helper |
| `rtl/selectable_clock.sv` | `selectable_clock` | 50 MHz → 16 / 1 / 10 / 160 Hz divider, square wave plus one-cycle tick |
| `rtl/clk_sampler.sv` | `clk_sampler` | 4-bit divide-by-16 counter with half-count alignment |
| `rtl/tx.sv` | `tx` | transmitter state machine |
| `rtl/rx.sv` | `rx` | receiver state machine (instantiates `clk_sampler`) |
| `rtl/rx_tx.sv` | `rx_tx` | top: two dividers, `tx`, `rx`, buffers, speed select |
| `tb/*_tb.sv` | | self-checking testbenches, one per module, plus `rx_tx_full_tb` |

## Clocking: one clock, enables at the bit rates

Everything runs on the single board clock `clk`. `selectable_clock` counts
board cycles up to a divisor, chosen by `{s1, s0}`, and wraps:

| `{s1,s0}` | divisor (cycles) | rate at 50 MHz | used for |
|---|---|---|---|
| 00 | 3,125,000 | 16 Hz | receiver sampling at 1 baud |
| 01 | 50,000,000 | 1 Hz | transmitter at 1 baud |
| 10 | 5,000,000 | 10 Hz | transmitter at 10 baud |
| 11 | 312,500 | 160 Hz | receiver sampling at 10 baud |

`out_clk` is a square wave that is high while the count is at most half the
divisor. `tick` is a single-cycle pulse on the cycle in which the count wraps,
which is the rising edge of `out_clk`. The transmitter and receiver use `tick`
as a clock enable; nothing is clocked by a divided clock. The top instantiates
two dividers, one for each direction. Both are reset together and their
divisors differ by exactly 16, so every sixteenth receiver tick falls on the
same cycle as a transmitter tick.

`speed = 1` gives 10 baud (transmitter 10 Hz, receiver 160 Hz).
`speed = 0` gives 1 baud (1 Hz and 16 Hz).

## Frame format

```
line  ‾‾‾‾‾|_____|  d7 |  d6 | ... |  d0 |‾‾‾‾‾‾‾‾‾‾‾
       idle start  bit0  bit1        bit7  stop  idle
```

The byte goes out **most significant bit first**. This is the bit order of the
original design. It is not the usual UART order, which is LSB first. The
transmitter and receiver here agree with each other, but this link will not
talk to a standard UART without changing `uart_pkg::bit_index`. There is no
parity bit.

## Transmitter (`tx`)

The transmitter is an eleven-state machine (`ST_IDLE`, `ST_START`,
`ST_D0`…`ST_D7`, `ST_STOP`) that moves one state per `baud_tick`.

- In idle, `tx_line = 1` and `done = 1`.
- If `ready` is high on a baud tick, the machine goes to the start bit and
  `done` falls.
- It sends `data[7]` … `data[0]`, then the stop bit, and returns to idle.

`done` is the flow control. `data` may change only while `done` is high.
An assertion (`a_data_stable`) flags a change while a frame is being sent.
With `ready` held high, a frame starts every 11 baud periods: one idle period
plus ten bit periods.

## Receiver (`rx`) and its sample counter (`clk_sampler`)

The receiver runs on `sample_tick`, at 16× the baud rate. It keeps the line
value from the previous tick, so it can see a falling edge.

1. **Idle.** A high sample followed by a low one is a start edge. The machine
   enters `ST_START`. On the same tick it makes `clk_sampler` load `1000`,
   which is half of the 4-bit count.
2. **Start check.** `clk_sampler.full` (count `1111`) comes 8 ticks later,
   near the middle of the start bit. If the line is still low, the frame goes
   on. If it is high, the low was a glitch, and the machine goes back to idle.
3. **Data bits.** After that, `full` comes every 16 ticks, near the middle of
   each bit. Each data state stores the line into `data[7]`, then
   `data[6]`, … `data[0]`.
4. **Stop check.** In `ST_STOP`, `err` is set if the line is low (a framing
   error) and cleared if it is high. The machine returns to idle.

Ticks are numbered from the last tick that saw the line high, which is tick 0.
The edge is seen on tick 1. The start check is on tick 9, and the data bits
are taken on ticks 25, 41, …, 137. The stop check and the return to idle are
on tick 153. So each sample lands 9/16 of the way into its bit. The tolerable
baud-rate mismatch is roughly ±4 %.

`ready` is high only in idle. That is when `data` is stable and `err`
describes the last frame. After reset, `err = 1` and `data = 0`.

Starting on an *edge* (not on a low level) matters after a framing error.
The receiver returns to idle in the middle of the bad stop bit, with the line
still low. A level test would take that low as a new start bit.

There is no metastability synchronizer on `rx_line`. In `rx_tx` the line comes
from the transmitter in the same clock domain. If you connect an external
line, put two flip-flops in front of it.

## Top level (`rx_tx`)

The top wires the transmitter's `tx_line` straight to the receiver's `rx_line`,
as a loop-back on one board.

- `tx.ready` is tied high, so the pair transmits continuously.
- `input_buffer` copies `din` on every cycle while `tx.done` is high. It holds
  for the whole frame, so changes on `din` during a frame go out in the next
  one.
- `dout` copies the receiver's byte while the receiver is idle and `err` is
  low. It therefore keeps the last byte that arrived without a framing error.
- `lcd_int1`…`lcd_int4` are the low and high nibbles of `input_buffer`, then
  of the receive buffer. These are the four hex digits that the board's LCD
  driver displays. That driver is not part of this RTL. Connect these ports to
  your own display logic.

Parameters `DIV_16HZ`, `DIV_1HZ`, `DIV_10HZ` and `DIV_160HZ` are passed to both
dividers. Keep `DIV_1HZ = 16 × DIV_16HZ` and `DIV_10HZ = 16 × DIV_160HZ` if you
change them. Changing `speed` in the middle of a frame corrupts that frame.
Change it between frames.

Reset is synchronous and active high on every module.

## Departures from the original design

- **Clock enables instead of derived clocks.** The original clocks the
  transmitter and receiver with the divider outputs. Here they run on the board
  clock with one-cycle enables. `selectable_clock` still provides the square
  wave on `out_clk`, which the top leaves unused.
- **Registers instead of latches.** The original's input and output buffers
  are level-sensitive latches. Its receiver data bits are transparent while
  their state is active. Here they are edge-triggered registers that capture
  the same values: each data bit is stored at the middle-of-bit sample.
- **Start on a falling edge.** The original description asks for a falling
  edge. Its code tests for a low level. This RTL detects the edge.
- **Synchronous load of the sample counter.** The original clears the
  counter to the half count asynchronously while the receiver sits in idle
  with the line low. Here the load happens on the tick that sees the edge,
  which gives the same sample timing.
- **Reset port.** The original relies on power-up initial values. Here a
  reset gives the same values: idle, `err = 1`, data 0, counters 0.
- **160 Hz.** A comment in the original divider says the `11` rate is
  160 kHz. Its count, 312,500, and the rest of the design give 160 Hz, which is
  what is built.
- The LCD driver and the board-specific pins (LCD bus, flash disables) are
  not included.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `selectable_clock_tb` | tick period and high time for all four selections at small divisors; periods at the real 160 Hz and 16 Hz counts |
| `clk_sampler_tb` | random enables and aligns against a reference counter; `full` exactly 7 ticks after align, then every 16 |
| `tx_tb` | 40+ frames bit by bit, `done` timing, idle while `ready` is low, 11-period repeat |
| `rx_tb` | good frames, frames with a low stop bit, short glitches; `ready` and data timing to the tick (153) |
| `rx_tx_tb` | end to end at scaled divisors: both speeds, speed switches, `din` changes during frames, a forced low stop bit; an independent line decoder |
| `rx_tx_full_tb` | end to end at the real divisors and 10 baud: two bytes, 55,000,000-cycle frame period, 153-tick receive latency |

The full-size test takes about a minute. A full-size frame at 1 baud is
550 million cycles. It was not simulated; 1 baud is covered only at scaled
divisors.

To run a testbench with Verilator:

```sh
verilator --binary --timing --assert -Irtl -y rtl \
  rtl/uart_pkg.sv tb/rx_tx_tb.sv --top-module rx_tx_tb
./obj_dir/Vrx_tx_tb
```

Replace `rx_tx_tb` with any other testbench name. `-y rtl` lets Verilator find
the modules that the testbench instantiates.
