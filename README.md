# Low-power UART with Gray-code counters

A UART (universal asynchronous receiver and transmitter) that sends and
receives 8-bit words over a two-wire serial line. It saves dynamic power by
counting in Gray code. A UART spends most of its switching in counters: the
baud-rate divider runs on every system clock, and the transmitter and the
receiver each count ticks within a bit and bits within a word. A binary counter
flips two or more flip-flops on half of its increments, averaging almost two
bit flips per count. A Gray counter flips exactly one. Dynamic power follows the
number of transitions per clock, so every counter in this UART is a Gray
counter.

Measured on this RTL: a divider cycle of 256 counts makes 256 register
transitions. A binary divider would make 510. Over three complete frames, all
six counters of the UART make 49.7% fewer transitions than binary counters
holding the same counts (`tb/tb_switching_activity.sv`). That is a count of
transitions, not a power figure.

## Block structure

```
             tx_data[7:0] --> tx_hold_reg --+
             new_tx_data  --> tx_busy ------+--> transmitter --> ser_out
                                                   ^
 clock --> baud_generator --- baud_clk_16 ---------+
 baud_clk <--'                                     v
                                ser_in  -->  receiver
 new_rx_data <-- rx_busy <-----------------------+ |
 rx_data[7:0] <-- rx_hold_reg <--------------------+
```

| File | Module | Role |
|---|---|---|
| `rtl/uart.sv` | `uart` | top level, wires the three blocks |
| `rtl/baud_generator.sv` | `baud_generator` | divides the clock down to 16 ticks per bit |
| `rtl/uart_transmitter.sv` | `uart_transmitter` | hold register, busy flag, parallel-to-serial |
| `rtl/uart_receiver.sv` | `uart_receiver` | synchroniser, oversampling, serial-to-parallel, hold register |
| `rtl/gray_counter.sv` | `gray_counter` | the Gray counter used everywhere |
| `rtl/gray_to_bin.sv`, `rtl/bin_to_gray.sv` | | the two XOR chains inside the counter |
| `rtl/uart_pkg.sv` | `uart_pkg` | oversampling constants, frame-state enum, parity function |

The transmitter and the receiver share one tick, `baud_clk_16`, so they always
run at the same bit rate. The two directions are independent, so the UART is
full duplex. Simplex or half-duplex use only means leaving one direction idle.

## The Gray counter

`gray_counter` keeps the count in Gray code in its register. The next state is
built in three steps:

1. A Gray-to-binary XOR chain turns the register into binary:
   `b[MSB] = g[MSB]`, `b[i] = b[i+1] ^ g[i]`.
2. One is added.
3. A binary-to-Gray stage turns the sum back into Gray code:
   `g = b ^ (b >> 1)`.

Only the register's Q outputs and the logic they drive see the
single-bit-per-step behaviour. The adder and the XOR chains still switch
internally. The binary value from step 1 also comes out of the counter as
`bin_q`, so the logic around the counter can compare against or index with
plain binary numbers at no extra cost.

Interface:

- `en` advances the count.
- `clr` forces the count to 0.
- `rst` is a synchronous, active-high reset.
- `last` flags the state `MODULUS-1`.

With `MODULUS = 2**WIDTH` (every instance in this design) the count wraps
without extra logic, and the wrap also changes a single bit (`100…0` → `0…0`).
A smaller modulus adds a compare that forces 0 after `MODULUS-1`. That one step
can then flip several bits.

## Baud generator and bit timing

`baud_generator` is an 8-bit, free-running Gray counter on the system clock.
`baud_clk_16` is high for one clock while the count is at 255, so it comes once
every `DIVISOR` = 256 clocks. A second, 4-bit Gray counter advances on each
tick. Its top bit is `baud_clk`, a square wave at the bit rate with 50% duty.
The top bit of a Gray code equals the top bit of the binary count, so no extra
logic is needed.

    bit rate = f_clock / (16 * DIVISOR) = f_clock / 4096 by default

For the common rates, that means:

| Bit rate (bit/s) | Clock needed |
|---|---|
| 1200 | 4.9152 MHz |
| 9600 | 39.3216 MHz |
| 38400 | 157.2864 MHz |

For any other clock, set `DIVISOR` (at most 256 with the 8-bit divider). Any
`DIVISOR` below 256 gives up the single-bit wrap of the divider.

## Frame format

The line idles high. A frame is:

1. one start bit, 0;
2. 8 data bits, least significant first;
3. a parity bit, if `parity_en` is set;
4. one stop bit, 1.

The parity bit makes the number of ones in data plus parity even
(`parity_odd = 0`) or odd (`parity_odd = 1`). Each bit lasts 16 ticks. A frame
is 160 ticks long without parity and 176 with it.

## Transmitter

A byte is accepted when `new_tx_data` is high on a clock where `tx_busy` is low.
It is copied into `tx_hold_reg`, and the parity settings are latched at the same
moment. `tx_busy` goes high. The start bit begins at the next tick, so every bit
on the line, the start bit included, is exactly 16 ticks long. `ser_out` is
registered, so the line lags the internal state by one clock.

The data is never shifted. A 4-bit Gray counter counts ticks within the bit. A
3-bit Gray counter holds the bit index, and `ser_out` selects
`tx_hold_reg[index]`. The eight held flip-flops therefore do not toggle during
the frame.

`tx_busy` falls on the tick that ends the stop bit. A new byte can be loaded in
that same clock. A `new_tx_data` pulse while `tx_busy` is high is ignored.

## Receiver (the part with the subtle timing)

`ser_in` first goes through a two-flip-flop synchroniser. The synchroniser
resets to 1, the idle level. Everything after that happens on `baud_clk_16`
ticks:

- **Start detection.** In idle, the line is looked at on every tick. A tick
  that sees 0 after a tick that saw 1 starts a frame, and the tick counter
  starts from 0. Requiring a high-to-low change means that a line held low
  cannot start a frame: a broken stop bit or a break must return high first.
- **Start check.** Seven ticks later, near the middle of the start bit, the
  line is sampled again. If it is high, the low level was a glitch and the
  receiver goes back to idle. Otherwise the tick counter restarts from 0.
- **Bit sampling.** Every 16th tick from the start check falls near the middle
  of the next bit. The data bits, the parity bit (if enabled) and the stop bit
  are sampled at these ticks. Each data bit is written straight into its place
  in a buffer, chosen by a 3-bit Gray bit index.
- **Stop bit.** If the stop bit is high, the buffer is copied to `rx_data`
  (the hold register). `new_rx_data` is high for one clock, and `parity_error`
  is updated. If the stop bit is low, `rx_data` keeps its old value and
  `frame_error` is set. Both error flags stay until the next frame ends.

The line is seen 2 clocks late and the start edge is found up to one tick late.
So the samples fall between 7 and 8 ticks into each bit, plus 2 clocks. This
tolerates a sender that is about 3% too fast or too slow; the receiver
testbench checks both. `parity_en` and `parity_odd` are taken when a start bit
is detected. `rx_busy` is high from start detection until the stop-bit sample.

## Top-level interface (`uart`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clock`, `reset` | in | 1 | system clock; synchronous active-high reset |
| `tx_data`, `new_tx_data` | in | 8, 1 | byte to send and its one-clock load strobe |
| `tx_busy` | out | 1 | a byte is held or being sent; loads are ignored |
| `ser_out` | out | 1 | serial output, idle high |
| `ser_in` | in | 1 | serial input (asynchronous, synchronised inside) |
| `rx_data`, `new_rx_data` | out | 8, 1 | last byte received; one-clock pulse when it changes |
| `rx_busy` | out | 1 | a frame is being received |
| `parity_error`, `frame_error` | out | 1 | status of the last frame |
| `parity_en`, `parity_odd` | in | 1 | frame format for both directions; change only when both sides are idle |
| `baud_clk` | out | 1 | bit-rate square wave |
| `counter_out` | out | 8 | Gray-coded divider count |

Parameters:

- `DIV_WIDTH` (8): width of the divider.
- `DIVISOR` (256): clock divide ratio per tick.
- `DATA_BITS` (8): data bits per frame, 2 to 32.

## What is given and what is chosen

Taken from the source design:

- the three-block structure and the block and signal names;
- the 16x tick;
- the frame format: start 0, LSB first, optional odd or even parity, stop 1;
- the Gray counter's datapath: Gray-to-binary, add one, binary-to-Gray,
  register;
- the synchronous reset;
- the 8-bit width of the divider;
- the list of standard bit rates.

Chosen here, where the source is silent:

- **Divide ratio.** The divider is read as free-running over all 256 states,
  because the Gray divider shows no terminal-count logic. A binary divider
  shown for comparison wraps after 100, which is a divide-by-101. If the
  intended ratio is 101, set `DIVISOR = 101`.
- **Tick decode.** The tick comes from the count's last state. The source only
  shows a decode table without contents.
- **`baud_clk`.** The output stage that makes `baud_clk` is this design's own.
- **Data width and stop bits.** 8 data bits and one stop bit are assumed.
- **Transmit handshake.** Load while not busy, and the start bit waits for a
  tick.
- **Receiver details.** The mid-bit sampling points, the glitch check, the
  edge-only start detection, the synchroniser, and the `parity_error` and
  `frame_error` outputs.
- **Counters inside the transmitter and receiver.** Their Gray tick and bit
  counters, and indexing the data instead of shifting it, extend the low-power
  idea to those blocks. The source reports lower power for them with Gray
  counters but does not show their insides.
- **Extra ports.** `tx_busy`, `rx_busy` and `counter_out` are brought out at
  the top.

Power is not modelled. The source reports power from a vendor tool:

| Block | Binary counters | Gray counters | Saving |
|---|---|---|---|
| Baud generator | 4.100 W | 1.505 W | 63% |
| Transmitter | 0.550 W | 0.351 W | 36% |
| Receiver | 0.381 W | 0.151 W | 60% |

The only related measure in this RTL is the count of counter-register
transitions described at the top.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_gray_counter` | Gray code, binary value and `last` at every step; exactly one bit flips per step, the wrap included; hold, clear and reset; a modulus-10 instance; 256 transitions per cycle against 510 for binary |
| `tb_baud_generator` | `counter_out`, the tick and `baud_clk` at every clock against a cycle counter, for divide-by-256 and divide-by-10; the `baud_clk` period is exactly 4096 clocks |
| `tb_uart_transmitter` | `ser_out` at every clock of 25 frames (values and exact 16-tick bit length) with parity off, even and odd; `tx_busy` timing; loads ignored while busy |
| `tb_uart_receiver` | bytes in all parity modes; parity and framing errors; a rejected quarter-bit glitch; senders 3% fast and slow; timing of the `new_rx_data` pulse |
| `tb_uart` | the whole UART at default parameters (see below) |
| `tb_switching_activity` | counter transitions with Gray against binary, at default parameters |

`tb_uart` runs the whole UART at its default parameters, 4096 clocks per bit.
It covers ten looped-back bytes and testbench-driven frames with a parity error
and a framing error. It also sends a start glitch and three full-duplex
exchanges, where a frame is received while another is sent and the sent frame
is decoded by the testbench. It counts each of these mechanisms and fails if
any never happened. It also checks the receive latency, the frame length and
the `baud_clk` period in clocks.

To run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/uart_pkg.sv tb/tb_uart.sv --top-module tb_uart -o sim
./obj_dir/sim
```

Replace `tb_uart` with any testbench name. Each run takes a few seconds at most.
