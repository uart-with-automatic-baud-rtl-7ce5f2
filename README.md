# UART with automatic baud-rate detection and a frequency divider

A UART receiver has to know the sender's bit rate before it can read anything.
This design learns that rate from the line. The sender opens with one carriage
return (`8'h0D`). A receiver that always runs at 9600 baud reads that character,
and what it reads depends on the sender's rate. A 9600-baud sender gives back
`0x0D`. A slower or faster sender is sampled at the wrong moments and gives
another byte. For example, `0x0D` sent at 2400 baud reads as `0x78`. The design
maps the byte back to a rate. It then starts a second receiver at that rate, and
that receiver delivers every later byte correctly.

Also included:

- a transmitter with its own baud generator;
- a frequency divider that brings clk/2, clk/4, clk/8 and clk/3 out for
  slower circuits.

Everything is synchronous to one system clock (50 MHz by default). Frames are
8 data bits, no parity, 1 stop bit, LSB first. All bit timing uses 16x
oversampling ticks.

## Block diagram

```
            din, wr                         tx_baud_sel
               |                                 |
               v                                 v
        +--------------+  baud_clk2   +-------------------+
        | transmitter  |<-------------| tx_baud_generator |
        | auto_baud_tx |              | baud_gen_tx       |
        +--------------+              +-------------------+
               | tx  (LOOPBACK=1; otherwise the rx pin via a 2-FF synchronizer)
               +------------------------------+
               v                              v
        +--------------+  baud_clk22   +-----------------------+
        | receiver     |<--------------| rx_baud_generator9600 |
        | auto_baud_rx |               | baud_gen_rx           |
        +--------------+               +-----------------------+
          | dout, baud_load, baud_lo          |
          v                                   |
        +--------------+  baud_clkbk   +--------------+
        | baud_rx      |-------------->| rx_book      |--> RX_out, rx_done_tick_bk
        | rx_baud      |               | UART_rx_book |
        +--------------+               +--------------+
          baud_sel, baud_ok

        +--------------+
        | fdivider     |--> baud_clk1 (f/2), baud_clk2a (f/4), baud_clk3 (f/8), baud_clk4 (f/3)
        | clk_gen      |
        +--------------+
```

Lower boxes name the module, then the instance inside `uart_autobaud_top`.

## How detection works

### What the 9600-baud receiver reads

The receiver detects a start bit on the first tick at which the line is low.
It reads every later bit at the 8th of its 16 ticks, so data bit *k* is read
about (k + 7.5/16) receiver bit times after the start edge. The sender's bit
time is R times the 9600-baud bit time. That read point then falls in sender
bit floor((k + 7.5/16) / R), where sender bit 0 is the start bit and 9 the stop
bit, with the line idle after that. For `0x0D` this gives:

| sender rate | R    | byte read at 9600 | detected as |
|-------------|------|-------------------|-------------|
| 38400       | 1/4  | `0xFE`            | 38400       |
| 19200       | 1/2  | `0xF2` (or `0xF9`)| 19200       |
| 9600        | 1    | `0x0D`            | 9600        |
| 4800        | 2    | `0xE6`            | 4800        |
| 2400        | 4    | `0x78`            | 2400        |
| 1200        | 8    | `0x80`            | 1200        |
| 600 and below | ≥16 | `0x00`          | not possible, falls back to 9600 |

At 19200 baud every read point lands on one of the sender's bit edges. Which
side of the edge it falls on depends on the phase of the two tick generators.
Both readings are therefore accepted. At 600 baud and slower the receiver's
whole word lies inside the start bit, so all of these rates read as `0x00`. A
single 9600-baud reading cannot tell them apart. The design then selects 9600
baud and clears `baud_ok`.

`uart_pkg::decode_pattern` holds this table. To detect with a different
character, recompute the table from the formula above.

### The mode sequence

1. **Detection mode** (`baud_lo = 0`). `auto_baud_rx` waits for the first word.
   When the word is complete it pulses `baud_load`, and `rx_baud` latches the
   rate into `baud_sel` and `baud_ok`.
2. **Settle.** For a slow sender the detection frame is still on the line after
   the 9600-baud receiver has finished with it. At 1200 baud, 70 receiver bit
   times of the frame remain. If the second receiver started now, it would
   start inside that leftover frame. So `auto_baud_rx` waits until the line has
   been high for `SETTLE_BITS` = 20 bit times at 9600 baud (2.1 ms). That is
   longer than the longest high run inside a `0x0D` frame at 1200 baud, which
   is 16 bit times.
3. **Normal mode** (`baud_lo = 1`, until reset). `rx_baud` starts the
   `baud_clkbk` tick at the detected rate, and `UART_rx_book` receives from the
   next start bit on. `auto_baud_rx` keeps running at 9600 baud. Its `dout`
   carries the real data only when the sender runs at 9600 baud.

**Sender's rule:** send `0x0D` first, then keep the line idle until `baud_lo`
is high. Detection takes one sender frame plus 20 bit times at 9600 baud, less
the part of the frame the 9600-baud receiver already covered. Reset restarts
detection.

## Baud generators

Each generator is a down-counter that reloads with a divisor and emits a
one-clock tick when it expires. The tick is an enable, not a clock. The
divisor is round(CLK_HZ / (16 · baud)), at most 65535:

| baud  | 110   | 150   | 300   | 600  | 1200 | 2400 | 4800 | 9600 | 19200 | 38400 |
|-------|-------|-------|-------|------|------|------|------|------|-------|-------|
| divisor at 50 MHz | 28409 | 20833 | 10417 | 5208 | 2604 | 1302 | 651 | 326 | 163 | 81 |

- `tx_baud_generator` selects one of the ten rates at run time through
  `tx_baud_sel` (`uart_pkg::baud_e`).
- `rx_baud_generator9600` is fixed at 9600 baud.
- `baud_rx` uses the same table for the rate it detected.

The divisors are computed at elaboration (`uart_pkg::divisor_table`), so
changing `CLK_HZ` needs no other edit.

## Transmitter

- A write (`wr` high for one clock) puts `din` into the transmit hold register
  `thr` and sets `txdatardy`.
- On the next tick with the line idle, `thr` moves to the shift register `tsr`
  and `txdatardy` clears.
- The frame (start, 8 data bits LSB first, stop) is shifted out at 16 ticks per
  bit. `tx_done_tick` pulses at the end of the stop bit.
- A byte written while a frame is in progress is sent directly after it, with no
  idle time between the frames. A write while `txdatardy` is set replaces the
  byte waiting in `thr`.

## Receivers (`rx_book`)

`rx_book` is a plain 16x oversampling receiver:

- It starts on the first tick with the line low and counts 16 ticks per bit.
- It reads each bit at tick 7, the 8th sample, which is the middle of the bit to
  within one tick.
- It pulses `rx_done_tick` at the middle of the stop bit and returns to idle
  there, so it can catch a start bit that follows directly. The stop bit's
  value is not checked.
- It does not check the start bit again at its middle. Detection at 19200 and
  38400 baud depends on that, because there the sender's start bit is shorter
  than half a receiver bit at 38400 baud and exactly half at 19200.

With `SUPER_SAMPLE = 1` each bit is the majority of ticks 6, 7 and 8. A
one-tick spike at the sampling point is then ignored, at the cost of one tick
of extra latency. The parameter is off by default. It is available on `rx_book`
and `receiver`, and on the top, where it applies to both receivers.

## Frequency divider

`fdivider` contains four `clk_divider` instances, with ratios set by
parameters N1..N4 = 2, 4, 8, 3. Each one is a counter with a registered output
that is high for the first half of the count. For an odd ratio a second
flip-flop on the falling clock edge trims half a clock from the high time, so
clk/3 also has a 50 % duty cycle. These outputs are clocks meant for other
circuits. Nothing in the design is clocked by them.

## Top-level interface (`uart_autobaud_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | system clock; synchronous active-high reset |
| `din`, `wr` | in | 8, 1 | byte to send and its write strobe |
| `tx_baud_sel` | in | 4 | transmit rate (`baud_e`) |
| `rx` | in | 1 | external serial input, used when `LOOPBACK = 0` |
| `tx`, `txdatardy`, `tx_done_tick` | out | 1 | serial out; hold register full; end-of-frame pulse |
| `dout`, `rx_done_tick` | out | 8, 1 | word from the 9600-baud receiver |
| `RX_out`, `rx_done_tick_bk` | out | 8, 1 | word from the receiver at the detected rate |
| `baud_lo` | out | 1 | detection finished, normal mode |
| `baud_sel`, `baud_ok` | out | 4, 1 | detected rate; rate was recognised |
| `baud_clk1`, `baud_clk2a`, `baud_clk3`, `baud_clk4` | out | 1 | clk/2, clk/4, clk/8, clk/3 |

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 50 000 000 | system clock frequency |
| `LOOPBACK` | 1 | transmitter output drives both receivers internally |
| `SUPER_SAMPLE` | 0 | majority-of-three bit sampling in both receivers |

`receiver` also has `SETTLE_BITS` (default 20).

## Where this design makes its own choices

The block structure, signal names, 16x oversampling, mid-bit sampling, the
fixed 9600-baud detecting receiver, the `0x0D` detection character, the 50 MHz
clock, the divisor 81 at 38400 baud, and the four divider ratios follow the
original description. The following are this design's own:

- **The detection table.** Only the 2400-baud value `0x78` was given. The other
  entries were derived as shown above. Detection covers 1200 to 38400 baud,
  not the 110 to 38400 baud once claimed for this scheme, because the method
  cannot separate the slower rates.
- **The settle wait before normal mode** and its length.
- **Signal meanings.** `baud_load` is a one-clock strobe and `baud_lo` the
  "detection finished" flag, as the signals behave in the original
  waveforms. The original pin table describes them differently, as a read
  strobe and an 8-bit value.
- **Polarity of `rx_done_tick`.** It is an active-high pulse. The original text
  also speaks of it going low on a new word.
- **Ports the original top lacks.** The write strobe `wr` (the original loads
  data around reset), the run-time `tx_baud_sel`, the `rx`/`tx` pins with
  `LOOPBACK`, the rx synchronizer, and the `baud_sel`/`baud_ok`/`txdatardy`
  outputs.
- **Receiver and transmitter details.** The majority vote for super sampling,
  ending reception at the middle of the stop bit, overwriting a full hold
  register, and starting frames on a tick.
- **Not built.** The single 8-bit bidirectional CPU bus with address mapping
  (only mentioned, never specified) and parity. Separate `din`/`dout` ports
  are used instead.

## Simulating

Every block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops on its own, with a watchdog.
Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -y rtl +libext+.sv rtl/uart_pkg.sv tb/tb_uart_autobaud_top.sv \
  --top-module tb_uart_autobaud_top
./obj_dir/Vtb_uart_autobaud_top
```

| testbench | covers |
|-----------|--------|
| `tb_uart_autobaud_top` | the whole design at its defaults. Detection at all six rates, the 9600-baud readings `0x0D` and `0x78` (2400 baud), the settle wait, back-to-back frames received at the detected rate, the 600-baud fallback, and the divided clocks. About 6 M clocks, a few seconds. |
| `tb_transmitter` | frame contents and bit timing, `tx_done_tick` timing, back-to-back frames |
| `tb_rx_book` | random bytes, done timing, super sampling against a mid-bit spike, ±3 % rate error |
| `tb_receiver` | detection words and `baud_lo` timing for bit lengths of 1/4 to 8 receiver bits |
| `tb_baud_rx` | the pattern table, no ticks before `baud_lo`, tick spacing |
| `tb_uart_autobaud_ext` | the top with `LOOPBACK = 0` and `SUPER_SAMPLE = 1`, fed from the `rx` pin by an independent 4800-baud sender with a spike in the middle of one data bit of every byte. All bytes must arrive; with `SUPER_SAMPLE = 0` some would not. |
| `tb_tx_baud_generator`, `tb_rx_baud_generator9600` | tick spacing for all rates |
| `tb_fdivider` | period and high time of all four outputs |

The unit testbenches use a tick every few clocks to stay short. The top-level
testbench runs at the real 50 MHz divisors.
