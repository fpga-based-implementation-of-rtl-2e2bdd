# UART link for an FPGA board: switches in, serial line, LEDs out

This is a small full-duplex UART (universal asynchronous receiver/transmitter)
for a board with toggle switches, push buttons and LEDs. It was sized for the
Altera DE1 board and its 50 MHz oscillator. Set a byte on eight switches and
press a key. The byte goes out as one asynchronous serial frame on `TD`, and
the green LEDs show it. Frames that arrive on `RD` are turned back into bytes
and shown on the red LEDs. Wire `TD` to `RD` (on the board, short two GPIO
pins) and the red LEDs repeat the switch setting one frame time after the
press. The link is meant to carry data for an AES encryption application
later on, but it contains no AES logic itself.

Only two wires are needed, one per direction, and the two directions are
independent, so the link is full duplex. Both ends must agree on the bit
rate and the frame format in advance, because no clock goes with the data.

## The frame

```
 idle  start  d0  d1  d2  d3  d4  d5  d6  d7  [parity]  stop  idle
 ‾‾‾‾‾|_____|===|===|===|===|===|===|===|===|=========|‾‾‾‾‾‾|‾‾‾‾
```

- The line idles high.
- The start bit is low and lasts one bit period.
- Eight data bits follow, least significant bit first.
- An optional parity bit comes next. It is even or odd, set by a parameter.
- One high stop bit ends the frame.

Every bit lasts `DIV` clock cycles. With a 50 MHz clock and 115200 baud,
`DIV = round(50e6 / 115200) = 434`. That gives 115207 bit/s, 0.006 % fast. A
frame without parity is 10 bits long: 4340 cycles, or 86.8 µs.

The frame layout (start, 8 data bits, optional parity, stop) and the
115.2 kbit/s rate are the ones this design targets. The bit order, the
parity encodings and the single stop bit are conventional UART choices made
here. The default has no parity.

## Blocks

```
                 +------------------------------- uart_top ---------------------------------+
 key[0] --sync--edge--> press --+--> Tstart --> +------------------+                        |
                                |               | uart_transmitter |--> tline ------------------> TD
 switch[7:0] ------------------>+--> Tdata ---->|  (C1)            |--> busy (blocks press) |
                                      |         +------------------+                        |
                                      +--(on Tstart)--> Tledg --------------------------------> Tledg[7:0]
                                                                                            |
 RD ---------------------------------> +------------------+ --valid--> Rledr[7:0] ----------> Rledr[9:0]
                                       | uart_receiver    | --data---^                      |   ([9:8] = 0)
                                       |  (C2)            |                                 |
                                       +------------------+                                 |
                                                                                            |
 each of C1 and C2 holds a uart_prescaler (bit-period counter)                              |
                 +--------------------------------------------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/uart_pkg.sv` | `DATA_BITS`, the `parity_e` enum, and the `parity_bit`, `frame_bits` and `baud_div` functions |
| `rtl/uart_prescaler.sv` | counter that wraps every `DIV` cycles; gives `tick` once per bit and `half` half a bit after `clear` |
| `rtl/uart_transmitter.sv` | loads a byte into its shift buffer and sends it as one frame |
| `rtl/uart_receiver.sv` | finds start bits, samples bits mid-period and checks stop and parity |
| `rtl/uart_top.sv` | board-level control: key trigger, switch and LED registers, one transmitter (`C1`) and one receiver (`C2`) |

### Top level, `uart_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | system clock, 50 MHz by default |
| `rst_n` | in | 1 | active-low synchronous reset |
| `key` | in | 4 | push buttons, low while pressed; `key[0]` sends |
| `switch` | in | 10 | `switch[7:0]` is the byte to send |
| `RD` | in | 1 | serial input |
| `TD` | out | 1 | serial output, idles high |
| `Rledr` | out | 10 | `[7:0]` last good byte received; `[9:8]` are 0 |
| `Tledg` | out | 8 | last byte sent |

Parameters: `CLK_HZ` (50 000 000), `BAUD` (115 200) and `PARITY`
(`PARITY_NONE`, `PARITY_EVEN` or `PARITY_ODD`). The bit period
`DIV = baud_div(CLK_HZ, BAUD)` is passed down to both halves.

Without `rst_n` there are 35 pins: 4 keys, 10 switches, clock, RD, TD,
10 red LEDs and 8 green LEDs. That is the board-level interface this
design targets. `rst_n` is an addition, so that every register starts
from a known value.

A press on `key[0]` goes through a two-flop synchroniser and a
high-to-low edge detector. If the transmitter is idle, that clock edge
copies `switch[7:0]` into `Tdata` and sets `Tstart` for one cycle. `Tstart`
starts the transmitter and copies `Tdata` to the green LEDs. A press during
a frame is ignored, and an assertion checks that `Tstart` never fires while
the transmitter is busy. The red LEDs load the receiver's byte on its
`valid` pulse. A frame with a bad stop or parity bit leaves them as they are.

Latency: `TD` falls on the fourth clock edge after `key[0]` goes low (two
synchroniser stages, `Tstart`, then the transmitter's output register). In loopback, `Rledr` changes about
`9.5 × DIV + 5` cycles after the start bit begins, at the middle of the stop
bit.

There is no key debouncer. A bouncing button cannot start a second frame
while the first is being sent, but a bounce after the frame has ended would
start another one. Add a debouncer in front of `key[0]` if the button needs
one.

### Transmitter, `uart_transmitter`

Ports: `clk`, `rst`, `start`, `data[7:0]`, `busy` and `tline`. The
transmitter is a five-state machine: idle, start, data, parity, stop. It
owns a prescaler, held at zero while the transmitter is idle.

- If `start` is high on a clock edge while the transmitter is idle, `data`
  is copied into the 8-bit shift buffer and the parity bit is computed.
- From that edge, `tline` carries the start bit and `busy` is high.
- Each prescaler `tick` moves to the next bit. The buffer shifts right, so
  bit 0 goes out first.
- `busy` stays high for exactly `frame_bits(PARITY) × DIV` cycles and falls
  at the end of the stop bit.
- A new `start` is accepted on the first cycle that `busy` is low.

`tline` comes straight from a flip-flop, so it has no glitches. An
assertion checks that it is high whenever the transmitter is idle.

### Receiver, `uart_receiver`

Ports: `clk`, `rst`, `rline`, `busy`, `data[7:0]`, `valid` and `err`. This
is the subtle half, because the receiver must recover bit timing from the
data alone.

1. **Synchronise.** `rline` passes through two flip-flops before any logic
   sees it, because it is asynchronous to `clk`. Everything below is
   therefore two cycles late.
2. **Detect the start.** The receiver looks for a start only while idle,
   so an edge inside a frame (from data bits such as 1→0) never restarts
   it. In idle, a high-to-low step of the synchronised line sends it to the
   start state and releases the prescaler.
3. **Confirm the start.** Half a bit later (`half`) the line is checked
   again. If it is high again, the low pulse was shorter than half a bit:
   it counts as a glitch and the receiver goes back to idle. If it is still
   low, the prescaler is cleared once more, now aligned to the middle of a
   bit.
4. **Sample mid-bit.** Every later `tick` falls in the middle of a bit. The
   data bits are shifted in from the top, so after eight of them the first
   one received is in bit 0. If parity is on, the next bit is compared with
   the parity the receiver computes itself.
5. **Check the stop bit.** At the middle of the stop bit the frame is
   judged. If the stop bit is high and the parity (if any) is right,
   `data` takes the buffer and `valid` pulses for one cycle. Otherwise
   `err` pulses and `data` keeps its old value.

`busy` falls at the middle of the stop bit, not at its end. This leaves
half a bit for the receiver to be idle again before a start bit that follows
directly. Sampling at mid-bit tolerates a bit-rate mismatch between the two
ends of about ±5 % over a 10-bit frame (half a bit of drift by the
last sample), less the 1–2 cycles of synchroniser uncertainty.

A frame that ends with a low stop bit leaves the line low. The receiver
needs a new high-to-low edge before it starts again, so a held-low line
(a "break") gives one `err` and then silence.

### Prescaler, `uart_prescaler`

This is a `$clog2(DIV)`-bit counter, cleared and held at zero by `clear`,
that wraps at `DIV-1`. `tick` decodes `DIV-1` and `half` decodes `DIV/2-1`.
Both outputs decode only the counter, so the receiver can feed `half` back
into `clear` without a combinational loop. `DIV` must be at least 4, and
an elaboration-time assertion checks that.

## Resource use

Generic synthesis gives these flip-flop counts:

| module | flip-flops |
|---|---|
| transmitter | 24 |
| receiver | 36 |
| whole top | 88 |

For comparison, a Cyclone II implementation of the same function has been
reported at 103 logic cells and 74 registers for the whole UART. Of those,
the transmitter had 28 cells and 20 registers, and the receiver 49 cells and
29 registers. The difference here comes from the input synchronisers
(4 flip-flops), the separate `valid`/`err` flags and the explicit bit
counters.

## Departures and choices to be aware of

These are not dictated by the board-level function and may need changing
for another system:

- **Baud rate.** 115200 is the default. That is the highest rate the design
  was meant to support, not a rate it was required to run at. Change `BAUD`.
- **Parity.** Off by default. Turn it on with `PARITY_EVEN` or
  `PARITY_ODD`.
- **Which key sends.** `key[0]` sends. `key[3:1]` and `switch[9:8]` are
  unused, and `Rledr[9:8]` are tied to 0.
- **Reset.** `rst_n` was added. All flip-flops reset synchronously.
- **Receiver outputs.** `valid` and `err` were added to the receiver. The
  top uses `valid` only.
- **No FIFO, no flow control.** The transmitter takes one byte at a time.
  The receiver's output register is overwritten by the next good frame.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
fails the run if it hangs.

| testbench | what it checks |
|---|---|
| `tb_uart_prescaler` | tick period and half position for DIV = 10 and 7; nothing while cleared; restart |
| `tb_uart_transmitter` | three parity modes at DIV = 8; `tline` against a reference frame on every cycle (bit values and exact bit boundaries); `busy` length; a start during a frame is ignored |
| `tb_uart_receiver` | three parity modes at DIV = 16; good frames and `valid` timing; 10 frames back to back; low stop bit; wrong parity; glitch rejection |
| `tb_uart_top` | default parameters (50 MHz, 115200 baud), TD looped to RD: 0x49 and random bytes end to end, a press during a frame, a bad frame and a glitch on RD. It counts each of these events and fails if any did not occur |
| `tb_uart_top_parity` | the top with even and with odd parity, in loopback, plus a wrong-parity frame on RD |

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/uart_pkg.sv tb/tb_uart_top.sv --top-module tb_uart_top -o sim
./obj_dir/sim
```

Replace `tb_uart_top` with any other testbench name. All of them finish in
well under a second. The testbenches use `$urandom` for random bytes and
need no data files.
