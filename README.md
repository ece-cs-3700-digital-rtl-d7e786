# Echo UART: a 9600-baud serial receiver and sender joined by a four-phase handshake

This is a minimal UART (universal asynchronous receiver/transmitter) that talks
to an ordinary serial terminal and echoes every key typed. A character arrives
on `RCV` as an asynchronous serial frame. The **receiver** state machine turns it
into a byte. The byte goes to the **sender** state machine over a four-phase
request/acknowledge handshake, and the sender puts it back on `XMT`. The
terminal then shows what was typed. The byte last received is also shown on
eight LEDs, `D[7:0]`.

The design is an example of a finite-state controller driving a small datapath:
each machine is a state register that steps a tick counter, a bit counter and an
8-bit shift register. The hard part is timing. The terminal's clock and ours do
not share a phase and may not share a frequency. The receiver therefore has to
find each frame on its own and look at every bit at the right moment.

```
             RESET ──► 2-FF reset sync ──► rst (to all three blocks)
 CLOCK 100 MHz ──► clock_divider ──► tick (76.8 kHz enable = 8 x 9600)
                                        │                 │
 RCV ──► uart_receiver ── rcv_req ──────┼──► uart_sender ──► XMT
               ▲ ◄─────── rcv_ack ◄─────┼─── xmt_ack
               └───────── rcv_data[7:0] ┴──► xmt_data ─┐
                                                        └──► D[7:0] (LEDs)
```

## The serial frame

The line idles at 1. A frame is:

| bit time | 0     | 1 … 8                      | 9    | 10                    |
|----------|-------|----------------------------|------|-----------------------|
| value    | start (0) | data bits 0 … 7, LSB first | stop (1) | second stop (1, sent only) |

At 9600 baud a bit lasts 104.17 µs. The characters are 7-bit ASCII, and bit 7
is sent as 0 by the terminal. The UART treats all eight bits as data: it
neither checks nor computes parity. The receiver expects **one** stop bit and
the sender always sends **two**. A far end set for either setting then works.
An extra stop bit only adds idle time. A missing one could be misread.

## Sampling in the middle of the bit (receiver timing)

Both machines advance only on `tick`, a one-cycle enable at eight times the baud
rate (76.8 kHz). One bit is therefore eight ticks. The receiver works as follows:

1. **Synchronise.** `RCV` passes through two flip-flops on the 100 MHz clock.
   Only the second one is used.
2. **Find the start bit.** In `RX_IDLE` it waits for a tick that sees the line
   at 0. Call that tick T0. The real falling edge lies somewhere in the tick
   before T0, plus the two synchroniser cycles.
3. **Go to the middle of the start bit.** Four ticks later (T0+4) it looks
   again. If the line is back at 1, the low pulse was noise and the receiver
   returns to idle.
4. **Sample every 8 ticks.** Data bit *i* is sampled at T0+4+8(*i*+1). Each
   sample is shifted into the top of the shift register, so after eight
   samples bit 0 sits at the bottom. The stop bit is sampled at T0+76.
5. **Offer or drop.** If the stop bit reads 1, the shift register is copied to
   `rcv_data` and `rcv_req` rises. If it reads 0, the frame is malformed or the
   line is in a break. The byte is then dropped, `rcv_data` keeps its old
   value, and the receiver waits in `RX_BREAK` until the line returns to 1.

The receiver resynchronises on each start edge. A rate mismatch therefore only
builds up over one frame, and the worst sample is the stop bit. The stop bit is
sampled 76–77 ticks after the true edge. For a terminal whose bit time is
8(1+*d*) ticks, the stop bit covers ticks 72(1+*d*) to 80(1+*d*). The
receiver therefore reads correct frames for a terminal **3.7 % fast to 5.5 %
slow**. The divider's own error is +0.006 % (see below). If the receiver
sampled at the start of each bit instead, a terminal only slightly slow would
have one bit read twice and the last one lost. The mid-bit offset exists to
prevent this.

`rcv_data` is a separate register from the shift register. It changes only
when a complete, good byte is offered, so the LEDs never show half-shifted
data.

## The four-phase handshake

The receiver's output handshake and the sender's input handshake are the same
three wires (`HS_REQ`, `HS_ACK`, the data byte):

1. The receiver raises REQ with the byte on the data lines.
2. The sender sees REQ on a tick, copies the byte into its shift register and
   sends the whole frame: start bit, 8 data bits, 2 stop bits, 8 ticks each,
   88 ticks in all. Only then does it raise ACK.
3. The receiver sees ACK and drops REQ.
4. The sender sees REQ low and drops ACK. The receiver sees ACK low and goes
   back to waiting for a start bit.

Every step is taken on a tick, so each takes at most one tick (13 µs). The
sender's `XMT` falls in the cycle after the tick on which it first sees REQ.
That is one tick after REQ rose. The echo's start bit therefore begins 77–78
ticks after the typed character's start bit, about 9.7 bit times.

**Consequence:** the receiver stops watching the line from the moment it raises
REQ until the echo has been sent. That is about 11 bit times. Characters
therefore have to start at least ~20.7 bit times apart (about 2.2 ms, or 470
characters per second). This is ample for typing. A character that starts
while the previous echo is under way is not seen at all. In a continuous
stream, e.g. from a paste, the receiver may also wake up in the middle of a
frame and misread it. Removing the
limit would need a holding register between the two machines, and the design
does not have one.

`hs4_checker` holds the handshake rules as concurrent assertions: each signal
changes only in its turn, and the data stay stable until ACK. The top uses it on
the internal link, and the receiver and sender testbenches use it too.

## Clock enable instead of a divided clock

The machines are meant to run at 76.8 kHz, derived from the 100 MHz board
oscillator. `clock_divider` counts 0…1301 and pulses `tick` for one cycle at the
end of each count, so 100 MHz / 1302 = 76.805 kHz. 100e6/76800 = 1302.08 is
not an integer, so the divisor is rounded. Everything runs on the 100 MHz clock
and uses `tick` as an enable. The behaviour is the same as clocking the
machines at 76.8 kHz, but without a second clock domain or a clock made from
logic. The divisor comes from `uart_pkg::clk_div(CLK_HZ, BAUD, OVERSAMPLE)`.

## Reset

`RESET` is active high, for a toggle switch or pushbutton. It acts at once,
because it sets the two synchroniser flip-flops asynchronously. It is released
two `CLOCK` edges after the switch opens. Inside, the reset is synchronous. It
puts both machines in idle with `XMT` = 1, clears `D`, and restarts the
divider.

## Status lights

These outputs are meant for bring-up. A board with LEDs on them shows where a
failing link stops.

| `RCV_STATE` | receiver | `XMT_STATE` | sender |
|---|---|---|---|
| 0 | idle, waiting for start bit | 0 | idle, waiting for REQ |
| 1 | in start bit | 1 | sending start bit |
| 2 | receiving data bits | 2 | sending data bits |
| 3 | at stop bit | 3 | sending stop bits |
| 4 | REQ high, waiting for ACK | 4 | ACK high, waiting for REQ to fall |
| 5 | waiting for ACK to fall | | |
| 6 | stop bit was 0, waiting for line idle | | |

`HS_REQ` and `HS_ACK` are the two handshake wires.

## Files and interfaces

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | constants (data bits, stop bits, default clock, baud and oversampling), `clk_div()`, state enums `rx_state_e`, `tx_state_e` |
| `rtl/clock_divider.sv` | `clk, rst → tick`; parameter `DIVIDE` (default 1302) |
| `rtl/uart_receiver.sv` | `clk, rst, tick, rcv, rcv_ack → rcv_req, rcv_data[7:0], state`; parameter `OVERSAMPLE` (8) |
| `rtl/uart_sender.sv` | `clk, rst, tick, xmt_req, xmt_data[7:0] → xmt_ack, xmt, state`; parameter `OVERSAMPLE` (8) |
| `rtl/hs4_checker.sv` | assertions for a four-phase link (no outputs) |
| `rtl/uart_echo_top.sv` | top: `CLOCK, RESET, RCV → XMT, D[7:0], RCV_STATE, XMT_STATE, HS_REQ, HS_ACK`; parameters `CLK_HZ` (100 000 000), `BAUD` (9600), `OVERSAMPLE` (8) |

For another board clock or baud rate, change `CLK_HZ` or `BAUD` on the top.
`OVERSAMPLE` should stay even and at least 4. The receiver's half-bit wait is
`OVERSAMPLE/2` ticks.

The board-level parts are outside the RTL:

- the EIA-232 level converters and the 9-pin connector (terminal wires:
  ground on pin 5, `XMT` on pin 3, `RCV` on pin 2);
- the LEDs;
- the reset switch;
- the terminal itself.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it covers |
|---|---|
| `tb/tb_clock_divider.sv` | tick spacing of exactly 1302 cycles at the default divisor, and of 5 in a second instance; one-cycle width; restart after reset |
| `tb/tb_uart_sender.sv` | all 256 byte values compared tick by tick against an independently built frame; ACK timing (88 ticks) and the full handshake with random REQ hold times; idle line between frames; reset in mid-frame |
| `tb/tb_uart_receiver.sv` | all 256 byte values at random start phase; 40 frames with the terminal 1.6–2 % fast or slow, and 8 at 3 % fast or 5 % slow; REQ latency 76–77 ticks; glitch rejection; 0 stop bit dropped without touching `rcv_data`; reset in mid-frame |
| `tb/tb_uart_echo_top.sv` | the whole design at its default parameters (100 MHz, 9600 baud) against a terminal model (`tb/t10_terminal_model.sv`) with its own 10 MHz clock |

The end-to-end test types 35 characters one at a time, plus a pair sent back to back. They include a CR and a DEL. Some are
sent with one stop bit and some with two, and some with the terminal 2 % fast
or slow. One pair is sent back to back, and only the first of the two may be
echoed. For each, it checks the echoed byte, the echo's two stop bits, `D`,
one REQ and one ACK pulse, and the echo latency (76–79 ticks). It also sends a
glitch, a frame with a 0 stop bit, and a `RESET` in the middle of an echo. It
counts each of these events and fails if any never happened. It runs in a few
seconds.

To run with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/uart_pkg.sv \
    tb/tb_uart_echo_top.sv --top-module tb_uart_echo_top -Mdir obj_top
./obj_top/Vtb_uart_echo_top
```

The other testbenches are run the same way, with `tb_uart_receiver`,
`tb_uart_sender` or `tb_clock_divider` in place of `tb_uart_echo_top`. To lint,
run `verilator --lint-only -Wall -Irtl rtl/uart_pkg.sv rtl/uart_echo_top.sv`.

## What follows the original description and what is added

These follow the original description:

- the frame format and 9600 baud;
- 8x oversampling and sampling in the middle of each bit;
- one stop bit expected and two sent;
- the order of both handshakes and the echo wiring;
- the 76.8 kHz rate from a 100 MHz clock;
- the pin names `XMT`, `RCV`, `CLOCK`, `D[7:0]` and `RESET`;
- the LED byte;
- the status lights, which the description suggests as an option.

These are this design's own choices:

- the clock enable in place of a divided clock;
- the rounded divisor;
- the two-flop input synchroniser;
- the recheck at the middle of the start bit;
- the handling of a 0 stop bit (drop the byte and wait for an idle line);
- the separate output register for `rcv_data`;
- the reset synchroniser;
- the state encodings;
- acting on handshake inputs only on ticks.

The description also suggests optional extras that are not built:

- switches to choose a byte to send;
- a mode switch between echo and sending that byte;
- a mode that alters the echoed data.
