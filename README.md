# CloudBus end module in SystemVerilog

CloudBus is a serial protocol for distributed embedded control in which every node, an
*end module*, is an equal peer. There is no master that polls. A module that needs to know the
state of a variable another module owns broadcasts a **question**, for example "tell me when
x1 == 1". The owning module keeps that question and sends an **answer** only when its variable
actually reaches the asked state. The asking module thus waits for an event instead of polling.

This RTL implements one end module for an FPGA: a serial receiver and transmitter, a 128-bit
frame buffer, a frame parser with CRC check, a controller that carries out the question/answer
rule, and registers for 16 digital and 4 × 16-bit analog I/O. The block split, the block and port
names and the frame widths follow the published CloudBus FPGA implementation ("Hardware
Implementation of the CloudBus Protocol Using FPGA", University of Zielona Góra). That
description gives each block's purpose and ports but not its insides. Everything inside the
blocks, and every detail listed under *Design choices* below, is this design's own.

## The frame

Every frame is 16 bytes (128 bits), sent first byte first:

| bytes | field | meaning |
|------:|-------|---------|
| 0     | CNT   | frame length in bytes, always 16 |
| 1     | FUNC  | `0x01` QUESTION, `0x02` ANSWER |
| 2–4   | VARS  | 24-bit variable mask: bit *i* (0–15) = digital line *i*, bit 16+*j* = analog channel *j* (0–3), bits 23:20 reserved |
| 5–6   | DATA digital | 16 digital states |
| 7–14  | DATA analog  | 4 words of 16 bits, channel 3 first, channel 0 last |
| 15    | CRC   | CRC-8 of bytes 0–14 |

The CRC is CRC-8 with polynomial x⁸+x²+x+1 (`0x07`), initial value 0, no reflection, no final
XOR, processed MSB first. It is defined once, as `frame_crc` in `rtl/cloudbus_pkg.sv`. The
package also holds the `frame_t` and `payload_t` structs and the field widths.

In a QUESTION, VARS selects the variables and DATA holds the states the asker waits for. In an
ANSWER, VARS repeats the question's mask and DATA carries *all* of the answering module's current
states.

## Question and answer rules (controller)

This is the part that defines the protocol's behaviour. It lives in `rtl/controller.sv`.

* **Ownership.** `ownVars` (24 bits, a top-level input) marks the variables this module is
  responsible for. A valid QUESTION is accepted only if its VARS has at least one
  non-reserved bit set and every set non-reserved bit is owned. Other questions are ignored
  silently, so the module that owns those variables can answer them.
* **One stored question.** An accepted question goes into a single register. A newer accepted
  question replaces it.
* **Deferred answer.** Every cycle the selected local digital bits and analog words are compared
  with the asked values. When all of them are equal, an ANSWER is queued and the question is
  dropped. If the condition already holds when the question arrives, the answer goes out at once.
  The answer is sent exactly once.
* **Asking.** The local control logic pulses `askValid` while `askReady` is high, with `askVars`,
  `askDigital` and `askAnalog`. The controller sends the QUESTION when the transmitter is free and
  then holds `askPending`. The first ANSWER whose VARS covers all of `askVars` clears it and
  pulses `askDone`.
* **Received answers.** Every valid ANSWER is stored on `IO_Port = {vars, digital, analog}`
  (104 bits) and pulses `answerSeen`. `io_ports` registers the digital and analog parts onto the
  output pins. The outputs therefore show the states most recently reported by a peer.
* **Priority.** A due answer goes before a queued question. The condition is tested in the cycles
  the transmitter is free, so a state that holds only while a frame is being sent is missed.
  The controller gives a new `sendData` strobe only after the transmitter buffer has reported busy for the previous one.
* **Errors.** Frames the parser rejects are counted in the saturating 8-bit `errorCount`.

The application's control algorithm (for example a Petri net spread over several modules) is not
part of this RTL. It connects through the ask interface and the I/O pins.

## Receive path: sampling and bit timing

`rxd_timer` holds two down-counters on the main clock. `clkHi` ticks every `HI_DIV` cycles
(default 27, about 16 samples per bit). `clkLo` ticks every `LO_DIV` cycles (default 434, one bit
at 115200 bit/s from 50 MHz). Both are one-cycle **clock enables**, not derived clocks, so the
whole design is a single clock domain.

`rxd` passes `RxD` through a two-flop synchroniser. While idle it holds the bit counter in reset
(`loRst` = 1) and checks the line on each `clkHi` tick. When it finds the line low, it releases
`loRst`. The first `clkLo` tick then comes half a bit later, in the middle of the start bit, and
the following ticks fall in the middle of each data bit and of the stop bit. The character format
is 8N1, LSB first, with the line idle high. The byte is rejected in two cases:

* The line is high again at the start-bit sample. This is treated as a glitch and ignored.
* The stop bit is low. This is a framing error: `error` pulses and `data` keeps the previous
  byte.

A good byte pulses `received`.

`receiver_buffer` collects bytes. The first byte of a frame is read as CNT, and the frame closes
after CNT bytes (a CNT of 0 or more than 16 is treated as 16). The finished frame is copied to a
separate output register and `ready` pulses. The next frame can then be assembled while the
parser reads the last one. In the top, a framing error also resets the buffer, so that a broken
frame does not shift all later byte boundaries.

`parser` accepts the frame only if CNT = 16 and the CRC matches. It then registers
FUNC/VARS/DATA and pulses `valid`; otherwise it pulses `error`. Its outputs keep the last good
frame.

## Transmit path

`transmitter_buffer` takes the controller's 112-bit payload on a `send` strobe. It adds CNT = 16 in
front and the CRC behind, then hands the 16 bytes to `txd`, one `readyToSend` pulse per byte. It
waits for `txd`'s `busy` to fall before sending the next byte. `txd` drives the start bit in the
cycle after `send` and releases its timer (`txd_timer`). Each bit then lasts exactly `LO_DIV`
cycles. After the stop bit `txd` stops the timer again.

## Timing

| quantity | cycles |
|----------|--------|
| one byte on the line | 10 × `LO_DIV` (4340 at defaults) |
| byte-to-byte handshake overhead in the transmitter | about 3 |
| frame, from `sendData` to `valid` at the receiving module | ≈ 160 × `LO_DIV` − `LO_DIV`/2 + ~4 per byte (69 293 measured at defaults, 1.39 ms at 50 MHz) |
| question answered at once, from `askValid` to `askDone` | about two frame times |
| `receiver_buffer` last byte → `ready` | 1 |
| `parser` `inValid` → `valid`/`error` | 1 |
| digital pin → `localDigital` | 2 (synchroniser) |

## Design choices beyond the original description

The original gives block names, ports, frame field sizes and the question/answer principle.
The following are this design's own:

* 8N1 character format, LSB first; bit rate set by `LO_DIV`; no rate is specified.
* The command codes, the bit layout of VARS and DATA, and the CRC-8 polynomial.
* Single clock domain with enable ticks; a synchronous active-high `rst` on every block except
  the two timers, whose counters are held by their own `hiRst`/`loRst` inputs.
* Extra handshake ports that the original block symbols do not have:
  * `inValid` on the receiver buffer and on the parser;
  * `valid` on the parser;
  * `send`, `txBusy` and `busy` on the transmitter buffer;
  * `busy` on `txd`.
* The controller's ownership mask, single question slot, ask interface and error counter.
* I/O ports with separate input and output pins (each of the 16 digital and 4 analog channels has
  both). The analog converters are outside the design; it exchanges 16-bit words with them.

**Resource use.** The original reports about 460 registers in total. Its controller holds almost
no state (0–3 registers). This design synthesises to about 1190 flip-flops. Most of the
difference is in the controller and I/O:
* the stored question (104 bits);
* the queued ask (112 bits);
* the registered payload (112 bits);
* `IO_Port` (104 bits);
* the output registers (80 bits).

That is still about 1–4 % of the registers of any of the FPGAs the original targets (Spartan-3E
XC3S1600E up to Cyclone V 5CGXFC7).

**Known limits.**
* No inter-byte timeout: a frame that loses a byte without a framing error is closed by the next
  frame's first bytes, fails the CRC and is dropped. The frame after it is then also lost while
  the buffer resynchronises. Recovery relies on CNT and on framing errors.
* Analog conditions test for exact equality.
* Only one question from peers can be pending at a time.

## Files

| file | content |
|------|---------|
| `rtl/cloudbus_pkg.sv` | widths, frame structs, command codes, CRC function |
| `rtl/rxd_timer.sv`, `rtl/rxd.sv` | sampling/bit timer and byte receiver |
| `rtl/receiver_buffer.sv`, `rtl/parser.sv` | frame assembly and check |
| `rtl/controller.sv` | question/answer logic |
| `rtl/io_ports.sv` | I/O registers |
| `rtl/transmitter_buffer.sv`, `rtl/txd_timer.sv`, `rtl/txd.sv` | frame serialisation and byte sender |
| `rtl/cloudbus_end_module.sv` | top: all of the above wired together |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_cloudbus_pkg.sv` | testbench reference CRC (bit-serial form) and frame builder |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The RTL also
carries concurrent assertions for its handshake rules: a byte or frame is offered only to an idle
sender, a parser or receiver verdict is never both good and bad, and the transmit timer runs
exactly while `txd` is busy. Build with `--assert` to check them. It has a cycle
watchdog. For example:

```sh
verilator --binary --timing --assert --top-module tb_cloudbus_end_module \
  -y rtl -y tb +libext+.sv -Irtl rtl/cloudbus_pkg.sv tb/tb_cloudbus_pkg.sv \
  tb/tb_cloudbus_end_module.sv
./obj_dir/Vtb_cloudbus_end_module
```

`tb_cloudbus_end_module` connects two end modules back to back at the default parameters, plus an
injection path into one of them. It covers:
* a deferred answer, including the frame latency check;
* an immediate answer;
* both ask completions;
* a CRC error, a short frame and a framing error;
* a question about a variable the module does not own;
* recovery after the errors.

It counts each of these and fails if any never happens. It runs about 640 000 cycles, a few
seconds of simulation. The per-module testbenches use small `HI_DIV`/`LO_DIV` values to run
faster.

To change the bit rate, set `LO_DIV` = f_clk / baud and `HI_DIV` ≈ `LO_DIV` / 16 on
`cloudbus_end_module`.
