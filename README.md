# A handshaking UART: two ends, one character at a time

This is a small serial link between a host processor and a remote device, such as the I/O
microcontroller of a printer. Each end has a UART built from three machines that run side by side:

- a **controller** that the processor programs through a few registers;
- a **transmitter** that sends one character;
- a **receiver** that takes one character in.

A character does not go onto the line until the far end agrees to take it. The sender raises
*request to send* (RTS) and waits. The receiver answers with *clear to send* (CTS). Only then does
the sender shift the character out, one bit per clock. The receiver shifts it in, strips the framing
bits, checks parity and tells its processor that a character is waiting. The design is deliberately
basic. It is a base on which richer protocol handshakes can be built.

The top level, `uart_link`, holds two identical `uart` instances joined back to back. Both
processors' register buses are ports of the top. The processors themselves are not part of the
design.

```
        host CPU bus                                      target CPU bus
   h_cs h_rs h_rw h_din/h_dout                       t_cs t_rs t_rw t_din/t_dout
              |                                                  |
   +----------+-----------+                         +------------+---------+
   | uart (u_host)        |  h_txdata ------------> | rxdata  uart (u_target)
   |  controller          |  h_rts    ------------> | rts_in               |
   |  transmitter         |  t_cts    <------------ | cts                  |
   |  receiver            |  t_txdata <------------ | txdata               |
   |                      |  t_rts    <------------ | rts                  |
   |                      |  h_cts    ------------> | cts_in               |
   +----------------------+                         +----------------------+
```

Each direction has its own data line and its own RTS/CTS pair. A UART can therefore send and
receive at the same time.

## The frame

A character is 8 bits. By convention, 7 of them are an ASCII code and the least significant bit is
an even-parity bit. The processor supplies the parity bit as part of the character. The UART does
not compute parity when sending; it only checks parity when receiving. On the line the character
travels as a 10-bit frame, sent least significant bit first:

| bit | 0 | 1 … 8 | 9 |
|-----|---|-------|---|
| value | start = 0 | character bits 0 … 7 | stop = 1 |

An idle line is high. There is no bit-rate generator. One frame bit takes one clock, and both ends
run on the same clock. To put the link on a slower line, add a clock enable at the bit rate.

## The handshake, clock by clock

This timing is what you most need in order to change the design safely. Edges are numbered from
e0, the rising edge at which the host processor's write to TDR (the transmit data register) takes
effect. Both ends start idle and the target's receiver is enabled.

| edge | host transmitter | target receiver |
|------|------------------|-----------------|
| e0 | TDR written; the request (TRANS) becomes pending | Wait_Recv |
| e1 | Wait_TRANS sees TRANS and moves to Send_RTS. RTS goes high | |
| e2 | Send_RTS, waiting | sees RTS and moves to Receive |
| e3 | | CTS goes high |
| e4 | sees CTS and moves to Transmit. RTS drops | samples the idle line (1), so it does not count yet |
| e5 | the start bit is driven onto txdata | idle (1) again |
| e6 … e15 | bits 1 … 9 are driven, one per edge | samples the start bit at e6 … the stop bit at e15. CTS drops at e15 |
| e16 | | Load_RDR: RDR is loaded, the error flags are updated, RDRFB (receive data register full) is set |

A character takes **16 clocks** from the TDR write to RDRFB at the far end. When the sender has the
next character queued, start bits follow each other every **15 clocks**. Both figures are checked by
the testbenches.

Two details make the timing above work. Both are choices made in this design:

1. **Start-bit hunt.** The receiver enters Receive and raises CTS before the sender has seen CTS.
   For a few clocks, the line it samples is still idle. While its bit counter is zero, the receiver
   skips samples that are 1. It starts counting at the first 0, which is the start bit. This works
   whatever the delay between CTS and the first bit. Side effect: the start bit it records is
   always 0, so a framing error in practice means a bad stop bit.
2. **Early CTS release.** The receiver drops CTS in the clock that takes the stop bit. It does not
   wait until it is back in Wait_Recv. A transmitter with a queued character is back in Send_RTS
   one clock after its stop bit. If CTS were still high then, it would take that CTS as a fresh grant
   and send into a receiver that is not listening. With the early release, it waits for a real CTS.

## Transmitter (`uart_transmitter`)

The transmitter has three states.

- **Wait_TRANS.** The line is held high and the bit counter TCNT is cleared. TDRE (transmit data
  register empty) is set. On every clock the shift register is reloaded with `{1, TDR, 0}`. So the
  frame always holds the current TDR, and a late write to TDR is still picked up.
- **Send_RTS.** RTS is a decoded output of this state. The machine stays here until CTS is seen.
- **Transmit.** On each clock the lowest shift-register bit goes to `txdata`, the register shifts
  right (a 1 fills the top), TCNT counts up and TDRE goes low. The machine leaves after TCNT = 9,
  which gives ten bits.

## Receiver (`uart_receiver`)

The receiver has three states.

- **Wait_Recv.** CTS is held low and the bit counter RCNT is cleared. The machine polls RTS from the
  far end. It moves on only when the controller has enabled it.
- **Receive.** CTS is high. On each counted clock, the serial input enters the top of a 10-bit shift
  register and RCNT counts up. The machine leaves after RCNT = 9.
- **Load_RDR.** Shift-register bits [8:1] go to RDR (the receive data register) and RDRFB is set.
  The framing flag is set if the start bit is not 0 or the stop bit is not 1. The parity flag is set
  if the 8 character bits hold an odd number of ones.

RDRFB is cleared when the processor reads RDR. The two error flags are sticky: they stay set until
the processor reads the status register. If a frame lands in the same clock as either clear, the new
frame wins. A character that is not read before the next one arrives is overwritten; there is no
overrun flag.

## Controller and register map (`uart_controller`)

The processor uses chip select `cs`, register select `rs`, read/write `rw` (1 = read) and an 8-bit
data bus. A write takes effect on the rising edge while `cs` is high. Read data is combinational
during the access, and `dout` is 0 when nothing is being read.

| rs | rw | access | side effect |
|----|----|--------|-------------|
| 0 | 0 | write the control register | |
| 0 | 1 | read the status register | clears the framing and parity flags |
| 1 | 0 | write TDR | requests a transmission (TRANS) |
| 1 | 1 | read RDR | clears RDRFB |

Control bits: bit 0 is the master enable, bit 1 enables the transmitter, bit 2 enables the receiver.
A block runs only if the master enable and its own enable are both set.

Status bits (`uart_pkg::uart_status_t`):

| bit | name | meaning |
|-----|------|---------|
| 0 | RDRF | RDR holds a new character |
| 1 | TDRE | TDR may be written |
| 2 | FE | framing error seen since the last status read |
| 3 | PE | parity error seen since the last status read |
| 4 | TBUSY | a transmission is pending or in progress |

Bits 7 to 5 read as 0.

**TRANS as a request, not a pulse.** A write to TDR sets a pending flag. TRANS is this flag, gated by
the enables. The flag clears in the clock in which an idle transmitter takes it. If the transmitter
is still sending, the request waits, so a write is never lost. When the transmitter is idle, TRANS is
a one-clock pulse.

A driver can follow one rule: poll for TDRE = 1, then write TDR. Writing TDR during Send_RTS or
Transmit is safe, because the frame on its way already holds its copy. A driver that receives polls
for RDRF = 1 and reads RDR. The status value from that same poll carries FE and PE for the character.

## Where this design departs from its source description

The transmitter and receiver state machines, the 10-bit frame, the RTS/CTS order, the RS/RW register
access, the TRANS signal, RDRFB and its clearing by an RDR read all follow the original
description of this UART. The following points are this design's own:

- **Duplex.** The source calls the UART half-duplex. It also requires that a transmit and a receive
  can run at the same time. This design does the second: each direction is independent.
- **Character width.** The source mentions loading a 32-bit data word in one place. Everywhere else
  it uses a 10-bit frame with 8 data bits, and that frame is what is built. A 32-bit word takes four
  characters.
- **Parity.** Parity is part of the character, not generated by the transmitter. The sense (even) is
  assumed.
- **No ACK line.** The source lists an acknowledge step at the end of the handshake, but neither of
  its state machines has an ACK signal. None is built. The receiver's status flags tell its own
  processor whether a character arrived intact. The early drop of CTS marks the end of reception,
  but it says nothing about errors.
- **Not built.** The source's receiver chart has two further transfers that the text does not
  describe: another update of RDRFB in Wait_Recv, and a flag combining a far-end input with a
  control-register bit. Neither is implemented.
- **Own choices.** The start-bit hunt, the early CTS release, the register map and bit positions,
  the pending TRANS flag, the sticky error flags and the `busy` output are this design's choices.
- **Reset.** Reset is asynchronous and active high. The polarity is assumed.
- **One clock.** Both ends of the link are assumed to share one clock. A link between separately
  clocked ends would need synchronisers on RTS, CTS and the data line, and bit sampling from a
  faster clock. Neither is part of this design.

## Files

| file | what it is |
|------|------------|
| `rtl/uart_pkg.sv` | state enums, register-select and control-bit constants, status struct |
| `rtl/uart_transmitter.sv` | transmitter state machine |
| `rtl/uart_receiver.sv` | receiver state machine |
| `rtl/uart_controller.sv` | processor-side registers |
| `rtl/uart.sv` | one UART: controller + transmitter + receiver |
| `rtl/uart_link.sv` | top: host UART and target UART joined back to back |
| `tb/cpu_bus_if.sv` | testbench interface: register write, read and status poll |
| `tb/tb_*.sv` | one self-checking testbench per module |

The one parameter, `DATA_W` (default 8), is the character width. The frame is always `DATA_W + 2`
bits wide. The parity check covers all `DATA_W` character bits.

The transmitter and receiver carry concurrent assertions for the handshake: no data before CTS, RTS
low while sending, and CTS only during reception. Lint reports the reset in their `disable iff`
clause as a synchronous use of the asynchronous reset. No flip-flop is built from it.

## Verification

Each testbench checks its module against values it works out independently. Each prints one line,
`TB_RESULT checks=N failures=M`, and has a watchdog.

- `tb_uart_transmitter` checks the frame bits, RTS one clock after TRANS, the start bit two clocks
  after CTS, ten consecutive bit clocks, and an idle line while CTS is withheld. It covers corner
  characters and 40 random ones.
- `tb_uart_receiver` plays the far-end sender with random gaps after CTS. It checks RDR, the CTS
  timing, RDRFB two clocks after the stop bit, sticky flags with a bad stop bit and odd parity, and
  that a disabled receiver gives no CTS.
- `tb_uart_controller` checks the register decode, the enable gating, TRANS waiting behind a busy
  transmitter, the status bit positions and the read side effects.
- `tb_uart` runs one UART, with the bench as both the processor and the far end. It covers transmit,
  receive, errored frames, and transmit and receive at the same time.
- `tb_uart_link` runs the whole design at its default size. A processor thread at each end polls
  status, reads characters and writes queued ones. The test sends host to target, target to host,
  both at once, through a handshake stall (the target receiver disabled for 100 clocks), and with
  odd-parity characters. It checks every character, the 16-clock latency and the 15-clock
  back-to-back spacing. It counts how often each mechanism occurred (CTS wait, queued TRANS, both
  transmitters shifting at once, parity error, RDRFB cleared by a read) and fails if any never did.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/uart_pkg.sv tb/tb_uart_link.sv --top-module tb_uart_link -o sim
./obj_dir/sim
```

Replace `tb_uart_link` with any other testbench name. Every run takes well under a second.
