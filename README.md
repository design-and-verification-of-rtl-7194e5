# Full duplex UART pair with a Wishbone host interface

Two identical UARTs that talk to each other over a pair of asynchronous
serial lines, each one driven by its own host through a Wishbone bus. A UART
turns bytes written by its host into serial frames on its TXD pin and turns
frames arriving on its RXD pin back into bytes for the host. There is no
shared clock on the line: both ends agree on a bit rate and a frame format
in advance, and the receiver re-times itself on the start bit of every frame.

Each UART is built in the style of the 16550: a programmable baud rate
generator, a transmitter FIFO feeding a transmitter shift register, a
receiver shift register feeding a receiver FIFO, a register file with the
classic names (RBR, THR, IER, IIR, FCR, LCR, LSR, DLL, DLH) and an interrupt
line. The design follows the UART of the article "Design and Verification of
UART using System Verilog" (Yamini R, Ramya M V, IJEAT, 2020), which names
these parts and their roles but leaves most of the detail open. Where it is
silent this design takes the 16550's choices; the section
[Departures and choices](#departures-and-choices) lists them.

## The frame on the wire

The line idles at 1. A frame is

| field  | bits                    | value                                  |
|--------|-------------------------|----------------------------------------|
| start  | 1                       | 0                                      |
| data   | 5, 6, 7 or 8, LSB first | the character                          |
| parity | 0 or 1                  | even, odd, or stuck at 0 / 1           |
| stop   | 1, or 2 (1.5 for 5-bit words) | 1                                |

The format is set by LCR, the Line Control Register:

| LCR bit | name | meaning                                                  |
|---------|------|----------------------------------------------------------|
| 1:0     | WLS  | word length = 5 + WLS                                    |
| 2       | STB  | 0: one stop bit; 1: two (1.5 when WLS = 0)               |
| 3       | PEN  | parity bit present                                       |
| 4       | EPS  | 1: even parity, 0: odd parity                            |
| 5       | SP   | stick parity: the parity bit is the constant NOT EPS     |
| 6       | BC   | break control: hold TXD at 0                             |
| 7       | DLAB | divisor latch access (see the register map)              |

Both ends must use the same LCR settings and divisor. A common setting is
`LCR = 0x03` (8 data bits, no parity, one stop bit, "8N1").

## Bit timing: the 16x baud clock

Everything serial runs on one enable pulse, BCLK, produced by the baud rate
generator (`uart_brg`). It counts the system clock down from the 16-bit
divisor `DLH:DLL` and pulses once every `divisor` clocks. Every bit lasts 16
BCLK pulses, so

    baud rate = f_clk / (16 * divisor)

For example, a 50 MHz clock with divisor 27 gives 115 740 baud (0.5 % above
115 200). Divisor 0 stops the generator, which is the reset state; the UART
does nothing on the line until the divisor is written. BCLK is a clock
enable, not a clock: the whole design is one clock domain.

**Transmitter** (`uart_tx`). On a BCLK pulse, when the transmitter FIFO is
not empty and the shift register is idle (or is finishing its last stop bit),
it takes the next character and latches LCR with it, so a later LCR write
cannot tear a frame in flight. It then holds each bit of the frame for 16
pulses. Characters queued in the FIFO go out back to back: a frame of
`n` bits takes exactly `16 * n * divisor` clocks and the next start bit
follows at once.

**Receiver** (`uart_rx`). This is the part that needs the 16x clock. RXD is
asynchronous, so it first passes through two flip-flops. In idle, the first
BCLK pulse that sees the line low is taken as the possible start of a start
bit. Seven pulses later, close to the middle of that bit, the line is
checked again; if it is back at 1 the event was a glitch and is ignored.
From then on the line is sampled every 16 pulses, which lands each sample
near the middle of a data, parity or stop bit even when the two ends' clocks
differ by a few percent. The uncertainty of the start detection is one BCLK
period plus the two synchroniser clocks, i.e. about 1/16 of a bit.

At the sample of the first stop bit the character is complete and is
pushed into the receiver FIFO, half a stop bit before the frame ends. Three
checks are made with it:

- *parity error*: the received parity bit disagrees with the LCR rule;
- *framing error*: the stop bit was sampled as 0;
- *break*: data, parity and stop bits were all 0 (the line was held low for
  a whole frame). A zero character is delivered and the framing error flag
  is set with it; the parity flag is not.

After a framing error or a break the receiver waits for the line to go back
to 1 before it looks for the next start bit.

## Register map and the divisor latch

The host sees eight byte-wide registers at Wishbone addresses 0..7. Two
addresses hold two registers each, chosen by the direction of the access,
and two more are switched by LCR.DLAB:

| addr | DLAB = 0, read | DLAB = 0, write | DLAB = 1 (read and write) |
|------|----------------|-----------------|---------------------------|
| 0    | RBR receive buffer (pops the receiver FIFO) | THR transmit holding (pushes the transmitter FIFO) | DLL divisor, low byte |
| 1    | IER            | IER             | DLH divisor, high byte     |
| 2    | IIR (read only)| FCR (write only)| same as DLAB = 0           |
| 3    | LCR            | LCR             | LCR                        |
| 5    | LSR            | (ignored)       | LSR                        |
| 4, 6, 7 | 0           | (ignored)       | 0                          |

A typical start-up sequence is: `LCR = 0x80` (DLAB on), write DLL and DLH,
`LCR = 0x03` (DLAB off, 8N1), `FCR = 0x07` (FIFOs on and cleared), then set
IER. All registers reset to 0.

**IER** bit 0 enables the received-data interrupt, bit 1 the
transmitter-empty interrupt, bit 2 the line-status interrupt.

**FCR** bit 0 enables the FIFOs (any change of it also empties both), bit 1
empties the receiver FIFO, bit 2 empties the transmitter FIFO, bits 7:6 set
the receiver trigger level to 1, 4, 8 or 14 characters. Bit 3 (DMA mode) is
accepted and has no effect.

**LSR** is the status the host polls:

| bit | name | set when                                                   |
|-----|------|------------------------------------------------------------|
| 0   | DR   | the receiver FIFO holds a character                        |
| 1   | OE   | a character arrived with the receiver FIFO full (sticky)   |
| 2   | PE   | a character arrived with a parity error (sticky)           |
| 3   | FE   | a character arrived with a framing error (sticky)          |
| 4   | BI   | a break was received (sticky)                              |
| 5   | THRE | the transmitter FIFO is empty                              |
| 6   | TEMT | the transmitter FIFO and the shift register are both empty |
| 7   | -    | FIFO mode only: PE, FE or BI occurred since the last LSR read (sticky) |

The sticky bits are cleared by reading LSR; an error that arrives in the same
clock as that read is kept. They belong to the line, not to a particular
character in the FIFO: the host learns that some character since its last
LSR read was bad, not which one. A character with a parity or framing error
is still delivered.

## FIFOs and character mode

Both FIFOs (`uart_fifo`) are 16 characters deep (parameter `FIFO_DEPTH`).
THR is the write port of the transmitter FIFO and RBR is the read port of
the receiver FIFO; the head of the receiver FIFO is always visible, so an
RBR read returns it and removes it in the same access. With FCR bit 0
clear, each FIFO holds a single character and so becomes the transmitter
hold register and the receiver buffer register of a UART without FIFOs.

When a character is received while the receiver FIFO (or the single RBR) is
full, the new character is lost, the ones already stored are kept, and LSR.OE
is set. A THR write while the transmitter FIFO is full is dropped without a
flag; the host should wait for THRE before writing a block of up to
`FIFO_DEPTH` characters.

## Interrupts

`uart_intr` drives `int_o` high while any enabled source is pending, and
IIR tells the host which one, highest priority first:

| IIR[3:0] | source               | pending while                                    | cleared by                   |
|----------|----------------------|--------------------------------------------------|------------------------------|
| 0110     | receiver line status | LSR OE, PE, FE or BI set                         | reading LSR                  |
| 0100     | received data        | FIFO level >= trigger level (character mode: DR) | reading RBR below the level  |
| 0010     | THR empty            | raised when the transmitter FIFO becomes empty, or when this interrupt is enabled while it is empty | writing THR, or reading IIR while it is the one shown |
| 0001     | none                 |                                                  |                              |

IIR bits 7:6 read 11 when the FIFOs are enabled. There is no character
timeout interrupt: with a trigger level above 1, the last few characters of
a message raise no interrupt, and the host should poll LSR.DR or use
trigger level 1.

## The host interface

`uart_wb` is a classic Wishbone slave with 8-bit data and a 3-bit address.
In the first clock of a cycle (`cyc & stb`, no ack yet) it issues a one-clock
read or write strobe to the registers; at the same edge it captures the read
data and raises `wb_ack_o` for one clock. An access therefore takes two
clocks, and a register with a read side effect (RBR, LSR, IIR) acts exactly
once per access even if the master holds `stb` after the ack.

## The two-UART top

`uart_duplex` is the top. It holds UART1 and UART2 (`uart_top`), sharing
`clk` and `rst_n`, and brings out for each its Wishbone port (`wb1_*`,
`wb2_*`), its interrupt (`int1_o`, `int2_o`) and its serial pins (`txd1_o`,
`rxd1_i`, `txd2_o`, `rxd2_i`). The serial pins are joined outside:

| arrangement           | joins                                  |
|-----------------------|----------------------------------------|
| full duplex           | `txd1_o -> rxd2_i`, `txd2_o -> rxd1_i` |
| half duplex           | the same, one side sending at a time   |
| each UART on its own  | `txd1_o -> rxd1_i`, `txd2_o -> rxd2_i` |
| one to both           | `txd1_o -> rxd1_i` and `rxd2_i`        |

In a real system the two UARTs would sit on different chips with different
clocks; in this top they share one. Tolerance of a clock mismatch is tested
separately, with two `uart_top` instances on clocks of different frequency
(`uart_clock_tolerance_tb`).

## Departures and choices

What follows the article: the set of blocks (baud rate generator,
transmitter with FIFO, hold and shift register, receiver with shift register,
FIFO and buffer register, registers, interrupt logic, Wishbone bus), the
frame (start 0, data, optional parity, stop 1), the 16x baud clock from a
divisor latch, the register names and the address sharing of DLL/RBR/THR
under DLAB and of IIR/FCR, FCR enabling and clearing the FIFOs, and the pair
of UARTs for full duplex.

This design's own choices, where the article gives no detail:

- register addresses and bit layouts, reset values, the interrupt sources
  and their priority and codes: those of the 16550;
- FIFO depth 16 and trigger levels 1/4/8/14;
- receiver sampling (two-flop synchroniser, start bit re-checked mid-bit,
  mid-bit sampling) and its behaviour after a framing error or break;
- LSR error bits kept per line rather than per character in the FIFO;
- a new character lost on overrun (a 16550 in character mode overwrites
  RBR instead);
- a full transmitter FIFO silently dropping a THR write;
- the Wishbone timing (one wait state, no byte selects, no error signal);
- the serial pins of the pair brought out rather than joined inside.

Not included: the 16550's modem control and status registers (MCR, MSR),
the scratch register, the character timeout interrupt, DMA signalling and
the loopback bit of MCR (loopback is done by wiring, as above).

## Files

| file | contents |
|------|----------|
| `rtl/uart_pkg.sv`    | register addresses, LCR/FCR/IER structs, IIR codes, parity function |
| `rtl/uart_brg.sv`    | baud rate generator |
| `rtl/uart_fifo.sv`   | FIFO with one-word mode |
| `rtl/uart_tx.sv`     | transmitter shift register and framing |
| `rtl/uart_rx.sv`     | receiver shift register, de-framing, error checks |
| `rtl/uart_regs.sv`   | register file |
| `rtl/uart_intr.sv`   | interrupt priority and IIR |
| `rtl/uart_wb.sv`     | Wishbone slave |
| `rtl/uart_top.sv`    | one UART |
| `rtl/uart_duplex.sv` | the pair (top) |
| `tb/*_tb.sv`         | one self-checking testbench per module, plus `uart_fig5_tb` |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`; each also has a watchdog. To build and
run one with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/uart_pkg.sv tb/uart_duplex_tb.sv --top-module uart_duplex_tb \
        -Mdir obj_duplex
    ./obj_duplex/Vuart_duplex_tb

Replace `uart_duplex_tb` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/uart_pkg.sv rtl/<module>.sv`.

What the testbenches establish:

- `uart_brg_tb`: first pulse and period equal the divisor, for divisors
  from 1 to 65535; divisor 0 gives no pulses.
- `uart_fifo_tb`: random push/pop/clear traffic against a queue model, in
  FIFO and one-word mode, including overflow.
- `uart_tx_tb`: all 40 LCR formats; TXD compared at every BCLK pulse with an
  independently built frame; back-to-back spacing; break.
- `uart_rx_tb`: all 40 formats with random start phase; data, parity error,
  framing error and break flags; delivery time; glitch rejection.
- `uart_regs_tb`, `uart_intr_tb`, `uart_wb_tb`: register decoding and
  side effects, interrupt priority against a model, Wishbone timing.
- `uart_top_tb`: one UART looped back, five formats, frame period on the
  line, THRE and received-data interrupts.
- `uart_duplex_tb`: the pair at its default parameters through loopback,
  half duplex both ways, full duplex and one-to-both, plus parity error,
  framing error, break, overrun in both FIFO modes, FIFO clear, trigger
  level, all three interrupts, a divisor change and the frame period. It
  counts each of these and fails if one never happened.
- `uart_fig5_tb`: the pair in full duplex with fixed data, UART1 sending
  12 11 13 12 11 11 11 14 and UART2 sending 33 88 22 77 44 66 66 55, with
  the transfer time checked against eight back-to-back frames.
- `uart_clock_tolerance_tb`: two UARTs on clocks 2.5 % apart exchange 24
  characters each way without error; at 12 % the mismatch is detected.

The RTL also carries concurrent assertions for its handshakes (a character
is taken from the transmitter FIFO only when there is one, register strobes
last one clock and are exclusive, a received character is delivered for one
clock at the end of a frame, Wishbone ack only answers a strobe, no FIFO
traffic while DLAB is set, the FIFO count never exceeds its depth); compile
with `--assert` to have them checked.

The testbenches use small divisors (1 to 4) to keep runs short; the logic
does not depend on the divisor beyond the counter width. Not verified:
synthesis to a particular technology and timing closure.
