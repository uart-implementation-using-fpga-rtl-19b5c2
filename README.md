# UART with FIFO buffers and an 8x-oversampling receiver

This is a full-duplex asynchronous serial port (UART) for an FPGA, written in
SystemVerilog. A host writes bytes into one side. They leave one bit at a time on
a single output wire (TXD). Bytes arriving on the input wire (RXD) are
reassembled and queued for the host to read. The two ends of the link share no
clock. The receiver therefore has to find each bit from the line alone: it waits
for the falling edge of the start bit, then samples the line near the middle of
every bit that follows.

The default configuration is a common terminal link:

| setting | default |
|---|---|
| system clock | 50 MHz |
| baud rate | 9600 bit/s |
| frame | 1 start bit, 8 data bits (LSB first), no parity, 1 stop bit (8N1) |
| samples per bit | 8 |
| sample tick | every 651 clock cycles |
| bit time | 8 x 651 = 5208 cycles (9600.6 baud, +0.006 %) |
| frame time | 10 bits = 52 080 cycles |
| FIFO depth | 16 characters each way |

The design follows a published UART description. That description splits the
UART into five parts: a baud rate generator, a transmitter, a receiver, FIFO
buffers, and control logic between them. It draws the receiver as a control unit
steering three small parts: a shift register, a data-bit counter and a sampling
counter. This RTL keeps that structure and those signal names. The original
gives the function of most parts but not their internals. Where it is silent,
the choices made here are listed under
[Choices made in this implementation](#choices-made-in-this-implementation).

## Structure

```
            wr_valid/wr_data/wr_ready                 rd_valid/rd_data/rd_ready
 host  ───────────────┐                                      ┌─────────────── host
                      ▼                                      │
              ┌──────────────── uart_control ────────────────┐
              │  moves characters, sticky error flags         │
              └──┬──────────────────────────────────────▲────┘
                 ▼                                      │
           uart_fifo (tx)                         uart_fifo (rx)
                 │ valid/ready                          ▲ dataReady
                 ▼                                      │
              uart_tx ──► txd_o              rxd_i ──► uart_rx
                 ▲                                      ▲
                 └──────── tick (8 x baud) ─────────────┘
                          uart_baud_gen

 uart_rx = 2-FF synchroniser + uart_rx_control (controlUnit)
           + uart_rx_shift_reg (shiftReg)
           + uart_rx_bit_counter (sevenCounter)
           + uart_rx_sample_counter (counterSampling)
```

| file | role |
|---|---|
| `rtl/uart_pkg.sv` | parity enum, default constants, divisor function, error-flag struct |
| `rtl/uart_top.sv` | the complete UART |
| `rtl/uart_baud_gen.sv` | sample tick at 8 x baud, divisor selectable at run time |
| `rtl/uart_tx.sv` | transmitter: start, data, optional parity, stop |
| `rtl/uart_rx.sv` | receiver, built from the four parts below |
| `rtl/uart_rx_control.sv` | receiver state machine (controlUnit) |
| `rtl/uart_rx_sample_counter.sv` | 0..7 tick counter with half and full decode (counterSampling) |
| `rtl/uart_rx_bit_counter.sv` | data-bit counter (sevenCounter) |
| `rtl/uart_rx_shift_reg.sv` | deserialiser (shiftReg) |
| `rtl/uart_fifo.sv` | synchronous FIFO, first-word fall-through |
| `rtl/uart_control.sv` | data flow between host, FIFOs, transmitter and receiver |

## How the receiver finds the middle of each bit

This is the least obvious part of the design.

The baud rate generator gives one tick every 651 clocks, eight ticks per bit.
The receiver looks at the synchronised line only on ticks. The sampling counter
(`uart_rx_sample_counter`) counts ticks from 0 to 7 and decodes two of them:

* `halfCount` pulses on the tick that takes the count past 3. That is four ticks,
  or half a bit, after the counter was cleared.
* `fullCount` pulses on the tick that takes the count past 7. That is a whole bit
  after the counter was cleared.

The control unit (`uart_rx_control`) uses the two pulses like this:

```
line   ‾‾‾‾‾‾\____start____/‾‾‾‾d0‾‾‾‾\____d1____ ...   ‾‾‾‾stop‾‾‾‾
ticks   | | | | | | | | | | | | | | | | | | | | |         | | | |
state  IDLE  |START  h  |DATA            f         f          f
              ^ low seen at a tick: counter held at 0 until here
                       ^ halfCount: line still low? clear counter (resetSampling)
                                         ^ fullCount: shiftEn samples d0
                                                   ^ fullCount: d1 ...
                                                          stop: dataReady
```

1. **IDLE.** Both counters are held cleared. The first tick that sees the line
   low may be a start bit.
2. **START.** At `halfCount` the line is sampled again. If it is still low, this
   is the middle of the start bit. The sampling counter is then cleared
   (`resetSampling`), so from now on every `fullCount` lands one whole bit later,
   in the middle of the next bit. If the line is high again, the low pulse was a
   glitch and the receiver returns to IDLE.
3. **DATA.** Each `fullCount` raises `shiftEn`. That shifts the line value into
   the shift register and advances the bit counter. The bit counter raises
   `sevenBits` while its count is 7. The sample taken while `sevenBits` is high
   is the last data bit.
4. **PARITY.** This state is only used when parity is enabled. The parity bit is
   sampled and compared with the XOR of the data bits.
5. **STOP.** At `fullCount` the stop bit must be high. If it is, `dataReady`
   pulses for one cycle, together with `parity_err_o` when the parity bit was
   wrong. If the stop bit is low, `framing_err_o` pulses instead and the
   character is dropped. The receiver then waits in **BREAK** until the line is
   high again, so a line held low gives one error rather than a stream of them.

**Sampling error.** Because the start edge is seen only at a tick, each sample
falls 4 to 5 ticks into its bit. That is 50–63 % of the way through the bit.
This leaves room for a few percent of baud-rate mismatch. The receiver test
passes with the far end 3 % fast or slow.

**Latency.** `dataReady` comes at the middle of the stop bit, 9.5–9.63 bit times
after the start edge. So a character can be read within one bit time of its last
data bit ending.

The line passes through a two-flip-flop synchroniser before the control unit and
shift register. Add two clock cycles to all of the above.

## Transmitter timing

`uart_tx` accepts a character with a valid/ready handshake; `valid_i` is the
transmit enable. From idle, the start bit begins at the next sample tick. Every
bit then lasts exactly 8 ticks. `ready_o` is also high in the cycle that ends the
last stop bit. A character that is already waiting (the transmit FIFO is not
empty) therefore starts its start bit with no idle gap. Queued data leaves at the
full line rate: one 8N1 frame every 52 080 cycles, 9600 bit/s. `txd_o` is
registered and idles high.

## FIFOs, control logic and errors

Both FIFOs are `uart_fifo`: a power-of-two register array with read and write
pointers and an occupancy counter. `rdata_o` always shows the oldest entry. A
push into a full FIFO is ignored.

`uart_control` connects the parts, mostly with combinational wiring:

* **Host writes.** A host write goes into the transmit FIFO. `wr_ready_o` is low
  while that FIFO is full (back-pressure).
* **Transmit side.** The head of the transmit FIFO is offered to the transmitter.
  It is popped in the cycle the transmitter takes it.
* **Receive side.** A character completed by the receiver is pushed into the
  receive FIFO. If that FIFO is full, the character is lost and `err_o.overrun`
  is set.
* **Host reads.** The head of the receive FIFO is offered to the host with
  `rd_valid_o`. It is removed when `rd_ready_i` is high.

`err_o` is a packed struct `{overrun, framing, parity}`. Each flag is sticky
until `clear_err_i`. A character that arrives with a parity error is still stored
in the receive FIFO; only the flag marks it.

Assertions check the rules in the RTL:

* An offered character stays offered and unchanged until it is taken, on both
  the transmit side and the host read side.
* The FIFO count never exceeds its depth.
* The receiver never signals a character and a framing error in the same cycle.

## Choosing the baud rate

`baud_div_i` on `uart_top` is the number of clock cycles per sample tick. One
bit lasts 8 × `baud_div_i` cycles. When `baud_div_i` is 0, the divisor is
computed from the parameters as `round(CLK_FREQ_HZ / (BAUD * 8))`. A new value
takes effect at the next tick. Both ends of a link must agree on it.

At 50 MHz:

| baud | `baud_div_i` | actual baud | error |
|---|---|---|---|
| 9600 | 0 (or 651) | 9600.6 | +0.006 % |
| 19200 | 326 | 19171 | −0.15 % |
| 38400 | 163 | 38344 | −0.15 % |
| 57600 | 109 | 57339 | −0.45 % |
| 115200 | 54 | 115741 | +0.47 % |

With `DIV_W = 16` the reachable range at 50 MHz is about 96 baud to 6.25 Mbaud.

## Parameters of `uart_top`

| parameter | default | meaning |
|---|---|---|
| `CLK_FREQ_HZ` | 50 000 000 | system clock frequency, used for the default divisor |
| `BAUD` | 9600 | default baud rate |
| `DATA_BITS` | 8 | data bits per frame (5–9) |
| `STOP_BITS` | 1 | stop bits sent (1 or 2); the receiver checks the first |
| `PARITY` | `PARITY_NONE` | `PARITY_NONE`, `PARITY_EVEN` or `PARITY_ODD` |
| `OVERSAMPLE` | 8 | ticks per bit (even, at least 4) |
| `FIFO_DEPTH` | 16 | entries in each FIFO (power of two) |
| `DIV_W` | 16 | width of the divisor |

With `PARITY_NONE`, `err_o.parity` is constant 0.

Reset is synchronous and active low (`rst_n`). It clears all state. The line
output `txd_o` goes high (idle).

## Choices made in this implementation

The original description fixes these points:

* the split into baud rate generator, transmitter, receiver, FIFO buffers and
  control logic;
* the receiver's control unit with shift register, seven-counter and sampling
  counter, and their signal names;
* a sampling counter that runs 0..7 and decodes 3 and 7, giving 8 samples per
  bit;
* the 8N1 frame at 9600 baud from a 50 MHz clock;
* operation "at various baud rates".

Everything below is this implementation's own choice:

* **Counter clocking.** The sampling counter advances on the sample tick, not on
  every clock, so the system clock can stay at 50 MHz. Its half and full pulses
  are combinational on the tick, not registered a cycle later.
* **sevenBits.** This flag is read as "the count has reached 7": the bit about to
  be sampled is the last data bit.
* **Bit order.** Frames are LSB first. The receiver's shift register fills from
  the top.
* **Parity.** The reference link uses no parity, and that is the default. The
  original also says its control unit generates and checks parity, so even and
  odd parity are offered as parameter values.
* **Receiver extras.** The receiver has a two-flip-flop input synchroniser,
  start-bit glitch rejection and a wait for the line to go high after a framing
  error.
* **Receiver state machine.** The original calls its controllers
  micro-programmed but gives no microcode. A hard-wired state machine is used.
* **FIFO depth.** The FIFOs are 16 deep; the original gives no depth.
* **Host interface.** The valid/ready handshakes, sticky error flags, overrun
  detection and fill-level outputs are not specified in the original.
* **Baud rate selection.** The baud rate is chosen at run time with a divisor
  input. The original names no rate other than 9600.
* **TXD polarity.** TXD is a logic-level signal that idles high. The inversion
  mentioned for the TX pin belongs to the RS-232 line driver outside the FPGA.

The resource figure quoted for the original (250–400, without a unit) has not
been compared. Coarse synthesis of `uart_top` at the defaults gives:

* about 210 word-level cells;
* 86 flip-flop bits;
* 2 × 128 bits of FIFO storage.

## What lies outside this RTL

A complete system also needs the following parts. None of them has logic to
write here:

* the board oscillator that drives `clk`;
* an RS-232 level shifter (a MAX3232-type part) between `txd_o`/`rxd_i` and the
  connector;
* a terminal program on the PC (for example Tera Term);
* the FPGA board itself.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if anything
hangs. Build one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_uart_top \
    rtl/uart_pkg.sv tb/uart_tb_pkg.sv $(ls rtl/*.sv | grep -v uart_pkg) tb/tb_uart_top.sv
./obj_dir/Vtb_uart_top
```

The packages must come first on the command line. All state that is read is
reset, so the result does not depend on a simulator's initial values.

| testbench | what it checks |
|---|---|
| `tb_uart_top_full` | Two default UARTs exchange characters both ways. It checks 5208-cycle bits, 52 080-cycle back-to-back frames, and a character readable within one bit of its last data bit. |
| `tb_uart_top` | Two UARTs in even-parity mode with 4-deep FIFOs. It covers full-duplex traffic, transmit back-pressure, back-to-back frames, receive overrun and flag clearing, and injected frames (a glitch, bad parity, a bad stop bit). It also switches the baud rate at run time, from divisor 2 to 5 to the default. It counts each mechanism and fails if any never happened. |
| `tb_uart_tx` | Compares the line cycle by cycle with a reference frame model for 8N1, 8E2 and 7O1. It checks exact bit lengths and gap-free back-to-back frames. |
| `tb_uart_rx` | Sends bit-banged frames with a free-running tick. It checks data, dataReady timing, ±3 % baud error, glitch rejection, framing errors with a break, and parity errors. |
| `tb_uart_rx_control` | Drives the control unit's inputs cycle by cycle and checks its outputs in every state. |
| `tb_uart_rx_sample_counter`, `tb_uart_rx_bit_counter`, `tb_uart_rx_shift_reg` | Compare each part with a model under random stimulus. |
| `tb_uart_fifo` | Compares the FIFO with a queue model through fill, overflow, drain and underflow. |
| `tb_uart_control` | Tests the control logic wired to two real FIFOs, with random host, transmitter and receiver timing. It checks ordering, overrun and the sticky flags. |
| `tb_uart_baud_rates` | Two default UARTs exchange short texts at 9600, 19200, 38400, 57600 and 115200 baud, selected at run time. It checks the data, the absence of error flags, and a bit time of exactly 8 x divisor cycles at each rate. |
| `tb_uart_baud_gen` | Checks the tick period for the default divisor and for run-time divisors. |

`tb/uart_tb_pkg.sv` builds the expected line levels of a frame. The transmitter
and receiver tests use it as their reference.
