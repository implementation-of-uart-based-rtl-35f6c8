# UART with built-in self test

This is an 8-bit UART that can test itself. A pseudo-random pattern
generator (an LFSR) feeds test characters into both the receiver and the
transmitter. A response analyzer compares what comes back with what was
sent. No external tester is needed: one input, `enable`, switches the block
from normal operation (*UART mode*) to self test (*test mode*), and a few
outputs report the result.

The UART is built the way early peripheral chips were. A data bus buffer
and read/write control logic sit on the host side. The transmitter is a
buffer register feeding an output register. The receiver is an input
register feeding a buffer register. A status register holds the flags. The
self-test parts are the four classic BIST blocks: a pattern generator, the
circuit under test (the UART itself), a response analyzer and a test
controller.

All logic is synthesizable SystemVerilog. It runs on one clock with a
synchronous, active-high reset.

## Block structure

```
              host bus (cs_n rd_n wr_n cd d_in d_out d_oe)
                          |
                 rw_control + data_bus_buffer ---- status_reg
                     |               ^
      UART mode      |               |  received character
                     v               |
   +---------- uart_tx ---------+   uart_rx ------------------------+
   | tx_buffer -> tx_output_reg |-->| input reg (SISO) -> buffer (SIPO) |
   | (PISO+cnt)   (SISO+cnt)    |   +-----------------------------------+
   +------------|---------------+        ^ line into the receiver
                | txd                    |
      test mode:|                        |
   lfsr_tpg --PP (parallel)--> uart_tx   |
   lfsr_tpg --PS (serial, framed)--------+  then txd looped back
   bist_controller sequences the test; response_analyzer compares
   baud_gen gives the bit-rate enable to both directions
```

| Module | Role |
|---|---|
| `uart_bist_top` | Top level: the UART, the self-test circuit and the mode multiplexers |
| `uart_tx` | Transmitter: `tx_buffer` + `tx_output_register` |
| `tx_buffer` | 8-bit PISO that takes the written byte and hands it to the output register bit by bit; its counter gives TxRDY |
| `tx_output_register` | 8-bit SISO that sends the framed character on `txd`; its counter tracks the data bits |
| `uart_rx` | Receiver: input register (SISO), receiver buffer register (SIPO), receiver control logic |
| `shift_counter` | Counter with load/shift/op pins, used twice in the transmitter |
| `piso_reg`, `siso_reg`, `sipo_reg` | 8-bit shift registers |
| `baud_gen` | Divides the clock down to the bit rate |
| `rw_control` | Decodes `cs_n`/`rd_n`/`wr_n`/`cd` into one-cycle requests |
| `data_bus_buffer` | Latches write data; drives read data (character or status) |
| `status_reg` | UART flags, sticky error flags, self-test result |
| `lfsr8` | 8-bit Galois LFSR |
| `down_counter3`, `clk_delay` | Bit counter and one-clock delay of the pattern generator |
| `lfsr_tpg` | Test pattern generator: LFSR + PISO + down counter + delay |
| `response_analyzer` | Comparator, failure counter, first-failure index, signature register |
| `bist_controller` | Test controller: runs the patterns through the UART |
| `uart_pkg` | Status word layout and state encodings |

## The character frame and the bit clock

A character goes on the line as one start bit (0), eight data bits with the
least significant bit first, and one stop bit (1). The line idles at 1. There
is no parity.

`baud_gen` outputs `tick`: one clock cycle high every `DIVISOR` cycles
(default 16). The transmitter and the receiver use it as their bit clock in
the form of a clock enable. There are no derived clocks.

`DIVISOR` is the number of clock cycles per bit. It must be at least 10,
because the receiver needs 8 cycles between two bit samples to move a
character into its buffer.

## Transmit path

The transmitter has two registers in series, so the host can queue one
character behind the one being sent.

1. **Buffer (`tx_buffer`).** A host write is accepted only while `txrdy` is
   high. It loads the byte in parallel into a PISO (the `Reg_load` function)
   and restarts the buffer's counter, which drops `txrdy`.
2. **Buffer to output register.** While the output register reports itself
   empty, the PISO shifts one bit per clock into it, least significant bit
   first. While the output register is busy, the PISO is held (its
   `sel` input is 1). After 8 shifts the counter's `op` output raises `txrdy`
   again. The host may now write the next byte while this one is still on
   the line.
3. **Output register (`tx_output_register`).** This is a chain of eight
   flip-flops, D-ff 7 down to D-ff 0. Bits enter at D-ff 7; `txd` comes from
   D-ff 0. Once the word is complete, the register waits for a tick with
   `ack` high. It then sends the start bit, the 8 data bits and the stop bit,
   one per tick. A counter loaded at the start bit tells when the 8th data
   bit has left.

`ack` is flow control from the remote side: while it is low, a complete
word waits in the output register and the line stays idle. `txe` is high
only when both registers are empty.

**Timing.** Writing into an idle transmitter takes 1 clock to load and 8 to
shift. The start bit then begins on the first tick after that. Every bit
lasts exactly `DIVISOR` clocks, and `txd` changes in the cycle right after
a tick.

## Receive path

1. `rxd` passes through a two-flop synchronizer.
2. The receiver samples the line **once per tick**. When it is enabled
   (`en_bar` low) and idle, a 0 sample is taken as a start bit. The next 8
   samples are shifted into the input register (an 8-bit SISO). The sample
   after them is the stop bit.
3. After the stop bit, the input register shifts its 8 bits one per clock
   into the receiver buffer register (an 8-bit SIPO). When the 8th bit is in,
   the buffer is full: `rxfull` rises, and `rxrdy` too while `en_bar` is low.
   The character is on the buffer's parallel output.
4. When a host read of the data register ends, the buffer is emptied.

Error cases:

- **Framing error.** A stop bit sampled as 0 raises a one-cycle framing
  error. The character is still delivered.
- **Overrun.** If a character completes while the buffer is still full, it
  is dropped and a one-cycle overrun error is raised.
- **Receiver disabled.** With `en_bar` high, no new character starts and
  `rxrdy` is masked. `rxfull` still shows the buffer.

**Sampling once per bit is a real limitation.** It is reliable only when the
sender's bit period equals the receiver's `DIVISOR` clocks. That holds in the
self-test loopback and in the testbench, which sends at an arbitrary phase
but at exactly that rate. A sender with a small rate error drifts one sample
per character. A receiver meant for independent clocks would oversample
(typically 16x) and sample in mid-bit. That is not done here.

## Host interface

The host bus follows the usual 8-bit peripheral convention. `cs_n`, `rd_n`
and `wr_n` are active low and are assumed synchronous to `clk`. `cd` selects
the register.

The three-state data bus is split into three ports: `d_in`, `d_out`, and the
enable `d_oe`. Join them at the pad or at the next level up.

| Access | `cd` | Effect |
|---|---|---|
| write | 0 | Byte goes to the transmitter when the write cycle ends (ignored if `txrdy` was low) |
| write | 1 | Ignored (there is no command register) |
| read | 0 | Received character; the buffer is emptied when the read cycle ends |
| read | 1 | Status word; the sticky error bits are cleared when the read cycle ends |

`d_out` and `d_oe` are registered, so hold a read at least two clock cycles
and sample at its end.

Status word (`uart_pkg::status_t`):

| Bit | Name | Meaning |
|---|---|---|
| 0 | rxrdy | A received character is waiting |
| 1 | rxfull | The receive buffer is full |
| 2 | txrdy | The transmit buffer can take a byte |
| 3 | txe | The transmitter is completely empty |
| 4 | framing_err | Sticky: a stop bit was 0 |
| 5 | overrun_err | Sticky: a character was dropped |
| 6 | bist_done | The self test has finished |
| 7 | bist_fail | The self test found at least one failure |

Errors that occur during the self test are not recorded in the status word.

## Self test

### Pattern generator (`lfsr_tpg`)

**The LFSR (`lfsr8`)** is an 8-bit Galois shift register. The last stage
q7 feeds stage 0 directly, and it is XORed into the inputs of stages 1, 5
and 6. That gives the polynomial x^8 + x^6 + x^5 + x + 1 (`POLY = 8'h63`).
This polynomial is primitive: from the seed `8'h01` the register steps
through all 255 nonzero values before repeating.

The original description writes the polynomial as x^8 + x^6 + x^5 + 1, but
its drawing has three XOR taps. The four-term polynomial cannot give a
maximal-length sequence, because any polynomial with an even number of terms
is divisible by x + 1. The five-term form matching the drawing is used.
`POLY = 8'h61` selects the four-term version.

**The PISO** is loaded with the LFSR state. Its `sel` input is tied to 0,
so it shifts on every bit trigger and puts one pattern bit per trigger on
`ps`, least significant bit first. The PISO rotates: bit 0 re-enters at the
top. After 8 triggers it therefore holds the whole pattern again.

**The 3-bit down counter** counts the triggers from 7 to 0. The trigger that
finds it at 0 is the eighth; it steps the LFSR. One clock later (the
one-clock delay), `pp_load` pulses. In that cycle `pp` carries the pattern
just sent serially, to be passed to the transmitter in parallel. At the same
edge the PISO loads the next pattern.

### One pattern, step by step (`bist_controller`)

1. **Receiver check.** The controller drives the receiver's input with a
   frame: a start bit, then `ps` for eight ticks (each tick is one trigger to
   the generator), then a stop bit.
2. After the eighth bit, `pp_load` writes the same pattern into the
   transmitter. The controller latches it as the expected value.
3. When the receiver has the character, the analyzer compares it with the
   expected value, and the controller reads the character out of the
   receiver.
4. **Transmitter check.** The controller connects the transmitter's output
   to the receiver's input and raises the transmitter's `ack`. The
   transmitter sends the pattern, and the received character is compared a
   second time.

So each pattern exercises the receiver on its own, and then the transmitter
and the receiver together.

If a response does not arrive within 32 ticks, or arrives with a framing
error, it is checked as *missing* and counts as a failure. The test
therefore always finishes, even with a dead transmitter or a stuck line.

With the defaults (255 patterns, 16 clocks per bit), one pattern takes
about 22 bit times. The whole test takes 89,740 clock cycles.

### Results (`response_analyzer`)

- **`fail_count`** is the number of failed comparisons. It is 16 bits wide
  and saturates at its maximum.
- **`fault_addr`** is the index of the first failing pattern.
- **`signature`** is an 8-bit multiple-input signature register over every
  received character: `sig <= step(sig) XOR actual`, where `step` is one
  LFSR step with the same polynomial.
- **`bist_pass`** is `bist_done` with no failure recorded.

For a fault-free run the signature is fixed by the pattern sequence, so it
can be checked against a precomputed value.

### Mode switching

Raising `enable` starts the test. The controller takes over the
transmitter's data and write inputs, the receiver's input, read and enable,
and the `ack` seen by the transmitter:

- `txd` is held at 1.
- Host writes are ignored.
- A character still waiting in the receiver is discarded.

`bist_done` stays high until `enable` falls, which returns the block to UART
mode. Dropping `enable` part-way through aborts the test.

## Top-level pins and parameters

| Pin | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst | in | 1 | Clock; synchronous active-high reset |
| enable | in | 1 | 1 = test mode, 0 = UART mode |
| cs_n, rd_n, wr_n, cd | in | 1 | Host bus control |
| d_in / d_out, d_oe | in / out | 8 / 8, 1 | Host data bus, split |
| rxd / txd | in / out | 1 | Serial line |
| ack | in | 1 | Remote side ready; a frame starts only while high |
| en_bar | in | 1 | Receiver enable, active low |
| txrdy, txe, rxrdy, rxfull | out | 1 | Transmitter and receiver flags |
| bist_done, bist_pass | out | 1 | Self-test outcome |
| fail_count | out | 16 | Failed comparisons |
| fault_addr | out | 8 | Index of the first failing pattern |
| signature | out | 8 | Response signature |

| Parameter | Default | Meaning |
|---|---|---|
| DIVISOR | 16 | Clock cycles per bit (at least 10) |
| NUM_PATTERNS | 255 | Patterns per self test (1 to 256) |
| LFSR_POLY | 8'h63 | Feedback taps of x^0..x^7 |
| LFSR_SEED | 8'h01 | First pattern (nonzero) |

The character width is 8 bits throughout. The shift registers and counters
take a `WIDTH` parameter, but the top level, the pattern generator and the
analyzer are written for 8 bits.

## What follows the original description and what is filled in

**Taken from the original description:**

- The block split: data bus buffer, read/write control, transmitter
  buffer / output register / control, receiver input register / buffer /
  control.
- The PISO with `sel` and `Reg_load`, and the SISO, SIPO and counters.
- The pin names TxD, TxRDY, TxE, ACK, RST, RxD, RxRDY, Rxfull, En_BAR,
  Peri_RQT, RD, WR and CS.
- A status register for transfer errors.
- The two modes.
- The pattern generator: LFSR, PISO with `sel` = 0, 3-bit down counter with
  a one-clock delay to `Reg_load`, serial output to the receiver, parallel
  output to the transmitter after the eighth bit.
- The generic BIST split: generator, circuit under test, analyzer,
  controller.

**Filled in by this design, where the description is silent or only names
a block:**

- One clock with a bit-rate enable, instead of separate transmit and
  receive clocks.
- The start/stop framing, LSB-first order and once-per-bit sampling.
- The meaning of ACK (flow control) and En_BAR.
- The error set (framing, overrun), the status layout and clear-on-read.
- The `cd` register select and the split data bus.
- The LFSR seed, the choice of the five-term polynomial, and the rotating
  PISO.
- The test sequence with transmitter loopback, the timeout, and the number
  of patterns.
- The analyzer's contents: failure counter, first-failure index, signature
  register.

**Not reproduced:**

- The original implementation's top-level signals `y[7:0]`, `rd_uart`,
  `wr_uart`, `head_bit` and `wr_data[7:0]`, whose function is not described.

**Size compared with the original FPGA implementation.** That implementation
reported 86 flip-flops. This design synthesizes to about 176 flip-flop bits.
The extra bits come from the registered host interface, the 16-bit failure
counter, the signature register, the timeout counter and the receiver
synchronizer.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/uart_pkg.sv \
    tb/tb_uart_bist_top.sv --top-module tb_uart_bist_top
./obj_dir/Vtb_uart_bist_top
```

For any other block, replace `uart_bist_top` with the block's name. The
package file must come first; Verilator finds the other modules through
`-Irtl`.

`tb_uart_bist_top` runs the whole design at its default parameters. It
covers:

- transmit, including a character queued behind a busy line;
- receive at an arbitrary phase against the bit clock;
- framing error and clear-on-read;
- overrun;
- `ack` hold and `en_bar` disable;
- a full 255-pattern self test, whose signature is checked against an
  independent model;
- a host write ignored in test mode;
- a self test with the receiver line forced stuck at 1, which must report
  all 510 comparisons as failed.

It counts each of these events and fails if any never happened. It takes
about a second.

`tb_bist_controller` runs the test sequence with a stuck-at-0 bit injected
in the received data. It checks that exactly the patterns with that bit set
fail, and it also checks a transmitter that never sends.

The LFSR, pattern generator and analyzer testbenches compute the expected
values independently, as multiplication by x modulo the polynomial.
