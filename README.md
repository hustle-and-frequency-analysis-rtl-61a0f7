# UART with parity and CRC checking

A small, self-contained UART (universal asynchronous receiver/transmitter)
for FPGAs. Each byte travels on a single wire together with two
checks: an even-parity bit and a short CRC remainder. The CRC is computed
with a divisor polynomial that the user supplies at run time. The receiver
recomputes both checks and flags any mismatch. It reports a parity error and
a CRC error separately, and it also outputs the remainder it received.

The design was made for a study of FPGA power at clock frequencies from
0.1 GHz to 10 GHz, with the serial pins driven through HSTL I/O standards
(HSTL_I, HSTL_II, HSTL_I_18, HSTL_II_18) on a Spartan-6. Neither the clock
frequency nor the I/O standard appears in the RTL. The clock frequency only
sets the baud rate, through a divider. The I/O standard is a pin constraint
of the FPGA flow and does not change the logic.

## Structure

```
                 uart_top (one station)
   tx_data/load -> uart_tx ----------------------------> tx_out
                     ^ tick
   clk -------> baud_gen
                     v tick
   rx_data/flags <- uart_rx <----------------------------- rx_in
   crc_poly ------> (both)
```

A station has three parts: a baud-rate generator, a transmitter and a
receiver. A link is made of two stations wired crosswise: the `tx_out` of
each station drives the `rx_in` of the other. Both directions can run at
the same time. Both ends must use the same `crc_poly`.

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | sizes, frame-phase enum, `even_parity` and `crc_remainder` functions |
| `rtl/baud_gen.sv` | modulo-`DIVISOR` counter, one-clock `tick` at 16x the baud rate |
| `rtl/uart_tx.sv` | holding register, 9-bit intermediate shift register, parity, CRC, stop |
| `rtl/uart_rx.sv` | synchroniser, start-bit qualification, mid-bit sampling, checks |
| `rtl/uart_top.sv` | one station |

## The frame

15 bits, each lasting 16 ticks, i.e. `16 * DIVISOR` clocks:

| bit | 0 | 1..8 | 9 | 10..13 | 14 |
|---|---|---|---|---|---|
| value | start (0) | data, LSB first | even parity of data | CRC remainder, MSB first | stop (1) |

The line idles high. The parity bit makes the count of ones in the data
and the parity bit even.

## The CRC

The 4-bit remainder comes from polynomial division over GF(2). The
message is the data byte, with bit 7 as its highest coefficient. It is
multiplied by x^4 and divided by the generator
`g(x) = x^4 + crc_poly[3] x^3 + crc_poly[2] x^2 + crc_poly[1] x + crc_poly[0]`,
whose leading one is implicit. `crc_poly = 4'b0011`, for example, selects
x^4 + x + 1. In hardware this is an unrolled shift-and-XOR loop
(`uart_pkg::crc_remainder`), evaluated once per byte in a single clock:

```
r = 0
for i = 7 downto 0:
    feedback = r[3] ^ data[i]
    r = r << 1
    if feedback: r = r ^ crc_poly
```

This gives the same result as long division of `{data, 4'b0000}` by
`{1, crc_poly}`. The testbenches use that long division as their
independent reference. The CRC covers the data bits only, not the parity
bit.

What each check catches: a single inverted data bit trips both flags. An
inverted parity bit trips only `parity_err`. An inverted remainder bit
trips only `crc_err`. Because the divisor is a run-time input, a poor
choice is possible: with `crc_poly = 0` the generator is x^4, and the
remainder is then just the low four data bits. Choose a generator with a
nonzero constant term, e.g. `4'b0011`.

## Transmitter: holding register and intermediate register

`uart_tx` has two levels of storage:

1. **Holding register.** A byte on `data_in` is written when `load` and
   `ready` are both high on a clock edge. `ready` is simply "holding
   register empty".
2. **Intermediate register (9 bits).** When the shifter is idle and the
   holding register is full, the byte moves across as `{data, 1'b0}`. The
   low 0 is the start bit. In the same clock the parity bit and the CRC
   remainder are computed and stored, and `crc_poly` is sampled.

While shifting, `tx_out` is the intermediate register's LSB, so the start
bit leaves first and the data follow LSB first. The register shifts right
once per bit time. After nine bits, the line carries the parity bit, then
the CRC register's MSB four times with a shift in between, then the stop
bit. `done` pulses at the end of the stop bit.

The holding register is free again as soon as its byte has moved to the
intermediate register. The writer can therefore hand over the next byte
during the current frame, and frames follow each other with no idle gap.
The start bit begins on the clock after the previous stop bit ends. Its
first tick can come up to one tick period later, so a start bit lasts
between 15 and 16 ticks.

`tx_out` is a multiplexer over flip-flop outputs, not a flip-flop itself.
If the pad needs a glitch-free registered output, add a flop, which delays
the line by one clock.

## Receiver: finding and sampling bits

`uart_rx` passes `rx_in` through two flip-flops. In idle, a low level is
taken as a possible start bit. Eight ticks later, which is mid-bit, the
line must still be low; otherwise the receiver goes back to idle, so
glitches shorter than about half a bit are ignored. From then on it samples
every 16 ticks, in the middle of each bit. The start bit and the eight data
bits shift into a 9-bit register from the top, the same layout as the
transmitter's. The parity bit and the four remainder bits follow.

In the middle of the stop bit, the receiver presents `data_out`,
`parity_err`, `crc_err` and `crc_out` (the remainder as received), with a
one-clock `valid` pulse. It then returns to idle, ready for the next start
edge half a bit later. The outputs hold until the next frame completes.
The value of the stop bit is not checked, so there is no framing-error
flag.

## Baud rate and the clock

`baud_gen` counts `DIVISOR` clocks per tick. At the default `DIVISOR = 54`
the baud rate is `f_clk / 864`:

| clock | baud rate | frame time |
|---|---|---|
| 0.1 GHz | 115.7 kbaud | 129.6 us |
| 0.2 GHz | 231.5 kbaud | 64.8 us |
| 0.5 GHz | 578.7 kbaud | 25.9 us |
| 1 GHz | 1.157 Mbaud | 13.0 us |
| 10 GHz | 11.57 Mbaud | 1.3 us |

To hold a fixed baud rate when the clock is scaled, change `DIVISOR` by the
same factor. Across the 16 ticks of a bit, the sampling point tolerates a
few percent of clock mismatch between the ends, as usual for a 16x UART.
The upper frequencies of this table are far above what Spartan-6 fabric
reaches; they are listed only to show the scaling.

## Interface of `uart_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `crc_poly` | in | 4 | CRC divisor, low coefficients |
| `tx_data`, `tx_load` | in | 8, 1 | byte to send and its write strobe |
| `tx_ready` | out | 1 | holding register empty; a byte is taken when `tx_load && tx_ready` |
| `tx_busy`, `tx_done` | out | 1 | byte held or on the line; end-of-frame pulse |
| `tx_out` / `rx_in` | out / in | 1 | serial line, idle high |
| `rx_data`, `rx_valid` | out | 8, 1 | received byte and one-clock pulse |
| `rx_parity_err`, `rx_crc_err` | out | 1 | check results for `rx_data` |
| `rx_crc_out` | out | 4 | remainder as received |

Parameter: `DIVISOR` (default 54). Sizes fixed in `uart_pkg`: `DATA_W = 8`,
`SHIFT_W = 9`, `CRC_W = 4`, `OVERSAMPLE = 16`. The bit counters are 4
bits wide, so `CRC_W` can be raised to at most 16.

## What is taken from the source and what is not

Taken from the source design:

- three parts: baud-rate generator (a frequency divider), transmitter and
  receiver;
- two stations that each send and receive;
- eight data bits;
- a holding register feeding a 9-bit intermediate register whose LSB is a
  zero start bit, shifted out LSB first;
- a parity bit after the data;
- a CRC remainder for a user-supplied divisor after the parity bit;
- a receiver that shifts the line into an intermediate register, returns
  the byte, checks parity and CRC, and outputs the CRC it received.

This design's own choices, where the source says nothing:

- even parity;
- a 4-bit CRC with an implicit leading one, sent MSB first;
- a stop bit;
- 16x oversampling and `DIVISOR = 54`;
- the load/ready handshake;
- the synchroniser and start-bit qualification;
- asynchronous active-low reset.

Not built:

- **HSTL I/O buffers.** These are FPGA pad cells selected by constraints.
- **Frequency scaling.** This is a choice of clock, not logic.
- **Optional built-in self-test.** It is only mentioned as a possible
  extension.
- **Returning the receiver's error flags to the transmitter.** It is hinted
  at but not described. The flags are outputs here, and a user can add a
  retry scheme on top.

## Verification

Every testbench checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

- `tb/baud_gen_tb.sv`: checks the tick period at `DIVISOR` 5 and 54, the
  delay to the first tick, that ticks are one clock wide, and that `en`
  stops the ticks.
- `tb/uart_tx_tb.sv`: decodes the line independently for 40 frames with
  random bytes and divisors, checking every bit, the frame length in
  clocks, the `ready` handshake, and back-to-back frames with no gap.
- `tb/uart_rx_tb.sv`: drives 60 frames. Some are clean; others have the
  parity bit, a CRC bit or a data bit inverted. It checks byte, flags and
  remainder, that exactly one `valid` comes per frame, and that short
  glitches are rejected.
- `tb/uart_top_tb.sv`: two stations at the default `DIVISOR`, running in
  both directions at once. It sends 25 frames from A to B (some corrupted
  on the wire) and 24 from B to A. It checks the frame rate (15 bit times
  per frame) and glitch rejection. It counts each mechanism (holding
  register used during a frame, parity error, CRC error, glitch rejected)
  and fails if one never occurs. It needs about 0.5 s of simulation.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/uart_pkg.sv rtl/baud_gen.sv \
    rtl/uart_tx.sv rtl/uart_rx.sv rtl/uart_top.sv tb/uart_top_tb.sv \
    --top-module uart_top_tb -Mdir obj && obj/Vuart_top_tb
```

For the unit benches, list `rtl/uart_pkg.sv`, the one module and its
testbench.
