# UART with built-in self-test from a cellular-automaton pattern generator

A UART that can test itself without external equipment. On a start pulse a
small controller takes the UART off the processor bus and the serial line and
feeds it test bytes from an on-chip pattern generator: each byte goes *in
parallel* into the transmitter and, framed as a serial character, *into the
receiver*. A response analyser turns the transmitter's serial output back into
a byte, takes the receiver's byte as it is, and compares both with a ROM of the
expected sequence. The first mismatch stops the test and flags the UART as
faulty; if every pattern matches the UART passes. The pattern generator is a
cellular automaton (CA) register following rule 90 rather than a classic LFSR.

```
                +---------------- tpg ----------------+
  trg --------->| ca_lfsr (rule 90) --+--> tx_ip [7:0] |--+ (test mode)
                |                     +--> piso ------>|--|--+ rx_ip (serial)
                +--------------------------------------+  |  |
                                                          v  v
  host_wr/din -------------------------------------> [mux]  [mux] <----- rxd
                                                        |     |
                  +------------- uart (circuit under test) ---------+
                  | uart_tx: TBR -> TSR --> txd ----------------------+--> txd pin
                  | uart_rx: rxd -> RSR -> RBR --> host_dout (rop)    |
                  | baud_gen                                         |
                  +--------------------------------------------------+
                           | txd, tx_mid            | rop
                  +--------v------------- tra -------v-------------+
                  |  sipo --> sipo_op --> comparator <-- rop       |
                  |  pattern_rom[addr] --> romd --^   --> rslt     |
                  +------------------------------------------------+
                                    ^ addr, cmp_en      | rslt
                  +-----------------+-- bcu ------------v----------+
   bist_start --->| test_mode, trg, sipo_clr, cmp_en, addr         |--> bist_done/fail
                  +------------------------------------------------+
```

## The pattern generator and why the sequence is short

`ca_lfsr` is an 8-cell one-dimensional CA. Every cell is a flip-flop whose
next value is the XOR of its two nearest neighbours:

    x_i(t+1) = x_(i-1)(t) XOR x_(i+1)(t),     cells outside the register read 0

so the first cell copies its right neighbour and the last copies its left
neighbour (null boundaries). The register steps once per `trg` and holds
otherwise; reset loads `SEED` (default `8'h01`; zero is a fixed point and must
not be used).

The source design claims this register produces 2^8-1 = 255 different values.
A pure rule-90 register of 8 cells with null boundaries cannot: its state cycle
is at most 14 long (from `8'h01`: 02 05 08 14 22 55 80 40 a0 10 28 44 aa 01,
then 02 again; the bench `tb_ca_lfsr` checks the 14). This RTL keeps the
rule-90 structure and still applies 255 patterns, so the 14-state cycle
repeats about 18 times. Getting 255 distinct values would need a hybrid
register with some rule-150 cells (a cell that also XORs its own value), which
the source does not describe; `bist_pkg::ca90_step` is the single place to
change for that, since the ROM contents are derived from the same function.

`tpg` wraps the CA with a parallel-in serial-out register (`piso`). One cycle
after `trg` the new pattern sits on `tx_ip` with a `valid` strobe (this strobe
writes the transmitter), and in the same cycle the PISO starts sending it as a
UART character on `rx_ip`. The PISO has its own baud divider with the same
setting as the UART's, so a receiver running at the wrong rate fails the test.

## The UART under test

Characters are 8 data bits, LSB first, with one start bit (0) and one stop bit
(1), no parity; the line idles high. One bit lasts 16 ticks of `baud_gen`,
which ticks every `CLK_DIV` clocks, so the bit rate is
`f_clk / (16 * CLK_DIV)` (default 27: about 115 200 bit/s at 50 MHz).

* `uart_tx`: a data-bus write goes into the transmit buffer register (TBR).
  Whenever the transmit shift register (TSR) is idle the control unit moves
  the byte into it together with start and stop bits, so the 10-bit TSR holds
  the complete frame and the TBR is free for the next byte. A write while the
  TBR is full is ignored. `mid` pulses in the middle of each bit period; the
  on-chip SIPO samples `txd` there.
* `uart_rx`: `rxd` goes through a two-flop synchroniser. A low level on an
  armed, idle line starts a frame; the line is sampled mid-bit (first sample
  8 ticks after the edge, then every 16) into the 10-bit receive shift register
  (RSR). A start bit that is high at its middle is rejected as a glitch. After
  the stop-bit sample the data move to the receive buffer register (RBR),
  `rdy` pulses, `frame_err` records a low stop bit, and `rbr_full` stays set
  until `rd`. The receiver re-arms only after it has seen the line high, so a
  line held low does not produce a stream of frames. `rdy` comes about 9.5
  bit periods after the start edge.
* `uart` joins the two with one baud generator.

## One test step

The controller (`bcu`) runs `NUM_PATTERNS` steps, each:

1. `trg` (and `sipo_clr`) for one cycle: the CA steps.
2. Next cycle: the TPG writes the pattern into the UART's TBR and the PISO
   starts its frame; the TSR picks the byte up one cycle later. Both frames
   therefore run in parallel, one clock apart.
3. Wait until the SIPO has captured 10 bits from the transmitter
   (`sipo_valid`, at the middle of the stop bit), the receiver has signalled
   `rdy`, and both the transmitter and the PISO are idle again.
4. `cmp_en`: the comparator checks `sipo_op == romd` and `rop == romd`;
   `rslt` is 1 only if both hold. The ROM word for the current address has
   been on `romd` since the address was set (synchronous ROM, one-cycle read).
5. `rslt = 1`: next address, back to 1; after the last address the test ends
   with `bist_fail = 0`. `rslt = 0`: the test ends at once with
   `bist_fail = 1` and `bist_addr` pointing at the failing pattern;
   `bist_tx_ok` / `bist_rx_ok` show which side was wrong.

A step takes 10 bit periods plus a few clocks (about 4 320 cycles at the
default divider); the whole 255-pattern test takes 1 101 818 cycles in
simulation, about 22 ms at 50 MHz. If a step does not finish within four
frame times (`WAIT_LIMIT`, e.g. a dead receiver), the test ends with
`bist_fail = 1` and `bist_timeout = 1`.

The ROM (`pattern_rom`) is not loaded from a file: its contents are computed
at elaboration by iterating `ca90_step` from `SEED`, word k being the pattern
after k+1 steps. `CORRUPT_ADDR` stores one word inverted on purpose, which
reproduces the usual demonstration of this design: with the last word wrong,
every comparison passes except the last, and the UART is reported faulty
there. The default (-1) leaves the ROM correct.

## Normal and test mode

`test_mode` (visible as `bist_busy`) switches two multiplexers in front of the
UART. In normal mode the processor drives `host_wr/host_din`, reads
`host_dout` with `host_rd`, and the receiver listens on `rxd`. In test mode
the transmitter is written by the TPG, the receiver listens to the PISO
instead of `rxd`, processor writes and reads are ignored, `host_rdy` is held
low, and the RBR is read by the controller's compare strobe. `txd` always
carries the transmitter, so the test frames are visible on the pin. After the
test the UART is back in normal mode; `bist_done` and the result hold until
the next `bist_start`.

## Parameters (top: `bist_uart_top`)

| parameter      | default  | meaning |
|----------------|----------|---------|
| `CLK_DIV`      | 27       | clocks per baud tick; bit = 16 ticks |
| `NUM_PATTERNS` | 255      | test steps and ROM words (2^8-1) |
| `SEED`         | `8'h01`  | reset value of the CA register, non-zero |
| `CORRUPT_ADDR` | -1       | ROM word stored inverted, -1 for none |

The data width (8), frame length (10) and oversampling (16) are constants in
`bist_pkg`.

## What comes from the source and what does not

Taken from the source design: the split into TPG, UART (transmitter and
receiver) as circuit under test, TRA (SIPO, ROM, comparator) and a BIST
controller; the 8-cell rule-90 CA register stepped by `trg`; the TPG feeding
the transmitter in parallel and the receiver serially through a PISO; TBR/TSR
and RSR/RBR with shift registers sized for start, data and stop bits; the
comparison of both outputs with the ROM, `rslt = 1` only when both match, and
stopping at the first mismatch; 255 patterns.

Chosen here, because the source leaves them open: frame format and bit order,
16x oversampling and the baud divider, mid-bit sampling and the synchroniser
in the receiver, all handshake and status signals, the synchronous ROM
computed at elaboration, the mode multiplexers, the controller's state
sequence, the time-out, the reset value of the CA, and an active-low
asynchronous reset everywhere.

Known departure: the CA register, built as described, repeats after 14
patterns instead of giving 255 different ones (see above).

## Files and simulation

`rtl/` holds one module or package per file: `bist_pkg`, `ca_lfsr`, `piso`,
`tpg`, `baud_gen`, `uart_tx`, `uart_rx`, `uart`, `sipo`, `pattern_rom`,
`comparator`, `tra`, `bcu`, `bist_uart_top`. `tb/` holds a self-checking bench
per module (`tb_<module>.sv`) that compares against its own rule-90 model or
its own frame encoder/decoder and prints `TB_RESULT checks=N failures=M`.
`tb_bist_uart_top` runs two copies of the design at a short bit period and 20
patterns (normal-mode loop-back with TBR buffering, a passing test, a test
failing at a corrupted last ROM word, a time-out with the receiver input
forced high) and counts that each happened. `tb_bist_uart_full` runs the top
at its default parameters through the complete 255-pattern test (under a
second of simulation time on a workstation). `tb_bist_uart_demo` runs
the same full-length test with the last ROM word stored wrong and checks
that 254 comparisons pass and the test then stops with the UART reported
faulty.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/bist_pkg.sv tb/tb_bist_uart_full.sv \
          --top-module tb_bist_uart_full -o sim
./obj_dir/sim
```

Replace the bench name to run any other test. All code is SystemVerilog-2017
and synthesizable except the benches.
