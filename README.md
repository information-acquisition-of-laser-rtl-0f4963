# Incremental angle-encoder acquisition for a laser tracker

A laser tracker measures the direction of its beam with two precision
rotary encoders: one on the azimuth axis and one on the elevation axis. Each
encoder is an incremental type. It reports motion as two square waves, A and
B, a quarter period apart. Once per turn it also gives a reference pulse,
called Z here, or I on the pins. This RTL turns those signals into two
absolute angle counts. It samples both counts at the same instant once per
millisecond and sends them to a host over an asynchronous serial line.

All logic runs on one 10 MHz clock. Each axis has the same chain:

```
 A ──► key_filter ─┐
 B ──► key_filter ─┼─► quad_fsm (x4 decode, up/down count mod 15 744 000) ─► latch ─► signal[31:0]
 Z ──► 2-FF sync ──┘          ▲ zero on rising edge of Z                      ▲
                                                                1 kHz clock ──┘ (rising edge)

 div1khz: 10 MHz / 10000 ─► CLK_OUT (1 kHz) ─► both latches, and txuart readpulse

 txuart: falling edge of readpulse ─► FIFO {Asignal, Esignal} ─► 8 UART frames ─► FPGA_PSD_TX3
```

## Counting: the five-state decoder (`quad_fsm`)

The levels of A and B form a 2-bit Gray code. When the shaft turns
clockwise the levels step through AB = 00 → 10 → 11 → 01 → 00. In reverse
they step 00 → 01 → 11 → 10 → 00. The decoder has one state for each level
pair, plus an initial state:

| state | name | A B |
|-------|------|-----|
| S0 | IDLE | –, the state after reset |
| S1 | ALBL | 0 0 |
| S2 | AHBL | 1 0 |
| S3 | AHBH | 1 1 |
| S4 | ALBH | 0 1 |

Each clock the decoder compares the state it is in with the state the
present levels call for:

* **A move to the clockwise neighbour** counts +1. **A move to the reverse
  neighbour** counts −1. All four edges of an A/B cycle count, so the
  resolution is four times the line count.
* **No change** leaves the count alone.
* **A jump to the opposite state** (00 ↔ 11 or 10 ↔ 01) means both phases
  changed in one clock. The direction cannot be known, so the step is not
  counted, the state follows the levels, and `skip` pulses for one clock.
  A correctly filtered input never does this.
* **IDLE** holds the count at zero and stands for the level pair 00. The
  filters reset their outputs to 0, so the decoder always starts at 00. It
  stays in IDLE until the first level change and then counts as if it were
  leaving ALBL: 10 counts up into AHBL, and 01 counts down into ALBH.

A phase that chatters across one edge alternates +1 and −1 steps, so the
count ends where it started. The filter below removes most chatter, and
this property handles what is left.

The count is a position modulo `CNT_ALL + 1`, with CNT_ALL = 15 743 999.
Counting up from 15 743 999 gives 0, and counting down from 0 gives
15 743 999. One turn of the ring is 15 744 000 counts. The original system
used a 100 mm grating ring with 15 744 lines. That works out to 1000 counts
per line, which implies the read head interpolates each line 250 times
before the ×4 decode. That interpolation factor is inferred, not stated.
After reset the counter is at 0. Any move backward before the first Z mark
therefore shows up near 15 743 999, which is what the original system's
logic-analyzer capture showed.

The rising edge of Z (after a 2-flip-flop synchroniser) sets the count to
zero. In the same clock this takes priority over a step. While Z stays high,
counting goes on.

## Filtering glitches (`key_filter`)

Vibration of the mechanics and of the motor load makes the encoder edges
bounce. Each of A and B passes a filter before decoding. The filter has
three parts:

* a chain of three flip-flops, two of which synchronise the input to the
  clock;
* an XOR of the last two stages, which flags every change;
* a 17-bit stability counter, run by a two-state machine.

A change starts the counter, or restarts it if it is already running. Only
after the input has held one level for `STABLE_CYCLES` consecutive clocks is
that level copied to `key_out`. If a glitch ends before then, the level
copied is the old one, so the output never moves.

The default window is 10 000 clocks, which is 1 ms or one period of the
1 kHz synchronisation clock. This is the most consequential number in the
design, because it sets the top speed. Every A/B level must last longer than
1 ms to be seen, so each axis can follow at most about 1000 counts per
second. Faster motion is filtered out as if it were noise. For a faster
axis, lower `STABLE_CYCLES` (at the top level, or per `abz_counter`) to a
little more than the longest bounce you expect. The counter is 17 bits
wide, so the window can be at most 131 072 clocks.

Latency: a clean edge on the pin reaches `key_out` `STABLE_CYCLES + 3`
clocks later. The count changes one clock after that.

## One axis (`abz_counter`) and the 1 kHz latch (`div1khz`)

`abz_counter` contains the two filters, the Z synchroniser, the decoder and
a 32-bit output latch `signal`. `div1khz` divides the 10 MHz clock by 10 000
into a square wave of 50 % duty, `CLK_OUT`. On each rising edge of
`CLK_OUT` both axes copy their running counts into `signal`. So both angle
words always belong to the same instant, and they stay steady for a full
millisecond. The first rising edge comes 5000 clocks after reset.

## Serial output (`txuart`, `sync_fifo`)

On each falling edge of `CLK_OUT`, `txuart` pushes `{endataA, endataE}`
into a 4-entry FIFO. The falling edge comes half a millisecond after the
latches loaded. A serialiser then pops one entry and sends eight bytes: the
azimuth word first, then the elevation word, most significant byte first in
each. Each byte is one UART frame:

```
 idle=1 | start 0 | d0 d1 ... d7 | even parity | stop 1 |
```

The serialiser is a one-hot state machine with these state codes:

| state | code |
|-------|------|
| idle | 000001 |
| start | 000010 |
| transdata | 000100 |
| stop | 001000 |
| parity | 010000 |
| quit | 100000 |

The frame order is start, transdata, parity, stop, quit. The start,
transdata, parity and stop states each last one bit time of `BAUD_DIV` = 87
clocks (114 943 baud, a 0.2 % error against 115 200). The quit state lasts
one clock: it either starts the next byte or returns to idle. `txt` is
registered.

One sample takes 8 × (11 × 87 + 1) + 1 = 7665 clocks, so it ends well
inside the 10 000-clock period. At the defaults the FIFO never holds more
than one sample. If `BAUD_DIV` is raised until one sample no longer fits in
a period, the FIFO fills. New samples are then dropped (`tx_dropped` pulses)
and the ones sent stay in order.

## Top level (`encoder_acq_top`)

| port | dir | meaning |
|------|-----|---------|
| `CLK_10M`, `rst_n` | in | 10 MHz clock; synchronous active-low reset |
| `FPGA_E_A/B/I` | in | elevation encoder A, B, reference (from line receivers) |
| `FPGA_A_A/B/I` | in | azimuth encoder A, B, reference |
| `FPGA_PSD_TX3` | out | serial data to the host |
| `FPGA_T_EN2_N`, `FPGA_T_EN2` | out | line-transceiver enables, fixed at 0 and 1 |
| `Asignal`, `Esignal` | out | latched 32-bit angle counts |
| `CLK_OUT`, `tx_busy`, `tx_dropped` | out | 1 kHz clock and transmitter status |

Top parameters, with their defaults:

* `CNT_ALL` = 15743999
* `DIV` = 10000
* `STABLE_CYCLES` = 10000
* `BAUD_DIV` = 87
* `FIFO_DEPTH` = 4

Shared types are in `encoder_pkg`: the decoder, filter and transmitter
state enums, and the clock and wrap constants.

## Where this design follows the original and where it chooses

Taken from the original system:

* the 10 MHz clock and the 1 kHz synchronisation clock;
* the five decoder states, their level codes and the direction sequences;
* the ×4 counting and the wrap value 15 743 999;
* the filter's structure: three flip-flops, a 17-bit counter, a comparator
  that loads the output, and a state block;
* the port names of the counter and transmitter blocks, and the
  transmitter's six one-hot state codes;
* the wiring of the top level;
* latching on the synchronisation clock, and a FIFO in front of the serial
  output.

Choices made here, because the original gives no value:

* **Filter:** the 1 ms filter window, timed in 10 MHz clocks. The original
  describes the filter both as clocked at 10 MHz and as removing glitches
  shorter than one 1 kHz period. This design does both.
* **Decoder:** IDLE standing for the level pair 00; ignoring double jumps; Z acting on its
  rising edge with no filter on Z.
* **Serial output:** the baud rate, even parity, byte order and frame
  layout; the FIFO depth and its policy of dropping new samples; capture on
  the falling edge of the 1 kHz clock.
* **Reset:** the synchronous reset everywhere.

Left out:

* The vendor PLL of the original board. The whole design runs directly on
  the 10 MHz clock.
* An LED driver, whose function is not known.
* Everything off-chip: the RS-422 line receivers, the encoders and the host
  processor.

## Simulation

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The following
testbenches are included:

| testbench | covers |
|-----------|--------|
| `tb_div1khz` | first edge, period, duty and strobe position of the divider |
| `tb_key_filter` | all glitch lengths up to the window rejected, exact latency, bounce, random input against a reference model |
| `tb_quad_fsm` | state sequence, ×4 count, both wraps, chatter, double jump, Z, random walk |
| `tb_abz_counter` | one axis with bouncing steps and glitches, latch contents and steadiness, Z |
| `tb_sync_fifo` | random push/pop against a queue model, full and overflow |
| `tb_txuart` | frame contents, parity, byte spacing, latency; a deliberately slow instance that must drop samples |
| `tb_encoder_acq_top` | both axes at default parameters: every latched word and every serial sample against encoder models, wraps, Z, bounce and glitch rejection |
| `tb_fig_capture` | both axes at default parameters: the near-wrap values 15743997 and 15743999, on the latch outputs and on the serial line |

The system-level testbenches use two testbench-only models:

* `tb/encoder_model.sv`, a quadrature source with bounce and glitch
  injection;
* `tb/uart_rx_model.sv`, a serial receiver that checks parity and the stop
  bit.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/encoder_pkg.sv tb/tb_encoder_acq_top.sv --top-module tb_encoder_acq_top
./obj_dir/Vtb_encoder_acq_top
```

Any other testbench runs the same way: substitute its name for
`tb_encoder_acq_top`. The full-size top-level test simulates about 130 ms
of operation and takes under a second. All modules lint cleanly with
`verilator --lint-only -Wall`, apart from two kinds of warning. Unused-signal
warnings come from status outputs (`skip`, `idle`, `up`/`dn`) that are kept
for observation. Unused-parameter warnings come from package constants that
a given module does not need.
