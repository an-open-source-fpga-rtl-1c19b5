# A low-cost FPGA bit error ratio tester

A bit error ratio tester (BERT) answers one question about a serial link:
of the bits sent, how many came back wrong? It sends a known
pseudo-random bit stream out over the link under test, and compares what
comes back, bit by bit, against the same stream generated inside the FPGA.
Two counters, *incorrect bits* and *total bits*, give the ratio

    BER = incorrect bits / total bits

This RTL implements the FPGA logic of the open-source tester "OS BERT"
(published as *An Open Source, FPGA-Based Bit Error Ratio Tester for
Serial Communications*). The design is deliberately plain: one
pseudo-random generator, one XOR gate and two counters per channel, plus
a programmable data clock, all controlled by a small soft processor
through one register per parameter. Data rates run from a few hertz up to
tens of Mb/s, and a measurement can cover up to 2^32 − 1 bits. This
version also includes the two extensions the tester was designed to
allow: a differential channel pair that counts errors on each conductor,
and an adjustable delay of the sampling point.

## How a channel works

```
             data_clk (rising edge: next bit)
                 |
          +------v-------+   prbs    out_en
          | 31-bit LFSR  |----+------[&]------> data_out ---> link under test
          +--------------+    |                                     |
                              |   +-----+                           |
                              +-->| XOR |<------- data_in <---------+
                                  +--+--+
                                     | error
   sample_clk = ~data_clk     +------v---------+   +--------------+
   (rising edge: mid-bit) --->| incorrect bits |   |  total bits  |<-- +1
                              +----------------+   +--------------+
```

* **Generator** (`lfsr_prbg`). A 31-stage linear-feedback shift register
  with XNOR feedback from stages 31 and 28 (x^31 + x^28 + 1), a
  maximal-length sequence of 2^31 − 1 bits. It shifts on every rising
  edge of the data clock, so a new bit leaves the chip on each rising edge.
  It resets to all zeros, which is a legal state for XNOR feedback.
* **Comparison** (`bert_core`). The received bit is XORed with the bit the
  generator is still holding. Because the generator only moves on the
  next rising edge, the reference bit needs no delay line, as long as the
  sample is taken before that edge.
* **Sampling point.** The counters are clocked by the inverted data clock,
  so they sample in the middle of each bit, half a bit period after it was
  sent. This leaves half a bit period for the link's propagation delay.
* **Counters** (`bit_counter`). Two 32-bit registers. Total bits counts
  every sample; incorrect bits adds the XOR result. They are cleared
  asynchronously, because the clear happens while the data clock is
  stopped. They wrap at 2^32 and do not saturate.
* **Output gate.** `out_en` forces the transmitted line low (the tester's
  `outon`/`outoff` commands). The comparison still uses the generator's
  bit, so with the output off every transmitted 1 is counted as an error.

A channel is therefore just a few dozen flip-flops. The comparison has no
synchronisation step and no sync-loss state: any error ratio, up to 100 %,
is simply counted. The price is that the link's delay must stay below half
a bit period, or below the delayed sampling point (see below).

## Clocks and a measurement

There are three clocks, plus an optional external one. Keeping them
apart is the main subtlety of the design:

| clock | source | drives |
|---|---|---|
| `clk_48m` | board oscillator | CPU bus, PIO registers, on-chip RAM, PLL input |
| `clk_320m` | PLL, 48 MHz × 20 / 3 | frequency divider, sampling-delay chain |
| `ext_clk` | external clock pin, optional | frequency divider instead of `clk_320m` |
| data clock | divider output (`sync_out`) | generators; inverted, the counters |

The data clock is a generated clock, a flip-flop output, and it is stopped
between measurements. Nothing synchronises the counters into the bus clock
domain. That is safe because the CPU follows a fixed sequence and reads
the counters only while the data clock is stopped:

1. Write the data rate in Hz to `DESIRED_FREQ` (and the sampling-delay tap).
2. Set `CTRL_CNT_CLR`, then clear it. All counters are now zero.
3. Set `CTRL_RUN` (and `CTRL_OUT_EN`). After a two-flop synchroniser the
   divider starts. Its first rising edge comes half a period later.
4. Wait the measurement time (the CPU's timer; the `duration` command).
5. Clear `CTRL_RUN` and leave `CTRL_OUT_EN` as it is. If the data clock is
   high, the divider finishes that high phase, so the last bit sent is
   also sampled. Then the clock stays low.
6. Wait at least one data-clock period, then read the counters.

If `CTRL_OUT_EN` is cleared in the same write as `CTRL_RUN`, the last bit
is sampled with the output already off. That can add one error.

## The data-rate divider

`freq_divider` takes two numbers from the CPU, both in hertz: the
frequency of its input clock (`INPUT_FREQ`, 320,000,000 after reset) and
the wanted data rate (`DESIRED_FREQ`, 1,000,000 after reset). It needs no
hardware division. Every 320 MHz cycle a phase accumulator adds
2 × desired. Whenever the sum reaches the input frequency, it subtracts
the input frequency and toggles the output. The average output frequency
is therefore exactly the requested one.

* When 320 MHz / (2 × rate) is a whole number, every half period is
  exactly that many cycles: 160 cycles at 1 Mb/s, 320 at 0.5 Mb/s.
* Otherwise the half periods alternate between the two neighbouring whole
  numbers. At 50 Mb/s they are 3 or 4 cycles (9.4 or 12.5 ns), which is
  50 MHz on average with up to one 320 MHz period of edge jitter.
* The highest rate is half the input clock, 160 Mb/s. A larger request
  toggles every cycle.

The input frequency is a register because the divider need not run from
the PLL. Setting `CTRL_EXT_CLK` switches its input to the external clock
pin `ext_clk`. The CPU must then write that clock's frequency to
`INPUT_FREQ`. The switch is a plain clock multiplexer, so change it only
while `CTRL_RUN` is clear and the data clock is stopped. The sampling-delay
chain keeps running from the PLL.

## Delaying the sampling point

`sample_delay` serves links whose delay uses up most of the half bit that
mid-bit sampling leaves (long cables, radios). The inverted data clock runs down a chain of 16 flip-flops
clocked at 320 MHz. Tap *n* is the sampling clock delayed by *n* periods
of 3.125 ns, less the phase between the two clocks: the delay lies
between (n−1) and n periods. `SAMPLE_DELAY` selects the tap. Tap 0
bypasses the chain, which gives plain mid-bit sampling. The selected
clock drives the counters of all channels.

Two rules apply:

* Change the tap only while the data clock is stopped.
* Keep the sampling point before the next rising edge of the data clock.
  The reference bit is the generator's current bit, so a later sample
  compares against the following bit. At 10 Mb/s the margin is 50 ns,
  which is 16 taps.

## The differential pair

`diff_bert` measures the two wires of a differential link (CAN, RS-422,
differential I²C) separately. One generator drives conductor A with the
stream and conductor B with its complement. External level shifters,
which are not part of the FPGA, make the pair into the line signal. Each
returning wire is XORed with the bit expected on it. Four counters result:

| counter | counts |
|---|---|
| `incorrect_a` | samples where conductor A was wrong |
| `incorrect_b` | samples where conductor B was wrong |
| `incorrect_c` | samples where A **or** B was wrong (the whole pair) |
| `total_bits` | all samples |

`incorrect_c` is not `incorrect_a + incorrect_b`: a sample in which both
wires fail counts once.

## Top level and register map

`os_bert_top` puts three channels on the FPGA pins:

* channel 0 is a standard channel (`bert_core`);
* channels 1 and 2 are conductors A and B of the differential pair.

Both units share the data clock, the sampling clock, the counter clear and
the output enable. The data clock is also brought out on `sync_out` as a
trigger for a scope.

The soft processor and its firmware are not in this RTL. The top exposes
the processor's data master (`cpu_*`, a simple bus with one-clock read
latency), its instruction master (`cpu_i_*`) and its interrupt input
(`cpu_irq`). Behind the data master are:

* the on-chip RAM;
* one PIO register per parameter;
* a 9600 baud UART (`uart`) for the terminal link to the PC.

The address decode is in `avalon_interconnect`, and each register is an
`avalon_pio`:

| byte address | register | dir | meaning |
|---|---|---|---|
| 0x0000–0x3FFF | on-chip RAM | r/w | 16 kB, 4096 × 32 bits, also read by the instruction master |
| 0x8000 | `WRONG_BITS` | r | incorrect bits, channel 0 |
| 0x8004 | `TOTAL_BITS` | r | total bits, channel 0 |
| 0x8008 | `CONTROL` | r/w | bit 0 `RUN`, bit 1 `CNT_CLR`, bit 2 `OUT_EN`, bit 3 `EXT_CLK` |
| 0x800C | `DESIRED_FREQ` | r/w | data rate in Hz |
| 0x8010 | `INPUT_FREQ` | r/w | divider input clock in Hz |
| 0x8014 | `SAMPLE_DELAY` | r/w | sampling-delay tap, 0 to 16 |
| 0x8018 | `DIFF_ERR_A` | r | differential, errors on A |
| 0x801C | `DIFF_ERR_B` | r | differential, errors on B |
| 0x8020 | `DIFF_ERR_C` | r | differential, errors on A or B |
| 0x8024 | `DIFF_TOTAL` | r | differential, total bits |
| 0x9000 | UART `RXDATA` | r | received byte; reading clears `RX_VALID` |
| 0x9004 | UART `TXDATA` | w | byte to send, ignored while busy |
| 0x9008 | UART `STATUS` | r | bit 0 `RX_VALID` (also `cpu_irq`), bit 1 `TX_BUSY`, bit 2 `RX_OVERRUN` |

The UART sends 8 data bits, no parity and one stop bit, LSB first. Its
`uart_tx`/`uart_rx` pins are logic level; an RS-232 level shifter on the
board makes them a PC serial port. Reads of unmapped addresses return 0. Writes are whole words. The names
and constants are in `os_bert_pkg`.

The PLL is the FPGA vendor's. `pll_320m` is a behavioural simulation model
of it, with delays, and is not synthesizable. For synthesis, replace it
with the vendor's PLL configured for 48 MHz in and 320 MHz out, with the
same ports (`inclk0`, `areset`, `c0`, `locked`).

## What follows the original and what is new here

The original tester fixes:

* the structure: PLL, CPU-controlled frequency divider, and a BERT module
  made of generator, XOR and two counters;
* the 48 MHz → 320 MHz clocking and the data change on the divider's
  rising edge;
* mid-bit sampling on the inverted clock;
* the 31-bit generator and the 32-bit counters;
* one PIO per parameter (wrong bits, total bits, control, desired and
  input frequency);
* 16 kB of on-chip RAM and three channels;
* one configurable external clock input;
* the structure of the differential unit and of the delay chain.

This RTL chose:

* the LFSR taps;
* the divider's accumulator method and its stop behaviour;
* asynchronous counter clear and the output gate;
* selecting the external clock with a control bit and a clock multiplexer;
* the bus protocol, address map and control bits;
* the UART's registers and frame format (only its 9600 baud rate is given);
* 16 delay stages clocked at 320 MHz, with a bypass tap;
* which differential wire is inverted, and the assignment of the three
  channels.

Points where the original is inconsistent or open:

* **Generator length.** The published comparison table gives a pattern
  length of 2^32 − 1, but the generator is described as 31 bits. This
  design uses 31 bits (2^31 − 1).
* **Counter capacity.** The text gives a capacity of about 2.14 × 10^9 bits
  (43 s at 50 Mb/s). That is 2^31 and matches a signed read by the CPU.
  The table gives 4.29 × 10^9 (2^32). The counters here are 32-bit
  unsigned.

## Limits

* The counters wrap silently after 2^32 − 1 samples: about 86 s at
  50 Mb/s, or 71 minutes at 1 Mb/s. Keep measurements shorter.
* Counter values and the control bits cross clock domains without
  synchronisers, apart from `RUN`. They rely on the sequence above.
* A sample later than the next data edge compares against the wrong
  reference bit (see the delay section).
* Rates that do not divide 320 MHz evenly carry one 320 MHz period of edge
  jitter.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Use Verilator 5 with timing support, and
give the package first:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/os_bert_pkg.sv tb/tb_os_bert_top.sv --top-module tb_os_bert_top -o sim
./obj_dir/sim
```

Replace `tb_os_bert_top` with any other testbench name.

`tb_os_bert_top` runs the whole design at its default sizes. It plays the
processor over the bus: it checks the reset values, and writes and reads
the RAM through both masters. It then runs five measurements:

* 10 Mb/s with errors on conductor A;
* 1 Mb/s with errors on conductor B;
* 10 Mb/s with sampling tap 9 and errors everywhere;
* 8 Mb/s with the outputs off;
* 5 Mb/s with the divider running from a 125 MHz external clock.

It also sends one byte from a serial-line model into the UART, takes it
on the interrupt and sends a reply byte back.

Each channel is looped back through a short wire on which the testbench
flips random bits. The testbench counts the bits it sent and flipped
itself, and compares those counts with the registers. It also checks the
data-clock period and the sampling-edge delay, and it fails if any of
these mechanisms was not exercised. It takes about 10 s of wall time.

`tb_os_bert_rates` runs short measurements at 0.5, 1, 50 and 75 Mb/s.
The unit testbenches check:

* the generator against its recurrence;
* the divider's half periods at 1, 0.5 and 3 Mb/s and at the maximum rate;
* every delay tap to the picosecond;
* the PLL model's period and lock;
* the UART's receive, transmit, overrun and glitch rejection against a
  serial-line model.
