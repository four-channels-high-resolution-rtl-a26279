# Four-channel reciprocal frequency counter for QCM sensor arrays

A quartz crystal microbalance (QCM) turns a mass change on its surface into a
shift of its resonance frequency, typically a few hertz on 10 MHz. An
electronic nose or tongue reads an array of such sensors at once, so it needs
several frequency counters that sample together, each resolving well below
1 Hz in about one second.

This RTL is the FPGA part of such an instrument: four independent
**reciprocal counters** sharing one 300 MHz reference clock and one ~1 s time
gate, plus an SPI slave through which a microcontroller reads the counts.
The microcontroller computes each frequency as

    f_in = N_in / N_ref * f_ref        (f_ref = 300 MHz)

where `N_in` is a whole number of input periods and `N_ref` the number of
reference clocks those periods took. The resolution is one reference count in
`N_ref`, about 3e8 for a 1 s gate, which is 0.033 Hz at 10 MHz, independent
of the input frequency and of the exact length of the gate. The original
implementation targets a Spartan-6 XC6SLX9 board with a 50 MHz TCXO, whose
PLL makes the 300 MHz and 100 MHz clocks, and an STM32F103 board as SPI master.

## Block structure

```
                  CLK_GATE (100 MHz)                   CLK_REF (300 MHz)
                        |                                     |
                 +--------------+  time gate   +--------------------------+
                 | timegate_    |------------->| reciprocal_block  x 4    |
                 | block        |      |       |  CH[i] -> N_in, N_ref    |
                 +--------------+      |       +--------------------------+
                                       |                   | 8 x 32 bit
                              +----------------+   +-----------------+
                              | interrupt flag |   | spi_slave_block |<--> SCLK SS_N
                              +----------------+   +-----------------+     MOSI MISO
                                 MCU_INTERRUPT, BIT_0
```

| Module | Role |
|---|---|
| `freq_counter_top` | Top level: wires the blocks, holds the interrupt flag |
| `timegate_block` | 100 MHz up counter giving the ~1 s gate |
| `reciprocal_block` | One channel: sync gate, two counters, result registers |
| `pcounter` | 32-bit up counter with enable and synchronous clear |
| `edge_detector` | One-clock pulse on an edge (ends a measurement) |
| `spi_slave_block` | SPI mode-0 slave, eight readable 32-bit words |
| `fc_pkg` | Shared sizes, SPI command struct, word map |

The PLL is not part of the RTL. `CLK_REF` (300 MHz) and `CLK_GATE` (100 MHz)
are inputs of the top; on the FPGA they come from the vendor clocking
primitive. Use its locked output to drive `RST_N`.

## How one channel measures (`reciprocal_block`)

This block needs the most care. It works in two clock domains: the input signal
`CH_CLK` and the reference `REF_CLK`.

1. **Sync gate.** The time gate is re-timed to the input. The *sync gate*
   rises on an input rising edge once the gate is open. It falls on the first
   input rising edge after the gate has closed. It therefore always spans
   a whole number of input periods.
2. **Input counter** (`CH_CLK`). It is cleared on the edge that opens the sync
   gate. It then counts every input edge while the sync gate is high, the
   closing edge included. It ends equal to the number of whole periods, N_in.
3. **Reference counter** (`REF_CLK`). The sync gate is brought into the
   reference domain through two flip-flops. The counter counts reference
   clocks while that copy is high. Both ends of the sync gate pass through the
   same two flip-flops, so the count is the sync-gate length in reference
   clocks, to within one count. That count is N_ref.
4. **Result.** An edge detector on the fall of the synchronised sync gate
   loads N_in and N_ref into `CH_COUNTER` / `REF_COUNTER`. They hold until
   the next measurement ends.

### Catching the short gate-low pulse

The time gate is low for only one 100 MHz clock (10 ns) per period. A 10 MHz
input has an edge every 100 ns, so it would usually miss that pulse. The
channel therefore keeps a **gate request** in the reference domain:

- The request drops when the reference side sees the time gate fall.
- The request rises again only when the time gate is high *and* the input
  side has been seen to close its sync gate.

The request crosses to `CH_CLK` through two flip-flops, and the sync gate is
the third. This handshake is what ends every measurement in practice. The
top-level testbench counts how often the 10 ns pulse fell between two input
edges.

### Consequences

- **Dead time.** Between measurements there are about three to six input
  periods of dead time (the hand-over). At 10 MHz and a 1 s gate this is below
  one part in a million of the interval and does not affect the ratio.
- **Result latency.** A new result is loaded up to about four input periods
  plus a few reference clocks after the time gate falls. That is under
  0.5 µs at 10 MHz.
- **Safe read-out of the input count.** The input count is read in the
  reference domain without a further handshake. This is safe because the count
  is frozen from the sync gate's fall until two input edges after the gate
  request rises again. The request rises in the same clock in which the
  results are loaded. An assertion in the RTL checks this. The input rate is
  therefore limited only by how fast the FPGA's flip-flops can toggle.
- **No input signal.** If an input stops, its sync gate cannot close. That
  channel then keeps its last result.
- **Reset.** After reset all results are zero. `REF_CLK` must run while
  `RST_N` is low so that the edge detector's stored bit is cleared.

## Time gate (`timegate_block`)

The time gate is a 32-bit counter on the 100 MHz clock:

- It runs `0 … TIME_GATE_TOP-1` and wraps, so one period is exactly
  `TIME_GATE_TOP` clocks.
- The registered output is low during the clock in which the count is 0, and
  high otherwise.
- The default `TIME_GATE_TOP = 100_000_000` gives 1 s.

The gate only sets the sampling rate; the frequency comes from N_in / N_ref.
A gate error of tens of nanoseconds does not matter. The period count is
meant to be trimmed once against a rubidium standard and then set as the top
parameter. `TIME_GATE_TOP` of 0 or 1 keeps the gate closed.

`MCU_INTERRUPT` (and `BIT_0`, the same flip-flop) is the time gate registered
once more on `CLK_GATE`. Its falling edge tells the microcontroller that a new
set of results is on its way.

## Reading the results (`spi_slave_block`)

- **Mode and framing.** SPI mode 0: `SCLK` idles low and data is sampled on
  the rising edge. Bits go MSB first, with `SS_N` low for the whole frame.
- **Clocking.** The slave is clocked only by `SCLK`. `SS_N` high clears its
  bit counter and shift registers.

A frame is 40 bits:

```
 bit 39    38    37..32        31..0
   write   0     addr[5:0]     data word
```

- **Read** (`write = 0`): after the command byte the slave sends word `addr`.
  The word is copied whole on the falling `SCLK` edge after the command byte,
  so a result that changes during the transfer cannot tear. Addresses 8–63
  read as zero.
- **Write** (`write = 1`): the 32 data bits appear on `RX_DATA`, the address on
  `RX_ADDRESS`, and `RRDY` rises at the 40th rising edge. `RX_REQ` clears
  `RRDY`. Nothing inside the counter uses written words. The path is brought
  out for whatever the FPGA is extended with.

Word map:

| addr | content |
|---|---|
| 0–3 | N_in of channels 0–3 |
| 4–7 | N_ref of channels 0–3 |

A read cycle for the microcontroller:

1. Wait for the fall of `MCU_INTERRUPT`.
2. Wait a few microseconds.
3. Read the eight words with eight frames.
4. Compute `f_i = word[i] / word[4+i] * 300e6` per channel.

At 10 MHz SCLK the eight frames take about 35 µs. They must finish within
one gate period, which is easy with a 1 s gate.

## Parameters

| Name | Default | Where | Meaning |
|---|---|---|---|
| `TIME_GATE_TOP` | 100,000,000 | `freq_counter_top` | gate period in 100 MHz clocks |
| `CNT_W` | 32 | `fc_pkg` | width of all counters and SPI words |
| `N_CH` | 4 | `fc_pkg` | channels (the SPI map holds 2 x N_CH words) |
| `ADDR_W` | 6 | `fc_pkg` | SPI address field |
| `WIDTH` | 32 | `reciprocal_block`, `pcounter` | counter width |
| `KIND` | `EDGE_FALLING` | `edge_detector` | edge to detect |

With 32-bit counters the reference count wraps after 14.3 s. Gates up to about
14 s are therefore possible without widening `CNT_W`.

## What follows the original design, and what is this design's own

These points follow the original design:

- The four blocks: PLL, time gate, four reciprocal counters, SPI slave.
- The 300 MHz reference and the 100 MHz gate clock.
- The 1 s gate as 100,000,000 counts.
- 32-bit counters for input and reference in every channel.
- The sync gate started by the first input edge after the gate opens.
- Eight 32-bit words to the SPI slave.
- The SPI slave's port set.
- One flip-flop driving both `MCU_INTERRUPT` and `BIT_0`.

These points are this design's own reading or choice:

- **Gate period.** It is exactly `TIME_GATE_TOP` clocks, following the timing
  diagram of the original. The original's VHDL compares against
  `TIME_GATE_TOP-1`, which would give one clock less. The original's unused
  enable input is dropped.
- **Clock-domain crossing.** The held gate request and the two-flip-flop
  synchronisers in each direction are this design's own. The original's
  schematic shows synchronising flip-flops and an edge detector, but not
  legibly enough to copy. The original keeps two register stages per result;
  here there is one.
- **End of measurement.** The sync gate closes on the first input edge after
  the gate falls. The original's timing drawings show it falling with the
  gate. Closing on an input edge is what makes both counts cover whole input
  periods.
- **SPI.** The frame format, the mode, the command byte, and the `RX_REQ`
  clearing `RRDY` asynchronously are all this design's own. The original names
  the ports only.
- **Word map.** The order (inputs in words 0–3, references in 4–7) is read off
  the original top-level schematic. Only word 0 is unambiguous there.
- **Reset.** There is a single active-low asynchronous reset.
- **PLL.** The third PLL output of the original has no stated use and is
  absent.
- **Counters.** The original maps every counter onto a DSP48 slice. Here they
  are plain RTL counters, and a synthesis tool may or may not use DSPs.
- **Calibration.** It is a build-time parameter. How a calibrated gate count
  would reach a running FPGA is not specified; the SPI write path could carry
  it, but it is not wired to the time gate.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_pcounter` | Clear priority, wrap and random enable/clear against a model (8-bit) |
| `tb_edge_detector` | Both edge kinds against the sampled stream |
| `tb_timegate_block` | Period and duty for two periods, first rise after reset, 0 and 1 hold the gate low, asynchronous reset |
| `tb_spi_slave_block` | Reads of all words over several data sets and unmapped reads; a word changed mid-frame; writes with `RRDY`/`RX_REQ`; an aborted frame |
| `tb_reciprocal_block` | Inputs from 1 MHz to 37 MHz with unrelated periods, as below |
| `tb_freq_counter_top` | Whole design with a 50 µs gate, as below |
| `tb_freq_counter_full` | Whole design at the default sizes, as below |

`tb_reciprocal_block` checks:

- N_ref = N_in · T_in / T_ref within one count.
- N_in against the gate length minus the hand-over.
- One result per gate period.
- No new result while the gate is held low.

`tb_freq_counter_top` runs the whole design with a 50 µs gate:

- Four inputs, including 3.7 MHz.
- A microcontroller model reads over SPI and applies the frequency formula
  within one reference count.
- It checks the gate period and `BIT_0`.
- It exercises the SPI write path.
- It requires each mechanism to occur: gate periods, result sets, gate pulses
  missed by an input, and writes.

`tb_freq_counter_full` runs the top with every parameter at its default
(1 s gate, 300 MHz reference, four inputs near 10 MHz). It then reads and
checks all four frequencies. It simulates 1 s in about 4.5 minutes. A
reference run measured 10,000,000.000 / 10,000,600.033 / 9,995,402.100 /
10,004,602.133 Hz against true 10,000,000.000 / 10,000,600.036 /
9,995,402.115 / 10,004,602.117 Hz, with a resolution of 0.034 Hz (the
testbench's reference is 299.94 MHz).

The testbenches use `tb/spi_master_if.sv`, an interface with the SPI wires, a
bus-functional master task and a check that `MISO` is quiet when the slave is
not selected.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fc_pkg.sv rtl/*.sv tb/spi_master_if.sv tb/tb_freq_counter_top.sv \
    --top-module tb_freq_counter_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/fc_pkg.sv rtl/freq_counter_top.sv`.

## Size

Generic synthesis gives 693 flip-flops for the whole design. About 64 per
channel are result registers and 64 counter bits. The original FPGA build
reports 630 slice registers, 336 LUTs and 8 DSP48 slices, of which two counters
per channel sit in DSPs.

## Limitations

- There are no timing constraints. On the FPGA, the inputs should enter on
  clock-capable pins. The synchroniser flip-flops should be kept close
  together, and the three clock domains should be declared asynchronous to
  each other.
- The SPI slave has no system clock. `RRDY` is set by `SCLK` and cleared
  asynchronously by `RX_REQ`. Logic that uses it must synchronise it.
- `MISO` is driven low, not tri-stated, when the slave is not selected.
