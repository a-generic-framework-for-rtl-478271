# Wishbone SoC with bus-independent IP cores

Most IP cores come with the interface of one particular on-chip bus built into their
functional logic. Moving such a core to another bus means rewriting it. This design keeps
the bus interface out of the cores altogether. A core exposes only a small set of base
signals:

| signal | meaning |
|---|---|
| `cs` | chip select / request |
| `we` | write enable |
| `adr` | address |
| `dat` in and out | write data and read data |

A separate **master module** or **slave module** translates these base signals to the
bus. The bus here is Wishbone. One **interconnect module** joins all master and slave
modules. A core that is both a master and a slave, such as a DMA engine, simply gets one
module of each kind.

The repository holds these generic bus modules. It also holds a small case-study
system-on-chip built with them: a processor port, a 1 KByte RAM, a UART, a timer and three
parallel I/O ports (push buttons and two 7-segment displays). All of them sit on a Wishbone
bus with a 16-bit address and a 24-bit data path.

```
 processor port --- wb_master --+                    +-- wb_slave -- soc_ram    (1 KByte)
                                |                    +-- wb_slave -- soc_uart
                                +-- wb_interconnect -+-- wb_slave -- soc_timer
                                                     +-- wb_slave -- soc_pio    (buttons)
                                                     +-- wb_slave -- soc_pio    (7-segment 0)
                                                     +-- wb_slave -- soc_pio    (7-segment 1)
```

The processor is not part of this RTL. Its bus port (`cpu_*`) is brought out of the top
module `wb_soc`, and any core that speaks the base-signal protocol below can drive it.

## Three sets of signals

Consider a core attached to a bus module. Its own signals form a set E; the bus standard's
signals form a set I. The module treats them in three groups:

* **E ∩ I: signals both sides have** (the base signals). These are wired one to one, with
  direction taken into account: the core's `we` becomes `we_o` of a master, and so on.
* **I \ E: bus signals the core lacks.** These are tied to a sensible constant. A core that
  always answers at once has no ready output, so its slave module's `ip_ready_i` is tied to
  1. All slaves of the case study are tied this way.
* **E \ I: core signals the bus has no slot for.** These travel as Wishbone **tags**, which
  the standard reserves for user extensions. There are three kinds, each with the timing of
  what it belongs to:
  * address tags (`tga`) go with the address, for example address parity;
  * data tags (`tgd`) go with the data in either direction. An example is a transfer
    status, such as the response code of a core built for another bus, returned to the
    master;
  * cycle tags (`tgc`) go with the whole bus cycle, for example a privilege flag.

  The master, slave and interconnect modules carry all three kinds (`TGA_W`, `TGD_W`,
  `TGC_W` bits, default 1). The case-study cores have no tags, so the tag paths there are
  tied to 0.

## Transfer modes and timing

This is the part that most needs care when attaching a core.

### Asynchronous mode (the case-study configuration)

The master and slave modules are pure wiring with no registers:

```
master:  cyc_o = stb_o = ip_cs_i     ip_ready_o = ack_i     ip_dat_o = dat_i
slave:   ip_cs_o = cyc_i & stb_i     ack_o = ip_cs_o & ip_ready_i
```

The interconnect is combinational too. The only exception is the arbiter's state, and
even that grants a free bus in the same clock. So one clock carries the whole round trip:

1. In clock n the processor drives `cs = 1`, `we`, `adr` and, for a write, `dat`. All of
   this follows a rising edge of its own logic.
2. The decoder selects the slave, and that slave's `cs` rises.
3. A core that is ready returns its read data, `ack` comes back, and `cpu_ready_o` rises,
   all within clock n.
4. At the rising edge that ends clock n, the processor registers the read data, or the
   core registers the write.

A zero-wait core therefore moves one word per clock. With 24-bit data at 50 MHz that is
50 M × 3 bytes = 150 MByte/s. The SoC testbench measures 682 transfers in 682 clocks.

A slow core holds `ip_ready_i` low for as many clocks as it needs (Wishbone wait states).
During that time `ack` and `cpu_ready_o` stay low, and the processor must hold its request
until it sees ready.

In the case study the processor simply keeps `cs` at 1, so `cyc` and `stb` are constantly
high. Every clock is then a transfer to whatever address is on the bus. Two things follow:

* **All register reads are free of side effects.** Flags are cleared by writes.
* **A write repeats every clock for as long as `we` stays high.** Writes to RAM or to an
  output register are unaffected. A UART transmit request is also safe, because it is
  ignored while the transmitter is busy.

### Synchronous mode

`wb_master` also has a registered mode. A core that knows about the two modes selects it at
run time through `mode_i`. For a core that does not know about them, the mode is fixed
before synthesis with `RUNTIME_MODE = 0` and `MODE`. The SoC takes the second route: its
`CPU_MODE` parameter defaults to asynchronous, and synthesis then removes the master's
registers. A three-state machine runs the cycle:

| state | what happens |
|---|---|
| IDLE | `ip_cs_i` seen: the request (`we`, `adr`, `dat`, tags) is registered |
| BUSY | `cyc_o`/`stb_o` high, held through wait states until `ack_i`; read data and data tag registered |
| DONE | `ip_ready_o` high for exactly one clock with the registered data; back to IDLE |

A zero-wait transfer shows ready 2 clocks after the request and occupies 3 clocks. The core
may change its inputs once the request is registered. It must drop `cs`, or present a new
request, after it has seen ready. Change the mode only while no synchronous cycle is in
flight.

Assertions check two rules: `stb_o` stays up until `ack_i`, and ready is a single-clock
pulse.

## Interconnect

`wb_interconnect` is a shared bus for `NM` masters and `NS` slaves, built from three parts:

* **Arbiter (`wb_arbiter`).** Masters request with `cyc`. A granted master keeps the bus
  for as long as it holds `cyc`, so a bus cycle is never split. When the bus is free, the
  first requester after the previous owner gets it in the same clock (round robin).
* **Multiplexers.** The owner's `we`, address, write data and tags are put on the bus and
  broadcast to all slaves. `cyc` and `stb` go only to the addressed slave. That slave's
  `ack`, read data and data tag go back only to the owner.
* **Address decoder (`wb_addr_decoder`).** It holds the system address table as `BASE` and
  `MASK` parameters. Slave *i* owns every address with `(adr & MASK[i]) == BASE[i]`, and
  the lowest index wins on overlap. An address no entry covers selects nothing and is
  **never acknowledged**. A master in synchronous mode would then wait forever, and only a
  reset ends the open cycle. Keep software inside the map.

Address and data widths may be set from 8 to 32 bits. Elaboration-time assertions enforce
this range.

## The case-study SoC (`wb_soc`)

Word addresses on the 16-bit bus:

| address | slave | registers (word offset) |
|---|---|---|
| 0x0000–0x03FF | RAM | 341 words of 24 bits (1024·8/24); words 341–1023 read 0, writes ignored |
| 0x8004–0x8007 | UART | 0 DATA (W: send byte, R: last received byte); 1 STATUS (R: {overrun, rx_valid, tx_busy}, W: clear rx flags); 2 DIV (clocks per bit, reset CLK_HZ/BAUD = 434) |
| 0x8008–0x800B | timer | 0 CTRL (R: {expired, enable}; W: enable = d0, d1 = 1 clears expired); 1 PERIOD; 2 COMPARE; 3 COUNT |
| 0x800C–0x800F | button PIO | 0 DATA (pins, synchronised); 1 DIR (1 = output), reset all inputs |
| 0x8010–0x8013 | 7-segment PIO 0 | as above, reset all outputs |
| 0x8014–0x8017 | 7-segment PIO 1 | as above, reset all outputs |

The peripheral cores:

* **`soc_ram`:** 1 KByte with a combinational read. A write takes effect at the rising
  edge with `cs` and `we` high. The contents are not reset. With W-bit data it has
  1024·8/W words.
* **`soc_uart`:** 8 data bits, no parity, one stop bit, LSB first. The bit time is a
  register, so the baud rate can change at run time (values below 2 act as 2). The
  receiver synchronises `rx` with two flip-flops, checks the start bit half a bit later and
  samples mid-bit. A frame with a bad stop bit is dropped. A second byte arriving before
  rx_valid is cleared sets overrun and replaces the first.
* **`soc_timer`:** while enabled, a counter of the data width runs 0, 1, …, PERIOD and
  wraps. Each wrap sets the sticky `expired` flag, which is also `timer_irq_o`.
  `timer_pwm_o` is high while `count < COMPARE`, so the duty cycle is
  COMPARE / (PERIOD + 1).
* **`soc_pio`:** `WIDTH` pins, each set as input or output by the direction register.
  Inputs pass through a two-flip-flop synchroniser, so a pin change is readable two clocks
  later. The SoC ANDs each 7-segment output with its direction bit, so a pin drives its
  segment only while it is an output.

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `ADR_W` | 16 | bus address width |
| `DAT_W` | 24 | bus data width |
| `CLK_HZ` | 50 000 000 | clock rate |
| `BAUD` | 115 200 | UART reset rate |
| `BTN_W` | 4 | button count |
| `SEG_W` | 8 | segment lines per display |
| `CPU_MODE` | `WB_ASYNC` | master transfer mode, fixed at build time |

The address map, slave count and register offsets are in `rtl/wb_pkg.sv`.

## Which parts are given and which are chosen here

Taken from the underlying design description:

* the separation of core and bus interface;
* the E/I/base-signal treatment and the tag mechanism;
* the slave equations (`cs = cyc & stb`, `ack` from slave_ready);
* the asynchronous transfer and wait-state behaviour;
* fixing the mode before synthesis for a core without a Wishbone interface;
* the existence of a synchronous master mode, selectable at run time or before synthesis;
* an interconnect made of arbiter, multiplexer and central address decoder with a system
  address table;
* the 8–32-bit width range;
* the case-study bus widths (16/24) and the 50 MHz clock;
* the peripheral set: one master, six slaves, 1 KByte RAM with an asynchronous interface,
  UART, timer, button and 7-segment PIOs;
* `cyc`/`stb`/slave_ready held at 1 in the case study.

Chosen in this implementation, because the description does not give them:

* the synchronous-mode state sequence and the core's hold-until-ready contract;
* the arbitration scheme (round robin with cycle lock);
* the base/mask form of the address table and its contents;
* no response to unmapped addresses;
* everything inside the UART, timer and PIO: frame format, register maps, reset values and
  pin counts;
* the RAM's word organisation;
* synchronous active-high reset (`rst`) throughout.

Known departures and limits:

* **Processor.** The processor core itself is not included; the SoC exposes its bus port
  instead.
* **RAM capacity.** With a 24-bit word, 1 KByte yields 341 whole words (1023 bytes).
* **Registers in the bus modules.** In asynchronous mode the master and slave modules have
  no registers, as in the original case study. The original synthesis figures attribute
  two registers to the address decoder. Here the decoder is combinational, and the
  interconnect's only registers are the arbiter's lock/owner/pointer bits.
* **Features not implemented:** Wishbone burst transfers, mentioned only as a way to raise
  throughput; the `err`/`rty` terminations; a 7-segment code converter. The processor
  writes raw segment patterns.
* **Clock rates are not reproduced.** The reported rates (about 55, 50 and 33 MHz for 16-,
  24- and 32-bit data paths on an FPGA) are properties of that implementation. Only the
  cycle behaviour is checked here: one transfer per clock in asynchronous mode, hence W/8
  bytes per clock.

## Files

`rtl/`:

| file | contents |
|---|---|
| `wb_pkg.sv` | widths, address map, register offsets, mode and state types |
| `wb_master.sv`, `wb_slave.sv` | master and slave modules |
| `wb_arbiter.sv`, `wb_addr_decoder.sv`, `wb_interconnect.sv` | the interconnect |
| `soc_ram.sv`, `soc_uart.sv`, `soc_timer.sv`, `soc_pio.sv` | peripheral cores |
| `wb_soc.sv` | the SoC top |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_wb_soc.sv` runs the whole SoC end to end at its default parameters. A bus-master
  model there plays the processor. It covers:
  * a full RAM fill and read-back at one word per clock;
  * an unmapped access;
  * UART loop-back at 434 clocks per bit, and again after reprogramming the bit time;
  * the timer's PWM and expiry;
  * button and 7-segment I/O.

  It counts each of these mechanisms and fails if any one never happened. The program
  itself lives in `soc_cpu_model.sv`, a behavioural model of the processor.
* `tb_wb_soc_sync.sv` runs the same program on an SoC built with `CPU_MODE = WB_SYNC`.
  Every transfer's ready must come 2 clocks after its request.
* `tb_wb_soc_widths.sv` runs the SoC with 16- and 32-bit data paths.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_wb_soc rtl/wb_pkg.sv tb/tb_wb_soc.sv -o sim_soc
./obj_dir/sim_soc
```

Use the same command with another `tb_*` module for a single block. The package file must
come first. The full SoC test runs in well under a minute.

To lint one module:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/wb_pkg.sv rtl/wb_soc.sv
```

This reports unused package constants and unused upper bits of wide bus inputs. Both are
expected for modules that use only part of the shared package or of the data word.
