# A small AXI4-Lite peripheral SoC: UART, SPI master and timer/GPIO behind one bus controller

This is the peripheral side of a small system-on-chip in which a pipelined
RISC processor talks to three devices over an AXI4-Lite bus: a UART, an SPI
master and a system-control block holding a timer and a 32-bit input port.
The design is organised around one idea: **all slaves share one bus state
machine**. Each peripheral is only a small "device" answering two calls,
*read this address* and *write this address*, and it may answer late; the
shared machine turns a late answer into a bus stall. The bus controller is
equally thin: it remembers, per master and per direction, which slave it is
talking to and wires the channels straight through.

The structure follows an SoC that was originally written as a single-cycle
C++ model (a common slave base class with device-specific virtual read and
write functions, an AXI bus controller template for `MC` masters and `SC`
slaves) and turned into RTL by a C-to-RTL flow. This RTL is hand-written
SystemVerilog that keeps that structure and its cycle behaviour; where the
original leaves details open, the choices made here are listed in
[What is taken over and what is chosen here](#what-is-taken-over-and-what-is-chosen-here).

The processor itself is **not** part of this RTL: its instruction set is not
available. Its AXI master port is a port of the top, `tctproc_axi`, and the
testbenches play the processor.

```
             m_ch_m / m_ch_s   (processor side, a port of the top)
                    |
            +---------------+
            | axi_bus_ctrl  |   1 master x 3 slaves, read and write independent
            +---------------+
             |      |      |
        s_ch[0]  s_ch[1]  s_ch[2]
             |      |      |
     +--------+ +--------+ +-------------+
     |axi_uart| |axi_spim| | axi_sysctrl |    each = axi_slave_fsm + device
     +--------+ +--------+ +-------------+
      tx  rx    sck mosi     porta[31:0]
                miso cs_n
```

## Files

| file | what it is |
|---|---|
| `rtl/axi4l_pkg.sv` | channel types: `ch_m_t` (master-driven half), `ch_s_t` (slave-driven half plus a 32-bit interrupt word), response enum |
| `rtl/axi_slave_fsm.sv` | the shared slave read and write state machines |
| `rtl/axi_bus_ctrl.sv` | interconnect, parameters `MC`, `SC`, `SEL_LSB` |
| `rtl/axi_uart.sv`, `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | UART peripheral and its serial engines |
| `rtl/axi_spim.sv`, `rtl/spi_master_core.sv` | SPI master peripheral and its byte engine |
| `rtl/axi_sysctrl.sv` | 16-register system control block with timer and port A |
| `rtl/tctproc_axi.sv` | SoC top |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tctproc_axi` for the whole SoC |
| `tb/axi_master_bfm.sv`, `tb/uart_x_model.sv`, `tb/spi_x_model.sv` | behavioural bus master, serial partner and SPI slave used by the testbenches |

## The bus channel set

One channel set carries the five AXI4-Lite channels with 32-bit addresses and
data, a 4-bit write strobe and 2-bit responses, plus a 32-bit interrupt word
that is not an AXI signal but travels from slave to master with the channel
set. Instead of one bidirectional bundle the set is split into two packed
structs, one per driving side, so a module port list states plainly who
drives what:

* `ch_m_t`: `raddr, raddr_valid, waddr, waddr_valid, rdat_ready, wdata, wstrb, wdat_valid, wres_ready`
* `ch_s_t`: `raddr_ready, waddr_ready, rdata, rresp, rdat_valid, wdat_ready, wresp, wres_valid, intr`

## The shared slave state machine (`axi_slave_fsm`)

This is the part that needs the most care, because every bus output of a
slave comes from a register: a slave decides in one cycle and the master sees
the decision in the next. The machines are written to be correct under that
rule.

**Read.** `R_INIT` waits for `raddr_valid`, stores the address and raises
`raddr_ready` for one cycle. In `R_ADDR` the device read call
(`dev_rd_req`, `dev_rd_addr`) is made every cycle until the device answers
`dev_rd_ok` with `dev_rd_data`; the data are registered together with
`rdat_valid` and held. When the master's `rdat_ready` is seen the machine
moves to `R_END`, which drops `rdat_valid`, waits for the master to have
released `raddr_valid`, pulses interrupt bit 0 and returns to `R_INIT`.

**Write.** The mirror image: `W_INIT` takes the address and raises
`waddr_ready`; `W_ADDR` makes the device write call while `wdat_valid` is
high until `dev_wr_ok`, then raises `wdat_ready` for one cycle; `W_RESP`
registers an OK response with `wres_valid`; `W_END` drops it, waits for the
master to release the address and data, and pulses interrupt bit 1.

A device call is *taken* in the cycle where `req` and `ok` are both high;
that is where a device pops a buffer or starts a transfer, so every bus
transfer calls the device exactly once however long it stalls.

Read with a device that answers at once (cycles counted from the first cycle
with `raddr_valid`):

```
cycle          0        1        2        3
raddr_valid    1        1        0        0
raddr_ready    0        1        0        0      (slave register)
state          R_INIT   R_ADDR   R_END    R_INIT
device call    -        taken    -        -
rdat_valid     0        0        1        0      (slave register)
rdat_ready     1        1        1        0
```

So `rdat_valid` comes 2 cycles after `raddr_valid` first appears and a
master that keeps `rdat_ready` high finishes a read in 3 cycles; a write
finishes in 4. Each cycle a device withholds `ok` adds one cycle. The
interrupt word is a register loaded every cycle with the bits raised in that
cycle (done bits plus the device's `dev_intr`), so interrupts are one-cycle
pulses.

Assertions in the module check that read data and the write response stay
up and unchanged until the master has taken them.

## The bus controller (`axi_bus_ctrl`)

For every master there is a read status and a write status register, each
`{active, slave_id[7:0]}`. Reads and writes are handled independently, so a
master can read one slave while writing another.

* **Activate.** A master that is not active and raises `raddr_valid`
  (`waddr_valid`) is decoded and treated as active *in the same cycle*; the
  status register holds the choice from the next cycle on.
* **Connect.** While active, the master's read (write) channels are wired
  combinationally to the chosen slave in both directions. Every slave input
  not driven by an active master is held at zero.
* **Release.** When the master's `rdat_ready` meets the slave's `rdat_valid`
  (`wres_ready` meets `wres_valid`) the status is cleared at the next edge.
* **Decode.** Slave index = `addr[SEL_LSB +: 8]` (`SEL_LSB = 12`); an index
  of `SC` or more selects slave `SC-1`.
* **Interrupts.** Slave `k`'s interrupt bits `[7:0]` appear in bits
  `[8k+7:8k]` of every master's interrupt word.

The controller adds no cycles. There is no arbiter: it is meant for one
master (`MC = 1`); with several masters, two of them on the same slave at
once is not supported and an assertion reports it. A write must raise
`waddr_valid` no later than `wdat_valid`, because the write channels are
only routed once the address has opened the connection.

## Address map and registers

Slave base addresses with the default decode:

| base | slave |
|---|---|
| `0x0000_0000` | UART |
| `0x0000_1000` | SPI master |
| `0x0000_2000` | system control (indices 3..255 alias here) |

### UART (`axi_uart`)

| offset | read | write |
|---|---|---|
| `addr & 7 == 0` | oldest received byte; **waits** until one is there (and forever while not activated) | byte to send; **waits** while the transmitter is busy; dropped while not activated |
| `addr & 7 != 0` | status: bit 0 activated, 1 receive buffer not empty, 2 transmitter busy, 3 overflow, [15:8] bytes buffered | control: bit 0 activated; any control write clears overflow |

8 data bits, no parity, 1 stop bit, LSB first, `CLK_DIV` clocks per bit
(default 16). Received bytes go into a `RX_DEPTH`-entry circular buffer
(default 16) only while activated; a byte that finds the buffer full is lost
and sets overflow. There is no transmit buffer: a second byte written while
one is being sent stalls the bus for up to one frame (10 × `CLK_DIV`
cycles).

### SPI master (`axi_spim`)

| offset | read | write |
|---|---|---|
| `addr & 6 == 0` | runs one byte transfer sending `IO_READ_DATA` (0xFF) and returns the byte received; **waits** for the transfer; never answers while not activated | starts one byte transfer of `wdata[7:0]`; waits while the engine is busy; dropped while not activated |
| `addr & 6 != 0` | status: bit 0 activated, 1 busy, 2 chip select asserted, [15:8] last byte received | control: bit 0 activated |

Address bit 0 of a data access = 1 releases `spi_cs_n` after that byte, so
a multi-byte frame is written at offset 0 and its last byte at offset 1.
Mode 0 (SCK idle low, sample on rising edge), MSB first, half period
`HALF_DIV` clocks (default 4), 16 × `HALF_DIV` cycles per byte.

### System control (`axi_sysctrl`)

Sixteen 32-bit registers at word offsets `0x00..0x3C`; reads never wait,
writes honour the byte strobes.

| reg | offset | meaning |
|---|---|---|
| 0 | `0x00` | port A input, sampled every cycle, read only |
| 1 | `0x04` | timer control: bit 0 enable, bit 1 interrupt enable |
| 2 | `0x08` | timer count, +1 per cycle while enabled |
| 3 | `0x0C` | timer compare: at count == compare the count restarts at 0 (period compare+1 cycles), reg 4 bit 0 is set and, with the interrupt enabled, interrupt bit 2 pulses |
| 4 | `0x10` | timer status |
| 5..15 | `0x14..0x3C` | general purpose |

### Interrupt word seen by the master

| bits | source |
|---|---|
| 0 / 1 | UART read / write finished |
| 8 / 9 | SPI read / write finished |
| 16 / 17 / 18 | system control read / write finished, timer |

## What is taken over and what is chosen here

Taken over from the original design:

* the block set, the bus shape (one master, three slaves) and the slave
  order UART, SPI, system control; pin names TX, RX, MOSI, SCK, MISO, PORTA;
* the channel fields and widths and the interrupt word in the channel set;
* the shared-slave-machine structure; the read machine in detail (three
  states, one-cycle address ready, data held while valid, release check,
  interrupt bit 0, OK responses, registered outputs);
* the bus controller's per-master `{slaveID (8 bits), active}` status,
  same-cycle activation, release on the data handshake, sinks reset to zero,
  no arbiter;
* the device read rules: UART status at `addr & 7 != 0` and data only when
  activated and not empty; SPI status at `addr & 6 != 0` and a receive
  transfer, stalled until done, when activated; system control register
  `(addr >> 2) & 15`;
* an asynchronous active-low reset.

Chosen here, because the original leaves it open:

* the write machine (only declared there), made the mirror of the read
  machine, and interrupt bit 1;
* the address decode and the mapping of slave interrupts into the master's
  word;
* every device's write side, control and status bits;
* the UART frame format, bit period and buffer depth; no transmit buffer;
* the SPI mode, byte width, divider, the 0xFF read filler and the chip
  select (the original shows only MOSI, SCK and MISO) with address bit 0 as
  its release;
* the use of the system-control registers for port A and the timer.

The original's generated UART module has no `wdat` ready and no read
response among its outputs (constant outputs seem to have been optimised
away); this design drives `wdat_ready` and the response as AXI4-Lite
requires.

## Simulating

Everything is plain SystemVerilog-2017 and runs on Verilator 5 with
`--timing`. From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/axi4l_pkg.sv \
    tb/tb_tctproc_axi.sv --top-module tb_tctproc_axi -Mdir obj
./obj/Vtb_tctproc_axi
```

Replace `tb_tctproc_axi` with any other `tb_*` name to run one block's test.
Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if a transfer hangs.

* `tb_axi_slave_fsm`: random reads and writes against a memory device with
  0..3 wait cycles; data, strobes, one device call per transfer, 3/4-cycle
  timing plus waits, done interrupts.
* `tb_axi_bus_ctrl`: three memory slaves; decode and alias, simultaneous read
  and write on different slaves, no stray traffic, interrupt bytes, no added
  cycles.
* `tb_axi_uart`: inactive receive ignored, transmit order, stall on busy
  transmitter, read waiting for a byte, buffer order, overflow.
* `tb_axi_spim`: no traffic while inactive, byte order, stall on busy engine,
  chip-select release, read transfers and their data.
* `tb_axi_sysctrl`: port A, strobed registers, timer period, status and
  interrupt enable, timer stop.
* `tb_tctproc_axi`: the whole SoC at its default parameters. Acting as the
  processor, it echoes a message from the serial partner through the SPI
  slave and back out of the UART, reads port A at a normal and an aliased
  address while writing the UART, overflows the receive buffer, and then
  runs 300 random transfers to the system-control registers, most of them
  overlapped with a transfer to another slave, against a register model. It counts
  each mechanism (UART read wait, transmit wait, SPI wait, chip-select
  release, timer interrupt, overflow, simultaneous read/write, alias, done
  interrupts per slave) and fails if one never happened.

## Size

After coarse synthesis the whole top is about 790 word-level cells and 780
flip-flop bits plus the 128-bit UART receive buffer. The processor, which
the original design reports as by far the largest block, is not included.

## Limits

* No processor: the master port must be driven from outside.
* Only one master is supported by the bus controller (no arbiter).
* Responses are always OK; an address outside the three slaves aliases to
  the system control block rather than returning an error.
* A UART data read while the UART is not activated, and an SPI data read
  while the SPI is not activated, never complete, as in the original device
  read rules; software must activate a device first.
