# Glue logic of a satellite payload's single board computer

This is the logic of the single board computer (SBC) that runs a
multi-spectral camera payload on an Earth-observation satellite. The SBC takes
commands from the spacecraft over MIL-STD-1553B and sends telemetry back the
same way. It drives six sub-units of the camera over RS-422 serial lines, and
it watches and drives a few bi-level ("discrete") wires. It also sends the
camera's non-uniformity-correction board (the NUC) its clock, the 1 Hz
time-mark and the start/stop-imaging trigger.

The processor is an 80486DX2 with a 25 MHz bus. The board's timing and logic
sit in three FPGAs:

* **The interfacing FPGA** decodes the CPU address and runs the read and write
  cycles of the SRAM, the flash and the 1553 device. It also holds the
  interrupt controller, the watch-dog, a 32-bit operating-system timer, the
  discrete inputs and outputs, and the reset logic.
* **Two UART FPGAs** each hold four serial channels. Each channel has a
  2 KB buffer and three registers.

The design aims to be simple and robust, because the computer runs all the
time and must survive radiation. The CPU cache and paging are off, there is no
DMA, and the CPU is master of every exchange. Software fills a buffer, says
"go", and polls for the answer. Only the software-development serial port, the
timer and the spacecraft discretes use interrupts.

The RTL in `rtl/` is that FPGA logic, written as one design. The CPU, the
memory chips, the 1553 device and all line drivers are outside it; their
signals are the ports of `sbc_top`.

```
            80486 local bus (ADS#, RDY#, BE#, W/R#, M/IO#, A31..2, D31..0)
                 |
   +-------------+------------------ sbc_top ----------------------------+
   |  sbc_ifpga  v                                                        |
   |   reset_gen   bus_ctrl ---- SRAM 2 MB (4 x 512K x 8)                 |
   |       |          |  |------ flash 1 MB (2 banks x 4 x 128K x 8)      |
   |       |          |  |------ 1553 RT device (16-bit, A0 = CPU A2)     |
   |       |          |  +------ uart_cs / register bus (D7..0) ------+   |
   |       |     register bus                                          |  |
   |       |   pic  wdt  sys_timer  discrete_io  lvds_ctrl             |  |
   |       |    ^ INTR                 ^ spacecraft   -> NUC tm/stph    |  |
   |       v                                                           v  |
   |   rst_n  ---------------------------->  uart_quad  x2 (4 x uart_channel,
   |                                           each: uart_tx, uart_rx, 2 KB sync_fifo)
   +--------------------------------------------- RS-422 CH1..8, P and R lines
```

## The CPU bus and the memory map

The cache is not used, so the 486 only runs single, non-burst cycles. The CPU
drives ADS# low for one clock with the address, byte enables, W/R# and M/IO#.
It holds the write data until the cycle ends, and it waits for RDY#. The
controller (`bus_ctrl`) latches the address on ADS#. It runs the access for
the target's wait states and then gives RDY# for one clock with the read
data. A cycle takes **WS + 3 clocks** counted from the ADS# clock.

| region       | base          | size         | wait states (parameter)          | cycle |
|--------------|---------------|--------------|----------------------------------|-------|
| SRAM         | `0x0000_0000` | 2 MB         | 1 (`SRAM_WS`)                    | 4     |
| 1553 device  | `0x8000_0000` | 16 KB = 4K words | until READY#, at most 64 (`B1553_TIMEOUT`) | 3 + device latency |
| UART FPGA 1  | `0x8001_0000` | 64 B         | 2 (`UART_WS`)                    | 5     |
| UART FPGA 2  | `0x8001_0040` | 64 B         | 2                                | 5     |
| registers    | `0x8002_0000` | 256 B        | 1 (`REG_WS`)                     | 4     |
| flash        | `0xFFF0_0000` | 1 MB         | 3 (`FLASH_WS`)                   | 6     |
| anything else, I/O cycles | | | none, reads 0                       | 2     |

The flash sits at the top of memory, so the 486 reset vector (`0xFFFF_FFF0`)
is fetched from it. The SRAM is four byte-wide chips, one per byte lane.
CE# and OE# are shared and there is one WE# per lane from the byte enables.
The flash is eight 128K x 8 chips: two banks of four lanes, with address bit
19 choosing the bank's CE#. Flash writes go out as plain write cycles. The
software runs the chips' program command sequence (12 V programming is done
on the board).

## The 1553 window: a shifted address instead of word swapping

The 1553 device has a 16-bit data bus and the CPU a 32-bit one. The usual fix
is word-swapping logic that steers each 16-bit word to the upper or lower half
of the CPU bus. This board does not do that. The device's address lines are
wired to the CPU address **shifted by one bit**: device A0 is CPU A2. Each
16-bit device word therefore appears at its own 4-byte-aligned CPU address,
always on D15..D0. The CPU reads the upper half as zero, and writes to it are
dropped. The whole device memory is linear for the CPU, half of every CPU word
is unused, and no swapping logic is needed.

Of the device's 16K words, 4K are used. That gives a 12-bit device address
from CPU A13..A2 and a 16 KB CPU window. A 1553 cycle asserts CS# and STRB#
and waits for the device's READY#. If READY# does not come within 64 clocks,
the cycle ends anyway. It then returns all ones and raises interrupt 5, so a
dead device cannot hang the CPU. The device does not interrupt when messages
arrive: software polls its memory. The device's serial side, its A/B channels
and the transformer coupling are outside this logic.

## Serial channels

| channel | unit | FPGA.slot | bit rate | clocks/bit | mode |
|---------|------|-----------|----------|------------|------|
| 1 | camera electronics (EOS/CEU) | 1.0 | 19200 | 1302 | half duplex, polled |
| 2 | DCSU (data compression and storage) | 1.1 | 19200 | 1302 | half duplex, polled |
| 3 | CCU (channel coding) | 1.2 | 19200 | 1302 | half duplex, polled |
| 4 | THTM (thermal and telemetry) | 1.3 | 19200 | 1302 | half duplex, polled |
| 5 | NUC | 2.0 | 19200 | 1302 | half duplex, polled |
| 6 | APDE (antenna pointing) | 2.1 | 56400 | 443 | half duplex, polled |
| 7 | EGSE (ground test equipment) | 2.2 | 19200 | 1302 | half duplex, polled |
| 8 | host (software development) | 2.3 | 19200 | 1302 | full duplex, interrupt |

Frames are 8 data bits, no parity, one stop bit, LSB first. At 25 MHz the two
dividers give 19201 and 56433 bit/s. The 56400 bit/s rate is unusual but is
kept as given (57600 would be the standard rate). The EGSE and host rates
were not given, so they are set to 19200 bit/s.

Each channel's transmitter drives both its primary (P) and its redundant (R)
RS-422 driver. The two receive lines are ANDed: both idle high, so a start bit
on either line gets through.

### Registers of a channel

The UART FPGAs see only D7..D0. Every register is on its own 4-byte-aligned
address: `base + 16 x slot + 4 x register`.

| word | name | write | read |
|------|------|-------|------|
| 0 | send/receive | put a byte into the buffer | take the oldest byte out (0 when empty) |
| 1 | byte counter | none | bytes in the buffer, bits 7..0 |
| 2 | control / status | bit0 START, bit1 RX enable, bit2 CLEAR, bit3 IRQ enable | bits 3..0 = count bits 11..8, bit4 transmitter busy, bit5 overrun, bit6 framing error, bit7 RX enable |

A 2 KB buffer can hold 2048 bytes, which needs 12 bits. An 8-bit data path
cannot show that in one register, so the upper four bits of the count come
with the status read.

### Half duplex, polled (channels 1 to 7)

Each of these channels has one 2048-byte buffer for both directions. An
exchange goes like this:

1. Write CLEAR, then write the command bytes to register 0.
2. Write START together with RX enable. The transmitter sends bytes until the
   buffer is empty, with no CPU help, and then clears "busy".
3. While the transmitter is idle and RX is enabled, received bytes go into the
   same buffer. Software polls the byte counter until the reply is complete,
   then reads the bytes out.

The CPU has priority on both ends of the buffer. A byte that arrives when the
buffer is full, or in the same clock as a CPU write, is lost and sets
overrun. A low stop bit sets the framing error flag. CLEAR resets both flags,
empties the buffer and stops a transmission.

### Full duplex, interrupt (channel 8)

The buffer is split into a 1 KB transmit part and a 1 KB receive part. The
transmitter starts by itself whenever its part holds data. The channel's
interrupt line is high while the receive part holds data and IRQ is enabled.
It reaches the CPU as interrupt 4.

## Interrupts, timer, watch-dog and resets

The register blocks of the interfacing FPGA sit at
`0x8002_0000 + 16 x block + 4 x word`. All of them read back through a
registered data path.

| block | word 0 | word 1 | word 2 |
|-------|--------|--------|--------|
| 0 PIC | pending (write 1 to clear) | mask (1 = enabled) | vector: bit31 valid, bits 2..0 line |
| 1 WDT | kick: write `0xA5` | cycles left | none |
| 2 timer | count | reload (reset 249999) | control: bit0 enable |
| 3 discretes | inputs: safe-hold, time-mark, PMU active, spare; bits 5..4 last reset cause | outputs: PMU status, THTM switch, 3 telemetry bits, spare | none |
| 4 LVDS | bit0 start/stop photo | none | none |

**Interrupt controller (`pic`).** It has eight edge-triggered lines:

| line | source |
|------|--------|
| 0 | timer |
| 1 | time-mark |
| 2 | safe-hold |
| 3 | PMU active, on either edge |
| 4 | host UART |
| 5 | 1553 timeout |
| 6 | spare discrete |
| 7 | unused |

A rising edge sets the pending bit. INTR is high while any pending bit is also
unmasked. Line 0 has the highest priority. Software reads the vector register
rather than running a 486 interrupt-acknowledge cycle. Because the lines are
edge triggered, a level source that stays high raises only one request. The
host UART handler must therefore empty the receive buffer before it clears the
pending bit.

**Timer (`sys_timer`).** A 32-bit down-counter that reloads itself. With
reload R it ticks every R + 1 clocks: the reset value 249999 gives 10 ms.

**Watch-dog (`wdt`).** It always runs and cannot be turned off. Unless
software writes `0xA5` within 25,000,000 clocks (1 s), it resets the board.

**Reset generator (`reset_gen`).** Three causes reset the board:

* power-on;
* the spacecraft's reset discrete, after two synchronizing flip-flops;
* the watch-dog.

Reset is held 16 clocks after the last cause goes away; the 486 needs at
least 15. One reset drives the CPU's RESET and every flip-flop in all three
FPGAs. The SRAM keeps its contents. The cause of the last reset is kept until
the next power-on, so software can tell a watch-dog restart from a commanded
one.

## Discretes and the NUC lines

Safe-hold (which warns of shutdown in 30 s), the 1 Hz time-mark, PMU active
(which chooses the primary or the redundant SBC) and a spare come in from the
spacecraft. Each one is synchronized and then filtered: a new level counts
only after it has been steady for 4 clocks. Their edges go to the interrupt
controller. PMU status ("this SBC is the active one") goes back out. So do the
THTM primary/redundant switch, three telemetry status bits and a spare, all
from one register.

The NUC receives the 25 MHz board clock (`nuc_clk`). It also receives the
filtered time-mark one clock later (`nuc_tm`) and the start/stop-photo level
from the LVDS register (`nuc_stph`). The open-collector and LVDS drivers
themselves are analog and outside the RTL.

## What follows the source, and what is this design's own

These follow the source:

* the 486DX2 with a 25 MHz bus and no cache;
* the memory sizes and the chips' byte-lane organisation;
* the one-bit shift of the 1553 address and its 4K-word window;
* polling of the 1553 device;
* eight UARTs, four per FPGA, with 2 KB buffers and three registers each;
* the channel bit rates;
* the write-then-START transmit flow and polled reception;
* one interrupt-driven full-duplex development channel;
* 8-bit UART access on the low byte lane with 4-byte-aligned registers;
* the discrete and NUC signals;
* a PIC, a watch-dog and a 32-bit OS timer in the interfacing FPGA, with
  discretes reported by interrupt.

These are this design's own choices:

* the memory map;
* the wait states and the 1553 handshake and timeout;
* all register layouts, control and status bits, and interrupt numbers;
* the 8N1 frame format;
* sharing one buffer between both directions in half duplex, and splitting
  it in full duplex;
* where the byte-count high bits are read;
* the ANDing of the primary and redundant receive lines;
* the discrete filter;
* the watch-dog timeout and key;
* the timer's default tick;
* the reset stretch and the reset-cause register;
* the EGSE and host bit rates;
* the order of units on channels 1 to 8.

There are also some deliberate departures:

* **SRAM chips.** The source lists four 256K x 8 SRAM chips and also a 2 MB
  SRAM. Four such chips make only 1 MB. The 2 MB size is kept, so each chip
  is 512K x 8.
* **Channel buffers.** On the board the four buffers of a UART FPGA share one
  external 8 KB RAM. Here each channel has its own 2 KB array; the total is
  the same.
* **Data bus parity.** The 486's data-bus parity pins are not used.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M`, and each has a watchdog. Build
with Verilator 5, reading `sbc_pkg` first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sbc_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sbc_pkg.sv tb/tb_sbc_top.sv
./obj_dir/Vtb_sbc_top
```

The testbenches assert reset at time zero and check nothing before it,
so the results do not depend on `+verilator+rand+reset`.

* `tb_sbc_top` runs the whole board at reduced sizes in a few seconds. Serial
  bits are 16 and 12 clocks long, the watch-dog is 20000 clocks and the timer
  tick is 300 clocks. The run covers:
  * boot from flash and copy of the image to SRAM;
  * polling a 1553 command and posting telemetry;
  * a silent 1553 device (the timeout);
  * command/reply exchanges with the camera electronics, replying on the
    primary line, and with the APDE at the faster rate, replying on the
    redundant line;
  * filling a channel buffer to exactly 2048 bytes;
  * reprogramming part of the flash with bytes received on the EGSE
    channel, written one byte lane at a time and read back;
  * the host UART interrupt;
  * timer ticks;
  * the time-mark, safe-hold (including a filtered glitch) and PMU-active
    interrupts;
  * the discrete outputs and start/stop photo;
  * a watch-dog reset and a spacecraft-commanded reset.

  It counts each of these mechanisms and fails if any never happened.
* `tb_sbc_full` runs the same scenario with `sbc_top` at its defaults: real
  bit rates, 2 KB buffers, a 10 ms tick and the full 1 s watch-dog, which is
  25 million clocks. It takes under a minute.
* Behavioural models used by the testbenches:
  * `tb_cpu486_model`: a 486 single-cycle bus master that also measures
    cycle length;
  * `tb_mem_model`: a bank of byte-wide SRAM or flash chips;
  * `tb_b1553_model`: the host side of the 1553 device, with an adjustable
    latency and a "dead" switch.

## Changing it

* **Bit rates** are clocks per bit: `DIV_19200` and `DIV_56400` on `sbc_top`,
  or `BAUD_DIV0..3` per slot on `uart_quad`. To change which slot is full
  duplex, set the `FULL_DUPLEX` mask on each `uart_quad` instance in
  `sbc_top`.
* **Buffer size** is `FIFO_DEPTH` (a power of two). The count shown by the
  registers holds up to 12 bits.
* **Slower or faster memories** are a matter of `SRAM_WS`, `FLASH_WS`,
  `UART_WS` and `REG_WS`. UART and register wait states must stay at least 1,
  because their read data is registered.
* **The memory map** is in `sbc_pkg` (`*_BASE` and `decode`).
* **A new register block** goes in `sbc_ifpga`: give it a `BLK_*` number in
  `sbc_pkg`, a chip select, and a leg in the read multiplexer.
