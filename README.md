# Educational Interface Board (EIB) in SystemVerilog

The Educational Interface Board lets one well-equipped computer act as a
supervisor for a small microprocessor system of a different family. The
supervisor is an MC68000 machine (the *master*), with its disc, display
and tools. The board plugs into the master's backplane and connects to
the bus of a *target* board, which can be a Z80 or an MC68000. Through
the board the master can:

1. read and write any target memory or I/O location. The board takes the
   target bus with the target's own bus-request protocol and runs the
   cycle itself, as a DMA transfer;
2. exchange data with a program running on the target through a 4 KB
   *shared memory*. Either processor can use it, and requests are served
   first come, first served;
3. interrupt, halt, reset or stop the target, and watch its control
   lines, through an M6821 PIA on the board.

Everything that depends on the target family is on a small plug-in
*personality module card* (PMC). The board itself stays the same. This
repository holds the board, a PMC for each of the two families, and the
glue logic of the two target boards. A top level connects it all into a
system you can simulate.

## System overview

```
                    master MC68000 backplane (A23..A1, D15..D0, AS, UDS, LDS, R/W,
                    DTACK, VPA, IRQ, IAIN/IAOUT daisy chain)
        ┌──────────────────────┴───────────────────────┐
   eib (board Z, base 86xxxx)                     eib (board K, base 88xxxx)
   ├ eib_addr_decode                              (same board)
   ├ eib_tsmr_decode ─┐
   ├ eib_arbiter ─────┼─ eib_shared_mem (2K x 16)
   ├ eib_buffer_ctrl ─┘
   ├ eib_dtack_gen
   └ eib_irq_chain
        │ MTR, MTIOR, VECL, EBAL, TSMR/TSMRA  ▲ MTMRA, RELWAIT
   z80_pmc                                        m68k_pmc
   ├ z80_busreq_fsm   ├ z80_wait_gen               ├ m68k_busreq_fsm
   ├ z80_ctrl_gen     ├ z80_vector                 ├ m68k_twait_fsm
   └ z80_pia_ctrl                                  ├ m68k_irq_fsm
        │                                          └ extra byte address latch
   Z80 target bus                                 MC68000 target bus
   └ z80_target_decode                            ├ m68k_target_decode
                                                  ├ m68k_target_dtack
                                                  └ m68k_target_irq
```

`eib_system` is the top. It holds two complete boards side by side on one
master bus, each at its own DIL-switch base address. Board Z carries the
Z80 card and serves a Z80 target. Board K carries the 68000 card and
serves a 68000 target. The processors, PIAs, memories and peripherals are
not part of the RTL. Their pins are ports of `eib_system`, so a testbench
can play them.

### Clocks and reset

* `clk16` (16 MHz) runs the boards. The arbiter, the DTACK delay, the
  shared RAM and the interrupt-chain latch use it.
* `clk8` (8 MHz, rising with `clk16`) runs the personality cards and the
  target-board timing. All nanosecond figures of the design are converted
  to whole `clk8` periods of 125 ns.
* `rst_n` is an asynchronous, active-low reset for every register.

All bus control signals keep the hardware's active-low sense and end in
`_n`.

## The master window

Each board answers a 128 KB window of the master's 16 MB space. Seven DIL
switches (`base_sw`) are compared with A23..A17. The default system uses
`7'h43` (860000–87FFFF) for board Z and `7'h44` (880000–89FFFF) for
board K. Inside the window, A16 = 1 selects the 64 KB window onto target
memory. A16 = 0 enables a 3-to-8 decoder on A15..A13:

| Offset          | Strobe  | Use                                                       |
|-----------------|---------|-----------------------------------------------------------|
| 00000–01FFF     | MSMR    | master access to the shared memory (A11..A1 word address) |
| 02000–03FFF     | TIO     | target I/O cycle (the target sees A15..A1, A0 from UDS)   |
| 04000–05FFF     | TACC    | shared-memory base latch: write D12..D0 = TA23..TA11, readable |
| 06000–07FFF     | PIAEN   | PIA chip select (answered with VPA, M6800 cycle)          |
| 08000–09FFF     | VECL    | Z80 card: interrupt vector latch (D7..D0)                 |
| 0A000–0BFFF     | EBAL    | 68000 card: extra byte address latch, TA23..TA16 (D7..D0) |
| 0C000–0DFFF     | PIACA1  | strobe on PIA CA1                                         |
| 0E000–0FFFF     | PIACB1  | strobe on PIA CB1                                         |
| 10000–1FFFF     | MTMR    | target memory, 64 KB                                      |

MTMR and TIO together form MTR, the *master target request* sent to the
personality card. MTIOR tells the card which of the two it is.

PIA port A bit 0 tells the board the target's data width (1 = 8-bit).
Bit 1 enables target access to the shared memory (1 = enabled). Bits 2–7
go to the personality card.

## Shared memory and arbitration

This is the part with the most interaction, and the part to read first.

**Where the target sees it.** The master loads a base address for the
target side into the TACC latch. A target cycle whose address matches the
base, with PA1 set, raises TSMR. The match rules differ by mode:

* 8-bit target (PA0 = 1): 2 KB area, TA23..TA11 compared. The Z80 board
  leaves F800–FFFF free for it, so the base is `13'h001F`.
* 16-bit target (PA0 = 0): 4 KB area, TA23..TA12 compared and TA11
  ignored. The 68000 board keeps 010000–010FFF for it, so the base would
  be `13'h0020`. The system testbench uses a different free area.

**Arbitration.** `eib_arbiter` is a three-state machine (idle / master /
target) clocked at 16 MHz. A request finding the memory free is granted
on the next clock edge (MSMRA or TSMRA). A request finding it busy waits
until the owner drops its request. When both arrive at the same edge, the
master wins (`MASTER_FIRST`). An assertion checks that the two grants are
never on together.

**Byte lanes.** The RAM is 2K × 16. The master addresses words with A11..A1
and bytes with UDS/LDS. A 16-bit target does the same. An 8-bit target has
a single data byte on TD7..TD0. TA0 then chooses the lane: TA0 = 0 raises
TUBR and uses the high byte, TA0 = 1 raises TLBR and uses the low byte.
So a Z80 byte at F800+2n is the high byte of master word 860800+2n (upper
half of the RAM), and F801+2n is its low byte.

**Holding the target while it waits.** The target has to stall until the
arbiter grants it. This is done by the personality cards:

* Z80 (`z80_wait_gen`): WAIT is pulled as soon as TSMR appears, whether
  or not the master holds the memory. It stays for 500 ns (4 clocks) from
  TSMR, and longer if the grant has not come yet. The 500 ns floor stops
  the Z80 from launching a second request before the first is arbitrated.
* 68000 (`m68k_twait_fsm`): the 68000 waits for DTACK anyway. The card
  drives its TWAIT output as the target's DTACK, 200 ns after the grant
  for reads and 300 ns for writes. With whole 125 ns clocks that is
  2 and 3 clocks (250 and 375 ns). TWAIT stays until the target ends the
  cycle.

## Master DMA into the target

A master access to MTMR or TIO raises MTR. The personality card must
first own the target bus, then report it, then let the board finish the
master cycle. The card sends two signals back:

* **MTMRA**: the master owns the target bus. It opens the board's target
  address and data buffers (`eib_buffer_ctrl`).
* **RELWAIT**: the target cycle may be ended. The board's DTACK generator
  treats it as "ready".

### Z80 card: BUSREQ / BUSACK

`z80_busreq_fsm` asserts BUSREQ on MTR. The Z80 floats its bus at the end
of its current machine cycle and answers with BUSACK, which becomes MTMRA.
`z80_ctrl_gen` then drives MREQ (memory) or IORQ (I/O), and RD or WR from
the master's R/W. Four clocks (500 ns) after BUSACK, RELWAIT is asserted
and the master gets DTACK.

The subtle point is when BUSREQ is given back, because it differs by
direction:

* **write**: the target cycle must be complete before the master moves
  on. BUSREQ is released as soon as the master's DTACK is seen.
* **read**: the master must capture the data first. BUSREQ is held until
  DTACK is negated, that is, until the master has ended its cycle.

The state machine then waits for MTR to go away before taking a new
request. In a read, AS (hence MTR) and DTACK can end on the same clock
edge. The machine handles that case so that a master cycle following
after one idle clock is still served.

### 68000 card: BR / BG / BGACK and the extra byte address

`m68k_busreq_fsm` asserts BR on MTR and waits for BG. It takes the bus
(BGACK) only when BG is asserted and the bus is free: the target's AS,
DTACK and any other BGACK all negated. BGACK is used as both MTMRA and
RELWAIT. The master cycle then ends after the board's DTACK delay. While
BGACK is on, a one-way buffer passes the master's R/W, AS, UDS, LDS and
DTACK to the target bus.

The window onto the target is only 64 KB. To reach all of the 68000's
16 MB, the master first writes TA23..TA16 into the extra byte address
latch (EBAL slot). Then it accesses offset 10000–1FFFF.

## Master DTACK

`eib_dtack_gen` ends every master cycle that the board serves with
DTACK. It counts `dly_sw + 1` clocks of 16 MHz from the moment the
addressed resource is ready, and holds DTACK until AS is negated. "Ready"
means one of: the shared-memory grant, RELWAIT during a target request,
or a plain strobe cycle (TACC, VECL, EBAL, CA1, CB1). The 4-bit switch
allows slow target memories to be matched. The PIA is not in this list:
it is an M6800-family part, and its cycles end through VPA.

## Interrupts and target control

**PIA into the master's daisy chain** (`eib_irq_chain`). Either PIA
interrupt output raises the board's IRQ to the master. In the master's
interrupt acknowledge cycle, IAIN arrives from the previous slot. A board
with a request pending keeps the acknowledge: IAOUT stays negated, a
local IACK is latched, and VPA makes the master take an autovector. A
board without a request passes IAIN on to IAOUT. In `eib_system`, board Z
is first in the chain and board K second.

**Z80 target control** (`z80_pia_ctrl`). PIA PA7..PA5 carry a command:

| PA7..PA5 | Effect on the Z80 bus      |
|----------|----------------------------|
| 000      | home (nothing asserted)    |
| 001      | INT (if PA3 = 1)           |
| 010      | NMI (if PA4 = 1)           |
| 011      | RESET                      |
| 100      | BUSREQ                     |

Port B returns INT, NMI, RESET, BUSACK, BUSREQ and HALT in PB0..PB5. For
mode-2 interrupts the master writes a vector into the VECL latch
(`z80_vector`). The card drives it onto the Z80 data bus in the
interrupt acknowledge cycle (M1 with IORQ).

**68000 target control** (`m68k_irq_fsm`). PIA PA6..PA5 carry a command:
00 home, 01 interrupt, 10 halt, 11 reset. Reset also asserts HALT,
because a 68000 needs both for an external reset. An interrupt asserts
TINT until the target acknowledges it (INTACK). During the acknowledge,
VECEN releases the vector. The request is then spent: the command must
leave 01 and come back to raise another interrupt. Port B returns INT,
HALT and RESET in PB0..PB2.

## Target-board logic

**Z80 board decode** (`z80_target_decode`, status *partial*). Four RAM
and four EPROM sockets. Switch S0 sets the RAM size (2K or 8K) and S2..S1
set the EPROM size (2K, 4K or 8K). RAM sockets are placed from 0000 and
EPROM sockets from 8000. Swap switches S3..S6 exchange socket *i*'s RAM
and EPROM areas. F800–FFFF is never decoded on the board: it belongs to
the shared memory. The I/O map is fixed: CTC1 90h, DART 94h, PIO1 98h,
PIO2 9Ch, CTC2 A0h, LED latch A4h (write), DIL switches A8h (read). The
backplane data buffer is enabled for every memory or I/O read or write,
but not for refresh or interrupt acknowledge. The
socket placement is this design's own, because the original memory maps
are not known.

**68000 board decode** (`m68k_target_decode`, status *partial*). Four
pairs of RAM sockets and four pairs of EPROM sockets. The 68000 reads 16
bits at a time, so each pair is an upper-byte and a lower-byte device,
picked by UDS and LDS. S18 sets the RAM device size (2K or 8K) and S19
sets the EPROM device size. That makes a pair 4 KB or 16 KB. RAM pairs are
placed from 000000 and EPROM pairs from 020000. The shared area at
010000–010FFF is therefore never on-board memory. S20 exchanges the
address ranges of RAM pair 0 and EPROM pair 0, which puts the EPROM on the
reset vector. S21 does the same for pair 1. I/O lives in a 4 KB page at
080000:

* The lower half (A11 = 0) is for 68000-type devices and asserts IOPAGE.
* The upper half (A11 = 1) is for 6800-type devices. It asserts M6800 and,
  during AS, VPADRIVE. VPADRIVE pulls the processor's VPA, so the cycle
  runs as a synchronous M6800 cycle.
* A11..A9 give eight 512-byte selects: PI/T1, PI/T2, LEDs and DIL
  switches in the lower half; ACIA1, ACIA2 and two free selects in the
  upper half.

The switch roles above follow the original board. The address layout is
this design's own, as are S21's role and the device order. The board's
DTACK circuit serves memory only, so LED and switch cycles are not
acknowledged here.

**68000 board DTACK and BERR** (`m68k_target_dtack`). An 8-stage shift
register is cleared while no data strobe is asserted and fills with ones
at 8 MHz once one is. For on-board memory, DTACK is taken from the stage
chosen by link `lk_dtack` (125–1000 ns). BERR is taken from a later stage
`lk_berr` if no DTACK has appeared on the bus by then.

**68000 board interrupts** (`m68k_target_irq`). A link array connects ten
sources (the master's interrupt line, two ACIAs, four PI/T ports, the PTM
and two backplane lines) to the inputs of an 8-to-3 priority encoder.
Input 0 is tied active. The encoder's inverted outputs A0, A1 and A2 are
wired to IPL2, IPL1 and IPL0, in that crossed order, as on the original
board. Because of the crossing, a source linked to encoder input *n*
reaches the processor at the level whose 3-bit code is *n* with its bits
reversed; levels 0, 2, 5 and 7 are unchanged. The master line is linked
to input 7: a non-maskable level-7 interrupt. In an interrupt
acknowledge, the level on A3..A1 is decoded. A second link array
(`AVEC_LEVELS`, `VEC_LEVELS`) routes each level to VPA (autovector, for
M6800-type devices) or to INTON (on-board vectored devices).

## How faithful this is

These follow the original design: the address map of the master window,
the first-come-first-served arbitration at 16 MHz, the 4 KB shared memory
with byte-lane steering for 8-bit targets, the PA0/PA1 functions, the
DTACK delay switch, the PIA on the interrupt daisy chain with VPA, and
the Z80 card's BUSREQ/BUSACK/RELWAIT sequence with its read/write release
rule. Also from the original: the 500 ns RELWAIT and WAIT, the Z80
command table, the 68000 card's three state machines (with their 200 ns
and 300 ns TWAIT), the EBAL latch, the Z80 board's I/O map and its
reserved F800–FFFF area, the 68000 card's one-way strobe and DTACK
buffer, the 68000 board's shift-register DTACK with its link range, and
its IPL wiring.

These are this design's own choices, made where the original is silent:

* The TACC slot loads the shared-memory base from D12..D0, and the base
  can be read back.
* 16-bit mode ignores TA11, so the 4 KB 68000 area fits the same latch as
  the 2 KB Z80 area.
* The master wins simultaneous requests.
* The DTACK delay is counted in 16 MHz clocks.
* All delays are whole 8 MHz clocks, so TWAIT is 250/375 ns rather than
  200/300 ns.
* Z80 WAIT lasts for 500 ns from TSMR and in any case until the grant.
* The 68000 card's command codes, and HALT together with RESET.
* The PIA bit assignments beyond PA0/PA1 and PA5..PA7.
* The memory placement on both target boards, the 68000 board's I/O
  layout, and its link defaults.
* Two boards in one system, and the two-state bus resolution in
  `eib_system`: open-collector lines are ANDed, and three-state buses are
  multiplexed by their enables with all ones when undriven.

Known departure from the original description:

* The master's 50 µs bus-error timeout is part of the master computer,
  not of the board. It is not modelled. The DTACK switch only has to
  stay well below it.

Not included: the master computer itself, the M6821 PIA, the target
processors, memories and peripherals, the Z80 board's reset timer and
clock oscillator. The exact PAL equations of the 68000 board's decode are
not known. `m68k_target_decode` gives its function with an address
layout of its own.

## Files

| Path | Contents |
|------|----------|
| `rtl/eib_pkg.sv` | shared constants and types (window strobes, PIA command codes) |
| `rtl/eib*.sv` | the interface board and its sub-blocks |
| `rtl/z80_*.sv` | Z80 personality card, its sub-blocks, Z80 target-board decode |
| `rtl/m68k_*.sv` | 68000 personality card, its sub-blocks, 68000 target-board logic |
| `rtl/eib_system.sv` | top: two boards, both cards, both target boards |
| `tb/tb_<module>.sv` | one self-checking bench per module |
| `tb/tb_eib_workloads.sv` | the full-size uses of the system (below) |

Every bench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
stops any bench that hangs and counts that as a failure.

`tb_eib_system` runs the whole system at its default parameters. It plays
both CPUs, both PIAs and the target memories. It counts each mechanism
and fails if any of them never happened. The mechanisms are:

* shared memory from both sides, in both modes, and contention;
* WAIT and TWAIT;
* Z80 and 68000 DMA, I/O and the vector latch;
* every PIA command, and INT/HALT/RESET;
* the 68000 board's decode, its DTACK and BERR;
* interrupt priority, autovector and vectored acknowledge;
* both daisy-chain positions, the DTACK switch, and addresses outside the
  windows.

It finishes in well under a second of wall time.

`tb_eib_workloads` runs the jobs the board exists for, at full size, with
random data checked word by word:

* a 4 KB message through the 68000 board's shared memory at its reserved
  address 010000h, read and answered by the target;
* a 2 KB message through the Z80 board's shared memory at F800h;
* a DMA sweep of every Z80 memory byte outside the shared area;
* a DMA sweep of all decoded 68000 memory through the window and the
  extra byte address latch.

It takes a few seconds.

## Simulating

With Verilator 5 (no other tools needed), from the repository root:

```sh
# one block, e.g. the arbiter
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv rtl/eib_pkg.sv tb/tb_eib_arbiter.sv \
    --top-module tb_eib_arbiter -Mdir obj_arb -o sim
./obj_arb/sim

# the whole system
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv rtl/eib_pkg.sv tb/tb_eib_system.sv \
    --top-module tb_eib_system -Mdir obj_sys -o sim
./obj_sys/sim

# lint one module
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/eib_pkg.sv rtl/eib.sv
```

The benches draw their stimulus from `$urandom`. A plain run repeats the
same stimulus each time. Pass `+verilator+seed+N` to the simulator to
draw a different one.

## Changing the design

* Delays are parameters in 8 MHz clocks: `RELWAIT_CYCLES` and
  `WAIT_CYCLES` (Z80 card), and `READ_CYCLES` and `WRITE_CYCLES` (68000
  card). If you change `clk8`, scale them.
* The shared memory size is `SM_WORDS` in `eib_pkg`. The target-side
  compare in `eib_tsmr_decode` assumes 2 KB / 4 KB areas.
* The window base and the DTACK delay are inputs (switches), not
  parameters.
* The 68000 board's interrupt links are the `LINK`, `AVEC_LEVELS` and
  `VEC_LEVELS` parameters of `m68k_target_irq`.
* The target boards' size and swap switches are inputs of `eib_system`.
  The default bench sets 8K devices on the 68000 board (RAM 000000–00FFFF,
  EPROM 020000–02FFFF).
