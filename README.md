# VME system controller

A VMEbus (IEEE 1014, Rev. C.1) system needs a few pieces of control logic
that are normally scattered over several boards. Slot 1 arbitrates the data
transfer bus, starts the interrupt-acknowledge daisy chain and times out dead
bus cycles. The boards behind it request the bus, raise interrupts and
acknowledge them. This RTL puts all of these functions into one synthesizable
design that runs on one 32 MHz clock. The top level wires them together over a
model of the backplane:

| Slot | Function | Module |
|------|----------|--------|
| 1 | clock driver: 32 MHz to 16 MHz SYSCLK | `clock_driver` |
| 1 | four-level priority bus arbiter with bus clear | `arbiter` |
| 1 | IACK* daisy-chain driver | `iack_daisy_chain_driver` |
| 1 | 56 µs bus timer (BERR*) | `bus_timer` |
| 2 | release-on-request bus requester on level 3 | `requester` |
| 2 | interrupt handler: IRQ to IPL, STATUS/ID read | `interrupt_handler` |
| 2, 3 | interrupter, one per slot | `interrupter` |
| all | backplane model and wiring | `vme_system_controller` (top) |

`vme_pkg` holds the shared constants (4 request levels, 7 interrupt levels,
8-bit STATUS/ID), the level types, the arbiter's state type and two
priority-encoder functions.

The processor of slot 2 and the memory or I/O device of slot 3 are not part of
the design. Their signals are ports of the top.

## Signal conventions

Every backplane signal is active low and ends in `_n`, as on the real bus
(`bbsy_n` is BBSY*). Open-collector lines are wired-OR on the backplane. In the
top they are modelled as the AND of the active-low outputs of every driver.
Boards outside this design join through the `ext_*` inputs: `ext_br_n`,
`ext_bbsy_n`, `ext_irq_n`, `ext_as_n`, `ext_ds0_n`, `ext_ds1_n`, `ext_iack_n`,
`ext_dtack_n` and `ext_d`. D0–D7 is a multiplexer: an interrupter that drives
its STATUS/ID wins, otherwise `ext_d` is used. Tie every unused `ext_*` input
high, and `ext_d` to anything.

All flip-flops run on `clk32`, with the synchronous active-low reset
`sysreset_n`. Nothing is clocked by the 16 MHz `sysclk` output. Logic that must
count at 16 MHz (the bus timer) uses the clock enable `ce16` from the clock
driver.

## Bus arbitration

### Arbiter (slot 1)

The arbiter serves the four request levels in fixed priority, BR3 > BR2 > BR1 >
BR0. Its four sections are:

- a priority encoder that picks the highest asserted BR;
- a level register that holds the chosen level;
- a decoder that drives one bus-grant line;
- a comparator that produces BCLR*.

A small state machine sequences them: idle → grant → busy → one wait cycle →
idle.

- **Grant.** While BBSY* is negated and some BR* is asserted, the highest level
  is latched. `bg_n[level]` goes low on the next clock and stays low until a
  requester answers with BBSY*. If the request disappears without an answer,
  the grant is withdrawn.
- **Busy.** The grant is withdrawn on the clock after BBSY* is seen. The arbiter
  then waits for BBSY* to be released. It re-arbitrates after one further clock.
- **Bus clear.** While a master holds the bus, BCLR* is asserted exactly when a
  request of a *higher* level than the stored level is pending:

  | current master \ pending | 3 | 2 | 1 | 0 |
  |---|---|---|---|---|
  | 3 | – | – | – | – |
  | 2 | BCLR | – | – | – |
  | 1 | BCLR | BCLR | – | – |
  | 0 | BCLR | BCLR | BCLR | – |

  BCLR only asks the master to let go. The master decides when to drop BBSY*,
  which it does through its requester.

Single-level and round-robin arbitration are not implemented; the priority
scheme is the only one.

### Requester (slot 2)

The requester links the slot-2 device to the arbiter on level 3. Its local
handshake is:

- DWB*, "device wants bus", comes in;
- DGB*, "device granted bus", goes out.

The top ANDs the processor's `master_dwb_n` with the interrupt handler's DWB*,
so either one can ask for the bus.

1. DWB* is asserted while no grant is passing through. BR3* is driven on the
   next clock.
2. BG3IN* falls. The requester keeps the grant: BG3OUT* stays high. On the next
   clock it asserts BBSY*, releases BR3* and gives DGB* for as long as DWB*
   stays asserted.
3. **Release on request (ROR).** When DWB* is dropped, BBSY* is *kept*, so the
   bus stays parked with this board. If the device asks again, DGB* comes back
   at once, with no arbitration. BBSY* is released on the clock after any other
   board drives a BR* line. While this board holds BBSY* it drives no BR*, so
   any BR* it sees belongs to another board.
4. While the requester is idle, BG3IN* is passed straight to BG3OUT*.

Slot 2 uses only level 3. Grants on levels 0–2 pass from the arbiter straight
to `bg_out_n[2:0]`.

## Interrupts

### IRQ to IPL

The handler turns IRQ1*..IRQ7* into the processor's IPL2*..IPL0*. The value is
the binary number of the highest asserted IRQ, inverted, so 0b111 means no
interrupt. This path is combinational.

### Acknowledge cycle

The processor pulses `iack_req` to acknowledge the level it sees on IPL. The
sequence is then:

1. The handler latches that level and asserts DWB* to the requester.
2. When DGB* arrives, the handler drives A01–A03 with the level and asserts
   IACK* and AS*. One clock later it asserts DS0*.
3. The slot-1 **IACK\* daisy-chain driver** sees IACK* and DS0* (with AS*) and
   drives IACKIN* of slot 2 low on the next clock. It releases IACKIN* on the
   clock after AS* rises.
4. Each **interrupter** in turn decides on the clock after its IACKIN* falls:
   - If it has a request pending and A01–A03 equals its `LEVEL`, it claims the
     cycle. One clock after DS0* it drives its 8-bit `STATUS_ID` on D0–D7 and
     asserts DTACK*, and it clears its request (release on acknowledge).
   - Otherwise it drives IACKOUT* low for the next slot.
   The chain runs slot 1 → slot 2 → slot 3 → `iackout_n`.
5. On DTACK* the handler latches D0–D7 into `status_id` and pulses
   `status_valid`. It then negates DS0*, AS*, IACK* and DWB*, and waits for
   DTACK* to rise. The interrupter drops DTACK* one clock after DS0* rises.
6. If nobody claims the level, the chain leaves the system at `iackout_n`. The
   bus timer then ends the cycle: the handler sees BERR*, pulses `iack_error`
   and releases the bus.

The STATUS/ID is one byte and is read on DS0 only. In the top the slot-2
interrupter is on IRQ3 with ID 0x03, and the slot-3 interrupter on IRQ1 with
ID 0x09. These are parameters: `SLOT2_LEVEL`, `SLOT2_ID`, `SLOT3_LEVEL` and
`SLOT3_ID`.

## Bus timer: how 8 + 4 bits make 56 µs

The timer watches the data strobes. While DS0* or DS1* is asserted:

- an 8-bit counter advances once per 16 MHz tick (62.5 ns);
- the counter's top bit is therefore a 62.5 kHz square wave with a 16 µs
  period;
- each **rising edge** of that bit shifts a one into a 4-bit shift register;
- the last stage of the shift register is BERR*.

The counter starts from zero, so the top bit first rises after 128 ticks
(8 µs), and then every 256 ticks. The fourth rising edge, which sets the fourth
stage, comes after

    128 + 3 × 256 = 896 ticks × 62.5 ns = 56 µs

That is 1792 cycles of the 32 MHz clock. If the strobe arrives in the cycle
where `ce16` is high, it is 1791 cycles. BERR* then stays asserted until both
strobes are negated. Negating them clears the counter and the shift register,
so a strobe shorter than 56 µs leaves no trace. The counter value is brought out
as `timer_count`.

`CNT_W` and `SR_W` set the counter and shift-register widths. The timeout is
`(2**(CNT_W-1) + (SR_W-1) * 2**CNT_W)` ticks of 16 MHz.

## How this departs from the original description

- **Timer trigger.** The timer is started by the data strobes DS0/DS1. Some
  passages of the original description start it from the address strobe
  instead. The strobe-based reading matches its block diagram and its results
  table.
- **Shift-register clock.** Clocking the shift register on the rising edge of
  the counter's top bit is this design's reading. It is what makes a
  divide-by-256 counter and four stages come to 56 µs.
- **IPL encoding.** IRQ to IPL is a plain priority encoder, as the VMEbus and
  68000-family processors expect. The original Boolean equations were not
  copied term by term.
- **STATUS/ID direction.** The interrupter returns the STATUS/ID to the
  handler, as the VMEbus defines it. The prose of the original description is
  ambiguous about this direction.
- **Levels and IDs.** The interrupt levels and STATUS/ID values of the two
  interrupters are this design's choice.
- **Own choices.** These were not specified and are this design's:
  - all handshake latencies, which are one clock per step;
  - the one idle clock between bus owners;
  - the withdrawal of an unanswered grant;
  - release on acknowledge in the interrupter;
  - the `iack_req` / `status_valid` / `iack_error` processor interface;
  - the single 32 MHz clock domain with a 16 MHz enable.
- **Not built.** The processor, the slave device and the data-transfer logic
  of a master (address and data beyond the 8-bit STATUS/ID) are not part of the
  design. The same holds for single-level and round-robin arbitration.
- **Size.** The reference FPGA build used 36 flip-flops. This RTL synthesises
  to about 51 flip-flop bits with generic cells. Part of the difference is the
  registered STATUS/ID and the explicit state machines.

## Assertions

The modules carry concurrent assertions for the bus rules:

- at most one grant line at a time, and none while the bus is held;
- BR* and BBSY* are never driven together by one requester;
- DGB* only while BBSY* is held;
- IACKOUT* is started only inside an IACK* cycle;
- DTACK* only in a claimed acknowledge;
- BERR* is released on the edge after the strobes go away;
- the handler drives AS* only while it owns the bus.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog that ends the run
with a failure if the test hangs. For example, with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb \
        --top-module tb_vme_system_controller \
        rtl/vme_pkg.sv tb/tb_vme_system_controller.sv
    ./obj_dir/Vtb_vme_system_controller

Replace the top module name to run another testbench: `tb_arbiter`,
`tb_requester`, `tb_bus_timer`, `tb_interrupt_handler`, `tb_interrupter`,
`tb_iack_daisy_chain_driver`, `tb_clock_driver` or
`tb_arbitration_workload`.

What they cover:

- **`tb_arbiter`**: the grant for all 15 request patterns, with its
  one-clock latency; the hold and withdrawal of the grant; the whole 4 × 4 BCLR
  table; an unanswered grant.
- **`tb_requester`**: grant pass-through; BR3 → BG3 → BBSY/DGB timing; parking;
  reuse of a parked bus; release on request.
- **`tb_bus_timer`**: the 56 µs timeout, measured in clocks and in simulated
  time; the hold of BERR*; DS1 alone; the restart after a short strobe.
- **`tb_interrupt_handler`**: IPL for all 128 IRQ patterns; the acknowledge
  sequence; a cycle ended by BERR.
- **`tb_interrupter`**: claim or pass by level; the STATUS/ID and DTACK*
  timing.
- **`tb_vme_system_controller`**: the whole design at its default parameters,
  in about 115 µs of simulated time. It runs:
  - two bus grants to slot 2, with parking, reuse and release on request;
  - a level-1 master getting the grant passed through slot 2;
  - BCLR raised by slot 2's level-3 request;
  - acknowledges claimed by slot 2 and by slot 3, through the daisy chain;
  - an unanswered acknowledge and a stuck strobe, each ended by BERR* after
    56 µs.

  It counts every mechanism and fails if one never happened.
- **`tb_arbitration_workload`**: four masters, one requester on each level,
  compete at random for 20 000 clocks. Every cycle it checks:
  - mutual exclusion of BBSY* and DGB*;
  - that each grant goes to the highest level that was requesting;
  - the bus-clear table.

  It also checks that every level is served, and bounds the wait of level 3.

## Changing the design

- **Number of arbitration levels.** `arbiter` takes `LEVELS`. The rest of the
  system uses `vme_pkg::ARB_LEVELS`.
- **Interrupter levels and IDs.** The top parameters set the level and
  STATUS/ID of each interrupter. To add a board, instantiate another
  `interrupter` and put it into the IACKIN*/IACKOUT* chain.
- **Timeout.** Change `CNT_W` and `SR_W` of `bus_timer`, using the formula
  above.
- **Requester level.** A requester on another level is the same module wired
  to that level's BR*/BG* lines.
