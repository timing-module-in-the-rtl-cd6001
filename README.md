# TIM — timing module of a Level-1 Global Trigger crate

Every board in a trigger crate has to see the same Level-1 Accept (L1A),
bunch-counter reset (BCRES) and resynchronisation commands in the same
bunch crossing. This is true even though the boards sit in different slots,
with different cable and logic delays. The TIM chip is the crate's single
point of timing distribution:

- It takes the LHC timing signals from one of several sources. These are a
  TTCrx receiver, front-panel LEMO inputs, the trigger control board (TCS),
  VME commands, or its own BC-Table pattern generator.
- It passes them through a run/reset controller.
- It drives them over point-to-point backplane lines to 17 slots. Each slot
  has its own delay and its own disable.

Around this core it does three more jobs:

- **Checks.** It keeps a local bunch counter and event counter, compares
  them with the TTCrx, compares the TCS and TTC L1As, and reports the result
  as five "Fast Signals".
- **Readout.** It records its own signals in a ring buffer. For every L1A it
  ships a window of that record to the readout board (GTFE) as an event
  record.
- **Statistics.** It asks the crate to save and read its statistics counters
  every *n* orbits.

All logic runs on the 40 MHz bunch-crossing clock and uses an active-low
synchronous reset. The code is plain synthesizable SystemVerilog.

## Signal path: from source to slot

```
TTCrx ─┐
LEMO  ─┤  tim_source_select     tim_run_control      17 x tim_bp_channel ─► backplane
TCS   ─┼─► (COMMAND fields) ──► (RUN, inhibit, ──┬─► DLY_PAN channel    ─► front panel
VME   ─┤                         reset tree)     └─► DLY_TIM channel    ─► readout logic
BC-Tbl─┘
```

### Source selection (COMMAND register)

`tim_source_select` picks each signal class on its own:

| Field | Bits | Choices |
|---|---|---|
| L1A | 2:0 | VME, TTC, LEMO, BC-Table, TCS |
| BCRES | 5:3 | VME, TTC, LEMO ORBIT, local orbit counter, BGO |
| BGO commands | 7:6 | VME, TTC, BC-Table, TCS |
| Event-counter reset | 9:8 | VME, TTC, BGO, off |

The other COMMAND bits:

- Bit 10 (DIS_RO_BUS) switches off the Readout Request bus.
- Bit 11 disables slot L9.
- Bit 12 enables the TCS/TTC comparison.
- Bit 13 stands in for TTCrx "ready".
- Bit 15 is SETUP_DONE.

With the periodic BCRES selected (code 011), a TTC BCNTRES or a VME BCRES
still passes and restarts the local bunch counter. From then on the counter
wrap produces a BCRES every orbit.

The reset value 0x0001 selects the TTCrx L1A and leaves SETUP_DONE low.

BGO commands arrive either as a 4-bit code with a strobe, decoded by
`tim_bgo_decoder`, or as VME command pulses. The codes are BC0, TEST_ENABLE,
PRIVATE_GAP, PRIVATE_ORBIT, L1RESET, HARD_RESET, RES_EVCNT, RES_ORBIT,
START_RUN and STOP_RUN.

### Run control

`tim_run_control` holds the RUN flip-flop, which START_RUN sets and STOP_RUN
clears. An L1A passes only while RUN is set and the external `l1a_inhibit`
input is low.

`l1a_inhibit` is the DAQ's XOFF. `tim_xoff_counter` counts the L1As that
arrive during a run while XOFF holds them back. The 32-bit count leaves on
`xoff_l1a_count`. It stops at its maximum, and START_RUN or a hard reset
clear it.

HARD_RESET and L1RESET form CLR_ALL. CLR_ALL clears:

- the error flags;
- RUN and TEST_ENABLE;
- the L1A queue and the readout chain.

### Backplane coding and delays

Each slot gets three lines. BCRES has a line of its own. L1A, RESET and
EVCNT_RES share two lines, coded as {L1a, Reset}:

| {L1a, Reset} | Meaning |
|---|---|
| 00 | nothing |
| 01 | RESET |
| 10 | L1A |
| 11 | EVCNT_RES |

When commands coincide, EVCNT_RES wins over L1A, and L1A over RESET.

Every slot's 16-bit delay register holds two hex digits for the coded pair
and two for BCRES. Each digit *d* selects a tap delaying by (*d*+1) mod 16
bx, so FF means no delay and EE means 30 bx (`tim_delay_line`).

A slot is blocked in two ways:

- its bit in DIS_boards, or COMMAND bit 11 for L9;
- the front-panel interlock (`tim_interlock`) being in INACTIVE. It starts
  INACTIVE after reset, enters RUNNING by push-button or by SET_RUNNING, and
  INACTIVE always wins.

Two more channels of the same kind serve inside the chip:

- **DLY_PAN** drives the front-panel L1A, RESET and BCRES outputs.
- **DLY_TIM** supplies the delayed L1A and BCRES for the readout logic.

### Crate delay

The BCRES coming from the TTCrx or the LEMO ORBIT input first goes through
`tim_crate_delay`. This is a 16-bit counter that delivers the pulse
1 + DLY_CRATE bx later. A new BCRES restarts the count, so the programmed
value must stay below one orbit (3564).

## Bunch and event counting

`tim_bc_counter` counts bunch crossings from BCRES.

- Its period is ORBIT_LENGTH + 2. The default 0x0DEA gives 3564.
- Once it has seen a first BCRES it also produces a periodic BCRES of its
  own.
- **BAD_MAX_BC** is set when a BCRES arrives at any count other than the last
  bunch of the orbit.
- **BAD_LOCAL_BC** is set when the difference between the TTCrx bunch number
  and the local bunch number changes. The difference is captured at each
  L1A.

`tim_event_check` counts L1As (24 bits) and compares the count with the
TTCrx event number.

`tim_l1a_tcs_check` delays the TCS L1A by DLY_L1A_TCS and counts every bunch
crossing in which it differs from the TTC L1A. The counter saturates at
0xFFFF, which sets OV_BAD_TTC.

`tim_ttc_if` registers the TTCrx outputs. It keeps the last user message and
a 16-entry dump of the TTCrx broadcast data (Dout), which VME can read.

## BC-Table generator

For stand-alone running, `tim_bc_table` is a 4096 × 12 memory addressed by
the local bunch number. A set bit at address *a* produces a pulse in bunch
crossing *a*:

| Bits | Meaning |
|---|---|
| 9 | MON_RQST |
| 8 | L1A |
| 7:6 | message bits |
| 5 | message strobe |
| 4 | BGO strobe |
| 3:0 | BGO code |

The two trigger bits fire every TRIG_PERIOD+1 orbits. The BGO and message
bits fire every BGO_PERIOD+1 orbits. The first orbit after enabling is
always active. Generation starts with the first BCRES and stops with a VME
HARD_RES. The table powers up cleared, like FPGA block RAM, so entries that
were never written produce nothing.

## Readout chain (GT crate)

This is the least obvious part of the chip. It reads out a window of the
TIM's own signals for every L1A. Those signals are the incoming L1As from
each source, the BCRES pulses, and the BGO and reset activity.

```
signals ─► tim_ring_buffer (1k, addr = bx mod 1024)
                   ▲ read address
delayed L1A ─► tim_l1a_queue ─► tim_extractor ─► tim_robuf (A + BX) ─► tim_rop ─► tim_rop_mux ─► link
```

### Ring buffer

`tim_ring_buffer` writes one 16-bit word every bunch crossing at address
(bunch number mod 1024). The words are overwritten after 1024 bx.

- Writing stops while ROCMD bit 2 (freeze) is set. It also stops when
  ROCMD bit 3 is set and TIM_ERR or TIM_OUT_OF_SYNC is active.
- With ROCMD bit 1 set, VME reads the buffer and L1As stop entering the
  readout.

### Keeping the window aligned

The ring buffer's write counter is cleared by the undelayed BCRES. The L1A
queue has its own bunch counter, cleared by the BCRES of the DLY_TIM
channel. The L1A that enters the queue is also the DLY_TIM one.

- **Equal delays.** If the L1A and BCRES delays in DLY_TIM are equal, the
  queue stores exactly the ring address where the L1A's own bunch crossing
  was written. The window then starts at the L1A's bunch crossing.
- **Different delays.** A BCRES delay larger than the L1A delay moves the
  window that many bunch crossings earlier.

Both counters only agree after the first BCRES. Before that, readout windows
are offset by the L1A delay.

A window that runs past the end of an orbit wraps back to address 0, so its
last words come from older bunch crossings.

### L1A queue and age monitor

`tim_l1a_queue` is a 128-entry FIFO of start addresses, each with a
calibration bit. The calibration bit is set while TEST_ENABLE is active.

One queued L1A at a time is marked for age measurement. Its waiting time is
compared with two limits:

- More than 768 bx (¾ of the ring buffer) sets **L1A_OLD_WARN**.
- More than 960 bx (15/16) sets **L1A_TOO_OLD**, because its data may
  already be overwritten.

More than 63 waiting L1As set **TOO_MANY_L1A**.

### Extraction

`tim_extractor` pops an entry, loads the read-address counter and a length
counter (RO_LENGTH, ROBUF_PAR bits 7:0), and reads one word per clock.

- Each data word goes to ROBUF_A, tagged event (01) or calibration (10).
- Its bunch number goes to ROBUF_BX, tagged 11.
- The first word is written two clocks after the queue shows the L1A.

### Readout buffers

`tim_robuf` holds the two 1k × 18 derandomizing FIFOs. It reports three
flags:

- **ROBUF_OVF** — a write into a full buffer.
- **WARNING_ROBUF_OVF** — the buffer is ¾ full.
- **SYNCERR** — the two FIFOs disagree about being empty.

### Event records

`tim_rop` starts a record when data are waiting and GTFE_READY is high.
Inside a record it pauses while GTFE_READY is low. For RO_LENGTH = *L* a
record has 5 + 2*L* words:

| Word | Content |
|---|---|
| IDENTIFIER | register value, id 00 |
| event number high | bits 23:16 |
| event number low | bits 15:0 |
| *L* × (BX, DATA) | bunch number (id 11), ring word (id 01 or 10) |
| word count | 3 + 2*L* |
| EOR | EOF_VALUE register |

The event number counts records from 1 and is cleared by the event-counter
reset.

### Link words

`tim_rop_mux` forms two 28-bit words per bunch crossing for the Channel Link
transmitter:

- **Phase A** carries event words.
- **Phase B** carries monitoring words supplied from outside.

ROCMD bit 0 swaps the two phases. Each word is
`{type[1:0], number[5:0], 00, id[1:0], data[15:0]}`:

- The type is 01 for event words, 10 for monitoring words, and 00 for IDLE.
- The number increments every bunch crossing.
- IDLE words carry IDLE_VALUE.

ROCMD bit 11 enables the link.

## Fast Signals and status

`tim_fast_signals` registers the five signals sent to the TCS board:

| Signal | Condition |
|---|---|
| TIM_ERR | (BC check enabled and BAD_MAX_BC or BAD_LOCAL_BC) or TTCrx double-bit error |
| TIM_OUT_OF_SYNC | SYNCERR, ROBUF_OVF, or (queue check enabled and L1A_TOO_OLD or TOO_MANY_L1A) |
| TIM_WARNING_OVFLO | (queue check enabled and L1A_OLD_WARN) or WARNING_ROBUF_OVF |
| TIM_READY | SETUP_DONE and (TTCrx ready or COMMAND bit 13) |
| TIM_BUSY | not SETUP_DONE |

The STATUS register (read at the COMMAND PULSE address 0x10038) holds all
these flags plus the TTCrx single- and double-bit error latches.

## Statistics readout every n orbits

`tim_orbit_monitor` counts BCRES pulses from the start of a run.

- Every *n*-th BCRES is flagged on `orbit_cnt_reset`. It tells the boards to
  save and clear their dead-time and rate counters.
- 16 bx later, a monitoring request is added to MON_RQST so that the saved
  values are read out.
- *n* comes from the `orbit_mon_rate` port. 0 switches the block off.

## Readout Request bus (GT crate)

`tim_ro_rqst_bus` sends one typed word per message to the boards of the
crate. Its outputs are the `ro_rqst_vld`, `ro_rqst_type` and `ro_rqst_data`
ports of `tim_top`.

| Type | Message | Data |
|---|---|---|
| 01 | slow commands | one bit per command, COMMAND-pulse positions |
| 10 | test data | TESTDATA register |
| 11 | monitoring request | MON_RQST_ID register |

- Slow commands are START, STOP, RES_ORBIT, PRIVATE_ORBIT, PRIVATE_GAP,
  TEST_ENABLE and HARD_RESET, from any BGO source.
- Test data go out on SEND_TESTDATA (COMMAND-pulse bit 12).
- A monitoring request comes from the BC-Table, the VME pulse or the orbit
  monitor.
- Messages wait while another is sent. Monitoring requests go first, then
  commands, then test data.
- DIS_RO_BUS drops pending messages and keeps the bus silent.

## VME register map

`tim_vme_regs` decodes byte addresses.

- Writes take effect at the next clock.
- Read data come back two clocks after the read strobe, with `vme_rvld`.

| Address | Register |
|---|---|
| 0x10000–0x10020 | DLY_L1, R1, … L8, R8, L9 (reset 0xFFFF) |
| 0x10022 | DIS_boards |
| 0x10024 / 26 | DLY_TIM / DLY_PAN |
| 0x10028 / 2A | DLY_CRATE_TTC / DLY_CRATE_ECL |
| 0x10030 / 32 / 34 | TRIG_PERIOD / BGO_PERIOD / ORBIT_LENGTH |
| 0x10036 | TTC subaddress (read: last message in the high byte) |
| 0x10038 | write: command pulses; read: STATUS |
| 0x1003A / 3C / 3E | COMMAND / ROCMD / DLY_L1A_TCS |
| 0x10040–0x1004A | ROBUF_PAR, IDENTIFIER, IDLE_VALUE, EOF_VALUE, TESTDATA, MON_RQST ID |
| 0x1004C–0x1005E | heads of ROBUF_BX and ROBUF_A, BAD_L1A_TTC, BC_DIFF, MAX_BCNR, TTC_BCNR, local and TTC event numbers |
| 0x10060–0x10066 | chip ID and version |
| 0x10080–0x1009E | TTCrx broadcast dump |
| 0x02000–0x03FFE | BC-Table |
| 0x04000–0x047FE | ring buffer (with ROCMD bit 1 set) |

Command-pulse bits:

| Bit | Command |
|---|---|
| 0 | BCRES |
| 1 | HARD_RES |
| 2 | L1RESET |
| 3 | EVCNT_RES |
| 4 | STOP_RUN |
| 5 | START_RUN |
| 6 | RES_ORBIT |
| 7 | PRIV_ORBIT |
| 8 | PRIV_GAP |
| 9 | TEST_ENABLE |
| 11 | L1A |
| 13 | MON_RQST |
| 14 | release RESET_TTCRX |
| 15 | set RESET_TTCRX |

ROCMD bits:

| Bit | Function |
|---|---|
| 0 | swap link phases |
| 1 | VME reads the ring buffer |
| 2 | freeze |
| 3 | freeze on error |
| 4 | readout-buffer checks |
| 5 | queue checks |
| 6 | event-number check |
| 7 | TCS comparison |
| 8 | bunch-counter checks |
| 11 | link on |

## Files

`rtl/tim_pkg.sv` holds the shared types and constants: BGO codes, the
decoded BGO command struct, source-selection enums, the readout word and the
register addresses. Every other file in `rtl/` holds one module. `tim_top`
is the chip.

Two helper modules are used inside other blocks:

- `tim_delay_stage` is one tap-selected shift register.
- `tim_fifo` is a first-word-fall-through FIFO.

`tb/tb_<module>.sv` is a self-checking testbench for each module. Each ends
by printing `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/tim_pkg.sv tb/tb_tim_top.sv --top-module tb_tim_top
./obj_dir/Vtb_tim_top
```

Replace `tb_tim_top` with any other testbench name. Verilator is a
two-state simulator, so every register the design reads has a reset value.

`tb_tim_top` runs the whole chip at its default sizes: a 3564-bx orbit, the
full BC-Table, ring buffer and readout buffers, and 17 slots. It finishes in
well under a second. It drives a TTCrx model (BCRES every orbit, L1As, BGO
commands) and a VME bus model, and checks:

- every slot's lines in every cycle, against the internal pulses delayed by
  that slot's settings;
- every event record, word by word, against the ring-buffer contents at the
  L1A's bunch crossings;
- monitoring words, the idle pattern, registers, the frozen ring buffer, and
  the status flags and Fast Signals;
- Readout Request bus words and the suppressed-L1A count, against
  reference models.

It counts each mechanism it exercises and fails if one never occurred:

- each L1A source, and L1As blocked by RUN, by the inhibit and by the
  interlock;
- all four backplane codes and disabled slots;
- GTFE stalls and phase swapping;
- the BC-Table L1A, monitoring request and STOP_RUN;
- periodic BCRES and the crate delay;
- BAD_MAX_BC, the double-bit error and the TCS mismatch;
- ring-buffer freeze, freeze on error and VME read-back;
- L1 reset and hard reset;
- a trigger burst that raises TOO_MANY_L1A, L1A_OLD_WARN, L1A_TOO_OLD and
  both readout-buffer flags;
- the TTCrx reset flip-flop and the orbit monitor;
- the suppressed-L1A count while XOFF is held;
- all three Readout Request bus messages, and the bus held silent by
  DIS_RO_BUS.

## Choices where the specification leaves room

These points are this design's own reading. Change them first if a board
behaves differently.

- **BCRES coding.** Backplane coding uses the two-line {L1a, Reset} scheme
  with BCRES on its own line. A three-line variant is not built.
- **COMMAND reset value.** COMMAND resets to 0x0001 (TTCrx L1A, SETUP_DONE
  low), so TIM_BUSY is high until software finishes setup.
- **BC-Table periods.** A period value *p* means one active orbit in *p*+1.
  Generation starts at the first BCRES.
- **Age monitor and buffer sizes.** The age monitor measures one marked L1A
  at a time. The L1A-queue depth (128) and the DLY_TIM-based alignment
  described above are design choices.
- **Record fields.** The ROP word count counts the words before it. The
  event number comes from the ROP's own record counter.
- **Flags.** Status flags are sticky until CLR_ALL. Readout-buffer flags
  appear one clock after the condition.
- **Added inputs and outputs.** The external L1A inhibit, the orbit-monitor
  rate port, the 16-bx position of its request and the synchronous edge
  detection of the LEMO inputs are added.
- **Readout Request bus.** The word format, type codes and priority are
  this design's.

## Not included

These are outside the chip's logic and are not modelled; their signals are
ports of `tim_top`:

- the TTCrx receiver itself;
- clock selection and PLL;
- the VME interface chip;
- the Channel Link serialisers;
- LVDS and backplane drivers;
- power and configuration circuitry.

The Global Monitoring circuit that produces the phase-B monitoring words is
also outside.

XOFF arrives as the `l1a_inhibit` input. Decoding XON/XOFF from DAQ or TTC
messages is not included, nor is cancelling the events in the readout chain
after a DAQ breakdown; an L1 reset empties the chain.
