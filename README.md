# Capacitor voltage balancing by voltage mapping, for MMC arms

A modular multilevel converter (MMC) builds its output voltage from a chain of
sub-modules (SMs) per arm. Each SM is a capacitor that is either inserted into
the arm or bypassed. Nearest level control decides how many SMs an arm needs in
every sampling period. The balancing algorithm decides which ones. When the arm
current charges the capacitors, it should insert the SMs with the lowest
voltages. When the current discharges them, it should insert the ones with the
highest voltages. The usual way to do this is to sort all N capacitor voltages
every period. That costs O(N²) with bubble sort, and it becomes the bottleneck
when N is large.

This design replaces the sort with a **mapping**. The capacitor voltage band
[Vc,min, Vc,max] is split into M equal sub-ranges. Each sub-range has its own
FIFO memory. Each SM's voltage is turned into a sub-range number with one
subtraction, one multiplication and one rounding. The SM's position number is
then pushed into that sub-range's FIFO. Finally the FIFOs are read one after
another, bottom-up or top-down. This gives a list of all N SMs in which:

* SMs in lower sub-ranges always come before SMs in higher ones (ascending
  read), or the other way round (descending read);
* SMs in the same sub-range come out in position order.

The list is *quasi-sorted*: exact between sub-ranges and unordered inside one.
That is all the balancing needs. The work is linear in N: one cycle per SM to
write, one cycle per SM to read, plus one cycle per FIFO.

The RTL contains the mapping engine and the programmable-logic side around it:

* the engine (`cvms_core`);
* an AXI4-Lite register interface (`cvms_axi_slave`), through which a
  processor loads voltages and constants;
* an AXI4 burst master (`cvms_axi_master`), which writes the finished list
  into processor memory;
* a hardware SM selection unit (`cvms_sm_select`), which turns the list and
  an insertion index into gate states.

One arm unit (`cvms_arm`) holds one of each. The top, `cvms_pl_top`, holds two
arm units, one for the upper arm and one for the lower arm of one phase. The
defaults are N = 64 SMs per arm and M = 8 sub-ranges.

## The mapping engine (`cvms_core`)

### Sub-range address

`cvms_map_operator` computes, for a voltage code `vc`:

    addr = clamp( round( (vc - vc_min) * inv_dv ), 0, M-1 )

Here `inv_dv` = 1/ΔV, with ΔV = (Vc,max − Vc,min)/M, given in address units
per voltage LSB.

* **Number formats.** `vc` and `vc_min` are unsigned `VC_W`-bit codes (16 by
  default). `inv_dv` is unsigned fixed point: `INV_W` = 18 bits, of which
  `INV_FRAC` = 20 are fractional. So `inv_dv` = round(2²⁰ · M / (Vc,max − Vc,min)).
  For 10 kV to 15 kV at 1 V per code and M = 8, that is 1678.
* **Rounding.** Rounding is to the nearest sub-range, with halves rounded up.
  So sub-range k covers the voltages whose value (vc − vc_min)/ΔV lies in
  [k − ½, k + ½).
* **Saturation.** Voltages below Vc,min go to sub-range 0. Voltages past the
  top go to sub-range M−1. A voltage outside the band therefore never gets
  lost; it sits in an end FIFO.
* **Pipeline.** There are three registers: the sample, the difference, and
  the address. A result appears three enabled cycles after its sample went
  in. The product uses one multiplier.

Vc,min and ΔV are programmed constants, not measured. The design assumes the
voltage band is known in advance.

### Position, status and the FIFO cell

`cvms_position_gen` counts SM positions 0..N−1. It delays each position by
three registers, matching the map operator, so that a position and its
address reach the FIFOs in the same cycle.

The SM's present state (inserted or bypassed) travels along with the position.
A FIFO cell therefore holds `{status, position}`: clog2(N)+1 bits, 7 bits for
N = 64.

`cvms_fifo_bank` holds M FIFOs, each N deep. N deep is enough because even
when every voltage falls into one sub-range, nothing overflows. Reads are
registered, with one cycle of latency, as in a block RAM. An
"empty" multiplexer gives the state machine the empty flag of the FIFO it is
reading. For N = 64 and M = 8 the bank holds 8 × 64 × 7 = 3584 bits.

### Sequencing and timing (`cvms_fsm`)

On `start` the state machine goes through these states:

1. **INIT** – one cycle: the counter is cleared and all FIFOs are emptied.
2. **WRITE** – N cycles: one SM is issued per cycle. `cvms_core` drives
   `vc_idx`, and the caller must return `vc`/`ins` for that SM in the same
   cycle (combinationally, e.g. from a register file). Three cycles later, the
   position is pushed into FIFO `addr`.
3. **DRAIN** – three cycles, so the last three SMs still in the pipeline are
   stored.
4. **READ** – the read pointer starts at FIFO 0 (ascending) or FIFO M−1
   (descending). It pops its FIFO until the FIFO is empty, then steps to the
   next one. After FIFO M−1 (or FIFO 0) it stops. Popping an entry and
   skipping an empty FIFO each take one cycle.
5. **DONE** – `done_map` pulses.

| event (cycles after the `start` cycle) | N = 64, M = 8 |
|---|---|
| first list entry (`valid_data`): N + 6, plus one per leading empty FIFO | 70 + skips |
| `done_map`: exactly 2N + M + 5 | 141 |

At an assumed 200 MHz clock, the 141 cycles are 0.7 µs for a complete
64-SM list. The engine cannot be stalled. A start while `busy` is ignored.

The list appears on `pos_sort`, `ins_sort` and `range_sort`, one entry per
`valid_data` cycle. `range_sort` is the FIFO the entry came from. The
selection unit uses it.

## SM selection (`cvms_sm_select`)

This is the hardest part of the design to follow. It also departs most from
the usual processor-side implementation. In each sampling period the
processor writes a `step` with three inputs:

* the insertion index `n_ref` (how many SMs should be inserted);
* the sign of the arm current (`i_pos` = 1: inserted SMs get charged);
* whether switching optimisation is on (`opt_sw`).

The unit compares `n_ref` with its own count of inserted SMs, `n_ins`, and
picks one action:

| case | action | list order requested |
|---|---|---|
| `opt_sw`, n_ref > n_ins, charging | insert n_ref − n_ins bypassed SMs with the lowest voltages | ascending |
| `opt_sw`, n_ref > n_ins, discharging | insert bypassed SMs with the highest voltages | descending |
| `opt_sw`, n_ref < n_ins, charging | bypass inserted SMs with the highest voltages | descending |
| `opt_sw`, n_ref < n_ins, discharging | bypass inserted SMs with the lowest voltages | ascending |
| `opt_sw`, n_ref = n_ins | nothing, only the swap check | ascending if charging |
| no `opt_sw`, n_ref ≠ n_ins | re-select everything: the first n_ref SMs of the list are inserted and all others bypassed | ascending if charging |
| no `opt_sw`, n_ref = n_ins | nothing, only the swap check | ascending if charging |

The SMs it wants always sit at the **front** of the list. The unit starts the
engine in the matching order and stores the N list entries (position and
sub-range). It then walks the stored list once from the front. Each entry in
the right state is switched until the count is reached.

**Swap.** Switching optimisation leaves most SMs untouched from period to
period. An inserted SM can therefore drift to the edge of the band. After the
main action, the unit walks the list a second time, looking for an inserted SM
that:

* sits in the *critical* sub-range: M−1 when charging, 0 when discharging;
* was not switched in this step.

Each such SM is bypassed. In its place the unit inserts a bypassed,
unswitched SM that is not itself in the critical sub-range, taken from the
far end of the voltage scale (the lowest voltages when charging, the highest
when discharging). Each swap replaces exactly one SM with one other. So the
number of inserted SMs, and with it the arm's voltage level, is unchanged.

**Timing.** A step waits until the engine and any list transfer are idle. It
then takes:

* one list (2N + M + 5 cycles);
* N cycles for the main walk;
* N to 2N cycles for the swap walk.

That is roughly 210–340 cycles for N = 64, or under 2 µs at 200 MHz. This is
far inside a 100 µs (10 kHz) sampling period. `step_done` pulses when `gates`
and `n_ins` hold the new state.

The engine reads each SM's status from this unit's `gates`. So every list,
including one started by the processor, carries the current gate states.

## Processor interfaces

### AXI4-Lite slave (`cvms_axi_slave`)

The registers are 32 bits wide, at byte addresses:

| address | name | access | contents |
|---|---|---|---|
| 0x000 | CTRL | W | bit 0: start a list (self-clearing); bit 1: descending |
| 0x004 | STATUS | R | bit 0: busy (engine, transfer or selection); bit 1: list delivered (cleared when the next list starts); bit 2: selection busy; bit 3: step done (cleared by the next step) |
| 0x008 | VC_MIN | R/W | Vc,min code |
| 0x00C | INV_DV | R/W | 1/ΔV, fixed point as above |
| 0x010 | DST | R/W | byte address for the list |
| 0x014 | BAL | W | bit 0: selection step (self-clearing); bit 1: i_pos; bit 2: opt_sw; bits 23:16: n_ref |
| 0x014 | BAL | R | bits 2:1 and 23:16 as written; bits 31:24: n_ins |
| 0x400 + 4i | VC[i] | R/W | capacitor voltage code of SM i |
| 0x800 + 4w | GATES[w] | R | bit b = SM 32w + b inserted |

Other addresses read as zero and ignore writes. Every access answers OKAY.
WSTRB is ignored, so writes are whole words.

Handshake:

* A write is taken when AWVALID and WVALID are both high and no response is
  pending. BVALID follows one cycle later.
* A read is taken when no read data is pending. RVALID follows one cycle
  later.
* Assertions check that a response stays stable until it is accepted.

Limit: `n_ref` and `n_ins` are 8-bit fields, so N ≤ 255 (asserted).

### AXI4 master (`cvms_axi_master`)

Every list, whether started by CTRL or by a selection step, goes to memory at
DST as **one INCR burst** of N 32-bit beats:

* each beat has the SM position in the low bits and the SM state in bit 31;
* the address phase is issued as the engine starts;
* beats follow as entries arrive, so the processor can see the first entries
  before the list is complete;
* an N-deep buffer absorbs back-pressure, since the engine cannot wait.

STATUS bit 1 is set when the write response arrives. The master issues at
most one beat every two cycles.

Requirements:

* N ≤ 256 (the AXI4 burst length limit, asserted);
* the N × 4-byte list must not cross a 4 KB boundary.

### Using it from software

1. Write VC_MIN, INV_DV and DST once.
2. Each period, write the N voltages VC[i].
3. Then either:
   * write CTRL = 1 (ascending) or 3 (descending), and poll STATUS until
     bits 1:0 = 10;
   * or write BAL with the step bit set, and poll STATUS until bits 3:1 = 101.
4. The gate states can be read back from GATES. They are also available as
   the `gates` output of the top.

## Top level (`cvms_pl_top`)

The top has two independent arm units: index 0 is the upper arm and index 1
the lower arm. They share only the clock and reset. Each has its own
AXI4-Lite slave port, AXI4 master port, `gates[N-1:0]` and `done_map` /
`list_done` / `step_done` pulses. The ports are packed structs from
`cvms_pkg` and come in arrays of two.

The top does not include:

* the processor;
* the AXI interconnect;
* the converter's modulator and power stage.

A three-phase converter would use three tops.

Parameters are `N`, `M`, `VC_W`, `INV_W` and `INV_FRAC`. The defaults are
64, 8, 16, 18 and 20.

## What follows the reference strategy and what is this design's own

These parts follow the reference strategy:

* the mapping formula, from subtraction to rounding;
* one FIFO per sub-range, each N deep, with the SM status stored in the cell;
* the write-then-read sequence;
* ascending and descending reads;
* the three register stages in the map operator and in the position path;
* two arm units per phase, each with a slave interface, a master interface
  and the engine;
* burst transfer of the list;
* the four insert/bypass cases;
* full re-selection without switching optimisation;
* the idea of swapping an SM out of the first or last sub-range.

These are this design's own choices:

* **Selection in logic.** In the reference system, selection runs in
  processor software. Here it is a hardware unit next to the engine.
  Software can still ignore it and use the CTRL path only.
* **Swap pairing.** The rule for which SM replaces a swapped-out one is an
  interpretation. It could differ from other readings of the strategy.
* **Swap without a change in n_ref.** When the insertion index does not
  change, the swap check still runs. A purely index-driven flow would do
  nothing in that period.
* **Top address.** The read runs over FIFO addresses 0..M−1. Descriptions
  that start a descending read "at M" are taken to mean the top FIFO.
* **Number formats.** All widths, the rounding of halves and the saturation
  are this design's own.
* **Timing.** The clock frequency (200 MHz is used only to convert cycles
  into time) and all cycle-level timing are this design's own.
* **Bus interfaces.** The register map, the beat format and the AXI buffer
  are this design's own.

Resource use is not comparable one-for-one with an FPGA report. Generic
synthesis of `cvms_core` at N = 64, M = 8 gives:

* about 290 cells;
* 231 flip-flop bits;
* the 3584-bit FIFO storage;
* one multiplier.

The slave's register file for the 64 voltages adds about 1 kbit of flip-flops
per arm.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cvms_map_operator` | random and edge samples against real-arithmetic `round`/`clamp`, three-cycle latency |
| `tb_cvms_position_gen` | counter and delay line against a queue model |
| `tb_cvms_fifo_bank` | M FIFOs against M queues, including one FIFO filled to depth N |
| `tb_cvms_fsm` | visiting order, pipeline delay, 2N + M + 5 cycles, start ignored while busy |
| `tb_cvms_core` | whole lists at N = 64, M = 8 against an independent model, first-entry and completion latency |
| `tb_cvms_axi_slave` | every register, pulses, sticky flags, response hold under random BREADY/RREADY |
| `tb_cvms_axi_master` | burst format, WLAST, data order and done under random back-pressure |
| `tb_cvms_sm_select` | about 300 random steps at N = 16, M = 4 against a reference model of all actions and swaps |
| `tb_cvms_arm` | register-level use of one arm: list to memory, a selection step, status bits in later lists |
| `tb_cvms_pl_top` | both arms at the default size (no parameter overrides) |
| `tb_cvms_workloads` | a 16-SM arm: lists at M = 8, 16 and 64, and 800 closed-loop sampling periods with a behavioural capacitor model |

`tb_cvms_pl_top` checks every list in memory and 141 cycles of engine time.
It also requires each of these to happen at least once:

* ascending and descending lists;
* skipped empty FIFOs;
* saturation at both ends;
* a full FIFO;
* AXI stalls;
* both arms busy at once;
* a start ignored while busy;
* the first word arriving early;
* insert, bypass, hold and re-select steps;
* swaps.

`tb_cvms_workloads` runs the arm size of a converter study: N = 16, with a
10–15 kV band and a nominal 12.5 kV. It has two parts.

* **Lists.** The engine builds lists at M = 8, 16 and 64. It takes 45, 53 and
  101 cycles respectively, so a large M makes reading dominate.
* **Closed loop.** The selection unit drives a simple arm model. Each
  inserted capacitor charges or discharges with the arm current, with a
  ±10 % capacitance spread. The run starts from voltages spread over
  10.3–14.7 kV.
  * Without switching optimisation, the spread falls to about 1 kV within
    four fundamental cycles.
  * With optimisation, the voltages stay inside the band and the gates
    switch about half as often (about 115 against 230 events).

For each module, a deliberately broken copy (for example truncation instead
of rounding, WLAST one beat early, or the swap partner taken from the wrong
end) made its testbench fail.

Limits of the verification:

* the selection unit is checked against a model written from the same reading
  of the rules, so it confirms the implementation, not the interpretation;
* nothing has been run on an FPGA or at a timed clock.

## Simulating with Verilator

Verilator 5 with `--timing` is needed. Put the package first, and let
Verilator find the other modules in `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/cvms_pkg.sv tb/tb_cvms_pl_top.sv --top-module tb_cvms_pl_top -o sim
    ./obj_dir/sim

Replace `tb_cvms_pl_top` with any other testbench name. All of them run in
seconds; the C++ build takes longer than the simulation. The warnings left
are about unused parameters and bus bits (WSTRB, BRESP), and about the
asynchronous reset used in the assertions' `disable iff`.

To change the size, set the parameters on `cvms_pl_top` (or `cvms_arm` /
`cvms_core`). Rules:

* M ≥ 2;
* N ≤ 255;
* INV_DV must be recomputed for the new M and voltage band.
