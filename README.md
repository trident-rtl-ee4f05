# Trident: choke-point timing error resilience for a pipeline at near-threshold voltage

At near-threshold supply voltage, process variation can turn one gate, or a
small group of gates, into a *choke point*. A choke point dominates the delay
of every path that goes through it. It can make a path slower than the clock
period, a maximum timing violation. If the gate is a hold-fix buffer that
became fast, it can also make a short path faster than the minimum path delay
constraint, a minimum timing violation. Razor-style double sampling relies on
such buffers, so it cannot catch the second kind.

This RTL adds one scheme to the DE..WB window of a pipeline. That scheme does
three things:

1. **Detection.** It watches one node at the end of every pipestage. It counts
   every transition of that node that happens outside a short guard interval
   around the rising clock edge.
2. **Correction.** When a stage errs, it flushes the errant instruction and
   every younger one. It then hands the pipeline the PC to replay from.
3. **Avoidance.** It records each error in a table, keyed by what the
   instruction is. The next time a matching instruction comes through, it
   holds the pipeline long enough for the error not to happen.

The pipeline itself is not included. Its side of the interface is brought out
as ports of the top module `trident`.

## Error classes

A transition counter sees the following in one clock cycle:

| what happened | illegal transitions | class | stall cycles that avoid it |
|---|---|---|---|
| minimum violation: the new data arrives too early and overwrites the previous result | 1 | SE (single error) | 1 |
| maximum violation: the data settles after the capturing edge | 1 | SE | 1 |
| both at once: an early glitch, then a late settle | 2 or more | CE (chain error) | 2 |

A count of 1 cannot tell a minimum violation from a maximum one. The hardware
does not need to: both need one extra cycle. For a CE, the first extra cycle
covers the late arrival and the second covers the early corruption.

## Structure

```
             clk ──► det_clk_gen ──► det_clk
                                        │
 stage_node[0..3] ──► tdc ×4 ───────────┴──► tdc_count[s] ──┐
                                                            ▼
 de_* (instruction) ──► ccr (window DE,EX,MEM,WB) ──► cdc (controller) ──► stall / advance
                          ▲      │ ccr[0].eid                │            flush / flush_pos / replay_pc
                          │      ▼                           │
                          └─ pred0 ◄── cet (128-entry table) ◄┘ log (EID, stage, class)
```

| file | block | what it is |
|---|---|---|
| `rtl/trident_pkg.sv` | shared | EID, CCR entry and log types, error class enum, operand-size and stall-need functions |
| `rtl/det_clk_gen.sv` | detection clock | **behavioural model**: delay-based pulse shaper, low for `GUARD_PS` on each side of the rising clock edge |
| `rtl/tdc.sv` | transition detector and counter | counts node edges while `det_clk` is high, clears during the low pulse, hands over the count |
| `rtl/ccr.sv` | choke clearance register | one entry per stage: valid, PC, EID, carried prediction |
| `rtl/cet.sv` | choke error table | 128 fully compared entries with a class per stage, tree pseudo-LRU |
| `rtl/cdc.sv` | choke detection controller | classifies, logs, flushes and replays, and inserts the avoidance stalls |
| `rtl/trident.sv` | top | wires the blocks together and brings out the pipeline interface |

## The error instance ID (EID)

The table is keyed by the **opcode** together with the **size of each source
operand**. The size is the number of significant bits, 0 to 32. A choke point
only shows when some input vector sensitizes its path. The operation and the
operand widths stand in for which paths are sensitized. The PC is stored in
the CCR, but only for replay. It is not part of the key, so two instructions
at different addresses with the same opcode and operand sizes share an
entry. This is a choice made here. A key that includes the PC, or a
different measure of operand size, is a change to `eid_t` and to the
`de_eid` assignments in `trident.sv`.

## Timing, cycle by cycle

The period is 10 ns (`T_CLK_PS`) and the guard is 0.5 ns (`GUARD_PS`). Both
values are placeholders: set them to match the real clock.

- **Cycle t.** An instruction in stage s makes the stage's node toggle while
  `det_clk` is high. The TDC counts each toggle.
- **0.5 ns before the edge that ends t.** `det_clk` falls. The TDC copies its
  count to `count`, and its edge counters are held at zero.
  - Toggles until 0.5 ns after the edge are legal. This is where the correct
    data of a normal path lands.
- **At that edge.** The controller reads the counts. Only a stage holding a
  valid instruction that is not already being squashed counts. If several
  stages err in the same cycle, the oldest instruction (the latest stage)
  wins.
- **Cycle t+1.**
  - `flush` is high for one cycle.
  - `replay_pc` is the errant instruction's PC.
  - `flush_pos` is the errant instruction's current position: s+1 if the
    pipeline advanced, s if it was held. `NUM_STAGES` means it has already
    left WB.
  - Positions `0..flush_pos` are squashed, and any instruction offered to DE
    in that cycle is dropped. Older instructions carry on.
  - The error is written into the table with its EID, stage and class. It is
    also reported on `err_valid`, `err_stage` and `err_class`.

Avoidance works like this:

- The table is looked up combinationally with the instruction in DE
  (`ccr[0]`). For DE itself, the result `pred0` is used directly. When the
  instruction moves on, it carries the result with it in the CCR.
- `stall` is high while the largest need in the window exceeds the number of
  cycles the window has already been held. A predicted SE in the stage an
  instruction now occupies needs 1 cycle, a CE needs 2.
- Holds requested by the pipeline (`pipe_stall`) count toward the need.
- The hold counter restarts when the pipeline advances or flushes.
- `advance = !(stall || pipe_stall)`. An instruction enters DE only at an
  edge where `advance` is high.

A prediction that turns out to be a false positive still costs its stall
cycles. An error the table did not predict is caught by detection and
corrected by replay.

## The choke error table

The table holds `ENTRIES` (128) entries, each with a valid bit, an EID and a
class per stage. The lookup key is compared with all entries in the same
cycle, so the table is a register array with one comparator per entry, not a
RAM macro. After synthesis this comes to about 3.6k flip-flops.

A write does one of three things:

- If the EID is already stored, it raises that stage's class. A CE is never
  lowered back to an SE.
- Otherwise it fills the lowest empty entry.
- When the table is full, it replaces the pseudo-LRU victim and pulses
  `cet_evict`.

The pseudo-LRU uses a binary tree of `ENTRIES-1` bits. A lookup hit (when
the DE instruction actually moves on) and a write both update the bits along
their path to point away from the entry used. The lookup is applied first,
so a write in the same cycle never evicts the entry that was just hit.

## Transition detector and counter

Each TDC needs to respond to both edges of the node (a double-edge
flip-flop). It is built as two counters: one clocked by rising edges of the
node and one by falling edges. Both are asynchronously cleared by
`det_clk && rst_n`. Their saturating sum (`CNT_W` = 2 bits) is registered on
the falling edge of `det_clk`. The design deliberately clocks flip-flops by
a data signal. In a real chip this needs the usual care for a clock-like net
and for the reset-recovery timing at the end of the guard interval.

`det_clk_gen` is the only part that is not synthesizable. It models a
delay-line pulse generator with `#` delays and needs to know the clock
period. In silicon it would be a tuned delay element or a clock-phase tap.

## Where this RTL departs from, or goes beyond, its source description

The following are filled in by choice:

- **Window.** Four stages (DE, EX, MEM, WB), one monitored node per stage.
  Which node of a stage is watched is left to the integrator.
- **EID.** Opcode plus operand sizes (see above).
- **Stall placement.** The whole pipeline is held while the predicted
  instruction sits in its errant stage. The source only states how many
  stall cycles follow the instruction. Inserting a bubble behind it instead
  would need per-stage hold signals from the pipeline.
- **Correction latency.** One cycle. The flush rule is "errant instruction
  and younger". The replay penalty of the pipeline is not part of this block.
- **Merging.** One table entry per EID, with a class per stage. A repeated
  error raises the class.
- **Enables.** `detect_en` and `avoid_en` switch the stages. Avoidance off
  reproduces an error census in which every error is counted.
- **Widths and timing.** Counter width, clock period and guard interval.

The following are not built:

- **The pipeline.** The host pipeline and its hold buffers are outside the
  design.
- **Min/max split of single errors.** Reporting whether an SE came from a
  minimum or a maximum violation would need the time of the transition
  within the cycle. The TDC only counts transitions.
- **Running only during a detection phase.** The TDCs are not switched off
  outside a detection phase. Detection runs all the time alongside avoidance
  and can be disabled with `detect_en`.
- **Evaluation results.** The performance and energy figures, and the
  overhead numbers, come from gate-level timing simulation of a particular
  core and cannot be reproduced from this RTL.

## Simulating

Each testbench in `tb/` checks itself and ends with `TB_RESULT checks=N
failures=M`. The packages must come first on the command line:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/trident_pkg.sv tb/trident_tb.sv --top-module trident_tb
./obj_dir/Vtrident_tb
```

| testbench | what it shows |
|---|---|
| `tdc_tb` | counts of 0 to 5 illegal transitions, with legal ones mixed in; saturation at 3; count stable during the next window |
| `det_clk_gen_tb` | `det_clk` low within 0.5 ns of each rising edge, high elsewhere |
| `ccr_tb` | 3000 random cycles of shift, hold and squash against a reference window |
| `cet_tb` | an 8-entry table against a reference model (hits, merges, about 800 replacements); the default 128-entry table filled and its least recently used entry evicted |
| `cdc_tb` | exactly 1 or 2 stall cycles for SE or CE in every stage; pipeline holds counting toward them; flush position and PC; oldest-first; enables; 5000 random cycles against the rules |
| `trident_tb` | the whole design at its defaults. A synthetic program and choke signature drive it: a loop where each choke errs once and is then avoided; the same loop with avoidance off; 8000 cycles of new code with random pipeline holds that fill the table and force replacement. Every flush is compared with the injected error. Each mechanism must occur at least once. |

The end-to-end test runs in well under a second of wall time. To change the
table size, override `CET_ENTRIES`. It must be a power of two.
