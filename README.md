# Self-healing CLB fabric with nearest-spare repair

A reconfigurable fabric keeps working after some of its logic blocks break.
Part of the fabric's configurable logic blocks (CLBs) is left unused as spares.
When a block that carries part of the application is diagnosed faulty, a small
controller on the chip moves that block's configuration (its input
connections and its function bits) to the **nearest** free spare. It then
re-routes every connection that pointed at the faulty block, and retires the
faulty block. The application never stops. Choosing the nearest spare keeps
the moved connections short.

This RTL implements the NSCLB ("nearest spare CLB") self-healing approach
published as *Autonomous Self Healing of Reconfigurable Circuits*. The
published description fixes the principle, the order of the steps and the
demonstration size of 24 CLBs. It does not give the CLB internals, the
configuration-word format, the interconnect or the timing. Those parts are
this design's own and are marked as such below and in each file header.

## Structure

```
              host_* (configuration load)        fault[23:0] (from an external diagnosis)
                   |                                   |
                   v                                   v
            +---------------+   clb_cfg/out_cfg  +--------------------+
            | config_memory |<------------------>| restructuring_unit |
            |  24 CLB words |     writes (wr)    |  structure_id      |
            |   8 pin words |                    |  nearest_spare     |
            +---------------+                    +--------------------+
                   | whole configuration, in parallel        |
                   v                                         v status
            +---------------------------------+
 pin_in --->| clb_fabric: 24 x clb (LUT4 + FF) |---> pin_out
            +---------------------------------+
```

| File | Role |
|---|---|
| `rtl/nsclb_pkg.sv` | sizes, configuration-word structs, write-request struct |
| `rtl/clb.sv` | one CLB: 4-input look-up table whose inputs come from the source bus, then a flip-flop |
| `rtl/clb_fabric.sv` | the row of 24 CLBs, the shared source bus and the output pins |
| `rtl/config_memory.sv` | configuration words, read in parallel and written one CLB word plus one pin word per clock |
| `rtl/structure_id.sv` | decodes the configuration into active, spare and needs-repair CLBs, and finds who is connected to a given CLB |
| `rtl/nearest_spare.sv` | left/right search for the nearest free spare |
| `rtl/restructuring_unit.sv` | the healing state machine |
| `rtl/nsclb_top.sv` | everything wired together, plus the host load port |

## The configuration word

Every CLB is fully described by one word (`clb_cfg_t`):

| field | bits | meaning |
|---|---|---|
| `used` | 1 | the CLB carries part of the application |
| `sel[3:0]` | 4 x 5 | source of each look-up-table input |
| `lut` | 16 | function bits, addressed by `{in3,in2,in1,in0}` |

A source number `s` below 24 is the registered output of CLB `s`. A number
24 + p is primary input `p`, and 32 and above do not occur at the defaults.
Each of the 8 output pins has a word `{en, sel}` naming the CLB it shows.

Because a CLB is nothing but its word, moving a function is a copy of the
word. Moving the wiring means finding every `sel` field that holds the faulty
CLB's number and writing the spare's number into it.

## How a repair runs

The restructuring unit watches `needs_repair = used & fault`, which it gets
from `structure_id`. Faults on unused CLBs do not disturb the application.
Such a CLB only drops out of the spare pool, and nothing is reconfigured.
Faulty active CLBs are repaired one at a time, lowest number first:

1. **IDLE.** The unit notices the pending fault and latches the lowest
   faulty CLB number `f`.
2. **SELECT.** `nearest_spare` looks for the first spare below `f` and the
   first above it, and takes the nearer one (`s`). On a tie it takes the one
   above. If there is no spare at all, `f` is flagged `unrecoverable` and left
   running as it is.
3. **COPY.** The word of `f` is written to `s`. The spare now computes the
   same function from the same inputs.
4. **RETIRE.** The word of `f` is cleared. The choice goes into `repl_idx[f]`
   and `spare_taken[s]`.
5. **REMAP.** `structure_id` lists the CLBs (`clb_reader`) and output pins
   (`out_reader`) that still name `f`. On each clock the lowest CLB reader
   and the lowest pin reader are rewritten to name `s`. As soon as a write
   lands, that reader drops off the list. The state ends when both lists are
   empty. If `f` fed back on itself, its copy in `s` is among the readers and
   ends up feeding back on `s`.

A repair keeps `busy` high for **5 + R clocks**, where R is the larger of the
number of CLB words and the number of pin words that name `f`. In the worked
example, CLBs 0, 1 and 2 fail together while only 3, 5 and 7 are free. The
unit then takes them in order and hands out 3, 5 and 7, because each spare,
once taken, is no longer free for the next fault.

**Transient faults and missing spares.** The `fault` input is a level. When
a retired CLB's fault flag drops, the CLB is unused and healthy again, so it
rejoins the spare pool. A new spare clears every `unrecoverable` mark in the
same clock, so the waiting CLBs are retried, again in ascending order. An
`unrecoverable` mark also clears when the CLB's own fault flag drops.

**The fabric during a repair.** The CLBs keep clocking. Between the COPY
and the last REMAP write, some readers already take the spare's output while
others still take the faulty block's. The spare's flip-flop also starts from
its own state, not from the faulty block's, which cannot be trusted. Outputs
are therefore only guaranteed correct once the repair is over and the
application has flushed whatever state it holds. For a feed-forward
application, that takes at most as many clocks as it has register stages.

## Interface of `nsclb_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (clears the whole configuration) |
| `host_clb_we/addr/data` | in | load one CLB word |
| `host_out_we/addr/data` | in | load one output-pin word (may share a clock with a CLB word) |
| `host_ready` | out | host writes are taken only while high; low while a repair is pending or running |
| `pin_in[7:0]`, `pin_out[7:0]` | in/out | application pins |
| `fault[23:0]` | in | diagnosed fault flags, 1 = faulty |
| `defect[23:0]` | in | damage model for simulation: output of that CLB stuck at 0. Tie to 0 in a real part |
| `active`, `spare` | out | CLBs in use; CLBs free and healthy |
| `repl_valid`, `repl_idx` | out | spare that took over each repaired CLB |
| `spare_taken` | out | CLBs that were handed out as spares |
| `unrecoverable` | out | faulty active CLBs for which no spare existed |
| `repairs`, `last_distance` | out | repair count; distance from the last repaired CLB to its spare |
| `n_active`, `n_spare`, `n_fault` | out | counts of the three CLB classes |
| `clb_q` | out | every CLB output, for observation |

Host writes and repairs never collide. While `busy` is high, the
configuration memory takes only the restructuring unit's writes.

## Design choices beyond the published method

- **CLB.** A 4-input look-up table with one flip-flop, the output cleared
  while unused. The source only says that a CLB has input bits and function
  bits.
- **Array.** One row of CLBs on a shared source bus, so every CLB can read
  every CLB and every input. Distance is the difference of CLB numbers,
  which matches a left/right spare search. The published demonstration uses
  24 CLBs, and one passage also mentions 64. The default is 24.
- **Output pins** with their own select words, so that rerouting covers the
  outputs too.
- **Tie rule** (right-hand spare) and the **lowest-first order** of repair.
  Both agree with the published examples (9 → 10; 0, 1, 2 → 3, 5, 7).
- **No spare / retry** handling, and the **one-word-per-clock** rewrite of
  connections.
- **Fault detection and diagnosis are not included.** The method assumes
  they exist, and their result is the `fault` input.
- The **defect** input exists only so that damage can be simulated.

The published figures of an ISE schematic, the simulation waveforms and a
0.056 W power estimate describe a vendor implementation. No RTL detail was
taken from them.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
package files must come first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/nsclb_pkg.sv tb/nsclb_ref_pkg.sv tb/tb_nsclb_top.sv \
  --top-module tb_nsclb_top -o sim && ./obj_dir/sim
```

Replace `tb_nsclb_top` with any other `tb/tb_*.sv`. `tb/nsclb_ref_pkg.sv`
holds the reference models that the testbenches share:

- a nearest-spare search that grows the distance step by step;
- a clock-by-clock evaluator of a configuration;
- a software version of the whole repair, which also predicts the busy
  clocks.

| testbench | what it checks |
|---|---|
| `tb_clb` | LUT addressing, register, unused and damaged CLBs |
| `tb_clb_fabric` | random configurations, feedback included, against the evaluator, every clock |
| `tb_config_memory` | random writes, out-of-range addresses, reset |
| `tb_structure_id` | classification, counts and fan-out on random configurations |
| `tb_nearest_spare` | the worked examples, ties, edges, 3000 random spare maps |
| `tb_restructuring_unit` | final configuration, chosen spares, status and the exact 5 + R busy time. Scenarios: worked examples, self loops, no spare and retry, transient faults, random cumulative faults |
| `tb_nsclb_top` | end to end at full size (below) |
| `tb_nsclb_example` | the two worked examples (0, 1, 2 → 3, 5, 7 and 9 → 10) on the full fabric, with exact repair time and correct outputs afterwards |

The end-to-end testbench works as follows:

- It loads random feed-forward applications through the host port.
- It keeps an undamaged model of each application.
- It damages CLBs and raises their fault flags.
- After each repair and a flush, it requires the output pins to match the
  model again.

It counts how often each mechanism occurs, and fails if one never does. The
mechanisms are:

- a repair;
- a spare taken to the right, and one taken to the left;
- an output pin moved, and a CLB input moved;
- several faults in one busy period;
- the host port held off;
- no spare available;
- a retry after a spare came back;
- a spare lost to a fault;
- outputs visibly corrupted before the repair.

## Changing the size

All sizes are constants in `rtl/nsclb_pkg.sv`: `N_CLB` (24), `N_IN` (8),
`N_OUT` (8) and `LUT_K` (4). Widths follow from them. With `N_CLB = 64` the
design compiles, and `tb_nsclb_top` passes unchanged.
