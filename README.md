# Systolic simulated-annealing cell placer

Placing the logic elements (LEs) of a netlist on an FPGA grid so that connected elements
sit close together is usually done in software by simulated annealing: propose moving an
element, accept the move if it shortens the wiring, and now and then accept a bad move at
random, less often as a "temperature" falls. This design makes the placement grid itself
do the work. It has one small processing element (PE) for each grid site. Each PE holds the
id of the LE placed there and the current positions of the up to K LEs it connects to.
In every step, pairs of neighbouring PEs work out how the total Manhattan wire length
would change if they traded their LEs. If the exchange helps, or either PE's random number
generator says to take a chance, they trade the LE ids and connection lists. All pairs in
the array do this at once.

A PE's wiring estimate is only as good as its copy of where its neighbours' LEs are. Every
PE publishes its own LE's position on a binary broadcast tree (the *H-tree*). The tree
takes one PE's offer per clock cycle and delivers it to every PE a fixed number of cycles
later. A PE whose LE is connected to the broadcast LE updates its copy. The tree has three
ways of choosing whose position goes next: round robin, biggest change first, or random.

The top module is `placer_array`, a `ROWS x COLS` grid of `processing_element`s and one
`htree`. The defaults are 4 x 4 PEs and K = 12 connections per LE.

## The processing element

Each PE is built from seven assemblies plus a neighbour multiplexer and a tree leaf:

| module | job |
|---|---|
| `entropy_assembly` (+ `lfsr16`) | random bit `swap = rnd < temperature`, linear cooling, `done` at minimum temperature |
| `accumulator_assembly` | delta cost of moving this LE to the partner's site |
| &nbsp;&nbsp;`current_cost_accumulator` | sum of Manhattan distances from the own site to all connections |
| &nbsp;&nbsp;`hypo_cost_accumulator` | the same sum from the partner's site |
| &nbsp;&nbsp;`diff_accumulator` | hypothetical minus current |
| `memory_assembly` (+ `cam`) | position RAM, shadow RAM and CAM of connected-LE ids |
| `swapmemory_assembly` | streams the connection list to the partner and takes the partner's, then reprograms the CAM |
| `position_update_assembly` | the PE's leaf on the H-tree: offers its position, routes broadcasts into the memory |
| `swap_assembly` | combines both PEs' deltas and random bits into one swap decision |
| `control_assembly` | per-PE state machine that sequences one phase |
| `neighbour_mux` | picks this phase's partner link (N, E, W or S) |

Shared types are in `sp_pkg`:
- coordinates are 8 bits
- ids and costs are 16 bits
- `conn_t` is `{valid, id, pos}`, 33 bits
- `link_t` is what a PE shows all four neighbours

### Memory: position RAM, shadow RAM and CAM

Slot *i* of the position RAM holds connection *i* as `{valid, id, pos}`. The shadow RAM
holds only `{valid, id}` for the same slot. The CAM holds the same ids for matching.
A broadcast `{id, pos}` from the tree is looked up in the CAM. On a hit, the position in
the matching slot is overwritten one cycle later. The accumulators read the position RAM
through one combinational read port, and the swap logic uses a second. After a swap the
shadow RAM already holds the new ids, so the CAM is reloaded from it, one slot per cycle.
Position updates that arrive while a swap is rewriting the memory are dropped. In the
round-robin mode the same LE is offered again within N broadcasts, so the lost update is
soon repaired.

## One phase, cycle by cycle

The grid runs in four phases that repeat, one per annealing step:

| phase | pairs |
|---|---|
| 0 | horizontal, left PE in an even column |
| 1 | horizontal, left PE in an odd column |
| 2 | vertical, upper PE in an even row |
| 3 | vertical, upper PE in an odd row |

A PE whose partner would lie outside the grid sits the phase out. It still spends the cycles
and clocks its entropy, but it never swaps.

Within a phase (`control_assembly` states `S0 -> WAIT -> [SWAP] -> [STALL] -> S0`):

1. **S0** (1 cycle). Advance the phase, clock the entropy, start the accumulators, arm the
   swap assembly.
2. **Delta cost** (K + 7 = 19 cycles to `delta_valid`). The accumulators read the K slots in
   K cycles. The current-cost pipe has 4 stages: register, distance, add, register. The
   hypothetical pipe adds one stage that computes the partner's site. The difference takes
   2 more cycles.
3. **Exchange** (1 cycle). The delta, the entropy bit and the phase number are registered
   into the PE's `link_out`, which the partner reads.
4. **Decision** (4 cycles).
5. **Swap** (only if the decision says so, 2K + 3 = 27 cycles). Both PEs start in the same
   cycle. Each sends one slot per cycle and writes each slot arriving from the partner into
   the same slot. The last value arrives K + 2 cycles after start. The CAM is then
   reprogrammed from the shadow RAM in K cycles. The LE id and the LE's last-broadcast
   position are traded at the start.
6. **Stall** (`stall_cycles` cycles, a runtime input, normally 0). Idle cycles before the next
   S0. They do not change the result of a step, but the tree broadcasts one update per
   cycle, so each stall cycle adds one more position update per step.

A phase with no swap therefore takes 25 cycles. A phase with a swap takes 52 cycles.

### Why both PEs always agree

A swap must happen on both sides or on neither. Each PE computes only its own half of the
delta, so the decision rule must see both halves and both random bits:

    swap = has_partner & (rnd_self | rnd_partner | (delta_self + delta_partner < 0))

Both PEs take every term from registered link values. One PE sees the same values as the
other with "self" and "partner" exchanged, and the rule is symmetric in the two. So both
compute the same bit in the same cycle.

PEs are self-timed. A PE that has just swapped can be 27 cycles behind its next partner.
The partner then waits in WAIT until a delta for the same phase appears on the link.
The phase tag on the link makes this safe: without it, a PE could fire on the partner's
delta from the previous phase. Because of these waits, a step can be longer than the sums
above.

## The H-tree

`htree` is a heap of `htree_node` crosspoints, with leaves at the bottom and the root at the
top. It works in two directions:

- **Up.** Each node holds one registered update. The node refills when it is empty or when
  its parent takes its update, choosing between its two children with a valid/ready
  handshake.
- **Down.** The root's update goes through log2(N) register levels. Every PE therefore sees
  each broadcast at the same time, log2(N) cycles after it leaves the root: 4 cycles for
  16 PEs. One update is delivered every cycle.

Each leaf (`position_update_assembly`) always offers its LE's current site. Its key is the
Manhattan distance between that site and the site at which the LE was last broadcast. The
three `mode` values choose how a node picks between two children:

| mode | a node takes | flush |
|---|---|---|
| `UPD_SIMPLE` | children alternately, so each leaf gets a turn every N updates (round robin) | never |
| `UPD_SORTED` | the child with the larger key: the LE that moved furthest since it was last heard | after every `BURST` broadcasts |
| `UPD_RANDOM` | a child picked by a random bit from a tree LFSR | after every `BURST` broadcasts |

In the sorted and random modes, updates chosen earlier go stale while they wait in the tree.
So after `BURST` broadcasts (default 4) every node's register is emptied and the tree fills
again from fresh offers; for the few cycles this takes, nothing is broadcast. The
last-broadcast position travels with the LE
when it is swapped, so an LE that moves twice between broadcasts gets a larger key.

## Cooling

`entropy_assembly` has a 16-bit Galois LFSR (taps 0xB400) and a temperature register.
Each step, `swap = lfsr < temperature`. The temperature:

- starts at `T_INIT` = 4096, so the random bit is set on 1/16 of steps
- falls by `T_STEP` = 256 every `STEPS_PER_TEMP` = 16 steps

A PE finishes when the temperature has reached `T_MIN` = 0, after 256 steps. Every PE has
a different LFSR seed, `0x9E37 * (i + 1) + 0x1234`. `done` of the array is the AND of all
PEs' `finished`.

## Using the top

Loading the netlist:

1. Hold `go` low.
2. For each PE, select it with `ld_pe`.
3. Write its LE id (`ld_id_we`, `ld_id`).
4. Write each connection slot (`ld_we`, `ld_addr`, `ld_data = {valid, id, {x, y}}`). Each
   position must be the site where the connected LE starts.
5. Set `mode` and `stall_cycles`.
6. Raise `go`.

When `done` rises, `placement[y*COLS + x]` is the LE placed at site (x, y). `swaps_total`
counts swaps, and `bcast` shows the update leaving the tree root. Reset is synchronous and
active low.

## Simulation

Each testbench prints `TB_RESULT checks=… failures=…` and ends. With plain Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/sp_pkg.sv tb/tb_placer_array.sv \
        --top-module tb_placer_array -Mdir obj_tb_placer_array -o sim
    ./obj_tb_placer_array/sim

Replace the testbench name for any other one. Verilator finds the modules in `rtl/` through
`-Irtl`, and `sp_pkg.sv` must come first. One testbench per module:

- `tb/tb_<module>.sv` checks its module against reference values worked out in the testbench.
  It also checks latencies:
  - 19 cycles to the delta
  - 4 cycles to the decision
  - 2K + 3 cycles for a swap
  - 25 or 52 cycles per phase
  - log2(N) tree latency
- `tb/tb_placer_array.sv` runs the default 4 x 4, K = 12 array end to end. The netlist is a
  4 x 4 mesh, which has an optimal cost of 48, loaded in a scrambled order. It anneals four
  times: simple, sorted and random mode, then simple with 25 stall cycles. After each run
  it checks that:
  - the result is a permutation of the LE ids
  - the connection lists travelled with their LEs
  - every PE's position copies have converged to the true sites once the tree has cycled
  - the total cost fell

  It counts each mechanism: cost-driven swaps, random swaps, rejected swaps, phases without
  a partner, CAM hits, waits for a partner, stall cycles and tree flushes. It fails if any
  count is zero.
- `tb/tb_updates_per_step.sv` runs the same netlist with 25, 50 and 100 updates per step
  (stall 0, 25, 75). It checks that no step is shorter than 25 + stall cycles, and that the
  tree root never goes idle.

Results at the defaults, wiring cost before → after:

| run | cost |
|---|---|
| simple | 126 → 80 |
| sorted | 106 → 64 |
| random | 112 → 76 |
| simple, 25 stall cycles | 126 → 64 |

Each run takes about 10,000 to 10,700 cycles, or 16,800 with stalls. With 25, 50 and 100 updates per
step, the costs are 124 → 64, 84 and 84.

The placer cuts the excess over the optimum by half or more, but it does not reach the
optimum. Moves are only trades between neighbours, so it can be caught in local minima.
Each run gives one sample, so
differences between modes and update rates are within run-to-run noise. The cooling
constants were picked by trying a few settings on this netlist. Slower cooling (a larger
`STEPS_PER_TEMP`) did not help reliably at this size.

## Where this design departs from its source, and how far to trust it

It follows the source design in:

- the seven assemblies and their duties
- the delta cost `M(L(partner), C(self)) - M(L(self), C(self))`, and its 19-cycle
  accumulator pipeline
- the 4-cycle decision
- the shadow RAM, and CAM reprogramming from it
- the four-phase neighbour order
- the H-tree with its log2(N) latency and one update per cycle
- the three update modes, with a reset after n sorted or random broadcasts
- linear cooling
- the 25-cycle step, with stalls as the way to get more updates per step

Choices and departures:

- **Swap rule.** The source says in one place that a non-random swap needs the total delta
  to *improve* the cost. In another it says the swap happens when the cost *increases*.
  This design swaps when the combined delta is negative, meaning shorter wiring.
- **Random swaps.** The pair swaps if either PE's random bit is set. How the source pairs
  the two random bits is not given.
- **Swap length.** A swap takes 27 cycles, not the source's 34. The source's CAM needs 18
  cycles to program. This CAM is a register array written one slot per cycle, with a
  parallel compare.
- **Decision timing.** The phase tag and the wait for a partner's delta are this design's
  way to keep self-timed PEs in step. The source runs a `WAIT` state for the decision but
  gives no protocol.
- **Assumed details.** These are not given by the source:
  - the sorted-mode key, the distance moved since the LE was last broadcast
  - the flush in the random and sorted modes only
  - `BURST` = 4
  - the tree's pairing of leaves (heap order, row-major PE index)
- **Dropped updates.** Updates are dropped during a swap rather than queued.
- **Assumed numbers.** Every width, the LFSR polynomials and seeds, and all cooling
  constants are assumptions.
- **Interfaces.** The netlist load bus and placement output are this design's own. The
  source leaves loading and readback to software.
- **Array size.** The source evaluates the update modes on benchmark circuits of about a
  thousand logic blocks and more, with a software model. The default 4 x 4 array holds 16
  LEs. `ROWS` and `COLS` are parameters, but only the 4 x 4 size (and small sub-arrays in
  the PE test) has been simulated.
- **Excluded.** The position-chain scheme that the H-tree replaces is not built.

Every block is tested by its own testbench. Each testbench has been shown to fail when one
deliberate error is put into its block. All the RTL passes Verilator lint and a Yosys
synthesis run without latches, combinational loops or multiple drivers. The remaining
Verilator warnings are unused signals: status outputs and debug counters that the top
does not use. No FPGA timing closure has been attempted, so the 200 MHz target of the
source design is not claimed.
