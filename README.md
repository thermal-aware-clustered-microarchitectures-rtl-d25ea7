# Thermal-aware control for a four-cluster back end

A clustered superscalar core splits its out-of-order back end into several
clusters. Each cluster has its own issue queues, register file and data cache.
A steering unit decides which cluster each micro-op goes to. Two things can be
done with that freedom to keep the chip cool:

* **Steer by temperature.** Send work away from a cluster that has become
  clearly hotter than the others. This lowers the peak temperature, and so the
  cost of the cooling system.
* **Hop between clusters.** Switch off (Vdd-gate) part of the back end and move
  the switched-off position around over time. A gated cluster uses neither
  dynamic nor leakage power and cools down. Leakage grows with temperature, so
  the average temperature and the leakage both fall.

This RTL puts both together in the combination that balances leakage,
temperature and speed best: **T-Thermal steering with 1dis-rot hopping**. Three
of the four clusters run at any time. The gated cluster changes every interval
of 10 million retired instructions and moves clockwise round the 2x2 square.
Each micro-op goes to a cluster that is more than a threshold colder than the
others if there is one. Otherwise it goes to the cluster that already holds its
source operands.

The scheme follows the published thermal-aware clustered microarchitecture
proposal by Chaparro, González and González. That proposal describes the
policies and reports their effect. The logic that implements them here
(encodings, handshakes, the order of a hop, widths) is this design's own. The
sections below say which is which.

## Floor plan and numbering

The four clusters sit in a 2x2 square and are numbered clockwise:

```
  +---+---+
  | 0 | 1 |
  +---+---+
  | 3 | 2 |
  +---+---+
```

With this numbering, cluster `k` is next to `k±1 (mod 4)` and diagonal to
`k+2`. A value sent to a neighbour takes one hop on the point-to-point network.
A value sent across the diagonal takes two. The numbering is this design's
choice. Everything that depends on position is written in terms of it: the
rotation order and "nearest cluster" for register copies.

## Block structure

```
 retired ─► interval_counter ──interval_end──┬──► sensor_sampler ◄── sensor codes
                                             │          │ temp[4]
                                             ▼          ▼
 release_ ─► cluster_resources x4 ──free──► steering_unit ◄── uops[8]
                 ▲        │ empty             │  ▲   │ accept / cluster / remote / stall
                 │ gate   ▼                   │  │   ▼
                 └──── hop_controller ──steer_mask   loc table
                        │  copy_start / done     │
                        ▼                        │
                     copy_uop_gen ──loc_set──────┘──► copy micro-ops
```

| module | role |
|---|---|
| `tac_pkg` | shared types: micro-op, copy micro-op, resource counts, policy enum; constants |
| `interval_counter` | counts retired instructions, pulses `interval_end` every `INTERVAL` |
| `sensor_sampler` | reads each cluster's sensors at `interval_end`; keeps the hottest (or the mean) |
| `steering_unit` | orders the clusters per micro-op, checks room, chooses, keeps the register location table |
| `hop_controller` | steps through the active-cluster pattern and sequences each change |
| `copy_uop_gen` | before gating, copies out register values that live only in the leaving cluster |
| `cluster_resources` | free-entry counters of one cluster's queues and register files |
| `tac_top` | wires all of the above for four clusters |

The front end, the back-end queues, register files, caches and interconnect are
outside this RTL. They connect through the top's ports:

* micro-ops come in;
* steering decisions and copy micro-ops go out;
* the back ends report freed entries on `release_`;
* the back ends obey `powered` and `gate`.

## Steering (the hard part)

### The ordering rule

For each micro-op, the steering unit compares every pair of active clusters
`i` and `j`. With the default policy, **T-Thermal**:

1. If `|T_i − T_j| > THRESH`, the colder one wins.
2. Otherwise the one holding more of the micro-op's source operands wins. It
   has the value of 0, 1 or 2 sources in its register file.
3. Otherwise the one with fewer queue entries in use wins.
4. Otherwise the lower index wins.

Rules 1 and 2 are the policy. Rules 3 and 4 are this design's tie-break.

The pairwise rule is not transitive. For example, A may be much colder than C
while B holds the operands and is close in temperature to both. So the unit does
not sort. It gives each active cluster a **score**: the number of other active
clusters it beats. The micro-op goes to the cluster with the highest score among
those that have room. Room means:

* a free entry in the queue the micro-op needs (integer, FP or memory);
* if it writes a register, a free register of that kind.

Ties in score go to the lower index. Where the rule happens to be a total
order, this is exactly "sort, then take the first cluster with room".

The choice is made in a single cycle. In the evaluated core, fetch, decode and
steering together take 12 pipeline cycles and dispatch takes 10. Those stages
belong to the surrounding front end and back end, and this unit can be
pipelined into them.

The temperatures change only once per interval. Within an interval, steering is
driven by operand location and occupancy. At an interval end, a cluster that
has become clearly colder (typically the one that has just woken from gating)
draws the work.

`POLICY` selects three other rules the same scheme proposes. Each is tested but
is not the default:

| `POLICY` | rule |
|---|---|
| `POL_COLD` | the colder cluster wins (the plain coldest-first order) |
| `POL_T_COLD` | coldest-first, but clusters reachable from the coldest only by a temperature step larger than `THRESH` are not used |
| `POL_T_WLOAD` | with `H` the hotter and `C` the colder cluster and `d` their difference: if `occ(H)·(1 + d/IT_ONE) > occ(C)`, `C` wins; otherwise the operand holder wins |

The imbalance factor `1 + d/IT_ONE` for T-Wload is this design's reading of
"a function of the temperature difference".

### Eight micro-ops per cycle

Up to `WIDTH` = 8 micro-ops arrive per cycle in program order. They are steered
one after another through a single combinational chain, and each micro-op sees
what the earlier ones in its group did:

* **Free counts.** Counts are reduced as the group proceeds. Two micro-ops never
  take the last entry of a queue.
* **Location table.** A destination is recorded as living only in its chosen
  cluster. A source read from another cluster is flagged in `remote[s][k]`. The
  baseline core's inter-cluster copy brings that value over, and from then on
  the value is held in both clusters.

Steering is in order. The first valid micro-op that fits nowhere is not
accepted, and neither is any micro-op after it in the group. `stall` rises and
the front end presents those micro-ops again in the next cycle. `accept` is
therefore always a prefix of the valid micro-ops.

### Register location table

The table has one 4-bit holder mask per logical register (32 registers). It is
updated at each clock edge in this order:

1. Gated clusters are removed (`loc_clear`).
2. A completed copy micro-op adds its destination as a holder (`loc_set_*`).
3. The steering results of the cycle are applied, micro-op by micro-op.

A destination write in the same cycle overrides a copy of the older value.
After reset, every register is held by the clusters that are powered at reset.

## Cluster hopping

`hop_controller` cycles through a four-step pattern of active-cluster masks.
The default, **1dis-rot**, is `1110 → 1101 → 1011 → 0111`. Exactly one cluster
is off, and the off position moves clockwise 0 → 1 → 2 → 3. `PATTERN` accepts
any other four-step pattern. The other patterns the scheme describes
(2dis-rot, 2dis-dia, 2dis-alt, 3dis-rot) were not built or checked here.

A change runs in four steps. The order and both delays are this design's
choices.

1. **Interval end.** The next mask is taken.
   * The leaving cluster stops receiving micro-ops at once.
   * The joining cluster is powered up (`powered` rises).
   * `phase` advances.
2. **Wake**, `WAKE_CYCLES` (64). The joining cluster settles. After this it
   may receive micro-ops.
3. **Copy.** `copy_uop_gen` walks the location table, one register per cycle.
   Some registers have their latest value only in leaving clusters. For each,
   it emits a copy micro-op `{lreg, src, dst}` into the leaving cluster's copy
   queue. `dst` is the nearest staying cluster: the clockwise neighbour, else
   the anticlockwise one, else the diagonal. A copy waits while the source
   cluster's copy queue is full or `copy_ready` is low.
4. **Drain.** The controller waits until the leaving cluster's queues are empty,
   then `SETTLE_CYCLES` (8) more for values in flight. Then it pulses `gate`
   for that cluster and drops `powered`. The `gate` pulse does three things:
   * resets the cluster's free counts;
   * removes the cluster from the location table;
   * serves as the invalidate signal for the cluster's data cache and data TLB.

   The caches are write-through, so nothing is lost by invalidating them.

An interval end that arrives during a change is held and starts the next
change as soon as this one is done. Changes happen only once every 10 million
instructions, so their cost in cycles does not matter.

## Temperature input

Each cluster has `SPC` (8) sensor inputs of 8 bits, at 0.5 °C per step. At each
`interval_end`, `sensor_sampler` stores per cluster:

* the **hottest** sensor reading (`AGG_MAX = 1`, the default). Steering on peak
  temperature works better than steering on the average;
* or their **mean** (`AGG_MAX = 0`).

The stored value is used for the whole next interval. At reset every cluster
reads 63 °C (code 126), the temperature of a core that has been running for a
while. The sensors themselves are analog and not part of this RTL.

## Top-level interface (`tac_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `retired[3:0]` | in | instructions retired this cycle (0–8) |
| `sensor[4][SPC][8]` | in | sensor codes per cluster |
| `uops[8]` (`uop_t`) | in | valid, queue class, two sources, destination kind and register |
| `accept[8]`, `cluster[8][2]`, `remote[8][2]`, `stall` | out | steering result, combinational in the same cycle |
| `copy_valid`, `copy_ready`, `copy` (`copy_uop_t`) | out/in/out | copy micro-ops before gating |
| `release_[4]` (`res_delta_t`) | in | entries freed per cluster this cycle |
| `free[4]` (`res_t`) | out | free entries per cluster |
| `powered[4]`, `steer_mask[4]`, `gate[4]` | out | Vdd enable, may receive micro-ops, one-cycle gating pulse |
| `temp[4][8]` | out | sampled temperatures |
| `interval_end`, `hop_busy`, `phase`, `icount`, `intervals`, `hops`, `copy_busy` | out | status and statistics |

Timing:

* Steering decisions are combinational, from registered state, in the cycle the
  micro-ops are presented.
* Table and counter updates take effect at the next rising edge.
* `interval_end` comes one cycle after the instruction count crosses the
  boundary.
* The temperatures change one cycle after `interval_end`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `WIDTH` | 8 | dispatch width of the evaluated core |
| `INTERVAL` | 10,000,000 | control interval of the scheme |
| queue sizes | int 20, FP 20, copy 20, memory 96 | evaluated core |
| register files | 160 int, 160 FP | evaluated core |
| `POLICY` | `POL_T_THERMAL` | the best steering policy of the scheme |
| `PATTERN` | 1dis-rot | the best hopping pattern of the scheme |
| `THRESH` | 4 codes = 2 °C | own choice; not specified by the scheme |
| `IT_ONE` | 16 | own choice (T-Wload imbalance factor) |
| `SPC` | 8 sensors per cluster | own choice (the chip has 47 sensors in total) |
| `WAKE_CYCLES`, `SETTLE_CYCLES` | 64, 8 | own choice |
| `NUM_LREGS` (package) | 32 | own choice |
| temperature code | 8 bits, 0.5 °C | own choice |

## What to trust, and what is left out

These parts follow the scheme closely:

* the four steering rules and their use of temperature and operand location;
* steering only to clusters with queue and register room;
* the 1dis-rot rotation every 10M instructions;
* copying only registers with no copy in a staying cluster, to the nearest
  cluster;
* losing the data cache and data TLB contents on gating;
* all sizes taken from the evaluated core.

These are this design's own choices, where the scheme is silent:

* the scoring used in place of a sort, and the tie-breaks;
* the threshold value;
* the order and delays of a change, and holding an interval end that arrives
  mid-change;
* the in-order stall rule;
* the location-table update order;
* the numbering of the clusters;
* the widths.

This RTL does not contain:

* the front end;
* the back-end datapaths: queues, register files, execution units, memory
  order buffer, data caches and TLBs;
* the buses and point-to-point links;
* the power switches;
* the sensors;
* the copies made for ordinary remote operands.

Those belong to the baseline clustered core and are described in the scheme
only by their sizes. The top's ports are where they would attach.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog. Each needs only
`rtl/` and `tb/`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/tac_pkg.sv \
          tb/tb_tac_top.sv --top-module tb_tac_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

| testbench | what it checks |
|---|---|
| `tb_interval_counter` | count and pulse against an exact model, random retire widths |
| `tb_sensor_sampler` | reset value, hold between samples, max and mean reductions |
| `tb_cluster_resources` | six counters against a model, clear on gating, empty flag |
| `tb_copy_uop_gen` | copy list against an independent nearest-cluster model, back-pressure, walk length |
| `tb_hop_controller` | clockwise rotation, step timing, drain before gate, held interval end |
| `tb_steering_unit` | hand-worked T-Thermal cases; 3,000 random 8-wide groups against a reference model; Cold, T-Cold and T-Wload cases |
| `tb_tac_top` | the whole control with a 2,000-instruction interval, 12 hops, a back-end and temperature model |
| `tb_tac_top_full` | the same bench at the full default size, two 10M-instruction intervals (about 2.5 M cycles, tens of seconds) |

### End-to-end benches

`tb_tac_top` and `tb_tac_top_full` use a model of the back end and of
temperature:

* each queue issues at most one micro-op per cycle;
* a powered cluster heats with the work it receives;
* all clusters cool towards ambient.

They check these properties:

* no micro-op goes to a gated cluster;
* the free counts match the bench's own counts;
* the sampled temperatures are the hottest sensor readings;
* clusters are gated in clockwise order, and only after they have drained;
* no register value is lost at gating;
* every copy micro-op goes to an adjacent powered cluster.

They also count how often each mechanism occurs. A mechanism that never occurs
is counted as a failure. The mechanisms are:

* interval ends;
* hops;
* copy micro-ops;
* dispatch stalls;
* remote operands;
* temperature-driven choices;
* operand-driven choices;
* an interval end that arrives during a change.

The reduced bench forces that last case by stretching a few changes. The
full-size run is too short for it.

Real application traces are not included. The micro-op streams are synthetic.
