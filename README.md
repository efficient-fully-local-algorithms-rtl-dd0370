# FLGS: a fully local scheduler for a combined input/output queued switch

This is synthesizable SystemVerilog for an N×N cell switch with a crossbar fabric.
Cells queue both at the inputs and at the outputs (a CIOQ switch). The fabric is
scheduled by **FLGS** ("fully local Gale-Shapley"). In every scheduling phase the
switch computes a *stable marriage* between inputs and outputs. Each port builds its
preference list from its own state alone. The only information that passes between
ports is Gale-Shapley's requests, grants and accepts, plus one "I have cells for you"
bit per (input, output) pair.

With two scheduling phases per time slot (speedup 2), the switch **exactly emulates
an output-queued (OQ) switch**. Every cell leaves in the same slot, and from the same
output, as it would from an ideal OQ switch whose outputs run the same scheduling
policy. This holds for every *port-ordered* output policy, including strict priority
and weighted round robin between input ports. The RTL is parameterised and defaults to
a 32×32 switch at speedup 2.

## Time slot

A time slot is a fixed sequence of phases, driven by `flgs_ctrl`:

| phase | cycles | what happens |
|---|---|---|
| arrival | 1 | at most one cell enters each input (`arr_ready` is high) |
| scheduling phase, repeated *s* times | 1 + R + 1 | freeze the preference lists and start the matcher, run R Gale-Shapley rounds, then move one cell per matched pair across the crossbar |
| departure | 1 | at most one cell leaves each output (`slot_done`, `dep_valid`) |

R is the number of proposal rounds plus one final round with no request. It depends on
the data: it is 2 when no output refuses anyone, and it is bounded by N²+1. The slot
length in clock cycles therefore varies. The switch paces itself, and the traffic side
simply waits for `arr_ready`.

The speedup is the ratio `SPEEDUP_NUM/SPEEDUP_DEN`. An accumulator adds `SPEEDUP_NUM`
every slot and pays `SPEEDUP_DEN` per scheduling phase. Speedup 2/1 gives two phases in
every slot. Speedup 6/5 (1.2) gives one phase in four slots of every five and two phases
in the fifth. Emulation is guaranteed only at speedup 2. Lower speedups are there to
measure how closely the switch tracks an OQ switch.

## The two preference lists (the heart of the design)

**Inputs: GBVOQ ("group by VOQ"), `gbvoq_list`.** An input keeps an ordered list of
its non-empty virtual output queues:

- a VOQ that receives a cell while empty goes to the *front*;
- a VOQ emptied by a transfer is removed;
- nothing else changes the order.

The list is the input's preference list, so the most recently populated VOQ is
preferred. This looks backwards, but it makes the list order equal to the order of the
head cells' *input thread*: how many cells are ahead of that cell at its input. The
list is stored as one rank per VOQ. An insert adds one to every listed rank; a delete
subtracts one from the ranks behind the deleted entry.

**Outputs: LOCAL-PORT-ORDER, `local_port_order`.** An output ranks the inputs that have
cells for it (the set A). The rank is the order in which each input's VOQ head cell
would leave this output under the output's own policy. The output can work this out
without knowing anything about those cells. It pretends that each requesting input holds
exactly one more cell behind that input's cells already in the VIQ, that inputs outside A
send nothing, and that no more cells arrive. It then replays its policy on that
restricted set. The ranking therefore orders the head cells by their *output cushion*:
how many cells at the output must leave before them.

Replaying the policy cell by cell would be slow, but the two policies here have a closed
form. With q_i the VIQ size of input i, input i must send n_i = q_i + 1 cells. Under
weighted round robin the inputs take turns in list order, and input i finishes in turn

```
T_i = 1                                      if n_i <= credit_i
T_i = 1 + ceil((n_i - credit_i) / weight_i)  otherwise
```

The list sorts A by (T_i, list position). Under strict priority every T_i is 1, so the
list is A in static priority order. Plain round robin (all weights 1) therefore orders
inputs by *increasing* VIQ size, with ties broken by list position. Each rank is a count
of how many requesting inputs sort before this one, which takes N² comparators per output.

**Why speedup 2 suffices (sketch).** Give each cell a *slackness*: its output cushion
minus its input thread. A stable matching over these two lists raises the slackness of
every cell still at an input by at least one in each scheduling phase. An arrival lowers
it by at most one, and so does a departure. With two phases per slot, the slackness never
falls, and it is at least zero after the first phase. A cell whose departure slot has
come then has input thread and output cushion both zero. Its VOQ is at the head of both
its input's and its output's list, so any stable matching transfers it in time.

## Output policies: `port_order_sched`

Each output keeps a strict order of the inputs (`pos`, 0 = highest) and sends the oldest
cell of the highest-priority non-empty VIQ. The order may change only when a cell
departs, and only by moving that cell's input down. This is what "port-ordered" means,
and it is what makes LOCAL-PORT-ORDER possible. Each output has its own policy:

- **strict priority** (`POL_SP`): the configured order never changes;
- **weighted round robin** (`POL_WRR`): each input holds a credit loaded with its
  weight. Each cell sent spends one credit of its input. When the credit reaches zero,
  the input moves to the bottom of the order and its credit is reloaded. All weights 1
  gives round robin.

The configuration is loaded from `cfg_mode`, `cfg_pos` and `cfg_weight` while `rst` is
high. `cfg_pos[x]` must be a permutation of 0..N-1.

## Stable matching: `gs_matcher`

This is input-proposing Gale-Shapley, one round per clock:

1. every unmatched input requests its best acceptable output that has not yet refused it;
2. every output keeps the best of its new requesters and its current partner, and
   refuses the rest;
3. a dropped partner becomes unmatched.

The pair (i, x) is acceptable when VOQ(i,x) is non-empty and VIQ(i,x) has room. The run
ends after the first round with no request. The result is the input-optimal stable
matching for the given lists. The emulation argument holds for any stable matching, so
which side proposes does not matter for correctness.

## Modules

```
cioq_switch                top: N input ports, matcher, crossbar, N output ports, sequencer
├── flgs_ctrl              slot sequencer and fractional-speedup accumulator
├── input_port  (×N)       VOQs + GBVOQ list
│   ├── queue_bank         N FIFOs in one array (the VOQs)
│   └── gbvoq_list
├── gs_matcher             Gale-Shapley rounds
├── crossbar               one N:1 multiplexer per output
└── output_port (×N)       VIQs + output policy + output preference list
    ├── queue_bank         (the VIQs)
    ├── port_order_sched
    └── local_port_order
flgs_pkg                   default sizes, policy_e, phase_e
```

## Parameters

| parameter | default | origin |
|---|---|---|
| `N` | 32 | port count of the 32×32 weighted-round-robin evaluation |
| `SPEEDUP_NUM/SPEEDUP_DEN` | 2/1 | speedup at which emulation is guaranteed |
| `DEPTH` | 64 | cells per VOQ and per VIQ; design choice (the algorithm assumes unbounded queues) |
| `DATA_W` | 16 | cell payload bits; design choice |
| `W_W` | 4 | weight/credit bits; design choice (the evaluated weights are 1..4) |

## Top-level interface (`cioq_switch`)

- `arr_ready`: high in the single arrival cycle of a slot. In that cycle `arr_valid[i]`,
  `arr_dst[i]` and `arr_data[i]` are sampled.
- `arr_drop[i]`: combinational in the same cycle. It marks a cell refused because its VOQ
  is full.
- `dep_valid[x]`, `dep_src[x]` and `dep_data[x]`: the departing cell and the input it came
  from. They are valid in the departure cycle, which is also `slot_done`.
- `cfg_*`: output policies, loaded during reset.
- `rst`: synchronous and active high.

## Where this RTL goes beyond, or differs from, the algorithm

- **Finite queues.** The algorithm assumes unbounded VOQs and VIQs; here both hold `DEPTH`
  cells. A cell arriving at a full VOQ is dropped and flagged. A full VIQ makes its pair
  unacceptable to the matcher. This back-pressure is outside the emulation argument:
  exact emulation is guaranteed only while no queue fills.
- **Round robin order.** One prose summary of the output rule says round robin sorts
  inputs by *decreasing* VIQ size. Replaying the policy, which is how the rule is defined,
  gives *increasing* order, and that is what is built. The unit testbench compares the
  closed form with a literal replay.
- **WRR mechanism.** The evaluated weights are given, but not how weighted round robin
  works. The credit-and-rotate list above is one port-ordered realisation.
- **Policies provided.** Only strict priority and weighted round robin (which includes
  plain round robin) are built, one of them per output. Other port-ordered policies, such
  as weighted fair queueing between ports or strict priority between groups of
  round-robin inputs, would need their own `port_order_sched` and closed form in
  `local_port_order`. FIFO output scheduling is not port-ordered, and FLGS cannot emulate it.
- **Fractional speedups** use the accumulator described above. The formal model only
  defines integer speedups.
- **Timing.** Matching, preference computation and rank updates are single-cycle
  combinational networks: N² comparators per output list, and an N×N request/grant
  network in the matcher. No pipelining or timing closure has been attempted. Synthesis
  sizes at N = 32 are not available.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | checks |
|---|---|
| `tb_queue_bank` | random enqueue/dequeue against reference FIFOs, drop flag, counts |
| `tb_gbvoq_list` | ranks against an explicit front-insert list |
| `tb_input_port` | VOQ contents, drops, request bits, GBVOQ ranks |
| `tb_local_port_order` | closed form against a step-by-step replay of the policy (SP and WRR) |
| `tb_port_order_sched` | selected input, order and credits against an explicit list model |
| `tb_gs_matcher` | equality with a sequential Gale-Shapley, no blocking pair, round bound |
| `tb_crossbar` | random permutations |
| `tb_output_port` | departures, `viq_full` and preference ranks against a replay |
| `tb_flgs_ctrl` | phase order; 2 phases per slot at 2/1, and 1,1,1,1,2 at 6/5 |
| `tb_cioq_switch` | 4×4, depth 8: 600 slots of random traffic at load 0.9 compared cell by cell with an OQ reference (mixed SP/WRR outputs), then 80 slots of overload and a drain. It also requires each mechanism to occur: GBVOQ insert and delete, matcher refusals, second phase, WRR rotation, SP departure, VOQ drop, VIQ back-pressure |
| `tb_cioq_full` | default 32×32 switch, 2000 slots of diagonal WRR traffic at load 0.95, exact emulation |
| `tb_wrr_workload` | 32×32, load 0.999, speedup 2 (exact emulation) and 1.2 (order and latency report) |
| `tb_sp_workload` | 10×10 strict priority, loads 0.95 and 0.999, speedups 2 and 1.2 |

`tb/cioq_env.sv` is the shared traffic generator and OQ reference. It offers "diagonal"
traffic: input i sends to outputs i, i+1, i+2 and i+3 at 0.1, 0.2, 0.3 and 0.35 (or 0.399)
cells per slot. The results at speedup 2:

- every run matched the OQ switch, with zero differing departures;
- no cell was refused with the default 64-cell queues, at 32×32 or at 10×10, at load
  0.95 or at load 0.999.

At speedup 1.2 the high-priority classes stay within a fraction of a slot of the OQ
latencies, and the extra delay falls on the lowest class. In the 10×10 strict-priority
run at load 0.999 over 2000 slots, class 4 waited about 112 slots against about 11 in the
OQ switch. Full VOQs refused 620 of 19970 cells. With 16-cell queues, even speedup 2 at
load 0.999 refused a few cells, which is why the default depth is 64.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cioq_switch \
  -y rtl -y tb +libext+.sv -Irtl rtl/flgs_pkg.sv tb/tb_cioq_switch.sv -o sim
./obj_dir/sim
```

The 32×32 runs simulate about 130 slots per second. The longest runs here were
2000 slots at 32×32 and 2000 slots at 10×10, far short of a 100K-slot latency study.
