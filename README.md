# Dynamic contention tracking and loop-aware placement for a tiled dataflow processor

In a tiled dataflow machine such as WaveScalar, an instruction lives in one
processing element (PE) of a large grid, and its result travels to its
consumers over a hierarchical operand network. Where an instruction is placed
therefore decides two things at once: how far its operands travel, and which
other instructions it has to share an ALU with. A compiler can estimate both,
but variable-latency loads (a cache miss moves every dependent instruction's
firing time) make the contention estimate unreliable.

This RTL implements the hardware side of two improvements to hierarchical
instruction placement:

* **Dynamic contention tracking.** Every resident instruction has a
  contention counter in its PE. When the instruction has lost the competition
  for an ALU 20 times, a per-domain **re-locator** computes, for each of the
  eight PEs of the domain, the cost of placing the instruction there (operand
  latency from its producers, operand latency to its consumers, and how busy
  that PE was in the previous cycle) and moves it to the cheapest PE. The new
  location is then announced to every producer and consumer.
* **Loop-aware coarse-grain placement.** Instructions are assigned to domains
  in profiled execution order, 512 per domain. A loop that would straddle the
  end of the current domain, but fits in a domain, starts a fresh domain
  instead, so its hot operand traffic stays inside one domain.

The PEs themselves (pipeline, operand queues, ALUs, instruction store), the
operand networks and the caches are not part of this RTL: the trackers take
the PE's per-cycle issue state as inputs and report moves as outputs.

## Machine organisation assumed by the RTL

| level        | contents                          | operand latency |
|--------------|-----------------------------------|-----------------|
| PE           | 64 instructions, 2 ALUs           | 0 (bypass)      |
| pod          | 2 PEs                             | 1 cycle         |
| half-domain  | 2 pods                            | 2 cycles        |
| domain       | 4 pods = 8 PEs, one re-locator    | 4 cycles        |
| cluster      | 4 domains                         | 7 cycles        |
| grid         | clusters on an (x, y) grid        | 7 + hop count   |

A location (`ehis_pkg::pe_loc_t`, 17 bits) is `{cx, cy, domain, pe}`, where
`pe[0]` is the PE in its pod, `pe[2:1]` the pod and `pe[2]` the half-domain.
`net_latency` turns two locations into the latency of the table; the hop count
between clusters is taken as the Manhattan distance of their grid positions,
and an operand between two instructions of the same PE costs 0.

## How contention is counted (`contention_tracker`)

One tracker per PE. Each of the 64 slots holds

* a 5-bit contention counter,
* the instruction's relocation record (`inst_rec_t`): its 16-bit static
  instruction number and up to 2 producers and 4 consumers, each as
  (valid, instruction number, location).

Every cycle the PE supplies three 64-bit vectors: `rdy` (has its operands and
wants an ALU), `fire` (issued this cycle, at most `ALUS`) and `new_rdy`
(became ready this cycle). An instruction **contends** in a cycle in which all
ALUs issued and it was ready but not issued; its counter then increments, and
`conflicts` reports how many did. When a counter reaches `THRESHOLD` (20) the
instruction is relocation-pending; its counter holds until the re-locator
answers, and the lowest pending slot is offered on a valid/ready request
carrying the record. The answer (`done_*`) removes the instruction if it moved
and clears its counter either way.

`ready_cnt` is the number of resident instructions that became ready in the
*previous* cycle (the count is registered), which is the re-locator's measure
of how crowded a PE is.

The tracker also keeps its records current: on every announcement (`upd`) any
producer or consumer entry with the announced instruction number takes the new
location. A relocated instruction is written into the lowest free slot
(`ins_*`), and the chosen slot is reported on `moved_in_*` in the same cycle so
the PE can install the instruction there. `ld_*` writes an instruction into a
given slot when it is first brought onto the PE.

## How the re-locator decides (`dynamic_relocator`)

One per domain. It serves one request at a time, round-robin over the PEs.
When it accepts a request it also stores the eight `ready_cnt` values of that
cycle. It then evaluates one candidate PE per clock, starting with the
instruction's own PE and wrapping round the domain:

    cost(p) = sum over producers  latency(producer, p)
            + CONT_WEIGHT * ready_cnt[p]
            + sum over consumers  latency(p, consumer)

A candidate replaces the running best only if it is **strictly** cheaper and
has a free slot, so the instruction stays unless another PE is strictly better,
and a full PE is never chosen. Producers and consumers outside the domain still
count (7 cycles or more), which is why an instruction is never moved out of its
domain: the re-locator only considers PEs of its own domain.

Timing, counted in clock edges after the edge that accepts the request:

| outcome | `done_valid` visible after edge | also in that cycle |
|---------|--------------------------------|--------------------|
| stays   | `NPE` (8)                      | `done_moved = 0`   |
| moves   | `NPE + RELOC_PENALTY` (28)     | `done_moved = 1`, `ins_valid` to the new PE, `upd_out` announcement |

The 20-cycle penalty stands for moving the instruction and telling its
producers and consumers where it went; it is spent between decision and move.
If the chosen PE has lost its free slot by then, the instruction stays. The
re-locator accepts its next request one cycle after `done_valid`.

`dec_valid`, `dec_moved`, `dec_from`, `dec_to` and `dec_cost` report each
decision for observation.

## One domain, one cluster (`relocation_domain`, `ehis_cluster`)

`relocation_domain` wires eight trackers to one re-locator. `ehis_cluster` is
the top: four domains, whose announcement buses plus one bus from outside the
cluster (`upd_ext`) are heard by every tracker of the cluster, so producers
and consumers in other domains learn a new location in the cycle it is
announced. `upd_out` carries the cluster's own announcements outward. The
PE side of each tracker is brought out as arrays indexed `[domain][pe]`.

The cluster also contains the loop-aware assigner. It shares no signals with
the relocation hardware: it decides ahead of execution which domain an
instruction is loaded into (the `ld_*` ports of that domain), while contention
tracking refines the PE inside the domain at run time.

## Loop-aware domain assignment (`loop_aware_assigner`)

Inputs, at most one instruction per cycle in profiled execution order:
`in_valid`, `in_loop_head` (first instruction of a loop) and `in_loop_size`
(the loop's static size S_loop). The unit keeps the current domain and its
occupancy S_curr and, one cycle later, outputs the domain given to the
instruction. The rule at a loop head, with S_max = 512:

| condition                          | action                      |
|------------------------------------|-----------------------------|
| S_loop <= S_max - S_curr           | fits: stay in this domain   |
| S_max - S_curr < S_loop <= S_max   | open a new domain for it    |
| S_loop > S_max                     | cannot fit anywhere: stay   |

Independently, a full domain (S_curr = S_max) rolls over to the next.
`loop_aware_en = 0` turns the loop rule off, leaving plain sequential fill;
`out_loop_split_avoided` marks instructions for which the loop rule opened a
domain. A loop of exactly S_max instructions, which the rule's three cases do
not cover, opens a new domain here.

## Parameters

| parameter       | default | meaning |
|-----------------|---------|---------|
| `NUM_DOMAINS`   | 4       | domains per cluster |
| `NPE`           | 8       | PEs per domain |
| `NSLOT`         | 64      | instructions per PE |
| `ALUS`          | 2       | ALUs per PE |
| `THRESHOLD`     | 20      | contentions before a relocation request |
| `RELOC_PENALTY` | 20      | cycles from decision to move |
| `S_MAX`         | 512     | instructions per domain for coarse placement |
| `CONT_WEIGHT`   | 1       | weight of the ready count in the cost (re-locator only) |

Field widths (`INST_ID_W` = 16, `NSRC` = 2, `NSNK` = 4, cluster coordinates 4
bits each, cost 12 bits) are in `ehis_pkg`. The PE-location encoding relies on
`NPE` = 8 and four domains; the other values may be changed.

## Where this design makes its own choices

The organisation, latencies, sizes, threshold, penalty, cost function and the
loop rule are those of the scheme being implemented. The following are choices
of this RTL, to be revisited if the surrounding machine differs:

* what counts as contention (ready, not issued, all ALUs busy);
* the contention term is the previous cycle's count of newly ready
  instructions in the candidate PE, with weight 1;
* a fixed number of producers (2) and consumers (4) per instruction record;
  an instruction with more peers needs larger `NSRC`/`NSNK`;
* one candidate per cycle, round-robin service, penalty placed before the move;
* the counter is cleared also when the instruction stays, so a persistently
  contending instruction asks again every `THRESHOLD` contentions;
* announcements are a broadcast of (instruction number, new location) that
  every tracker compares against all its entries, a simple but wide structure
  (64 slots x 6 entries x 5 buses per PE);
* asynchronous active-low reset of all state;
* the inter-domain latency is 7 cycles end to end. The cluster switch itself
  is described as a 4-cycle switch; the 7 cycles include getting into and out
  of it, and are the figure the cost function uses;
* the crowdedness of a PE is kept as one count per PE, not as a per-instruction
  record of which instructions were ready. The cost function only needs the
  count, and the count is far smaller.

The rule that a relocation's penalty is partly hidden when the next operand
for the moved instruction arrives late belongs to the PE's message timing and
is not modelled. The coarse-grain rule is applied at a loop's first
instruction only.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `net_latency_tb` | all PE pairs of a cluster and random pairs across clusters against a reference |
| `contention_tracker_tb` | 6000 random cycles against a cycle-accurate model: counters, requests, ready counts, inserts, announcements |
| `dynamic_relocator_tb` | 300 trials of random requests: round-robin order, least-cost choice, full PEs skipped, snapshot of ready counts, decision and move cycles |
| `loop_aware_assigner_tb` | a loop at a domain boundary with and without loop awareness, then 20000 random instructions against a model |
| `relocation_domain_tb` | one domain: a contending instruction moves, its consumer learns the new location, another stays and asks again |
| `ehis_cluster_tb` | whole cluster at default size: a move that has to skip a full PE, a stay, announcements across domains and from outside, and the loop-placement cases; each mechanism is counted |

Two further testbenches run workloads rather than corner cases:

| testbench | what it runs |
|-----------|--------------|
| `eembc_placement_tb` | ten programs with the static sizes of the EEMBC kernels (11856 to 21412 instructions), each with a generated mix of straight-line code and loops of 8 to 700 instructions, placed with and without loop awareness and checked instruction by instruction against a model. With loop awareness no loop that fits a domain is split; the sequential fill splits many, and uses ceil(N/512) domains |
| `contention_workload_tb` | two default-size domains given the same unbalanced load (12 frequently firing instructions on PE 0), one with threshold 20 and one whose threshold is never reached. Over 6000 cycles the tracked domain moves instructions off PE 0 and has about 1300 ALU conflicts against about 33000 for the static placement. The PEs are modelled in the testbench, and the instructions have no producers or consumers, so only the contention term of the cost acts |

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert --top-module ehis_cluster_tb \
        rtl/ehis_pkg.sv rtl/net_latency.sv rtl/contention_tracker.sv \
        rtl/dynamic_relocator.sv rtl/relocation_domain.sv \
        rtl/loop_aware_assigner.sv rtl/ehis_cluster.sv tb/ehis_cluster_tb.sv
    ./obj_dir/Vehis_cluster_tb

The package comes first; the other block testbenches need only their module
and the modules below it.

The cluster testbench runs at the default parameters in well under a second.
Assertions check the handshake rules: a PE never issues more than `ALUS`
instructions or an instruction that is not ready, the re-locator grants one
requester at a time, and an instruction is only inserted into a PE with a free
slot.
