# An issue/execute cluster that younger instructions cannot slow down

Speculative interference attacks leak a secret without any wrong-path load
touching the cache. A wrong-path instruction that depends on the secret only
has to *delay* an older instruction that will commit anyway, for example by
occupying the integer divider just before an older division needs it. The
older instruction then executes later. Its cache accesses change order, and
that order is visible in the cache state afterwards. Defences that only hide
the cache effects of speculative loads (Delay-on-Miss and similar) do not see
this.

The root cause is a **priority inversion in the scheduler**. Ready
instructions are normally picked oldest-first. Among instructions that are
ready *in the same cycle*, a younger one never wins a resource over an older
one. But a younger instruction that becomes ready *earlier* can take a
multi-cycle resource. The older instruction then finds it busy when it becomes
ready. Only resources that stay allocated for more than one cycle allow this:

* non-pipelined (or partially pipelined) functional units, here the divider;
* MSHR targets, the slots in which loads wait for a line that is being
  fetched.

Single-cycle and fully pipelined units cannot be held against a later, older
instruction, so they need no change.

This RTL implements the two fixes, following the scheme of *"Seeds of SEED:
Preventing Priority Inversion in Instruction Scheduling to Disrupt Speculative
Interference"*:

1. **Pre-allocation for non-pipelined units.** Instructions for non-pipelined
   units issue strictly in program order. An older instruction that is not yet
   ready already blocks every younger one in its queue.
2. **Preemption of MSHR targets.** When an older load needs a target and all
   targets are taken, it takes the target of a younger *speculative* load. The
   younger load is dropped and replayed later. Under Delay-on-Miss, speculative
   loads are replayed anyway, so this adds no new mechanism.

Both fixes sit in `seed_issue_top`, an 8-wide issue/execute cluster (the part
of an out-of-order core between rename and commit).

## Pre-allocation: in-order issue to non-pipelined units

The instruction queue is **partially split**:

* a *main queue* for ALU operations and loads, with normal oldest-ready-first
  select per issue port;
* a *non-pipelined queue* for divisions. Every entry has its pre-allocation
  bit set.

Splitting the queue keeps the in-order rule away from single-cycle work. An ALU
operation never waits behind a division.

The rule is provided in two queue organisations with the same ports
(`IQ_SHIFTING` chooses one for the cluster):

**`age_matrix_iq`**, the default. Entries sit in any slot. A DEPTH x DEPTH bit
matrix records which entry is older than which. A new entry is younger than all
entries present, so allocating it sets one column and clears one row. Each
cycle, every ready entry whose port is free *bids*. Two signals can cancel
entry *j*:

* `cancel_bid[j]`: some older entry on the same port is bidding;
* `cancel_np[j]`: some older valid entry has its **np bit** set, whether it is
  ready or not.

An entry is granted if neither is raised. The np bit is a register written when
the instruction enters the queue. So the cancel ("conflict") line of an entry
is driven by *bid OR np*. In the plain scheduler it is driven by bid alone. With
`PREALLOC = 0` the queue is the plain age-matrix scheduler.

**`shift_queue_iq`**. Entries are kept in program order and collapse towards
slot 0 as instructions issue. The select walks from the oldest entry and grants
each port to the first ready entry that wants it. With pre-allocation, the walk
stops at the first np entry. That entry may still issue; nothing behind it may.

Example (the case the scheme is built around). OLDER and YOUNGER are
divisions, in that program order:

| cycle | OLDER | YOUNGER | plain scheduler | with pre-allocation |
|---|---|---|---|---|
| t   | waits for an operand | ready | YOUNGER starts, divider busy for 65 cycles | YOUNGER cancelled by OLDER's np bit |
| t+1 | ready | ready | OLDER waits about 64 cycles | OLDER starts |
| t+66 | | | | YOUNGER starts |

In the plain scheduler, YOUNGER's readiness, which may depend on a secret,
decides when OLDER runs. With pre-allocation it cannot.

All divisions share one non-pipelined queue, so they are ordered against each
other. With one queue per non-pipelined unit type, types would be ordered only
within their own queue. The cluster has a single non-pipelined unit, so the two
layouts behave the same here. Floating-point divide/square-root units would
attach as further ports of the non-pipelined queue; none are built.

## Preemption: MSHR allocation under Delay-on-Miss

`mshr_file` tracks up to `N_MSHR` outstanding lines, each with up to `N_TGT`
target slots. Each target holds the load's ROB position, its destination
register and its word in the line.

A load is *speculative* if it is not older than `spec_head`. The ROB supplies
`spec_head`: it is the oldest instruction not yet known to be bound to commit.
Ages are compared on ROB positions with one extra wrap bit (`rob_older` in
`seed_pkg`), so comparisons stay correct after the circular ROB wraps around.

For a load that missed in the L1:

| matching MSHR? | load | free target? | outcome |
|---|---|---|---|
| yes | any | yes | becomes a target (a speculative load may coalesce: a hit in an MSHR counts as a hit) |
| yes | any | no, but a younger speculative target exists | the youngest such target is **preempted** and reported for replay; the load takes its slot |
| yes | any | no preemptable target | retry |
| no  | speculative | – | **delayed** (Delay-on-Miss: a speculative load never allocates an MSHR) |
| no  | non-speculative | free MSHR | allocate, request the line |
| no  | non-speculative | none free | retry |

Targets of non-speculative loads are never preempted, nor are targets of loads
older than the requester. "Speculative" is re-evaluated every cycle against
`spec_head`, so a target stops being preemptable once its load becomes
non-speculative.

Every fill is accepted, and the line is kept in a buffer for its MSHR. One
target per cycle is then delivered (written back): the **oldest load among the
targets of all filled MSHRs**. The MSHR is freed after its last target has been
delivered. Loads may still coalesce into an MSHR while it drains.

Oldest-first delivery is an addition made here, in the spirit of preemption.
With delivery in slot order, a load that took a preempted slot could wait behind
younger loads. With one line drained at a time, an older load on another line
would wait for all of them. Either way, the number of younger speculative
targets would still shift the older load's writeback cycle. The interference
test below found the second case before the change (an 18-cycle difference).

## The cluster

```
 dispatch ─┬─> main queue (48) ── 6 ALU ports ──> int_alu x6 ──┐
 (1/cycle) │         └────────── load port ──> AGU ─> L1 lookup ─> hit ────┤
           │                                              └ miss ─> mshr_file ─> fill drain ─┤
           └─> non-pipelined queue (16, np=1) ─> int_divider ───────────────────────────────┤
                                                                                            │
       register file 256x64 + scoreboard  <── 9 writeback ports = wakeup broadcast <────────┘
```

* **Dispatch** takes one renamed `uop_t` per cycle. Divisions go to the
  non-pipelined queue and everything else to the main queue. ALU operations get
  one of the 6 ALU ports round-robin; loads use the single load port. Source
  readiness comes from a scoreboard of pending destination registers.
* **Wakeup/writeback.** Each of the 9 writeback ports (6 ALU, divider, load hit,
  MSHR delivery) writes the register file and broadcasts its tag to both
  queues in the same cycle. There is no bypass network, so a dependent
  instruction issues in the cycle after its producer writes back.
* **Latencies** are counted from the cycle an instruction issues. ALU: written
  back 1 cycle later. Division: 65 cycles later (64 quotient bits, one per
  cycle, plus the done cycle); the divider accepts a new division in its done
  cycle. Load: the address and L1 lookup are in the next cycle, and the L1
  answers one cycle after that (a 2-cycle L1). A hit writes back in that
  cycle. A miss goes to `mshr_file` in that cycle.
* **Replay.** Delayed loads, loads told to retry and preempted loads appear on
  `replay_*`. The load queue outside the cluster sends them to dispatch again,
  delayed ones once they are non-speculative.

### Ports of `seed_issue_top`

| group | signals | meaning |
|---|---|---|
| dispatch | `disp_valid`, `disp_ready`, `disp_uop` | one instruction per cycle |
| speculation | `spec_valid`, `spec_head` | oldest instruction not known to commit |
| L1 | `l1_req_valid/addr` out; `l1_resp_hit/data` in, one cycle later | lookup of the L1 arrays outside |
| next level | `l2_req_valid/line/mshr` out; `fill_valid/mshr/data` in, `fill_ready` out | line requests and 512-bit fills |
| replay | `replay_valid/rob/kind` | load to be sent again: delayed, retry, preempted |
| writeback | `wb_valid/rob/tag/data` [9] | results |
| statistics | `ev_prealloc_hold`, `ev_div_busy_stall`, `ev_coalesce_spec`, `ev_preempt`, `ev_delay`, `ev_retry` | one-cycle event pulses |

All resets are synchronous and active low (`rst_n`). The register file is reset
to zero.

### Parameters

| parameter | default | origin |
|---|---|---|
| issue width (ALU_PORTS + load + divider) | 8 | the 8-wide issue of the evaluated system |
| `ALU_PORTS` | 6 | own choice within the 8 |
| `MAIN_IQ_DEPTH`, `NP_IQ_DEPTH` | 48, 16 | own choice |
| `N_MSHR`, `N_TGT` | 4, 20 | own choice (typical L1 values) |
| `IQ_SHIFTING` | 0 (age matrix) | both organisations are described; neither is preferred |
| data width, registers, ROB id | 64 bit, 256, 8 bits + wrap | own choice (`seed_pkg`) |
| line size, L1 latency | 64 bytes, 2 cycles | the evaluated system |

## What is outside, and what is this design's own

Not part of this RTL: renaming, the reorder buffer (it supplies `spec_head`),
the load queue and its replay logic, the L1 tag and data arrays (32 KiB, 8-way
in the evaluated system), the shared L2 (1 MiB, 16-way, 20 cycles), and
floating-point or other non-pipelined units. Their connections are the
cluster's ports.

The published scheme fixes the policy: the split queue, the np bit driving the
age-matrix conflict line, the stop rule of the shifting queue, and the MSHR
coalescing, delay and preemption rules. Everything else is a choice made here
and could be changed without touching the policy:

* all sizes except the issue width, line size and L1 latency;
* the radix-2 divider;
* the ALU operation set;
* the choice of the youngest preemptable target as victim;
* the "retry" answer when no MSHR or target can be had;
* the fill/drain protocol (one line buffer per MSHR, oldest target first);
* one dispatch per cycle, and no wrong-path flush input.

The evaluation behind the scheme is a full-system simulation of SPEC CPU2006.
In it, in-order non-pipelined issue and target preemption cost no measurable
performance. Forbidding speculative loads from coalescing costs up to 12% on
one benchmark. That alternative is not built. This RTL reproduces the
mechanisms, not those performance figures.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_int_alu` | every operation against a reference, corner and random operands |
| `tb_int_divider` | quotient/remainder against `/` and `%`, division by zero, latency of 65 cycles, busy for the whole operation, back-to-back start |
| `tb_age_matrix_iq`, `tb_shift_queue_iq` | two queues (with and without pre-allocation) against a program-order reference model under 20 000 random cycles; the OLDER/YOUNGER division case |
| `tb_mshr_file` | 2 MSHRs x 3 targets against a reference model of the policy under random misses, frontier moves and fills; every outcome must occur |
| `tb_seed_issue_top` | the whole cluster at its default size: a 250-instruction program whose every result is checked against an in-order interpreter. It covers the latency probes, in-order divisions with a pre-allocation hold, an older load that must preempt one of 20 targets held by younger speculative loads (and is never replayed), delayed speculative misses, MSHR exhaustion, and several ALU ports in one cycle |
| `tb_seed_issue_top_shifting` | the same with `IQ_SHIFTING = 1` |
| `tb_seed_interference` | an interference attack. Two full-size copies run programs that differ only after the speculation frontier. In one, the speculative part is a ready division and 19 loads to the line an older load needs; in the other, it is plain ALU work. All 8 older instructions must write back in the same cycle with the same value in both copies, and both defences must have acted (a pre-allocation hold and a preemption) |

To run one with Verilator (5.x), list the package first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/seed_pkg.sv rtl/age_matrix_iq.sv rtl/shift_queue_iq.sv rtl/int_alu.sv \
  rtl/int_divider.sv rtl/mshr_file.sv rtl/seed_issue_top.sv \
  tb/tb_seed_issue_top.sv --top-module tb_seed_issue_top
./obj_dir/Vtb_seed_issue_top
```

The block tests need only `seed_pkg.sv` and their own module. The full-size
cluster test compiles in about a minute and runs in well under a second of
simulation time (about 2 200 cycles).

The interference test was also run on modified copies. Without the np bit, an
older division wrote back 64 cycles later when the speculative division was
present. Without preemption, the older load wrote back 10 cycles later. With
both, the timing of the 8 older instructions is identical.

Each block also has a fault copy (one deliberate bug) that its testbench
detects.

Limits of what was verified: there is no formal proof of the no-inversion
property. The system tests use a behavioural L1, next level and load queue
written inside the testbench. No wrong-path squash is exercised, because the
cluster has no flush input. The interference test covers one attack pattern
per resource, not all programs. Shared resources outside the cluster (the L1
ports, the next level, the load queue's replay bandwidth) are not analysed.
Replays of preempted, retried or delayed loads go back through dispatch. Both
queues order entries by the time they entered, so a replayed load counts as
younger than everything already queued and can lose the load port for a few
cycles to younger loads, possibly speculative ones. A real core replays from
the load queue by ROB age; ordering the queues by ROB position instead of entry
time is not built.
