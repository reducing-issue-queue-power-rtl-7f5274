# Power-aware FIFO issue queue under feedback control

An out-of-order issue queue burns most of its power in the wakeup and select
loop: every entry compares its source tags with every result broadcast, and
every entry drives a request line into the select logic. Multimedia programs
rarely need all of that. They have soft real-time deadlines: what matters is
that instructions complete at a steady rate, not as fast as possible.

This design does two things:

* **It splits the issue queue into FIFOs.** Only the head of each FIFO can
  request issue. Dependent instructions are placed behind their producers, so
  the instructions that are waiting stay out of arbitration. The number and
  size of the FIFOs change at run time. Whole FIFOs can be switched off, so
  their entries also drop out of wakeup.
* **A feedback loop picks the configuration.** Retired instructions go into a
  small *commit buffer*, which releases them at the application's *Commit Rate
  Target*. The buffer's fill level is the measured quantity:
  * nearly empty: the queue is too small to keep up;
  * well filled: the queue has more resources than the workload needs.

  A PI controller turns the fill error into resize steps.

The scheme was published as "Reducing Issue Queue Power for Multimedia
Applications using a Feedback Control Algorithm". This RTL is an
independent implementation of it. It covers the queue, the commit buffer
and the control loop. It does not include the rest of the out-of-order
processor: front end and rename, reorder buffer, execution units, load/store queue and caches. Those connect through
ports, and behavioural models of them live in the testbenches.

## Modes: the two-stage resizing ladder

There are `log2(NUM_ENTRIES)+1` modes. In mode `m` the queue has
`NUM_ENTRIES >> m` FIFOs. Each FIFO has `2^min(m, log2 MAX_FIFO_SIZE)` entries.
With the defaults (128 entries, FIFO size at most 2):

| mode | FIFOs x size | entries in wakeup | request lines (heads) |
|-----:|-------------:|------------------:|----------------------:|
| 0    | 128 x 1      | 128               | 128 (conventional queue) |
| 1    | 64 x 2       | 128               | 64  |
| 2    | 32 x 2       | 64                | 32  |
| 3    | 16 x 2       | 32                | 16  |
| 4    | 8 x 2        | 16                | 8   |
| 5    | 4 x 2        | 8                 | 4   |
| 6    | 2 x 2        | 4                 | 2   |
| 7    | 1 x 2        | 2                 | 1   |

The ladder has two stages:

* **Stage one** (mode 0 to 1). Each step halves the number of FIFOs and
  doubles their size. All entries stay on, and only arbitration gets cheaper.
* **Stage two** (mode 1 and up). The FIFO size has reached its maximum. Each
  step switches off half of the remaining FIFOs, which saves wakeup and
  arbitration power.

Mode 0 behaves exactly like a conventional queue with all entries visible.

FIFO `f` of size `S` owns entries `f*S .. f*S+S-1`. It is a circular buffer
with a head pointer and a fill count (`fifo_issue_queue`). Mode `m` and mode
`m+1` use the same entries for FIFO 0, and the low entries stay in use as
FIFOs are switched off.

The queue drives two per-entry enable vectors and their counts:

* `precharge_en` marks the one slot of each active FIFO that currently holds
  its head. Only those request/grant lines are precharged; all others are
  inhibited. `active_fifos` is their number.
* `wakeup_en` marks the entries of active FIFOs, whose tag comparators run.
  `active_entries` is their number.

These are the two terms of the power estimate. Arbitration power scales with
the number of heads. In stage two, wakeup power scales with the entries left
on. The testbenches weigh them 50/50 ("DISTR1", a power-efficient wakeup
design) or 70/30 in favour of wakeup ("DISTR2", a faster, hungrier wakeup
design).

## Placing instructions: dependence steering

`dep_steer` handles up to `DISPATCH_WIDTH` renamed instructions per cycle, in
program order. For each slot it tries, in this order:

1. **A FIFO whose tail produces a pending source.** The FIFO's tail
   instruction must produce one of the slot's pending (not yet ready) source
   operands, and the FIFO must have room. The slot then waits behind its
   producer.
2. **An empty FIFO.**
3. **Stall.** The slot waits, and so does every later slot of the group.

The lowest-numbered eligible FIFO wins. Slots see the placements of earlier
slots in the same group, so a two-instruction chain can go into one 2-entry
FIFO in a single cycle. In mode 0 every FIFO has one entry, so rule 1 never
applies and placement is simply "any free entry".

`disp_accepted` says how many slots were taken. The front end re-presents the
rest next cycle. `disp_chained` counts the slots placed by rule 1.

## Wakeup and select timing

* **Wakeup.** `WB_WIDTH` result tags arrive each cycle on `wb_*`. They set
  the source ready bits of matching entries at the clock edge. Only entries of
  active FIFOs compare; switched-off entries hold nothing and stay quiet.
* **Dispatch-cycle broadcasts.** An instruction written in the same cycle as a
  broadcast of its source also picks the broadcast up. Without this the
  operand would never be marked ready.
* **Select.** A FIFO requests when its head has both operands ready.
  `head_arbiter` grants up to `ISSUE_WIDTH` requests, lowest FIFO index first.
* **Issue.** Granted heads appear on `iss_*` in the same cycle, because select
  is combinational from registered state. They are popped at the clock edge.
* **Earliest issue.** An instruction can issue, at the earliest, in the cycle
  after it was written or after its last operand was broadcast. There is no
  same-cycle wakeup-to-select path.

## The control loop

```
 ROB retire ──> commit buffer ──(rate_target)──> released instructions
                    │ occupancy
             compare_logic  [C_LOW, C_HIGH]
                    │ e(t)
             pi_controller  m = KP*e + (Σe >>> KI_SHIFT)
                    │ m(t)
             reconfig_ctrl  ±1 mode, drain first, hold-off
                    │ mode
             fifo_issue_queue
```

### commit_buffer

The commit buffer holds 20 retired instructions in program order. Up to
`RETIRE_WIDTH` instructions enter per cycle. The reorder buffer must respect
`cb_free`. Assertions check that it does, and that the valid bits are
contiguous.

The drain rate is `rate_target`, an unsigned Q4.8 number (0.5 = `12'h080`,
0.33 = `12'h055`, 2 = `12'h200`):

* A phase accumulator adds the rate every cycle. Its carry is the number of
  instructions due in that cycle.
* If fewer instructions are held than are due, `target_miss` is raised for
  that cycle. The buffer releases what it has, and the shortfall is not owed
  later.
* Only instructions present at the start of the cycle can leave.

### compare_logic

The set-point is an occupancy interval, [3, 8] by default:

| occupancy | error `e(t)` |
|-----------|--------------|
| below `C_LOW` | `C_LOW - occupancy` (positive: more resources needed) |
| above `C_HIGH` | `C_HIGH - occupancy` (negative: resources to spare) |
| inside the interval | 0 |

### pi_controller

The controller is a discrete PI, sampled every cycle. It has no derivative
term.

* **Constants.** The defaults are `KP = 1` and `KI = 1/64`. `KI` is a right
  shift.
* **Integral.** The integral saturates at 16 bits. The reconfiguration
  controller clears it when a new mode takes effect.
* **Anti-windup.** While the queue is at its smallest mode, negative errors
  are not integrated. While it is at its largest mode, positive errors are not
  integrated.

Without anti-windup the integral saturates during a long quiet phase spent in
mode 7. When the target then rises, the queue takes thousands of cycles to
start growing. Without it, the queue of the end-to-end test stayed in the
smallest mode through the whole 8,000-cycle phase at target 2.

### reconfig_ctrl

* **Stepping.** `m >= M_THRESH` (16) moves one mode towards more resources.
  `m <= -M_THRESH` moves one mode towards fewer.
* **Change sequence.** Dispatch is held (`dispatch_hold`) until the queue is
  empty. Then the mode changes, the integral is cleared and `reconfig_pulse`
  fires.
* **Hold-off.** No new change starts for `HOLDOFF` (256) cycles.

With these constants, a full buffer (e = −12) triggers a downward step after
about 85 cycles. An empty one (e = +3) triggers an upward step after about
340 cycles. The drain requirement is asserted inside the queue: the mode may
change only when the queue is empty.

### Behaviour to expect

Integral action drives the *time average* of `e(t)` to zero. Because of the
interval's position, the positive error is at most +3 and the negative error
is as large as −12. Under bursty 8-wide retirement, the buffer therefore ends
up nearly empty for much of the time at high targets. This is visible in the
results below. The published evaluation of the scheme reports misses in under 2% of
cycles, but it used real benchmark instruction streams, which are not
reproduced here.

## Interface of `iq_feedback_top`

Types and widths are in `iq_pkg`:

* `TAG_W = 10` bits of physical tag.
* `ROB_W = 9` bits of reorder-buffer index.
* `RATE_W = 12`, the Q4.8 rate.
* `E_W = 8` and `M_W = 16`, the widths of the signed error and of `m`.

`iq_instr_t` carries:

* `dest` and `dest_valid`;
* `src1` and `src1_rdy`;
* `src2` and `src2_rdy`;
* `rob`.

Rename sets a source's ready bit when the value is already available, and
also for an absent operand.

| group | ports |
|---|---|
| dispatch | `disp_valid[DW]` (contiguous from slot 0), `disp_instr[DW]`, `disp_accepted`, `disp_chained` |
| issue / wakeup | `iss_valid[IW]`, `iss_instr[IW]`, `wb_valid[WB]`, `wb_tag[WB]` |
| retirement | `ret_valid[RW]`, `ret_rob[RW]`, `cb_free` |
| release | `rate_target`, `commit_valid[MAX_DRAIN]`, `commit_rob[MAX_DRAIN]`, `target_miss` |
| observation | `cb_occupancy`, `error`, `m_out`, `pi_integral`, `mode`, `dispatch_hold`, `reconfig_pulse`, `iq_occupancy` |
| power gating | `precharge_en[NUM_ENTRIES]`, `wakeup_en[NUM_ENTRIES]`, and their counts `active_fifos`, `active_entries` |

The design uses a single clock `clk` and a synchronous active-low reset
`rst_n`. Reset empties everything and starts in mode 0, the conventional
queue. The queue's storage array is not reset, because an entry is read only
after it has been written.

Parameters and defaults:

| parameter | default | set by |
|---|---:|---|
| `NUM_ENTRIES` | 128 | published scheme |
| `MAX_FIFO_SIZE` | 2 | published scheme |
| `DISPATCH_WIDTH`, `ISSUE_WIDTH`, `WB_WIDTH`, `RETIRE_WIDTH` | 8 | published scheme ("8 per cycle") |
| `CB_DEPTH` | 20 | published scheme |
| `C_LOW`, `C_HIGH` | 3, 8 | published scheme |
| `MAX_DRAIN` | 8 | own choice |
| `KP`, `KI_SHIFT` | 1, 6 | own choice (the published scheme only asks for small constants) |
| `M_THRESH`, `HOLDOFF` | 16, 256 | own choice |

## What follows the published scheme and what does not

Taken from the published scheme:

* FIFO partitioning with head-only arbitration;
* the two-stage ladder (128x1, then 64x2, then disabling FIFOs down to 1x2);
* placement behind a source producer;
* the 20-entry commit buffer drained at a target rate, and the miss rule;
* the [3, 8] interval and its three-case error;
* a PI controller;
* the widths of 8 and the 128-entry base size.

Choices made here, where the published scheme is silent:

* the entry layout;
* the empty-FIFO fallback and the in-order dispatch stall;
* lowest-index-first select;
* the Q4.8 phase-accumulator drain, with no debt for missed slots;
* back-pressure from the buffer to the reorder buffer;
* every-cycle sampling;
* the controller constants;
* mapping `m` to single steps by a threshold;
* draining the queue before a change;
* the hold-off;
* clearing the integral on a change;
* conditional-integration anti-windup (added after the end-to-end test showed
  windup);
* tag and index widths.

## Verification

Each block has a self-checking testbench in `tb/` that compares against an
independently written model:

| testbench | what it checks |
|---|---|
| `tb_compare_logic` | all occupancies 0..20, intervals [3,8] and [2,6] |
| `tb_pi_controller` | random errors, clears, saturation and both freezes, cycle by cycle |
| `tb_head_arbiter` | random request densities, grant vector and grant list |
| `tb_dep_steer` | every geometry of a 32-entry queue, same-group chaining, stalls |
| `tb_commit_buffer` | rates 0.33/0.5/1/2/8, release order, occupancy, misses, and exactly 100 releases in 200 cycles at rate 0.5 |
| `tb_reconfig_ctrl` | stepping, drain, hold-off, both ends of the mode range |
| `tb_fifo_issue_queue` | 16-entry queue through all five modes against a cycle-accurate reference model, plus the precharge and wakeup enables |
| `tb_iq_feedback_top` | full default size, end to end (below) |
| `tb_rate_targets` | the loop at targets 0.33, 0.5, 1 and 2, for 128- and 32-entry queues |

`tb_iq_feedback_top` runs the unmodified top, about 33,000 cycles, in about
one second. Behavioural models supply the instruction stream, 1/3/12/150-cycle
execution and a 512-entry reorder buffer. The run has three phases:

* target 0.5 with plenty of parallelism: the queue walks from 128x1 down to
  1x2;
* target 2: it grows again;
* target 0.33 with long dependence chains and memory-latency loads.

It checks, every cycle:

* no issue before the operands were broadcast;
* single issue;
* program-order release;
* single-step mode changes, taken only while the queue is empty;
* no dispatch during a drain;
* geometry, enable counts and error against the mode and the interval.

It also requires that each of these happened at least once:

* stage-one and stage-two downsizing;
* upsizing;
* the smallest mode;
* a target miss;
* a full buffer;
* a dispatch stall;
* chained placement;
* a drain hold;
* full-width issue.

Output of `tb_rate_targets` (synthetic stream: 30% of instructions depend on
the previous result; latencies 1/3/12 cycles; 20,000 cycles):

| entries | target | IPC | miss % of cycles | time in 2 smallest modes | DISTR1 saved | DISTR2 saved |
|---:|---:|---:|---:|---:|---:|---:|
| 128 | 0.33 | 0.36 | 0.01 | 93% | 96.8% | 96.4% |
| 128 | 0.5  | 0.50 | 0.47 | 93% | 96.8% | 96.4% |
| 128 | 1    | 0.86 | 13.7 | 92% | 95.7% | 95.1% |
| 128 | 2    | 1.20 | 46.3 | 58% | 94.7% | 94.1% |
| 32  | 0.33 | 0.36 | 0.01 | 96% | 93.6% | 92.7% |
| 32  | 0.5  | 0.50 | 0.39 | 96% | 93.4% | 92.5% |
| 32  | 1    | 0.85 | 14.9 | 92% | 89.4% | 88.0% |
| 32  | 2    | 1.16 | 48.2 | 60% | 85.7% | 83.8% |

How to read the table:

* At the low targets, which six of the ten multimedia programs use, the loop
  saves over 90% of the loop power while missing almost nothing.
* At targets 1 and 2 the error asymmetry described above keeps the queue too
  small for this bursty stream. Tuning `C_LOW`, `C_HIGH`, `KI_SHIFT` and
  `M_THRESH` for the real retirement pattern is left open.

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/iq_pkg.sv tb/tb_iq_feedback_top.sv --top-module tb_iq_feedback_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Each testbench prints
`TB_RESULT checks=N failures=M`. The simulator is two-state: all state that
is read is reset, or written before it is read.

## Limits

* **Synthesis cost.** The steering logic is a sequential search over all FIFOs
  for each of the 8 slots. It is correct but large: a 128-entry queue
  elaborates to tens of thousands of word-level cells. A real implementation
  would keep a producer-to-FIFO table indexed by tag instead of searching the
  tails.
* **Reconfiguration speed.** A mode change waits for the queue to drain. With
  150-cycle memory operations in flight this takes as long as the slowest
  one.
* **Power figures.** The power numbers come from the activity counts
  weighted as above. They are not a circuit-level estimate.
