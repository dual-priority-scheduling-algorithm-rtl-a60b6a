# Dual priority task scheduler for the nMPRA microcontroller

nMPRA is a pipelined MIPS-style microcontroller that runs several hardware
tasks (five here) on one pipeline. Each task owns its program counter and its
register bank. Only the instruction memory, the data memory and the ALU are
shared. Switching tasks is therefore not a context switch. The hardware stops
the old task's PC, hands the shared units to the new task through a
multiplexer, and the new task continues from its own PC. Nothing is saved or
restored, and no critical sections are needed around the switch.

This RTL implements the part that decides *which* task runs and carries out
the switch. That part is a scheduler peripheral with a dual priority algorithm:

- tasks that are newly active run by fixed priority, with preemption;
- tasks that were preempted get a second, lower class;
- tasks that run too long are demoted to a round-robin class.

A switch always takes five clock cycles from the scheduling event to the first
instruction of the new task. The scheduler answers in one cycle.

The pipeline itself is not included. It connects through ports of the top
module, `nmpra_sched_top`.

## The scheduling algorithm

Task *i* has fixed priority *i*, and task 0 is the highest. Every task is in
one of three queues, or running, or idle in low power.

| Queue | Who is in it | How it is served | When it is served |
|---|---|---|---|
| ATQ, active task queue | tasks whose scheduling event arrived | by priority | always first |
| ITQ, interrupted task queue | tasks preempted by a higher-priority task | by priority | only when the ATQ is empty |
| LTQ, long task queue | tasks whose TRB time ran out | round robin, one TRB period each | only when the ATQ and ITQ are empty |

The **TRB** (round-robin timer) is reloaded with a programmable time stamp
every time a task is dispatched. It counts down only while that task actually
executes. When it reaches zero, the task has run too long and is moved to the
LTQ. The same period is the time slice of the round robin among long tasks.

The scheduler has two states.

**Running State.** A task from the active class runs. This means it came from
the ATQ, or it came from the ITQ and so rejoined the active class. In this
state only the ATQ is looked at:

- A new activation of higher priority preempts the running task. The running
  task goes to the ITQ.
- A new activation of lower priority waits in the ATQ.
- When the running task finishes, or its TRB expires, the best ATQ task is
  dispatched at once.
- Only with an empty ATQ does the scheduler fall to the Idle State.

**Idle State.** Nothing runs, or a long task runs.

- The ITQ is served by priority, then the LTQ in ascending task order after
  the last long task served.
- Any activation preempts a long task. A preempted long task stays in the LTQ,
  because its class is fixed by its history, not by its priority.
- A long task that finishes leaves the LTQ. Its next activation puts it back
  in the ATQ.

Two consequences follow directly from these rules. Both are reproduced by the
end-to-end testbench.

- **Priority inversion.** Say task 2 is interrupted by task 1. When task 1
  finishes, task 3 becomes active in the same cycle. Task 3 is in the ATQ, so
  it runs before task 2, which waits in the ITQ.
- **Starvation of the ITQ.** If activations keep the ATQ non-empty, the
  scheduler never leaves the Running State, and an interrupted task waits
  indefinitely. It runs as soon as the ATQ drains.

Choosing the task periods and the TRB time stamp so that the Idle State is
reached regularly avoids both. A system can also be run purely round robin.
If every task's code is an endless loop, every task ends up in the LTQ and
gets one TRB period in turn. Because the TRB bounds every run and the LTQ is
served in turn, no task can block the processor.

A queue is stored as a membership mask. Priorities are distinct, so "highest
priority first" is a search for the lowest set bit (`prio_select`). The round
robin is a circular search starting after the last served task
(`rr_select`).

Rules for events that arrive in the same cycle:

- A decision uses the events of the same cycle.
- A finish wins over a TRB expiry, and both win over a preemption.
- An activation of a task that is already ready (queued, running or
  preempted) is ignored.
- Events that arrive while a switch is in progress are queued. The decision
  is taken when the switch ends.

## The task switch

`task_switch_ctrl` turns one decision into this sequence. t0 is the cycle in
which the scheduler sees the event:

| Cycle | What happens | Signal |
|---|---|---|
| t0 | scheduler decides | `sw_req` |
| t0+1 | old task stopped, enters low power | `processXstall` of the old task |
| t0+2 | wait: the old task's instructions leave the shared units | |
| t0+3 | task multiplexer switches to the new task | `processactive` |
| t0+4 | new task woken, fetch PC loaded from its own PC | `processXresetstall`, `processXstartagain` |
| t0+5 | new task executes | `run` |

At a 15 ns clock the new task starts 75 ns after the event. The length is the
same for every pair of tasks. When the scheduler goes idle (no task left), only
the stall cycle is performed.

A switch in progress is never interrupted. An event that arrives during a
switch is queued and acted on when the switch ends. The worst case from an
event of the highest-priority task to its first instruction is therefore
5 + 4 = 9 cycles. With five periodic tasks at about 60 % load, task 0 was
measured at 5 to 9 cycles.

`run` is high only while the active task may execute. The pipeline must not
commit anything for a task while `run` is low.

## Per-task state

- **`pc_bank`** holds one PC per task and the fetch PC sent to the instruction
  memory. While `run` is high, each `pc_we` from the pipeline writes `pc_next`
  into both the fetch PC and the active task's own PC. On `startagain`, the
  fetch PC is loaded from the released task's PC. After reset, task *i* starts
  at `ENTRY_BASE + i*ENTRY_STRIDE` (0x0, 0x400, ...).
- **`banked_regfile`** has one bank of 32 x 32-bit registers per task.
  Register 0 reads as zero. Reads use the active task's bank. The write port
  has its own bank number, so an instruction of the old task can still write
  back after `processactive` has moved on. A read of the register being
  written returns the new value.
- **`task_mux`** is the multiplexer/demultiplexer. It gives the selected
  task's copy of a resource to the shared logic and steers a write back to
  that copy only.

## Bus registers

The scheduler is a slave on the microcontroller's slow bus (`sched_regs`).
Accesses take a single cycle: with `bus_sel` and `bus_we` high, the write
happens at the clock edge. A read is combinational.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0 | TRB_RELOAD | R/W | TRB time stamp in cycles, reset value 1000 |
| 1 | ACTIVATE | W | a 1 in bit *i* activates task *i* (same effect as `event_i[i]`) |
| 2 | QUEUES | R | [4:0] ready, [12:8] ATQ, [20:16] ITQ, [28:24] LTQ |
| 3 | STATUS | R | [2:0] processactive, [4] Running State, [8] a task executes, [20:16] tasks in low power |

The status fields are 8 bits apart, so `N` may not exceed 8.

## Connecting a pipeline to `nmpra_sched_top`

| Port | Direction | Use |
|---|---|---|
| `event_i[N]` | in | scheduling event of each task, e.g. from a timer |
| `task_finished_i` | in | the running task has completed its job (a "wait for next event" instruction) |
| `pc_we_i`, `pc_next_i` | in | next-PC of the running task, used only while `run_o` is high |
| `fetch_pc_o` | out | instruction address |
| `run_o`, `processactive_o` | out | the task whose instructions may execute, and the multiplexer select |
| `stall_o`, `resetstall_o`, `startagain_o` | out | per-task switch strobes |
| `rf_*` | in/out | register file, read bank = `processactive_o`, write bank = `rf_wbank` |
| `bus_*` | in/out | scheduler registers |
| `ready_o`, `state_o`, `atq_o`, `itq_o`, `ltq_o`, `lowpower_o`, `trb_count_o`, `sched_task_*`, `task_pc_o` | out | observation |
| `ev_*_o` | out | one-cycle strobes: preemption, TRB expiry, finish, dispatch and its source queue |

Parameters, with defaults from `nmpra_pkg`:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 5 | number of hardware tasks |
| `IW` | 3 | task number width |
| `W` | 32 | PC and data width |
| `TW` | 16 | TRB width |
| `NREGS` | 32 | registers per bank |
| `TRB_DEFAULT` | 1000 | reset time stamp |

## How this design relates to the published nMPRA scheduler

These parts follow the published description:

- five tasks with distinct priorities, task 0 the highest;
- the three queues and the two states;
- the priority and round-robin dispatchers;
- the TRB that is reloaded at dispatch and counts only while the task runs;
- the signal names;
- the order of the switch steps;
- a response of one cycle and a switch of five cycles.

These are this design's own choices:

- **One clock.** The original uses three phase-shifted clocks (`clk`,
  `clk_dephase`, `clk_not`). Here every step is one rising-edge cycle.
- **Exact cycle of each switch step.** The source gives the order and the
  total of five cycles, but the exact cycle of each step only through a
  waveform.
- **Only the old task is stalled.** The source says all active tasks are
  stopped. Its waveform also shows a stall pulse on the task being woken.
  Since only one task executes at a time, stopping the old one has the same
  effect.
- **Switch time.** One summary of the original gives 5 to 8 cycles, another
  a constant 5. This design takes a constant 5 for the switch itself. An
  event that meets a switch already under way waits up to 4 more cycles.
- **Long tasks.** A long task runs in the Idle State, and a preempted long
  task stays in the LTQ.
- **Event rules.** Priority among simultaneous events, the round-robin order,
  and ignoring repeated activations.
- **Sizes and interfaces.** The register map and bus protocol, all widths,
  the entry addresses, the register-bank details and the reset value of the
  time stamp.

Not included:

- the pipeline core (the 42-instruction MIPS datapath, its hazard detection,
  forwarding and control, and its banked pipeline registers);
- the instruction and data memories;
- the hardware scheduler engine that drives the pipeline registers;
- the bus controller, master and arbiter;
- the clock generator.

The published example of starvation uses ten tasks, some with equal
priority. This design has distinct fixed priorities and at most eight tasks
(five by default), so it shows the same effect with five tasks.

No synthesis for a target technology was done, so nothing here shows that the
logic meets a 15 ns clock. The scheduler's decision path is a few small
priority searches and should not be the limit.

## Files

`rtl/`:

- `nmpra_pkg.sv` has the constants and types;
- `trb_timer`, `prio_select` and `rr_select` are the leaf blocks;
- `dp_scheduler` is the algorithm;
- `task_switch_ctrl` is the switch sequencer;
- `task_mux`, `pc_bank` and `banked_regfile` hold the per-task state;
- `sched_regs` is the bus slave;
- `nmpra_sched_top` joins them.

Assertions check the rules below. They run in simulation with `--assert`.

- ATQ and ITQ are disjoint.
- Only ready tasks are queued.
- A task is released only once it is selected.
- Stall and release never hit the same task in the same cycle.

`tb/`: each block has a self-checking testbench `tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`.

- `tb_dp_scheduler` runs 60,000 random cycles against a list-based reference
  model of the algorithm.
- `tb_nmpra_sched_top` runs the top at its default parameters. A pipeline
  stand-in advances each task's PC and counts in its register bank. It checks
  every switch for the five-cycle timing and for PC and register continuity.
  It plays five scenarios: preemption and resume, all five tasks active,
  priority inversion, round robin of never-ending tasks, and starvation. It
  fails if any mechanism never occurred.
- `tb_periodic_tasks` runs five periodic tasks for 20,000 cycles at the
  default parameters. It checks that every job completes, that no activation
  is lost, and that task 0 starts 5 to 9 cycles after its event.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/nmpra_pkg.sv tb/tb_nmpra_sched_top.sv --top-module tb_nmpra_sched_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Each testbench finishes in well
under a second.
