# EDF scheduling monitor: a bus-watching I-IP for RTOS task scheduling

A transient fault in a real-time kernel can quietly break its scheduler.
The wrong task runs, a task starts without a scheduling event, or a job
overruns its deadline. The kernel's own checks cover only some of these
cases, and only after thousands of cycles. This RTL is a small monitor, an
*infrastructure IP* (I-IP), that sits next to the processor. It watches two
things: the instruction addresses on the processor's address bus and its
timer-interrupt line. From those alone it keeps its own copy of an
*Earliest Deadline First* (EDF) schedule. At every scheduler tick it checks
that the processor runs the task EDF would have chosen. The monitor never
drives the bus, so it costs the software nothing. It reports what it finds
as a 3-bit error code, `MISS`:

| `MISS` | meaning | when |
|---|---|---|
| `000` | no error seen yet | after reset |
| `001` | cannot be scheduled: `sum(Ci/Ti) > 1` | once, at boot; only a warning, monitoring goes on |
| `010` | deadline missed: a job reached its deadline with capacity left | at the tick of the deadline |
| `011` | scheduling issue: the dispatched task is not EDF's choice, or a task took over between ticks | at the dispatch, or at the stray fetch |
| `100` | unknown task: instructions run from outside every known range | at the dispatch, or at the stray fetch |

`miss` holds the latest code. `miss_strobe` pulses once for each error found.

The design follows the I-IP described in A. S. Fracalossi, *Development of
an Intellectual-Property Core to Detect Task Scheduling Errors in RTOS-Based
Embedded Systems* (MSc dissertation, PUCRS, 2021). That work monitored
HellfireOS on the HF-RISC processor. The RTL here is a new implementation.
The section "Choices made in this implementation" lists what that
description left open and how it was filled in.

## Files

| file | role |
|---|---|
| `rtl/iip_pkg.sv` | widths (32-bit addresses, 16-bit ticks), the task-entry struct, the `MISS` enum, address classes |
| `rtl/task_table.sv` | the known task set, and the address classifier: kernel / idle / task *i* / unknown |
| `rtl/sched_check.sv` | utilisation test `sum(Ci/Ti) <= 1`, computed with `rtl/seq_divider.sv` |
| `rtl/edf_select.sv` | EDF head search: the ready task with the nearest deadline |
| `rtl/watchdog.sv` | the monitor for one core: per-task job state, tick flow, dispatch detection, error codes |
| `rtl/iip_multicore.sv` | top: one monitor per core, with a shared configuration port |
| `tb/rtos_cpu_model.sv` | behavioural processor + EDF kernel that drives a realistic bus (testbench only) |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## How a task is recognised

Every task is linked into a code address range of its own. The monitor
holds one entry per task (`task_cfg_t`): `valid`, `base`, `limit`
(inclusive), period `Ti`, capacity `Ci` and relative deadline `Di`. Ti, Ci
and Di are counted in scheduler ticks. Two more ranges describe the kernel
itself:

* the **kernel range** covers the interrupt handler, the scheduler and the
  library routines that tasks call. Fetches here are ignored.
* the **idle range** covers the idle task.

Only instruction fetches count. While `data_access_cpu` is high (a load or
store to a stack, the heap or a peripheral), the address is ignored. An
address is classified in the same clock. Kernel wins over idle, idle over
tasks, and among overlapping task ranges the lower slot wins.

## What happens at each tick

Each rising edge of `irq_to_cpu` is one scheduler tick. The monitor then
runs the same three steps for every tick. Per task it keeps:

* `tc`: capacity left in the current job;
* `dl`: ticks to the current job's deadline (0 means overdue);
* `pcnt`: ticks to the next release;
* `pend`, `pdl`: a released job that is waiting, and its deadline.

```
irq sampled high (clock 0)
  clocks 1..N     S1 check  one task per clock: dl--, pcnt--;
                            dl reaches 0 with tc > 0  -> deadline missed
                            pcnt reaches 0 -> release a job (tc = Ci, dl = Di),
                            or queue it (pend) if the last job is still running
  clocks N+1..2N+1 S0 sort  edf_select scans ready tasks (tc > 0) for the
                            smallest dl; lower slot wins a tie
  clock 2N+2      report    010 written if any deadline passed; EDF head latched
  later           dispatch  kernel handler runs; first fetch outside the kernel
                            range = the dispatched task:
                              unknown range         -> 100
                              known task != head    -> 011
                              idle while a task is ready -> 011
                   S2 update the dispatched task is charged one tick (tc--);
                            a waiting job starts when the late one ends
  until next irq  run       a fetch from another known task or from unknown
                            code -> 011 / 100, reported once per tick
```

N is `NTASKS`. For two task slots the deadline-miss code appears six clocks
after the interrupt is sampled. The original description quotes the same
six clocks for two tasks. At the default four slots it takes ten clocks.

To find the dispatched task, the monitor first waits for the processor to
enter the kernel after the interrupt. It then takes the first fetch outside
the kernel. This skips the fetches that the interrupted task still makes
right after the interrupt. The capture runs alongside the check and the
sort, so a fast dispatch is not lost.

The first tick after `start` only sorts, because no time has passed yet.
Each later tick first advances time by one.

**Late jobs.** A job that misses its deadline is not dropped. It keeps
running with the highest priority (its `dl` is 0) until its capacity is
used. A job released in the meantime waits (`pend`) and starts as soon as
the late one ends. There is one waiting slot per task. This reproduces the
standard EDF timeline of the overloaded two-task set 10/20 + 35/50
(U = 1.2). There, the second task misses at t = 50 and finishes at 55. The
first task then misses at t = 60 and finishes at 65.

## Schedulability warning

When `start` arrives, `sched_check` walks the table. It divides
`Ci * 2^16` by `Ti` for every valid task, one quotient bit per clock, and
adds up the quotients. The set fails when the sum is above `2^16`. It also
fails when the sum is exactly `2^16` but some division left a remainder,
because the true U is then above 1. Rounding down never flags a set whose
U ≤ 1. Only a set with U above 1 by less than `NTASKS * 2^-16` can slip
through. A valid task with `Ti = 0` fails. The test takes about
`(16 + UTIL_FRAC + 2)` clocks per valid task, about 140 clocks for four
tasks. The result only raises `001`; it never stops monitoring.

## Interface and integration

`iip_multicore` (the top) has one monitor per core:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `core_addr[c]` | in | 32 | address bus of core c |
| `core_data_access[c]` | in | 1 | high for data accesses |
| `core_irq[c]` | in | 1 | interrupt line of core c (rising edge = tick) |
| `cfg_core` | in | log2(NCORES) | monitor to configure |
| `cfg_we`, `cfg_idx`, `cfg_entry` | in | 1, log2(NTASKS), `task_cfg_t` | write one task entry |
| `os_we`, `kern_base/limit`, `idle_base/limit` | in | 1, 32 each | write kernel and idle ranges |
| `start` | in | 1 | RTOS boot: run the utilisation test, release all tasks |
| `miss[c]`, `miss_strobe[c]` | out | 3, 1 | latest error code, error pulse |
| `monitoring[c]` | out | 1 | boot finished, ticks are being checked |
| `exp_found[c]`, `exp_idx[c]` | out | 1, log2(NTASKS) | the task EDF expects in this tick |
| `any_miss` | out | 1 | some core's code is not 000 |

Parameters: `NCORES = 1`, `NTASKS = 4`, `UTIL_FRAC = 16`.

Bring-up sequence:

1. Reset.
2. Write each task entry and the kernel/idle ranges. Writes are accepted
   only before `start`.
3. Pulse `start` when the kernel boots and wait for `monitoring`.

Task ranges and parameters come from the link map and from the task-creation
calls of the application. Ticks must be more than `2*NTASKS+3` clocks apart.
An assertion in `watchdog` reports a tick that arrives during the check or
the sort.

`watchdog` is the same monitor for a single core. Its port names
(`addr_from_cpu`, `data_access_cpu`, `irq_to_cpu`) match the signals of the
HF-RISC `processor` wrapper, where the monitor was instantiated.

## Choices made in this implementation

These points were not fixed by the original description:

* The configuration write port, the separate kernel and idle ranges, and
  the overlap priority.
* Every rising edge of the interrupt line is treated as a scheduler tick.
  With other interrupt sources on that line, the line would need filtering
  to timer ticks first.
* Dispatch detection: the first non-kernel fetch after the kernel has been
  entered.
* The "queue sort" is a minimum search that yields only the EDF head,
  because only the head is ever compared. Ties go to the lower slot. This
  matches the two-task EDF chart at t = 80, where the task with the shorter
  period keeps the processor.
* Late-job handling (see above). The kernel may drop or restart an overrun
  job instead. In that case the monitor's copy diverges after the first
  `010`, and later `011` codes are expected.
* The idle task. The description says an idle tick needs no action, but it
  also lists "running task is not the highest-priority ready task" as an
  error. Here idle with nothing ready is accepted, and idle while a task is
  ready is a `011`. Time advances on idle ticks either way.
* `MISS` holds the latest code. The strobe was added so that repeated
  errors of the same kind can be counted.
* If no task is dispatched before the next tick, that tick is charged to
  no task.

Known differences from the original:

* **Size.** The original I-IP added 173 four-input LUTs (7.83 %) to the
  HF-RISC. This RTL has full 32-bit range comparators and five 16-bit
  counters per task. At the default size it synthesises (generic yosys
  cells) to about 660 word-level cells and 830 flip-flops, so it is larger.
  Narrower ranges (for example, only the upper address bits) or fewer
  counter bits would shrink it.
* **Table size.** The table holds `NTASKS` tasks (default 4, the largest
  set mapped in the original tests). HellfireOS allows up to 30 tasks; to
  cover that, set `NTASKS = 30`. The check and sort then take 62 clocks per
  tick.
* **Out of scope.** Resources (semaphores, mutexes, blocking) are not
  tracked. A task that blocks looks as if it ran its tick.

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_task_table` | load and read back; directed range edges and the overlap rule; 400 random addresses against a reference classifier; reset clears the table |
| `tb_sched_check` | U = 1.0 (10/20 + 25/50) passes; U = 1.2 (10/20 + 35/50) fails; 1/3·3 passes, 1/3·3 + ε fails; Ti = 0 fails; 60 random sets against exact integer arithmetic; fixed-point sum and run time |
| `tb_edf_select` | the t = 40 decision of the two-task example, tie rule, empty queue; 300 random cases against a reference; `done` exactly NTASKS clocks after `start` |
| `tb_watchdog` | two slots, driven by the behavioural CPU/kernel model: see the scenarios below |
| `tb_iip_multicore` | the top at default parameters, end to end: the same scenarios plus five kernel tasks with only four known (`100` when the fifth first runs), with each mechanism counted |
| `tb_iip_dualcore` | two cores, each with its own task set: the schedulable core stays at `000`, the overloaded one reports `001`, then `010` at t = 50 and t = 60 |

The scenarios in `tb_watchdog` are:

* U = 1 over 200 ticks with no error, and the EDF choice against the
  reference timeline;
* U = 1.2: `001` at boot, `010` at t = 50 and at t = 60, each six clocks
  after the tick;
* a forced priority inversion at t = 25 (`011`);
* a jump into another task mid-tick (`011`);
* idle ticks (no error), and idle forced while a task is ready (`011`);
* an unknown task (`100`).

`tb_iip_multicore` also checks the ten-clock latency at four slots. It
also runs a three-task set with (Ti, Ci, Di) = (4,1,4), (5,2,5), (7,2,7),
U = 0.94, over one full hyperperiod of 140 ticks, with no error allowed.

The behavioural model `tb/rtos_cpu_model.sv` raises the interrupt, runs a
kernel handler in the kernel range and dispatches by its own EDF scheduler.
It interleaves data accesses to a heap address. It can inject faults: a
chosen task at a chosen tick, or a switch in the middle of a tick.

Running a testbench with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/iip_pkg.sv tb/tb_iip_multicore.sv --top tb_iip_multicore -Mdir obj
./obj/Vtb_iip_multicore
```

Replace the testbench name to run another one. Each one finishes in well
under a second.
