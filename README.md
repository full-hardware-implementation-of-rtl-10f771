# RTOS kernel as hardware: a manager for parallel task modules

An RTOS-based application normally runs its tasks one at a time on a CPU,
with a kernel deciding who runs. This design takes the other route: every
task is its own hardware module (produced from the task's C code by a
high-level synthesis tool), all task modules run in parallel, and the kernel
is replaced by a hardware **manager** that keeps the kernel state and executes
the kernel services. There is no ready queue, no context switch and no
scheduling overhead; a task that becomes Ready is Running in the next clock
cycle.

The RTL here is the manager and the data memory that holds the tasks' shared
variables. The task modules are the application; they are not included, and
attach to per-task ports of the top module `rtos_hw_top`.

Two ideas make the scheme work with an ordinary HLS tool, whose generated
modules have no "stall" input that could freeze them at any time:

1. **Centralised services.** Task modules contain no kernel code. A service
   call is a request written into two small register sets in the manager,
   and all service hardware lives in the manager, once.
2. **Blocking by withholding.** A task is never stopped. A task that is not
   Running may keep computing, but every service call *and* every access to
   a shared variable is a request to the manager, and the manager simply
   does not serve requests from tasks that are not Running. The task sits in
   its "wait for the result" state until it runs again. Nothing a non-running
   task does can reach another task or the outputs, which gives the same
   behaviour as freezing it.

## Block structure

```
            task module 1      task module 2   ...   task module N
              |  ^  ^ start/kill  |  ^
         F,A0,A1 |  | result      |  |
   +----------v--+--+-------------v--+------------------------------+
   | manager   fa_regs[1]  status[1]   fa_regs[2]  status[2]   ...   |
   |              |   ^ stall  |          |   ^ stall  |             |
   |              v   |--------+          v   |--------+             |
   |          request_arbiter (one call at a time, by priority)      |
   |             |                 |                  |              |
   |      serv_ctrl_tsk        serv_mtx           serv_grw ----------+--> dmem
   |      (task control)       (mutexes)          (shared variables) |
   +-----------------------------------------------------------------+
```

| module | role |
|---|---|
| `rtos_hw_top` | manager + `dmem`; task ports brought out |
| `manager` | wires the blocks below; forms each task's stall from its state and the CPU lock |
| `fa_regs` | one per task: F (service/method code) and A0/A1 (arguments, results); stall gate; result handshake |
| `task_status_regs` | one status register per task; Ready→Running promotion; start/kill strobes to the task modules |
| `request_arbiter` | picks the highest-priority pending request, dispatches it, returns the result |
| `serv_ctrl_tsk` | task control: `act_tsk can_act ter_tsk ras_ter ext_tsk chg_pri get_pri slp_tsk wup_tsk can_wup rel_wai sus_tsk rsm_tsk loc_cpu unl_cpu` |
| `serv_mtx` | mutexes: `loc_mtx unl_mtx` |
| `serv_grw` | shared-variable read and write on `dmem` |
| `dmem` | shared-variable memory |
| `rtos_pkg` | encodings, status-register layout, request/result records |

## The task-side protocol

A task module calls a service the way a small C stub would:

1. write the arguments: `t_a0_we/t_a0_wdata`, `t_a1_we/t_a1_wdata`;
2. in a later cycle, write F: `t_f_we/t_f_wdata = {16'h0, service, method}`.
   A non-zero F is a pending call;
3. wait for `t_res_valid`, read the result from `t_a0` (and `t_a1`), and
   raise `t_res_ack` for one cycle. Do not write a new F in that same cycle.

| service (F[15:8]) | method (F[7:0]) | A0 in | A1 in | A0 out | A1 out |
|---|---|---|---|---|---|
| `SERV_CTRL_TSK` = 1 | `METHOD_ACT_TSK` … `METHOD_RAS_TER` = 1…15 | task ID (0 = caller) | priority (`chg_pri`) | error code, or count (`can_act`, `can_wup`) | priority (`get_pri`) |
| `SERV_MTX` = 2 | `LOC_MTX` = 1, `UNL_MTX` = 2 | mutex ID (1…NUM_MTX) | – | error code | – |
| `SERV_GRW` = 3 | `READ` = 1, `WRITE` = 2 | byte address, from `0x8000_0000`, 4 per variable | value (write) | value (read) / `E_OK` (write) | – |

Any other service code is answered with `E_NOSPT`. Task IDs are 1-based.
Task states and error codes use the µITRON/TOPPERS kernel values
(`TTS_RUN` = 1, `TTS_RDY` = 2, `TTS_WAI` = 4, `TTS_SUS` = 8, `TTS_WAS` = 12,
`TTS_DMT` = 16; `E_OK` = 0, `E_PAR` = -17, `E_ID` = -18, `E_CTX` = -25,
`E_ILUSE` = -28, `E_OBJ` = -41, `E_QOVR` = -43, `E_RLWAI` = -49). Task code
written against the kernel API therefore needs only its stubs changed.

`task_start[i]` pulses when task *i* is activated; the task module should
begin from its entry point. `task_kill[i]` pulses when it is terminated; the
task module should return to its idle state. Both can pulse in the same cycle
(termination with a queued activation restarts the task): reset, then start.

## How a call flows, and its timing

For a call whose F write is in cycle *t*, with no other call in service:

| cycle | what happens |
|---|---|
| t | task writes F |
| t+1 | F is set; if the task is not stalled, its request is visible; the arbiter grants it and clears F |
| t+2 | the chosen service module receives a start strobe and latches the call |
| t+3 | the service executes: result, and at most one status-register write |
| t+4 | result in A0/A1, `t_res_valid` high (if the task is Running) |

A shared-variable read needs one more cycle (synchronous memory): `t+5`.
Only one call is in service at a time, so concurrent calls are queued in
their F registers and taken in priority order (smallest priority number
first, lowest ID among equals). A new call can be granted in the cycle after
the previous one completes.

Counting from the argument write, as a stub does, every task-control call
returns in 5 cycles. The reference implementation this design is modelled on
reports 7 to 15 cycles per service (including its HLS stubs), so these
numbers are upper bounds that the testbench checks.

## Blocking, waking and the stall signal

The stall of task *i* is high when its state is not Running, or when the CPU
is locked by another task. It acts only inside the manager:

* a stalled task's F stays pending and is not offered to the arbiter;
* a result for a stalled task waits in its A registers; `t_res_valid` rises
  only once it runs.

Calls that block do not answer immediately: `slp_tsk` with no queued wakeup,
and `loc_mtx` on a mutex owned by another task, put the caller in Waiting
and leave its call "in flight". A later `wup_tsk` (result `E_OK`), `rel_wai`
(`E_RLWAI`) or `unl_mtx` by the owner (`E_OK`) writes the result into the
waiter's A0 through the status-write port (`stw.wake`). If the waiter was
suspended meanwhile (Waiting-Suspended), it becomes Suspended, and the result
is delivered when `rsm_tsk` makes it Running again. `ext_tsk`, and `ras_ter`
on the caller, never answer: the task module is reset.

**CPU lock.** `loc_cpu` records the locking task. While locked, the other
tasks' requests are held back (they are stalled), and the task-control and
mutex calls of the locking task return `E_CTX`, except `unl_cpu`, `loc_cpu`
and `ext_tsk`. Shared-variable accesses remain allowed, so a locked region
gives the locking task exclusive use of the shared variables.

## Status registers and service semantics

Each task has a `tstat_t`: state, base and current priority, queued
activation count, queued wakeup count, wait reason (sleep or mutex) and the
mutex waited for. Only the service module executing the current call writes
it, through one port, so no write conflicts can occur.

* `act_tsk`: a Dormant task becomes Ready (Running one cycle later) and its
  module is started; otherwise the activation is queued up to
  `TMAX_ACTCNT` = 1, then `E_QOVR`. `can_act` returns and clears the count.
* `ter_tsk` (not on the caller: `E_ILUSE`), `ras_ter` (may name the caller),
  `ext_tsk`: Dormant, priority back to base, wakeups and wait cleared, module
  reset; a queued activation restarts it at once.
* `chg_pri` sets base and current priority (1…16; 0 restores the initial
  priority); `get_pri` reads it.
* `slp_tsk`/`wup_tsk`/`can_wup`: wakeups are queued up to `TMAX_WUPCNT` = 1.
* `sus_tsk`/`rsm_tsk`: Running→Suspended, Waiting→Waiting-Suspended and
  back. `rel_wai` forces a waiting task out of any wait.
* Mutexes: the owner is stored per mutex; waiters are found by scanning the
  status registers, and `unl_mtx` hands the mutex to the waiting task with
  the highest current priority. No priority ceiling or inheritance.

Checking order follows the kernel: bad ID (`E_ID`), then CPU lock (`E_CTX`),
then object state (`E_OBJ`, `E_QOVR`).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_TASKS` | 5 | number of task modules, 1…16 |
| `NUM_MTX` | 2 | number of mutexes |
| `DMEM_WORDS` | 32 | shared variables (32-bit words) |
| `INIT_PRI` (manager) | 5, 10, 10, 10, 9 | initial priority of tasks 1…5 |
| `INIT_ACT` (manager) | task 1 | tasks activated at reset |

The defaults describe a five-task application in the style of the kernel's
sample program: a main task (ID 1, priority 5, active from reset), three
worker tasks (priority 10) and an exception task (priority 9). Limits such as
`TMAX_ACTCNT` and the priority range are in `rtos_pkg`.

## Where this design departs from, or goes beyond, its source

* The reference design's `act_tsk` listing returns `E_QOVR` for any
  non-dormant target; here activations are queued as in the kernel, which
  `can_act` needs to be meaningful.
* Only `act_tsk` is specified in detail by the source; the other services
  follow the kernel's documented behaviour. `ras_ter` ignores the
  termination-disable state (`dis_ter`/`ena_ter` are not built).
* Holding other tasks' requests during a CPU lock, holding results for
  non-running tasks, the request/result handshake, the F encoding, the
  error-code values, the tie-break among equal priorities, `E_NOSPT` for
  unknown services and `E_PAR` for bad shared-variable addresses are this
  design's choices.
* Not built: timers and timed waits, alarm and cyclic handlers, interrupt
  handlers, event flags, data queues, memory pools, priority-ceiling mutexes,
  release of mutexes held by a terminated task, and the serial port of the
  sample application.
* `dmem` is reset to zero and is therefore built from flip-flops; remove the
  reset loop to let a tool infer a RAM.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_dmem` | random writes/reads against a reference copy |
| `tb_fa_regs` | stall gating of requests and results, grant, handshake, kill |
| `tb_task_status_regs` | reset values, Ready→Running promotion, start/kill strobes |
| `tb_request_arbiter` | priority choice on random contention, dispatch, result routing, `E_NOSPT` |
| `tb_serv_ctrl_tsk` | every task-control call, its error cases, wake/kill/start requests |
| `tb_serv_mtx` | lock, wait, priority hand-over, errors |
| `tb_serv_grw` | random shared-variable traffic, latency, address errors |
| `tb_manager` | priority order of five simultaneous calls, exact latencies (4 / 5 cycles), suspended and CPU-lock blocking |
| `tb_rtos_hw_top` | end-to-end, at default parameters: five scripted task models run a sample-style application (mutex-protected shared counter, sleep/wake, forced release, suspend/resume of a busy task, CPU lock, termination, exit with restart, self-termination); counts each mechanism and fails if one never occurs; checks the call latencies against 7–15-cycle bounds |
| `tb_sixteen_tasks` | the 16-task maximum: 15 tasks activated in turn contend for one mutex to increment a shared counter, then exit |
| `tb_fig9_program` | a small converted task program (`x = 1; y = x + 2; chg_pri(...); x = x + 3; y = y + x;`) on shared variables at `0x8000_0000`/`0x8000_0004`, with a second task reading `x` concurrently |

The task models in `tb_rtos_hw_top` stand in for HLS-generated task
modules: each waits for its start strobe, runs a scripted sequence of calls
with the protocol above, and abandons its script when killed.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/rtos_pkg.sv tb/tb_rtos_hw_top.sv --top-module tb_rtos_hw_top -o sim
./obj_dir/sim
```

All testbenches finish in well under a second.
