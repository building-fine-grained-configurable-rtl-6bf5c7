# Hardware RTOS kernel for a uITRON 4.0 subset

A real-time kernel spends most of a system call maintaining queues: the ready
queue ordered by task priority, and one wait queue per semaphore, eventflag
and data queue. In software each insertion walks a linked list. This design
keeps every queue in hardware instead. There is one small register block per
task (a hardware TCB), and all TCBs look at every queue operation at the same
time. Each TCB decides locally whether it is affected, so any enqueue or
dequeue completes in **one clock cycle**, however long the queue is. A state
machine in front of the TCBs carries out whole uITRON system calls
(`act_tsk`, `wai_sem`, `set_flg`, `snd_dtq`, ...) in a handful of cycles.
It returns two things to the processor: the error code, and the task to
switch to.

The second idea is that the kernel is **cut to the application**. The number
of tasks and objects, each object's attributes, which system calls exist and
which error checks are made are all parameters. An application that uses no
data queues gets hardware with no data-queue logic. One that never passes a
bad ID gets no ID checks.

The architecture follows the paper "Building Fine-Grained Configurable ITRON
Based RTOS": the processor/RTOS split, the register map, the TCB queue
mechanism, the operation set of the queue core, the `sig_sem` state sequence
and configuration per application. The paper does not spell out many details,
and this RTL fills them in. Those choices are listed in
[Own choices and departures](#own-choices-and-departures).

## How a system call runs

The kernel sits on the processor's data port as memory-mapped registers. A
system call has a short software part that runs on the processor:

1. Store the call's parameters to `0xffff0104`, `0xffff0108`, ... `0xffff0114`.
2. Store the call number to `0xffff0100`. This starts the hardware.
3. Load `0xffff0008` repeatedly until bit 31 (done) is 1. Interrupts are off
   during a system call, so the software part polls rather than waiting for
   an interrupt.
4. Decode the return word and act on it: return the error code, or switch to
   the named task.

| address | dir | content |
|---|---|---|
| `0xffff0008` | R | return word `{done, 7'b0, switch_id[7:0], 8'h00, ercd[7:0]}` |
| `0xffff0100` | W | system call number (starts the call) |
| `0xffff0104`..`0xffff0114` | W | parameters 1..5 |
| `0xffff0120` | R | value returned by reference: flag pattern, received data, `can_act`/`can_wup` count |
| `0xffff0124` | R | data the *running* task received while it waited (flag pattern, data-queue element) |
| `0xffff0128` | R | wait release code of the running task (`E_OK`, or `E_RLWAI` after `rel_wai`) |

`switch_id` is 0 when the caller keeps running. Otherwise it is the task to
dispatch. The value `0xff` means no task is ready, so the processor idles until
an interrupt handler makes a task ready. `ercd` is the uITRON error code as an
8-bit two's-complement number: `E_ID` = `0xEE` (-18), `E_QOVR` = `0xD5`
(-43), and so on; see `rtl/rtos_pkg.sv`. The hardware tracks the running task
itself: it is the last task the return word told software to switch to. The
`run_id` output shows it.

A task that blocked (in `wai_sem`, `wai_flg`, `rcv_dtq`, `snd_dtq`, `slp_tsk`)
resumes later, when some other call releases it. On resuming it reads its
outcome from `0xffff0124`/`0xffff0128`. For `rcv_dtq` and `wai_flg` these
registers are also written when the call completes at once, so a task can
always read its data there after either kind of call.

The calls implemented are numbered in this order, starting at 1: `act_tsk`,
`iact_tsk`, `can_act`, `ext_tsk`, `ter_tsk`, `chg_pri`, `slp_tsk`, `wup_tsk`,
`iwup_tsk`, `can_wup`, `rel_wai`, `irel_wai`, `sig_sem`, `isig_sem`,
`wai_sem`, `pol_sem`, `set_flg`, `iset_flg`, `clr_flg`, `wai_flg`, `pol_flg`,
`snd_dtq`, `psnd_dtq`, `ipsnd_dtq`, `fsnd_dtq`, `ifsnd_dtq`, `rcv_dtq`,
`prcv_dtq` (`fn_e` in `rtos_pkg`). Timeouts (`twai_*`, `tslp_tsk`), the
system-time calls, mailboxes, mutexes and memory pools are not implemented.

## The TCB queue network

This is the core of the design (`rtos_tcb`, `rtos_hw_core`), and the part most
worth understanding before changing anything.

Every queue is a singly linked list. Each node holds its own `pri` (the sort
key) plus `next_id` and `next_pri`: the ID and key of the node behind it. The
end of a list is `next_id = 0xff` with key 31, larger than any real priority.
A lower number means a higher priority. Each queue has a **header node**: a
TCB instance with `HEADER=1`, ID 0 and key 0, which always sits at the front
of its own queue. The first task of a queue is therefore the header's
`next_id`. It is read combinationally, which is how `SEMHEAD`, `FLGHEAD`,
`DTQHEAD` and `PRIHIGHEST` cost nothing extra.

All nodes receive the same operation, task ID `ID_IN` and key `PRI_IN`, and
only nodes that are in the addressed queue react. Each node drives
`NEXT_ID_OUT`/`NEXT_PRI_OUT`, which is zero unless that node takes part. The
outputs of all nodes are ORed, and the result comes back to every node as
`NEXT_ID_IN`/`NEXT_PRI_IN`:

* **Enqueue** of task X with key K. The unique node with `pri <= K < next_pri`
  becomes X's predecessor. It drives its old link on the OR bus and loads
  `(X, K)` as its new link. In the same cycle node X loads the OR bus, which
  is its predecessor's old link, and records which queue it is now in. Using
  `<=` on the left puts X behind every node of equal priority, which gives
  FIFO order within a priority level.
* **Dequeue** of task X. Node X drives its own link on the OR bus and leaves
  the queue. The node whose `next_id` is X loads the OR bus and so skips X.
* **Priority change** writes `pri` of one node. The state machine brackets
  it with a dequeue and an enqueue when the task is in a priority-ordered
  queue.

Example: the ready queue holds tasks 1 (pri 1), 2 (pri 3) and 4 (pri 5), and
task 3 with priority 2 is enqueued. Only task 1 satisfies `1 <= 2 < 3`. It
outputs its old link (2, 3) and takes (3, 2). Task 3 takes (2, 3). After one
edge the queue reads header → 1 → 3 → 2 → 4.

In a FIFO-ordered wait queue (attribute `TA_TFIFO`), every node uses the
constant key 1 instead of its priority. A new node then always lands at the
tail. Each TCB records the number of the queue it is in: 0 none, 1 ready,
then the semaphores, eventflags and data queues in that order. A TCB can
therefore be in at most one queue, and each queue's nodes ignore operations on
other queues. The core checks both invariants with assertions: only an
unqueued task is enqueued, and a task is only removed from the queue it is in.

The core's operations are `READYENQUEUE`, `READYDEQUEUE`, `PRIHIGHEST`,
`PRICHG`, `TASKSTATUS`, and `HEAD`/`ENQUEUE`/`DEQUEUE` for semaphore,
eventflag and data-queue wait queues, plus `INIT`. Results are combinational;
the state changes at the next rising edge.

## The system-call state machine

`rtos_hw_wrapper` spends one state per clock cycle and issues at most one core
operation per state:

```
reset:   INIT -> INITACT -> HIGHEST -> END -> WAIT
call:    WAIT -> CHECK -> HEAD -> DEQ [-> PRICHG] [-> ENQ] [-> HIGHEST] -> END -> WAIT
set_flg: ... HEAD -> FLGSCAN (-> DEQ -> ENQ -> FLGSCAN)* -> HIGHEST -> END -> WAIT
```

* **CHECK** does every static check in one cycle, in this order: call absent
  (`E_RSFN`); blocking call from an interrupt or with no running task
  (`E_CTX`); bad ID (`E_ID`); `ter_tsk` on itself (`E_ILUSE`); object not
  created (`E_NOEXS`); bad parameter (`E_PAR`). On an error it goes straight
  to END.
* **HEAD** reads the head of the object's wait queue, or the target task's
  status and queue. It applies the call's rules to the object registers the
  wrapper holds: semaphore counts, flag patterns, data-queue ring buffers, and
  per-task activation/wake-up counters, wait patterns and received data. It
  then plans at most one dequeue, one priority change and one enqueue.
  Blocking the caller means "dequeue from ready, enqueue into the wait queue".
  Releasing a waiter means the reverse.
* **DEQ / PRICHG / ENQ** issue the planned core operations. Each state that
  has nothing to do is skipped.
* **HIGHEST** reads the head of the ready queue. If it differs from the
  running task, that task becomes the switch target. It also becomes the
  target after `ext_tsk` with a queued activation, so that the task starts
  again.
* **FLGSCAN** walks the eventflag's wait queue one task per cycle. Every task
  whose pattern is now satisfied is released. With `TA_CLR` the pattern is
  cleared at the first release and the scan stops.

Cycle counts, measured from the cycle of the write to `0xffff0100` to the
first cycle the return word shows done:

| call | path | cycles |
|---|---|---|
| any call rejected by CHECK | CHECK, END | 3 |
| `sig_sem`, no task waiting | CHECK, SEMHEAD, SEMDEQUEUE, END | 5 |
| `sig_sem` releasing a task | CHECK, SEMHEAD, SEMDEQUEUE, RDYENQUEUE, HIGHEST, END | 7 |
| blocking call (e.g. `wai_sem` that waits) | CHECK, HEAD, DEQ, ENQ, HIGHEST, END | 7 |
| `set_flg` with m waiting tasks | one FLGSCAN cycle per waiting task scanned, plus DEQ and ENQ per release | grows with m |

The software part (parameter stores, polling, dispatch) comes on top of
these.

## Cutting the kernel to an application

These parameters of `rtos_hw` (and of `rtos_hw_wrapper`/`rtos_hw_core`)
stand for what a configuration tool would generate from the application's
static configuration:

| parameter | default | meaning |
|---|---|---|
| `NUM_TSK`, `NUM_SEM`, `NUM_FLG`, `NUM_DTQ` | 5, 4, 3, 3 | object counts; each may be 0 except `NUM_TSK` |
| `TSK_IPRI` | task t: (t+1)/2 | initial priorities (1..30) |
| `TSK_ACT` | `0x1` | tasks with `TA_ACT`, ready after reset (bit t-1 = task t) |
| `TSK_EXIST`, `SEM_EXIST`, `FLG_EXIST`, `DTQ_EXIST` | all | created IDs; the others give `E_NOEXS` |
| `TMAX_TPRI`, `TMAX_ACTCNT`, `TMAX_WUPCNT` | 30, 1, 1 | priority range, queued activations, queued wake-ups |
| `SEM_TPRI`, `SEM_INIT`, `SEM_MAX` | `0x5`, 1, 1 | wait-queue order per semaphore (1 = priority), `isemcnt`, `maxsem` |
| `FLG_TPRI`, `FLG_WMUL`, `FLG_CLR`, `FLG_INIT`, `FLGPTN_W` | `0x1`, `0x3`, `0x4`, 0, 16 | per-flag attributes (priority order, multiple waiters, clear on release), initial pattern, pattern width |
| `DTQ_TPRI`, `DTQ_CNT` | 0, 4 | send-wait order, buffer depth of each data queue |
| `FN_EN` | all | one bit per call number; an absent call returns `E_RSFN` and its logic is pruned by synthesis |
| `CHK_CTX`, `CHK_ID`, `CHK_NOEXS`, `CHK_PAR` | 1 | include each class of error check |

The default object counts are those of the largest application configuration
the design was evaluated with. The attribute and limit defaults are this
design's own picks, chosen so that one configuration contains both queue
orders and both flag modes.

## The system around it

`hw_rtos_soc` is the top. It connects the processor's data port (`mem_addr`,
`mem_we`, `mem_be`, `mem_wdata`, `mem_rdata`) to:

* `mmio_decoder`: addresses `0xffff_xxxx` go to the RTOS, all others to data
  memory. It steers the write strobe and selects the read data.
* `data_memory`: 4096 words (16 KiB), byte-writable, synchronous write and
  asynchronous read. The processor keeps its data and task contexts here.
* `rtos_hw`: the wrapper plus the core.

The processor itself, a MIPS32 core, is not part of this RTL. Its data port
forms the top's ports. `irq_ctx` tells the kernel that the processor is in an
interrupt handler. `rtos_busy` and `run_id` are status outputs.

## Own choices and departures

Where the original description is silent, this RTL chooses:

* 8-bit task IDs and error codes, and 5-bit priorities, with 31 reserved as
  the end-of-queue key. The call numbering follows the order of the call list
  above.
* Queue headers as ordinary TCB nodes with key 0, and a FIFO key of 1 for
  FIFO-ordered wait queues.
* The two extra read registers `0xffff0124`/`0xffff0128` for the outcome of a
  wait.
* A start-up sequence that enqueues the `TA_ACT` tasks and reports the first
  task to run in the return word. The original state table goes straight
  from INIT to WAIT.
* `sig_sem` passes SEMDEQUEUE even when nothing waits, as in the original
  state table; one sentence of the original prose suggests ending directly
  after the head check.
* The error code is read from the return word at `0xffff0008`. One sentence
  of the original suggests the return-parameter register; the software
  example reads it from the return word.
* `E_CTX` comes from the `irq_ctx` input.
* One wait queue per data queue, shared by senders and receivers. Only one
  kind can wait at a time, and receivers always queue in FIFO order.
* The behaviour of every call other than `sig_sem` follows the uITRON 4.0
  rules for that call. The original gives only the `sig_sem` sequence and the
  `act_tsk` checks.
* The bus is single-cycle (write on the clock edge, combinational read), and
  reset is asynchronous and active low.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`:

| testbench | what it does |
|---|---|
| `tb_rtos_tcb` | header plus four TCBs: the enqueue example above, head insertion, equal priorities, FIFO, dequeue, priority change, status write |
| `tb_rtos_hw_core` | 400 random enqueue/dequeue/priority-change operations on all queues against a reference model, walking every queue after each |
| `tb_rtos_hw_wrapper` | directed sequence of about 90 calls through the registers covering every call, error codes and switch targets, plus the cycle counts in the table above |
| `tb_rtos_hw_random` | 6000 random calls at the default configuration (task calls, interrupt-context calls, bad IDs and parameters) against a list-based model of the kernel rules; compares error code, switch target, running task, returned value and the wait-result registers after every call |
| `tb_rtos_hw` | a second configuration (4 tasks, FIFO semaphores, single-waiter flag, no data queues, calls removed) |
| `tb_rtos_workloads` | nine application-sized configurations side by side (5/4/3/3 down to 3/0/2/1 tasks/semaphores/flags/data queues), each running its calls with and without a task switch |
| `tb_data_memory`, `tb_mmio_decoder` | random and boundary tests |
| `tb_hw_rtos_soc` | end to end at default parameters (see below) |

`tb_hw_rtos_soc` plays the processor. It runs a five-task
producer/consumer application whose task contexts live in the data memory,
and it performs every call exactly as the software part would. It checks the
application's results and every return code. It also counts context switches,
preemptions, waits of each kind, data hand-over, overwriting `fsnd_dtq`,
polling failures, queueing overflow, idle, and interrupt-context calls. A
mechanism that never occurs counts as a failure.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rtos_pkg.sv tb/tb_hw_rtos_soc.sv \
          --top-module tb_hw_rtos_soc -o sim && ./obj_dir/sim
```

## Limits

* The processor and the configuration generator are not included. The
  parameters take the generator's place; the testbenches take the
  processor's place.
* The published execution times (about 2 µs without and 4.4 µs with a task
  switch at 50 MHz) include the processor's software part. The hardware share
  measured here is 3 to 7 cycles for most calls, but the whole call has not
  been timed because there is no processor.
* The data memory size and every object attribute are assumptions.
* The object state lives in flip-flops in the wrapper. Large `DTQ_CNT` or
  task counts grow it linearly.
* No timeouts or system-time support; `twai_*` calls do not exist.
