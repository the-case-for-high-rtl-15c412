# hthreads in hardware: threads that live in the FPGA fabric

A program is written as ordinary POSIX-style threads. Some threads run on a CPU and some are
turned into hardware, but all of them use the same API:

- create and exit;
- lock and unlock mutexes;
- load and store shared memory.

This works because the operating-system services they share are hardware themselves. The
thread table, the scheduler and the mutexes are cores on the system bus. A software thread
reaches them with one load. A hardware thread reaches them through a small interface block,
the HWTI, which turns its system calls into the same bus accesses. Neither side needs to know
on which side the other runs.

The most interesting result of the design is what happens when a mutex is released. The next
owner is chosen, told, scheduled and (if it is a hardware thread) restarted without any
software on the CPU. The CPU is interrupted only if the scheduling decision really requires
it to switch threads.

This repository holds synthesizable SystemVerilog for that run-time system:

- the system bus;
- the thread manager;
- the scheduler;
- the mutex manager;
- the shared memory;
- the HWTI;
- an example hardware thread that computes a Haar wavelet transform.

It also holds self-checking testbenches for each block and for the whole system.

```
           cpu_req/cpu_rsp   cpu_irq
                 |              ^
  ===============+==============|========= system_bus (round robin) ==================
     |           |          |   |           |            |                 |
 shared_memory thread_manager  thread_scheduler   mutex_manager      hwti[0..N-1]
                  ^      |       ^       |         |                 |        |
                  |      +-------+       |         |           dwt_thread  dwt_thread
                  +-- add_thread --------|---------+
                                   RUN writes to HWTI command registers (as bus master)
```

## The system bus and how a service is called

All blocks share one bus:

- **Requests:** a request is `bus_req_t {req, we, addr[31:0], wdata[31:0]}`. The master holds
  it unchanged until the slave answers.
- **Responses:** the answer is `bus_rsp_t {ack, rdata}`, with `ack` high for exactly one
  cycle. The master drops `req` at the clock edge that ends the ack cycle.
- **Arbitration:** round robin. The grant stays with one master until its ack, so each access
  is atomic.
- **Masters:**
  - 0: the CPU. Its port is a port of the top.
  - 1: the scheduler.
  - 2 and up: one per HWTI.

| address | slave |
|---|---|
| `0x0xxx_xxxx` | shared memory, word addressed by `addr[..:2]` |
| `0x1xxx_xxxx` | thread manager |
| `0x2xxx_xxxx` | scheduler |
| `0x3xxx_xxxx` | mutex manager |
| `0x4000_0000 + 0x100*i` | HWTI *i*: `thread_id` +0x0, `command` +0x4, `argument` +0x8, `status` +0xC, `result` +0x10 |
| anything else | acked with data 0 |

A service call is **one bus read**. The address says what to do:
`{region[31:28], op[27:24], thread_id[23:16], operand[15:0]}`. The package function
`svc_addr()` builds it. The read data is the answer. Because the grant is held until the ack,
each call is atomic without any bus lock.

Operations (all are reads):

- **Thread manager:**
  - `CREATE`: operand `{is_hw[15], hwti[14:8], prio[3:0]}`. Returns `{1, id}`, or 0 when the
    table is full.
  - `ADD`: makes the thread ready.
  - `EXIT`.
  - `STATUS`: returns UNUSED, CREATED, READY or EXITED.
  - `FREE`.
- **Scheduler:**
  - `NEXT`: dequeues the best ready thread. Returns `{valid[31], prio[11:8], id[7:0]}`.
  - `STATUS`: returns `{irq[31], valid[30], prio, id}`.
  - `IDLE`: the CPU has no thread.
  - `IRQ_ACK`.
- **Mutex manager** (operand = mutex number):
  - `LOCK`, `TRYLOCK` and `UNLOCK` return `ACQUIRED` (1), `BLOCKED` (2), `RELEASED` (3) or
    `ERROR` (4).
  - `OWNER` returns `{locked[31], waiters[30], owner[7:0]}`.

An uncontended access is acknowledged two cycles after the request appears: one cycle for
the grant and one for the slave. Every slave in this design answers in one cycle, except
one case in the mutex manager (see below).

## The HWTI: a thread interface for a state machine

The HWTI has two faces.

**System side.** These are five bus registers:

- **thread_id:** writing it gives the HWTI a thread (status `USED`).
- **argument:** the start argument.
- **command:** `RUN` = 1 starts the thread, or resumes it from a blocked lock. `RESET` = 2
  stops it (status `UNUSED`).
- **status:** `UNUSED`, `USED`, `RUNNING`, `BLOCKED` or `EXIT`.
- **result:** the value the thread gave to exit.

The CPU, or any other thread, creates and joins a hardware thread with ordinary bus accesses
to these registers.

**User side.** These are the signals that the thread's logic sees:

| signal | width | direction (from the thread) |
|---|---|---|
| `intrfc2thrd_status` | 4 | in: `RESET` 0, `RUN` 1, `WAIT` 2, `ACK` 3 |
| `intrfc2thrd_result` | 32 | in |
| `thrd2intrfc_opcode` | 8 | out |
| `thrd2intrfc_argument_one` | 32 | out |
| `thrd2intrfc_argument_two` | 32 | out |

The handshake is the part that needs care when you write a thread:

1. While the status is `RUN` or `ACK`, the thread may put a non-zero opcode and its arguments
   on the outputs **for one cycle**. The HWTI latches them at that edge.
2. The status turns to `WAIT` while the call is in progress. The thread must keep the opcode
   at `NOOP` (0) and do nothing that depends on the call.
3. The status becomes `ACK` for exactly one cycle, with the call's value on
   `intrfc2thrd_result`, and then `RUN` again. The thread reacts to `ACK`. It may issue its
   next call in that same ACK cycle.
4. `RESET` means start over. A thread has no reset input of its own. When `RUN` first
   appears, `intrfc2thrd_result` carries the start argument.

The system calls:

| opcode | value | what the HWTI does |
|---|---|---|
| `NOOP` | 0 | nothing |
| `HTHREAD_EXIT` | 1 | result register ← argument_one, `EXIT` call to the thread manager, status `EXIT`, user status `RESET` |
| `LOAD` | 2 | bus read of argument_one, returns the word |
| `STORE` | 3 | bus write of argument_two to argument_one |
| `HTHREAD_SELF` | 4 | returns the thread id at once |
| `HTHREAD_YIELD` | 5 | returns at once: a hardware thread has its logic to itself |
| `HTHREAD_MUTEX_LOCK` | 6 | mutex manager `LOCK`; returns 0 (owner) or 1 (error) |
| `HTHREAD_MUTEX_UNLOCK` | 7 | mutex manager `UNLOCK`; returns 0 or 1 |

**A lock that has to wait.** The HWTI does not poll. It sets its system status to `BLOCKED`
and leaves the thread in `WAIT`. Nothing more happens until a `RUN` arrives in its command
register. The scheduler writes that `RUN` once the mutex has been handed to this thread (next
section). The HWTI then returns 0 from the lock, and the thread continues as the owner.

**Timing.** On an idle bus:

- SELF and YIELD answer on the next edge.
- LOAD, STORE, LOCK, UNLOCK and EXIT take about four to six cycles.

The published HWTI numbers are 5 cycles for RUN, SELF and YIELD, 4 for RESET, 60 for LOAD,
32 for STORE and 20 for the mutex and exit calls. Those were measured with DRAM behind a bus
bridge. The testbench treats them as upper bounds, and this design is well inside them.

## Mutex release: the hand-over done in hardware

Suppose thread 3 holds mutex M and threads 6 and 7 are queued on it. Thread 3 unlocks M. Then:

1. **Mutex manager.** It takes thread 6 from the head of M's queue and makes it the owner at
   once. The mutex never becomes free, so no third thread can take it in between. It then
   sends `add_thread(6)` to the thread manager on a dedicated valid/ready channel.
   - The answer to thread 3's unlock read is held back until that message has been accepted.
   - When thread 3 sees `RELEASED`, the hand-over is already in flight and cannot be lost.
2. **Thread manager.** It looks up thread 6's priority, kind (software or hardware) and HWTI
   number. It passes them on to the scheduler on a second valid/ready channel.
   - If an `ADD` call from the bus arrives in the same cycle, the message from the mutex
     manager goes first and the bus call waits.
3. **Scheduler.** What it does depends on the kind of thread.
   - A **hardware** thread is not queued. The scheduler becomes a bus master and writes `RUN`
     into HWTI 6's command register. The HWTI was blocked in its lock call; it now returns 0,
     and thread 6 runs as the owner of M.
   - A **software** thread enters the ready-to-run queue. Whether the CPU hears about it is
     decided by the preemption rule below.

The CPU executes none of these steps. Only its own unlock call touches the bus.

Each waiting thread is queued at most once: a blocked thread makes no further calls. The
queues are therefore FIFO linked lists through one `next` entry per thread id. All queues
together cost one table of `NUM_THREADS` entries, plus head and tail pointers per mutex.

## The scheduler: a decision that is always ready

The queue is a bit per thread id (ready or not) plus a priority per thread. Priority 0 is the
best. A combinational search keeps the best ready thread, with ties going to the lowest id,
valid one cycle after any change, however many threads are queued. The testbench checks this
with 1 and with 250 threads queued. This spends logic to make the decision time constant. The
original system took a constant 240 cycles for this; here it takes one.

The CPU's side:

- `NEXT` dequeues the best thread. The scheduler records that the CPU now runs at that
  thread's priority.
- `NEXT` with an empty queue, or `IDLE`, marks the CPU as idle.

The **preemption rule**: `cpu_irq` is raised only when an arriving software thread is better
than the thread on the CPU **and** better than every thread already queued.

- If it beats the CPU but not the queue, a thread that also beats the CPU is already waiting,
  and that one raised (or should have raised) the interrupt.
- An idle CPU is beaten by any arrival.

`cpu_irq` stays high until `IRQ_ACK`.

## The example hardware thread: a Haar wavelet transform

`dwt_thread` is user logic written against the HWTI's user side. It takes the start argument
as the address of a record `{length, data[length]}` of 32-bit signed samples and then:

1. Loads the length, clamped to `MAX_LEN`, and loads the samples into a local buffer.
2. Yields.
3. Computes the full integer Haar transform by lifting. Each level takes the first *m*
   entries, starting from *m* = length:
   - each pair (a, b) gives d = b − a and s = a + (d >>> 1);
   - the *s* values go to [0, m/2) and the *d* values to [m/2, m);
   - the next level works on the first m/2 entries;
   - this repeats while m is even and at least 2.
4. Stores the coefficients back in place.
5. Locks mutex `LOCK_ID`, adds one to the shared counter at `COUNT_ADDR` and unlocks.
6. Asks for its own id and exits with it.

The transform step handles one pair or one copied entry per cycle. A level of length *m*
therefore takes m/2 + m cycles.

Hardware threads run side by side. They compete only for the bus, which carries their loads
and stores one word at a time. With 64 samples per thread, measured from the first `ADD` to
the last exit:

| hardware threads | cycles | relative to one thread |
|---|---|---|
| 1 | 1008 | 1.00 |
| 2 | 1422 | 1.41 |
| 3 | 1827 | 1.81 |

Memory traffic dominates. A thread that did more computation per word would scale better.

## Simulating

All files are SystemVerilog 2017. The package must be compiled first. With plain verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/hthreads_pkg.sv tb/tb_hthreads_top.sv --top-module tb_hthreads_top
./obj_dir/Vtb_hthreads_top
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The
simulator model is two-state. Everything that is read is reset, except the contents of the
shared memory, which the testbenches write before they read.

| testbench | what it checks |
|---|---|
| `tb_hthreads_top` | Runs at the default parameters. The testbench is the CPU and runs a two-hardware-thread DWT program: create, start, block on a mutex the CPU holds, hand-over chain, exit, join, reset; then the software scheduling path with and without preemption. Checks 256-sample results against a reference transform. Counts bus contention, blocked locks, hand-overs, scheduler RUN writes, interrupts, and LOAD, STORE, SELF, YIELD and EXIT calls; each must happen. About 10,000 cycles. |
| `tb_hwti` | All system calls, register behaviour, blocked lock resumed by RUN, exit, reset; latencies against the bounds above |
| `tb_system_bus` | Routing of every region from every master, unmapped addresses, one select at a time, round-robin order under full contention, uncontended latency |
| `tb_mutex_manager` | Directed lock, trylock, unlock and error cases, FIFO hand-over with a stalled add channel, and 3000 random calls against a reference model |
| `tb_thread_manager` | Id allocation and reuse, attributes in every scheduler message, states, mutex messages and bus calls arriving together, full table |
| `tb_thread_scheduler` | RUN writes for hardware threads, the preemption rule (directed, and 600 random operations against a model), one-cycle decision with 1 and 250 threads queued |
| `tb_shared_memory` | Write, read back in scrambled order, neighbouring words undisturbed, one-cycle ack |
| `tb_dwt_workloads` | The DWT with 1, 2 and 3 hardware threads at once (`NUM_HWTI = 3`, 64 samples). Checks results, exit values and counter, and that k threads take less than k times one thread. Measured: 1008, 1422 and 1827 cycles. |
| `tb_dwt_thread` | Coefficients for lengths 32, 16, 12, 1, 2 and 40 (clamped), call order, counter, exit value, transform cycle count |

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_HWTI` | 2 | top, bus, scheduler: number of hardware threads |
| `NUM_THREADS` | 256 | thread ids (8-bit id) |
| `NUM_MUTEXES` | 64 | mutex manager |
| `MEM_WORDS` | 16384 | shared memory (64 KiB) |
| `DWT_MAX_LEN`, `DWT_LOCK_ID`, `DWT_COUNT_ADDR` | 256, 0, 0 | example thread |

To add a hardware thread, raise `NUM_HWTI`. The bus grows one master and one slave; HWTI *i*
is at `0x4000_0000 + 0x100*i`. To use other user logic, replace `dwt_thread` in the top's
generate loop with your own module that has the same six user-side ports.

## Where this design departs from the original system, and what it leaves out

- **Scheduler speed.** The decision is ready in 1 cycle instead of a constant 240. The
  property that matters, a constant time independent of the queue, is kept.
- **Bus.** The original used a vendor on-chip bus plus a vendor bus-interface block in each
  HWTI, with DRAM behind a second bus. Here there is one simple bus of this design's own, and
  the memory is an on-chip array. Memory latencies are therefore much shorter.
- **add_thread messages.** They travel on point-to-point valid/ready channels, not on the bus.
- **Encodings.** All of these are this design's own:
  - opcode values, status values and command values;
  - service addresses and the result codes;
  - priority width (4 bits, 0 best) and FIFO order among mutex waiters;
  - the error results for relocking, unlocking by a non-owner and a busy trylock.
- **Not built:**
  - the CPU-bypass interrupt scheduler and the condition-variable core. The original names
    them but does not describe their behaviour. The scheduler's interrupt line leaves the top
    directly.
  - the CPU. Its bus port and interrupt are the top's ports.
- **Example thread.** The DWT thread is hand-written, not generated from C. Its record layout,
  the lifting form of the transform and the counter update under a mutex are choices made to
  exercise every system call.
- **Scope.** A configuration with three hardware threads needs `NUM_HWTI = 3`; the default
  is two.
