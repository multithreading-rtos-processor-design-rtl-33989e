# RT-SHADOWS: RTOS scheduling and interrupt priority in hardware for a multithreaded ARM core

A real-time operating system spends much of its time on work that is not the
application. It saves and restores registers on every context switch, searches
ready lists for the most urgent thread, counts down delays and manages mutex
and semaphore queues. That work costs cycles, and because it depends on how
many threads exist, its duration varies.

RT-SHADOWS moves that work into hardware next to an ARM (ARMv5TE-class) core,
without changing the RTOS's scheduling policy. Three ideas carry the design:

1. **Every hardware thread has its own registers.** A context switch does not
   copy registers to memory. It changes the thread number that selects a
   register set in the pipeline.
2. **The scheduler is a coprocessor.** The kernel drives it with ordinary ARM
   `MCR`/`MRC` coprocessor instructions (coprocessor 14). Each command, such as
   "create thread", "switch", "delay me 5 ticks" or "take mutex 3", completes
   in one clock cycle however many threads exist.
3. **Interrupts and threads share one priority scale.** The interrupt
   controller knows the running thread's priority. An interrupt configured by
   a low-priority thread does not disturb a more urgent thread: it waits until
   the CPU is running something of its own priority or lower.

This repository holds synthesizable SystemVerilog for those mechanisms and
for the small SoC parts around them:
- the coprocessor scheduler;
- the multithreaded register file and the thread-aware hazard unit;
- the interrupt controller and its task-aware wrapper;
- the interval timer and the cycle-accurate performance monitor;
- the boot-time memory remap, a cachability control bit and a clock-domain
  synchronizer.

The ARM pipeline itself, the caches, the MMU and the memory and serial
controllers are not included. The top level brings out the signals through
which a core and those controllers would connect. The testbenches play the
core and the kernel.

## Block map

```
                 CP14 MCR/MRC                      register-file ports    hazard ports
 core ──────────────┬──────────────────────────────────────┬──────────────────┬──────
                    │                                      │                  │
            ┌───────▼────────┐ run_thread, ubank_thread ┌──▼────────┐   ┌─────▼───────┐
            │ hw_scheduler_cp├─────────────────────────►│ mt_regfile│   │mt_hazard_unit│
            │  prio_tree     │ reg_mode, ldm_stm_mod    └───────────┘   └─────────────┘
            │  fair_arbiter  │
            │  thread_delay  │ x NTHREADS
            │  mutex bank    │
            │  semaphore bank│
            └────────────────┘
 core data bus ──► soc_bus_decoder ──┬─► taic (wraps aic) ──► irq / fiq to core
   (REMAP)                           ├─► pit ──────────────► source 1
                                     ├─► perf_monitor ─────► source 1
                                     └─► SD / RAM / USART (ports), ready via sync_2ff
 cp15_cacheability ──► bus_cacheable
```

`rt_shadows_top` wires these together. Its ports are plain signals. The
important ones are:

| group | signals | use |
|---|---|---|
| CP14 | `cp_valid, cp_write, cp_crn[3:0], cp_op2[2:0], cp_wdata, cp_rdata` | one MCR (`cp_write=1`) or MRC per cycle; read data is combinational |
| scheduler status | `run_thread, run_prio, sched_on, preempt_req, cs_evt, tick_count` | thread number the pipeline must fetch for, and so on |
| data bus | `bus_valid, bus_we, bus_addr, bus_wdata, bus_rdata, bus_ready, bus_cacheable` | loads and stores of the core |
| external devices | `ext_dev, ext_offset, ext_rdata, mem_ready_async, remap` | SD-Card, RAM and USART controllers |
| register file | `rf_*` | two read ports, one write port, CPSR/SPSR ports |
| hazards | `hz_*` | thread-tagged forwarding and load-use stall |
| interrupts | `fiq_src, irq_src[31:2], irq, fiq, irq_held, pit_tick` | sources in, requests to the core out |
| performance monitor | `pm_if_valid/addr, pm_wb_valid/addr` | fetch and write-back addresses from the pipeline |

## Hardware threads and the register file (`mt_regfile`)

Hardware thread 0 is the kernel. It sees the complete ARM register set:
- R0-R15 shared by user and system modes;
- banked R8-R14 for FIQ;
- banked R13/R14 for SVC, ABT, UND and IRQ;
- one SPSR per exception mode.

Out of reset only thread 0 exists, and the core behaves like an ordinary
single-threaded ARM.

Threads 1 to NTHREADS-1 each own a private R0-R15 and CPSR. Two rules decide
which register set an instruction uses:

1. **Mode rule.** An instruction of thread *t* ≥ 1 uses thread *t*'s
   registers only while the processor is in the *thread mode* written to
   coprocessor register C3 op1. Different RTOSes run their threads in
   different modes, for example system mode or supervisor mode. In any other
   mode the instruction uses thread 0's banked registers. This is why an
   interrupt needs no register save: taking the IRQ changes the mode, so the
   handler automatically works in the kernel's IRQ bank. The interrupted
   thread's registers stay where they are.
2. **User-bank rule.** The ARM forms `LDM ...^` and `STM ...^` normally reach
   the *user-mode* registers from a privileged mode, and kernels use them to
   load and store a thread context. When C3 op0 is set, they instead reach
   `ubank_thread`:
   - during thread creation, the thread being created, so the kernel can
     preload its R0 and SP;
   - otherwise, the running thread.

The pipeline carries the thread number in every stage. `mt_hazard_unit` only
matches a source register against an older destination of the **same**
thread. It forwards from execute (1) or memory (2), or stalls decode one
cycle on a load-use dependency. Instructions of different threads never
create a hazard, because they use different registers.

## The coprocessor scheduler (`hw_scheduler_cp`)

### Per-thread state

Each slot holds:
- a state;
- an 8-bit priority;
- a 32-bit handler (the RTOS's name for the thread);
- a stack pointer;
- a 32-bit delay time-stamp;
- what the thread is waiting for.

State codes are:

| code | state |
|---|---|
| 0 | void (free slot) |
| 1 | blocked |
| 2 | suspended |
| 4 | ready |
| 8 | running |

Slot 0 is never scheduled. When no hardware thread is ready, a context switch
makes thread 0 run, and the kernel idles or runs software threads there.

### Command map (CRn, opcode2)

Every command takes one cycle. Reads return data combinationally.

| CRn | write (MCR) | read (MRC) |
|---|---|---|
| C0 create | op0 start a creation; op1 priority; op2 handler; op3 initial state (4 ready, 2 suspended); op5 stack pointer; op7 commit into the free slot | op0 number of threads; op1 number suspended |
| C1 selected thread | op0 select by handler (the self identifier selects the caller); op1 priority; op2 state (0 deletes); op3 stack pointer; op5 new handler; op7 delay the **running** thread by *n* ticks | op0 handler or 0xFFFFFFFF; op1 priority; op2 state; op3 stack pointer; op6 most urgent ready priority |
| C2 scheduler | op0 context switch; op5 running thread's stack pointer; op6 one OS tick; op7 scheduler on/off | op1 running handler (0xFFFFFFFF for none); op2 running priority; op5 stack pointer; op6 lowest free slot, 0 if full; op7 scheduler state |
| C3 configuration | op0 LDM^/STM^ redirect; op1 thread mode; op2 self identifier; op3 priority order (0: priority 0 most urgent, 1: larger number more urgent); op4 round-robin; op5 preemptive (reset 1) | same values |
| C4 mutexes | op0 select; op1 take; op2 give; op5 block the running thread on the selected mutex for *n* ticks (0xFFFFFFFF forever); op6 create; op7 delete | op0 handler or 0xFFFFFFFF; op1 taken; op7 next free slot or 0xFFFFFFFF |
| C5 semaphores | as C4, plus op3 initial count and op4 maximum count for the next create | op1 reads 1 when the count is zero |

A mutex's or semaphore's handler is its slot number.

### Picking the next thread

A context switch command (C2 op0) runs three combinational stages:

1. **`prio_tree`** finds the most urgent priority value among ready and
   running threads. It is a balanced binary tree of comparators, padded to a
   power of two. The compare direction follows the order bit, so it suits both
   RTOS conventions: FreeRTOS counts up, µC/OS-II counts down.
2. **Top-priority vector.** One bit per thread marks the candidates that hold
   that value.
3. **`fair_arbiter`** picks one of the marked threads.
   - With round-robin on, it searches from the thread after the running one.
     If threads 1 and 3 are marked and 1 runs, 3 is next.
   - With round-robin off, a marked running thread keeps the CPU.

At the clock edge the previous thread returns to ready and the chosen one
becomes running. The pipeline then fetches for the new `run_thread`; no
register is copied.

`preempt_req` tells the kernel that a strictly more urgent thread is ready
(preemptive mode only). The kernel switches at the next tick. Equal-priority
peers share the CPU through the tick's round-robin switch.

### Time: one counter, many time-stamps

There is a single 32-bit tick counter, advanced by the kernel's tick handler
(C2 op6), instead of one timer per thread.
- A delay of *n* ticks stores `tick + n` in the thread's time-stamp and blocks
  the thread.
- `thread_delay_logic`, one instance per thread, makes the thread ready once
  `tick - stamp` is no longer negative. The subtraction is signed, so the
  counter may wrap.
- Example: at tick 20, a 5-tick delay ends when the counter reaches 25.

Mutex and semaphore waits reuse this logic as their time-out. A thread that
blocks on a taken mutex or an empty semaphore (op5) is blocked until one of
these happens:
- its time-stamp is reached (time-out);
- the object is given (all of its waiters become ready);
- the object is deleted.

The woken threads retry the take in software, so the most urgent one wins.
There is no priority inheritance.

### Typical kernel sequences

- **Create a thread:**
  1. Read C2 op6 for a free slot; 0 means use a software thread instead.
  2. Write C0 op0, op1, op2, op3.
  3. `LDM R0, {R0,R13}^` fills the new thread's R0 and SP through the
     redirect.
  4. Write C0 op5 (stack pointer), then C0 op7 (commit).
- **Tick interrupt:**
  1. Read the AIC vector.
  2. Acknowledge the PIT.
  3. Write C2 op6 (tick), then C2 op0 (switch).
  4. Read C2 op2 and store it to the TAIC's RTP register.
  5. Write end-of-interrupt, then return.
- **Delay:** write C1 op7 with the tick count, then C2 op0.
- **Take a mutex:**
  1. Select it with C4 op0.
  2. Read C4 op1.
  3. If it is free, write C4 op1. Otherwise write C4 op5 with the time-out,
     then C2 op0. When the thread runs again, retry.

## Interrupts in one priority scale (`aic`, `taic`)

`aic` is a conventional vectored controller. Its register layout follows the
common Atmel AIC arrangement:

| offset | register |
|---|---|
| 0x000 | SMR\[i\] (priority 0-7, bit 5 = edge) |
| 0x080 | SVR\[i\] |
| 0x100 | IVR (read = acknowledge) |
| 0x104 | FVR |
| 0x108 | ISR |
| 0x10C | IPR |
| 0x110 | IMR |
| 0x114 | CISR |
| 0x120, 0x124 | IECR, IDCR |
| 0x128, 0x12C | ICCR, ISCR |
| 0x130 | EOICR |
| 0x134 | SPU |

It has 32 sources, with source 0 as FIQ and 8 priority levels.
- Reading IVR pushes the level on an 8-deep stack, and EOICR pops it.
- A pending interrupt interrupts a serviced one only if its level is strictly
  higher.
- Among equal levels the lower source number wins.

`taic` wraps it and adds two kinds of register:

- **RTP** (running thread priority, offset 0x14C, i.e. 0xFFFFF14C) is written
  by the kernel after every context switch.
- **ITP[i]** (interrupt-thread priority, one per source, read-only at
  0x180+4i) is loaded from RTP at the moment software writes SMR[i]. An
  interrupt therefore inherits the priority of the thread that configured it.

An IRQ passes to the core only if `ITP[source] >= RTP`. Otherwise it stays
pending in the AIC, `irq_held` shows it, and it is delivered as soon as RTP
drops far enough. FIQ is never held.

Because the comparison is numeric `>=`, threads must use "larger number is
more urgent". Set the scheduler's order bit (C3 op3) to 1 when the TAIC is
used. The kernel sets RTP to 0xFF while it configures its own interrupts
(such as the tick), so they always pass.

## SoC pieces

- **Memory map and REMAP (`soc_bus_decoder`).**

  | region | after reset | after REMAP |
  |---|---|---|
  | SD-Card | 0x0000_0000-0x7FFF_FFFF | 0x1000_0000-0x8FFF_FFFF |
  | RAM (256 MB) | 0x8000_0000-0x8FFF_FFFF | 0x0000_0000-0x0FFF_FFFF |

  The SD-Card sits at 0 after reset so a boot loader can run. Any store to
  0xFFFF_FD50 performs the REMAP. After it the exception vectors live in fast
  RAM. The swap lasts until reset.

  Peripheral windows are USART 0xFFFB_0000, AIC 0xFFFF_F000, PIT 0xFFFF_FD30
  and performance monitor 0xFFFF_FD80. Reading the REMAP window returns the
  REMAP state.
- **PIT (`pit`).** An interval timer in the Atmel style:
  - MR holds PIV in bits 19:0, enable in bit 24 and interrupt enable in
    bit 25. SR, PIVR and PIIR follow; reading PIVR acknowledges.
  - The period is `(PIV+1) * PRESCALE` cycles, with PRESCALE = 16.
  - The 10 ms tick at 33 MHz needs PIV = 20624.
- **Performance monitor (`perf_monitor`).** It counts cycles from the fetch
  of the instruction at START to the write-back of the instruction at END,
  both cycles included. It then sets DONE and can interrupt, so code is
  measured without adding timer calls to it.

  | offset | register |
  |---|---|
  | 0x00 | CTRL (EN, IRQEN) |
  | 0x04 | START |
  | 0x08 | END |
  | 0x0C | COUNT |
  | 0x10 | STATUS (DONE, BUSY; write 1 clears DONE) |

  A new measurement starts only after DONE is cleared.
- **Peripheral cachability (`cp15_cacheability`).** With the data cache on
  and the MMU off, ARM treats every access as cachable, which would cache
  device registers. One added CP15 bit makes addresses from 0x9000_0000 up
  uncachable in that case. With the MMU on, the page table decides.
- **Synchronizer (`sync_2ff`).** Two flip-flops bring the memory
  controller's ready signal into the 33 MHz domain, with two cycles of
  latency.

## Parameters and size

| parameter | default | meaning |
|---|---|---|
| `NTHREADS` | 8 | hardware thread slots, including kernel slot 0 (designed for 4 to 128) |
| `NMUTEX`, `NSEM` | 8, 8 | hardware mutexes and semaphores |
| `NSRC` | 32 | interrupt sources |
| `PIT_PRESCALE` | 16 | PIT prescaler |
| `PRIO_W` | 8 | priority width (scheduler, ITP, RTP) |

At the defaults, a generic yosys synthesis of `rt_shadows_top` gives about
2,300 cells and 3,600 flip-flops. The register file (4,576 bits) is mapped as
memory. Register-file size grows linearly with `NTHREADS`. The scheduler's
comparator tree has N-1 comparators, and its depth grows as log2 N. The top
also lints cleanly at `NTHREADS` = 16 and 128. Only the default of 8 has been
simulated.

## Departures and own choices

The original description gives the coprocessor tables, the block structure
and the behaviour. The following points are this implementation's own
reading or choice:
- C0 op3 sets the initial state and C0 op5 the stack pointer, and a read of
  C2 op6 returns the free slot. This follows how kernel code uses these
  commands, not the register tables.
- The round-robin and preemptive mode bits (C3 op4/op5) and the blocked and
  running state codes are new.
- Time-stamps are compared as "reached", not "passed".
- A give wakes every waiter.
- AIC and PIT register layouts follow the Atmel convention. The ITP read-back
  window, the performance monitor's register map, the cachability bit's
  address boundary and the bus handshake are invented here.
- Thread 0 as the non-schedulable kernel slot is a design decision.

## Not included

- The ARMv5TE five-stage pipeline.
- The 16 KB 16-way instruction cache and 8 KB 8-way data cache.
- The page-table-walking MMU and the rest of CP15.
- The DDR3 controller, SD-Card controller and USART.

The top has ports where each would connect.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if it
hangs. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_rt_shadows_top \
  -y rtl -y tb rtl/rts_pkg.sv tb/tb_rt_shadows_top.sv
./obj_dir/Vtb_rt_shadows_top
```

`tb_rt_shadows_top` runs the whole system at its default sizes, with the
testbench acting as core and kernel. In one run it:
- boots with REMAP;
- waits on memory through the synchronizer;
- makes peripherals uncachable;
- creates four threads, loading their registers through the redirected
  `LDM^` path;
- raises a preemption request;
- round-robins between equal priorities;
- blocks and wakes on a mutex and on a semaphore, and times out a semaphore
  wait;
- delays, suspends and deletes threads;
- holds a serial interrupt configured by the least urgent thread and
  releases it when that thread runs;
- services five PIT ticks, checking the period in cycles and which thread
  runs after each tick;
- services an interrupt in the kernel's register bank;
- exercises forwarding and a load-use stall;
- takes a performance-monitor measurement.

It counts every mechanism and fails if one never happened. The unit
testbenches add randomised comparisons against reference models for the
priority tree, the arbiter, the hazard unit, the address decoder and the
synchronizer.

Three more testbenches run application-level patterns on the whole system at
its default sizes:
- `tb_taic_experiment` runs four compute threads at the top priority
  (round-robin on the tick) and a low-priority echo thread that owns a
  serial-receive interrupt. It runs once with RTP never written, which makes
  the controller a plain AIC. It runs again with the kernel writing RTP on
  every switch. In the first run the serial handler interrupts the compute
  threads 17 times. In the second it never does, and the compute threads
  finish about 2,000 cycles (12,187 → 10,131) sooner. The buffered
  characters are handled as soon as the echo thread runs.
- `tb_api_latency` draws 40 random configurations. Each varies the thread
  count (1 to 7), the priority gaps, the priority order, round-robin on or
  off, and whether a call causes a context switch. For each, it runs create,
  priority get/set, suspend, resume, yield, delay, and mutex and semaphore
  take/give. A reference model inside the testbench checks every result.
  Every service takes effect by the cycle after its command, with no
  variation between configurations.
- `tb_thread_metric` repeats the thread and interrupt patterns of the
  Thread-Metric RTOS benchmarks over a 3,000-cycle window each:
  - cooperative round-robin;
  - a chain of five preemptive priorities;
  - software interrupt plus semaphore;
  - an interrupt handler resuming a more urgent thread;
  - semaphore get/put.

  It checks the order of every switch and the balance of the counters. The
  message-queue and memory-pool benchmarks are pure software and are not
  repeated.
