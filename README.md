# Interleaved multithreading for a 5-slot VLIW media processor

A VLIW processor stalls completely when a load or an instruction fetch misses
in its first-level cache. This design adds hardware threads so that those
cycles can be used. Each hardware thread holds a whole task. One thread runs
at a time. When it misses in the instruction or data cache, the processor
switches to the next ready thread in round-robin order. The switch costs one
cycle because every thread has its own copy of the pipeline registers. The
thread that missed waits until its line arrives and then becomes ready
again.

Missing is not the only reason to switch. A thread that busy-waits for
another thread on the same CPU may never miss, so each thread also gets a
maximum number of active cycles, its *quantum* (QTE, quantum time
expiration). The default quantum is 90 cycles.

The RTL covers everything that multithreading adds or changes:

- the scheduler and its quantum timer;
- the per-thread state: registers, MMIO registers, pipeline registers and
  the load-link reservation;
- the caches that all threads share;
- the memory path: the miss unit with its pending buffer and copy-back
  buffer, the memory subsystem buffer and the bus interfaces.

The VLIW core itself is not part of this RTL: its decoder, functional units
and instruction set. It connects to the top level through a
one-instruction-per-cycle interface.

## What is replicated and what is shared

| Per thread (replicated) | Shared by all threads |
|---|---|
| 128 x 32-bit general purpose registers (`gpr_file`) | functional units (in the core) |
| MMIO registers (`mmio_regs`) | 32 KB instruction cache, 8-way, 64-byte lines (`shared_cache`) |
| pipeline registers / program state (`pipe_context`) | 16 KB data cache, 8-way, 64-byte lines (`shared_cache`) |
| LL/SC reservation (`ll_sc_monitor`) | pending buffer, copy-back buffer, mss buffer, bus interfaces |

Each register-file write port carries its own thread id. A long-latency
functional unit can finish after a switch, and its result must still go to
the thread that issued the operation. Register 0 reads as 0 and register 1
as 1 in every bank. MMIO register 0 returns the hardware thread number,
which boot code uses to tell the threads apart.

## Switching rules (`thread_scheduler`, `qte_timer`)

Each cycle the scheduler asks three questions, in this order:

1. Has the quantum expired? If so, and another thread is ready, switch. The
   instruction of this cycle does not issue. If no other thread is ready,
   the quantum simply starts again.
2. Is the instruction in the I-cache? If not, the thread is marked not
   ready and the processor switches.
3. Is all the data in the D-cache? If not, the same happens.

Otherwise the instruction commits.

After a switch decision there is one dead cycle (`switching`), and then the
new thread issues. If no thread is ready, the processor idles until the miss
unit wakes one. The quantum counts the cycles a thread is active. It
restarts at every switch.

## The memory path: where the subtle parts are

Several threads can have a line outstanding at the same time. All of them
share one set of caches. Three structures keep this correct and efficient.

**Pending buffer (`pending_buffer`).** There is one entry per thread, each
holding a tag, a set, a valid bit and a cache-select bit. On a miss the
whole buffer is searched:

- If the line is already being fetched for another thread, no second
  request is made. The missing thread is recorded as a waiter of that
  entry.
- When the line arrives, the owner and all of its waiters are woken in the
  same cycle.

This saves bus traffic for lines that threads share. It also keeps a
thread from reading a line while another thread's write miss to that line is
still outstanding.

**Copy-back buffer (`copy_back_buffer`).** The data cache is copy-back, so
a refill can push out a dirty line. That line's address sits in the
refilling thread's entry until memory has acknowledged the write. A thread
that misses on such a line may not fetch it yet, because it would read the
stale memory copy. It waits on the entry, is woken when the copy-back
completes, and then fetches the line again. A thread whose own entry is
still busy is held back in the same way. This guarantees that its next
refill finds the entry free.

**Memory subsystem buffer (`mss_buffer`) and bus interfaces
(`bus_interface`).** Each bus interface carries only one request at a
time. The mss buffer queues the fetches and copy-backs of all threads in
order and gives the oldest one to the first free interface. The default
configuration has three threads and two bus interfaces. With `NUM_BUS=1`
every request is sequentialised. With `NUM_BUS=NUM_THREADS` there are as
many interfaces as threads.

**Miss unit (`miss_unit`).** The miss unit ties these together:

- A miss is checked against the copy-back buffer first, then against the
  pending buffer. Only a new line produces a fetch.
- One response is taken per cycle. A fetched line is written into its
  cache. If the refill displaces a dirty line, a copy-back is queued and
  recorded in the copy-back buffer.
- The caches have a single port, so the core does not issue in a cycle in
  which a response is handled (`stall_fill`).

**Shared caches (`shared_cache`).** Replacement is LRU on a global clock.
Every line stores the time of its last use from one free-running counter,
and a refill replaces the line unused for longest. Because the clock is
global, a use by any thread makes a line recent for all threads. Lookups
are combinational. A lookup writes or refreshes the line only when the
instruction commits.

**LL/SC (`ll_sc_monitor`).** Switching away from a thread drops that
thread's reservation. A switch between LL and SC therefore always makes the
SC fail, and the software loop runs again. A write to the reserved word by
another processor also drops it; that write comes in on the `snoop` input.

## Core interface of `mt_trimedia_top`

In every cycle the core shows the active thread's next instruction:

- its fetch address (normally derived from `pipe_q`, the thread's stored
  pipeline state);
- its data operation: `d_op` is none, load, store, LL or SC.

When `commit` is high the instruction completed:

- the core's next state `pipe_d` is stored for that thread;
- `d_rdata` holds load data and `sc_ok` the SC result;
- stores and successful SCs are written.

When `commit` is low the core must present the same instruction again the
next time its thread runs. The thread may have been switched out in
between.

Main memory connects through one port per bus interface:

- request: valid/ready, write flag, line address, 512 bits of data;
- response: a one-cycle valid with 512 bits of read data.

The `ev_*` outputs and `sw_take`/`sw_reason` are strobes for performance
counters.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_THREADS` | 3 | hardware threads (up to 8) |
| `NUM_BUS` | 2 | bus interfaces behind the mss buffer |
| `QTE_CYCLES` | 90 | quantum in active cycles |
| `ICACHE_BYTES` / `DCACHE_BYTES` | 32768 / 16384 | cache sizes |
| `CACHE_WAYS` | 8 | associativity of both caches |
| `NUM_GPR`, `RD_PORTS`, `WR_PORTS` | 128, 15, 5 | register file |
| `NUM_MMIO`, `PIPE_W` | 16, 64 | per-thread MMIO registers, pipeline state width |

The defaults reproduce a configuration that was evaluated with MPEG-2
decoders:

- 16 KB / 32 KB caches;
- three threads with two bus interfaces;
- a 90-cycle quantum, the best value found for the optimised decoder.

Those evaluations also used two threads, one or three bus interfaces,
halved and doubled caches, and quanta from 10 to 890 cycles. All of them are
reachable through the parameters.

## Design choices beyond the source description

These points were not specified and are choices of this RTL:

- Port counts of the register file: three reads and one write per issue
  slot.
- Register 0 and 1 as constants. Register width is 32 bits.
- Number of MMIO registers, and thread number in MMIO register 0.
- Width and content of the pipeline state.
- Cache-select bit in the pending buffer, so instruction and data misses
  never merge.
- Copy-back buffer also blocks a thread whose own entry is busy.
- Copy-back buffer is checked before the pending buffer.
- Whole-line, single-beat memory transfers. The bus handshake.
- One response per cycle, with a one-cycle issue stall for each refill.
- A quantum that expires while no other thread is ready is renewed instead
  of switching.
- Write-allocate data cache. The victim is chosen when the refill arrives.
- Instruction fetch is one 32-bit word per cycle. The real VLIW instruction
  format is not modelled.
- The mss buffer is a FIFO with two entries per thread and is kept even
  when there are as many bus interfaces as threads.

Not built:

- the VLIW core;
- main memory (modelled in the testbenches);
- the second-level cache (only mentioned as a source of short misses);
- the software changes that were only proposed, such as compiler-inserted
  forced switches and a program-adjustable quantum.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_thread_scheduler` compares the scheduler against a reference model
  of the switching rules, under random misses, wake-ups and stalls.
- `tb_shared_cache` checks data, hit/miss, the LRU victim and copy-back
  data against a model of every set.
- `tb_pending_buffer` replays the four-entry example with tags 0xC0002000,
  0xC0005060, 0xC0002000 and 0xC0003000 in sets 19, 4, 17 and 19. It then
  runs random traffic.
- `tb_mt_trimedia_top` runs three threads of a behavioural core through
  the whole design. It uses small caches (2 KB / 1 KB, 4-way) and a
  40-cycle quantum so that every mechanism happens often. Every load, LL
  and instruction word is checked against an architectural reference
  memory, and every SC against a reference reservation. The test also
  counts each mechanism and fails if one never happened. The mechanisms
  are: quantum switches, instruction-miss and data-miss switches, merged
  misses, copy-back blocking, copy-backs, refill stalls, idle cycles, SC
  failures after a switch, and late register writes.
- `tb_mt_trimedia_full` runs the same test with every parameter at its
  default. It runs 6000 instructions per thread over 64 KB of code per
  program and 64 KB of data.
- `tb_mt_cfg_2t1b`, `tb_mt_cfg_2t2b`, `tb_mt_cfg_3t1b` and `tb_mt_cfg_3t3b`
  run the same checks in the other evaluated thread and bus-interface
  combinations, with the small caches.
- `tb_mt_qte10` and `tb_mt_qte180` run the default thread and bus
  configuration with the small caches, at the two ends of the evaluated
  quantum range.

This synthetic workload is miss-heavy: its 20-cycle memory latency and small
caches make almost every thread wait most of the time. On it, the number of
bus interfaces dominates. Three threads need about 152k cycles with one
interface, 77k with two and 60k with three. Two threads need 104k cycles
with one interface and 61k with two. These are figures for a stress test,
not predictions for real programs, whose miss rates are far lower.

To simulate with Verilator, list the package first:

```
verilator --binary --timing --assert -Irtl rtl/mt_pkg.sv \
  $(ls rtl/*.sv | grep -v mt_pkg) tb/tb_mt_trimedia_top.sv \
  --top-module tb_mt_trimedia_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another test. Each block testbench needs
only the package, its module and the modules it instantiates.
