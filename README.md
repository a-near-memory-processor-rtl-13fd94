# NMP: a near-memory coprocessor for vectors, streams and bit manipulation

The NMP is a small coprocessor placed next to the memory controller. It
takes over code that a cache-based main processor runs badly: long vector
loops, producer/consumer pipelines, and bit-level work such as permutations
and bit-stream coding. It has no caches. Three ideas hide the 470-cycle
memory latency and keep the hardware small:

* **Blocked multithreading.** There are four hardware contexts. A thread runs
  until it would stall, then the core switches to another ready thread in 4
  cycles. A stall can be a main-memory transfer, a synchronization wait or
  the end of the thread. A context is only a small register file, so a switch
  saves nothing.
* **A shared, flag-carrying scratchpad.** All vectors and stream buffers live
  in a 64 KB scratchpad that every thread shares, not in per-thread vector
  registers. Each byte has three flags: full/empty, error and mask. The
  full/empty bit gives producer/consumer synchronization between threads for
  free.
* **Bit-manipulation instructions.** These are Leadz, Popcnt, Mix and Sshift
  (a shift of a whole 128-byte block), plus a bit matrix multiply (Bmm)
  against one 64x64 Bit Matrix Register (BMR). The BMR is shared by all
  threads and tagged with its owner.

The main processor starts work by writing an *invocation packet* into a
memory-mapped register set. The packet holds a function pointer, an
argument pointer and a completion-flag address. The NMP turns the packet
into a thread and, when the thread ends, stores 1 to the completion flag.

This RTL builds the NMP datapath and control at the main configuration:
16 lanes, 4 contexts, 4-cycle switch, 64 KB scratchpad with 6-cycle access,
20-bit scratchpad virtual addresses and 128 memory operations in flight.
The instruction fetch/decode pipeline and scalar units of the base
instruction set are not included (see "What is not here").

## Block diagram

```
 host (main processor)         decoded operations (front end)
   |  h_*                         |  fe_op_*, fe_rf_*
 nmp_invocation_regs           nmp_exec_ctrl ------------------+
   |  packets                     | |  bitmanip, bmr, sshift,  |
 nmp_thread_mgr  <-- events ------+ |  vector_unit, stream_addr|
   |  cur_tid, completion store     |                          |
   |                          spad TLB (nmp_tlb)   vector load/store (nmp_vls)
 nmp_regfile (4 contexts)          |  port 0        | port 1   |  main TLB (nmp_tlb)
                              nmp_scratchpad (16 banks, flags) |
                                                    m_* / mr_* to the memory controller
```

`nmp_top` wires these together. Files: `rtl/nmp_pkg.sv` holds the shared
constants, operation codes, exception causes and the specifier layout. Every
other file holds one module.

## Scratchpad, specifiers and addressing modes

The scratchpad (`nmp_scratchpad`) has 16 banks of 64-bit words. Word `w` is
in bank `w mod 16`, so one access reaches 16 consecutive words (128 bytes) at
any word address. Each bank entry stores the data word and one byte each of
full/empty, error and mask flags. Writes are read-modify-write of whole
entries, so each bank maps onto a RAM. Reads return after 6 cycles. There are
two ports: the execution controller uses port 0 and the vector load/store
unit uses port 1.

Access kinds:

| op         | needs          | effect                                  |
|------------|----------------|-----------------------------------------|
| SP_READ    | -              | read                                    |
| SP_WRITE   | -              | write data, error, mask; F/E unchanged  |
| SP_SYNC_RD | all bytes full | read and mark empty (consuming read)    |
| SP_PEEK    | all bytes full | read, F/E unchanged                     |
| SP_SYNC_WR | all bytes empty| write and mark full                     |
| SP_SETFE   | -              | set F/E bits from the data              |

A synchronized access whose condition fails is refused (`ok=0`) and changes
nothing. The execution controller then reports the operation as *blocked*,
the thread manager switches the thread out, and the thread retries after the
next full/empty change anywhere (`wake_sync`).

After reset, the flags are cleared by a sweep of one row per bank per cycle,
which takes 512 cycles. During the sweep `sp_busy` is high and all accesses
are refused.

Threads address the scratchpad with 20-bit virtual addresses. These are
translated with 4 KB pages by `nmp_tlb`. A miss raises `EX_SPAD_MISS`; the
page-miss handler (software) fills the entry through `stlb_*` and the
operation is retried.

Operands are named by 64-bit registers. In indirect modes the register holds
a *specifier*:

```
[19:0]  scratchpad virtual start address
[35:20] length in elements (vector or stream buffer)
[51:36] head index (input stream) or tail index (output stream)
```

The element size is 1, 2, 4 or 8 bytes and is part of the operation. The
four modes are:

* **direct:** the register is the operand.
* **scalar indirect:** the register holds a scratchpad address.
* **vector indirect:** the register holds a vector specifier.
* **stream indirect:** the register holds a stream specifier.

A stream read dequeues or peeks at the head, and a stream write deposits at
the tail. The pointer wraps at the end of the buffer, and the updated
specifier is written back to the register. The full/empty bits stop overflow
and underflow. The layout of the specifier is this design's own. A vector or
stream buffer must lie within one page, so each operand is translated once.

## Execution controller

`nmp_exec_ctrl` takes one decoded operation at a time (`nmp_op_t`: opcode,
element size, mode and three register numbers). The read ports of the
register file give rd, rs and rt. The controller runs a fixed sequence:

1. Translate each scratchpad operand (`S_XA/XB/XD`).
2. Read the operands 16 words per access (`S_RDA/WA/RDB/WB`).
3. Compute.
4. Write the result back, 16 words per access (`S_WRD`), or write a register.

Exactly one of `op_done`, `op_blocked` or `op_exc` pulses per operation.

Operations:

* **Leadz, Popcnt, Mix:** `nmp_bitmanip`.
* **Sshift** (left/right, rotating or zero-filling): `nmp_sshift`. The
  128-byte block is one number whose lowest-address word is most significant.
* **Vector add, sub, and, or, xor, mul, compare:** `nmp_vector_unit`, on
  1/2/4/8-byte elements.
  * A source element that is masked is not computed. The result takes the
    first source's value and is masked in the destination.
  * Signed overflow of add, sub or mul sets the element's error flags and
    does not trap.
  * Compare writes all-ones when true, and zero plus the mask bit when false.
  * In direct mode the second operand is a scalar broadcast to every element.
* **Bmm_load** (16 rows per access) **and Bmm:** `nmp_bmr`.
  * Bit `63-j` of the result is the parity of `src & row j`.
  * Bmm_load makes the running thread the owner of the BMR.
  * A Bmm by any other thread raises `EX_BMR_TAG`. The system software then
    reloads the BMR for that thread and the Bmm is retried.
* **Stream enqueue, dequeue and peek; scalar load/store between the
  scratchpad and a register.**
* **Vector load/store** between main memory and the scratchpad. The
  controller hands the command to `nmp_vls` and switches the thread out
  until the transfer ends. Register roles: rd is the scratchpad vector, rs
  the memory virtual address, rt the byte stride (0 means 8).
* **Exit:** ends the thread and has the thread manager store the
  completion flag.

The register file bypasses a write to the readers in the same cycle. This
lets the next operation issue in the cycle the previous one completes.

## Vector load/store unit

`nmp_vls` queues one command per context.

* **Translation.** Each element address is translated by the main-memory TLB
  (64-bit virtual to 48-bit physical, 4 KB pages, 32 entries).
* **Loads.** Up to 128 requests are in flight, each with a tag in a
  128-entry table. Responses may return in any order. Each response is
  written into its scratchpad word.
* **Stores.** The unit reads 16 words from the scratchpad at a time and
  issues them.
* **Completion.** When a command has no request outstanding, the thread is
  woken (`done`, `done_tid`).
* **TLB miss.** A miss ends the command early and reports the context, the
  element index and the virtual address on `vls_exc_*`. Software maps the
  page and reissues the rest of the transfer. This exception is restartable
  but not precise.

## Threads and invocation

`nmp_invocation_regs` has four register sets, 32 bytes apart:

| offset | register          |
|--------|-------------------|
| +0     | function pointer  |
| +8     | argument pointer  |
| +16    | completion flag   |
| +24    | control           |

A write to the control register is the doorbell. A doorbell while a packet
is still pending is refused. Reading the control register returns
`{last doorbell accepted, pending}`.

`nmp_thread_mgr` takes a pending packet when a context is free. It sets the
context's `r4` to the argument pointer and marks the context ready. The
ready contexts, served round-robin, form the job queue. Context states are
free, ready, running, blocked on synchronization, blocked on memory, and
exiting.

When the running thread blocks or exits, or when the core is idle and a
thread is ready, a switch starts in that cycle. The next thread runs after
4 cycles. An exiting thread's completion store goes out on the memory port
with tag `8'h80`. It has priority over vector traffic, and its context is
freed once the store is accepted.

## Interfaces of `nmp_top`

* `h_*`: host access to the invocation registers (8-bit byte address,
  64-bit data).
* `cur_valid`, `cur_tid`, `cur_func`: the running thread, for the front end.
* `fe_op_valid/ready`, `fe_op`: decoded operations from the front end.
  * Completion is reported on `fe_op_done`, `fe_op_blocked`, or `fe_op_exc`
    with `fe_exc_cause` and `fe_exc_va`.
  * `fe_rf_*` writes the running thread's registers.
* `stlb_*`, `mtlb_*`: TLB writes and invalidations (refill and shootdown by
  system software).
* `m_*`, `mr_*`: the memory controller. Requests are valid/ready with an
  8-bit tag and a 48-bit physical address. Responses are tagged; stores are
  acknowledged too.
* `vls_exc_*`: restartable vector load/store TLB-miss exception.
* Status outputs: `n_switches`, `n_pending`, `bmr_owner/bmr_owned` and
  `sp_busy`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nmp_pkg.sv tb/tb_nmp_top.sv \
          --top-module tb_nmp_top -Mdir obj && obj/Vtb_nmp_top
```

`tb_nmp_top` runs the whole NMP at its default sizes. It models main memory
(470-500 cycles, out of order), the host, the instruction front end and the
system-software handlers, and runs three threads as a pipeline:

* **Producer.** Vector-loads input words and feeds them into a 4-entry
  stream buffer.
* **Worker.** Loads its bit matrix, applies Bmm to each word and feeds a
  second stream buffer.
* **Consumer.** Collects the results, then:
  * uses the BMR after the worker has loaded it, which raises a tag
    exception;
  * touches an unmapped scratchpad page, which raises a page miss;
  * doubles the vector with a vector add;
  * rotates the 128-byte block with Sshift;
  * vector-stores the block.

The testbench checks the memory results and the completion flags. It also
counts context switches, synchronization blocks, memory blocks, overlapping
requests, the BMR and page-miss exceptions, and pointer wrap-around. It
fails if any of them never happened.

## What is not here, and where this design departs

* **The instruction set.** Only its outline is known: opcode, operand size,
  addressing mode and up to three registers. The fetch/decode pipeline (2-issue,
  in-order) and the scalar integer and FP units are therefore left out, and
  `nmp_top` takes decoded operations. The opcode encoding and the
  register roles of each operation are this design's own.
* **Floating-point vector units.** There are none (the target configuration
  has 16), so FP workloads such as an FM-radio filter chain or the Stream
  Scale/Add/Triad kernels cannot run on this RTL. Gather/scatter are not
  built; only unit-stride and strided transfers are.
* **Operation overlap.** Operations execute one at a time; the vector unit
  is combinational over all 16 lanes per access.
* **In-flight memory operations.** The target allows 128 loads plus 128
  stores. Here loads and stores share a single pool of 128 tags.
* **Main-processor access and the system interface.** Access by the main
  processor to the scratchpad through the global address space, its
  snooping, and the system interface are not built. The host reaches the NMP
  only through the invocation registers.
* **Pager and handlers.** The scratchpad pager, BMR save/restore, TLB refill
  and TLB coherence are software. The hardware raises the exceptions and
  exposes the TLB write and invalidate ports.
* **Own choices.** Page size (4 KB), TLB sizes, register count (32),
  invocation register layout, the memory interface, the flag-clearing sweep
  after reset and the wake-on-any-change policy for blocked synchronizing
  threads are all this design's own.
