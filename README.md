# User-level I/O interface: conditional store buffer, virtual-address DMA device and notification queue

Ordinary I/O goes through the kernel three times. A system call starts the
request, the data is copied between kernel and user buffers, and an
interrupt plus a scheduler pass wakes the process up again. This design
removes all three from the common path:

* **Initiation.** A process writes a 64-byte *request structure* with
  uncached stores into a *conditional store buffer* (CSB) in the processor.
  It then issues a *conditional flush*. If no other process used the buffer
  in between, the flush sends the structure to the I/O device in one bus
  burst. The flush returns a status, so the process also learns whether the
  device had room.
* **Data.** The I/O device (the *UIO device*) moves data directly between
  the network and the user's buffers, which are given by virtual address. It
  translates addresses itself with a context-tagged TLB. Misses go to a small
  programmable *table walk engine* that reads the host's own page tables.
* **Completion.** The device writes the returned request structure into a
  user buffer. It then pushes the same structure into a *notification queue*
  in the processor's bus interface, which raises an interrupt. A short kernel
  handler reads the queue head from local registers and starts the process's
  user-level handler.

The device keeps no per-request state. Everything it needs travels inside
the request structure: to the remote device, back with the completion, and
on to the host.

```
             host processor                          |            UIO device
 stores ──► csb ── burst ─────────────────────────────┼──► request_queue ──► transmit_unit ──► network out
 flush  ◄── result ◄── full/ok ───────────────────────┼──┘                        │ write jobs
                                                      |                           ▼
 irq ◄── notification_queue ◄── notification ─────────┼─── receive_unit ◄── network in
                                                      |         │ data / write-back jobs
                                                      |         ▼
                                         memory ◄─────┼── dma_pool (4 × dma_engine)
                                                      |         │ translations
                                                      |  translation_unit = device_tlb + table_walk_engine
```

## Files

| File | Contents |
|---|---|
| `rtl/uio_pkg.sv` | widths, request-structure layout, packet, memory, DMA-job and walk-engine types, default walk program |
| `rtl/csb.sv` | conditional store buffer |
| `rtl/notification_queue.sv` | host-side notification queue with control registers |
| `rtl/request_queue.sv` | device request queue with the flow-control answer |
| `rtl/transmit_unit.sv` | forwards requests, starts the DMA of write buffers |
| `rtl/receive_unit.sv` | DMA of incoming data, write-back of the structure, notification |
| `rtl/dma_engine.sv`, `rtl/dma_pool.sv` | one virtual-address DMA engine; four of them with shared ports |
| `rtl/device_tlb.sv` | 32-entry 4-way TLB tagged with context ID |
| `rtl/table_walk_engine.sv` | programmable page-table walker |
| `rtl/translation_unit.sv` | TLB plus walker: lookup, walk, fill, retry |
| `rtl/uio_device.sv` | the whole device |
| `rtl/uio_top.sv` | CSB + device + notification queue: the top |
| `rtl/sync_fifo.sv`, `rtl/req_arbiter.sv` | helpers: FIFO and locking round-robin arbiter |

## The request structure

One cache line, eight 64-bit words, defined in `uio_pkg`:

| word | field | used by |
|---|---|---|
| 0 | capability | remote device |
| 1 | `[31:0]` command, `[63:32]` return status | remote device |
| 2 | arguments and flags | remote device |
| 3 | `[31:0]` buffer address, `[63:32]` length in bytes | DMA |
| 4 | notification buffer address | receive unit |
| 5 | notification handler address | kernel handler |
| 6 | request argument (the application's tag) | kernel handler |
| 7 | context ID (16 bits) | everything; inserted by the CSB |

In the command, bit 0 (`CMD_WRITE`) means the buffer is sent to the remote
device. Bit 1 (`CMD_READ`) means the remote device returns data into the
buffer. The device only looks at bit 0. Everything else is passed through
untouched.

Addresses are 32 bits and pages are 4 KB. Every bus transaction of the
device moves one 64-byte line.

## Conditional store buffer (`csb`)

The buffer has eight 64-bit slots, an address register holding the line
address of the last store, and a hit counter.

* **Store.**
  * If the store hits the saved line, its word is written into its slot and
    the counter is incremented.
  * If it misses, the buffer is cleared, the new line address is saved and
    the counter restarts at one.
* **Trap or interrupt (`clear`).** The buffer, the saved address and the
  counter are all cleared. This is the source of atomicity: a process that
  was interrupted in the middle of its sequence will fail its flush. The
  `clear` input must be driven by anything that can lead to a context switch.
* **Conditional flush (`flush_addr`, `flush_count`).**
  * If the address matches the saved line and the counter equals the count
    the program expects, the line goes out as one burst (`bus_valid`,
    `bus_addr`, `bus_data`). The flush result is then the device's answer:
    `FLUSH_OK`, or `FLUSH_FULL` when the request queue was full.
  * Otherwise nothing is sent and the result is `FLUSH_ABORT`.
  * Either way the buffer is cleared.
* **Process ID.** Slot 7 of the burst always carries the `pid` input,
  whatever was stored there. `pid` comes from the processor's privileged process-ID register.
  A process therefore cannot claim another's identity: the device trusts
  word 7.

A program writes words 0–6 (seven stores), flushes with count 7, and retries
with back-off on `FLUSH_ABORT` or `FLUSH_FULL`.

Timing:

* A store takes one cycle.
* `FLUSH_ABORT` comes one cycle after the flush.
* `FLUSH_OK` and `FLUSH_FULL` come one cycle after the device's answer,
  which the request queue gives one cycle after the burst.
* `ready` is low while a burst waits for its answer.

## Request queue and transmit unit

The `request_queue` is 8 entries by default. It answers every burst one
cycle later on `bus_resp_valid`, with `bus_resp_full` set if the burst was
dropped because the queue was full. This is the whole flow-control
mechanism. The device never blocks the bus, and the application learns about
the overflow from its own flush result.

The `transmit_unit` sends each queued structure as a `PKT_REQUEST` packet.
If `CMD_WRITE` is set and the length is non-zero, it then hands the DMA pool
a job that reads the buffer and sends it as `PKT_DATA` packets. Each data
packet carries its context ID and virtual address, so the receiving side
needs no state either.

## DMA engines (`dma_engine`, `dma_pool`)

A job gives a direction, a context, a virtual address and a length. For each
line, the engine:

1. asks the translation unit for the physical address;
2. reads the line and sends it to the network (`DMA_FROM_MEM`), or writes the
   job's line to memory (`DMA_TO_MEM`).

If a translation faults, the engine reports context and address on its fault
port and drops the rest of the job.

The pool holds `NUM_DMA = 4` engines:

* A new job goes to the lowest-numbered idle engine.
* Translation requests and memory requests each pass a round-robin arbiter
  (`req_arbiter`), which keeps the grant until the response returns.
* The network output rotates priority between the engines.
* `idle` is high when no engine is busy. The receive unit uses it.

## Address translation (`translation_unit`, `device_tlb`, `table_walk_engine`)

This is the most involved part of the device.

### TLB

* 32 entries: 8 sets of 4 ways, set index = virtual page number bits [2:0].
* Each entry holds a valid bit, the context ID, the tag, the physical page
  number and a writable bit.
* A lookup gives hit/fault/physical address one cycle later. A write to a
  read-only page is a fault.
* A fill takes an invalid way if there is one, otherwise the set's
  round-robin pointer.
* `inv_valid/inv_ctx/inv_vaddr` lets the operating system remove one page of
  one context when it unmaps it. A fill and an invalidation of the same page
  in the same cycle leave the page out.

Because entries are tagged with context, nothing has to be flushed on a
context switch.

### Table walk engine

The walker is a tiny processor:

* eight 32-bit registers, with `r0` always zero;
* a 32-word instruction memory;
* one instruction per cycle, except loads, which wait for memory.

The instructions are encoded as `[31:28]` op, `[27:25]` rd, `[24:22]` rs,
`[21:19]` rt, `[15:0]` imm:

| op | meaning |
|---|---|
| ADD, ADDI, AND, ANDI, OR, XOR, SHLI, SHRI | arithmetic and logic |
| LD | `rd` = low 32 bits of the 64-bit word at `rs + imm` (one line read) |
| BEQ, BNE, BLTU | compare and branch to `imm` |
| DONE rs | finish; `rs` is the leaf page-table entry |
| FAULT | finish with a page fault |

At start:

* `r1` = virtual address;
* `r2` = context ID;
* `r3` = `ctx_table_base`, the base of a table with one 64-bit root pointer
  per context.

A walk that runs past `MAX_STEPS` (255) instructions ends as a fault, so a
bad program cannot hang the device.

After reset the instruction memory holds `tw_default_prog`, a walk of a
two-level table:

* level-1 index = `va[31:22]` and level-2 index = `va[21:12]`;
* 8-byte entries;
* entry bit 0 = valid, bit 1 = writable, bits [31:12] = page frame.

It takes 20 instruction steps and 3 loads. With a memory that answers in
L cycles, a walk takes 1 + 19 + 3·(L + 2) cycles from `start` to `done`,
so 41 cycles at L = 5.
Software can load another program through `prog_we/prog_addr/prog_data`
while the walker is idle, for a different page-table layout.

### Translation unit

The translation unit serves one translation at a time:

1. TLB lookup.
2. On a miss, a walk.
3. If the walk succeeds, the TLB is filled and the lookup repeated. This
   *restart* means the requester always gets its answer from the TLB.
4. If the walk faults, the requester gets a fault.

`hit_count` and `miss_count` count first lookups only.

## Completion path (`receive_unit`)

* **Data packets.** Each becomes a one-line `DMA_TO_MEM` job.
* **Completion packets.** The unit handles these in order:
  1. It waits until the DMA pool is idle, so all data of the request is in
     memory.
  2. It writes the returned structure to the request's notification buffer
     as a DMA job, translated like any other.
  3. It waits for that write to finish.
  4. It offers the same line to the notification queue.
* **Faults.** If the write-back faults, no notification is sent. The fault
  appears on the exception interrupt instead.

So when a notification arrives, both the data and the return status are
already visible in user memory.

The device's other exception is a fault on a data buffer. Both raise
`exc_irq` through a register in `uio_device` holding `exc_ctx` and
`exc_vaddr` until `exc_ack`. This is the conventional interrupt that the
operating system uses for page faults and errors.

## Notification queue (`notification_queue`)

The notification queue is a 16-entry FIFO in the host bus interface. Each
entry keeps process ID, notification-buffer address, handler address and
request argument. `irq` is high while it is not empty. The kernel reads the
head through `reg_addr` and advances with `pop`.

| reg | value |
|---|---|
| 0 | process ID |
| 1 | notification buffer |
| 2 | handler |
| 3 | request argument |
| 4 | number of entries |

When the queue is full, the device waits.

The kernel handler compares the process ID with the running process. If they
match, it arranges for the user handler to run with the notification-buffer
address. Otherwise it records the notification for later. That software is
not part of this RTL.

## Top level (`uio_top`)

`uio_top` connects the CSB burst directly to the device's request queue, and
the device's notification output directly to the queue. Its ports are:

* **Processor side:**
  * the CSB instructions (`store_*`, `flush_*`, `csb_ready`, `flush_done`,
    `flush_result`);
  * `trap_or_irq` and `pid`;
  * `notif_irq`, `nq_reg_addr/nq_reg_rdata`, `nq_pop`.
* **Memory:** one line-wide request/response port (`mem_req_t`, `mem_rdata`),
  shared by the walker and the DMA pool.
* **Network:** `net_tx_*` and `net_rx_*`, carrying `net_pkt_t` (kind,
  context, virtual address, one line).
* **Operating system:** `ctx_table_base`, TLB invalidation, walk-program
  load, `exc_irq/exc_ctx/exc_vaddr/exc_ack`.
* **Counters:** requests, data lines, notifications, faults, dropped
  notifications, DMA jobs, TLB hits and misses, and busy DMA engines.

| parameter | default |
|---|---|
| `REQ_DEPTH` | 8 |
| `NOTIF_DEPTH` | 16 |
| `NUM_DMA` | 4 |
| `TLB_ENTRIES` | 32 |
| `TLB_WAYS` | 4 |

The number of DMA engines and the TLB size are those of the evaluated
system. The two queue depths are this design's choice.

## What follows the original architecture and what does not

**Taken from the architecture:**

* the CSB mechanism: address compare, hit counter, clear on traps and
  interrupts, conditional flush with expected count, flow-control return,
  process ID in a fixed slot;
* a stateless device forwarding a 64-byte request structure;
* a request queue;
* transmit and receive units;
* four concurrent DMA engines;
* a 32-entry 4-way TLB tagged with context and invalidated by the OS;
* a programmable walker with load, add, compare and logic instructions,
  walking a two-level table shared with the kernel;
* write-back of the structure to user space before the notification;
* a host notification queue holding process ID, buffer, handler and argument
  with its head in local registers;
* page faults reported by a conventional interrupt.

**This design's own choices:**

* all widths;
* the field layout of the structure;
* the command encoding;
* the page-table entry format;
* the context table;
* the walker's encoding and register set;
* the queue depths;
* the TLB set index and replacement;
* line-granular DMA;
* the packet format;
* the draining of the DMA pool before the write-back;
* the arbitration;
* all handshakes and the register map.

**Simplifications:**

* The system bus is reduced to direct point-to-point ports: the CSB burst,
  the notification, and the memory port.
* The memory port is one line per transaction, with no bursts.
* The exception register holds one fault at a time. A further fault before
  `exc_ack` is counted in `fault_count` but its address is not kept.
* A request's data is written in the order it arrives. The design relies on
  the remote device sending the completion after the last data line.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The behavioural models
they use are:

* `tb_mem_model`: line memory with latency, building two-level page tables
  per context;
* `tb_remote_dev`: answers reads with data packets and a completion, and
  checks write data;
* `tb_uio_pkg`: data patterns and a request builder.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/uio_pkg.sv tb/tb_uio_top.sv --top-module tb_uio_top -o sim
obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_csb` | combining, miss restart, abort on address/count mismatch and after a trap, OK/FULL answers, process-ID slot |
| `tb_table_walk_engine` | two-level walks, faults, walk latency in cycles, program reload |
| `tb_device_tlb`, `tb_translation_unit` | hits, misses, context separation, write protection, invalidation, replacement |
| `tb_dma_engine`, `tb_dma_pool` | line-by-line transfers, faults, four engines in parallel, fault reporting from a busy pool |
| `tb_transmit_unit`, `tb_receive_unit`, `tb_request_queue`, `tb_notification_queue` | per-unit behaviour and ordering |
| `tb_uio_device` | the device alone: reads, a write, write-back before notification, an exception |
| `tb_uio_top` | the full design at default parameters: processes sharing virtual addresses, a write, trap abort and retry, flow-control overflow, an unmapped buffer, an unmapped notification buffer, a remapped page after invalidation, a protection fault, a walk-program reload. Counts each mechanism and fails if one never happens |
| `tb_uio_workload` | sixteen processes each with a 16 KB read in flight, three rounds: 12,288 lines, 64 pages in use against 32 TLB entries, flow-control push-back during a network stall |

## Limits

* The walk latency is exact in cycles, but the design was not timed against
  a target clock.
* The system-bus protocol, the network protocol and the kernel software lie
  outside the RTL.
