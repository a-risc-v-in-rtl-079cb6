# PsPIN packet-processing unit in SystemVerilog

PsPIN is an accelerator that sits inside a network interface card. It runs
small user-supplied functions, called *handlers*, on every packet as the
packet arrives, so that work such as reductions, filtering, key-value lookups
or scatter into host memory happens on the NIC instead of the host CPU. The
handlers follow the sPIN model. A message has three kinds of handler:

* a **header handler (HH)** on its first packet,
* a **payload handler (PH)** on every packet,
* a **completion handler (TH)** after its last packet.

This repository holds RTL for the unit that feeds those handlers. It covers
scheduling packets onto 32 handler processing units (HPUs) in 4 clusters, and
keeping the handler order each message needs. It copies packet data close to
the cores and carries out the commands that handlers issue: send a packet,
DMA to the host, or write 32 bytes straight to host memory. It also holds the
L2 memories that all of this moves through. The HPU cores are RISC-V cores
from elsewhere, and each core's task interface is a port of the top.

```
 NIC inbound ──HER──► MPQ engine ──task──► task dispatcher ──► cluster 0..3
      ▲                  ▲   │                                   │ CSCHED: L1 room + L2→L1 copy
      └── notification ──┘   └── timeout monitor                 │ HPU driver x8  ◄──► HPU core (port)
                                                                  │ L1 TCDM, 64 banks
 L2 packet buffer (4 MiB) ◄── NIC writes, cluster DMA reads       ▼
 L2 handler memory (4 MiB), program memory (32 KiB) ─► I$ per cluster ─► HPU fetch (port)
                                                           commands ─► command unit
                                                             ├─► NIC outbound (port)
 host ◄── IOMMU ◄── host write mux ◄── off-cluster DMA ◄─────┤
                                   ◄── HostDirect     ◄──────┘
```

## How a packet flows

1. The NIC writes the packet into the **L2 packet buffer** through that
   memory's own write channel. It then sends a *handler execution request*
   (HER, `her_t`): message ID (the MPQ index), end-of-message flag, packet
   address and size, and the message's *execution context* (`ectx_t`). The
   context holds the handler addresses, the handler-memory region, the host
   descriptor address, how many packet bytes handlers need in L1, the MPQ
   timeout and the handler watchdog limit.
2. The **MPQ engine** queues the HER in the queue of its message, and a task
   leaves once the ordering rules below allow it.
3. The **task dispatcher** sends the task to the message's *home cluster*
   (`msgid % 4`) if that cluster has room for the packet copy. Otherwise it
   sends it to the cluster with the most free packet-buffer space. If no
   cluster has room, it stalls and back-pressure reaches the NIC.
4. In the cluster the **CSCHED** takes a room in the 32 KiB L1 packet buffer,
   and the cluster **DMA engine** copies the packet (or its first
   `l1_copy_bytes`) from L2. The task then goes to an idle **HPU driver**.
5. The core's runtime loads its next task from the driver, runs the handler,
   issues commands and writes the *doorbell*. The driver sends the completion
   *notification* once every command of that task has been answered.
6. Notifications from the clusters are merged round-robin and go to the MPQ
   engine. The engine updates the message state, marks the message's final
   notification with `mpq_idle`, and forwards every notification to the NIC,
   which can then free the packet's L2 space.

## Message ordering (pspin_mpq_engine)

This is the block to read first when changing behaviour. Each of the 16 MPQs
keeps a 4-deep HER queue and these flags:

| flag | meaning |
|---|---|
| `active` | the MPQ holds a message that is not finished |
| `hdr_wait` | the header handler was dispatched and has not yet sent its notification |
| `eom_disp` | the last packet's task has been dispatched |
| `th_disp` | the completion handler has been dispatched |
| `inflight` | tasks of the message dispatched and not yet notified (16 bit) |

The HER at the head of a queue may be dispatched when it is the first packet
of its message, or when the header handler has finished (`!hdr_wait`), and
the message's last packet has not yet been dispatched. A new message's
packets wait behind the previous message's last packet. The completion
handler is eligible once `eom_disp` is set, nothing is in flight, and the
context names a completion handler. A round-robin arbiter picks one eligible
MPQ per cycle into a registered output, so one task per cycle can leave.

Special cases:

* A context without a header handler runs its first packet as a payload
  packet.
* The completion task carries no packet (size 0).
* A message without a completion handler becomes idle with its last payload
  notification.
* The notification that ends a message has `mpq_idle` set.

**Timeout.** `pspin_mpq_monitor` keeps a tree pseudo-LRU over the MPQs. It is
touched by every HER, and the walk to the victim prefers subtrees with active
MPQs. If the victim is active and has seen no packet for more than its
context's `mpq_timeout` cycles, `timeout_o` fires and the engine clears that
MPQ's state. The event is a port of the top. Writing it to the host
descriptor is left to the outside.

## Cluster scheduling (pspin_csched, pspin_cluster)

The L1 packet buffer is a ring of 64-byte units with a 16-entry allocation
table:

* A task takes `need = roundup64(min(size, l1_copy_bytes))` bytes at the head.
* If that does not fit before the end of the ring, the rest of the ring
  becomes padding and the room starts at 0.
* Rooms are freed by the notification handshake, which carries the
  allocation index. They retire in order, so an early room stays held until
  the rooms before it are free.
* When the ring empties, the head returns to 0.
* `free_bytes_o` is the largest room that could be taken now, and 0 when the
  table is full.

This is what the dispatcher compares.

Tasks wait in an 8-deep copy FIFO. One DMA job runs at a time. A copied task
moves to a 2-deep ready FIFO and is handed to the lowest-numbered idle HPU
driver in the same cycle. The cluster DMA engine issues one 512-bit read per
granted cycle and writes each returned word straight into L1, so N words take
N + 2 cycles. L1 has 64 32-bit word-interleaved banks. A 512-bit DMA write
covers 16 of them and wins over the HPU ports on those banks. Each bank
arbitrates round-robin among the 8 HPU ports, and reads take one cycle.

## The HPU driver contract (pspin_hpu_driver)

This is the interface a core integration must follow:

* **Task load.** The core raises `core_task_req_i` and holds it, which models
  a blocking load. With no task, `core_clk_en_o` is low (gate the core's
  clock). When a task arrives, `core_task_valid_o` pulses for one cycle with
  `core_task_o`: handler address, packet address in L1, packet size, L2
  packet address, handler-memory region and message ID.
* **Protection.** While a task is held, `pmp_o` gives three windows: the
  program memory, the packet copy in L1, and the context's handler-memory
  region.
* **Commands.** `core_cmd_*` is valid/ready. The driver stamps the ID
  (cluster, HPU, task tag) and counts answers per task. Responses come back
  on `core_resp_*`.
* **Doorbell.** `core_done_i`, with `core_err_i` when the handler failed, is
  accepted while `core_done_ready_o` is high. The finished task moves to a
  one-entry buffer, so the core can load its next task at once. A second
  doorbell waits until the buffered task's notification has left.
* **Errors.** For a failed handler the driver first sends a HostDirect
  command carrying an error record to the context's `host_desc_addr`, then
  the notification with `error` set. The record holds the handler address,
  packet address, message ID, handler kind and the tag `0x0E77_0001`.
* **Watchdog.** `core_wd_irq_o` rises when a handler has run for
  `wd_timeout` cycles (0 disables it). The runtime is expected to end the
  handler with an error.

## Commands and the host path

The command unit merges the clusters' command streams round-robin and routes
each command by kind:

* **NIC commands** go out on the `nic_cmd_*` ports.
* **DMA commands** go to the off-cluster DMA engine.
* **HostDirect commands** go to the HostDirect unit.

Responses are merged round-robin and returned to the issuing cluster and HPU.

* The **off-cluster DMA** engine decodes the source into the L2 packet buffer
  or the handler memory, and a source outside both gets an error response.
  It keeps up to 4 reads in flight and writes 64-byte words to the host in
  order. The last word gets partial byte enables, and the response follows
  the last write.
* **HostDirect** writes its 32 bytes into the half of a 64-byte host write
  that `dst_addr[5]` selects.
* Both share a round-robin write multiplexer in front of the **IOMMU**. The
  IOMMU is a fully associative table of 16 4-KiB pages, programmed through
  `iommu_cfg_*`. A miss still grants the write, drops it and raises
  `iommu_fault_o`.

## Memories and who shares them

| memory | organisation | channel 0 | channel 1 | channel 2 | channel 3 |
|---|---|---|---|---|---|
| L2 packet buffer | 4 MiB, 32 banks x 512 bit | NIC write | NIC outbound / off-cluster DMA read (round robin) | PE write | cluster DMAs + PE read (round robin) |
| L2 handler memory | 4 MiB, 64 banks x 64 bit | host write | host / off-cluster DMA read | PE write | PE read |
| program memory | 32 KiB, 64 bit, single port | host (priority) | I-cache refills of the four clusters (round robin) | | |

Each L2 memory has two full-duplex ports, and each port is built as one read
and one write channel (`pspin_l2_mem`). An access needs every bank its byte
enables touch. A read needs all the banks of its word. Grants are
all-or-nothing and rotate among the channels, and reads take one cycle.
Addresses on these ports are byte offsets inside each memory. The global map
used for handler-visible addresses is in `pspin_pkg`:

| region | base |
|---|---|
| cluster L1 | `0x1000_0000`, then a 4 MiB stride per cluster |
| L2 packet buffer | `0x1C00_0000` |
| handler memory | `0x1C40_0000` |
| program memory | `0x1D00_0000` |

## Instruction fetch (pspin_icache)

Each cluster has a 4 KiB, 4-way instruction cache with one fetch port per
HPU; the ports are `fetch_*` ports of the top. A fetch address is a byte
offset into the program memory. A hit is granted in the same cycle and the
32-bit word follows one cycle later. A miss keeps its request up until the
line is filled. The cache fills one 32-byte line at a time with four 64-bit
reads of the program memory, choosing the missing port round robin. It puts
the line in the next way of its set (round-robin replacement). Nothing
invalidates the cache, so code must be loaded before the HPUs fetch it.

## Files

All shared types and sizes are in `rtl/pspin_pkg.sv`. The top is
`rtl/pspin_top.sv`, with parameters `NCL` (clusters, 4) and `NH` (HPUs per
cluster, 8). The helpers are:

* `pspin_rr_arbiter`: round-robin arbiter.
* `pspin_stream_arb`: valid/ready merge built on that arbiter.
* `pspin_fifo`: FIFO.
* `pspin_mem_mux`: N:1 memory request multiplexer.

Every file opens with a description of its interface and timing.

## Simulating

Each testbench is self-contained and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pspin_top \
    -Irtl -Itb rtl/pspin_pkg.sv tb/tb_pspin_top.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Substitute any other `tb/<name>.sv`. Modules are found through `-Irtl`.

`tb_pspin_top` runs the whole unit at its default size: 4 x 8 HPUs and every
memory at full size. It builds and runs in about two minutes and simulates
about 46,000 cycles. It contains models of the NIC inbound and outbound
engines, the host, and one handler runtime per HPU. Its traffic:

* 15 interleaved messages.
* A message with a failing handler.
* A message with a hanging handler, caught by the watchdog.
* A message that never ends, caught by the MPQ timeout.
* A message that writes to an unmapped host page.
* A flood of long handlers on one message, which fills the home cluster and
  then every cluster.

It counts how often each of these mechanisms happened and fails if one never
did:

* HH, PH and TH ordering
* `mpq_idle`
* home and non-home dispatch
* dispatcher stall
* clock gating
* notification held for in-flight commands
* error record
* watchdog
* MPQ timeout
* IOMMU fault
* L2 bank-conflict stall
* off-cluster DMA, HostDirect and NIC commands
* the L1 packet copy
* host access to handler and program memory
* instruction fetch through every cluster's cache, with misses and refills

Every block also has its own testbench with random traffic and reference
models.

## Departures and gaps

* **Bus protocol.** The original design connects its units with AXI4
  (512-bit data paths and 32-bit configuration paths). Here every path is a
  simple request/grant or valid/ready channel of the same data width. There
  are no bursts or IDs, and commands carry their ID in the payload.
* **Not built:**
  * the PE interconnect between HPUs and the L2 memories or remote L1s (its
    L2 channels are ports of the top);
  * HPU-initiated cluster DMA transfers;
  * off-cluster DMA from L1 or from the host into PsPIN;
  * writing the MPQ timeout event to the host descriptor.
* **Own choices** where the original design gives only the function:
  * 16 MPQs with 4-deep HER queues;
  * the ring allocator and its 16-entry table;
  * home cluster = message ID mod 4, and "least loaded" = most free L1
    packet-buffer bytes;
  * the register stages, the error-record layout, the IOMMU organisation,
    host priority on the program memory, and the cache line size (32 B) and
    replacement (round robin).
* **Timing.** The scheduling path from HER to CSCHED is three registered
  stages (queue, MPQ pick, dispatcher), matching the roughly 3 ns at 1 GHz of
  the original. The L2-to-L1 copy of a 1 KiB packet takes 18 cycles. No
  synthesis timing closure has been attempted.
