# ReACH: accelerators at every level of the memory hierarchy

Data-heavy applications such as content-based image retrieval move far more
data than they compute on. ReACH (reconfigurable accelerator compute
hierarchy) puts accelerators at three levels:

- next to the cores (one on-chip accelerator);
- inside the memory modules (one near-memory accelerator per DIMM);
- beside the disks (one near-storage accelerator per SSD).

Each stage of an application runs at the level where its data lives. The
cores do not drive these accelerators themselves. A hardware **global
accelerator manager (GAM)** takes whole jobs from the cores and does the rest:

1. splits each job into tasks;
2. queues the tasks per accelerator;
3. launches a task when its accelerator is free;
4. polls for completion, since memory and storage modules cannot raise an
   interrupt towards the GAM;
5. forwards a finished task's output to the task that depends on it by DMA;
6. interrupts the core when a job's last task is done.

This repository holds synthesizable SystemVerilog for that control fabric. It
also holds the near-storage KNN (k-nearest-neighbour) rerank kernel, which is
the datapath the design describes in the most detail. The default
configuration has one on-chip accelerator, four near-memory modules and four
near-storage accelerators, so the GAM manages nine accelerators in all.

## The top level (`reach_top`)

```
 cores ──cmd/cfg──► gam ──launch/status──► gam_level_bridge ──┬─► on-chip accelerator (ports)
   ▲                 │  └─ DMA requests (ports)                ├─► aim_module x4 ◄─► aimbus
   └──── irq ────────┘  └─ MC register writes ─► mc_interleave x2     │ DIMM + fabric ports
                                                               └─► ns_accel x4 ─► SSD ports
```

Parts that are not built appear as ports of the top:

- the on-chip accelerator;
- the programmable fabric inside each memory module;
- the DIMMs and the SSDs;
- the host's own memory and disk traffic;
- the DMA engine that carries out the GAM's transfer requests.

The accelerators are numbered 0 (on-chip), 1..4 (near-memory) and 5..8
(near-storage).

## The GAM (`gam`, `gam_buffer_table`, `gam_tlb`, `reach_fifo`)

A **command packet** has these fields:

- target accelerator and software thread;
- task id;
- input and output buffer ids;
- optionally, the id of the task whose output it consumes.

Packets enter a job queue. A dispatcher moves each packet into the queue of
its target accelerator. When an accelerator's **progress table** entry is
free, the head task of that queue becomes eligible, once its producer (if it
has one) is done. Eligible tasks are picked round-robin. A task with a
producer first issues one DMA request:

- from the producer's output buffer to this task's input buffer;
- translated through the TLB;
- sized to what the producer actually wrote (its reported tail), clipped to
  both buffers.

Then the task launches.

At launch the entry's wait counter is loaded with the accelerator's
**estimated run time**, which the driver writes. When the counter reaches
zero, the GAM sends a status request. A *not finished* reply reloads the
counter with the new wait time in the reply. A *finished* reply does three
things: it records the tail address of the task's output, frees the entry,
and decrements the thread's count of outstanding tasks. When that count
reaches zero, the GAM raises an interrupt with the thread id.

Driver configuration packets set four things: estimated times, buffer-table
entries (base and limit), TLB entries, and the mapping registers of the
memory controllers.

## Reaching each level (`gam_level_bridge`)

Each level is launched and polled in its own way:

| level | launch | status poll |
|---|---|---|
| on-chip | command packet passed on unchanged | request/response packets |
| near-memory | writes to the module's configuration window over the memory channel: input base, input limit, output base, then the task word (word 0) | read of word 0: `{finished, running, 30'b0, tail[31:0]}` |
| near-storage | vendor NVMe command `ACC_RUN` (start beat = input buffer base, vector count = buffer length) | `ACC_STATUS`; tail = output buffer base + K |

The bridge shares the memory channel and the NVMe queues with ordinary host
traffic. It uses each path only when the path is idle, and it hides its own
completions (tag bit 6) from the host.

## Memory mapping (`mc_interleave`)

Near-memory accelerators lock their DIMM while a kernel runs, so the address
space is split between the two memory controllers:

- The controller serving the CPU and on-chip side keeps cache-line (64-byte)
  interleaving across its DIMMs, for bandwidth.
- The GAM switches the controller of the near-memory DIMMs to tile mode. A
  whole tile, whose size is a power of two, then sits on one DIMM, where that
  DIMM's accelerator can work on it alone.

For a granule of 2^g bytes:

```
dimm      = (addr >> g) mod N
dimm_addr = ((addr >> g) div N) << g  |  addr mod 2^g
```

## Near-memory module (`aim_module`, `aim_config_filter`, `aim_access_filter`, `aimbus`)

An accelerator-interposed memory (AIM) module sits between the memory channel
and one DIMM, so the memory controller and the DIMM stay unchanged.

- **Configuration filter.** Catches accesses to an 8-word window at
  `0xFFFF_FF00`, which holds the launch word and the argument registers.
  Everything else passes to the DIMM.
- **DIMM ownership.** A launch hands the DIMM to the accelerator, and host
  requests are held. When the fabric reports completion, the module drains
  its outstanding reads and strobes `dimm_pre_all`. This closed-row policy
  means the host controller may assume every bank is precharged. The module
  then sets the finished flag and gives the DIMM back.
- **Access filter.** Arbitrates the DIMM between three requesters, in this
  order of priority: remote requests arriving over the AIMbus, the local
  accelerator, and the host. It routes each in-order response back to its
  requester through a FIFO of tags.
- **AIMbus.** Connects the modules. It has separate request and response
  crossbars with one round-robin arbiter per destination. An accelerator can
  therefore read another module's DIMM.

## Near-storage accelerator (`ns_accel`, `ns_access_filter`, `ns_passthrough`, `ns_dma`)

The accelerator sits between the host's NVMe queue and one SSD.

- The **access filter** sends opcodes 0xC0-0xFF to the accelerator and
  everything else to the **pass-through**. The pass-through merges host I/O
  (which has priority) with the accelerator's **DMA** reads. DMA commands
  carry tag bit 7, which steers their completions back to the DMA.
- Commands: `ACC_WR_QUERY` takes one 512-bit query beat, and `ACC_RUN` takes
  a start LBA and a vector count. `ACC_STATUS` returns
  `{finished, busy, 14'b0, K}`. `ACC_RESULT r` returns
  `{index[31:0], distance}` of rank r; rank 0 is the nearest.
- The K results are kept in registers (the scratchpad) when the kernel ends.
  Only the query goes in and K results come out, which is the point of
  computing near the data.

## The KNN kernel (`knn_kernel` and its parts)

The kernel finds the K nearest database vectors to one query. By default
vectors have 128 signed 16-bit elements, arrive as 512-bit beats (4 beats per
vector) and are compared by squared Euclidean distance.

- **Query shift register (`knn_query_sr`).** Holds the query. During a batch
  it rotates by one element per cycle, so every PE sees the same query
  element at the same time.
- **Vector banks (`knn_vec_bank`).** There are N_PE = 128 of them, one per
  PE. Vector *p* of a batch goes to bank *p*, so all PEs read in parallel.
  Each bank has two slots, so the next batch loads while the current one is
  computed.
- **PEs (`knn_pe`).** Each PE accumulates (q - d)^2 over DIM cycles. After a
  batch, the distances move to a double-buffered distance buffer.
- **Partial sort queues (`knn_topk_sort`).** There are N_SORT = 2. Each is a
  linear array of K entries with two alternating rows of compare-and-swap
  units. A new candidate enters at the top every second cycle. It replaces
  the top entry if it is smaller, and the swaps push the smaller entries
  down. The queue therefore always holds the K smallest distances seen, and
  it settles 2K cycles after the last push. Each queue takes every second
  distance, so together they accept one distance per cycle.
- **Merge.** When all vectors are sorted, queue 1's K entries are pushed into
  queue 0, which then holds the global top K.

Loading, computing and sorting overlap.

- **Throughput.** A batch of 128 vectors takes 128 x 4 = 512 beats to load,
  at most one beat per cycle. It takes 128 cycles to compute and 128 to sort,
  so the kernel is bound by its input stream.
- **Completion.** `done` pulses about 4K + 2 x (2K + 2) cycles after the last
  distance is sorted.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/reach_pkg.sv tb/tb_reach_top.sv --top-module tb_reach_top
./obj_dir/Vtb_reach_top
```

`tb_reach_top` runs the whole hierarchy at its default size. It builds in
about 1.5 minutes and runs in seconds. It covers:

- host memory traffic under both mapping modes;
- NVMe pass-through;
- a near-memory task whose output is DMA'd into a dependent near-storage KNN
  task, with the results checked against a reference KNN;
- an on-chip burst that fills the queues;
- a near-memory task that reads another module's DIMM over the AIMbus.

It counts each mechanism and fails if any never happened: back-pressure,
dependency DMA, status retry, precharge-all, mode switch, pass-through,
AIMbus remote access and interrupts. `tb_knn_kernel` and `tb_ns_accel` use a
reduced kernel (fewer dimensions and PEs) for speed.

`tb_cbir_rerank` runs the image-retrieval rerank step on one full-size
near-storage accelerator. Each query has 96 features, zero-padded to 128,
and is compared against 4096 candidate vectors. The test runs two queries.
A query takes 16,768 cycles for 16,384 input beats, so the kernel keeps up
with its input stream. The 10 results match a reference KNN.

## Choices of this implementation and limits

- **Sizes.** Element width, bus widths, queue depths, K = 10, the register
  window, the NVMe opcodes and tags, and the retry time are this
  implementation's choices. The kernel size (128 dimensions, 128 PEs, 2 sort
  queues) and the level counts (4 + 4) follow the design.
- **Distance.** Squared distance is used instead of Euclidean, since the
  ordering is the same. Vectors shorter than 128 elements, such as 96-element
  image features, must be zero-padded.
- **Not built.** These parts are left out, or appear only as ports:
  - the CNN and matrix-multiply kernels;
  - the cores, caches and network-on-chip;
  - the memory controllers' request scheduling;
  - the DIMMs and the SSDs;
  - the near-storage accelerator's private DRAM buffer;
  - the PCIe switch and DMA engines.
- **Cache write-back.** The GAM does not force write-backs out of the caches
  before handing data to a lower level.
- **DMA at launch.** The GAM issues DMA requests only to forward a
  producer's output to its dependent task. It does not issue bulk input
  loads when it launches an on-chip or near-memory kernel, and it does not
  split such loads across DIMMs.
- **Setup handshake.** The setup phase is plain configuration writes. There
  is no "ready" acknowledgement to the CPU after setup, and no GAM
  accelerator table filled from kernel templates.
- **DIMM interface.** The DIMM is modelled as a request/response port that
  answers in order. The precharge-all strobe stands in for DDR4 commands.
- **Host memory reads.** Reads to different DIMMs may complete out of order;
  `hm_rdimm` says which DIMM answered.
- **Lint.** Verilator reports UNOPTFLAT on three handshake arrays in
  `reach_top`. These are not real combinational loops; see that file's header.
