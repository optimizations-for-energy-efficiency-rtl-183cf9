# A GPGPU with per-lane tiny caches, virtual SM caches and independent lane front ends

A conventional GPU streaming multiprocessor (SM) makes all 32 lanes share one
instruction fetch unit and send every memory access, through a coalescing
unit, to a large L1 data cache or scratchpad. That large structure is
accessed constantly, and accessing it costs energy. When the lanes of a warp
diverge, they also serialise. This design attacks both costs and also removes
the copies between CPU and GPU memory:

* **Shared virtual memory between CPU and GPU.** All SM caches are virtually
  indexed and virtually tagged. The only address translation for the GPU
  happens in a TLB shared with the CPU cores, placed just before the
  last-level cache (LLC). Coherence with the CPU is kept at page granularity:
  when the CPU touches a page the GPU has used, or such a page is
  deallocated, that page is written back and invalidated everywhere in the
  SM hierarchy first.
* **tinyCache.** Each lane has a 16-line (1 KB) data cache. It needs no
  coherence protocol, because it records written data per half-word
  ("write-validate") and writes back only the half-words a lane actually
  wrote. Lanes can therefore hold private, partly written copies of the same
  line. The copies are merged correctly when they are evicted at the next
  barrier, at a memory fence of their lane, or when the thread block ends.
* **EESI.** Each lane has its own fetch unit and an 8-line tiny instruction
  cache, so lanes can follow different control paths. A warp scheduler keeps
  every resident warp's PCs in a circular buffer and lets lanes switch
  threads on a configurable trigger. It supports two policies:
  * **EESI-T:** the lanes move to the next warp set together.
  * **EESI-M:** each lane moves on by itself.

The RTL covers the whole memory and control side of this GPU. It does not
include the per-lane decode/execute pipeline and register file, because no
instruction set is defined for them. These stages connect through ports and
are modelled behaviourally in the testbenches.

## Structure

```
gpgpu_top
├── sm  (x NUM_SM = 4)
│   ├── warp_scheduler                 EESI-T / EESI-M, triggers, barrier
│   ├── lane_frontend (x 32)           fetch unit + instruction buffer
│   │   └── tiny_icache                8 x 64 B, fully associative
│   ├── tinycache (x 32)               16 x 64 B, 8-way, write-validate
│   ├── coalescer                      merges lane misses to the same line
│   ├── sm_l1
│   │   ├── scratchpad                 48 KB, 8 banks, valid bit per word
│   │   └── vcache                     64 KB, 8-way, virtual, kernel-id tags
│   ├── il1                            coalescer + 32 KB read-only vcache
│   └── coalescer (2 inputs)           SM-L1 and IL1 share the port to the SM-L2
├── sm_l2                              coalescer (4 SMs) + 256 KB 16-way vcache
├── stlb                               512 entries, 4-way, shared with the CPU
└── flush sequencer                    page flushes and kernel-end flushes
```

`gpgpu_pkg` holds the shared types. Every cache-to-cache link uses the same
line port:

* A request (`mem_req_t`) carries:
  * an operation: `MEM_RD`, `MEM_WR`, or `MEM_AMO` (a 32-bit atomic add that
    returns the old value);
  * the address space (global or shared);
  * a 2-bit kernel id;
  * a virtual address;
  * a 64-byte data line;
  * a 64-bit byte mask.
* It uses a `valid`/`ready` handshake.
* Exactly one response line comes back for each request, marked by
  `rsp_valid`.
* Every block keeps one request outstanding.

## The tinyCache protocol (`tinycache.sv`)

This is the most subtle part. A line is in one of four states. It has 32
control bits, one per half-word, and their meaning depends on the state.

| state | meaning of the line | control bits |
|---|---|---|
| I   | invalid | unused |
| C   | clean copy of memory | unused |
| DV  | all half-words valid, some dirty | dirty half-words |
| DPV | only some half-words valid, and all of those are dirty | valid (= dirty) half-words |

**Loads.**
* A read hit on C, DV, or on DPV whose accessed half-words are valid is
  answered the next cycle.
* A read of a DPV line whose accessed half-words are not valid fetches the
  line and merges it under the dirty half-words. The line becomes DV.
* A read miss fetches the line into C. A dirty victim is written back first.

**Stores.**
* A write miss does not fetch ("write-on-miss", "write-validate"). It
  allocates the line in DPV with just the written half-words marked.
* A write hit on C goes to DV.
* When a DPV line has every half-word written, it becomes DV.

**Write-back.** A dirty line is written back with a byte mask built from its
control bits. Two lanes that wrote different words of the same line therefore
never overwrite each other's data. This is the property that lets the
tinyCaches skip coherence. Conflicting writes to the same word are allowed by
the CUDA/OpenCL memory model, which orders nothing between threads before a
barrier.

**Uncached accesses.**
* Byte stores cannot be recorded with half-word control bits.
* Atomics must see memory.

Both evict a cached copy (writing it back if it is dirty) and then go around
the cache.

**Caching modes.** `cache_global` and `cache_shared` select which address
spaces the tinyCache holds.

**Flush.** `flush_req` (held by the SM until `flush_done`) walks all lines.
Dirty lines are written back and all lines are invalidated. The SM raises it
at every barrier, at a fence of the lane and at kernel end.

## Virtual caches and flushes (`vcache.sv`, `sm_l1.sv`, `sm_l2.sv`)

`vcache` is the storage used by the SM-L1, the IL1 and the SM-L2.

**Organisation.**
* Set-associative, write-back and write-allocate. A full-line write needs no
  fetch.
* Blocking, with round-robin replacement.
* Tags are virtual and include the kernel id, so kernels running on
  different SMs never hit each other's lines in the shared SM-L2.

**Flush engine.** A flush visits one line per cycle. It writes back and
invalidates the lines that match one of three filters:
* every line (kernel end in an SM-L1);
* one kernel id (kernel end in the SM-L2);
* one virtual page (page flush).

**Atomics.**
* The SM-L1 first writes back and invalidates everything, then passes the
  atomic on.
* The SM-L2 performs atomics in place.

**The `sm_l1` block.**
* It sends shared-space requests to the scratchpad and global requests to the
  vcache.
* The scratchpad keeps a valid bit per word. Unwritten words read as zero,
  and all valid bits are cleared when the kernel ends, so one kernel can never
  read another kernel's scratchpad data.
* The scratchpad has eight word-interleaved banks. A 64-byte line therefore
  takes two bank cycles, and a request is answered 3 cycles after it is
  accepted.

## Shared TLB and page flushes (`stlb.sv`, `gpgpu_top.sv`)

The STLB translates the SM-L2's misses and write-backs on their way to the
LLC. It also answers second-level lookups from the CPU cores.

**Misses.**
* A miss on either side raises `miss_valid`/`miss_vpn`, which is the
  exception to the operating system.
* The handler refills the entry through `fill_*`, and the waiting lookup
  retries.
* GPU traffic and refills keep flowing while a page flush is in progress,
  because the flush's own write-backs need translation.

**Page flushes.**
* Each entry has a *gpu* bit, set when the GPU translates through it.
* A CPU lookup that hits an entry with this bit, or a deallocation (`inv_*`)
  of such an entry, first raises `pf_req`.
* The top's flush sequencer then runs a page flush in every SM-L1 (in
  parallel), then in the SM-L2, and answers `pf_done`.
* Only then is the CPU answered or the entry dropped.

**Kernel-end flush.** The SM-L2 is flushed at kernel end through the
`kflush_*` port by kernel id. Other SMs may still be running other kernels,
so the whole cache is not flushed.

## SM control, barriers and kernel end (`sm.sv`)

A small controller in each SM sequences the coherence actions that the
programming model needs:

* **Barrier.** When every unfinished thread waits at the barrier, all 32
  tinyCaches are flushed. Then the barrier is released, so a thread reading
  after the barrier sees what other threads wrote before it.
* **Memory fence.** A lane raises `fence_req` and holds it until
  `fence_done`. Only that lane's tinyCache is written back and invalidated,
  so the lane's earlier stores become visible to the other lanes. The lane
  keeps its thread meanwhile, so a fence never overlaps the barrier or
  kernel-end flushes. The tinyCache thus works like a store buffer under
  release consistency.
* **Kernel end.** When all threads have exited, the controller runs these
  steps in order:
  1. flush the tinyCaches;
  2. flush all lines of the SM-L1;
  3. clear the scratchpad;
  4. pulse `kernel_done`.

The SM-L1's flush port is shared: page flushes from the TLB use it whenever
the kernel-end sequence does not.

## Warp scheduling (`warp_scheduler.sv`, `lane_frontend.sv`)

All warps assigned to the SM stay resident. For every warp and lane the
scheduler keeps the PC plus *done* and *at-barrier* bits. Each lane runs one
thread at a time and reports every retiring instruction with its class (ALU,
MEM, BRA, BAR, EXIT) and the next PC.

**Switching.** A lane gives up its thread, saving the next PC, on:
* a barrier;
* an exit;
* a trigger match:
  * `TRIG_NON`: never;
  * `TRIG_MEM`: memory instructions;
  * `TRIG_BRA`: branches;
  * `TRIG_MBR`: both;
  * `TRIG_ALL`: every instruction.

A branch that does not switch redirects the lane's fetch unit.

**Next thread.**
* **EESI-M:** each free lane takes the next warp, in circular order, that
  has a runnable thread for it.
* **EESI-T:** the SM waits until every lane is free, then starts the next
  warp that has any runnable thread on all lanes that have one.

A new thread's PC reaches the lane one cycle after the lane becomes free.

**Fetch unit.** Each lane's fetch unit fetches sequentially through its tiny
instruction cache into a 2-entry buffer. A redirect empties the buffer and
discards a fetch of the old path that is still in flight. The buffer is
hidden from the execute stage while the lane has no thread or a redirect is
in progress.

## Parameters

Defaults are the configuration evaluated for this architecture:

* 4 SMs of 32 lanes;
* 24 warps per SM;
* tinyCache 16 × 64 B, 8-way;
* tiny instruction cache 8 × 64 B;
* SM-L1 64 KB, 8-way;
* scratchpad 48 KB, 8 banks;
* IL1 32 KB, 8-way;
* SM-L2 256 KB, 16-way;
* STLB 512 entries, 4-way.

All lines are 64 bytes. Kernel ids are 2 bits (one kernel per SM, four SMs).
Pages are 4 KB and addresses are 32 bits.

## Where this RTL departs from the architecture as published

* **Hit latencies.** Every cache answers a hit in one cycle, and the
  scratchpad answers in three. The published latencies (16 cycles for
  the SM-L1 and the scratchpad, 7 for the SM-L2, 4 for the IL1) belong to
  full-size SRAM macros and are not modelled. The shared TLB answers a hit
  in one cycle, as published.
* **Blocking caches.** All caches keep one miss outstanding. The published
  SMs sustain many misses in flight.
* **Fence scope.** A lane's memory fence writes back only that lane's
  tinyCache. Data written to the SM-L1 becomes visible to other SMs at an
  atomic (which writes back the SM-L1) or at kernel end.
* **Coalescing.** The coalescer merges only reads. Writes and atomics pass
  one at a time.
* **Tiny instruction cache size.** It has 8 entries, following the text.
  The published configuration table prints 1 KB, which would be 16 lines.
* **Configuration.** The design follows the four-SM configuration. The
  evaluation of the divergence scheme used two SMs; `NUM_SM` is a parameter.
* **Own choices.** These were chosen for this design:
  * the line-port protocol;
  * the TLB's gpu bit;
  * round-robin replacement;
  * the order of the flush steps;
  * 4 KB pages;
  * one thread block per SM;
  * the controller handshakes.
* **Not built.**
  * Lane decode/execute stages and register files: no instruction set is
    defined.
  * CPU cores.
  * The LLC and DRAM.
  * The OS miss handler.
  * SFUs, texture and constant caches.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The behavioural models in `tb/` are:

* `line_mem_model`, a memory with a fixed latency that stands in for the
  level below;
* `lane_exec_model`, a lane execute stage with a 13-instruction test ISA.

Compile every file with the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gpgpu_top \
    rtl/gpgpu_pkg.sv $(ls rtl/*.sv | grep -v gpgpu_pkg) tb/*.sv
./obj_dir/Vtb_gpgpu_top +verilator+rand+reset+2
```

**`tb_gpgpu_top`** runs the full-size design with every parameter at its
default, and takes about 2.5 minutes with verilator.

*Setup:*
* All four SMs run a kernel shaped like SAXPY (Y = 3X + Y over 3072
  threads).
* Values are passed between threads through the scratchpad across a barrier.
* Every thread executes a memory fence.
* Each warp does one atomic add to a shared counter.
* Odd lanes branch differently from even lanes.
* Byte stores are included.

*Sequence:*
1. The kernel runs once under EESI-T with the memory trigger.
2. It runs again under EESI-M with the memory+branch trigger.
3. After each kernel, the SM-L2 is flushed by kernel id and memory is
   compared with a reference.
4. A CPU lookup touches a GPU page, and another GPU page is deallocated.
   Memory is compared again after both page flushes.

*Mechanisms counted* (each must occur at least once):
* tinyCache hits;
* coalesced lane requests;
* merged SM-L2 requests;
* barriers;
* warp switches;
* EESI-M drift, while EESI-T lanes stay on one warp;
* TLB misses;
* atomics;
* memory fences;
* page flushes.

**Other testbenches:**
* `tb_sm` runs one full-size SM through four kernels with different
  policies, triggers, warp counts and caching modes.
* The block testbenches check each protocol in detail against reference
  models, including:
  * every tinyCache state transition;
  * scratchpad valid bits and latency;
  * merging in the coalescers;
  * TLB misses, page flushes and one-cycle hits;
  * thread resumption and trigger behaviour of the warp scheduler.
