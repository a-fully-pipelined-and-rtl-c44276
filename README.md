# FPCA: a fully pipelined, dynamically composable CGRA

The FPCA is a coarse-grained reconfigurable array. It is built for loop nests whose
inner loop is a fixed data-flow graph (DFG). Examples are stencils such as the
GRADIENT kernel of medical imaging.

The chip has three parts:
- a 4x4 array of PE clusters;
- a global accelerator manager (GAM), which the host CPU talks to;
- an IOMMU and a system bus that join the clusters to off-chip DRAM.

The host asks for an accelerator. The GAM then composes one or more copies of it from
idle clusters and writes their configuration by broadcast. It splits the task's
independent subtasks among the copies. Each copy fetches its own data blocks in the
user's virtual address space, computes them, and writes the results back.

## Inside a PE cluster (`rtl/pe_cluster.sv`)

| unit | count | file | role |
|---|---|---|---|
| computation element (CE) | 6 | `ce.sv` | `P = P(n-1) ± (B×(A±D) + C)` with any subset of the terms. Fully pipelined: one result per cycle, latency 4 + xff. CE *i* gets P(n-1) from CE *i-1* over a dedicated link. |
| local memory unit (LMU) | 6 | `lmu.sv`, `addr_gen.sv`, `token_unit.sv` | Each load and each store of the inner loop gets its own bank, so there are no port conflicts. A 3-D parallelogram address generator reads or writes one word per cycle. A depth-2 block FIFO (the token unit) gives double buffering, so transfers of the next and previous blocks overlap computation. Output LMUs count down the DFG delay before they store. |
| register chain | 2 | `reg_chain.sv` | One input and six tapped outputs with bypassable flip-flops. It delivers one operand to several CEs at different cycles. |
| permutation network | 1 | `perm_net.sv`, `benes.sv` | A 32-port, 32-bit Benes network with 144 switches. It is set once at composition. It needs no arbitration and has a latency of 2 cycles. |
| synchronization unit | 1 | `sync_unit.sv` | Starts all LMUs of a DFG thread in the same cycle, once no input LMU is empty and no output LMU is full. After that nothing in the datapath carries a valid bit. |
| GDTU | 1 | `gdtu.sv`, `dmac.sv` | Global data transfer unit. A request initiator keeps up to 4 block-translation requests in flight at the IOMMU. A monitor sorts the returned page segments per channel. Each of the 4 channels has a DMA controller. A prefetch channel can broadcast one block to several LMUs. |
| controller, configuration unit | 1 each | `cluster_ctrl.sv`, `config_unit.sv` | Take a subtask range from the GAM and report when it is done. Hold the configuration record. |

## Chip level

- **`gam.sv`** keeps a table of idle clusters and allocates copies. It runs up to four
  accelerators at once and splits subtasks into contiguous ranges. It reports per
  accelerator when the last copy is done.
- **`iommu.sv`** has a 16-entry fully associative TLB with 1024-word pages. On a miss
  it asks the operating system. It cuts each block request into contiguous physical
  segments at page boundaries and answers in order.
- **`sys_bus.sv`** is a round-robin bus from the 16 GDTUs to the one-word-per-cycle
  memory port. Responses are routed back by tag.
- **`fpca_top.sv`** ties these parts together. The host CPU, the operating system and
  the DRAM are outside the top. The neighbour-to-neighbour links between clusters are
  not built, because their width and protocol are unspecified.

## Design choices beyond the architecture

- The CE can square the first node's result, so one CE computes a `(x-y)^2` term.
- Input LMUs may count down too. This aligns operands that reach a CE without a
  register chain.
- The GDTU reserves segment-queue space before it sends a request. An in-order IOMMU
  answer can then always be accepted, and one stalled channel cannot block the others.
- The memory side is a plain one-word valid/ready port with tagged, in-order read
  responses, not an AXI bus.
- Word and field widths, latencies, the TLB organisation, the tag format and all
  handshakes are choices of this implementation.

## What is not built

- **Neighbour-to-neighbour links between clusters.** An accelerator here always fits
  one cluster, and copies never talk to each other.
- **Automatic DFG mapping.** The GAM allocates clusters and distributes subtasks, but
  the mapping of a kernel onto CEs, LMUs, register chains and network settings comes
  from the host as configuration words. `tb/gradient_map_pkg.sv` shows how a mapping is
  derived by hand, including the countdown schedule.
- **CONVOLUTION and SOBEL.** They have no mappings here.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`, and each has a watchdog.

`tb/pe_cluster_tb.sv` runs GRADIENT on one cluster. The kernel is hand-mapped in
`tb/gradient_map_pkg.sv`: 4 CEs, 6 LMUs, 1 register chain and 2 GDTU channels. Every
interior point is checked against a reference. While computing, the cluster starts
one iteration per cycle.

`tb/fpca_top_tb.sv` is the full-size test, with every parameter at its default. It
runs four GRADIENT accelerators with 1, 2, 4 and 2 copies on 64x64 blocks. The last
one reuses clusters freed by the first. Memory stalls are random. The test counts
these mechanisms and fails if any of them never happens:
- TLB misses and hits;
- memory stalls and bus back-pressure;
- LMU-full stalls;
- prefetch and write-back overlapping computation;
- IOMMU queueing;
- duplication;
- concurrent accelerators;
- block starts.

## Performance notes

With one copy, a 64x64 GRADIENT block (3844 interior points) computes in about 3850
cycles. Moving the block in and out takes 8192 words over the shared one-word-per-cycle
bus, so the system is memory-bound at about 2.1–2.4 cycles per point. More copies share
that bus. CONVOLUTION and SOBEL fit the {2 REG, 6 CE, 6 LMU} cluster, but they are not
mapped here.

## Simulating

All files use IEEE 1800-2017 SystemVerilog and need no vendor libraries. Every testbench
has no ports and calls `$finish`. For example, from the project root:

    verilator --binary --timing --assert -y rtl -y tb rtl/fpca_pkg.sv tb/benes_route_pkg.sv \
        tb/gradient_map_pkg.sv tb/fpca_top_tb.sv --top-module fpca_top_tb
    obj_dir/Vfpca_top_tb

The full-size run takes a few minutes. Block testbenches such as `ce_tb` or `lmu_tb`
take seconds. Testbenches initialise every state they read, so they also pass with
`+verilator+rand+reset+2`.
