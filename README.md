# RAMP emulator core array in SystemVerilog

RAMP runs cycle-accurate simulation of a digital design by mapping its
synthesized 4-input-LUT netlist onto an array of small, identical cores. An FPGA
places every LUT in its own cell and connects them with wires. A RAMP core has
only five LUT units. It evaluates thousands of netlist LUTs by
time-multiplexing: each cycle, each unit reads a new instruction (a truth table
plus input and output addresses) and exchanges values with the other units
through a multi-ported SRAM instead of routing. Because nothing has to be placed
and routed, a new design only needs partitioning and scheduling, which is far
faster than FPGA compilation. 1296 cores at 1.5 GHz give 3.3 million LUT4
evaluations per emulated clock.

This repository holds synthesizable RTL for that accelerator: the computing core,
its replicated state store, the intra-cluster crossbar, the inter-cluster ring
and the phase controller. The architecture follows the RAMP paper ("RAMP:
RTL-Level Emulation with Thousand-Core-Scale Parallelism"). That paper gives the
organisation and sizes but not the micro-architecture. Encodings, pipeline
timing, flow control and the host port are therefore this design's own choices,
and are listed below.

## One emulated clock cycle: compute, then sync

Emulation is *full-cycle*: every emulated RTL cycle evaluates the whole netlist.
The cycle has two phases, and each ends in a global barrier:

1. **Compute.** Every core runs its program steps `0 .. n_comp-1`. The netlist
   is split into *fibers*: the fan-in cone of a group of registers. Each core
   owns some fibers. It computes every LUT of their cones, even a LUT that
   another core computes too, so no values cross between cores during compute.
2. **Sync.** Every core runs steps `n_comp .. n_comp+n_send-1`. Each step gathers
   up to 20 next-state bits from its store and sends them as one packet to a
   core that needs them, itself included. The receiving core writes the bits
   over its copy of the current register values.

`ramp_sync_ctrl` sequences the phases. It pulses `start_comp` and waits until
every core reports `comp_done`. It then pulses `start_sync` and waits until
every core reports `sync_done` and no packet remains in any ring buffer. That
completes one RTL cycle. The barrier after compute is needed because incoming
register updates would otherwise overwrite values a slower core is still
reading. Registers therefore have two locations in every core that uses them:
the current value, which LUTs read, and the next value, which a LUT writes. The
sync phase copies next to current.

## The computing core (`ramp_core`)

```
           host / NoC in ─┐        ┌──────────── write back ─────────────┐
                          v        v                                     │
 5 x imem ──> read addr ──> [ state store: 4 x (128x32, 5R1W) ] ──> 20 words
 (512 x 76)                                                          │
                                        MUX array (bit select, forward)
                                                                     │ 20 bits
                                   5 x LUT4 ── results ──────────────┘
                                        └── sync step: 20 bits ──> send queue ──> NoC out
```

**State store.** 128 words of 32 bits, i.e. 4096 bits per core. Four
5-read/1-write arrays hold identical contents, because every write is broadcast
to all four. Together they act as one memory with 20 read ports, one per LUT
input (5 LUTs x 4 inputs). Read port `j*4+k` (LUT `j`, input `k`) is array `k`,
port `j`. Reads are synchronous with one cycle of latency. The write port has a
per-bit write enable.

**Instructions.** Each LUT unit has its own 512-entry instruction memory. An
instruction is 76 bits (`ramp_pkg::lut_instr_t`):

| bits   | field                                        |
|--------|----------------------------------------------|
| 75:60  | truth table; bit `i` is the output for input value `i` |
| 59:24  | source bit addresses of inputs 3..1          |
| 23:12  | source bit address of input 0                |
| 11:0   | destination bit address                      |

A bit address is `{word[6:0], bit[4:0]}`. Destination `12'hFFF` marks an idle
slot, and that bit of the store can never be written. With this format, 1296
cores x (4096 store bits + 5 x 512 x 76 instruction bits) is exactly 32.59 MiB,
the on-chip SRAM total quoted for the chip.

**Pipeline.** One step issues per cycle, in four stages: fetch the instruction
(F), read the store (R), select bits and evaluate the LUTs (E), then write the
results (W). Two paths let a step use results from the step just before it,
with no bubble:

- The W-stage write is forwarded into the E-stage bit muxes (`ramp_mux_array`).
- A store read of a word that is written in the same cycle returns the new data.

So the compiler may put dependent layers in adjacent steps. There is no
interlock. The program must never read a bit before the step that writes it.

**One write word per step.** The store has a single write port, so the five
results of a step must all go to the same word. The lowest non-idle LUT names
that word. An assertion (`a_one_word`) flags programs that break the rule.

**Compute timing.** For one core, a compute phase takes
`n_comp + 5` cycles from the `start_comp` pulse to a visible `comp_done`:
1 pulse cycle, `n_comp` issue cycles, 3 cycles to drain the pipeline, 1 to
report. Under the controller, add one barrier cycle.

## Sync steps: the read circuitry doubles as the network interface

In a sync step nothing is computed. The 20 source fields of the five LUT
instructions name 20 scattered bits, for example the bits of one register
vector. The same read ports and bit muxes collect them in a single cycle. The
packet fields are taken from the instructions as follows:

| packet field       | taken from                            |
|--------------------|---------------------------------------|
| destination core   | LUT-0 truth table, `{cluster[7:0], core[7:0]}` |
| destination word and first bit | LUT-0 destination         |
| bit count (1..20)  | LUT-1 truth table `[4:0]`             |
| data               | the 20 gathered bits                  |

If LUT-0's destination is the null address, the step sends nothing. The
receiver writes `data[len-1:0]` to bits `offset .. offset+len-1` of the word;
the compiler keeps them within one word. Packets wait in a 4-entry send queue.
A sync step is not issued while the queue, plus the sends still in the pipeline,
could overflow. That is the only stall in the core. Incoming packets are always
accepted and use the store's write port, which is free during sync.

## Network: crossbar clusters on a ring

- **Clusters.** `CORES_PER_CLUSTER` cores share a crossbar (`ramp_crossbar`). It
  has one port per core plus a ring port. Every output has a round-robin
  arbiter (`ramp_rr_arbiter`). A grant that has not been taken stays locked,
  so an output never swaps its packet while it waits. Packets are one flit with
  valid/ready handshakes.
- **Ring.** The clusters form a unidirectional ring of `ramp_ring_router` stops.
  Each stop buffers its incoming link in a 2-entry FIFO. It ejects packets for
  its own cluster into the crossbar and passes all others on. A local packet is
  injected only when no passing packet needs the link. Ready signals come from
  FIFO occupancy, so no combinational loop runs around the ring. Ejection always
  drains, because cores always accept, so the ring cannot deadlock.
- **Completion.** Every packet is always in one register: a send queue, a ring
  FIFO or a core's W stage. Each of these is included in a done or idle flag,
  so the sync barrier knows when all packets have been delivered.

## Host interface (`ramp_top`)

While `busy` is low, the host can use these ports:

- **Load.** `host_we` with `host_core = {cluster, core}` and `host_sel` writes
  one of three targets:
  - `0`: a store word, `host_addr[6:0]`, data `host_wdata[31:0]`.
  - `1..5`: an instruction of LUT 0..4, at `host_addr[8:0]`.
  - `6`: the step counts `{n_send[9:0], n_comp[9:0]}`.
- **Read back.** `host_rd_core` and `host_rd_addr` return a store word on
  `host_rdata` one cycle later.
- **Run.** `run` with `n_rtl_cycles` starts an emulation. `busy` falls when it
  is complete.

Four counters report on the last run:

- `rtl_cycle`: RTL cycles emulated.
- `comp_cycles` and `sync_cycles`: accelerator cycles spent in each phase.
- `fwd_events`: cycles in which some core used forwarded data.
- `stall_events`: cycles in which some core held back a send.

A core whose step counts are zero takes part in the barriers and does nothing
else.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_CLUSTERS` | 36 | `ramp_top` |
| `CORES_PER_CLUSTER` | 36 | `ramp_top`, `ramp_cluster`, `ramp_crossbar` (`N_CORES`) |
| `IMEM_DEPTH` | 512 instructions per LUT | `ramp_top`, `ramp_cluster`, `ramp_core` |
| `SRAM_DEPTH` x width | 128 x 32 | `ramp_top`, `ramp_core`, `ramp_storage` |
| LUT units per core, inputs per LUT, arrays, read ports | 5, 4, 4, 5 | `ramp_pkg` |
| send queue / ring FIFO depth | 4 / 2 | `ramp_core`, `ramp_ring_router` (own choice) |

All defaults are the paper's figures except the two queue depths. The RTL builds
at these sizes.

## What follows the paper and what does not

The following come from the paper:

- The core count and the 36 x 36 two-level organisation.
- Five LUT4 units per core, each with 512 instructions.
- Four replicated 128 x 32 5R1W arrays with broadcast writes, and 20 read ports
  with bit-select muxes.
- Reuse of the read path to gather register bits for the network.
- The crossbar inside each cluster and the ring between clusters.
- The compute/sync alternation per RTL cycle.

The following are this design's own choices:

- The instruction and packet encodings.
- The four-stage pipeline and its forwarding path.
- The one-word-per-step write rule.
- The step-count registers.
- The send queue and its stall.
- Round-robin arbitration with grant lock.
- A unidirectional ring with through-traffic priority.
- The barrier handshake.
- The host port.
- The 20-bit gather limit. The paper says a whole register vector is gathered
  in one cycle. Here one sync step collects at most 20 bits, one per read port,
  so a wider vector takes several steps.

Not included:

- **Cluster BRAM.** The paper maps netlist block RAMs onto a BRAM in each
  cluster, but does not give its size or how cores reach it. Designs with
  memories must be emulated with those memories converted to LUTs and registers.
- **The compiler.** LUT mapping, fiber partitioning, and merging of fibers by
  hill climbing under a cost of redundant LUTs plus load imbalance are software.
  `tb/ramp_tb_pkg.sv` has a minimal stand-in: cone extraction, layered
  scheduling with a new step at each layer, and all-to-all register broadcast.
  The tests use it.
- **Physical SRAM macros.** `ramp_sram_5r1w` is a behavioural array with the
  macro's ports. The 1.5 GHz target depends on a custom multi-port SRAM.

## Files

`rtl/`:

- `ramp_pkg`: constants and types.
- Storage: `ramp_sram_5r1w`, `ramp_storage`, `ramp_imem`.
- Datapath: `ramp_lut4`, `ramp_mux_array`.
- `ramp_core`.
- Network: `ramp_fifo`, `ramp_rr_arbiter`, `ramp_crossbar`, `ramp_ring_router`.
- `ramp_cluster`.
- `ramp_sync_ctrl`.
- `ramp_top`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, and
`tb_ramp_top_full.sv` for the full-size array. Every testbench prints
`TB_RESULT checks=N failures=M`.

The end-to-end tests work as follows:

- They generate a random 64-register LUT4 netlist.
- They compile it for one or more cores with the package in `ramp_tb_pkg.sv`.
- They emulate several RTL cycles.
- They compare every core's register copy with a software reference model.

`tb_ramp_top` (3 x 3 cores) also requires each mechanism to occur at least
once: forwarding, send stalls, crossbar conflicts, ring ejection, ring
pass-through, and injections held back by passing traffic.

## Simulating

With Verilator 5, for example for the reduced end-to-end test:

```
verilator --binary --assert -Wno-fatal --top-module tb_ramp_top \
  rtl/ramp_pkg.sv tb/ramp_tb_pkg.sv rtl/*.sv tb/tb_ramp_top.sv
./obj_dir/Vtb_ramp_top
```

Unit tests that do not import `ramp_tb_pkg` can drop `tb/ramp_tb_pkg.sv`.

No testbench here runs the array at its full default size (36 x 36 = 1296
cores). Verilator flattens the 36 cores of a cluster into one class, and the
C++ compile of the full array did not finish within 20 minutes on 8 compile
jobs. The full-size RTL lints and elaborates cleanly. The largest array
simulated end to end is 12 clusters x 12 cores (144 cores), with four active cores, for three RTL cycles. That run uses the same test as `tb_ramp_top`, with larger `ramp_top` parameters and a different choice of active cores, and matched the reference model. `tb_ramp_top` uses 3 x 3. To simulate
another size, override `N_CLUSTERS` and `CORES_PER_CLUSTER` on `ramp_top`.
