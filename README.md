# HARTMP: a heterogeneous multicore with one instruction set

SystemVerilog model of HARTMP, a multicore whose cores all run the same SPARC V8 code but differ in
the size of a reconfigurable array coupled to each processor. Each core is a DAP (Dynamic Adaptive
Processor). A DAP watches the code its processor runs, translates straight-line blocks into array
configurations in hardware, and runs those blocks on the array the next time it reaches them.

The top level (`hartmp_top`) is the 4-core "He1" system. It has two large, one medium and one small
DAP, and a 512 KB 8-way shared L2. All of them sit on a 3 x 2 mesh network with XY routing.

## Blocks

| module | what it is |
|---|---|
| `hartmp_pkg` | Shared types: array unit control word, flit, SPARC ALU semantics, He1 core sizes |
| `hartmp_top` | Four DAPs, the mesh and the L2. Cores at (0,0) (1,0) (2,0) (0,1); L2 at (1,1) |
| `dap` | One core: processor, translator, address cache, configuration memory, array, local RAMs, network interface |
| `gpp` | Five-stage in-order pipeline for an integer SPARC V8 subset |
| `ddh` | Four-stage translator (decode, dependence check, allocation, table update) |
| `addr_cache` | Fully associative table of block start addresses, FIFO replacement |
| `reconf_mem` | Per-slot unit control words plus a header (levels used, resume address) |
| `reconf_array` | Captures the register file, runs one level per cycle, returns written registers |
| `array_level` | One combinational level: rows of three chained ALUs, multipliers, load/store units |
| `noc_router` | Five-port XY router with 2-deep input FIFOs and round-robin outputs |
| `noc_mesh` | Mesh of routers with one endpoint port per node |
| `l2_shared` | Write-back set-associative shared cache on the network, line port to off-chip memory |

### Core sizes

These are the He1 sizes, per level. Table I of the original work gives totals; the per-level
figures below are those totals divided by the number of levels, with three ALU columns per row.

| class | levels | ALU rows x 3 | multipliers | load/store | configurations | input context |
|---|---|---|---|---|---|---|
| small | 3 | 3 | 1 | 2 | 32 | 8 |
| medium | 5 | 4 | 2 | 2 | 64 | 14 |
| large | 8 | 4 | 2 | 2 | 128 | 20 |

The source gives two different core mixes: its figure shows two small cores, while its methods
section says half the cores are large. The model uses two large, one medium and one small
(`CORE_CLASS = '{2,2,1,0}`).

## How a block gets onto the array

1. The processor retires instructions in order; each one is passed to the translator.
2. A block starts after a control transfer or an instruction the array cannot run. Instructions
   that set condition codes count as ones the array cannot run.
3. Each instruction is placed on a time grid with four slots per level:
   - ALU column *c* of level *L* reads at slot 4L+c and its result is ready at 4L+c+1.
   - Multipliers and memory units read at 4L and their results are ready at 4L+4.
   - The translator tracks when each register becomes available and when it was last read. This
     handles true dependences, write-after-read and write-after-write.
   - A load never goes at or before a level that holds a store. A store goes after every earlier
     memory access.
4. A block closes on any of these:
   - a control transfer;
   - an instruction the array cannot run;
   - a full array;
   - more source registers than the input context holds;
   - the array starting another block.
5. If the block has at least 3 instructions, it is kept. Its start address goes into the address
   cache, and its header (levels used, resume address) goes into the configuration memory.
6. When the fetch address hits in the address cache, the processor stops fetching. It waits for its
   pipeline to drain and for the translator to go idle. Then:
   - the configuration is read, taking one cycle;
   - the array captures the register file, runs one level per cycle, and returns the written
     registers one cycle after the last level;
   - the processor writes those registers and resumes at the block's end address.

## Memory and network

- Each core has a local 1 K-word instruction RAM, loaded through the top-level `im_*` port while in
  reset, and a 4 K-word data RAM. These stand in for the L1 caches.
- The array's load/store units use ports of the data RAM.
- Addresses with bit 31 set go to the shared L2. Each is a single-word request over the network with
  one outstanding request per core. The L2 answers with a response flit.
- A miss in the L2 goes to off-chip memory through the top-level `mem_*` line port: request held
  until acknowledge, 32-byte lines.

## Processor subset

Supported instructions:
- SETHI, Bicc, CALL, JMPL;
- integer ALU ops with and without condition codes;
- shifts;
- UMUL/SMUL (low word);
- LD/ST word;
- Ta, which halts the core.

Not supported: delay slots, register windows, the Y register, traps, divide, and byte or halfword
accesses. Taken branches squash the two younger instructions.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The main ones:

- `tb_array_level` checks random register contexts against a software model.
- `tb_reconf_array` checks results and latency (levels + 2 cycles).
- `tb_ddh` checks every placement, close reason and dropped block.
- `tb_dap` runs a loop on a small core and checks the registers, the memory, the array runs and the
  configurations.
- `tb_noc_router` and `tb_noc_mesh` send random traffic with back-pressure. They check delivery and
  order, and the corner-to-corner latency (3 cycles).
- `tb_l2_shared` checks a small instance against a reference memory with heavy eviction.

`tb_hartmp_top` runs the full-size system (no parameter overrides) with four different programs:

- Each program makes its core build configurations and run them on the array.
- Each core overflows its array and its input context.
- All four cores hit the L2 over the network at the same time.
- The testbench counts every mechanism and fails if any never happened.

`tb_workloads` runs four small kernels, one thread per core, on the same full-size system. They are
written in the style of the benchmarks the architecture was evaluated with:
- an FFT-like butterfly;
- SUSAN-like absolute brightness differences;
- a swaptions-like random-number stream per thread;
- an equake-like case where only one core has work.

It checks every thread's checksum and prints cycles, retired instructions and array runs.

Build any testbench with plain verilator, for example:

    verilator --binary -Irtl -Itb -y rtl -y tb rtl/hartmp_pkg.sv tb/sparc_asm_pkg.sv \
        tb/tb_hartmp_top.sv --top-module tb_hartmp_top -o sim && obj_dir/sim

## Not built

- L1 caches, replaced by local RAMs.
- Off-chip memory (only a behavioural model in `tb/`).
- The He2 sizes and the 8-core system.
- Thread scheduling.
- Full SPARC V8: the benchmarks of the original evaluation (equake, susan, fft, swaptions) do not
  run on this subset.
