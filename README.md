# FGPU: a GPU-like soft processor for FPGAs

FGPU runs data-parallel kernels, written in the OpenCL style, on FPGA logic. A kernel is
one small program that every thread (a *work-item*) runs on its own data. A launch
names how many work-items to run. The hardware groups them and runs them on arrays of
simple processing elements (PEs) in the SIMT fashion (single instruction, multiple
threads): one instruction is fetched once and executed for many work-items. This
repository is synthesizable SystemVerilog of that architecture:

- compute units, each with 8 PEs and 8 wavefront slots;
- a dispatcher that spreads work over the compute units;
- a shared global memory controller with a write-back cache and several AXI4 master ports;
- an AXI4-Lite control port for the host.

The architecture is public. The numbers in this README come from it: 8 PEs per compute
unit, 64 work-items per wavefront, 32 registers per work-item, 64 outstanding requests
in the memory controller, cache up to 8 KB, up to 4 AXI4 ports. The micro-architecture
below those numbers is this implementation's own, and it says so wherever it differs.

## Execution model

| Term | Meaning here |
|---|---|
| work-item | one thread of the kernel; has 32 private 32-bit registers (`r0` reads 0) |
| wavefront (WF) | 64 work-items sharing one program counter |
| work-group (WG) | 1 to 8 wavefronts (64..512 work-items) placed on one compute unit together |
| index space | up to 3 dimensions of `gsize[d]` work-items, cut into work-groups of `wgsize[d]` work-items per dimension |

A compute unit (CU) executes one instruction of one wavefront over 8 cycles. In cycle
`c`, PE `p` serves work-item `8*c + p`. A load or store of a wavefront becomes 64 memory
requests. The wavefront then sleeps until all of them are answered, and the CU runs
other wavefronts meanwhile. This is how memory latency is hidden. Up to 8 wavefronts
(4096 work-items on 8 CUs) are resident at once.

Branches are taken per wavefront, and work-item 0 decides. Kernels must branch
uniformly, as the FIR example below does.

## Instruction set (as built)

Only the instructions the FIR example needs are implemented. The 32-bit encoding is
this implementation's own:

    [31:26] opcode  [25:21] rd  [20:16] rs  [15:11] rt  /  [15:0] imm

| Instr | Operation |
|---|---|
| `LID rd, dN` | rd = coordinate of the work-item inside its work-group, dimension N (0, 1 or 2) |
| `WGOFF rd, dN` | rd = global coordinate of the work-group's first work-item, dimension N |
| `LP rd, n` | rd = kernel parameter n (from the Link RAM) |
| `ADD rd, rs, rt` | rd = rs + rt |
| `ADDI rd, rs, imm` | rd = rs + sign-extended imm |
| `MACC rd, rs, rt` | rd = rd + rs * rt (low 32 bits) |
| `LW rd, rs[rt]` | rd = mem[rs + 4*rt] |
| `SW rd, rs[rt]` | mem[rs + 4*rt] = rd |
| `BNE rd, rs, imm` | if rd != rs (work-item 0) jump to Code RAM word imm |
| `RET` | wavefront ends |

`fgpu_pkg::enc_r` and `enc_i` assemble instructions. `tb/tb_fgpu_top.sv` contains the
FIR kernel:

    LID r1,d0; WGOFF r2,d0; ADD r1,r1,r2          # global id
    LP r2,3; LP r3,0; LP r4,1; ADDI r5,r0,0; ADDI r6,r0,0
    8: LW r10,r4[r5]; ADD r11,r5,r1; LW r11,r3[r11]; MACC r6,r10,r11
       ADDI r5,r5,1; BNE r5,r2,8
    LP r20,2; SW r6,r20[r1]; RET

## Block structure

```
 AXI4-Lite ─ ctrl_axil ─┬─ cram (kernel code) ──────────────┐
                        ├─ lram (launch words, parameters) ─┤
                        └─ wg_dispatcher ── alloc ──► cu ×N_CU ─► gmc ─► AXI4 ×N_AXI
                                                    (wf_scheduler, rtm,     (request table,
                                                     8× pe + regfile,        cache, tag_manager ×N_TM)
                                                     cu_mem_ctrl)
```

| File | Role |
|---|---|
| `fgpu_top.sv` | top level; all parameters |
| `fgpu_pkg.sv` | shared constants, opcodes, instruction and request types |
| `ctrl_axil.sv` | AXI4-Lite slave: `0x0000` start/status, `0x1000` Link RAM, `0x2000` Code RAM |
| `cram.sv`, `lram.sv` | Code RAM (synchronous read, one port per CU) and Link RAM |
| `wg_dispatcher.sv` | hands work-groups to CUs, then flushes the cache and raises `done` |
| `cu.sv` | compute unit: issue, fetch, 8 execute cycles |
| `wf_scheduler.sv` | 8 wavefront slots, round-robin issue, wake-up after memory |
| `rtm.sv` | work-item built-in values (local coordinates, work-group offset) |
| `pe.sv`, `regfile.sv` | ALU of one PE; register file of one PE lane |
| `cu_mem_ctrl.sv` | 64-entry access buffer of a CU; at most `CU_OUTSTANDING` requests in flight |
| `gmc.sv` | global memory controller: request table, ageing priority, cache, AXI port sharing, flush |
| `tag_manager.sv` | cache-miss handler: write-back burst, then line-fill burst |

## Launching a kernel

1. Write the code into the Code RAM at `0x2000 + 4*i`.
2. Write the Link RAM at `0x1000 + 4*i`:
   - word 0: first Code RAM word of the kernel;
   - words 1, 2, 3: global size in dimensions 0, 1, 2;
   - words 4, 5, 6: work-group size in dimensions 0, 1, 2;
   - words 8 and up: parameters 0, 1, and so on.

   Set both sizes of an unused dimension to 1.
3. Write 1 to `0x0000`.
4. Wait for `done` to rise, or poll `0x0000`: bit 0 is busy and bit 1 is done.

In each dimension the global size must be a multiple of the work-group size. Each
work-group size must be a power of two, and their product must be 64, 128, 256 or 512.
Work-items are numbered inside a work-group with dimension 0 fastest, and 64 consecutive
numbers form a wavefront. Work-groups are handed out with dimension 0 fastest. When
`done` rises, every dirty cache line is back in global memory.

## The global memory controller

This is the most involved block.

- **Request table.** Requests from all CUs enter a table of `GMC_OUTSTANDING` (64)
  entries, at most one per cycle, taken round-robin over the CUs. Each waiting entry's
  age grows by one every cycle. Every cycle the oldest entry that may proceed is
  served, so a request that keeps losing gains priority. One entry is served per cycle.
- **Cache.** The cache is direct mapped and write-back. It holds `CACHE_BYTES` (8 KB) in
  lines of `LINE_WORDS` (16) words, which gives 128 sets. A hit answers the CU in the
  next cycle. A store marks its line dirty and returns an acknowledgement.
- **Misses.** A miss hands the set to its tag manager, number `set mod N_TM`. The
  request stays in the table and is served again once the line is present. The tag
  manager writes the old line back with one AXI4 burst if it is dirty. It then reads
  the new line with one burst of `LINE_WORDS` beats and updates the tag. While a tag
  manager is busy, requests to any of its sets wait. This keeps hits from touching a
  line that is being replaced.
- **AXI ports.** Tag manager `t` uses AXI port `t mod N_AXI`. A port stays with one tag
  manager for a whole miss. Up to `N_AXI` misses are on the bus at once.
- **Flush.** At the end of a kernel, `flush_start` walks all sets and writes back every
  dirty line.

Bursts are INCR with 32-bit beats. The AXI side channels (size, burst, id, strobes) are
not brought out: every access is a whole 32-bit word.

## Timing

- CU: the Code RAM read of the next instruction overlaps the 8 execute cycles of the
  current one. With two or more ready wavefronts, an instruction ends every 8 cycles.
  A lone wavefront needs 10 cycles per instruction, because its next PC is known only
  after its last execute cycle.
- A memory instruction that finds the CU's access buffer still busy waits in its first
  execute cycle.
- Cache hit: 2 cycles from entering the table to the response when nothing else is
  waiting.
- Single clock, asynchronous active-low reset `rst_n`.

## Where this implementation departs from the original architecture

- **No deep pipeline.** The original CU has an 18-stage pipeline. Its PEs and register
  files run at twice the core clock, using dual-port RAMs. Here the CU has two stages
  (fetch, execute) and one clock, and each register-file lane has three read ports and
  two write ports. The instruction semantics are the same. The rate of one instruction
  per 8 cycles is reached only when two or more wavefronts are ready.
- **Power-of-two work-groups.** Work-group sizes must be powers of two in each
  dimension. Then the local coordinates are bit fields of the work-item's number.
- **Reduced instruction set.** Only the instructions listed above exist.
- **No read banks.** The cache's read banks (2, 4 or 8 in the original) are not modelled.
  The controller serves one request per cycle.
- **Own choices.** The instruction encoding, Link RAM layout, control address map,
  line size, Code RAM depth (1024) and Link RAM depth (32) are all this
  implementation's. So are the end-of-kernel flush, the mapping of sets to tag
  managers, and the mapping of tag managers to ports.
- **Parameter defaults.** The defaults are the largest values of the original parameter
  ranges:
  - 8 CUs;
  - 32 outstanding requests per CU;
  - 64 in the controller;
  - 8 KB cache;
  - 4 AXI ports;
  - 16 tag managers.

  The ranges allowed are 2/4/8 CUs, 16/24/32 requests per CU, 32/64 in the controller,
  1–8 KB of cache, 1/2/4 AXI ports and 2/4/8/16 tag managers.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Every testbench prints
`TB_RESULT checks=N failures=M`. `tb/axi_mem_model.sv` is a behavioural AXI4 memory
that stands in for external DRAM.

- **`tb/tb_fgpu_top.sv`** runs the design at its default size. It runs memcpy, vecadd,
  vecmul, FIR with 5 taps and FIR with 20 taps (512 to 1024 work-items). It also runs a
  store-then-load kernel that evicts the dirty lines it has just written. On a 2-D index
  space it runs a 32x32 transpose and a 16x16 matrix multiplication. It checks every
  result word. It also checks that each mechanism occurred at least once:
  - cache hit and miss;
  - dirty eviction and flush write-back;
  - AXI port contention;
  - a tag manager blocking a request;
  - age-based selection;
  - execute stall;
  - a wavefront woken after memory;
  - a branch taken;
  - several wavefronts in one CU;
  - the per-CU outstanding limit reached.
- **`tb/tb_fgpu_workloads.sv`** runs the smallest configuration (2 CUs, 1 KB cache,
  1 AXI port). It runs memcpy and vecadd at 64, 512 and 4096 work-items, vecmul, FIR,
  cross correlation, a 64x64 transpose and a 32x32 matrix multiplication.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fgpu_pkg.sv tb/tb_fgpu_top.sv --top-module tb_fgpu_top
    ./obj_dir/Vtb_fgpu_top

Replace `tb_fgpu_top` by any other testbench name to run it. The full-size run takes
well under a second.
