# Heterogeneous video-processing platform with AlmaIF accelerators

This is the programmable-logic side of a heterogeneous FPGA SoC. A host processor offloads image filters, written as OpenCL kernels, to several accelerators of different kinds. Every accelerator looks the same to the host. It is an AXI slave with one address layout: a control window and three memories. The runtime can therefore load a binary, start it and collect its results without device-specific driver code. That shared view is the **AlmaIF** accelerator interface, and it is the centre of this design.

The RTL contains:

- the AlmaIF slave logic and control registers;
- a complete accelerator built around one or more small **transport-triggered (TTA)** processors;
- an AXI-Lite interconnect;
- a top level with two TTA accelerators, plus an AXI window for a third accelerator (a VLIW core) that is not part of this RTL.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) on one clock.

```
 host (GP AXI master)
        |
   almarvi_top.s_axi ── axi_lite_xbar ──┬── 0x43C0_0000  almaif_tta_accel  (TTA 0, device id 1)
                                        ├── 0x43C4_0000  almaif_tta_accel  (TTA 1, device id 2)
                                        ├── 0x43C8_0000  rvex_axi_req/resp ports (external accelerator)
                                        └── anything else: DECERR
```

## The AlmaIF address layout

Each accelerator decodes its own AXI address as `{section[1:0], offset}`. The offset is wide enough to hold a byte address into the largest section:

```
addr_width = 2 + max(imem_aw, dmem_aw, pmem_aw, ctrl_aw)      (almaif_pkg::almaif_addr_width)
```

| section | code | contents |
|---|---|---|
| CTRL | `00` | control interface: one 256-byte window per core (`CTRL_AW = 8`) |
| IMEM | `01` | program, 64-bit instructions |
| DMEM | `10` | kernel data: inputs, outputs, buffers |
| PMEM | `11` | parameters / command queue of the kernel |

Default sizes:

- IMEM 64 KB (8192 instructions), DMEM 32 KB, PMEM 2 KB, so the address is 2 + 16 = 18 bits;
- each accelerator therefore occupies a 256 KB window.

With IMEM at 32 KB the layout becomes the smaller 17-bit reference map: CTRL 0x00000, IMEM 0x08000, DMEM 0x10000, PMEM 0x18000.

Offsets past the end of a smaller section wrap inside it. Software must treat those addresses as undefined.

The host writes IMEM 32 bits at a time. Offset bit 2 selects the half of the 64-bit instruction: the low word sits at the lower address (little-endian).

Because CTRL is the first section and reports every memory size, a driver needs only the base address to discover the rest.

## The control interface (CTRL)

`almaif_ctrl` holds the registers below. The offsets are constants in `almaif_pkg`.

| offset | register | access | meaning |
|---|---|---|---|
| 0x00 | DEV_CLASS | R | 1 = TTA, 2 = VLIW (ρ-VEX) |
| 0x04 | DEVICE_ID | R | identifies the configuration |
| 0x08 | VERSION | R | interface version, 1 |
| 0x0C | CORE_COUNT | R | cores in the accelerator (N_CORES) |
| 0x10/0x14/0x18 | IMEM/DMEM/PMEM_SIZE | R | section sizes in bytes |
| 0x1C | DEBUG_FEAT | R | bit 0 single step, bit 1 breakpoints, [11:8] breakpoint count |
| 0x40 | STATUS | R | bit 0 running, 1 break, 2 reset, 3 halted, 4 breakpoint hit |
| 0x44 | PC | R | instruction address that executes next |
| 0x48 | CYCLE_CNT | R | cycles in which the core was enabled |
| 0x4C | INSTR_CNT | R | instructions executed |
| 0x50 | BREAK_CNT | R | times the core entered break |
| 0x54 | DBG_DATA | R | core state chosen by DBG_SEL |
| 0x80 | CMD | W | write 1 to a bit: 0 RESET, 1 CONTINUE, 2 BREAK, 3 STEP |
| 0x84 | START_ADDR | RW | instruction address used after reset |
| 0x88 | BP_ENABLE | RW | one enable bit per breakpoint |
| 0x8C | DBG_SEL | RW | 0..31 general register, 32 RA, 33 guard bits {B1, B0} |
| 0xC0 + 4i | BP_ADDR[i] | RW | breakpoint instruction address (2 breakpoints) |

### Core states

The core has four states: reset, run, break and step.

- After power-on it is held in **reset**.
- `CONTINUE` releases it. The first fetch is from START_ADDR.
- `BREAK` stops it. So does a HALT operation in the program, which also sets STATUS.halted; this is how a kernel reports that it is done.
- A **breakpoint** stops the core *before* the instruction at its address executes. The next `CONTINUE` or `STEP` executes that instruction without stopping again.
- `STEP` executes exactly one instruction and returns to break.
- `RESET` goes back to reset from any state.

A stopped core can be examined: write DBG_SEL, then read DBG_DATA. The core has a fourth register-file read port for this. The value is combinational from the core, so it is only stable while the core is stopped.

The control block stops the core through a **global enable (`en`)**, not by gating the clock. The same mechanism parks an idle accelerator in break, which is the hook for clock gating in a real implementation. `en` is combinational from registered state, so a breakpoint takes effect in the same cycle the core's PC reaches it.

## The TTA accelerator core

This is the part that takes the most getting used to.

A **transport-triggered architecture** turns the usual processor inside out. An instruction does not name operations. It names *data transports* ("moves"), one per transport bus. Each move copies a value from a source to a destination:

- sources: a register, a function unit's result port, or an immediate;
- destinations: a register, a function unit's operand port, or its **trigger port**.

Writing a trigger port starts the operation, and the opcode travels with the move. For example:

```
RF.3 -> ALU0.O          ; operand
RF.4 -> ALU0.T.ADD      ; trigger: starts RF.4 + RF.3
...                     ; one cycle later
ALU0.R -> RF.5          ; result, readable 2 cycles after the trigger
```

Bypassing, register-file port pressure and scheduling are therefore all in the hands of the compiler.

The hardware is small:

- no decoder of operations;
- no interlocks;
- no forwarding network beyond the buses themselves.

### Units

`tta_core` contains the following units. All sources and destinations are connected to all three buses.

| unit | ports | latency | notes |
|---|---|---|---|
| ALU0, ALU1 (`tta_alu`) | O, T, R | 2 | add, sub, and, or, xor, shl, shr, shru, eq, gt, gtu, sxqw, sxhw, min, max, minu, maxu |
| MUL (`tta_mul`) | O, T, R | 3 | 32×32, low 32 bits |
| LSU (`tta_lsu`) | O (store data), T (address), R | 3 | ldw, ldh, ldhu, ldq, ldqu, stw, sth, stq; little-endian |
| RF (`tta_rf`) | 3 read (+1 debug), 3 write | 0 / 1 | 32 × 32 bit, reset to 0 |
| BOOL (`tta_rf`) | 3 read, 3 write | 0 / 1 | 2 × 1 bit guard registers |
| IMM | R | – | long immediate from the instruction |
| GCU | T, RA | – | jump, call, halt; return address RA |

Pipeline behaviour:

- A result stays on R until the next result of that unit replaces it.
- Units are fully pipelined: a new trigger can be issued every cycle.
- A trigger in the same cycle as a write to O uses the new O value.
- The program must wait for the latency before reading R. Reading earlier returns the previous result.

### Instruction format (64 bits)

```
 63   62..42     41..21     20..0
[T ][ move 2 ][ move 1 ][ move 0 ]        T = 0: three moves, one per bus
[1 ][ 10'b0 ][ imm[31:0] ][ move 0 ]      T = 1: one move + 32-bit immediate into IMM.R (readable from the next instruction)

move (21 bits) = { guard[1:0], src[8:0], dst[9:0] }
  guard: 00 always, 01 if B0, 10 if !B0, 11 if B1
  src:   1_iiiiiiii         8-bit signed short immediate
         0_uuu_xxxxx        unit (RF, ALU0, ALU1, MUL, LSU, RA, IMM, BOOL), register index
  dst:   uuuu_0_xxxxx       RF / BOOL register xxxxx, or operand port of a unit
         uuuu_1_ooooo       trigger port of a unit with opcode ooooo
         unit: NONE, RF, BOOL, ALU0, ALU1, MUL, LSU, GCU
```

The exact values are the enums in `tta_pkg`. The same package has encoding functions (`move`, `src_reg`, `dst_trig`, `instr3`, `instr_limm`, …) for program generators.

### Timing of one instruction

In an enabled cycle, all moves of the current instruction read their sources. At the clock edge they all write their destinations. So a move that reads RF.5 sees the value from *before* a move in the same instruction writes RF.5. If several buses write the same register, the highest-numbered bus wins.

A guard is evaluated on the boolean registers as they were at the start of the cycle. This is how branches are made conditional, for example `?B0 #target -> GCU.T.JUMP`. Compare results reach BOOL through a move (`ALU0.R -> BOOL.0`).

### Control flow

- Instruction memory is synchronous, so every JUMP, CALL and HALT has **one delay slot**: the instruction after it always executes.
- CALL saves the address after the delay slot in RA, and `RA -> GCU.T.JUMP` returns.
- HALT pulses `halt` to the control interface, which sets halted and breaks the core.
- After reset the core fetches from START_ADDR. `ir_valid` is low until that first instruction arrives.

### Memories seen by the core

The LSU uses the same section codes as the host for the shared memories:

| core byte address | memory |
|---|---|
| 0x00000 | private 4 KB scratchpad (not visible to the host) |
| 0x10000 | DMEM (shared with the host) |
| 0x18000 | PMEM (shared with the host) |

IMEM, DMEM and PMEM (`almaif_mpram`) have one port for the host and one port per core. The host can therefore fill the next job's data while the core runs.

The scratchpad (`almaif_dpram`) is private to its core.

Every port has the same behaviour:

- reads are synchronous, with one cycle of latency, and the read data holds while the port is idle;
- writes take byte enables;
- a read returns the word from before that cycle's writes;
- if two ports write the same byte in the same cycle, the higher-numbered port wins.

## Multicore accelerators

`almaif_tta_accel #(.N_CORES(n))` places *n* TTA cores behind one AlmaIF slave. The platform top uses single-core accelerators (`N_CORES = 1`).

What the cores share and what they own:

- **Shared:** IMEM, DMEM and PMEM. Each core has its own port on each of them, so cores never wait for one another.
- **Per core:** a scratchpad, and a complete control interface.
- **Control windows:** core *i*'s window sits at CTRL offset *i* × 0x100. The CTRL part of the address grows by log2(*n*) bits. With the default memories this still fits in the 16-bit offset.

The cores are independent processors. Each is started, stopped, stepped and reset through its own window, usually from its own START_ADDR, and each has its own status and counters. CORE_COUNT reads *n* in every window.

Splitting work between cores is up to software. A typical split:

- place one program copy per core in IMEM, each with its own parameter block in PMEM;
- have the cores work on disjoint parts of DMEM.

The accelerator outputs summarise all cores:

- `running` is high while any core executes;
- `halted` is high once all cores have halted.

## The AXI side

`almaif_axi_slave` accepts one AXI4-Lite transaction at a time and takes writes first. It turns each transaction into a one-cycle section request: a one-hot `sec_req`, plus offset, byte enables and data. Read data is taken one cycle later. A write takes about 3 cycles and a read about 4. Responses are always OKAY.

`axi_lite_xbar` routes the single master to N windows by base address. Unmapped addresses get a DECERR response, from the interconnect itself. `almarvi_top` places the accelerators at 0x43C0_0000 + i × 0x4_0000. The external VLIW accelerator occupies the last window through the `rvex_axi_req` and `rvex_axi_resp` ports.

## Running a kernel (host sequence)

1. Write the program to IMEM (two 32-bit writes per instruction), the data to DMEM and the parameters to PMEM.
2. Write START_ADDR, then CMD = CONTINUE.
3. Poll STATUS until bit 3 (halted) is set.
4. Read the results from DMEM, and the cycle and instruction counters from CTRL.
5. Write CMD = RESET before the next job.

The testbench task `tb_axi_master::run_kernel` does exactly this.

### Resident kernel with a command queue in PMEM

PMEM can also carry a command queue, so that the kernel is started once and then waits for work. The hardware needs nothing extra for this: host and core reach PMEM and DMEM through separate ports, so the host can write a new job or read old results while the core runs. The test kernel (`build_server` in the assembler package) uses this layout:

| PMEM offset | written by | content |
|---|---|---|
| 0x00..0x0C | host | W, H, input address, output address |
| 0x10 | host, then kernel | command: 0 empty, 1 blur, 2 Sobel; the kernel clears it when the job is done |
| 0x14 | kernel | number of finished jobs |

The kernel polls the command word and runs the job. It then updates the count and clears the command word. The host writes the parameters before the command word, and polls the word until it reads 0. This queue holds one job at a time.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a watchdog. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/almaif_pkg.sv rtl/tta_pkg.sv tb/tb_tta_asm_pkg.sv tb/tb_almarvi_top.sv \
  -y rtl -y tb +libext+.sv --top-module tb_almarvi_top
./obj_dir/Vtb_almarvi_top
```

Replace the last file and the top to run another bench:

| testbench | what it checks |
|---|---|
| `tb_tta_alu` | every ALU operation against a reference model, 2-cycle latency, back-to-back triggers |
| `tb_tta_mul` | random products, 3-cycle latency, pipelining |
| `tb_tta_rf` | register file against a model, write-port priority |
| `tb_tta_lsu` | all load and store widths, sign extension, byte lanes, section routing |
| `tb_almaif_dpram` | both ports, byte enables, read-during-write |
| `tb_almaif_mpram` | four ports at once, read-during-write, write-collision priority |
| `tb_tta_core` | a program using every unit, guards, call/return, delay slots, halt |
| `tb_almaif_ctrl` | identification, state machine, breakpoints, step, counters |
| `tb_almaif_axi_slave` | section decoding, byte enables, back-pressure, latency |
| `tb_axi_lite_xbar` | routing to three random-delay slaves, DECERR |
| `tb_almaif_tta_accel` | one accelerator at full size: loads and runs a 3×3 box-blur kernel, checks the image |
| `tb_almaif_tta_multicore` | two-core accelerator: separate control windows, both cores blur half an image each from one shared DMEM |
| `tb_almaif_cmdqueue` | resident kernel fed through the PMEM command queue: three jobs without halting, result read-back while the next job runs |
| `tb_almarvi_top` | whole platform at default parameters (see below) |
| `tb_almarvi_workload` | both filters at the full frame width of 1280 pixels, on the largest strip that fits DMEM |

### Whole-platform test

`tb_almarvi_top` runs the application the platform was built for:

- A Sobel edge filter runs on TTA 0.
- A 3×3 box blur runs on TTA 1, on 24×12 images.
- The two accelerators work concurrently on different frames, with the host pipelining them.

The test also exercises and counts:

- identification of both devices;
- breakpoint hit, single step and reset;
- a transaction to the external accelerator window;
- a DECERR on an unmapped address.

If any of these never happens, that counts as a failure. Kernels are generated by a small assembler class (`tb_tta_asm_pkg`), and the results are compared against SystemVerilog reference models of the two filters.

The blur divides by 9 as `(sum × 7282) >> 16`, which is exact for every sum of nine 8-bit pixels.

### Full-width strips

A 1280×1024 frame of 8-bit pixels does not fit in 32 KB of DMEM, so the host streams the frame in horizontal strips. The largest strip the default memories hold at full width:

- 13 input rows at DMEM offset 0, which is 16,640 bytes;
- 11 output rows, written from row 13 onward.

The kernel writes output row *y* at `output base + y × 1280`, so the output base is row 12. The strip then ends at byte 24 × 1280 = 30,720. Don't clear the output area from its base: row 0 of the output area is input row 12.

`tb_almarvi_workload` runs this case on the top at its default parameters:

1. a Sobel pass on a 1280×13 strip on TTA 0;
2. a blur pass on TTA 1, over the 11 rows that result.

It checks every pixel of both passes.

### Performance

The test kernels are not scheduled for parallelism. They use mostly one move per instruction. The cycle counters show one instruction per enabled cycle, with no stalls.

| kernel | measured on a 1280-wide strip | per output pixel | full 1280×1024 frame at 200 MHz |
|---|---|---|---|
| Sobel | 2,404,066 cycles, 13 rows | 171 cycles | about 1.12 s |
| blur | 1,598,906 cycles, 11 rows | 139 cycles | about 0.91 s |

A compiler that fills all three buses would bring these down. The original platform reports 0.97 s (Sobel) and 0.46 s (blur) for its TTA accelerators.

## Where this design departs from, or goes beyond, its source

- **TTA configuration.** The units follow the prototype processor: two 2-cycle ALUs, a 3-cycle 32×32 multiplier, a 32×32 register file and a 2×1 boolean file. The following are this design's own choices:
  - the number of buses (3) and full bus connectivity;
  - the instruction encoding;
  - the operation set;
  - the LSU latency;
  - the single delay slot.

  The floating-point and vector units shown for the prototype processor are not built.
- **Control registers.** The register groups and commands follow the AlmaIF description: identification, capabilities, status, PC, performance counters, examination of internal state, reset, run, break, step, start address and breakpoints. The offsets, bit positions, counter set and breakpoint count are this design's own. Kernel completion through HALT is this design's convention.
- **CTRL window.** It is 256 bytes, from the 8-bit debug address width in the address-width formula. The reference memory map reserves 1 KB for CTRL; with 15-bit offsets both fit.
- **Multicore memories.** In a multicore accelerator every core gets its own memory port. This is this design's choice; the alternative would be arbitration with stalls.
- **Single clock.** The accelerators and the interconnect share one clock. The original platform runs the TTAs at 200 MHz, the VLIW core at 66 MHz, and crosses clock domains to the host.
- **AXI4-Lite**, one outstanding transaction, no bursts.
- **Not included:**
  - the host processor system;
  - the ρ-VEX VLIW accelerator and its AlmaIF bridge (its AXI window is brought out as ports);
  - the camera receiver, video DMA and HDMI output;
  - the JTAG access wrapper;
  - AXI-connected caches for the TTA.

## Files

| file | contents |
|---|---|
| `rtl/almaif_pkg.sv` | AXI-Lite structs, section codes, address-width function, CTRL register map |
| `rtl/tta_pkg.sv` | TTA instruction format, unit and opcode enums, latencies, encoders |
| `rtl/almarvi_top.sv` | platform top: interconnect, two TTA accelerators, external window |
| `rtl/axi_lite_xbar.sv` | 1-to-N AXI-Lite interconnect with DECERR |
| `rtl/almaif_tta_accel.sv` | one AlmaIF accelerator: slave, CTRL per core, shared IMEM/DMEM/PMEM, cores with scratchpads |
| `rtl/almaif_axi_slave.sv` | AXI-Lite to section-request bridge |
| `rtl/almaif_ctrl.sv` | control interface |
| `rtl/almaif_mpram.sv` | multi-port RAM (host + one port per core) for the shared memories |
| `rtl/almaif_dpram.sv` | dual-port RAM with byte enables (scratchpad) |
| `rtl/tta_core.sv` | TTA core: fetch, GCU, buses, immediate unit |
| `rtl/tta_alu.sv`, `tta_mul.sv`, `tta_lsu.sv`, `tta_rf.sv` | function units and register files |
| `tb/tb_axi_master.sv` | AXI-Lite master model with kernel-loading tasks |
| `tb/tb_axi_slave_mem.sv` | AXI-Lite slave model with random delays |
| `tb/tb_tta_asm_pkg.sv` | assembler class, the two filter kernels, the resident command-queue kernel and the reference models |
