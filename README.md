# Five-stage pipelined RV32 processor (nine-instruction subset)

A single-cycle processor has to do a whole instruction in one clock period:
fetch, register read, ALU, data memory and register write all lie on one
combinational path. This design breaks that path into five stages, with
registers between them. A new instruction can then start every cycle, and the
clock period only has to cover the slowest stage. The price is *hazards*. An
instruction may need a register value that an older instruction has not yet
written back. It may also be fetched before an older branch has decided
whether it should run at all. Most of the logic beyond the plain datapath
exists to detect and resolve these hazards.

The main design is the five-stage pipelined processor. It runs nine RV32I
instructions with their standard encodings: `add`, `sub`, `and`, `or`, `slt`,
`addi`, `lw`, `sw`, `beq`. Its instruction memory and data memory sit outside
it (Harvard organisation).

Two simpler processors for the same instruction set are included for
comparison, built from the same ALU, decoder, register file and memories:

- the **single-cycle processor** the pipeline starts from;
- a **prefetching processor** that only overlaps instruction fetch with
  execution.

The top, `cpu_top`, places all three side by side. Each has its own memories
and ports; they share only the clock and reset. The same program can
therefore be run on all three and the results compared.

## Stages

| stage | work |
|-------|------|
| IF  | PC drives the instruction memory address; PC + 4 is computed in parallel |
| ID  | decode, immediate build, register file read of `rs1`/`rs2`; **`beq` is decided here** |
| EX  | ALU on (possibly forwarded) register values or the immediate |
| MEM | data memory read (`lw`) or write (`sw`) at the ALU result address |
| WB  | the ALU result or the loaded word is written to `rd` |

The interstage registers are IF/ID, ID/EX, EX/MEM and MEM/WB. Each is a
`pipe_reg` with two controls. A low *enable* holds the register (a stall). A
high *clear* loads a bubble, whose write enables are all inactive (a flush).
Every instruction carries a `valid` bit down the pipe, and `retire` pulses as
a valid instruction leaves WB.

Without hazards, an instruction fetched in cycle *k* writes its result at the
end of cycle *k + 4*. A run of *N* hazard-free instructions therefore takes
*N + 4* cycles, which is one instruction per cycle once the pipe is full.

## Hazard resolution (`hazard_unit`)

This is the part that takes most care to follow. Every case below is checked
cycle-exactly in `tb_riscv_pipeline`.

**Register file, WB to ID.** An instruction in ID may read a register that the
instruction in WB writes in the same cycle. The classic answer is to write in
the first half of the cycle and read in the second. Here the register file has
a single rising-edge clock and a write-through bypass instead: a read of the
register being written returns the write data. No hazard remains at a
distance of three instructions.

**Forwarding into EX.** Two comparisons are made for each EX source register
(`rs1`, `rs2`):

- It equals `rd` of a register-writing instruction in MEM. The ALU operand
  then comes from the EX/MEM ALU result.
- Otherwise, it equals `rd` of a register-writing instruction in WB. The
  operand then comes from the WB result.

`x0` is never forwarded. MEM wins over WB because it holds the younger value.
The store data of `sw` goes through the same forwarding path.

**Load-use stall.** A `lw` result exists only at the end of MEM. An
instruction directly behind the load that reads its `rd` must therefore wait.
For one cycle the PC and IF/ID are held and ID/EX is cleared to a bubble. The
cost is exactly one cycle. After it, the load result reaches EX through WB
forwarding. Only source fields that the instruction really uses are compared
(`use_rs1`/`use_rs2` from the decoder). An immediate field that happens to
look like a register number therefore never causes a stall.

**Early branch.** `beq` is decided in ID. An XOR/NOR equality comparator and a
dedicated adder (PC + B-immediate) do this, so no subtractor is needed. A taken
branch redirects the PC at the next edge. It also clears IF/ID, discarding the
one instruction fetched behind the branch. A taken `beq` costs one cycle; a
not-taken one costs nothing.

**Branch operand hazards.** Deciding the branch in ID moves the operand
hazards earlier:

| producer of a `beq` operand | action | cost |
|---|---|---|
| ALU instruction in EX | hold `beq` in ID (branch stall) | 1 cycle |
| ALU instruction in MEM | forward EX/MEM ALU result into the comparator | 0 |
| `lw` in EX | stall (load-use and branch stall together), then... | 1 cycle |
| `lw` in MEM | ...stall again until it reaches WB | 1 cycle |
| any instruction in WB | register file write-through | 0 |

The taken/not-taken decision is made only when `beq` is not stalled, because
a stalled comparison may be working on stale operands.

## The two comparison processors

**Single cycle (`single_cycle_cpu`).** The PC addresses instruction memory.
Within the same clock period the register file is read, the ALU computes, data
memory is read or written, and the result and the next PC are stored at the
rising edge. For `beq`, the ALU subtracts the two registers. A zero result
selects PC + B-immediate; otherwise the next PC is PC + 4. N instructions take
N cycles, but the clock period has to cover instruction memory, register read,
ALU, data memory, the result multiplexer and the register setup in series.

**Prefetch (`prefetch_cpu`).** An instruction register (IR) is inserted after
the instruction memory. In each cycle the processor does two things at once:

- It executes the instruction held in the IR, with the single-cycle datapath.
- It fetches the next instruction into the IR.

This takes the fetch out of the critical path. The IR also stores the PC of
its instruction, so a branch target is still PC + B-immediate of the branch
itself. When a `beq` is taken, the sequential instruction fetched behind it
has to be dropped. The IR is loaded with a bubble, costing one cycle. N
instructions take N + 1 cycles, plus one for each taken branch.

Both use the register file with `WRITE_THROUGH = 0`. Here the write data
depends on the read data in the same cycle, so the bypass would close a
combinational loop.

## Files

| file | content |
|------|---------|
| `rtl/pipe_pkg.sv` | opcodes, ALU operation, immediate-format and forwarding enums, control word and stage-register structs |
| `rtl/cpu_top.sv` | **top**: the three processors side by side |
| `rtl/pipelined_cpu_system.sv` | pipelined core plus instruction and data memory |
| `rtl/single_cycle_cpu.sv` | single-cycle processor |
| `rtl/prefetch_cpu.sv` | processor with instruction prefetch |
| `rtl/riscv_pipeline.sv` | the five-stage core |
| `rtl/hazard_unit.sv` | forwarding selects, stalls, flush |
| `rtl/control_unit.sv` | instruction decoder |
| `rtl/regfile.sv` | 32 x 32 register file, 2 read / 1 write, optional write-through |
| `rtl/alu.sv` | add, sub, and, or, signed slt |
| `rtl/imm_decode.sv` | I, S and B immediates |
| `rtl/eq_comparator.sv` | XOR/NOR equality comparator for `beq` |
| `rtl/pipe_reg.sv` | interstage register with hold and clear, type-parameterised |
| `rtl/instr_mem.sv` | instruction memory, combinational read, program-load port |
| `rtl/data_mem.sv` | data memory, combinational read, clocked write |
| `tb/rv_asm_pkg.sv` | instruction encoders and an instruction-level reference model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Interfaces and timing

`cpu_top` and `pipelined_cpu_system` parameters:

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 256 | instruction memory size in 32-bit words |
| `DMEM_WORDS` | 256 | data memory size in 32-bit words |
| `RESET_PC` | 0 | first fetch address |

Ports of `pipelined_cpu_system`. `cpu_top` repeats them per processor with the
prefixes `pl_`, `sc_` and `pf_`.

- `clk` is the clock; all state changes on the rising edge.
- `rst` is a synchronous, active-high reset. It clears the PC, the register
  file and the pipeline registers.
- `prog_we`, `prog_addr` and `prog_data` load one instruction word per clock
  edge; `prog_addr` is a byte address. Load the program while `rst` is high.
- `pc` and `instr` show the fetch address and the fetched word.
- `dmem_we`, `dmem_addr`, `dmem_wdata` and `dmem_rdata` show the data memory
  bus during MEM.
- `retire` pulses once for each instruction that completes.

Both memories read combinationally within the cycle and write at the rising
edge. The data memory is word-addressed: bits [1:0] are ignored and addresses
wrap modulo its size. An instruction fetch beyond the instruction memory
returns `addi x0,x0,0`. Any encoding outside the nine instructions becomes a
bubble that writes nothing.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/pipe_pkg.sv tb/rv_asm_pkg.sv tb/tb_pipelined_cpu_system.sv \
    --top-module tb_pipelined_cpu_system -Mdir obj && obj/Vtb_pipelined_cpu_system
```

Use the same command for any other `tb_<module>`.

`tb_cpu_top` runs the whole design at its default sizes. It loads the same
programs into all three processors. It checks each processor's registers and
data memory against the reference model, and each one's completion cycle:

- N for the single-cycle processor;
- N + 1 + taken branches for the prefetching one;
- N + 4 + stall and flush cycles for the pipeline.

The pipeline's count is also cross-checked with the stall and flush cycles
actually observed. That run takes about ten seconds.

`tb_pipelined_cpu_system` runs the pipelined processor alone at its default
sizes:

- The ALU-hazard sequence `add s0,s2,s3; and t0,s0,s1; or t1,s4,s0;
  sub t2,s0,s5`. It must take 13 cycles, with no stall.
- The load-hazard sequence `lw s0,40(zero); and t0,s0,s1; ...`, with one
  stall.
- A `beq` at 0x20 taken to 0x60, with one flush.
- 200 random programs of up to 220 instructions. They use eight registers, so
  hazards are frequent. They contain forward branches and loads and stores
  across the whole data memory.

After each program, the registers and the whole data memory are compared with
the reference model in `rv_asm_pkg`. The test also counts MEM forwards, WB
forwards, register-file write-throughs, comparator forwards, load-use stalls,
branch stalls and flushes. It fails if any of them never happened. The run
takes well under a second.

The core also contains immediate assertions, enabled with `--assert`. They
check that a stalled branch never redirects the PC, and that no used operand
is ever forwarded from a load still in MEM.

## Choices and limits

- **Branch position.** A simpler arrangement decides `beq` in EX/MEM. It
  costs three fetched-and-discarded instructions per taken branch and needs
  no extra comparator. This design uses the early ID-stage decision with a
  one-instruction flush. Neither branch prediction nor a branch delay slot is
  built.
- **Hazards without forwarding.** A simpler pipeline resolves every
  read-after-write hazard by stalling until the producer has written the
  register file. That costs up to two bubbles per dependent instruction. It
  is not built; this pipeline forwards and stalls only for loads and branch
  operands.
- **Instruction set.** Only the nine instructions above are built. `lui`,
  `jal` and the other RV32I instructions decode as bubbles. Loading a 32-bit
  constant therefore needs `addi` chains or a load from data memory.
- **Memories.** Both memories are ideal: combinational read, no wait states
  and no caches. A memory that needs several cycles would need a stall input,
  which is not provided.
- **Sizes and encodings.** Memory sizes, reset behaviour, the program-load
  port and the internal encodings (ALU operation, forwarding select) are this
  design's own.
- **Timing numbers.** The speed-up argument behind the design uses stage
  delays: memory 300 ns, register read 150 ns, ALU 200 ns, and so on. It
  gives a 1020 ns single-cycle period, 690 ns with prefetch and 300 ns
  pipelined. Those
  are technology figures; the RTL carries no delays. What the RTL does show
  is the cycle-level side: one instruction per cycle on hazard-free code, and
  the exact stall and flush penalties above.
- **Clocking.** The stall holds registers with a load enable, not by gating
  the clock. The whole design uses one clock.
