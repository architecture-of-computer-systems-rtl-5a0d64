# A five-stage pipelined load-store processor with interlocks and bypassing

This is a classic in-order, five-stage pipeline (fetch, decode & register
fetch, execute, memory, write-back) for a small RISC-style instruction set:
register-register ALU operations, ALU-immediate, `LW`, `SW`, `BEQ`, `J`,
`JAL` and `JALR`. A new instruction enters the pipeline every cycle, so the
machine runs at one cycle per instruction except where instructions depend
on each other. The interesting part of the design is how those dependences
are handled:

* **Data hazards** are resolved by a bypass network in decode that takes an
  operand from whichever later stage holds the newest value. Only a load
  whose value the very next instruction needs still costs a cycle: decode
  stalls once (one bubble). A parameter switches the bypasses off and turns
  the pipeline into a pure interlock machine, which stalls until the producer
  has written the register file.
* **Control hazards** are handled by always fetching `PC + 4` and killing
  what was fetched wrongly. Jumps are resolved in decode and kill one
  instruction. Taken branches are resolved in execute and kill two.
* **Structural hazards** do not arise. Instruction and data memories are
  separate, and every stage has its own hardware.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) and passes lint in
Verilator and elaboration in Yosys' slang front end.

## Pipeline structure

```
        fetch          decode & reg fetch           execute        memory        write-back
  +----+       +-----+                         +---+          +---+          +---+
  | PC |--IMEM-| IR_D|--decode, GPR read,      | A |--ALU---->| Y |--DMEM--->| R |--> GPR write
  +----+       +-----+  Imm Select,            | B |   |      |MD2|  (addr=Y,+---+
    ^   bubble mux ^    bypass muxes,          |MD1|   eq     +---+   wdata=MD2)
    |   (kill)          jump adders            +---+   |
    |                       |     bubble mux ^         +--> branch taken?
    +---- PCSel: pc+4 / br (from execute) / jabs, rind (from decode)
```

Each stage register carries the instruction (IR), its PC and its decoded
control word. The instruction is decoded once, in decode, and the decoded
control travels with it, which is the same as decoding each stage's IR
again. The register file is read in decode and written at the end of
write-back. A read in the same cycle as a write returns the old value. The
pipeline does not rely on write-through: it either bypasses the write-back
value or stalls until the write has happened.

| stage | registers loaded at its end | work |
|---|---|---|
| F | IR_D, PC_D | read instruction memory at PC; choose the next PC |
| D | A, B, MD1, branch target | decode; read rs1/rs2; pick bypass sources; immediate; jump targets |
| E | Y, MD2 | ALU; `BEQ` condition (A == B) |
| M | R | load or store at address Y; a load's word replaces Y |
| W | register file | write R to register ws |

## Instruction set and encoding

Field layout (bit positions follow RV32I):

| format | 31..25 | 24..20 | 19..15 | 14..12 | 11..7 | 6..0 |
|---|---|---|---|---|---|---|
| register (ALU) | func7 | rs2 | rs1 | func3 | rd | opcode |
| immediate (ALUi, LW, JALR) | imm[11:5] | imm[4:0] | rs1 | func3 | rd | opcode |
| store/branch (SW, BEQ) | imm[6:0] | rs2 | rs1 | func3 | imm[11:7] | opcode |
| jump (J, JAL) | offset[24:0] spans 31..7 | | | | | opcode |

| instr | opcode | effect |
|---|---|---|
| ALU | `0110011` | rd <- rs1 op rs2, op from {func7, func3} (add, sub, sll, slt, sltu, xor, srl, sra, or, and) |
| ALUi | `0010011` | rd <- rs1 op sext(imm12), op from func3 (`sra` when bit 30 is set) |
| LW | `0000011` | rd <- M[rs1 + sext(imm12)] |
| SW | `0100011` | M[rs1 + sext(imm12)] <- rs2 |
| BEQ | `1100011` | if rs1 == rs2 then PC <- PC + sext(imm12) |
| J | `1101011` | PC <- PC + sext(offset25) |
| JAL | `1101111` | x1 <- PC + 4; PC <- PC + sext(offset25) |
| JALR | `1100111` | rd <- PC + 4; PC <- rs1 + sext(imm12) |

All immediates and offsets are byte offsets. Memory is accessed only as
aligned 32-bit words, and the low two address bits are ignored. Register x0
always reads zero, and a write to it is not a write. An unknown opcode
executes as a no-operation. The pipeline fills bubbles with `ALUi x0, x0, 0`
(`0x00000013`).

The split of the store/branch immediate into `imm[11:7]` and `imm[6:0]`, the
25-bit jump offset and the per-instruction control come from the design.
The opcode values and exact bit positions are choices of this
implementation. The RV32I ones are reused, and `J`, which has no RV32I
counterpart, gets `1101011`. Unlike RV32I, `JAL` always links into x1, and
branch and jump offsets are not scaled.

## Data hazards: bypassing and the load-use stall

The decoder gives every instruction four hazard fields:

* `ws`: the destination register (x1 for `JAL`, otherwise rd).
* `we`: whether it writes. This is ALU, ALUi, LW, JAL and JALR, qualified by ws != 0.
* `re1` and `re2`: whether it reads rs1 and rs2. `re1` is set for everything except J and JAL. `re2` is set for ALU, SW and BEQ.

`we` is split into `we_bypass`, for results that exist at the end of execute,
and `we_stall`, for `LW`, whose value exists only in the memory stage.
`JAL` and `JALR` compute their link value `PC + 4` in the ALU, with PC and
the constant 4 as operands, so their result can be bypassed like any ALU
result.

**Full bypass (`BYPASS = 1`, the default).** Each source operand in decode
takes the youngest matching value:

```
src(rs) = E  if rs = ws_E and we_bypass_E      (ALU output, combinational)
        = M  if rs = ws_M and we_M             (Y, or the loaded word for LW)
        = W  if rs = ws_W and we_W             (R)
        = register file otherwise
stall   = (rs1_D = ws_E) and we_stall_E and re1_D
       or (rs2_D = ws_E) and we_stall_E and re2_D
```

A stall holds PC and IR_D and sends a bubble into execute. One cycle later
the load is in the memory stage, and its word reaches decode through the M
bypass. Stores need no check against loads. The data memory completes a
write in the cycle of the store, so a later load of the same word sees it.

**Interlocks only (`BYPASS = 0`).** Every operand comes from the register
file, and

```
stall = ((rs1_D = ws_E) we_E + (rs1_D = ws_M) we_M + (rs1_D = ws_W) we_W) re1_D
      + ((rs2_D = ws_E) we_E + (rs2_D = ws_M) we_M + (rs2_D = ws_W) we_W) re2_D
```

An instruction d slots behind its producer (bubbles included) waits
max(0, 4 - d) cycles in decode.

## Control hazards: killing wrongly fetched instructions

Fetch always assumes the next instruction is at `PC + 4`. The next-PC mux
(PCSel) chooses from four sources, in priority order:

1. **`br`**: a `BEQ` in execute whose operands are equal. The target
   `PC + imm` was computed in decode and carried along. The instructions in
   decode and fetch are replaced by bubbles, which costs two cycles. A taken
   branch overrides a stall, because the stalled instruction is one of those
   it kills.
2. **hold**: decode is stalled. PC and IR_D keep their values, and no jump in
   decode is taken until the stall clears. This happens, for example, to a
   `JALR` whose base register comes from a load just ahead of it.
3. **`jabs` / `rind`**: `J`/`JAL` (target `PC_D + offset`) or `JALR`
   (target `rs1 + imm`, with rs1 taken through the bypass network) in
   decode. The instruction just fetched is replaced by a bubble, which costs
   one cycle.
4. **`pc+4`**.

## Timing summary

The testbenches check these cycle counts. A gap of n means n bubbles
between the two instructions' write-backs.

| situation | BYPASS = 1 | BYPASS = 0 |
|---|---|---|
| ALU result used by the next instruction | 0 | 3 |
| load result used by the next instruction | 1 | 3 |
| load result used two instructions later | 0 | 2 |
| J, JAL, JALR | 1 | 1 (+ stalls for JALR's base) |
| BEQ taken | 2 | 2 |
| BEQ not taken | 0 | 0 |

Taken together: three back-to-back independent or bypassed instructions
finish in 3 cycles (CPI 1). With a load-use pair they finish in 4 (CPI 1.33),
and with a taken branch in 5 (CPI 1.67).

## Using the processor (`pipe_top`)

`pipe_top` instantiates `pipe_core` with a 1024-word instruction memory
(`imem`) and a 1024-word data memory (`dmem`). Both answer within the cycle.

1. Hold `rst` high. It is synchronous and active high.
2. Write the program through `iload_we/iload_addr/iload_data` (word
   addresses). Optionally preload data through `dhost_we/dhost_addr/dhost_wdata`.
3. Release `rst`. Execution starts at `RESET_PC` (0). There is no halt
   instruction. A program can end in `J 0`, a jump to itself.
4. Observe progress on the trace outputs. `retire_valid` marks each
   instruction leaving write-back, with its `retire_pc`, `retire_ir` and
   register write (`retire_we`, `retire_wa`, `retire_wd`). `store_*` shows
   each store as the data memory receives it. `dhost_rdata` reads the data
   memory at `dhost_addr` at any time.
5. `ev_stall`, `ev_byp_e/m/w`, `ev_kill_jump` and `ev_kill_branch` flag, cycle by
   cycle, a stall, an operand taken from each bypass source, and the two
   kinds of kill.

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 1024 | instruction memory size, words |
| `DMEM_WORDS` | 1024 | data memory size, words |
| `BYPASS` | 1 | 1: full bypass network; 0: interlocks only |
| `RESET_PC` | 0 | first fetch address |

The register file, the pipeline's data memory port and the instruction
memory's fetch port are all combinational reads. The timing of this
implementation therefore assumes single-cycle memories, as the design does.
A real memory with a registered read would need an extra fetch stage and an
extra memory stage, and the hazard logic would change with them.

## Files

| file | contents |
|---|---|
| `rtl/pipe_pkg.sv` | widths, opcodes, enums for the control-table selects, the decoded-control struct |
| `rtl/pipe_top.sv` | processor + memories |
| `rtl/pipe_core.sv` | the five stages, bypass muxes, bubble muxes, next-PC mux |
| `rtl/hazard_unit.sv` | stall, bypass-select, PCSel and kill equations |
| `rtl/ctrl_decode.sv` | the control table and ws/we/re1/re2 |
| `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/imm_select.sv` | datapath units |
| `rtl/imem.sv`, `rtl/dmem.sv` | memories as arrays |
| `tb/tb_rv_pkg.sv` | instruction encoders and an architectural reference model |
| `tb/tb_pipe_top.sv` | end-to-end test at default parameters |
| `tb/tb_pipe_core.sv` | core alone in interlock-only mode |
| `tb/tb_pipe_examples.sv` | the classic example sequences and their pipeline timing |
| `tb/tb_<block>.sv` | one self-checking unit test per block |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog.

* `tb_pipe_top` runs the full-size processor. Ten short directed programs
  have their cycle counts checked against the table above. A counted loop
  that sums an array, and a subroutine called twice through `JAL` and left
  through `JALR`, exercise backward jumps and branches. Then twelve
  random 150-instruction programs run, mixing ALU, load, store, branch, J,
  JAL and JALR instructions with forward-only control flow. Every
  instruction leaving the pipeline is compared with the reference model
  (PC, instruction, register write, store address and data). After each
  program the data memory is compared word for word. The test fails if any
  of stall, E/M/W bypass, jump kill or branch kill never happened.
* `tb_pipe_core` does the same for the core with `BYPASS = 0`, using the
  interlock stall counts. It also requires that no bypass is ever used.
* `tb_pipe_examples` runs `x1 <- x0+10; x4 <- x1+17` (1 cycle apart
  bypassed, 4 interlocked) on both configurations. It also runs a jump from
  100 to 304 that kills 104, and a taken branch from 100 to 304 that kills
  104 and 108. Further checks: a store and a load to the same address, and
  the three 3-instruction CPI cases.
* The unit tests compare against values computed in the testbench: the ALU
  against arithmetic, the decoder against the control table, and the hazard
  unit against the stall and bypass equations in both configurations. The
  register file and memories are checked against shadow arrays.

Run any of them with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pipe_pkg.sv tb/tb_rv_pkg.sv tb/tb_pipe_top.sv --top-module tb_pipe_top
./obj_dir/Vtb_pipe_top
```

The whole suite runs in seconds. `pipe_core` also has two concurrent
assertions: a stall keeps IR_D unchanged, and a bubble never writes.

## What follows the design and what is this implementation's choice

From the design:

* the five stages and their registers (PC, IR, A, B, MD1, Y, MD2, R)
* separate instruction and data memories
* the control table
* the ws/we/re1/re2 definitions, the interlock and fully bypassed stall equations, and the E/M/W bypass sources
* the kill of one instruction after a jump resolved in decode, and of two after a branch resolved in execute
* single-cycle data-memory writes

Chosen here:

* the bit positions and opcode values
* the RV32I ALU operation set
* byte-granular, unscaled offsets
* branch target `PC + imm` and jump target `PC + offset`
* `JAL`/`JALR` writing the return address `PC + 4` (the control table says only "PC")
* `JALR` killing the fetched instruction, like `J`/`JAL`
* the priority of a taken branch over a stall and of a stall over a jump
* bypass priority by age
* synchronous reset to `RESET_PC` with bubbles in every stage
* memory sizes, the load and host ports, the trace and event outputs
* unknown opcodes as no-operations

Not included, because they are alternatives the design sets aside:

* a single-cycle unpipelined datapath
* a pipeline with only the single ALU-to-ALU bypass
* a fetch that waits for each next PC instead of guessing `PC + 4`
* speculating that a loaded value is zero and flushing when it is not

The pipeline has no exceptions or interrupts.
