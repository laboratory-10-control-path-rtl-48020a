# Mini-MIPS: a 16-bit teaching CPU, single-cycle and pipelined

Mini-MIPS is a very small MIPS-like processor. It has nine instructions, one
16-bit instruction format, sixteen 16-bit registers and two 256-word memories.
This RTL builds it twice:

* **`sc_cpu`**: a single-cycle machine. Each instruction runs in one clock,
  so the clock period has to cover the longest path: a load going through
  the register file, the ALU, the data memory and back to the register file.
* **`pl_cpu`**: the same datapath cut into five stages (IF, ID, EX, MEM,
  WB). One instruction enters per clock. By default the pipeline does
  **nothing** about hazards. A program that reads a register too soon after
  it is written gets the old value. The instructions after a taken branch
  run anyway. This is on purpose: this machine is built to show those
  effects. A parameter adds forwarding and load-use stalls.

`mini_mips_top` places both machines side by side. Each has its own
instruction memory and load port.

## Instruction set

Every instruction is one 16-bit word made of four 4-bit fields:

```
 15    12 11     8 7      4 3      0
+--------+--------+--------+--------+
| opcode |   rs   |   rt   | rd/off |      JMP: bits 11..0 = target
+--------+--------+--------+--------+
```

| op | mnemonic | effect | ALUop |
|----|----------|--------|-------|
| 0 | `LW rs rt off`  | `rt <- mem[rs + sext(off)]` | 2 (add) |
| 1 | `SW rs rt off`  | `mem[rs + sext(off)] <- rt` | 2 (add) |
| 2 | `ADD rs rt rd`  | `rd <- rs + rt` | 2 |
| 3 | `SUB rs rt rd`  | `rd <- rs - rt` | 6 |
| 4 | `AND rs rt rd`  | `rd <- rs & rt` | 0 |
| 5 | `OR rs rt rd`   | `rd <- rs \| rt` | 1 |
| 6 | `SLT rs rt rd`  | `rd <- (rs < rt) ? 1 : 0`, signed | 7 |
| 7 | `BEQ rs rt off` | if `rs == rt`: `pc <- pc + 2 + 2*sext(off)` | 6 (sub) |
| 8 | `JMP target`    | `pc <- 2*target` | - |

Addressing:

* **PC.** The PC is an 8-bit byte address and steps by 2. Instructions sit
  at even addresses of the instruction memory, so a program can hold 128
  instructions.
* **Data memory.** Each of the 256 addresses holds a whole 16-bit word: a
  store to address 1 and a store to address 2 write different words.
* **Offsets.** The 4-bit offset is sign-extended (-8..+7). Loads and stores
  use it as is. A branch doubles it, so its range is -16..+14 bytes from
  `pc + 2`.
* **Jumps** are absolute: `JMP 2` goes to address 4.

The register state after reset:

* R1 holds 1 and every other register holds 0.
* R0 always reads 0 and ignores writes.

The example programs rely on R1 = 1. Opcodes 9..15 are undefined; they
behave as `JMP`, because opcode bit 3 alone selects the jump.

Encoding example: `ADD R1 R1 R2` is `2112`, `SW R0 R1 0` is `1010`,
`JMP 0` is `8000`.

## Control

Two small combinational decoders turn the opcode into datapath controls.

**ALU control** (`alu_control`). This block decodes opcode bits 2..0 with a
3-to-8 decoder. Each ALUop bit is the OR of some decoder lines:

* bit 2 is set by SUB, SLT and BEQ;
* bit 1 is set by every opcode except AND and OR;
* bit 0 is set by OR and SLT;
* bit 3 is always 0.

**Main control** (`control_unit`). Two 3-to-8 decoders split the opcodes
into 0..7 and 8..15. The control lines are:

| instr | RegDst | RegWr | ALUSrc | MemRd_n | MemWr_n | MemtoReg | Branch | Jump |
|-------|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|
| LW  | 1 | 1 | 1 | **0** | 1 | 1 | 0 | 0 |
| SW  | 1 | 0 | 1 | 1 | **0** | 0 | 0 | 0 |
| ADD, SUB, AND, OR, SLT | 0 | 1 | 0 | 1 | 1 | 0 | 0 | 0 |
| BEQ | 0 | 0 | 0 | 1 | 1 | 0 | 1 | 0 |
| JMP | 0 | 0 | 0 | 1 | 1 | 0 | 0 | 1 |

Two points are easy to get wrong:

* **The memory enables are active low.** A load has MemRd_n = 0 and a store
  has MemWr_n = 0.
* **RegDst = 1 selects `rt` as the destination, not `rd`.** This is the
  reverse of the textbook MIPS, because loads write their `rt` field.

## Single-cycle machine (`sc_cpu`)

The instruction memory sits outside the CPU: the CPU drives `pc` and gets
`instr` back. Inside the CPU are:

* the PC;
* both control units;
* the register file;
* the ALU, whose B input comes from a mux (`rt` value or the offset);
* the data memory, addressed by ALU result bits 7..0;
* the write-back mux (ALU result or the loaded word);
* the next-PC logic: `pc + 2`, the branch target when Branch and Zero are
  both set, or the jump target.

The PC, the register write and the memory write happen on the rising clock
edge. Everything else settles during the cycle. `rd1`, `rd2`, `alu_result`
and `zero` bring out the register read ports and the ALU so that a program
can be followed step by step.

## Pipelined machine (`pl_cpu`)

```
   IF            ID              EX               MEM            WB
PC, imem,   |  register    |  ALU control,  |  data memory,  |  write-back
control,    |  read,       |  ALU, branch   |  branch        |  mux, register
jump        |  sign-extend |  target, RegDst|  decision      |  write
         IF/ID          ID/EX            EX/MEM           MEM/WB
```

Each pipeline register is a `pipe_reg` holding one packed struct
(`if_id_t`, `id_ex_t`, `ex_mem_t`, `mem_wb_t` in `mini_mips_pkg`). The
control bits travel in three fields:

* EX field (2 bits): RegDst, ALUSrc.
* M field (3 bits): Branch, MemRead, MemWrite.
* WB field (2 bits): RegWrite, MemtoReg.

In these fields the memory enables are **active high**. An all-zero field is
therefore a true no-op, and reset clears every pipeline register to a
bubble.

Some choices differ from the usual textbook pipeline:

* **Control is decoded in IF.** The control bits enter IF/ID together with
  the instruction.
* **Jumps are taken in IF.** Instruction bit 15 of the word just fetched
  selects the jump target for the next PC. No instruction behind a `JMP` is
  fetched, and the `JMP` itself flows down the pipe as a no-op.
* **Branches are decided in MEM**, from the Zero and Branch bits in EX/MEM.
  By then the three instructions after the `BEQ` have been fetched. Nothing
  flushes them, so **they execute**. If a branch and a jump redirect the PC
  in the same clock, the branch wins, being the older instruction.
* **The register file writes through.** A read of the register being
  written in that clock returns the new value. So an instruction three
  places after the writer reads the correct value.

### What goes wrong, on purpose

Take the writer's position as 0. With `HAZARD_UNITS = 0`, readers 1 and 2
places later see the old value, and reader 3 sees the new one. Two examples
from the test program show this (`tb_pl_cpu` checks both):

```
02: ADD R1 R1 R2      R2 <- 2
04: SLT R0 R2 R3      reads R2 = 0 (stale)  -> R3 = 0   (correct: 1)
06: SUB R2 R0 R4      reads R2 = 0 (stale)  -> R4 = 0   (correct: 2)
08: ADD R1 R2 R5      reads R2 = 2          -> R5 = 3   (correct)

0A: LW  R0 R6 0       R6 <- 1
0C: ADD R1 R6 R7      stale R6 = 0 -> R7 = 1  (correct: 2)
0E: SLT R6 R1 R8      stale R6 = 0 -> R8 = 1  (correct: 0)
10: SUB R6 R0 R9      R6 = 1       -> R9 = 1  (correct)
```

After reset, the wrong R3 leaves WB on the 6th clock. The wrong R4 follows
one clock later, and the correct R5 one clock after that.

Timing of a taken branch, for `BEQ R0 R0 7` at 0x16 whose target is 0x26:

```
clock   IF     ID     EX     MEM
  11    16     ..
  12    18     16
  13    1A     18     16
  14    1C     1A     18     16   <- taken here
  15    26     1C     1A     18
```

### Optional hazard handling (`HAZARD_UNITS = 1`)

This setting adds two units:

* **`forwarding_unit`** feeds each ALU operand, and the store data, from
  EX/MEM or from MEM/WB when either holds a newer value of the register.
  EX/MEM wins over MEM/WB, and R0 is never forwarded.
* **`hazard_detection_unit`** handles a load followed directly by an
  instruction that reads the loaded register, as `rs` or `rt`. For one
  clock it holds the PC and IF/ID and sends a bubble into ID/EX. After that
  clock the load is in WB, and forwarding covers the rest.

With these units the two sequences above give the correct results. The
load-use case costs one clock. Branches still resolve in MEM and their
three wrong-path instructions still execute. The textbook's early branch
compare and IF flush are **not** built. The units are always instantiated,
but their outputs are used only when the parameter is 1.

## Loading and running a program

1. Hold `rst` high.
2. Write the program into the instruction memory, one word per clock: set
   `*_load_we = 1`, `*_load_addr` (even addresses) and `*_load_data`.
3. Release `rst`. Each machine then fetches from address 0.

The memories are not cleared by reset. A program should not read a data
word it has not written first.

The pipelined machine shows one value set per stage:

| stage | ports |
|-------|-------|
| IF | `pl_pc`, `pl_instr` |
| ID | `pl_id_rdata1`, `pl_id_rdata2` |
| EX | `pl_ex_alu` |
| MEM | `pl_mem_addr`, `pl_mem_din`, `pl_mem_dout`, `pl_mem_we` (high = writing), `pl_mem_oe_n` (low = reading) |
| WB | `pl_wb_reg_write`, `pl_wb_wreg`, `pl_wb_wdata` |

For the first instruction of the test program (`SW R0 R1 0`, encoded
`1010`) after reset, the stages show:

* IF: `00`/`1010`;
* one clock later, ID: `0000`/`0001`;
* EX: `0000`;
* MEM: address `00`, data `01`, WE high.

Right after reset every stage behind IF holds a bubble, so WE shows 0 and
OE shows 1.

## Files

| file | contents |
|------|----------|
| `rtl/mini_mips_pkg.sv` | widths, opcode/ALUop enums, instruction, control and pipeline structs |
| `rtl/alu_control.sv`, `rtl/control_unit.sv` | the two decoders |
| `rtl/alu.sv`, `rtl/reg_file.sv` | ALU; register file (`WRITE_THROUGH`, `R1_RESET`) |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | 256 x 16 memories |
| `rtl/pipe_reg.sv` | pipeline register, type-parameterised, with hold enable |
| `rtl/forwarding_unit.sv`, `rtl/hazard_detection_unit.sv` | optional hazard handling |
| `rtl/sc_cpu.sv`, `rtl/pl_cpu.sv` | the two CPUs |
| `rtl/mini_mips_top.sv` | both machines with instruction memories (`PL_HAZARD_UNITS`) |
| `tb/mini_mips_iss_pkg.sv` | instruction-level reference model and the example programs |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pl_cpu_hazard_units` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/mini_mips_pkg.sv tb/mini_mips_iss_pkg.sv tb/tb_mini_mips_top.sv \
    --top-module tb_mini_mips_top -Wno-WIDTHEXPAND -Wno-WIDTHTRUNC
./obj_dir/Vtb_mini_mips_top
```

To run another testbench, replace `tb_mini_mips_top` with its name. The
ones that do not use the reference model also build without
`tb/mini_mips_iss_pkg.sv`.

What the testbenches cover:

* **Unit testbenches.** The decoders are checked exhaustively against the
  control tables. The ALU, register file, memories, pipeline register and
  hazard units are checked with random tests against reference rules
  written in the testbench.
* **`tb_sc_cpu`** runs the three example programs: the counting loop, the
  subtraction through memory that shows 6 at PC 0x14, and the pipeline test
  program with its taken branch. Before every clock it compares the PC, both
  read ports and the ALU result with the reference model.
* **`tb_pl_cpu`** checks the displays clock by clock for the first two
  instructions. It checks every instruction's ALU value and register write
  in the test program, the fetch order around the branch and the jump, and
  the stale and correct results of the two hazard sequences.
* **`tb_pl_cpu_hazard_units`** runs the hazard sequences and 20 random
  programs full of dependences with `HAZARD_UNITS = 1`. It compares the
  order and values of register writes with the reference model.
* **`tb_mini_mips_top`** runs both machines together at full size,
  through the load ports. It counts each mechanism and fails if one never
  happens: program load, single-cycle branch and jump, pipelined jump,
  wrong-path fetch, stale read.

## Where this RTL makes its own choices

These points are not fixed by the machine's description, or its sources
disagree. Check them before relying on them:

* **Wrong-path instructions after a taken branch.** The datapath makes the
  branch decision in MEM, which lets three instructions through. A prose
  account of the same machine speaks of two. This RTL follows the datapath.
* **Load/store offsets are not doubled.** The single-cycle diagram labels
  its one sign-extender "x2". The worked examples, though, store with offset
  2 to address 2, so only the branch offset is doubled.
* **Reset values.** R1 = 1, the other registers 0, and R0 hard-wired to 0
  are chosen to match the example programs.
* **ISA details.** SLT is a signed compare. Undefined opcodes act as JMP.
  Unused ALUop codes give 0.
* **Loading.** The instruction memory has a separate synchronous load
  port. It replaces the original circuit's LOAD/WR switches and shared
  address bus.
* **Memory output.** The data memory outputs 0 when not reading, where the
  original circuit leaves its output undriven.
* **WE/OE display polarity.** The pipeline's WE output is active high and
  its OE output active low. These polarities are inferred from the reset
  state of the original displays (WE 0, OE 1 while every stage holds a
  no-op).
* **Unencodable branch offset.** In the subtraction program, the final
  `BEQ R2 R15 LOOP` would need an offset of -9, which does not fit in 4
  bits. The branch is never taken there, so the testbench encodes offset 7,
  and `J END` is a jump to itself.
* **Optional hazard units.** They are an extension using the standard
  textbook rules. The reference machine has no hazard handling, and the
  default configuration matches it.
