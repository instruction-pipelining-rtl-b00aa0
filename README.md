# A five-stage pipeline that resolves its own hazards

This is a classic in-order, five-stage RISC pipeline (fetch, decode,
execute, memory access, write-back) whose point is the control logic that
keeps it correct when instructions depend on each other. Two kinds of
hazards are handled in hardware, with no help from the compiler:

* **Data hazards.** An instruction in decode may need a register that an
  older, still uncommitted instruction is about to write. The pipeline
  either **stalls** the reader until the value is in the register file, or,
  for the one case where the value already exists, **bypasses** it from the
  ALU output straight into the operand register.
* **Control hazards.** The next PC is not known while the current
  instruction is being fetched. The pipeline **speculates** that it is
  PC+4 and, when that guess is wrong, **kills** the wrongly fetched
  instructions by turning them into bubbles and **restarts** fetch at the
  right address.

Everything is a handful of equality comparators and multiplexers, described
below in full. All of it is synthesizable SystemVerilog. Every block has a
self-checking testbench. Four end-to-end testbenches run programs on the
whole pipeline; three of them check every retired instruction against an
instruction-set reference model.

## Pipeline structure

```
        IF              ID                    EX             MA              WB
  +--> PC --> IMem --> IR_D --+--> GPR read --> A --> ALU --> Y --> DMem --> R --> GPR write
  |          (nop mux)  PC_D  |    ImmExt  --> B       |      MD2  (addr=Y)       (ws mux: rd/rt/31)
  |                           |    rd2     --> MD1 ----+----> MD2
  |                           +--> IR_E (nop mux) -> IR_M -> IR_W
  +-- PCSrc mux: pc+4 | jabs | rind | br
                             ASrc: A <- ALU output (bypass)
```

| register | stage | holds |
|---|---|---|
| `pc_f` | IF | address being fetched |
| `ir_d`, `pc_d` | ID | instruction in decode and its address |
| `ir_e`, `a_e`, `b_e`, `md1_e` | EX | instruction, ALU operands, store data |
| `ir_m`, `y_m`, `md2_m` | MA | instruction, ALU result / address, store data |
| `ir_w`, `r_w` | WB | instruction, value to write |

Each stage keeps its own copy of the instruction register. The control
signals of a stage are decoded from that copy (`inst_decode`), so nothing
else travels down the pipe. A bubble is the all-zero word. It decodes as an
R-type instruction with destination r0, and since no instruction writes r0
the bubble has no effect.

The register file is written at the clock edge that ends write-back. It is
read combinationally in decode, and a write is not visible to a read in the
same cycle. The data memory is read combinationally in MA and writes at the
end of the store's MA cycle. A store followed by a load of the same address
therefore needs no interlock: the write has completed before the load reads.

## Instruction set

| class | operation | reads | writes |
|---|---|---|---|
| ALU (R-type) | rd <- (rs) func (rt) | rs, rt | rd |
| ALUi | rt <- (rs) op imm16 | rs | rt |
| LW | rt <- M[(rs) + imm16] | rs | rt |
| SW | M[(rs) + imm16] <- (rt) | rs, rt | - |
| BEQZ / BNEZ | if (rs) ==/!= 0: PC <- PC+4 + imm16 | rs | - |
| J | PC <- PC+4 + imm26 | - | - |
| JAL | r31 <- PC+4; PC <- PC+4 + imm26 | - | r31 |
| JR | PC <- (rs) | rs | - |
| JALR | r31 <- PC+4; PC <- (rs) | rs | r31 |

Formats: R-type `op[31:26] rs[25:21] rt[20:16] rd[15:11] func[5:0]`,
I-type `op rs rt imm16`, J-type `op imm26`. Offsets are signed byte
offsets from the next instruction, so a `J 200` at address 100 continues at
304. There are no delay slots. The opcode values (DLX-style) are listed in
`rtl/pipe_pkg.sv`, which also has `enc_r`, `enc_i` and `enc_j` to build
instruction words. Logical immediates (ANDI, ORI, XORI) are zero-extended
and all others sign-extended. The ALU does add, sub, and, or, xor and signed
set-less-than.

## Data hazards: interlock and bypass

For each instruction register, `inst_decode` produces:

* `ws`, the destination: rd for ALU, rt for ALUi and LW, r31 for JAL/JALR.
* `we`, "writes a register": on for ALU/ALUi/LW when `ws != 0`, and always
  on for JAL/JALR.
* `re1` / `re2`, "reads rs" / "reads rt". re1 is on for everything except
  J and JAL. re2 is on only for ALU and SW.

The write enable of the execute stage is split in two, according to
whether the result already exists at the ALU output:

* `we_bypass` (ALU, ALUi): the result is at the ALU output during EX.
* `we_stall` (LW, JAL, JALR): the result is not at the ALU output. A load
  has not read memory yet. The return address of JAL/JALR is not treated as
  forwardable.

The decode instruction stalls when

```
stall = ( ((rs_D = ws_E)·weS_E + (rs_D = ws_M)·we_M + (rs_D = ws_W)·we_W)·re1_D
        + ((rt_D = ws_E)·we_E  + (rt_D = ws_M)·we_M + (rt_D = ws_W)·we_W)·re2_D )
        · !branch_taken_E
```

where `weS_E` is `we_stall_E` with the bypass and `we_E` without it. When it
does not stall and `(rs_D = ws_E)·we_bypass_E·re1_D` holds (`ASrc`), the A
register loads the ALU output instead of the register-file value. Only A is
bypassed. A dependence through rt (the second ALU operand, or the data of a
store) always waits.

A stall holds `pc_f`, `pc_d` and `ir_d` and loads a bubble into `ir_e`.
Because a register write is seen only in the following cycle, a consumer
waits until its producer has *left* write-back. The cost of one dependence
is therefore:

| producer just ahead of the consumer | bubbles |
|---|---|
| ALU/ALUi, with bypass (`BYPASS = 1`, default) | 0 |
| ALU/ALUi, without bypass (`BYPASS = 0`) | 3 |
| LW, JAL, JALR | 3 |
| any producer, dependence through rt | 3 |

**JR/JALR and the bypass (this implementation's addition).** A register
jump takes its target from the register-file read port in decode, not
through A, so the bypass cannot deliver its target. If the equations above
were applied literally, a `JR r14` right after `ADDI r14, ...` would
neither stall nor see the new value, and would jump to a stale address.
Here, when the decode instruction is JR or JALR, the rs term uses the full
`we_E`, so the jump waits like any other unbypassed consumer.

## Control hazards: speculate, kill, restart

Fetch always guesses PC+4. The guess is corrected at two points:

* **Jumps, in decode.** The opcode of J/JAL/JR/JALR is known in decode, and
  so is the target. J/JAL use `jabs = pc_f + imm26`, where `pc_f` is already
  the jump's address + 4. JR/JALR use `rind = (rs)` read in decode. The
  instruction being fetched is replaced by a bubble (`IRSrc_D = nop`). Cost:
  1 bubble.
* **Conditional branches, in execute.** `zero?` is taken from the ALU
  output, with the ALU passing (rs) through. A taken BEQZ/BNEZ loads
  `br = pc_d + imm16`, since `pc_d` holds the branch address + 4 while the
  branch is in EX. It kills both younger instructions: a bubble goes into
  `ir_d` and one into `ir_e`. Cost: 2 bubbles when taken, 0 when not taken.

The older instruction wins. A taken branch in EX overrides whatever the
decode instruction wants: its jump, and also its stall request, because
that instruction is about to be killed anyway. The mux controls are:

```
IRSrc_D = taken_E ? nop : (J, JAL, JR, JALR in D) ? nop : IMem
IRSrc_E = (taken_E or stall) ? nop : IR_D
PCSrc   = taken_E ? br  : (J, JAL in D) ? jabs : (JR, JALR in D) ? rind : pc+4
PC, PC_D, IR_D load when !stall
```

A JR/JALR that must stall keeps `PCSrc = rind`, but the PC does not load
until the stall ends, so the jump takes effect with the correct register
value.

**Branches resolved in decode (`BR_IN_DECODE = 1`).** One of the two branch
bubbles can be removed by adding a zero detector on the register-file
output `rd1`. The branch is then decided in decode, and `br = pc_f + imm16`
is formed like a jump target. A taken branch kills only the instruction
being fetched and costs 1 bubble, the same as a jump. Branches in execute
then do nothing. The price is that the branch needs (rs) in decode, where
no bypass reaches. Like JR, a branch whose rs is being produced in EX, MA
or WB waits: a branch right after the ALU instruction that sets its
condition costs 3 stall cycles. Whether this pays off depends on the code.
The default is `BR_IN_DECODE = 0`.

Summary of timing, measured as the distance between the write-back cycles
of consecutive instructions: 1 with no hazard, 2 after a jump, 3 after a
taken branch (2 with `BR_IN_DECODE = 1`), 4 after an interlock that waits
for write-back.

## Modules

| file | module | role |
|---|---|---|
| `rtl/pipe_pkg.sv` | package | opcodes, types, decode helper functions, instruction encoders |
| `rtl/pipe5_cpu.sv` | `pipe5_cpu` | top: the pipeline registers and datapath muxes |
| `rtl/hazard_ctrl.sv` | `hazard_ctrl` | stall, ASrc, IRSrc_D, IRSrc_E, PCSrc |
| `rtl/inst_decode.sv` | `inst_decode` | ws, we, we_bypass, we_stall, re1, re2 of one IR |
| `rtl/next_pc.sv` | `next_pc` | pc+4, jump, register and branch targets; PCSrc mux |
| `rtl/regfile.sv` | `regfile` | 32 x 32 GPRs, 2 read ports + 1 debug read, 1 write |
| `rtl/alu.sv` | `alu` | ALU with zero flag |
| `rtl/imm_ext.sv` | `imm_ext` | 16-bit immediate sign/zero extension |
| `rtl/inst_mem.sv` | `inst_mem` | instruction memory with a load port |
| `rtl/data_mem.sv` | `data_mem` | data memory with a debug read port |

### Top-level interface (`pipe5_cpu`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (PC <- `RESET_PC`, all IRs <- bubble, GPRs <- 0) |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, log2(IMEM_DEPTH), 32 | write one instruction word (word index) |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | 5 / 32 | read a GPR |
| `dbg_mem_addr` / `dbg_mem_data` | in / out | log2(DMEM_DEPTH) / 32 | read a data-memory word |
| `pc_o` | out | 32 | fetch PC |
| `stall_o`, `bypass_o`, `jump_o`, `branch_o` | out | 1 | this cycle: decode stalled; A took the ALU output; restart after a jump; taken branch |
| `retire_o`, `retire_ir_o` | out | 1, 32 | write-back holds a real instruction, and which |

Parameters: `BYPASS` (1: ALU-to-A bypass on), `BR_IN_DECODE` (0: branches
resolved in execute), `IMEM_DEPTH` (256 words), `DMEM_DEPTH` (256 words),
`RESET_PC` (0). Data memory contents are not reset. A program
should store before it loads.

The top carries three assertions: a stall and a taken branch never occur
together; a stall holds PC and IR_D and puts a bubble into EX; and a taken
branch leaves bubbles in ID and EX.

## Simulating

The testbenches are in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. With plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pipe_pkg.sv tb/tb_pipe5_cpu.sv --top-module tb_pipe5_cpu
./obj_dir/Vtb_pipe5_cpu
```

| testbench | what it shows |
|---|---|
| `tb_pipe5_cpu` | default configuration. A directed program covers the bypass, store->load, load-use, JAL->use of r31, J, taken BEQZ, untaken BNEZ, JR, JALR, a JR waiting for its target, and a taken branch overriding a stall. It checks registers, memory, the retirement distance of each case, and the exact counts of stall cycles (8), bypass uses (1) and taken branches (2). Then 40 random programs of 100 instructions (ALU, ALUi, LW, SW, forward branches, J, JAL, reads of r31) are compared instruction by instruction against the reference model in `tb/pipe5_iss.svh`. |
| `tb_pipe5_nobypass` | the same with `BYPASS = 0`. The ALU->ALU case now costs 3 stall cycles (11 in total) and the bypass is never used. |
| `tb_pipe5_brdecode` | the same with `BR_IN_DECODE = 1`. Taken branches retire their target 2 cycles after the branch instead of 3. |
| `tb_pipe5_examples` | the standard sequences at their own addresses: `100: J 200` -> `304`, `100: BEQZ r1 200` -> `304` with two killed instructions, `JAL 500` followed by a use of r31, and the bypassed `r1 <- r0+10; r4 <- r1+17`. |
| `tb_hazard_ctrl` | the control equations against a reference model in three configurations (with the bypass, without it, and with branches in decode): directed cases and 20 000 random IR combinations |
| `tb_inst_decode`, `tb_next_pc`, `tb_alu`, `tb_imm_ext`, `tb_regfile`, `tb_inst_mem`, `tb_data_mem` | unit tests of each block |

To run your own program, write words through `prog_*` while `rst` is high,
release reset, and watch `retire_ir_o`. The testbenches end a program with
`J -4` (a jump to itself) and stop when it reaches write-back.

## Where this implementation makes its own choices

The stage structure, the control equations, the bypass and its
applicability rules, the kill/restart behaviour and the jump and branch
timing follow the original description of the pipeline. This
implementation chose the rest:

* opcode and function-code values, bit positions of the fields, and the
  sign/zero extension rule;
* 32-bit words and byte addresses; 32 registers; 256-word memories;
* the path of the JAL/JALR return address: it is selected into B in decode
  and passed through the ALU;
* the JR/JALR exception to the bypass, described above, and the same rule
  for branches resolved in decode;
* reset behaviour, the program-load port, the debug ports and the status
  outputs.

Software-visible branch delay slots are not built. They are mentioned only
as an alternative, and they change the instruction set. This
implementation also has no other bypass paths (from MA or WB, or into B)
and no branch prediction.
