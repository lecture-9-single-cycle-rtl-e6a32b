# MIPS-lite: a single-cycle processor and its five-stage pipeline

This is a small 32-bit MIPS-style processor, written twice in SystemVerilog.
The first version finishes every instruction in one clock cycle. The second
splits the same datapath into five pipeline stages. It deals with the hazards
that pipelining creates by forwarding, by a load interlock and by delayed
branches. Both versions run the same seven instructions:

| instruction     | meaning                                                  | format |
|-----------------|----------------------------------------------------------|--------|
| `add rd,rs,rt`  | R[rd] = R[rs] + R[rt]                                    | R      |
| `sub rd,rs,rt`  | R[rd] = R[rs] - R[rt]                                    | R      |
| `ori rt,rs,imm` | R[rt] = R[rs] OR ZeroExt(imm16)                          | I      |
| `lw rt,imm(rs)` | R[rt] = MEM[R[rs] + SignExt(imm16)]                      | I      |
| `sw rt,imm(rs)` | MEM[R[rs] + SignExt(imm16)] = R[rt]                      | I      |
| `beq rs,rt,imm` | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)*4        | I      |
| `j target`      | PC = {(PC+4)[31:28], target, 00}                         | J      |

The encodings are the MIPS ones:

* R-type: op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0].
* I-type: op rs rt imm16.
* J-type: op target[25:0].
* Opcodes: R-type `000000` (add funct `100000`, sub funct `100010`), ori
  `001101`, lw `100011`, sw `101011`, beq `000100`, j `000010`.

Any other opcode or funct writes nothing and acts as a no-op. The all-zero
word is the usual `nop`.

Memory is word-organised. Byte addresses are used throughout, but only aligned
32-bit words can be accessed, so address bits 1:0 are ignored. Register 0
always reads as zero.

## The single-cycle processor

`single_cycle_cpu` has four parts, and all of them finish their work in one
clock period:

* **Fetch unit** (`instr_fetch_unit`). It holds the PC. It computes PC+4 and
  the branch target, and it picks the next PC.
* **Instruction memory** (`inst_memory`). It is read without a clock:
  Instruction = MEM[PC].
* **Controller** (`main_control`). It turns op and funct into the control
  points of the datapath.
* **Datapath** (`single_cycle_datapath`). It holds the register file, the
  immediate extender, the ALU, the data memory and three steering muxes.

```
            +--------------+    Instruction<31:0>
  clk ----->| fetch unit   |--PC--> inst_memory ----+---> op, funct --> main_control --> ctrl
            | PC, +4, br   |<-- nPC_sel, Jump, Zero |
            +--------------+                        +---> rs, rt, rd, imm16
                                                           |
   RegDst mux (rd/rt) -> Rw     rs -> Ra, rt -> Rb         v
   RegFile: busA, busB --> ALUSrc mux (busB / extended imm16) --> ALU --> Zero
   ALU result = data memory address, busB = store data
   MemtoReg mux (ALU / memory) --> busW --> RegFile write port
```

Within each cycle the register file is read, the ALU computes and the data
memory is read, all as combinational paths. At the rising edge three things
happen together: the PC, the register being written (RegWr) and the memory
word being stored (MemWr) all update. So each instruction takes exactly one
cycle. The clock must be slow enough for the longest instruction, `lw`:

* instruction memory 2 ns
* register read 1 ns
* ALU 2 ns
* data memory 2 ns
* register write 1 ns

That adds up to 8 ns, or 125 MHz.

### Control

The controller has two levels. The first level is an AND plane that
recognises each instruction from op (and funct, for R-type). The second level
is an OR plane in which each control signal is the OR of the instructions
that need it:

| signal    | equation           | meaning when 1                     |
|-----------|--------------------|------------------------------------|
| RegDst    | add + sub          | write rd (else rt)                 |
| ALUSrc    | ori + lw + sw      | ALU B input = extended immediate   |
| MemtoReg  | lw                 | write back the memory word         |
| RegWrite  | add + sub + ori + lw | write the register file          |
| MemWrite  | sw                 | write data memory                  |
| nPC_sel   | beq                | branch if the ALU result is zero   |
| Jump      | j                  | take the jump target               |
| ExtOp     | lw + sw            | sign-extend imm16 (else zero-extend) |
| ALUctr[0] | sub + beq          | ALUctr: 0 ADD, 1 SUB, 2 OR         |
| ALUctr[1] | ori                |                                    |

Where a signal does not matter for an instruction, these sums set it to 0.
The signals travel together as the packed struct `mips_pkg::ctrl_t`.

### Next PC

The PC register holds only address bits 31:2, because bits 1:0 are always
00. So "PC+4" is an adder that adds 1. A second adder adds the sign-extended
imm16 to PC+4. This sign-extension block is separate from the datapath's
extender and always sign-extends, whatever ExtOp says.

The next-PC mux takes the branch target only when nPC_sel AND Zero are both
1. For beq, the ALU subtracts the two registers, and Zero means they are
equal. A jump takes {(PC+4)[31:28], target, 00}. There is no delay slot here:
a taken branch is followed directly by its target.

## The pipelined processor

`pipelined_cpu` uses the same blocks, split into five stages by pipeline
registers:

| stage | work                                                       |
|-------|------------------------------------------------------------|
| IF    | read instruction memory at PC, compute PC+4                |
| ID    | decode, read registers, compare for beq, resolve beq and j |
| EX    | ALU operation or address calculation                       |
| MEM   | data memory read or write                                  |
| WB    | register write                                             |

Up to five instructions are in flight at once. Once the pipeline is full,
one instruction finishes every cycle. The first instruction leaves WB in the
4th cycle after reset is released. Each stage is short (about 2 ns with the
delays above), so the clock can run about four times faster than the
single-cycle one. Overlapping instructions creates three kinds of hazard.

**Structural hazards.** Fetch and a load or store would collide on a single
memory, so instruction memory and data memory are separate. The register file
is written in the first half of a cycle and read in the second half. The RTL
models this with one clock edge: a read of the register being written in the
same cycle returns the new value (`regfile` with `BYPASS = 1`). So an
instruction in ID sees a result being written back from WB.

**Control hazards.** beq has its own equality comparator in ID, and j is
also resolved in ID. So the next fetch can already go to the target. One
instruction, the one right after the branch or jump, has been fetched by
then. Branches are *delayed*: that instruction (the delay slot) is always
executed, taken or not. The pipeline never flushes. A compiler or programmer
fills the slot with useful work, or with a nop. After ID, branches and jumps
do nothing in EX, MEM and WB.

**Data hazards.** The `hazard_unit` handles four cases:

* *Forwarding to EX.* An ALU operand whose register is written by the
  instruction one ahead (now in MEM) takes that instruction's ALU result.
  Failing that, if the instruction two ahead (now in WB) writes it, the
  operand takes the write-back value. The younger result wins. Register 0 is
  never forwarded. A store's data is forwarded the same way.
* *Load interlock.* A load's data exists only after MEM. An instruction
  that uses the loaded register right after the load is held in ID for one
  cycle: the PC and the IF/ID register keep their values, and a bubble enters
  EX. After that the value is forwarded from WB. Leaving an unrelated
  instruction after a load avoids the stall.
* *beq operands.* The comparator works in ID, which is earlier than EX. If
  the instruction just ahead (in EX) writes a register beq compares, beq
  waits one cycle and then takes that ALU result forwarded from MEM. If a
  load writes it, beq waits until the load reaches WB:
  * 2 cycles if the load is just ahead of beq;
  * 1 cycle if the load is two ahead.
* *Results in WB* reach ID through the register file's write-then-read.

Stall cycles by producer and consumer:

| producer \ consumer          | ALU/memory instruction | beq |
|------------------------------|-----------------------:|----:|
| add/sub/ori, 1 ahead         | 0                      | 1   |
| lw, 1 ahead                  | 1                      | 2   |
| lw, 2 ahead                  | 0                      | 1   |
| anything 3 or more ahead     | 0                      | 0   |

Pipeline registers carry a valid bit, and a bubble is an all-zero entry.
`retire` pulses when a valid instruction leaves WB. The `events` output
(`mips_pkg::pipe_events_t`) shows, cycle by cycle, which mechanism acted:

* load-use stall
* beq stall
* EX forward
* comparator forward
* register-file bypass
* taken branch
* jump

An assertion checks that a stall never coincides with a redirect of the
fetch.

**Programs differ between the two processors.** Code that puts a real
instruction after a branch behaves differently on the pipelined processor,
where that instruction always executes. Code with a nop in every delay slot
behaves the same on both.

## Interfaces

Both processors have the same program and observation ports:

* `clk`, and `rst_n`: an asynchronous active-low reset that clears the PC,
  the registers and the pipeline.
* `prog_we`, `prog_addr` (word index), `prog_data`: they write instruction
  memory at the rising edge. Load the program while `rst_n` is low. Execution
  starts at address 0 when reset is released.
* `dbg_reg_addr` / `dbg_reg_data` and `dbg_mem_addr` / `dbg_mem_data`:
  read-only observation of a register and a data word. They do not disturb
  execution.
* `pc`: the fetch address. The single-cycle processor also has
  `instruction`, and the pipelined one has `retire` and `events`.

`mips_top` holds both processors, sharing only clock and reset. Its ports
are those above, with the prefix `sc_` for the single-cycle processor and
`pl_` for the pipelined one. Parameters: `IMEM_WORDS` and `DMEM_WORDS`
(default 256 each). Data memory is not reset. Programs that read a word
should write it first.

## What follows the source description and what was chosen here

These parts follow the source description:

* the instruction formats and encodings;
* the single-cycle datapath and its mux numbering;
* the control equations, including the two-bit ALUctr code;
* the fetch unit with its 30-bit PC and the nPC_sel AND Zero branch select;
* the five stages, with separate instruction and data memories;
* the write-first/read-second register file;
* the branch comparator in ID with one delay slot for branches and jumps;
* forwarding, and the one-cycle load interlock.

Where its statements disagreed, this design chose as follows:

* lw and sw sign-extend and ori zero-extends (ExtOp = lw + sw).
* ori is an OR, not an add.
* sw stores R[rt].
* rs is bits 25:21 and rt is bits 20:16.

These are this design's own choices:

* the jump datapath (the standard MIPS rule);
* memory depths of 256 words, word-only access, and combinational memory
  reads;
* register 0 hard-wired to zero;
* the reset values;
* the program-load and observation ports;
* no overflow detection;
* how beq operands that are not ready in ID are handled (the stall and
  comparator-forwarding rules above).

Not built:

* L1 instruction and data caches. They are mentioned only as the way to
  split one memory; here the two memories answer in one cycle.
* Input and output devices.

Timing is not modelled. The 8 ns and 2 ns figures above are a delay budget,
not something the RTL checks.

## Files

| file | contents |
|------|----------|
| `rtl/mips_pkg.sv` | opcodes, `alu_ctr_e`, `ctrl_t`, field extractors, `fwd_sel_e`, `pipe_events_t` |
| `rtl/alu.sv`, `rtl/extender.sv`, `rtl/regfile.sv` | datapath units |
| `rtl/inst_memory.sv`, `rtl/data_memory.sv` | memories (arrays) |
| `rtl/main_control.sv` | controller |
| `rtl/instr_fetch_unit.sv` | PC and next-PC logic of the single-cycle processor |
| `rtl/single_cycle_datapath.sv`, `rtl/single_cycle_cpu.sv` | single-cycle processor |
| `rtl/hazard_unit.sv`, `rtl/pipelined_cpu.sv` | pipelined processor |
| `rtl/mips_top.sv` | both processors |
| `tb/mips_tb_pkg.sv` | instruction encoders, program generators, reference simulator |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/pipeline_examples_tb.sv` | cycle-exact checks of standard pipeline sequences |

## Verification

Each testbench compares its block with values computed separately. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

The processor testbenches run two kinds of program:

* A directed program: a counting loop, a store and reload, a load-use pair,
  a beq on a just-loaded value, negative offsets, and a halt loop (a beq to
  itself).
* Random programs of about 200 instructions: ALU operations, loads, stores,
  forward branches and jumps.

The results are checked against `mips_tb_pkg::mips_iss`, an
instruction-level reference simulator that runs with or without delay slots.
The checks cover all registers and every data word the program stored.

Timing is checked too:

* The single-cycle processor must reach the halt address after exactly as
  many cycles as instructions executed.
* For the pipelined processor, the reference predicts the cycle in which each
  instruction reaches ID, from the stall table above. The halt instruction
  must retire in the predicted cycle. The stall cycles the processor reports
  must match the prediction.

`tb/pipeline_examples_tb.sv` runs four textbook pipeline sequences and checks
the retirement cycle of every instruction:

* five independent instructions retire back to back after the fill;
* one producer feeds four consumers with no stall;
* a load followed by users costs exactly one bubble;
* a taken delayed branch costs no cycle.

The end-to-end test `tb/mips_top_tb.sv` runs `mips_top` at its default
sizes. It fails if any mechanism listed under `events`, or a taken branch on
the single-cycle processor, never occurs.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/mips_top_tb.sv \
  --top-module mips_top_tb -o sim
./obj_dir/sim
```

The two packages are named first; `-y` lets Verilator find every module
in the file of the same name. For another block, replace `mips_top_tb` with
that block's testbench. To run
your own program, encode it with the functions in `mips_tb_pkg` (`ADD`,
`SUB`, `ORI`, `LW`, `SW`, `BEQ`, `J`, `NOP`). Load it through the `prog_*`
port during reset, as `run_one` in the processor testbenches does.
