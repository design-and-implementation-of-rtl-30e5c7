# A 32-bit five-stage pipelined RISC processor

This is a small MIPS-style integer processor. Each instruction goes through
five stages: fetch (IF), decode and register read (ID), execute (EX), memory
(MEM) and write-back (WB). There is one stage per clock, so a new instruction
can start on every cycle. The machine has 32-bit data and instructions, eight
general-purpose registers, separate instruction and data memories, and a
small set of I/O ports reached by dedicated IN/OUT instructions.

The pipeline is deliberately bare. It has no forwarding network and no
interlock. Branches are decided in the decode stage, and the instruction
behind a branch always executes. Correct ordering is the job of whoever
writes the program. The section on scheduling explains this. It is the part
to read first.

## Instruction formats

All instructions are 32 bits wide. Register fields are 5 bits wide. With
eight registers, only the low three bits of a register field are used.

| format | 31:26  | 25:21 | 20:16 | 15:11 | 10:6  | 5:0   |
|--------|--------|-------|-------|-------|-------|-------|
| R      | opcode | rs    | rt    | rd    | shamt | funct |
| I      | opcode | rs    | rt    | imm16 (15:0) |||
| J      | opcode | target26 (25:0) |||||
| I/O    | opcode | rs    | rd    | imm16 (15:0) |||

The immediate is always sign-extended to 32 bits, for ANDI and ORI as well.

### Instruction set and encodings

| instruction        | opcode | funct | effect |
|--------------------|--------|-------|--------|
| ADD rd,rs,rt       | 00 | 20 | rd = rs + rt |
| SUB rd,rs,rt       | 00 | 22 | rd = rs - rt |
| AND/OR/XOR/NOR     | 00 | 24/25/26/27 | bitwise |
| SLT rd,rs,rt       | 00 | 2A | rd = (signed rs < rt) |
| SLL/SRL/SRA rd,rs,rt | 00 | 04/06/07 | rd = rs shifted by rt[4:0] |
| SLLI/SRLI/SRAI rd,rs,shamt | 00 | 00/02/03 | rd = rs shifted by shamt |
| ADDI rt,rs,imm     | 08 | – | rt = rs + imm |
| SUBI rt,rs,imm     | 09 | – | rt = rs - imm |
| ANDI / ORI         | 0C / 0D | – | rt = rs & imm, rs \| imm |
| LW rt,imm(rs)      | 23 | – | rt = mem[rs + imm] |
| SW rt,imm(rs)      | 2B | – | mem[rs + imm] = rt |
| BEQZ rs,off        | 04 | – | if rs == 0: branch |
| BNEZ rs,off        | 05 | – | if rs != 0: branch |
| J target26         | 02 | – | jump |
| IN rd,imm(rs)      | 30 | – | rd = port[rs + imm] |
| OUT rd,imm(rs)     | 38 | – | port[rs + imm] = rd |

Opcodes and function codes are in hexadecimal. They follow MIPS where MIPS
has the same operation. SUBI, IN and OUT have no MIPS counterpart, so their
codes were picked freely. Unlike MIPS, every shift shifts `rs`. The
register-amount shifts have the plain names SLL, SRL and SRA, so
`SRL R1,R2,R3` means R1 = R2 >> R3. Any opcode or function code not in this
table decodes to a bubble and does nothing. The word `0x00000000` is
`SLLI r0,r0,0`, which is the NOP.

The branch target is the address of the instruction after the branch plus
the sign-extended offset. The offset is in bytes and is not shifted. A jump
goes to `{npc[31:28], target26, 2'b00}`, where `npc` is the address of the
instruction after the jump. Register 0 always reads as zero.

## The pipeline

```
 IF            ID                      EX             MEM              WB
 PC --> IMEM --IR--> decode             ALU(A,B) ---->  data memory ---> mux --> register file
  ^  +4       |     register file ----> B mux          I/O ports    ---> (ALU/mem/port)
  |           |     sign-extend  ---->
  +-- mux <---+---- Zero? + target adder (branch/jump resolved here)
```

The modules, in pipeline order:

* `pc_unit`: the PC, its +4 adder and the next-PC multiplexer.
* `instruction_memory`: has a synchronous read. Its output register *is*
  the instruction half of the IF/ID register. A `pipe_reg` holds the
  matching PC + 4.
* `control_unit`: turns the instruction into a control word (`ctrl_t` in
  `risc_pkg`). The control word travels down the pipeline with the
  instruction. An all-zero control word is a bubble.
* `register_file`: two combinational read ports used in ID and one write
  port used in WB.
* `sign_extend`: widens the 16-bit immediate to 32 bits.
* `branch_unit`: tests R[rs] for zero, adds the offset and forms the jump
  target. Its redirect loads the PC at the end of ID.
* `alu`: operand A is R[rs]. Operand B is R[rt], the immediate or shamt,
  chosen in `risc_cpu`.
* `data_memory` and `io_port`: both are addressed by the ALU result. Their
  read registers act as the MEM/WB load-data register.
* `pipe_reg`: a generic registered struct. It is used for IF/ID (PC + 4),
  ID/EX, EX/MEM and MEM/WB.
* `risc_cpu`: the top level. It wires the modules together and holds the two
  data multiplexers.

### Timing

After reset is released, instruction k of a straight-line run is fetched at
rising edge k+1. It writes its result at rising edge k+5. A run of N
instructions therefore completes in N+4 cycles, one instruction per clock.
Both testbenches check these edge numbers.

The data memory is enabled only in cycles where a load or a store is in the
MEM stage. On all other cycles the array and its read register stay idle.
This is a power measure for block-RAM targets. All resets are synchronous.
The data memory array itself has no reset.

## Scheduling rules (hazards)

No hardware detects or resolves a hazard, so a program must obey two rules.

1. **Data distance of three.** A result becomes visible to an instruction in
   ID during the same cycle that the producer is in WB. The register file
   passes a value being written straight to its read ports. So a consumer
   must come **at least three instructions after** its producer, with two
   independent instructions or NOPs between them. This holds for ALU
   results, loads and IN. It also holds for the register that a branch
   tests, because that register is read in ID.
2. **One delay slot.** Branches and J are resolved in ID. By then the next
   instruction has already been fetched, and it always executes. Fill the
   slot with useful work or a NOP. Do not put a branch in a delay slot.

Example, a counted loop that writes a running sum to port 2:

```
16: ADD  r5, r5, r1
17: SUBI r3, r3, 1
18: NOP
19: NOP
20: BNEZ r3, -20       ; back to word 16; r3 was written 3 instructions earlier
21: OUT  r5, 2(r0)     ; delay slot, runs on every pass
```

Breaking either rule does not hang the machine, but it silently uses stale
register values.

## I/O ports

`io_port` has `NUM_PORTS` (default 4) 32-bit output registers and the same
number of inputs. The port number is the low two bits of `rs + imm`. After an
OUT, the value appears on `io_out` at the next edge. At the same edge,
`io_out_strobe` pulses for one cycle with `io_out_sel`. IN samples `io_in`
at the end of its MEM stage. The inputs are not synchronised: a device on an
unrelated clock needs its own synchroniser.

## Top-level interface (`risc_cpu`)

| port | dir | width | use |
|------|-----|-------|-----|
| clk, rst | in | 1 | clock; synchronous active-high reset (PC = 0, pipeline = bubbles, registers = 0) |
| prog_we, prog_addr, prog_data | in | 1, 32, 32 | write one instruction word (byte address); use while rst is high |
| io_in | in | 4 x 32 | input ports |
| io_out | out | 4 x 32 | output ports |
| io_out_strobe, io_out_sel | out | 1, 2 | write pulse and port number |
| pc | out | 32 | current fetch address |

Parameters: `IMEM_DEPTH` = 256 words, `DMEM_DEPTH` = 256 words,
`NUM_REGS` = 8 and `NUM_PORTS` = 4. The data width is `XLEN` = 32, set in
`risc_pkg`.

## Where this design makes its own choices

These parts come from the processor's specification:

* the five stages and the four pipeline registers;
* the 32-bit datapath and the eight registers;
* the four instruction formats and their bit fields;
* the 16-to-32-bit sign extension;
* branch resolution in ID with a zero test;
* ALU select 0 = add and 1 = subtract;
* the worked instructions ADD, SRL, ADDI, SUBI, LW and SW;
* enabling the data RAM only on access;
* synchronous resets.

These parts are choices made here:

* all opcode and function codes, and the extra ALU operations;
* the absence of forwarding and interlocks, with the scheduling rules above
  instead;
* the branch delay slot;
* the meaning of IN and OUT, the port count and the strobe;
* the memory depths;
* the program-load port;
* register 0 reading as zero.

The ALU's `carry_out` is the carry of A + B, whatever operation is selected.
The processor does not use it.

Known limits:

* Only word loads and stores exist.
* There are no interrupts or exceptions.
* Register fields wider than three bits wrap onto the eight registers.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_alu` | the two reference ALU cases at 8 bits (1+1 = 2 and 2-1 = 1, carry 0); 2000 random 32-bit cases against a model |
| `tb_register_file` | random reads and writes against a shadow array; r0 stays zero; same-cycle write-before-read; reset |
| `tb_sign_extend` | all 65536 immediates |
| `tb_pc_unit` | +4 steps and random redirects |
| `tb_instruction_memory`, `tb_data_memory` | read latency, enables, reset |
| `tb_io_port` | port writes, reads and the strobe |
| `tb_pipe_reg` | enable, clear and reset with a struct payload |
| `tb_control_unit` | every instruction's control word; undefined codes decode to a bubble |
| `tb_branch_unit` | zero test, both branches, targets, jump |
| `tb_risc_cpu` | a program of about 45 instructions covering every instruction class, loops, taken and untaken branches, jumps, delay slots, IN/OUT, loads and stores; compared with an instruction-level model in the testbench; checks write-back edges; counts each mechanism and fails if one never happens |
| `tb_paper_examples` | ADD/SRL R1,R2,R3, ADDI/SUBI R1,R2,6 and SW/LW R1,R2,8 with hand-computed results and exact write-back cycles |

To run a testbench with Verilator, for example the full processor:

```
verilator --binary --timing rtl/risc_pkg.sv rtl/*.sv tb/tb_risc_cpu.sv \
          --top-module tb_risc_cpu -Mdir obj && ./obj/Vtb_risc_cpu
```

For a unit testbench, replace the testbench file and the top name. `risc_pkg.sv`
must come first. Both processor-level testbenches run at the default
parameters and finish in well under a second. To load your own program, hold
`rst` high, write the words through `prog_*`, and release `rst`. The
testbenches show a small assembler made of SystemVerilog functions
(`R()`, `I()`, `J()`, `B()`).
