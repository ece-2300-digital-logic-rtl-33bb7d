# TinyRV1 multi-cycle processor

A 32-bit RISC-V-subset processor that executes each instruction as a
sequence of short steps instead of one long clock cycle. Every step moves
exactly one value over a single shared **datapath bus**, so the machine
needs only one ALU, one single-port register file and one single-port
memory, and the clock period is set by the slowest *step* rather than the
slowest *instruction*. The price is a cycles-per-instruction (CPI) above
one: from 4 cycles (`jr`) to 39 cycles (`mul`).

The design follows the multi-cycle processor of the Cornell ECE 2300
course notes (Topic 11, "Multi-Cycle Processors"). Those notes fix the
datapath structure, the names and number of the FSM states, the fetch and
`add` steps and the technology assumptions (single-ported arrays,
idealised combinational memory). The notes leave out the micro-operations
of most states, the instruction encodings and several widths and
encodings. This RTL fills those in; every such choice is listed in
[Departures and own choices](#departures-and-own-choices).

Instructions: `add`, `addi`, `mul`, `lw`, `sw`, `jal`, `jr`, `bne`, plus
two extension instructions built from extra FSM states only:
`add.mm rd, rs1, rs2` (M[R[rd]] <- M[R[rs1]] + M[R[rs2]]) and
`lw.ai rd, imm(rs1)` (R[rd] <- M[R[rs1] + imm]; R[rs1] <- R[rs1] + 4).

## The datapath: everything goes over one bus

```
             +-----------------------------------------------+----> to control unit (IR)
             |        |         |          |                 |
           [PC]     [IR]       [A]     b_sel mux          c_sel mux
             |        |         |      (bus | B<<1)      (bus | C>>1)
             |     imm gen      |         [B]                [C] --> c_lsb
             |        |         |          |
             |        |         |   b_op mux: B, 4, 0, -4
             |        |         +---> ALU <+   (add / cmp) --> eq
             |        |                |
  ===========+========+================+========== datapath bus ===========
                                        |  rf_addr mux (x0/rs1/rs2/rd)  |
                                  [RF: 32 x 32, 1 port]  [WD]-->memreq.data
       memreq.addr <-- bus                                [RD]<--memresp.data
```

Bus sources, each behind its own enable: **PC**, **immediate generator**,
**ALU**, **register file** (read) and **RD** (last memory response). Bus
sinks: PC, IR, A, B, C, WD, the register file (write) and the memory
address. The memory address *is* the bus, so a memory access happens in
the cycle in which its address is on the bus.

| Register | Loads from | Used for |
|---|---|---|
| PC | bus | program counter |
| IR | bus | instruction; read by the control unit and the immediate generator |
| A  | bus | left ALU operand |
| B  | bus or `B << 1` | right ALU operand (through the b_op mux); multiplicand |
| C  | bus or `C >> 1` | multiplier; its bit 0 is the `c_lsb` status signal |
| WD | bus | store data, drives `memreq_data` |
| RD | memory response, in every cycle with a memory request | load data / fetched instruction |

The register file has **one** port whose address comes from a 4-way mux:
`x0`, `rs1`, `rs2` or `rd` of IR. Reading `x0` is how the datapath gets a
zero onto the bus (used to clear A before a multiply).

The ALU adds `A` and the b_op mux output (`B`, `4`, `0` or `-4`), or in
compare mode outputs 1 when they are equal. Its `eq` output is the second
status signal. The control word has 23 bits: 5 bus enables, 6 register
enables, the b, c and b_op selects, the immediate type (I/S/J/B), the ALU
function, the register-file address select and write enable, and the
memory request valid and type (`tinyrv1_mc_pkg::ctrl_t`).

## The control unit: one FSM state per step

Every instruction starts with the same three fetch states and then walks a
chain of states of its own; the last state of every chain returns to F0.

| State(s) | Micro-operation |
|---|---|
| F0 | memreq.addr <- PC (read); A <- PC |
| F1 | IR <- RD |
| F2 | PC <- A + 4; go to the instruction's first state |
| A0, A1, A2 | A <- RF[rs1]; B <- RF[rs2]; RF[rd] <- A + B |
| AI0, AI1, AI2 | A <- RF[rs1]; B <- imm(I); RF[rd] <- A + B |
| M0, M1, M2 | B <- RF[rs1]; C <- RF[rs2]; A <- RF[x0] |
| M3 ... M34 | A <- A + (c_lsb ? B : 0); B <- B << 1; C <- C >> 1 |
| M35 | RF[rd] <- A + 0 |
| L0 ... L3 | A <- RF[rs1]; B <- imm(I); RD <- M[A + B]; RF[rd] <- RD |
| S0 ... S3 | A <- RF[rs1]; B <- imm(S); WD <- RF[rs2]; M[A + B] <- WD |
| JA0, JA1, JA2 | RF[rd] <- PC; B <- imm(J); PC <- A + B |
| JR0 | PC <- RF[rs1] |
| B0, B1 | A <- RF[rs1]; B <- RF[rs2] |
| B2 | compare A with B and, in the same cycle, A <- PC; if equal go to F0 |
| B3, B4, B5 | A <- A - 4; B <- imm(B); PC <- A + B |
| MM0 ... MM8 | A <- RF[rs2]; RD <- M[A]; B <- RD; A <- RF[rs1]; RD <- M[A]; A <- RD; WD <- A + B; A <- RF[rd]; M[A] <- WD |
| LA0 ... LA4 | A <- RF[rs1]; B <- imm(I); RD <- M[A + B]; RF[rd] <- RD; RF[rs1] <- A + 4 |

Three points are easy to miss:

* **A keeps the fetch PC.** F0 loads A with the PC and F2 only reads it,
  so an instruction that does not overwrite A (here `jal`) still has the
  address of its own instruction in A. `jal` uses this: the link value is
  the already incremented PC, the target is A + imm.
* **Why the b_op mux has a -4 input.** By the time `bne` knows it is taken,
  PC already holds PC + 4 and A holds `rs1`. The branch offset is relative
  to the branch itself, so the FSM reloads A from PC (in B2, overlapping
  the compare, because the compare only reads A and B) and subtracts 4
  before adding the offset. A not-taken `bne` leaves after B2.
* **Multiply is shift-and-add over 32 states.** The 36-state chain M0-M35
  has no branches: each of the 32 steps adds either B or 0, chosen by the
  current `c_lsb`. This one select is the only control output that depends
  on a status signal rather than on the state alone. The product is the
  low 32 bits of rs1 x rs2 (signedness does not matter for the low half).

`add.mm` and `lw.ai` show that a complex instruction needs only new
states, no new hardware. In `lw.ai`, A still holds the old `rs1` after the
load, so R[rs1] <- R[rs1] + 4 is correct even when `rd == rs1` (the
increment wins, as the sequential definition requires).

Unknown instruction words go from F2 straight back to F0 (3 cycles, no
effect).

## Cycles, clock period and the two example kernels

| Instruction | add | addi | mul | lw | sw | jal | jr | bne taken | bne not taken | add.mm | lw.ai |
|---|---|---|---|---|---|---|---|---|---|---|---|
| Cycles | 6 | 6 | 39 | 7 | 7 | 6 | 4 | 9 | 6 | 12 | 8 |

**Clock period.** With the unit delays used in the course notes
(4-to-1 mux 8 tau, ALU 64 tau, bus 20 tau, register clock-to-Q 9 tau and
setup 10 tau, memory read 120 tau and setup 120 tau, register-file read
25 tau and setup 20 tau, immediate generator 12 tau, shifter 0 tau), the
longest step of this state assignment is the load address step (L2, and
the reads of `add.mm` and `lw.ai`): A -> b_op mux -> ALU -> bus -> memory
read -> RD setup = 9 + 8 + 64 + 20 + 120 + 10 = **231 tau**. A store step
takes 221 tau, a fetch 159 tau. The delay of the FSM's next-state logic
is not in that table and is not included.

**Vector-vector add** (`dest[i] = src0[i] + src1[i]`, n = 64; loop of
2 `lw`, `add`, `sw`, 4 `addi`, `bne`): 60 cycles per taken iteration,
63 x 60 + 57 = **3837 cycles** for the loop (CPI 6.66), about 886,000 tau
at 231 tau.

**Find** (n = 64, only the first element matches; loop of `lw`, `bne`,
conditional `addi`, 2 `addi`, `bne`): 6 + 40 + 62 x 37 + 34 = **2374
cycles**, about 548,000 tau.

The end-to-end testbench runs both kernels on the RTL and checks these
counts exactly (plus its own setup code: 3861 and 2400 cycles in total).

## Interfaces and encodings

`tinyrv1_mc_top` (processor + memory):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk | in | 1 | clock, all state changes on the rising edge |
| rst | in | 1 | synchronous reset: FSM to F0, PC to `RESET_PC`, datapath registers to 0 |
| memreq_val | out | 1 | a memory request this cycle |
| memreq_type | out | 1 | `MEM_RD` (0) or `MEM_WR` (1) |
| memreq_addr | out | 32 | byte address (the bus value) |
| memreq_data | out | 32 | store data (WD) |
| inst_done | out | 1 | last cycle of an instruction |

Parameters: `MEM_WORDS` (1024), `RESET_PC` (0). The memory has no load
port; put the program and data into `u_mem.m[]` (word index = byte
address / 4) before releasing reset, as the testbench does.
`tinyrv1_mc_proc` exposes the same request signals plus `memresp_data`,
which it expects in the same cycle as the request (combinational memory).

Encodings are the standard RV32I/RV32M ones: `add`/`mul` (opcode 0110011,
funct7 0000000/0000001), `addi` (0010011), `lw` (0000011, funct3 010),
`sw` (0100011, funct3 010), `jal` (1101111), `jr rs1` = `jalr x0, 0(rs1)`
(1100111, the immediate is ignored), `bne` (1100011, funct3 001).
`add.mm` uses the custom-0 opcode 0001011 in R format (funct3 000,
funct7 0); `lw.ai` uses the custom-1 opcode 0101011 in I format (funct3
010).

## Departures and own choices

Fixed by the source design: the bus architecture and its five sources; the
registers PC, IR, A, B, C, WD, RD with the B-shift-left and C-shift-right
paths; the b_op inputs B, 4, 0, -4; the single-port register file with the
x0/rs1/rs2/rd address mux; the 23 control signals and 2 status signals;
the state names and chain lengths (F0-F2, A0-A2, AI0-AI2, M0-M35, L0-L3,
S0-S3, JA0-JA2, JR0, B0-B5 with the early exit after B2); the F0-F2 and
A0-A2 micro-operations; the combinational single-port memory.

Chosen here, because the source leaves it open:

* the micro-operations of every state other than F0-F2 and A0-A2 (table
  above), including the B2 overlap and the use of -4 for `bne`;
* a one-bit ALU function (add / compare), and the eq output valid in every
  cycle;
* the `c_lsb`-dependent b_op select in M3-M34 (the source draws the
  control-signal logic as a function of the state only);
* all binary encodings of selects and states, and the instruction
  encodings; the states, opcodes and micro-operations of `add.mm` and
  `lw.ai`;
* 32 registers with x0 hard-wired to zero; unreset register file and memory;
* RD loading whenever a memory request is made;
* the tri-state bus written as an AND-OR mux that reads 0 when idle, with
  an assertion that at most one source drives it;
* memory size 1024 words, word access only (address bits 1:0 ignored,
  addresses wrap at the memory size);
* the observation output `inst_done`.

Not modelled: the single-cycle and pipelined processors the notes compare
against; sub-word loads/stores; exceptions.

## Files

| File | Contents |
|---|---|
| `rtl/tinyrv1_mc_pkg.sv` | control word, select enums, state enum, opcodes |
| `rtl/tinyrv1_mc_top.sv` | processor + memory |
| `rtl/tinyrv1_mc_proc.sv` | control unit + datapath |
| `rtl/tinyrv1_mc_ctrl.sv` | FSM: state register, transition logic, control signal logic |
| `rtl/tinyrv1_mc_dpath.sv` | registers, muxes, shifters, bus assertion |
| `rtl/tinyrv1_bus.sv`, `tinyrv1_alu.sv`, `tinyrv1_imm_gen.sv`, `tinyrv1_regfile.sv` | datapath units |
| `rtl/tinyrv1_comb_mem.sv` | combinational-read memory |
| `tb/tinyrv1_asm_pkg.sv` | instruction encoders (a tiny assembler) |
| `tb/tinyrv1_progs_pkg.sv` | test programs and per-instruction cycle counts |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/tinyrv1_mc_random_tb.sv` | random programs checked against an instruction-level model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). To build and run the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tinyrv1_mc_top_tb \
    rtl/tinyrv1_mc_pkg.sv tb/tinyrv1_asm_pkg.sv tb/tinyrv1_progs_pkg.sv \
    tb/tinyrv1_mc_top_tb.sv -o sim
./obj_dir/sim
```

Swap the top module and testbench file for any other `*_tb`. The
end-to-end test runs at the default parameters in well under a second.
It runs a program that uses every instruction, then vvadd and find with
n = 64. It checks memory results and exact cycle counts, and reports how
often each mechanism happened: each instruction, taken and not-taken
branches, multiply steps that add B and that add 0, and data reads and
writes. The processor testbench checks the cycle count of every single
instruction it executes; the control-unit testbench checks the chain
length, the memory requests and the multiply-step controls of each
instruction in isolation.

`tinyrv1_mc_random_tb` generates 40 random programs that mix all eleven
instructions, including `bne` with equal and unequal operands and
forward jumps. It runs each on the RTL and on an instruction-level model
in the testbench. It then compares the data memory, the final value of
every register and the total cycle count. Branches and jumps in these
programs only go forward, so backward loops are covered only by the
vvadd and find kernels.

What has been verified is the behaviour described above, by simulation.
Nothing has been synthesised to gates or timed; the clock-period figure is
the unit-delay estimate given earlier.
