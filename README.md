# Five-stage RISC pipeline with hazard detection and data forwarding

A 32-bit in-order RISC core whose five pipeline stages (fetch, decode,
execute, memory, write-back) run one instruction per clock even when each
instruction uses the result of the one just before it. Without help, an
instruction that reads a register in decode would have to wait up to three
cycles for an earlier instruction to write it back. Here, a hazard detection
unit compares the source registers of the instruction in decode with the
destination registers of the three instructions ahead of it. Forwarding
multiplexers then supply the value from wherever it currently is in the
pipeline. Only one case still costs a cycle: a load whose result is needed by
the very next instruction.

The core is Harvard: it has separate instruction and data buses, and both
memories sit outside the core.

## Pipeline timing

An instruction fetched in cycle *n* is decoded in *n+1*, executes in *n+2*,
uses the data bus in *n+3*, and is written to the register bank at the end of
*n+4*:

```
cycle      1    2    3    4    5    6    7
I1         F    D    E    M    W
I2              F    D    E    M    W
I3                   F    D    E    M    W
```

Per instruction class:

| class             | cycles in the pipeline | note                                      |
|-------------------|------------------------|-------------------------------------------|
| MVI, ADD, SUB     | 5                      | result written back at the end of W       |
| LDBI (load)       | 5                      | +1 interlock if the next instruction uses the result |
| STR (store)       | 4                      | data written to memory in M, nothing in W |
| BNE, taken        | 3                      | target fetched while BNE executes         |
| BNE, not taken    | 5 (no effect)          | no penalty                                |

## Hazard detection and forwarding (`hazard_fwd_unit`)

This is the heart of the design. Take a source register *r* of the
instruction in decode. Only the instructions in execute (E), memory (M) and
write-back (W) can still hold a newer value of *r* than the register bank. An
instruction four places ahead has already written the bank at the end of the
previous cycle. So each source is compared with three destinations, six
comparators in all. An instruction only counts as a producer if it really
writes a register: a store or a branch never does. When several of them match,
the youngest one wins.

| youngest matching producer | where its value is when the consumer is in decode | action |
|---|---|---|
| in E, not a load | being computed right now | set a *forward-in-execute* flag. In the next cycle the consumer is in E and the producer's result sits in the EX/MEM register; the execute-side multiplexer takes it from there. |
| in E, a load     | its data only arrives in the next cycle's memory access | **interlock**: fetch and decode hold, and a bubble enters execute. In the next cycle the load is in M and the row below applies. |
| in M             | EX/MEM result, or for a load the data returned on `mem_acc_data_i` in this cycle | the decode-side multiplexer takes it |
| in W             | MEM/WB register, written to the bank at the end of this cycle | the decode-side multiplexer takes it |
| none             | register bank | register bank output |

Take the sequence `MVI R3,427936 ; MVI R4,432544 ; ADD R5,R3,R4`. When ADD is
in decode, the MVI for R3 is in M, so R3 is forwarded into decode. The MVI for
R4 is in E, so R4 is flagged and replaced one cycle later in execute. The ADD
therefore needs no stall and writes R5 = 860480 four cycles after it was
fetched.

With `LDBI R5,R3,13223 ; ADD R6,R4,R5` the ADD waits exactly one cycle. The
LDBI puts the address 441159 on the data bus. The word that comes back
(336250197 in the test) is forwarded straight into the waiting ADD's decode,
which gives R6 = 336682741. If one unrelated instruction sits between the
load and its user, there is no interlock at all.

The unit is purely combinational. Its decode-side multiplexers choose between
M, W and the register bank. Its execute-side multiplexers choose between the
operand captured at decode and the value of the instruction now in M. The
execute side takes `m_value`, the memory-stage value, which is the load data
for a load. The interlock rule means this path never actually carries load
data, but using it keeps the multiplexer uniform.

## Branches

BNE compares its two registers in execute. The operands come through the same
forwarding paths, so a branch can test values produced by the two instructions
just before it. If the branch is taken:

* `pc_ss` shows the target in the same cycle, so the target is fetched at
  once;
* the one younger instruction, which is in decode, is turned into a bubble;
* the PC continues from target + 1.

So the program `MVI R2,427040 ; MVI R3,427936 ; BNE R2,R3,34647` produces the
instruction address sequence 0, 1, 2, 3, 34647, 34648, … The instruction at
address 3 is discarded. The branch target is absolute. There is no branch
prediction: a not-taken branch simply continues.

## Instruction set and encoding

The instruction set is the one the scheme is built around. The bit layout and
opcode numbers are this implementation's own choices. The immediate fields are
sized so that all the example constants fit.

```
[31:26] opcode
MVI  1 : [25:22] rd     [21:0]  imm22, zero-extended        rd = imm
ADD  2 : [25:22] rd     [21:18] rs1   [17:14] rs2           rd = rs1 + rs2
SUB  3 : [25:22] rd     [21:18] rs1   [17:14] rs2           rd = rs1 - rs2
LDBI 4 : [25:22] rd     [21:18] base  [17:0]  off18, signed rd = mem[base + off]
STR  5 : [25:22] rdata  [21:18] base  [17:0]  off18, signed mem[base + off] = rdata
BNE  6 : [25:22] rs1    [21:18] rs2   [17:0]  target18      if rs1 != rs2: pc = target
others (0 = NOP) do nothing
```

There are 16 registers of 32 bits, R0 to R15. R0 is an ordinary register.
Instruction addresses count words: 0, 1, 2, … The data address is the full
32-bit sum of base and offset. Arithmetic wraps modulo 2^32, and there are no
flags or exceptions. `risc_pkg` provides the encoder functions `enc_mvi`,
`enc_rrr` and `enc_rri`.

## Interface (`toplevel`)

| port             | dir | width | meaning |
|------------------|-----|-------|---------|
| `clock`          | in  | 1  | clock, all state changes on the rising edge |
| `reset`          | in  | 1  | synchronous, active high: empties the pipeline, clears registers, PC = 0 |
| `pc_ss`          | out | 32 | instruction word address |
| `instr_i`        | in  | 32 | instruction at `pc_ss`, needed in the same cycle |
| `mem_acc_add_o`  | out | 32 | data address during a load or store, 0 otherwise |
| `mem_acc_data_o` | out | 32 | store data while `mem_acc_wr_o`, 0 otherwise |
| `mem_acc_wr_o`   | out | 1  | store: memory writes `mem_acc_data_o` at `mem_acc_add_o` on this clock edge |
| `mem_acc_rd_o`   | out | 1  | load: memory must drive `mem_acc_data_i` in this same cycle |
| `mem_acc_data_i` | in  | 32 | load data |

Both memories are expected to answer combinationally, within the cycle in
which they are addressed. There is no wait or ready signal, so a slower
memory would need a stall input added to the core. `reset` must be held for
at least one clock edge.

## Module structure

| file | content |
|---|---|
| `rtl/risc_pkg.sv`        | widths, opcodes, `ctrl_t` control bundle, bubble constant, encoders |
| `rtl/toplevel.sv`        | the core: ID/EX and EX/MEM registers, stage wiring, bubble insertion |
| `rtl/fetch_stage.sv`     | PC, instruction address, branch redirect, IF/ID register |
| `rtl/decoder.sv`         | instruction word → `ctrl_t` |
| `rtl/reg_bank.sv`        | 16 × 32 register file, 2 read / 1 write, parameters `XLEN`, `NREGS` |
| `rtl/hazard_fwd_unit.sv` | comparators, interlock, decode and execute forwarding multiplexers |
| `rtl/alu.sv`             | add, subtract, immediate move, base + offset, not-equal compare |
| `rtl/mem_stage.sv`       | data bus, load data select, MEM/WB register (write-back) |

The core's width and register count come from `risc_pkg` (`XLEN = 32`,
`NREGS = 16`). The control bundle and the encoding are tied to those values,
so changing them means editing the package and the field layout together.

## What follows the original scheme and what is chosen here

The following come from the original scheme:

* the five stages and their order;
* comparing each source with the destinations of the three preceding
  instructions;
* forwarding into decode from a producer two places ahead, and into execute
  from the instruction directly ahead;
* forwarding load data, with exactly one interlock cycle when the very next
  instruction uses it;
* the cycle counts for stores (4) and taken branches (3);
* the 32-bit width and the 16 registers;
* the instructions MVI, ADD, SUB, LDBI, STR and BNE with absolute target;
* the signal names `clock`, `reset`, `pc_ss` and `mem_acc_*`;
* the example programs and their results.

The following are chosen here:

* the instruction encoding and the immediate extensions;
* memories that answer in the same cycle;
* the names and behaviour of the strobes `mem_acc_wr_o` and `mem_acc_rd_o`;
* bus values of 0 when idle;
* synchronous reset that clears the registers;
* R0 as a normal register;
* the write-back forwarding path, which is needed because the register bank
  returns the old value during the cycle in which it is written;
* youngest-match priority;
* resolving branches in execute, with the target driven onto `pc_ss` in the
  same cycle;
* merging write-back into the memory-stage module;
* STR as a store of its first register (one description of STR reads like a
  load; its role as the store instruction was followed);
* ignoring unknown opcodes.

The design has no control or status registers, interrupts, exceptions,
byte or half-word accesses, or memory wait states.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_toplevel` runs the full-size core (no parameter overrides) with
  behavioural memories. It first runs the example programs: dependent MVI/ADD
  with no stall; load then use, with exactly one interlock and the load
  address and data above; a store that drives address 105 and data 77 in its
  fourth cycle; and the taken BNE with its address trace and discarded
  instruction. Then it runs 200 random programs of 150 instructions each.
  These use every instruction with heavy reuse of R0 to R5 and forward
  branches. An instruction-level reference model in the testbench predicts
  the final registers, the sequence of stores, the number of interlock
  cycles and the number of taken branches. The testbench counts every
  mechanism and fails if one never occurs: forwarding into execute, into
  decode from M, and from W; load-data forwarding; interlocks; taken branches;
  stores.
* `tb_hazard_fwd_unit` compares the unit with an independent reference over
  5000 random pipeline states, plus the example dependence pattern.
* `tb_fetch_stage`, `tb_decoder`, `tb_reg_bank`, `tb_alu` and `tb_mem_stage`
  test their modules on their own with directed and random stimulus.

All testbenches pass. Each one also fails against a deliberately broken copy
of its module.

To simulate with Verilator, list the package first:

```
verilator --binary --timing --assert -Irtl rtl/risc_pkg.sv \
    rtl/fetch_stage.sv rtl/decoder.sv rtl/reg_bank.sv rtl/hazard_fwd_unit.sv \
    rtl/alu.sv rtl/mem_stage.sv rtl/toplevel.sv tb/tb_toplevel.sv \
    --top-module tb_toplevel -o sim
./obj_dir/sim
```

A unit testbench needs only `rtl/risc_pkg.sv`, its module and its `tb/` file.
The whole `tb_toplevel` run takes well under a second.
