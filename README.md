# Five-stage MIPS pipeline with forwarding and hazard control

This is a classic five-stage MIPS pipeline (IF, ID, EX, MEM, WB) for a 32-bit
integer subset of the MIPS instruction set. Two units let software run
without hand-inserted nops:

- a **forwarding unit** feeds results that have not been written back yet
  into the ALU operands;
- a **hazard unit** stalls and flushes the front of the pipeline around
  branches, jumps and `jr`.

An earlier version of the same datapath without these units needed three
nops after every read-after-write pair and one to three nops after every
control transfer. With them, the only software rule left is one independent
instruction (or nop) between a `lw` and the first use of the loaded register.
That earlier version is still available: set the top-level parameter
`HAZARD_UNITS` to 0 (see "Running without the hazard units" below).

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is written
for Verilator and for Yosys with the slang front end.

## Instruction set

| class | instructions |
|---|---|
| R-type ALU | `add addu sub subu and or xor nor slt sltu` |
| shifts | `sll srl sra` (by `shamt`), `sllv srlv srav` (by `rs[4:0]`) |
| immediate | `addi slti sltiu andi ori xori lui` |
| memory | `lw sw` (word only) |
| control | `beq bne j jal jr` |
| system | `syscall` (halts the core) |

Encodings are the standard MIPS32 ones, and there are no branch delay slots.
Signed and unsigned add and subtract behave the same way: both wrap, and
there are no exceptions. `andi`, `ori` and `xori` zero-extend their
immediate, while every other immediate is sign-extended. Any other opcode
executes as a no-op.

## Pipeline organisation

```
 IF             ID                     EX                      MEM          WB
 PC --> IMEM -> IF/ID -> Control       ID/EX -> fwd muxes      EX/MEM ->    MEM/WB ->
 PC+4           RegFile read             -> ALUSrc mux -> ALU  DMEM         MemtoReg mux
                Sign/zero/LUI extend     ALU Ctrl, Zero                     JAL mux (PC+4)
                RegDst / $31 mux         branch decision, jr                -> RegFile write
                jump target, branch target
```

Each pipeline register is one packed struct (`mips_pkg`). Its fields follow
the datapath:

| register | fields |
|---|---|
| IF/ID | PC+4, instruction |
| ID/EX | control word, Data1 (rs), Data2 (rt), PC+4, branch target, write register, extended immediate, instruction |
| EX/MEM | RegWrite, MemtoReg, MemWr, JAL, write register, ALU result, PC+4, store data, instruction |
| MEM/WB | RegWrite, MemtoReg, JAL, write register, DMEM out, ALU result, PC+4, instruction |

PC+4 travels all the way to WB. `jal` writes it to `$31` there, through the
final JAL mux after the MemtoReg mux.

The write register is picked in ID: `rd` for R-type, `rt` for immediates and
loads, and `$31` for `jal`.

`lui` is executed as `$0 + (imm << 16)`. The extender produces the shifted
immediate, and the ALU adds it to `rs`, which the encoding fixes to `$0`.

Where the work happens:

- The register file is read combinationally in ID.
- The data memory is read combinationally in MEM.
- Both are written on the rising clock edge.

## Forwarding

`forward_unit` compares `rs` and `rt` of the instruction in EX against the
destinations of the two older instructions:

- **EX/MEM** (one instruction ahead). The forwarded value is the ALU result,
  or PC+4 when that instruction is a `jal`.
- **MEM/WB** (two ahead). The forwarded value is the final write-back data,
  so a loaded word can be forwarded from here.

The nearer producer wins, and `$0` is never forwarded. For each operand the
unit outputs a select (`fwd_a_sel`, `fwd_b_sel`) and a value
(`fwd_a_result`, `fwd_b_result`). Operand A feeds the ALU and is also the
`jr` target. Operand B is forwarded *before* the ALUSrc mux, so the data of a
`sw` is forwarded too.

The register file is write-through: a read in ID of the register being
written in WB returns the new value. This covers producers three
instructions ahead. Together with the two forwarding paths, any ALU result
is usable by the very next instruction.

**The one remaining data hazard is load-use.** A `lw` result exists only at
the end of MEM. No interlock detects an instruction that uses it
immediately, so at least one instruction must come between a `lw` and its
first use. The bubble-sort test uses two nops, as the original program did.

## Control flow: stalls and flushes

Conditional branches resolve in EX from the ALU `Zero` flag:
`taken = Branch & (Zero != BNE)`. Their target, PC+4 + (imm << 2), is
computed in ID and carried in ID/EX. `j` and `jal` redirect the PC from ID.
`jr` redirects from EX, using the forwarded value of `rs`.

`hazard_unit` is purely combinational. It drives `pc_we`, `if_id_we`,
`if_id_rst` and `id_ex_rst`, where "rst" is a synchronous clear to an
all-zero bubble. Its rules, in priority order:

| condition | PC | IF/ID | ID/EX | effect |
|---|---|---|---|---|
| taken branch or `jr` in EX | load target | clear | clear | wrong-path instruction removed |
| `syscall` in ID | hold | hold | clear | fetching stops; older instructions drain |
| `beq`/`bne`/`jr` in ID | hold | clear | - | nothing follows the branch until it resolves |
| `j`/`jal` in ID | load jump target | clear | - | the one instruction fetched behind the jump is removed |

Each instruction costs one cycle, plus these bubbles:

| instruction | extra cycles |
|---|---|
| `beq`/`bne`, not taken | 1 |
| `beq`/`bne`, taken | 2 |
| `jr` | 2 |
| `j`/`jal` | 1 |
| everything else | 0 (with the load-use rule above) |

Because the branch holds the PC for a cycle while it sits in ID, the
instruction after it is never fetched speculatively into ID. When the branch
resolves, at most the single instruction in IF has to be discarded. An
assertion in the top (`a_redirect_alone`) checks that a redirect from EX
never meets a branch, jump, `jr` or `syscall` in ID.

`halt` goes high when a `syscall` reaches ID. The core then stays in that
state, and the older instructions finish within the next three clock
cycles. Reset (`rst_n` low on a clock edge) restarts execution at
`RESET_PC`.

## Running without the hazard units

With `HAZARD_UNITS = 0` the top ignores the forwarding selects, so each
operand is the register value read in ID. It also replaces the hazard unit's
outputs: the PC and IF/ID always load, and nothing is cleared. The one
exception is `syscall`, which is still held in ID so that the core halts.
Branches still redirect from EX and jumps from ID, but the instructions
fetched behind them execute. Software must therefore keep:

| situation | nops needed |
|---|---|
| register written, then read | 3 between them (the register file writes through, so a producer three slots ahead is already visible) |
| after `j`/`jal` | 1 |
| after `jr` | 2 |
| after `beq`/`bne` | 2 (the original programs use 3; the third is harmless) |

Every instruction then costs one cycle, nops included. The nops behind a
taken branch or `jr` add two cycles, and the nop behind a jump adds one.

## Memories and address map

| memory | parameter | default | mapping |
|---|---|---|---|
| instruction memory | `IMEM_WORDS` | 1024 words | word index = PC[11:2]; text starts at `RESET_PC` = 0x00400000 |
| data memory | `DMEM_WORDS` | 1024 words | word index = address[11:2]; data segment 0x10010000 is index 0 |

Upper address bits are ignored, so each memory repeats across the address
space. The instruction memory has no write port. It is filled from
`IMEM_INIT`, a `$readmemh` file with one word per line, or a testbench writes
`u_imem.mem[]` directly. The data memory has no reset.

## Top-level interface (`mips_pipeline`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is rising-edge |
| `rst_n` | in | 1 | synchronous active-low reset: PC, pipeline registers, register file |
| `pc` | out | 32 | fetch address |
| `halt` | out | 1 | `syscall` held in ID |
| `reg_wr_en`, `reg_wr_addr`, `reg_wr_data` | out | 1, 5, 32 | write-back bus to the register file |
| `dmem_wr`, `dmem_addr`, `dmem_data`, `dmem_out` | out | 1, 32, 32, 32 | data-memory write enable, address, store data, read data |

## Source files

| file | role |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, function codes, control word, ALU codes, pipeline-register structs |
| `rtl/mips_pipeline.sv` | top: wiring of all stages, forwarding muxes, write-back muxes, `HAZARD_UNITS` switch |
| `rtl/pc_reg.sv`, `rtl/imem.sv` | fetch |
| `rtl/if_id_reg.sv`, `rtl/id_ex_reg.sv`, `rtl/ex_mem_reg.sv`, `rtl/mem_wb_reg.sv` | pipeline registers with write enable and clear |
| `rtl/control.sv`, `rtl/reg_file.sv`, `rtl/imm_ext.sv` | decode |
| `rtl/alu_ctrl.sv`, `rtl/alu.sv` | execute |
| `rtl/forward_unit.sv` | operand forwarding |
| `rtl/instr_ctrl.sv` | branch decision and next-PC source |
| `rtl/instr_addr.sv` | jump and branch targets, next-PC mux |
| `rtl/hazard_unit.sv` | stalls and flushes |
| `rtl/dmem.sv` | data memory |

Each file opens with a comment giving the block's behaviour, interface and
timing.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a watchdog. To build and run one, for example the
bubble sort:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv -y rtl -y tb +libext+.sv \
  tb/tb_bubble_sort.sv --top-module tb_bubble_sort -Mdir obj_bubble
./obj_bubble/Vtb_bubble_sort
```

`tb/mips_asm_pkg.sv` holds two helpers for the processor-level tests:

- a small assembler: one function per instruction, such as `ADD(d,s,t)` or
  `LW(t,off,s)`;
- `iss_run`, an instruction-at-a-time reference model. It returns the final
  registers and the number of branches, taken branches, jumps and `jr`
  executed, from which the expected cycle count follows.

| testbench | what it runs |
|---|---|
| `tb_mips_pipeline` | every instruction. Back-to-back dependency chains through each forwarding path and the write-through. Taken and not-taken `beq`/`bne`, `j`, a `jal`/`jr` loop, a load followed by a use two instructions later, `syscall`. Compares all registers and memory with the reference model and checks the halt cycle. Counts each mechanism (each forwarding path, load forwarding, write-through, branch stall, taken-branch flush, `jr` redirect, jump flush, halt) and fails if one never occurs. |
| `tb_demo_program` | the demonstration sequence, using its exact instruction words and absolute jump targets (`j` 0x08100033, `jal` 0x0C100035). Checks that `jal` links 0x004000D4. |
| `tb_bubble_sort` | bubble sort of 1, 9, 6, 3, 5, 8, -3, 11, 2, 10 at 0x10010000, at default parameters. Checks the sorted array, the ten read-back loads on the memory bus, the reference model, and the cycle count (579 instructions in 749 cycles, CPI 1.29). |
| `tb_nop_programs` | two cores side by side, `HAZARD_UNITS` = 0 and 1, running nop-padded programs: the demonstration sequence and the bubble sort. The demonstration is laid out so that its `j` and `jal` words (08100040, 0C100045) and the link value 0x00400110 are those of the earlier core's demonstration. Both cores are compared with the reference model and their halt cycles are checked. The padded sort takes 1425 cycles without the units, against 749 for the unpadded sort with them. A short unpadded program confirms that without the units a dependent `add` reads the stale register and the two instructions behind a taken `beq` execute. |
| `tb_<block>` | one per block. Each drives the block directly and compares against values computed in the testbench. |

## Design choices and departures

The pipeline structure, the stage of each decision, and the unit names and
signals (`pc_we`, `if_id_we`, `if_id_rst`, `id_ex_rst`, ForwAsel/ForwAResult,
Branch/BNE/Jump/JAL/JR, MemtoReg, RegDst) follow the original design. The
following are this implementation's own choices:

- **Memory sizes, address decoding and reset behaviour** were not specified
  (see the table above).
- **Register-file write-through** lets a result three instructions ahead be
  read in ID.
- **Zero extension** for `andi`/`ori`/`xori` follows the MIPS ISA. The
  original datapath only draws sign extension and the LUI shift.
- **The `jr` target** is the forwarded `rs` value in EX. The original takes
  the ID/EX Data1 value directly, so it needs the `jr` source register to be
  settled.
- **Store data** is forwarded, because the operand-B forwarding mux sits
  before the ALUSrc mux.
- **Jump flush:** the wrong-path instruction behind `j`/`jal` is removed by
  clearing IF/ID in the jump's ID cycle. The original clears ID/EX one cycle
  later, which removes the same instruction.
- **Taken-branch resolution:** a branch in EX flushes IF/ID and ID/EX when
  taken. The original only describes the stall in ID.
- **Halting on `syscall`** (hold PC and IF/ID, drain the rest) is this
  design's mechanism.
- **The EX/MEM and MEM/WB registers** have the same enable and clear inputs,
  but no hazard rule needs them. The top ties them to "always load, never
  clear".
- **No load-use interlock**, as in the original: software keeps the gap.
- **`HAZARD_UNITS = 0`** reproduces the earlier core without forwarding or
  hazard control. It is the same RTL with both units' outputs overridden, not
  a separate datapath. It keeps the `syscall` hold, which is this design's
  halt mechanism.

The original implementation was reported to close timing at 35.46 MHz on its
FPGA flow. The longest path ran from ID/EX through forwarding, the ALU and
the hazard unit back to IF/ID. The earlier version without the units
reached 50.5 MHz, with a path from ID/EX through the ALU and branch decision
to the next-PC mux. This RTL has the same structure and hence the same kinds
of path, but no timing constraints are included.
