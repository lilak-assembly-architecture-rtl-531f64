# LilaK — a five-stage pipelined 16-bit teaching processor

LilaK ("LilaKiller") is a small load-store processor meant for people who
are learning how machine code runs on hardware. Every instruction is one
16-bit word with a 4-bit opcode, there are sixteen 16-bit registers, and the
machine runs a classic five-stage pipeline (fetch, decode, execute, memory,
writeback) that completes one instruction per clock once it is full.

The hardware is kept deliberately simple. It has no stall, flush or hazard
detection logic. It has only a forwarding unit for operands at distance one
and two. Everything else is left to the assembler, which inserts no-ops.
Keep this in mind when you write or generate programs for this core; the
section *Hazards* explains it in full.

This repository contains synthesizable SystemVerilog for the whole
processor, one self-checking testbench per module, and an end-to-end
testbench. That testbench assembles programs, runs them on the core and
compares the results with an instruction-level reference model.

## Instruction set

Two formats, both one word:

```
A-type   [15:12] OP | [11:8] ra | [7:4] rb | [3:0] rr
V-type   [15:12] OP | [11:4] value (8 bit, sign-extended) | [3:0] rr
```

Only `set` is V-type. PCs and data addresses are byte addresses and words
are 16 bits wide, so the PC advances by 2. Loads and stores move whole
words, and bit 0 of an address is ignored.

| opcode | mnemonic | assembly | operation |
|---|---|---|---|
| 0 | add | `add ra, rb, rr` | rr = ra + rb |
| 1 | subtract | `subtract ra, rb, rr` | rr = ra - rb |
| 2 | multiply | `multiply ra, rb, rr` | rr = low 16 bits of ra * rb |
| 3 | divide | `divide ra, rb, rr` | rr = ra / rb (signed, truncating) |
| 4 | and | `and ra, rb, rr` | rr = ra & rb (bitwise) |
| 5 | or | `or ra, rb, rr` | rr = ra \| rb (bitwise) |
| 6 | lessthan | `lessthan ra, rb, rr` | rr = (ra < rb) ? 1 : 0, signed |
| 7 | set | `set value, rr` | rr = sign-extend(value) |
| 8 | greaterthan | `greaterthan ra, rb, rr` | rr = (ra > rb) ? 1 : 0, signed |
| 9 | equalto | `equalto ra, rb, rr` | rr = (ra == rb) ? 1 : 0 |
| A | jump | `jump ra` | PC = ra |
| B | store | `store ra, rb` | MEM[ra] = rb (encoded `B ra rb 0`) |
| C | load | `load ra, rr` | rr = MEM[ra] (encoded `C ra 0 rr`) |
| D | branch on equal | `branceq ra, $zero, rr` | if ra == rb: PC = PC + 2 + 2*rr |
| E | jumpandlink | `jumpandlink ra` | $ra = PC + 2; PC = ra |
| F | (no-op) | | nothing |

The original LilaK definition fixes the formats, the 4-bit opcode, the
instruction list and its semantics. It also fixes the opcode of `set` (7)
and the operand placement of store, load, jump and jumpandlink. It does not
fix the other opcode numbers. This design numbers them in list order, keeps
`set` at 7 and uses the spare code F as an explicit no-op. If you have
binaries from another LilaK assembler, change `opcode_e` in
`rtl/lilak_pkg.sv`.

The branch compares field `ra` with field `rb`. The documented assembly form
always puts `$zero` in `rb`, so in practice it is "branch if ra is zero".
The offset is a register, `rr`, counted in words from the instruction after
the branch. The shift by one and the add are done by the ALU.

Arithmetic is two's complement. The ALU flags are `zero` (result is 0) and
`overflow`, which is the signed overflow of add or subtract. A zero divisor
gives 0xFFFF, and -32768 / -1 gives -32768. The flags are visible at the
processor's ports for the instruction in writeback. No instruction reads them.

## Registers

| # | name | use |
|---|---|---|
| 0 | $zero | reads 0, writes ignored |
| 1 | $ra | return address (written by jumpandlink) |
| 2 | $stack | stack pointer |
| 3 | $global | global pointer |
| 4 | $frame | frame pointer |
| 5 | $in | input register: loads the `in_value` port every clock, program writes ignored |
| 6 | $a0 | reserved for the assembler (pseudo-instructions, constants) |
| 7-8 | $fa0, $fa1 | procedure arguments |
| 9-10 | $fr0, $fr1 | procedure results |
| 11-12 | $v0, $v1 | temporaries |
| 13-15 | $sv0-$sv2 | saved temporaries |

The names and roles are LilaK's. Only $zero, $ra and $in are special to the
hardware. The `out_value` port shows register 9 ($fr0); this choice can be
changed with the `OUT_REG` parameter. The value is read in decode and carried
down the pipeline with the instruction there, so the port lags the register
by three clocks.

## The pipeline

```
      +-------+  F->D  +--------+  D->X  +---------+  X->M  +--------+  M->W  +-----------+
 PC ->| fetch |==fd_t==| decode |==dx_t==| execute |==xm_t==| memory |==mw_t==| writeback |
      +-------+        +--------+        +---------+        +--------+        +-----------+
         ^                 ^                 ^  ^                                 |  |  |
         |                 |                 |  +---- X->M ALU result (fwd 1) ----|--+  |
         |                 |                 +------- M->W write data (fwd 2) ----+     |
         |                 +------------ register write (rr or $ra) ---------------+     |
         +---------------------------------- PC load (jump / jal / taken branch) -------+
```

Each stage does the following:

- **F** (`fetch_stage`, `instr_mem`): read the instruction at PC. PC becomes
  PC + 2, or the writeback target when writeback redirects. The PC + 2 value
  travels on as CURRENTADDRESS.
- **D** (`decode_stage`: `reg_file`, `control_unit`, `branch_block`,
  `sign_extend`): read A = R[11:8], B = R[7:4] and C = R[3:0]. Compare A == B
  and let the branch block mark a taken branch on equal. Decode the control
  word and sign-extend [11:4].
- **X** (`execute_stage`: `forwarding_unit`, `alu`): pick each operand from
  the register read, the X->M ALU result or the M->W write data. ALUSrcA
  chooses CURRENTADDRESS, and ALUSrcB chooses C << 1, so that a branch
  computes its target. Then run the ALU.
- **M** (`data_memory`): the byte address A becomes the word address
  A[9:1]. A store writes B on the clock edge. A load reads combinationally,
  so the value is captured at the end of the stage. The write enable is
  MemWrite AND NOT MemRead.
- **W** (`writeback_stage`): the MemToReg mux selects the sign-extended
  value, the ALU result, the memory data or A. The RegData mux replaces that
  with CURRENTADDRESS for jumpandlink. The RegDest mux selects rr or $ra.
  The PC is loaded with A (jump, jumpandlink) or with the ALU result (taken
  branch). The load enable is PCSrc OR taken.

The control word (`ctrl_t`) carries the LilaK signal names: RegWrite,
RegDest, RegData, PCSrc, Branch, MemToReg, MemRead, MemWrite, ALUSrcA,
ALUSrcB and ALUop. For `set` its values agree with the LilaK check of
MemRead=0, MemWrite=0, RegWrite=1, RegDest=0, RegData=0, PCSrc=0 and
MemToReg=0.

### Timing

- Instruction *k* (counted in fetch order from reset) is in writeback
  during the clock after edge *k+4*.
- After the pipeline has filled, one instruction retires per clock. There
  are no stalls.
- A jump, jumpandlink or taken branch changes the PC from writeback, so the
  four instructions fetched after it always execute.
- The register file writes on the clock edge that ends writeback. A decode
  in that same cycle still reads the old value.

## Hazards: what the hardware covers and what the program must do

This is the part that needs the most care. The hardware resolves only these
cases:

| producer -> consumer distance | covered by |
|---|---|
| 1 (next instruction), producer is an ALU op | X->M forwarding of the ALU result |
| 2 | M->W forwarding of the write data (ALU result, set value or load data) |
| 4 or more | the register file |

Nothing else is covered. A program, or the assembler that produces it, must
follow these rules:

1. **Control transfers have four delay slots.** The four words after a
   `jump`, `jumpandlink` or `branceq` always execute. Fill them with no-ops
   (or with useful work, if you know what you are doing).
2. **No use of a `set` or `load` result by the very next instruction.** The
   X->M path carries only the ALU result, so put one no-op in between.
3. **No read exactly three instructions after the producer.** At that
   distance the value is being written into the register file while the
   consumer reads it. Put one no-op in between.
4. **`branceq` sees no forwarding at all.** Its compare and its offset
   register are read in decode. All three of its registers must be written
   four or more instructions earlier.
5. **$ra is never forwarded.** jumpandlink writes $ra through the RegDest
   mux, which the forwarding unit does not track. The delay slots already
   cover this in practice.

Rules 1 and 2 mirror the LilaK design: its assembler adds no-ops "depending
on the instruction and the hazard prevention logic", and its forwarding unit
is described as not covering every instruction. Rules 3 to 5 are
consequences of the data path as built here. The assembler inside
`tb/tb_lilak_cpu.sv` (function `emit`) implements all five rules and is a
working reference for them.

## Memories, I/O and loading a program

- The instruction memory holds 512 words (`IMEM_ADDR_BITS = 9`). It is
  written one word per clock through `imem_we`, `imem_addr` and `imem_data`,
  normally while `rst` is high. In the original design the assembler output
  is loaded into this memory from a file. A `$readmemh` into `u_fetch.u_imem.mem`
  works just as well in simulation.
- The data memory holds 512 words (`DMEM_ADDR_BITS = 9`, the 9-bit word
  address of the LilaK data memory). It has no outside port and is not
  reset, so programs should store to a word before loading it.
- `in_value` feeds $in. `out_value` shows $fr0 (see above).
- `rst` is synchronous and active high. It clears the PC, all stage
  registers (each becomes a no-op) and the register file.

## Files

| file | module |
|---|---|
| `rtl/lilak_pkg.sv` | opcodes, register numbers, `ctrl_t` and the four stage-register structs |
| `rtl/lilak_cpu.sv` | top level: the five stages and four stage registers |
| `rtl/fetch_stage.sv`, `rtl/instr_mem.sv` | PC logic and instruction memory |
| `rtl/fd_reg.sv`, `rtl/dx_reg.sv`, `rtl/xm_reg.sv`, `rtl/mw_reg.sv` | stage registers |
| `rtl/decode_stage.sv`, `rtl/reg_file.sv`, `rtl/control_unit.sv`, `rtl/branch_block.sv`, `rtl/sign_extend.sv` | decode |
| `rtl/execute_stage.sv`, `rtl/forwarding_unit.sv`, `rtl/alu.sv` | execute |
| `rtl/data_memory.sv` | memory stage (address preparation, write enable, RAM) |
| `rtl/writeback_stage.sv` | writeback muxes and PC redirect |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog. To run one:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lilak_pkg.sv \
          tb/tb_lilak_cpu.sv --top-module tb_lilak_cpu -o sim
./obj_dir/sim
```

Replace `lilak_cpu` with any module name to run that module's testbench.
`tb_lilak_cpu` runs the core at its default sizes in about 15 seconds. It
runs three workloads:

- a procedure `sum(N)`, called with jumpandlink, that loops with branch on
  equal and returns with jump, for N = 10, 0 and 37;
- stores and reloads of the result, every computational instruction with
  forwarding at distance one and two, and a signed overflow;
- forty random programs with loads, stores, forward branches and reads of
  $in.

After each program it compares all registers, every data word written and
the output port with the reference model. It also checks that the final
jump reaches writeback exactly *retired instructions + 3* clocks after
reset, which confirms one instruction per clock and the five-stage depth. It
counts both forwarding paths, taken and untaken branches, jumps,
jumpandlinks, loads, stores, overflows, input reads and output changes, and
fails if any of them never happens.

## Where this design makes its own choices

The original LilaK design gives the formats, the register set, the
instruction semantics (a per-stage register-transfer summary), and a
schematic of the data path and the full circuit. The following are choices
made here:

- The opcode numbers other than `set`, and no-op = F.
- The control and mux encodings. MemToReg: 0 value, 1 ALU, 2 memory, 3 A.
  Forward selects: 0 register, 1 X->M, 2 M->W. ALUSrcA/B: 1 selects
  CURRENTADDRESS or C << 1.
- Signed arithmetic and comparisons, the divide corner cases, and the
  overflow definition.
- The forwarding priority (nearest writer wins) and the rule that $zero is
  never forwarded.
- The instruction memory size (512 words) and its load port. The original
  has a 16-bit address bus but gives no memory size.
- The data-memory address preparation (byte address to word address
  A[9:1]) and a combinational read. The original uses a block RAM whose read
  timing is not stated.
- The $in behaviour (loaded every clock) and the output register ($fr0).
- Synchronous reset of the PC, the stage registers and the register file.
- The branch block: the schematic gives it a clock input. Here it is a
  combinational "opcode is branch-on-equal AND A == B" whose result travels
  down the pipeline with the instruction.

The LilaK toolchain also includes a Python assembler/compiler that expands
pseudo-instructions (for example `addval` and `subtractval`, through $a0).
That is software and is not part of this RTL.
