# A microprogrammed RISC-V machine on a single bus

This is a small RISC-V processor built the way computers were built before
pipelining took over: there is almost no instruction-specific hardware.
A datapath holds the registers, one ALU and one 32-bit bus. A
microprogram runs each machine instruction as a short sequence of register
transfers such as `A <- Reg[rs1]`, `MA <- A+B` or `Reg[rd] <- Memory`. The
microprogram is stored in a control ROM and stepped by a micro-program-counter
(uPC). To add an instruction you add ROM words, not datapath. The design
shows this with a memory-to-memory add, `M[rd] <- M[rs1] op M[rs2]`, that
needs no change at all to the datapath.

The machine follows the "bus-based datapath" and "controller version 2" of a
course lecture on simple machine implementations. It runs 32-bit RISC-V
instructions in the early (v1.0) field layout. All SystemVerilog in `rtl/` is
synthesizable. Every module has a self-checking testbench in `tb/`.

```
            opcode, funct3 (from IR)     zero?          busy
                 |                         |              |
        +--------v---------------------------v--------------v------+
        | ucontroller: ext -> dispatch addr, jump logic, uPC, ROM  |
        +---------------------------+------------------------------+
                                    | 19 control points + stall
        +---------------------------v------------------------------+
        | bus_datapath                                             |
        |   IR -> imm_select --enImm--+                            |
        |   A, B -> alu -----enALU----+==== 32-bit bus ====+       |
        |   gpr_file (x0..x31, PC) <--enReg/RegWrt-->      |       |
        |   MA (address) -------------------------+        |       |
        +-----------------------------------------|--------|-------+
                                                  v        v
                                      mem_module: addr, data, busy
```

## The bus and who may drive it

Every transfer in the machine is one bus cycle. Four units can put a value on
the bus. Each has its own enable:

| driver        | enable                 | value                                   |
|---------------|------------------------|-----------------------------------------|
| immediate     | `enImm`                | immediate chosen by `ImmSel` from IR    |
| ALU           | `enALU`                | `ALUOp(A, B)`                           |
| register file | `enReg`, `RegWrt` = 0  | register chosen by `RegSel`             |
| memory        | `enMem`, `MemWrt` = 0  | word at MA, when the access completes   |

Six things can take the bus value at the clock edge. These are IR (`ldIR`),
A (`ldA`), B (`ldB`) and MA (`ldMA`), the register file (`enReg` with
`RegWrt` = 1) and memory (`enMem` with `MemWrt` = 1). Several can load in the
same cycle: fetch does `MA, A <- PC` in one cycle. In silicon the drivers
would be tri-state buffers. Here the bus is a multiplexer. An assertion in
`bus_datapath` flags any cycle where two drivers are enabled.

The PC is not a separate register. It is entry 32 of the register file
(`gpr_file`), next to x0..x31. So `PC <- A+4` is an ordinary register write
with `RegSel = PC`. x0 always reads as zero and ignores writes. `RegSel`
selects the register address from five sources: PC (32), RA (x1, for the
link of JAL/JALR), or the rd, rs2 or rs1 field of IR.

A and B are the only ALU inputs. The ALU output reaches a register only
through the bus. That is why an add takes three microinstructions:
`A <- rs1`, `B <- rs2`, `rd <- A+B`.

## The microinstruction

A ROM word is a horizontal microinstruction: 19 control points, each driven
straight from the word, plus a 3-bit jump type. `ucode_pkg` defines it as a
packed struct:

| field    | bits | meaning                                                              |
|----------|------|----------------------------------------------------------------------|
| `ldIR`   | 1    | IR takes the bus                                                     |
| `ImmSel` | 2    | I-immediate, store immediate, branch immediate (<<1), whole IR       |
| `enImm`  | 1    | immediate drives the bus                                             |
| `ALUOp`  | 4    | copy A, copy B, A+4, A-4, A+B, A-B, func(A,B) R-type, I-type, jump target |
| `ldA`, `ldB` | 1+1 | A / B take the bus                                                |
| `enALU`  | 1    | ALU drives the bus                                                   |
| `RegSel` | 3    | PC, RA, rd, rs2, rs1                                                 |
| `RegWrt`, `enReg` | 1+1 | register file: enReg enables the port, RegWrt sets the direction |
| `ldMA`   | 1    | MA takes the bus                                                     |
| `MemWrt`, `enMem` | 1+1 | memory: enMem enables it, MemWrt sets the direction         |

The lecture counts 17 control signals, which implies a 2-bit ALUOp. The
microcode needs nine ALU functions, so ALUOp is 4 bits wide here.

## Sequencing: uPC, jump types, dispatch and spin

This is the part that makes the machine work, and the least obvious one.
The uPC is the only state in the controller. Each cycle the control ROM
reads the word at the uPC. The word's jump type, the ALU's `zero` flag and
the memory's `busy` flag then decide the next uPC:

| jump type  | next uPC                                                   | used by                       |
|------------|------------------------------------------------------------|-------------------------------|
| `next`     | uPC + 1                                                    | most states                   |
| `spin`     | uPC while `busy`, then uPC + 1                             | every memory access           |
| `fetch`    | 0, the first state of instruction fetch                    | last state of each instruction |
| `dispatch` | first state of the instruction's op-group (from `ext`)     | last state of fetch           |
| `ftrue`    | `zero` ? fetch : uPC + 1                                   | (not used by this microprogram) |
| `ffalse`   | `zero` ? uPC + 1 : fetch                                   | beq                           |

Two decisions keep the ROM small. First, the opcode is not part of the ROM
address. The `ext` block (`op_group_ext`) maps it to a start address, and
the uPC jumps there only on `dispatch`. Second, the status bits are not part
of the ROM address either. The jump logic uses them only to choose among
uPC+1, uPC and the fetch address. The ROM therefore has just 64 words (a
6-bit uPC), with 47 in use. A ROM addressed by opcode, status and state
together would need 2^13 words.

A conditional branch shows how this works. In `beq2` the ALU computes
`A - B`, with rs1 and rs2 already latched. In the same cycle the bus carries
the PC into A. If the difference is zero, `ffalse` continues to `beq3` and
the target is computed. Otherwise it goes back to fetch. The decision and a
useful transfer share one cycle.

**Spin.** Memory is slower than a register transfer. A microinstruction that
uses memory has jump type `spin` and is repeated while `busy` is high. Its
control points stay asserted the whole time, so the memory sees a steady
enable, address and write data. While it repeats, the controller raises
`stall`. `stall` stops every register load and register-file write in the
datapath. The destination register therefore takes the bus only in the cycle
the memory completes. This gating is this design's choice; the lecture does
not say what happens to the destination while the controller spins.

## The microprogram

These are the contents of `control_rom`, one transfer per cycle:

| op-group (uaddr) | states |
|---|---|
| fetch (0)  | `MA,A <- PC` ; `IR <- Mem` spin ; `PC <- A+4` dispatch |
| ALU (3)    | `A <- rs1` ; `B <- rs2` ; `rd <- func(A,B)` fetch |
| ALUi (6)   | `A <- rs1` ; `B <- Imm` ; `rd <- Op(A,B)` fetch |
| LW (9)     | `A <- rs1` ; `B <- Imm` ; `MA <- A+B` ; `rd <- Mem` spin ; fetch |
| SW (14)    | `A <- rs1` ; `B <- BImm` ; `MA <- A+B` ; `Mem <- rs2` spin ; fetch |
| beq (19)   | `A <- rs1` ; `B <- rs2` ; `A <- PC` ffalse on A-B ; `A <- A-4` ; `B <- BImm<<1` ; `PC <- A+B` fetch |
| J (25)     | `A <- PC` ; `A <- A-4` ; `B <- IR` ; `PC <- JumpTarg(A,B)` fetch |
| JR (29)    | `A <- rs1` ; `PC <- A` fetch |
| JAL (31)   | `A <- PC` ; `x1 <- A` ; `A <- A-4` ; `B <- IR` ; `PC <- JumpTarg(A,B)` fetch |
| JALR (36)  | `A <- PC` ; `B <- rs1` ; `x1 <- A` ; `PC <- B` fetch |
| ALUMM (40) | `MA <- rs1` ; `A <- Mem` spin ; `MA <- rs2` ; `B <- Mem` spin ; `MA <- rd` ; `Mem <- func(A,B)` spin ; fetch |

`JumpTarg(A,B) = A + sext(B[31:7]) * 2`. Fetch has already advanced the PC
by 4, so branches and jumps first rebuild the instruction's own address
(`A <- PC`, `A <- A-4`) and add the offset to that. JAL and JALR store the
advanced PC, that is the return address PC+4, in x1.

An instruction takes `3 + (L-1)` fetch cycles plus its group's state count,
plus `L-1` more for each further memory access (`L` = memory latency). At
the default `L = 3`: an ALU operation takes 8 cycles, LW/SW 12, beq 8 (not
taken) or 11 (taken), J 9, JR 7, JAL 10, JALR 9 and ALUMM 18. The
end-to-end testbench checks these numbers for every instruction it runs.

## Memory and the busy handshake

`mem_module` is a word-organised RAM (default 1024 words). It has an address
from MA, an Enable (`enMem`) and a Write(1)/Read(0) line (`MemWrt`). The RAM
is written when Write AND Enable. Its data drives the bus when Enable AND NOT
Write. It takes `LATENCY` cycles (default 3) per access:

```
cycle         1      2      3
enMem        ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾      (held by the spinning microinstruction)
busy         ‾‾‾‾‾‾‾‾‾‾‾‾‾|____
dout / write  --     --   valid      (read data on the bus / write at the edge)
uPC           n      n      n -> n+1
```

Addresses are byte addresses. Bits [1:0] are ignored, so every access is a
whole aligned word. There are no byte or halfword accesses, and byte order
does not arise. A separate loader port (`ld_en`, `ld_addr`, `ld_data`) fills
the memory before reset is released. That port belongs to this design, not
to the lecture.

## Instruction encoding

Fields: `rd` [31:27], `rs1` [26:22], `rs2` [21:17], `funct3` [9:7],
`opcode` [6:0]. Immediates:

- I-type (ALUi, LW): imm = IR[21:10].
- Store and branch: imm = {IR[31:27], IR[16:10]}. A branch offset is this
  value times 2.
- J/JAL: offset = IR[31:7], times 2.

All immediates and offsets are sign-extended.

| op-group | opcode    | notes |
|---|---|---|
| ALU   | `0110011` | funct3 selects add/sll/slt/sltu/xor/srl/or/and; IR[16] selects sub, sra |
| ALUi  | `0010011` | same funct3 set, no subtract; IR[20] selects srai |
| LW    | `0000011` | any funct3: word load |
| SW    | `0100011` | any funct3: word store |
| beq   | `1100011` | any funct3 runs as beq |
| J     | `1100111` | |
| JAL   | `1101111` | link in x1 |
| JR / JALR | `1101011` | funct3 = 000 is JALR (link in x1), other values JR |
| ALUMM | `0001011` | M[rd] <- M[rs1] op M[rs2], op as for ALU |

An opcode not in this table goes straight back to fetch. It costs one fetch
and has no effect. There are no traps.

## How far it follows the lecture

Taken from the lecture: the datapath units, control points and bus
structure; the RegSel sources and the 2-bit ImmSel and 3-bit RegSel widths;
the controller structure (uPC, +1, ext, jump logic, control ROM); the six
jump types and their rules; the memory module's gating; and the microcode of
fetch, ALU, ALUi, LW, SW, beq, J, JR, JAL and ALUMM.

Chosen here, where the lecture gives no value:

- The opcode values and the funct3 meanings. These come from the v1.0
  RISC-V base encoding.
- The ALUOp width and encoding, and every other field encoding.
- The memory size and latency.
- Reset: asynchronous, active low, clearing all registers. Execution starts
  at address 0.
- The stall gating of loads during a spin.
- The loader port.
- The JALR microcode, which the lecture leaves out.

Departures from the printed microcode:

- **J** starts with an added `A <- PC`. As printed, its first state
  `A <- A-4` would take A, which still holds the fetched instruction's
  address, four bytes too far back. JAL and beq both rebuild the address
  from the PC, and J now does the same.
- **beq** has six states numbered 0..5 and uses `BImm << 1`. One of the
  lecture's tables has a repeated state label.

Not built:

- The first-attempt controller, whose ROM is addressed by opcode, status
  and state. It is only the starting point that version 2 improves on.
- Nanocoding, which is described for other machines.
- The floating-point registers. They belong to the ISA state, but nothing in
  the datapath or microcode uses them.
- Branches other than beq.
- Loads and stores narrower than a word.

## Files

| file | contents |
|---|---|
| `rtl/ucode_pkg.sv` | microinstruction struct, field encodings, opcodes, microaddress map |
| `rtl/microcoded_rv32.sv` | top: controller + datapath + memory |
| `rtl/ucontroller.sv` | uPC, next-address mux, instantiates the three below |
| `rtl/control_rom.sv` | the microprogram |
| `rtl/jump_logic.sv` | jump type + zero + busy -> next-uPC source, stall |
| `rtl/op_group_ext.sv` | opcode -> dispatch address |
| `rtl/bus_datapath.sv` | bus, IR, A, B, MA; instantiates the three below |
| `rtl/gpr_file.sv`, `rtl/alu.sv`, `rtl/imm_select.sv` | datapath units |
| `rtl/mem_module.sv` | slow RAM with busy |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/rv_asm_pkg.sv` | instruction encoders used to write test programs |

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
end-to-end test runs the top at its default sizes. It loads a 47-instruction
program that uses every op-group, including beq both ways, and checks every
store the program makes. It also checks the cycle count of every
instruction and that each mechanism (spin, every dispatch target, both beq
outcomes, memory writes) happened at least once:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ucode_pkg.sv tb/rv_asm_pkg.sv tb/tb_microcoded_rv32.sv \
    --top-module tb_microcoded_rv32 -o sim
./obj_dir/sim
```

Replace `microcoded_rv32` with any other module name to run that module's
testbench. Every run takes well under a second.

## Extending it

A new instruction needs three things:

1. A free opcode and a start address in `ucode_pkg`.
2. A case line in `op_group_ext`.
3. Its states in `control_rom`, each ending with `next`, `spin` or, for the
   last one, `fetch`.

The datapath only needs to change if the instruction needs a transfer it
cannot already do. The ALUMM instruction shows that a memory-to-memory
operation needs no such change.
