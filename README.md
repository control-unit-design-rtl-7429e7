# Two control units: a microprogrammed accumulator machine and a hardwired RISC

This RTL shows two ways to build the control unit of a small processor. Each
one has a complete machine around it, so that the control unit can be run and
checked.

* **Accumulator machine (CISC style).** This is an 8-bit machine with
  ACC, X and S registers, 39 instructions and nine addressing modes. Its
  control unit is microprogrammed on two levels:
  * a *microcode* store of narrow words decides which step comes next;
  * a small *nanocode* store holds the wide words of control signals.

  Microinstructions that drive the same signals share one nanoword.
* **SPARC-like RISC processor.** This is a 32-bit load/store machine with
  fixed instruction formats, 32 registers and three buses. Its control unit
  is hardwired and split in two:
  * a *sequencer* that only counts the cycles of an instruction;
  * a combinational *decoder* that turns the instruction fields and the cycle
    number into the datapath controls.

`control_unit_top` places both machines side by side. They share only the
clock and the asynchronous active-low reset `rst_n`. Everything is written in
synthesizable SystemVerilog with packages, structs and enums. Each testbench
checks the machine against its own instruction-level reference model.

---

## 1. The accumulator machine

### 1.1 Datapath (`cisc_datapath`, `cisc_alu`)

```
            register output bus (one of ACC, X, S, PC)
   ACC X S PC ──────────────┬──────────────► ALU input A
        ▲                   │ (Enable_Reg buffer)
        │ ALU result        ▼
   ACC X S PC MAR ◄── ALU ◄─ memory bus ◄──► RAM data       IR ◄── memory bus
   PC also has its own +1 (Inc_PC)
   RAM address = Sel_PC ? PC : MAR
```

* **Register output bus.** Exactly one register drives it, chosen by
  Enable_ACC, Enable_X, Enable_S or Enable_PC.
* **Memory bus.** It carries the RAM's read data when OE is set. Otherwise,
  when Enable_Reg is set, it carries the register output bus. An assertion
  checks that OE is never set together with Enable_Reg or WR.
* **ALU inputs.** Input A is the register output bus and input B is the memory
  bus. The result can be loaded into ACC, X, S, PC or MAR.
* **Cycle timing.** Every transfer takes one clock. The RAM reads
  combinationally and writes at the clock edge that ends the cycle, so it needs
  no wait states.
* **Widths.** Data and addresses are 8 bits and the RAM holds 256 bytes.

There are 28 control signals, grouped as in `ucode_pkg::cisc_ctl_t`:

| Group | Signals |
|---|---|
| Memory bus | Enable_Reg, OE, Load_IR, WR, Sel_PC |
| Register output bus | Enable_ACC, Enable_X, Enable_S, Enable_PC |
| Register input bus | Load_ACC, Load_X, Load_S, Load_PC, Inc_PC, Load_MAR |
| ALU | F5..F0, Multiword, Plus_1, Arithmetic_Shift |
| Flags | Update_C, Update_V, Update_N, Update_Z |

These are the ALU functions (`cisc_pkg::ALU_*`):

| F | Function | Notes |
|---|---|---|
| 00 | A + B + cin | |
| 01 | A + ~B + cin | C = borrow |
| 02–04 | A AND / OR / EOR B | |
| 05 | A + cin | |
| 06 | A − 1 + cin | C = borrow |
| 07 | B | |
| 08 | ~A + cin | C = (A ≠ 0) |
| 09 | ~A | |
| 0A | 0 | |
| 0B | A << 1 | bit 0 = Multiword ? C : 0 |
| 0C | A >> 1 | bit 7 = Arithmetic_Shift ? A[7] : Multiword ? C : 0 |

How the modifier signals and flags work:
* **Carry-in.** `cin` = Plus_1 ? 1 : (Multiword ? carry : 0). For the
  subtracting functions the carry used is ~C, because C means "borrow" after
  a subtraction. This is how ADC and SBC chain.
* **Flag updates.** Each flag loads only when its Update signal is set.
  * N is bit 7 of the result and Z is set when the result is zero.
  * V is two's-complement overflow for the functions that add or subtract, and
    0 for the others.
  * C is the carry, the borrow, or the bit that was shifted out.

### 1.2 Two-level control store (`ucode_ctrl`, `useq`, `reg_out_decoder`)

```
 micro-PC ──► microcode store (256 × 18) ──► {nano address 6, jump address 8, Cond 4}
    ▲                                            │            │         │
    └─── useq: uPC+1 / jump / {1,opcode} ◄───────┼────────────┘─────────┘ ◄── flags, opcode
                                                 ▼
                          nanocode store (64 × 26) ──► reg_out_decoder ──► 28 control signals
```

A new microinstruction runs every clock. Both stores are read
combinationally from the registered micro-PC.

The nanoword is 26 bits, not 28, for one reason: only one register may drive
the register output bus. That lets its four enables be stored as a 2-bit code,
which `reg_out_decoder` expands:

| Code | Enable |
|---|---|
| 00 | ACC |
| 01 | X |
| 10 | S |
| 11 | PC |

The Cond field (`ucode_pkg::ucond_e`) chooses the next micro-address:

| Code | Name | Next micro-PC |
|---|---|---|
| 0 | NEXT | uPC + 1 |
| 1 | JUMP | jump address |
| 2 | DISPATCH | {1, opcode}: the first step of the instruction just fetched |
| 3–10 | JC, JNC, JV, JNV, JN, JNN, JZ, JNZ | jump address if the flag test holds, else uPC + 1 |
| 11–14 | JLT, JGE, JGT, JLE | the same, with the signed tests: LT = N⊕V, GT = ¬Z ∧ ¬(N⊕V) |
| 15 | | acts as NEXT |

How the control unit starts and sequences:
* **Dispatch.** An opcode is simply a micro-address in the upper half of the
  store. The fetch step sits at micro-address 0. It reads the opcode byte,
  loads IR and increments PC. It also dispatches in that same cycle, because
  the datapath hands the sequencer the byte that is on the memory bus during
  Load_IR.
* **Shared steps.** The lower half of the store holds steps that several
  instructions share.
* **Loading the stores.** Both stores are writable. After reset,
  `cisc_machine` copies the microprogram into them, one word per clock:
  256 microwords, then 64 nanowords, 320 cycles in all. The `booting` output
  is high during the copy, and the control unit and datapath are held in
  reset. The image is computed at elaboration time by the constant function
  `cisc_pkg::build_image()`. That function also merges identical nanowords:
  the whole microprogram needs only 50 distinct nanowords, and it uses 153 of
  the 256 micro-addresses.

### 1.3 Instruction set and opcode map

Instructions are either one byte (the opcode) or two bytes (the opcode and an
operand byte). There are seven addressing modes with operands:

| Mode | Operand used |
|---|---|
| Immediate | the operand byte itself |
| Direct | `mem[op]` |
| Indirect | `mem[mem[op]]` |
| Indexed | `mem[X+op]` |
| Indexed indirect | `mem[mem[X+op]]` |
| Stack pull | read `mem[S]`, then S ← S+1 (one byte) |
| Stack push | S ← S−1, then write `mem[S]` (one byte) |

Branch targets are the address after the 2-byte branch plus the signed
offset.

| Opcode (hex) | Instructions |
|---|---|
| 00–09 | inherent on ACC: CLR INC DEC NEG COM LSL LSR ASR ROL ROR |
| *m*0–*m*6 | ADD SUB ADC SBC AND OR EOR |
| *m*7–*m*9 | LDA LDX LDS |
| *m*A–*m*C | STA STX STS |
| 2D / 3D | JMP direct / indirect |
| 2E / 3E | JSR direct / indirect |
| 6F | RTS |
| 70, 71, 72 | BRA, BRN, BSR |
| 73 75 77 79 7B 7D | BCC BCS BVC BVS BEQ BNE |
| 0A 0C 0E 1A | BLT BGE BGT BLE |

Here *m* is the addressing mode: 1 immediate, 2 direct, 3 indirect,
4 indexed, 5 indexed indirect, 6 stack.

Notes on the map:
* **Missing combinations.** Some pairs do not exist: LDX indexed, LDS stack,
  STX indexed and indexed indirect, STS push, and stores in immediate mode.
  The instruction set has 98 combinations in all.
* **Reserved codes.** The code just after each conditional branch is reserved.
  That micro-address holds the branch's "taken" step.
* **Unused codes.** All other unused codes are 2-cycle no-operations.

### 1.4 The microprogram and cycle counts

All counts include the fetch cycle, F.

| Class | Steps after F | Cycles |
|---|---|---|
| Inherent | ACC ← f(ACC) | 2 |
| Immediate | ACC ← ACC op mem[PC], PC+1 | 2 |
| Direct | MAR ← mem[PC], PC+1; op with mem[MAR] | 3 |
| Indirect | MAR ← mem[PC], PC+1; MAR ← mem[MAR]; op | 4 |
| Indexed | MAR ← X + mem[PC], PC+1; op | 3 |
| Indexed indirect | MAR ← X + mem[PC], PC+1; MAR ← mem[MAR]; op | 4 |
| Stack pull | MAR ← S; S ← S+1; op | 4 |
| Push | S, MAR ← S−1; mem[MAR] ← reg | 3 |
| BRA | PC ← PC + mem[PC] + 1 | 2 |
| BRN | PC+1 | 2 |
| Bcc | MAR ← PC, PC+1, exit to F if not taken; PC ← PC + mem[MAR] | 2 / 3 |
| BSR | S, MAR ← S−1, PC+1; mem[MAR] ← PC, MAR ← PC−1; PC ← PC + mem[MAR] | 4 |
| JMP direct | PC ← mem[PC] | 2 |
| JMP indirect | MAR ← mem[PC]; PC ← mem[MAR] | 3 |
| JSR direct | as BSR, with PC ← mem[MAR] | 4 |
| JSR indirect | as BSR, with MAR ← mem[MAR]; PC ← mem[MAR] | 5 |
| RTS | MAR ← S; S ← S+1; PC ← mem[MAR] | 4 |

Flag effects:
* ADD, SUB, ADC, SBC, NEG and CLR set all four flags.
* INC and DEC set V, N and Z.
* The shifts and rotates set C, N and Z.
* COM, AND, OR, EOR and the loads set N and Z.
* Stores and control transfers leave the flags alone.

### 1.5 Departures and choices

**Conditional branches take 3 cycles when taken.** The source description's
table gives 2 cycles for every PC-relative branch. BRA, BRN and an untaken
Bcc do meet that. A taken Bcc costs one extra cycle for this reason: the test
is made by the sequencer at the end of the first step, and with one ALU the
offset addition can only happen in a following step.

**This design's own choices.** The source description names the signals and
gives the instruction table with its cycle counts. It does not give:
* the data width;
* the ALU encoding;
* the opcode values;
* the microprogram;
* the flag rules;
* the stack direction.

All of these are choices made here. The description also gives the opcode
count as 97, while its instruction table has 98 entries; all 98 are built.

---

## 2. The RISC processor

### 2.1 Datapath (`risc_cpu`)

**Buses.** Two source buses, S1 and S2, feed a 32-bit ALU (`risc_alu`) and a
barrel shifter (`risc_shifter`). Their result goes on the Dest bus, which can
load:
* a register of `risc_regfile` (32 registers; R0 reads zero and ignores
  writes);
* PC;
* MAR;
* IR.

**Sources.**
* S1 carries rs1 or PC.
* S2 carries rs2, or a constant from `risc_immgen`: the sign-extended simm13,
  disp30·4, the sign-extended disp22·4, imm22<<10, 0 or 4.

**Memory.** The RAM is addressed only by MAR, using word address
MAR[ADDR_W+1:2], and its data port sits on Dest. It reads within the cycle and
writes at the clock edge.

### 2.2 Instructions

The instruction formats use SPARC bit positions:

| Field | Bits |
|---|---|
| op | [31:30] |
| rd | [29:25] |
| op3 | [24:19] |
| rs1 | [18:14] |
| i | [13] |
| simm13 | [12:0] |
| rs2 | [4:0] |

* **ALU.** op = 10 and op3 = {0, F4..F0}. The function bits work like this:
  * F1:F0 chooses add, AND, OR or XOR;
  * F2 inverts S2 (this gives SUB, ANDN, ORN and XNOR);
  * F3 adds the carry (ADDX, SUBX);
  * F4 updates C, V, N and Z (the ..CC forms).
* **Shifts.** op3 = 1001*xx*, where *xx* is 01 SLL, 10 SRL or 11 SRA.
* **JMPL.** op3 = 111000.
* **SETHI.** op = 00 and op2 = 100.
* **Bicc.** op = 00 and op2 = 010, with all 16 SPARC conditions.
* **CALL.** op = 01.
* **LD / ST.** op = 11, with op3 000000 for LD and 000100 for ST.

Unknown instructions are 3-cycle no-operations. The annul bit, delay slots
and register windows are not implemented.

### 2.3 Sequencer and decoder

The sequencer (`risc_sequencer`) looks only at the instruction class and its
own state. It steps through NEXT (PC, MAR ← PC+4), FETCH (IR ← mem),
EX1 and EX2:

| Class | States | Cycles |
|---|---|---|
| ALU, shift, SETHI | FETCH EX1 NEXT | 3 |
| Bicc | FETCH EX1 | 2 |
| LD, ST | FETCH EX1 EX2 NEXT | 4 |
| CALL, JMPL | FETCH EX1 EX2 | 3 |

In EX1 a Bicc loads PC and MAR with PC + (taken ? disp22·4 : 4), so it
needs no NEXT state.

The decoder (`risc_decoder`) is purely combinational. The header of
`rtl/risc_decoder.sv` lists what it does in each state. Points to know:
* **PC during execution.** PC holds the address of the current instruction
  while it executes. CALL and JMPL save that address, so a subroutine returns
  with `JMPL R15+4, R0`.
* **Stores.** A store sends rd to the RAM through the ALU, as R0 OR rd.
* **JMPL with rd equal to rs1 or rs2.** JMPL writes rd in EX1 and forms the
  target in EX2. If rd equals rs1 or rs2, the target is therefore formed from
  the new value.

**Reset** starts the sequencer in FETCH with PC = MAR = 0.

**RAM size.** The RAM is parameterised by `ADDR_W` (`RAM_ADDR_W` on the
top), the number of word-address bits. The default is 28, which gives
1 GByte. The processor's 32-bit MAR and PC could address the full 4 GByte
(ADDR_W = 30). However, verilator refuses arrays of 2^29 or more entries, so
28 is the largest size that simulates; the simulation then needs about 1 GByte
of host memory. Synthesis of a memory this large in yosys needs
tens of GBytes (about 3.4 GByte already at ADDR_W = 25); use a smaller
`RAM_ADDR_W` for synthesis experiments.

---

## 3. Files

| File | Contents |
|---|---|
| `rtl/control_unit_top.sv` | both machines side by side |
| `rtl/cisc_machine.sv` | accumulator machine: control-store loader, `ucode_ctrl`, `cisc_datapath`, `ram` |
| `rtl/cisc_pkg.sv` | ALU codes, opcode map, microprogram builder `build_image()` |
| `rtl/cisc_datapath.sv`, `rtl/cisc_alu.sv` | accumulator datapath and ALU with flags |
| `rtl/ucode_ctrl.sv`, `rtl/useq.sv`, `rtl/reg_out_decoder.sv`, `rtl/ucode_pkg.sv` | two-level control unit |
| `rtl/risc_*.sv`, `rtl/risc_pkg.sv` | RISC processor and its parts |
| `rtl/ram.sv` | RAM, with a load port for placing programs |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/cisc_tb_pkg.sv`, `tb/risc_tb_pkg.sv` | reference models and program generators |

## 4. Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
end-to-end test `tb_control_unit_top` runs with the default parameters and
takes a few seconds:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/ucode_pkg.sv rtl/risc_pkg.sv rtl/cisc_pkg.sv \
    tb/risc_tb_pkg.sv tb/cisc_tb_pkg.sv tb/tb_control_unit_top.sv \
    --top-module tb_control_unit_top -o tb
./obj_dir/tb
```

Other testbenches are built the same way: name the packages first, then the
testbench. What the tests check:

* **`tb_cisc_machine`** runs three kinds of program: a counting loop, a
  program with subroutines and all the addressing modes, and 300 random
  programs. At every fetch it compares ACC, X, S, PC and the flags with the
  model. It checks each instruction's cycle count against the table in 1.4,
  and compares all of memory at the end.
* **`tb_risc_cpu`** does the same for the RISC: register file, flags, data
  memory and total cycle count.
* **`tb_control_unit_top`** repeats smaller versions of both. It also counts
  every mechanism and fails if any never happened:
  * each instruction class;
  * each addressing mode;
  * branches taken and not taken;
  * extended arithmetic;
  * writes to R0;
  * micro-PC dispatch, jump, and conditional jumps both taken and not taken.

To change the microprogram, edit `build_image()` in `rtl/cisc_pkg.sv`. The
stores are loaded from its result at start-up, and the nanowords are merged
automatically. The limit is 64 distinct nanowords; raise `NA_W` if a larger
program needs more.
