# Multicycle MIPS subset processor

A small teaching processor that executes nine MIPS instructions — `add`,
`sub`, `and`, `or`, `slt`, `lw`, `sw`, `beq` and `j` — with **one** ALU,
**one** memory for both instructions and data, and one register file. Each is
used more than once per instruction. An instruction therefore runs over
several clock cycles. Registers between the cycles (PC, IR, MDR, A, B, ALUOut)
hold what one step produced for the next step. A small stage counter and a
combinational control table decide, in each cycle, which multiplexer inputs
are selected and which registers load.

The RTL follows the classic textbook multicycle datapath (the
Patterson & Hennessy organisation) as built in a university lab exercise. The
components, their connections, the control table, the memory map and the
preloaded demo program all come from that exercise. The places where this RTL
makes its own choices are listed in
[Departures and design choices](#departures-and-design-choices).

## Instruction subset

| instruction | opcode `[31:26]` | funct `[5:0]` | cycles |
|---|---|---|---|
| `add rd, rs, rt` | `000000` | `100000` | 4 |
| `sub rd, rs, rt` | `000000` | `100010` | 4 |
| `and rd, rs, rt` | `000000` | `100100` | 4 |
| `or  rd, rs, rt` | `000000` | `100101` | 4 |
| `slt rd, rs, rt` | `000000` | `101010` | 4 |
| `lw rt, off(rs)` | `100011` | – | 5 |
| `sw rt, off(rs)` | `101011` | – | 4 |
| `beq rs, rt, off` | `000100` | – | 3 |
| `j target` | `000010` | – | 3 |

There are no delay slots. A branch target is `PC+4 + (signext(off) << 2)`. A
jump target is `{PC+4[31:28], target, 00}`. If the control reaches the execute
or memory stage with any other opcode, it goes back to the boot stage, which
restarts the program at `0x00400000`. An R-type instruction with an unknown
funct code runs as `and`.

## The stage sequence

This is the core of the design. The 3-bit stage register (`stage`) is loaded
on every rising edge with the `stageout` of `maincontrol`. `maincontrol` is
purely combinational and is a function of only the stage and `IR[31:26]`.

| stage | name | all instructions / per class | control asserted |
|---|---|---|---|
| `000` | boot | `PC <= 0x00400000` | PCWrite, PCSource=11 |
| `001` | fetch | `IR <= Mem[PC]`, `PC <= PC + 4` | MemRead, IRWrite, PCWrite, ALUSrcB=01 |
| `010` | decode | `A <= R[rs]`, `B <= R[rt]`, `ALUOut <= PC + (signext(off) << 2)` | ALUSrcB=11 |
| `011` | execute | R-type: `ALUOut <= A op B` | ALUSrcA, ALUOp=10 |
| | | lw/sw: `ALUOut <= A + signext(off)` | ALUSrcA, ALUSrcB=10 |
| | | beq: `if (A == B) PC <= ALUOut` → fetch | ALUSrcA, ALUOp=01, PCWriteCond, PCSource=01 |
| | | j: `PC <= jump address` → fetch | PCWrite, PCSource=10 |
| `100` | memory | R-type: `R[rd] <= ALUOut` → fetch | RegWrite, RegDst |
| | | lw: `MDR <= Mem[ALUOut]` | IorD, MemRead |
| | | sw: `Mem[ALUOut] <= B` → fetch | IorD, MemWrite |
| `101` | write-back | lw: `R[rt] <= MDR` → fetch | RegWrite, MemtoReg |

Some things in this table are easy to miss:

* **Decode computes the branch target speculatively.** In stage 010 the
  instruction is not yet known to be a branch. The ALU is free, so it computes
  `PC + offset*4` anyway; the PC already holds PC+4 after fetch. `beq` then
  uses the ALU in stage 011 to compare A and B (subtract, look at `Zero`). The
  PC is loaded from ALUOut only if `Zero` is 1:
  `pcload = PCWrite | (PCWriteCond & Zero)`.
* **A, B, MDR and ALUOut load on every clock.** Only IR (IRWrite), the PC
  (pcload) and the stage register have conditions. Each value is therefore
  valid only for the cycle right after the one that produced it. The control
  table is built around this.
* **Every signal not listed for a stage is 0.** In the table they are
  don't-cares. This matters only for the enables: no unintended write can
  happen in any stage.
* Stage codes `110` and `111` cannot be reached; if they appear, the next stage
  is boot.

## Datapath

```
                 +-----+    IorD                       +-----------+
   PCSource ---> | PC  |---+--[0]                      |  memory   |
   mux (4:1)     +-----+   |  mux --> memaddress ----> |  ch5mem   |--> memdatain --+--> IR (IRWrite)
   0 ALU result            +-[1] ALUOut                |           |                +--> MDR
   1 ALUOut                                  B ------> | datain    |
   2 {PC[31:28],IR[25:0],00}                           +-----------+
   3 BOOT (0x00400000)
                                         RegDst: IR[20:16] | IR[15:11] -> writereg
   IR[25:21], IR[20:16] --> regfile --> A, B     MemtoReg: ALUOut | MDR -> writedata

   ALUSrcA: PC | A  ----------------+
                                    +--> wordalu --> result --> ALUOut
   ALUSrcB: B | 4 | signext(imm) |  |        (Binvert/Operation from alucontrol,
            signext(imm) << 2 ------+         CarryIn = Binvert)
```

`mips_multicycle` builds this from the blocks below. All multiplexers are
instances of `mux2` / `mux4`, and all state registers are instances of
`nbitregister`.

## The ALU

`wordalu` is a ripple-carry ALU made of 32 one-bit slices: 31 `bitalu` and one
`msbalu` on top. Each slice optionally inverts `b` (`Binvert`) and then
produces `a & b'`, `a | b'`, the full-adder sum, or its `Less` input, as
`Operation` (00, 01, 10, 11) selects. Subtraction is `a + ~b + 1`: Binvert and
CarryIn are both 1. `alucontrol` sets Binvert, and the datapath wires CarryIn
to the same signal.

For `slt` all slices subtract. The MSB slice outputs `set`, the sign of
`a - b`, and this is wired back to the `Less` input of bit 0; all other `Less`
inputs are 0. The result is therefore 1 exactly when `a < b` (signed). `set`
is the raw sign bit XOR the overflow, so `slt` stays correct when `a - b`
overflows (for example `0x7FFFFFFF < 0x80000000` gives 0). `Overflow` (carry
into the MSB XOR carry out) comes from the adder whatever the operation. It is
brought out, but nothing in the processor uses it. `Zero` is the NOR of all
result bits.

`alucontrol` decodes:

| ALUOp | funct | Binvert | Operation | action |
|---|---|---|---|---|
| 00 | any | 0 | 10 | add (address, PC+4) |
| 01 | any | 1 | 10 | subtract (beq) |
| 10 | 100000 / 100010 / 100100 / 100101 / 101010 | 0/1/0/0/1 | 10/10/00/01/11 | add / sub / and / or / slt |
| 10 | other | 0 | 00 | and |
| 11 | any | 0 | 00 | and (unused code) |

## Memory, register file and start-up

`ch5mem` holds two 256-word segments. The upper address bits `[31:10]` choose
the segment:

| segment | byte addresses | preloaded with |
|---|---|---|
| program | `0x00400000`–`0x004003FF` | the demo program (words 0–8) |
| data | `0x10000000`–`0x100003FF` | `DATA0` at `0x10000000`, `DATA1` at `0x10000004` |

Bits `[9:2]` select the word; bits `[1:0]` are ignored. Other addresses read
as 0 and ignore writes.

* **Reads are combinational.** While `memread` is high, `dataout` shows the
  addressed word in the same cycle; IR or MDR captures it at the next rising
  edge. Without `memread`, `dataout` is 0.
* **Writes happen on the falling clock edge**, and only while `memread` is
  low. Address (ALUOut) and data (B) come from registers that changed at the
  rising edge before, so they are stable halfway through the cycle.

`regfile` has 32 registers, two combinational read ports and one write port.
The write port writes on the rising edge while `RegWrite` is high. Register 0
is *not* hardwired to zero, as in the original design. None of the supported
programs writes it.

`startup` is asynchronous and active high. It does the following:

* clears IR, MDR, A, B, ALUOut and the stage register (stage 000 = boot);
* loads the register file with r0 = 0, r16 (`$s0`) = `0x10000000` (the data
  segment base), and every other register = `0xFFFFFFFF`;
* loads the program words and the two data words into the memory.

Other memory words and the PC are not initialised. The boot cycle sets the
PC. After `startup` falls, the first rising edge is the boot cycle and the
next one ends the fetch at `0x00400000`.

## The demo program

The memory comes preloaded with a routine that stores
`|mem[0x10000000] - mem[0x10000004]|` at `0x10000008` and then loads it back
into `$t0`:

```
0x00400000  8e080000  lw   $t0, 0($s0)
0x00400004  8e090004  lw   $t1, 4($s0)
0x00400008  0109502a  slt  $t2, $t0, $t1
0x0040000C  11400003  beq  $t2, $zero, +3      -> 0x0040001C
0x00400010  01285822  sub  $t3, $t1, $t0
0x00400014  08100007  j    0x0040001C
0x00400018  01095822  sub  $t3, $t0, $t1
0x0040001C  ae0b0008  sw   $t3, 8($s0)
0x00400020  8e080008  lw   $t0, 8($s0)
```

With the default inputs `0x19` and `0x37`, the result is `0x1E`. The run takes
34 cycles from boot to the fetch after the last `lw`: 1 + 5 + 5 + 4 + 3 + 4 +
3 + 4 + 5. With the negative inputs `0xFFFFFF19` and `0xFFFFFF37`, the result
is also `0x1E`, and the branch is not taken either.

**Note on the branch word.** Its offset is 3. With this datapath's target rule
the branch goes to `0x0040001C`, the `sw`, not to the second `sub` at
`0x00400018`. The routine is therefore correct only while the branch is not
taken, that is, when the first input is less than the second. If the inputs
are swapped, it stores the start-up value of `$t3` (`0xFFFFFFFF`). The RTL keeps
the program exactly as specified, and the tests check this behaviour. A
program that needs the other branch should encode an offset of 2 (`11400002`).

## Departures and design choices

Taken from the original design: the block structure and connections, the
control table and stage encoding, the boot stage and the restart on unknown
opcodes, the ALU control table, the register and memory start-up contents, the
memory map, the falling-edge memory write, and the 256-word segments.

This RTL's own choices:

* The register file writes on the rising clock edge. The original register
  file writes whenever `RegWrite` is high and has no edge condition.
* The register file and the memory get their start-up contents from the
  `startup` input. The original relied on simulation initial values for the
  register file.
* Memory output is 0 when not reading, instead of a high-impedance bus.
* Every don't-care output of `maincontrol` is driven 0, so no latches are
  inferred.
* The stage register is 3 bits wide (the original used a 32-bit register with
  29 constant bits). The register-index multiplexer is 5 bits wide (the
  original padded it to 32).
* The insides of `bitalu` and `msbalu` are only named in the original. Here
  they are the standard slice design, plus the overflow-corrected `set`
  described above.
* The memory is instantiated inside the top, with its enable tied high. All
  internal registers are brought out as observation ports.

## Parameters

`mips_multicycle` and `ch5mem`:

| parameter | default | meaning |
|---|---|---|
| `BOOT` (top only) | `32'h0040_0000` | address loaded in the boot stage |
| `DATA0`, `DATA1` | `32'h19`, `32'h37` | preloaded data words at `0x10000000`, `0x10000004` |
| `PROGRAM` | `mips_pkg::DEMO_PROGRAM` | 9 words preloaded from `0x00400000` |

The shared types and constants live in `mips_pkg`: opcodes, funct codes, ALU
encodings, stage codes, the memory map and the demo program. `mux2`, `mux4`
and `nbitregister` take a width parameter (`W` / `N`, default 32).

## Verification

Each block has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `bitalu_tb`, `msbalu_tb` test all input combinations exhaustively. The
  expected overflow/set values are derived from signed arithmetic on the sign
  position.
* `wordalu_tb` runs the worked examples of the original exercise (AND, OR,
  additions and subtractions with and without overflow, slt) plus 2000 random
  operations against SystemVerilog arithmetic.
* `alucontrol_tb` tests every ALUOp × funct combination.
* `maincontrol_tb` tests every stage × opcode combination against the step
  table above, with don't-care masks but strict write enables.
* `regfile_tb`, `ch5mem_tb`, `nbitregister_tb` check start-up contents, edge
  and enable behaviour, and asynchronous clears, and run random traffic
  against a model.
* `mips_checker` (testbench helper) is an instruction-level reference model.
  It checks a running processor through its ports: every fetch PC, every
  register and memory write, and the cycle count of every instruction.
* `mips_multicycle_tb` runs four processors. The first runs the demo program
  with the default inputs. The second swaps the inputs, so the branch is
  taken. The third uses the negative inputs. The fourth runs a program that
  uses `add`/`and`/`or`, a taken `beq` and an illegal opcode, which forces a
  restart. The testbench requires every mechanism (boot, each R-type
  function, lw, sw, taken/untaken beq, j, restart, conditional PC load) to
  occur at least once.
* `mips_multicycle` itself carries assertions (run with `--assert`): the
  memory is never read and written in the same cycle, IR loads only in fetch,
  and PCWrite and PCWriteCond are never both high.
* `mips_multicycle_full_tb` runs the unmodified top once through the demo
  program and checks the result, the instruction mix and the 34-cycle count.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/mips_pkg.sv tb/mips_multicycle_tb.sv --top-module mips_multicycle_tb
./obj_dir/Vmips_multicycle_tb
```

Replace `mips_multicycle_tb` with any other testbench name to run it. To run
your own program, override `PROGRAM` (9 words; pad with words whose encoding
you know), `DATA0` and `DATA1` on `mips_multicycle`. Pulse `startup` high
across or before the first rising clock edge.

## Files

* `rtl/mips_pkg.sv` – shared types, encodings, memory map, demo program
* `rtl/mips_multicycle.sv` – top: datapath, control and memory
* `rtl/maincontrol.sv`, `rtl/alucontrol.sv` – control
* `rtl/wordalu.sv`, `rtl/bitalu.sv`, `rtl/msbalu.sv` – ALU
* `rtl/regfile.sv`, `rtl/ch5mem.sv`, `rtl/nbitregister.sv` – storage
* `rtl/mux2.sv`, `rtl/mux4.sv`, `rtl/signextend.sv` – datapath glue
* `tb/*_tb.sv` – testbenches; `tb/mips_checker.sv` – reference model
