# LC-3: a 16-bit RISC processor, one instruction at a time

This is synthesizable SystemVerilog for an LC-3 processor: a small 16-bit
load/store machine with eight general registers R0-R7, three condition codes
(N, Z, P) and a 16-bit word-addressed memory space. It is written after a
published description of an LC-3 built from six units - Fetch, Decode,
Execute, MemAccess, Writeback and a Controller - with separate instruction and
data memories. The processor is **not pipelined**: each instruction is fetched,
decoded, executed, given its memory accesses and written back before the next
one is fetched. That keeps the control simple and removes every data hazard.

The RTL runs the LC-3 instructions ADD, AND, NOT, BR, JMP (and RET), JSR, JSRR,
LD, LDR, LDI, LEA, ST, STR and STI with their standard encodings. TRAP, RTI and
the reserved opcode are accepted but only advance the PC (see *Departures*).

## Units and how they connect

```
            +-------+  pc / instrmem_rd       +-------------------+
            | Fetch |------------------------>| instruction memory|
            +-------+ <-- taddr = pcout       +-------------------+
              | npc          br_taken               | Instr_dout
              v                                     v
            +--------------------------------------------+
            | Decode: IR, npc_out, E/W/Mem control words |
            +--------------------------------------------+
              |                  ^ VSR1/VSR2     
              v                  | sr1/sr2        
            +---------+  dr, aluout, pcout  +-----------+
            | Execute |-------------------->| Writeback |  R0-R7, psr
            +---------+                     +-----------+
              | pcout (M_addr), M_Data           ^ memout
              v                                  |
            +-----------+  DMem_*  +-------------+
            | MemAccess |<-------->| data memory |
            +-----------+          +-------------+
                 ^ mem_state
            +------------+  enables, br_taken, mem_state
            | Controller |
            +------------+
```

| Module | Role |
|---|---|
| `lc3_fetch` | PC register (reset value 3000h), `npc = pc + 1`, loads `npc` or the target `taddr` |
| `lc3_decode` | Latches the instruction into IR and produces the control words |
| `lc3_execute` | ALU (ADD/AND/NOT) and address adder; registers the results |
| `lc3_memaccess` | Combinational driver of the data-memory port, selected by `mem_state` |
| `lc3_writeback` | Register file with two read ports and one write port, and `psr` |
| `lc3_controller` | Steps each instruction through the stages; decides branches |
| `lc3` | Top: the six units wired together, memory ports brought out |
| `lc3_pkg` | Opcodes, control-word structs and enums, helper functions |

## The life of one instruction

The controller has one state per stage. Each stage enable is high for exactly
one state:

| Controller state | What happens at the end of the cycle |
|---|---|
| FETCH (`enable_fetch`) | The instruction memory reads the word at `pc` |
| DECODE (`enable_decode`) | IR, `npc_out` and the three control words are loaded |
| EXECUTE (`enable_execute`) | `aluout`, `pcout`, `M_Data`, `dr`, the branch mask `NZP` are loaded |
| MEM (loads and stores only) | One or two data-memory accesses, each held until `complete_data` |
| WRITEBACK (`enable_updatePC`) | `R[dr]` and `psr` are written if the instruction writes a register; PC loads `npc` or, if `br_taken`, `pcout` |

A non-memory instruction therefore takes **4 cycles**. LD, LDR, ST and STR add
one memory state, LDI and STI add two; each memory state lasts one cycle plus
the memory's wait cycles plus the cycle in which `complete_data` is high.
With a memory that answers at once, LD takes 6 cycles and LDI 8.

Operands are read from the register file combinationally during EXECUTE. Since
the previous instruction has always completed its writeback by then, Execute's
operand-bypass inputs (`bypass_alu_1/2`, `bypass_mem_1/2`), which the unit
provides for forwarding `aluout` or a memory value, are tied to 0 by this
controller.

## Control words

Decode turns the opcode into three words (types in `lc3_pkg`):

`E_control` (6 bits) = `{alu_control[1:0], pcselect1[1:0], pcselect2, op2select}`

| Field | Values |
|---|---|
| `alu_control` | 00 ADD, 01 AND, 10 NOT |
| `pcselect1` (address offset) | 00 sext(IR[10:0]), 01 sext(IR[8:0]), 10 sext(IR[5:0]), 11 zero |
| `pcselect2` (address base) | 1 `npc`, 0 base register VSR1 |
| `op2select` | 1 VSR2, 0 sext(IR[4:0]) |

Resulting words: ADD 00/01 (immediate/register), AND 10/11, NOT 20, BR, LD,
ST, LEA, LDI, STI 06, LDR/STR 08, JMP and JSRR 0c, JSR 02 (hexadecimal).

`W_control` picks what Writeback stores in `R[dr]`: 0 `aluout`, 1 `memout`
(loads), 2 `pcout` (LEA), 3 `npc` (the JSR/JSRR return address into R7).

`Mem_control` is 1 for the indirect instructions LDI and STI.

Execute also derives the registers: `sr1 = IR[8:6]`; `sr2 = IR[2:0]`, or
`IR[11:9]` for stores so that VSR2 is the value to store; `dr = IR[11:9]`
(R7 for JSR/JSRR).

## Condition codes and branches

After every register write except the JSR/JSRR link, `psr = {N,Z,P}` is set
from the written value: 100 negative, 010 zero, 001 positive. `psr` resets to
000.

Execute registers a mask `NZP`: `IR[11:9]` for BR, 111 for JMP, JSR and JSRR,
000 for everything else. In WRITEBACK the controller raises

    br_taken = (NZP == 3'b111) || ((NZP & psr) != 0)

and Fetch then loads `pcout`, the target computed by the address adder
(`npc + offset9` for BR, `npc + offset11` for JSR, the base register for JMP
and JSRR). The `NZP == 111` term makes jumps and BRnzp unconditional even
before the first condition code has been set.

## Memory access and indirect addressing

This is the least obvious part of the design. MemAccess is purely
combinational; the controller's 2-bit `mem_state` selects what it drives:

| `mem_state` | Meaning | `DMem_addr` | `DMem_rd` | `DMem_din` | `DMem_en` |
|---|---|---|---|---|---|
| 0 | read | `M_addr`, or `DMem_dout` for LDI | 1 | 0 | 1 |
| 1 | read indirect | `M_addr` | 1 | 0 | 1 |
| 2 | write | `M_addr`, or `DMem_dout` for STI | 0 | `M_Data` | 1 |
| 3 | idle | 0 | 0 | 0 | 0 |

`M_addr` is Execute's `pcout`. The state sequences are

    LD, LDR : 0 -> 3          ST, STR : 2 -> 3
    LDI     : 1 -> 0 -> 3     STI     : 1 -> 2 -> 3

and every state is held while `complete_data` is 0. For LDI and STI the word
read in state 1 is the pointer: it is **not** copied into a processor register,
MemAccess feeds the memory's own output `DMem_dout` straight back as the next
address. That is why the data memory must have a registered read whose output
holds its value until the next read. `memout` is simply `DMem_dout`, read by
Writeback in the cycle after the last memory state.

### Data-memory handshake

- A request is present while `DMem_en` is high.
- The memory may take any number of cycles. It then performs the access and
  raises `complete_data` for exactly one cycle, with the read data already on
  `DMem_dout`.
- In the cycle when `complete_data` is high the request is still on the bus
  (the controller moves on at the end of that cycle); the memory must ignore
  it, or a read-indirect would be repeated with the new address.

### Instruction memory

When `instrmem_rd` is high, the memory puts the word at `pc` on `Instr_dout`
after the next rising edge (registered read) and holds it. Decode loads it one
cycle later.

## Interface of `lc3`

| Port | Dir | Width | |
|---|---|---|---|
| `clock`, `reset` | in | 1 | reset is synchronous, active high; PC goes to `PC_RESET`, registers and `psr` to 0 |
| `pc`, `instrmem_rd` | out | 16, 1 | instruction address and read strobe |
| `Instr_dout` | in | 16 | instruction word |
| `DMem_addr`, `DMem_din` | out | 16 | data address and write data |
| `DMem_rd`, `DMem_en` | out | 1 | 1 read / 0 write; request valid |
| `DMem_dout`, `complete_data` | in | 16, 1 | read data; access finished |

Parameter: `PC_RESET` (default `16'h3000`).

## Departures and choices

What follows the original description: the six units and their port names,
the PC reset value 3000h and `npc = pc + 1`, the register selection fields,
the N/Z/P meaning, the meaning of the four memory states and their
transitions, the writeback select codes 0/1/2, and the control-word values for
LDI, ADD, AND, LDR, BR and JMP.

Choices made here, where the description is silent or unclear:

- **Not pipelined.** The description calls the processor both pipelined and
  non-pipelined; its controller section and conclusion describe one
  instruction completing before the next fetch, which is what is built. The
  bypass inputs of Execute therefore stay unused in the assembled processor.
- The field order inside `E_control`, the ALU and offset encodings, and
  `W_control = 3` for the JSR/JSRR link.
- JSR and JSRR are included because the datapath has what they need (the
  offset11 adder input and the `npc` input of Writeback); TRAP and RTI are not,
  since no trap vector table or privilege mode is described. They execute as
  no-operations.
- Two-state buses: where the description leaves the data-memory bus undriven
  (state 3, and `instrmem_rd` when not fetching), the RTL drives 0 and adds
  `DMem_en` to mark a valid request.
- The `complete_data` handshake rules above, the registered-read memories,
  the single-cycle stages, synchronous reset, and registers reset to 0.
- `psr` is not changed by the JSR/JSRR link write; LEA does set it.
- Decode has a `psr` input in its interface; nothing in decoding uses it.
- The controller takes the opcode from Decode's IR, which is held from DECODE
  to the next FETCH; Execute's `IR_Exec` output is left unconnected at the top.

## Verification

Every unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog:

| Testbench | What it checks |
|---|---|
| `tb_lc3_fetch` | reset value, increment, hold, branch load, `instrmem_rd` |
| `tb_lc3_decode` | IR/npc latching, hold, control words for every opcode against a table, seven known instruction words |
| `tb_lc3_execute` | ALU, address adder, bypass priority, `sr2` for stores, `dr`, `NZP`, against a bit-field model; directed ADD/AND/NOT/LDI/LDR/JSR/JMP/BR values |
| `tb_lc3_memaccess` | the state table for both `M_Control` values |
| `tb_lc3_writeback` | register file and `psr` against a reference copy; N/Z/P encoding; link write keeps `psr` |
| `tb_lc3_controller` | cycle-by-cycle stage and `mem_state` sequence for every opcode with random wait cycles, `br_taken`, 4-cycle ALU latency |
| `tb_lc3` | the whole processor against an instruction-set model |

`tb_lc3` runs the processor at its default parameters with 64K-word
instruction and data memories filled with random words; the data memory adds
0-2 random wait cycles per access. It first runs a fixed nine-instruction
sequence at 3000h (LDI, ADD, ADD, ADD, AND, ADD, LDR, BR, JMP), then random
instructions; each executed word is replaced by a new random one so the program
never loops. At every retirement it compares PC, R0-R7, `psr` and the stored
word with the model, it resets the processor halfway through, and it compares
the whole data memory at the end. It fails if any opcode, a taken or a
not-taken branch, any of the memory states 0/1/2, a wait cycle or the mid-run
reset never occurred. A run of 3000 instructions takes well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_lc3 \
        -y rtl -y tb +libext+.sv rtl/lc3_pkg.sv tb/tb_lc3.sv -o sim
    ./obj_dir/sim

Replace `tb_lc3` by any other testbench name to run a unit test. To lint the
RTL: `verilator --lint-only -Wall -y rtl rtl/lc3_pkg.sv rtl/lc3.sv`. The
remaining lint warnings are unused signals that are explained in the module
headers (Decode's `psr`, the controller's non-opcode IR bits, `IR_Exec`).

To change the instruction set, edit the opcode cases in `lc3_decode`,
`lc3_execute` (destination and branch mask), `lc3_controller` (memory states)
and the helper functions `is_load`, `is_store` and `writes_reg` in `lc3_pkg`,
and add the instruction to the model in `tb_lc3`.
