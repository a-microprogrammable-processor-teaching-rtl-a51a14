# An 8-bit microprogrammable processor in the Am2900 style

This is a small processor whose instruction set lives in a table. It was designed
for teaching microprogramming. Each machine instruction ("macro-instruction") in
the 32-byte program memory is carried out as a short sequence of 70-bit
micro-instructions. The user writes those sequences into the micro-memory.
A mapping PROM tells the machine where each opcode's sequence starts.
Changing those two tables, plus the macro-program, gives a new instruction set
on the same hardware.

The hardware follows the classic AMD bit-slice family:

* a **2910** sequencer (the control unit, CCU) picks the next micro-address;
* a **2901** ALU slice, 8 bits wide, holds 16 scratch pad registers and a Q register;
* a **2904** status unit stores flags and turns them into branch conditions.

Around them sit an 8-bit bus and the macro-level registers: MAR (memory
address), MBR (memory buffer) and the 16-bit IR (instruction register). A
display unit maps six switches to eight LEDs so the machine can be watched on
an FPGA board.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The sequencer
instruction set and the ALU source/function/destination codes are those of
the AMD Am2910 and Am2901. The rest of the micro-instruction encoding is
defined here (see *Micro-instruction format*).

## Block diagram

```
              +--------------- branch address (BA, 8) ------------------+
              |                                                         |
 IR opcode -> mapping PROM --(map_n)--+                                 |
                                      v                                 |
                 cc_n  -------->  ccu_2910 --Y--> micro_memory --> pipeline_reg (70 bits)
                  ^                 (2910)          256 x 70         |  fields A..H
                  |                                                  v
             status_2904 <--- ALU flags ---  alu_2901  <--- control: E, G, H
              (2904)                          (2901)
                                   D ^          | Y
                                     |          v
   ALU constant (B) --const_oe--> [ data_bus, 8 bits ] <--mbr_oe-- mbr_reg <-- macro_memory
                                     |      |       |                ^            ^ 32 x 8
                                     v      v       v                |            |
                                  mar_reg  ir_reg (MSB/LSB)     (mbr_ld)     addr = MAR[4:0]
```

`mpp_top` wires all of this together. Its ports are `clk` and `rst`
(synchronous, active high), `sel[5:0]` for the display switches and
`leds[7:0]`.

## How one macro-instruction runs

The micro-cycle is one clock period. At every rising edge:

1. the pipeline register captures the micro-memory word at the sequencer's
   output `Y`. That word is now the *current* micro-instruction.
2. all data-path registers that the previous micro-instruction asked to load
   take their new values. These are the scratch pad registers, Q, MAR, IR,
   flags, and the sequencer's micro-PC, counter and stack.

During the cycle the current micro-instruction drives everything. The ALU
computes, one source drives the bus, and the sequencer already computes `Y`
for the next cycle from the NAS field, the branch address, the condition and
its own state. This overlap is the pipeline: the next micro-instruction is
fetched while the current one executes.

The macro-memory is the one place that uses the falling edge. A micro-instruction
that sets READ or WRITE usually also loads the MAR, and that load takes place
at the rising edge ending the cycle. The access itself is therefore done
half a cycle later, at the falling edge inside the following micro-cycle:

* **READ in cycle k:** the MBR captures `mem[MAR]` at the falling edge in
  cycle k+1. A micro-instruction in cycle k+1 can put the MBR on the bus
  (`mbr_oe`), and a register takes it at the end of cycle k+1.
* **WRITE in cycle k:** `mem[MAR] <= MBR` at the falling edge in cycle k+1.
* **`mbr_ld` in cycle k:** the MBR takes the bus at the falling edge in cycle k,
  once the bus has settled.

The default microprogram implements instruction fetch (FETCHINSTR) in four
micro-instructions. Scratch pad register 0 is the macro program counter:

| address | action |
|---|---|
| 05h | PC on the bus, MAR <- PC, PC <- PC + 1, READ (2901: source ZB, R+S, destination RAMA, carry 1) |
| 06h | MBR on the bus, IR opcode byte <- bus |
| 07h | same as 05h |
| 08h | MBR on the bus, IR operand byte <- bus; sequencer **JMAP**: next address from the mapping PROM |

Each instruction's routine ends with an unconditional jump back to 05h. That
jump is CJP with the force bit set.

### Instruction layout

* The opcode is bits 4:0 of the first byte; bits 7:5 are ignored.
* The second byte holds two register numbers: A in bits 7:4 and B in bits 3:0.
  The 2901 writes its results to register B.
* A micro-instruction takes A, B or both from the IR instead of its own `aa` /
  `ab` fields when it sets `useira` / `useirb`.
* Longer instructions read more bytes themselves, by repeating the
  "PC to MAR, increment, read" step.

### After reset

While `rst` is high the pipeline holds a JZ word that writes nothing. The
RESET routine at micro-addresses 00h-04h then runs for five micro-cycles.
It clears PC, Q, both flag registers and MAR, then jumps to 05h. The sixth
rising edge after reset brings FETCHINSTR into the pipeline. The scratch pad
registers other than R0 are not cleared.

## Micro-instruction format (70 bits, `mpp_pkg::uinstr_t`)

| field | bits | contents |
|---|---|---|
| A. 2910 | 12 | `nas[3:0]` next-address instruction, `ba[7:0]` branch address / counter value |
| B. ALU constant | 8 | `alu_const`, put on the bus by `bus.const_oe` |
| C. memory | 2 | `mem_read`, `mem_write` |
| D. bus | 11 | sources: `alu_oe`, `mbr_oe`, `const_oe`; loads: `adr_ld` (MAR), `mbr_ld`, `ir_msb_ld`, `ir_lsb_ld`; 4 reserved bits |
| E. 2901 | 21 | `aa[3:0]`, `ab[3:0]`, `useira`, `useirb`, `nop` (blocks every ALU register write), `src[2:0]`, `fn[2:0]`, `dst[2:0]`, `carry` |
| F. 2904 | 10 | `cond_sel[2:0]`, `polarity`, `force_cond`, `flag_src[4:0]` |
| G. RAM shift | 3 | `ram_in`: bit shifted into the RAM shifter |
| H. Q shift | 3 | `q_in`: bit shifted into the Q shifter |

The group widths are the original design's: 12, 8, 2, 11, 27 for the ALU
(E + G + H) and 10. How each group splits into single bits is this design's
choice.

**Sequencer (`nas`), Am2910 codes.**

| code | name | code | name |
|---|---|---|---|
| 0 | JZ | 8 | RFCT |
| 1 | CJS | 9 | RPCT |
| 2 | JMAP | A | CRTN |
| 3 | CJP | B | CJPP |
| 4 | PUSH | C | LDCT |
| 5 | JSRP | D | LOOP |
| 6 | CJV | E | CONT |
| 7 | JRP | F | TWB |

* The return stack holds five entries.
* The counter and the R register load together from `ba`, on LDCT and on a
  PUSH whose condition passes. The counter then counts down; the register
  keeps the loaded value.
* CJV uses the branch address, because there is no vector source.

**ALU, Am2901 codes.**

* Sources (R, S): 0 AQ, 1 AB, 2 ZQ, 3 ZB, 4 ZA, 5 DA, 6 DQ, 7 DZ. D is the bus.
* Functions:

  | code | F |
  |---|---|
  | 0 | R+S+Cn |
  | 1 | S-R-1+Cn |
  | 2 | R-S-1+Cn |
  | 3 | R OR S |
  | 4 | R AND S |
  | 5 | NOT R AND S |
  | 6 | R XOR S |
  | 7 | R XNOR S |

* Destinations:

  | code | name | what it does |
  |---|---|---|
  | 0 | QREG | F -> Q |
  | 1 | NOP | no write |
  | 2 | RAMA | F -> B, Y = A |
  | 3 | RAMF | F -> B |
  | 4 | RAMQD | F/2 -> B and Q/2 -> Q |
  | 5 | RAMD | F/2 -> B |
  | 6 | RAMQU | 2F -> B and 2Q -> Q |
  | 7 | RAMU | 2F -> B |

  Y = F for every destination except RAMA.
* Flags Z, N, C and V describe F. C and V are 0 for the logic functions.
* Shift-in codes (`ram_in`, `q_in`):

  | code | bit shifted in |
  |---|---|
  | 0 | 0 |
  | 1 | 1 |
  | 2 | rotate (the shifter's own outgoing bit) |
  | 3 | link (the other shifter's outgoing bit, for 16-bit shifts of B:Q) |
  | 4 | micro carry flag |
  | 5 | sign F[7] |

**Status unit.**

* `flag_src` bits:

  | bit | action |
  |---|---|
  | 0 | micro flags <- ALU |
  | 1 | macro flags <- ALU |
  | 2 | with bit 1, macro flags <- micro flags instead |
  | 3 | clear micro flags |
  | 4 | clear macro flags |

* `cond_sel` codes:

  | code | condition |
  |---|---|
  | 0 | false |
  | 1 | micro Z |
  | 2 | micro N |
  | 3 | micro C |
  | 4 | micro V |
  | 5 | macro Z |
  | 6 | macro N |
  | 7 | macro C |

* The condition passes when `force_cond | (cond ^ polarity)`. It reaches the
  sequencer active low, as `cc_n`.
* Flags are registered. A branch therefore tests flags that an earlier
  micro-instruction loaded.

`mpp_pkg` provides helpers for building words: `ui_idle()`, `ui_jump(target)`
and `ui_pc_to_mar_inc()`.

## The three tables

| parameter of `mpp_top` | what it is | default |
|---|---|---|
| `MICROPROGRAM` | 256 words of 70 bits | RESET (00h-04h), FETCHINSTR (05h-08h), ADD (0Bh): R[B] <- R[A] + R[B] with flags, LOAD R,imm (19h-1Ah): R[B] <- the byte after the instruction |
| `MAP` | 32 entries of 8 bits | opcode 01h -> 19h, 02h -> 0Bh, all others -> 00h (RESET) |
| `MACRO_PROGRAM` | the 32 bytes loaded into the macro-memory | `01 08 03  01 09 04  02 98`: LOAD R8,3; LOAD R9,4; ADD with A = 9, B = 8 |

The default program leaves R8 = 7, R9 = 4 and PC = 8. The byte at address 8
is 00h, and opcode 00h maps to RESET, so the program then starts over.

To add an instruction:

1. write its routine into free micro-addresses;
2. end the routine with a forced CJP to 05h;
3. point its opcode at the routine in `MAP`.

`tb/tb_mpp_top.sv` does this for nine more instructions: a loop, memory store
and load, decrement, a conditional jump, a subroutine call, a double shift,
absolute value and halt. It is a worked example of the encoding.

## Display switches

`sel[5] = 1` shows macro-memory byte `sel[4:0]`. `sel[5:4] = 00` shows scratch
pad register `sel[3:0]`. `sel[5:4] = 01` shows an internal value chosen by
`sel[3:0]`:

| `sel[3:0]` | LEDs show |
|---|---|
| 0 | sequencer output Y (the micro-address being fetched) |
| 1 | IR opcode byte |
| 2 | IR operand byte |
| 3 | MAR |
| 4 | MBR |
| 5 | bus |
| 6 | Q |
| 7 | flags {macro Z N C V, micro Z N C V} |
| 8 | micro-PC |
| 9 | loop counter |

The testbenches read the machine's state only through this port.

## Files

| file | block |
|---|---|
| `rtl/mpp_pkg.sv` | types, field encodings, default tables |
| `rtl/mpp_top.sv` | the whole processor |
| `rtl/ccu_2910.sv` | sequencer |
| `rtl/alu_2901.sv` | ALU, scratch pad registers, Q, shifters |
| `rtl/status_2904.sv` | flag registers and condition |
| `rtl/micro_memory.sv` | micro-program ROM |
| `rtl/pipeline_reg.sv` | pipeline register |
| `rtl/mapping_prom.sv` | opcode to micro-address table |
| `rtl/macro_memory.sv` | 32-byte program/data memory |
| `rtl/mar_reg.sv` | MAR |
| `rtl/mbr_reg.sv` | MBR |
| `rtl/ir_reg.sv` | IR |
| `rtl/data_bus.sv` | bus multiplexer; an assertion allows at most one source |
| `rtl/display_unit.sv` | LED selector |

Each `tb/tb_<module>.sv` is a self-checking testbench for its module. Three
cover the whole processor:

* `tb/tb_mpp_top_full.sv` runs the default example program with no parameters
  changed. It checks values and cycle counts.
* `tb/tb_mpp_top.sv` runs the extended instruction set. It checks results and
  that HALT is reached on the 149th rising edge after reset. It also counts
  every mechanism that occurs (map jumps, counter loops, calls and returns,
  memory reads and writes, branches taken and not taken on macro and micro
  flags, linked shifts, forced conditions) and fails if any of them never
  happens.
* `tb/tb_mpp_top_listing.sv` runs the example program with the fetch steps
  encoded as CJS with a failing condition, the way the original micro-code
  does. It checks that results and cycle counts do not change.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/mpp_pkg.sv rtl/*.sv \
    tb/tb_mpp_top.sv --top-module tb_mpp_top
./obj_dir/Vtb_mpp_top
```

Use the same command with any other testbench name. Every testbench ends by
printing `TB_RESULT checks=N failures=M`. Each has a watchdog, and all of them
finish in well under a second. The package must come first on the command
line.

## Where this design departs from the original, and what to trust

* **Register write edge.** The original ALU computes after the rising edge and
  stores its result at the following falling edge. Here the ALU registers,
  like every register except the MBR and the macro-memory, are written at the
  rising edge that ends the micro-cycle. What a micro-instruction does is the
  same either way.
* **Bus.** The original uses a three-state bus. Here it is a multiplexer with
  the same output enables, and an idle bus reads 0. The ALU's D input sees
  only the other bus sources. A micro-instruction that sets `alu_oe` and also
  reads D therefore gets 0 on D, where the real bus would have a conflict.
* **Encodings that are this design's own:**
  * the meaning of the 2904 bits;
  * the shift-in selectors;
  * the bus control bits;
  * the `nop` bit;
  * the display selection map.

  Only the widths of these fields come from the original.
* **Source code for an immediate load.** A listing of the original LOAD R,imm
  routine gives source code 0 for the step that loads the bus into a
  register. Under the Am2901 encoding, which the original fetch routine
  clearly uses, code 0 is (A, Q). The default microprogram here uses 7 (D, 0).
* **Which register the example ADD writes.** The example program's comment
  puts the result of `ADD` with operand 98h in register 9. With A = bits 7:4
  and B = bits 3:0, and the 2901 writing to B, the result goes to register 8.
  The testbench expects R8 = 7.
* **Sequential steps in the microprogram.** The original micro-code uses
  NAS = 1 (CJS) with a failing condition to step to the next address. The
  default microprogram here uses CONT. Because condition select 0 is
  constant false, the original words would also behave the same here.
* **Sequencer details taken from the Am2910 data sheet:** the stack depth (5),
  stack overflow behaviour, and the separate counter and register.
* **Not part of the RTL:** the FPGA board, and how the tables are downloaded
  to it. The tables are parameters, so a change means re-elaborating the
  design.

Verification covers:

* every block on its own, with directed tests (the sequencer) or random tests
  against a reference model (ALU, status unit, registers, bus, display);
* the whole processor on the example program and on the extended instruction
  set.

Each testbench was also run against a copy of its block with one deliberate
bug, and failed as it should. Nothing has been checked on FPGA hardware.
