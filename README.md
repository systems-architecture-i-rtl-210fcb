# SCRAM: a microprogrammed 8-bit accumulator machine

SCRAM ("Simple but Complete Random Access Machine") is a teaching computer
that shows how an abstract random access machine, a machine that loads and
stores numbered memory cells through one accumulator, can be built from
registers, multiplexers and a small control unit. Every instruction runs as a
short sequence of register transfers, one per clock cycle. The control logic
is simple: a timer counts the transfer steps, a decoder turns the opcode into
one line per instruction, and each control signal is an OR of
(instruction line AND step line) terms.

The machine has:

* 8-bit words and a 16-word memory that holds both program and data;
* instructions of one word: a 4-bit opcode in the upper nibble and a 4-bit
  memory address (the operand) in the lower nibble;
* the registers PC (4 bits), IR, MAR (4 bits), MBR, AC (accumulator) and AD
  (a register inside the ALU), plus the step timer T;
* ten instructions: load, indirect load, store, indirect store, add,
  subtract, jump, jump if zero, jump if negative, halt.

## Instruction set

| opcode | mnemonic | effect | cycles |
|---|---|---|---|
| 0001 | LDA X | AC <- M[X] | 6 |
| 0010 | LDI X | AC <- M[M[X]] (low 4 bits of M[X] used as address) | 8 |
| 0011 | STA X | M[X] <- AC | 6 |
| 0100 | STI X | M[M[X]] <- AC | 8 |
| 0101 | ADD X | AC <- AC + M[X] | 8 |
| 0110 | SUB X | AC <- AC - M[X] | 8 |
| 0111 | JMP X | PC <- X | 7 |
| 1000 | JMZ X | if AC = 0 then PC <- X | 7 taken, 4 not |
| 1001 | JMN X | if AC < 0 (bit 7 set) then PC <- X | 7 taken, 4 not |
| 1010 | HLT | stop | stops after 4 |
| 0000, 1011-1111 | - | treated as HLT | stops after 4 |

Arithmetic is 8-bit two's complement and wraps on overflow; no flags are kept.
PC wraps from 15 to 0. Encodings 0001 to 1000 are the classic SCRAM ones;
JMN = 1001 and HLT = 1010 are this implementation's choice (they continue
the list in its natural order, and JMN then sits on decoder line q9, the last
instruction line of the classic datapath drawing). Making every unused code
halt means a program that runs into a zero data word stops instead of
wandering.

## Datapath

All transfers go through four multiplexers. The input numbers are the select
values the control unit drives.

| destination | select line | 0 | 1 | 2 | 3 |
|---|---|---|---|---|---|
| MAR | x10 (2 bits) | PC | IR(O) | MBR (low 4 bits) | unused (0) |
| MBR | x7 | memory | AC | | |
| AC | x11 (2 bits) | MBR | IR(O) | PC | ALU (AD) |
| ALU operand | x8 | MBR | AC | | |

Fixed paths: IR loads from MBR; the memory is addressed by MAR and written
from MBR; PC loads from AC (or increments). The opcode half of IR, IR(C),
goes to a 4-to-16 decoder whose lines q0..q15 tell the control unit which
instruction is running; the operand half, IR(O), feeds the MAR and AC
multiplexers. The timer T feeds a decoder giving step lines t0..t9.

The memory reads combinationally from MAR while its read line is high, so a
word addressed in one step is in MBR at the end of the next. Writes happen at
the clock edge.

## Control lines

The control unit (CLU) raises these lines; each register named loads at the
end of the cycle in which its line is high.

| line | field in `ctrl_t` | action |
|---|---|---|
| x1 | `ir_load` | IR <- MBR |
| x2 | `mbr_load` | MBR <- MBR multiplexer |
| x3 | `pc_load` | PC <- AC (low 4 bits) |
| x4 | `mar_load` | MAR <- MAR multiplexer |
| x5 | `mem_read` | memory drives its read data |
| x6 | `t_clear` | T <- 0 (otherwise T increments) |
| x7 | `mbr_sel` | MBR multiplexer select |
| x8 | `alu_sel` | ALU multiplexer select, and ALU "combine with AD" |
| x9 | `ad_load` | AD <- ALU result |
| x10 | `mar_sel` | MAR multiplexer select |
| x11 | `ac_sel` | AC multiplexer select |
| x12 | `ac_load` | AC <- AC multiplexer |
| x13 | `pc_inc` | PC <- PC + 1 |
| added | `mem_write` | M[MAR] <- MBR |
| added | `alu_sub` | ALU subtracts instead of adds |
| added | `halt` | stop the timer |

x1 to x13 are the classic SCRAM control lines. The last three are additions:
the classic drawing has one memory READ/WRITE line that the published step
logic raises only when reading, and no line for subtracting or stopping.

## The microprogram

Each row is one clock cycle. Steps t0 to t2 (the fetch) are the same for
every instruction; the execute steps start at t3. The step that ends an
instruction also raises x6, so T returns to t0 and the next fetch begins.

```
fetch    t0  MAR <- PC
         t1  MBR <- M          PC <- PC + 1
         t2  IR  <- MBR
LDA X    t3  MAR <- IR(O)   t4 MBR <- M    t5 AC <- MBR                    end
LDI X    t3  MAR <- IR(O)   t4 MBR <- M    t5 MAR <- MBR   t6 MBR <- M
         t7  AC <- MBR                                                     end
STA X    t3  MAR <- IR(O)   t4 MBR <- AC   t5 M <- MBR                     end
STI X    t3  MAR <- IR(O)   t4 MBR <- M    t5 MAR <- MBR   t6 MBR <- AC
         t7  M <- MBR                                                      end
ADD X    t3  MAR <- IR(O)   t4 MBR <- M    t5 AD <- MBR    t6 AD <- AD + AC
         t7  AC <- AD                                                      end
SUB X    as ADD, but      t6 AD <- AC - AD
JMP X    t3  MBR <- AC      t4 AC <- IR(O)  t5 PC <- AC    t6 AC <- MBR    end
JMZ X    t3  AC = 0: as JMP; otherwise end here
JMN X    t3  AC < 0: as JMP; otherwise end here
HLT      t3  halt: T stops, `halted` rises
```

The fetch, LDA, LDI and ADD sequences are the classic ones. The others are
this design's, and two of them need explaining.

**Jumps go through AC.** In this datapath PC can only be loaded from AC. A
jump therefore parks AC in MBR, routes the operand IR(O) into AC, copies AC
into PC, and restores AC from MBR. That takes four steps but changes neither
AC nor any other visible state except PC, and it uses the AC multiplexer's
IR(O) input, which no other instruction needs. A conditional jump decides at
t3, before AC is disturbed: if the condition fails it ends there (4 cycles),
and if it holds it continues through t4 to t6 whatever AC then holds.

**The ALU has one register and two moves.** The ALU's operand comes from MBR
(x8 = 0) or AC (x8 = 1). With x8 = 0, AD simply takes the operand; with
x8 = 1, AD takes AD + AC, or AC - AD when `alu_sub` is high. The classic ADD
sequence (AD <- MBR, then AD <- AD + AC) only uses the two printed lines x8
and x9, so x8 doubles as the ALU's load/combine choice here. SUB reuses the
ADD sequence with the subtract line raised in t6, giving AC - M[X].

**How the control lines are formed.** `scram_clu` first forms one signal per
kind of transfer, each an OR of (q AND t) products, for example
`MBR <- M = t1 | t4&(LDA|LDI|STI|ADD|SUB) | t6&LDI`. Each control line is then
the OR of the transfers that need it, and a multiplexer select is 0 unless a
transfer needs another input. The classic gate-level drawings give each step's
lines in isolation, for instance both x10 wires driven by NOT t0; combined
this way they keep the values those drawings show in every step they cover.

## Top-level interface (`scram`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock: one microstep per rising edge |
| `rst_n` | in | 1 | synchronous active-low reset of all registers and T (memory is kept) |
| `host_we`, `host_addr`, `host_wdata` | in | 1, 4, 8 | write a memory word |
| `host_rdata` | out | 8 | memory word at `host_addr` (combinational) |
| `halted` | out | 1 | a halting opcode was executed |
| `pc`, `ir`, `mar`, `mbr`, `ac`, `ad` | out | 4, 8, 4, 8, 8, 8 | register contents |
| `t_step` | out | 4 | timer T |
| `ctrl` | out | `ctrl_t` (18 bits) | control lines of the current step |

To run a program: hold `rst_n` low, write the words with `host_we`, then
release `rst_n`. Execution starts at address 0. Wait for `halted` and read the
results with `host_addr`/`host_rdata`. A host write wins over a CPU write in
the same cycle, so loading while the machine runs is possible but is then the
loader's problem. After a halt only a reset restarts the machine.

Parameters `WORD_W_P` (8) and `ADDR_W_P` (4) exist on the top, but the
instruction format ties them together: the opcode is always the upper 4 bits
and the operand is `ADDR_W_P` bits. Only the default pairing is tested.

## Programs and how far 16 words go

A multiplication loop that adds y to a running sum x times fits easily: ten
instruction words and four data words.

```
 0 LDA 10   1 JMZ 9    2 LDA 13   3 ADD 11   4 STA 13
 5 LDA 10   6 SUB 12   7 STA 10   8 JMP 1    9 HLT
10 x       11 y       12 1       13 result (0)
```

It works for any y and x >= 0, and takes 17 + 51·x cycles (one loop pass is
51 cycles). Handling x < 0 as well needs a second loop that counts x up with
JMN, which no longer fits in 16 words with its data. A typical
duplicate-detection routine over an array (17 instructions and a 13-word data
area) also does not fit. Larger programs would need a wider operand field,
and so a different instruction format.

Because program and data share the memory, code can read and overwrite
itself. The three-word program LDA 1 / ADD 2 / STA 3 (11h 52h 33h) loads its
own second word, adds its third, and stores 85h at word 3, which then executes
as JMZ 5 (not taken); word 4 (0) halts it after 28 cycles.

## Files

| file | contents |
|---|---|
| `rtl/scram_pkg.sv` | sizes, opcode enum, multiplexer input codes, `ctrl_t` |
| `rtl/scram.sv` | top level: the datapath wiring |
| `rtl/scram_clu.sv` | control logic unit (the microprogram) |
| `rtl/scram_timer.sv` | step timer T with clear and halt |
| `rtl/scram_decoder.sv` | binary to one-hot decoder (opcode, timer) |
| `rtl/scram_reg.sv` | load register (IR, MAR, MBR, AC) |
| `rtl/scram_pc.sv` | program counter with load and increment |
| `rtl/scram_mux.sv` | N-input word multiplexer |
| `rtl/scram_alu.sv` | ALU with its register AD |
| `rtl/scram_memory.sv` | 16 x 8 memory with CPU and host ports |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_scram_programs` |

## Verification

Every testbench checks its unit against values computed independently in the
testbench, has a cycle-count watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_scram` runs 400 random 16-word programs on the default-size machine and
  compares PC, AC and all 16 memory words with an instruction-level reference
  model after every instruction, together with each instruction's cycle count.
  It counts, and requires, every opcode, both outcomes of JMZ and JMN, adder
  carry, subtract borrow, PC wrap-around, and halting by HLT and by an unused
  code.
* `tb_scram_programs` runs the multiplication loop for x = 0..12 and five
  values of y (negative ones included), checking product and cycle count, and
  runs LDA 1 / ADD 2 / STA 3 while printing and checking its step trace.
* `tb_scram_clu` checks all 18 control bits for every opcode, every step
  t0..t9 and every combination of the AC zero and sign lines against the
  microprogram table above.
* The unit testbenches cover reset, load, increment, wrap, multiplexer
  selects, decoder lines, timer clear and halt, ALU operations with carries
  and borrows, and memory read gating and write priority.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Irtl -y rtl rtl/scram_pkg.sv tb/tb_scram.sv --top-module tb_scram
./obj_dir/Vtb_scram
```

Replace `tb_scram` with any other testbench name. Each one finishes in well
under a second.

## Where this design makes its own choices

These points are not fixed by the classic SCRAM description and were chosen
here:

* JMN and HLT encodings, and halting on unused opcodes.
* The STA, STI, SUB, JMP, JMZ, JMN and HLT microprograms (above).
* The separate memory write strobe, subtract line and halt line.
* Status lines from AC (zero and bit 7) into the control unit, needed by JMZ
  and JMN but not drawn in the classic datapath.
* x8 acting as the ALU's load/combine choice as well as its operand select.
* Synchronous active-low reset clearing every register and T, with memory
  kept. Execution starts at address 0.
* The host port for loading programs and reading results.
* One microstep per clock edge, with a combinational memory read.
* LDI and STI use the low 4 bits of the pointer word as the address.
