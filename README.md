# LC3 and LC4: two 16-bit teaching processors, multi-cycle and single-cycle

These are two small 16-bit processors that sit at opposite ends of one
trade-off. They are written to be simulated side by side.

* **LC3** is the classic LC-3 teaching machine. It has a rich instruction
  set (15 instructions, four addressing modes), one unified 64K-word memory,
  and a controller that takes each instruction through a sequence of
  single-register-transfer states. It runs on a fast clock, one tenth of a
  memory access, so every memory access costs ten clock cycles of waiting.
* **LC4** is cut down to six instructions (ALU, LIM, LDR, STR, LEA, BRR) with
  register-only addressing and separate instruction and data memories. In
  return every instruction finishes in a single, long clock cycle.

What LC3 does in one `LD R7, label` takes LC4 four instructions: `LEA`,
`LIM`, `ALU ADD`, `LDR`. The LC4 code is larger but has no
multi-cycle control at all. Both machines are complete enough to run real
programs, including the polling I/O loops, subroutine calls, traps and
returns of the LC3.

The course notes this design follows give the datapaths, the fetch,
decode, operate and load state sequences of the LC3, and the LC4 schematic.
Where they are silent, choices were made and are listed below under
"Design choices".

## Top level

`lc_top` holds `lc3_system` and `lc4_cpu` next to each other. They share only
the clock, and each has its own reset, program-load port and status outputs
(`lc3_*`, `lc4_*`). The LC3 side also has an unused interrupt request
input and its test window (see "Not built"). There are no parameters on
the top. Both memories are
full size: 65,536 words of 16 bits for the LC3, and the same for each of the
LC4's two memories.

```
lc_top
├── lc3_system ── lc3_cpu ── lc3_control (state machine)
│                │          ├── regfile, lc3_alu, lc3_addr_unit, sext
│                ├── lc3_mio (address decode, keyboard/display registers)
│                └── lc3_memory (64K x 16, 10-cycle access)
└── lc4_cpu ──── lc4_mem (I_MEM), lc4_decode, regfile, lc4_alu, sext, lc4_mem (D_MEM)
```

## LC3: one bus and one transfer per state

All LC3 registers hang on one 16-bit bus. The registers are PC, IR, MAR, MDR,
PSR, the eight general registers, and the one-bit BEN. In each clock cycle
the controller enables exactly one *gate* to drive the bus and raises the
load enables of the registers that should capture it. There are five gates:
GatePC, GateMDR, GateALU, GateMARMUX, and GateSP (R6+1, used by RTI). An
assertion in `lc3_cpu` checks that at most one gate is on. The bus is
written as a multiplexer. In silicon it would be tri-state drivers.

Paths that do not use the bus:

| select | choices |
|---|---|
| SR1MUX (register read port 1) | `00` IR[11:9], `01` IR[8:6], `10` R6 |
| DRMUX (register written) | `00` IR[11:9], `01` R7, `10` R6 |
| SR2MUX (ALU B) | IR[5]=0: register IR[2:0]; IR[5]=1: SEXT(IR[4:0]) |
| ALUK | `00` ADD, `01` AND, `10` NOT A, `11` pass A |
| ADDR1MUX | `0` PC, `1` SR1 |
| ADDR2MUX | `00` zero, `01` SEXT(IR[5:0]), `10` SEXT(IR[8:0]), `11` SEXT(IR[10:0]) |
| MARMUX | `0` ZEXT(IR[7:0]) (trap vector), `1` address adder |
| PCMUX | `00` PC+1, `01` bus, `10` address adder |

MDR loads the memory read data when MIO_EN is high, and the bus otherwise.
The condition codes N, Z and P are PSR[2:0]. They are set from the value on
the bus whenever LD_CC is high.

### The state machine

The states are numbered as in the standard LC-3 diagram, and `lc3_pkg`
names them. Each row is one clock cycle, except the memory states (marked
M), which repeat until the memory answers with R = 1.

| instruction | states |
|---|---|
| fetch | 18 MAR←PC, PC←PC+1 · 33(M) MDR←mem · 35 IR←MDR |
| decode | 32 BEN←IR[11:9]·NZP, go to state IR[15:12] |
| ADD / AND / NOT | 1 / 5 / 9 DR←ALU, set CC |
| LD | 2 MAR←PC+off9 · 25(M) · 27 DR←MDR, set CC |
| LDI | 10 MAR←PC+off9 · 24(M) · 26 MAR←MDR · 25(M) · 27 |
| LDR | 6 MAR←BaseR+off6 · 25(M) · 27 |
| LEA | 14 DR←PC+off9 (CC unchanged) |
| ST / STI / STR | 3, 11, 7 address · (STI: 29(M), 31 MAR←MDR) · 23 MDR←SR · 16(M) write |
| BR | 0 test BEN · 22 PC←PC+off9 if taken |
| JMP / RET | 12 PC←BaseR |
| JSR / JSRR | 4 test IR[11] · 21 R7←PC, PC←PC+off11 / 20 R7←PC, PC←BaseR |
| TRAP | 15 MAR←ZEXT(trapvect8) · 28(M) MDR←mem, R7←PC · 30 PC←MDR |
| RTI | 8 MAR←R6 · 36(M) · 38 PC←MDR · 39 MAR,R6←R6+1 · 40(M) · 42 PSR←MDR · 34 R6←R6+1 |

Opcode `1101` is reserved and goes straight back to fetch. JSR and JSRR
write R7 and load the new PC in the same state, so `JSRR R7` jumps to the
old R7.

### Memory timing and the cost of an instruction

`lc3_memory` raises R in the `WAIT_CYCLES`-th cycle of an access. The
default is 10, because the clock period is one tenth of a memory access.
With memory wait L, an instruction costs this many clocks from state 18
back to state 18:

| instruction | clocks | at L = 10 |
|---|---|---|
| ADD, AND, NOT, LEA, JMP, BR not taken, reserved | 4 + L | 14 |
| BR taken, JSR, JSRR | 5 + L | 15 |
| LD, LDR, ST, STR, TRAP | 5 + 2L | 25 |
| LDI, STI | 6 + 3L | 36 |
| RTI | 8 + 3L | 38 |

A device register (see below) answers in one cycle, so a load or store that
reaches a device costs L − 1 cycles less.

### Memory-mapped I/O

`lc3_mio` decodes MAR. Four addresses go to device registers, and every
other address goes to memory:

| address | register | read | write |
|---|---|---|---|
| xFE00 | KBSR | bit 15 = a key is waiting | – |
| xFE02 | KBDR | the key in bits 7:0; clears KBSR[15] | – |
| xFE04 | DSR | bit 15 = `disp_ready` input | – |
| xFE06 | DDR | 0 | bits 7:0 go out on `disp_char` with a one-cycle `disp_valid` |

A pulse on `kbd_strobe` latches `kbd_char` and sets KBSR[15]. A program
polls KBSR (or DSR) with `LDI` and a `BRzp` back to the poll, as in the
end-to-end test.

## LC4: everything in one cycle

The instruction word goes straight from I_MEM to the decoder and the
register file. The read ports are S1 = IR[11:9] (out1) and S2 = IR[8:6]
(out2). out1 and out2 feed the ALU (A and B). out2 is also the D_MEM
address and the branch target. out1 is also the D_MEM write data, and its
sign bit is the branch condition. INmux selects the value written back, and
DRmux selects which IR field names the destination. PC, the register file
and D_MEM all update on the same clock edge. Seen as a state machine, the LC4
has one state per instruction, six in all. The next state is simply the
opcode of the next word fetched. The decoder's five outputs (BR, INmux,
Rwe, Mwe, DRmux) are the only control signals. Both memories read
combinationally.

| instruction | encoding | effect | BR | INmux | Rwe | Mwe | DRmux |
|---|---|---|---|---|---|---|---|
| ALU | `0000 S1 S2 DR FUN` | DR ← S1 op S2 | 0 | `10` ALU.out | 1 | 0 | IR[5:3] |
| LIM | `0001 DR imm9` | DR ← SEXT(imm9) | 0 | `11` SEXT9 | 1 | 0 | IR[11:9] |
| LDR | `0010 DR AR xxxxxx` | DR ← D_MEM[AR] | 0 | `01` D_MEM.out | 1 | 0 | IR[11:9] |
| STR | `0011 SR AR xxxxxx` | D_MEM[AR] ← SR | 0 | – | 0 | 1 | – |
| BRR | `0100 CR AR xxxxxx` | PC ← AR if CR < 0, else PC+1 | 1 | – | 0 | 0 | – |
| LEA | `1000 DR xxxxxxxxx` | DR ← PC+1 | 0 | `00` PC+1 | 1 | 0 | IR[11:9] |

The ALU functions (FUN = IR[2:0]) are ADD 000, SUB 001, AND 010, iOR 011,
NOT 100, NOR 101, INC 110 and DEC 111. NOT, INC and DEC use only S1.
Example: `ALU R2 R3 R6 ADD` = `0000 010 011 110 000`.

An LC3-style PC-relative load becomes:

```
x021B  LEA DR1            ; R1 = x021C
x021C  LIM DR2 -x4        ; R2 = xFFFC
x021D  ALU SR1 SR2 DR3 ADD; R3 = x0218
x021E  LDR DR7 AR3        ; R7 = D_MEM[x0218]
```

LC4 stores go only to D_MEM, so an LC4 program cannot modify its own code.
I_MEM is written only through the `imem_*` load port.

## Design choices

These points were decided here, because the notes do not fix them.

* The LC4 opcodes for **STR (0011)** and **BRR (0100)** were chosen here.
  The notes show ALU 0000, LIM 0001, LDR 0010 and LEA 1000. The order of the
  LC4 ALU function codes after ADD = 000 is also a choice made here.
* LC4 `LEA` writes **PC + 1**, which matches the LC3's use of the
  incremented PC. One summary line in the notes says "PC" instead.
* The LC3 opcodes, state numbers and register-transfer sequences for
  stores, BR, JMP, JSR, TRAP and RTI come from the standard LC-3
  controller. So do ALUK AND = 01 and pass = 11, the remaining mux codes,
  and the device addresses xFE00–xFE06.
* LDI and STI are memory-indirect through a PC-relative pointer.
* LC3 `LEA` does not change the condition codes.
* RTI pops PC and then PSR from the R6 stack and adds 2 to R6. It makes no
  privilege check.
* Reset: the LC3 starts at PC = x3000 with PSR = x0002 (Z set). The LC4
  starts at PC = 0. All registers clear on reset. Memories are not cleared.
* LC3 memory access time is a fixed 10 cycles. A device register answers at
  once.
* The tri-state buses are written as multiplexers.

## Not built

* **LC3 interrupts and exceptions.** Interrupt handling (state 49 after
  fetch), the interrupt vector register, priority levels, the
  supervisor/user stack switch and the privilege-mode exception are named
  in the notes but not specified. State 18 therefore always proceeds to
  memory fetch, and PSR[15:3] is just storage. The top brings out where an
  interrupt controller would attach. `lc3_int_window` is high in state 18,
  the cycle in which the request would be tested. `lc3_int` is the request
  input, which nothing inside uses yet.
* The full LC-3 controller has about 60 states and 50 control signals. This
  one has 39 states, the ones needed for every instruction without
  interrupts.
* Absolute timing (the LC4 clock of 2.5 memory delays against the LC3 clock
  of 0.1) is not modelled. Both run on one simulation clock.

## Simulating

Packages come first on the command line. `-Irtl -Itb` lets verilator find the
other modules by file name. `-Wno-fatal` keeps lint warnings, such as
width warnings in testbench arithmetic, from stopping the build.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/lc3_pkg.sv rtl/lc4_pkg.sv tb/lc3_asm_pkg.sv tb/tb_lc_top.sv \
    --top-module tb_lc_top -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog:

| testbench | what it checks |
|---|---|
| `tb_lc_top` | Both processors at full size. LC3: arithmetic, every load/store mode, keyboard and display polling, JSR/RET, TRAP, RTI, branches, plus the cycle count of every instruction. LC4: a summing loop closed by BRR, which must reach its halt in exactly 48 cycles. It also counts each mechanism and fails if one never happened. |
| `tb_lc3_cpu` | 150 runs of 40 random instructions on random memory, compared after each instruction with an instruction-set model (registers, PC, PSR, stored word, cycle count). Every opcode must occur. |
| `tb_lc3_system` | The classic worked examples (NOT of xCAF0, A − B by NOT/ADD #1/ADD, LD at x021B, LD at x2019, LDI at x4A1C through xFFFF, LDR through R6, LEA at x0200) on the real 10-cycle memory, with a per-cycle trace of states and control signals. |
| `tb_lc3_puzzle` | A position-independent program that adds A and B to the opcodes of its own first two instructions, run from x1234 and from x4000. |
| `tb_lc4_cpu` | The LEA/LIM/ADD/LDR emulation of an LC3 `LD`, the three-instruction emulations of `LDR` and `LEA`, then 20,000 cycles of random LC4 code over all of I_MEM against a model, one instruction per cycle. |
| `tb_lc3_control` | The state sequence and key control signals of every opcode, with random memory wait. |
| `tb_lc3_memory`, `tb_lc3_mio` | Access time, ready timing, address decode and the device handshakes. |
| `tb_regfile`, `tb_sext`, `tb_lc3_alu`, `tb_lc3_addr_unit`, `tb_lc4_alu`, `tb_lc4_decode`, `tb_lc4_mem` | Each unit against an integer reference. |

`tb/lc3_asm_pkg.sv` has LC3 instruction encoders and the cycle-count formula
above. To write a new LC3 test, load words through the `ld_*` port while
reset is held, release reset, and read results through `dbg_*` or the
register file.
