# A single-cycle MIPS-subset processor with exceptions

A processor is a finite state machine that interprets an instruction set. This
design splits that machine into two parts. The **datapath** holds the state and
moves data: the program counter, the instruction and data memories, the register
file, the ALU, and a few adders, shifters and multiplexers. The **control** turns
each instruction into a handful of multiplexer selects and write enables.
Every instruction runs in exactly one clock cycle, so the cycles-per-instruction
figure is 1. The price is a long clock period: the cycle must fit the slowest
instruction, `lw`, which passes through the instruction memory, the register file,
the ALU, the data memory and back to the register file.

The datapath runs six MIPS instructions: `add`, `addi`, `lw`, `sw`, `beq` and
`j`. Between them they use the main paths of an integer MIPS datapath:
register-register and register-immediate arithmetic, loads, stores, a
PC-relative branch and an absolute jump. On top of that comes the hardware for exceptions: recognising a
fault, saving the interrupted PC, recording the cause, switching to privileged
mode and entering a handler. The privileged instructions `mfc0`, `mtc0` and `rfe`
and the `syscall` instruction go with it.

An optional extension, `EXTENDED_ISA = 1`, adds `sll`, `slt`, `jal` and `jr`.
It is off by default.

All RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The testbenches run
on Verilator 5.

## Instruction formats and encodings

| format | fields (bit widths) | used by |
|---|---|---|
| R | op(6) rs(5) rt(5) rd(5) sh(5) func(6) | `add rd,rs,rt` (op 0x00, func 0x20), `syscall` (func 0x0C) |
| I | op(6) rs(5) rt(5) imm(16) | `addi rt,rs,imm` (0x08), `lw rt,imm(rs)` (0x23), `sw rt,imm(rs)` (0x2B), `beq rs,rt,off` (0x04) |
| J | op(6) target(26) | `j target` (0x02) |
| COP0 | op 0x10, rs field selects | `mfc0 rt,rd` (rs 0x00), `mtc0 rt,rd` (rs 0x04), `rfe` (rs 0x10, func 0x10) |
| extended | R: func 0x00 / 0x2A / 0x08; J: op 0x03 | `sll rd,rt,sh`, `slt rd,rs,rt`, `jr rs`, `jal target` (only with `EXTENDED_ISA = 1`) |

The numbers are the standard MIPS encodings. Memory is byte-addressed and
instructions are 4 bytes, so the PC steps by 4. Branch offsets and jump targets
count instructions, so both are shifted left by two. The branch target is
`PC+4 + (sign_extend(imm) << 2)`. The jump target is
`{PC+4[31:28], target, 2'b00}`.

## The datapath, one instruction at a time

```
        +---------------------------------------------------------------+
        |   +--[+4]--+----------------------> [+]--> BR mux --> JP mux -+
        v   |        |        imm<<2 ---------^        ^          ^
      [PC]--+--> [Insn Mem] --+                  BR & zero    {PC+4[31:28],target,00}
                              | rs,rt,rd,imm
                              v
     Rdst mux (rt|rd) --> [Register File] --rs--> [ALU] --+--> a [Data Mem] --+
                              |       \--rt--> ALUinB mux |    d <-- rt        |
                              |   imm -> [SX] --^         +------> Rwd mux <---+
                              +<--------------------------------------+
```

* **Fetch.** The PC (`we_register` with its write enable tied high) addresses
  the instruction memory. `next_pc` adds 4.
* **add.** The register file reads `rs` and `rt` on its two read ports. The ALU
  adds them, and the sum is written to `rd`.
* **addi.** The destination is now `rt`, so the *Rdst* multiplexer picks `rt`
  or `rd`. The 16-bit immediate goes through the sign extender (`sign_extend`),
  and the *ALUinB* multiplexer picks it as the second ALU operand.
* **lw.** The ALU result `rs + imm` addresses the data memory. The *Rwd*
  multiplexer writes the loaded word instead of the ALU result.
* **sw.** The second register read port (`rt`) feeds the data memory's write
  data. *DMwe* is on and the register write enable *Rwe* is off.
* **beq.** The ALU subtracts, and its zero flag is ANDed with *BR*. When both
  are set, the branch multiplexer takes the branch target.
* **j.** The 26-bit target, shifted left by two, goes to a second PC
  multiplexer, selected by *JP*.

The register file (`regfile`) has 32 registers of 32 bits, two combinational
read ports and one write port. Register 0 always reads zero. A register written
in a cycle shows its new value from the next cycle on. Both memories are the
same `memory` module: one port, a combinational read and a write on the clock
edge, 1024 words by default.

## Extended subset: sll, slt, jal, jr

The six instructions are not the only paths a MIPS datapath needs. Setting
`EXTENDED_ISA = 1` adds the four paths for these instructions:

* **`sll rd, rt, sh`** shifts `rt` left by the 5-bit `sh` field. It uses a
  logarithmic barrel shifter (`shifter`), whose output is a new input of the
  write-back multiplexer.
* **`slt rd, rs, rt`** runs the ALU as a subtraction, exactly as for `beq`. It
  keeps only the condition bit "rs < rt (signed)" and writes that bit,
  zero-extended, to `rd`. The bit is the sign of the difference XOR the overflow
  flag, so it is correct even when the subtraction overflows. `slt` never raises
  an overflow exception.
* **`jal target`** jumps like `j`. It also writes PC+4 into `$31`: the PC+4
  adder output goes to the write-back multiplexer, and `$31` is forced as the
  destination.
* **`jr rs`** loads the PC from the register file's first read port. This adds a
  new input to the PC multiplexer.

`ext_decode` decodes these four instructions into one-hot lines beside the main
control unit, whose table stays as it is. With `EXTENDED_ISA = 0`, the decoder
outputs are constant zero and the four encodings raise the illegal-instruction
exception.

## Control: a table, built two ways

Eight control fields steer the datapath:

|      | BR | JP | ALUinB | ALUop | DMwe | Rwe | Rdst | Rwd |
|------|----|----|--------|-------|------|-----|------|-----|
| add  | 0  | 0  | 0      | 0     | 0    | 1   | 1    | 0   |
| addi | 0  | 0  | 1      | 0     | 0    | 1   | 0    | 0   |
| lw   | 0  | 0  | 1      | 0     | 0    | 1   | 0    | 1   |
| sw   | 0  | 0  | 1      | 0     | 1    | 0   | 0    | 0   |
| beq  | 1  | 0  | 0      | 1     | 0    | 0   | 0    | 0   |
| j    | 0  | 1  | 0      | 0     | 0    | 0   | 0    | 0   |

ALUop 0 adds and ALUop 1 subtracts. Rdst 1 selects `rd`. Rwd 1 selects the
memory output. Where a signal does not matter for an instruction (Rwd for `sw`,
Rdst for `beq`), the table holds 0. The fields are packed in `mips_pkg::ctrl_t`.

There are two control units, and the top-level parameter `USE_CONTROL_ROM`
picks one:

* `control_rom` (the default) is a read-only memory indexed by the 6-bit opcode.
  It has 64 lines of 9 bits: the 8 control bits and a *valid* bit that marks the
  implemented opcodes. The ROM contents are computed at elaboration by a function
  that spells out the table above.
* `control_logic` decodes the opcode into one line per instruction (one-hot),
  then ORs the lines together: `Rwe = add|addi|lw`, `ALUinB = addi|lw|sw`, and
  every other signal is a single line. This works because most control signals
  are 1 for only a few instructions.

Both give identical control words, and the testbenches check each against the
table.

## Timing

Everything writes on one rising clock edge at the end of the cycle: the PC, the
register file, the data memory and the coprocessor-0 registers. Reads are
combinational within the cycle. The instruction memory is read first, then the
register file and control, then the ALU and data memory. A value written at an
edge is therefore never read in the same cycle it is written. The design has no
multi-cycle paths and no stalls. The clock period must cover the `lw` path.

## Exceptions

Exceptions are the least obvious part of the design. They are recognised and
handled in the same single cycle as the instruction that raises them.

**Causes.** `exc_detect` looks at the instruction, the control word, the ALU
flags and the privilege mode. It reports the first of the following that applies
(codes are MIPS ExcCodes):

| priority | cause | code |
|---|---|---|
| 1 | illegal instruction (unknown opcode, R-type func other than add/syscall or, when enabled, the extended ones, unknown COP0 op) | 10 |
| 2 | `mfc0`, `mtc0` or `rfe` executed in user mode | 11 |
| 3 | `syscall` | 8 |
| 4 | signed overflow in `add` or `addi` | 12 |
| 5 | `lw` address not a multiple of 4 | 4 |
| 6 | `sw` address not a multiple of 4 | 5 |

**Masking.** Coprocessor register `$12` is an exception mask: bit *c* set lets
code *c* through. Reset sets every bit. A masked overflow or unaligned access
lets the instruction complete normally: the wrapped sum is written, and the
memory ignores the low address bits. A masked syscall or illegal instruction does
nothing.

**Taking an exception.** In the cycle of the faulting instruction:
1. its register and memory writes are suppressed;
2. the *CRwd* multiplexer routes the PC into EPC (`$14`);
3. the cause register (`$13`) gets the code in bits [6:2];
4. for an address error, the bad-address register (`$8`) gets the address;
5. the processor status register (PSR) switches to privileged mode;
6. the *PCwC* multiplexer loads the PC with `HANDLER_ADDR` (default `0x80000080`).

With the default 1024-word instruction memory, that address lands on word 32.

**Coprocessor 0** (`cp0`) is four independent registers plus the one-bit PSR.
They are not a register array.
* `mfc0 rt, rd` copies a coprocessor register into `rt`. The *ALUinAC*
  multiplexer puts it on ALU input A, input B is forced to zero, and the sum
  goes through the normal write-back path.
* `mtc0 rt, rd` writes `rt` into a coprocessor register.
* `rfe` returns to user mode and continues at EPC.

All three are privileged. Reset starts the processor in privileged mode at
`RESET_PC`. EPC holds the address of the faulting instruction itself. To skip a
`syscall`, a handler therefore adds 4 before returning:

```
handler: mfc0 $26, $14      # EPC
         addi $26, $26, 4
         mtc0 $26, $14
         rfe                # user mode, PC <- EPC
```

## Top level: `mips_cpu`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, also enables the load port |
| `load_we`, `load_dmem`, `load_addr`, `load_data` | in | 1,1,32,32 | while `rst` is high: write a word into instruction (`load_dmem=0`) or data memory |
| `pc`, `insn` | out | 32 | instruction executing this cycle |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1,5,32 | register write at the coming edge |
| `dm_we`, `dm_addr`, `dm_wdata` | out | 1,32,32 | data-memory write at the coming edge |
| `branch_taken` | out | 1 | BR AND zero |
| `exc_taken`, `exc_cause` | out | 1,5 | exception taken this cycle, and its code |
| `kernel_mode` | out | 1 | PSR |

| parameter | default | |
|---|---|---|
| `IMEM_WORDS`, `DMEM_WORDS` | 1024 | memory sizes in 32-bit words (addresses wrap) |
| `USE_CONTROL_ROM` | 1 | 1 = ROM control, 0 = decoder logic |
| `EXTENDED_ISA` | 0 | 1 adds `sll`, `slt`, `jal`, `jr` |
| `RESET_PC` | 0 | first instruction address |
| `HANDLER_ADDR` | 0x80000080 | exception entry |

To run a program: hold `rst`, write the program and the data through the load
port one word per cycle, then release `rst`.

## Files

| file | contents |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, COP0 register numbers, exception codes, `ctrl_t` |
| `rtl/mips_cpu.sv` | top level: datapath wiring, write-back and PC multiplexers |
| `rtl/we_register.sv` | register with write enable (the PC) |
| `rtl/regfile.sv` | 2-read, 1-write register file |
| `rtl/memory.sv` | one-port memory (instruction and data) |
| `rtl/alu.sv` | add/subtract, zero and overflow flags |
| `rtl/sign_extend.sv` | 16-to-32-bit sign extension |
| `rtl/next_pc.sv` | PC+4, branch and jump targets and their multiplexers |
| `rtl/control_rom.sv`, `rtl/control_logic.sv` | the two control units |
| `rtl/exc_detect.sv` | exception recognition and COP0 decode |
| `rtl/cp0.sv` | EPC, cause, bad address, mask, PSR |
| `rtl/ext_decode.sv`, `rtl/shifter.sv` | extended-subset decoder and barrel shifter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/cpu_tester.sv` | random programs, reference model and scoreboard for the top |
| `tb/tb_mips_cpu.sv`, `tb/tb_mips_cpu_logic.sv`, `tb/tb_mips_cpu_ext.sv` | end-to-end tests: defaults, decoder control, extended subset |
| `tb/tb_mips_cpu_program.sv` | one hand-assembled program (array sum, syscall, handler) with an exact cycle count |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/mips_pkg.sv tb/tb_mips_cpu.sv --top-module tb_mips_cpu -o sim
./obj_dir/sim
```

Substitute any other `tb_*` module to run its unit test. The package file comes
first on the command line; the rest is found through `-y`.

## How it was verified

* Each unit is checked against values computed in its testbench. The ALU is
  compared with 64-bit signed arithmetic. The sign extender is checked on all
  65,536 inputs. Both control units are checked on all 64 opcodes against the
  table. The exception detector is checked class by class, and every cause must
  be seen both taken and masked.
* `cpu_tester` builds 16 random programs of 1024 words, with random data. The
  programs mix every instruction, including overflowing adds, unaligned
  accesses, mask changes, user-mode privileged instructions and illegal words.
  The exception handler above is installed, and odd-numbered programs start by
  loading a random mask. An independent instruction-level model runs in lock
  step with the processor. Every cycle it compares the PC, the instruction, the
  register write, the memory write, whether a branch was taken, the exception
  and the mode. That is 32,000
  cycles per run. Since the model retires one instruction per comparison, the run
  also confirms a CPI of 1.
* Counters record every mechanism: each instruction, branch taken and not taken,
  each exception cause, masked exceptions, user-mode execution and writes to
  `$0`. The test fails if any counter stays at zero. The counters for the
  extended instructions are only required in the extended run. The same test runs with the
  ROM control (`tb_mips_cpu`, all parameters at their defaults), with the
  decoder control (`tb_mips_cpu_logic`), and with the extended subset
  (`tb_mips_cpu_ext`). In the extended run the generated programs also contain
  `sll`, `slt` with both outcomes, `jal`, and `jr`, mostly through `$31`.
* `tb_mips_cpu_program` runs a short real program. A loop of `beq`, `lw`,
  `add`, `addi` and `j` adds up ten words, `sw` stores the sum, and `syscall`
  enters the handler, which reads EPC with `mfc0` and stores it. The test checks
  both stored values. It also checks the cycle of each event: the sum store in
  cycle 54, the syscall in cycle 55 and the handler's store in cycle 57. Those
  numbers are the instruction counts, so one instruction retires per cycle.
* Two assertions in `mips_cpu` hold in every run. An instruction that takes an
  exception writes neither the register file nor memory. At most one
  extended-subset operation is decoded at a time.
* Each unit testbench was also run against a deliberately broken copy of its
  module, and each one failed as it should.

## Design choices and limits

* **Six instructions by default.** The main configuration matches the control
  table. `sll`, `slt`, `jal` and `jr` are there only with `EXTENDED_ISA = 1`.
  Other MIPS instructions (logic operations, `bne`, byte loads, multiply) are not
  implemented.
* **No fault on a bad jump target.** `jr` to an unaligned address is not
  trapped; the memory simply ignores the low two bits.
* **ALUop is one bit**, because the six instructions need only add and
  subtract. `slt` reuses the subtraction. The shifter is a separate unit, not
  an ALU operation.
* **No multi-cycle registers.** A multi-cycle datapath would put registers
  between the stages (instruction, operand, ALU-output and memory-data
  registers). This design stays single-cycle.
* **One clock edge for everything.** A clocked instruction memory would need the
  PC moved to the falling edge, so that the instruction does not change while the
  cycle computes. This design's instruction memory is read combinationally, so
  one edge is enough.
* **Exceptions.** The handler address, the cause priority, the mask format and
  behaviour, `rfe` jumping to EPC, and unaligned accesses standing in for memory
  faults are all this design's choices. There is no virtual memory, so page and
  protection faults cannot occur. There is no I/O, so there are no interrupts
  (timer, devices). There is only one level of privilege state: an exception
  inside the handler overwrites EPC.
* **Memories** are plain arrays with no reset. Sizes are parameters; addresses
  beyond the array wrap.
* **Reset** clears the register file and coprocessor 0, sets privileged mode and
  all mask bits, and puts the PC at `RESET_PC`.
