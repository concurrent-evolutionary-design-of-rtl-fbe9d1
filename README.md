# A configurable microprogrammed datapath for small sensor-side computations

This RTL builds a small programmable platform. It is meant for jobs where a
general-purpose processor costs too much: preprocessing sensor data, simple
arithmetic approximations, tiny filters. The hardware is a register file, a
set of up to 25 computational *modules* and a microprogram controller. The
software is a short program of wide microinstructions. Which modules exist,
how wide each register is, and the program are all meant to be chosen
together for one application. Evolutionary search can make that choice, and
the solutions it finds for maximum, parity and sigmoid run here unchanged.

Three ideas set this datapath apart from a plain ALU-plus-registers design:

* **Ordered modules with direct connections.** The modules form a fixed
  order (a topology). Module *k* may read a constant, any register, or any
  output of a module *j < k*, all in the same cycle. A value can therefore
  pass through a chain of modules without being stored. For example, one
  instruction can shift the input right by 2, subtract the result from 1.0
  and store only the final value.
* **Per-microinstruction module enables.** Every microinstruction carries a
  25-bit mask of the modules it runs. A module that is not enabled does not
  write anything, and later modules read 0 from it.
* **Input modules.** The platform's primary inputs are modules too. Several
  input modules in one microinstruction take several input samples at once.
  That lets the same hardware work on its data in parallel (8 samples in one
  cycle) or in a loop (one or two samples per pass).

## Block structure

```
            +----------------+      +-------------------------------+
  pm_* ---->| program_memory |----->| controller (decoder, branches,|
            +----------------+      | IN/OUT/MOV, run state, time)  |
                    ^               +-------------------------------+
                    |                  |            |           |
            +-----------------+        | mod_en     | IN/MOV    | OUT
            | program_counter |<-------+            v           +--> out_valid/out_data
            +-----------------+         +-------------------+
                                        | reg_write_decoder |<---+
                                        +-------------------+    |
                                                 v               |
                                        +-------------------+    | write requests
                                        |  register_file    |    |
                                        +-------------------+    |
                                                 v               |
   in_win/in_valid --------------->  +--------------------------------+
                                     | module_array: operand_mux per  |
                                     | module input, module_slot 0..24|
                                     +--------------------------------+
```

| file | role |
|---|---|
| `rtl/mp_pkg.sv` | word type, microinstruction fields, module kinds, default module list, layout functions |
| `rtl/mp_core.sv` | the platform: wires everything below together |
| `rtl/controller.sv` | microinstruction decoder and run controller |
| `rtl/program_counter.sv`, `rtl/program_memory.sv` | instruction sequencing and storage |
| `rtl/register_file.sv`, `rtl/reg_write_decoder.sv` | registers with per-register widths, and write routing |
| `rtl/module_array.sv`, `rtl/module_slot.sv`, `rtl/operand_mux.sv` | ordered modules and their input selection |
| `rtl/alu_module.sv`, `md_module`, `cmp_module`, `xor_module`, `shift_module`, `mult_module`, `bool_module`, `input_module` | the module kinds |
| `rtl/sigmoid_bit2_comb.sv` | an evolved 5-gate circuit for one bit of a sigmoid, standalone |
| `rtl/hwsw_top.sv` | top: the platform in its default configuration beside the sigmoid-bit circuit |

## The microinstruction word

One program word is one *instruction block*, and it executes in one clock
cycle (one unit of "logical time"). The fields below are listed from the most
significant bit down:

| field | bits | meaning |
|---|---|---|
| MOV | 1 | register move / load immediate |
| JMP | 2 | 0 none, 1 jump, 2 JSMOD (jump if module status set), 3 jump if status clear |
| LOAD | 4 | I/O: 0 none, 1 IN, 2 OUT |
| MODULES | 25 | bit *k* enables module slot *k* |
| CONST | 32 | signed constant for branches, MOV and OUT |
| I/O bytes | 8 each | for each slot in order: one byte per module input, then one per module output |

An I/O byte is `{CONST_FLAG, INDEX[6:0]}`:

* For a **module input**, CONST_FLAG = 1 means the 7-bit field is a constant
  (0..127). With CONST_FLAG = 0 the field is a source index: 0..15 are the
  registers, and `16 + 2*slot + output` is a module output.
* For a **module output**, CONST_FLAG = 1 means "no reg": the value is
  available to later modules but is not stored. Otherwise the field names the
  register to write.

The number of I/O bytes depends on the module list. The default list has 78
bytes, so a microinstruction is 688 bits wide. `mp_pkg::byte_off()` gives the
position of each slot's bytes.

Microinstruction types, checked in this order (the first non-zero field
wins):

* **JMP**: the target is `pc + CONST`, relative to the branch itself, and is
  clamped into the program. JSMOD tests the status of the module whose slot
  number is in byte 0. A module's status is latched each time it runs. For an
  input module the status means "got a sample". For the other kinds it means
  "first output non-zero".
* **MOV**: `reg[byte0] <= CONST` if byte 1 has its CONST_FLAG set, otherwise
  `reg[byte0] <= reg[byte1]`.
* **LOAD = IN**: `reg[byte0] <=` the next input sample (0 if none is left).
  **LOAD = OUT**: emits `reg[byte0]`, or CONST if byte 0 has its CONST_FLAG
  set.
* **MODULES** ("EXEC MODS"): runs the enabled modules. Each enabled module
  writes the registers its output bytes name. If several writes target one
  register, the module latest in the order wins.

## Module kinds

| kind | inputs | outputs | function |
|---|---|---|---|
| IN | - | value, extreme | next stream sample (0 when exhausted). The second output is 1 for 0 or 255 (for 8-bit pixels) |
| ALU | a, b, op | y | op 0 ADD, 1 SUB, 2 INC a, 3 DEC a |
| MD | a, b, op | y | op 0 MUL (low 32 bits), 1 DIV (toward zero; /0 gives 0) |
| CMP | a, b | min, max | signed comparator |
| XOR | a, b | y | bitwise XOR |
| SHR | a, n | y | arithmetic shift right |
| MUL | a, b | y | fixed-point product `(a*b) >>> 6` |
| BOOL | x0..x3, op | y | AND/OR/NAND/NOR, bit-parallel (see below) |

Operation-select inputs are ordinary inputs, normally fed by a constant byte.
The Boolean module works bit-parallel: each bit of a 32-bit word can carry
one row of a truth table. For that use it treats constant words as neutral:
an all-zero input counts as all ones under AND/NAND, and an all-one input
counts as zeros under OR/NOR. Set its parameter `NEUTRAL_CONST = 0` to get a
plain gate.

All arithmetic is on 32-bit signed words. Register widths are masks. Each
register keeps its low `REG_W[r]` bits, and a width of 0 removes the register
while programs that name it still run.

## Default configuration

Module slots in topology order (`mp_pkg::KINDS_DEF`):

```
 0..7  IN      8 MUL    9 SHR    10 ALU    11 MD    12..13 CMP
14..20 XOR    21..22 BOOL    23 SHR    24 ALU
```

The core also has 16 registers of 32 bits and 10 program words. A run is cut
off after 300 cycles. All of these are parameters of `mp_core` (`KINDS`,
`USED`, `NREG`, `REG_W`, `DEPTH`, `MAX_TIME`, `FRAC`, `EXT_MAX`). To build a
different platform, pass a different module list. The instruction width and
the byte layout follow from it automatically.

## Interface and timing (`mp_core`, `hwsw_top`)

1. **Load the program.** Write one word per clock through
   `pm_we/pm_addr/pm_wdata`, then set `prog_len`.
2. **Start.** Pulse `start` for one cycle. This clears the registers and the
   module status bits and sets `pc` to 0. `busy` then rises.
3. **Run.** Each cycle executes the word at `pc`. Inputs arrive through a
   window: `in_win[i]` is the i-th next sample of the input stream, and
   `in_valid[i]` says whether it exists (valid entries form a prefix). The
   core reports in `in_pop` how many samples it used that cycle; the
   environment advances its stream by that number before the next clock
   edge. OUT raises `out_valid` for one cycle.
4. **Finish.** When `pc` passes `prog_len - 1`, `done` rises and stays high
   until the next start. If `MAX_TIME` cycles pass first, `done` rises with
   `timeout`. `ltime` counts the executed microinstructions.

The microinstruction read, every module chain and the register write all
settle within one cycle. The critical path therefore runs through the longest
module chain a program uses; no pipelining is attempted.

## Programs that run on it (`tb/mp_progs_pkg.sv`)

| program | what it shows | cycles |
|---|---|---|
| maximum of 8 | `CMP(IN1, IN3)`, greater value into `CMP(r0, ·)`, result back to r0; `JSMOD 1, -1` repeats while input module 1 gets data; `OUT r0` | 11 |
| parity, parallel | 8 input modules and a tree of 7 XORs in one block, into r3 | 2 |
| parity, sequential | `r2 <- r2 XOR IN`; repeat while input remains; `OUT r2` | 19 |
| sigmoid, second order | `y = 1 - (1 - x/4)^2 / 2` with 6 fractional bits: SHR→SUB, MUL→SHR, SUB | 4 |
| sextic polynomial | `x^2 (x^2-1)^2` with MD and the ALU after it in the same block | 4 |
| Fibonacci | 1, 1, 2, ... with one ALU, stopped by the time limit | 300 |

The first four programs are solutions found by the evolutionary search
(block structure and modules as published). The sextic and Fibonacci
programs are hand-written for the same platform. On all 256 inputs the
sigmoid program is within 0.036 of the true sigmoid. That covers both the
approximation itself and the truncation at each step.

`sigmoid_bit2_comb` is a separate result of the same search, run on Boolean
modules. For `x = x4 x3 . x2 x1 x0` in [0, 4) it produces bit 2^-2 of
sigmoid(x) as `x4 | x3 & (x2 | x1 | x0)`, written in the evolved form of
five Boolean-module terms. Only this bit's equations are known here; the
other output bits are not provided.

## Where this RTL makes its own choices

The module list, the microinstruction fields and widths, the I/O-byte format,
the module behaviours and the Boolean constant rule come from the published
design. Everything below is this implementation's own decision:

* one microinstruction per cycle, with combinational program-memory read;
* the opcode values inside JMP and LOAD, and the JMP > MOV > LOAD > MODULES
  priority;
* source-index numbering (registers first, then two indices per module slot);
* operation codes and the op-input position for ALU, MD and BOOL;
* the fixed-point multiplier rescales by 6 bits, so the evolved "MULT r1, r1"
  works on 6-fractional-bit values;
* input modules share one input stream and take samples in topology order;
  a disabled module reads as 0;
* module status for JSMOD ("got a sample" for IN, "non-zero" otherwise), the
  last-writer-wins rule, and clearing of registers at start;
* divide-by-zero returns 0, and shift amounts are clamped;
* 16 registers (the register count is a free parameter of the design).

Things that are not provided:

* the evolutionary design system itself (search, fitness estimates of area,
  power and speed), which is software;
* the piecewise-linear sigmoid programs and the F1/F2 image filters, whose
  programs are not available in usable form;
* fixed-channel input modules (one pixel of a 3×3 window, readable several
  times per program), which the image-filter experiments would need;
* the bit-and-complement input modules used for the Boolean-module sigmoid.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mp_pkg.sv tb/mp_asm_pkg.sv tb/mp_progs_pkg.sv tb/tb_hwsw_top.sv \
  --top-module tb_hwsw_top -o sim && ./obj_dir/sim
```

* `tb_hwsw_top` runs every program above at the default configuration. It
  also counts how often each mechanism occurs: module chaining, partial
  enables, multi-sample input, JSMOD taken and not taken, jumps, MOV, OUT and
  timeout.
* `tb_mp_core` uses 7- and 6-bit registers, as in the minimal Fibonacci
  solution, and checks the masking.
* The other `tb_<module>.sv` files test one block each against an
  independent reference.
* `tb/mp_asm_pkg.sv` is a small assembler for writing new programs: see
  `op_exec`, `set_in`, `set_out`, `op_jsmod`, and the others.
