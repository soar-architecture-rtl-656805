# SOAR: a RISC processor for Smalltalk

SOAR (Smalltalk On A RISC) is a 32-bit pipelined RISC processor built so that a dynamically
typed, object-oriented language can run fast without a microcoded interpreter. It has three
central ideas:

- **Every word carries a tag.** The tag says whether the word is a small integer or a pointer to
  an object, and for objects it also gives the object's age.
- **Tags are checked in hardware on every instruction.** The common case, arithmetic on two small
  integers, runs at full speed. Anything unusual traps to software: a pointer where a number was
  expected, an overflow, or a store that the garbage collector must know about.
- **Message sends are cheap.** Overlapping register windows of eight registers pass arguments
  without memory traffic. A one-cycle call ("Fast Shuffle") lets the jump target address the
  next fetch directly.

This repository is the RTL for that processor. It contains:

- the pipeline;
- the windowed register file and its overflow/underflow and pointer-to-register logic;
- the tag and Generation Scavenge checks;
- the vectored trap system;
- the small external register and multiplexer that make Fast Shuffle work.

It also has self-checking testbenches for each part, and one end-to-end program that runs a
recursive Smalltalk-style call chain with software window spill/fill and every trap kind.

## Words and tags

Bits 31:28 of a word are its tag:

| tag     | meaning                                                        |
|---------|----------------------------------------------------------------|
| `0xxx`  | small integer: bit 31 is 0, bits 30:0 are a two's-complement value |
| `1000`  | assistant object (youngest)                                    |
| `1001`  | associate object                                               |
| `1010`  | full object                                                    |
| `1011`  | emeritus object (oldest)                                       |
| `1111`  | context object (an activation record)                          |

For objects, bits 27:0 are a word address. Memory is word-addressed with a 28-bit address.

Every instruction has a tag bit. When it is set ("tagged" instructions), the hardware checks
operand tags, and arithmetic is done on 31-bit integers. When it is clear, all 32 bits are plain
data and nothing is checked. The checks (`soar_tag_check`) are:

- **ALU, shift, skip, trap:** both operands must be small integers, and the result must not
  overflow 31 bits. Otherwise the instruction raises a tag trap (TT). A constant operand always
  counts as an integer.
- **Byte insert/extract:** same rule. Both operands must be small integers.
- **Load:** exactly one of base and offset must be an object pointer. Two integers or two
  pointers raise TT.
- **Store:**
  - The base must be an object. An integer base raises TT.
  - Storing a context pointer raises a Generation Scavenge trap (GS).
  - Storing a pointer younger than the object it is stored into also raises GS. The garbage
    collector uses this to keep its remembered set.
  - Age order is the tag order above. A context counts as age 0 when it is the object stored
    into.
- **Return:** a return address that is an object pointer rather than an integer-looking address
  raises GS.

## Instructions

The instruction word has three forms:

- **Register/constant form** (`I<31:30> = 01`):
  - tag bit, 6-bit opcode, destination D, source S1;
  - either a second register S2 or a 12-bit constant.
  - The constant expands to `{C<11:8>, 20 copies of C<7>, C<7:0>}`. Its top nibble is a tag, so
    a constant can be a small integer -128..127 or a tagged value with an 8-bit signed payload.
    Address offsets in loads and stores are therefore limited to -128..127.
- **Store form:** splits its constant across the D field and the low bits, because D is not a
  destination there.
- **Call/jump form** (`I<31:30> = 00`):
  - a software-interrupt-enable bit (SI);
  - a 28-bit absolute target.

Anything with bit 31 set is illegal.

The instruction set:

- `add`, `sub`, `and`, `or`, `xor`.
- One-bit shifts `srl`, `sra`, `sla`. `sla` is an add of a register to itself.
- Byte `insert` and `extract`.
- `load`, `loadc`, `store`.
- `loadm`/`storem`: move D+1 registers to/from memory, stepping down by the constant.
- `skip` on one of the conditions of `soar_cond`:
  - signed and unsigned compares of Rs1 − RC;
  - two bounds checks, `0 ≤ Rs1 < RC` and `1 ≤ Rs1 ≤ RC`.
- `trap1`..`trap7`: trap on the same conditions.
- `call`, `jump`.
- `ret` with three option bits:
  - W: move the window up;
  - N: set r0–r5 to nil;
  - I: re-enable interrupts.
- `nop`.

Every opcode not in this list raises the illegal-instruction trap. That makes the unused opcodes
software-defined instructions.

`soar_decode` classifies the word and expands the constants. It also recognises the internal
opcodes that the pipeline itself inserts: TRAP, SKIP, LOADi, STOREi. When one of these arrives
from memory, it runs as a nop.

## The pipeline

`soar_core` is a three-stage pipeline: fetch, operate, write. One clock edge is one machine
cycle. The original chip split each cycle into three non-overlapping phases; here those are
folded into one synchronous cycle.

**Fetch.** The word at the PC is read from the bus in the same cycle and becomes the next
instruction to operate.

**Operate:**

- The registers are read. The result waiting in the write stage is forwarded, compared by
  physical register index.
- The ALU, condition and tag checks run, and traps are decided.

**Write.** The result is written at the end of the cycle.

Special registers (r16–r23) are not forwarded:

- A write to one is seen by the second instruction after it, not the first.
- They may only be read as the S1 operand.

Instructions that need more than one cycle do not stall the pipeline. They *insert internal
instructions* into the operate stage:

| instruction                  | cycles           | how                                                                                     |
|------------------------------|------------------|-----------------------------------------------------------------------------------------|
| ALU, shift, byte, nop        | 1                |                                                                                         |
| `call`, `jump`               | 1                | Fast Shuffle: the target becomes the next fetch address while the call is being fetched |
| `load`, `store`              | 2                | Operate computes the address. An internal LOAD0/STORE0 uses the bus next cycle, while the fetched word waits in a hold register. |
| `loadm`, `storem`            | registers + 1    | LOADd..LOAD0 / STOREd..STORE0, one access per register                                  |
| `ret`                        | 2                | the word fetched behind the return is dropped                                           |
| `skip`                       | 1, +1 if taken   | the next word is replaced by an internal SKIP                                           |
| `trapN` not taken            | 1                |                                                                                         |
| taken trap                   | see below        |                                                                                         |

A loaded value can be used by the very next instruction. The load's data cycle sits between the
two instructions, so the value is forwarded like any other result.

**Fast Shuffle.** A call or jump is recognised in the fetch stage. Its 28-bit target is taken
straight from the fetched word as the next fetch address, so no cycle is lost.

- On the original chip, an external 28-bit register latches the low data bits during every
  instruction fetch. A multiplexer then drives that register onto the system address bus when
  the processor pulls `fshcntl_n` low. `soar_fsh_ext` is that circuit, and `soar_top` wires it
  in.
- A fetched call/jump is not shuffled when the instruction ahead of it is any of these:
  - a skip that is satisfied;
  - an instruction that traps;
  - a return;
  - the internal TRAP.

## Register windows

The register file (`soar_regfile`) holds 72 words:

- eight windows of eight registers;
- eight globals.

An instruction names registers r0–r31:

| registers | what they are                                        |
|-----------|------------------------------------------------------|
| r0–r7     | LOW registers: window CWP−1, the callee's window     |
| r8–r15    | HIGH registers: window CWP, shared with the caller   |
| r16–r23   | special registers                                    |
| r24–r31   | globals                                              |

The special registers are:

- r16: zero;
- r17: PC;
- r18: SHB, shadow B;
- r19: SHA, shadow A;
- r20: SWP, saved-window pointer;
- r21: TB, trap base;
- r22: CWP, current window pointer;
- r23: PSW.

A call decrements CWP (bits 6:4), so the caller's LOW registers become the callee's HIGH
registers. That overlap is how arguments and the return address are passed. `ret` with W
increments CWP.

SWP points into memory where windows are saved, one 16-word context slot per window. SWP<6:4>
is the window that would be reloaded next. `soar_window_ctl` computes two checks from CWP and
SWP:

- **Window overflow (WO)** on `call`: `(CWP−1) mod 8 == SWP<6:4>`. Software saves a window with
  `storem` and moves SWP down.
- **Window underflow (WU)** on `ret` with W: `(CWP+1) mod 8 == SWP<6:4>`. Software reloads a
  window with `loadm`.

Returns without W never check, because they stay in the same window.

**Pointer-to-register.** A window's registers are also the registers of a context object in
memory, so a load or store address may point at a value that currently lives on chip. The test
is:

- `A<3> = 1` and `(SWP<27:4> − A<27:4> − 1)<27:7> == 0`;
- the address then names register `A<2:0>` of window `A<6:4>`.

On a hit, the access reads or writes that register instead of memory. The bus cycle still
happens and is ignored. `loadm`/`storem` skip this test, because the window handlers use them
on the save area itself.

## Traps and interrupts

Each trap cause has a 4-bit vector number. The number is also its priority, lowest number first:

| vector | cause                     | vector | cause                      |
|--------|---------------------------|--------|----------------------------|
| 0      | ILL: illegal opcode       | 5      | DPF: data page fault       |
| 1      | TT: tag trap              | 6      | TI: trap instruction       |
| 2      | SWI: software interrupt   | 7      | GS: generation scavenge    |
| 3      | WO: window overflow       | 8      | IPF: instruction page fault|
| 4      | WU: window underflow      | 9      | IO: external interrupt     |

The jump address is `{TB<31:10>, vector<3:0>, opcode<5:0>}` (`soar_trap_unit`). Every
(cause, opcode) pair therefore gets its own entry, and a handler knows the opcode without
decoding. For example, a tag trap on `add` (opcode 50 octal) lands at TB + 0150 octal.

A taken trap runs in this order:

1. The trapping instruction is cancelled. Interrupts are disabled, which freezes the shadow
   registers: SHA, SHB, and PSW<15:8> (the opcode).
2. The internal TRAP instruction writes the trapping instruction's address + 1 into r7 and sends
   the PC to the vector.
3. One cycle passes while the vector word is fetched.
4. The vector's jump runs, and the handler starts.

The vector's jump therefore operates three cycles after the trapping instruction. Fast Shuffle
sends it straight on to the handler, whose first instruction operates one cycle later, four
cycles after the trapping instruction.
A handler returns with `reti`, which re-enables interrupts. A handler can re-run the
instruction by returning to r7 − 1.

The opcode used in the vector address is the one held in the shadow opcode field PSW<13:8>.
While interrupts are enabled, that is the trapping instruction's own opcode. While they are
disabled, the field is frozen. So a trap inside a handler, before it has saved the shadow
registers and re-enabled interrupts, goes to the vector of the *earlier* trap's opcode. Handlers
must therefore avoid anything that can trap until then. Interrupts are also disabled after reset.

Details:

- Software interrupts (SWI) are checked only on tagged calls and jumps, and only when PSW<5> is
  set.
- I/O interrupts need PSW<6>. They are taken only on an instruction fetched from memory, never
  in the middle of a load/store or trap sequence.
- A page fault:
  - `page_n` low on a fetch is an instruction page fault, charged to that instruction;
  - `page_n` low on a data cycle is a data page fault, charged to the load or store that made
    the access.

## Memory interface

`soar_top` brings out the bus. All controls are active low, as on the chip.

| signal        | direction | meaning                                                           |
|---------------|-----------|-------------------------------------------------------------------|
| `sys_addr`    | out       | address memory must use (the Fast Shuffle multiplexer output)     |
| `soar_addr`   | out       | the processor's own address                                       |
| `data_in`     | in        | read data / instruction word, sampled in the same cycle           |
| `data_out`, `data_oe` | out | store data and its enable                                    |
| `rd_wr_n`     | out       | high = read, low = write                                          |
| `i_d_n`       | out       | high = instruction fetch, low = data access                       |
| `fshcntl_n`   | out       | low = system address comes from the latched jump target           |
| `wait_n`      | in        | low = memory not ready: the whole processor holds for that cycle  |
| `waitack_n`   | out       | follows `wait_n`                                                  |
| `page_n`      | in        | low = page fault on the current memory cycle                      |
| `io_n`        | in        | low = interrupt request                                           |

Memory must read combinationally at `sys_addr` within the cycle. It must write `data_out` at the
clock edge of a cycle with `rd_wr_n` low and `wait_n` high. There is exactly one memory access
per cycle.

Reset (`rst_n` low):

- clears the PSW, and with it interrupts;
- sets the PC to 0FFFFFF0 hex;
- empties the pipeline;
- clears CWP, SWP and TB.

The general registers are not reset. Software must initialise them.

## Files

| file | contents |
|------|----------|
| `rtl/soar_pkg.sv` | widths, opcodes, tags, vector numbers, decoded-instruction struct |
| `rtl/soar_decode.sv` | instruction decoder and constant expansion |
| `rtl/soar_alu.sv` | ALU, one-bit shifter, byte insert/extract, tagged overflow |
| `rtl/soar_cond.sv` | skip/trap condition evaluation |
| `rtl/soar_tag_check.sv` | tag traps and Generation Scavenge traps |
| `rtl/soar_window_ctl.sv` | register mapping, WO/WU, pointer-to-register |
| `rtl/soar_regfile.sv` | 72 × 32 register file with nil clear |
| `rtl/soar_trap_unit.sv` | trap priority and vector address |
| `rtl/soar_core.sv` | the pipeline; instantiates the units above |
| `rtl/soar_fsh_ext.sv` | external Fast Shuffle register and multiplexer |
| `rtl/soar_top.sv` | core + Fast Shuffle circuit, memory bus brought out |
| `tb/soar_asm_pkg.sv` | instruction encoders used to write test programs |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit |

The sizes are package constants in `soar_pkg`: 32-bit words, 28-bit addresses, 8 windows of 8
registers and 8 globals.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run
with a failure. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/soar_pkg.sv tb/soar_asm_pkg.sv tb/tb_soar_top.sv \
          -y rtl -y tb --top-module tb_soar_top
./obj_dir/Vtb_soar_top
```

Replace `tb_soar_top` with any other testbench name. The end-to-end test runs the design at its
full default size in about 400 cycles.

## How it is verified

- **Unit testbenches:**
  - ALU: against a 64-bit integer model, corner cases plus 4000 random vectors.
  - Conditions: all condition codes on directed and random operands.
  - Tag-check: every row of the trap rules, with random payload bits.
  - Window control: register map, every WO/WU case, pointer-to-register hits and misses, random
    checks against a model.
  - Register file: against a shadow copy.
  - Trap unit: priorities and vector addresses.
  - Fast Shuffle circuit: against a model under random bus traffic.
  - Decoder: every opcode and the constant forms.
- **`tb_soar_core`** measures the cycle cost of each instruction kind from the table above, on
  the core alone. It also checks these hazards:
  - load-use;
  - a chain of dependent adds;
  - the special-register write delay;
  - the r7 value after a trap.
- **`tb_soar_top`** runs a recursive sum, 8 + 7 + … + 1 = 36, nine calls deep on eight windows.
  This gives three overflows and three underflows, handled by `storem`/`loadm` trap handlers.
  The same program then produces every other trap cause at least once, and runs:
  - a pointer-to-register load and store;
  - loads, stores, skips, shifts and byte operations;
  - a return with nil.

  Memory inserts random wait states throughout. A monitor checks:
  - the trap-to-vector-jump and trap-to-handler latencies (3 and 4 cycles);
  - the return bubble;
  - the Fast Shuffle next-cycle target;
  - the load/store and load/store-multiple data cycles.

  It counts each mechanism, and any mechanism that never occurred counts as a failure.

## Where this RTL departs from or interprets the original architecture

- **Single-phase clock.** There is one clock edge per machine cycle instead of three clock phases.
  The external clock generator, the pads, the write-strobe gate and the tri-state bus drivers
  are not part of the RTL. The data bus is split into in/out/enable.
- **Trap cost.** The trap sequence follows the original pipeline timing diagram: trap, TRAP
  slot, vector fetch, vector jump. A taken `trapN` that goes to a vector jump and a one-line
  `reti` therefore costs 6 cycles. The architecture's summary rule counts 5.
- **Window underflow.** Only `ret` with the W option checks for underflow.
- **Trap priority.** When several traps coincide, the order is the vector-number table above,
  for example WU before GS on a return.
- **Byte instructions.** Byte instructions tag-trap on non-integer operands.
- **Bounds check.** The second bounds check tests `1 ≤ Rs1 ≤ RC`.
- **Nil.** The value written by `ret` with N is 0xB0000000 (emeritus tag, address 0).
- **PSW.** The PSW implements bits 15:0. Bit 7 (an emulation-mode bit with no defined function)
  is stored but does nothing.
- **Choices where the original is silent:**
  - writes to r16/r17 are ignored;
  - internal opcodes fetched from memory run as nops;
  - I/O interrupts wait for an instruction fetched from memory;
  - condition codes with no defined meaning are false;
  - the reset values of CWP/SWP/TB are zero.
