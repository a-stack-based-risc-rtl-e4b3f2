# FTCP: a 16-bit two-stack processor for real-time control

The FTCP is a small processor built for embedded control. Its programs are
written in Forth. It has no register file. Instead it keeps a data stack and
a return stack in hardware and executes a core subset of Forth words as
single op-codes.

Because every operand is implied by the stacks, nearly every instruction
fits in one 16-bit word and finishes in one clock cycle. Four design choices
make the processor cheap and its timing easy to predict, which is what
interrupt-driven control code needs:

* **Calls need no op-code field.** Any word whose top bit is 1 is a
  subroutine call, and the word itself is the target address. Subroutines
  therefore live in the upper half of the 64K-word program space.
* **Calls and returns are seen before they execute.** CALL and RETURN are
  spotted while they are still on the instruction bus. The next PC is steered
  at once, so neither costs an extra cycle.
* **Data memory addresses are in the op-code.** The 13-bit address sits
  inside the `!` and `@` op-codes, which gives an 8K-word data space. I/O
  devices are meant to be memory-mapped into it.
* **Conditional branches are PC-relative.** IF and LOOP carry an 11-bit
  two's complement offset and use the same adder that holds the PC during
  interrupt entry.

This repository contains the processor core (`ftcp_core`) and a small
system around it (`ftcp_system`): a 64K-word program ROM and an 8K-word data
RAM on a shared address bus. It also contains a self-checking testbench for
every module.

## Pipeline and control register

The processor has a single pipeline stage, held in the control register.
At each rising edge the control register captures the decoded form of the
op-code on the instruction bus (`ib`), and that control word drives the
datapath for the next cycle. The program ROM is read combinationally from
the PC, so the op-code fetched in one cycle is executing in the next.

The instruction bus is decoded *before* it reaches the control register.
That makes the following possible:

* **CALL.** The next PC is the op-code itself. In the same edge the control
  register latches a "push PCS onto the return stack" operation. PCS
  (PC save) always holds PC+1, so the return address is correct.
* **RETURN.** The next PC is TOR (top of return stack), and the return stack
  pops. If the instruction just before RETURN changes TOR (`>R`, `DO`,
  `R>`, CALL, LOOP), the PC mux takes the value TOR is about to receive
  rather than its current value. This forwarding path is this design's own
  addition; without it such a sequence would return to a stale address.
* **Two-cycle instructions: `!`, `@` and ENTER.** In their second cycle the
  decoder is fed the constant NOP op-code (the "NOP register", NR) instead of
  the instruction bus:
  * For `!` and `@`, the address bus carries the data address for one cycle,
    so the PC holds.
  * For ENTER (push literal), the literal is the next program word. It
    passes from the instruction bus onto the data bus and into TOS, and the
    PC steps past it.
* **IF and LOOP.** These change the PC one cycle late, after the word that
  follows them has already been fetched. The compiler must therefore place
  a NOP after every IF and LOOP. The hardware does not check this. The
  offset is added to the address of that NOP word, so `IF +n` continues at
  (address of IF) + 1 + n.

The next-PC mux has five sources:

| Source | Used for |
|---|---|
| PC+1 | Straight-line code |
| PC + sign-extended offset | Branches; an offset of 0 holds the PC |
| TOR | RETURN |
| Data bus | Interrupt vector |
| Instruction bus | CALL |

When several requests arrive at once, they are served in this order (first
wins):

1. Interrupt vector load
2. Interrupt PC hold
3. Taken IF/LOOP
4. `!`/`@` hold
5. CALL
6. RETURN
7. Increment

## Instruction set

The encoding follows the processor's sample op-code assignment:

| Op-code | Instruction | Effect (data stack `( before -- after )`) |
|---|---|---|
| `1aaa aaaa aaaa aaaa` | CALL | push PC+1 on return stack, PC = op-code |
| `010a aaaa aaaa aaaa` | `!` a | store TOS at data address a, drop (2 cycles) |
| `011a aaaa aaaa aaaa` | `@` a | push data word at address a (2 cycles) |
| `0001 1jjj jjjj jjjj` | IF j | drop TOS; if it was 0, branch by j |
| `0001 0jjj jjjj jjjj` | LOOP j | if TOR ≠ 0: TOR−1 and branch by j; else pop TOR |
| `0000` | NOP | |
| `0001` | DUP | `( a -- a a )` |
| `0002` | DROP | `( a -- )` |
| `0003` | SWAP | `( a b -- b a )` |
| `0004` | `>R` | move TOS to return stack |
| `0005` | `R>` | move TOR to data stack |
| `0007` | `+` | `( a b -- a+b )` |
| `0008` | `-` | `( a b -- a-b )` |
| `0009` | `2*` | shift left, sign bit kept, 0 into bit 0 |
| `000A` | `2/` | arithmetic shift right |
| `000B` | SHIFTR | logical shift right |
| `000C` | NOT | bitwise complement |
| `000D` | NAND | |
| `000E` | XOR | |
| `000F` / `0010` / `0011` | `>` `<` `=` | signed compare; true = FFFFh, false = 0 |
| `0012` | RETURN | PC = TOR, pop return stack |
| `0013` | DO | move TOS to return stack (loop count) |
| `0014` / `0015` | EI / DI | set / clear the interrupt enable flip-flop |
| `0400` | ENTER | push the following program word (2 cycles) |

Unused op-codes execute as NOP.

Because LOOP branches while TOR is non-zero, `n DO ... LOOP` runs the body
n+1 times, with TOR counting n, n−1, …, 0.

The per-instruction register transfers live in `rtl/ftcp_decode.sv` as a
`ctrl_t` control word. Its fields are:

* data stack operation and TOS source
* ALU operation
* return stack operation
* data bus source
* branch type and offset
* memory request and data address
* flags for two-cycle instructions and for EI, DI and ENTER

## Stacks

Each stack keeps its top in registers. The data stack holds TOS and SOS (the
second entry); the return stack holds TOR. The rest of each stack is in an
on-chip RAM, written synchronously and read asynchronously, with a pointer
that counts the words held in it.

The data stack supports these operations:

| Operation | Effect | Used by |
|---|---|---|
| load | new TOS | 1-operand ALU operations |
| push | TOS→SOS→RAM | DUP, `@`, `R>`, ENTER |
| pop | ALU result→TOS, RAM→SOS | 2-operand ALU operations |
| drop | SOS→TOS, RAM→SOS | DROP, `!`, IF, `>R`, DO |
| swap | exchange TOS and SOS | SWAP |

TOR loads only from the internal data bus, or from its own decrementer for
LOOP.

The stack controller (`ftcp_stack_ctrl`) handles full and empty stacks:

* A push to a full stack (pointer = 2^AW − 1) is refused and pulses
  `overflow`.
* A pop from an empty stack is refused and pulses `underflow`.
* A refused operation leaves the RAM and the pointer unchanged. The
  registers above the RAM still move, so an overflowing push loses the
  bottom value.
* Both flags are brought out of the core. Recovery is left to the system.

By default each stack is 2^16 words deep, to match a 16-bit stack pointer.
The parameters `DSTACK_AW`/`RSTACK_AW` on `ftcp_core` and `ftcp_system` set
the depth. `tb_ftcp_core` and `tb_ftcp_mix` use small depths; the end-to-end
test fills the full 64K-word stacks until they overflow. Stack
size and on-chip placement are a choice of this implementation; a real chip
would likely use shallow on-chip stacks or external stack RAM.

## Interrupts

There is one active-low, level-sensitive interrupt input `INT`. It is
accepted only while the interrupt enable flip-flop (IS, set by EI and
cleared by DI) is 1. IS is 0 after reset, and taking an interrupt does not
clear it. A service routine that must not be interrupted should start
with DI.

Entering an interrupt works like a CALL whose target comes from the
interrupting device. A small state machine (`ftcp_int_fsm`) runs it:

| State | Code | Action |
|---|---|---|
| normal | 000 | |
| wait | 001 | only if the instruction just fetched is IF/LOOP: let it use the offset adder first |
| inhibit | 010 | PC held (offset 0), NOP fed to the decoder so the fetched word is not executed |
| save | 011 | PC (the address of the first instruction not yet executed) pushed onto the return stack |
| vector | 111 | `INTACK` low for one cycle; the vector on the data bus loads the PC |

In every non-normal state the decoder is fed NOP.

With no branch in the way, the PC runs 1, 2, 3, 3, 3, vector, while the
instructions at 1 and 2 complete. The return address 3 is pushed in the
save cycle, and `INTACK` and the vector appear together in the last cycle.
The service routine ends with an ordinary RETURN.

Two timing details:

* If the instruction in execution when the interrupt arrives is ENTER, the
  PC is allowed to step over its literal during the inhibit state.
* In this system the vector is the `int_vector` input. The core's data
  input switches from the RAM to `int_vector` whenever no memory request is
  active.

## Memory and bus interface

`ftcp_core` drives one address bus:

* It normally carries the PC.
* During the first cycle of `!`/`@` it carries the 13-bit data address.
  `memrq_n` is then low, and `rd_wr_n` is low for a store and high for a
  fetch.

The internal data bus appears as `dout`, which carries TOS during a store;
read data and the interrupt vector come in on `din`.

`ftcp_system` connects:

* `ftcp_rom`: 64K words, read asynchronously. It has a load port
  (`load_we/addr/data`) so a testbench can write a program while the core
  is held in reset.
* `ftcp_ram`: 8K words. It is written at the clock edge when `memrq_n` and
  `rd_wr_n` are both low, and read asynchronously.

The address bus, data bus and strobes are brought out as ports so that
memory-mapped devices can be watched or added.

## Departures from the reference description and open points

* **LOOP branch direction.** The offset is *added* to the PC, and a
  backward loop uses a negative offset. The reference register-transfer
  table writes "PC − OS" for LOOP. The block diagram has only an adder, and
  offsets are described as two's complement, so both IF and LOOP add.
* **DO.** DO moves TOS to the return stack, as the register-transfer
  description shows. The stack-effect notation `( r -- r )` given with the
  instruction list does not show this.
* **`2*` sign bit.** `2*` keeps bit 15 and shifts bits 13..0 up, following
  the detailed register-transfer description, not the shorter one-line
  summary.
* **RETURN forwarding** (see above) is an addition.
* **Reset.** The reset is asynchronous and active low. IS resets to 0. The
  control register resets to NOP.
* **Stacks and program memory.** Stack depth, on-chip stack RAM, the ROM
  load port and asynchronous memory reads are choices of this
  implementation.
* **Bus.** The reference describes a variant with a separate data address
  bus, which would make `!` and `@` single-cycle. It is not built; the
  shared-bus form is.

## Performance

On the shared bus, ENTER, `@` and `!` take 2 cycles and everything else
takes 1. For an instruction mix with 35 % two-cycle instructions, the
expected cost is 1.35 cycles per instruction. `tb_ftcp_mix` runs such a mix
on the whole system: 100 instructions with 35 two-cycle ones take exactly
135 cycles. The same testbench checks a 17 % mix (117 cycles).

## Files

`rtl/` contains one module or package per file:

| File | Contents |
|---|---|
| `ftcp_pkg` | widths, op-codes, control-word struct, enums |
| `ftcp_alu` | 2-operand and 1-operand operations on SOS/TOS |
| `ftcp_stack_ctrl`, `ftcp_stack_ram` | stack pointer with overflow/underflow; stack memory |
| `ftcp_data_stack`, `ftcp_return_stack` | the two stacks with their top registers |
| `ftcp_pc_unit` | PC, PCS, offset adder, next-PC mux |
| `ftcp_decode` | op-code to control word |
| `ftcp_int_fsm` | interrupt entry sequencer and IS flip-flop |
| `ftcp_control` | decoder, NOP-register mux, control register, PC steering |
| `ftcp_core` | the processor |
| `ftcp_rom`, `ftcp_ram` | program and data memory |
| `ftcp_system` | top level: core + memories |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus
the following:

* `ftcp_tb_pkg.sv`: op-code builders shared by the testbenches.
* `tb_ftcp_core.sv`: runs small programs (Fibonacci, shift-and-add
  multiply, an interrupt) on the core with shallow stacks.
* `tb_ftcp_system.sv`: runs the full-size system end to end. It counts
  every mechanism listed below and fails if any never happens:
  * call and return, including forwarded return
  * taken and untaken IF
  * looping and exiting LOOP
  * store, fetch and ENTER
  * accepted and inhibited interrupts
  * overflow and underflow of both stacks
* `tb_ftcp_mix.sv`: the cycle-count measurement above.

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ftcp_pkg.sv tb/ftcp_tb_pkg.sv -y rtl -y tb \
  tb/tb_ftcp_system.sv --top-module tb_ftcp_system
./obj_dir/Vtb_ftcp_system
```

Replace the testbench name to run any other test. Testbenches that do not
use `ftcp_tb_pkg` do not need it on the command line, but it does no harm
there.

Programs in the testbenches are built with the `t_call`, `t_store`,
`t_fetch`, `t_if`, `t_loop` helpers and `T_*` constants, and are written
through the ROM load port during reset. The same port, or a `$readmemh` into the
`mem` array of `ftcp_rom`, is the way to run your own code.
