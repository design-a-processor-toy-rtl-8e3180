# TOY: a 16-bit, two-cycle teaching processor

TOY is a processor small enough to build by hand. It has 16-bit words, 256 words of memory, sixteen
16-bit registers, an 8-bit program counter and 16 instructions. Every instruction takes exactly two
clock cycles: in the **fetch** cycle the machine reads the word at PC into the instruction register and
increments PC. In the **execute** cycle it carries the instruction out. Everything below is
synthesizable SystemVerilog, checked by self-checking testbenches under Verilator.

The RTL follows the classic TOY design from an introductory lecture on processor design: its
instruction set, its datapath of multiplexers around a memory, a register file and an ALU, its 1-bit
phase counter and its 17 control lines. A few things the lecture leaves open had to be decided here:
how a program is loaded, how standard input and output are connected, resets, and shift details.
They are listed in [Own choices](#own-choices-and-departures).

Next to the processor, `toy_top` also holds three small practice circuits from the same material: a
16 x 8 stack, a 4-bit counter and an SR flip-flop.

## Instruction set

An instruction is one word. The opcode sits in bits 15:12 and the destination register `d` in 11:8.
Bits 7:0 hold either two source registers, `s` (7:4) and `t` (3:0) (format 1), or an 8-bit address
`addr` (format 2).

| op | name | fmt | effect |
|----|------|-----|--------|
| 0 | halt | 1 | stop |
| 1 | add | 1 | R[d] <- R[s] + R[t] |
| 2 | subtract | 1 | R[d] <- R[s] - R[t] |
| 3 | and | 1 | R[d] <- R[s] & R[t] |
| 4 | xor | 1 | R[d] <- R[s] ^ R[t] |
| 5 | shift left | 1 | R[d] <- R[s] << R[t] |
| 6 | shift right | 1 | R[d] <- R[s] >> R[t] (arithmetic) |
| 7 | load address | 2 | R[d] <- addr |
| 8 | load | 2 | R[d] <- mem[addr] |
| 9 | store | 2 | mem[addr] <- R[d] |
| A | load indirect | 1 | R[d] <- mem[R[t]] |
| B | store indirect | 1 | mem[R[t]] <- R[d] |
| C | branch zero | 2 | if R[d] == 0: pc <- addr |
| D | branch positive | 2 | if R[d] > 0: pc <- addr |
| E | jump register | 1 | pc <- R[t] |
| F | jump and link | 2 | R[d] <- pc; pc <- addr |

Register 0 always reads 0, and writes to it are dropped. Memory address FF is standard I/O: a load
from FF reads a word from the input stream, and a store to FF writes R[d] to the output stream.
Words are two's complement, so "> 0" means "sign bit clear and not zero". The `pc` saved by jump and
link is the already-incremented PC, which is the address after the jump.

## The datapath

`toy_cpu` wires these parts together:

```
 pc+1 --0--\                        PC --0--\
 bus  --1--[PC mux]--> PC --+       bus --1--[addr mux]--> memory --R data--+--> IR: op d s t
                            +--> +1 --> pc+1         (W data = A)           |
                                                                            +--00--\
                            PC ---------------------------------------------- 01--[wdata mux]--> registers
                            bus --------------------------------------------- 10--/             (W addr = d)

 registers: A addr = s or d (A mux), B addr = t
 A --> ALU input 1, memory W data, cond eval (=0, >0)      B --> ALU input 2
 ALU --0--\
 addr --1--[bus mux]--> bus  (addr = the s,t field, zero-extended)
```

The bus is the output of the bus mux: either the ALU result or the 8-bit `addr` field, zero-extended.
It feeds three places:
- the PC mux, for jumps and branches;
- the memory-address mux, as a data address;
- the register write-data mux.

The register A output does three jobs:
- ALU input 1;
- memory write data, so stores write R[d];
- input to the condition evaluator.

Register B reaches the bus only through the ALU. That is why the ALU has a "copy input 2" function:
load indirect, store indirect and jump register all need R[t] on the bus.

How each instruction sets the multiplexers in its execute cycle:

| op | A addr | ALU | bus | register write | memory write | PC load |
|----|--------|-----|-----|----------------|--------------|---------|
| 1-6 | s | +, -, &, ^, <<, >> | ALU | bus | - | - |
| 7 | - | - | addr | bus | - | - |
| 8 | - | - | addr | memory data | - | - |
| 9 | d | - | addr | - | A | - |
| A | - | copy B | ALU | memory data | - | - |
| B | d | copy B | ALU | - | A | - |
| C, D | d | - | addr | - | - | if =0 / >0 |
| E | - | copy B | ALU | - | - | always |
| F | - | - | addr | PC | - | always |

In the fetch cycle the address mux selects PC, the IR loads the memory output, the PC mux selects
pc+1 and PC loads.

### ALU (`toy_alu`)
The ALU computes all of its functions in parallel, and a 3-bit select picks one result: 000 add or
subtract, 001 and, 010 xor, 011 shift, 100 copy input 2. Two more lines complete its 5 control bits:
`sub` and `right` (shift direction). A shift amount of 16 or more gives 0 for a left shift and the
sign fill for a right shift.

### Register file, memory, registers, multiplexers
- `toy_regfile`: 16 x 16, two combinational read ports and one write port. R0 is hard zero.
- `toy_memory`: 256 x 16, one address, combinational read, write at the clock edge.
- `toy_reg`: a K-bit register with write enable, used for PC (8 bits) and IR (16 bits).
- `toy_mux`: a K-bit N-to-1 multiplexer, used for all five datapath muxes.
- `toy_cond_eval`: the `=0` and `>0` flags of register A.

## Two-cycle timing

`toy_phase` is a 1-bit counter. Its output is `execute` and its complement is `fetch`, so the phases
alternate on every clock. In the original drawings, storage elements are clocked by gated clocks:
- the IR by fetch AND clock;
- memory and registers by execute AND clock;
- the PC by clock AND (fetch OR a taken jump or branch).

This RTL uses a single rising-edge clock instead. Each gated clock becomes a clock enable with the
same condition, so a write lands at the edge that ends its phase. Running the lecture's ADD example
(PC=20, mem[20]=1234, R3=0028, R4=0064) gives:

| after edge | PC | IR | R2 |
|------------|----|----|----|
| start | 20 | - | - |
| end of fetch | 21 | 1234 | - |
| end of execute | 21 | 1234 | 008C |

A program of n instructions takes exactly 2n cycles, plus one cycle for each cycle spent waiting on
standard I/O. The testbenches check this count.

## Control: 17 lines

`toy_pkg::ctrl_t` groups the 17 control lines:
- PC mux and PC clock (2);
- address mux, memory clock and memory write (3);
- IR clock (1);
- register write-data mux (2);
- A-address mux, register clock and register write (3);
- ALU select (3), subtract and shift direction (2);
- bus mux (1).

Two implementations produce them:
- **Hard-wired** (`toy_control`, the default): gates from the opcode, the phase and the flags. The PC
  load is `fetch | jl | jr | (>0 & bpos) | (=0 & bzero)`.
- **Micro-programmed** (`toy_control_rom`, selected by `MICROCODE = 1` on `toy_top` / `toy_cpu`): a
  512 x 17 ROM addressed by `{opcode, execute, fetch, clock, >0, =0}`. The ROM is filled at
  elaboration by a function that builds each control word from the instruction table. Because the
  design is synchronous, the clock address bit is tied to 1. The clock = 0 half holds the same words
  with the clock enables cleared.

## Running a program: ports of `toy_top` / `toy_cpu`

- **Loading and starting.** After `rst` the machine is stopped (`halted` = 1). While it is stopped,
  `prog_we/prog_addr/prog_wdata` write memory and `prog_rdata` reads the word at `prog_addr`.
  A one-cycle `start` pulse loads PC from `start_pc` and begins with a fetch cycle. Opcode 0 stops the
  machine at the end of its execute cycle. PC then points after the halt, and the registers keep their
  values for the next `start`.
- **Standard input** (load from FF): `in_ready` is high during the execute cycle of such a load. The
  word is taken at the edge where `in_valid` is also high; until then the execute cycle repeats.
- **Standard output** (store to FF): `out_valid` is high with `out_data` = R[d]. The store completes at
  the edge where `out_ready` is high. A store to FF does not change memory.
- `pc`, `ir` and `fetch` are brought out for observation.

Reset clears PC, IR, the phase and the 16 registers. Memory is not reset.

## Practice circuits

- `stack16x8`: a 16 x 8 stack controlled by `w` and `op`:
  - `w=0 op=0` shows stack[top];
  - `w=0 op=1` shows the top pointer;
  - `w=1 op=0` pushes (top++, then write);
  - `w=1 op=1` pops (top--).

  Reset sets top to 15, so the first push lands in entry 0. The pointer wraps.
- `counter4`: a 4-bit up counter with enable, which wraps from 15 to 0.
- `sr_latch`: the SR flip-flop. S sets, R clears, and both low holds. It is a level-sensitive latch,
  so synthesis reports one latch here, which is intended. An assertion flags S = R = 1.

## Own choices and departures

- **Branch positive** tests "> 0", as the instruction set defines it. The lecture's gate sketch of
  the condition evaluator derives that output from the sign bit alone, which would also branch on 0.
- **Shift right** is arithmetic, and the shift amount is the full R[t].
- **Clocking**: gated clocks were replaced by clock enables on one clock (see above).
- **Program loading, start/halt, the I/O handshake and I/O wait cycles** are this design's own. The
  original only says that FF is standard input/output and that halt stops the machine.
- **Resets** as listed above. Control lines that an instruction does not use are driven 0.
- The reduced "TOY-Lite" (10-bit word, 4 registers, 16 words) is not included. Only its sizes are
  known, not its instruction encoding.

## Files

`rtl/` holds one unit per file:
- `toy_pkg`: types: opcodes, `ctrl_t`, the mux encodings;
- `toy_top`, `toy_cpu`, `toy_control`, `toy_control_rom`;
- `toy_alu`, `toy_regfile`, `toy_memory`, `toy_reg`, `toy_mux`, `toy_cond_eval`, `toy_phase`;
- `stack16x8`, `counter4`, `sr_latch`.

`tb/` has a `tb_<module>.sv` for each module, plus `tb_toy_cpu_microcode.sv`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and exits. To run one with Verilator 5, from
the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_toy_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/toy_pkg.sv tb/tb_toy_top.sv -o sim
./obj_dir/sim
```

Replace `tb_toy_top` to run another testbench. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/toy_pkg.sv rtl/<module>.sv`.

What the testbenches cover:
- `tb_toy_top` (default sizes, under a thousand cycles) runs:
  - the ADD example cycle by cycle;
  - the jump-and-link example (R15 = 21, PC = 30);
  - a program that sums standard input until a 0, with random I/O gaps;
  - a program with a multiply subroutine (jump and link / jump register), load and store indirect,
    both shifts, and, xor, taken and not-taken branches, and a write to R0;
  - the practice circuits.

  It counts each mechanism and fails if one never happens.
- `tb_toy_cpu` and `tb_toy_cpu_microcode` each run 150 random programs against an instruction-level
  model. They compare every output word, the input words consumed, the final PC, all 256 memory words
  and the exact cycle count.
- The unit testbenches test each block exhaustively or with random stimulus against independent
  reference models.

## How far to trust it

All modules lint cleanly under Verilator `-Wall`, apart from unused-constant notes from the shared
package. They also elaborate in Yosys (slang front end). Every testbench passes. Each one was also
run against a deliberately broken copy of its module and caught the fault. Nothing has been tried on
an FPGA or through timing analysis. The combinational path in the execute cycle is long: register
read, ALU, bus mux, address mux, memory read, write-data mux. No clock frequency is claimed.
