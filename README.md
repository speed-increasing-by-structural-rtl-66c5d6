# A three-bus, one-line-per-clock 8-bit microcontroller

This is an 8-bit microcontroller that gets its speed from how it is wired, not from faster parts.
Most small controllers move data through one internal bus, so a typical operation takes several
instructions: load, operate, store. Here every program word names **two sources, an operation and
a destination**. The two sources go out on two separate buses (BUS1, BUS2), through a parallel
ALU, and onto a third bus (BUS Q) into the destination, all in one clock. The same word also
carries an **address instruction** for a separate 16-bit address bus. That address instruction
can start a data-memory access, set a jump or interrupt address, or load a constant. The cost is
a wide program word (60 bits) and a program that must be scheduled by hand or by a dedicated
assembler. There is no pipeline. Every line takes exactly one clock, and the ALU is the longest
path.

Around the core:

- an "intelligent" data memory that finishes reads by itself while the program keeps running,
  and signals completion with a ready bit (MI);
- two timer/counters, each with a programmable limit and a `>=` check that raises an overload
  interrupt;
- configurable interrupt logic that combines port B pins, status bits and the two timer flags;
- three 8-bit ports;
- a sleep line (SCLK). SCLK stops the program counter but keeps executing its own data operation
  every clock, so the chip then behaves like a fixed combinational path from its inputs to its
  outputs.

The structure follows the microcontroller described in the paper "Speed Increasing by Structural
Optimalization, at RISC Processors". The paper gives the block diagram, the instruction set and
the equations of the interrupt and timer logic. It does not give a binary encoding, the flag set
or many timing details. Those are filled in here, and each such choice is marked below.

## Block structure

```
               +-------------------------------------------------------------+
 dl_* -------->| program_memory 65536 x 60  --word-->  instr_gate            |
               |        ^ PC                         (disable instructions) |
               |        |                               |  instr_t          |
               | jump_it_ctrl (PC, JAR, IAR,            |                   |
               |   stack_memory, in-service) <--ITE--+  |                   |
               |        ^ conditions                 |  v                   |
               |   status_reg <---flags---- parallel_alu <== BUS1/BUS2 ==   |
               |                                  |        data_bus (muxes) |
               |                               BUS Q ==> destinations        |
               |  literal_register <- address bus (16) -> data_memory       |
               |  work_regs (ACC, SR)  timer_block (CCT, 2 x timer_counter) |
               |  it_logic (IE1, IE2, IL, ITE)   ports (PA, PB, PC)         |
               +-------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `mcu_pkg` | widths, instruction layout, all codes |
| `mcu_top` | the whole controller |
| `program_memory` | 65536 x 60-bit program store, combinational read, download write port |
| `instr_gate` | splits the word into fields; blanks everything during download, blanks address operation and jump in an SCLK line |
| `jump_it_ctrl` | PC, jump address register, interrupt address register, next-PC selection, interrupt entry |
| `stack_memory` | return-address LIFO (8 x 16 bits) |
| `literal_register` | 8-bit constant loaded by `#LWR` |
| `data_bus` | source multiplexers for BUS1/BUS2, destination decoder for BUS Q |
| `parallel_alu` | all data operations side by side, one selected; optional shift through carry |
| `status_reg` | C, Z, N, V, P, MI |
| `work_regs` | accumulator ACC and shift register SR |
| `data_memory` | 64 kByte, immediate writes, self-timed reads with MI |
| `ge_compare` | the bit-serial `>=` chain of a timer |
| `timer_counter` | limit register, 8-bit count, timing/counting mode, overload flag |
| `timer_block` | CCT configuration register and the two timers |
| `it_logic` | IE1, IE2, IL registers and the interrupt request ITE |
| `ports` | output latches of PA, PB, PC |

## The program word

Each 60-bit word has two halves that act at once. Bits 40..0 are the control part, one field per
unit. Bits 59..41 are the address part. The split (41 control bits, 16 address bits) matches the
block diagram of the original design. The order of the fields and all code values are this
design's own.

| Bits | Field | Meaning |
|---|---|---|
| 59:57 | `aop` | address instruction: 0 `#NOADR`, 1 `#MWR`, 2 `#MRD`, 3 `#JWR`, 4 `#IWR`, 5 `#LWR` |
| 56:41 | `addr` | 16-bit address, or the literal in bits 48:41 |
| 40:29 | spare | ignored |
| 28 | `sclk` | stop program counting (sleep with direct operation) |
| 27 | `cinv` | invert the jump condition |
| 26:24 | `csel` | condition: 0 C, 1 Z, 2 N, 3 V, 4 P, 5 MI, 6 T0I, 7 T1I |
| 23:22 | `jctl` | 0 none, 1 `JMP`, 2 `JMPIF`, 3 `RET` |
| 21:20 | `shift` | 0 none, 1 result right through carry, 2 result left through carry |
| 19:15 | `dst` | destination device |
| 14:10 | `src2` | source on BUS2 (S2) |
| 9:5 | `src1` | source on BUS1 (S1) |
| 4:0 | `op` | data operation |

**Devices** (the same code is used as a source and as a destination):
0 none (reads 0, writes nothing), 1 ACC, 2 SR, 3 L (literal, read only), 4 PA, 5 PB, 6 PC,
7 MEM (memory read register, read only), 8 ST (status), 9 T1 count, 10 T2 count, 11 IE1, 12 IE2,
13 IL, 14 TCL1, 15 TCL2, 16 CCT. Reading a port gives its input pins. Writing a port sets its
output latch.

**Operations** (`op`): 0 NOP (no data instruction: nothing written, flags kept), 1 ADD, 2 SUB
(S1-S2), 3 AND, 4 OR, 5 XOR, 6 NOR, 7 NAND, 8 NXOR, 9 ~S1&S2, 10 S1&~S2, 11 ~S1|S2, 12 S1|~S2,
13 INV S1, 14 INV S2, 15 MOV S1, 16 MOV S2, 17 FF (all ones), 18 CLR, 19 SR S1 (shift right,
0 in), 20 SL S2 (shift left, 0 in). In the original instruction list, "shift the result with
carry" appears as two separate instructions. Here it is the `shift` field, which combines with
any operation.

**Flags.** The flag set is this design's choice; the original only names a status register and
the MI bit. Every line with an operation other than NOP updates C, Z, N, V and P:

- C: carry of ADD, borrow of SUB, or the bit shifted out by a shift through carry. Otherwise C
  is kept.
- V: two's-complement overflow of ADD/SUB. Otherwise 0.
- Z, N, P: zero, sign and odd parity of the final result.

A line whose destination is ST loads C..P from BUS Q bits 4:0 instead. MI is read-only.

## Timing of one line

The PC addresses the program memory combinationally. The fetched word is gated, the sources are
selected, the ALU computes, and at the next rising edge everything the line writes is written:

- the destination register;
- the flags;
- the address-side registers (literal, jump/interrupt address, memory request);
- the PC.

Anything a line reads is the value from before that edge. So a line can read L and load a new
literal at the same time. The interrupt configuration idiom relies on this:

```
NOP            #LWR K1
MOV L -> IE1   #LWR K2      ; IE1 = K1, L = K2
MOV L -> IL    #LWR K3      ; IL  = K2, L = K3
```

A jump in a line that also carries `#JWR` uses the new address at once. Otherwise it uses the
jump address register, which keeps the last `#JWR` address. So `JMPIF MI #JWR 13` is a one-line
polling loop.

## The self-timed data memory

The data memory sits on the separate address bus. The processor never stalls for it:

- `#MWR a` writes the BUS Q value of the same line to address `a` at the end of the line.
- `#MRD a` latches `a` and clears MI. `MEM_LATENCY` edges later (default 3), the memory loads
  the memory read register and sets MI. The program can run three other lines in between, and
  the fourth line after `#MRD` can read `MEM`. A program that cannot count cycles polls
  instead, with `JMPIF` on MI (inverted condition), or enables MI as a status interrupt. A
  second `#MRD` restarts the read.

The default latency of 3 fits the source's statement that three instructions can be placed
between the request and the use. What actually delays the memory is not specified. It is
modelled as a countdown on an ordinary array.

## Control flow, interrupts and sleep

`jump_it_ctrl` picks the next PC in this order:

1. During download (`dl_active`), the PC holds and nothing executes.
2. If ITE is high and no interrupt is in service, the core enters an interrupt. The PC that the
   current line would have produced is pushed on the stack. The PC loads the interrupt address
   register (`#IWR`), and the in-service flag is set. The current line still completes normally.
3. `RET` pops the stack and clears the in-service flag.
4. `JMP`, or a `JMPIF` whose condition holds, loads the jump target.
5. An SCLK line keeps the PC where it is. Otherwise the PC steps by one.

The interrupt request is a level, exactly as the equation below produces it. The in-service flag
stops a still-active source from re-entering at once. The handler normally clears the source's
enable bit before `RET`. The original names a stack and an interrupt address but no return
instruction; the in-service flag and `RET` are this design's additions.

**SCLK.** A line with `sclk` set stops the PC. `instr_gate` removes its address operation and
jump, but its data operation runs again every clock. For example, `MOV PC -> PA` with SCLK copies
the port C pins to port A each cycle. An interrupt wakes the core, and `RET` continues at the line
after the SCLK line.

## Interrupt logic

Three registers are written from BUS Q:

- IE1: enables for port B pins 0..7;
- IL: the level that triggers each pin (`IL=0`: pin high requests, `IL=1`: pin low requests);
- IE2: bits 0..5 enable status bits C, Z, N, V, P, MI; bit 6 enables T0I; bit 7 enables T1I.

```
ITE = OR_i IE1[i]&(IL[i]^PB[i])  |  OR_j IE2[j]&S[j]  |  IE2[6]&T0I  |  IE2[7]&T1I
```

This is the sum-of-products form of the original, kept as a flat combinational expression.

## Timers

CCT (written as a destination) configures both timers:

| Bit | Use |
|---|---|
| 0 (X0) | Timer1 mode: 0 timing (count every clock), 1 counting |
| 1 (X1) | Timer2 mode |
| 4:2 | which BUS Q bit Timer1 counts |
| 7:5 | which port C pin Timer2 counts |

In counting mode a timer counts rising edges of its selected bit, sampled once per clock.

- **Timer1** counts a bit of BUS Q, i.e. of the program's own results, so a program can count
  events it produces.
- **Timer2** counts an external port C pin with no program involvement.

Each timer has an 8-bit limit register (TCL1/TCL2) and an 8-bit count. The count can be read,
and it can be loaded to restart the timer. The overload flag (T0I for Timer1, T1I for Timer2)
is high while count >= limit. The comparison uses the source's bit-serial chain
`g(n) = g(n-1)&(M[n]|~L[n]) | M[n]&~L[n]`, starting from `g(-1)=1`. Counts wrap at 255. Limits
reset to 255 and counts to 0.

Which mode value means "timing", edge counting and the count load are this design's choices.

## Parameters of `mcu_top`

| Parameter | Default | Source |
|---|---|---|
| `PM_DEPTH` | 65536 | program memory of the original: 65536 words x 60 bits = 480 kByte |
| `DM_DEPTH` | 65536 | data memory of the original: 64 kByte (32 kByte also named; set 32768) |
| `MEM_LATENCY` | 3 | three lines fit between `#MRD` and use |
| `STACK_DEPTH` | 8 | own choice |

The data width (8), address width (16) and word width (60) are fixed in `mcu_pkg`.

## Interface of `mcu_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `dl_active` | in | 1 | download in progress: the core is halted |
| `dl_we`, `dl_addr`, `dl_data` | in | 1/16/60 | write one program word per clock |
| `pa_in`, `pb_in`, `pc_in` | in | 8 | port pins (PB: interrupt inputs, PC: Timer2 inputs) |
| `pa_out`, `pb_out`, `pc_out` | out | 8 | port output latches |
| `pc` | out | 16 | program counter |
| `ite` | out | 1 | interrupt request |
| `sleeping` | out | 1 | the current line carries SCLK |

The original design has a download controller with a link to a host computer. Its protocol is
not specified, so the program memory's write port is brought out as `dl_*` and whatever drives
it is left to the integrator. Program and data memory start as all zeros (a zero word is an
empty line).

## Where this departs from or adds to the original

- **Encoding.** The field layout and codes are invented here, since no binary format is given.
  The spare bits 40:29 are unused.
- **Internal buses.** These are multiplexers, not tri-state lines.
- **Flags.** The flag definitions, and the choice of the six status bits (C, Z, N, V, P, MI),
  are this design's own.
- **Additions.** `RET`, the in-service flag, the inverted jump condition, the same-line
  `#JWR`/jump bypass and timer count loading are additions.
- **Memory write data.** The memory write data is BUS Q of the `#MWR` line.
- **Ports.** The ports have separate input pins and output latches, with no direction register.
- **Program memory read.** The program memory is read combinationally, to keep one line per
  clock. A block-RAM implementation with a registered read needs a fetch stage, which the
  original does not have.
- **Download.** Only the write direction of the download line exists; reading the program memory
  back to the host is not modelled.
- **Not included.** The FPGA the original was prototyped on is not part of this RTL. Its block
  RAM (288 kbit) could not hold the default memories (about 4.46 Mbit), so a build for such a
  device needs smaller `PM_DEPTH`/`DM_DEPTH`.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mcu_pkg.sv tb/tb_mcu_top.sv --top-module tb_mcu_top
./obj_dir/Vtb_mcu_top
```

`tb_mcu_top` runs the full-size controller (all parameters at their defaults) end to end in a
few seconds. It assembles a program of about 50 lines in SystemVerilog (function `w()`), downloads it
through `dl_*`, and runs it. The program covers:

- arithmetic and logic lines;
- a memory write, and a read used exactly three lines later;
- an MI polling loop;
- a shift through carry;
- the IE1/IL configuration idiom;
- an SCLK sleep in which port A follows port C;
- a port B interrupt that wakes the core;
- a Timer1 overload interrupt;
- Timer2 counting four port C edges;
- a carry status interrupt.

Every write to port A is checked against hand-computed values. The test also checks:

- the cycle at which line 16 is reached, which confirms one line per clock plus three polls;
- that each mechanism (download, sleep, each interrupt source, RET, jumps, memory requests,
  timer counting, shift) occurred at least once.

The block testbenches use reference models written independently of the RTL:

- the ALU against arithmetic on integers;
- `ge_compare` exhaustively over all 65536 pairs;
- the stack against a queue;
- the interrupt logic against a loop form of its equation;
- the timers against a cycle model;
- the memory latency counted in clocks.

`tb_example_program` runs a five-line memory-read routine. In one clock each, the routine:

- adds the shift register and port C into ACC while requesting a memory read;
- ANDs into port C;
- adds the literal into port A;
- polls MI;
- jumps.

It checks the port values, the single wait loop and the total cycle count, on random pin values.

To write programs, build words with the `instr_t` struct from `mcu_pkg` (as `tb_mcu_top` does)
and cast them to `word_t`.
