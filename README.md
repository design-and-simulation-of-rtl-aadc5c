# A 4-bit processor with hard-wired finite-state-machine control

This is a small teaching processor. Its control unit is a hard-wired finite state machine,
not a microprogram ROM. A 4-bit opcode is decoded into sixteen one-hot minterms. A three-state
sequence counter splits each instruction into three clock cycles. A handful of NAND terms
combine the two into every control signal of the datapath. Programs do not come from a memory.
Each program is its own *instruction-register state machine*: a non-binary counter whose state
**is** the opcode of the current instruction. Stepping the counter steps the program.

The design follows a published MSI/SSI TTL design (74LS181 ALU, 74LS195 registers, 74LS138 and
4-to-16 decoders, 74LS160 counter, 74LS367 buffers) that runs at 80 MHz. This RTL keeps that
structure block for block. It replaces gated register clocks with clock enables on a single clock.
It also replaces the tri-state bus with a gated OR.

## Datapath

```
           port_r1 ─[SW buf r1]─┐
           port_r2 ─[SW buf r2]─┤
                                ├──── internal 4-bit bus ────┬──> A (load / shift right)
   C ──[C buf]──────────────────┤                            ├──> B (load / shift right)
   memory unit ──[mem buf]──────┘                            ├──> D  = output port
                                                             └──> memory unit (write)
   A, B ──> 74181 ALU ──F──> C          carry ──> memory unit (ADD A,B)
                         F == 0 ──> status (JNZ)
```

* **A, B** are the process registers and the only ALU operands. Both can also shift right
  arithmetically in place (sign bit kept).
* **C** (the accumulator) takes the ALU result in every instruction. The result reaches the rest
  of the machine only through C's output buffer.
* **D** is the output port register.
* The **memory unit** is a single 4-bit word of flip-flops, with no address. It is written from
  the bus (STA, STB) or with the ALU carry as `000c` (ADD A,B). It is read onto the bus (LDA, ADD A).
* The **status register** is one bit. It is set to `A == B` during JNZ.

At most one of the four bus drivers is enabled in any cycle. `bus_buffers` asserts this. An idle bus
reads `0000`.

## The three timing states

Every instruction takes exactly three clock cycles, G1, G2 and G3. In each of them at most one
group of registers is clocked:

| state | what is clocked                                                        |
|-------|------------------------------------------------------------------------|
| G1    | register B: from port r2, from the memory unit, cleared, or shifted     |
| G2    | register C <- ALU result (always); status (JNZ); carry into memory (ADD A,B) |
| G3    | register A from the bus or shifted; register D; memory write            |

B is loaded in G1 and the ALU result is latched in C in G2. So an instruction can first fetch a
memory operand into B and then compute with it. C's buffer drives the bus only in G3, so the
result written back to A in G3 is the value latched in G2. A is never loaded from the ALU directly.

## Instruction set

| opcode | mnemonic | effect                                   | G1            | ALU in G2 (S, M, Cn) | G3                   |
|--------|----------|------------------------------------------|---------------|----------------------|----------------------|
| 0000   | HLT      | nothing (C <- A)                         | –             | A (0000, 0, 1)       | –                    |
| 0001   | MOV A,r1 | A <- port r1                             | –             | A                    | A <- r1              |
| 0010   | MOV B,r2 | B <- port r2                             | B <- r2       | A                    | –                    |
| 0011   | MOV D,A  | D <- A                                   | –             | A                    | A, D <- C            |
| 0100   | SHR A    | A <- A >>> 1                             | –             | A                    | A shifts             |
| 0101   | SHR B    | B <- B >>> 1                             | B shifts      | A                    | –                    |
| 0110   | STA      | mem <- A                                 | –             | A                    | A, mem <- C          |
| 0111   | CMA      | A <- ~A                                  | –             | ~A (0000, 1, 1)      | A <- C               |
| 1000   | OR A,B   | A <- A \| B                              | –             | A or B (0001, 0, 1)  | A <- C               |
| 1001   | INC A    | A <- A + 1, B <- 0                       | B <- 0        | A+B+1 (1001, 0, 0)   | A <- C               |
| 1010   | ADD A    | B <- mem, A <- A + B                     | B <- mem      | A+B (1001, 0, 1)     | A <- C               |
| 1011   | ADD A,B  | A <- A + B, mem <- carry                 | –             | A+B (1001, 0, 1)     | A <- C               |
| 1100   | LDA      | B <- mem, A <- mem                       | B <- mem      | B (1010, 1, 1)       | A <- C               |
| 1101   | STB      | mem <- B                                 | –             | B (1010, 1, 1)       | mem <- C             |
| 1110   | JNZ      | status <- (A == B)                       | –             | A xor B (0110, 1, 1) | –                    |
| 1111   | DCA      | A <- A − 1                               | –             | A minus 1 (1111, 0, 1) | A <- C             |

`>>>` is an arithmetic shift right. JNZ itself changes no register. The branch happens in the
instruction-register state machine that runs the program, which reads the status register.

## Control signals from minterms

`decoder_4to16` gives active-low minterms `m_n[i]`. `control_generator` ORs the minterms of the
instructions that need a signal. It writes each OR as a NAND of the active-low minterms, then
gates it with the timing state. For example:

```
S3     = m9 + m10 + m11 + m12 + m13 + m15            (INC, ADD A, ADD A,B, LDA, STB, DCA)
M      = m7 + m12 + m13 + m14                        (CMA, LDA, STB, JNZ: logic mode)
CLK B  = G1 · (m2 + m5 + m9 + m10 + m12)
MEM RD = G1 · (m10 + m12)
CLK A  = G3 · ¬(m0 + m2 + m5 + m13 + m14)
C BUF  = G3 · ¬(m1 + m2 + m4 + m5)
MEM WR = G3 · (m6 + m13)
```

The ALU is a 74181 model in the active-high data convention. Its carry input `Cn` and carry output
`Cn+4` are therefore active low: `Cn = 1` means no carry in.

## Programs: instruction-register state machines

Each program is an `ir_fsm` with its own next-state table. Its state is fed straight to the opcode
decoder. Every table starts at 0000 (HLT) and stops by holding in 0011 (MOV D,A). Every state the
program does not use goes to 0001, so a corrupted state recovers.

| program        | state sequence                                                   | result on D            | cycles |
|----------------|------------------------------------------------------------------|------------------------|--------|
| addition       | 0000 → 0001 → 0010 → 1011 → 0011                                 | r1 + r2 (mod 16)       | 15     |
| subtraction    | 0000 → 0010 → 0001 → 0111 → 1011 → 1010 → 0011                   | r2 − r1, see below     | 21     |
| jump           | 0000 → 0001 → 0010 → 1110 → (status ? 1011 → 1010 : ) → 0011     | r1 == r2 ? 2·r1 + c : r1 | 21 / 15 |
| multiply × 1   | 0000 → 0001 → 0011                                               | r1                     | 9      |
| multiply × 2   | 0000 → 0001 → 0110 → 1010 → 0011                                 | 2·r1 (r1 ≤ 7)          | 15     |
| multiply × 3   | 0000 → 0001 → 0110 → 1010 → 1011 → 0011                          | 3·r1 (r1 ≤ 5)          | 18     |

**Subtraction** uses the end-around carry. The program is `MOV B,r2; MOV A,r1; CMA; ADD A,B;
ADD A`. It forms r2 + ~r1. ADD A,B leaves the carry in the memory unit, and ADD A adds it back.
When r2 > r1 the carry is 1 and the result is the exact difference. When r2 ≤ r1 the carry is 0
and the result is the **one's complement** of the magnitude. For example, 0101 − 1001 gives 1011,
not the two's complement 1100. This is what the instruction sequence computes. Converting to
two's complement would need one more INC A on the negative branch, which the program lacks.

**Jump** runs MOV A,r1 and MOV B,r2, then JNZ. If A == B it continues with ADD A,B and ADD A.
ADD A adds the stored carry, so the result is 2·r1, plus 1 when r1 ≥ 8. Otherwise it goes
straight to MOV D,A.

**Multiplication** uses three state machines, for multipliers 1, 2 and 3. The multiplier is bits
1:0 of port r2. It enables exactly one machine, and the outputs of all machines are ORed in front
of the decoder. Disabled machines output 0000. Multiplier 0 enables none: the decoder sees HLT,
the run ends after that one instruction, and D is unchanged. The ×3 program depends on ADD A
leaving the multiplicand in B, so that ADD A,B then adds it a third time.

## Interface of `fsm_processor`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | clock, rising edge (the original uses a 555 astable at 80 MHz) |
| `rst_n`     | in  | 1 | asynchronous active-low reset; clears every register and state machine |
| `mode`      | in  | 3 | `cpu_pkg::mode_e`: 0 manual, 1 addition, 2 subtraction, 3 jump, 4 multiplication |
| `start`     | in  | 1 | one-cycle pulse; ignored while `busy` |
| `opcode_sw` | in  | 4 | opcode for manual mode |
| `port_r1`, `port_r2` | in | 4 | input ports; `port_r2[1:0]` is also the multiplier |
| `out_d`     | out | 4 | output port (register D) |
| `reg_a`, `reg_b`, `mem_q`, `opcode` | out | 4 | probes |
| `busy`      | out | 1 | high for 3 cycles per executed instruction |
| `done`      | out | 1 | one-cycle pulse in the cycle after the run ends |

In **manual mode**, `start` executes the instruction on `opcode_sw` once. That takes three cycles.
In a **program mode**, `start` restarts the selected state machine at HLT. The run ends once the
stop state has executed. `mode`, the multiplier and `opcode_sw` are sampled at `start`. The input
ports are read by the instructions that use them (MOV A,r1 in G3, MOV B,r2 in G1), so they must be
stable until then.

## Files

| file | contents |
|------|----------|
| `rtl/cpu_pkg.sv` | opcode, mode and program enums; control-word struct |
| `rtl/fsm_processor.sv` | top level |
| `rtl/instruction_unit.sv` | opcode source, start/stop, ORing of the state machines |
| `rtl/ir_fsm.sv` | one instruction-register state machine (parameter `PROG`) |
| `rtl/sequence_counter.sv` | G1/G2/G3 timing states (parameter `STEPS`, default 3) |
| `rtl/decoder_3to8.sv`, `rtl/decoder_4to16.sv` | the two decoders, active-low outputs |
| `rtl/control_generator.sv` | control signals from minterms and timing states |
| `rtl/datapath.sv` | registers, ALU, bus, memory unit, status register |
| `rtl/alu_74181.sv` | 74181 function table |
| `rtl/shift_register_4b.sv` | load / arithmetic-shift-right register (A, B, C, D) |
| `rtl/storage_register.sv` | the one-word memory unit |
| `rtl/bus_buffers.sv` | bus drivers with a contention assertion |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workloads.sv` | the four programs over all operands, and the reported bench examples |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a watchdog.
With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl --top-module tb_fsm_processor \
    rtl/cpu_pkg.sv tb/tb_fsm_processor.sv -o sim
./obj_dir/sim
```

Lint a module with `verilator --lint-only -Wall -Irtl rtl/cpu_pkg.sv rtl/<module>.sv`.
All RTL is synthesizable. The top has no parameters.

`tb_fsm_processor` is the end-to-end test. It runs 600 random instructions from the switches and
compares A, B, D and memory with an instruction-level model after each one. It then runs each
program 40 times with random operands and compares the output port with the arithmetic result. It
checks that every run takes three cycles per instruction. It also counts each mechanism and fails
if one never occurred: every opcode, JNZ taken and not taken, both stored carry values, shifts of
negative values, and every program. `tb_workloads` runs addition, subtraction and the jump program for all 256 operand pairs. It runs
multiplication for every multiplicand with each multiplier. It also replays the bench examples the
original reports, such as DCA 0100 → 0011, CMA 0110 → 1001 and 1100 − 0100 = 1000. Where this design
differs from a reported value, the check uses this design's value and says so: the two shifts, and
0101 − 1001.

The unit testbenches are:

* The decoders and the ALU are checked exhaustively. The ALU is checked against the published 74181
  table: 8192 input combinations.
* The control generator is checked for all 16 opcodes × 4 timing states.
* The datapath runs 3000 cycles of random control words against a reference model.

## Where this design makes its own choices

The source gives the structure, the opcode assignment, the per-instruction operating sequence,
most control equations, and the state tables for addition and subtraction. The following are
this design's reading or choices:

* **ALU select codes.** The S3 and M equations are used as published. For S1 and S2, the minterm
  lists were completed so that LDA/STB select F = B, JNZ selects A xor B and DCA selects A − 1.
  JNZ is removed from S0. OR A,B uses the 74181 arithmetic code S = 0001, which is A OR B.
* **INC A** clocks B, as in the original. The ALU then adds with S = 1001, "A plus B". B is
  loaded from the idle bus (0000) and the carry input is asserted. So INC A clears B, which the
  original leaves unspecified.
* **STB, SHR B and JNZ do not clock A.** This follows the CLK A equation. The original's prose
  for STB also clocks A, which would copy B into A. Its prose for SHR B reloads A with A, which
  changes nothing.
* **Status register.** It is loaded in G2 of JNZ from the zero test on A xor B. The 74181's
  A=B output is not used.
* **Carry storage.** ADD A,B always writes its carry (0 or 1) into the memory unit. This also
  happens in manual mode.
* **Jump program.** The published program lists JNZ, but its state diagram omits it. Here JNZ sits
  after MOV B,r2. When the status is 0 the program skips to MOV D,A.
* **Multiplication programs** are rebuilt from the published instruction list. `MOV B,r2` is left
  out of the ×3 sequence, because it would overwrite the multiplicand in B.
* **Stop state.** The state tables hold in 0011, and that is followed. The state diagrams draw a
  return from 0011 to 0000.
* **Shift.** The instruction is defined as an arithmetic shift right and is built that way.
  The original's reported bench values for its two shift instructions do not match a right shift.
* **Handshake.** Start, busy, done, switch sampling and reset behaviour are this design's own.
* **Timing.** Each instruction takes three clocks, as designed. The original's measured execution
  times and frequency/validity tables describe TTL propagation delays, which RTL does not model.

Not built: the 555 clock generator (analog; the clock is a port) and division. Division is only
described as an algorithm; there is no program or hardware for it.
