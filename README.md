# Mosaic element: a 16-bit processor with serial ports and on-chip memory

A Mosaic element is one node of a fine-grain MIMD machine built from hundreds
or thousands of identical single-chip computers. Each element has a small
16-bit processor, four serial input ports, four serial output ports and all of
its memory on the same chip. Elements are wired port to port into whatever
topology the machine needs (tree, mesh, cube-connected cycles). The design puts
most of the silicon into memory. The processor is kept small and simple: it
has one internal bus and a microcoded controller, and simple instructions take
three microcycles.

This repository is synthesizable SystemVerilog for the second ("version B")
processor, its ports and its banked dynamic memory, with a testbench for each
unit and an end-to-end testbench for the whole element.

## Contents

| file | what it is |
|---|---|
| `rtl/mosaic_pkg.sv` | shared constants, the controller's control-line struct `ctl_t`, the feedback-state enum |
| `rtl/mosaic_element.sv` | **top**: processor plus memory; ports brought out as link/clamp pairs |
| `rtl/mosaic_processor.sv` | controller, datapath and ports around the single 16-bit bus |
| `rtl/mosaic_controller.sv` | the microcode, written as a PLA: one `case` over the feedback state and instruction fields |
| `rtl/mosaic_regfile.sv` | sixteen 16-bit registers, selected by field J or K |
| `rtl/mosaic_alu.sv` | generate/propagate ALU with a carry chain, and the shifter behind it |
| `rtl/mosaic_flags.sv` | C, V, N, Z |
| `rtl/mosaic_flag_cond.sv` | the eight branch conditions |
| `rtl/mosaic_addr.sv` | memory address A, PC, refresh address RA and the incrementer |
| `rtl/mosaic_mulregs.sv` | multiplier/product register M and the multiply step counter SR |
| `rtl/mosaic_outport.sv`, `rtl/mosaic_inport.sv` | one serial output port, one serial input port |
| `rtl/mosaic_ports.sv` | four of each, selected by the instruction's port field |
| `rtl/mosaic_mem_bank.sv` | one 64 x 64-bit bank (256 words) with its row buffer |
| `rtl/mosaic_memory.sv` | `NBANKS` banks on the 12-bit address bus |
| `tb/mosaic_asm_pkg.sv` | small assembler: instruction field constants and encoders used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Default parameters are the original ones: 16-bit words, 12-bit addresses, 16
registers, 4 + 4 ports, 256-word banks, and 8 banks (2048 words, a 16 million
square-lambda chip).

## The bus and the datapath

Everything moves over one 16-bit bus. In each microcycle the controller picks
any set of sources and any set of destinations:

- **Sources:** ALU/shifter output `W`; the status word `{C,V,N,Z,PC<11:0>}`; the
  memory data input `IN`; a general register; the selected input port; `M`.
- **Destinations:** the ALU operand latches `X` and `Y`; `Y` shifted right with
  the adder carry in bit 15 (`Yshift`, used by multiply); the memory write data
  `D`; the memory address `A`; a general register; the selected output port; the
  flags (from bus bits 15:12); `M`.

The bus is precharged. With no source it reads `FFFF`, and several sources at
once give the AND of their values. The microcode relies on both: hard reset
takes `FFFF` into X and Y, and "nothing on the bus" is a cheap constant.

The **ALU** follows a generate/propagate design with two 4-entry function
tables, each indexed by the operand bits `{x,y}`:

- the propagate code P gives the per-bit propagate;
- the generate code G gives the per-bit generate;
- the carry ripples through `c[i+1] = P ? c[i] : G`;
- the result bit is `P xor c`.

The carry in is 0, 1 or the C flag. With the right codes the ALU gives X+Y,
Y−X, X−Y, −X, X±1, Y+1, X+X+C, ¬X, AND, OR, XOR, pass X, pass Y, 0 and −1.
The shifter after it can shift right arithmetically, shift right logically,
rotate right through C, or rotate by a nibble. Left shifts are X+X.

V is the XOR of the carries into and out of bit 15, and is 0 on shifts. C takes
the carry out on arithmetic that changes C, and the shifted-out bit on 1-bit
right shifts.

The **address section** issues a new address every cycle. Its sources are:

- `PC++` (fetch): the incrementer adds 1 to PC, and A and PC take the result;
- `PC` (a prefetch that will be thrown away or re-read);
- `RA++`: the refresh address, stepped through memory to refresh the dynamic
  cells in cycles that would otherwise be wasted;
- the bus (jumps and data addresses).

## Instruction set (as implemented)

Every instruction is one word, followed by zero, one or two immediate words.
Bits 15:14 = `00` mark a MOVE. Otherwise bits 15:13 are the MODE.

```
MOVE:        | 0 0 | MSOURCE[13:11] | MDEST[10:8] | K[7:4] | J[3:0] |
arith/branch:| MODE[15:13] | OP[12:8] | K[7:4] | J[3:0] |
```

**MOVE sources** (X := ...):

| MSOURCE | source | extra cycles |
|---|---|---|
| 0 | Rj | 0 |
| 1 | @Rj | 2 |
| 2 | @Rj++ | 2 |
| 3 | @(Rj+#) | 3 |
| 4 | # | 0 |
| 5 | @# | 2 |
| 6 | input port | 1 |
| 7 | 0 | 0 |

**MOVE destinations:**

| MDEST | destination | extra cycles |
|---|---|---|
| 0 | Ri | 0 |
| 1 | @Ri | 2 |
| 2 | @Ri++ | 2 |
| 3 | @(Ri+#) | 4 |
| 4 | @--Ri | 3 |
| 5 | @# | 3 |
| 6 | output port | 0 |
| 7 | nowhere | 0 |

Ri is Rk when the source names a register (MSOURCE 0 to 3), and Rj otherwise.
A MOVE sets Z and N from the value and clears V. Its time is 3 plus the two
extra-cycle counts.

**Arithmetic MODEs** (time = 3 + MODE time + OP time):

| MODE | X | Y | Dest | MODE time |
|---|---|---|---|---|
| 2 | Rj | Rk | Rk | 0 |
| 3 | # | Rj | Rk | 0 |
| 4 | @Rj | Rk | Rk | 2 |
| 5 | @# | Rj | Rk | 2 |
| 6 | @Rj | Rk | @Rj | 4 |
| 7 | @# | Rj | @# | 4 |

**OPs:**

- `00`–`13`: INC DEC ASR ASL ROR ROL LSR RNR ADD ADDC SUB SUBC SUBN SUBNC NEG INCC COM AND OR XOR.
- `14` CMP, `15` BITT: flags only.
- `16` MUL: 18 extra cycles, high word to Rj, low word to Rk.
- `18` JUMP, `19` JRST (load PC and flags).
- `1A` POPJ, `1B` POPJR: return through `@Rk++`.
- `1C` BRAT, `1D` BRAF: branch if the condition in K is true or false.
- `1E` PUSHJ: push `{flags,PC}` at `@--Rk`, then jump.

**Branch conditions** (field K):

- K<3> = 1 selects a flag condition: V, N, ¬C, N⊕V, Z, Z∨N, Z∨¬C, Z∨(N⊕V).
- K<3> = 0 selects "port not ready", for input (K<2> = 1) or output (K<2> = 0)
  port K<1:0>.

A taken branch costs one extra cycle.

**Port operand** (field K of a port MOVE): `{Adv, Dir, pt[1:0]}`. Dir = 1 means
an input port. Adv = 1 removes the word after reading it.

## The controller

The controller is a PLA with latched outputs. `mosaic_controller.sv` writes it
as one `always_comb` block, and every `case` arm is one microcode word.

**Inputs.** A word fires on a pattern of:

- five feedback bits, the "state";
- instruction bits I<15:6>;
- the flag condition and the port condition;
- `Mout` (M<0>) and `SRout` (SR<0>);
- the interrupt flip-flop and the hard-reset pin.

**Outputs.** The outputs of all firing words are ORed and latched at the clock
edge into `ctl`. That struct drives every control line of the datapath for the
next cycle, including the next feedback state.

**Two words at once.** Arithmetic instructions fire two words together:

- the word named after the OP supplies only the ALU and shifter lines (G and P
  codes, carry-in, shift, which flags to set);
- the word for the MODE or destination supplies the bus, address and
  next-state lines.

No line is driven by both, so ORing them is exact. This is what makes the
controller small: it has about 120 words for 32 OPs × 6 MODEs.

**Timing convention.** The word that runs in cycle t+1 is chosen from what the
controller sees in cycle t. In the DECODE cycle the instruction register I is
loaded from the memory input and is transparent: its J field already selects a
register in that same cycle. The decode word therefore copies Rj into X, Y, D
and M speculatively ("register prefetch"). It also spends the memory cycle on a
refresh address, because it cannot yet know what the instruction needs. A
plain `ADD R1,R2` is three cycles:

1. **DECODE:** Rj to X, Y, D and M; RA++ issued.
2. **GET:** Rk to Y; PC issued to prefetch the next word.
3. **GO:** X+Y to Rk; PC++ issued.

The next instruction word arrives during GO, and its DECODE follows. Every
other instruction adds states between these (GET2–GET4 for operands; MOV,
MOV2, MOV3 and STORE for MOVE destinations; GO2 and GO3 for multiply and
subroutine linkage).

**Ports never stall the processor.** A MOVE whose port is not ready does not
wait in place. It finishes early through REFETCH, which moves PC back to the
instruction, and the instruction is fetched and run again. A register that the
MOVE had already auto-incremented is restored first. While the port is not
ready, the processor loops through the same instruction and can still take
interrupts.

**Interrupts and soft reset.** A one-cycle pulse on `int_pin` sets the
interrupt flip-flop. At the next DECODE the controller runs the interrupt words
instead:

1. It stores `{C,V,N,Z,PC−1}` at address −1 (0xFFF). PC−1 is the instruction
   whose fetch was thrown away.
2. It loads the new PC from address −2.

Software returns with `JRST @#−1`.

If the pin is still high four cycles into that sequence, a soft reset follows:

1. The status word is stored at −3 instead.
2. The controller waits for the pin to drop.
3. It restarts at address 0.

A pulse of 26 cycles or more always gives a soft reset, because it outlasts any
instruction in progress (multiply is the longest). The hard-reset pin forces
the reset word every cycle it is held, and then starts at address 0.

## Multiply

`MUL` yields the 32-bit unsigned product in 21 cycles (3 + 18), using one
add-and-shift step per cycle:

- **M** holds the multiplier. It is loaded at DECODE with Rj.
- **SR** is a 16-bit shift register that shifts right every cycle. The first
  MUL word drops a single 1 into its top bit. That 1 reaches `SRout` after 16
  steps and ends the loop, so SR is the step counter at the cost of one shift
  register.
- In each step the controller tests `Mout` = M<0>:
  - if it is 1, the step computes X+Y;
  - otherwise it passes Y;
  - either way the result goes to Y shifted right, with the adder carry in
    bit 15.
- The bit shifted out of Y is kept in **Y<−1>** and enters the top of M as M
  shifts right. So M fills with the low product bits while its multiplier bits
  are used up.
- The last word writes Y (the high half) to Rj and sets Z, N and V from it.
  GO3 writes M (the low half) to Rk.

## Ports and the link protocol

One wire, the *link*, joins an output port to an input port. The wire is pulled
up off chip, and each port can clamp it low. A port clamps while it is not
ready:

- an output port that has nothing to send;
- an input port that is still full.

In the first cycle that neither end clamps, the wire goes high. Both ends take
that cycle as the start bit. The output port then drives the 16 data bits, MSB
first, one per cycle, by clamping for 0 and releasing for 1.

- **Output port.** A 17-bit shift register, loaded with `{word, 1}`. The
  trailing 1 is a marker: the port is empty again once the marker has shifted
  out of the low 16 bits, after exactly 16 data bits.
- **Input port.** A 17-bit shift register that shifts the wire in every cycle
  while bit 16 is 0. It stops when the start bit reaches bit 16, 17 cycles
  after the start. It stays full, and clamps the wire, until an advancing read
  empties it.

An output port and an input port on one wire behave as a two-word FIFO. Several
input ports may share one output port's wire: the transfer starts only when all
of them are ready.

## Memory

Each bank holds 4096 bits as 64 rows of 64 bits (four words per row). Every
access reads a whole row into the bank's row buffer. The selected word appears
on the read data one cycle after the address, and the row is written back in
the next cycle in parallel with the next read. This write-back is the refresh
of the dynamic cells. The processor sends the refresh address counter RA
through memory in cycles it would otherwise waste. Outside the interrupt and
reset sequences, no more than 8 cycles pass between refresh addresses; the
end-to-end test measures at most 5.

A write replaces one word of the row that is being read, and the row reaches
the cells with the next cycle's write-back. This pipelining has a documented
hazard. A read of the same row in the cycle right after a write still sees the
old row. The bank therefore disables the write-back in the second cycle after
a write, so that stale row is not written over the new one. Software must not
read a word in the cycle after writing its row. The microcode never issues two
writes in a row. The interrupt and soft-reset sequences are the two places
where such a re-read happens:
- The interrupt saves the PC at −1 and then reads its vector from −2, in the
  same row. The vector word was not the word written, so the old row holds it
  correctly. Suppressing the write-back keeps the saved PC.
- Soft reset re-reads the word it has just saved at −3 and discards the value.

The end-to-end test sees both, and it excludes them from its read check.

`mosaic_memory` decodes only log2(NBANKS) bank bits. With 8 banks the 2048
words therefore repeat in the upper half of the 12-bit space. The interrupt
locations −1, −2, −3 (0xFFF, 0xFFE, 0xFFD) are the top three words of the
last bank.

## Where this RTL departs from the original, and why

- **Clocking.** The original uses two-phase non-overlapping clocks, precharged
  logic and clock-AND drivers. Here each microcycle is one rising edge of
  `clk`. Latches become flip-flops; C in particular is a flip-flop, so the
  microcode's carry-refresh line is gone. Cycle counts are unchanged.
- **Interrupt locations.** The prose description of the interrupt gives save
  at −2 and vector at −3, with soft reset saving at −1. The microcode gives
  save at −1, vector at −2, and soft reset saving at −3. The microcode is
  followed here.
- **MUL operands.** The multiplier comes from M, which DECODE loads with Rj,
  so MUL computes X × Rj. That is X × Y in the MODEs where Y is Rj (3 and 5).
  In the others it is not.
- **PUSHJ** takes 6 cycles in MODE 2, as the microcode runs it. The timing
  table implies 7.
- **Reconstructed microcode.**
  - The operand-fetch words for the memory MODEs 4 to 7 were rebuilt from the
    surrounding words and the timing table.
  - The next state of the indexed-destination word is taken as the one that
    adds the index.
  - An undefined OP fires no word and falls into the soft-reset path.
- **No bootstrap ROM.** The original keeps a small reset ROM at address 0 but
  does not define its program. Programs are loaded into RAM here; the
  end-to-end test writes them into the banks before reset.
- **Not modelled:**
  - the pads;
  - the clock drivers;
  - the scan path of the first controller version;
  - the external pull-up, which the testbenches model as the AND of the two
    clamps' inverses.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

- **Unit tests.** Each unit is compared with a model written from the
  instruction-set or protocol definition, not from its own logic.
  `tb_mosaic_alu` checks every function code against ordinary arithmetic.
  `tb_mosaic_mem_bank` checks the latency, the write-back, and the stale-read
  hazard.
- **`tb_mosaic_controller`** runs the microcode on its own and checks these
  against the timing table:
  - the cycle count of every MOVE source/destination pair;
  - every arithmetic MODE/OP pair;
  - MUL and the branches.

  It also checks port refetch, the interrupt sequence and soft reset.
- **`tb_mosaic_processor`** runs programs from a behavioural memory. They
  cover:
  - every OP with random operands and carry, flags included;
  - two multiplies;
  - all MOVE modes and the memory MODEs;
  - subroutines and all sixteen flag branches;
  - a port loop-back.

  It also measures every instruction's duration.
- **`tb_mosaic_element`** runs the full element at default parameters.
  - It wires each output port back to the input port of the same number.
  - It loads a program into the banks and keeps a shadow copy of memory that
    every read is checked against.
  - It drives an interrupt and then a soft reset.
  - It counts port transfers, output and input waits, refetches, interrupts,
    soft resets, multiply steps, taken branches, refresh cycles and write-back
    suppressions, and fails if any of them never happens.

To run one with Verilator 5:

```
verilator --binary --timing --top-module tb_mosaic_element -y rtl -y tb +libext+.sv \
          rtl/mosaic_pkg.sv tb/mosaic_asm_pkg.sv tb/tb_mosaic_element.sv
./obj_dir/Vtb_mosaic_element
```

Replace the top module and testbench file for the others. `mosaic_asm_pkg.sv`
is needed only by the processor, controller and element testbenches.
