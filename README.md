# A mesh-connected SIMD floating-point array for matrix work

Power-flow analysis spends most of its time in dense floating-point matrix
arithmetic (matrix products, LU decomposition). This design puts a small
single-instruction, multiple-data (SIMD) machine next to a soft-core host
processor on one FPGA: a 3 x 3 mesh of processing elements (PEs), each with
an IEEE-754 single-precision floating-point unit (FPU), 16 registers and its
own 2 KB memory, all obeying one instruction stream issued by a sequencer.
The host does the sequential, rarely executed parts of an algorithm. It
writes the parallel part as machine code into the SIMD machine's instruction
memory, loads operands into the PEs' memories, starts the sequencer and
collects the results.

The RTL here is SystemVerilog (IEEE 1800-2017) and is synthesizable. It
covers everything on the FPGA side that belongs to the SIMD machine. The host
processor, its bus fabric and the board's PCI controller are outside the RTL.
The top module brings out their connections as ports.

## Contents

```
                On-chip Peripheral Bus (OPB) from the host processor
   ------+-----------+-------------+----------------+-------------------
         |           |             |                |
   opb_slave_if  opb_slave_if  opb_slave_if x9   opb_slave_if
         |        (ctrl reg)       |                |
     instr_mem --> simd_controller |            global_mem --- LAD bus (PC side)
                     | control word, broadcast
                     v             |
             pe_array: 3 x 3 torus of  [pe + pe_local_mem]
                       pe = register file, A/B, S1/S2, fpu, C, mesh registers
                       fpu = fp_addsub (x2), fp_mul, fp_div
```

| file | what it is |
|---|---|
| `rtl/simd_pkg.sv` | opcodes, FPU operation codes, sequencer states, the PE control word |
| `rtl/simd_top.sv` | the whole machine with its OPB and LAD ports |
| `rtl/simd_controller.sv` | sequencer: PC, IR, state machine, control-word decode, PE mask |
| `rtl/instr_mem.sv` | dual-ported instruction memory (host port, sequencer port) |
| `rtl/pe_array.sv` | ROWS x COLS PEs and local memories, torus wiring |
| `rtl/pe.sv` | one PE datapath |
| `rtl/pe_local_mem.sv` | 2 KB dual-ported local memory of a PE |
| `rtl/fpu.sv` | four pipelined units and the output multiplexer |
| `rtl/fp_addsub.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv` | 3-stage adder/subtractor, 3-stage multiplier, 28-stage divider |
| `rtl/opb_slave_if.sv` | OPB slave glue in front of one memory |
| `rtl/global_mem.sv` | dual-clock global memory, OPB side and read-only LAD side |
| `tb/` | one self-checking testbench per module, plus two workload tests |

## Instructions

Every instruction is one 32-bit word. There are two formats:

```
register-register  | opcode 31:26 | src1 25:21 | src2 20:16 | dst 15:11 | mask 10:0 |
immediate          | opcode 31:26 | address 25:16           | reg 15:11 | mask 10:0 |
```

| mnemonic | opcode | effect in every enabled PE | cycles |
|---|---|---|---|
| `load rd, mem(x)` | 000110 | rd <- mem[x] | 8 |
| `store mem(x), rd` | 000111 | mem[x] <- rd | 10 |
| `add rs1, rs2, rd` | 000010 | rd <- rs1 + rs2 | 11 |
| `sub rs1, rs2, rd` | 000011 | rd <- rs1 - rs2 | 11 |
| `mul rs1, rs2, rd` | 100010 | rd <- rs1 * rs2 | 11 |
| `div rs1, rs2, rd` | 100011 | rd <- rs1 / rs2 | 36 |
| `ns / es / ws / ss rs1` | 001100 / 001101 / 001110 / 001111 | send rs1 to the N / E / W / S out register | 8 |
| `nr / er / wr / sr rd` | 001000 / 001001 / 001010 / 001011 | rd <- value arriving from N / E / W / S | 6 |
| end of program | 000000 (or any undefined opcode) | sequencer stops | 3 |

The opcodes of load, store, add and mul, the field layout and the cycle
counts of load, store and the three-stage operations come from the original
design. The other opcodes, the end-of-program word, and the cycle counts of
division and routing are this implementation's choices.

Details that trip people up:

* The register fields are 5 bits wide, but a PE has 16 registers. Only the
  low 4 bits are used.
* The address field is 10 bits wide, but a local memory has 512 words. Only
  the low 9 bits are used.
* In a store, the register to store is in the `reg` field (bits 15:11), not
  in `src1`.
* A send takes its register from `src1`. A receive writes the register in
  `dst`.
* Mask bit k set to 1 disables PE k for that instruction. A disabled PE
  changes none of the following: its register file, its memory, its memory
  write register, its out registers. A mask of 0 runs all PEs. There are 11
  mask bits for 9 PEs, so bits 9 and 10 do nothing.

## The sequencer, cycle by cycle

The machine is not pipelined at the instruction level. Each instruction
walks through a fixed sequence of sequencer states, and in every state the
sequencer broadcasts one control word (`pe_ctrl_t` in `simd_pkg`) to all PEs
over plain wires. The state names follow the original sequencer's state
diagram. The order in which the states are visited is this implementation's
own. It was chosen so that loads, stores and the three-stage operations take
exactly the published 8, 10 and 11 cycles.

| state | what happens in the PEs |
|---|---|
| `if1` | PC drives the instruction memory address |
| `if2` | IR <- instruction word, PC <- PC + 1 |
| `id1` | decode; an end word goes to `zombie` |
| `ex1` | A <- RF[src1], B <- RF[src2] (FP, store, send); or start the memory read (load); or Cin <- in register (receive) |
| `ex2` | S1 <- A, S2 <- B; or read register <- memory data (load) |
| `fpu1`-`fpu3` | wait for the 3-stage FPU pipeline |
| `div1`-`div26`, then `fpu2`, `fpu3` | wait for the 28-stage divider |
| `ex3` | C <- FPU output (for store and send the FPU passes S1 through) |
| `lm1` | the read register drives the destination bus |
| `wb1` | RF[dst] <- destination bus (C, read register or Cin); a send writes the out register instead |
| `wb2` | end of instruction |
| `sm1` | memory write register <- C |
| `sm2` | memory[x] <- write register |
| `sm3`, `sm4` | end of store |
| `rs` | after reset: idle until started |
| `zombie` | after an end word: idle until started again |

The resulting sequences:

```
load     if1 if2 id1 ex1 ex2 lm1 wb1 wb2                         8
store    if1 if2 id1 ex1 ex2 ex3 sm1 sm2 sm3 sm4                 10
add/sub/mul  if1 if2 id1 ex1 ex2 fpu1 fpu2 fpu3 ex3 wb1 wb2      11
div      if1 if2 id1 ex1 ex2 div1..div26 fpu2 fpu3 ex3 wb1 wb2    36
send     if1 if2 id1 ex1 ex2 ex3 wb1 wb2                         8
receive  if1 if2 id1 ex1 wb1 wb2                                 6
```

The FPU timing works as follows. The S1/S2 latches are loaded at the end of
`ex2`, so the FPU sees its operands from the first wait state onward. A unit
of latency L has its result at its output L cycles later, and that cycle is
`ex3`, where C captures it. Each FPU unit is pipelined, but the sequencer
issues only one operation per instruction. The pipelining therefore buys
clock frequency, not throughput.

## Processing element and mesh

Datapath of one PE, `rtl/pe.sv`:

```
 RF[16x32] --A--S1--\                 /--> RF[dst]
           --B--S2---FPU--C--+--dbus--+--> write reg --> local memory
 local memory --> read reg --+        \--> N/E/W/S out registers --> neighbours
 neighbours --> N/E/W/S in registers --> Cin --+
```

`dbus` is the destination bus. Its source is picked by the control word: C,
the read register or Cin.

* The mesh links are made of registers and carry data both ways at once. Each
  in register copies the facing neighbour's out register on every clock.
* Data therefore reaches a neighbour like this: the sender writes its out
  register, one clock later the receiver's in register holds the value, and
  a receive instruction copies it into a register.
* A send in one direction pairs with a receive from the opposite direction.
  For example, after `ss r6` in every PE, `nr r10` gives each PE the r6 of
  its northern neighbour.
* The array is a torus: every edge wraps around. PE k sits at row k / COLS
  and column k % COLS. For example, PE0's northern neighbour is PE6 and its
  western neighbour is PE2.
* Each PE's local memory (`pe_local_mem`) has two ports. Port A belongs to the
  PE: the address comes from the sequencer and the data goes through the
  PE's read and write registers. Port B belongs to the host.

## Floating-point unit

All units use IEEE-754 single precision (1 sign bit, 8 exponent bits, 23
fraction bits with a hidden 1).

* **Adder/subtractor** (`fp_addsub`, 3 stages):
  1. Unpack both operands.
  2. Compare exponents and shift the smaller mantissa right to align it.
  3. Add or subtract, normalise, pack.

  One module does both jobs, selected by its `SUB` parameter. The FPU holds
  one of each.
* **Multiplier** (`fp_mul`, 3 stages):
  1. Unpack both operands.
  2. XOR the signs, add the exponents, multiply the mantissas into a 48-bit
     product and keep its top 25 bits.
  3. Normalise and pack.
* **Divider** (`fp_div`, 28 stages): the loop is unrolled, one quotient bit
  per stage.
  - Stage 1: unpack.
  - Stage 2: compute the exponent. If the dividend mantissa is smaller than
    the divisor mantissa, double it, so the quotient lies in [1, 2).
  - Stages 3-26: 24 radix-2 non-restoring steps with digits +1/-1.
  - Stage 27: convert the digits into a binary quotient, with a final
    correction when the remainder is negative.
  - Stage 28: pack.

  The original divider is described as SRT non-restoring. The plain
  two-digit form used here is a simplification.

Numerical behaviour, which is this implementation's choice because the
original leaves it open:

* Results are truncated (round toward zero). The adder keeps guard, round
  and sticky bits while aligning, so its error stays below one unit in the
  last place.
* Denormal inputs count as zero.
* An exponent overflow gives infinity and an underflow gives zero.
* Division by zero gives infinity.
* NaN and infinity inputs are not treated specially.

Products and sums of small integers, as in the matrix example below, come
out exact.

## Host side

`simd_top` is an OPB slave. Every memory sits behind its own glue block
(`opb_slave_if`). The glue accepts a selected transfer once and acknowledges
it on the next clock with `sl_xferack`, putting read data on `sl_dbus` in
that cycle. All slaves' outputs are ORed together, so an idle slave must
drive zero.

The byte address map is this implementation's own. `BASE` and `GM_BASE` are
parameters, with defaults 0x4000_0000 and 0x0008_0000.

| address | contents |
|---|---|
| BASE + 0x0000 - 0x07FF | instruction memory, 512 words |
| BASE + 0x0800 | control/status. Write bit 0 = 1 to start at word 0. Read: bit 0 busy, bit 1 halted, bits 13:8 state, bits 31:16 PC |
| BASE + 0x1000 + k * 0x800 | local memory of PE k, 512 words |
| GM_BASE | global memory, 512 words |

The global memory has a second port. It runs on its own clock, `lad_clk`,
which is the board's Local Address Data (LAD) bus clock to the PC. That port
is read-only, answers word addresses 0x200 - 0x3FF and returns data one
`lad_clk` later. Its protocol is simplified to chip-select, address and
data.

A typical session:

1. The host writes the program and an end word into the instruction memory.
2. It writes operands into the PEs' memories.
3. It writes 1 to the control register and polls until the halted bit is set.
4. It reads the results from the PEs and stores them in the global memory.
5. The PC reads them over LAD.

After reset the sequencer waits for the start write. Starting the sequencer
from the host, rather than running straight out of reset, is this
implementation's choice: it lets the host load the memories first.

## Worked example: C = A x B for 3 x 3 matrices

Each of the nine PEs computes one element of C. PE k holds row k / 3 of A
in words 0-2 and column k % 3 of B in words 3-5. Every PE runs the same
program:

```
load r0..r5, mem(0..5)              18000000 18010800 18021000 18031800 18042000 18052800
mul r0,r3,r6  mul r1,r4,r7  mul r2,r5,r8     88033000 88243800 88454000
add r6,r7,r9  add r9,r8,r10                  08c74800 09285000
store mem(7), r10                            1c075000
```

The run takes 6 x 8 + 5 x 11 + 1 x 10 = 113 cycles, plus 3 to fetch the end
word. With A = [3 2 1; 4 5 6; 2 1 3] and B = [1 2 4; 7 8 9; 3 5 6] the PEs
store 20, 27, 36, 57, 78, 97, 18, 27, 35 (0x41a00000 ...).

The same product on a single PE takes 873 cycles: 90 instructions, of which
36 are loads, 45 are FP operations and 9 are stores. `simd_top` with
`ROWS = COLS = 1` is that single-PE floating-point co-processor
configuration. The ratio 873 / 113 = 7.7 is the speed-up of nine PEs over
one.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. All of them have a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/simd_pkg.sv tb/fp_ref_pkg.sv tb/opb_host_pkg.sv tb/tb_simd_top.sv \
    --top-module tb_simd_top -Mdir obj -o sim && obj/sim
```

| testbench | what it shows |
|---|---|
| `tb_simd_top` | Full machine at default size, driven over OPB and LAD. Runs the matrix product and checks the instruction encodings, the results and the 113-cycle run. Then restarts with a second program that uses div, sub, sends and receives in all four directions across the wrap-around, and a masked add. Counts each mechanism and fails if any never happened. |
| `tb_coproc_matmul` | Single-PE configuration running the 90-instruction product; checks results and 873 cycles |
| `tb_simd_controller` | state sequence and control word of every instruction class, mask, end and restart |
| `tb_pe`, `tb_pe_array` | datapath operations, mesh directions and torus wiring, masking |
| `tb_fp_addsub`, `tb_fp_mul`, `tb_fp_div`, `tb_fpu` | exact integer cases, random operands against a real-number reference, latency |
| `tb_instr_mem`, `tb_pe_local_mem`, `tb_global_mem`, `tb_opb_slave_if` | memories, clock crossing, bus handshake |

`tb/fp_ref_pkg.sv` provides the reference conversions: it decodes bit
patterns into `real` and encodes small integers. `tb/opb_host_pkg.sv`
provides the instruction encoders.

## Where this RTL departs from, or adds to, the original

**Taken from the original:**

* the 3 x 3 torus mesh
* the PE datapath and its registers
* 16 registers and 2 KB local memories per PE
* the instruction formats and four opcodes
* the sequencer state names
* the load, store and FP cycle counts
* the FPU unit structure and pipeline depths (3, 3 and 28 stages)
* dual-ported instruction, local and global memories
* OPB access to every memory and a LAD path from the global memory

**This implementation's own choices:**

* the order of the sequencer states
* the remaining opcodes and the end-of-program word
* start by a host register write
* the rounding and exception behaviour of the FPU
* one extra product bit kept by the multiplier between its stages 2 and 3 (25 instead of 24)
* the non-restoring divider digit set
* the OPB handshake details and the address map
* the simplified LAD port and the 512-word global memory
* the instruction memory depth (512 words)
* reset values (all zero)

**Not included:**

* the soft-core host processor
* the OPB bus fabric and its arbiter
* the board's PCI controller, clock generator and external memories

The testbenches play the host with bus tasks.
