# A 16-bit single-cycle RISC processor for small convolutions

This is a small load/store processor that finishes every instruction in one clock
cycle without a pipeline. Nothing is in flight when a jump happens, so no cycle is
ever stalled or thrown away. A program of N instructions that ends in `HALT` takes
exactly N cycles. The datapath is 16 bits wide. It has eight registers, one 64-word
memory shared by program and data, and 27 instructions. The ALU has a single-cycle
Wallace tree multiplier, so a 3 x 2 linear convolution can be computed with four
multiplications by the Winograd (Toom-Cook) method. That program is 26
instructions long and runs in 26 cycles.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) with no vendor primitives.

## Block structure

```
            +---------------------------- CCU (run / halt, enables) -----------+
            | PC_en          IDU_en           ALU_en             WE_t           |
            v                  v                 v                  v           |
 memory --> PC ----instr----> IDU ---op----->  ALU  <---- rd, rs --- REGISTERS  |
 (64x16)    ^ Zero/Sign flags  |   rd, rs addr   | Data_Out --------->  (8x16)  |
    ^       +------------------|-----------------+        WE = WE_t & WB_en     |
    +-- LOAD/STORE data port --+------------------------------------------------+
```

| module | role |
|---|---|
| `risc_top` | the processor plus memory, with a host port for loading programs |
| `ccu` | clock control unit: IDLE / RUN / HALTED state, block enables, cycle counter |
| `program_counter` | 6-bit instruction pointer, jump decision, 6-bit link register |
| `incrementer` | half-adder chain that computes PC + 1 |
| `idu` | instruction decoder for the six formats |
| `register_file` | R0..R7, 16 bits, two read ports, one write port, an inspection port |
| `alu` | picks the result of the sub-units; Zero/Sign flag register |
| `arith_unit` | ADD/SUB on the carry select adder |
| `carry_select_adder` | 16-bit adder made of 4-bit blocks, each duplicated for carry 0/1 |
| `wallace_multiplier` | 16 x 16 multiplier that keeps the low 16 bits, reduced with 4:2 compressors |
| `logic_unit` | AND / OR / XOR / pass |
| `shift_unit` | SL, RL, SR, RR by one place, and SWAP |
| `unified_memory` | 64 x 16 array: combinational instruction and data reads, synchronous write |
| `risc_pkg` | widths, opcode enum, decoded-instruction struct |

## What happens in one cycle

Everything in the list below happens in the same clock period. Only the final
clock edge changes any state.

1. The PC addresses the memory's instruction port. The word comes back
   combinationally.
2. The IDU splits the word. Combinationally, it produces the register addresses,
   the ALU operation, the immediate, the memory address, the jump condition and
   target, and `wb_en`.
3. The register file reads the destination register (operand A) and the source
   register (operand B). For an immediate instruction, B is the zero-extended
   8-bit immediate instead.
4. The ALU forms the result. For `LOAD`, the memory's data port reads the
   addressed word in parallel.
5. At the rising edge, these things happen together:
   - the destination register is written when `WE_t & WB_en`;
   - the flags update, for ALU instructions only;
   - `STORE` writes memory;
   - the link register records a load/store address;
   - the PC loads the jump target if the condition holds, or else steps through
     the incrementer.

The jump condition is evaluated on the flags as they stand at the start of the
cycle, so a conditional jump tests the result of the last ALU instruction before
it.

A `LOAD` reads its data in the same cycle as its own fetch. The memory therefore
has two read ports, one for instructions and one for data, on one array with one
address space. That is what lets `LOAD` finish in one cycle.

The critical path runs through the whole chain: memory read → decode → register
read → multiplier → write-back mux.

## Instruction set

All instructions are 16 bits, with the opcode in bits [15:11].

| format | fields below the opcode | instructions |
|---|---|---|
| (a) register | rd [10:8], rs [7:5], zeros [4:0] | MOV AND OR XOR ADD SUB SL RL SR RR SWAP MUL |
| (b) immediate | rd [10:8], imm8 [7:0] | LHI LLI ANDI ORI XORI ADDI SUBI |
| (c) load | rd [10:8], address [7:2], zeros [1:0] | LOAD |
| (d) store | address [10:5], rs [4:2], zeros [1:0] | STORE |
| (e) jump | target [10:5], zeros [4:0] | JMP JZ JNZ JP JN |
| (f) halt | zeros [10:0] | HALT |

Opcode values follow the order of the table rows: MOV = 0, AND = 1, ... SUBI = 18,
LOAD = 19, STORE = 20, JMP = 21, JZ = 22, JNZ = 23, JP = 24, JN = 25, HALT = 26.
Codes 27..31 are reserved and act as no-operations. See `opcode_e` in `risc_pkg`.

Semantics:

- **Two-operand instructions** (AND OR XOR ADD SUB MUL and their immediate forms)
  compute `rd = rd op B`.
- **One-operand instructions** (MOV SL RL SR RR SWAP) compute `rd = op(rs)`.
- **SR** is a sign-keeping shift right, i.e. division by two.
- **SWAP** exchanges the two bytes of `rs`.
- **MUL** keeps the low 16 bits of the product. These bits are the same for
  signed and unsigned operands.
- **LHI / LLI** replace the high or low byte of `rd` and keep the other byte.
- **Flags:** every ALU instruction sets Zero = (result == 0) and
  Sign = result[15]. There is no carry flag. LOAD, STORE, jumps and HALT leave the
  flags alone.
- **Jumps:**
  - JZ: Z set
  - JNZ: Z clear
  - JP: S and Z both clear, i.e. strictly positive
  - JN: S set
- **HALT** stops the CCU and leaves the PC on the `HALT`.

Programs start at address 0. Their data goes at the higher addresses, above the
`HALT`.

## Running a program (top-level interface)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears PC, link, flags, registers, CCU; not the memory) |
| `host_we`, `host_addr`, `host_wdata` | in | 1/6/16 | write memory while not running |
| `host_rdata` | out | 16 | memory word at `host_addr` (while not running) |
| `start` | in | 1 | one-cycle pulse, only acted on when not running: PC ← 0, enter RUN |
| `running`, `halted` | out | 1 | state |
| `cycles` | out | 16 | cycles of the current / last run, HALT included |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | 3 / 16 | read any register, any time |
| `pc`, `link`, `zero_flag`, `sign_flag` | out | 6/6/1/1 | architectural state |

The sequence is:

1. Hold reset, then release it.
2. Write the program and its data through the host port.
3. Pulse `start`.
4. Wait for `halted`.
5. Read the results from registers or memory.

`start` can be pulsed again from HALTED, which re-runs from address 0 with the
registers as they were left. An assertion in `risc_top` flags a host write while
the processor runs.

## The convolution example

The test `tb/tb_winograd.sv` computes s = x * h for a 3-sample x and a 2-tap h.
Direct computation needs six products:
s0 = h0x0, s1 = h0x1 + h1x0, s2 = h0x2 + h1x1, s3 = h1x2.

The Winograd / Toom-Cook form needs only four. The program evaluates x at the
points 0, 1, -1 and ∞: x0, x0+x1+x2, x0−x1+x2, x2. The filter values at the same
points are prepared in memory beforehand, doubled so that a single right shift
finishes each output: H0 = 2h0, H1 = h0+h1, H2 = h0−h1, H3 = 2h1. With
m0 = H0·x0, m1 = H1·(x0+x1+x2), m2 = H2·(x0−x1+x2) and m3 = H3·x2:

    s0 = m0 / 2    s1 = (m1 − m2 − m3) / 2    s2 = (m1 + m2 − m0) / 2    s3 = m3 / 2

The program is 25 instructions plus `HALT`:

- 7 loads (x0..x2 and H0..H3, at addresses 32..38);
- 5 moves and adds to evaluate x;
- 4 multiplies;
- 5 add/subtract steps;
- 4 shifts.

The results are left in R0, R5, R3 and R2. The test checks them against the
direct formula, and checks that the run takes exactly 26 cycles. It uses x values
of 6 bits and h values of 3 bits (largest intermediate 189 × 14), and also signed
inputs. The same test also uses the machine for multiply-accumulate: four
repeated LOAD, LOAD, MUL, ADD groups compute a 4-term dot product in 19 cycles.
LOAD and STORE take absolute addresses only, so there is no indexed walk through
an array and such loops are unrolled.

## Where this design makes its own choices

The following are not fixed by the source description of the processor. Each is
chosen here and can be changed locally:

- Opcode numbering, and reserved codes treated as no-operations (`risc_pkg`, `idu`).
- Zero-extended immediates. The operand order `rd = rd op rs`.
- The meaning of SWAP: a byte swap.
- SR is arithmetic. RL rotates left.
- JP means strictly positive.
- The multiplier takes whole 16-bit registers. An 8-bit multiplier operand could
  not hold the convolution's intermediate values (up to 189, and negative
  differences).
- The internal arrangements of the carry select adder (4-bit blocks) and of the
  Wallace tree (4:2 compressors, no further modification). The original work
  realised the incrementer and the adder in a quasi-adiabatic transistor-level
  logic family. RTL cannot express that; here both are plain logic with the same
  function.
- The CCU. The processor is only described as having a unit that schedules and
  selects blocks. Here it is a three-state machine. Its enables select only the
  blocks an instruction needs: `ALU_en` is raised only for ALU instructions.
  Power-oriented clock gating is left to the synthesis tool, which can turn these
  enables into gated clocks.
- The host port, `start`/`halted`, the register inspection port, the cycle counter
  and the reset behaviour.
- The dual-read-port memory described above.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- the adder, multiplier, shifter and logic unit against SystemVerilog operators;
- the register file and memory against reference arrays;
- the PC against every jump condition and flag combination;
- the decoder against a table of all 32 opcodes;
- the CCU through run / halt / restart.

`tb_risc_top` runs three kinds of program at full size and compares registers,
memory, flags, PC, link register and cycle count with an instruction-set model in
`tb_asm_pkg`:

- a directed program that uses all 27 instructions;
- a count-down loop;
- 40 random programs.

It counts every opcode executed, taken and not-taken conditional jumps, Zero and
Sign flags, and halts and restarts. It fails if any of these never happened.

Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/risc_pkg.sv tb/tb_asm_pkg.sv tb/tb_risc_top.sv --top-module tb_risc_top
./obj_dir/Vtb_risc_top
```

Testbenches that use only leaf modules need only `rtl/risc_pkg.sv` and the
testbench file on the command line; `-y rtl` finds the rest.

## Not included

- Gate-level power, area and timing figures. The original work reported 200 MHz,
  329.3 µW and an area of 65 012 nm² on a 90 nm standard-cell library, after
  clock gating. These have not been reproduced.
- Transistor-level adiabatic logic.
