# A 4-trit ternary processor with a 21-instruction set

This is a small processor that computes in base 3 rather than base 2. Every
signal digit is a *trit* with three levels, written `0`, `Z` and `1`. A data
word or a memory address is four trits, so it holds 0 to 80. An opcode is
three trits. The processor runs 21 instructions: accumulator arithmetic and
logic with register B, increment and decrement, rotates, complement, two
immediate instructions, two "move immediate" instructions, one direct load and
four register moves. Its structure is a classic single-bus machine. Every
register hangs on one internal bus. The ALU sits between two private
registers, Y and Z. A hardwired control unit steps through each instruction.
Each register is governed by a single control *trit*: `1` means "put yourself
on the bus", `Z` means "load from the bus" and `0` means "do nothing".

The RTL follows a published description of this instruction set and its
control signals. That description gives the opcodes, the register set, the
meaning of every control trit, and the exact step-by-step control of the
instruction fetch and of `T_MVI A`. It leaves open the step sequences of the
other instructions, the ALU function codes, flags and the memory size. Those
parts are choices made here. They are marked below, and each one is also
marked in the opening comment of its file.

## Trits, words and numbers

A trit is carried on two binary wires (`tern_pkg::trit_t`):

| level | meaning | value | encoding |
|-------|---------|-------|----------|
| `0`   | low     | 0     | `2'b00`  |
| `Z`   | middle  | 1     | `2'b01`  |
| `1`   | high    | 2     | `2'b10`  |

`2'b11` is never produced. Anything that reads it treats it as `1`.

Numbers are **unbalanced ternary**: a trit weighs 0, 1 or 2. A word
`t3 t2 t1 t0` has the value 27·t3 + 9·t2 + 3·t1 + t0. Examples:

- `000Z` is 1. It is the constant that increments the PC.
- `1Z00` is 63.
- `0Z1Z` is 16.

Words are `tword_t = trit_t [3:0]`, and index 0 is the least significant trit.
Opcodes are `topc_t = trit_t [2:0]`. In memory an opcode is stored as a word
with a leading `0` (for example `0Z10` for `T_MVI A`).

`tern_pkg` also holds the ternary gate functions:

- `t_not` is the standard inverter, 2 − x.
- `t_and` is the minimum and `t_or` the maximum.
- `t_nand` and `t_nor` are their inversions.
- `t_xor` is max(min(a, ¬b), min(¬a, b)).
- `t_full_add` is a ternary full adder.

## The datapath

```
            +----+ +---+ +---+ +---+ +-----+ +-----+ +----+
   bus <--> | PC | | A | | B | | C | | MAR | | MDR | | IR |
            +----+ +---+ +---+ +---+ +-----+ +-----+ +----+
             |                          |       ^ |
             |        (A) --+      addr |  rdata| | wdata
             |              v           v       | v
   bus ---> [Y] --X--> [ ALU ] <--W-- selmux   [ memory 81 x 4 trits ]
                          |          (A or 000Z)
                          v
                         [Z] ---> bus
```

- **Bus** (`tern_bus`). The bus can have only one driver at a time. It is
  built as a multiplexer, not as tri-state wires. Each register raises
  `drive_o` when its control trit is `1`, and the bus carries that register's
  word. If nothing drives, the bus reads `0000`. Two drivers at once set
  `bus_conflict_o`, and an assertion in `tern_cpu` reports it. The control
  unit never issues two drivers.
- **Registers** (`tern_reg`). PC, A, B, C, MAR, IR, Y and Z are all this one
  module. IR is three trits wide and takes the low three trits of the bus.
- **Y and Z**. The pair has a single control trit, `Y_Z`:
  - `Z` loads Y from the bus. On the same clock edge it loads Z with the ALU
    result.
  - `1` puts Z on the bus.

  The ALU's first operand X is the bus word whenever Y is loading, so one step
  both captures the operand and computes the result. This matches the
  described timing, where Y and Z change together.
- **selmux** (`tern_alu_mux`). This picks the ALU's second operand W. A `1`
  selects the constant `000Z`, which increments the PC. Any other value
  selects the accumulator A.
- **MDR** (`tern_mdr`). It loads the memory word when `R_W` is `1` (read).
  Otherwise it loads the bus when its own trit is `Z`. It drives the bus when
  its trit is `1`.
- **Memory** (`tern_mem`). It has 81 words, one for every 4-trit address.
  Reads are asynchronous. Writes happen on the clock edge when `R_W` is `Z`.
  The address is normally MAR. In a step that also loads MAR, the address is
  the bus. This way "PC out, MAR in, read" fetches the word in a single step,
  as the fetch needs.

## The control word and the step sequences

The control unit (`tern_control`) is built from two parts:

- A **two-trit step counter** (`tern_step_counter`). Its values `00` to `11`
  are the steps T1 to T9. The `END` trit clears it.
- A **3:27 decoder** (`tern_decoder`). It raises the line whose index is the
  value of the opcode in IR.

From these it forms the control word `ctrl_t`. The control word has these
trits:

- `pc`, `a`, `b`, `c`, `mar`, `mdr` and `ir`, one per register
- `y_z`, for the Y/Z pair
- `r_w` (`1` read, `Z` write)
- `end_i`
- `selmux`
- the three ALU select trits `sel` (`sel[2]` is the most significant)

Each step takes one clock cycle. The outputs of the control unit are
combinational from the step counter and IR.

Every instruction begins with the same three fetch steps:

| step | control | effect |
|------|---------|--------|
| T1 | `pc=1 mar=Z r_w=1 y_z=Z selmux=1 sel=0Z1` | MAR←PC, MDR←mem[PC], Z←PC+1 |
| T2 | `y_z=1 pc=Z` | PC←Z |
| T3 | `mdr=1 ir=Z` | IR←opcode |

An instruction with an operand word repeats T1 and T2 as T4 and T5, which
leaves the operand in MDR. The rest of each instruction is as follows:

| opcode | instruction | steps after the fetch | total steps |
|--------|-------------|-----------------------|-------------|
| `00Z` `001` `0Z0` `0ZZ` `0Z1` `010` `01Z` | T_ANA, T_ORA, T_XRA, T_ADD, T_ADC, T_SUB, T_SBB (with B) | T4 `b=1 y_z=Z` ALU(B, A); T5 `y_z=1 a=Z`; T6 END | 6 |
| `011` `Z00` | T_ICR, T_DCR (accumulator) | T4 `a=1 y_z=Z selmux=1` A±000Z; T5 Z→A; T6 END | 6 |
| `Z0Z` `Z01` `ZZ0` | T_RAL, T_RAR, T_CMA | T4 `a=1 y_z=Z` ALU(A); T5 Z→A; T6 END | 6 |
| `ZZZ` `ZZ1` | T_ADDI, T_SUI | T4/T5 operand fetch; T6 `mdr=1 y_z=Z` ALU(data, A); T7 Z→A; T8 END | 8 |
| `Z10` `Z1Z` | T_MVI A, T_MVI B | T4/T5 operand fetch; T6 `mdr=1 a=Z` (or `b=Z`); T7 END | 7 |
| `Z11` | T_LDA addr | T4/T5 address fetch; T6 `mdr=1 mar=Z r_w=1`; T7 `mdr=1 a=Z`; T8 END | 8 |
| `100` `10Z` `101` `1Z0` | T_MOV A,B / B,A / A,C / C,A | T4 source `1`, destination `Z`; T5 END | 5 |
| `000` `1ZZ` `1Z1` `11x` | unused | T4 END (no operation) | 4 |

The fetch sequence and the full seven-step `T_MVI A` sequence are exactly as
the original description lists them. The other sequences were derived here,
using only the same register moves. The `END` step does nothing else. It
clears the step counter, so the next cycle is T1 of the next instruction.

## ALU functions and the carry flag

`tern_alu` is combinational. X is the bus or Y operand and W is the selmux
operand.

| sel | function | sel | function |
|-----|----------|-----|----------|
| `000` | X (pass) | `010` | W − X (SUB: A − B) |
| `00Z` | T-AND(X, W) | `01Z` | W − X − borrow (SBB) |
| `001` | T-OR(X, W) | `011` | X − W (DCR: A − 1) |
| `0Z0` | T-XOR(X, W) | `Z00` | rotate X left one trit |
| `0ZZ` | X + W + carry (ADC) | `Z0Z` | rotate X right one trit |
| `0Z1` | X + W (ADD, PC increment) | `Z01` | T-NOT of each trit (CMA) |

Only `0Z1` comes from the original description, as the code the fetch uses to
add `000Z`. The other codes were chosen here.

The arithmetic works on unbalanced ternary:

- **Addition** is a ripple of four ternary full adders. The carry into each
  trit is 0 or 1.
- **Subtraction** adds the trit-wise inverse (2 − x, the T-NOT) plus one. A
  final carry of 0 then means a borrow.
- **Rotates** move whole trits and do not pass through the carry.

The original description defines no flags. ADC and SBB need one, so a
one-trit **carry/borrow flag** (`carry_o`) was added:

- It is set by ADD, ADC, ADDI (carry out of 80) and by SUB, SBB, SUI (borrow).
- It changes only in ALU steps whose second operand is the accumulator. The
  PC increment, ICR and DCR therefore leave it alone.

## Interface of `tern_cpu`

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock (one step per cycle), asynchronous active-low reset |
| `run` | in | 1 = execute steps; 0 = freeze everything (control word idle) |
| `ld_en`, `ld_addr`, `ld_data` | in | write a memory word; honoured only while `run` = 0 |
| `dbg_addr` / `dbg_data` | in / out | read any memory word |
| `pc_o` `a_o` `b_o` `c_o` `mar_o` `mdr_o` `ir_o` `y_o` `z_o` | out | register contents |
| `bus_o`, `ctrl_o`, `step_o` | out | bus, current control word, step counter |
| `carry_o` | out | carry/borrow flag |
| `end_o` | out | high during the END step of each instruction |
| `bus_conflict_o` | out | more than one bus driver (never expected) |

Parameter `RESET_PC` (default `0000`) is where execution starts after reset.

To run a program:

1. Hold `run` low.
2. Load the program and its data through `ld_*`. Opcodes go in the low three
   trits with a leading `0`. An immediate or an address goes in the word after
   its opcode.
3. Pulse `rst_n`.
4. Raise `run`.

The processor has no halt instruction. It runs until `run` drops. A PC of 80
wraps to 0.

Example, using the worked example of the original description:

| address | word | instruction |
|---------|------|-------------|
| 0 | `0Z10` | `T_MVI A` |
| 1 | `0011` | operand 8 |
| 2 | `010Z` | `T_MOV B,A` |
| 3 | `00ZZ` | `T_ADD B` |

After these instructions A holds `0Z1Z` (16), and `T_MVI A` has taken seven
steps.

## Departures from the original description

- Trits use two-wire binary encoding, and the bus is a multiplexer rather
  than high-impedance wiring.
- The step sequences of 20 of the 21 instructions are this design's own. So
  are all ALU select codes except `0Z1`, the carry flag, and the choice of
  operand for ICR and DCR (the accumulator).
- The memory size is 81 words, the full 4-trit address space. The original
  gives no size.
- `run`, the memory load and debug ports, and `RESET_PC` are additions. The
  same goes for the no-operation treatment of the six unused opcodes.
- Nothing in the instruction set writes memory, because there is no store
  instruction. The memory still implements the write (`R_W` = `Z`), and its
  own testbench exercises it.
- The 40 ns "ternary clock" of the original is a simulation clock. It appears
  only in the testbenches.

## Files

`rtl/`:

- `tern_pkg.sv`: types, opcodes, ALU codes, control word, gate and adder
  functions
- `tern_cpu.sv`: top level
- `tern_control.sv`: control unit
- `tern_decoder.sv`: 3:27 decoder
- `tern_step_counter.sv`: step counter
- `tern_alu.sv`: ALU
- `tern_alu_mux.sv`: selmux
- `tern_reg.sv`: bus register
- `tern_mdr.sv`: memory data register
- `tern_mem.sv`: memory
- `tern_bus.sv`: bus

`tb/`:

- `tern_tb_pkg.sv`: integer/trit conversion written independently of the
  design
- `tb_<module>.sv`: one self-checking testbench per module

`tb_tern_cpu_fig3` replays the published simulation trace of the processor.
It places `T_MVI A,0011`, `T_MOV B,A`, `T_ADD B` and `T_MOV A,B` at address
`1Z00`, with `RESET_PC` set to `1Z00`. It then checks the sequence of values
taken by PC, MAR, MDR, Y, Z, A, B and IR against that trace, for example:

- PC: `1Z00 1Z0Z 1Z01 1ZZ0 1ZZZ`
- Z: `1Z0Z 1Z01 1ZZ0 1ZZZ 0Z1Z 1ZZ1`

`tb_tern_cpu` runs the top at its default parameters. It first runs the worked
example above. It then runs eleven random programs, one of which walks
through all 27 opcodes. It drops `run` at random to pause the processor. At
every END it compares A, B, C, the flag, the PC and the step count with an
instruction-level model. It also counts carries, borrows, ADC and SBB with the
flag set, unused opcodes and pauses, and each of these must occur at least
once.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/tern_pkg.sv tb/tern_tb_pkg.sv rtl/tern_*.sv tb/tb_tern_cpu.sv \
  --top-module tb_tern_cpu -o sim
./obj_dir/sim
```

Every testbench ends by printing
`TB_RESULT checks=<n> failures=<m>`. To run another testbench, replace
`tb_tern_cpu` with its name. Each testbench also has a watchdog.

## Changing the design

- **New instruction.** Pick an unused opcode (`000`, `1ZZ`, `1Z1`, `11x`), add a
  constant to `tern_pkg`, add a branch to the `always_comb` in `tern_control`,
  and extend the model in `tb_tern_cpu`.
- **Wider words.** `WORD_TRITS` in `tern_pkg` sets the word width. The memory
  depth, the helper functions and the testbenches assume four trits (81
  words), so change them with it.
