# A 16-bit four-stage pipelined controller

This is a small RISC-style processor core. It has eight instructions, eight 16-bit registers and a
four-stage pipeline. Each clock it takes one instruction: a 3-bit opcode plus three 3-bit register
fields and a 16-bit data word. Once the pipeline is full, one instruction finishes every clock. Its
only outputs are a 32-bit `result` bus and a one-bit `jump` request. An instruction memory and a
data memory surround it. Together they form the program store, and `jump` steers it.

The RTL follows the architecture in V. Taraate, *FPGA Based Pipelined Controller Design and
Implementation*. That description names the units, their connections, the opcodes, the register
codes and the pipeline timing. It leaves many details open: field use, write-back, jump targets and
memory organisation. The choices made here to fill those gaps are listed in
[What is taken as given and what is chosen here](#what-is-taken-as-given-and-what-is-chosen-here).

## Instruction set

| opcode | mnemonic | operands | effect | `result` afterwards |
|---|---|---|---|---|
| 000 | `nop`   | –                         | nothing | unchanged |
| 001 | `move`  | source1, destination      | dest ← src1 | src1, zero-extended |
| 010 | `add`   | source1, source2, destination | dest ← src1 + src2 (mod 2^16) | 16-bit sum, zero-extended |
| 011 | `sub`   | source1, source2, destination | dest ← src1 − src2 (mod 2^16) | 16-bit difference, zero-extended |
| 100 | `mult`  | source1, source2, destination | dest ← low 16 bits of src1 × src2 | full 32-bit product |
| 101 | `loadi` | data, destination         | dest ← data | data, zero-extended |
| 110 | `readi` | destination               | none (register is only read) | the register named by *destination* |
| 111 | `cjeq`  | source1, source2, data = code | if src1 = src2: `jump` = 1 for one clock | code (when taken); unchanged otherwise |

Register addresses: A=000, B=001, C=010, D=011, E=100, H=101, L=110, W=111. `pc_pkg` holds both
encodings as enums (`opcode_e`, `reg_name_e`).

There are no flags and no carry. The core also has no program counter: the fetch address is kept
by the instruction memory, which is outside the controller.

## The pipeline and its timing

This is the part to understand before writing a program for the core.

```
 memories ──► FETCH ──► DECODE ──► EXECUTE ──► REGISTER UNIT (write)
 (clock n)   regs f_*   regs d_*   regs result,  regs[e_destination] <= e_data
                        + register jump, e_*     at the end of clock n+3
                        read into
                        r_source*_data
```

An instruction presented to the controller pins in clock *n* moves like this:

| clock | what happens to it | where it is held afterwards |
|---|---|---|
| n   | fields on the pins; captured at the clock edge | `fetch_unit` outputs `f_*` |
| n+1 | decode raises `rd_en`/`sel_imm`; the register unit reads the sources (or takes the `loadi` data word) | `r_source1_data`, `r_source2_data`; `decode_unit` outputs `d_*` |
| n+2 | execute unit computes | `result`, `jump`, `e_data`, `e_destination`, `e_store` |
| n+3 | `result`/`jump` are visible at the pins; the register unit writes the destination at the edge that ends this clock | register file |

Four instructions can be in flight at once. With the sequence
`add B,C,A / add D,E,W / loadi FFh H / readi A` issued in clocks I–IV, the stages are occupied like this:

| clock | fetch | decode | execute | register unit |
|---|---|---|---|---|
| I   | add B,C,A | | | |
| II  | add D,E,W | add B,C,A | | |
| III | loadi FFh H | add D,E,W | add B,C,A | |
| IV  | readi A | loadi FFh H | add D,E,W | add B,C,A |
| V   | | readi A | loadi FFh H | add D,E,W |
| VI  | | | readi A | loadi FFh H |
| VII | | | | readi A (B+C on `result`) |

`tb/table4_pipeline_tb.sv` checks this grid clock by clock.

### Data hazards are the program's job

The pipeline never stalls and never forwards. An instruction reads its registers in its decode clock
(n+1), and a result is written at the end of clock n+3. So **an instruction that reads a register
must be issued at least three instructions after the one that writes it**: two unrelated
instructions or `nop`s must sit between them. A read at the same edge as the write gets the old
value. The example above keeps exactly this distance between `add B,C,A` and `readi A`.

The hardware does not detect a violation. In simulation, the assertion
`a_no_read_after_write_hazard` in `pipelined_controller` stops the run when the decode stage reads a
register that the execute stage or the write-back is still to write. It checks only the operands
an opcode actually uses.

### Jumps and delay slots

`cjeq` compares two registers in the execute clock. If they are equal, `jump` is high in clock n+3
and `result` carries the code, the jump target. The instruction memory loads the low `ADDR_W` bits of
`result` as its next address. By then the three instructions after the `cjeq` have already been
fetched. **They always execute**: they are delay slots. The target instruction is fetched in clock
n+4. Fill the slots with useful work or `nop`s, and do not put another `cjeq` in them. An
unconditional jump is `cjeq X,X,target`. A halt is a `cjeq` to its own address.

## Program store

`instr_mem` holds one opcode per address, together with the fetch address counter. After reset the
address is 0. It steps by one every clock and wraps at the end. When `jump` is high it loads the
target instead. `data_mem` holds the other fields of the same program word (source1, source2,
destination, data) at the same address. Both memories read combinationally and are 256 words deep
(`ADDR_W = 8`).

Programs are written through a load port on the top (`prog_we`, `prog_addr`, `prog_instr`,
`prog_source1`, `prog_source2`, `prog_destination`, `prog_data`). The port writes one word of both
memories per clock. Load while `reset_n` is low, so that nothing runs meanwhile. The memories have
no reset: load every address a program can reach, and fill the rest with `nop`.

## Module map

```
pipelined_system            top: memories + controller
├── instr_mem               opcodes, fetch address, jump load
├── data_mem                register fields and data word per address
└── pipelined_controller    the four-stage core (pins: instr, source1, source2,
    │                       destination, data, clk, reset_n → jump, result)
    ├── fetch_unit          stage 1 registers
    ├── decode_unit         rd_en / sel_imm, stage 2 registers
    ├── reg_file            eight 16-bit registers, registered read ports
    └── execute_unit        ALU, 16×16 multiplier, compare, stage 3 registers
pc_pkg                      widths, opcode and register enums, opcode classes
```

All flip-flops share `clk` and the asynchronous active-low `reset_n`. Reset clears every pipeline
register to a `nop`, every internal register to 0, `result` to 0 and the fetch address to 0.

## What is taken as given and what is chosen here

These come from the source architecture:
- The three top-level units.
- The four-unit split of the core, with the signal names of its connections (`f_*`, `d_*`,
  `r_source1_data`, `r_source2_data`, `e_data`, `e_destination`, `e_store`).
- The pin list, opcodes, register codes and widths (16-bit data, 32-bit result).
- The asynchronous active-low reset.
- The one-instruction-per-clock timing shown in the table above.

These were chosen here, because the description is silent or unclear:
- **No stall.** The description also says that the decode stage "takes one extra clock" for
  instructions that read registers. That contradicts its own timing example, in which such
  instructions follow each other every clock. The example is followed. The register read happens
  inside the decode clock, and hazards are left to the program.
- **`readi` addressing.** `readi` names its register in the destination field. The fetch unit puts
  that field on the first read address.
- **`loadi` path.** The data word reaches the execute unit through the register unit's first read
  port (`sel_imm`).
- **Results.** 16-bit operations show their value zero-extended on `result`. `mult` shows all 32
  bits and writes the low half to the register. `nop` and a not-taken `cjeq` leave `result` as it
  was.
- **Jumps.** The jump code is carried in the data word and leaves the core on `result`. `jump` is a
  registered output, which creates the three delay slots.
- **Program store.** The fetch address counter, the 256-word depth, the word layout of the data
  memory and the load port are all chosen here.
- **Figure connections not used.** The source architecture also draws the source addresses going
  from decode to execute, and a return path from the register unit to decode. Neither is needed
  here, so neither is built.

Not included:
- **The instruction cache.** It is mentioned as an external part in front of the instruction memory
  but not described.
- **FPGA results.** The source reports a Cyclone II implementation at 50 MHz using about 4 % of the
  device. That result is not reproduced; no FPGA flow was run. Generic synthesis of
  `pipelined_system` gives about 100 word-level cells, 271 flip-flop bits and 7 kbit of memory.
- **Resource sharing.** The source credits resource sharing in the multiplier for a small area
  saving. This core has a single multiplier, so there is nothing to share.

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. With Verilator 5,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pc_pkg.sv tb/pipelined_system_tb.sv \
          --top-module pipelined_system_tb -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. The search path finds the modules it uses.

| testbench | what it checks |
|---|---|
| `pipelined_system_tb` | Whole system at default size. Loads a program with the four-instruction example, a counted loop (taken and not-taken `cjeq`, delay slots, a 32-bit product) and a halt. Compares fetch address, `jump` and `result` every clock against an instruction-level reference model. |
| `table4_pipeline_tb` | Stage occupancy of the four-instruction example in clocks I–VII, and the registers it writes. |
| `pipelined_controller_tb` | 3000 random hazard-free instructions on the core pins. `result`/`jump` are checked three clocks after issue, and all registers are read back. |
| `fetch_unit_tb`, `decode_unit_tb`, `reg_file_tb`, `execute_unit_tb`, `instr_mem_tb`, `data_mem_tb` | Each unit against its own reference, with random stimulus. |

The testbenches count each mechanism and fail if one never occurs: every opcode, taken and not-taken
jumps, delay-slot execution, clocks with four instructions in flight, and products wider than 16
bits.

## Changing it

- `ADDR_W` on `pipelined_system` sets the program store depth (2^ADDR_W words).
- `DATA_W` is a parameter throughout, but the instruction set assumes 16 bits: `result` is
  `PC_RES_W = 32` bits wide to hold a 16×16 product.
- New opcodes need a free code; all eight are used. Add an opcode to `opcode_e`, to `reads_regs` and
  `writes_reg` in `pc_pkg`, and to the case statement in `execute_unit`.
- To remove the hazard rule, add forwarding. Compare `e_destination`/`e_store` (and the execute-stage
  destination) with the read addresses in `reg_file`, and bypass `e_data`.
