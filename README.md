# Microprogrammed control unit

A small CPU control unit in which every machine instruction is carried out by
a *micro-routine*: a short sequence of control words stored in a ROM. It has
no hard-wired state machine per instruction. A micro-program counter (uPC)
steps through the ROM, and each word it reads drives the datapath's control
lines for one clock. A 2-bit sequencing field in the same word says where the
uPC goes next. Adding or changing an instruction means editing ROM contents
and one mapping entry, not redesigning logic.

The unit drives a single-bus datapath with ten control lines (PC, MAR, RAM,
IR, accumulator, ALU operand register and ALU). It knows two instructions,
`LOAD_ACC` and `JUMP_IF_ZERO`; any other opcode runs as a NOP.

## The micro-instruction

Each micro-instruction is 12 bits wide. `mcu_pkg::uinstr_t` and `ctrl_t`
give its fields names:

| bits | field |
|------|-------|
| 11:10 | sequencing: `00` NEXT, `01` DECODE, `10` FETCH, `11` HLT |
| 9 | PC_OUT: PC drives the bus |
| 8 | PC_INC: PC + 1 |
| 7 | MAR_IN: MAR loads |
| 6 | RAM_OUT: RAM[MAR] drives the bus |
| 5 | RAM_IN: RAM[MAR] is written |
| 4 | IR_IN: IR loads |
| 3 | ACC_IN: accumulator loads |
| 2 | ACC_OUT: accumulator drives the bus |
| 1 | TEMP_IN: ALU operand register loads |
| 0 | ALU_OUT: ALU result drives the bus |

The sequencing codes mean:

- **NEXT:** uPC + 1. It wraps from 255 to 0.
- **DECODE:** jump to the routine that the opcode mapping selects.
- **FETCH:** jump back to uAddr 0 to fetch the next instruction.
- **HLT:** stay on the current word.

## The micro-program

The control store holds 256 words. Six of them are programmed. All the
others are zero, which means no control line and NEXT.

| uAddr | control lines | seq | role |
|------:|---------------|-----|------|
| 0  | PC_OUT, MAR_IN | NEXT | fetch 1: PC to MAR |
| 1  | RAM_OUT, IR_IN | DECODE | fetch 2: instruction to IR, then decode |
| 16 | PC_INC | FETCH | NOP routine |
| 20 | MAR_IN | NEXT | LOAD_ACC 1: operand address to MAR |
| 21 | PC_INC, RAM_OUT, ACC_IN | FETCH | LOAD_ACC 2: RAM to ACC, PC + 1 |
| 30 | none | FETCH | JUMP routine |

An instruction byte is `{opcode[3:0], address[3:0]}`. The instructions take
these paths through the store:

| instruction | uAddr path | cycles |
|-------------|-----------|-------:|
| `LOAD_ACC` (0001) | 0, 1, 20, 21 | 4 |
| `JUMP_IF_ZERO` (1010), Z = 1 | 0, 1, 30 | 3 |
| `JUMP_IF_ZERO` (1010), Z = 0 | 0, 1, 16 | 3 |
| any other opcode | 0, 1, 16 | 3 |

## Decode and the conditional branch

The decode step is the one part of this design that is not obvious.

**Conditional branching happens at decode time.** No micro-instruction tests
a flag. Instead the opcode mapping (`opcode_map`) reads the zero flag
together with the opcode and picks one of two routines for `JUMP_IF_ZERO`. It
picks the JUMP routine when Z = 1 and the NOP routine when Z = 0. The NOP
routine only increments the PC, which steps over the jump.

**The opcode is decoded in the cycle that loads it.** uAddr 1 asserts IR_IN
and also carries DECODE. The next uPC is therefore chosen from `opcode_in` at
the same clock edge that loads the IR. If the IR is a plain register, its
output still holds the previous instruction at that edge. The datapath must
present the opcode of the incoming instruction instead. The simplest way is
to feed the bus opcode to `opcode_in` while IR_IN is high, and the IR's own
opcode at other times. `z_flag` is sampled at the same edge.

**The JUMP routine asserts no control line.** None of the ten lines loads the
PC from the IR address. The PC load has to come from logic in the datapath,
and `upc` is brought out as a port so that the datapath can see when the
JUMP routine (uAddr 30) is running. In the same way, MAR_IN with no bus
driver at uAddr 20 means "load MAR from the IR's address field". That path
also belongs to the datapath.

## Modules

| file | what it is |
|------|-----------|
| `rtl/mcu_pkg.sv` | Field layout, sequencing enum, opcodes, routine addresses and control words. |
| `rtl/control_store.sv` | The ROM (`DEPTH` = 256). Its contents are built at elaboration by a function, and it is read combinationally. |
| `rtl/opcode_map.sv` | Combinational map from opcode and zero flag to routine start. |
| `rtl/micro_sequencer.sv` | The uPC register and the mux that chooses the next address. |
| `rtl/micro_cu.sv` | Top level: wires the three blocks together and brings out the ten control lines and `upc`. |

Top-level ports of `micro_cu`:

- **Inputs:** `clk`, `rst`, `opcode_in[3:0]`, `z_flag`.
- **Outputs:** `pc_out`, `pc_inc`, `mar_in`, `ram_out`, `ram_in`, `ir_in`,
  `acc_in`, `acc_out`, `temp_in`, `alu_out`, and `upc[7:0]`.

Timing:

- `rst` is synchronous and active high. It puts the uPC at 0, the start of
  fetch.
- One micro-instruction runs per clock. The control outputs are
  combinational from the uPC and valid for the whole cycle.
- An assertion in `micro_cu` checks that no word drives the bus from two
  sources at once.

## What is not here

The datapath is not part of the RTL, because its design is not specified:
register widths, bus, ALU operation, jump path. `tb/datapath_model.sv` is
only a behavioural model, used by the end-to-end testbench. It has a 16-byte
RAM, a 4-bit PC and MAR, an 8-bit IR and accumulator, and Z = (ACC == 0).
TEMP_IN, ALU_OUT, ACC_OUT and RAM_IN exist as outputs, but no routine in the
store uses them yet.

Other limits:

- There is no compare instruction, so the zero flag has to come from the
  datapath.
- HLT is implemented in the sequencer, but no word of the store uses it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- **`tb_opcode_map`:** all 16 opcodes, each with Z = 0 and Z = 1.
- **`tb_control_store`:** all 256 words against a table of literals.
- **`tb_micro_sequencer`:** 2000 random sequencing commands and random resets
  against a reference model. Covers all four commands, including HLT and the
  wrap at 255.
- **`tb_micro_cu`:** the whole unit with the datapath model, running a
  ten-instruction program:
  - loads;
  - a taken jump and a not-taken jump;
  - an unknown opcode;
  - a final jump-to-self loop;
  - a reset in the middle of a routine, then a rerun.

  It runs with the top at its default parameters. An instruction-level
  reference model predicts every instruction's micro-address path, so the
  cycle count of each instruction is checked. The model also predicts the PC
  and accumulator afterwards. The control lines are compared every cycle,
  and the testbench counts how often each mechanism occurred.

Simulate with Verilator, for example:

    verilator --binary --timing --assert --top-module tb_micro_cu \
        rtl/mcu_pkg.sv rtl/opcode_map.sv rtl/control_store.sv \
        rtl/micro_sequencer.sv rtl/micro_cu.sv tb/datapath_model.sv tb/tb_micro_cu.sv
    ./obj_dir/Vtb_micro_cu

## Adding an instruction

1. Choose a free uAddr range and write the routine's words in
   `control_store::init_rom()`. Use `ucode(ctrl, seq)`, and end the routine
   with `SEQ_FETCH`.
2. Add the opcode and the routine start to `mcu_pkg`, and add a case to
   `opcode_map`.
3. For a new flag-dependent branch, add the flag as an input of `opcode_map`
   and select between two routines there, as `JUMP_IF_ZERO` does.
