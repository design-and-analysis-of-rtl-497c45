# A 64-bit MIPS machine built from two five-stage pipelines

This is synthesizable SystemVerilog for a small MIPS-style RISC processor.
Each 32-bit slice is a classic five-stage pipeline: fetch, decode, execute,
memory and write-back. A hazard detection unit and a forwarding unit let it
retire one instruction per clock in the common case. The 64-bit machine,
`mips64`, places two such slices side by side. Every 64-bit port is the two
slices' 32-bit ports concatenated. Each slice runs its own program from its
own instruction ROM, so the machine can complete two instructions per cycle.

The design follows a published description of a "64-bit MIPS processor".
That description names the blocks, the five stages, the pipeline registers,
a branch unit in the decode stage, hazard detection and forwarding. Its
synthesised schematic shows the top as two 32-bit `mipsprocessor` instances,
`m1` and `m2`. Much detail is left open there: instruction encodings,
memory sizes, hazard rules and the meaning of the top-level pins. Those
choices are made here, and the section "Where this RTL departs from or adds
to the source" lists them.

## Top level: `mips64`

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk`           | in  | 1     | clock; all state changes on the rising edge |
| `start`         | in  | 1     | high: load each PC from `pc_in_address`, clear pipelines, register files and hi/lo. Low: run |
| `pc_in_address` | in  | 64    | start word address: `[31:0]` for m1, `[63:32]` for m2 |
| `pc_out`        | out | 64    | current PCs `{m2, m1}` |
| `instr_out`     | out | 64    | instructions now in decode `{m2, m1}` |
| `data_out`      | out | 64    | values on the write-back buses `{m2, m1}` |
| `cntrl_signals` | out | 4     | 2-bit ALU class of each decode instruction: `[3:2]` m2, `[1:0]` m1 |

That is 66 input pins and 196 output pins, 262 in all. The slices share
nothing but `clk` and `start`. Each has 32 registers, hi/lo, a 256-word
instruction ROM and a 256-word data RAM.

Parameters: `IMEM_DEPTH` (256), `DMEM_DEPTH` (256), and `IMEM_FILE_M1` and
`IMEM_FILE_M2`, the ROM images (`rtl/imem_m1.hex`, `rtl/imem_m2.hex`). Paths
are relative to the directory the simulator is started from.

## The slice: `mipsprocessor`

```
      IF              ID                     EX                 MEM           WB
 +----+  +-----+   +---------+   +------+   +-----+  +-------+  +------+  +------+
 | PC |->| ROM |-->|  IF/ID  |-->|decode|-->|ID/EX|->|  ALU  |->|EX/MEM|->| RAM  |->MEM/WB-> reg file
 +----+  +-----+   +---------+   |regs  |   +-----+  | hi/lo |  +------+  +------+
   ^ PC+1 / target               |branch|     ^ ^   +-------+     |  |               |
   +------------- redirect ------+------+     | +--- forward -----+  +---------------+
```

* **IF**: the PC (a *word* address) reads the ROM combinationally. PC+1 and
  the instruction go into IF/ID.
* **ID**: `control_unit` decodes the opcode and function field into a
  control word (`mips_pkg::ctrl_t`). `register_file` is read and
  `sign_extend` widens the immediate. `branch_unit` resolves `beq`, `bne`,
  `j`, `jal` and `jr`, and the destination register is chosen
  (rd, rt or $31).
* **EX**: `alu_control` turns the 2-bit ALU class into an ALU operation.
  `alu` computes, and `mult` writes the signed 64-bit product into
  `hilo_register`. The result of `jal` is its PC+1; the result of `mfhi`
  and `mflo` is hi or lo.
* **MEM**: `data_memory` is read combinationally and written on the clock
  edge, one 32-bit word per address.
* **WB**: the ALU result or the loaded word is written to the register file.

Each pipeline register is a `pipeline_register` that carries one of the
`mips_pkg` stage structs (`if_id_t`, `id_ex_t`, `ex_mem_t`, `mem_wb_t`). An
all-zero value is a bubble: every write enable is off.

### Hazards, forwarding and branch timing

This is the part that takes most care. Branches resolve in ID, one stage
earlier than in the textbook five-stage pipeline. A branch therefore costs
only one cycle, but it needs its operands one stage sooner.

Forwarding (`forwarding_unit`):

* The EX operands take, in order of preference, the EX/MEM result (the
  instruction one ahead), then the MEM/WB write-back value (two ahead), then
  the value read in ID. Store data goes through the same path.
* The ID branch and `jr` operands take the EX/MEM result when that
  instruction is not a load.
* A value three instructions ahead reaches ID through the register file's
  write-before-read: a read of the register being written returns the new
  value.
* Register $0 is never forwarded.

Stalls (`hazard_detection_unit`) hold PC and IF/ID and send a bubble into EX:

| situation | stall cycles |
|-----------|--------------|
| load in EX, and the next instruction reads its destination (load-use) | 1 |
| branch or `jr` in ID reads the destination of the instruction in EX | 1, then forwarded from EX/MEM |
| branch or `jr` in ID reads a register loaded by the instruction in MEM | 1 more, then read through the register file |

Redirects: a taken branch, `j`, `jal` or `jr` loads the target into the PC
and clears IF/ID. The one instruction fetched behind it is squashed, and
there is no delay slot. A branch may redirect only in a cycle it is not
stalled. An assertion in `mipsprocessor` checks that a stall and a redirect
never happen together.

Latency: after `start` falls, the first instruction is fetched on the first
clock edge and written back on the fifth. With no hazards, one instruction
completes per cycle per slice. `mult` writes hi/lo at the end of its EX
cycle, so an `mfhi`/`mflo` right behind it needs no stall.

### Instruction set

Standard MIPS encodings (R, I and J formats), for this subset:

* R type: `add addu sub subu and or xor nor slt sll srl jr mult mfhi mflo`
* I type: `addi addiu slti andi ori xori lui lw sw beq bne`
* J type: `j jal`

Unknown opcodes and function codes act as no-ops. Arithmetic does not
trap on overflow. Addresses count 32-bit words, both for the PC and for
loads and stores:

* branch target = PC+1 + sign-extended offset;
* jump target = {PC+1[31:26], index};
* load/store address = rs + sign-extended offset.

Each memory uses only the low log2(depth) bits of its address.

`cntrl_signals` shows the 2-bit ALU class that `control_unit` gives the
decode instruction:

| class | instructions |
|-------|--------------|
| 00 | `lw`, `sw`, `addi`, `addiu`, `j`, `jal` |
| 01 | `beq`, `bne` |
| 10 | all R-type instructions |
| 11 | `slti`, `andi`, `ori`, `xori`, `lui` |

## Default programs

The two ROM images are test programs written for this RTL. Each line of the
`.hex` files carries its assembly as a comment. Both programs end with a
jump to itself.

* `imem_m1.hex` does arithmetic with back-to-back dependences and stores
  and loads. It contains a load-use pair, `mult`/`mflo`/`mfhi`, and a
  counted loop closed by `bne` on the register just decremented. It then
  calls a subroutine with `jal`/`jr`, which uses `sll`, `srl`, `lui` and
  `ori`. A `beq` right behind a load skips one instruction, and the program
  ends with `xori`, `nor`, `slti` and `andi`.
* `imem_m2.hex` stores ten Fibonacci numbers to memory, reads two of them
  back, and multiplies signed values into hi/lo. It ends with a computed
  `jr` over an instruction.

A new program is a text file with one 8-digit hex word per line, given to
the `IMEM_FILE_*` parameters. Words past the end of the program read as 0
(`sll $0,$0,0`, a no-op).

## Files

| file | contents |
|------|----------|
| `rtl/mips_pkg.sv` | widths, opcode/function enums, ALU classes, control word and stage structs |
| `rtl/mips64.sv` | 64-bit top, two slices |
| `rtl/mipsprocessor.sv` | one pipelined slice |
| `rtl/program_counter.sv`, `instr_memory.sv` | fetch |
| `rtl/control_unit.sv`, `register_file.sv`, `sign_extend.sv`, `branch_unit.sv` | decode |
| `rtl/hazard_detection_unit.sv`, `forwarding_unit.sv` | hazard handling |
| `rtl/alu_control.sv`, `alu.sv`, `hilo_register.sv` | execute |
| `rtl/data_memory.sv` | memory stage |
| `rtl/pipeline_register.sv`, `mux.sv` | stage registers, multiplexers |
| `rtl/imem_m1.hex`, `imem_m2.hex` | default ROM images |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/mips_iss_pkg.sv` | instruction-level reference model (no pipeline) |
| `tb/slice_monitor.sv` | compares a slice with the reference model and counts pipeline events |

## Simulating

Run from the directory that holds `rtl/` and `tb/`, with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mips64 \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mips_pkg.sv tb/mips_iss_pkg.sv tb/tb_mips64.sv
./obj_dir/Vtb_mips64
```

Replace `tb_mips64` with any other testbench; only the slice testbenches
need `tb/mips_iss_pkg.sv`. Each testbench ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

How the design is verified:

* `tb_mips64` runs both slices at the default sizes. For each slice it
  compares every register write, in order, with the reference model. It
  also compares the final registers, the whole data RAM and the halt PC.
  On every cycle it checks that the 64-bit buses are `{m2, m1}` and that
  `cntrl_signals` is the ALU class of `instr_out`. It checks that the
  first write-back comes on the fifth edge and the next three on the
  following edges. It also checks that both slices complete an
  instruction in the same cycle at least once. It fails if any of these
  events never happens in a slice: load-use stall, branch-operand stall,
  EX/MEM and MEM/WB forwarding, forwarding to an ID branch, branch taken
  and not taken, jump, `jr`, `mult`, hi/lo read, load, store.
* `tb_mipsprocessor` does the same for one slice. It also restarts the
  slice with `start` in the middle of a run.
* The unit testbenches compare each block with a model written in the
  testbench, using directed and random stimulus.

## Where this RTL departs from or adds to the source

* **64 bits as two 32-bit slices.** This follows the source's synthesised
  schematic, not a 64-bit data path. The slices never exchange data. Which
  slice drives the upper half follows the source's timing report, where
  `cntrl_signals[3]` comes from `m2`.
* **Branch resolution in ID.** This follows the source's text and its
  decode-stage diagram. Its generic pipeline figure draws the branch
  decision in EX and the next-PC choice in MEM.
* **Floating-point ALU: not built.** The source labels the execute-stage
  ALU "floating point" but gives no format, operations or instructions.
  EX holds an integer ALU, which is what the source's text describes.
* **I/O instructions, I/O devices and coprocessors: not built.** The
  source names them but gives no encoding, ports or behaviour.
* **No cache.** Instruction fetch reads a ROM directly. The source
  mentions fetching "from the cache" but draws and describes a ROM.
* **Choices made here, not in the source:**
  * the instruction subset and its standard MIPS encodings;
  * the 2-bit ALU class encoding;
  * 256-word memories, word addressing and zero-initialised data RAM;
  * the stall and forwarding rules and the absence of a delay slot;
  * the `start` behaviour and the meaning of `instr_out`, `data_out` and
    `cntrl_signals`;
  * the hi/lo multiplier (the source shows hi and lo registers but not
    what writes them);
  * the default programs.
* **Clocking.** All state here is on the rising edge and the ROM is read
  combinationally. The source's timing report mentions a latch clocked on
  the falling edge inside its instruction memory.
