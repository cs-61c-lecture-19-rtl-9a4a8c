# A five-stage pipelined MIPS core with forwarding and a load interlock

This is a small MIPS integer pipeline. It is organised as the classic five stages:
fetch (IF), decode (DE), execute (EX), memory (ME) and write-back (WB).
In steady state it completes one instruction per clock.

The interesting part is not the datapath but the control around it. That control has three jobs:

- **Data-stationary control.** Each instruction is decoded once, in DE. Its control bits then
  travel down the pipeline registers next to its data.
- **Forwarding.** A result that exists somewhere in the pipeline, but is not yet in the register
  file, is routed back to the instruction that needs it.
- **A load interlock.** A load's result is not available early enough for the next instruction.
  That case stalls for exactly one cycle.

Branches are resolved in decode. The ISA has one architectural delay slot, so the instruction after a
branch always executes. No branch prediction or flushing is needed.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). Memories are arrays with combinational
read. The design lints cleanly with Verilator 5 and elaborates in yosys/slang.

## The pipeline at a glance

```
        IF              DE                       EX           ME                 WB
  PC -> inst_mem -> [IF/DE] -> main_control  -> [DE/EX] -> alu -> [EX/ME] -> data_mem -> [ME/WB] -> mux -> reg_file
  ^                  IR, PC+4   reg_file read     ctrl, A,      ctrl, S,      (lw/sw)      ctrl, S, M,
  |                             forward muxes     B, imm,       D, rw, rt                  rw
  |                             beq compare "="   rw, rt
  +---- next_pc <---------------- branch target / stall
```

The pipeline registers use these names:

| register | field | contents |
|---|---|---|
| IF/DE | IR | fetched instruction |
| IF/DE | PC+4 | for the branch target |
| DE/EX | A | operand from rs, after forwarding |
| DE/EX | B | operand from rt, after forwarding |
| DE/EX | imm | extended immediate |
| DE/EX | rw | destination register, 0 if none |
| DE/EX | rt | kept for the store-data bypass |
| EX/ME | S | ALU result; for lw/sw, the address |
| EX/ME | D | store data (B passed through) |
| ME/WB | S | ALU result passed through |
| ME/WB | M | data loaded by lw |

Every pipeline register also holds a **valid** bit. An invalid entry is a nop (a "bubble"). It writes
nothing and forwards nothing.

All four pipeline registers are instances of one module, `pipe_reg`. A type parameter gives the
payload struct. The register has two controls:

- `en` is a clock enable. Turning it off stalls the stage.
- `bubble` loads a nop.

### Data-stationary control

`main_control` turns IR into a `ctrl_t` bundle during DE. The bundle holds ExtOp, ALUSrc, ALUOp,
RegDst, MemWr, Branch, MemtoReg and RegWr, plus two bits explained below. Each stage uses only the
fields it needs:

- EX uses ALUSrc and ALUOp, one cycle after decode.
- ME uses MemWr, two cycles after decode.
- WB uses MemtoReg and RegWr, three cycles after decode.

The EX/ME and ME/WB structs carry only the fields still needed downstream.

Two choices that depend only on the instruction word are made in DE rather than in EX:

- **The destination register.** RegDst picks rd for R-type and rt for I-type, and the result is
  zero when nothing is written.
- **The immediate extension.** ExtOp sign-extends for addi, addiu, lw, sw and beq, and zero-extends
  for andi, ori and xori.

Resolving the destination early means every later stage carries a ready-made `rw`. That is exactly
what the hazard comparators need.

`rs_used` and `rt_used` say which source registers the instruction really reads as ALU or compare
operands. With them, an addi is not stalled on its unused rt field, and a store is not stalled on
its data register.

## Hazards

### Forwarding into the operand latches

The forwarding is done in **decode**, into the A/B latches, and not at the ALU inputs. In DE,
`forward_unit` compares rs and rt with the pending writes of the instructions ahead. The nearest one
wins:

| instruction ahead | writes r | DE's operand r comes from |
|---|---|---|
| in EX | yes | the ALU output this cycle (`FWD_EX`) |
| in ME | yes, and EX does not | the ME result (`FWD_MEM`): EX/ME.S, or for a load the data-memory output |
| in WB | yes, and neither EX nor ME | the register file, whose read passes a same-cycle write straight through |
| none | — | the register file |

A pending write only counts if three things hold:

- its stage is valid,
- it writes a register (RegWr), and
- the register is not `$0`.

The value picked is latched into A or B. It is also what the beq comparator sees, so a branch
benefits from forwarding in the same way as an ALU instruction.

The cost is a longer combinational path. The EX path runs from the DE/EX registers, through the
ALU and the forward mux, into the beq compare, the next-PC mux and the PC. The ME path runs from
EX/ME.S, through the data-memory read, into the same mux. The design keeps these paths for
simplicity and does not retime them.

Example: `add $t0,..; sub ..,$t0,..; and ..,$t0,..; or ..,$t0,..; xor ..,$t0,..`. Here `sub` takes
$t0 from EX, `and` takes it from ME, `or` from the register file's write-through, and `xor` from
the register file. None of them stalls.

### The load-use interlock

A load's data appears only at the end of ME. Suppose the instruction right after a load reads the
loaded register as an ALU or compare operand. When the dependent instruction is in DE, the load is
in EX and has no value yet. `hazard_unit` detects this in decode and raises `stall` for one cycle:

- **PC holds.** Fetch re-reads the same address, so no extra instruction buffer is needed.
- **IF/DE holds.** DE decodes the same instruction again.
- **DE/EX loads a bubble.** A nop goes into EX.

In the next cycle the load is in ME. The dependent instruction, still in DE, now takes the data from
the data-memory output through `FWD_MEM`. A stall therefore always lasts exactly one cycle, and an
assertion in `mips_pipeline` checks this.

```
cycle          1    2    3    4    5    6    7
lw  $t0,0($t1) IF   DE   EX   ME   WB
sub $t3,$t0,.       IF   DE   DE   EX   ME   WB      <- DE repeated, data forwarded from ME
and $t5,$t0,.            IF   IF   DE   EX   ME      <- fetched twice
                               ^ stall=1, bubble enters EX in cycle 4
```

The hazard logic, like the forwarding logic, keeps no state. A compiler can avoid the stall by
putting an unrelated instruction in the load delay slot. The result is the same as with the
interlock.

### The store-data bypass in ME

Consider `lw r1,..` followed by `sw r1,..`. This would need the same stall, but only the store's
*data* depends on the load, and the data is not needed until ME. The interlock therefore ignores a
store's rt. Instead, when the store reaches ME, `forward_unit` compares EX/ME.rt with the
destination in WB. On a match (`store_bypass`), the store writes the WB value in place of EX/ME.D.

The instruction in WB is always the one immediately ahead of the store, so the rule gives the
correct value in every case, not only after loads. A store whose *base* register comes from the
load still stalls.

### Branches and the delay slot

beq compares the two forwarded operands in DE. When it is taken, `next_pc` loads
`PC+4 of the beq + 4*sign_extend(imm)` on that edge. At that moment the fetch stage already holds
the next instruction, the delay slot, and it always executes.

```
cycle          1    2    3    4
beq r6,r7,L    IF   DE   EX   ME
ori r8,r9,17        IF   DE   EX      <- delay slot, always executed
L: andi ...              IF   DE      <- target fetched right after the slot
```

If beq itself depends on a load in EX, it stalls for one cycle like any other user of the load
result. The branch decision is suppressed while `stall` is high.

## Instruction set

The core implements these instructions, with standard MIPS encodings:

- **R-type:** add, addu, sub, subu, and, or, xor, nor, slt, sltu.
- **I-type:** addi, addiu, andi, ori, xori.
- **Memory and branch:** lw, sw, beq.

Every other encoding, including the all-zero word, executes as a nop. The core has no arithmetic
overflow traps (add behaves as addu), no jumps, no shifts and no exceptions. Data accesses are
32-bit words. Address bits [1:0] are ignored, and addresses wrap modulo the memory size.

## Interface of `mips_pipeline`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | rising-edge clock |
| rst | in | 1 | synchronous, active high: PC <- RESET_PC, all valid bits and registers cleared |
| imem_we, imem_waddr, imem_wdata | in | 1, 32, 32 | program load: one instruction word per clock, byte address |
| wb_we, wb_rw, wb_wdata | out | 1, 5, 32 | a register write takes effect at this clock edge |
| dm_we, dm_addr, dm_wdata | out | 1, 32, 32 | a store takes effect at this edge (dm_addr is also the load address) |
| stall | out | 1 | load-use interlock in this cycle |

| parameter | default | meaning |
|---|---|---|
| IMEM_WORDS | 1024 | instruction memory size, in 32-bit words |
| DMEM_WORDS | 1024 | data memory size, in 32-bit words |
| RESET_PC | 0 | first fetch address |

Timing is as follows:

- The first instruction is fetched in the first cycle after reset is released.
- Its register write appears on `wb_*` in cycle 5.
- Without load-use stalls, N instructions write back over N consecutive cycles.

The data memory's contents are not initialised: a program has to store before it loads.

Both memories read combinationally from a register (the PC, and EX/ME.S), and write on the clock
edge. The register in front of each memory is therefore the pipeline register itself. For a
technology whose RAMs have registered reads, move that register into the RAM: feed the
instruction RAM with next-PC, and the data RAM with the EX result. Do not add a second register,
which would clock those signals twice.

## Files

| file | block |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, `ctrl_t`, `alu_op_e`, `fwd_sel_e`, pipeline-register structs |
| `rtl/mips_pipeline.sv` | top level: the five stages wired together |
| `rtl/pipe_reg.sv` | pipeline register with valid bit, clock enable and bubble |
| `rtl/next_pc.sv` | PC register: +4, branch target, hold on stall |
| `rtl/inst_mem.sv` | instruction memory with a program-load port |
| `rtl/main_control.sv` | decoder producing the control bundle, rw and the immediate |
| `rtl/reg_file.sv` | 32 x 32 registers, $0 = 0, write-through |
| `rtl/alu.sv` | ALU |
| `rtl/data_mem.sv` | data memory |
| `rtl/forward_unit.sv` | operand forwarding selects and store-data bypass |
| `rtl/hazard_unit.sv` | load-use stall detection |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Each testbench is a top of its own. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mips_pkg.sv tb/tb_mips_pipeline.sv \
          --top-module tb_mips_pipeline -o sim
./obj_dir/sim
```

Substitute any `tb/tb_<block>.sv` to run another testbench. Each one prints
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog that counts a failure if the
simulation hangs.

### How the design is verified

`tb_mips_pipeline` runs the full core at its default parameters. It contains an instruction-level
reference model: sequential execution with one delay slot, written without reference to the RTL.
It compares the core's stream of register writes and stores with the model's, entry by entry. It
runs these programs:

- **Independent ori instructions.** The first write-back must appear in cycle 5, one instruction
  must retire per cycle, and there must be no stalls.
- **The classic five-stage walk-through program:** lw, addi, sub, beq (taken), ori in the delay
  slot, skipped instructions, then andi at the target. The skipped instructions must write
  nothing, and the taken branch must cost no cycle beyond its delay slot.
- **The add/sub/and/or/xor forwarding chain.** It must run with no stall.
- **The lw/sub/and/or load-use chain.** It must cost exactly one stall cycle.
- **lw followed by sw of the loaded register.** It must run with no stall.
- **60 random programs.** Each has 40 to 80 instructions over registers $0 to $7, with frequent
  loads, stores and forward branches.

The testbench also counts how often each mechanism happened, and fails if any never did. The
mechanisms are:

- forwarding from EX,
- forwarding of an ALU result from ME,
- forwarding of load data from ME,
- register-file write-through,
- a load-use stall,
- a branch stalled on a load,
- the store-data bypass,
- a taken branch and an untaken branch.

The block testbenches check each unit against its own reference. Every one of them was also run
against a deliberately broken copy of its block, and each caught the fault.

## Where this design makes its own choices

The pipeline structure, the register names, the data-stationary control, the forwarding rule
("nearest valid pending write, except $0"), the decode-time stall (bubble into EX, hold PC and
IF/DE), the store-data bypass in ME, the register-file write-through and the single branch delay
slot are all the classic textbook organisation.

The following are choices of this implementation:

- Memory sizes (1024 words each), word-only data accesses, and wrap-around addressing.
- The instruction subset and its decoding. ALUOp is a full ALU operation chosen by the main decoder,
  with no second-level ALU control.
- Applying RegDst and ExtOp in decode rather than in EX.
- The `rs_used` and `rt_used` bits.
- Branch resolution in DE. Some descriptions of this pipeline carry the Branch control bit to the
  memory stage instead. That would make the delay longer than one slot, and this design does not
  do it.
- Synchronous reset that also clears the register file.
- The program-load port and the observation outputs.

Some things are deliberately left out:

- Holding a stalled fetch in a separate "stall_temp" register. Refetching by holding the PC is used
  instead.
- Multi-cycle stalls, such as cache misses.
- The simpler scheme that stalls on every pending write instead of forwarding.
