# A five-stage MIPS pipeline with forwarding and a load interlock

This is a small in-order MIPS-subset processor. It overlaps five
instructions at a time and keeps throughput at one instruction per clock.
Pipelining runs into data hazards: an instruction needs a register that an
earlier instruction, still in flight, has not written yet. This design deals
with them in three ways:

- **Forwarding (bypassing).** A result is sent back to the instruction that
  needs it as soon as the result exists. It does not wait to pass through the
  register file.
- **A store-data bypass in the memory stage.** A store of a value that was
  just loaded gets the loaded value late, directly from data memory.
- **A one-cycle interlock.** This covers the one case that forwarding cannot
  fix: an instruction that uses a load result immediately after the load.

Branches are decided in decode and have one architectural delay slot: the
instruction after a `beq` always executes. So the pipeline never flushes
anything.

The forwarding and stall logic holds no state. Every decision is made from
what the pipeline registers hold in the current cycle.

## Stages and pipeline registers

| stage | work | register at its end |
|---|---|---|
| IF | read instruction memory at `PC` | IF/DE: `ir`, `pc4` (= PC+4), valid |
| DE | decode; read registers; forward; compare `beq` operands; check for an interlock | DE/EX: control word, `rw`, `rt`, operand latches `A`, `B`, `imm`, valid |
| EX | ALU (`A` op `B` or immediate) | EX/ME: control, `rw`, `S` (ALU result), `D` (store data), valid |
| ME | data memory read at `S`, or write `D` | ME/WB: control, `rw`, `S`, `M` (load data), valid |
| WB | write `M` (loads) or `S` into `rw` | — |

Every pipeline register has a **valid bit**. A bubble is simply a slot whose
valid bit is clear. Each write to state is gated by the valid bit of the stage
that does it: the register file in WB and data memory in ME. So a bubble
behaves exactly like a `nop`.

The data memory write happens on the clock edge at the end of ME. Its
address, data and enable come straight from EX/ME register outputs, so an
edge-triggered component only ever sees stable pipeline-register values.

## Control travels with the instruction

`main_control` decodes each instruction once, in DE, into one control word
(`ctrl_t` in `mips_pkg`). The fields are the classic ones: `ExtOp`, `ALUSrc`,
`ALUOp`, `RegDst`, `MemW`, `Branch`, `MemtoReg` and `RegWr`. The word moves
down the pipe in the pipeline registers, and each stage reads the fields it
needs:

- EX uses `ExtOp`, `ALUSrc` and `ALUOp` one cycle after decode.
- ME uses `MemW` two cycles after decode.
- WB uses `MemtoReg` and `RegWr` three cycles after decode.

The decoder also works out:

- the destination register `rw`. This is `rd` for R-type instructions and
  `rt` otherwise. It is forced to 0 when the instruction writes nothing.
- which source registers the instruction reads (`use_rs`, `use_rt`).

Forcing `rw` to 0 lets the forwarding logic compare register numbers without
checking any other control fields.

## Forwarding: where each operand comes from

The forwarding muxes sit in **decode**, in front of the operand latches `A`
and `B`. For each of `rs` and `rt`, `forward_unit` looks for the **nearest**
instruction later in the pipe that is valid and has that register as its
`rw`. It then selects that instruction's value:

| select | source | available because |
|---|---|---|
| `FWD_EX` | ALU output of the instruction now in EX (combinational) | ALU results exist by the end of EX |
| `FWD_ME` | the result of the instruction now in ME: the data-memory output for a load, `S` otherwise | load data exists by the end of ME |
| `FWD_WB` | the value being written back in WB | the register file writes only at the clock edge |
| `FWD_RF` | the register file | no pending write |

Three details matter:

- **Nearest wins.** If both EX and ME will write `r3`, the EX value is newer
  and is the one selected.
- **`r0` is never forwarded.** It always reads zero.
- **The WB path is required.** A read and a write of the same register in
  the same cycle return the *old* value from the register file. The WB path
  supplies the new value. This is the case of the fourth instruction after
  the producer.

The forwarded operands also feed the `beq` comparator in decode. So a branch
sees the same up-to-date values as any other instruction.

The cost of this arrangement is a long combinational path. It runs from the
EX ALU output through the forwarding mux into the `A`/`B` latches and
through the comparator into the PC.

## The memory-stage store bypass

Take `lw r1, 0(r2)` followed directly by `sw r1, 34(r3)`. The store needs
`r1` only as the data it writes, and only in ME. When the store is in EX,
the load is in ME and its data is on the memory output. A mux in front of
the EX/ME `D` register takes that value (`store_bypass`). So this pair runs
without a stall.

The interlock logic exempts the store's data register for this reason. A
store still stalls if the loaded register is its *address* base (`rs`).

## The load-use interlock

A load's value exists only at the end of ME. The instruction right after
the load is in decode while the load is in EX, so no forwarding path can
serve it. `hazard_unit` detects this case in decode. The condition is: a
valid load is in EX, its `rw` is not 0, and the decode instruction reads
that register. The store-data exception above applies. The unit then:

1. holds the PC and IF/DE (their enables go low). The same instruction is
   fetched and decoded again.
2. clears the valid bit entering DE/EX. A bubble goes to EX.

In the next cycle the load is in ME, and the held instruction takes the
value through `FWD_ME`. A `beq` reads both registers in decode, so it stalls
in the same way. A branch that is held does not redirect the PC until it is
issued.

A compiler can avoid the stall by scheduling an unrelated instruction into
the slot after a load. The hardware stall has the same effect as inserting
a `nop` there.

## Timing

- One instruction retires per clock. Each load-use interlock adds exactly
  one cycle.
- The first instruction retires 5 cycles after reset is released.
- A taken `beq` costs nothing extra. Its delay slot is always a real
  instruction: either useful work or a `nop` the program provides.

## Instruction set

These use the standard MIPS-I encodings:

- R-type `add`, `sub`, `and`, `or`, `xor` (funct `0x20`, `0x22`, `0x24`,
  `0x25`, `0x26`)
- `addi` (`0x08`, sign-extended immediate)
- `ori` (`0x0D`, zero-extended immediate)
- `lw` (`0x23`) and `sw` (`0x2B`): word accesses, address bits 1:0 ignored
- `beq` (`0x04`): target = address after the branch + 4 × sign-extended
  offset, with one delay slot

Any other word decodes as a `nop` that writes nothing, including `0x00000000`.

Not implemented: jumps, other branches, byte and halfword accesses,
overflow traps and exceptions.

## Modules

| file | role |
|---|---|
| `rtl/mips_pkg.sv` | types: control word, pipeline-register structs, forwarding-select enum, opcodes, instruction builders `enc_r` and `enc_i` |
| `rtl/mips_pipeline.sv` | top: the five stages, the forwarding muxes, the store-bypass mux, event outputs and assertions |
| `rtl/main_control.sv` | decode-stage control |
| `rtl/regfile.sv` | 32 × 32 registers, two read ports, one write port, one inspection port |
| `rtl/alu.sv` | immediate extension, operand select, ALU |
| `rtl/next_pc.sv` | PC register, PC+4, branch target, stall hold |
| `rtl/forward_unit.sv` | forwarding selects and the store-bypass condition |
| `rtl/hazard_unit.sv` | load-use interlock |
| `rtl/pipe_reg.sv` | pipeline register with valid bit, enable and bubble (type-parameterised) |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories (arrays, combinational read) |

### Top-level interface

`mips_pipeline` has these parameters:

| parameter | default |
|---|---|
| `IMEM_WORDS` | 256 |
| `DMEM_WORDS` | 256 |
| `RESET_PC` | 0 |

Its ports:

- `clk`, `rst_n`: clock and synchronous active-low reset.
- `imem_we`, `imem_waddr`, `imem_wdata`: load the program, one word per
  clock.
- `dmem_h_*`: a host port into data memory. If the pipeline and the host
  write the same word in one cycle, the pipeline wins.
- `reg_h_addr` / `reg_h_rdata`: read any register.
- `pc`, `retire`: the fetch address, and a flag that a valid instruction is
  in WB.
- `ev_stall`, `ev_fwd_ex`, `ev_fwd_me`, `ev_fwd_wb`, `ev_store_bypass`,
  `ev_branch_taken`: one-cycle event pulses for counting.

Reset clears the valid bits and the registers. It does not clear the
memories: load them through their ports.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```sh
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_pipeline.sv --top-module tb_mips_pipeline
./obj_dir/Vtb_mips_pipeline
```

`tb_mips_pipeline` runs the processor at its default sizes. It compares the
processor against an instruction-level reference model in the testbench,
which executes one instruction at a time with the delay-slot rule. The test
runs these programs:

- a delayed-branch walk-through (`lw`, `addi`, `sub`, `beq`, the delay-slot
  `ori`, a skipped `add`, and the `and` at the branch target)
- a forwarding chain (`add` followed by `sub`, `and`, `or` and `xor` that
  all read its result)
- a load-use chain
- a load followed by a store of the loaded value, and by a branch on a
  loaded value
- 40 random programs over `r0`–`r7` with loads, stores and forward
  branches. A load is often followed by a store of the register it loaded.

After each program the test checks:

- all registers and all data-memory words;
- the cycle in which every instruction retires (one per cycle, plus one
  cycle per interlock the model predicts);
- the total number of interlock cycles.

It also fails if any mechanism never occurred during the run: the
interlock, each of the three forwarding paths, the store bypass or a taken
branch. The test runs in well under a second.

## Design choices not fixed by the architecture

These come from this implementation rather than from the pipeline
organisation itself:

- the instruction encodings, the `ALUOp` encoding and the decode of unknown
  instructions as `nop`
- the memory sizes (256 words each), the host ports and the reset style
- a register file that does not write before it reads. The write-back
  forwarding path covers that case instead.
- the `use_rs` / `use_rt` decode outputs, and the rule that a stalled branch
  does not redirect
- stalling by refetch. The PC and the instruction register are held and the
  instruction is fetched again. The design keeps no saved copy of the
  fetched instruction.

An older textbook form of this pipeline carries the `Branch` control signal
to the memory stage and resolves branches there. This design resolves them
in decode instead, which gives a single delay slot.
