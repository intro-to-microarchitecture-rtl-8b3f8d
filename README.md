# A five-stage pipelined processor for an Alpha subset

This RTL implements a small subset of the DEC Alpha 64-bit instruction set in two ways:

- as a classic five-stage pipeline (IF, ID, EX, MEM, WB). This is the main design.
- as a single-cycle processor, which executes one whole instruction per clock.

The pipeline aims for close to one instruction per cycle at a much shorter cycle time. The hard part is keeping it correct when instructions overlap. Later instructions need results that earlier ones have not written yet (data hazards). Instructions are fetched before an earlier branch has decided where execution continues (control hazards). Most of this README covers how the pipeline handles those two problems.

Both cores are written in synthesizable SystemVerilog (IEEE 1800-2017). They share the decoder, the ALU, the register array and the memory models.

## Instruction subset

| Class | Instructions | Operation |
|---|---|---|
| operate, register | `addq subq bis xor cmplt` | `rc <- ra op rb` |
| operate, literal | same | `rc <- ra op lit8` (lit8 is zero-extended) |
| conditional move | `cmoveq` | `if (ra == 0) rc <- rb` |
| multiply | `mulq` | `rc <- ra * rb` (low 64 bits) |
| memory | `ldq`, `stq` | `ra <- Mem[rb + sext(ofs16)]`, `Mem[rb + sext(ofs16)] <- ra` |
| conditional branch | `beq`, `bne` | `if cond(ra) PC <- PC + 4 + 4*sext(disp21)` |
| branch / subroutine | `br`, `bsr` | `ra <- PC + 4; PC <- PC + 4 + 4*disp21` |
| jump | `jmp jsr ret` | `ra <- PC + 4; PC <- rb` (the hint field is ignored) |
| halt | `call_pal 0` (word `0x00000000`) | stops the core |

The encodings are listed in `rtl/alpha_pkg.sv`. They use the Alpha opcode and function values for this subset, with one exception: `cmplt` is decoded as opcode 0x11 with function 0x4D. (On a real Alpha it is opcode 0x10.) `mulq` uses the Alpha encoding, opcode 0x13 with function 0x20. Register 31 always reads as zero, and writes to it are discarded. A word outside the subset executes as a no-op.

## The pipeline (`alpha_pipeline`)

```
        IF/ID        ID/EX         EX/MEM         MEM/WB
  IF ---||--- ID ---||--- EX ---||--- MEM ---||--- WB
  PC    ||  decode  ||  fwd mux ||  data mem  ||  write
  +4    ||  regfile ||  ALU     ||  branch    ||  regfile
  IMem  ||          ||  zero    ||  redirect  ||
        ||          ||  mul     ||            ||
```

There are four pipe registers (`alpha_pipe_reg`), each with a "current state" and a "next state". The stage logic reads the current state and computes the next state. At each clock edge, the stall control unit (`alpha_hazard_unit`) picks one of three operations for each pipe register:

- **Transfer**: copy the next state into the current state (normal flow).
- **Stall**: keep the current state.
- **Bubble**: load all zeros. Each payload struct has a `valid` bit, so an all-zero payload is a no-op in every stage.

The register array is written by the instruction in WB. A read in the same cycle returns the new value (write-through), so write-back is effectively merged into ID.

### Data hazards: forwarding

The EX stage has a forwarding multiplexer on each operand (`alpha_forward_unit`). It chooses the newest producer of the register:

| Path | Source | Covers |
|---|---|---|
| EX-EX | the EX/MEM result (instruction now in MEM) | an ALU result used by the next instruction |
| MEM-EX | the MEM/WB result (instruction now in WB) | an ALU result or load data used two instructions later |
| MEM-MEM | load data in MEM/WB replaces store data in MEM | `ldq $1,..; stq $1,..` with no stall |

Branch conditions (the zero test on `ra`) and jump targets (`rb`) go through the same multiplexers.

One case cannot be covered by forwarding alone: a load followed directly by an instruction that needs the loaded value in EX. That includes ALU operands, address bases, branch conditions and jump targets. The stall control unit holds the dependent instruction in ID for one cycle and sends a bubble into EX. On the next cycle, MEM-EX forwarding supplies the data. When a load only feeds the data of a following store, no stall is needed, because MEM-MEM forwarding covers it.

### Control hazards: fetch and cancel

The fetch stage does not wait for branches. It keeps fetching PC+4, which is a static "not taken" prediction. A conditional branch computes its target with the ALU and its condition with the zero test in EX. It acts when it reaches MEM:

- **Not taken**: the instructions behind it continue, at no cost.
- **Taken** (including `br` and `bsr`): the three younger instructions in IF, ID and EX become bubbles, and the PC loads the target. These instructions have not written any register or memory yet, so cancelling them is safe. A taken branch costs 3 cycles.

Jumps handle this differently. While a jump is in ID or EX, fetch stops and bubbles enter ID. When the jump reaches MEM, the fetch in that same cycle uses the jump target directly. A jump therefore costs 2 cycles, and no wrong-path instruction enters the pipe. A halt stops fetch the same way, so nothing after it starts executing.

### Multi-cycle multiply

`mulq` runs in an iterative multiplier (`alpha_multiplier`) inside EX. It handles 64/`MUL_LATENCY` bits of the multiplier per cycle. The default is 8 cycles, the low end of the 8-16 cycle integer multiply time of the Alpha 21264. While the multiplier is busy, PC, IF/ID and ID/EX stall, and bubbles enter MEM. When the product is ready, the multiply moves on. Dependent instructions then get the product through normal forwarding.

Because EX is blocked while the multiply runs, instructions always complete in program order. A pipeline that let independent instructions pass a running multiply would complete out of order. That option is not built.

### Priority of the stall cases

When several conditions hold in the same cycle, the stall control unit resolves them in this order:

1. **Halted**: everything holds.
2. **Taken branch in MEM**: cancel three, redirect.
3. **Multiplier busy**: stall IF, ID and EX; bubble into MEM.
4. **Load-use**: stall IF and ID; bubble into EX.
5. **Jump or halt in ID/EX**: stall IF; bubble into ID.
6. **Otherwise**: everything transfers, and a jump in MEM supplies the fetch address.

### Timing

A program of `n` dynamic instructions, counting the final halt, reaches `halted` after `n + 4` cycles plus the following costs:

| Event | Extra cycles |
|---|---|
| taken `beq`/`bne`, any `br`/`bsr` | 3 |
| not-taken branch | 0 |
| `jmp`/`jsr`/`ret` | 2 |
| load followed by a dependent EX use | 1 |
| `mulq` | `MUL_LATENCY - 1` |
| any other dependence | 0 (forwarded) |

The single-cycle core takes exactly `n` cycles.

## The single-cycle core (`alpha_single_cycle`)

This core uses the same decoder, ALU, register array and memories. In one cycle it fetches the instruction, reads `ra` and `rb`, and lets the ALU compute the result, the address or the branch target. The data memory is read or written in the same cycle, and the register array and the PC update at the clock edge. Its register array has no write-through, which would form a combinational loop here. `mulq` is not part of this core and executes as a no-op.

## Modules

| File | Role |
|---|---|
| `alpha_pkg.sv` | encodings, control word `ctrl_t`, pipe-register payload structs, enums |
| `alpha_top.sv` | both cores side by side, each with its own ports |
| `alpha_pipeline.sv` | five-stage core |
| `alpha_single_cycle.sv` | single-cycle core |
| `alpha_hazard_unit.sv` | stall control: transfer / stall / bubble for each pipe register |
| `alpha_forward_unit.sv` | EX-EX, MEM-EX and MEM-MEM bypass selection |
| `alpha_pipe_reg.sv` | pipe register with its payload type as a parameter |
| `alpha_decoder.sv` | instruction to control word, including the sign extender |
| `alpha_alu.sv` | add, subtract, or, xor, signed less-than, pass-B |
| `alpha_multiplier.sv` | iterative multiplier with start, cancel and done |
| `alpha_regfile.sv` | 32 x 64-bit registers, 2 read ports and 1 write port |
| `alpha_imem.sv`, `alpha_dmem.sv` | instruction memory (32-bit words, load port) and data memory (64-bit words) |

### Ports and parameters of `alpha_top`

| Parameter | Default | Meaning |
|---|---|---|
| `IMEM_DEPTH` | 1024 | instruction words per core |
| `DMEM_DEPTH` | 1024 | data quadwords per core |
| `MUL_LATENCY` | 8 | cycles a `mulq` spends in EX (must divide 64) |

Each core has the same set of ports, with the prefix `pipe_` or `sc_`:

- `prog_we`, `prog_addr`, `prog_wdata`: write instruction words. Use them while reset is held.
- `halted`: goes high once the halt instruction has completed.

`rst_n` is asynchronous and active low. It clears the registers and sets the PC to 0. Memory contents are not reset. To inspect state after a run, use the hierarchy: `u_pipe.u_rf.regs`, `u_pipe.u_dmem.mem`, and the same under `u_sc`.

## Simulation

Every testbench in `tb/` checks its own results and ends by printing `TB_RESULT checks=N failures=M`. The end-to-end test runs at the default parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/alpha_pkg.sv tb/tb_alpha_asm_pkg.sv tb/tb_alpha_top.sv --top-module tb_alpha_top
./obj_dir/Vtb_alpha_top
```

`tb/tb_alpha_asm_pkg.sv` provides encoder functions (`addq`, `ldq`, `beq`, `jmpk`, and so on) and `alpha_ref_model`, a reference model that executes a program one instruction at a time with no timing. The testbenches compare the registers and stored data of the cores with this model.

`tb_alpha_top` runs these programs on both cores and checks their final state and, on the pipeline, the exact cycle counts listed in Timing:

- a chain of data hazards
- the load/store hazard classes
- a taken and a not-taken branch
- branches and jumps that depend on fresh ALU results and loads
- subroutine call and return
- the multiply example
- the remaining operate instructions

It then runs 40 random programs and compares both cores with the model. It counts each mechanism and fails if any of them never occurred: EX-EX, MEM-EX and MEM-MEM forwarding, load-use stall, branch cancel, jump fetch stall, multiplier stall, not-taken branch, `cmoveq` without a write, and halt.

Each unit (`tb_alpha_alu`, `tb_alpha_regfile`, `tb_alpha_hazard_unit`, and so on) has its own testbench with the same structure.

## Limits

These parts are this design's own choices:

- the memory sizes
- halting through the all-zero word
- zeroing the registers at reset
- the multiplier's structure
- the priority between stall cases

The design leaves out the following:

- **Exceptions.** No handler address, exception cause registers (`EXC_ADDR`, `EXC_SUM`), kernel mode or return-from-exception (`REI`) instruction.
- **Out-of-order completion of multiplies.**
- **Superscalar issue and other branch predictors.** This covers the backward-taken/forward-not-taken rule and a branch target buffer.
- **Caches.** The memories answer in the same cycle, so there are never memory stalls.
