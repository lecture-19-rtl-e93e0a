# A five-stage pipelined MIPS-subset processor with forwarding and a load interlock

This is the classic five-stage MIPS pipeline: fetch (IF), decode and register read (DE),
execute (EX), memory (ME) and write back (WB). It runs one instruction per cycle.
The pipeline hazards that can be fixed with wires are fixed with wires. The one hazard that
cannot be fixed that way, a value needed before it exists, is fixed with a one-cycle stall.
Three ideas carry the design:

* **Data stationary control.** The instruction is decoded once, in DE. The control signals
  then travel down the pipeline registers with their instruction. Each stage uses only its
  own part of them.
* **Forwarding.** A result is passed back to the instruction that needs it as soon as the
  result exists. The instruction does not wait for the write to the register file.
* **Stall on issue.** The one case forwarding cannot cover is detected in decode: a load
  whose result the very next instruction needs. That instruction is held for one cycle, and
  a bubble goes down the pipe in its place.

All forwarding and stall logic is combinational and has no state.

## Pipeline and registers

```
 IF            DE                     EX              ME              WB
 PC ─► I-mem ─► IR ─► decode, Regs ─► A,B,imm ─► ALU ─► S,D ─► D-mem ─► S,M ─► Regs
                     forward muxes    ctrl            ctrl            ctrl
                     hazard detect
                     beq compare ──► next PC
```

| register | contents (struct in `mips_pkg`) |
|---|---|
| IF/DE | `ir` (instruction), `pc4` (its address + 4) |
| DE/EX | `ctrl`, `a` and `b` (operands after forwarding), `imm16`, `rt`, `rd` |
| EX/ME | `mem_wr`, `mem_to_reg`, `reg_wr`, `s` (ALU result), `d` (store data), `rt`, `rw` (destination) |
| ME/WB | `mem_to_reg`, `reg_wr`, `s` (ALU result passed on), `m` (loaded word), `rw` |

Every pipeline register (`pipe_reg`) has a **valid bit** next to its payload. A slot whose
valid bit is clear is a bubble. Its register write and memory write are ignored, and it never
takes part in forwarding or in hazard detection.

The control bundle `ctrl_t` holds ExtOp, ALUSrc, ALUOp, RegDst, MemWr, Branch, MemtoReg and
RegWr. Each signal is used in a fixed stage:

* ExtOp, ALUSrc, ALUOp and RegDst in EX, one cycle after decode.
* MemWr in ME, two cycles after decode.
* MemtoReg and RegWr in WB, three cycles after decode.
* Branch in DE itself, because branches are resolved there.

## Instruction set

| class | instructions | what happens |
|---|---|---|
| R-type | `add addu sub subu and or xor slt` | `R[rd] <- A op B` |
| immediate | `addi addiu` / `andi ori` | `R[rt] <- A op imm`, sign-extended / zero-extended |
| load | `lw` | `R[rt] <- Mem[A + SX(imm)]` |
| store | `sw` | `Mem[A + SX(imm)] <- B` |
| branch | `beq` | if `A == B`: `PC <- PC+4 + (SX(imm) << 2)` |

The encodings are the standard MIPS ones. Any other word decodes to "do nothing", and that
includes the all-zero `nop`. There are no jumps, no byte or halfword memory accesses, and no
overflow exceptions. Addresses are byte addresses, and memories are word arrays, so the two
low address bits are ignored.

## Branches: resolved in decode, one delay slot

The `beq` comparator sits in DE and compares the two operands after forwarding. The target is
computed in DE as well, so a taken branch updates the PC at the end of its decode cycle.
While the branch is in decode, the fetch stage is already fetching the next instruction.
That instruction, the **delay slot**, is always executed: nothing is squashed. Software must
fill the slot, either with useful work or with a `nop`. The delay is part of the instruction
set, so the hardware never stalls for a branch. A branch placed in another branch's delay
slot is undefined, as it is in MIPS.

## Forwarding: where each operand comes from

Forwarding happens in decode, in front of the DE/EX operand latches (`forward_unit`). For each
source register (`rs`, `rt`) the mux takes the value of the **nearest** valid instruction
that writes that register, newest first:

1. **EX:** the ALU output, straight from the ALU in the same cycle. This is skipped if the
   instruction in EX is a load, because the loaded word does not exist yet.
2. **ME:** the instruction's ALU result, or for a load, the word being read from data memory.
3. **Register file.** The register file passes a value being written in WB straight to a read
   of the same register in the same cycle. So an instruction three places behind its producer
   needs no forwarding path at all.

Register `$0` is never forwarded. The same operands also feed the `beq` comparator, so a
branch that tests a value computed just before it needs no stall either.

**Store-data bypass in ME.** Take a `sw` whose data register is written by the load right
before it (`lw r1, 0(r2); sw r1, 4(r3)`). The `sw` needs that data only when it reaches ME,
and at that point the load is in WB. So the store-data mux in ME picks the WB value whenever
the instruction in WB writes the store's `rt`. The pair runs back to back with no stall.

## The load interlock

The rule is in `hazard_unit`. Suppose the instruction in decode reads, as an ALU operand or
a `beq` comparand, the register that a valid load in EX will write. Then `stall` is raised
for one cycle:

* the PC and IF/DE hold their values, so the same instruction is fetched and decoded again;
* DE/EX takes a bubble: the same instruction goes into the slot with its valid bit clear.

One cycle later the load is in ME, and forwarding source 2 supplies the word. A `lw`
followed by three dependent instructions therefore takes one extra cycle in all. If the
compiler puts an unrelated instruction in the slot after the load, there is no stall.
The store-data operand of `sw` never causes a stall, because of the ME bypass.

An assertion in `mips_pipeline` checks that a stall only ever happens with a load in EX.

## Files

| file | block |
|---|---|
| `rtl/mips_pkg.sv` | types: opcodes, `ctrl_t`, the pipeline-register structs |
| `rtl/mips_pipeline.sv` | top: the five stages wired together |
| `rtl/next_pc.sv` | PC register: PC+4, branch target, hold on stall |
| `rtl/inst_mem.sv` | instruction memory: combinational read, program-load write port |
| `rtl/regfile.sv` | 32 x 32 register file with write-through and `$0` = 0 |
| `rtl/main_control.sv` | decoder producing `ctrl_t` |
| `rtl/exec_unit.sv` | immediate extension, ALU operand select, ALU, destination select |
| `rtl/data_mem.sv` | data memory: combinational read, clocked write |
| `rtl/pipe_reg.sv` | generic pipeline register with valid bit, enable and bubble |
| `rtl/forward_unit.sv` | operand forwarding muxes and the ME store-data bypass |
| `rtl/hazard_unit.sv` | load-use detection in decode |

Each `tb/tb_<block>.sv` is a self-checking testbench for its block. `tb/tb_mips_pipeline.sv`
runs whole programs on the top at its default sizes.

## Top-level interface and parameters

`mips_pipeline #(IMEM_DEPTH = 256, DMEM_DEPTH = 256)` has these ports:

* `clk` and `rst_n`, an asynchronous active-low reset. Reset empties the pipeline, sets the
  PC to 0 and clears the registers. Data memory is not cleared.
* `imem_we`, `imem_waddr` and `imem_wdata` load the program one word at a time. Load it while
  reset is held.
* `dbg_reg_addr`/`dbg_reg_data` and `dbg_mem_addr`/`dbg_mem_data` are read-only inspection
  ports for a register and a data-memory word.
* `pc` is the fetch address. `retire` is high when a valid instruction is in WB.
* `ev_stall`, `ev_fwd_ex`, `ev_fwd_me`, `ev_store_bypass`, `ev_branch_taken`,
  `ev_branch_not_taken` and `ev_rf_through` are one-cycle flags. They show when each
  mechanism acts, for counting and debugging.

Both memory depths and everything in the list above are choices of this implementation.

## Simulation

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_pkg.sv \
    tb/tb_mips_pipeline.sv --top-module tb_mips_pipeline -Mdir obj
./obj/Vtb_mips_pipeline
```

Any other testbench is built the same way; change the name of the testbench file and of its
top module. Each testbench prints `TB_RESULT checks=N failures=M` at the end.

`tb_mips_pipeline` assembles its programs with small encoder functions. It checks the
pipeline against an instruction-at-a-time reference interpreter that is part of the
testbench. That interpreter runs MIPS semantics with one delay slot. After each program the
testbench compares all 32 registers and all 256 data words. It runs:

* the forwarding chain `add $t0; sub/and/or/xor` reading `$t0`;
* a load followed by three users of the loaded register;
* a `lw`/`sw` pair, and a branch on a just-loaded value;
* a seven-instruction walk-through program with a taken `beq` and its delay slot;
* twenty random programs of about 150 instructions.

It also checks the cycle count. N instructions must retire in N + (number of load-use pairs)
cycles. This confirms the one-cycle interlock and confirms that no other case stalls.
It counts each mechanism (stall, EX and ME forwarding, store bypass, taken and not-taken
branches, write-through) and fails if any of them never happens. A full run takes about a
second.

`tb_pipeline_timing` checks the timing cycle by cycle against schedules worked out by hand.
After reset, rising edge *k* puts instruction *k*−1 into decode. It covers three programs:

* **Taken branch.** The `beq` is taken while it is in DE. In that same cycle its delay-slot
  instruction is being fetched. On the next edge the fetch moves to the target.
* **Load interlock.** The PC holds for exactly one cycle, one bubble reaches WB between the
  `lw` and its user, and after that the user gets the loaded value from ME.
* **Forwarding chain.** The first user gets the value from EX, the second from ME, the third
  through the register-file write-through, and the fourth needs no forwarding. All five
  instructions retire back to back.

## Where this implementation makes its own choices

* **Branch target:** PC+4 + (offset << 2), as in MIPS.
* **Branch stage:** the branch is decided in decode, which gives a single delay slot.
  The textbook form of this pipeline carries the Branch signal on to the memory stage and
  decides there. That form leaves three instructions after the branch, and it is not
  built here.
* **Stall method:** a stall refetches the instruction by holding the PC, rather than saving
  the fetched word in a side register. The two are equivalent; holding the PC is simpler.
* **Instruction set:** the ALU operations are those the example programs use, plus `slt`,
  `addu` and `subu`. There are no jumps.
* **Memories:** both are 256-word arrays with combinational reads. That makes them ideal
  single-cycle memories, not caches. A cache miss, which would stall the pipeline for several
  cycles, is not modelled.
* **Write-through:** the register file forwards a WB write by bypassing inside its read ports.
  It does not use a write-in-first-half / read-in-second-half clock.
* **Reset:** the reset behaviour and the inspection and event ports are additions of this
  implementation.
