# Stall-only pipelined Y86-64 and addq processors

A pipelined processor has to deal with three kinds of hazard. Data hazards happen when an
instruction reads a register before an older instruction has written it. Control hazards
happen when the next PC is not yet known. Exceptions have to stop the machine cleanly. This
repository holds two small in-order pipelines that handle every hazard in the simplest
correct way: **they wait**. There is no forwarding and no branch speculation. Hardware
inserts the no-ops that a compiler would otherwise have to place.

- **`y86_pipe`** is a five-stage (fetch, decode, execute, memory, writeback) processor for
  the full Y86-64 instruction set. Y86-64 is the teaching subset of x86-64: 15 64-bit
  registers, condition codes ZF/SF/OF, `irmovq/rrmovq/mrmovq/rmmovq`, `addq/subq/andq/xorq`,
  `jXX`, `cmovXX`, `call/ret`, `pushq/popq`, `nop` and `halt`.
- **`addq_pipe`** is a four-stage (fetch, decode, execute, writeback) processor that executes
  only `addq rA, rB`. It is the smallest machine that shows a data hazard. It implements two
  placements of the stall logic, selected by a parameter.

`lecture_top` places both side by side. They share clock and reset but nothing else.

## Register banks with stall and bubble

Every pipeline register is a `pipe_reg`, a bank of fields of any packed type `T`. Each bank
has two controls:

| control | effect at the clock edge |
|---|---|
| neither | normal: load the value the previous stage computed |
| `stall` | keep the old value |
| `bubble` | load the bank's default value, which encodes a no-op |
| `rst` | load the default value (synchronous) |

The default of each field is chosen so that the bank describes an instruction that does
nothing: register numbers `0xF` ("none"), icode `NOP`, status `AOK`. Raising `stall` and
`bubble` together is a control error. An assertion reports it, and `stall` wins.

All hazard handling is the choice, for every bank and every cycle, between normal, stall and
bubble. It is made by one combinational block per processor.

## The Y86-64 pipeline (`y86_pipe`)

| bank | between | main fields |
|---|---|---|
| F | (PC) → fetch | predicted PC |
| D | fetch → decode | stat, icode, ifun, rA, rB, valC, valP |
| E | decode → execute | stat, icode, ifun, valC, valA, valB, dstE, dstM |
| M | execute → memory | stat, icode, ifun, cnd, valE, valA, dstE, dstM |
| W | memory → writeback | stat, icode, valE, valM, dstE, dstM |

Each stage reads only the bank in front of it and writes the bank behind it. The struct
types and bubble values are in `y86_pkg`. Some state is shared between stages on purpose:

- the register file is read in decode and written in writeback;
- condition codes are read and written in execute;
- the data memory is used in memory;
- fetch receives two late PC inputs, described below.

Stage modules: `y86_fetch` (with `y86_imem`), `y86_decode` (with `y86_regfile`),
`y86_execute` (with `y86_alu` and the condition-code register), `y86_memstage` (with
`y86_dmem`), and `y86_hazard` for control.

### Fetch and next-PC selection

The instruction memory returns 10 bytes from the PC, enough for the longest instruction.
Fetch splits them into icode, ifun, rA, rB and valC, computes valP from the standard
instruction length, and checks icode/ifun validity. The fetch PC is chosen in this order:

1. `M_valE` if the memory stage holds a conditional jump whose condition was true. Execute
   computes valE = valC + 0, which is the target.
2. `W_valM` if writeback holds a `ret`. The return address was loaded in the memory stage.
3. Otherwise the predicted-PC register.

The prediction written into F is valC for `call` and unconditional `jmp`. For `halt` and for
faulting instructions it is the same PC. Everything else gets valP. A not-taken conditional
jump therefore continues at valP, which decode placed in valA and which travels down the
pipe.

### Data hazards: wait in decode

The register file is written at the clock edge that ends writeback and is read
combinationally in decode. There is no write-through. A value written at the end of cycle t
is visible to decode in cycle t+1. `y86_hazard` compares decode's srcA/srcB with dstE/dstM
in E, M and W (`0xF` never matches). On a match it stalls F and D and puts a bubble into E.
An instruction that uses the result of the instruction just before it waits **3 cycles**. A
gap of one instruction cuts this to 2 cycles, and a gap of two to 1 cycle. A `cmovXX` whose
condition is false clears its dstE in execute, so it releases waiting readers early.

### Control hazards: wait for jCC and ret

- **Conditional jump.** While a `jXX` with ifun ≠ 0 is in decode or execute, F stalls and D
  gets a bubble. The fetched instruction is discarded. When the jump reaches the memory
  stage, its `cnd` bit chooses between the target and the fall-through. Cost: **2 cycles**.
- **ret.** While a `ret` is in decode, execute or memory, F stalls and D gets a bubble. When
  it reaches writeback its loaded return address is used. Cost: **3 cycles**.
- `call` and `jmp` cost nothing, because their target is in the instruction itself.

A `ret` directly behind the `call` that entered the function reads %rsp, which the call
writes. Without forwarding it first waits in decode for that write (a data hazard), and only
then starts its own 3-cycle wait.

A data hazard takes priority over the control waits.

### Exceptions and the Stat register

Each instruction carries a status: AOK, HLT (`halt`), ADR (bad instruction or data address)
or INS (invalid instruction). The status moves down the pipe with the instruction. Younger
instructions may already be in flight, so nothing acts on the status until it reaches
writeback. At that point the Stat register latches it and the pipeline **freezes**:

- every bank stalls;
- register, memory and condition-code writes are disabled;
- `halted` goes high and stays high until reset.

Condition codes are also protected earlier. An `OPq` in execute does not update them while a
faulting instruction is in memory or writeback, so the final state is exactly what the ISA
specifies up to the faulting instruction.

### Interface

- `imem_load_en/addr/data` writes instruction bytes. Memories are separate; stores never
  modify instructions.
- `dmem_dbg_addr → dmem_dbg_data` reads 8 bytes of data memory.
- `reg_dbg_we/widx/wdata` writes a register, and `reg_dbg_idx → reg_dbg_data` reads one.
  Registers have no reset, so preload them here.
- `stat`, `halted`, `cc` give the machine state.
- `ev_data_stall`, `ev_jcc_wait`, `ev_ret_wait` and `ev_retire` pulse once per cycle in
  which that mechanism acts. Use them as performance counters.
- Parameters `IMEM_BYTES` and `DMEM_BYTES` default to 65536. This is large enough for
  programs that jump to `0xFFFF`.

## The addq-only pipeline (`addq_pipe`)

Instructions are two bytes. rA is in bits [15:12] and rB in bits [11:8] of the fetched word,
and the PC advances by 2. The banks are fD {rA, rB}, dE {dstE, valA, valB} and
eW {valE, dstE}, with register defaults 0xF and data defaults 0. The opcode is not decoded.
A register byte 0xFF acts as a no-op. The register file has the same write-then-read-next-
cycle timing as above. A dependent instruction right behind its producer therefore waits
**2 cycles**. `STALL_IN_DECODE` selects where the wait is decided:

- **0 (default): check at fetch.** The rA/rB just fetched are compared with the dstE of the
  instructions in decode and execute. On a match the PC is held and fD gets a bubble (F, F).
- **1: check at decode.** D_rA/D_rB are compared with dstE in execute and writeback. On a
  match the PC and fD are held and dE gets a bubble (its dstE becomes F).

Both schemes give the same results and the same number of stall cycles. They differ in which
banks hold and which take bubbles. The `P_pc`, `D`, `E`, `W` and `stall` outputs expose the
bank contents so that a cycle table can be checked.

For example, with %r8=800, %r9=900, %r10=1000, %r11=1100, the sequence
`addq %r8,%r9; addq %r9,%r8; addq %r10,%r11` stalls twice and ends with %r9=1700,
%r8=2500, %r11=2100.

## Files

| file | content |
|---|---|
| `rtl/y86_pkg.sv`, `rtl/addq_pkg.sv` | encodings, status codes, bank structs and bubble values |
| `rtl/pipe_reg.sv` | register bank with stall/bubble |
| `rtl/y86_regfile.sv` | 15 × 64-bit register file, 2 read / 2 write ports plus debug port |
| `rtl/y86_imem.sv`, `rtl/y86_dmem.sv` | instruction memory (10-byte fetch) and data memory (8-byte access) |
| `rtl/y86_fetch.sv`, `y86_decode.sv`, `y86_alu.sv`, `y86_execute.sv`, `y86_memstage.sv` | stage logic |
| `rtl/y86_hazard.sv` | stall/bubble control of the Y86-64 pipeline |
| `rtl/y86_pipe.sv`, `rtl/addq_pipe.sv`, `rtl/lecture_top.sv` | the two processors and the top |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/y86_tb_lib.svh` | assembler, ISA + timing reference model and random program generator used by the processor tests |

## Verification

Every testbench compares the design with values computed independently. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- Unit tests cover each module against tables and random stimulus.
- `tb_addq_pipe` runs both stall schemes against the cycle tables of the examples above,
  plus random addq sequences against an issue-time model.
- `tb_y86_pipe` runs directed programs and 40 random programs. The programs have loops,
  forward jumps, calls, pushes/pops, memory traffic, halts and faults. A reference model in
  `y86_tb_lib.svh` executes the ISA and predicts the cycle count from the stall rules. The
  test compares status, exact cycle count, the number of cycles of each stall kind, retired
  instruction count, all registers, condition codes and the whole data memory.
- `tb_lecture_top` runs both processors at the default 64 KiB memory sizes. It runs a
  loop/call/stack program on the Y86-64 side, then `addq; je 0xFFFF; addq` both taken and not
  taken (`0xFFFF` holds a `halt`). The addq side runs the stall example. Every mechanism (data
  stall, jCC wait, ret wait, halt, addq stall) must occur at least once.

Running a test with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/y86_pkg.sv rtl/addq_pkg.sv tb/tb_y86_pipe.sv --top-module tb_y86_pipe
./obj_dir/Vtb_y86_pipe
```

The include `tb/y86_tb_lib.svh` is referenced relative to the repository root.

## Limits and departures

- **No forwarding and no speculation**, by design. Back-to-back dependencies cost 3 cycles,
  conditional jumps 2 and ret 3. A pipeline with bypassing and branch prediction would be much
  faster.
- In the five-stage pipe the data-hazard check sits in decode. With a four-stage pipe the same
  example costs 2 stalls; here it costs 3, because of the extra memory stage.
- **Freeze on exceptions.** After a halt or fault the machine holds until reset. There is no
  exception handler and no restart.
- Harvard memories; no self-modifying code. Memories are behavioural arrays sized by
  parameter, with no cache or latency.
- Both writes to the same register in one cycle (`popq %rsp`): the memory-port value wins.
- Register contents are not reset.
- Lint reports a few unused bits. These are the upper instruction bytes and the memory error
  flag in the addq pipeline, which has no error handling, and the ifun/cnd fields of the M
  bank, which the memory stage receives as part of the struct but does not need. They are intentional.
