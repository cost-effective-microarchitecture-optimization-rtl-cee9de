# A three-stage ARM7TDMI-compatible core with operands fetched in decode

The first layout of this core was the usual ARM7 shape. It had three stages (fetch, decode,
execute), and most of the work crowded into execute. In that cycle the condition flags were
tested, the control word was decoded, the registers were read, the shifter and ALU ran, and the
result was written back. That single stage set the clock. This core is the final step of a series
of optimisations that move work out of that critical cycle and keep the gate count low:

- Every register is clocked on a single edge. Nothing is latch-based, and the register file is a
  plain flip-flop array.
- The multiplier is a radix-4 Booth unit with carry-save reduction. Its final carry-propagate
  addition runs in a cycle of its own.
- The condition test happens *after* the control decode. Controls are decoded whatever the
  condition is. In execute, a failed condition only swaps the decoded control word for a NOP word,
  which is a 2:1 multiplexer rather than a stage in front of the decoder.
- The register file and the control unit live in the **decode** stage. Operands are read one
  cycle early and registered with the control word. A forwarding path covers the
  read-after-write hazard this creates.

The result runs the ARM and Thumb instruction sets. Multiplies take 2 to 7 cycles, with early
termination. Interrupts, SWI, undefined-instruction traps and a coprocessor handshake are all
supported.

## Pipeline

```
 fetch                  decode                                        execute
 PC, +4/+2   ──► [fd] ──► Thumb→ARM ─► index ─► control(instr,step) ─► [de] ─► cond? ctrl : NOP
                          decompress            │                             shifter, ALU, multiplier,
                                                └► reg file reads ─► fwd ─►   PSR, data memory, coprocessor
                                                                   ▲           │
                                                                   └───────────┘ write port (one per cycle)
```

- **Fetch** (`fetch_stage`) holds the PC. It reads the instruction port and latches the word
  with its address. It steps the PC by 4 in ARM state and by 2 in Thumb state. Any PC load
  (branch, ALU result, loaded word or exception vector) invalidates the latched word. The
  load takes priority over a stall.
- **Decode** goes through four steps:
  1. In Thumb state it picks the halfword at address bit 1 (swapped when `bigend` is high). It
     then expands that halfword into the equivalent ARM word (`thumb_decompressor`).
  2. `decode_index` sorts the ARM word into one of 22 instruction classes (the *index*).
  3. `control_unit` expands the index, the instruction fields and the cycle number into the
     control word of one execute cycle.
  4. The two read ports fetch the registers that word names, and `forwarding_unit` substitutes
     the value the execute stage is writing in the same cycle.

  The control word and both operands go into the decode/execute register.
- **Execute**:
  1. `condition_unit` tests the condition field against the CPSR flags and picks the control
     word or `CTRL_NOP`.
  2. Operand 2 is formed (shifted register, rotated immediate, branch offset, block-transfer
     offset and so on), and `barrel_shifter` and `alu` compute the result.
  3. The one write port stores the result.
  4. The data port, the PSR unit, the multiplier and the coprocessor handshake do that cycle's
     work.

The reader may be used to the plain three-stage design, where R15 reads as "address + 8". That
holds here too. The core reads R15 as the executing instruction's address + 8 in ARM state. In
Thumb state it reads address + 4. Bit 1 is cleared only for the PC-relative load and for
`ADD Rd, PC, #imm`, which need a word address. These values are computed from the address
carried down the pipe, so they do not depend on where the fetch PC happens to be.

A write to R15 of any kind becomes a PC load and flushes fetch and decode. A taken branch
therefore costs its own cycle plus two refill cycles. A data-processing instruction with S set
and Rd = PC also copies the SPSR into the CPSR, which is the usual exception return.

## Multi-cycle instructions: a Mealy control unit driven one cycle ahead

This part is the hardest to follow, and most behaviour depends on it.

The control unit is combinational. Its inputs are `(instr, index, step)`, and its output is the
control word for that step of that instruction. That word includes a `last` bit. The *state* of
the machine is the instruction in execute and its step number. Because the operands for a cycle
must be read in decode, the control unit always works one cycle ahead:

- While the executing instruction's current word has `last = 0`, the core feeds that same
  instruction back into the control unit with `step + 1`. The fetch and decode stages stall, and
  the registers for the instruction's *next* cycle are read now.
- When the current word has `last = 1`, the control unit decodes the instruction waiting in
  decode at step 0, and the pipeline advances.
- The multiplier wait cycles and a busy coprocessor (`cpb`) hold the execute stage in place, so
  the step does not advance.

The cycle plans (execute cycles, step numbers from 0) are:

| class | cycles | what each does |
|---|---|---|
| data processing, MRS/MSR, B/BL, BX, SWI, undefined, CDP/MCR/MRC | 1 | |
| data processing with a register-specified shift | 2 | read Rs and save the amount; then execute |
| LDR/LDRB/LDRH/LDRSB/LDRSH | 2 | address, memory read, base write-back; then Rd ← loaded word |
| STR/STRB/STRH | 2 | address and base write-back; then read Rd and store |
| LDM/STM of n registers | n + 1 | start address and base write-back; then one register per cycle |
| SWP/SWPB | 2 | read and write memory; then Rd ← old value |
| MUL / MLA / UMULL… / UMLAL… | 2–5 / 3–6 / 3–6 / 4–7 | optional accumulator read, start, multiplier cycles, write low, write high |
| LDC/STC of n words | n | one word per cycle, first with base write-back; the coprocessor ends it |

Base write-back happens in the first cycle. The later cycles therefore read the updated base,
which is why the address is kept in a temporary register (`save_addr`). A load into the PC turns
the final write into a PC load. An LDM that includes the PC, or an LDR into the PC, costs two
refill cycles after it.

## The condition test after the control decode

The control unit never looks at the flags. In execute the registered control word goes to the
datapath only when `condition_unit` passes, and otherwise `CTRL_NOP` (no write, no memory, no PC
change, `last = 1`) replaces it. A failed instruction therefore takes exactly one cycle, even if
it would have taken several: the NOP word has `last = 1`, which ends it. The condition is tested
only in an instruction's first cycle (step 0). Later cycles always pass, so flags that the
instruction sets part-way cannot cancel its own remaining cycles. The value NV (`1111`) is treated as "never".

## Multiplier

`booth_multiplier` uses the following scheme:

- **Operands.** Both operands are widened to 33 bits: sign extension for signed multiplies, a
  zero top bit for unsigned ones. One datapath then serves MUL, MLA, UMULL, UMLAL, SMULL and
  SMLAL.
- **Per cycle.** Each cycle retires 8 multiplier bits as four radix-4 Booth digits. The four
  partial products (each 0, ±A or ±2A), together with the running sum and carry vectors, are
  reduced by a carry-save adder tree. No carry propagates inside the loop.
- **Final adder.** Sum and carry are registered. A single carry-propagate adder combines them
  in a separate final cycle, which also adds the accumulator.
- **Early termination.** The multiplier stops as soon as the multiplier bits it has not yet used
  are all copies of the sign bit. It therefore runs 1, 2, 3 or 4 Booth cycles for multipliers
  that fit in 8, 16, 24 or 32 bits. The Booth digit that straddles the stopping point is
  corrected in the final cycle.
- **Start cycle.** The first Booth cycle runs in the start cycle, straight from the operand
  inputs.

From `start` to `done` the unit takes n + 1 cycles, counting both ends, for n Booth cycles. Seen
as execute cycles of the core, a full-length MUL takes 5 cycles, MLA 6, a long multiply 6 and a
long multiply-accumulate 7. MUL with an 8-bit multiplier takes 2. The parameter
`BITS_PER_CYCLE` (default 8) sets the digits per cycle.

With S set, a multiply sets N and Z from its 32- or 64-bit result and leaves C and V unchanged.
The ARM7TDMI leaves C undefined, so keeping it is this design's choice.

## Thumb

`thumb_decompressor` maps each of the 19 Thumb formats to one ARM word, which then takes the
ordinary ARM path. Three points are specific to this design:

- **Branch offsets.** Offsets are passed on unscaled. The execute stage shifts a branch offset by
  1 in Thumb state and by 2 in ARM state, so one branch datapath serves both.
- **BL halves.** The two halves of Thumb BL become two internal encodings (cond field `1111`,
  which is otherwise unused in ARM). The first half sets LR = PC + (offset << 12). The second
  half jumps to LR + (offset << 1) and sets LR to the return address with bit 0 set.
  `decode_index` gives these encodings their own class (`IDX_TBL`), and only in Thumb state.
- **Hi-register operations and BX.** These map to the ARM MOV/ADD/CMP/BX forms.

## Exceptions, interrupts and the coprocessor port

- **IRQ and FIQ.** Both are level-sensitive, active high, and masked by the I and F bits. A
  request is taken at an instruction boundary: the instruction about to enter execute is replaced
  by an exception-entry pseudo-instruction (index `IRQ`/`FIQ`). That instruction then runs
  again after return. LR gets its address + 4, so `SUBS PC, LR, #4` returns. FIQ has priority
  over IRQ.
- **SWI and undefined instructions.** Each enters its mode in a single execute cycle: SPSR ←
  CPSR, mode switch, I set (and F for FIQ), LR, then the jump to the vector.
- **Vectors.** Reset 0x00, undefined 0x04, SWI 0x08, IRQ 0x18, FIQ 0x1C.
- **Register banking.** `arm_pkg::phys_reg` maps mode and register number to one of 30 physical
  registers:

  | registers | physical |
  |---|---|
  | user R0–R14 | 0–14 |
  | FIQ R8–R14 | 15–21 |
  | SVC R13–R14 | 22–23 |
  | abort R13–R14 | 24–25 |
  | IRQ R13–R14 | 26–27 |
  | undefined R13–R14 | 28–29 |

  R15 is the PC itself, which makes the usual count of 31 general-purpose registers.
- **Coprocessor.**
  - `ncpi` goes low while a coprocessor instruction is in execute. `cpa` high means no
    coprocessor accepts it, and the core takes the undefined trap. `cpb` high means busy, and the
    core waits.
  - MCR sends Rd on `cp_dout`, and MRC writes `cp_din` to Rd. For Rd = 15, only the flags are
    set.
  - LDC/STC move one word per cycle between memory and the coprocessor, at consecutive
    addresses from the first. The first cycle also writes back the base. The coprocessor raises
    `cplast` with the word it wants to be the last. At most 16 words are moved. `cpa` is
    sampled only in the first cycle.

## Interfaces

The instruction port (`imem_addr` → `imem_rdata`) and the data port (`dmem_*`) are separate.
Both answer in the same cycle:

- Reads are combinational.
- Stores are taken on the rising clock edge, with per-byte enables. Data is little-endian.
- `bigend` only selects which halfword of a fetched word is the current Thumb instruction.

Reset (`rst_n` low, asynchronous) starts the core at address 0 in supervisor mode with IRQ and FIQ
masked. `cpsr_o` exposes the current program status register.

## Files

| module | role |
|---|---|
| `arm_pkg` | instruction classes, control word, PSR layout, register banking |
| `fetch_stage` | PC, fetch register, redirect and stall |
| `thumb_decompressor` | Thumb → ARM translation |
| `decode_index` | instruction class |
| `control_unit` | per-cycle control word |
| `register_file` | 30 × 32 registers, 2 asynchronous read ports, 1 synchronous write port |
| `forwarding_unit` | execute-to-decode bypass |
| `condition_unit` | condition test |
| `barrel_shifter` | LSL/LSR/ASR/ROR/RRX with ARM carry rules |
| `alu` | 16 data-processing operations with flags |
| `booth_multiplier` | radix-4 Booth multiply-accumulate |
| `psr_unit` | CPSR and five banked SPSRs |
| `arm7_core` | the top |

Each file opens with a description of its function, timing, and which choices are its own.

## Where this design departs from the ARM7TDMI it is modelled on

- **Memory model.** The memory ports are split and answer in one cycle, instead of a single
  shared bus with N/S/I/C cycle types. So there are no `nMREQ`/`SEQ` outputs, and loads, swaps
  and block loads take fewer cycles than the classic timing table:

  | instruction | this core | classic ARM7TDMI |
  |---|---|---|
  | data processing / with register shift | 1 / 2 | 1 / 2 |
  | data processing writing the PC | 3 | 3 |
  | LDR / LDR into the PC | 2 / 4 | 3 / 4 or more |
  | LDM / LDM including the PC | n + 1 / n + 3 | n + 2 / n + 4 |
  | SWP | 2 | 4 |
  | STR | 2 | 2 |
  | STM | n + 1 | n + 1 |
  | branch, BX, SWI, exception entry | 3 | 3 |
  | multiply | 5 / 6 / 6 / 7 | 5 / 6 / 6 / 7 |

  A branch counts its own cycle plus 2 refill cycles. The multiply counts are MUL / MLA /
  long / long with accumulate, at full length.
- **Fetch register.** The fetched word is always registered at the end of the fetch cycle, and a
  stall simply holds that register and the PC. There is no separate hold latch and bypass
  multiplexer. Nothing is prefetched past a stalled instruction.
- **Not modelled:**
  - Aborts: there is no abort input, and the abort mode exists only as a register bank.
  - The debug and EmbeddedICE logic.
  - Wait states on either memory port.
- **Coprocessor transfers.** The end of an LDC/STC is signalled by a dedicated `cplast` input,
  which is this design's own handshake. An n-word transfer takes n cycles, where the classic
  timing has n + 1. Coprocessor wait cycles are simply held cycles.
- **Interrupt timing.** An interrupt is recognised only when a new instruction enters execute.
  Its latency therefore includes the remaining cycles of a long instruction. It is sampled
  without a synchroniser.
- **Index numbering.** Index numbering follows the usual 19-class split: no-op, branch, BX,
  data processing, PSR transfer, data processing with register shift, load, store, multiply,
  block load, block store, swap, SWI, CDP, LDC, STC, MRC, MCR and undefined. Classes 19–21
  (Thumb BL half, IRQ, FIQ) are this design's own.
- **LS condition.** LS is "C clear or Z set", as in the ARM architecture.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | method |
|---|---|
| ALU, shifter, condition unit | compared with reference models on random and corner inputs |
| multiplier | thousands of random signed/unsigned products and accumulates; checks the n + 1 latency against the multiplier's length |
| register file, forwarding unit | compared with an array model |
| Thumb translator, index decoder, control unit | directed tables |
| PSR unit, fetch stage | directed sequences |

`tb_arm7_core` runs the core with its default parameters on a program built inside the testbench
by small assembler functions. It covers:

- every instruction class, including back-to-back dependences
- conditional execution
- all multiply forms, with their cycle counts
- block transfers, swap and PSR moves
- a busy coprocessor, multi-word STC/LDC transfers and an absent coprocessor
- SWI and undefined traps
- IRQ and FIQ entry and return
- a Thumb routine

About forty stored results are compared with values the testbench computes itself. The
testbench also measures the length of every executed instruction, refill bubbles included, and
checks it against the timing table above for each instruction class. The testbench
also counts how often each pipeline mechanism fired: forwarding, stall, flush, NOP substitution,
multiply early termination and full length, the switch to Thumb, IRQ, FIQ, SWI and undefined
entry, a coprocessor wait and block-transfer cycles. A mechanism that never fires counts as a
failure. The run takes about 350 cycles.

`tb_arm7_core_random` complements the directed program with random programs checked against an
instruction-level reference model written inside the testbench:

- There are 20 runs of 200 instructions each.
- The instructions are drawn from all 16 data-processing operations, with immediate,
  immediate-shift and register-shift operands, random S bits and random condition codes, plus
  MUL/MLA and the four long multiplies, with and without S.
- Memory transfers go through R11 into a 4 KB area of random data. They cover word, byte,
  halfword and signed loads and stores (unaligned word loads included), LDM/STM in all four
  modes with random register lists, and SWP/SWPB, with pre/post indexing and write-back. The
  generator runs the model as it goes and steers each write-back toward the middle of the area.
- Each run starts from random register and flag values. Shift amounts are biased toward the
  edge cases (0, 32, above 32, RRX).
- Each run then switches to Thumb state with BX and runs 60 random Thumb instructions from
  formats 1–5 and 11: immediate shifts, three-operand add/subtract, 8-bit immediates, register
  ALU operations other than MUL, ADD/CMP/MOV with R8–R10, and word LDR/STR relative to SP,
  which points at the data area. It returns with BX LR.
- Both parts contain conditional forward branches over one to three instructions. The generator
  asks the model whether each branch is taken, and does not step the model through the
  instructions it jumps over. In Thumb state these branches land on both halves of a word. For the model, the testbench rewrites each
  Thumb instruction as its ARM equivalent with its own table, not the core's translator.
- IRQ and FIQ are raised at random moments throughout, in both states, including in the middle
  of multi-cycle instructions. The handlers are transparent (their counters live in banked
  registers and memory) and return with `SUBS PC, LR, #4`. The run must therefore still match
  the model, and the handler counts must equal the number of entries.
- At the end the program stores R0–R11 and the CPSR, and the testbench compares them and the
  whole data area with the model.
- `+seed=N` on the simulator command line selects a different set of programs.

Dependences between neighbouring instructions are dense, so forwarding and NOP substitution
happen on about one cycle in six. One default run executes about 16,000 cycles with roughly 400
interrupts. Thirty seeds were run clean.

## Simulating and changing it

Any testbench runs with plain Verilator 5. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_arm7_core \
    -Irtl -y rtl +libext+.sv rtl/arm_pkg.sv tb/tb_arm7_core.sv
./obj_dir/Vtb_arm7_core
```

For a leaf block, replace the testbench name. `arm_pkg.sv` always comes first.

**Adding an instruction** takes changes in three places:
1. A class in `decode_index`, if a new class is needed.
2. A cycle plan in `control_unit`.
3. Any new datapath action as a control word field in `arm_pkg::ctrl_t`, acted on in
   `arm7_core`.

The testbench assembler functions show the encodings.
