# PIPE: a decoupled pair of pipelined processors in SystemVerilog

PIPE splits a program's work between two identical in-order processors.
One of them, the *access* processor, computes addresses and issues the
loads and stores. The other, the *execute* processor, does the arithmetic.
The two are tied together only by hardware FIFOs:

- Memory data streams into the execute processor's load queue.
- Results leave through its store data queue.
- Branch outcomes travel from one processor to the other through branch
  queues.

The access processor can run ahead of the execute processor by as many
loads as the queues hold. This hides memory latency without caches for data
and without out-of-order issue.

Each processor is useful on its own as well. Its instruction set is small
and register based, and a few ideas make a short pipeline efficient:

- **Queues look like registers.** Register number 7 in a source field reads
  (and pops) the head of the load data queue (LDQ). As a destination it
  pushes onto the store data queue (SDQ). Loaded data never occupies a
  register, and a load never needs a write port at an unknown time. So every
  hazard can be decided at issue, in one clock.
- **Branches are prepared, then taken.** A prepare-to-branch (PBR)
  instruction evaluates a condition and a target early. The jump happens
  after a later instruction that has its *exit* (E) bit set. Useful work can
  be scheduled between the two, and fetch knows in advance where it is
  going.
- **Two register files.** A call or return swaps the foreground and
  background files, and saves or restores the PC in background R7. Most calls
  therefore save and restore nothing.

The RTL builds the two processors, their queues, I-caches and memory ports,
and the links between them. Main memory is outside the design. The top
(`pipe_system`) brings out one request bus and one read bus per processor.
A behavioural memory model for simulation is in `tb/pipe_memory_model.sv`.

## Files

| File | Contents |
|---|---|
| `rtl/pipe_pkg.sv` | Opcodes, decoded-instruction struct, bus beat types |
| `rtl/pipe_system.sv` | Top: two processors and the links between them |
| `rtl/pipe_processor.sv` | One processor: fetch, issue with interlocks, execute, queues |
| `rtl/pipe_decode.sv` | Instruction decoder |
| `rtl/pipe_regfile.sv` | Foreground/background register files with swap |
| `rtl/pipe_alu.sv`, `rtl/pipe_shifter.sv` | Arithmetic/logic unit, left barrel shifter |
| `rtl/pipe_addr_logic.sv` | Effective address and autoincrement |
| `rtl/pipe_queue.sv` | Generic FIFO (SAQ, SDQ, branch queue, load address buffer) |
| `rtl/pipe_ldq.sv` | Load data queue with slot reservation |
| `rtl/pipe_icache.sv` | Direct-mapped instruction cache with line refill |
| `rtl/pipe_mem_if.sv` | Memory port: bus arbitration and store pairing |
| `tb/pipe_asm_pkg.sv` | A small two-pass assembler used by the testbenches |
| `tb/pipe_memory_model.sv` | Behavioural pipelined memory (not synthesizable) |
| `tb/tb_*.sv` | One self-checking testbench per module, plus the system test |

## Instruction set

### Formats

There are two formats. Bit 0 of the format is taken as its most
significant bit.

| Format | opcode | E | Ri | Rj | Rk | displacement |
|---|---|---|---|---|---|---|
| 16-bit parcel `p` | `p[15:10]` | `p[9]` | `p[8:6]` | `p[5:3]` | `p[2:0]` | — |
| 32-bit word `w` | `w[31:26]` | `w[25]` | `w[24:22]` | — | — | `w[21:0]`, signed |

The program counter counts 16-bit parcels. A parcel at an even address is
the upper half of its memory word. A 32-bit instruction may start at an odd
parcel and so cross into the next word.

Register fields:
- Values 0 to 6 name registers R0 to R6.
- Value 7 as a source is the LDQ head. The head is popped when the
  instruction issues.
- Value 7 as a destination is the SDQ tail.
- In loads and stores, Ri = 0 means the constant 0, not R0.

### Opcodes

The opcode values are this design's own. Codes 0x00 to 0x17 are 16-bit
instructions; codes from 0x18 up are 32-bit ones.

| Code | Mnemonic | Operation |
|---|---|---|
| 00–06 | ADD, SUB, RSUB, OR, AND, XOR, NOT | `Ri ← Rj op Rk` (SUB is Rj−Rk, RSUB is Rk−Rj, NOT is ~Rj) |
| 07 | SHL | `Ri ← Rj << Rk`; a count of 32 or more gives 0 |
| 08 | MOV | `Ri ← Rj` |
| 09–0B | LDR, LDR+pre, LDR+post | `LDQ ← mem[Ri+Rj]`; the pre and post forms also write Ri ← Ri+Rj |
| 0C–0E | STR (3 forms) | `SAQ ← Ri+Rj` |
| 0F–11 | ALDR (3 forms) | like LDR, but the data goes to the *other* processor's LDQ |
| 12–14 | ASTR (3 forms) | like STR, but the data comes from the other processor's SDQ |
| 15 | RFB | `Ri ← BRj` (read the background file) |
| 16 | RTB | `BRi ← Rj` (write the background file) |
| 17 | HALT | stop fetching (an unknown opcode also halts) |
| 18–1A | LD (3 forms) | `LDQ ← mem[Ri+disp]` |
| 1B–1D | ST (3 forms) | `SAQ ← Ri+disp` |
| 1E–20 | ALD (3 forms) | alternate load, displacement form |
| 21–23 | AST (3 forms) | alternate store address, displacement form |
| 24 | ENTER | `Ri ← disp` |
| 25–29 | ADDI, SUBI, ORI, ANDI, XORI | `Ri ← Ri op disp` |
| 2A–2F | IPBR GT, LT, EQ, LE, GE, NE | internal prepare-to-branch on `Ri` compared with 0 |
| 30–35 | PBR GT … NE | external: same, and the outcome is pushed to the other processor |
| 36 | PBRQ | prepare-to-branch taking its outcome from the branch queue |
| 37 | IPBRR | unconditional, target `Ri + disp` |
| 38 | PCALL | prepare-to-call, PC-relative target |
| 39 | PRET | prepare-to-return to the address in background R7 |

Details of the branch targets and autoincrement:
- Branch displacements are in parcels, relative to the address of the
  prepare instruction itself.
- Autoincrement: the *pre* form uses and stores the incremented address. The
  *post* form uses the old Ri and then stores Ri + offset.

## The pipeline and its interlocks

Each processor has three stages, one clock each:

1. **Fetch.** The I-cache is read combinationally at PC and PC+1, so a 16-
   or 32-bit instruction arrives in one clock. It is registered in the IR.
2. **Issue.** The instruction is decoded and its operands read from the
   register file or the LDQ head. All hazards are checked here. Loads and
   stores compute their address and enter the load address buffer or the
   store address queue (SAQ). Branch conditions are evaluated.
3. **Execute.** The ALU or the shifter runs. The result is written to a
   register or to the SDQ tail at the end of the clock.

There is no bypass path, so an instruction that uses the result of the
instruction directly ahead of it waits one clock. Issue stalls, and holds
the IR, while any of the following holds:

| Stall | Condition |
|---|---|
| register hazard | a source register is the destination of the instruction in execute |
| LDQ empty | a source field is 7 and the LDQ has no data yet |
| SDQ full | the destination is 7 and the SDQ cannot take one more (counting the one in execute) |
| SAQ full | a store address has no room |
| LDQ reservation | a load finds no free LDQ slot (own LDQ, or the other processor's for ALDQ) |
| load buffer full | the memory port has not yet sent earlier loads |
| branch queue full | an external PBR and the other processor's branch queue is full |
| branch queue empty | PBRQ and no outcome has arrived yet |

**LDQ slot reservation.** Memory returns read data in request order, and it
is pushed into the LDQ as it arrives. This can never overflow, because:
- each load reserves a slot when it issues;
- data arriving from memory fills a reserved slot.

A slot is free when it is neither filled nor reserved. The two processors
may reserve in the same clock, one with its own load and one with an ALDQ
from the other side. To keep the rule simple and free of combinational
paths between the processors:
- an own load needs one free slot;
- an alternate load needs two.

A load that takes its base address from the LDQ head pops that head as it
issues. It is therefore allowed to reserve even when the queue is full.
Without this rule such a load could wait forever.

**Prepare and exit.** A prepare instruction records a pending branch: its
target, and whether it is taken. The next instruction with its E bit set
ends the wait:
- If the branch is taken, control continues at the target after that
  instruction.
- If not, execution falls through.
- A prepare with its own E bit set is an ordinary branch.

An exit costs no clock when fetch can see it coming. If a taken branch is
already pending when fetch reads an instruction with its E bit set, fetch
goes straight on at the target. Otherwise, for example when the prepare
itself carries the E bit, the redirect comes from issue, and one fetched
instruction is dropped.

**Call and return.**
- At the exit of a PCALL, the register files swap. The return address goes
  into R7 of the file that has just become background.
- A PRET reads that R7 when it issues. At its exit the files swap back.
- RFB and RTB copy between the files. With field value 7 on the background
  side they reach the saved PC, so software can spill it to a stack for
  deeper calls.

## Decoupled operation

Both processors are the same. `pipe_system` wires them together with the
following cross links:

- **Branch queues.** An external PBR pushes its outcome bit into the other
  processor's branch queue. It stalls while that queue is full. A PBRQ
  pops the head of its own branch queue as its outcome. In this way the
  access processor can steer the loop of the execute processor.
- **Alternate loads (ALDQ).** The access processor sends the address and
  tags the request so that memory returns the data on the *other*
  processor's read bus. The slot in that processor's LDQ is reserved when
  the ALDQ issues.
- **Alternate stores (ASAQ).** The access processor queues the store
  address. The data is whatever reaches the head of the execute processor's
  SDQ. The address and the data must meet, as described next.

There is no mode register. Independent, access/execute and mixed operation
are only different ways of programming the same hardware.

## Memory buses and store pairing

Each processor has its own two unidirectional buses. The outgoing bus,
`bus_o` of type `mem_req_t`, carries one beat per clock, and a beat is
accepted when `bus_ready` is high. Its beat types are:

| Beat | Meaning |
|---|---|
| `MEM_LOAD` | read; data to own LDQ |
| `MEM_ALOAD` | read; data to the other processor's LDQ |
| `MEM_IFETCH` | read; data to own I-cache |
| `MEM_STADDR` | store address; data follows on this bus in the next beat |
| `MEM_ASTADDR` | store address; the data is on the other processor's bus **in the same clock** |
| `MEM_STDATA` | store data |

The read bus, `rd_i` of type `mem_rd_t`, returns one word per clock, with a
flag that says whether it is for the I-cache or for the LDQ.

Stores are sent when the heads of the store address queue and the store
data queue can be paired:
- An own store (address and data from the same processor) takes two beats
  on that processor's bus: the address, then the data.
- An ASAQ store takes one beat on each bus in the same clock. The
  address-side port raises `alt_req`, and the data-side port answers with
  `alt_gnt` when its SDQ head is ready and its bus is free.

`alt_req` never depends on the other side's signals, so there is no
combinational loop. When both processors ask for each other's data at once,
processor 0 serves first.

A beat is taken in a clock where its bus's `bus_ready` is high. An ASAQ
store is only sent when both buses are ready. The memory must pair each `MEM_ASTADDR` with the `MEM_STDATA`
on the other bus, and return reads in request order.

The port's priority order is:
1. the data beat of an own store;
2. serving the other processor's ASAQ;
3. I-cache refill;
4. stores;
5. loads from the load address buffer.

## Sizes

| Parameter | Default | Where |
|---|---|---|
| word width | 32 | `pipe_pkg::XLEN` |
| LDQ depth | 8 | `pipe_processor.LDQ_DEPTH` |
| SAQ, SDQ depth | 4 | `pipe_processor.Q_DEPTH` |
| branch queue depth | 4 | `pipe_processor.BQ_DEPTH` |
| load address buffer | 4 | `pipe_mem_if.LB_DEPTH` |
| I-cache | 64 lines × 4 words, direct mapped (512 parcels) | `IC_LINES`, `IC_LINE_WORDS` |
| reset PCs | processor 0 at 0, processor 1 at parcel 0x1000 | `pipe_system.RESET_PC0/1` |

Only the word width, the formats and the single-clock rates come from the
original architecture description. Every depth and size above is this
design's choice. The description also mentions that the word could shrink
to 16 bits; this design keeps 32.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs:

- The small blocks (FIFO, LDQ, register file, ALU, shifter, address logic,
  decoder) are compared with reference models on thousands of random
  operations.
- `tb_pipe_icache` checks hits, misses, refills and odd-PC 32-bit fetches.
- `tb_pipe_mem_if` checks the timing of an own store (two beats), an ASAQ
  store (one beat per bus), one load per clock, and the refill priority.
  It also runs random traffic under back-pressure.
- `tb_pipe_processor` runs single-processor programs: the vector max/min
  loop, call and return with the file swap, ALU and immediate operations,
  addressing modes and branch forms. It also runs loads whose base or index
  is the LDQ head, an ALU result written straight into the SDQ, and a
  background register loaded from the LDQ. Finally it checks an issue rate
  of one instruction per clock on straight-line code.
- `tb_pipe_system` runs the top at its default parameters against the
  memory model:
  - First, the max/min loop split into an access program and an execute
    program, on 64 elements. Then twelve extra alternate stores: in the
    first six the store addresses come late, so the SDQ fills up. In the
    other six the data comes late, so the SAQ fills up. This phase takes
    1100 clocks.
  - Then independent programs on both processors, with a memory that
    refuses 70% of beats. This phase takes about 2300 clocks, depending on
    the random stalls.

  It counts and requires every stall type listed above, plus both kinds of
  exit, I-cache refills, own and alternate stores, alternate loads,
  register file swaps and branch queue pushes.

Limits of the testing:
- There is no formal proof.
- The memory model is the only memory the design has run against.

### Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/pipe_pkg.sv tb/pipe_asm_pkg.sv \
  $(ls rtl/*.sv | grep -v pipe_pkg) tb/pipe_memory_model.sv \
  tb/tb_pipe_system.sv --top-module tb_pipe_system -Mdir obj -o sim
./obj/sim
```

Replace `tb_pipe_system` to run another testbench.

Programs are written with the `pipe_asm` class in `tb/pipe_asm_pkg.sv`. It
has three kinds of call:
- `i16(op, e, ri, rj, rk)` emits a 16-bit instruction;
- `i32(op, e, ri, disp)` emits a 32-bit one;
- `br(op, e, ri, "label")` emits a branch to a label.

The program is built twice so that forward labels resolve. The result is
then copied into the memory model.

## Departures and what is not built

Not built:
- Shifts other than the left shift.
- Interrupts and traps (the architecture leaves them open).
- A data cache.
- Any check of a load against older pending stores. Software must order
  dependent memory accesses.

Choices that go beyond the architecture description:
- The opcode values, HALT and a register MOV (used by the example programs
  as `R4 ← LDQ`).
- The three-stage pipeline without bypass.
- The queue depths.
- The reset state: registers 0, queues empty, file 0 in the foreground.
- Two readings of points the description leaves open:
  - The second subtract is the reverse subtract Rk − Rj.
  - Branch targets are relative to the prepare instruction.

The access/execute programs that the system test runs follow the
structure of the architecture's max/min example. In the execute program,
the second conditional test jumps to the final `PBRQ` exit that closes the
loop.
