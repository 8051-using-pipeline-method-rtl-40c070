# PA8051: a five-stage pipelined 8051 core

This is an 8051 microcontroller core cut into a five-stage pipeline. The stages are
instruction fetch (IF), decode (ID), operand fetch (OF), execute (EXE) and write-back (WB).
A shared memory unit sits beside the pipeline and holds the internal RAM, the special
function registers (SFRs) and the hazard bookkeeping. The original design was
self-timed: each stage handed an instruction on as soon as the next stage was free. This
RTL keeps the same stages, channels and hazard rules, but runs every stage on one clock,
with valid/ready handshakes between stages.

The 8051 makes pipelining awkward in three ways:

- Every operand is a memory location. ACC, B, DPTR, SP, the ports and R0–R7 are all
  addresses in the same 256-byte space.
- R0–R7 move with the bank-select bits of PSW.
- `@Ri` reads an address that is itself held in RAM.

Two mechanisms deal with this:

- **Memory locks** handle data hazards. A lock is the set of addresses an instruction
  will write, registered when it fetches its operands. A later reader is then either
  forwarded the value or made to wait.
- **A colour bit** handles jumps. Every instruction carries a colour, and a taken jump
  flips the current colour, so instructions fetched down the abandoned path are recognised
  and dropped.

```
 ROM ──► IF ──► ID ──► OF ──► EXE ──► WB
               │ ▲     │ ▲             │
          ID2MEM │  OF2MEM │ (lock)     │ Write_Back
               ▼ │     ▼ │             ▼
          RAM_READ_ARBITOR ──► MEM_INTERFACE (ACC, PSW, locks) ──► MEM (RAM, SFRs, P0–P3)
   WB ──JMP──► ID   (a taken conditional jump: ID redirects IF and flips its colour)
```

## Three control words per instruction

ID turns each instruction into three control words, one for each later stage:

| word | used in | values | says |
|---|---|---|---|
| ReadCtrl | OF | 29 (`read_ctrl_e`) | which locations to read, e.g. `ACC_REG` (A and Rn), `SP_SPI` (SP and @SP), `IMM16` |
| Opcode | EXE | 44 (`exe_op_e`) | the operation, e.g. `ADD`, `DJNZ`, `BCMPNZC` (JBC), `INC16` (INC DPTR) |
| WriteCtrl | WB | 13 (`write_ctrl_e`) | what to write back, e.g. `ACC_MEM` (A and a location), `JMP_MEM` (write and maybe jump) |

OF fills the EXE operands as follows:

- `src1` and `src2` are the two operands. For a "read X and Y" control, X goes to `src1`
  and Y to `src2`. A control that reads one value places it in both.
- `src3` is the resolved write-back address (Rn, `@Ri`, a bit's byte, SP+1). For
  `JMP @A+DPTR` it is DPH instead.

EXE produces `dest1` and `dest2`. A plain move copies `dest1 = src1` and `dest2 = src2`.
WB then writes:

- `dest1` to a fixed address: ACC, SP, DPL, or a stacked byte.
- `dest2` to the resolved write-back address.

This is how two-byte results are written at once: `XCH`, `MUL AB`/`DIV AB` (A and B),
`MOV DPTR,#`/`INC DPTR`, and `PUSH`/`POP` (new SP and the data byte).

Every instruction goes through all five stages, even a move that does nothing in EXE.
Results therefore always complete in order.

The exceptions are the 21 unconditional jumps, which finish in ID: NOP, AJMP×8, LJMP,
SJMP, ACALL×8, LCALL and RET. RETI is handled like RET. ID redirects IF and sends nothing
on.

A call or return has to touch the stack, which ID cannot write itself. ID handles it in
three steps:

1. It waits until nothing is left in OF, EXE or WB.
2. It reads SP through the read arbiter. A return also reads `@SP` and `@(SP-1)`.
3. It feeds OF ordinary moves. For a call these are a byte-pair move that stores the
   return address at SP+1 and SP+2, followed by a move of the new SP. For a return, one
   move writes SP−2. A return redirects IF once the stacked address has been read.

`MOVC A,@A+DPTR` and `MOVC A,@A+PC` read a byte from program memory. They use the same
drain-and-read path:

1. ID waits for an empty pipeline.
2. It reads A, DPL and DPH through the arbiter.
3. It forms the code address. This is A plus DPTR, or A plus the address of the next
   instruction.
4. It reads that byte on a separate code read port (`code_rd`/`code_addr`/`code_data`,
   one-cycle read), then hands OF a `MOV A,#byte`.

The separate port means a table lookup never disturbs the instruction buffers.

## Data hazards: the lock queue in MEM_INTERFACE

This part is the hardest to follow, and it decides correctness.

When MEM_INTERFACE answers an OF request with *valid*, the request also *locks*: it
pushes an entry into a two-deep queue. The newest entry is RD11/RD12 and the previous one
is RD21/RD22. An entry holds:

- the `dest1` address (RD11 or RD21);
- the resolved `dest2` address (RD12 or RD22);
- a bit saying whether the instruction writes CY/AC/OV.

An empty address is FFh. Each instruction leaving WB removes the oldest entry. With one
instruction per stage, at most two instructions sit between OF and the end of WB, and an
assertion (`a_lock_depth`) checks this.

For each operand location a request reads:

| situation | answer |
|---|---|
| location matches RD11 | valid, forward code "take EXE's `dest1`" (type 1) |
| location matches RD12 | valid, forward code "take EXE's `dest2`" (type 1) |
| location matches RD21/RD22 | not valid: wait one cycle (that write lands at the end of this cycle) |
| `@Ri` pointer register, or SP for a stack access, is locked | not valid (type 2, e.g. `INC R1` / `ADD A,@R1`) |
| Rn or `@Ri` access while PSW is locked | not valid (type 3, e.g. `SETB RS0` / `MOV dir,Rn`) |
| PSW read while PSW or a flag writer is locked | not valid |

The forward code travels with the instruction to EXE. EXE still holds `dest1`/`dest2` of
the instruction just ahead, so it substitutes them for `src1`/`src2`.

The design's original forward codes are SRC121, SRC221, SRC122, SRC222 and SRC1_2. Here
they are carried as one 2-bit choice per source (none, `dest1`, `dest2`), which covers the
same cases.

A request that is not valid is simply presented again in the next cycle. OF holds it and
RAM_READ_ARBITOR re-issues it, so the stall needs no extra control.

ACC and PSW live in MEM_INTERFACE rather than in MEM, because nearly every instruction
reads them. PSW bit 0 (parity) is computed from ACC whenever PSW is read.

EXE keeps its own copy of CY/AC/OV. A carry chain such as `ADD` then `ADDC`, or `CLR C`
then `SUBB`, therefore runs without waiting. That copy follows every flag update and every
write of the whole PSW byte made by a live instruction.

## Control hazards: the colour bit

ID stamps every instruction with its current colour. EXE holds a colour register.

- If an instruction's colour differs from the register, EXE turns it into a NOP.
- The NOP still travels to WB, so its lock entry is released.
- A taken conditional jump (`JC`, `JNZ`, `CJNE`, `DJNZ`, `JBC`, `JMP @A+DPTR`, …) flips
  the register and, through WB's `jmp`, flips ID's colour too. ID then redirects IF to the
  target and drops any half-collected bytes.

MEM_INTERFACE also keeps a colour copy:

- In the jump cycle it makes OF wait.
- It clears the lock addresses, because every instruction still in flight is on the
  abandoned path.
- It grants wrong-colour requests without locking or forwarding.

## Instruction fetch

IF has two 32-byte buffers that act as a small instruction cache in front of the 4 KB
ROM. Each buffer holds one aligned block with a tag and a valid bit per byte, so a byte
can be handed to ID as soon as it has arrived.

- On a miss in both buffers, one buffer is filled with PC's block starting at PC's offset,
  then the other with the following block (64 bytes).
- While one buffer is being read, the other is loaded with the next block. Straight-line
  code therefore crosses block borders without waiting.

The ROM port issues one address per cycle and expects the byte one cycle later.

## Memory unit

MEM holds:

- the 128-byte internal RAM (00h–7Fh);
- SP, DPL, DPH and B;
- the port latches P0–P3, which are the core's outputs.

Other SFR addresses read as 0.

MEM has one pointer read port (Ri or SP). That pointer's result addresses three operand
read ports. There are two write ports, and port 2 wins on a clash. With these ports, one
operand fetch completes in one cycle.

RAM_READ_ARBITOR lets ID and OF share MEM_INTERFACE, with OF first.

## Where this RTL departs from the self-timed original

- **One clock.** There is one clock and synchronous active-low reset. Stages exchange
  valid/ready, or request/grant at the arbiter, and each holds one instruction. The
  original used self-timed handshake channels.
- **Older-lock match waits.** The original argues that by the time the third instruction
  fetches, the first has finished writing. Here the first's write lands at the end of that
  same cycle, so a match on the older lock pair waits one cycle instead of reading memory.
- **Lock details are this design's own.** The following are not in the original's
  description:
  - the flag bit in each lock;
  - clearing the locks on a jump;
  - the colour copy in MEM_INTERFACE;
  - checking type 2 and type 3 against both lock pairs.
- **Calls and returns in ID** work as described above. The original does not say how its
  ID stage writes the stack.
- **MOVC has its own ROM port.** The original does not say how MOVC reaches the program
  ROM. Here the ROM is read through a second read port (see above), so the ROM model must
  answer two addresses per cycle.
- **Not executed:** MOVX (external memory) and the undefined opcode A5h. ID skips them as
  NOPs of the right length.
- **Not present:** I/O beyond the port latches, timers, the serial port and interrupts.
- **Multiplier and divider** are single-cycle. DIV by zero sets OV and leaves A and B
  unchanged.

## Size

A generic `yosys synth` of each module at default parameters gives the counts below. These
are word-level cells (adders, comparators, multiplexers, gates), not FPGA slices.

| block | cells | flip-flop bits | memory bits |
|---|---|---|---|
| IF | 111 | 58 | 600 (two 32-byte buffers with tags and valid bits) |
| ID | 432 | 132 | – |
| OF | 88 | 67 | – |
| EXE | 198 | 80 | – |
| WB | 22 | – | – |
| RAM_READ_ARBITOR | 6 | – | – |
| MEM_INTERFACE | 243 | 53 | – |
| MEM | 105 | 64 | 1024 (internal RAM) |
| whole core | 1200 | 454 | 1624 |

As in the self-timed original, ID is the largest stage by far, because it holds the decode
table for all 256 opcodes. The two large multiplexers come next: EXE's choice among 44
operations, and MEM_INTERFACE's address resolution and lock compare.

## Files

| file | block |
|---|---|
| `rtl/pa8051_pkg.sv` | shared constants, the three control enums and the records passed between stages |
| `rtl/pa8051_top.sv` | the core; parameters `BUF_BYTES` (32) and `ROM_ABITS` (12) |
| `rtl/pa_if.sv` | IF: ROM interface, two buffers, fetch controller |
| `rtl/pa_id.sv` | ID: byte collection, decode table, jumps, calls and returns, MOVC, colour |
| `rtl/pa_of.sv` | OF: MemRead with lock, operand multiplexer |
| `rtl/pa_exe.sv` | EXE: forwarding, ALU/MUL/DIV, flag copy, colour check |
| `rtl/pa_wb.sv` | WB: MemWrite and `jmp` |
| `rtl/pa_ram_read_arbitor.sv` | read arbiter between ID and OF |
| `rtl/pa_mem_interface.sv` | ACC, PSW, address resolution, lock queue, forward and stall decisions, writes |
| `rtl/pa_mem.sv` | RAM, SFRs, ports |

Every module has a testbench of the same name with a `tb_` prefix in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.

- `tb_pa8051_top` holds the ROM as an array and runs two programs at the core's default
  parameters. It prints how often each mechanism fired: forward, stall types 2 and 3,
  flush, taken jump, jump in ID, buffer miss, call, return, MOVC, ID read. A mechanism that
  never fired counts as a failure.
  - **A hazard program** has results worked out by hand. It covers forwarding, both stall
    types, a DJNZ loop, MUL/DIV, DPTR, PUSH/POP, LCALL/RET, both MOVC forms, and a dependent chain after
    a taken jump. The final RAM, SP, B and P1 are checked.
  - **Euclid's GCD by subtraction** runs for 16 operand pairs, fixed and random. The
    result on P1 is checked. In these runs the core averages close to three cycles per
    instruction that reaches WB.
- The block testbenches compare against reference models or tables written in the
  testbench:
  - an ALU model for EXE;
  - a memory model for MEM;
  - the read-control table for OF;
  - a random ROM for IF;
  - an expected record stream for ID;
  - directed lock scenarios for MEM_INTERFACE.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/pa8051_pkg.sv rtl/pa_*.sv rtl/pa8051_top.sv \
          tb/tb_pa8051_top.sv --top-module tb_pa8051_top -o sim
./obj_dir/sim
```

Swap the testbench file and `--top-module` to run another one. The package must come
first on the command line.

## Changing it

- **Buffer size.** `BUF_BYTES` must be a power of two.
- **ROM size.** `ROM_ABITS` sets it. The 16-bit PC wraps at the ROM size.
- **Adding an instruction.** Three places are involved:
  - its decode entry in `pa_id.sv` (`decode`, plus `ilen` for its length);
  - if it needs new operand locations, a read control in `pa_of.sv`;
  - the operation in `pa_exe.sv`.

  If it writes PSW or its flags, make sure `writes_flags` in `pa_of.sv` knows. Otherwise
  readers of PSW will not wait for it.
