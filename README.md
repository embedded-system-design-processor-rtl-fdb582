# RV64 five-stage pipeline built from guarded stage FIFOs

This is a 64-bit, in-order, five-stage RISC-V processor (IF, ID, EX, MEM, WB).
It is organised the way a rule-based design (such as Bluespec's guarded atomic
actions) would organise it. Each pipeline stage is one "rule": a block of logic
that fires in a cycle only when its guard holds. The guard is that its input
FIFO has an instruction and its output FIFO can take one. When the rule fires,
it takes the first entry, does its work and enqueues the result. The four
inter-stage registers (IF/ID, ID/EX, EX/MEM, MEM/WB) are therefore one-entry
FIFOs and not plain flip-flops. Stalls and flushes are expressed as extra terms
in a stage's guard, or as a clear of a FIFO.

On top of this rule/FIFO skeleton sits the classic five-stage datapath: a
program counter with a +4 adder and a branch-target select, instruction
memory, a decoder with a separate ALU control, a sign-extension (immediate)
unit, a 32 × 64-bit register file, an ALU, a branch adder, data memory, a
load-use hazard unit and a forwarding unit.

The processor executes 39 instructions:

* all 29 operations of its ALU operation list: ADD, SUB, SLL, SLT, SLTU, XOR,
  SRL, SRA, OR, AND, MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM, REMU, LUI,
  AUIPC, ADDI, SLTI, SLTIU, XORI, ORI, ANDI, SLLI, SRLI, SRAI;
* JAL;
* LW, SW and SD;
* the six conditional branches BEQ, BNE, BLT, BGE, BLTU and BGEU.

Any other instruction word runs through the pipeline as a no-operation.

## How a cycle is evaluated

Everything in `rv64_pipeline` is evaluated in one combinational pass per
cycle. The pass runs from the back of the pipeline to the front. That order
matters, because each stage's "can enqueue" depends on whether the stage
after it is dequeuing in the same cycle.

| stage | fires when (guard) | then |
|---|---|---|
| WB  | MEM/WB not empty | writes the register file, dequeues MEM/WB, shows the instruction on `retire_*` |
| MEM | EX/MEM not empty and MEM/WB can take an entry | reads or writes `dmem`, enqueues {pc, rd, value} |
| EX  | ID/EX not empty and EX/MEM can take an entry | forwards operands, runs the ALU and branch unit, enqueues the result; a taken branch or JAL raises `redirect` |
| ID  | IF/ID not empty, ID/EX can take an entry, no load-use hazard, no `redirect` | decodes, reads registers, builds the immediate, enqueues the ID/EX record |
| IF  | running, IF/ID can take an entry, no `redirect` | reads `imem` at the PC, enqueues {pc, instr}, PC += 4 |

`pipe_fifo` reports `not_full` when it is empty *or when it is being dequeued
in this cycle*. This is the pipeline-FIFO behaviour. Without it, a one-entry
FIFO between every pair of stages would halve the throughput. With it, a full
pipeline advances one step per cycle, exactly as if the FIFOs were pipeline
registers.

WB and MEM always fire when they have work, because nothing downstream can
block them. Only two events hold the pipeline:

* **Load-use stall.** If ID/EX holds an LW whose destination (not x0) is a
  source of the instruction in ID, `hazard_unit` removes ID's guard for one
  cycle. IF/ID stays full, so IF's guard fails too (back-pressure), and one
  bubble goes down the pipeline. In the next cycle the load is in EX/MEM. Its
  consumer enters EX one cycle later still, when the load has reached MEM/WB,
  and takes the value from there.
* **Redirect.** A taken branch or JAL is resolved in EX. In that cycle, IF/ID
  is cleared, ID does not fire (its instruction is on the wrong path), and the
  fetch of that cycle is dropped. The PC loads `pc + imm`. Two younger
  instructions are lost, so a taken control transfer costs two bubbles. JAL
  writes `pc + 4` into `rd`; that value is computed in EX, so it can be
  forwarded like any ALU result.

**Forwarding.** `forward_unit` selects each EX operand from one of three
sources. It takes EX/MEM's result if that instruction writes the register,
else MEM/WB's write value, else the value read in decode. The youngest source
wins, and x0 is never forwarded. The register file passes a value being
written in the current cycle straight through to its read ports. Because of
this, an instruction three slots behind its producer reads the correct value
in ID without any forwarding.

## Timing

* A dependence-free stream retires one instruction per cycle.
* After the `start` pulse, instruction *i* is fetched in cycle *i + b*, where
  cycle 0 is the first cycle after the pulse and *b* counts the bubbles
  before it. It is decoded one cycle later, plus one more cycle if it must
  wait for a load. It executes the cycle after decode, and its write is
  visible on `retire_*` three cycles after decode.
* Cost per event: one bubble for a load-use pair, two for a taken branch or
  JAL, nothing for forwarding.

For the sequence (LW, LW, ADD) × 4, where each ADD uses the two loads just
before it, the testbench measures the following:

| # | instr | fetch | decode | execute | write-back |
|---|---|---|---|---|---|
| 0 | LW  | 0 | 1 | 2 | 4 |
| 1 | LW  | 1 | 2 | 3 | 5 |
| 2 | ADD | 2 | 4 | 5 | 7 |
| 3 | LW  | 4 | 5 | 6 | 8 |
| … | … | … | … | … | … |
| 11 | ADD | 14 | 16 | 17 | 19 |

The twelve instructions take 12 issue slots plus 4 load-use bubbles. Loading
the program beforehand takes one cycle per instruction.

Multiply and divide finish in a single cycle, as combinational logic in the
ALU. This keeps the pipeline uniform. It also puts a 64-bit divider on the EX
critical path, which a real implementation would replace with an iterative
unit and a busy guard on EX.

## Interface of `rv64_pipeline`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the FIFOs, the PC, the registers and the counters) |
| `load_en`, `load_addr`, `load_instr` | in | 1, 64, 32 | write one instruction at a byte address into the instruction memory |
| `start` | in | 1 | one-cycle pulse: PC ← 0, start fetching, clear the counters; only while `busy` is low (asserted) |
| `halt` | in | 1 | one-cycle pulse: stop fetching; instructions already fetched complete |
| `busy` | out | 1 | fetching, or any FIFO holds an instruction |
| `retire_valid`, `retire_pc` | out | 1, 64 | an instruction leaves WB this cycle |
| `retire_we`, `retire_rd`, `retire_data` | out | 1, 5, 64 | the register write it makes |
| `dbg_reg_addr` → `dbg_reg_data` | in → out | 5 → 64 | read any register at any time |
| `cycles`, `instret`, `stalls`, `flushes` | out | 64 each | busy cycles (the clock register), retired instructions, load-use stall cycles, taken branches and jumps |

A typical run has four steps:

1. Hold reset, then write the program with `load_en`, one instruction per
   cycle, starting at address 0.
2. Pulse `start`.
3. Watch `retire_*` until the program reaches its last instruction. A
   jump-to-self (`jal x0, 0`) is a convenient end marker.
4. Pulse `halt`, wait for `busy` to fall, and read the results through the
   debug port.

Data memory has no external port. Programs put their data there with
stores, and testbenches may write it hierarchically.

## Memories

`imem` and `dmem` are byte-addressed. Each defaults to **4 GiB**
(`IMEM_BYTES`, `DMEM_BYTES` = 2^32), which covers a full 32-bit address
space. Higher address bits are ignored.

* `imem` stores two instructions per 64-bit word. Bit 2 of the address picks
  the instruction within the word.
* `dmem` has byte write strobes. LW reads the 32-bit half selected by bit 2
  and sign-extends it. SW writes four bytes and SD eight.
* Accesses are assumed to be naturally aligned. Nothing traps.
* Both memories read combinationally and write on the clock edge. This keeps
  IF and MEM at one cycle each. A synchronous (block-RAM) memory would need
  the stage guards reworked.

Each memory is split into banks of at most 1 GiB (`MAX_BANK_BYTES`). The bank
is selected by the address bits above the bank size. Tools limit the size of
one array: verilator accepts at most 2^28 entries, and slang at most 2^31
bytes. A 1 GiB bank of 64-bit words is within both limits.

Simulating at the default size allocates 8 GiB of host memory.

## Where this design goes beyond, or departs from, its source

These points follow the source description:

* the five stages and their order;
* FIFOs between the stages;
* the hazard and forwarding units;
* the ALU operation list and its encoding (ADD = 0, SUB = 1, SLL = 2, … in
  list order);
* the 64-bit register width;
* the 4 GiB memory sizes;
* the clock (cycle) register;
* loading the program into instruction memory through a load method, a
  result method and a halt method.

These are choices made here, because the source does not give them:

* **Instruction encodings.** The funct3/funct7 values come from the RISC-V
  specification.
* **SD opcode.** SD uses the RISC-V store opcode (0100011, funct3 011). The
  source lists SD with the register-register opcode, which cannot hold its
  immediate.
* **Branches.** The conditional branches were added because the source shows
  the SB-type format and a branch path in its datapath, and speaks of about
  40 instructions. No JALR, no LD, and no 32-bit "W" operations are
  implemented.
* **Stage order.** One description of the stage rules puts memory access
  before execute. This design uses the usual order, IF, ID, EX, MEM, WB,
  which the rest of the source also uses.
* **Immediates.** The datapath drawing shows a MIPS-style 16→32 sign extender
  and a "shift left 2" before the branch adder. Here the immediates are the
  RISC-V ones, extended to 64 bits, and no shift is applied (RISC-V offsets
  are already byte offsets).
* **Other details chosen here:**
  * one-entry FIFOs;
  * branch resolution in EX with a two-instruction squash;
  * write-through register file;
  * registers reset to zero;
  * unknown instructions run as no-operations;
  * the start/halt/busy/retire/debug port form;
  * single-cycle multiply and divide, with RISC-V results for division by
    zero and overflow;
  * the event counters other than the cycle counter.
* **Caches.** The datapath drawing labels the memories "instruction cache"
  and "data cache". No tags, misses or refill are described, so both are
  plain memories of the full 4 GiB size.
* **Bubble insertion.** The drawing inserts a load-use bubble by zeroing the
  control signals through a multiplexer. Here the decode rule's guard is
  dropped for one cycle instead, which leaves ID/EX empty. The effect is the
  same.
* **Measured timing.** In the source's measured stage times for
  (LW, LW, ADD) × 4, fetches fall two time steps apart after the first
  bubble. This design fetches every cycle except during a bubble, so the
  twelve instructions finish sooner (last write-back in cycle 19 after start).
* **Not built.** The source's parameter list also sizes a reorder buffer, an
  issue queue, several hardware threads, SIMD registers, a physical register
  file and wider fetch/issue. The source names these only as future work, so
  none of them is built.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* **Unit tests.** Each leaf block is compared with a reference written in the
  testbench. For example, the ALU's multiply-high is checked against 32-bit
  partial products, and its signed divide against an unsigned divide with
  sign fix-up. The register file, FIFO and memories are compared with array
  models.
* **`tb_rv64_pipeline`** first runs a directed loop program: a sum and a
  factorial computed with backward branches and multiplies, then a doubleword
  store read back with LW. It then runs 100 random programs with 8 KiB
  memories. The random programs mix every instruction class, with dense
  register reuse, forward branches and jumps, and undefined words. The
  testbench compares every retired instruction against an instruction-set
  model (`tb_rv_iss`), then checks all registers and the whole data memory
  after a halt-and-drain. It also counts how often each pipeline mechanism
  occurred, and fails if one never did:
  * load-use stalls;
  * forwarding from EX/MEM and from MEM/WB;
  * register-file write-through;
  * taken and not-taken branches, and JAL;
  * fetch back-pressure;
  * SW, SD and LW;
  * multiply and divide;
  * no-operation words;
  * halt with drain.
* **`tb_rv64_full`** uses the default 4 GiB memories. It runs the two example
  programs: (LW, LW, ADD) × 4, and LW, ADD, SW, SUB, JAL. It checks the
  fetch, decode, execute and write-back cycle of every instruction against
  the timing rule above, along with results and counters.

To run one testbench with plain verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rv_pkg.sv tb/tb_rv_enc.sv tb/tb_rv_iss.sv tb/tb_rv64_pipeline.sv \
  --top-module tb_rv64_pipeline -Mdir obj
./obj/Vtb_rv64_pipeline
```

The other testbenches follow the same pattern: replace the testbench file and
the top-module name. `-Irtl` lets verilator find each module in
`rtl/<name>.sv`. `tb_rv64_full` needs about 8.5 GiB of memory and runs in
about half a minute.

## Files

* `rtl/rv_pkg.sv`: shared types. These are the ALU operation enum, the
  opcodes, the decoded-control record `ctrl_t`, and the record type of each
  FIFO.
* `rtl/rv64_pipeline.sv`: top level. Holds the stage guards and the wiring.
* `rtl/pipe_fifo.sv`: the one-entry pipeline FIFO. It has overflow and
  underflow assertions.
* `rtl/fetch_unit.sv`: PC, +4 adder, redirect select, and start/halt.
* `rtl/imem.sv`, `rtl/dmem.sv`: the banked memories.
* `rtl/control_unit.sv`, `rtl/alu_control.sv`, `rtl/imm_gen.sv`,
  `rtl/regfile.sv`, `rtl/hazard_unit.sv`: the decode stage.
* `rtl/alu.sv`, `rtl/branch_unit.sv`, `rtl/forward_unit.sv`: the execute
  stage.
* `rtl/perf_counters.sv`: the cycle register and the event counters.
* `tb/`: one `tb_<module>.sv` per module, `tb_rv64_full.sv`, the encoder
  package `tb_rv_enc.sv` and the reference model `tb_rv_iss.sv`.
