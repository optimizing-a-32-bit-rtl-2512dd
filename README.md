# A speed-optimised ARM7 core in SystemVerilog

This is a 32-bit integer core that runs the ARMv3 instruction set (the
instruction set of the ARM7 family, without Thumb, halfword transfers or long
multiplies). It uses the classic three-stage pipeline: fetch, decode and
execute. The design starts from a slow, behaviourally written ARM7 and makes
it faster without changing the architecture. The main changes are:

- the execute-cycle state machine is one-hot;
- the condition checker, block-transfer units, PSRs and register file are
  rebuilt as small structural blocks;
- the ALU adder is a Kogge-Stone parallel-prefix tree instead of a
  carry-select adder;
- the multiplier is a radix-4 (modified Booth) sequencer that reuses the
  barrel shifter and the ALU.

Everything described here is synthesisable RTL except `clock_gen`, which is a
timed model of the two-phase clock generator. The end-to-end test runs small
benchmark programs and every exception kind on the core, at its default
configuration.

## The pipeline and the clock

The source design clocks its datapath with two non-overlapping phases, phi1
and phi2. Data moves through a phase-1 latch and then a phase-2 latch in each
cycle. This RTL uses **one rising-edge clock, `mclk`**, and builds each
phase-1/phase-2 latch pair as one flip-flop. The mux codes and the order of
operations inside a cycle are kept. What is lost is latch-based
slack borrowing, which only matters for timing closure.

`clock_gen` still models the generator: two cross-coupled NOR gates and
buffer chains make phi1 and phi2 from `mclk`. Its gate and buffer delays are
parameters (`NOR_DELAY`, `BUF_DELAY`) with placeholder values. The
core brings phi1 and phi2 out as outputs but does not use them. Synthesis
sees the NOR pair as a combinational loop and drops the delays, so treat
`clock_gen` as a simulation model.

| Stage | Module(s) | What happens |
|---|---|---|
| Fetch | `if_stage`, `index_decoder` | Latches the word read from memory and its prefetch-abort flag. Predecodes it into a 10-bit one-hot *instruction index* (MRS, MFRI, MSR, DPI_IS, DPRS, MULT, SWAP, SDT, BDT, BBL), plus SWI and undefined flags. |
| Decode | `instr_decoder` | Splits the word into register indices, immediates, rotate and shift fields, and the opcode and P/U/B/W/L/S bits. Result is the struct `id_t`. |
| Execute | `exe_fsm`, `p1_control`, `p2_control`, datapath | Runs the instruction for one or more cycles. In its last cycle it fetches the next instruction. |

Because the fetch runs two words ahead, an instruction that reads R15 sees
its own address + 8, as on every ARM7.

## The execute stage: one-hot cycles and two control units

This is the hardest part to follow, and the part where this RTL supplies the
most detail of its own.

`exe_fsm` holds six one-hot states, EXE1 to EXE6. Every instruction starts in
EXE1. The next state depends on the instruction index and a few status
inputs:

- a multiply stays in EXE2 until the Booth sequencer reports `mult_done`;
- a block transfer stays in EXE3 until the block sequencer reports
  `bdt_done`;
- every other instruction steps forward one state per cycle.

Two more flags extend the state:

- `in_exc` marks an exception entry sequence;
- `dabt_seq` marks the data-abort sequence.

The pair (state, instruction index) is then reduced to a *cycle kind*: the
enum `cyc_t` in `arm7_pkg`, for example `CY_DP`, `CY_LDR3` or `CY_X1`. Both
control units take the cycle kind as input. This is the one-hot idea of the
design: each control output is a small function of a single active bit.

- **`p1_control`** sets register write enable and destination selection,
  register-bank mode, PSR writes, PC source, address-register source, the
  memory request lines, and interrupt flush/latch enables (struct `p1_t`).
- **`p2_control`** sets operand selection: the A and B register indices, the
  B-bus source, the BS mux (`00` zero, `01` block-transfer write-back size,
  `10` B bus, `11` BS latch), the shift-value mux (`00` zero, `01` Booth, `10`
  instruction, `11` latch), the ALU opcode mux (`00` MOV, `01` ADD, `10` SUB,
  `11` instruction/Booth), the ALU B-input mux (`00` shifter, `01` 4, `10` 0,
  `11` base latch), and the load-byte controls (struct `p2_t`).

Those mux encodings are the source design's. Which value each signal takes in
each cycle kind is this implementation's. The source gives each signal's
meaning but not its value per cycle.

### Cycle counts

| Instruction | Cycles |
|---|---|
| Data processing, MRS, MSR | 1 |
| Data processing with a register-specified shift | 2 |
| B, BL, or any instruction that writes R15 | 3 in total: the pipeline refills |
| MUL, MLA | 1 + one per radix-4 step (1 to 16 steps, early termination) |
| LDR, STR | 3 |
| LDR into PC | 5 |
| SWP, SWPB | 4 |
| LDM, STM of n registers | n + 3 (LDM with PC in the list: n + 5) |
| Exception entry | 3 |
| Data abort | 4 |

A failed condition costs one cycle. Memory is assumed to answer in the cycle
it is asked: there are no wait states.

## Datapath

- **Register file** (`register_file`): 31 general registers and the PC. FIQ
  banks R8–R14; SVC, ABT, IRQ and UND each bank R13–R14. It has two read
  ports, one write port and a separate PC port. Each register has its own
  decoded write enable, so there is no demultiplexer on the write data. Read
  and write can use different bank modes, which is how `LDM/STM ...^` reach
  the user bank.
- **Barrel shifter** (`barrel_shifter`): LSL, LSR, ASR and ROR by 0–255, plus
  RRX. It is built as cascaded 2:1 mux stages for both data and carry, with
  the ARM carry-out rules. These include amounts of 32 and above, and the
  immediate-zero encodings for LSR #32, ASR #32 and RRX.
- **ALU** (`alu`): the 16 ARM data-processing operations. All additions and
  subtractions go through one `kogge_stone_adder`. Logical operations take C
  from the shifter. V is the carry into bit 31 XOR the carry out.
- **Kogge-Stone adder** (`kogge_stone_adder`, parameter `WIDTH` = 32): a
  log2(WIDTH)-level prefix tree. A second instance adds 4 to the address
  register as the PC incrementer.
- **Booth multiplier** (`booth_multiplier`): the multiplier is loaded from the
  A bus and shifted right two bits per cycle. Each cycle, the three low bits
  are recoded into an ALU opcode and a shifter amount for the multiplicand
  (Rm), and the ALU adds the result into Rd:

  | Booth digit | Shift amount | ALU operation |
  |---|---|---|
  | 0 × M | 32 (shifts M to zero) | ADD |
  | ±1 × M | 2 × step | ADD or SUB |
  | ±2 × M | 2 × step + 1 | ADD or SUB |

  Rd is cleared first for MUL, or loaded with Rn for MLA. The sequence stops
  early once the remaining multiplier bits are all zeros or all ones.
- **PSRs** (`psr_block` holding `cpsr_reg` and five `spsr_reg`s, one each for FIQ, IRQ, SVC, ABT and UND): each PSR
  is split into separately written fields: flags, I, F and mode. This allows
  a flags-only write (`MSR ..._flg`) and a full write. In user mode, MSR
  changes only the flags. Exception entry saves CPSR into the SPSR of the new
  mode, sets I, and also sets F for FIQ and reset. A data-processing
  instruction with S set that writes PC, or `LDM ...{pc}^`, copies SPSR back
  to CPSR.
- **Load and store bytes**:
  - `load_byte` holds the two low address bits. For LDRB it returns the
    addressed byte, zero-extended; for LDR it rotates the word.
  - `store_byte` copies the byte on all four lanes for STRB.
  - Byte lanes are little-endian.

## Block transfers (LDM/STM)

`bdt_offset` counts the ones in the 16-bit register list with an adder tree.
A 5-bit adder then forms count − 1. A 4-way mux picks the start offset from
the P and U bits:

| Mode | Offset |
|---|---|
| Increment after | 0 |
| Increment before | +1 word |
| Decrement after | −(count − 1) words |
| Decrement before | −count words |

The write-back amount is count × 4, fed through BS mux code `01`.

`bdt_block` steps through the list, lowest register first. A priority
encoder picks the next register, and a decoder clears it from the
remaining-list register. `bdt_done` is raised for the last register. The
source index (for STM) and the destination index (for LDM, one cycle later)
are held separately, because a load writes its register a cycle after the
address goes out.

## Exceptions

`interrupt_handler` resolves the pending causes with a chain of 2:1 muxes.
Each later stage overrides the earlier ones, so priority runs from lowest to
highest along the chain:

| Code | Cause | Vector | Mode |
|---|---|---|---|
| `111` | none | – | – |
| `001` | SWI | 0x08 | SVC |
| `010` | undefined instruction | 0x04 | UND |
| `100` | prefetch abort | 0x0C | ABT |
| `101` | IRQ (if CPSR I is clear) | 0x18 | IRQ |
| `110` | FIQ (if CPSR F is clear) | 0x1C | FIQ |
| `011` | data abort | 0x10 | ABT |
| `000` | reset | 0x00 | SVC |

The result passes through two registers (`interrupt_vector_p2`, then `_p1`).
IRQ and FIQ are sampled every cycle, but are taken only between
instructions. `exception_mux` turns the code into the vector and the new
mode.

**Entry takes three cycles.**

1. The PC goes to R14 of the new mode, CPSR goes to its SPSR, and the vector
   is sent to memory.
2. R14 is corrected to the proper return address, and the vector's
   instruction is fetched.
3. That instruction is decoded.

While `nreset` is low, every register is held in its reset state and the
address stays at 0. In the source design the core keeps fetching during
reset; here it is simply held. On release, a pending-reset flag starts the
same three-cycle entry, and execution begins at address 0 in SVC mode.

**A data abort depends on the instruction.**

- A swap is abandoned at once.
- A single transfer is also abandoned, but its base write-back still happens.
- A block transfer runs to its end with register writes suppressed.

Then a four-cycle sequence runs. The first cycle copies the base latch (the
base register's original value) back into the base register. The other three
are the normal entry.

## Memory interface of `arm7`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `mclk` | in | 1 | clock; everything changes on the rising edge |
| `nreset` | in | 1 | asynchronous reset, active low |
| `addr` | out | 32 | address of the current access (registered) |
| `dout` | out | 32 | write data, valid during the cycle |
| `din` | in | 32 | read data, must be valid before the rising edge that ends the cycle |
| `nmreq` | out | 1 | 0 = access this cycle |
| `nrw` | out | 1 | 1 = write |
| `nbw` | out | 1 | 0 = byte |
| `ntrans` | out | 1 | 0 = user-mode access |
| `abort` | in | 1 | the current access failed: a prefetch abort for a fetch, a data abort otherwise |
| `nirq`, `nfiq` | in | 1 | interrupt requests, active low |
| `mode`, `phi1`, `phi2` | out | – | current mode, and the modelled phase clocks |

An assertion in `arm7` checks that a write is only signalled together with a
memory request.

## Files

- `rtl/arm7_pkg.sv` holds the shared types: instruction index bits, cycle
  kinds, exception codes, mux-select enums, and the `id_t`, `ctx_t`, `p1_t`
  and `p2_t` structs.
- Every other file in `rtl/` is one module, named after the file. `arm7` is
  the top.
- `tb/arm_asm_pkg.sv` provides ARM instruction encoders (`dpi`, `dpr`, `mul`,
  `sdt`, `bdt`, `br`, `swi`, ...). The test programs are written with them.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- compares outputs against an independent model;
- has a watchdog;
- ends with a line `TB_RESULT checks=N failures=M`.

With Verilator 5, from the top of the tree:

```sh
verilator --binary --timing --assert -Wno-fatal --Mdir build \
  rtl/arm7_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/arm_asm_pkg.sv tb/tb_arm7.sv --top-module tb_arm7
./build/Vtb_arm7            # add +trace for a per-cycle log
```

To build a block test, replace `tb_arm7` with its name, e.g. `tb_alu`.

`tb_arm7` runs the core at its defaults against a 64 KiB memory model. The
model has:

- an abort region;
- store addresses that raise and drop nIRQ and nFIQ;
- an end-of-test address.

The program runs small versions of the benchmark kernels the design was
measured with, and checks their results:

- GCD of 245, 252 and of 110, 111;
- factorial of 12 and of 1;
- integer cube root of 216 and of 1;
- string compare, once with strings that differ only late and once with
  strings that differ in their first byte;
- block copy, one 8-word block and three 4-word blocks in a loop.

It then covers:

- register-specified shifts and RRX;
- scaled register offsets;
- SWP and SWPB;
- BL and return;
- loads into PC;
- SWI from SVC and from user mode, with a handler that uses `STM ...^` and
  `LDM ...{pc}^`;
- an undefined instruction;
- MRS and MSR, including a user-mode MSR to the control bits, which must be
  ignored;
- IRQ;
- FIQ, using the banked R8 and R9;
- data aborts on LDR, LDR with write-back, and LDM with write-back;
- a prefetch abort.

The test counts how often each mechanism happened (pipeline refill, failed
condition, Booth early termination, block-transfer write-back, user-bank
transfer, base restore, each exception entry, exception return, ...). It
fails any mechanism that never occurs. The whole run takes 1627 cycles and
well under a second.

## How far to trust it, and where it departs from the source design

Verified:

- Every block's testbench and the end-to-end program pass.
- For each block, a deliberately broken copy was shown to fail its
  testbench.
- The design passes Verilator lint and synthesises with Yosys without
  latches.

Departures and gaps:

- **One clock instead of two phases** (above). Timing figures for the
  original latch design therefore do not carry over. The design was reported
  at about 40 MHz in a 0.25 µm process with the clock generator, and
  45.5 MHz with ideal clocks. Nothing here has been timed.
- **Cycle timing and per-cycle control values are this implementation's.**
  The source gives the states, the control signals and their encodings, but
  not a full cycle table.
- **The address-register mux has a fifth source, the A bus.** It is used for
  the base-restore cycle of a data abort. The source lists four: incrementer,
  PC, ALU and exception mux.
- **Instruction-index bit order** (MRS = bit 0 ... BBL = bit 9) and the exact
  undefined-instruction patterns are set to match the ARMv3 encoding.
- **The Booth early-termination test** (the remaining bits are all zeros or
  all ones) is this implementation's. The source says only that the
  multiplier can end early.
- **Coding style.** The condition checker is a single if-else chain, as the
  source chose after comparing styles for area, delay and glitches. The
  control units are `case` statements on the cycle kind. The source wrote
  them as if-else too. Both forms describe the same multiplexers.
- **Not built:**
  - the Brent-Kung adder variant, which the source only compares;
  - power measurement;
  - coprocessor instructions, which trap as undefined;
  - memory wait states.
- `clock_gen` is a timed model, not logic. Its delays are placeholders.
