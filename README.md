# FM9001 — a 32-bit two-address microprocessor in SystemVerilog

The FM9001 is a small general-purpose 32-bit processor designed to be proved
correct: its instruction set is deliberately regular, so that a single
instruction-level interpreter can describe everything the chip does. This RTL
implements that instruction set and the chip's pin-level behaviour (memory bus,
hold, reset, test pins) as a multi-cycle machine.

The central idea is that there is only one kind of instruction. Every
instruction

1. reads operand A (register, three memory modes, or a 9-bit signed immediate),
2. reads operand B (register or the same three memory modes),
3. computes one of fifteen ALU operations,
4. updates any chosen subset of the C, V, N and Z flags, and
5. writes the result back to operand B **only if** its 4-bit store condition
   holds.

There are no branch, compare or jump op-codes. The program counter is one of
the 16 general registers — which one is chosen from outside the chip through
the `pc_reg_in` pins — so a jump is a conditional store into that register, and
a compare is a subtraction whose store condition is "never".

## Instruction word

```
 31   28 27   24 23   20 19 18 17 16 15  14 13   10  9  8    6 5   4 3    0
+-------+-------+-------+--+--+--+--+------+-------+---+------+-----+------+
|unused |op-code|storecc| C| V| N| Z|mode B| reg B | 0 |unused|modeA|reg A |  two-address
+-------+-------+-------+--+--+--+--+------+-------+---+------+-----+------+
|unused |op-code|storecc| C| V| N| Z|mode B| reg B | 1 |   9-bit immediate  |  immediate A
+-------+-------+-------+--+--+--+--+------+-------+---+--------------------+
```

Bits 19..16 are flag-update enables. Bits 31..28 are ignored by execution but
are visible on the `i_reg` pins. The immediate is sign-extended to 32 bits.
`instr_t` in `rtl/fm9001_pkg.sv` is this layout as a packed struct.

| mode | syntax | operand                          | register side effect |
|------|--------|----------------------------------|----------------------|
| 00   | Rn     | the register                     | none                 |
| 01   | (Rn)   | memory at Rn                     | none                 |
| 10   | -(Rn)  | memory at Rn − 1                 | Rn ← Rn − 1 first    |
| 11   | (Rn)+  | memory at Rn                     | Rn ← Rn + 1 after    |

Ordering rule: the PC is incremented before operand A's address is formed, and
operand A's side effect is complete before operand B's address is formed. So
`(PC)+` as operand A reads the word after the instruction and skips over it,
and an instruction that uses the same register for A and B sees A's update.

## Operations and flags

| op | name | result        | op | name | result            |
|----|------|---------------|----|------|-------------------|
| 0  | MOVE | a             | 8  | ROR  | {c, a[31:1]}      |
| 1  | INC  | a + 1         | 9  | ASR  | a >>> 1           |
| 2  | ADDC | b + a + c     | 10 | LSR  | a >> 1            |
| 3  | ADD  | b + a         | 11 | XOR  | b ^ a             |
| 4  | NEG  | 0 − a         | 12 | OR   | b \| a            |
| 5  | DEC  | a − 1         | 13 | AND  | b & a             |
| 6  | SUBB | b − a − c     | 14 | NOT  | ~a                |
| 7  | SUB  | b − a         | 15 | M15  | a (same as MOVE)  |

Flag rules are this implementation's choice. The architecture gives only the
operation list and the store conditions:

* N is bit 31 of the result and Z means the result is zero, for every op.
* For additions, C is the carry out. For subtractions (NEG, DEC, SUBB, SUB), C
  is the **borrow**. With this choice the unsigned conditions HI (`~C & ~Z`)
  and LS (`C | Z`) mean "B above A" and "B at or below A" after a compare.
  SUBB subtracts the borrow. V is signed overflow.
* For the shifts and ROR, C receives the bit shifted out (A[0]) and V is 0.
* For MOVE, M15, NOT and the logic ops, C and V are 0.

Store conditions (bits 23..20): CC, CS, VC, VS, PL, MI, NE, EQ, HI, LS, GE
(`N == V`), LT, GT, LE, T (always) and F (never). They are encoded 0 to 15 in
that order. Conditions are tested on the flags **before** the instruction
updates them. So "compare, then conditional MOVE into the PC" works as a
two-instruction conditional branch.

## Control sequence and timing

`fm9001_core` is a state machine over one state register. The state appears
on the `cntl_state` pins.

| code | state  | what happens                                                         |
|------|--------|----------------------------------------------------------------------|
| 0    | RESET  | held while `reset_n` is low; flags and datapath registers cleared    |
| 1    | RSEQ   | 16 cycles, clearing R0..R15 one per cycle; PC number loaded          |
| 2    | HOLD   | `hdack_n` low, bus floated, PC number reloaded every cycle           |
| 3    | FETCH0 | the PC register is read and latched as the bus address               |
| 4    | FETCH1 | read strobe until `dtack_n`; then IR ← data, PC ← PC + 1             |
| 5    | REGA   | operand A: immediate/register, or address + side effect              |
| 6    | READA  | read strobe for operand A                                            |
| 7    | REGB   | operand B: register, or address + side effect                        |
| 8    | READB  | read strobe for operand B (only if the op-code uses B)               |
| 9    | UPDATE | ALU, flag update, conditional register store                         |
| 10   | WRITE  | conditional memory store: write strobe with the data bus driven      |

The register file has one read port and one write port, and each state uses
at most one of each. That is why operand A and operand B take separate
cycles.

Cycle count of an instruction = 4 + (number of bus accesses) × (1 + memory wait
cycles). Bus accesses are the fetch, plus operand reads, plus a memory store
if one happens.

* A register-to-register instruction takes 5 cycles with a memory that
  acknowledges at once.
* An instruction that reads A and B from memory and stores to memory takes 8
  cycles.

The original chip is specified at 5 to 17 cycles per instruction with fast
memory. The 5-cycle minimum is met here. The longer sequences of the original
are not reproduced, because its internal state sequence is not public in
enough detail. Operand B is fetched from memory only for ADDC, ADD, SUBB, SUB,
XOR, OR and AND. For the other op-codes, B's address is only used for the
store. This is also this design's choice.

## Bus and pins

All inputs are synchronous and are sampled on the rising edge of `clk`.

* **Memory cycle.** The address is latched one cycle before `strobe_n` falls.
  `strobe_n` stays low until `dtack_n` is sampled low. Read data is taken on
  that same edge, and a write completes on it. `rw_n` is low only for writes.
  A memory may assert `dtack_n` in the first strobe cycle. Consecutive bus
  cycles always have at least one cycle with `strobe_n` high between them.
* **Tri-state pins** are given as value plus enable, for the pad ring to join:
  * `address`, `strobe_n` and `rw_n` are enabled by `address_oe`, which is
    low only in HOLD;
  * `data_out` is enabled by `data_oe`, which is high only while a write
    strobe is active;
  * `data_in` is the data pad's input.
* **Hold** (`hold_n`, `hdack_n`). A request is taken at the end of the
  current instruction. The core then sits in HOLD with the bus floated. The
  number on `pc_reg_in` is loaded every cycle, so a hold can switch the
  processor to another instruction stream. This is the chip's only interrupt
  mechanism. The core resumes with a fetch when `hold_n` rises.
* **Reset** (`reset_n`, active low). It takes effect at the first clock edge
  that samples it low, from any state. When it is released, the 16-cycle clear sequence
  runs, and execution starts at address 0 in whichever register `pc_reg_in`
  named. A hold requested during the sequence is taken at its end.
* **Observation pins.** `flags` is {C, V, N, Z} (C on bit 3). `i_reg` shows
  IR[31:28]. `cntl_state` shows the state. `timing` is the ALU's zero output,
  the end of the longest combinational path, for speed testing.

## Test logic

* **Scan.** Every flip-flop outside the register file is in one
  `fm9001_scan_reg`: 145 bits, the packed `regs_t` struct in `fm9001_core`.
  While `te_n` is low:
  * the struct shifts one bit per clock from `ti` towards `to`, most
    significant field (the state) nearest `to`;
  * the sequencer's register-file writes are suppressed;
  * no strobe, write or data drive is produced, so a scan cannot corrupt
    external memory. This gating is this design's addition.

  Shifting `to` straight back into `ti` for 145 clocks leaves the machine
  unchanged.
* **Register file test pins.** These are active low, and their meaning is this
  design's choice:
  * `disable_regfile_n` low blocks every write;
  * `test_regfile_n` low forces a write on every clock, of whatever the core
    presents as write address and data;
  * disable wins if both are low.
* The vendor's parametric test output (PO) and the supply pins are not
  modelled.

## Where this departs from the original chip

* The control sequence, state encoding, reset-sequence length and bus timing
  are this design's own. Instruction-level behaviour follows the architecture.
  Cycle counts agree only in the 5-cycle minimum.
* The register file is edge-triggered flip-flops, not level-sensitive latches.
* Flag rules for carry and overflow are chosen as described above.
* Tri-state pads are outside the RTL.

## Files

| file                        | contents                                                   |
|-----------------------------|------------------------------------------------------------|
| `rtl/fm9001_pkg.sv`         | op-code, condition, mode and state enums; instruction and flag structs |
| `rtl/fm9001.sv`             | chip top: core + register file, pin-level ports            |
| `rtl/fm9001_core.sv`        | state machine, datapath registers, bus and hold/reset/scan control |
| `rtl/fm9001_alu.sv`         | the 16 op-codes and candidate flags                        |
| `rtl/fm9001_store_cc.sv`    | the 16 store conditions                                    |
| `rtl/fm9001_operand_ea.sv`  | addressing modes and immediate sign extension              |
| `rtl/fm9001_regfile.sv`     | 16 × 32 register file with its two test pins              |
| `rtl/fm9001_scan_reg.sv`    | state register with mux-D scan                             |
| `tb/fm9001_ref_pkg.sv`      | instruction-level reference model (class) and instruction builders |
| `tb/fm9001_mem_model.sv`    | external memory with programmable DTACK- wait cycles      |
| `tb/*_tb.sv`                | one self-checking testbench per module                     |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

* The unit testbenches check their module against independent expressions:
  * ALU: every op-code on corner and random operands, results and flags from
    64-bit integer arithmetic;
  * store conditions: exhaustive;
  * addressing modes: random;
  * register file: random, against an array model;
  * scan register: a full unload/reload.
* `fm9001_core_tb` runs 3000 random instructions on the core and checks
  registers, flags and cycle count after each one. Every 32-bit word is a
  legal instruction. Memory wait states range from 0 to 5.
* `fm9001_tb` runs the whole chip at its default size.
  * Phase 1 is a directed program: a counting loop closed by a conditional
    jump, a compare, a "jump if carry clear" that skips an instruction, and
    stores through `(R4)+` and `-(R4)`.
  * Phase 2 is 4000 random instructions with random wait states. The stream
    is interrupted by hold requests that switch the PC register, by resets in
    mid-instruction (some with a hold arriving during the clear sequence),
    and by scan loop-backs that include a forced
    register-file write.
  * It counts each of these mechanisms and every addressing mode, and fails
    if any never happened.

To simulate with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fm9001_pkg.sv tb/fm9001_ref_pkg.sv tb/fm9001_tb.sv --top-module fm9001_tb
./obj_dir/Vfm9001_tb
```

Replace `fm9001_tb` with any other testbench name to run a unit test. The
memory model is 2^10 words and ignores the upper address bits. The processor
itself always drives full 32-bit addresses.
