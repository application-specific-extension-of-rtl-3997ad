# A fused shift-and-add instruction for a 64-bit RISC-V ALU

Compiled for a 64-bit RISC-V core, a modular multiplication loop (`res = a*b mod m` by
repeated doubling) halves a signed `int` and tests it for oddness on every iteration.
For signed operands the compiler turns both operations into the same two-instruction idiom:

```
srliw t, x, 31      # t = sign bit of the low word of x (0 or 1)
addw  y, y, t       # add it, so that the following shift/mask rounds toward zero
```

Counting adjacent instruction pairs in execution traces of that loop shows `srliw → addw` as
the most frequent useful pair. This design merges it into one new instruction,
**CUSTOM1**, executed by the core's integer ALU in one cycle:

```
custom1 rd, rs1, rs2        rd = rs2 + (rs1[31:0] >> 31)        (logical shift by a fixed 31)
```

Because the shift amount is fixed, the instruction needs no immediate and fits the ordinary
two-source R-type format. The RTL here is the ALU of an in-order, 64-bit, single-issue
RISC-V core (the open-source "Ariane" design), rebuilt with the extension, plus a decoder
and an execute-stage wrapper so that the unit can be driven with real instruction words.
The rest of the core (fetch, scoreboard, register file, load/store, multiplier, branch unit,
commit) is not part of this RTL. Where the unit would connect to those parts, the signals
are brought out as ports.

## What CUSTOM1 computes, exactly

The instruction is defined by its datapath, and the datapath carries two subtleties.

* **It performs a full 64-bit addition, not `addw`.** The shifted value is a 32-bit word
  (0 or 1), sign-extended to 64 bits, and then added to all 64 bits of `rs2`. The pair it
  replaces would instead truncate the sum to 32 bits and sign-extend it. The two agree
  whenever `rs2` already holds a sign-extended 32-bit value and adding the 0/1 does not
  overflow 32 bits. That is always true for the loop's `int` variables. `tb_custom1_unit`
  checks this equivalence on thousands of such operands. If you need bit-exact `addw`
  behaviour for arbitrary registers, sign-extend `custom_result[31:0]` in `alu.sv` under
  `CUSTOM1`. That is a one-line change.
* **The pair's intermediate register is not written.** `srliw t, x, 31` leaves `t` behind.
  CUSTOM1 does not. In the loop's halving sequence (`srliw a4,a5,31 ; addw a5,a5,a4`),
  `t` is dead afterwards, so `custom1 a5, a5, a5` is an exact replacement. In the
  oddness test, `t` is read again by a later `subw`. CUSTOM1 leaves the earlier `sraiw`
  result (0 or −1) there instead of the `srliw` result (0 or 1). The loop only runs while
  `b > 0`, where both are 0. So the replacement is correct for that program but not in
  general, and a compiler using the instruction has to respect this.

CUSTOM1 has its own adder, separate from the ALU's shared adder. The new operation
therefore adds no multiplexer in front of the critical add/compare path, at the cost of a
second 64-bit adder.

**Encoding** (a choice of this design): CUSTOM1 uses the RISC-V *custom-0* major opcode
`0001011`, with funct3 = `000`, funct7 = `0000000`, and the usual rd/rs1/rs2 fields. For
example, `custom1 a4, a5, a4` is `0x00E7870B`. Standard assemblers do not know the
mnemonic. Emit the word with `.insn r 0x0B, 0, 0, rd, rs1, rs2` or `.word`.

## The ALU (`alu.sv`)

The ALU is purely combinational. It takes a `fu_data_t` bundle (operator, `operand_a`,
`operand_b`, transaction tag) and returns `result_o`, plus `branch_res_o` for the six
branch comparisons. It has three datapaths and one result multiplexer.

* **Adder (`alu_adder.sv`).** The adder is 65 bits wide. Operand a is extended with a
  constant 1 below its LSB, and operand b with a 0. To subtract, the whole extended b is
  inverted. The bottom position then holds 1 + 1, which carries into bit 1: that carry is
  the +1 of the two's-complement negation. Bits [64:1] of the sum are a ± b. The zero flag
  is the NOR of those bits. SUB, SUBW and every comparison use the subtracting form.
* **Shifter (`alu_shifter.sv`).** It contains only right shifters. A left shift
  bit-reverses the operand, shifts right, and bit-reverses the result. An arithmetic shift
  puts a copy of the sign bit above the operand and shifts the widened value with `>>>`.
  A 64-bit path (shift amount `[5:0]`) and a 32-bit path (shift amount `[4:0]`, on
  `operand_a[31:0]`) run side by side. The ALU sign-extends the 32-bit result for the `W`
  shifts.
* **CUSTOM1 (`custom1_unit.sv`).** This is a 32-bit logical right shift by the constant
  31, followed by its own adder instance in add mode.
* **Comparisons.** Equality comes from the zero flag of a − b. For less-than, when the
  operand signs agree, the sign of a − b is the answer. When they differ, the answer is
  a's sign (signed compare) or b's sign (unsigned compare). SLT/SLTU return 0/1 on
  `result_o`. BEQ/BNE/BLT/BGE/BLTU/BGEU return the condition on `branch_res_o` and 0 on
  `result_o`.
* **Logic.** AND/OR/XOR are included because RV64I requires them and the loop uses
  `andi`.

The operator set and its 5-bit encoding are in `alu_pkg.sv` (`fu_op_e`).

## Decoding (`alu_decoder.sv`)

The decoder maps a 32-bit instruction word to an `alu_instr_t`. This gives the operator,
the register indices, and whether operand a is `rs1` or zero (LUI). It also gives whether
operand b is `rs2` or the sign-extended immediate, whether `rd` is written, and whether
the word is a branch comparison. It covers:

* the OP and OP-32 register forms;
* the OP-IMM and OP-IMM-32 immediate forms, including the 6-bit RV64 shift amounts;
* LUI;
* the six branch comparisons;
* CUSTOM1.

Every other word has `legal = 0` and no side effects. That includes loads and stores,
CSR and jump words, and the M-extension words with funct7 `0000001` (`mulw`, `remw`, …),
which belong to the multiplier. Compressed (16-bit) instructions are expected to have been
expanded by the core's front end. The decoder does not compute branch targets.

## The functional unit (`alu_ext_top.sv`, top level)

`alu_ext_top` is the ALU as the issue stage and write-back see it.

* **Issue.** The issue logic presents `issue_valid_i`, the instruction word and a
  transaction tag. `rs1_addr_o` and `rs2_addr_o` are decoded combinationally from the
  word. The register values come back in the same cycle on `rs1_data_i` and `rs2_data_i`.
  `issue_ready_o` is always 1, because a one-cycle stateless unit is never busy.
* **Write-back.** The result is registered. `wb_valid_o` pulses **exactly one clock after
  the instruction was accepted**, together with `wb_trans_id_o`, `wb_we_o`/`wb_rd_o`/
  `wb_result_o`, and the branch outcome `wb_branch_o`/`wb_branch_taken_o`. A new
  instruction can be issued every cycle.
* **x0 and rejected words.** Writes to x0 are suppressed. A word the unit does not execute
  still returns its tag, with `wb_illegal_o` set, no register write and no branch outcome.
  Two concurrent assertions check these write-back rules.
* **Reset.** Reset is asynchronous and active-low (`rst_ni`) and clears the write-back
  register.

The one-cycle issue-to-write-back latency is this design's choice. The unit does no
forwarding. Getting a result to the next dependent instruction is the issue stage's job.
In the testbench, the register file is written before the next read in the same cycle.

## Effect on the loop

`tb_alu_ext_top` runs the loop as a straight instruction program. Variables are kept in
registers, `remw` is executed by a multiplier stand-in, and all control flow is steered by
the unit's branch outcomes. Each input is run with and without CUSTOM1.

| a · b mod m      | result | loop iterations | ALU instructions, srliw+addw | with CUSTOM1 |
|------------------|-------:|----------------:|-----------------------------:|-------------:|
| 225 · 17 mod 39  | 3      | 5               | 95                           | 85           |
| 11 · 14 mod 10   | 4      | 4               | 78                           | 70           |

The saving is two instructions per iteration, about 10 % of the loop's ALU work. The
testbench also checks that this holds for random operands. The results are checked
against integer arithmetic (225 · 17 = 3825 = 98 · 39 + 3).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each also
has a watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/alu_pkg.sv tb/tb_alu_ext_top.sv \
          --top-module tb_alu_ext_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another test.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_alu_adder`     | Add/subtract, zero flag and carry slot against integer arithmetic; corner and random operands. |
| `tb_alu_shifter`   | All three shift kinds, both widths, every shift amount, against SystemVerilog's shift operators. |
| `tb_custom1_unit`  | CUSTOM1 against its formula, and against the `srliw`+`addw` pair where the two must agree. |
| `tb_alu`           | Every operator on corner and random operands against an independent reference model. Each operator must be exercised. |
| `tb_alu_decoder`   | Real words from the compiled loop, random encodings of every supported instruction, and rejection of M-extension, load, store, jump, CSR and atomic words. |
| `tb_alu_ext_top`   | End to end at default parameters: the boot example `lui/lui/add` (s5 = 0x7000), the modular-multiplication loop with and without CUSTOM1, and 4000 random instruction words against a reference model. It checks the one-cycle latency, tags, x0 and rejected words. It counts CUSTOM1, taken and not-taken branches, rejections, bubbles, back-to-back issue and x0 writes, and each must occur. |

The design has no size parameters worth scaling: XLEN is 64 and the tag width is 3
(`alu_pkg.sv`). Every test runs the full-size design in well under a second.

## Departures and open points

* CUSTOM1 adds with a 64-bit ADD rather than ADDW (see above). This follows the datapath
  the extension was specified with, not the instruction pair it replaces.
* The CUSTOM1 opcode and funct fields, the operator encoding, the comparison circuit, the
  registered write-back, the reset style and the tag width are this design's choices. No
  encoding for CUSTOM1 exists in standard tool chains.
* In the original extension sketch, the custom result also drives the ALU's shared zero
  flag, which would give that net two drivers. Here the zero flag stays the shared adder's.
* Only the integer ALU slot of the core is modelled. The instruction saving above counts
  issued ALU instructions. It is not a cycle count of the whole core, since load/store
  latency, the divider and branch prediction are outside this RTL.
