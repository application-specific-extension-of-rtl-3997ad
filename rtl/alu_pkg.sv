// alu_pkg: types and constants shared by the extended integer ALU, its decoder and
// the execute-stage wrapper.
//
// The ALU is told what to do by an operator code carried next to its two 64-bit
// operands (the "functional unit data" bundle). The set of operators is the integer
// ALU set of a 64-bit RISC-V core (add/sub, 32- and 64-bit shifts, comparisons,
// logic) plus CUSTOM1, the fused "shift right logical by 31, then add" operation
// that this design adds. The binary encoding of the operator enum and the custom
// instruction's opcode/funct fields are choices of this design.
package alu_pkg;

  localparam int unsigned XLEN          = 64;
  localparam int unsigned TRANS_ID_BITS = 3;   // scoreboard tag width (design choice)

  // ALU operators.
  typedef enum logic [4:0] {
    ADD, SUB, ADDW, SUBW,          // arithmetic, 64-bit and 32-bit (W = sign-extended word)
    XORL, ORL, ANDL,               // logic
    SRA, SRL, SLL,                 // 64-bit shifts
    SRLW, SLLW, SRAW,              // 32-bit shifts, result sign-extended
    LTS, LTU, GES, GEU, EQ, NE,    // branch comparisons (result on the branch output)
    SLTS, SLTU,                    // set-less-than (result on the data output)
    CUSTOM1                        // rd = rs2 + (rs1[31:0] >> 31)
  } fu_op_e;

  // Bundle issued to the ALU.
  typedef struct packed {
    fu_op_e                   operator;
    logic [XLEN-1:0]          operand_a;
    logic [XLEN-1:0]          operand_b;
    logic [TRANS_ID_BITS-1:0] trans_id;
  } fu_data_t;

  // What the decoder extracts from one 32-bit instruction word for the ALU.
  typedef struct packed {
    logic            legal;      // an instruction this unit executes
    fu_op_e          operator;
    logic [4:0]      rs1;
    logic [4:0]      rs2;
    logic [4:0]      rd;
    logic            use_rs1;    // 0: operand a is zero (LUI)
    logic            use_imm;    // 1: operand b is imm, 0: operand b is rs2
    logic [XLEN-1:0] imm;
    logic            writes_rd;  // 0 for branch comparisons
    logic            is_branch;
  } alu_instr_t;

  // RISC-V major opcodes used by the decoder.
  localparam logic [6:0] OPC_LUI       = 7'b0110111;
  localparam logic [6:0] OPC_BRANCH    = 7'b1100011;
  localparam logic [6:0] OPC_OP_IMM    = 7'b0010011;
  localparam logic [6:0] OPC_OP_IMM_32 = 7'b0011011;
  localparam logic [6:0] OPC_OP        = 7'b0110011;
  localparam logic [6:0] OPC_OP_32     = 7'b0111011;
  // CUSTOM1 is placed in the "custom-0" opcode space that RISC-V reserves for
  // non-standard extensions, as an R-type instruction with funct3 = funct7 = 0.
  localparam logic [6:0] OPC_CUSTOM0   = 7'b0001011;
  localparam logic [2:0] CUSTOM1_FUNCT3 = 3'b000;
  localparam logic [6:0] CUSTOM1_FUNCT7 = 7'b0000000;

  // Operators for which the adder subtracts (b is inverted, carry-in one).
  function automatic logic op_negates_b(fu_op_e op);
    return op inside {SUB, SUBW, LTS, LTU, GES, GEU, EQ, NE, SLTS, SLTU};
  endfunction

  // Operators whose result is a branch decision rather than a register value.
  function automatic logic op_is_branch(fu_op_e op);
    return op inside {LTS, LTU, GES, GEU, EQ, NE};
  endfunction

endpackage
