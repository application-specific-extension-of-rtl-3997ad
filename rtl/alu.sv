// alu: single-cycle 64-bit integer ALU of the execute stage, extended with CUSTOM1.
//
// The ALU receives an operator together with two operands (fu_data_i) and produces
// its answer combinationally in the same cycle; it holds no state. Inside are one
// adder (alu_adder), one shifter (alu_shifter) and the CUSTOM1 datapath
// (custom1_unit), which has its own adder so that the new instruction does not
// lengthen the path through the shared adder; a final multiplexer picks the result
// by operator. This adder/shifter/custom structure is the document's.
//
// Operations:
//   ADD/SUB                   64-bit sum/difference (shared adder)
//   ADDW/SUBW                 low word of the adder, sign-extended
//   SLL/SRL/SRA               64-bit shifts by operand_b[5:0]
//   SLLW/SRLW/SRAW            32-bit shifts by operand_b[4:0], sign-extended
//   XORL/ORL/ANDL             bitwise logic
//   SLTS/SLTU                 result_o = (a < b) signed/unsigned
//   EQ/NE/LTS/LTU/GES/GEU     branch_res_o = comparison, result_o = 0
//   CUSTOM1                   result_o = b + (a[31:0] >> 31)
// Comparisons reuse the subtracting adder: equality from its zero flag, "less
// than" from its sign when the operand signs agree and from the operand signs
// when they differ. The logic operations and the comparison scheme are this
// design's own completion of the ALU (the document names comparisons but does not
// show how they are built); the operator encoding is in alu_pkg.
//
// Interface: combinational; result_o is the register result, branch_res_o the
// branch decision for the six branch comparisons (0 for other operators).
module alu
  import alu_pkg::*;
(
  input  fu_data_t        fu_data_i,
  output logic [XLEN-1:0] result_o,
  output logic            branch_res_o
);

  fu_op_e          op;
  logic [XLEN-1:0] a, b;

  logic            adder_negate;
  logic [XLEN:0]   adder_result_ext;
  logic [XLEN-1:0] adder_result;
  logic            adder_z_flag;

  logic            shift_left, shift_arithmetic;
  logic [XLEN-1:0] shift_result;
  logic [31:0]     shift_result32;

  logic [XLEN-1:0] custom_result;

  logic            less, is_signed;

  assign op = fu_data_i.operator;
  assign a  = fu_data_i.operand_a;
  assign b  = fu_data_i.operand_b;

  assign adder_negate     = op_negates_b(op);
  assign shift_left       = (op == SLL) || (op == SLLW);
  assign shift_arithmetic = (op == SRA) || (op == SRAW);

  alu_adder #(.XLEN(XLEN)) u_adder (
    .operand_a_i       (a),
    .operand_b_i       (b),
    .negate_b_i        (adder_negate),
    .adder_result_ext_o(adder_result_ext),
    .adder_result_o    (adder_result),
    .adder_z_flag_o    (adder_z_flag)
  );

  alu_shifter #(.XLEN(XLEN)) u_shifter (
    .operand_a_i       (a),
    .shamt_i           (b[$clog2(XLEN)-1:0]),
    .shift_left_i      (shift_left),
    .shift_arithmetic_i(shift_arithmetic),
    .shift_result_o    (shift_result),
    .shift_result32_o  (shift_result32)
  );

  custom1_unit #(.XLEN(XLEN)) u_custom1 (
    .operand_a_i    (a),
    .operand_b_i    (b),
    .custom_result_o(custom_result)
  );

  // Comparison from the subtraction a - b.
  always_comb begin
    is_signed = op inside {LTS, GES, SLTS};
    if (a[XLEN-1] == b[XLEN-1]) less = adder_result[XLEN-1];
    else                        less = is_signed ? a[XLEN-1] : b[XLEN-1];
  end

  always_comb begin
    unique case (op)
      EQ:      branch_res_o = adder_z_flag;
      NE:      branch_res_o = ~adder_z_flag;
      LTS,
      LTU:     branch_res_o = less;
      GES,
      GEU:     branch_res_o = ~less;
      default: branch_res_o = 1'b0;
    endcase
  end

  always_comb begin
    unique case (op)
      ADD, SUB:   result_o = adder_result;
      ADDW, SUBW: result_o = {{(XLEN-32){adder_result[31]}}, adder_result[31:0]};
      XORL:       result_o = a ^ b;
      ORL:        result_o = a | b;
      ANDL:       result_o = a & b;
      SLL,
      SRL,
      SRA:        result_o = shift_result;
      SLLW,
      SRLW,
      SRAW:       result_o = {{(XLEN-32){shift_result32[31]}}, shift_result32};
      SLTS, SLTU: result_o = {{(XLEN-1){1'b0}}, less};
      CUSTOM1:    result_o = custom_result;
      default:    result_o = '0;   // branch comparisons write no register
    endcase
  end

  // The adder's extended sum is only needed for its upper bits here.
  logic unused_carry_slot;
  assign unused_carry_slot = adder_result_ext[0];

endmodule
