// custom1_unit: datapath of the CUSTOM1 instruction, "custom1 rd, rs1, rs2".
//
// CUSTOM1 fuses the instruction pair "srliw t, rs1, 31 ; addw rd, rs2, t" that a
// modular-multiplication loop compiled for RV64 executes on every iteration
// (it appears whenever C code divides or takes the remainder of a signed int by
// two). It computes
//     rd = rs2 + ( rs1[31:0] >> 31 )            (logical shift, fixed amount 31)
// i.e. it adds the sign bit of the low word of rs1 to rs2. Because the shift
// amount is fixed no shift-amount operand is needed.
//
// Structure (after the document): a 32-bit logical right shift by the constant 31
// on operand a, its 32-bit result sign-extended to 64 bits (bit 31 of a
// shift-by-31 result is always 0, so this is a zero extension), then a dedicated
// second copy of the ALU adder adds operand b. The sum is the full 64-bit ADD, as
// in the document's datapath, not a sign-extended 32-bit ADDW: for operands whose
// 32-bit sum does not overflow and whose operand b is a sign-extended word the two
// agree.
//
// Interface: purely combinational. operand_a_i = rs1, operand_b_i = rs2.
module custom1_unit #(
  parameter int unsigned XLEN = 64
) (
  input  logic [XLEN-1:0] operand_a_i,
  input  logic [XLEN-1:0] operand_b_i,
  output logic [XLEN-1:0] custom_result_o
);

  localparam int unsigned CUSTOM_SHAMT = 31;

  logic [32:0]     shift_op_a_32;
  logic [32:0]     shift_right_ext32;
  logic [31:0]     shift_result32;
  logic [XLEN-1:0] adder_in_a;
  logic [XLEN:0]   unused_sum_ext;
  logic            unused_z;

  always_comb begin
    // Logical shift: the bit above the word is 0.
    shift_op_a_32     = {1'b0, operand_a_i[31:0]};
    shift_right_ext32 = shift_op_a_32 >> CUSTOM_SHAMT;
    shift_result32    = shift_right_ext32[31:0];
    adder_in_a        = {{(XLEN-32){shift_result32[31]}}, shift_result32};
  end

  alu_adder #(.XLEN(XLEN)) u_custom_adder (
    .operand_a_i       (adder_in_a),
    .operand_b_i       (operand_b_i),
    .negate_b_i        (1'b0),
    .adder_result_ext_o(unused_sum_ext),
    .adder_result_o    (custom_result_o),
    .adder_z_flag_o    (unused_z)
  );

endmodule
