// alu_adder: the ALU's single adder, used for addition, subtraction and compares.
//
// Both operands are widened by one bit at the bottom: operand a gets a constant 1
// and operand b gets a 0. When negate_b_i is set the whole widened b is inverted,
// so the bottom bit becomes 1 and the 1 + 1 in that slot supplies the carry-in of
// the two's-complement negation; bits [XLEN:1] of the XLEN+1-bit sum are then
// a - b. Without negation the bottom slot produces no carry and bits [XLEN:1] are
// a + b. This widening trick is the document's adder structure; the zero flag
// follows it too.
//
// Interface: purely combinational, no clock. adder_result_ext_o is the raw
// XLEN+1-bit sum, adder_result_o its upper XLEN bits, adder_z_flag_o is set when
// adder_result_o is all zero (so, when subtracting, when a == b).
module alu_adder #(
  parameter int unsigned XLEN = 64
) (
  input  logic [XLEN-1:0] operand_a_i,
  input  logic [XLEN-1:0] operand_b_i,
  input  logic            negate_b_i,
  output logic [XLEN:0]   adder_result_ext_o,
  output logic [XLEN-1:0] adder_result_o,
  output logic            adder_z_flag_o
);

  logic [XLEN:0] adder_in_a, adder_in_b;

  always_comb begin
    adder_in_a         = {operand_a_i, 1'b1};
    adder_in_b         = {operand_b_i, 1'b0} ^ {(XLEN+1){negate_b_i}};
    adder_result_ext_o = adder_in_a + adder_in_b;
    adder_result_o     = adder_result_ext_o[XLEN:1];
    adder_z_flag_o     = ~|adder_result_o;
  end

endmodule
