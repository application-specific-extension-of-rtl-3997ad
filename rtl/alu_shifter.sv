// alu_shifter: the ALU's shifter, producing a 64-bit and a 32-bit result at once.
//
// Only right shifters are built. A left shift is done by bit-reversing operand a,
// shifting it right, and bit-reversing the result. An arithmetic shift is done by
// putting one extra bit above the operand, equal to its sign bit when
// shift_arithmetic_i is set and 0 otherwise, and shifting that widened value
// right arithmetically. The 64-bit path uses shamt_i[5:0]; the 32-bit path
// (the RV64 "W" shifts) uses operand_a_i[31:0] and shamt_i[4:0]. This is the
// document's shifter structure; the port grouping is this design's own.
//
// Interface: purely combinational. shift_result_o is the 64-bit shift;
// shift_result32_o the 32-bit one, not yet sign-extended (the ALU does that).
module alu_shifter #(
  parameter int unsigned XLEN = 64
) (
  input  logic [XLEN-1:0]         operand_a_i,
  input  logic [$clog2(XLEN)-1:0] shamt_i,
  input  logic                    shift_left_i,
  input  logic                    shift_arithmetic_i,
  output logic [XLEN-1:0]         shift_result_o,
  output logic [31:0]             shift_result32_o
);

  localparam int unsigned SW = $clog2(XLEN);

  logic [XLEN-1:0] operand_a_rev, shift_op_a, shift_right_result, shift_left_result;
  logic [31:0]     operand_a_rev32, shift_op_a32, shift_right_result32, shift_left_result32;
  logic [XLEN:0]   shift_op_a_ext;
  logic [32:0]     shift_op_a32_ext;
  logic [XLEN:0]   shift_right_ext;
  logic [32:0]     shift_right32_ext;

  always_comb begin
    for (int i = 0; i < XLEN; i++) operand_a_rev[i] = operand_a_i[XLEN-1-i];
    for (int i = 0; i < 32; i++)   operand_a_rev32[i] = operand_a_i[31-i];

    shift_op_a   = shift_left_i ? operand_a_rev   : operand_a_i;
    shift_op_a32 = shift_left_i ? operand_a_rev32 : operand_a_i[31:0];

    shift_op_a_ext   = {shift_arithmetic_i & shift_op_a[XLEN-1], shift_op_a};
    shift_op_a32_ext = {shift_arithmetic_i & shift_op_a32[31], shift_op_a32};

    shift_right_ext   = $unsigned($signed(shift_op_a_ext) >>> shamt_i[SW-1:0]);
    shift_right32_ext = $unsigned($signed(shift_op_a32_ext) >>> shamt_i[4:0]);
    shift_right_result   = shift_right_ext[XLEN-1:0];
    shift_right_result32 = shift_right32_ext[31:0];

    for (int i = 0; i < XLEN; i++) shift_left_result[i] = shift_right_result[XLEN-1-i];
    for (int i = 0; i < 32; i++)   shift_left_result32[i] = shift_right_result32[31-i];

    shift_result_o   = shift_left_i ? shift_left_result   : shift_right_result;
    shift_result32_o = shift_left_i ? shift_left_result32 : shift_right_result32;
  end

endmodule
