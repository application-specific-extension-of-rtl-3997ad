// tb_alu_shifter: self-checking test of the ALU shifter.
// For random operands and every shift amount it applies logical-left,
// logical-right and arithmetic-right shifts and compares both the 64-bit and the
// 32-bit results with SystemVerilog's own shift operators.
module tb_alu_shifter;
  localparam int unsigned XLEN = 64;
  localparam int unsigned N    = 400;

  logic            clk = 1'b0;
  logic [XLEN-1:0] a;
  logic [5:0]      shamt;
  logic            left, arith;
  logic [XLEN-1:0] r64;
  logic [31:0]     r32;
  int unsigned     checks = 0, failures = 0;

  alu_shifter #(.XLEN(XLEN)) dut (
    .operand_a_i(a), .shamt_i(shamt), .shift_left_i(left), .shift_arithmetic_i(arith),
    .shift_result_o(r64), .shift_result32_o(r32)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [XLEN-1:0] ta, input logic [5:0] ts, input int kind);
    logic [XLEN-1:0] e64;
    logic [31:0]     e32;
    a = ta; shamt = ts; left = (kind == 0); arith = (kind == 2);
    @(posedge clk);
    unique case (kind)
      0: begin e64 = ta << ts; e32 = ta[31:0] << ts[4:0]; end
      1: begin e64 = ta >> ts; e32 = ta[31:0] >> ts[4:0]; end
      default: begin
        e64 = $unsigned($signed(ta) >>> ts);
        e32 = $unsigned($signed(ta[31:0]) >>> ts[4:0]);
      end
    endcase
    checks++;
    if (r64 !== e64 || r32 !== e32) begin
      failures++;
      if (failures < 10)
        $display("FAIL kind=%0d a=%h s=%0d r64=%h e64=%h r32=%h e32=%h",
                 kind, ta, ts, r64, e64, r32, e32);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      logic [XLEN-1:0] v;
      v = {$urandom, $urandom};
      if (i % 4 == 0) v[63] = 1'b1;
      if (i % 4 == 1) v[31] = 1'b1;
      for (int k = 0; k < 3; k++) check(v, 6'(i + 17 * k), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
