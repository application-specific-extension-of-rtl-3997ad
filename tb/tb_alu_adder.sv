// tb_alu_adder: self-checking test of the ALU adder.
// Drives random and corner operand pairs, with and without negation, once per
// clock, and compares the sum/difference, the zero flag and the bottom
// (carry-in) slot of the extended sum, which is 1 for add and 0 for subtract,
// with values computed here by plain integer arithmetic.
module tb_alu_adder;
  localparam int unsigned XLEN = 64;
  localparam int unsigned N    = 3000;

  logic            clk = 1'b0;
  logic [XLEN-1:0] a, b;
  logic            neg;
  logic [XLEN:0]   ext;
  logic [XLEN-1:0] res;
  logic            z;
  int unsigned     checks = 0, failures = 0, cycles = 0;

  alu_adder #(.XLEN(XLEN)) dut (
    .operand_a_i(a), .operand_b_i(b), .negate_b_i(neg),
    .adder_result_ext_o(ext), .adder_result_o(res), .adder_z_flag_o(z)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [XLEN-1:0] ta, input logic [XLEN-1:0] tb_, input logic tn);
    logic [XLEN-1:0] exp;
    a = ta; b = tb_; neg = tn;
    @(posedge clk);
    exp = tn ? (ta - tb_) : (ta + tb_);
    checks++;
    if (res !== exp || z !== (exp == '0) || ext[0] !== ~tn) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h neg=%b res=%h exp=%h z=%b", ta, tb_, tn, res, exp, z);
    end
  endtask

  initial begin
    check('0, '0, 1'b0);
    check('0, '0, 1'b1);
    check('1, 64'd1, 1'b0);                 // wrap to zero
    check(64'h8000_0000_0000_0000, 64'd1, 1'b1);
    check(64'h4000, 64'h3000, 1'b0);        // 0x4000 + 0x3000 = 0x7000
    check(64'd1234, 64'd1234, 1'b1);        // equal -> zero flag
    for (int i = 0; i < N; i++)
      check({$urandom, $urandom}, (i % 7 == 0) ? {$urandom, $urandom} : {32'd0, $urandom},
            1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
