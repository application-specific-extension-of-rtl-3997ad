// tb_alu: self-checking test of the extended ALU.
// Every operator is applied to corner and random operand pairs; result_o and
// branch_res_o are compared with a reference model written here directly from
// the RISC-V definitions (plus CUSTOM1: rs2 + (rs1[31:0] >> 31)). Each operator
// must have been exercised at least once.
module tb_alu;
  import alu_pkg::*;
  localparam int unsigned N = 300;   // random pairs per operator

  logic            clk = 1'b0;
  fu_data_t        fu;
  logic [XLEN-1:0] res;
  logic            br;
  int unsigned     checks = 0, failures = 0;
  int unsigned     op_count [fu_op_e];

  alu dut (.fu_data_i(fu), .result_o(res), .branch_res_o(br));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((N + 20) * 32) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN-1:0] sx(input logic [31:0] w);
    return {{32{w[31]}}, w};
  endfunction

  function automatic void model(input fu_op_e op, input logic [XLEN-1:0] a,
                                input logic [XLEN-1:0] b,
                                output logic [XLEN-1:0] r, output logic t);
    r = '0; t = 1'b0;
    case (op)
      ADD:     r = a + b;
      SUB:     r = a - b;
      ADDW:    r = sx(a[31:0] + b[31:0]);
      SUBW:    r = sx(a[31:0] - b[31:0]);
      XORL:    r = a ^ b;
      ORL:     r = a | b;
      ANDL:    r = a & b;
      SLL:     r = a << b[5:0];
      SRL:     r = a >> b[5:0];
      SRA:     r = $unsigned($signed(a) >>> b[5:0]);
      SLLW:    r = sx(a[31:0] << b[4:0]);
      SRLW:    r = sx(a[31:0] >> b[4:0]);
      SRAW:    r = sx($unsigned($signed(a[31:0]) >>> b[4:0]));
      SLTS:    r = {63'd0, $signed(a) < $signed(b)};
      SLTU:    r = {63'd0, a < b};
      LTS:     t = $signed(a) < $signed(b);
      LTU:     t = a < b;
      GES:     t = $signed(a) >= $signed(b);
      GEU:     t = a >= b;
      EQ:      t = a == b;
      NE:      t = a != b;
      CUSTOM1: r = b + {63'd0, a[31]};
      default: ;
    endcase
  endfunction

  task automatic check(input fu_op_e op, input logic [XLEN-1:0] a, input logic [XLEN-1:0] b);
    logic [XLEN-1:0] er;
    logic            et;
    fu.operator = op; fu.operand_a = a; fu.operand_b = b; fu.trans_id = 3'($urandom);
    @(posedge clk);
    model(op, a, b, er, et);
    checks++;
    op_count[op] = op_count.exists(op) ? op_count[op] + 1 : 1;
    if (res !== er || br !== et) begin
      failures++;
      if (failures < 15)
        $display("FAIL %s a=%h b=%h res=%h exp=%h br=%b exp=%b", op.name(), a, b, res, er, br, et);
    end
  endtask

  logic [XLEN-1:0] corners [8] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000,
                                   64'h7fff_ffff_ffff_ffff, 64'h0000_0000_8000_0000,
                                   64'h0000_0000_7fff_ffff, 64'hffff_ffff_0000_0000};

  initial begin
    fu_op_e op;
    // Bootrom example: 0x4000 + 0x3000 = 0x7000.
    check(ADD, 64'h4000, 64'h3000);
    op = op.first();
    forever begin
      foreach (corners[i]) foreach (corners[j]) check(op, corners[i], corners[j]);
      for (int k = 0; k < N; k++) begin
        logic [XLEN-1:0] a, b;
        a = {$urandom, $urandom};
        b = (k % 3 == 0) ? a : {$urandom, $urandom};   // equal operands sometimes
        if (k % 5 == 0) b = {58'd0, 6'($urandom)};
        check(op, a, b);
      end
      if (op == op.last()) break;
      op = op.next();
    end
    op = op.first();
    forever begin
      if (!op_count.exists(op)) begin
        failures++;
        $display("FAIL operator %s never exercised", op.name());
      end
      if (op == op.last()) break;
      op = op.next();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
