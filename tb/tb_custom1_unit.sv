// tb_custom1_unit: self-checking test of the CUSTOM1 datapath.
// Checks rd = rs2 + (rs1[31:0] >> 31) for corner and random operands, and that
// the result equals the instruction pair it replaces, "srliw t, rs1, 31 ;
// addw rd, rs2, t", whenever rs2 is a sign-extended word and the 32-bit sum does
// not overflow (the case of the modular-multiplication loop).
module tb_custom1_unit;
  localparam int unsigned XLEN = 64;
  localparam int unsigned N    = 3000;

  logic            clk = 1'b0;
  logic [XLEN-1:0] a, b, r;
  int unsigned     checks = 0, failures = 0, pair_checks = 0;

  custom1_unit #(.XLEN(XLEN)) dut (.operand_a_i(a), .operand_b_i(b), .custom_result_o(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN-1:0] sext32(input logic [31:0] w);
    return {{32{w[31]}}, w};
  endfunction

  task automatic check(input logic [XLEN-1:0] ta, input logic [XLEN-1:0] tb_);
    logic [XLEN-1:0] exp, t, pair;
    logic [31:0]     s;
    a = ta; b = tb_;
    @(posedge clk);
    exp = tb_ + {63'd0, ta[31]};
    checks++;
    if (r !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h r=%h exp=%h", ta, tb_, r, exp);
    end
    // Equivalence with the replaced pair srliw + addw.
    t    = sext32(ta[31:0] >> 31);
    s    = tb_[31:0] + t[31:0];
    pair = sext32(s);
    if (tb_ == sext32(tb_[31:0]) && !(tb_[31:0] == 32'h7fff_ffff && t[0])) begin
      checks++; pair_checks++;
      if (r !== pair) begin
        failures++;
        if (failures < 10) $display("FAIL pair a=%h b=%h r=%h pair=%h", ta, tb_, r, pair);
      end
    end
  endtask

  initial begin
    check(64'h0000_0000_8000_0000, 64'd7);          // bit 31 set -> +1
    check(64'hffff_ffff_ffff_ffff, 64'd0);          // -1 -> +1 (b % 2 idiom)
    check(64'h0000_0000_7fff_ffff, 64'd7);          // positive -> +0
    check(64'h8000_0000_0000_0000, 64'd5);          // only bit 63 set -> +0
    check(64'd14, 64'd14);                          // b = 14 of the second example
    for (int i = 0; i < N; i++) begin
      logic [XLEN-1:0] vb;
      vb = {$urandom, $urandom};
      if (i % 2 == 0) vb = sext32(vb[31:0]);
      check({$urandom, $urandom}, vb);
    end
    if (pair_checks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
