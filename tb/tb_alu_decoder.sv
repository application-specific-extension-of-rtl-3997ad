// tb_alu_decoder: self-checking test of the ALU instruction decoder.
// Part 1 decodes instruction words of a compiled modular-multiplication loop
// (sraiw, srliw, subw, slliw, remw, blt, bne, lw, li) and checks each field
// against values worked out by hand. Part 2 encodes random instances of every
// supported instruction, and of CUSTOM1, with an encoder written here from the
// RISC-V formats, and checks the decoded operator, registers and immediate.
// Part 3 checks that opcodes outside the unit's set are flagged not legal.
module tb_alu_decoder;
  import alu_pkg::*;
  localparam int unsigned N = 200;

  logic        clk = 1'b0;
  logic [31:0] instr;
  alu_instr_t  dec;
  int unsigned checks = 0, failures = 0;

  alu_decoder dut (.instr_i(instr), .dec_o(dec));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N * 40 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply a word and compare every field that matters.
  task automatic expect_dec(input logic [31:0] w, input logic legal, input fu_op_e op,
                            input int rd, input int rs1, input int rs2,
                            input logic use_imm, input logic [63:0] imm,
                            input logic wr, input logic br, input logic use_rs1 = 1'b1);
    instr = w;
    @(posedge clk);
    checks++;
    if (dec.legal !== legal ||
        (legal && (dec.operator !== op || (wr && dec.rd !== 5'(rd)) || (use_rs1 && dec.rs1 !== 5'(rs1)) ||
                   (!use_imm && dec.rs2 !== 5'(rs2)) || dec.use_imm !== use_imm ||
                   (use_imm && dec.imm !== imm) || dec.writes_rd !== wr ||
                   dec.is_branch !== br || dec.use_rs1 !== use_rs1)) ||
        (!legal && (dec.writes_rd || dec.is_branch))) begin
      failures++;
      if (failures < 15)
        $display("FAIL word=%h legal=%b op=%s rd=%0d rs1=%0d rs2=%0d imm=%h (exp legal=%b op=%s)",
                 w, dec.legal, dec.operator.name(), dec.rd, dec.rs1, dec.rs2, dec.imm,
                 legal, op.name());
    end
  endtask

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction

  function automatic logic [31:0] i_type(input logic [11:0] imm, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {imm, 5'(rs1), f3, 5'(rd), opc};
  endfunction

  typedef struct { logic [6:0] f7; logic [2:0] f3; fu_op_e op; } rdef_t;

  initial begin
    // --- Part 1: words from the loop (a4 = x14, a5 = x15) ---
    expect_dec(32'h41f7579b, 1, SRAW, 15, 14, 0, 1, 64'd1055, 1, 0);  // sraiw a5,a4,31 (imm field 0x41f)
    expect_dec(32'h01f7d79b, 1, SRLW, 15, 15, 0, 1, 64'd31, 1, 0);    // srliw a5,a5,31
    expect_dec(32'h40f707bb, 1, SUBW, 15, 14, 15, 0, 64'd0, 1, 0);    // subw a5,a4,a5
    expect_dec(32'h0017979b, 1, SLLW, 15, 15, 0, 1, 64'd1, 1, 0);     // slliw a5,a5,1
    expect_dec(32'h01f7d71b, 1, SRLW, 14, 15, 0, 1, 64'd31, 1, 0);    // srliw a4,a5,31
    expect_dec(32'h4017d79b, 1, SRAW, 15, 15, 0, 1, 64'd1025, 1, 0);  // sraiw a5,a5,1
    expect_dec(32'h02f767bb, 0, ADD, 0, 0, 0, 0, 64'd0, 0, 0);        // remw: multiplier's
    expect_dec(32'hf8f04ce3, 1, LTS, 0, 0, 15, 0, 64'd0, 0, 1);       // blt zero,a5
    expect_dec(32'h00f71f63, 1, NE, 0, 14, 15, 0, 64'd0, 0, 1);       // bne a4,a5
    expect_dec(32'hfe842703, 0, ADD, 0, 0, 0, 0, 64'd0, 0, 0);        // lw: load unit's
    expect_dec(32'h0e100793, 1, ADD, 15, 0, 0, 1, 64'd225, 1, 0);     // li a5,225 (addi)
    expect_dec(32'h000049b7, 1, ADD, 19, 0, 0, 1, 64'h4000, 1, 0, 0); // lui s3,4
    // custom1 a4, a5, a4
    expect_dec(r_type(7'b0, 14, 15, 3'b000, 14, 7'b0001011), 1, CUSTOM1, 14, 15, 14, 0, 0, 1, 0);

    // --- Part 2: random encodings ---
    begin
      rdef_t rops [] = '{
        '{7'b0000000, 3'b000, ADD},  '{7'b0100000, 3'b000, SUB},  '{7'b0000000, 3'b001, SLL},
        '{7'b0000000, 3'b010, SLTS}, '{7'b0000000, 3'b011, SLTU}, '{7'b0000000, 3'b100, XORL},
        '{7'b0000000, 3'b101, SRL},  '{7'b0100000, 3'b101, SRA},  '{7'b0000000, 3'b110, ORL},
        '{7'b0000000, 3'b111, ANDL}};
      rdef_t wops [] = '{
        '{7'b0000000, 3'b000, ADDW}, '{7'b0100000, 3'b000, SUBW}, '{7'b0000000, 3'b001, SLLW},
        '{7'b0000000, 3'b101, SRLW}, '{7'b0100000, 3'b101, SRAW}};
      rdef_t iops [] = '{
        '{7'b0, 3'b000, ADD}, '{7'b0, 3'b010, SLTS}, '{7'b0, 3'b011, SLTU},
        '{7'b0, 3'b100, XORL}, '{7'b0, 3'b110, ORL}, '{7'b0, 3'b111, ANDL}};
      fu_op_e bops [8] = '{EQ, NE, ADD, ADD, LTS, GES, LTU, GEU};
      for (int n = 0; n < N; n++) begin
        int rd, rs1, rs2;
        logic [11:0] imm;
        logic [5:0]  sh;
        rd = int'($urandom_range(31)); rs1 = int'($urandom_range(31)); rs2 = int'($urandom_range(31));
        imm = 12'($urandom); sh = 6'($urandom);
        foreach (rops[k])
          expect_dec(r_type(rops[k].f7, rs2, rs1, rops[k].f3, rd, 7'b0110011), 1, rops[k].op,
                     rd, rs1, rs2, 0, 0, 1, 0);
        foreach (wops[k])
          expect_dec(r_type(wops[k].f7, rs2, rs1, wops[k].f3, rd, 7'b0111011), 1, wops[k].op,
                     rd, rs1, rs2, 0, 0, 1, 0);
        // M-extension words are not the ALU's.
        expect_dec(r_type(7'b0000001, rs2, rs1, 3'($urandom), rd, 7'b0111011), 0, ADD,
                   0, 0, 0, 0, 0, 0, 0);
        expect_dec(r_type(7'b0000001, rs2, rs1, 3'($urandom), rd, 7'b0110011), 0, ADD,
                   0, 0, 0, 0, 0, 0, 0);
        foreach (iops[k])
          expect_dec(i_type(imm, rs1, iops[k].f3, rd, 7'b0010011), 1, iops[k].op,
                     rd, rs1, 0, 1, {{52{imm[11]}}, imm}, 1, 0);
        expect_dec(i_type(imm, rs1, 3'b000, rd, 7'b0011011), 1, ADDW,
                   rd, rs1, 0, 1, {{52{imm[11]}}, imm}, 1, 0);
        // 64-bit immediate shifts: funct6 000000 / 010000, shamt[5:0].
        expect_dec(i_type({6'b000000, sh}, rs1, 3'b001, rd, 7'b0010011), 1, SLL,
                   rd, rs1, 0, 1, {58'd0, sh}, 1, 0);
        expect_dec(i_type({6'b000000, sh}, rs1, 3'b101, rd, 7'b0010011), 1, SRL,
                   rd, rs1, 0, 1, {58'd0, sh}, 1, 0);
        expect_dec(i_type({6'b010000, sh}, rs1, 3'b101, rd, 7'b0010011), 1, SRA,
                   rd, rs1, 0, 1, {52'd0, 6'b010000, sh}, 1, 0);
        // 32-bit immediate shifts: funct7 0000000 / 0100000, shamt[4:0].
        expect_dec(i_type({7'b0000000, sh[4:0]}, rs1, 3'b101, rd, 7'b0011011), 1, SRLW,
                   rd, rs1, 0, 1, {59'd0, sh[4:0]}, 1, 0);
        expect_dec(i_type({7'b0100000, sh[4:0]}, rs1, 3'b101, rd, 7'b0011011), 1, SRAW,
                   rd, rs1, 0, 1, {52'd0, 7'b0100000, sh[4:0]}, 1, 0);
        expect_dec(i_type({7'b0000000, sh[4:0]}, rs1, 3'b001, rd, 7'b0011011), 1, SLLW,
                   rd, rs1, 0, 1, {59'd0, sh[4:0]}, 1, 0);
        // Branches.
        foreach (bops[k]) begin
          logic [31:0] w;
          w = {imm[11:5], 5'(rs2), 5'(rs1), 3'(k), imm[4:0], 7'b1100011};
          expect_dec(w, !(k == 2 || k == 3), bops[k], 0, rs1, rs2, 0, 0, 0, 1);
        end
        // CUSTOM1 and a wrong funct7 in the custom space.
        expect_dec(r_type(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0001011), 1, CUSTOM1,
                   rd, rs1, rs2, 0, 0, 1, 0);
        expect_dec(r_type(7'b0000001, rs2, rs1, 3'b000, rd, 7'b0001011), 0, CUSTOM1,
                   0, 0, 0, 0, 0, 0, 0);
        // LUI.
        begin
          logic [7:0] mid;
          mid = 8'($urandom);
          expect_dec({imm, mid, 5'(rd), 7'b0110111}, 1, ADD, rd, 0, 0, 1,
                     {{32{imm[11]}}, imm, mid, 12'd0}, 1, 0, 0);
        end
      end
    end

    // --- Part 3: opcodes of other units ---
    begin
      // load, store, jal, jalr, system, atomic
      logic [6:0] opcs [6] = '{7'b0000011, 7'b0100011, 7'b1101111, 7'b1100111, 7'b1110011, 7'b0101111};
      foreach (opcs[k])
        for (int n = 0; n < 20; n++)
          expect_dec({25'($urandom), opcs[k]}, 0, ADD, 0, 0, 0, 0, 0, 0, 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
