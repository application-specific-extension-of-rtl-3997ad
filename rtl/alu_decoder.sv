// alu_decoder: decodes the 32-bit RV64I instructions that the integer ALU executes,
// plus the new CUSTOM1 instruction, into an ALU operator and operand selection.
//
// Handled (standard RISC-V encodings):
//   OP        add sub sll slt sltu xor srl sra or and        (funct7 0000000/0100000)
//   OP-IMM    addi slti sltiu xori ori andi slli srli srai   (64-bit shamt in [25:20])
//   OP-32     addw subw sllw srlw sraw
//   OP-IMM-32 addiw slliw srliw sraiw                        (5-bit shamt in [24:20])
//   LUI       as ADD of zero and the U immediate
//   BRANCH    beq bne blt bge bltu bgeu, as comparisons of rs1 and rs2 (the
//             branch target is the branch unit's job and is not computed here)
//   CUSTOM1   opcode custom-0 (0001011), funct3 000, funct7 0000000, R-type:
//             "custom1 rd, rs1, rs2" -> rd = rs2 + (rs1[31:0] >> 31)
// Anything else, including the M-extension words with funct7 0000001 (MULW, DIVW,
// REMW ...), which belong to the multiplier, gives legal = 0. The document names
// the custom instruction and its operand order (rd, rs1 = the shifted register,
// rs2 = the added register) but fixes no encoding; custom-0 is this design's
// choice, as is decoding only the full 32-bit forms (compressed instructions are
// assumed to have been expanded earlier, as in the core's front end).
//
// Interface: combinational, instr_i in, decoded alu_instr_t out.
module alu_decoder
  import alu_pkg::*;
(
  input  logic [31:0] instr_i,
  output alu_instr_t  dec_o
);

  logic [6:0] opcode, funct7;
  logic [5:0] funct6;
  logic [2:0] funct3;
  logic [XLEN-1:0] imm_i, imm_u;

  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign funct7 = instr_i[31:25];
  assign funct6 = instr_i[31:26];
  assign imm_i  = {{(XLEN-12){instr_i[31]}}, instr_i[31:20]};
  assign imm_u  = {{(XLEN-32){instr_i[31]}}, instr_i[31:12], 12'b0};

  always_comb begin
    dec_o           = '0;
    dec_o.operator  = ADD;
    dec_o.rs1       = instr_i[19:15];
    dec_o.rs2       = instr_i[24:20];
    dec_o.rd        = instr_i[11:7];
    dec_o.use_rs1   = 1'b1;
    dec_o.writes_rd = 1'b1;

    unique case (opcode)
      OPC_OP: begin
        dec_o.legal = 1'b1;
        unique case ({funct7, funct3})
          {7'b0000000, 3'b000}: dec_o.operator = ADD;
          {7'b0100000, 3'b000}: dec_o.operator = SUB;
          {7'b0000000, 3'b001}: dec_o.operator = SLL;
          {7'b0000000, 3'b010}: dec_o.operator = SLTS;
          {7'b0000000, 3'b011}: dec_o.operator = SLTU;
          {7'b0000000, 3'b100}: dec_o.operator = XORL;
          {7'b0000000, 3'b101}: dec_o.operator = SRL;
          {7'b0100000, 3'b101}: dec_o.operator = SRA;
          {7'b0000000, 3'b110}: dec_o.operator = ORL;
          {7'b0000000, 3'b111}: dec_o.operator = ANDL;
          default:              dec_o.legal    = 1'b0;
        endcase
      end

      OPC_OP_32: begin
        dec_o.legal = 1'b1;
        unique case ({funct7, funct3})
          {7'b0000000, 3'b000}: dec_o.operator = ADDW;
          {7'b0100000, 3'b000}: dec_o.operator = SUBW;
          {7'b0000000, 3'b001}: dec_o.operator = SLLW;
          {7'b0000000, 3'b101}: dec_o.operator = SRLW;
          {7'b0100000, 3'b101}: dec_o.operator = SRAW;
          default:              dec_o.legal    = 1'b0;
        endcase
      end

      OPC_OP_IMM: begin
        dec_o.legal   = 1'b1;
        dec_o.use_imm = 1'b1;
        dec_o.imm     = imm_i;
        unique case (funct3)
          3'b000: dec_o.operator = ADD;
          3'b010: dec_o.operator = SLTS;
          3'b011: dec_o.operator = SLTU;
          3'b100: dec_o.operator = XORL;
          3'b110: dec_o.operator = ORL;
          3'b111: dec_o.operator = ANDL;
          3'b001: begin
            dec_o.operator = SLL;
            dec_o.legal    = (funct6 == 6'b000000);
          end
          default: begin  // 3'b101: SRLI / SRAI
            dec_o.operator = (funct6 == 6'b010000) ? SRA : SRL;
            dec_o.legal    = (funct6 == 6'b000000) || (funct6 == 6'b010000);
          end
        endcase
      end

      OPC_OP_IMM_32: begin
        dec_o.legal   = 1'b1;
        dec_o.use_imm = 1'b1;
        dec_o.imm     = imm_i;
        unique case (funct3)
          3'b000: dec_o.operator = ADDW;
          3'b001: begin
            dec_o.operator = SLLW;
            dec_o.legal    = (funct7 == 7'b0000000);
          end
          3'b101: begin
            dec_o.operator = (funct7 == 7'b0100000) ? SRAW : SRLW;
            dec_o.legal    = (funct7 == 7'b0000000) || (funct7 == 7'b0100000);
          end
          default: dec_o.legal = 1'b0;
        endcase
      end

      OPC_LUI: begin
        dec_o.legal    = 1'b1;
        dec_o.operator = ADD;
        dec_o.use_rs1  = 1'b0;
        dec_o.use_imm  = 1'b1;
        dec_o.imm      = imm_u;
      end

      OPC_BRANCH: begin
        dec_o.legal     = 1'b1;
        dec_o.writes_rd = 1'b0;
        dec_o.is_branch = 1'b1;
        unique case (funct3)
          3'b000:  dec_o.operator = EQ;
          3'b001:  dec_o.operator = NE;
          3'b100:  dec_o.operator = LTS;
          3'b101:  dec_o.operator = GES;
          3'b110:  dec_o.operator = LTU;
          3'b111:  dec_o.operator = GEU;
          default: dec_o.legal    = 1'b0;
        endcase
      end

      OPC_CUSTOM0: begin
        dec_o.operator = CUSTOM1;
        dec_o.legal    = (funct3 == CUSTOM1_FUNCT3) && (funct7 == CUSTOM1_FUNCT7);
      end

      default: dec_o.legal = 1'b0;
    endcase

    // An instruction this unit does not execute has no architectural effect here.
    if (!dec_o.legal) begin
      dec_o.writes_rd = 1'b0;
      dec_o.is_branch = 1'b0;
    end
  end

endmodule
