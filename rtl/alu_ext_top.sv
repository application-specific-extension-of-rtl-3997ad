// alu_ext_top: the ALU functional unit of the execute stage, with the CUSTOM1
// extension, as the issue logic and the write-back see it.
//
// The issue stage presents one instruction word with its transaction tag and the
// two source-register values it has read (issue_valid_i). The unit decodes the word
// (alu_decoder), selects the operands (rs1 or zero for operand a; rs2 or the
// immediate for operand b), runs the combinational ALU (alu) and captures the
// outcome in the write-back register, so the result appears on the wb_* outputs
// exactly one clock after the instruction was issued: one cycle in the ALU, then
// write-back. A new instruction can be issued every cycle, so issue_ready_o is
// always high (the ALU has no internal state that could be busy). An instruction
// word the ALU does not execute still returns its tag, with wb_illegal_o set and
// no register write, so the scoreboard can retire or trap it.
//
// The valid/ready handshake towards the issue logic and the single-cycle ALU
// follow the document's description of the core's functional units; the
// register-file read addresses are brought out (rs*_addr_o) because the register
// file, scoreboard and branch unit are parts of the surrounding core and not of
// this unit. The registered write-back boundary, the active-low asynchronous
// reset and the tag width are this design's choices.
//
// Ports (all synchronous to clk_i):
//   issue_valid_i/issue_ready_o  instruction handshake (accepted when both high)
//   issue_instr_i                32-bit instruction word
//   issue_trans_id_i             scoreboard tag, returned on wb_trans_id_o
//   rs1_addr_o/rs2_addr_o        register indices, decoded combinationally
//   rs1_data_i/rs2_data_i        register values for the same cycle
//   wb_valid_o                   one-cycle pulse: a result is being written back
//   wb_we_o, wb_rd_o, wb_result_o register write
//   wb_branch_o, wb_branch_taken_o branch comparison outcome for the branch unit
//   wb_illegal_o                 the word was not an ALU instruction
module alu_ext_top
  import alu_pkg::*;
(
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic                     issue_valid_i,
  output logic                     issue_ready_o,
  input  logic [31:0]              issue_instr_i,
  input  logic [TRANS_ID_BITS-1:0] issue_trans_id_i,
  output logic [4:0]               rs1_addr_o,
  output logic [4:0]               rs2_addr_o,
  input  logic [XLEN-1:0]          rs1_data_i,
  input  logic [XLEN-1:0]          rs2_data_i,
  output logic                     wb_valid_o,
  output logic [TRANS_ID_BITS-1:0] wb_trans_id_o,
  output logic                     wb_we_o,
  output logic [4:0]               wb_rd_o,
  output logic [XLEN-1:0]          wb_result_o,
  output logic                     wb_branch_o,
  output logic                     wb_branch_taken_o,
  output logic                     wb_illegal_o
);

  alu_instr_t      dec;
  fu_data_t        fu_data;
  logic [XLEN-1:0] alu_result;
  logic            alu_branch_res;
  logic            accept;

  assign issue_ready_o = 1'b1;   // single-cycle unit: never busy
  assign accept        = issue_valid_i && issue_ready_o;

  alu_decoder u_decoder (
    .instr_i(issue_instr_i),
    .dec_o  (dec)
  );

  assign rs1_addr_o = dec.rs1;
  assign rs2_addr_o = dec.rs2;

  // Operand selection (the "read operands" step).
  always_comb begin
    fu_data.operator  = dec.operator;
    fu_data.operand_a = dec.use_rs1 ? rs1_data_i : '0;
    fu_data.operand_b = dec.use_imm ? dec.imm : rs2_data_i;
    fu_data.trans_id  = issue_trans_id_i;
  end

  alu u_alu (
    .fu_data_i   (fu_data),
    .result_o    (alu_result),
    .branch_res_o(alu_branch_res)
  );

  // Write-back register.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wb_valid_o        <= 1'b0;
      wb_trans_id_o     <= '0;
      wb_we_o           <= 1'b0;
      wb_rd_o           <= '0;
      wb_result_o       <= '0;
      wb_branch_o       <= 1'b0;
      wb_branch_taken_o <= 1'b0;
      wb_illegal_o      <= 1'b0;
    end else begin
      wb_valid_o <= accept;
      if (accept) begin
        wb_trans_id_o     <= fu_data.trans_id;
        wb_we_o           <= dec.writes_rd && (dec.rd != 5'd0);   // x0 stays zero
        wb_rd_o           <= dec.rd;
        wb_result_o       <= alu_result;
        wb_branch_o       <= dec.is_branch;
        wb_branch_taken_o <= dec.is_branch && alu_branch_res;
        wb_illegal_o      <= !dec.legal;
      end else begin
        wb_we_o           <= 1'b0;
        wb_branch_o       <= 1'b0;
        wb_branch_taken_o <= 1'b0;
        wb_illegal_o      <= 1'b0;
      end
    end
  end

  // Write-back rules: a write or a branch outcome only accompanies a valid
  // result, and an illegal word never writes a register or resolves a branch.
  a_we_needs_valid: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (wb_we_o || wb_branch_o || wb_illegal_o) |-> wb_valid_o);
  a_illegal_no_effect: assert property (@(posedge clk_i) disable iff (!rst_ni)
    wb_illegal_o |-> !(wb_we_o || wb_branch_o));

endmodule
