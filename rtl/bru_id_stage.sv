// bru_id_stage: decode and operand register of the BRU version.
//
// Decodes an instruction offered on the CV-X-IF issue channel (custom-0
// opcode, funct2 = UNIT_BRU, funct3 = BRU_SIG0..BRU_SIG4 or BRU_RDH; all
// write rd) and, when one is accepted, holds it: the 64-bit operand
// {rs2, rs1}, the operation, the instruction id and rd. issue_ready_o is
// high only while nothing is held, so at most one BRU instruction is in
// flight. clear_i (retire after the result handshake, or a kill) empties
// the stage at the next edge; an instruction killed in its own issue cycle is
// never held. The encoding and the one-entry buffer are
// this design's choices.
module bru_id_stage
  import chimera_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            issue_valid_i,
  output logic            issue_ready_o,
  input  xif_issue_req_t  issue_req_i,
  output xif_issue_resp_t issue_resp_o,
  output logic            issue_fire_o,
  input  logic            clear_i,
  output logic            valid_o,
  output logic [63:0]     operand_o,
  output bru_op_e         op_o,
  output xif_id_t         id_o,
  output logic [4:0]      rd_o
);
  logic legal;

  always_comb begin
    legal = (instr_opcode(issue_req_i.instr) == OPCODE_CUSTOM0) &&
            (instr_funct2(issue_req_i.instr) == UNIT_BRU) &&
            (instr_funct3(issue_req_i.instr) <= BRU_RDH);
  end

  assign issue_ready_o          = !valid_o;
  assign issue_resp_o.accept    = legal;
  assign issue_resp_o.writeback = legal;
  assign issue_fire_o           = issue_valid_i && issue_ready_o && legal;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_o   <= 1'b0;
      operand_o <= '0;
      op_o      <= BRU_SIG0;
      id_o      <= '0;
      rd_o      <= '0;
    end else if (issue_fire_o && !clear_i) begin
      valid_o   <= 1'b1;
      operand_o <= {issue_req_i.rs2, issue_req_i.rs1};
      op_o      <= bru_op_e'(instr_funct3(issue_req_i.instr));
      id_o      <= issue_req_i.id;
      rd_o      <= instr_rd(issue_req_i.instr);
    end else if (clear_i) begin
      valid_o <= 1'b0;
    end
  end
endmodule
