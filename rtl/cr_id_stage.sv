// cr_id_stage: instruction decoder of the CR (Complete Round) version.
//
// Looks at an instruction offered on the CV-X-IF issue channel and decides,
// combinationally, whether the CR coprocessor executes it. Accepted forms
// (custom-0 opcode, funct2 = UNIT_CR, imm5 = instr[31:27]):
//   CR_LD   imm5 = w in 0..4   load {rs2,rs1} into REG[2w+1],REG[2w]; no rd
//   CR_ST   imm5 = r in 0..9   write REG[r] to rd
//   CR_PERM imm5 = N in 1..12  run p^N on the register file; no rd
// Anything else is refused (legal_o = 0) and left to the core.
// The three instruction kinds follow the description; their encoding and
// the immediate ranges are this design's choices.
module cr_id_stage
  import chimera_pkg::*;
(
  input  logic [31:0] instr_i,
  output logic        legal_o,
  output cr_op_e      op_o,
  output logic [4:0]  imm_o,
  output logic [4:0]  rd_o,
  output logic        writeback_o
);
  logic [2:0] f3;
  logic [4:0] imm;
  logic       ours;

  always_comb begin
    f3    = instr_funct3(instr_i);
    imm   = instr_imm5(instr_i);
    ours  = (instr_opcode(instr_i) == OPCODE_CUSTOM0) && (instr_funct2(instr_i) == UNIT_CR);
    op_o  = cr_op_e'(f3);
    imm_o = imm;
    rd_o  = instr_rd(instr_i);
    unique case (f3)
      CR_LD:   legal_o = ours && (imm <= 5'd4);
      CR_ST:   legal_o = ours && (imm <= 5'd9);
      CR_PERM: legal_o = ours && (imm >= 5'd1) && (imm <= 5'(MAX_ROUNDS));
      default: legal_o = 1'b0;
    endcase
    writeback_o = legal_o && (f3 == CR_ST);
  end
endmodule
