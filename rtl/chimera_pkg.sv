// chimera_pkg: types and constants shared by the CHIMERA ASCON coprocessor.
//
// Holds three things:
//  * the subset of the CV-X-IF (Core-V eXtension Interface) used to offload
//    instructions from the RISC-V core: issue request/response, commit and
//    result records, packed so that they can travel as plain struct ports;
//  * the custom-instruction encoding for both versions of the coprocessor,
//    the Complete Round (CR) accelerator and the Bitwise Rotation Unit (BRU);
//  * the ASCON state type (five 64-bit words x0..x4) and the round constant.
//
// The ASCON algorithm (Sigma rotations, S-box, round counts) follows the
// ASCON specification as summarised in the design description. The
// instruction encoding, the X-IF subset and the id width are this design's
// own choices: all instructions use the RISC-V custom-0 major opcode in an
// R4-type layout, funct2 = instr[26:25] picks the unit, funct3 picks the
// operation and the rs3 slot instr[31:27] carries a 5-bit immediate.
package chimera_pkg;

  // ---------------------------------------------------------------- ASCON
  localparam int unsigned WORDS      = 5;   // x0..x4
  localparam int unsigned WORD_W     = 64;
  localparam int unsigned STATE_W    = WORDS * WORD_W;  // 320
  localparam int unsigned MAX_ROUNDS = 12;  // p^a

  typedef logic [WORD_W-1:0] word_t;
  typedef word_t [WORDS-1:0] state_t;      // state[0] = x0

  // Round constant of round i (0..11) of the 12-round permutation:
  // high nibble 15-i, low nibble i (0xf0, 0xe1, ..., 0x4b).
  function automatic logic [7:0] round_const(input logic [3:0] i);
    return {4'hf - i, i};
  endfunction

  // ---------------------------------------------------------------- X-IF
  localparam int unsigned XIF_ID_WIDTH = 4;
  typedef logic [XIF_ID_WIDTH-1:0] xif_id_t;

  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] rs1;
    logic [31:0] rs2;
    xif_id_t     id;
  } xif_issue_req_t;

  typedef struct packed {
    logic accept;     // the coprocessor will execute this instruction
    logic writeback;  // it will write rd
  } xif_issue_resp_t;

  typedef struct packed {
    xif_id_t id;
    logic    kill;    // 1: drop the instruction, 0: execute it
  } xif_commit_t;

  typedef struct packed {
    xif_id_t     id;
    logic [31:0] data;
    logic [4:0]  rd;
    logic        we;
  } xif_result_t;

  // ---------------------------------------------------------------- encoding
  localparam logic [6:0] OPCODE_CUSTOM0 = 7'b0001011;

  typedef enum logic [1:0] {
    UNIT_CR  = 2'b00,
    UNIT_BRU = 2'b01
  } unit_e;

  // CR version
  typedef enum logic [2:0] {
    CR_LD   = 3'b000,  // REG[2w] <- rs1, REG[2w+1] <- rs2, w = imm5 (0..4)
    CR_ST   = 3'b001,  // rd <- REG[imm5] (0..9)
    CR_PERM = 3'b010   // state <- p^N(state), N = imm5 (1..12)
  } cr_op_e;

  // BRU version
  typedef enum logic [2:0] {
    BRU_SIG0 = 3'b000,  // rd <- Sigma_0({rs2,rs1})[31:0]
    BRU_SIG1 = 3'b001,
    BRU_SIG2 = 3'b010,
    BRU_SIG3 = 3'b011,
    BRU_SIG4 = 3'b100,
    BRU_RDH  = 3'b101   // rd <- upper 32 bits of the last Sigma result
  } bru_op_e;

  // Field helpers
  function automatic logic [6:0] instr_opcode(input logic [31:0] i); return i[6:0];   endfunction
  function automatic logic [4:0] instr_rd    (input logic [31:0] i); return i[11:7];  endfunction
  function automatic logic [2:0] instr_funct3(input logic [31:0] i); return i[14:12]; endfunction
  function automatic logic [1:0] instr_funct2(input logic [31:0] i); return i[26:25]; endfunction
  function automatic logic [4:0] instr_imm5  (input logic [31:0] i); return i[31:27]; endfunction

  // Builds an instruction word (used by software and testbenches).
  function automatic logic [31:0] make_instr(input logic [4:0] imm5, input logic [1:0] funct2,
                                             input logic [4:0] rs2, input logic [4:0] rs1,
                                             input logic [2:0] funct3, input logic [4:0] rd);
    return {imm5, funct2, rs2, rs1, funct3, rd, OPCODE_CUSTOM0};
  endfunction

endpackage
