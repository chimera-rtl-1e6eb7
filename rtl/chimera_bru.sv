// chimera_bru: CHIMERA, Bitwise Rotation Unit (BRU) version.
//
// A minimal instruction-set extension for ASCON on a 32-bit RISC-V core.
// Software keeps the ASCON state in ordinary registers and memory and does
// the constant addition and S-box itself; the coprocessor accelerates the
// linear diffusion layer. Each 64-bit word arrives as {rs2, rs1}; one of
// five instructions (fixed rotation pairs of Sigma_0..Sigma_4) returns the
// low 32 result bits, and a sixth returns the high 32 bits of the last
// result. Structure: bru_id_stage (decode, operand register) -> bru
// (rotation unit, MSB register) -> bru_commit_stage (commit/kill, result).
// Timing: one instruction in flight; with commit in the issue cycle the
// result is valid one cycle after issue. Every BRU instruction writes rd,
// so the result's we bit is constant 1.
module chimera_bru
  import chimera_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            issue_valid_i,
  output logic            issue_ready_o,
  input  xif_issue_req_t  issue_req_i,
  output xif_issue_resp_t issue_resp_o,
  input  logic            commit_valid_i,
  input  xif_commit_t     commit_i,
  output logic            result_valid_o,
  input  logic            result_ready_i,
  output xif_result_t     result_o
);
  logic        fire, held, kill, retire;
  logic [63:0] operand;
  bru_op_e     op;
  xif_id_t     id;
  logic [4:0]  rd;
  logic [31:0] data;

  bru_id_stage u_id (
    .clk_i, .rst_ni,
    .issue_valid_i, .issue_ready_o, .issue_req_i, .issue_resp_o,
    .issue_fire_o(fire),
    .clear_i     (kill || retire),
    .valid_o     (held),
    .operand_o   (operand),
    .op_o        (op),
    .id_o        (id),
    .rd_o        (rd)
  );

  bru u_bru (
    .clk_i, .rst_ni,
    .operand_i(operand),
    .op_i     (op),
    .retire_i (retire),
    .result_o (data)
  );

  bru_commit_stage u_commit (
    .clk_i, .rst_ni,
    .issue_fire_i  (fire),
    .issue_id_i    (issue_req_i.id),
    .held_valid_i  (held),
    .held_id_i     (id),
    .commit_valid_i,
    .commit_i,
    .result_ready_i,
    .result_valid_o,
    .kill_o        (kill),
    .retire_o      (retire)
  );

  assign result_o = '{id: id, data: data, rd: rd, we: 1'b1};

  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    result_valid_o && !result_ready_i |=> result_valid_o && $stable(result_o));
endmodule
