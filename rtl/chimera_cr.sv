// chimera_cr: CHIMERA, Complete Round (CR) version.
//
// A tightly coupled ASCON accelerator behind the CV-X-IF port set of a
// RISC-V core. Software loads the 320-bit state into the coprocessor's own
// ten 32-bit registers two at a time (CR_LD, operands rs1/rs2), runs whole
// permutations p^N inside it with one instruction (CR_PERM), and reads
// registers back one at a time into rd (CR_ST). XOR-ing data into the rate
// is left to software between a store and a load.
// Structure: cr_xif_controller (handshake, decode, stall) drives
// chimera_cr_core (register file, permutation unit, commit stage).
// Timing: one instruction in flight; a permutation of N rounds takes N
// clock cycles in the round unit, N+3 from acceptance to result.
module chimera_cr
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
  logic        exec, done, busy;
  cr_op_e      op;
  logic [4:0]  imm;
  logic [31:0] lo, hi, result;

  cr_xif_controller u_ctrl (
    .clk_i, .rst_ni,
    .issue_valid_i, .issue_ready_o, .issue_req_i, .issue_resp_o,
    .commit_valid_i, .commit_i,
    .result_valid_o, .result_ready_i, .result_o,
    .exec_o  (exec),
    .op_o    (op),
    .imm_o   (imm),
    .lo_o    (lo),
    .hi_o    (hi),
    .done_i  (done),
    .result_i(result)
  );

  chimera_cr_core u_core (
    .clk_i, .rst_ni,
    .exec_i  (exec),
    .op_i    (op),
    .imm_i   (imm),
    .lo_i    (lo),
    .hi_i    (hi),
    .done_o  (done),
    .busy_o  (busy),
    .result_o(result)
  );

  // The controller never starts an instruction while a permutation runs.
  a_no_exec_when_busy: assert property (@(posedge clk_i) disable iff (!rst_ni) !(exec && busy));
endmodule
