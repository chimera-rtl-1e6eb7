// chimera_top: both versions of the CHIMERA ASCON coprocessor side by side.
//
// CHIMERA offloads ASCON (AEAD ASCON-128/128a/80pq, Hash/Hasha, XOF/XOFa)
// from a 32-bit RISC-V core over the CV-X-IF extension interface. It comes
// in two versions, each meant for its own system:
//   cr_*  the Complete Round accelerator (chimera_cr): the 320-bit state
//         lives in a ten-register file inside the coprocessor and a whole
//         permutation runs with one instruction;
//   bru_* the Bitwise Rotation Unit (chimera_bru): a small instruction-set
//         extension computing the linear-diffusion rotations on {rs2, rs1}.
// Each version has its own complete CV-X-IF port set (issue, commit,
// result), to be wired to a core's extension interface. The two share only
// clock and reset. See chimera_cr and chimera_bru for timing.
// The two versions are the published ones; placing them in one top with
// separate port sets is this design's choice, since each is meant for its
// own system.
module chimera_top
  import chimera_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // CR version
  input  logic            cr_issue_valid_i,
  output logic            cr_issue_ready_o,
  input  xif_issue_req_t  cr_issue_req_i,
  output xif_issue_resp_t cr_issue_resp_o,
  input  logic            cr_commit_valid_i,
  input  xif_commit_t     cr_commit_i,
  output logic            cr_result_valid_o,
  input  logic            cr_result_ready_i,
  output xif_result_t     cr_result_o,
  // BRU version
  input  logic            bru_issue_valid_i,
  output logic            bru_issue_ready_o,
  input  xif_issue_req_t  bru_issue_req_i,
  output xif_issue_resp_t bru_issue_resp_o,
  input  logic            bru_commit_valid_i,
  input  xif_commit_t     bru_commit_i,
  output logic            bru_result_valid_o,
  input  logic            bru_result_ready_i,
  output xif_result_t     bru_result_o
);
  chimera_cr u_cr (
    .clk_i, .rst_ni,
    .issue_valid_i (cr_issue_valid_i),
    .issue_ready_o (cr_issue_ready_o),
    .issue_req_i   (cr_issue_req_i),
    .issue_resp_o  (cr_issue_resp_o),
    .commit_valid_i(cr_commit_valid_i),
    .commit_i      (cr_commit_i),
    .result_valid_o(cr_result_valid_o),
    .result_ready_i(cr_result_ready_i),
    .result_o      (cr_result_o)
  );

  chimera_bru u_bru (
    .clk_i, .rst_ni,
    .issue_valid_i (bru_issue_valid_i),
    .issue_ready_o (bru_issue_ready_o),
    .issue_req_i   (bru_issue_req_i),
    .issue_resp_o  (bru_issue_resp_o),
    .commit_valid_i(bru_commit_valid_i),
    .commit_i      (bru_commit_i),
    .result_valid_o(bru_result_valid_o),
    .result_ready_i(bru_result_ready_i),
    .result_o      (bru_result_o)
  );
endmodule
