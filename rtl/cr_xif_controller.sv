// cr_xif_controller: CV-X-IF front end of the CR version.
//
// Sequences one offloaded instruction at a time through four states:
//   IDLE   issue_ready_o = 1. An offered instruction is decoded by
//          cr_id_stage; a legal one is accepted and its operands, id, rd and
//          decoded operation are stored, an illegal one is refused
//          (accept = 0) and forgotten.
//   COMMIT waits for the core's commit of that id (it may arrive in the same
//          cycle as the issue). A kill returns to IDLE without effect.
//   EXEC   one cycle: pulses exec_o to start the datapath.
//   WAIT   waits for the datapath's done_i (one cycle for loads and stores,
//          N+1 cycles for a permutation of N rounds).
//   RESULT result_valid_o = 1 until result_ready_i; then back to IDLE.
// Every committed instruction gets one result transaction; only CR_ST has
// we = 1. While an instruction is in flight issue_ready_o is low: this is
// the stall a core sees when it offloads behind a running permutation.
// Accepted-to-result latency: 3 cycles for a load or store, N+3 for p^N
// (commit in the issue cycle, result_ready_i high).
// The one-in-flight policy and the exact X-IF subset are this design's
// choices; the description gives the interface's role but no protocol.
module cr_xif_controller
  import chimera_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // CV-X-IF
  input  logic            issue_valid_i,
  output logic            issue_ready_o,
  input  xif_issue_req_t  issue_req_i,
  output xif_issue_resp_t issue_resp_o,
  input  logic            commit_valid_i,
  input  xif_commit_t     commit_i,
  output logic            result_valid_o,
  input  logic            result_ready_i,
  output xif_result_t     result_o,
  // datapath
  output logic            exec_o,
  output cr_op_e          op_o,
  output logic [4:0]      imm_o,
  output logic [31:0]     lo_o,
  output logic [31:0]     hi_o,
  input  logic            done_i,
  input  logic [31:0]     result_i
);
  typedef enum logic [2:0] {S_IDLE, S_COMMIT, S_EXEC, S_WAIT, S_RESULT} state_e;
  state_e      state_q, state_d;

  logic        dec_legal, dec_wb;
  cr_op_e      dec_op;
  logic [4:0]  dec_imm, dec_rd;

  cr_op_e      op_q;
  logic [4:0]  imm_q, rd_q;
  logic        wb_q;
  xif_id_t     id_q;
  logic [31:0] lo_q, hi_q;

  logic issue_fire, commit_new, commit_held;

  cr_id_stage u_id (
    .instr_i    (issue_req_i.instr),
    .legal_o    (dec_legal),
    .op_o       (dec_op),
    .imm_o      (dec_imm),
    .rd_o       (dec_rd),
    .writeback_o(dec_wb)
  );

  assign issue_ready_o          = (state_q == S_IDLE);
  assign issue_resp_o.accept    = dec_legal;
  assign issue_resp_o.writeback = dec_wb;
  assign issue_fire             = issue_valid_i && issue_ready_o && dec_legal;
  assign commit_new             = commit_valid_i && (commit_i.id == issue_req_i.id);
  assign commit_held            = commit_valid_i && (commit_i.id == id_q);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:   if (issue_fire) begin
                  if (commit_new) state_d = commit_i.kill ? S_IDLE : S_EXEC;
                  else            state_d = S_COMMIT;
                end
      S_COMMIT: if (commit_held) state_d = commit_i.kill ? S_IDLE : S_EXEC;
      S_EXEC:   state_d = S_WAIT;
      S_WAIT:   if (done_i) state_d = S_RESULT;
      S_RESULT: if (result_ready_i) state_d = S_IDLE;
      default:  state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      op_q    <= CR_LD;
      imm_q   <= '0;
      rd_q    <= '0;
      wb_q    <= 1'b0;
      id_q    <= '0;
      lo_q    <= '0;
      hi_q    <= '0;
    end else begin
      state_q <= state_d;
      if (issue_fire) begin
        op_q  <= dec_op;
        imm_q <= dec_imm;
        rd_q  <= dec_rd;
        wb_q  <= dec_wb;
        id_q  <= issue_req_i.id;
        lo_q  <= issue_req_i.rs1;
        hi_q  <= issue_req_i.rs2;
      end
    end
  end

  assign exec_o         = (state_q == S_EXEC);
  assign op_o           = op_q;
  assign imm_o          = imm_q;
  assign lo_o           = lo_q;
  assign hi_o           = hi_q;
  assign result_valid_o = (state_q == S_RESULT);
  assign result_o       = '{id: id_q, data: result_i, rd: rd_q, we: wb_q};

  // A result, once offered, stays stable until taken.
  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    result_valid_o && !result_ready_i |=> result_valid_o && $stable(result_o));
endmodule
