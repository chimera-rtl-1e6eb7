// cr_commit_stage: completion and result register of the CR version.
//
// When the controller starts an instruction (exec_i for one cycle), the
// stage records what goes back to the core's rd:
//   CR_ST:   the addressed register (rf_rdata_i), registered;
//   CR_LD:   zero (no write-back), completion one cycle later;
//   CR_PERM: zero; completion one cycle after the permutation's done pulse,
//            i.e. after the register file has taken the permuted state.
// done_o is a one-cycle pulse; result_o holds its value until the next
// exec_i. Reset clears both.
// A commit stage that returns register-file data to rd is part of the
// published CR version; its timing and the 32-bit result register are this
// design's choices.
module cr_commit_stage
  import chimera_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        exec_i,
  input  cr_op_e      op_i,
  input  logic [31:0] rf_rdata_i,
  input  logic        perm_done_i,
  output logic        done_o,
  output logic [31:0] result_o
);
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      done_o   <= 1'b0;
      result_o <= '0;
    end else begin
      done_o <= (exec_i && (op_i != CR_PERM)) || perm_done_i;
      if (exec_i) result_o <= (op_i == CR_ST) ? rf_rdata_i : '0;
    end
  end
endmodule
