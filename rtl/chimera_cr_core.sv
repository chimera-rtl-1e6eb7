// chimera_cr_core: datapath of the CR (Complete Round) version.
//
// Holds the ASCON state in the ten-register file REG0..REG9 and runs the
// permutation next to it, so the 320-bit state never leaves the
// coprocessor between instructions. One operation is started per exec_i
// pulse (op_i, imm_i, operands lo_i = rs1 and hi_i = rs2):
//   CR_LD   writes lo_i/hi_i into REG[2*imm], REG[2*imm+1] at the next edge;
//   CR_ST   reads REG[imm] into the commit stage;
//   CR_PERM starts ascon_perm on the whole file with N = imm rounds; when it
//           finishes, all ten registers take the permuted state at once.
// done_o pulses one cycle after exec_i for loads and stores and N+1 cycles
// after it for a permutation; result_o then holds the value for rd.
// busy_o is high while a permutation runs. The caller must not pulse
// exec_i again before done_o.
// The parts (register file, round unit, commit stage) follow the published
// CR version; how they are sequenced is this design's choice.
module chimera_cr_core
  import chimera_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        exec_i,
  input  cr_op_e      op_i,
  input  logic [4:0]  imm_i,
  input  logic [31:0] lo_i,
  input  logic [31:0] hi_i,
  output logic        done_o,
  output logic        busy_o,
  output logic [31:0] result_o
);
  state_t      rf_state, perm_state;
  logic [31:0] rf_rdata;
  logic        perm_done;

  cr_regfile u_rf (
    .clk_i,
    .rst_ni,
    .perm_we_i   (perm_done),
    .perm_state_i(perm_state),
    .pair_we_i   (exec_i && (op_i == CR_LD)),
    .pair_idx_i  (imm_i[2:0]),
    .lo_i,
    .hi_i,
    .rd_idx_i    (imm_i[3:0]),
    .rd_data_o   (rf_rdata),
    .state_o     (rf_state)
  );

  ascon_perm u_perm (
    .clk_i,
    .rst_ni,
    .start_i (exec_i && (op_i == CR_PERM)),
    .rounds_i(imm_i[3:0]),
    .state_i (rf_state),
    .busy_o,
    .done_o  (perm_done),
    .state_o (perm_state)
  );

  cr_commit_stage u_commit (
    .clk_i,
    .rst_ni,
    .exec_i,
    .op_i,
    .rf_rdata_i (rf_rdata),
    .perm_done_i(perm_done),
    .done_o,
    .result_o
  );
endmodule
