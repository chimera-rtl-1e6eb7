// cr_regfile: the CR version's dedicated state register file, REG0..REG9.
//
// Ten 32-bit registers hold the 320-bit ASCON state next to the permutation
// unit, so that the state does not travel through memory between rounds.
// Register 2w holds the low half and register 2w+1 the high half of
// state word x_w. Three write ports, all taking effect on the rising clock
// edge, in priority order:
//   * perm_we_i:  all ten registers from the permuted state (perm_state_i);
//   * pair_we_i:  registers 2*pair_idx_i and 2*pair_idx_i+1 from lo_i/hi_i
//                 (the two source operands of one load instruction);
// The whole file is read in parallel as a 320-bit state (state_o), and one
// register through rd_idx_i/rd_data_o. Indices out of range write nothing
// and read zero. Reset clears the file.
//
// Ten registers of 32 bits follow the description; the register-to-word
// mapping and the port set are this design's choices.
module cr_regfile
  import chimera_pkg::*;
#(
  parameter int unsigned NUM_REGS  = 10,
  parameter int unsigned REG_WIDTH = 32
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 perm_we_i,
  input  state_t               perm_state_i,
  input  logic                 pair_we_i,
  input  logic [2:0]           pair_idx_i,
  input  logic [REG_WIDTH-1:0] lo_i,
  input  logic [REG_WIDTH-1:0] hi_i,
  input  logic [3:0]           rd_idx_i,
  output logic [REG_WIDTH-1:0] rd_data_o,
  output state_t               state_o
);
  logic [REG_WIDTH-1:0] regs_q [NUM_REGS];

  // The file must hold exactly one ASCON state.
  if (NUM_REGS * REG_WIDTH != STATE_W) begin : g_size_check
    $error("cr_regfile: NUM_REGS * REG_WIDTH must equal the 320-bit ASCON state");
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NUM_REGS; i++) regs_q[i] <= '0;
    end else if (perm_we_i) begin
      for (int i = 0; i < NUM_REGS; i++)
        regs_q[i] <= perm_state_i[i/2][(i%2)*REG_WIDTH +: REG_WIDTH];
    end else if (pair_we_i && (32'(pair_idx_i) * 2 + 1 < NUM_REGS)) begin
      regs_q[32'(pair_idx_i) * 2]     <= lo_i;
      regs_q[32'(pair_idx_i) * 2 + 1] <= hi_i;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_REGS; i++)
      state_o[i/2][(i%2)*REG_WIDTH +: REG_WIDTH] = regs_q[i];
    rd_data_o = (32'(rd_idx_i) < NUM_REGS) ? regs_q[rd_idx_i] : '0;
  end
endmodule
