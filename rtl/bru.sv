// bru: Bitwise Rotation Unit, the execution unit of the BRU version.
//
// Computes one of the five ASCON linear-diffusion functions
//   Sigma_i(x) = x ^ (x >>> a_i) ^ (x >>> b_i)
// on a 64-bit word x = operand_i, with the rotation amounts fixed in
// hardware per instruction (i = op_i: BRU_SIG0..BRU_SIG4), so no shift
// amount travels with the instruction. A 32-bit core gets the 64-bit result
// in two reads: a Sigma instruction returns bits 31:0 and, when it retires
// (retire_i), the unit stores bits 63:32 in msb_q; BRU_RDH returns msb_q.
// result_o is combinational from operand_i/op_i; msb_q changes on the
// clock edge that retires a Sigma instruction and is cleared by reset.
// The five fixed-rotation functions and the separate MSB read follow the
// description; keeping the MSB half in a register is this design's reading.
module bru
  import chimera_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [63:0] operand_i,
  input  bru_op_e     op_i,
  input  logic        retire_i,
  output logic [31:0] result_o
);
  logic [63:0] sig [5];
  logic [63:0] sel;
  logic [31:0] msb_q;

  ascon_sigma #(.ROT_A(19), .ROT_B(28)) u_s0 (.x_i(operand_i), .y_o(sig[0]));
  ascon_sigma #(.ROT_A(61), .ROT_B(39)) u_s1 (.x_i(operand_i), .y_o(sig[1]));
  ascon_sigma #(.ROT_A(1),  .ROT_B(6))  u_s2 (.x_i(operand_i), .y_o(sig[2]));
  ascon_sigma #(.ROT_A(10), .ROT_B(17)) u_s3 (.x_i(operand_i), .y_o(sig[3]));
  ascon_sigma #(.ROT_A(7),  .ROT_B(41)) u_s4 (.x_i(operand_i), .y_o(sig[4]));

  always_comb begin
    unique case (op_i)
      BRU_SIG0: sel = sig[0];
      BRU_SIG1: sel = sig[1];
      BRU_SIG2: sel = sig[2];
      BRU_SIG3: sel = sig[3];
      BRU_SIG4: sel = sig[4];
      default:  sel = '0;
    endcase
    result_o = (op_i == BRU_RDH) ? msb_q : sel[31:0];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                          msb_q <= '0;
    else if (retire_i && op_i != BRU_RDH) msb_q <= sel[63:32];
  end
endmodule
