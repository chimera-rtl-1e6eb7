// ascon_linear: ASCON linear diffusion layer. Word x_i of the state passes
// through Sigma_i, an XOR of the word with two right-rotated copies of
// itself, with the fixed rotation pairs of ASCON: x0 (19,28), x1 (61,39),
// x2 (1,6), x3 (10,17), x4 (7,41). Combinational, no clock.
// This is ASCON's linear layer exactly as published.
module ascon_linear
  import chimera_pkg::*;
(
  input  state_t x_i,
  output state_t x_o
);
  ascon_sigma #(.ROT_A(19), .ROT_B(28)) u_s0 (.x_i(x_i[0]), .y_o(x_o[0]));
  ascon_sigma #(.ROT_A(61), .ROT_B(39)) u_s1 (.x_i(x_i[1]), .y_o(x_o[1]));
  ascon_sigma #(.ROT_A(1),  .ROT_B(6))  u_s2 (.x_i(x_i[2]), .y_o(x_o[2]));
  ascon_sigma #(.ROT_A(10), .ROT_B(17)) u_s3 (.x_i(x_i[3]), .y_o(x_o[3]));
  ascon_sigma #(.ROT_A(7),  .ROT_B(41)) u_s4 (.x_i(x_i[4]), .y_o(x_o[4]));
endmodule
