// ascon_sigma: one ASCON linear-diffusion function on a 64-bit word,
//   y = x ^ (x >>> ROT_A) ^ (x >>> ROT_B)
// with >>> a right rotation. The two rotation amounts are parameters fixed
// at elaboration, so the rotations are pure wiring and the unit is two
// layers of XOR. The five instances of ASCON use (19,28), (61,39), (1,6),
// (10,17) and (7,41). Combinational, no clock.
// The function and its rotation amounts are ASCON's; making it a
// parameterised module shared by the CR round and the BRU is this design's
// choice.
module ascon_sigma #(
  parameter int unsigned ROT_A = 19,
  parameter int unsigned ROT_B = 28
) (
  input  logic [63:0] x_i,
  output logic [63:0] y_o
);
  function automatic logic [63:0] rotr(input logic [63:0] v, input int unsigned n);
    return (v >> n) | (v << (64 - n));
  endfunction

  assign y_o = x_i ^ rotr(x_i, ROT_A) ^ rotr(x_i, ROT_B);
endmodule
