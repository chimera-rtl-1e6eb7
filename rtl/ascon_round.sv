// ascon_round: one complete ASCON permutation round on the 320-bit state.
//
// The three steps run back to back in one combinational path:
//  1. constant addition: x2 ^= c_r, with c_r = {15-i, i} for round index
//     round_i (0..11 of the 12-round permutation; p^N uses the last N);
//  2. substitution layer (ascon_sbox);
//  3. linear diffusion layer (ascon_linear).
// The CR version of the coprocessor clocks this block once per cycle.
// The round structure is ASCON's and appears as the ASCON_round block of
// the published CR version; the constant formula is the ASCON
// specification's.
module ascon_round
  import chimera_pkg::*;
(
  input  state_t     x_i,
  input  logic [3:0] round_i,
  output state_t     x_o
);
  state_t c, s;

  always_comb begin
    c    = x_i;
    c[2] = x_i[2] ^ {56'd0, round_const(round_i)};
  end

  ascon_sbox   u_sbox (.x_i(c), .x_o(s));
  ascon_linear u_lin  (.x_i(s), .x_o(x_o));
endmodule
