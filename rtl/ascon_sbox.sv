// ascon_sbox: ASCON substitution layer, 64 five-bit S-boxes in bit-sliced form.
//
// Bit j of the five words x0..x4 forms one 5-bit S-box input; the layer works
// on whole 64-bit words with XOR, AND and NOT, so all 64 S-boxes run in
// parallel in pure combinational logic. The network is the bit-sliced S-box
// of ASCON: a first XOR layer (x0^=x4, x4^=x3, x2^=x1), the chi step
// x_i ^= ~x_i & x_(i+1), and a last XOR layer (x1^=x0, x0^=x4, x3^=x2,
// x2 = ~x2). No clock; zero latency.
// The gate network follows the published S-box figure of the CHIMERA
// design and the ASCON specification.
module ascon_sbox
  import chimera_pkg::*;
(
  input  state_t x_i,
  output state_t x_o
);
  state_t a, t;

  always_comb begin
    a    = x_i;
    a[0] = x_i[0] ^ x_i[4];
    a[4] = x_i[4] ^ x_i[3];
    a[2] = x_i[2] ^ x_i[1];
    for (int i = 0; i < 5; i++) t[i] = ~a[i] & a[(i + 1) % 5];
    for (int i = 0; i < 5; i++) a[i] = a[i] ^ t[(i + 1) % 5];
    x_o    = a;
    x_o[1] = a[1] ^ a[0];
    x_o[0] = a[0] ^ a[4];
    x_o[3] = a[3] ^ a[2];
    x_o[2] = ~a[2];
  end
endmodule
