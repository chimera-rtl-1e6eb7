// ascon_ref_pkg: reference model of the ASCON permutation for testbenches.
//
// Written apart from the RTL on purpose: the substitution layer is a
// 32-entry table lookup on each 5-bit column (x0 is the most significant
// bit of the column), the rotations are done bit by bit, and the round
// constant is taken from a list. A state is five 64-bit words, index 0 = x0.
package ascon_ref_pkg;

  typedef logic [4:0][63:0] ref_state_t;

  localparam logic [4:0] SBOX [32] = '{
    5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
    5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
    5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
    5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};

  localparam logic [7:0] RC [12] = '{
    8'hf0, 8'he1, 8'hd2, 8'hc3, 8'hb4, 8'ha5, 8'h96, 8'h87, 8'h78, 8'h69, 8'h5a, 8'h4b};

  localparam int ROT [5][2] = '{'{19, 28}, '{61, 39}, '{1, 6}, '{10, 17}, '{7, 41}};

  function automatic logic [63:0] ref_rotr(input logic [63:0] v, input int n);
    logic [63:0] r;
    for (int b = 0; b < 64; b++) r[b] = v[(b + n) % 64];
    return r;
  endfunction

  function automatic logic [63:0] ref_sigma(input int i, input logic [63:0] v);
    return v ^ ref_rotr(v, ROT[i][0]) ^ ref_rotr(v, ROT[i][1]);
  endfunction

  function automatic ref_state_t ref_sbox(input ref_state_t s);
    ref_state_t o;
    logic [4:0] col, y;
    for (int b = 0; b < 64; b++) begin
      col = {s[0][b], s[1][b], s[2][b], s[3][b], s[4][b]};
      y   = SBOX[col];
      {o[0][b], o[1][b], o[2][b], o[3][b], o[4][b]} = y;
    end
    return o;
  endfunction

  function automatic ref_state_t ref_linear(input ref_state_t s);
    ref_state_t o;
    for (int i = 0; i < 5; i++) o[i] = ref_sigma(i, s[i]);
    return o;
  endfunction

  function automatic ref_state_t ref_round(input ref_state_t s, input int i);
    s[2] ^= {56'd0, RC[i]};
    return ref_linear(ref_sbox(s));
  endfunction

  function automatic ref_state_t ref_perm(input ref_state_t s, input int n);
    for (int i = 12 - n; i < 12; i++) s = ref_round(s, i);
    return s;
  endfunction

  // Published initial state of ASCON-Hash: p12 applied to IV || 0^256.
  localparam logic [63:0] HASH_IV = 64'h00400c0000000100;
  localparam ref_state_t HASH_INIT = {64'h348fa5c9d525e140, 64'h43189921b8f8e3e8,
                                      64'hb48a92db98d5da62, 64'h8bb21831c60f1002,
                                      64'hee9398aadb67f03d};
endpackage
