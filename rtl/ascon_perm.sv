// ascon_perm: iterative ASCON permutation p^N, one round per clock cycle.
//
// A pulse on start_i captures state_i and the round count rounds_i (N, 1 to
// MAX_ROUNDS). The first round is applied on that same clock edge, so the
// state register holds the result of round k after k edges; done_o is high
// for one cycle exactly N cycles after start_i, with the permuted state on
// state_o (held until the next start). p^N uses round constants 12-N .. 11,
// as in ASCON. busy_o is high while rounds remain; start_i is ignored then.
// A round count of 0 returns the state unchanged one cycle later, and a
// count above MAX_ROUNDS is clamped to MAX_ROUNDS.
//
// The round logic (ascon_round) and the 12-round maximum follow ASCON; one
// round per cycle is this design's choice, the description giving no
// permutation latency.
module ascon_perm
  import chimera_pkg::*;
#(
  parameter int unsigned MAX_ROUNDS_P = MAX_ROUNDS
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       start_i,
  input  logic [3:0] rounds_i,
  input  state_t     state_i,
  output logic       busy_o,
  output logic       done_o,
  output state_t     state_o
);
  state_t     st_q, rnd_in, rnd_out;
  logic [3:0] rnd_q, rnd_idx, first_idx, n_eff;
  logic       busy_q, done_q;

  always_comb begin
    n_eff     = (rounds_i > 4'(MAX_ROUNDS_P)) ? 4'(MAX_ROUNDS_P) : rounds_i;
    first_idx = 4'(MAX_ROUNDS_P) - n_eff;
    rnd_in    = busy_q ? st_q  : state_i;
    rnd_idx   = busy_q ? rnd_q : first_idx;
  end

  ascon_round u_round (.x_i(rnd_in), .round_i(rnd_idx), .x_o(rnd_out));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q   <= '0;
      rnd_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (busy_q) begin
        st_q  <= rnd_out;
        rnd_q <= rnd_q + 4'd1;
        if (rnd_q == 4'(MAX_ROUNDS_P - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end else if (start_i) begin
        if (n_eff == 4'd0) begin
          st_q   <= state_i;
          done_q <= 1'b1;
        end else begin
          st_q  <= rnd_out;
          rnd_q <= first_idx + 4'd1;
          if (n_eff == 4'd1) done_q <= 1'b1;
          else               busy_q <= 1'b1;
        end
      end
    end
  end

  assign busy_o  = busy_q;
  assign done_o  = done_q;
  assign state_o = st_q;
endmodule
