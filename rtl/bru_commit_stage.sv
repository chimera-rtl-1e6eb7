// bru_commit_stage: commit tracking and result hand-off of the BRU version.
//
// One state bit, committed_q. The instruction in flight is the one held by
// the ID stage, or the one being issued in this cycle (the core may commit
// in the issue cycle). A matching commit without kill sets committed_q; a
// matching kill raises kill_o so the ID stage drops the instruction. While
// committed_q is set the result is offered (result_valid_o); the handshake
// with result_ready_i raises retire_o, which clears committed_q, empties
// the ID stage and lets the BRU keep the MSB half of a Sigma result.
// Result latency: one cycle after a commit given in the issue cycle.
// The published BRU version has a commit stage feeding rd; the commit/kill
// tracking is this design's reading of the CV-X-IF protocol.
module bru_commit_stage
  import chimera_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        issue_fire_i,
  input  xif_id_t     issue_id_i,
  input  logic        held_valid_i,
  input  xif_id_t     held_id_i,
  input  logic        commit_valid_i,
  input  xif_commit_t commit_i,
  input  logic        result_ready_i,
  output logic        result_valid_o,
  output logic        kill_o,
  output logic        retire_o
);
  logic    committed_q, pending, hit;
  xif_id_t pend_id;

  always_comb begin
    pending = held_valid_i || issue_fire_i;
    pend_id = held_valid_i ? held_id_i : issue_id_i;
    hit     = pending && !committed_q && commit_valid_i && (commit_i.id == pend_id);
  end

  assign kill_o         = hit && commit_i.kill;
  assign result_valid_o = committed_q;
  assign retire_o       = committed_q && result_ready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                   committed_q <= 1'b0;
    else if (retire_o)             committed_q <= 1'b0;
    else if (hit && !commit_i.kill) committed_q <= 1'b1;
  end
endmodule
