// xif_host: behavioural model of the core side of the CV-X-IF subset, for
// testbenches. It plays the RISC-V core that offloads custom instructions:
// offload() offers one instruction with its two source operands, waits
// while issue_ready is low (counting stall cycles), commits it in the
// issue cycle or commit_delay cycles later (or kills it), and waits for the
// result, optionally holding result_ready low at random (backpressure).
// It also checks the result id and counts protocol events for the caller.
// Inputs are driven just after the falling clock edge; handshakes complete
// on the rising edge.
module xif_host
  import chimera_pkg::*;
(
  input  logic            clk,
  output logic            issue_valid,
  input  logic            issue_ready,
  output xif_issue_req_t  issue_req,
  input  xif_issue_resp_t issue_resp,
  output logic            commit_valid,
  output xif_commit_t     commit,
  input  logic            result_valid,
  output logic            result_ready,
  input  xif_result_t     result
);
  int      stall_cycles = 0, bp_cycles = 0, kills = 0, rejects = 0, late_commits = 0;
  int      id_errors = 0, offloads = 0;
  bit      bp_en = 0;
  int      commit_delay = 0;
  xif_id_t next_id = '0;
  // Set when the coprocessor does not answer within TIMEOUT cycles; the
  // waiting offload() then gives up so that the testbench can end.
  localparam int TIMEOUT = 1000;
  bit      hung = 0;

  initial begin
    issue_valid  = 1'b0;
    issue_req    = '0;
    commit_valid = 1'b0;
    commit       = '0;
    result_ready = 1'b0;
  end

  // latency: rising edges after the issue handshake up to and including the
  // result handshake. The issue phase drives issue_* at falling edges and
  // releases them just after the handshake edge; the result phase drives
  // result_ready at falling edges, so two threads (one issuing, one waiting
  // for a result) never drive the same signal at the same time.
  task automatic offload(input logic [31:0] instr, input logic [31:0] rs1, input logic [31:0] rs2,
                         input bit kill, output bit accepted, output logic [31:0] data,
                         output int latency, output bit we);
    xif_id_t id = next_id;
    bit      hs;
    int      wait_cycles = 0;
    next_id  = next_id + 1'b1;
    offloads++;
    data     = '0;
    we       = 1'b0;
    latency  = 0;
    @(negedge clk);
    issue_valid = 1'b1;
    issue_req   = '{instr: instr, rs1: rs1, rs2: rs2, id: id};
    #1;
    while (!issue_ready) begin
      stall_cycles++;
      if (hung || ++wait_cycles > TIMEOUT) begin
        hung = 1;
        issue_valid = 1'b0;
        accepted = 1'b0;
        return;
      end
      @(negedge clk);
      #1;
    end
    accepted = issue_resp.accept;
    if (!accepted) rejects++;
    if (accepted && commit_delay == 0) begin
      commit_valid = 1'b1;
      commit       = '{id: id, kill: kill};
    end
    @(posedge clk);
    #1;
    issue_valid  = 1'b0;
    commit_valid = 1'b0;
    if (!accepted) return;
    if (commit_delay > 0) begin
      repeat (commit_delay - 1) begin @(posedge clk); latency++; end
      late_commits++;
      @(negedge clk);
      commit_valid = 1'b1;
      commit       = '{id: id, kill: kill};
      @(posedge clk);
      latency++;
      #1;
      commit_valid = 1'b0;
    end
    if (kill) begin
      kills++;
      return;
    end
    forever begin
      @(negedge clk);
      result_ready = bp_en ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      hs = result_valid && result_ready;
      if (result_valid && !result_ready) bp_cycles++;
      if (hs) begin
        data = result.data;
        we   = result.we;
        if (result.id != id) id_errors++;
      end
      @(posedge clk);
      latency++;
      if (hs) break;
      if (hung || latency > TIMEOUT) begin
        hung = 1;
        result_ready = 1'b0;
        return;
      end
    end
    #1;
    result_ready = 1'b0;
  endtask
endmodule
