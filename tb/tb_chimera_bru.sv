// tb_chimera_bru: drives the BRU version through its CV-X-IF port set with
// a core model (xif_host). Checks each Sigma instruction's low result word
// and the following high-word read against bit-by-bit rotations, write-back
// flags and one-cycle result latency, refused instructions, a killed
// instruction leaving the stored high word alone (also when killed in its
// issue cycle or later), late commits, result backpressure and the issue
// stall of a second instruction offered while one is in flight.
module tb_chimera_bru;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  xif_issue_req_t  issue_req;
  xif_issue_resp_t issue_resp;
  xif_commit_t     commit;
  xif_result_t     result;
  int checks = 0, failures = 0;

  chimera_bru dut (.clk_i(clk), .rst_ni(rst_n), .issue_valid_i(issue_valid), .issue_ready_o(issue_ready),
                   .issue_req_i(issue_req), .issue_resp_o(issue_resp), .commit_valid_i(commit_valid),
                   .commit_i(commit), .result_valid_o(result_valid), .result_ready_i(result_ready),
                   .result_o(result));
  xif_host host (.clk, .issue_valid, .issue_ready, .issue_req, .issue_resp, .commit_valid, .commit,
                 .result_valid, .result_ready, .result);

  always #5 clk = ~clk;

  initial begin
    fork
      #2000000;
      wait (host.hung);
    join_any
    if (host.hung) $display("coprocessor stopped answering");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bru_op(input bru_op_e op, input logic [63:0] x, input bit kill, output logic [31:0] d);
    bit acc, we; int lat;
    host.offload(make_instr(5'd0, UNIT_BRU, 5'd2, 5'd1, 3'(op), 5'd7), x[31:0], x[63:32], kill, acc, d, lat, we);
    expect_eq("accept", 64'(acc), 1);
    if (!kill) begin
      expect_eq("we", 64'(we), 1);
      if (!host.bp_en && host.commit_delay == 0) expect_eq("latency", 64'(lat), 1);
    end
  endtask

  task automatic sigma_pair(input int i, input logic [63:0] x);
    logic [31:0] lo, hi;
    logic [63:0] e = ref_sigma(i, x);
    bru_op(bru_op_e'(i), x, 0, lo);
    bru_op(BRU_RDH, ~x, 0, hi);
    expect_eq($sformatf("sigma%0d", i), {hi, lo}, e);
  endtask

  initial begin
    bit acc, we; logic [31:0] d, d2; int lat;
    logic [63:0] x, e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bru_op(BRU_RDH, 0, 0, d);
    expect_eq("msb after reset", 64'(d), 0);
    repeat (20) for (int i = 0; i < 5; i++) sigma_pair(i, {$urandom, $urandom});
    // refused: CR unit, funct3 6 and 7
    host.offload(make_instr(5'd0, UNIT_CR, 5'd0, 5'd0, 3'd0, 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject cr", 64'(acc), 0);
    host.offload(make_instr(5'd0, UNIT_BRU, 5'd0, 5'd0, 3'd6, 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject 6", 64'(acc), 0);
    host.offload(make_instr(5'd0, UNIT_BRU, 5'd0, 5'd0, 3'd7, 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject 7", 64'(acc), 0);
    // a killed Sigma must not change the stored high word
    x = {$urandom, $urandom};
    e = ref_sigma(3, x);
    bru_op(BRU_SIG3, x, 0, d);
    bru_op(BRU_SIG1, ~x, 1, d);
    bru_op(BRU_RDH, 0, 0, d);
    expect_eq("msb kept over kill", 64'(d), 64'(e[63:32]));
    host.commit_delay = 2;
    bru_op(BRU_SIG0, ~x, 1, d);
    for (int i = 0; i < 5; i++) sigma_pair(i, {$urandom, $urandom});
    host.commit_delay = 0;
    host.bp_en = 1;
    repeat (10) for (int i = 0; i < 5; i++) sigma_pair(i, {$urandom, $urandom});
    host.bp_en = 0;
    // two instructions back to back from two threads: the second stalls
    begin
      int s0;
      s0 = host.stall_cycles;
      x = {$urandom, $urandom};
      e = ref_sigma(4, x);
      host.bp_en = 1;
      fork
        bru_op(BRU_SIG4, x, 0, d);
        begin @(negedge clk); #2; bru_op(BRU_RDH, 0, 0, d2); end
      join
      host.bp_en = 0;
      expect_eq("stalled pair", {d2, d}, e);
      checks++;
      if (host.stall_cycles == s0) begin failures++; $display("no stall"); end
    end
    expect_eq("ids", 64'(host.id_errors), 0);
    $display("stalls=%0d backpressure=%0d kills=%0d rejects=%0d late_commits=%0d",
             host.stall_cycles, host.bp_cycles, host.kills, host.rejects, host.late_commits);
    checks++;
    if (host.bp_cycles == 0 || host.kills != 2 || host.rejects != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
