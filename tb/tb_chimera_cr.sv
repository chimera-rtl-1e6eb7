// tb_chimera_cr: drives the CR version through its CV-X-IF port set with a
// core model (xif_host) and checks, against the reference permutation:
// loads and stores of the ten state registers, permutations of 12, 8 and 6
// rounds, accept/write-back flags, rejection of foreign and out-of-range
// instructions, killed instructions having no effect, late commits, result
// backpressure and the issue stall behind a running permutation. Latencies
// (issue handshake to result handshake): 3 cycles for load/store, N+3 for
// a permutation of N rounds.
module tb_chimera_cr;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  xif_issue_req_t  issue_req;
  xif_issue_resp_t issue_resp;
  xif_commit_t     commit;
  xif_result_t     result;
  int checks = 0, failures = 0;
  state_t model;

  chimera_cr dut (.clk_i(clk), .rst_ni(rst_n), .issue_valid_i(issue_valid), .issue_ready_o(issue_ready),
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

  task automatic ld(input int w, input logic [63:0] v, input bit kill = 0);
    bit acc, we; logic [31:0] d; int lat;
    host.offload(make_instr(5'(w), UNIT_CR, 5'd2, 5'd1, 3'(CR_LD), 5'd0), v[31:0], v[63:32], kill, acc, d, lat, we);
    expect_eq("ld accept", 64'(acc), 1);
    if (!kill) begin
      expect_eq("ld we", 64'(we), 0);
      if (!host.bp_en && host.commit_delay == 0) expect_eq("ld latency", 64'(lat), 3);
    end
  endtask

  task automatic st(input int r, output logic [31:0] d);
    bit acc, we; int lat;
    host.offload(make_instr(5'(r), UNIT_CR, 5'd0, 5'd0, 3'(CR_ST), 5'd10), 32'hx, 32'hx, 0, acc, d, lat, we);
    expect_eq("st accept", 64'(acc), 1);
    expect_eq("st we", 64'(we), 1);
    if (!host.bp_en && host.commit_delay == 0) expect_eq("st latency", 64'(lat), 3);
  endtask

  task automatic perm(input int n);
    bit acc, we; logic [31:0] d; int lat;
    host.offload(make_instr(5'(n), UNIT_CR, 5'd0, 5'd0, 3'(CR_PERM), 5'd0), 0, 0, 0, acc, d, lat, we);
    expect_eq("perm accept", 64'(acc), 1);
    if (!host.bp_en && host.commit_delay == 0) expect_eq($sformatf("perm %0d latency", n), 64'(lat), 64'(n + 3));
    model = state_t'(ref_perm(ref_state_t'(model), n));
  endtask

  task automatic check_all();
    logic [31:0] d;
    for (int r = 0; r < 10; r++) begin
      st(r, d);
      expect_eq($sformatf("REG%0d", r), 64'(d), 64'(model[r/2][(r%2)*32 +: 32]));
    end
  endtask

  task automatic load_random();
    for (int w = 0; w < 5; w++) begin
      model[w] = {$urandom, $urandom};
      ld(w, model[w]);
    end
  endtask

  initial begin
    bit acc, we; logic [31:0] d; int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    model = '0;
    check_all();                       // reset state
    load_random();
    check_all();
    foreach (model[w]) model[w] = (w == 0) ? HASH_IV : 64'd0;
    foreach (model[w]) ld(w, model[w]);
    perm(12);
    check_all();
    expect_eq("hash init x0", model[0], HASH_INIT[0]);
    load_random(); perm(8); check_all();
    load_random(); perm(6); check_all();
    // refused instructions: other unit, bad immediates, other opcode
    host.offload(make_instr(5'd0, UNIT_BRU, 5'd0, 5'd0, 3'd0, 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject bru", 64'(acc), 0);
    host.offload(make_instr(5'd5, UNIT_CR, 5'd0, 5'd0, 3'(CR_LD), 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject ld 5", 64'(acc), 0);
    host.offload(make_instr(5'd13, UNIT_CR, 5'd0, 5'd0, 3'(CR_PERM), 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject perm 13", 64'(acc), 0);
    host.offload(make_instr(5'd0, UNIT_CR, 5'd0, 5'd0, 3'd3, 5'd1), 0, 0, 0, acc, d, lat, we);
    expect_eq("reject funct3 3", 64'(acc), 0);
    // killed load: no effect
    ld(2, 64'hffff_ffff_ffff_ffff, 1);
    check_all();
    // late commits, killed too
    host.commit_delay = 3;
    ld(1, 64'h0123_4567_89ab_cdef, 1);
    model[3] = 64'h0f0f_1234_5678_9abc;
    ld(3, model[3]);
    perm(12);
    check_all();
    host.commit_delay = 0;
    // backpressure on results
    host.bp_en = 1;
    load_random(); perm(12); check_all();
    host.bp_en = 0;
    // an instruction offered while a permutation runs stalls until it ends
    load_random();
    begin
      int stalls0;
      stalls0 = host.stall_cycles;
      fork
        perm(12);
        begin
          repeat (2) @(negedge clk);
          st(0, d);
        end
      join
      expect_eq("store after perm", 64'(d), 64'(model[0][31:0]));
      checks++;
      if (host.stall_cycles - stalls0 < 10) begin
        failures++;
        $display("stall cycles %0d", host.stall_cycles - stalls0);
      end
    end
    check_all();
    expect_eq("ids", 64'(host.id_errors), 0);
    $display("stalls=%0d backpressure=%0d kills=%0d rejects=%0d late_commits=%0d",
             host.stall_cycles, host.bp_cycles, host.kills, host.rejects, host.late_commits);
    checks++;
    if (host.bp_cycles == 0 || host.kills != 2 || host.rejects != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
