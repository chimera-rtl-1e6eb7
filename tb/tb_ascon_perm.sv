// tb_ascon_perm: runs the iterative permutation for N = 12, 8, 6, 1 and 0
// rounds on random states and on the ASCON-Hash initial value. Checks the
// permuted state against the reference model, that done pulses exactly N
// cycles after start (one cycle for N = 0), that busy is high in between,
// and that a start while busy is ignored.
module tb_ascon_perm;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0, busy, done;
  logic [3:0] rounds = '0;
  state_t     sin = '0, sout;
  int checks = 0, failures = 0;

  ascon_perm dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .rounds_i(rounds),
                  .state_i(sin), .busy_o(busy), .done_o(done), .state_o(sout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input state_t s, input int n);
    int cyc = 0;
    @(negedge clk);
    sin = s; rounds = 4'(n); start = 1;
    @(negedge clk);
    start = 0;
    sin = ~s;          // a start while busy must not disturb the permutation
    cyc = 1;
    if (n > 1) begin
      checks++;
      if (!busy) failures++;
      start = 1;
    end
    while (!done && cyc < 40) begin
      @(negedge clk);
      start = 0;
      cyc++;
    end
    checks++;
    if (cyc != (n == 0 ? 1 : n)) begin
      failures++;
      $display("N=%0d: done after %0d cycles", n, cyc);
    end
    checks++;
    if (sout !== state_t'(ref_perm(ref_state_t'(s), n))) begin
      failures++;
      $display("N=%0d: wrong state", n);
    end
    @(negedge clk);
    checks++;
    if (done || busy) failures++;
  endtask

  initial begin
    state_t s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    s = '0;
    s[0] = HASH_IV;
    run(s, 12);
    checks++;
    if (sout !== state_t'(HASH_INIT)) failures++;
    foreach (s[w]) s[w] = {$urandom, $urandom};
    run(s, 8);
    foreach (s[w]) s[w] = {$urandom, $urandom};
    run(s, 6);
    foreach (s[w]) s[w] = {$urandom, $urandom};
    run(s, 1);
    foreach (s[w]) s[w] = {$urandom, $urandom};
    run(s, 0);
    repeat (5) begin
      foreach (s[w]) s[w] = {$urandom, $urandom};
      run(s, 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
