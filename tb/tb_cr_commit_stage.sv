// tb_cr_commit_stage: checks the CR commit stage: a store returns the
// register value and completes one cycle after exec, a load returns zero
// after one cycle, a permutation completes one cycle after the
// permutation's done pulse and not before.
module tb_cr_commit_stage;
  import chimera_pkg::*;
  logic        clk = 0, rst_n = 0, exec = 0, pdone = 0, done;
  cr_op_e      op = CR_LD;
  logic [31:0] rdata = '0, res;
  int checks = 0, failures = 0;

  cr_commit_stage dut (.clk_i(clk), .rst_ni(rst_n), .exec_i(exec), .op_i(op),
                       .rf_rdata_i(rdata), .perm_done_i(pdone), .done_o(done), .result_o(res));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk); exec = 1; op = CR_ST; rdata = v;
      @(negedge clk); exec = 0; rdata = ~v;
      checks++; if (!done || res !== v) failures++;
      @(negedge clk);
      checks++; if (done || res !== v) failures++;
    end
    @(negedge clk); exec = 1; op = CR_LD; rdata = 32'h1234;
    @(negedge clk); exec = 0;
    checks++; if (!done || res !== 0) failures++;
    @(negedge clk); exec = 1; op = CR_PERM;
    @(negedge clk); exec = 0;
    checks++; if (done) failures++;
    repeat (3) @(negedge clk);
    checks++; if (done) failures++;
    pdone = 1;
    @(negedge clk); pdone = 0;
    checks++; if (!done || res !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
