// tb_cr_regfile: checks the ten-register state file: reset to zero, pair
// loads into REG[2w]/REG[2w+1], single-register reads, the parallel 320-bit
// view, whole-file writes from the permutation port taking priority over a
// pair load, and that out-of-range indices neither write nor read.
module tb_cr_regfile;
  import chimera_pkg::*;
  logic        clk = 0, rst_n = 0, perm_we = 0, pair_we = 0;
  state_t      perm_state = '0, st;
  logic [2:0]  pidx = '0;
  logic [31:0] lo = '0, hi = '0, rdata;
  logic [3:0]  ridx = '0;
  logic [31:0] model [10];
  int checks = 0, failures = 0;

  cr_regfile dut (.clk_i(clk), .rst_ni(rst_n), .perm_we_i(perm_we), .perm_state_i(perm_state),
                  .pair_we_i(pair_we), .pair_idx_i(pidx), .lo_i(lo), .hi_i(hi),
                  .rd_idx_i(ridx), .rd_data_o(rdata), .state_o(st));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int r = 0; r < 16; r++) begin
      ridx = 4'(r);
      #1;
      checks++;
      if (rdata !== (r < 10 ? model[r] : 32'd0)) begin
        failures++;
        $display("REG%0d = %h, expected %h", r, rdata, r < 10 ? model[r] : 32'd0);
      end
    end
    for (int w = 0; w < 5; w++) begin
      checks++;
      if (st[w] !== {model[2*w+1], model[2*w]}) failures++;
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    repeat (30) begin
      @(negedge clk);
      pidx = 3'($urandom_range(0, 7));
      lo = $urandom; hi = $urandom;
      pair_we = 1;
      if (pidx < 5) begin model[2*pidx] = lo; model[2*pidx+1] = hi; end
      @(negedge clk);
      pair_we = 0;
      compare();
    end
    // permutation write wins over a simultaneous pair load
    @(negedge clk);
    foreach (perm_state[w]) perm_state[w] = {$urandom, $urandom};
    perm_we = 1; pair_we = 1; pidx = 0; lo = 32'hdead; hi = 32'hbeef;
    for (int w = 0; w < 5; w++) begin
      model[2*w] = perm_state[w][31:0]; model[2*w+1] = perm_state[w][63:32];
    end
    @(negedge clk);
    perm_we = 0; pair_we = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
