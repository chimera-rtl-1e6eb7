// tb_bru: checks the Bitwise Rotation Unit: for each of the five Sigma
// operations the low 32 result bits against bit-by-bit rotations; after the
// operation retires, BRU_RDH returns the high 32 bits; a BRU_RDH retiring
// leaves the stored high half alone.
module tb_bru;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  logic        clk = 0, rst_n = 0, retire = 0;
  logic [63:0] x = '0;
  bru_op_e     op = BRU_SIG0;
  logic [31:0] res;
  int checks = 0, failures = 0;

  bru dut (.clk_i(clk), .rst_ni(rst_n), .operand_i(x), .op_i(op), .retire_i(retire), .result_o(res));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    op = BRU_RDH;
    #1; checks++; if (res !== 0) failures++;
    repeat (40) begin
      for (int i = 0; i < 5; i++) begin
        @(negedge clk);
        x = {$urandom, $urandom};
        op = bru_op_e'(i);
        e = ref_sigma(i, x);
        #1;
        checks++;
        if (res !== e[31:0]) begin failures++; $display("SIG%0d lo %h vs %h", i, res, e[31:0]); end
        retire = 1;
        @(negedge clk);
        retire = 0;
        op = BRU_RDH;
        x = ~x;
        #1;
        checks++;
        if (res !== e[63:32]) begin failures++; $display("SIG%0d hi %h vs %h", i, res, e[63:32]); end
        retire = 1;                 // retiring the read keeps the value
        @(negedge clk);
        retire = 0;
        #1;
        checks++;
        if (res !== e[63:32]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
