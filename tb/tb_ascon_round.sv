// tb_ascon_round: checks one combinational ASCON round for every round index
// against the reference model, and chains twelve rounds on the ASCON-Hash
// initial value to reproduce the published ASCON-Hash initial state.
module tb_ascon_round;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  state_t     x, y;
  logic [3:0] r;
  int checks = 0, failures = 0;

  ascon_round dut (.x_i(x), .round_i(r), .x_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20) begin
      for (int i = 0; i < 12; i++) begin
        for (int w = 0; w < 5; w++) x[w] = {$urandom, $urandom};
        r = 4'(i);
        #1;
        checks++;
        if (y !== state_t'(ref_round(ref_state_t'(x), i))) failures++;
      end
    end
    x = '0;
    x[0] = HASH_IV;
    for (int i = 0; i < 12; i++) begin
      r = 4'(i);
      #1;
      x = y;
    end
    checks++;
    if (x !== state_t'(HASH_INIT)) begin
      failures++;
      $display("p12(hash IV) = %h", x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
