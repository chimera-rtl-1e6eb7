// tb_ascon_linear: checks the linear diffusion layer (five Sigma functions,
// each an ascon_sigma instance) against bit-by-bit rotations, on single-bit
// words (which show each rotation amount) and random states.
module tb_ascon_linear;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  state_t x, y;
  int checks = 0, failures = 0;

  ascon_linear dut (.x_i(x), .x_o(y));

  task automatic check();
    #1;
    checks++;
    if (y !== state_t'(ref_linear(ref_state_t'(x)))) begin
      failures++;
      $display("in %h got %h", x, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 64; b++) begin
      for (int i = 0; i < 5; i++) x[i] = 64'd1 << b;
      check();
    end
    repeat (200) begin
      for (int i = 0; i < 5; i++) x[i] = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
