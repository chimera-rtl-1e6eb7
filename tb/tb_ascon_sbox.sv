// tb_ascon_sbox: checks the bit-sliced S-box layer against a 32-entry table
// lookup per column: all 32 column values in every bit position, then
// random states.
module tb_ascon_sbox;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;
  state_t x, y;
  int checks = 0, failures = 0;

  ascon_sbox dut (.x_i(x), .x_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int i = 0; i < 5; i++) x[i] = {64{v[4-i]}};
      #1;
      checks++;
      if (y !== state_t'(ref_sbox(ref_state_t'(x)))) begin
        failures++;
        $display("column %0d: got %h", v, y);
      end
    end
    repeat (200) begin
      for (int i = 0; i < 5; i++) x[i] = {$urandom, $urandom};
      #1;
      checks++;
      if (y !== state_t'(ref_sbox(ref_state_t'(x)))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
