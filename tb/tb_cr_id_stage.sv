// tb_cr_id_stage: checks the CR decoder on every funct3/immediate pair of
// the CR unit and on instructions of other opcodes and units: legality,
// operation, immediate, rd and the write-back flag.
module tb_cr_id_stage;
  import chimera_pkg::*;
  logic [31:0] instr;
  logic        legal, wb;
  cr_op_e      op;
  logic [4:0]  imm, rd;
  int checks = 0, failures = 0;

  cr_id_stage dut (.instr_i(instr), .legal_o(legal), .op_o(op), .imm_o(imm), .rd_o(rd),
                   .writeback_o(wb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_legal;
    for (int f3 = 0; f3 < 8; f3++) begin
      for (int im = 0; im < 32; im++) begin
        logic [4:0] rdv;
        rdv = 5'($urandom);
        instr = make_instr(5'(im), UNIT_CR, 5'($urandom), 5'($urandom), 3'(f3), rdv);
        #1;
        exp_legal = (f3 == 0 && im <= 4) || (f3 == 1 && im <= 9) || (f3 == 2 && im >= 1 && im <= 12);
        checks++;
        if (legal !== exp_legal || wb !== (exp_legal && f3 == 1)) begin
          failures++;
          $display("f3=%0d imm=%0d legal=%b wb=%b", f3, im, legal, wb);
        end
        if (exp_legal) begin
          checks++;
          if (op !== cr_op_e'(f3) || imm !== 5'(im) || rd !== rdv) failures++;
        end
      end
    end
    // another unit, another opcode
    instr = make_instr(5'd1, UNIT_BRU, 5'd1, 5'd2, 3'(CR_LD), 5'd3);
    #1; checks++; if (legal) failures++;
    instr = make_instr(5'd1, UNIT_CR, 5'd1, 5'd2, 3'(CR_LD), 5'd3);
    instr[6:0] = 7'b0110011;
    #1; checks++; if (legal) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
