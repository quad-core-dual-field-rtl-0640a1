// tb_instr_decoder: checks the decoded selects of all eight opcodes against
// the instruction table (1 F_p mul, 2 F_p add, 3 F_p sub, 4 GF mul,
// 5 GF add, 6 GF double; 0 and 7 invalid).
module tb_instr_decoder;
  import crypto_pkg::*;
  logic [OP_W-1:0] op;
  decoded_t        dec;
  int checks = 0, failures = 0;

  instr_decoder dut (.op, .dec);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected {valid, fp, gf, mul, add, sub, dbl}
    logic [6:0] exp [8];
    exp[0] = 7'b000_0000;
    exp[1] = 7'b110_1000;
    exp[2] = 7'b110_0100;
    exp[3] = 7'b110_0010;
    exp[4] = 7'b101_1000;
    exp[5] = 7'b101_0100;
    exp[6] = 7'b101_0001;
    exp[7] = 7'b000_0000;
    for (int i = 0; i < 8; i++) begin
      op = OP_W'(i);
      #1;
      checks++;
      if (dec !== exp[i]) begin
        failures++;
        $display("FAIL op=%0d got %b exp %b", i, dec, exp[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
