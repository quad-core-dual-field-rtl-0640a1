// tb_gf_mul_lut: checks all 256 products of the GF(16) look-up multiplier
// (x^4 + x + 1) against a shift-and-reduce reference, plus entries of the
// published GF(16) multiplication table (8*7 = 13, 5*4 = 7, ...).
module tb_gf_mul_lut;
  logic [3:0] a, b, y;
  int checks = 0, failures = 0;

  gf_mul_lut dut (.a, .b, .y);

  // Reference: multiply by repeated doubling (xtime) and conditional add.
  function automatic logic [3:0] ref_mul(input logic [3:0] x, input logic [3:0] z);
    logic [3:0] acc = 4'd0, t = x;
    for (int i = 0; i < 4; i++) begin
      if (z[i]) acc ^= t;
      t = t[3] ? ({t[2:0], 1'b0} ^ 4'b0011) : {t[2:0], 1'b0};
    end
    return acc;
  endfunction

  task automatic check_one(input int x, input int z, input int exp);
    a = 4'(x); b = 4'(z);
    #1;
    checks++;
    if (y !== 4'(exp)) begin
      failures++;
      $display("FAIL %0d*%0d got %0d exp %0d", x, z, y, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check_one(i, j, int'(ref_mul(4'(i), 4'(j))));
    // entries from the published table
    check_one(8, 7, 13);
    check_one(5, 4, 7);
    check_one(2, 8, 3);
    check_one(15, 15, 10);
    check_one(9, 2, 1);
    check_one(12, 10, 1);
    check_one(7, 14, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
