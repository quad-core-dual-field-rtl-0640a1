// tb_gf_unit: self-checking test of the GF(2^4) unit. Checks the worked
// example a = 5, b = 4 (mul 7, add 1, double 1), then random operands
// (upper operand bits set, which must be ignored) against a reference
// multiply, xor, and the one-cycle result latency. Prime-field opcodes must
// leave the unit idle.
module tb_gf_unit;
  import crypto_pkg::*;
  logic            clk = 0, rst = 1, start = 0;
  logic [OP_W-1:0] op;
  logic [255:0]    a, b;
  logic            done;
  logic [3:0]      result;
  int checks = 0, failures = 0;

  gf_unit dut (.clk, .rst, .start, .op, .a, .b, .done, .result);

  always #5 clk = ~clk;

  function automatic logic [3:0] ref_mul(input logic [3:0] x, input logic [3:0] z);
    logic [3:0] acc = 4'd0, t = x;
    for (int i = 0; i < 4; i++) begin
      if (z[i]) acc ^= t;
      t = t[3] ? ({t[2:0], 1'b0} ^ 4'b0011) : {t[2:0], 1'b0};
    end
    return acc;
  endfunction

  task automatic run(input opcode_e o, input logic [255:0] x, input logic [255:0] y, input logic [3:0] exp);
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!done || result !== exp) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d done=%0d got %0d exp %0d", o.name(), x[3:0], y[3:0], done, result, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NONE; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(OP_GF_MUL, 256'd5, 256'd4, 4'd7);
    run(OP_GF_ADD, 256'd5, 256'd4, 4'd1);
    run(OP_GF_DBL, 256'd5, 256'd4, 4'd1);
    run(OP_GF_MUL, 256'd8, 256'd7, 4'd13);
    for (int i = 0; i < 200; i++) begin
      logic [255:0] x, y;
      x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      run(OP_GF_MUL, x, y, ref_mul(x[3:0], y[3:0]));
      run(OP_GF_ADD, x, y, x[3:0] ^ y[3:0]);
      run(OP_GF_DBL, x, y, x[3:0] ^ y[3:0]);
    end
    // a prime-field opcode must not produce a GF result
    @(negedge clk);
    op = OP_FP_ADD; a = 256'd3; b = 256'd3; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL GF unit answered a prime-field opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
