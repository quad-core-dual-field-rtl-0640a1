// tb_cau: runs each of the six instructions through one CAU and checks the
// 512-bit result (GF results zero-extended) and the latency from enable to
// done: 1 cycle for GF, 2 for F_p add/sub, 9 for F_p multiply.
module tb_cau;
  import crypto_pkg::*;
  localparam int RW = 512;
  logic            clk = 0, rst = 1, en = 0;
  logic [OP_W-1:0] op;
  logic [255:0]    a, b;
  logic [7:0]      p;
  logic            done;
  logic [RW-1:0]   result;
  int checks = 0, failures = 0;

  cau dut (.clk, .rst, .en, .op, .a, .b, .p, .done, .result);

  always #5 clk = ~clk;

  function automatic logic [3:0] ref_mul(input logic [3:0] x, input logic [3:0] z);
    logic [3:0] acc = 4'd0, t = x;
    for (int i = 0; i < 4; i++) begin
      if (z[i]) acc ^= t;
      t = t[3] ? ({t[2:0], 1'b0} ^ 4'b0011) : {t[2:0], 1'b0};
    end
    return acc;
  endfunction

  task automatic run(input opcode_e o, input int x, input int y, input int pm, input logic [RW-1:0] exp, input int lat);
    int cyc;
    @(negedge clk);
    op = o; a = 256'(x); b = 256'(y); p = 8'(pm); en = 1;
    @(negedge clk);
    en = 0;
    cyc = 1;
    while (!done && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (result !== exp || cyc != lat) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d p=%0d got %h (lat %0d) exp %h (lat %0d)", o.name(), x, y, pm, result[15:0], cyc, exp[15:0], lat);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NONE; a = '0; b = '0; p = 8'd7;
    repeat (3) @(negedge clk);
    rst = 0;
    run(OP_FP_ADD, 5, 4, 7, RW'('h102), 2);
    run(OP_FP_SUB, 5, 4, 7, RW'(1), 2);
    run(OP_GF_MUL, 5, 4, 7, RW'(7), 1);
    run(OP_GF_DBL, 5, 4, 7, RW'(1), 1);
    run(OP_GF_ADD, 5, 4, 7, RW'(1), 1);
    run(OP_FP_MUL, 5, 4, 7, RW'(6), 9);
    for (int i = 0; i < 100; i++) begin
      int pm, x, y;
      pm = 17 + int'($urandom % 239);
      x  = int'($urandom % pm);
      y  = int'($urandom % pm);
      run(OP_FP_MUL, x, y, pm, RW'((x * y) % pm), 9);
      run(OP_GF_MUL, x, y, pm, RW'(ref_mul(4'(x), 4'(y))), 1);
      run(OP_FP_SUB, x, y, pm, RW'((x - y + pm) % pm), 2);
      run(OP_GF_ADD, x, y, pm, RW'((x ^ y) & 15), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
