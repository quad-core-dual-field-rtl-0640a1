// tb_fp_unit: self-checking test of the prime-field unit at its default
// size (256-bit adders, 8-bit modulus, 512-bit result).
// Checks the worked example a = 5, b = 4, p = 7 (add gives 0x102, sub 1,
// mul 6), then random a, b < p for add, sub and mul against integer
// arithmetic, including the add reduction flag in bit 8, and the latency:
// done 2 cycles after start for add/sub, 9 cycles for mul.
module tb_fp_unit;
  import crypto_pkg::*;
  localparam int W = 256, P_W = 8, RW = 512;

  logic           clk = 0, rst = 1, start = 0;
  logic [OP_W-1:0] op;
  logic [W-1:0]   a, b;
  logic [P_W-1:0] p;
  logic           busy, done;
  logic [RW-1:0]  result;
  int checks = 0, failures = 0;
  int n_red = 0, n_wrap = 0;

  fp_unit dut (.clk, .rst, .start, .op, .a, .b, .p, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input opcode_e o, input int x, input int y, input int pm, input logic [RW-1:0] exp, input int lat);
    int cyc;
    @(negedge clk);
    op = o; a = W'(x); b = W'(y); p = P_W'(pm); start = 1;
    @(negedge clk);
    start = 0;
    op = OP_NONE;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d p=%0d got %h exp %h", o.name(), x, y, pm, result[15:0], exp[15:0]);
    end
    checks++;
    if (cyc != lat) begin
      failures++;
      $display("FAIL op=%s latency %0d exp %0d", o.name(), cyc, lat);
    end
  endtask

  initial begin
    op = OP_NONE; a = '0; b = '0; p = 8'd7;
    repeat (3) @(negedge clk);
    rst = 0;
    // worked example
    run(OP_FP_ADD, 5, 4, 7, RW'('h102), 2);
    run(OP_FP_SUB, 5, 4, 7, RW'(1), 2);
    run(OP_FP_MUL, 5, 4, 7, RW'(6), P_W + 1);
    run(OP_FP_SUB, 4, 5, 7, RW'(6), 2);
    for (int i = 0; i < 300; i++) begin
      int pm, x, y, s;
      pm = 2 + int'($urandom % 254);
      x  = int'($urandom % pm);
      y  = int'($urandom % pm);
      s  = x + y;
      if (s >= pm) begin
        n_red++;
        run(OP_FP_ADD, x, y, pm, RW'(256 + s - pm), 2);
      end else begin
        run(OP_FP_ADD, x, y, pm, RW'(s), 2);
      end
      if (x < y) n_wrap++;
      run(OP_FP_SUB, x, y, pm, RW'((x - y + pm) % pm), 2);
      y = int'($urandom % 256);      // multiplier may use all 8 bits
      run(OP_FP_MUL, x, y, pm, RW'((x * y) % pm), P_W + 1);
    end
    run(OP_FP_MUL, 254, 255, 255, RW'((254 * 255) % 255), P_W + 1);
    run(OP_FP_MUL, 250, 255, 251, RW'((250 * 255) % 251), P_W + 1);
    run(OP_FP_ADD, 250, 250, 251, RW'(256 + 249), 2);
    checks++;
    if (n_red == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
