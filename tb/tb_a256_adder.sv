// tb_a256_adder: self-checking test of the 256-bit carry-select adder.
// Compares c = a + b + cin with a wide behavioural sum on directed corner
// cases (carries rippling across every 64-bit slice boundary, all ones) and
// on random operands.
module tb_a256_adder;
  localparam int W = 256;
  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   c;
  int checks = 0, failures = 0;

  a256_adder dut (.a, .b, .cin, .c);

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %h exp %h", x, y, ci, c, exp);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W/32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);                  // full ripple, carry out
    check_one('1, '1, 1'b1);
    for (int k = 1; k < 4; k++) begin
      // carry produced exactly at a slice boundary
      check_one(W'(1) << (64*k) - 1, W'(1), 1'b0);
      check_one((W'(1) << (64*k)) - 1, '0, 1'b1);
      check_one(~W'(0) >> (64*(4-k)), W'(1), 1'b0);
    end
    check_one(W'(5), W'(4), 1'b0);
    for (int i = 0; i < 2000; i++) check_one(rnd(), rnd(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
