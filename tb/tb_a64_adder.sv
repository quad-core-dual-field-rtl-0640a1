// tb_a64_adder: checks the 64-bit slice adder {cout, s} = a + b + cin on
// corner cases (all ones with carry in, zero) and random operands against a
// 65-bit behavioural sum.
module tb_a64_adder;
  logic [63:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  a64_adder dut (.a, .b, .cin, .s, .cout);

  task automatic check_one(input logic [63:0] x, input logic [63:0] y, input logic ci);
    logic [64:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 65'(ci);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %h exp %h", x, y, ci, {cout, s}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one(64'd5, 64'd4, 1'b1);
    for (int i = 0; i < 1000; i++) check_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
