// tb_microcode_seq: checks the microcode sequence unit. A valid opcode must
// give exactly one cau_en pulse the next cycle and a done pulse the cycle
// after cau_done; an invalid opcode (0 or 7) must give done and illegal the
// next cycle and never enable the CAU.
module tb_microcode_seq;
  import crypto_pkg::*;
  logic            clk = 0, rst = 1, start = 0, cau_done = 0;
  logic [OP_W-1:0] op;
  logic            cau_en, done, illegal, busy;
  int checks = 0, failures = 0;
  int en_count = 0;

  microcode_seq dut (.clk, .rst, .start, .op, .cau_en, .cau_done, .done, .illegal, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) if (cau_en) en_count++;

  task automatic expect_(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NONE;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int o = 0; o < 8; o++) begin
      int en_before, wait_c;
      en_before = en_count;
      wait_c = 1 + int'($urandom % 5);
      @(negedge clk);
      op = OP_W'(o); start = 1;
      @(negedge clk);
      start = 0;
      if (o >= 1 && o <= 6) begin
        expect_(cau_en && !done && busy && !illegal, $sformatf("op %0d: enable next cycle", o));
        repeat (wait_c) begin
          @(negedge clk);
          expect_(!cau_en && !done, $sformatf("op %0d: single enable, no early done", o));
        end
        cau_done = 1;
        @(negedge clk);
        cau_done = 0;
        expect_(done && !illegal, $sformatf("op %0d: done after CAU", o));
        @(negedge clk);
        expect_(!done && !busy, $sformatf("op %0d: back to idle", o));
        expect_(en_count == en_before + 1, $sformatf("op %0d: one enable", o));
      end else begin
        expect_(!cau_en && done && illegal && !busy, $sformatf("op %0d: rejected", o));
        @(negedge clk);
        expect_(en_count == en_before, $sformatf("op %0d: CAU never enabled", o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
