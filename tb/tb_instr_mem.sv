// tb_instr_mem: writes random words into every location of the instruction
// memory and reads them back, checking the one-cycle read latency.
module tb_instr_mem;
  logic        clk = 0, we = 0;
  logic [3:0]  waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [16];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = 12'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 16; i++) begin
        raddr = 4'($urandom);
        @(negedge clk);
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          $display("FAIL addr %0d got %h exp %h", raddr, rdata, model[raddr]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
