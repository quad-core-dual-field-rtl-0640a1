// tb_data_mem: fills the 32 x 256-bit data memory with random words and
// reads them back through both read ports at once, each at its own address.
module tb_data_mem;
  logic         clk = 0, we = 0;
  logic [4:0]   waddr, ra, rb;
  logic [255:0] wdata, da, db;
  logic [255:0] model [32];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .raddr_b(rb), .rdata_a(da), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = '0; rb = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 64; i++) begin
      ra = 5'($urandom); rb = 5'($urandom);
      @(negedge clk);
      checks += 2;
      if (da !== model[ra]) begin failures++; $display("FAIL port a addr %0d", ra); end
      if (db !== model[rb]) begin failures++; $display("FAIL port b addr %0d", rb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
