// instr_mem: instruction memory. Each word holds one 3-bit opcode per core,
// core k in bits [3k+2:3k], so a word is a bundle of four instructions run
// in parallel. One write port for loading, one synchronous read port
// (data appears the cycle after the address). Depth is this design's
// choice; contents are undefined until written.
module instr_mem #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned WORD_W = 12,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
