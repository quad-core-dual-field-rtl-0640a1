// data_mem: data memory holding W-bit operands. One write port for
// loading and two synchronous read ports, one for operand a and one for b,
// both shared by all cores (data appears the cycle after the address).
// Depth is this design's choice; contents are undefined until written.
module data_mem #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_a,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end

endmodule
