// a64_adder: one slice adder of the carry-select adder, s = a + b + cin with
// carry out. On an FPGA this maps onto one dedicated fast carry chain; the
// slice width is a parameter (64 by default, the A64 blocks of the 256-bit
// adder). Combinational.
module a64_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb {cout, s} = a + b + {{(W-1){1'b0}}, cin};

endmodule
