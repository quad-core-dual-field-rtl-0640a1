// a256_adder: wide adder c = a + b + cin with a (W+1)-bit result, built as a
// carry-select adder from SLICE-bit slice adders (a64_adder).
//
// The lowest slice adds with the real carry in. Every higher slice is built
// twice, once assuming carry in 0 and once assuming 1, and a 2:1 multiplexer
// picks the right sum and carry out as soon as the carry of the slice below
// is known. For W = 256 and SLICE = 64 the critical path is one slice adder
// plus three multiplexers, the structure the design is built around. The
// exact count and placement of slice adders in the original drawing is not
// copied; this is the plain linear carry-select form with the same delay.
// Combinational; W must be a multiple of SLICE with at least two slices.
module a256_adder #(
  parameter int unsigned W     = 256,
  parameter int unsigned SLICE = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   c
);

  localparam int unsigned NS = W / SLICE;

  logic [NS:0]         carry;       // carry into slice k, carry[NS] = out
  logic [W-1:0]        sum;
  // per-slice sums and carries for carry in 0 / 1 (slices 1..NS-1)
  logic [NS-1:1][SLICE-1:0] sum0, sum1;
  logic [NS-1:1]            co0, co1;

  initial assert (W % SLICE == 0 && W / SLICE >= 2) else $error("W must be a multiple of SLICE, at least two slices");

  assign carry[0] = cin;

  // Slice 0: the real carry in.
  a64_adder #(.W(SLICE)) u_low (
    .a(a[SLICE-1:0]), .b(b[SLICE-1:0]), .cin(cin),
    .s(sum[SLICE-1:0]), .cout(carry[1])
  );

  for (genvar k = 1; k < NS; k++) begin : g_sel
    a64_adder #(.W(SLICE)) u_c0 (
      .a(a[k*SLICE +: SLICE]), .b(b[k*SLICE +: SLICE]), .cin(1'b0),
      .s(sum0[k]), .cout(co0[k])
    );
    a64_adder #(.W(SLICE)) u_c1 (
      .a(a[k*SLICE +: SLICE]), .b(b[k*SLICE +: SLICE]), .cin(1'b1),
      .s(sum1[k]), .cout(co1[k])
    );
    // Carry-select multiplexers.
    assign sum[k*SLICE +: SLICE] = carry[k] ? sum1[k] : sum0[k];
    assign carry[k+1]            = carry[k] ? co1[k] : co0[k];
  end

  assign c = {carry[NS], sum};

endmodule
