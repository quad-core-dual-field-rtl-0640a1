// gf_mul_lut: GF(2^m) multiplier by table look-up.
//
// A read-only table holds every product a*b of two m-bit field elements
// modulo the field polynomial (x^4 + x + 1 by default, giving GF(16)); the
// operands together form the table address. The table contents are
// computed at elaboration by carry-less multiplication followed by
// polynomial reduction, so the memory is 2^(2m) words of m bits (256 x 4).
// Combinational read: y follows a and b in the same cycle.
module gf_mul_lut #(
  parameter int unsigned M    = 4,
  parameter logic [M:0]  POLY = 5'b10011   // x^4 + x + 1
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  typedef logic [M-1:0] elem_t;

  function automatic elem_t gf_mult(input elem_t x, input elem_t z);
    logic [2*M-2:0] prod;
    prod = '0;
    for (int i = 0; i < M; i++)
      if (z[i]) prod ^= ((2*M-1)'(x)) << i;
    for (int i = 2*M-2; i >= M; i--)
      if (prod[i]) prod ^= ((2*M-1)'(POLY)) << (i - M);
    return prod[M-1:0];
  endfunction

  function automatic elem_t [2**(2*M)-1:0] build_table();
    elem_t [2**(2*M)-1:0] t;
    for (int i = 0; i < 2**M; i++)
      for (int j = 0; j < 2**M; j++)
        t[i*(2**M) + j] = gf_mult(elem_t'(i), elem_t'(j));
    return t;
  endfunction

  localparam elem_t [2**(2*M)-1:0] TABLE = build_table();

  assign y = TABLE[{a, b}];

endmodule
