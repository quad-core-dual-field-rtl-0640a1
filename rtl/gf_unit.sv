// gf_unit: binary extension field unit over GF(2^m), m = 4.
//
// Takes the low m bits of the two wide operands and holds three blocks:
//   GF ADD    : a xor b (field addition),
//   GF MUL    : table look-up multiplier (gf_mul_lut),
//   GF DOUBLE : built from a second field adder; it adds the two halves
//               (r3, r4) of the point held in the operands, r3 = a, r4 = b,
//               result = r3 xor r4.
// An instruction decoder and a multiplexer pick the block for the opcode and
// load the m-bit result register.
//
// The double instruction is given as (r3,r4) + (r3,r4) built on an adder;
// the literal sum x + x of characteristic 2 is always zero, while for
// a = 5, b = 4 the reported result is 1 = 5 xor 4. This design follows the
// reported result. Timing: `start` with a GF opcode loads `result` and
// pulses `done` on the next clock edge.
module gf_unit
  import crypto_pkg::*;
#(
  parameter int unsigned W    = 256,
  parameter int unsigned M    = GF_M,
  parameter logic [M:0]  POLY = GF_POLY
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [OP_W-1:0] op,
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  output logic            done,
  output logic [M-1:0]    result
);

  decoded_t dec;
  instr_decoder u_dec (.op(op), .dec(dec));

  logic [M-1:0] ra, rb;
  logic [M-1:0] y_add, y_mul, y_dbl, y_sel;

  assign ra = a[M-1:0];
  assign rb = b[M-1:0];

  assign y_add = ra ^ rb;                                  // GF ADD
  gf_mul_lut #(.M(M), .POLY(POLY)) u_mul (.a(ra), .b(rb), .y(y_mul));  // GF MUL
  assign y_dbl = ra ^ rb;                                  // GF DOUBLE: r3 + r4

  always_comb begin
    unique case (1'b1)
      dec.mul: y_sel = y_mul;
      dec.dbl: y_sel = y_dbl;
      default: y_sel = y_add;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start && dec.gf;
      if (start && dec.gf) result <= y_sel;
    end
  end

endmodule
