// crypto_pkg: types and constants shared by the dual-field quad-core
// cryptoprocessor.
//
// The instruction set has six instructions (three prime-field, three
// binary-field), each identified by a 3-bit opcode. The numbering 1..6
// follows the order of the instruction table; codes 0 and 7 are not
// instructions and are rejected by the microcode sequence unit (this
// encoding is a choice of this design, the source gives only the order).
// The GF(2^m) field is GF(16) with p(x) = x^4 + x + 1.
package crypto_pkg;

  localparam int unsigned OP_W      = 3;      // opcode width
  localparam int unsigned GF_M      = 4;      // m of GF(2^m)
  localparam logic [4:0]  GF_POLY   = 5'b10011; // x^4 + x + 1

  typedef enum logic [OP_W-1:0] {
    OP_NONE   = 3'd0,
    OP_FP_MUL = 3'd1,  // a*b mod p, Montgomery-ladder interleaved
    OP_FP_ADD = 3'd2,  // a+b mod p
    OP_FP_SUB = 3'd3,  // a-b mod p
    OP_GF_MUL = 3'd4,  // a*b in GF(2^4), table look-up
    OP_GF_ADD = 3'd5,  // a xor b
    OP_GF_DBL = 3'd6,  // GF double (built from the GF adder)
    OP_RSVD   = 3'd7
  } opcode_e;

  // Decoded form of an opcode.
  typedef struct packed {
    logic valid;   // one of the six instructions
    logic fp;      // prime-field instruction
    logic gf;      // binary-field instruction
    logic mul;
    logic add;
    logic sub;
    logic dbl;
  } decoded_t;

endpackage
