// instr_decoder: decodes a 3-bit instruction opcode into field and operation
// selects.
//
// The prime-field unit, the binary-field unit and the microcode sequence unit
// each hold one of these. Purely combinational: `dec` follows `op` in the
// same cycle. Opcodes 1..6 are the six instructions (F_p multiply, add,
// subtract; GF multiply, add, double); 0 and 7 decode to valid = 0 with every
// select low. The encoding is this design's choice.
module instr_decoder
  import crypto_pkg::*;
(
  input  logic [OP_W-1:0] op,
  output decoded_t        dec
);

  always_comb begin
    dec = '0;
    unique case (op)
      OP_FP_MUL: begin dec.valid = 1'b1; dec.fp = 1'b1; dec.mul = 1'b1; end
      OP_FP_ADD: begin dec.valid = 1'b1; dec.fp = 1'b1; dec.add = 1'b1; end
      OP_FP_SUB: begin dec.valid = 1'b1; dec.fp = 1'b1; dec.sub = 1'b1; end
      OP_GF_MUL: begin dec.valid = 1'b1; dec.gf = 1'b1; dec.mul = 1'b1; end
      OP_GF_ADD: begin dec.valid = 1'b1; dec.gf = 1'b1; dec.add = 1'b1; end
      OP_GF_DBL: begin dec.valid = 1'b1; dec.gf = 1'b1; dec.dbl = 1'b1; end
      default:   dec = '0;
    endcase
  end

endmodule
