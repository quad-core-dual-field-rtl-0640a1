// microcode_seq: microcode sequence unit of one core.
//
// Checks that the incoming 3-bit instruction is one of the six instructions
// and only then enables its configurable arithmetic unit (CAU) with a
// one-bit enable. It then waits for the CAU to report completion and passes
// that on. An invalid opcode never reaches the CAU: the unit answers at once
// with `done` and `illegal` set.
//
// Timing: `start` is sampled when idle. Valid opcode: `cau_en` pulses on the
// next cycle, and `done` pulses on the cycle after `cau_done`. Invalid
// opcode: `done` and `illegal` pulse on the next cycle. `illegal` is held
// until the next start. The checking role is the design's; the handshake is
// this design's own.
module microcode_seq
  import crypto_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [OP_W-1:0] op,
  output logic            cau_en,
  input  logic            cau_done,
  output logic            done,
  output logic            illegal,
  output logic            busy
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT} state_e;
  state_e   state;
  decoded_t dec;

  instr_decoder u_dec (.op(op), .dec(dec));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cau_en  <= 1'b0;
      done    <= 1'b0;
      illegal <= 1'b0;
    end else begin
      cau_en <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          illegal <= ~dec.valid;
          if (dec.valid) begin
            cau_en <= 1'b1;
            state  <= S_WAIT;
          end else begin
            done <= 1'b1;
          end
        end
        S_WAIT: if (cau_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The CAU may only finish an instruction it was given.
  always_ff @(posedge clk)
    if (!rst) assert (!(cau_done && state == S_IDLE)) else $error("microcode_seq: CAU done while idle");

endmodule
