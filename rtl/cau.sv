// cau: configurable arithmetic unit, the execution unit of one core.
//
// Holds a prime-field unit (fp_unit) and a binary-field unit (gf_unit) side
// by side. The one-bit enable from the microcode sequence unit starts the
// instruction named by `op` in the unit of its field; the other unit ignores
// it. `result` shows the RESULT_W-bit result of the last finished
// instruction: the F_p result, or the m-bit GF result zero-extended.
//
// Timing: `en` is a one-cycle pulse with op, a, b and p valid; `done`
// pulses when the result is ready: 1 cycle later for GF instructions, 2 for
// F_p add/sub and P_W + 1 for F_p multiply. `op` must be held from
// `en` until `done`.
module cau
  import crypto_pkg::*;
#(
  parameter int unsigned W        = 256,
  parameter int unsigned SLICE    = 64,
  parameter int unsigned P_W      = 8,
  parameter int unsigned RESULT_W = 512
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [OP_W-1:0]     op,
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  input  logic [P_W-1:0]      p,
  output logic                done,
  output logic [RESULT_W-1:0] result
);

  decoded_t dec;
  instr_decoder u_dec (.op(op), .dec(dec));

  logic                fp_done, fp_busy, gf_done;
  logic [RESULT_W-1:0] fp_result;
  logic [GF_M-1:0]     gf_result;
  logic                sel_fp;

  fp_unit #(.W(W), .SLICE(SLICE), .P_W(P_W), .RESULT_W(RESULT_W)) u_fp (
    .clk, .rst, .start(en), .op, .a, .b, .p,
    .busy(fp_busy), .done(fp_done), .result(fp_result)
  );

  gf_unit #(.W(W)) u_gf (
    .clk, .rst, .start(en), .op, .a, .b,
    .done(gf_done), .result(gf_result)
  );

  always_ff @(posedge clk) begin
    if (rst)     sel_fp <= 1'b0;
    else if (en) sel_fp <= dec.fp;
  end

  assign done   = fp_done | gf_done;
  assign result = sel_fp ? fp_result : RESULT_W'(gf_result);

  always_ff @(posedge clk)
    if (!rst) assert (!(en && fp_busy)) else $error("cau: enabled while the F_p unit is busy");

endmodule
