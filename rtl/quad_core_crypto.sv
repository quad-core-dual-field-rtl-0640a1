// quad_core_crypto: quad-core dual-field cryptoprocessor.
//
// Four cores run four instructions at the same time, each one either a
// prime-field GF(p) instruction (modular multiply, add, subtract) or a
// binary-field GF(2^4) instruction (multiply, add, double). Each core is a
// microcode sequence unit, which checks its opcode and enables its CAU only
// for a valid instruction, and a CAU holding both field units.
//
// Sequence control (hard-wired, no software): after `start` it walks the
// instruction memory from word 0 to word `last_step`. For step k it reads
// instruction word k (four 3-bit opcodes, core j in bits [3j+2:3j]) and the
// operands a = data word 2k, b = data word 2k+1; all four cores get the same
// a, b and the modulus p. It starts the four cores together, waits until
// every core is done, then presents the four results with a one-cycle
// `result_valid` pulse and moves on. `done` pulses after the last step.
// Results stay on `result` until the next step's results replace them; a
// core whose opcode was invalid shows 0 and its `illegal` bit.
//
// The four cores, the shared instruction and data memories, the 3-bit
// opcodes, the 1-bit core enable, 256-bit operands, the 8-bit p and the four
// 512-bit results follow the design. Memory depths, the operand addressing,
// the load ports and the step handshake are this design's own choices.
//
// Timing: a step takes L + 4 cycles from one `result_valid` pulse to the
// next, where L is the latency of its slowest core, counted from the issue
// cycle to that core's done: 1 for an invalid opcode, 3 for a GF
// instruction, 4 for F_p add/sub and P_W + 3 for F_p multiply. A bundle of
// GF instructions thus takes 7 cycles and one holding a multiply 15 (P_W = 8);
// the first step of a program takes one more cycle, counted from `start`.
// The memory load ports are ignored while `busy` is high.
module quad_core_crypto
  import crypto_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 4,
  parameter int unsigned DATA_W     = 256,
  parameter int unsigned SLICE      = 64,
  parameter int unsigned P_W        = 8,
  parameter int unsigned RESULT_W   = 512,
  parameter int unsigned IMEM_DEPTH = 16,
  parameter int unsigned DMEM_DEPTH = 2 * IMEM_DEPTH,
  parameter int unsigned IAW        = $clog2(IMEM_DEPTH),
  parameter int unsigned DAW        = $clog2(DMEM_DEPTH)
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [P_W-1:0]                      p,
  input  logic                                start,
  input  logic [IAW-1:0]                      last_step,
  // loading
  input  logic                                imem_we,
  input  logic [IAW-1:0]                      imem_addr,
  input  logic [NUM_CORES*OP_W-1:0]           imem_wdata,
  input  logic                                dmem_we,
  input  logic [DAW-1:0]                      dmem_addr,
  input  logic [DATA_W-1:0]                   dmem_wdata,
  // results
  output logic [NUM_CORES-1:0][RESULT_W-1:0]  result,
  output logic                                result_valid,
  output logic [IAW-1:0]                      result_step,
  output logic [NUM_CORES-1:0]                illegal,
  output logic                                busy,
  output logic                                done
);

  initial assert (DMEM_DEPTH >= 2 * IMEM_DEPTH) else $error("data memory too small");

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LOAD, S_ISSUE, S_WAIT, S_PUBLISH} state_e;
  state_e state;

  logic [IAW-1:0]              step;
  logic [NUM_CORES*OP_W-1:0]   iword, iword_q;
  logic [DATA_W-1:0]           da, db, a_q, b_q;
  logic [NUM_CORES-1:0]        seq_start, seq_done, seq_illegal, seq_busy, cau_en, cau_done;
  logic [NUM_CORES-1:0]        finished;
  logic [NUM_CORES-1:0][RESULT_W-1:0] cau_result;

  instr_mem #(.DEPTH(IMEM_DEPTH), .WORD_W(NUM_CORES*OP_W)) u_imem (
    .clk, .we(imem_we && !busy), .waddr(imem_addr), .wdata(imem_wdata),
    .raddr(step), .rdata(iword)
  );

  data_mem #(.DEPTH(DMEM_DEPTH), .W(DATA_W)) u_dmem (
    .clk, .we(dmem_we && !busy), .waddr(dmem_addr), .wdata(dmem_wdata),
    .raddr_a(DAW'({step, 1'b0})), .raddr_b(DAW'({step, 1'b1})),
    .rdata_a(da), .rdata_b(db)
  );

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_core
    microcode_seq u_seq (
      .clk, .rst, .start(seq_start[k]), .op(iword_q[k*OP_W +: OP_W]),
      .cau_en(cau_en[k]), .cau_done(cau_done[k]),
      .done(seq_done[k]), .illegal(seq_illegal[k]), .busy(seq_busy[k])
    );
    cau #(.W(DATA_W), .SLICE(SLICE), .P_W(P_W), .RESULT_W(RESULT_W)) u_cau (
      .clk, .rst, .en(cau_en[k]), .op(iword_q[k*OP_W +: OP_W]),
      .a(a_q), .b(b_q), .p,
      .done(cau_done[k]), .result(cau_result[k])
    );
  end

  assign seq_start = {NUM_CORES{state == S_ISSUE}};

  // A core may only be working while the controller waits for it.
  always_ff @(posedge clk)
    if (!rst) assert (seq_busy == '0 || state == S_WAIT) else $error("quad_core_crypto: core busy outside a step");
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      step         <= '0;
      iword_q      <= '0;
      a_q          <= '0;
      b_q          <= '0;
      finished     <= '0;
      result       <= '0;
      result_valid <= 1'b0;
      result_step  <= '0;
      illegal      <= '0;
      done         <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      done         <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          step  <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_LOAD;          // memories read `step`
        S_LOAD: begin
          iword_q  <= iword;
          a_q      <= da;
          b_q      <= db;
          finished <= '0;
          state    <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;          // seq_start pulses here
        S_WAIT: begin
          finished <= finished | seq_done;
          if ((finished | seq_done) == '1) state <= S_PUBLISH;
        end
        S_PUBLISH: begin
          for (int k = 0; k < NUM_CORES; k++)
            result[k] <= seq_illegal[k] ? '0 : cau_result[k];
          illegal      <= seq_illegal;
          result_valid <= 1'b1;
          result_step  <= step;
          if (step == last_step) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            step  <= step + 1'b1;
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
