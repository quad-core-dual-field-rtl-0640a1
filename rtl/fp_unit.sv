// fp_unit: prime-field GF(p) adder / subtractor / multiplier.
//
// Datapath: three W-bit carry-select adders (a256_adder), a left shifter and
// a multiplexer & control unit that steers the adder inputs and holds the
// state and the RESULT_W-bit result. All arithmetic is two's complement; the
// reduction test of every step is "bit n of v OR bit n of w", n = P_W being
// the width of the modulus p. One ladder step takes one clock.
//
//   add (a+b mod p): v2 = a + b ; w2 = v2 + ~p + 1 (~p over n bits) ;
//                    c2 = v2[n] | w2[n] ; result = c2 ? w2 : v2
//   sub (a-b mod p): v2 = a + ~b + 1 ; w2 = v2 + p ; c2 = v2[n] (sign) ;
//                    result = c2 ? w2 : v2
//   mul (a*b mod p): Montgomery-ladder interleaved (Blakley) multiplication
//                    over the n bits of b, MSB first. Per step, with
//                    u = b_i ? s2 : s1 : v1 = 2u (left shifter),
//                    v2 = s1 + s2, w1/w2 = v1/v2 - p, t1/t2 reduced as above;
//                    b_i = 1: s1 <- t2, s2 <- t1 ; b_i = 0: s1 <- t1, s2 <- t2.
//                    Starts from s1 = 0, s2 = a; the result is s1.
//
// The algorithm's printed update (b_i = 1: s1 <- t1, s2 <- t2) does not
// produce a*b mod p; the update above, with t1 and t2 exchanged, is the
// Montgomery ladder that does, and is what is built.
//
// Result format: for add the result is the selected (n+1)-bit value, so
// when a reduction took place bit n is set and the residue sits in bits
// [n-1:0] (5 + 4 mod 7 gives 0x102). For sub and mul bits [n-1:0] hold the
// residue and everything above is zero. Operands must satisfy a, b < p
// (for mul: a < p; only the low n bits of b are used).
//
// Timing: `start` is taken when the unit is idle; operands are latched on
// that edge. The ladder steps run on the following edges: add and sub take
// one step, mul takes n steps. `done` therefore rises 2 cycles after start
// for add/sub and n + 1 cycles after start for mul (9 for n = 8); it is a
// one-cycle pulse with `result` valid from then until the next start.
// Widths (256-bit operands, 8-bit p, 512-bit result) follow the design; the
// handshake is this design's own.
module fp_unit
  import crypto_pkg::*;
#(
  parameter int unsigned W        = 256,  // operand / adder width
  parameter int unsigned SLICE    = 64,   // carry-select slice width
  parameter int unsigned P_W      = 8,    // width n of the modulus p
  parameter int unsigned RESULT_W = 512
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [OP_W-1:0]     op,
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  input  logic [P_W-1:0]      p,
  output logic                busy,
  output logic                done,
  output logic [RESULT_W-1:0] result
);

  localparam int unsigned N  = P_W;
  localparam int unsigned IW = (P_W > 1) ? $clog2(P_W) : 1;

  initial assert (P_W < W && RESULT_W > W) else $error("need P_W < W < RESULT_W");

  decoded_t dec;
  instr_decoder u_dec (.op(op), .dec(dec));

  // ---- state ----
  logic           run;
  logic           m_mul, m_sub;       // latched operation
  logic [W-1:0]   s1, s2;
  logic [N-1:0]   bq;                 // multiplier bits
  logic [N-1:0]   pq;                 // latched modulus
  logic [IW-1:0]  idx;                // ladder bit index i

  // ---- datapath ----
  logic           bi;
  logic [W-1:0]   u, v1;
  logic [W-1:0]   p_ext, p_neg;       // p and ~p (n-bit complement), zero-extended
  logic [W:0]     v2, w1, w2;
  logic [W:0]     t1, t2;
  logic           c1, c2;
  logic [W-1:0]   x_b, z_b;
  logic           z_cin;

  assign bi    = bq[idx];
  assign u     = bi ? s2 : s1;
  assign v1    = {u[W-2:0], 1'b0};                       // left shifter
  assign p_ext = {{(W-N){1'b0}}, pq};
  assign p_neg = {{(W-N){1'b0}}, ~pq};
  assign x_b   = m_sub ? ~s2 : s2;
  assign z_b   = m_sub ? p_ext : p_neg;
  assign z_cin = ~m_sub;

  a256_adder #(.W(W), .SLICE(SLICE)) u_add_v2 (.a(s1), .b(x_b), .cin(m_sub), .c(v2));
  a256_adder #(.W(W), .SLICE(SLICE)) u_add_w1 (.a(v1), .b(p_neg), .cin(1'b1), .c(w1));
  a256_adder #(.W(W), .SLICE(SLICE)) u_add_w2 (.a(v2[W-1:0]), .b(z_b), .cin(z_cin), .c(w2));

  // Multiplexer & control: reduction decisions.
  assign c1 = v1[N] | w1[N];
  assign c2 = m_sub ? v2[N] : (v2[N] | w2[N]);
  assign t1 = c1 ? w1 : {1'b0, v1};
  assign t2 = c2 ? w2 : v2;

  logic [W-1:0] s1_nx, s2_nx;
  always_comb begin
    s1_nx = '0;
    s2_nx = '0;
    s1_nx[N-1:0] = bi ? t2[N-1:0] : t1[N-1:0];
    s2_nx[N-1:0] = bi ? t1[N-1:0] : t2[N-1:0];
  end

  assign busy = run;

  always_ff @(posedge clk) begin
    if (rst) begin
      run    <= 1'b0;
      done   <= 1'b0;
      m_mul  <= 1'b0;
      m_sub  <= 1'b0;
      s1     <= '0;
      s2     <= '0;
      bq     <= '0;
      pq     <= '0;
      idx    <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start && dec.fp) begin
          run   <= 1'b1;
          m_mul <= dec.mul;
          m_sub <= dec.sub;
          pq    <= p;
          bq    <= b[N-1:0];
          idx   <= IW'(N - 1);
          if (dec.mul) begin
            s1 <= '0;
            s2 <= a;
          end else begin
            s1 <= a;
            s2 <= b;
          end
        end
      end else if (m_mul) begin
        s1 <= s1_nx;
        s2 <= s2_nx;
        if (idx == '0) begin
          run    <= 1'b0;
          done   <= 1'b1;
          result <= RESULT_W'(s1_nx);
        end else begin
          idx <= idx - 1'b1;
        end
      end else begin
        run    <= 1'b0;
        done   <= 1'b1;
        result <= m_sub ? RESULT_W'(t2[W-1:0]) : RESULT_W'(t2);
      end
    end
  end

  // Operand rule: residues below p.
  always_ff @(posedge clk) begin
    if (!rst && !run && start && dec.fp) begin
      assert (a < W'(p)) else $error("fp_unit: operand a must be below p");
      if (!dec.mul) assert (b < W'(p)) else $error("fp_unit: operand b must be below p");
    end
  end

endmodule
