// tb_quad_core_crypto: end-to-end test of the quad-core cryptoprocessor at
// its default size (four cores, 256-bit operands, 8-bit p, 512-bit results).
//
// Program 1 is the worked example: one bundle of F_p add, F_p sub, GF mul
// and GF double on a = 5, b = 4, p = 7, expected results 0x102, 1, 7, 1.
// Then random programs of 16 bundles each, with random valid and invalid
// opcodes, random operands below a random p, are loaded, run and checked
// bundle by bundle against a reference model written here, together with
// the time between result bundles (set by the slowest core of the bundle).
// Every mechanism is counted and must occur: each of the six instructions,
// rejected opcodes, add reduction, subtract wrap-around, bundles mixing both
// fields, multi-step programs and a change of p between programs.
module tb_quad_core_crypto;
  import crypto_pkg::*;
  localparam int NC = 4, RW = 512, P_W = 8;

  logic                     clk = 0, rst = 1, start = 0;
  logic [P_W-1:0]           p;
  logic [3:0]               last_step;
  logic                     imem_we = 0, dmem_we = 0;
  logic [3:0]               imem_addr;
  logic [11:0]              imem_wdata;
  logic [4:0]               dmem_addr;
  logic [255:0]             dmem_wdata;
  logic [NC-1:0][RW-1:0]    result;
  logic                     result_valid, busy, done;
  logic [3:0]               result_step;
  logic [NC-1:0]            illegal;

  quad_core_crypto dut (
    .clk, .rst, .p, .start, .last_step,
    .imem_we, .imem_addr, .imem_wdata, .dmem_we, .dmem_addr, .dmem_wdata,
    .result, .result_valid, .result_step, .illegal, .busy, .done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_op [8];
  int n_reduce = 0, n_wrap = 0, n_mixed = 0, n_multistep = 0, n_pchange = 0;

  // program image
  logic [11:0] prog [16];
  int          opa [16], opb [16];

  function automatic logic [3:0] ref_gf_mul(input logic [3:0] x, input logic [3:0] z);
    logic [3:0] acc = 4'd0, t = x;
    for (int i = 0; i < 4; i++) begin
      if (z[i]) acc ^= t;
      t = t[3] ? ({t[2:0], 1'b0} ^ 4'b0011) : {t[2:0], 1'b0};
    end
    return acc;
  endfunction

  function automatic logic [RW-1:0] ref_result(input int o, input int x, input int y, input int pm);
    case (o)
      1: return RW'((x * (y & 255)) % pm);
      2: return (x + y >= pm) ? RW'(256 + x + y - pm) : RW'(x + y);
      3: return RW'((x - y + pm) % pm);
      4: return RW'(ref_gf_mul(4'(x), 4'(y)));
      5: return RW'((x ^ y) & 15);
      6: return RW'((x ^ y) & 15);
      default: return '0;
    endcase
  endfunction

  function automatic int core_lat(input int o);
    if (o == 0 || o == 7) return 1;
    if (o >= 4) return 3;
    if (o == 1) return P_W + 3;
    return 4;
  endfunction

  task automatic load_and_run(input int steps, input int pm);
    int t_last, t_now, s_seen;
    @(negedge clk);
    for (int s = 0; s < steps; s++) begin
      imem_we = 1; imem_addr = 4'(s); imem_wdata = prog[s];
      dmem_we = 1; dmem_addr = 5'(2 * s); dmem_wdata = 256'(opa[s]);
      @(negedge clk);
      dmem_addr = 5'(2 * s + 1); dmem_wdata = 256'(opb[s]);
      imem_we = 0;
      @(negedge clk);
    end
    dmem_we = 0;
    p = P_W'(pm);
    last_step = 4'(steps - 1);
    start = 1;
    @(negedge clk);
    start = 0;
    t_last = 0; t_now = 1; s_seen = 0;
    while (s_seen < steps && t_now < 5000) begin
      @(negedge clk);
      t_now++;
      if (result_valid) begin
        int s, mx, period;
        logic mix_fp, mix_gf;
        s = int'(result_step);
        checks++;
        if (s != s_seen) begin
          failures++;
          $display("FAIL step order: got %0d exp %0d", s, s_seen);
        end
        mx = 0; mix_fp = 0; mix_gf = 0;
        for (int k = 0; k < NC; k++) begin
          int o;
          logic [RW-1:0] exp;
          o = int'(prog[s][3*k +: 3]);
          n_op[o]++;
          if (core_lat(o) > mx) mx = core_lat(o);
          if (o >= 1 && o <= 3) mix_fp = 1;
          if (o >= 4 && o <= 6) mix_gf = 1;
          if (o == 2 && opa[s] + opb[s] >= pm) n_reduce++;
          if (o == 3 && opa[s] < opb[s]) n_wrap++;
          exp = ref_result(o, opa[s], opb[s], pm);
          checks++;
          if (result[k] !== exp || illegal[k] !== (o == 0 || o == 7)) begin
            failures++;
            $display("FAIL step %0d core %0d op %0d a=%0d b=%0d p=%0d got %h ill=%0d exp %h",
                     s, k, o, opa[s], opb[s], pm, result[k][15:0], illegal[k], exp[15:0]);
          end
        end
        if (mix_fp && mix_gf) n_mixed++;
        // cycles between start (or previous bundle) and this bundle
        period = mx + 4;
        if (s == 0) period = period + 1;
        checks++;
        if (t_now - t_last != period) begin
          failures++;
          $display("FAIL step %0d took %0d cycles, exp %0d", s, t_now - t_last, period);
        end
        t_last = t_now;
        s_seen++;
      end
    end
    @(negedge clk);
    checks++;
    if (s_seen != steps || busy) begin
      failures++;
      $display("FAIL program of %0d steps: %0d results, busy=%0d", steps, s_seen, busy);
    end
    if (steps > 1) n_multistep++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pm, prev_pm;
    foreach (n_op[i]) n_op[i] = 0;
    p = 8'd7; last_step = '0; imem_addr = '0; imem_wdata = '0; dmem_addr = '0; dmem_wdata = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // worked example: core0 F_p add, core1 F_p sub, core2 GF mul, core3 GF double
    prog[0] = {3'(OP_GF_DBL), 3'(OP_GF_MUL), 3'(OP_FP_SUB), 3'(OP_FP_ADD)};
    opa[0] = 5; opb[0] = 4;
    load_and_run(1, 7);
    checks++;
    if (result[0] !== RW'('h102) || result[1] !== RW'(1) || result[2] !== RW'(7) || result[3] !== RW'(1)) begin
      failures++;
      $display("FAIL worked example");
    end

    prev_pm = 7;
    for (int r = 0; r < 20; r++) begin
      pm = 2 + int'($urandom % 254);
      if (pm != prev_pm) n_pchange++;
      prev_pm = pm;
      for (int s = 0; s < 16; s++) begin
        for (int k = 0; k < NC; k++) begin
          int o;
          o = ($urandom % 10 == 0) ? int'($urandom % 8) : 1 + int'($urandom % 6);
          prog[s][3*k +: 3] = 3'(o);
        end
        opa[s] = int'($urandom % pm);
        opb[s] = int'($urandom % pm);
      end
      load_and_run(1 + int'($urandom % 16), pm);
    end

    for (int o = 0; o < 8; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL opcode %0d never ran", o); end
    end
    checks++; if (n_reduce == 0)    begin failures++; $display("FAIL no add reduction"); end
    checks++; if (n_wrap == 0)      begin failures++; $display("FAIL no subtract wrap"); end
    checks++; if (n_mixed == 0)     begin failures++; $display("FAIL no mixed-field bundle"); end
    checks++; if (n_multistep == 0) begin failures++; $display("FAIL no multi-step program"); end
    checks++; if (n_pchange == 0)   begin failures++; $display("FAIL p never changed"); end
    $display("ops: mul %0d add %0d sub %0d gfmul %0d gfadd %0d gfdbl %0d invalid %0d; reduce %0d wrap %0d mixed %0d multistep %0d pchange %0d",
             n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[0] + n_op[7],
             n_reduce, n_wrap, n_mixed, n_multistep, n_pchange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
