// tb_lcu_top: end-to-end test of the pipelined log2 unit at its default
// (and only) configuration.
//
// Streams operands into the pipeline, mostly back to back with occasional
// idle cycles, and checks every result against log2 computed in double
// precision by the simulator ($ln(x) / $ln(2)):
//   - finite results must be within 4 units in the last place (21 correct
//     bits of the 24-bit significand), with the right sign;
//   - special operands must give the exact special results;
//   - each result must come out exactly LCU_LATENCY cycles after its operand,
//     in order, with out_valid matching in_valid.
// Operands are drawn from: any positive normal number, [0.5, 2), a few ulps
// around 1.0, subnormal numbers, and a list of special values. The test also counts how often
// each path of the datapath was taken (adding or subtracting L, e' = 0 with
// d above and below zero, rounding carry-out, subnormal operands, each
// special class, idle cycles) and fails if one never happened.
module tb_lcu_top;
  import lcu_pkg::*;

  localparam int unsigned N_OPS    = 4000;
  localparam int unsigned WATCHDOG = N_OPS * 2 + LCU_LATENCY + 1000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] y;

  lcu_top dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Operands in flight, with the cycle they entered.
  logic [31:0]     q_x[$];
  longint unsigned q_t[$];

  // Mechanism counters.
  int unsigned n_add = 0, n_sub = 0, n_e0_pos = 0, n_e0_neg = 0, n_one = 0;
  int unsigned n_rnd_carry = 0, n_nan = 0, n_neginf = 0, n_posinf = 0, n_idle = 0;
  int unsigned n_out = 0, n_subn = 0;
  real         worst_ulps = 0.0;

  function automatic real f2r(input logic [31:0] f);
    real mant, scale;
    int  e;
    mant  = ((f[30:23] != 0) ? 1.0 : 0.0) + f[22:0] / 8388608.0;
    e     = (f[30:23] != 0) ? int'({24'd0, f[30:23]}) : 1;
    scale = $pow(2.0, e - 127);
    return f[31] ? -(mant * scale) : mant * scale;
  endfunction

  function automatic logic [31:0] gen_operand(input int unsigned kind);
    logic [31:0] v, r1, r2, r3;
    logic [7:0]  ex;
    logic [22:0] mn;
    r1 = $urandom;
    r2 = $urandom_range(253);
    r3 = $urandom_range(64);
    ex = 8'd1 + r2[7:0];
    mn = r1[22:0];
    unique case (kind)
      0: v = {1'b0, ex, mn};                                  // any normal
      1: v = {1'b0, r1[31] ? 8'd126 : 8'd127, mn};            // [0.5, 2)
      2: v = 32'h3F80_0000 + r3 - 32'd32;                     // near 1.0
      default: begin
        unique case (r2 % 9)
          0: v = 32'h0000_0000;                     // +0
          1: v = 32'h8000_0000;                     // -0
          2: v = 32'h7F80_0000;                     // +inf
          3: v = 32'hFF80_0000;                     // -inf
          4: v = 32'h7FC0_0001;                     // NaN
          5: v = {1'b1, 8'd127, mn};                // negative
          6: v = {9'd0, mn | 23'd1};                // subnormal
          7: v = 32'h3F80_0000;                     // exactly 1.0
          default: v = {1'b0, 8'd254, 23'h7F_FFFF}; // largest finite
        endcase
      end
    endcase
    return v;
  endfunction

  function automatic logic [31:0] expect_special(input logic [31:0] v, output bit is_special);
    is_special = 1'b1;
    if (v[30:23] == 8'hFF && v[22:0] != 0)     return QNAN;
    if (v[31] && v[30:0] != 0)                 return QNAN;
    if (v[30:0] == 0)                          return NEG_INF;
    if (v[30:23] == 8'hFF)                     return POS_INF;
    if (v == 32'h3F80_0000)                    return 32'h0000_0000;
    is_special = 1'b0;
    return '0;
  endfunction

  task automatic check_result(input logic [31:0] xin, input logic [31:0] yout);
    bit          sp;
    logic [31:0] e;
    real         ref_v, got, ulp, err;
    int          ex;
    checks++;
    e = expect_special(xin, sp);
    if (sp) begin
      if (e == QNAN) n_nan++;
      else if (e == NEG_INF) n_neginf++;
      else if (e == POS_INF) n_posinf++;
      else n_one++;
      if (yout !== e) begin
        failures++;
        $display("FAIL special x=%h y=%h expected %h", xin, yout, e);
      end
      return;
    end
    if (xin[30:23] == 8'h00) n_subn++;
    ref_v = $ln(f2r(xin)) / $ln(2.0);
    if (yout[30:23] == 8'hFF || yout[30:23] == 8'h00) begin
      failures++;
      $display("FAIL x=%h y=%h not finite nonzero, ref %g", xin, yout, ref_v);
      return;
    end
    got = f2r(yout);
    ex  = int'($realtobits(ref_v < 0.0 ? -ref_v : ref_v) >> 52) - 1023;
    ulp = $pow(2.0, ex - 23);
    err = (got - ref_v) / ulp;
    if (err < 0.0) err = -err;
    if (err > worst_ulps) worst_ulps = err;
    if (err >= 4.0 || (got < 0.0) != (ref_v < 0.0)) begin
      failures++;
      $display("FAIL x=%h y=%h got %.10g ref %.10g err %.2f ulp", xin, yout, got, ref_v, err);
    end
  endtask

  // Datapath path counters, sampled where each decision is made.
  always @(posedge clk) begin
    if (dut.ctl_m.cls == CLS_NORMAL && dut.u_valid.g_regs.r[T_M-1]) begin
      if (dut.do_sub) n_sub++;
      else if (dut.e_nz) n_add++;
      else if (dut.ctl_m.dneg) n_e0_neg++;
      else if (dut.ctl_m.eabs == 0 && dut.l_p != 0) n_e0_pos++;
    end
    if (dut.ctl2_n.cls == CLS_NORMAL && dut.u_valid.g_regs.r[T_PACK-1] && dut.r_co)
      n_rnd_carry++;
  end

  // Checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      if (q_x.size() == 0) begin
        failures++;
        checks++;
        $display("FAIL out_valid with nothing in flight at cycle %0d", cycle);
      end else begin
        logic [31:0]     xin;
        longint unsigned t0;
        xin = q_x.pop_front();
        t0  = q_t.pop_front();
        checks++;
        if (cycle - t0 != 64'(LCU_LATENCY)) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - t0, LCU_LATENCY);
        end
        check_result(xin, y);
      end
    end
  end

  // Stimulus.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int unsigned i = 0; i < N_OPS; i++) begin
      if ($urandom_range(15) == 0) begin
        in_valid <= 1'b0;
        x        <= $urandom;
        n_idle++;
        @(posedge clk);
      end
      begin
        int unsigned kind;
        logic [31:0] v;
        kind = $urandom_range(9);
        kind = (kind < 4) ? 0 : (kind < 6) ? 1 : (kind < 8) ? 2 : 3;
        v = gen_operand(kind);
        in_valid <= 1'b1;
        x        <= v;
        q_x.push_back(v);
        q_t.push_back(cycle + 1);
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LCU_LATENCY + 5) @(posedge clk);

    checks++;
    if (q_x.size() != 0 || n_out != N_OPS) begin
      failures++;
      $display("FAIL %0d results for %0d operands", n_out, N_OPS);
    end
    begin
      int unsigned hits [11];
      string       names [11];
      hits  = '{n_add, n_sub, n_e0_pos, n_e0_neg, n_one, n_rnd_carry,
                n_nan, n_neginf, n_posinf, n_idle, n_subn};
      names = '{"add |e'|+L", "subtract |e'|-L", "e'=0, d>0", "e'=0, d<0", "x=1",
                "rounding carry", "NaN", "-inf", "+inf", "idle cycle", "subnormal input"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        $display("mechanism %-18s %0d", names[i], hits[i]);
        if (hits[i] == 0) begin
          failures++;
          $display("FAIL mechanism '%s' never exercised", names[i]);
        end
      end
    end
    $display("worst error %.3f ulp", worst_ulps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
