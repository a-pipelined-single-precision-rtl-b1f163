// tb_lcu_workloads: accuracy survey of the log2 unit over the input ranges
// whose accuracy the design targets, plus two reference points next to 1.0.
//
//  1. The operands 1 - 2^-23 and 1 + 2^-23, 0x3F7FFFFE (0.99999988) and
//     0x3F800001 (1.00000012), whose correctly rounded log2 is 0xB438AA3C
//     and 0x3438AA3A. The unit's results must be within 4 ulp of these.
//  2. Range sweeps, each result compared with $ln(x)/$ln(2) in double
//     precision. Target accuracy per range: 21 bits (error below 4 ulp) in
//     [0.5, 1) and [1, 2), 22 bits (below 2 ulp) in [0.25, 0.5), [2, 4) and
//     elsewhere (random normal and subnormal operands). The sweeps are:
//       - every 64th mantissa in each of [0.25,0.5), [0.5,1), [1,2), [2,4);
//       - every operand within 8192 ulp of 1.0 (the hardest region);
//       - 20000 random positive normal numbers of any exponent;
//       - 20000 random positive subnormal numbers, with 0 to 22 leading
//         zeros in the significand.
// All operands are streamed back to back, one per clock. The worst and mean
// error of each range is printed, and each range's mean error must also stay
// below the 0.59 ulp average the accuracy target allows.
module tb_lcu_workloads;
  import lcu_pkg::*;

  localparam int unsigned STRIDE   = 64;
  localparam int unsigned NEAR_ONE = 8192;
  localparam int unsigned N_RAND   = 20000;
  localparam int unsigned N_RANGES = 7;
  localparam int unsigned N_TOTAL  = 2 + 4 * (2**23 / STRIDE) + 2 * NEAR_ONE + 2 * N_RAND;
  localparam int unsigned WATCHDOG = N_TOTAL + LCU_LATENCY + 1000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] y;

  lcu_top dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  // Per-operand record: range tag (0..6) or 7/8 for the two reference points.
  logic [31:0] q_x[$];
  int unsigned q_tag[$];

  real         worst [N_RANGES];
  real         sum   [N_RANGES];
  int unsigned cnt   [N_RANGES];
  real         limit [N_RANGES] = '{2.0, 4.0, 4.0, 2.0, 4.0, 2.0, 2.0};
  string       rname [N_RANGES] = '{"[0.25,0.5)", "[0.5,1)", "[1,2)", "[2,4)",
                                    "1.0 +/- 8192 ulp", "random normal", "subnormal"};

  function automatic real f2r(input logic [31:0] f);
    real mant, scale;
    int  e;
    mant  = ((f[30:23] != 0) ? 1.0 : 0.0) + f[22:0] / 8388608.0;
    e     = (f[30:23] != 0) ? int'({24'd0, f[30:23]}) : 1;
    scale = $pow(2.0, e - 127);
    return f[31] ? -(mant * scale) : mant * scale;
  endfunction

  function automatic real ulp_err(input real got, input real ref_v);
    real a, e;
    int  ex;
    a  = (ref_v < 0.0) ? -ref_v : ref_v;
    ex = int'($realtobits(a) >> 52) - 1023;
    e  = (got - ref_v) / $pow(2.0, ex - 23);
    return (e < 0.0) ? -e : e;
  endfunction

  task automatic issue(input logic [31:0] v, input int unsigned tag);
    in_valid <= 1'b1;
    x        <= v;
    q_x.push_back(v);
    q_tag.push_back(tag);
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] xin;
      int unsigned tag;
      real         got, ref_v, err;
      xin = q_x.pop_front();
      tag = q_tag.pop_front();
      got = f2r(y);
      checks++;
      if (tag >= N_RANGES) begin
        ref_v = f2r((tag == N_RANGES) ? 32'hB438_AA3C : 32'h3438_AA3A);
        err   = ulp_err(got, ref_v);
        $display("x=%h log2=%h (correctly rounded %h), %.2f ulp", xin, y,
                 (tag == N_RANGES) ? 32'hB438_AA3C : 32'h3438_AA3A, err);
        if (err >= 4.0) begin
          failures++;
          $display("FAIL reference point x=%h", xin);
        end
      end else begin
        ref_v = $ln(f2r(xin)) / $ln(2.0);
        err   = ulp_err(got, ref_v);
        if (y == 32'd0 && xin == 32'h3F80_0000) err = 0.0;
        if (err > worst[tag]) worst[tag] = err;
        sum[tag] += err;
        cnt[tag]++;
        if (err >= limit[tag]) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s x=%h y=%h err %.2f ulp", rname[tag], xin, y, err);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < int'(N_RANGES); i++) begin
      worst[i] = 0.0;
      sum[i]   = 0.0;
      cnt[i]   = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    issue(32'h3F7F_FFFE, N_RANGES);
    issue(32'h3F80_0001, N_RANGES + 1);
    for (int r = 0; r < 4; r++)
      for (int unsigned m = 0; m < 2**23; m += STRIDE)
        issue({1'b0, 8'(125 + r), 23'(m + $urandom_range(STRIDE - 1))}, r);
    for (int unsigned k = 1; k <= NEAR_ONE; k++) begin
      issue(32'h3F80_0000 + k, 4);
      issue(32'h3F80_0000 - k, 4);
    end
    for (int unsigned k = 0; k < N_RAND; k++) begin
      logic [31:0] r1, r2;
      r1 = $urandom;
      r2 = $urandom_range(253);
      issue({1'b0, 8'd1 + r2[7:0], r1[22:0]}, 5);
    end
    for (int unsigned k = 0; k < N_RAND; k++) begin
      logic [31:0] r1;
      r1 = $urandom;
      issue({9'd0, r1[22:0] >> (k % 23)} | 32'd1, 6);
    end
    in_valid <= 1'b0;
    repeat (LCU_LATENCY + 5) @(posedge clk);
    for (int i = 0; i < int'(N_RANGES); i++) begin
      checks++;
      $display("range %-18s %7d operands  worst %.3f ulp  mean %.3f ulp  (limit %.0f)",
               rname[i], cnt[i], worst[i], sum[i] / cnt[i], limit[i]);
      if (cnt[i] == 0 || sum[i] / cnt[i] >= 0.59) begin
        failures++;
        $display("FAIL range %s: no operands or mean error too large", rname[i]);
      end
    end
    checks++;
    if (q_x.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_x.size());
    end
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
