// tb_lcu_coef_rom: checks every word of the interpolation-coefficient ROM
// against coefficients worked out independently in double precision.
//
// For segment i, d0 = i/512 - 0.25 and g(d) = ln(1+d) / (d ln 2) (1/ln 2 at
// d = 0). With g0, g1, g2 the samples at d0, d0 + h, d0 + 2h (h = 1/512):
//   y0 = g0,  a = (g0 - 2 g1 + g2) / 2,  -b = (3 g0 - 4 g1 + g2) / 2,
// all scaled by 2^30; each stored field must be within 2 LSB. The parabola
// is also evaluated at four points inside each segment and must match g to
// a relative error below 2^-27. Words 384 to 511 must read zero. One address
// is issued per clock and each word is checked exactly 3 clock edges later.
module tb_lcu_coef_rom;
  import lcu_pkg::*;

  localparam int unsigned LAT = 3;
  localparam int unsigned N   = 2**ROM_AW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic [ROM_AW-1:0] seg;
  coef_t             coef;

  lcu_coef_rom dut (.clk(clk), .seg(seg), .coef(coef));

  function automatic real g_of(input real d);
    if (d == 0.0) return 1.0 / $ln(2.0);
    return $ln(1.0 + d) / ($ln(2.0) * d);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_word(input int i, input coef_t c);
    real h, d0, g0, g1, g2, ya, aa, ba, s, x, approx, err;
    if (i >= int'(SEGS)) begin
      checks++;
      if (c !== '0) begin
        failures++;
        $display("FAIL unused word %0d = %h", i, c);
      end
      return;
    end
    h  = 1.0 / 512.0;
    d0 = i * h - 0.25;
    g0 = g_of(d0);
    g1 = g_of(d0 + h);
    g2 = g_of(d0 + 2.0 * h);
    s  = 1073741824.0;   // 2^30
    ya = g0 * s;
    aa = (g0 - 2.0 * g1 + g2) / 2.0 * s;
    ba = (3.0 * g0 - 4.0 * g1 + g2) / 2.0 * s;
    checks += 3;
    if (fabs(real'(c.y0) - ya) > 2.0 || fabs(real'(c.a) - aa) > 2.0 ||
        fabs(real'(c.b) - ba) > 2.0) begin
      failures++;
      $display("FAIL word %0d: y0 %0d/%.1f a %0d/%.1f b %0d/%.1f",
               i, c.y0, ya, c.a, aa, c.b, ba);
    end
    for (int k = 0; k < 4; k++) begin
      x      = (k + 0.5) / 4.0;
      approx = (real'(c.y0) - real'(c.b) * x + real'(c.a) * x * x) / s;
      err    = fabs(approx - g_of(d0 + x * h)) / g_of(d0 + x * h);
      checks++;
      if (err > 7.450580596923828e-09) begin   // 2^-27
        failures++;
        $display("FAIL word %0d x=%.3f: relative error %g", i, x, err);
      end
    end
  endtask

  initial begin
    for (int j = 0; j < int'(N + LAT); j++) begin
      @(negedge clk);
      if (j >= int'(LAT)) check_word(j - int'(LAT), coef);
      if (j < int'(N)) seg = ROM_AW'(j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
