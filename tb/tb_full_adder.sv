// tb_full_adder: exhaustive test of the one-bit full adder. All eight input
// combinations are applied and {co, s} is compared with the integer sum
// a + b + ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int unsigned checks = 0, failures = 0;

  full_adder dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ci, a, b} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a + b + ci)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
