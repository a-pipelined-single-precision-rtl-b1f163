// tb_pipe_rca: tests the pipelined ripple carry adder.
//
// The default 4-bit adder gets every (a, b, ci) combination, one per clock,
// back to back; a 32-bit copy gets random operands (and one full-length
// carry ripple). Each sum and carry-out is compared with the integer sum. The
// comparison is made exactly WIDTH clock edges after the operands were
// sampled, so a wrong latency fails too. Inputs change on the falling edge;
// outputs are read on the falling edge.
module tb_pipe_rca;
  localparam int unsigned WB = 32;
  localparam int unsigned N  = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  pipe_rca dut4 (.clk(clk), .a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));

  logic [WB-1:0] aw, bw, sw;
  logic          ciw, cow;
  pipe_rca #(.WIDTH(WB)) dutw (.clk(clk), .a(aw), .b(bw), .ci(ciw), .s(sw), .co(cow));

  logic [4:0]  exp4 [N];
  logic [WB:0] expw [N];

  initial begin
    for (int j = 0; j < int'(N + WB); j++) begin
      @(negedge clk);
      if (j >= 4 && j - 4 < int'(N)) begin
        checks++;
        if ({co4, s4} !== exp4[j-4]) begin
          failures++;
          $display("FAIL 4-bit op %0d: got %b expected %b", j - 4, {co4, s4}, exp4[j-4]);
        end
      end
      if (j >= int'(WB) && j - int'(WB) < int'(N)) begin
        checks++;
        if ({cow, sw} !== expw[j-WB]) begin
          failures++;
          $display("FAIL %0d-bit op %0d: got %h expected %h", WB, j - WB, {cow, sw}, expw[j-WB]);
        end
      end
      if (j < int'(N)) begin
        {ci4, a4, b4} = 9'(j);
        aw  = $urandom;
        bw  = $urandom;
        ciw = 1'($urandom);
        if (j == 3) begin aw = '1; bw = '0; ciw = 1'b1; end
        exp4[j] = 5'(a4) + 5'(b4) + 5'(ci4);
        expw[j] = (WB+1)'(aw) + (WB+1)'(bw) + (WB+1)'(ciw);
      end
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
