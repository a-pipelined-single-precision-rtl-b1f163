// tb_pipe_csa_mult: tests the pipelined carry save array multiplier.
//
// The default 4 x 4 multiplier gets all 256 operand pairs, one per clock; a
// 22 x 15 copy (the widths of the B*x product in the log2 pipeline) gets
// random operands plus all-ones. Products are compared with integer
// multiplication exactly BW + AW - 1 clock edges after the operands were
// sampled (7 for 4 x 4: four array rows and three final-adder stages).
module tb_pipe_csa_mult;
  localparam int unsigned AW2 = 22, BW2 = 15;
  localparam int unsigned L1  = 4 + 4 - 1;
  localparam int unsigned L2  = AW2 + BW2 - 1;
  localparam int unsigned N   = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic [3:0] a1, b1;
  logic [7:0] p1;
  pipe_csa_mult dut1 (.clk(clk), .a(a1), .b(b1), .p(p1));

  logic [AW2-1:0]     a2;
  logic [BW2-1:0]     b2;
  logic [AW2+BW2-1:0] p2;
  pipe_csa_mult #(.AW(AW2), .BW(BW2)) dut2 (.clk(clk), .a(a2), .b(b2), .p(p2));

  logic [7:0]         e1 [N];
  logic [AW2+BW2-1:0] e2 [N];

  initial begin
    for (int j = 0; j < int'(N + L2); j++) begin
      @(negedge clk);
      if (j >= int'(L1) && j - int'(L1) < int'(N)) begin
        checks++;
        if (p1 !== e1[j-L1]) begin
          failures++;
          $display("FAIL 4x4 op %0d: got %0d expected %0d", j - L1, p1, e1[j-L1]);
        end
      end
      if (j >= int'(L2) && j - int'(L2) < int'(N)) begin
        checks++;
        if (p2 !== e2[j-L2]) begin
          failures++;
          $display("FAIL %0dx%0d op %0d: got %h expected %h", AW2, BW2, j - L2, p2, e2[j-L2]);
        end
      end
      if (j < int'(N)) begin
        {a1, b1} = 8'(j);
        a2 = AW2'($urandom);
        b2 = BW2'($urandom);
        if (j == 5) begin a2 = '1; b2 = '1; end
        e1[j] = 8'(a1) * 8'(b1);
        e2[j] = (AW2+BW2)'(a2) * (AW2+BW2)'(b2);
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
