// pipe_rca: pipelined ripple carry adder, one full adder per pipeline stage.
//
// Stage k adds bit k of the two operands and the carry left by stage k-1, then
// registers the new carry, the sum bits finished so far and the operand bits
// still to be added. A new pair of operands can therefore enter on every clock
// while earlier pairs are still rippling: throughput is one addition per
// cycle, latency WIDTH cycles, and the slowest path in any stage is a single
// full adder. The carry-in lets the same block subtract (invert one operand,
// ci = 1) or increment (b = 0, ci = 1).
//
// Timing: a, b and ci are sampled at the rising edge that ends stage 0's
// combinational work; s and co appear WIDTH cycles after a, b and ci were
// applied. There is no valid or stall signalling: every cycle is an operation,
// and a surrounding design tracks validity itself. No reset: the registers
// hold only data.
//
// The WIDTH = 4 default is the four-stage adder used as the worked example of
// the technique; the log2 pipeline instantiates wider copies.
module pipe_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  // Per-stage registers. Stage k keeps the operand bits above k, the sum
  // bits up to k and the carry out of bit k.
  logic [WIDTH-1:0] a_q [WIDTH];
  logic [WIDTH-1:0] b_q [WIDTH];
  logic [WIDTH-1:0] s_q [WIDTH];
  logic             c_q [WIDTH];

  for (genvar k = 0; k < WIDTH; k++) begin : g_stage
    logic [WIDTH-1:0] a_in, b_in, s_in;
    logic             c_in, fa_s, fa_c;

    if (k == 0) begin : g_first
      assign a_in = a;
      assign b_in = b;
      assign s_in = '0;
      assign c_in = ci;
    end else begin : g_next
      assign a_in = a_q[k-1];
      assign b_in = b_q[k-1];
      assign s_in = s_q[k-1];
      assign c_in = c_q[k-1];
    end

    full_adder u_fa (
      .a (a_in[k]),
      .b (b_in[k]),
      .ci(c_in),
      .s (fa_s),
      .co(fa_c)
    );

    always_ff @(posedge clk) begin
      a_q[k]    <= a_in;
      b_q[k]    <= b_in;
      s_q[k]    <= s_in;
      s_q[k][k] <= fa_s;
      c_q[k]    <= fa_c;
    end
  end

  assign s  = s_q[WIDTH-1];
  assign co = c_q[WIDTH-1];

endmodule
