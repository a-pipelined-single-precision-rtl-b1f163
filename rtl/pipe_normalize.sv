// pipe_normalize: pipelined leading-one normalizer for the log2 result.
//
// Shifts an unsigned WIDTH-bit value left until its most significant bit is
// one and counts the shift. One pipeline stage per shift size, from the
// largest power of two below WIDTH down to 1: a stage tests whether the top
// 2^k bits are all zero and, if so, shifts by 2^k and adds 2^k to the count.
// A zero input leaves all-zero data and a count of 2^STAGES - 1.
//
// Timing: LATENCY = STAGES = ceil(log2(WIDTH)) cycles, one value per cycle,
// no reset (data only).
module pipe_normalize #(
  parameter int unsigned WIDTH  = 62,
  parameter int unsigned STAGES = $clog2(WIDTH)
) (
  input  logic              clk,
  input  logic [WIDTH-1:0]  d,
  output logic [WIDTH-1:0]  q,
  output logic [STAGES-1:0] lz
);

  logic [WIDTH-1:0]  v_q  [STAGES];
  logic [STAGES-1:0] lz_q [STAGES];

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    localparam int unsigned SH = 2**(STAGES - 1 - k);
    logic [WIDTH-1:0]  v_in;
    logic [STAGES-1:0] lz_in;
    logic              top_zero;

    if (k == 0) begin : g_first
      assign v_in  = d;
      assign lz_in = '0;
    end else begin : g_next
      assign v_in  = v_q[k-1];
      assign lz_in = lz_q[k-1];
    end

    assign top_zero = (v_in[WIDTH-1 -: SH] == '0);

    always_ff @(posedge clk) begin
      v_q[k]  <= top_zero ? (v_in << SH) : v_in;
      lz_q[k] <= lz_in | (top_zero ? STAGES'(SH) : '0);
    end
  end

  assign q  = v_q[STAGES-1];
  assign lz = lz_q[STAGES-1];

endmodule
