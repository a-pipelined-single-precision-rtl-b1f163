// pipe_csa_mult: pipelined carry save array multiplier for unsigned operands.
//
// Row j of the array ANDs the multiplicand a with bit j of the multiplier b
// and adds that partial product to the running sum and carry vectors with a
// row of AW full adders. Carries are not rippled along the row: each carry
// goes to the next row one column to the left, so a row costs one full-adder
// delay. Each row is one pipeline stage; bit j of the product falls out of
// column 0 of row j. After the last row the remaining sum and carry vectors
// are merged by a pipelined ripple adder of AW-1 stages (one full adder per
// stage, pipe_rca); the top product bit is the OR of the last carry and the
// top carry-vector bit, which can never both be one.
//
// Interface: a and b are sampled every cycle; p = a * b appears
// LATENCY = BW + AW - 1 cycles later (7 for the 4 x 4 default, four array
// rows then three final-adder stages). One product per cycle, no valid or
// stall signals, no reset (data only). AW must be at least 2.
module pipe_csa_mult #(
  parameter int unsigned AW = 4,   // multiplicand width
  parameter int unsigned BW = 4    // multiplier width, one array row per bit
) (
  input  logic             clk,
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);

  localparam int unsigned LATENCY = BW + AW - 1;

  // Row registers: multiplicand, multiplier, sum vector, carry vector and the
  // low product bits finished so far.
  logic [AW-1:0] a_q [BW];
  logic [BW-1:0] b_q [BW];
  logic [AW-1:0] sv_q [BW];
  logic [AW-1:0] cv_q [BW];
  logic [BW-1:0] lo_q [BW];

  for (genvar j = 0; j < BW; j++) begin : g_row
    logic [AW-1:0] a_in, sv_in, cv_in, pp, sv_nx, cv_nx;
    logic [BW-1:0] b_in, lo_in;
    logic [AW:0]   sv_sh;

    if (j == 0) begin : g_first
      assign a_in  = a;
      assign b_in  = b;
      assign sv_in = '0;
      assign cv_in = '0;
      assign lo_in = '0;
    end else begin : g_next
      assign a_in  = a_q[j-1];
      assign b_in  = b_q[j-1];
      assign sv_in = sv_q[j-1];
      assign cv_in = cv_q[j-1];
      assign lo_in = lo_q[j-1];
    end

    assign pp    = a_in & {AW{b_in[j]}};
    assign sv_sh = {1'b0, sv_in};

    for (genvar i = 0; i < AW; i++) begin : g_col
      full_adder u_fa (
        .a (pp[i]),
        .b (sv_sh[i+1]),
        .ci(cv_in[i]),
        .s (sv_nx[i]),
        .co(cv_nx[i])
      );
    end

    always_ff @(posedge clk) begin
      a_q[j]     <= a_in;
      b_q[j]     <= b_in;
      sv_q[j]    <= sv_nx;
      cv_q[j]    <= cv_nx;
      lo_q[j]    <= lo_in;
      lo_q[j][j] <= sv_nx[0];
    end
  end

  // Final adder: (sum >> 1) + carry over the low AW-1 columns.
  logic [AW-2:0] fin_s;
  logic          fin_c, top_d;
  logic [BW-1:0] lo_d;

  pipe_rca #(.WIDTH(AW - 1)) u_final (
    .clk(clk),
    .a  (sv_q[BW-1][AW-1:1]),
    .b  (cv_q[BW-1][AW-2:0]),
    .ci (1'b0),
    .s  (fin_s),
    .co (fin_c)
  );

  pipe_delay #(.WIDTH(BW + 1), .DEPTH(AW - 1)) u_lo_dly (
    .clk  (clk),
    .rst_n(1'b1),
    .d    ({cv_q[BW-1][AW-1], lo_q[BW-1]}),
    .q    ({top_d, lo_d})
  );

  assign p = {fin_c | top_d, fin_s, lo_d};

endmodule
