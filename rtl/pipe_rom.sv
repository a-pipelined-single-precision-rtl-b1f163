// pipe_rom: pipelined read-only memory built from decoders and AND-OR logic
// only, so that it can be cut into short pipeline stages like the adders.
//
// The words are arranged as 2^H_W groups of 2^L_W words (L_W = ADDR_W - H_W).
// The high address bits drive a one-hot group decoder (H decoder), the low
// bits a one-hot word decoder (L decoder). Three stages:
//   1. both decoders decode the address and register their one-hot outputs;
//   2. inside every group the word-select lines gate that group's words and
//      an OR tree merges them: one candidate word per group is registered;
//   3. the group-select lines gate the candidates and an OR merges them into
//      the output register q.
// The defaults, 64 words of 8 bits with two 1-of-8 decoders, are the worked
// example of the technique. INIT holds the contents; its default is all zero
// because the example gives no contents, and every user supplies its own.
//
// Timing: addr is sampled every cycle, q holds the addressed word LATENCY = 3
// cycles later. One read per cycle, no enable, no reset (data only).
module pipe_rom #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned H_W    = 3,
  parameter logic [DATA_W-1:0] INIT [2**ADDR_W] = '{default: '0}
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] q
);

  localparam int unsigned L_W    = ADDR_W - H_W;
  localparam int unsigned GROUPS = 2**H_W;
  localparam int unsigned WORDS  = 2**L_W;

  // Stage 1: decoders.
  logic [GROUPS-1:0] h_sel_q;
  logic [WORDS-1:0]  l_sel_q;

  always_ff @(posedge clk) begin
    for (int g = 0; g < int'(GROUPS); g++)
      h_sel_q[g] <= (addr[ADDR_W-1:L_W] == H_W'(g));
    for (int w = 0; w < int'(WORDS); w++)
      l_sel_q[w] <= (addr[L_W-1:0] == L_W'(w));
  end

  // Stage 2: word selection inside each group.
  logic [DATA_W-1:0] grp_q [GROUPS];
  logic [GROUPS-1:0] h_sel_q2;

  always_ff @(posedge clk) begin
    for (int g = 0; g < int'(GROUPS); g++) begin
      logic [DATA_W-1:0] acc;
      acc = '0;
      for (int w = 0; w < int'(WORDS); w++)
        acc |= INIT[g * WORDS + w] & {DATA_W{l_sel_q[w]}};
      grp_q[g] <= acc;
    end
    h_sel_q2 <= h_sel_q;
  end

  // Stage 3: group selection.
  always_ff @(posedge clk) begin
    logic [DATA_W-1:0] acc;
    acc = '0;
    for (int g = 0; g < int'(GROUPS); g++)
      acc |= grp_q[g] & {DATA_W{h_sel_q2[g]}};
    q <= acc;
  end

endmodule
