// lcu_coef_rom: the interpolation-coefficient lookup table of the log2
// pipeline, held in a pipelined ROM.
//
// Word i holds the parabola (y0, a, b) for segment i of the reduced argument
// u = d + 0.25 (see lcu_pkg for the formulas). The table has lcu_pkg::SEGS =
// 384 used words of 65 bits (31 + 12 + 22) in a 512-word address space; the
// unused words read as zero. Its contents are computed at elaboration time by
// lcu_pkg::coef_table(), so no data file is needed.
//
// The ROM is pipe_rom with a 5-bit group decoder (32 groups) and a 4-bit word
// decoder (16 words per group). Timing: seg is sampled every cycle and coef
// holds that segment's coefficients LATENCY = 3 cycles later.
module lcu_coef_rom
  import lcu_pkg::*;
(
  input  logic              clk,
  input  logic [ROM_AW-1:0] seg,
  output coef_t             coef
);

  localparam int unsigned LATENCY = 3;
  localparam coef_table_t TABLE = coef_table();

  coef_word_t word;

  pipe_rom #(
    .ADDR_W(ROM_AW),
    .DATA_W(COEF_W),
    .H_W   (5),
    .INIT  (TABLE)
  ) u_rom (
    .clk (clk),
    .addr(seg),
    .q   (word)
  );

  assign coef = coef_t'(word);

endmodule
