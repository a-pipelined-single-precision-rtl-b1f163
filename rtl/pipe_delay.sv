// pipe_delay: a chain of DEPTH registers that carries a WIDTH-bit value
// alongside the arithmetic of the log2 pipeline, so that operands computed in
// different branches meet in the same cycle. DEPTH = 0 is a plain wire.
// Data registers have no reset; the one chain that carries the valid flag is
// given RESET = 1 and clears to zero on rst_n low (asynchronous, active low).
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1,
  parameter bit          RESET = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];

    if (RESET) begin : g_rst
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < int'(DEPTH); i++) r[i] <= '0;
        end else begin
          r[0] <= d;
          for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
        end
      end
    end else begin : g_norst
      always_ff @(posedge clk) begin
        r[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
      end
    end

    assign q = r[DEPTH-1];
  end

endmodule
