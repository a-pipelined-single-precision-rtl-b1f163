// tb_pipe_rom: tests the pipelined ROM at its default 64 x 8 organisation
// (two 1-of-8 decoders). The contents are a scrambled pattern,
// word i = (i * 37 + 11) xor (i >> 2), so that every word differs from its
// neighbours. Every address is read once in order and then 300 times at
// random, one read per clock; each word must appear exactly 3 clock edges
// after its address was sampled.
module tb_pipe_rom;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned LAT   = 3;
  localparam int unsigned N     = DEPTH + 300;

  typedef logic [7:0] word_t;
  typedef word_t      table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < int'(DEPTH); i++) t[i] = 8'((i * 37 + 11) ^ (i >> 2));
    return t;
  endfunction

  localparam table_t CONTENTS = make_table();

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic [5:0] addr;
  logic [7:0] q;

  pipe_rom #(.INIT(CONTENTS)) dut (.clk(clk), .addr(addr), .q(q));

  logic [5:0] issued [N];

  initial begin
    for (int j = 0; j < int'(N + LAT); j++) begin
      @(negedge clk);
      if (j >= int'(LAT)) begin
        checks++;
        if (q !== CONTENTS[issued[j-LAT]]) begin
          failures++;
          $display("FAIL addr %0d: got %h expected %h", issued[j-LAT], q, CONTENTS[issued[j-LAT]]);
        end
      end
      if (j < int'(N)) begin
        addr = (j < int'(DEPTH)) ? 6'(j) : 6'($urandom);
        issued[j] = addr;
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
