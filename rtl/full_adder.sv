// full_adder: one-bit full adder, the cell every adder and multiplier of the
// log2 pipeline is built from.
//
// Sum and carry follow the sum-of-products switching equations of the full
// adder truth table: s is the odd-parity minterm sum of (a, b, ci) and
// co = a&ci | b&ci | a&b. Written as AND-OR of literals so that each path is
// an inverter, an AND and an OR, the three gate levels of the classic
// schematic. Purely combinational: no clock, no state.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = (~a &  b & ~ci) | ( a & ~b & ~ci) | (~a & ~b &  ci) | ( a &  b &  ci);
    co = (a & ci) | (b & ci) | (a & b);
  end

endmodule
