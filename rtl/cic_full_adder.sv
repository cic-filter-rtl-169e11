// cic_full_adder: one-bit full adder, the cell of the ripple adder.
//
// Sums a, b and the carry in: s = cin ^ (a ^ b), co = a&b | cin&(a|b).
// Combinational, no clock. These two equations are the original design's.
module cic_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic co
);

  always_comb begin
    s  = cin ^ (a ^ b);
    co = (a & b) | (cin & (a | b));
  end

endmodule
