// cic_ripple_adder: WIDTH-bit ripple-carry adder.
//
// WIDTH one-bit full adders in series: the carry out of bit i is the carry
// in of bit i+1, the carry into bit 0 is cin and the carry out of the top
// bit is co. s = (a + b + cin) mod 2^WIDTH. Combinational, no clock; the
// delay grows with WIDTH through the carry chain. Structure and 14-bit
// width follow the original design. In the filter co is left unconnected,
// which is what makes the integrators and differentiators wrap modulo
// 2^WIDTH, as CIC arithmetic requires.
module cic_ripple_adder #(
  parameter int unsigned WIDTH = 14
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  logic [WIDTH:0] c;

  assign c[0] = cin;
  assign co   = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    cic_full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .cin(c[i]),
      .s  (s[i]),
      .co (c[i+1])
    );
  end

endmodule
