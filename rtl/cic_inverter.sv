// cic_inverter: WIDTH-bit bitwise inverter.
//
// WIDTH single inverters side by side, one per bit; bit i of y is the
// complement of bit i of a. Purely combinational, no clock. In the
// differentiator it forms the one's complement of the delayed sample, which
// the adder turns into a two's-complement subtraction by setting its carry
// in. The 14-bit default follows the original design.
module cic_inverter #(
  parameter int unsigned WIDTH = 14
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) y[i] = ~a[i];
  end

endmodule
