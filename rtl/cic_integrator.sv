// cic_integrator: one integrator stage, y(n) = x(n) + y(n-1).
//
// A WIDTH-bit ripple adder sums the input with the stage's own registered
// output, and the register feeds the sum back on every rising clock edge.
// The output is the register, so a stage adds one clock of latency: after a
// constant input 1 the output counts 0, 1, 2, ... The adder's carry out is
// not used, so the sum wraps modulo 2^WIDTH; CIC filters depend on that wrap
// and their output stays exact as long as it fits in WIDTH bits. Structure
// and width follow the original design; rst_n (active low) clears the
// accumulator.
module cic_integrator #(
  parameter int unsigned WIDTH = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] sum;
  logic             carry_out;  // unused: dropping it makes the sum wrap

  cic_ripple_adder #(.WIDTH(WIDTH)) u_add (
    .a  (x),
    .b  (y),
    .cin(1'b0),
    .s  (sum),
    .co (carry_out)
  );

  cic_dff #(.WIDTH(WIDTH)) u_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (1'b1),
    .d    (sum),
    .q    (y)
  );

endmodule
