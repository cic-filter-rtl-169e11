// cic_differentiator: one comb (differentiator) stage, y = x(n) - x(n-1).
//
// An input register keeps the previous sample; an inverter and a ripple
// adder with its carry in tied high compute x + ~x_prev + 1 = x - x_prev
// in two's complement, and an output register holds the difference. Both
// registers load only when en is high, which is once per decimated period
// in the filter, so one stage adds one decimated period of latency:
// y(m) = x(m-1) - x(m-2) counted in enabled edges. The adder's carry out is
// left unused so the difference wraps modulo 2^WIDTH. Structure and width
// follow the original design; the enable in place of a separate divided
// clock and the active-low reset are choices of this RTL.
module cic_differentiator #(
  parameter int unsigned WIDTH = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] x_prev;
  logic [WIDTH-1:0] x_prev_n;
  logic [WIDTH-1:0] diff;
  logic             carry_out;  // unused: dropping it makes the difference wrap

  cic_dff #(.WIDTH(WIDTH)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (x),
    .q    (x_prev)
  );

  cic_inverter #(.WIDTH(WIDTH)) u_inv (
    .a(x_prev),
    .y(x_prev_n)
  );

  cic_ripple_adder #(.WIDTH(WIDTH)) u_add (
    .a  (x),
    .b  (x_prev_n),
    .cin(1'b1),
    .s  (diff),
    .co (carry_out)
  );

  cic_dff #(.WIDTH(WIDTH)) u_out (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (diff),
    .q    (y)
  );

endmodule
