// cic_dff: WIDTH-bit register with clock enable and reset.
//
// WIDTH positive-edge flip-flops sharing one clock and one reset. q takes d
// at a rising edge of clk when en is high and holds otherwise; rst_n low
// clears q to zero at once (asynchronous, active low). The original
// register is a two-phase master-slave flip-flop that must be reset before
// use; here it is an ordinary edge-triggered register on one clock, and the
// enable stands in for clocking the comb section with the divided clock.
// The reset polarity and the enable are choices of this RTL.
module cic_dff #(
  parameter int unsigned WIDTH = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
