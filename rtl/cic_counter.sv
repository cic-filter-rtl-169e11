// cic_counter: free-running WIDTH-bit binary up counter (clock divider).
//
// q increments on every rising edge of clk and wraps from 2^WIDTH-1 to 0;
// rst_n low clears it (asynchronous, active low). Bit k of q is a square
// wave with a period of 2^(k+1) clocks, so in the filter bit 2 of the 4-bit
// counter is the clock divided by 8: low for four cycles, high for four.
// The 4-bit width and the use of the third bit follow the original design.
module cic_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q + 1'b1;
  end

endmodule
