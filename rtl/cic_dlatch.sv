// cic_dlatch: WIDTH-bit level-sensitive D latch.
//
// While the gate g is high the latch is transparent and q follows d; while
// g is low q holds the last value. The original latch also takes the
// complement of its gate (for transmission gates); a complementary pair is
// not needed in RTL, so only the true gate is a port. rst_n low clears q
// (active-low asynchronous clear, a choice of this RTL so that the output is
// defined before the first pulse). Synthesis infers a latch here on purpose:
// the filter holds each decimated sample in it for a whole output period.
module cic_dlatch #(
  parameter int unsigned WIDTH = 14
) (
  input  logic             rst_n,
  input  logic             g,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (!rst_n)  q = '0;
    else if (g)  q = d;
  end

endmodule
