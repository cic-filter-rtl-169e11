// cic_clocks: clock block of the CIC filter.
//
// Derives the decimated timing from the sampling clock clk. A CNT_W-bit
// counter divides clk; its bit DEC_BIT is the decimated clock dec_clk
// (divide by 2^(DEC_BIT+1) = 8 by default, 50 % duty), with dec_nclk its
// complement. A pulse sequencer turns the rising edge of dec_clk into
// dec_en, high for the first clk cycle of each decimated period, and into
// the latch pulse, high only in the low half of that cycle (6.25 % duty),
// with npulse its complement. dec_en is the clock enable of the comb
// stages: they load at the rising edge of clk that ends the pulse.
//
// The original block also makes non-overlapping two-phase clocks for its
// master-slave flip-flops; this RTL uses single-phase edge-triggered
// registers, so clk and the enable replace those phases. The counter width,
// the divided-clock bit and the pulse duty cycle follow the original design.
module cic_clocks #(
  parameter int unsigned CNT_W   = 4,
  parameter int unsigned DEC_BIT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] count,
  output logic             dec_clk,
  output logic             dec_nclk,
  output logic             dec_en,
  output logic             pulse,
  output logic             npulse
);

  cic_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .q    (count)
  );

  always_comb begin
    dec_clk  = count[DEC_BIT];
    dec_nclk = ~count[DEC_BIT];
  end

  cic_pulse_seq u_seq (
    .clk    (clk),
    .rst_n  (rst_n),
    .dec_clk(dec_clk),
    .first  (dec_en),
    .pulse  (pulse),
    .npulse (npulse)
  );

endmodule
