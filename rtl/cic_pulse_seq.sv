// cic_pulse_seq: latch-pulse sequencer.
//
// From the sampling clock clk and the decimated clock dec_clk it makes one
// pulse per decimated period that is half a sampling period wide. A register
// keeps last cycle's dec_clk; first is high during the one clk cycle in
// which dec_clk has just risen, and pulse is first gated with the low half
// of clk. With a divide-by-8 dec_clk the pulse has a 1/16 (6.25 %) duty
// cycle: 50 ns every 800 ns at a 10 MHz clock. npulse is its complement.
// Gating with the low half keeps pulse free of glitches, since first only
// changes after a rising edge of clk, while clk is high; it also closes the
// latch at the next rising edge, before the integrators move on. first is
// also given out as the comb stages' clock enable.
//
// Timing: rising edge of clk where dec_clk goes high -> first high for that
// cycle -> pulse high from the following falling edge to the next rising
// edge. The output widths and duty cycle follow the original design; the
// gating scheme is this RTL's own. The one circuit warning, clk used as
// data, is this gating and stands on purpose.
module cic_pulse_seq (
  input  logic clk,
  input  logic rst_n,
  input  logic dec_clk,
  output logic first,
  output logic pulse,
  output logic npulse
);

  logic dec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_q <= 1'b0;
    else        dec_q <= dec_clk;
  end

  always_comb begin
    first  = dec_clk & ~dec_q;
    pulse  = first & ~clk;
    npulse = ~pulse;
  end

endmodule
