// cic_filter: third-order CIC decimation filter, decimation by 8.
//
// x_in, an unsigned IN_W-bit sample taken at every rising edge of clk, is
// zero-extended to WORD_W bits and passes through N_STAGES cascaded
// integrators running at the clock rate. Once per decimated period the
// latch pulse makes a D latch copy the last integrator's output and hold it
// for the whole period; N_STAGES cascaded differentiators, enabled once per
// period, then take successive differences of the held samples. The last
// differentiator's register is y_out. The impulse response at the input
// rate is the triple box-car convolution 1, 3, 6, 10, ..., 48, 48, ..., 3, 1
// (22 taps, DC gain 8^3 = 512); every eighth value of it reaches y_out.
//
// All arithmetic wraps modulo 2^WORD_W. The integrators overflow freely on
// any nonzero input; because the differentiators undo the wrap, y_out is
// exact whenever the true result fits in WORD_W bits, which 5 + 9 = 14 bits
// guarantee for every unsigned 5-bit input.
//
// Timing: a new y_out appears at the rising edge of clk that ends a latch
// pulse, once every 8 clocks; y_valid is high for the clock cycle that
// follows it. The latency from an input sample to its first effect on y_out
// depends on where it falls in the decimated period; see the README.
//
// Follows the original design: the stage count, 14-bit words, 5-bit input,
// divide-by-8 from bit 2 of a 4-bit counter, the pulsed hold latch and the
// structure of every stage. Choices of this RTL: one edge-triggered clock
// with a clock enable for the comb section instead of two-phase and divided
// clocks, the active-low asynchronous reset, unsigned (zero-extended)
// input, and the y_valid flag.
module cic_filter
  import cic_pkg::*;
#(
  parameter int unsigned IN_W_P     = IN_W,
  parameter int unsigned WORD_W_P   = WORD_W,
  parameter int unsigned N_STAGES_P = N_STAGES,
  parameter int unsigned CNT_W_P    = CNT_W,
  parameter int unsigned DEC_BIT_P  = DEC_BIT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [IN_W_P-1:0]   x_in,
  output logic [WORD_W_P-1:0] y_out,
  output logic                y_valid,
  output logic                dec_clk,
  output logic                pulse
);

  logic [CNT_W_P-1:0]  count;
  logic                dec_nclk;
  logic                dec_en;
  logic                npulse;

  // integ[0] is the extended input, integ[i] the output of integrator i
  logic [WORD_W_P-1:0] integ [N_STAGES_P+1];
  // comb[0] is the latch output, comb[i] the output of differentiator i
  logic [WORD_W_P-1:0] comb  [N_STAGES_P+1];

  cic_clocks #(.CNT_W(CNT_W_P), .DEC_BIT(DEC_BIT_P)) u_clocks (
    .clk     (clk),
    .rst_n   (rst_n),
    .count   (count),
    .dec_clk (dec_clk),
    .dec_nclk(dec_nclk),
    .dec_en  (dec_en),
    .pulse   (pulse),
    .npulse  (npulse)
  );

  assign integ[0] = WORD_W_P'(x_in);

  for (genvar i = 0; i < N_STAGES_P; i++) begin : g_integ
    cic_integrator #(.WIDTH(WORD_W_P)) u_integ (
      .clk  (clk),
      .rst_n(rst_n),
      .x    (integ[i]),
      .y    (integ[i+1])
    );
  end

  cic_dlatch #(.WIDTH(WORD_W_P)) u_hold (
    .rst_n(rst_n),
    .g    (pulse),
    .d    (integ[N_STAGES_P]),
    .q    (comb[0])
  );

  for (genvar i = 0; i < N_STAGES_P; i++) begin : g_comb
    cic_differentiator #(.WIDTH(WORD_W_P)) u_diff (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (dec_en),
      .x    (comb[i]),
      .y    (comb[i+1])
    );
  end

  assign y_out = comb[N_STAGES_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= dec_en;
  end

endmodule
