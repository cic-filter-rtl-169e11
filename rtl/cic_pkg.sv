// cic_pkg: constants and types shared by the CIC decimation filter.
//
// The filter is a third-order cascaded integrator-comb (CIC) decimator: three
// integrators at the sampling rate, a hold latch, and three differentiators
// at one eighth of that rate. A 5-bit input sample grows by N*log2(R) = 9
// bits through the filter, so every internal word is 14 bits wide and all
// arithmetic wraps modulo 2^14. Sizes here follow the original design; the
// reset polarity and the clock-enable scheme are choices of this RTL.
package cic_pkg;

  localparam int unsigned IN_W     = 5;   // input sample width
  localparam int unsigned WORD_W   = 14;  // internal word: IN_W + N*log2(R)
  localparam int unsigned N_STAGES = 3;   // integrators = differentiators
  localparam int unsigned CNT_W    = 4;   // width of the clock-divider counter
  localparam int unsigned DEC_BIT  = 2;   // counter bit used as decimated clock:
                                          // decimation by 2^(DEC_BIT+1) = 8

endpackage
