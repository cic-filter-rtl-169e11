// tb_cic_impulse_phases: impulse response of the CIC decimator at every
// decimation phase.
//
// The filter's response at the input rate is the 22-tap sequence
// h = 1,3,6,10,15,21,28,36,42,46,48,48,46,42,36,28,21,15,10,6,3,1; the
// decimated output sees only every eighth tap, and which ones depends on
// where the impulse falls against the divide-by-8 counter. For each of the
// 8 phases this test resets the filter, applies a single sample of 1 and
// checks that the outputs are h[p], h[p+8], h[p+16], ... (0 past the end)
// for the right starting tap p, that together they sum to 512/8 = 64, and
// that the impulse with amplitude 31 scales exactly by 31.
`timescale 1ns/1ps
module tb_cic_impulse_phases;
  localparam int W     = 14;
  localparam int TAPS  = 22;
  localparam int DELAY = 20;
  localparam int H [TAPS] = '{1, 3, 6, 10, 15, 21, 28, 36, 42, 46, 48,
                              48, 46, 42, 36, 28, 21, 15, 10, 6, 3, 1};

  logic clk = 0, rst_n = 1;
  logic [4:0] x_in = '0;
  logic [W-1:0] y_out;
  logic y_valid, dec_clk, pulse;
  int checks = 0, failures = 0, cyc = 0;

  always #50 clk = ~clk;
  always @(posedge clk) cyc++;

  cic_filter dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .y_out(y_out),
                  .y_valid(y_valid), .dec_clk(dec_clk), .pulse(pulse));

  function automatic int tap(input int k);
    return (k >= 0 && k < TAPS) ? H[k] : 0;
  endfunction

  task automatic run_phase(input int phase, input int amp);
    int t_imp, sum, k;
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    repeat (phase) @(negedge clk);
    x_in = 5'(amp);
    t_imp = cyc;  // index of the rising edge that samples the impulse
    @(negedge clk) x_in = '0;
    sum = 0;
    repeat (8 * 8) begin
      @(posedge clk);
      if (y_valid) begin
        k = cyc - DELAY - t_imp;
        checks++;
        if (int'(y_out) != amp * tap(k)) begin
          failures++;
          $display("FAIL phase %0d amp %0d tap %0d: got %0d expected %0d", phase, amp, k, y_out, amp * tap(k));
        end
        sum += int'(y_out);
      end
    end
    checks++;
    if (sum != amp * 64) begin
      failures++;
      $display("FAIL phase %0d amp %0d: outputs sum to %0d, expected %0d", phase, amp, sum, amp * 64);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    for (int p = 0; p < 8; p++) run_phase(p, 1);
    for (int p = 0; p < 8; p++) run_phase(p, 31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
