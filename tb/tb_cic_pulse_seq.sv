// tb_cic_pulse_seq: self-checking test of the latch-pulse sequencer.
// Feeds a divide-by-8 square wave as the decimated clock and checks that
// first is high for exactly the clock cycle after each rise of dec_clk,
// that pulse is 50 ns wide every 800 ns at a 100 ns clock, lies in the low
// half of that cycle, and that npulse is its complement.
`timescale 1ns/1ps
module tb_cic_pulse_seq;
  logic clk = 0, rst_n = 1, dec_clk = 0;
  logic first, pulse, npulse;
  logic [2:0] div = '0;
  int checks = 0, failures = 0, pulses = 0;
  realtime t_rise = -1.0, t_prev_rise = -1.0;

  always #50 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    div     <= div + 1'b1;
    dec_clk <= (div + 1'b1) >= 3'd4;
  end

  cic_pulse_seq dut (.clk(clk), .rst_n(rst_n), .dec_clk(dec_clk),
                     .first(first), .pulse(pulse), .npulse(npulse));

  always @(posedge pulse) begin
    t_prev_rise = t_rise;
    t_rise = $realtime;
    pulses++;
    checks++;
    if (clk !== 1'b0) begin failures++; $display("FAIL pulse rose while clk high"); end
    if (t_prev_rise >= 0) begin
      checks++;
      if (t_rise - t_prev_rise != 800.0) begin
        failures++;
        $display("FAIL pulse period %0t", t_rise - t_prev_rise);
      end
    end
  end

  always @(negedge pulse) if (t_rise >= 0) begin
    checks++;
    if ($realtime - t_rise != 50.0) begin
      failures++;
      $display("FAIL pulse width %0t", $realtime - t_rise);
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_dec;
    #1 rst_n = 0;  // falling edge applies the asynchronous reset
    #9;
    @(negedge clk) rst_n = 1;
    prev_dec = dec_clk;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      #1;
      // sampled mid-cycle (clk high): first must mark the cycle after a rise
      checks++;
      if (first !== (dec_clk && !prev_dec)) begin
        failures++;
        $display("FAIL first=%0d dec=%0d prev=%0d", first, dec_clk, prev_dec);
      end
      checks++;
      if (pulse !== 1'b0 || npulse !== 1'b1) begin failures++; $display("FAIL pulse in clk high half"); end
      @(negedge clk);
      #1;
      checks++;
      if (pulse !== first || npulse !== ~pulse) begin failures++; $display("FAIL pulse in clk low half"); end
      prev_dec = dec_clk;
    end
    checks++;
    if (pulses < 20) begin failures++; $display("FAIL only %0d pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
