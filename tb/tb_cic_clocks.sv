// tb_cic_clocks: self-checking test of the clock block at a 10 MHz clock.
// Checks what the clock block must deliver: the decimated clock has an
// 800 ns period and 50 % duty; the latch pulse has an 800 ns period and a
// 50 ns width (6.25 % duty); dec_en is high for exactly one clock in eight
// and brackets each pulse; the complements are complements.
`timescale 1ns/1ps
module tb_cic_clocks;
  logic clk = 0, rst_n = 1;
  logic [3:0] count;
  logic dec_clk, dec_nclk, dec_en, pulse, npulse;
  int checks = 0, failures = 0, n_dec = 0, n_pulse = 0, en_cycles = 0, cycles = 0;
  realtime t_dec = -1.0, t_dec_fall = -1.0, t_pulse = -1.0;

  always #50 clk = ~clk;

  cic_clocks dut (
    .clk(clk), .rst_n(rst_n), .count(count), .dec_clk(dec_clk), .dec_nclk(dec_nclk),
    .dec_en(dec_en), .pulse(pulse), .npulse(npulse));

  task automatic expect_time(input realtime got, input realtime want, input string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s %0t, expected %0t", what, got, want); end
  endtask

  always @(posedge dec_clk) begin
    if (t_dec >= 0) expect_time($realtime - t_dec, 800.0, "dec_clk period");
    t_dec = $realtime;
    n_dec++;
  end
  always @(negedge dec_clk) if (rst_n) begin
    expect_time($realtime - t_dec, 400.0, "dec_clk high time");
    t_dec_fall = $realtime;
  end
  always @(posedge pulse) begin
    if (t_pulse >= 0) expect_time($realtime - t_pulse, 800.0, "pulse period");
    t_pulse = $realtime;
    n_pulse++;
    checks++;
    if (!dec_en) begin failures++; $display("FAIL pulse outside dec_en"); end
  end
  always @(negedge pulse) if (t_pulse >= 0) expect_time($realtime - t_pulse, 50.0, "pulse width");

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;  // falling edge applies the asynchronous reset
    #9;
    @(negedge clk) rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      #1;
      cycles++;
      if (dec_en) en_cycles++;
      checks++;
      if (dec_nclk !== ~dec_clk || npulse !== ~pulse) begin failures++; $display("FAIL complement"); end
    end
    checks++;
    if (en_cycles != cycles / 8) begin
      failures++;
      $display("FAIL dec_en high %0d of %0d cycles", en_cycles, cycles);
    end
    checks++;
    if (n_pulse < 40 || n_dec < 40) begin failures++; $display("FAIL too few pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
