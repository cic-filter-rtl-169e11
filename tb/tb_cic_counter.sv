// tb_cic_counter: self-checking test of the 4-bit counter.
// Checks the count against a reference through several wraps, and that
// bit 2 is a square wave of period 8 clocks (four low, four high).
`timescale 1ns/1ps
module tb_cic_counter;
  logic clk = 0, rst_n = 1;
  logic [3:0] q;
  int unsigned model = 0;
  int checks = 0, failures = 0, rises = 0, last_rise = -1;

  always #50 clk = ~clk;

  cic_counter dut (.clk(clk), .rst_n(rst_n), .q(q));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_b2;
    #1 rst_n = 0;  // falling edge applies the asynchronous reset
    #9;
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    prev_b2 = 1'b0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk);
      model = (model + 1) % 16;
      #1;
      checks++;
      if (q !== 4'(model)) begin failures++; $display("FAIL cycle %0d q=%0d exp=%0d", i, q, model); end
      if (q[2] && !prev_b2) begin
        if (last_rise >= 0) begin
          checks++;
          if (i - last_rise != 8) begin failures++; $display("FAIL bit2 period %0d", i - last_rise); end
        end
        last_rise = i;
        rises++;
      end
      prev_b2 = q[2];
    end
    checks++;
    if (rises < 10) begin failures++; $display("FAIL only %0d rises", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
