// tb_cic_integrator: self-checking test of one integrator stage.
// First holds the input at 1: the output must step 0, 1, 2, ... by one per
// clock and wrap from 2^14-1 to 0. Then applies random inputs and compares
// with y(n) = y(n-1) + x(n-1) mod 2^14 kept by the testbench.
`timescale 1ns/1ps
module tb_cic_integrator;
  localparam int W = 14;
  logic clk = 0, rst_n = 1;
  logic [W-1:0] x = '0, y;
  int unsigned model;
  int checks = 0, failures = 0, wraps = 0;

  always #50 clk = ~clk;

  cic_integrator dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;  // falling edge applies the asynchronous reset
    #9;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL reset"); end
    model = 0;
    @(negedge clk);
    rst_n = 1;
    x = W'(1);
    // count by one through a full wrap of the 14-bit word
    for (int i = 0; i < (1 << W) + 10; i++) begin
      @(posedge clk);
      model = (model + 1) % (1 << W);
      if (model == 0) wraps++;
      #1;
      checks++;
      if (y !== W'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d y=%0d exp=%0d", i, y, model);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x = W'($urandom);
      @(posedge clk);
      model = (model + int'(x)) % (1 << W);
      #1;
      checks++;
      if (y !== W'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL random %0d y=%0d exp=%0d", i, y, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
