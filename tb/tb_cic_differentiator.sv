// tb_cic_differentiator: self-checking test of one differentiator stage.
// A step to 1 must give one enabled period of output 1, then 0 for good.
// Random inputs with a random enable are then compared with a reference
// that keeps the previous sample and the registered difference mod 2^14,
// including negative differences (wrapped) and enable-low hold cycles.
`timescale 1ns/1ps
module tb_cic_differentiator;
  localparam int W = 14;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] x = '0, y;
  logic [W-1:0] m_prev, m_y;
  int checks = 0, failures = 0, negatives = 0;

  always #50 clk = ~clk;

  cic_differentiator dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  task automatic step(input logic ven, input logic [W-1:0] vx);
    @(negedge clk);
    en = ven;
    x  = vx;
    @(posedge clk);
    if (ven) begin
      m_y    = vx - m_prev;
      m_prev = vx;
      if (m_y[W-1]) negatives++;
    end
    #1;
    checks++;
    if (y !== m_y) begin
      failures++;
      if (failures < 10) $display("FAIL en=%0d x=%0d y=%0d exp=%0d", ven, vx, y, m_y);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_prev = '0;
    m_y    = '0;
    #1 rst_n = 0;  // falling edge applies the asynchronous reset
    #9;
    @(negedge clk) rst_n = 1;
    // step input: output 1 for one enabled edge, then 0
    step(1'b1, W'(1));
    checks++;
    if (y !== W'(1)) begin failures++; $display("FAIL step response first %0d", y); end
    for (int i = 0; i < 5; i++) begin
      step(1'b1, W'(1));
      checks++;
      if (y !== '0) begin failures++; $display("FAIL step response later %0d", y); end
    end
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(0, 3) == 0), W'($urandom));
    checks++;
    if (negatives == 0) begin failures++; $display("FAIL no negative difference"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
