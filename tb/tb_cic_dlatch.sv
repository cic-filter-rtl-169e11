// tb_cic_dlatch: self-checking test of the 14-bit D latch.
// While the gate is high the output must follow every change of the input;
// while it is low the output must keep the value present when it fell.
`timescale 1ns/1ps
module tb_cic_dlatch;
  localparam int W = 14;
  logic rst_n = 1, g = 0;
  logic [W-1:0] d = '0, q, held;
  int checks = 0, failures = 0;

  cic_dlatch dut (.rst_n(rst_n), .g(g), .d(d), .q(q));

  task automatic expect_q(input logic [W-1:0] v, input string what);
    checks++;
    if (q !== v) begin failures++; $display("FAIL %s q=%0d exp=%0d", what, q, v); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    d = W'(123);
    #5;
    expect_q('0, "reset");
    rst_n = 1;
    #5;
    expect_q('0, "closed after reset");
    for (int i = 0; i < 100; i++) begin
      g = 1;
      repeat (3) begin
        d = W'($urandom);
        #5;
        expect_q(d, "transparent");
      end
      held = d;
      g = 0;
      #5;
      repeat (3) begin
        d = W'($urandom);
        #5;
        expect_q(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
