// tb_cic_dff: self-checking test of the 14-bit register.
// Checks the asynchronous clear, loading on a rising edge when enabled and
// holding when not, against a reference copy kept by the testbench.
`timescale 1ns/1ps
module tb_cic_dff;
  localparam int W = 14;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  cic_dff dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

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
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%0d", q); end
    model = '0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d q=%0d exp=%0d", i, q, model); end
    end
    // asynchronous clear in mid-cycle
    @(negedge clk) rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async clear q=%0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
