// tb_cic_inverter: self-checking test of the 14-bit inverter.
// Walks a one and a zero across all bits, then applies random words, and
// checks every output bit against the input XOR all ones. Combinational
// block, so a watchdog on elapsed time stands in for a cycle count.
`timescale 1ns/1ps
module tb_cic_inverter;
  localparam int W = 14;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  cic_inverter dut (.a(a), .y(y));

  task automatic check(input logic [W-1:0] v);
    a = v;
    #1;
    checks++;
    if (y !== (v ^ {W{1'b1}})) begin
      failures++;
      $display("FAIL a=%b y=%b", v, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      check(W'(1) << i);
      check(~(W'(1) << i));
    end
    repeat (200) check(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
