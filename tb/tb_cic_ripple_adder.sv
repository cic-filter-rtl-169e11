// tb_cic_ripple_adder: self-checking test of the 14-bit ripple-carry adder.
// Compares {co, s} with the integer sum a + b + cin for corner cases (full
// carry ripple, maximum operands) and random operands.
`timescale 1ns/1ps
module tb_cic_ripple_adder;
  localparam int W = 14;
  logic [W-1:0] a, b, s;
  logic cin, co;
  int checks = 0, failures = 0;

  cic_ripple_adder dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

  task automatic check(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    int unsigned expect_sum;
    a = va; b = vb; cin = vc;
    #1;
    expect_sum = int'(va) + int'(vb) + int'(vc);
    checks++;
    if ({co, s} !== (W+1)'(expect_sum)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> co=%0d s=%0d", va, vb, vc, co, s);
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
    check('1, '0, 1'b1);        // carry ripples through all bits
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check(W'(1), '1, 1'b0);
    check(W'(3), ~W'(3), 1'b1); // x - x = 0 with carry out
    repeat (500) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
