// tb_cic_filter: end-to-end test of the CIC decimation filter at its
// default sizes (5-bit input, 14-bit words, 3 stages, decimation by 8).
//
// 1. Impulse: a single sample of 1, placed so that the latch catches the
//    third integrator at 3. Each decimated period the latch and the three
//    differentiators must show the stage values of the reference table
//    below, after which the output must stay 0 while the integrators keep
//    growing and wrap around.
// 2. Random 5-bit input for many periods. Each output is compared with the
//    direct convolution of the input with the filter's 22-tap impulse
//    response h = 1,3,6,10,15,21,28,36,42,46,48,48,46,42,36,28,21,15,10,6,3,1
//    (three cascaded 8-sample box-cars), taken every eighth sample. The
//    output must also come exactly once every 8 clocks.
// 3. Reset in mid-run must clear the output.
// Mechanisms counted, each required at least once: decimated outputs,
// latch pulses, latch holding while its input moves, integrator wrap
// (carry out of an integrator adder), negative (wrapped) differences.
`timescale 1ns/1ps
module tb_cic_filter;
  localparam int W     = 14;
  localparam int TAPS  = 22;
  localparam int DELAY = 20;  // clocks from the input sample to the output that first shows it
  localparam int H [TAPS] = '{1, 3, 6, 10, 15, 21, 28, 36, 42, 46, 48,
                              48, 46, 42, 36, 28, 21, 15, 10, 6, 3, 1};
  // reference stage values per decimated period for the impulse:
  // latch, differentiator 1, 2, 3
  localparam int ROWS = 6;
  localparam int TABLE [ROWS][4] = '{
    '{  3,   3,  0,  0},
    '{ 55,  52,  3,  0},
    '{171, 116, 49,  3},
    '{351, 180, 64, 46},
    '{595, 244, 64, 15},
    '{903, 308, 64,  0}};

  logic clk = 0, rst_n = 1;
  logic [4:0] x_in = '0;
  logic [W-1:0] y_out;
  logic y_valid, dec_clk, pulse;

  int checks = 0, failures = 0;
  int n_outputs = 0, n_pulses = 0, n_holds = 0, n_wraps = 0, n_negative = 0;
  int cyc = 0;
  int xs [0:8191];

  always #50 clk = ~clk;

  cic_filter dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .y_out(y_out),
                  .y_valid(y_valid), .dec_clk(dec_clk), .pulse(pulse));

  task automatic check_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, want, cyc);
    end
  endtask

  // input history, indexed by the clock edge that sampled it
  always @(posedge clk) begin
    xs[cyc % 8192] = int'(x_in);
    cyc++;
  end

  // mechanism counters
  always @(posedge pulse) n_pulses++;
  always @(negedge clk) if (rst_n) begin
    if (!pulse && dut.comb[0] != dut.integ[3]) n_holds++;
    if (dut.g_integ[0].u_integ.carry_out || dut.g_integ[1].u_integ.carry_out ||
        dut.g_integ[2].u_integ.carry_out) n_wraps++;
  end
  always @(posedge clk) if (rst_n && y_valid) begin
    n_outputs++;
    for (int i = 1; i <= 3; i++) if (dut.comb[i][W-1]) n_negative++;
  end

  function automatic int reference(input int p);
    int acc = 0;
    for (int k = 0; k < TAPS; k++) acc += H[k] * xs[(p - DELAY - k + 8192) % 8192];
    return acc % (1 << W);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int row, last_out;
    for (int i = 0; i < 8192; i++) xs[i] = 0;
    #1 rst_n = 0;  // falling edge applies the asynchronous reset
    #9;
    check_eq(int'(y_out), 0, "output in reset");
    @(negedge clk) rst_n = 1;

    // ---- 1. impulse, aligned to the decimation counter ----
    while (dut.count != 4'd0) @(negedge clk);
    x_in = 5'd1;
    @(negedge clk) x_in = 5'd0;
    row = 0;
    repeat (60 * 8) begin
      @(posedge clk);
      if (y_valid) begin
        if (row < ROWS) begin
          check_eq(int'(dut.comb[0]), TABLE[row][0], "impulse latch");
          check_eq(int'(dut.comb[1]), TABLE[row][1], "impulse differentiator 1");
          check_eq(int'(dut.comb[2]), TABLE[row][2], "impulse differentiator 2");
          check_eq(int'(dut.comb[3]), TABLE[row][3], "impulse differentiator 3");
        end else begin
          check_eq(int'(y_out), 0, "impulse tail");
        end
        row++;
      end
    end
    check_eq(row, 60, "impulse output count");

    // ---- 2. random input against the convolution reference ----
    last_out = -1;
    for (int i = 0; i < 8 * 400; i++) begin
      @(negedge clk) x_in = 5'($urandom);
      @(posedge clk);
      if (y_valid) begin
        check_eq(int'(y_out), reference(cyc), "random output");
        if (last_out >= 0) check_eq(cyc - last_out, 8, "output spacing");
        last_out = cyc;
      end
    end
    // full-scale input: largest output the word must hold
    repeat (8 * 8) begin
      @(negedge clk) x_in = 5'd31;
      @(posedge clk);
      if (y_valid) check_eq(int'(y_out), reference(cyc), "full-scale output");
    end
    check_eq(int'(y_out), 31 * 512, "full-scale settled output (gain 8^3)");

    // ---- 3. reset in mid-run ----
    @(negedge clk) rst_n = 0;
    #1;
    check_eq(int'(y_out), 0, "output after reset");
    check_eq(int'(dut.integ[3]), 0, "integrator after reset");

    $display("mechanisms: outputs=%0d pulses=%0d latch_holds=%0d integrator_wraps=%0d negative_diffs=%0d",
             n_outputs, n_pulses, n_holds, n_wraps, n_negative);
    checks++; if (n_outputs  == 0) begin failures++; $display("FAIL no decimated output"); end
    checks++; if (n_pulses   == 0) begin failures++; $display("FAIL no latch pulse"); end
    checks++; if (n_holds    == 0) begin failures++; $display("FAIL latch never held"); end
    checks++; if (n_wraps    == 0) begin failures++; $display("FAIL integrators never wrapped"); end
    checks++; if (n_negative == 0) begin failures++; $display("FAIL no negative difference"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
