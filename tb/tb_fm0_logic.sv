// Self-checking testbench for fm0_logic.
//
// The expected line is computed from the FM0 rule alone, half-bit by
// half-bit: the level inverts at the start of every bit and inverts again in
// the middle of a 0. The data source changes x 1 ns after each rising CLK
// edge, so the bit presented in one period is sent in the next. Both half-bits
// of every bit are compared, over a fixed pattern, runs of 1s and 0s, random
// data, and clears at the start of the stream and in its middle (after which
// the line restarts as if the previous level were 0). The testbench also
// checks the transition at every bit boundary, that every bit decodes back
// (equal halves = 1) and that the running disparity stays within 2 half-bits.
`timescale 1ns/1ps
module tb_fm0_logic;

  logic clk = 1'b0;
  logic clr_n = 1'b0;
  logic x = 1'b0;
  logic fm0_code;

  int checks = 0;
  int failures = 0;
  logic prev_level = 1'b0;  // model: level of the previous half-bit
  int disparity = 0;        // high half-bits minus low half-bits
  int max_disp = 0;
  int n_bits = 0, n_cleared = 0;

  fm0_logic dut (.clk(clk), .clr_n(clr_n), .x(x), .fm0_code(fm0_code));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // One CLK period: the edge sends the bit presented in the previous period,
  // then x (and clr_n) take their new values.
  task automatic cycle(input logic b, input logic c);
    logic first, second, sent, active, got_first, got_second;
    @(posedge clk);
    active = clr_n;
    sent   = x;
    if (active) begin
      first  = ~prev_level;
      second = sent ? first : ~first;
    end
    #1;
    x = b;
    if (!c) active = 1'b0;
    clr_n = c;
    if (!active) begin
      first  = 1'b0;
      second = 1'b0;
    end
    #2 got_first = fm0_code;
    check(got_first, first, "first half");
    @(negedge clk);
    #2 got_second = fm0_code;
    check(got_second, second, "second half");
    if (active) begin
      n_bits++;
      check(got_first, ~prev_level, "transition at bit start");
      check(got_first == got_second, sent, "decode");
      disparity += (got_first ? 1 : -1) + (got_second ? 1 : -1);
      if (disparity > max_disp) max_disp = disparity;
      if (-disparity > max_disp) max_disp = -disparity;
      prev_level = second;
    end else begin
      n_cleared++;
      prev_level = 1'b0;
      disparity = 0;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] pattern;
    cycle(1'b0, 1'b0);                       // held in clear: line low
    cycle(1'b0, 1'b0);
    pattern = 7'b1010001;                    // 1 0 1 0 0 0 1
    for (int i = 6; i >= 0; i--) cycle(pattern[i], 1'b1);
    repeat (8) cycle(1'b1, 1'b1);
    repeat (8) cycle(1'b0, 1'b1);
    for (int i = 0; i < 150; i++) cycle(1'($urandom), 1'b1);
    repeat (3) cycle(1'($urandom), 1'b0);    // clear in mid-stream
    for (int i = 0; i < 100; i++) cycle(1'($urandom), 1'b1);
    $display("bits sent %0d, cleared periods %0d, max disparity %0d", n_bits, n_cleared, max_disp);
    checks++;
    if (max_disp > 2) begin
      failures++;
      $display("FAIL running disparity reached %0d half-bits", max_disp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
