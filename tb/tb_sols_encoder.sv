// Self-checking testbench for sols_encoder.
//
// A reference model written from the two code definitions predicts both
// half-bits of every CLK period:
//   FM0         level inverts at every bit start, and again mid-bit for a 0;
//               the bit sent is the x sampled at the period's rising edge
//   Manchester  1 = high then low, 0 = low then high, for the x of the same
//               period (high half while CLK is high)
// The data source changes x, mode and clr_n 1 ns after each rising edge. The
// model also tracks the FM0 state while Manchester is selected, since the FM0
// flip-flops keep running unless clr_n holds them. The run covers FM0,
// Manchester with the FM0 flip-flops cleared (Mode = 1, CLR = 0, the way the
// encoder is meant to be run for Manchester), Manchester without the clear,
// and switches between the modes; it counts each of these and fails if one
// never happened. FM0 bits are also decoded back (equal halves = 1).
`timescale 1ns/1ps
module tb_sols_encoder;
  import sols_pkg::*;

  logic  clk = 1'b0;
  logic  clr_n = 1'b0;
  mode_e mode = MODE_FM0;
  logic  x = 1'b0;
  logic  code_out;

  int checks = 0;
  int failures = 0;
  logic prev_level = 1'b0;   // model: FM0 second-half level of the last bit
  int n_fm0 = 0, n_man_clr = 0, n_man_run = 0, n_switch = 0;

  sols_encoder dut (.clk(clk), .clr_n(clr_n), .mode(mode), .x(x), .code_out(code_out));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cycle(input logic b, input mode_e m, input logic c);
    logic active, sent, f_first, f_second, first, second, got_first;
    @(posedge clk);
    active = clr_n;
    sent   = x;
    f_first  = ~prev_level;
    f_second = sent ? f_first : ~f_first;
    #1;
    if (m != mode) n_switch++;
    x = b;
    mode = m;
    clr_n = c;
    if (!c) active = 1'b0;
    if (!active) begin
      f_first  = 1'b0;
      f_second = 1'b0;
    end
    if (m == MODE_MANCHESTER) begin
      first  = b;
      second = ~b;
      if (c) n_man_run++;
      else   n_man_clr++;
    end else begin
      first  = f_first;
      second = f_second;
      n_fm0++;
    end
    #2 got_first = code_out;
    check(got_first, first, "first half");
    @(negedge clk);
    #2 check(code_out, second, "second half");
    if (m == MODE_FM0 && active) check(got_first == code_out, sent, "FM0 decode");
    prev_level = f_second;
  endtask

  task automatic send_pattern(input mode_e m, input logic c);
    logic [6:0] pattern = 7'b1010001;   // 1 0 1 0 0 0 1
    for (int i = 6; i >= 0; i--) cycle(pattern[i], m, c);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cycle(1'b0, MODE_FM0, 1'b0);
    send_pattern(MODE_FM0, 1'b1);
    for (int i = 0; i < 100; i++) cycle(1'($urandom), MODE_FM0, 1'b1);
    send_pattern(MODE_MANCHESTER, 1'b0);
    for (int i = 0; i < 100; i++) cycle(1'($urandom), MODE_MANCHESTER, 1'b0);
    for (int i = 0; i < 50; i++) cycle(1'($urandom), MODE_FM0, 1'b1);
    for (int i = 0; i < 50; i++) cycle(1'($urandom), MODE_MANCHESTER, 1'b1);
    for (int i = 0; i < 50; i++) cycle(1'($urandom), MODE_FM0, 1'b1);
    for (int k = 0; k < 20; k++) begin
      automatic mode_e m = mode_e'($urandom_range(0, 1));
      automatic logic c = 1'($urandom_range(0, 3) != 0);
      for (int i = 0; i < 5; i++) cycle(1'($urandom), m, c);
    end
    $display("periods: FM0 %0d, Manchester cleared %0d, Manchester running %0d, mode switches %0d",
             n_fm0, n_man_clr, n_man_run, n_switch);
    checks += 4;
    if (n_fm0 == 0)     begin failures++; $display("FAIL no FM0 bits"); end
    if (n_man_clr == 0) begin failures++; $display("FAIL no Manchester bits with clear"); end
    if (n_man_run == 0) begin failures++; $display("FAIL no Manchester bits without clear"); end
    if (n_switch == 0)  begin failures++; $display("FAIL no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
