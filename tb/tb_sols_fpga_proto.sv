// End-to-end testbench for sols_fpga_proto, the encoder in its two-clock
// prototype setting. All parameters are at their defaults.
//
// CLKEXT runs at 100 MHz (10 ns), so CLKINT, and the bit rate, is 50 MHz.
// The data source changes x, mode and clr_n 1 ns after each rising CLKINT
// edge. The testbench checks
//   * that CLKINT has exactly two CLKEXT periods per bit;
//   * both half-bits of code_out in every CLKINT period, against a model
//     written from the code definitions (Manchester: 1 = high then low, same
//     period; FM0: inversion at every bit start and mid-bit for a 0, bit taken
//     at the period's rising edge);
//   * that code_sync repeats code_out one CLKEXT period later;
//   * that every bit decodes back from the code_sync stream alone.
// The run covers FM0, Manchester with the FM0 flip-flops cleared (Mode = 1,
// CLR = 0), Manchester with them running, mode switches, clears and clear
// releases; each is counted and any that never happened counts as a failure.
`timescale 1ns/1ps
module tb_sols_fpga_proto;

  logic clk_ext = 1'b0;
  logic rst_n = 1'b0;
  logic clr_n = 1'b0;
  logic mode = 1'b0;
  logic x = 1'b0;
  logic clk_int, code_out, code_sync;

  typedef struct {
    logic valid;     // a data bit is on the line in this period
    logic bit_val;
    logic man;
  } bit_t;

  bit_t q[$];
  int checks = 0;
  int failures = 0;
  logic prev_level = 1'b0;
  int n_fm0 = 0, n_man_clr = 0, n_man_run = 0, n_switch = 0, n_clr = 0, n_rel = 0;
  int n_sync = 0, n_decoded = 0;

  sols_fpga_proto dut (
    .clk_ext(clk_ext), .rst_n(rst_n), .clr_n(clr_n), .mode(mode), .x(x),
    .clk_int(clk_int), .code_out(code_out), .code_sync(code_sync)
  );

  always #5 clk_ext = ~clk_ext;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // One CLKINT period.
  task automatic cycle(input logic b, input logic m, input logic c);
    logic active, sent, f_first, f_second, first, second;
    bit_t e;
    @(posedge clk_int);
    active   = clr_n;
    sent     = x;
    f_first  = ~prev_level;
    f_second = sent ? f_first : ~f_first;
    #1;
    if (m != mode) n_switch++;
    if (c && !clr_n) n_rel++;
    if (!c && clr_n) n_clr++;
    x = b;
    mode = m;
    clr_n = c;
    if (!c) active = 1'b0;
    if (!active) begin
      f_first  = 1'b0;
      f_second = 1'b0;
    end
    if (m) begin
      first  = b;
      second = ~b;
      e = '{valid: 1'b1, bit_val: b, man: 1'b1};
      if (c) n_man_run++;
      else   n_man_clr++;
    end else begin
      first  = f_first;
      second = f_second;
      e = '{valid: active, bit_val: sent, man: 1'b0};
      n_fm0++;
    end
    q.push_back(e);
    #2 check(code_out, first, "code_out first half");
    @(negedge clk_int);
    #2 check(code_out, second, "code_out second half");
    prev_level = f_second;
  endtask

  // code_sync follows code_out by one CLKEXT period
  logic code_mid;
  always @(negedge clk_ext) code_mid = code_out;
  always @(posedge clk_ext) begin
    logic expected;
    expected = code_mid;
    #2;
    if (rst_n && $time > 20) begin
      check(code_sync, expected, "code_sync = code_out one CLKEXT later");
      n_sync++;
    end
  end

  // decode from code_sync only
  logic half_seen = 1'b0;
  logic first_sync;
  always @(posedge clk_ext) begin
    #2;
    if (rst_n && q.size() > 0) begin
      if (!clk_int) begin
        first_sync = code_sync;
        half_seen = 1'b1;
      end else if (half_seen) begin
        bit_t e;
        e = q.pop_front();
        half_seen = 1'b0;
        if (e.valid) begin
          n_decoded++;
          if (e.man) check(first_sync, e.bit_val, "Manchester decode from code_sync");
          else       check(first_sync == code_sync, e.bit_val, "FM0 decode from code_sync");
        end
      end
    end
  end

  // CLKINT rate: two CLKEXT periods per CLKINT period
  int ext_count = 0;
  logic rate_armed = 1'b0;
  always @(posedge clk_ext) if (rst_n) ext_count++;
  always @(posedge clk_int) begin
    if (rate_armed) check(ext_count == 2, 1'b1, "two CLKEXT periods per bit");
    rate_armed = 1'b1;
    ext_count = 0;
  end

  initial begin
    repeat (10000) @(posedge clk_ext);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_pattern(input logic m, input logic c);
    logic [6:0] pattern = 7'b1010001;   // 1 0 1 0 0 0 1
    for (int i = 6; i >= 0; i--) cycle(pattern[i], m, c);
  endtask

  initial begin
    #13 check(clk_int, 1'b0, "reset CLKINT");
    check(code_sync, 1'b0, "reset code_sync");
    @(negedge clk_ext);
    rst_n = 1'b1;
    cycle(1'b0, 1'b0, 1'b0);
    send_pattern(1'b0, 1'b1);                         // FM0
    for (int i = 0; i < 200; i++) cycle(1'($urandom), 1'b0, 1'b1);
    send_pattern(1'b1, 1'b0);                         // Manchester, CLR = 0
    for (int i = 0; i < 200; i++) cycle(1'($urandom), 1'b1, 1'b0);
    for (int i = 0; i < 100; i++) cycle(1'($urandom), 1'b0, 1'b1);
    for (int i = 0; i < 100; i++) cycle(1'($urandom), 1'b1, 1'b1);
    for (int i = 0; i < 100; i++) cycle(1'($urandom), 1'b0, 1'b1);
    for (int k = 0; k < 40; k++) begin
      automatic logic m = 1'($urandom);
      automatic logic c = 1'($urandom_range(0, 3) != 0);
      for (int i = 0; i < 6; i++) cycle(1'($urandom), m, c);
    end
    repeat (2) @(posedge clk_int);
    #3;
    check(q.size() <= 1, 1'b1, "every bit seen on code_sync");
    $display("periods: FM0 %0d, Manchester cleared %0d, Manchester running %0d", n_fm0, n_man_clr, n_man_run);
    $display("mode switches %0d, clears %0d, releases %0d, code_sync samples %0d, decoded bits %0d",
             n_switch, n_clr, n_rel, n_sync, n_decoded);
    checks += 7;
    if (n_fm0 == 0)     begin failures++; $display("FAIL no FM0 bits"); end
    if (n_man_clr == 0) begin failures++; $display("FAIL no Manchester bits with clear"); end
    if (n_man_run == 0) begin failures++; $display("FAIL no Manchester bits without clear"); end
    if (n_switch == 0)  begin failures++; $display("FAIL no mode switch"); end
    if (n_clr == 0)     begin failures++; $display("FAIL no clear"); end
    if (n_rel == 0)     begin failures++; $display("FAIL no clear release"); end
    if (n_decoded == 0) begin failures++; $display("FAIL nothing decoded from code_sync"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
