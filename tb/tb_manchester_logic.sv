// Self-checking testbench for manchester_logic.
//
// Manchester sends a 1 as high-then-low and a 0 as low-then-high, the first
// half-bit being the time CLK is high. The testbench sends a fixed pattern and
// random bits, changes x 1 ns after each rising CLK edge and checks both half-bits of
// each bit in that same period, the transition in the middle of
// every bit, and that the line has exactly as many high as low half-bits.
`timescale 1ns/1ps
module tb_manchester_logic;

  logic clk = 1'b0;
  logic x = 1'b0;
  logic manchester_code;

  int checks = 0;
  int failures = 0;
  int disparity = 0;

  manchester_logic dut (.clk(clk), .x(x), .manchester_code(manchester_code));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic send_bit(input logic b);
    logic first;
    @(posedge clk);
    #1 x = b;
    #2;
    first = manchester_code;
    check(first, b, "first half");
    @(negedge clk); #2;
    check(manchester_code, ~b, "second half");
    check(manchester_code != first, 1'b1, "mid-bit transition");
    disparity += (first ? 1 : -1) + (manchester_code ? 1 : -1);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] pattern;
    pattern = 7'b1010001;
    for (int i = 6; i >= 0; i--) send_bit(pattern[i]);
    for (int i = 0; i < 200; i++) send_bit(1'($urandom));
    check(disparity == 0, 1'b1, "dc balance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
