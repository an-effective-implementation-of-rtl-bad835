// Switching-activity testbench for the encoder's two modes.
//
// The encoder's power argument is that Manchester, run with Mode = 1 and
// CLR = 0, leaves the FM0 register (DFF_A, DFF_B) frozen, so Manchester
// switches less of the circuit than FM0 at the same clock rate. This
// testbench sends the same 400 random bits through sols_encoder twice, once in
// FM0 and once in Manchester with the clear held, and counts toggles of the
// two flip-flop outputs, the two code nets and the output. It checks that the
// FM0 register never toggles in Manchester, that it does toggle in FM0, and
// that Manchester has fewer toggles in total (the output net itself is left
// out of that sum: it also counts the short glitches at clock edges). It also
// checks the line transition counts that follow from the codes: Manchester
// has one in every bit middle plus one between equal bits, FM0 one at every
// bit start plus one per 0-bit middle.
`timescale 1ns/1ps
module tb_switching_activity;
  import sols_pkg::*;

  localparam int NBITS = 400;

  logic  clk = 1'b0;
  logic  clr_n = 1'b0;
  mode_e mode = MODE_FM0;
  logic  x = 1'b0;
  logic  code_out;

  int checks = 0;
  int failures = 0;
  logic data [NBITS];

  sols_encoder dut (.clk(clk), .clr_n(clr_n), .mode(mode), .x(x), .code_out(code_out));

  always #5 clk = ~clk;

  // toggle counters
  bit counting = 1'b0;
  int t_ff = 0, t_nets = 0, t_out = 0;
  always @(dut.u_fm0.dff_a_q or dut.u_fm0.dff_b_q) if (counting) t_ff++;
  always @(dut.fm0_code or dut.manchester_code) if (counting) t_nets++;
  always @(code_out) if (counting) t_out++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Sends data[] in mode m. Toggles are counted from the rising edge after
  // the first bit was presented, over NBITS-1 periods. The line is also
  // sampled in the middle of every half-bit; line_changes counts level changes
  // between consecutive samples, i.e. the transitions of the glitch-free code.
  task automatic run(input mode_e m, output int ff, output int nets, output int outs,
                     output int line_changes);
    logic prev, cur;
    @(posedge clk);
    #1 mode = m;
    clr_n = (m == MODE_FM0);
    x = data[0];
    @(posedge clk);               // the FM0 register loads the first bit here
    #1;
    t_ff = 0; t_nets = 0; t_out = 0;
    line_changes = 0;
    counting = 1'b1;
    for (int i = 1; i < NBITS; i++) begin
      x = data[i];
      #2 cur = code_out;
      if (i > 1 && cur != prev) line_changes++;
      prev = cur;
      @(negedge clk);
      #2 cur = code_out;
      if (cur != prev) line_changes++;
      prev = cur;
      @(posedge clk);
      #1;
    end
    counting = 1'b0;
    ff = t_ff;
    nets = t_nets;
    outs = t_out;
  endtask

  initial begin
    repeat (4 * NBITS) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ff_f, nets_f, out_f, line_f, ff_m, nets_m, out_m, line_m, zeros_fm0, equal_pairs;
    zeros_fm0 = 0;
    equal_pairs = 0;
    for (int i = 0; i < NBITS; i++) data[i] = 1'($urandom);
    // FM0 sends data[0..NBITS-2] in the window, Manchester data[1..NBITS-1]
    for (int i = 0; i <= NBITS - 2; i++) if (!data[i]) zeros_fm0++;
    for (int i = 1; i < NBITS - 1; i++) if (data[i] == data[i + 1]) equal_pairs++;
    run(MODE_FM0, ff_f, nets_f, out_f, line_f);
    run(MODE_MANCHESTER, ff_m, nets_m, out_m, line_m);
    $display("FM0:        register toggles %0d, code-net toggles %0d, output toggles %0d, line transitions %0d",
             ff_f, nets_f, out_f, line_f);
    $display("Manchester: register toggles %0d, code-net toggles %0d, output toggles %0d, line transitions %0d",
             ff_m, nets_m, out_m, line_m);
    $display("Manchester / FM0 internal toggles: %0.1f %%", 100.0 * (ff_m + nets_m) / (ff_f + nets_f));
    check(ff_m == 0, "FM0 register frozen in Manchester with CLR = 0");
    check(ff_f > NBITS / 2, "FM0 register switches in FM0");
    check(ff_m + nets_m < ff_f + nets_f, "Manchester switches less than FM0");
    // FM0: a transition at every bit start after the first, one mid-bit per 0
    check(line_f == (NBITS - 2) + zeros_fm0,
          $sformatf("FM0 line transitions %0d, expected %0d", line_f, (NBITS - 2) + zeros_fm0));
    // Manchester: one mid-bit per bit, one at each boundary between equal bits
    check(line_m == (NBITS - 1) + equal_pairs,
          $sformatf("Manchester line transitions %0d, expected %0d", line_m, (NBITS - 1) + equal_pairs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
