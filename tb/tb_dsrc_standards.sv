// Workload testbench: the three DSRC downlink profiles of America, Europe and
// Japan run through the prototype top (sols_fpga_proto) at their own bit
// rates, with CLKEXT at twice the bit rate:
//   Europe  (CEN)   FM0          500 kb/s   CLKEXT   1 MHz
//   America (ASTM)  Manchester    27 Mb/s   CLKEXT  54 MHz
//   Japan   (ARIB)  Manchester     4 Mb/s   CLKEXT   8 MHz
// Manchester is run with the FM0 flip-flops cleared (clr_n = 0). For each
// profile the testbench sends a 7-bit pattern and 120 random bits, measures
// the bit period on CLKINT against the profile's rate, decodes every bit back
// from the line (sampled a quarter-bit into each half) and checks the
// dc-balance: Manchester has no running disparity at bit ends, FM0 stays
// within one bit's worth (2 half-bits).
`timescale 1ns/1ps
module tb_dsrc_standards;

  logic clk_ext = 1'b0;
  logic rst_n = 1'b0;
  logic clr_n = 1'b0;
  logic mode = 1'b0;
  logic x = 1'b0;
  logic clk_int, code_out, code_sync;

  realtime half_ext = 500.0;   // half a CLKEXT period, ns
  int checks = 0;
  int failures = 0;

  sols_fpga_proto dut (
    .clk_ext(clk_ext), .rst_n(rst_n), .clr_n(clr_n), .mode(mode), .x(x),
    .clk_int(clk_int), .code_out(code_out), .code_sync(code_sync)
  );

  always #(half_ext) clk_ext = ~clk_ext;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic run_profile(input string name, input real rate_mbps, input logic man);
    realtime bit_ns, t_prev;
    logic sent[$];
    logic first, second;
    int disparity, max_disp, n_bits, n_rate;
    logic [6:0] pattern = 7'b1010001;
    bit_ns = 1000.0 / rate_mbps;
    rst_n = 1'b0;
    half_ext = bit_ns / 4.0;
    mode = man;
    clr_n = 1'b0;
    x = 1'b0;
    #(bit_ns);
    rst_n = 1'b1;
    @(posedge clk_int);
    #(bit_ns / 8.0);
    clr_n = man ? 1'b0 : 1'b1;   // FM0: released mid-bit, loads at the next edge
    disparity = 0;
    max_disp = 0;
    n_bits = 0;
    n_rate = 0;
    t_prev = $realtime;
    for (int i = 0; i < 128; i++) begin
      logic b;
      realtime t_edge;
      b = (i < 7) ? pattern[6 - i] : 1'($urandom);
      @(posedge clk_int);
      t_edge = $realtime;
      if (i > 0) begin
        check(t_edge - t_prev > bit_ns - 0.01 && t_edge - t_prev < bit_ns + 0.01,
              $sformatf("%s bit period %0.3f ns", name, t_edge - t_prev));
        n_rate++;
      end
      t_prev = t_edge;
      #(bit_ns / 8.0);
      x = b;
      sent.push_back(b);
      #(bit_ns / 8.0);
      first = code_out;
      #(bit_ns / 2.0);
      second = code_out;
      if (man) begin
        check(first == sent[$] && second == ~sent[$], $sformatf("%s Manchester bit %0d", name, i));
        n_bits++;
        disparity += (first ? 1 : -1) + (second ? 1 : -1);
      end else if (i > 0) begin
        // FM0 sends the bit presented one period earlier
        check((first == second) == sent[$-1], $sformatf("%s FM0 bit %0d", name, i - 1));
        n_bits++;
        disparity += (first ? 1 : -1) + (second ? 1 : -1);
      end
      if (disparity > max_disp) max_disp = disparity;
      if (-disparity > max_disp) max_disp = -disparity;
    end
    check(man ? max_disp == 0 : max_disp <= 2, $sformatf("%s dc-balance (max disparity %0d)", name, max_disp));
    check(n_bits >= 127 && n_rate == 127, $sformatf("%s bits decoded %0d", name, n_bits));
    $display("%s: %0d bits decoded at %0.3f Mb/s, max running disparity %0d half-bits",
             name, n_bits, rate_mbps, max_disp);
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_profile("Europe CEN FM0", 0.5, 1'b0);
    run_profile("America ASTM Manchester", 27.0, 1'b1);
    run_profile("Japan ARIB Manchester", 4.0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
