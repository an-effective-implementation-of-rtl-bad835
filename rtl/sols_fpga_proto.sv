// FPGA prototype of the FM0 / Manchester encoder.
//
// The encoded line changes at both edges of the bit clock, so a design that
// is clocked only on one edge cannot produce or capture it directly. The
// prototype therefore uses two clocks: CLKEXT, the fast system clock that
// synchronises the signals of the FPGA, and CLKINT, half its frequency, the
// bit clock of the encoder. Both clocks and their 2:1 ratio are those of the
// prototype this RTL follows; how CLKINT is made and where the encoded line is
// re-timed are this design's own choices:
//   * CLKINT is made from CLKEXT by a toggle flip-flop, so each CLKINT edge
//     falls on a rising CLKEXT edge and CLKINT is high for the first half of
//     each bit.
//   * The encoder (sols_encoder) runs on CLKINT.
//   * code_sync is code_out registered on the rising edge of CLKEXT: every
//     half-bit of the code is sampled once, in the middle of the CLKEXT period
//     that carries it, and comes out as a glitch-free CLKEXT-synchronous
//     signal, one CLKEXT period (half a bit) later than code_out.
//
// Interface and timing: one data bit per two CLKEXT periods. rst_n clears the
// clock divider and the output register asynchronously. x changes after a
// rising CLKINT edge and holds for that CLKINT period: Manchester sends it in
// that period, FM0 in the next one. mode and clr_n are passed to the encoder unchanged
// (mode 0 = FM0, 1 = Manchester; clr_n low clears the FM0 flip-flops, as is
// done while Manchester is selected).
`timescale 1ns/1ps
module sols_fpga_proto
  import sols_pkg::*;
(
  input  logic clk_ext,    // CLKEXT, twice the bit rate
  input  logic rst_n,      // active-low asynchronous reset of the prototype
  input  logic clr_n,      // active-low clear of the FM0 flip-flops
  input  logic mode,       // 0: FM0, 1: Manchester
  input  logic x,          // data bit, one per CLKINT period
  output logic clk_int,    // CLKINT, the encoder's bit clock
  output logic code_out,   // encoder output, changes on both CLKINT edges
  output logic code_sync   // code_out re-timed to CLKEXT
);

  // CLKINT: CLKEXT divided by two.
  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) clk_int <= 1'b0;
    else        clk_int <= ~clk_int;
  end

  sols_encoder u_encoder (
    .clk      (clk_int),
    .clr_n    (clr_n),
    .mode     (mode_e'(mode)),
    .x        (x),
    .code_out (code_out)
  );

  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) code_sync <= 1'b0;
    else        code_sync <= code_out;
  end

endmodule
