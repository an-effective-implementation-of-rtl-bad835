// FM0 logic of the FM0 / Manchester encoder.
//
// FM0 (bi-phase space) sends each bit as two half-bit levels: the level always
// inverts at the start of a bit, and inverts again in the middle of the bit
// when the bit is 0. With A the first-half level and B the second-half level
// of bit t this gives
//     A(t) = ~B(t-1)          B(t) = X(t) ^ B(t-1)
// The block holds B in DFF_B, fed by XOR_1 of X and DFF_B's own output, and A
// in DFF_A, fed by the inverse of DFF_B's output. MUX_1 takes CLK as its
// select: while CLK is high (first half of the bit) it passes DFF_A (input 1),
// while CLK is low (second half) it passes DFF_B (input 0). The flip-flops,
// XOR_1, MUX_1 and their connections follow the encoder's block diagram; the
// recurrences above are the FM0 rule and fix the inverter in front of DFF_A.
//
// Design choices of this RTL: both flip-flops load on the rising edge of CLK;
// clr_n is an active-low asynchronous clear of both flip-flops (the text asks
// that DFF_B be held at 0 while Manchester is in use, to save its switching
// power). After a clear, the first FM0 bit starts with level 1.
//
// Interface and timing: one bit per CLK period. x is sampled at the rising
// CLK edge and sent during the CLK period that this edge starts; a source that
// changes x just after each rising edge thus sees its bit on the line one CLK
// period later. fm0_code is combinational in CLK and the flip-flop outputs:
// it changes at both CLK edges (and when clr_n falls). CLK is used as a data signal by MUX_1 by design: the code
// changes twice per bit, and the clock level is what marks the half-bit.
`timescale 1ns/1ps
module fm0_logic (
  input  logic clk,       // bit clock, one bit per period
  input  logic clr_n,     // active-low clear of DFF_A and DFF_B
  input  logic x,         // data bit
  output logic fm0_code   // FM0-coded line
);

  logic dff_a_q;  // first-half level of the current bit
  logic dff_b_q;  // second-half level of the current bit

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      dff_a_q <= 1'b0;
      dff_b_q <= 1'b0;
    end else begin
      dff_a_q <= ~dff_b_q;          // inverter into DFF_A
      dff_b_q <= x ^ dff_b_q;       // XOR_1 into DFF_B
    end
  end

  // MUX_1: input 1 (DFF_A) while CLK is high, input 0 (DFF_B) while it is low.
  always_comb fm0_code = clk ? dff_a_q : dff_b_q;

endmodule
