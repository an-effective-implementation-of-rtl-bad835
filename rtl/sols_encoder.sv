// Combined FM0 / Manchester encoder for DSRC downlinks.
//
// DSRC standards use FM0 (Europe) or Manchester (America, Japan) on the
// downlink; both give a dc-balanced line with a transition in every bit. This
// block holds both encoders and one output multiplexer, so one circuit serves
// either standard:
//   fm0_logic         DFF_A, DFF_B, XOR_1, inverter, MUX_1 (selected by CLK)
//   manchester_logic  one XNOR of X and CLK
//   MUX_2             Mode = 0 passes the FM0 code, Mode = 1 the Manchester code
// This structure is the encoder's block diagram. The text also describes how
// the encoder is run for Manchester: Mode = 1 together with CLR = 0, which
// keeps DFF_B at 0 so that the FM0 flip-flops stop switching. This RTL
// implements that with the active-low clear clr_n; the clear is asynchronous,
// which is this design's choice.
//
// Interface and timing: one bit per CLK period; the first half-bit is CLK
// high, the second CLK low. x is meant to change just after a rising CLK edge
// and hold for the whole period. Manchester encodes x in the same period (no
// latency); FM0 samples x at the next rising edge and sends it in the period
// that edge starts (one period of latency). code_out is combinational in CLK,
// Mode and the flip-flops and changes at both CLK edges.
`timescale 1ns/1ps
module sols_encoder
  import sols_pkg::*;
(
  input  logic  clk,       // bit clock
  input  logic  clr_n,     // active-low clear of the FM0 flip-flops
  input  mode_e mode,      // MODE_FM0 or MODE_MANCHESTER
  input  logic  x,         // data bit
  output logic  code_out   // encoded line
);

  logic fm0_code;
  logic manchester_code;

  fm0_logic u_fm0 (
    .clk      (clk),
    .clr_n    (clr_n),
    .x        (x),
    .fm0_code (fm0_code)
  );

  manchester_logic u_manchester (
    .clk             (clk),
    .x               (x),
    .manchester_code (manchester_code)
  );

  // MUX_2
  always_comb code_out = (mode == MODE_MANCHESTER) ? manchester_code : fm0_code;

endmodule
