// Manchester logic of the FM0 / Manchester encoder.
//
// Manchester code sends a 1 as a high level for the first half of the bit and
// a low level for the second half, and a 0 as low then high, so every bit has
// a transition in its middle. With the first half of the bit being the time
// CLK is high (the bit starts at the rising edge), the code is X XNOR CLK: one
// gate and no state.
//
// The block diagram labels this gate XOR_2, while the text names the gate of
// the Manchester path an XNOR. This RTL uses XNOR, which is the gate that
// together with the encoder's clock phase gives the Manchester levels above;
// an XOR would send the inverted code.
//
// Interface and timing: purely combinational, no latency. x must hold for the
// whole CLK period of its bit, so it changes just after a rising CLK edge;
// manchester_code changes at both CLK edges.
`timescale 1ns/1ps
module manchester_logic (
  input  logic clk,              // bit clock: high = first half-bit
  input  logic x,                // data bit
  output logic manchester_code   // Manchester-coded line
);

  always_comb manchester_code = ~(x ^ clk);

endmodule
