// Shared definitions for the FM0 / Manchester line encoder.
//
// The encoder has one control input, Mode, that selects which code reaches
// the output multiplexer MUX_2. Mode = 0 selects the FM0 code and Mode = 1
// the Manchester code; that assignment is the one the encoder's block diagram
// prints on MUX_2 and the one the text gives for Manchester operation.
`timescale 1ns/1ps
package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } mode_e;

endpackage
