// sa2x_pkg: constants shared by the SA2x BIST blocks.
//
// The defaults are the worked example used throughout the design: a circuit
// under test with four outputs (y1..y4) compacted by a four-cell scan path
// feeding a four-stage signature analyzer with characteristic polynomial
// X^4 + X^3 + 1. The same polynomial is used by default for the pattern
// generator, which is this design's own choice (no polynomial is given for it).
//
// Tap masks: bit k-1 of a TAPS mask set means stage k of a Fibonacci LFSR
// (stages numbered 1..M from the input end) is fed back, i.e. the
// polynomial has the term X^k. X^M is always present, so bit M-1 must be set.
package sa2x_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Number of CUT outputs compacted (s), and signature length (m).
  localparam int unsigned DEF_S = 4;
  localparam int unsigned DEF_M = 4;
  // X^4 + X^3 + 1 : stages 3 and 4 fed back.
  localparam logic [DEF_M-1:0] DEF_TAPS = 4'b1100;

  // Test pattern generator and scan path SP1 (m1, k1): own choice.
  localparam int unsigned DEF_M1 = 4;
  localparam logic [DEF_M1-1:0] DEF_TPG_TAPS = 4'b1100;
  localparam int unsigned DEF_K1 = 4;

  // Delay of the delay gates E1..Es: one period of f_CLK, in ns (own choice
  // of a 100 MHz f_CLK).
  localparam realtime DEF_DELAY = 10.0;
endpackage
