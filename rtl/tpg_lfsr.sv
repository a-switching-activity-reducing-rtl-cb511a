// tpg_lfsr: test pattern generator of the scan-based BIST, an M1-stage
// Fibonacci LFSR that delivers one pseudo-random bit per f_CLK cycle to the
// serial input of scan path SP1.
//
// Stages are numbered 1..M1; every clock, stage 1 takes the XOR of the tapped
// stages (bit k-1 of TAPS set = stage k tapped) and every other stage takes
// its predecessor. The output is the last stage, M1. The default polynomial
// X^4 + X^3 + 1 (maximal length, period 15) and the seed are this design's
// choices; the structure (LFSR with XOR feedback feeding SP1 from its last
// stage) follows the reference architecture. Reset is asynchronous, active low
// and loads SEED, which must be non-zero. en = 0 holds the state.
module tpg_lfsr
  import sa2x_pkg::*;
#(
  parameter int unsigned   M1   = DEF_M1,
  parameter logic [M1-1:0] TAPS = DEF_TPG_TAPS,
  parameter logic [M1-1:0] SEED = M1'(1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        so,      // serial output, stage M1
  output logic [M1:1] state
);
  timeunit 1ns; timeprecision 1ps;

  logic [M1:1] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= SEED;
    else if (en) s <= {s[M1-1:1], ^(s & TAPS)};
  end

  assign so    = s[M1];
  assign state = s;

  initial begin
    assert (M1 >= 2) else $error("tpg_lfsr: M1 must be at least 2");
    assert (SEED != '0) else $error("tpg_lfsr: SEED must be non-zero");
  end
endmodule
