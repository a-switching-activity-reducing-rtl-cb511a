// sa2x_core: flip-flops and XOR network of the SA2x test response compactor.
//
// A conventional compactor is an s-cell scan path with an XOR in front of
// every cell (cell i takes cell i-1 XOR CUT output yi, cell 1 takes the scan-in
// y0 XOR y1) whose last cell feeds a single-input m-stage signature analyzer
// (Fibonacci LFSR, stage 1 = last scan cell XOR feedback). It is clocked once
// per response vector. SA2x is the same compactor unrolled over two steps: it is
// clocked at half the rate and folds two response vectors per pulse, which
// halves the clock-input switching that dominates the compactor's power.
//
// At the clock edge the module sees the second vector of the pair on y/y0 and
// the first one on dly_out, the outputs of the external delay gates E1..Es
// (delay = one f_CLK period). dly_in is what feeds those gates: E1 delays the
// output of SM1 (y0 XOR y1), Ei delays yi for i = 2..s, so dly_in[2..s] are
// the inputs y[2..s] passed straight through on purpose.
//
// Next state (c = scan cells, r = signature stages, ' = first vector, no mark
// = second vector, fb(x) = XOR of the tapped stages of x):
//   c1 <= y0 ^ y1                          (SM1)
//   c2 <= E1 ^ y2                          (SM2)
//   ci <= c(i-2) ^ E(i-1) ^ yi,  i >= 3    (SM3/SM4, SM5/SM6 in the s=4 case)
//   r1 <= c(s-1) ^ Es ^ fb(r after one step)   (SM7, SM8, SM11)
//   r2 <= cs ^ fb(r)                       (SM9, SM10)
//   rk <= r(k-2),  k >= 3
// With the defaults (s = 4, m = 4, X^4+X^3+1) this is exactly eleven two-input
// XORs: the scan cells are T1..T4 and the signature stages T5..T8 of the
// reference structure. After N pulses the state equals that of the one-vector
// compactor after the same 2N vectors.
//
// Reset (asynchronous, active low, state to zero) is this design's choice.
// The scan-in y0 is a plain input (tie it to 0 when the chain has no
// predecessor).
module sa2x_core
  import sa2x_pkg::*;
#(
  parameter int unsigned       S    = DEF_S,     // CUT outputs / scan cells
  parameter int unsigned       M    = DEF_M,     // signature stages (>= 2)
  parameter logic [M-1:0]      TAPS = DEF_TAPS   // bit k-1: stage k fed back
) (
  input  logic         clk,       // compactor clock, 1/2 f_CLK
  input  logic         rst_n,
  input  logic         y0,        // scan-in, second vector of the pair
  input  logic [S:1]   y,         // CUT outputs y1..yS, second vector
  output logic [S:1]   dly_in,    // into delay gates E1..ES
  input  logic [S:1]   dly_out,   // from delay gates E1..ES, first vector
  output logic [S:1]   scan_q,    // scan path cells
  output logic [M:1]   sig        // signature stages 1..M
);
  timeunit 1ns; timeprecision 1ps;

  logic [S:1] c, c_nxt;
  logic [M:1] r, r_nxt;
  logic [M:1] r_mid;   // signature state after the first vector of the pair
  logic       c_mid_s; // last scan cell after the first vector of the pair

  // Feedback of a Fibonacci signature register: XOR of the tapped stages.
  function automatic logic fb(input logic [M:1] x);
    return ^(x & TAPS);
  endfunction

  // Delay gate inputs: SM1 output for E1, raw CUT outputs for E2..ES.
  always_comb begin
    dly_in    = y;
    dly_in[1] = y0 ^ y[1];
  end

  always_comb begin
    // Scan path.
    c_nxt[1] = y0 ^ y[1];
    for (int unsigned i = 2; i <= S; i++) begin
      if (i == 2) c_nxt[i] = dly_out[1] ^ y[2];
      else        c_nxt[i] = c[i-2] ^ dly_out[i-1] ^ y[i];
    end
    // Value the last scan cell would hold between the two vectors.
    c_mid_s = (S >= 2) ? (c[(S >= 2) ? S-1 : 1] ^ dly_out[S]) : dly_out[S];
    // Signature register.
    r_mid    = {r[M-1:1], c[S] ^ fb(r)};
    r_nxt[1] = c_mid_s ^ fb(r_mid);
    r_nxt[2] = r_mid[1];
    for (int unsigned k = 3; k <= M; k++) r_nxt[k] = r[k-2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
      r <= '0;
    end else begin
      c <= c_nxt;
      r <= r_nxt;
    end
  end

  assign scan_q = c;
  assign sig    = r;

  initial begin
    assert (M >= 2) else $error("sa2x_core: M must be at least 2");
    assert (TAPS[M-1]) else $error("sa2x_core: TAPS must include stage M");
  end
endmodule
