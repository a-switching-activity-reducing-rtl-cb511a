// sa2x_compactor: the complete SA2x test response compactor, i.e. the
// flip-flop/XOR network of sa2x_core plus its S delay gates E1..ES.
//
// The CUT outputs y (and the scan-in y0) change once per f_CLK period; the
// compactor clock clk_half runs at f_CLK/2 and must rise while y holds the
// second vector of a pair, one f_CLK period after the first vector was
// presented (for example on the falling edge of f_CLK). The delay gates then
// present the first vector and two vectors (2*S bits) are compressed per
// pulse. The signature after N pulses equals that of the one-vector-per-clock
// compactor after the same 2N vectors. DELAY is one f_CLK period by default;
// with the compactor clock in mid-cycle it must lie strictly between half and
// one and a half f_CLK periods.
//
// Interface: clk_half, rst_n (asynchronous, active low), y0, y[S:1] in;
// scan_q[S:1] (scan cells) and sig[M:1] (signature) out. The delay gates are a
// behavioural model; everything else is synthesizable.
module sa2x_compactor
  import sa2x_pkg::*;
#(
  parameter int unsigned  S     = DEF_S,
  parameter int unsigned  M     = DEF_M,
  parameter logic [M-1:0] TAPS  = DEF_TAPS,
  parameter realtime      DELAY = DEF_DELAY   // ns, nominally the f_CLK period
) (
  input  logic         clk_half,
  input  logic         rst_n,
  input  logic         y0,
  input  logic [S:1]   y,
  output logic [S:1]   scan_q,
  output logic [M:1]   sig
);
  timeunit 1ns; timeprecision 1ps;

  logic [S:1] dly_in, dly_out;

  sa2x_core #(.S(S), .M(M), .TAPS(TAPS)) u_core (
    .clk    (clk_half),
    .rst_n  (rst_n),
    .y0     (y0),
    .y      (y),
    .dly_in (dly_in),
    .dly_out(dly_out),
    .scan_q (scan_q),
    .sig    (sig)
  );

  for (genvar i = 1; i <= S; i++) begin : g_e
    delay_gate #(.DELAY(DELAY)) u_e (.d(dly_in[i]), .q(dly_out[i]));
  end
endmodule
