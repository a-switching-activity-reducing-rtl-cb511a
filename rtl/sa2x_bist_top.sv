// sa2x_bist_top: test-per-clock scan-based BIST with the low-power SA2x
// response compactor.
//
// Data path: the pattern generator LFSR (M1 stages) shifts one bit per f_CLK
// cycle into scan path SP1 (K1 cells); SP1's cells are the CUT inputs
// (cut_in). The CUT is outside this module: its S outputs come back on cut_out
// (y1..yS), together with the compactor's serial scan-in y0. The SA2x
// compactor (S scan cells + M-stage signature analyzer) runs on clk_half =
// f_CLK/2 and absorbs the two response vectors of each clk_half period in one
// pulse, so the compactor flip-flops see half the clock edges of a
// conventional compactor while the signature is the same.
//
// Timing: everything except the compactor changes on the rising edge of clk.
// clk_half toggles on the falling edge of clk (reset holds it low), so it rises
// in the middle of every second clk cycle, when cut_out holds the second
// vector of a pair and the compactor's delay gates (DELAY = one clk period)
// hold the first. The CUT must settle within half a clk period. The divider
// phase, the reset and the default sizes of the pattern generator and SP1 are
// this design's choices; the chain LFSR -> SP1 -> CUT -> compactor and the
// half-rate compactor clock follow the reference architecture.
//
// Ports: clk (f_CLK), rst_n (asynchronous, active low), en (advances the
// pattern generator and SP1), cut_in[K1:1], cut_out[S:1], y0, and the
// observation outputs clk_half, tpg_state[M1:1], scan_q[S:1] and signature[M:1].
module sa2x_bist_top
  import sa2x_pkg::*;
#(
  parameter int unsigned   M1       = DEF_M1,
  parameter logic [M1-1:0] TPG_TAPS = DEF_TPG_TAPS,
  parameter logic [M1-1:0] TPG_SEED = M1'(1),
  parameter int unsigned   K1       = DEF_K1,
  parameter int unsigned   S        = DEF_S,
  parameter int unsigned   M        = DEF_M,
  parameter logic [M-1:0]  SA_TAPS  = DEF_TAPS,
  parameter realtime       DELAY    = DEF_DELAY   // ns, = clk period
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [K1:1] cut_in,
  input  logic [S:1]  cut_out,
  input  logic        y0,
  output logic        clk_half,
  output logic [M1:1] tpg_state,
  output logic [S:1]  scan_q,
  output logic [M:1]  signature
);
  timeunit 1ns; timeprecision 1ps;

  logic tpg_so;

  tpg_lfsr #(.M1(M1), .TAPS(TPG_TAPS), .SEED(TPG_SEED)) u_tpg (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .so   (tpg_so),
    .state(tpg_state)
  );

  scan_path_sp1 #(.K1(K1)) u_sp1 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .si   (tpg_so),
    .q    (cut_in)
  );

  // 1/2 f_CLK for the compactor, changing on the falling edge of f_CLK.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) clk_half <= 1'b0;
    else        clk_half <= ~clk_half;
  end

  sa2x_compactor #(.S(S), .M(M), .TAPS(SA_TAPS), .DELAY(DELAY)) u_sa2x (
    .clk_half(clk_half),
    .rst_n   (rst_n),
    .y0      (y0),
    .y       (cut_out),
    .scan_q  (scan_q),
    .sig     (signature)
  );
endmodule
