// tb_sa2x_switching: measures the switching activity of the default SA2x
// compactor (s = 4, m = 4, X^4+X^3+1) and of a conventional one-vector-per-
// clock compactor on random responses, counting for every gate input
// (flip-flop clock and D inputs, XOR inputs, delay-gate inputs) the
// transitions of the net that drives it, a clock input counting 2 per pulse.
// Responses are random with probability 0.5; the scan-in y0 changes at most
// once per compactor pulse. Expected weighted switching activity (WSA,
// transitions per compressed response bit), counting each net that changes
// with probability 0.5 per event:
//   conventional: clocks 8*16*2 = 256, D inputs 8*8 = 64, XOR inputs 12*8 = 96
//                 -> 416 per 16 clocks / 64 bits = 6.5
//   SA2x, if flip-flop outputs and CUT data changed at the same instant:
//                 clocks 256, D inputs 8*8 + 5*8 = 104, slow XOR inputs
//                 11*8 = 88, fast XOR inputs 11*16 = 176, delay inputs 4*16 = 64
//                 -> 688 per 16 pulses / 128 bits = 5.375
//   SA2x as built: the compactor clock rises mid-cycle, so the four nets that
//                 mix flip-flop outputs with CUT data (SM4, SM6, SM7, SM8) see
//                 both events: 4*8 more -> 720 / 128 = 5.625
// The measured values must be within 2 % of 6.5 and 5.625, the clock share
// exact, and the SA2x signature must equal the conventional compactor's
// throughout. The SA2x nets SM1..SM11 are recomputed from the compactor's
// flip-flops, inputs and delay-gate outputs, and each flip-flop must load the
// net that drives it.
module tb_sa2x_switching;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned S = 4, M = 4;
  localparam int unsigned PULSES = 16 * 400;   // 400 sessions of 16 pulses

  int checks = 0, failures = 0;
  logic clk = 1'b0, clk_half = 1'b0, rst_n = 1'b1, run = 1'b0;
  logic y0 = 1'b0;
  logic [S:1] y = '0, scan_q;
  logic [M:1] sig;

  sa2x_compactor #(.S(S), .M(M), .TAPS(4'b1100), .DELAY(10.0)) dut (
    .clk_half(clk_half), .rst_n(rst_n), .y0(y0), .y(y), .scan_q(scan_q), .sig(sig)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (run) clk_half <= ~clk_half;
  // New response vector every f_CLK; scan-in only at the start of a pair.
  always @(posedge clk) begin
    y <= S'($urandom);
    if (!clk_half) y0 <= 1'($urandom);
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // ---- SA2x nets, weighted by the number of gate inputs they drive ----
  typedef struct packed {
    logic y0, y1, y2, y3, y4, e1, e2, e3, e4;
    logic sm1, sm2, sm3, sm4, sm5, sm6, sm7, sm8, sm9, sm10, sm11;
    logic t1, t2, t3, t4, t5, t6, t7, t8;
  } sa2x_nets_t;

  function automatic sa2x_nets_t sa2x_nets();
    sa2x_nets_t n;
    n.y0 = y0; {n.y4, n.y3, n.y2, n.y1} = y;
    {n.e4, n.e3, n.e2, n.e1} = dut.dly_out;
    {n.t4, n.t3, n.t2, n.t1} = scan_q;
    {n.t8, n.t7, n.t6, n.t5} = sig;
    n.sm1  = n.y0 ^ n.y1;
    n.sm2  = n.e1 ^ n.y2;
    n.sm3  = n.e2 ^ n.y3;
    n.sm4  = n.t1 ^ n.sm3;
    n.sm5  = n.e3 ^ n.y4;
    n.sm6  = n.t2 ^ n.sm5;
    n.sm11 = n.t6 ^ n.t7;
    n.sm7  = n.e4 ^ n.sm11;
    n.sm8  = n.t3 ^ n.sm7;
    n.sm10 = n.t7 ^ n.t8;
    n.sm9  = n.t4 ^ n.sm10;
    return n;
  endfunction

  // Fan-out (gate inputs driven) of each net.
  function automatic int sa2x_weighted(input sa2x_nets_t a, input sa2x_nets_t b);
    sa2x_nets_t d = a ^ b;
    return d.y0 + d.y1 + 2*d.y2 + 2*d.y3 + 2*d.y4            // SM1..SM5, E2..E4
         + d.e1 + d.e2 + d.e3 + d.e4
         + 2*d.sm1 + d.sm2 + d.sm3 + d.sm4 + d.sm5 + d.sm6    // SM1 -> T1, E1
         + d.sm7 + d.sm8 + d.sm9 + d.sm10 + d.sm11
         + d.t1 + d.t2 + d.t3 + d.t4 + d.t5 + 2*d.t6 + 2*d.t7 + d.t8;
  endfunction

  // ---- conventional compactor model with its nets ----
  logic [S:1] bc = '0;    // T1..T4
  logic [M:1] br = '0;    // T5..T8
  int base_sw = 0;
  task automatic base_clock(input logic yin0, input logic [S:1] v, input logic prev_y0,
                            input logic [S:1] prev_v);
    logic [S:1] nc;
    logic [M:1] nr;
    logic [5:0] sm_old, sm_new;
    // Nets before the clock (old inputs) and after (new inputs, new state):
    // SM1..SM4 = cell input XORs, SM6 = T7^T8, SM5 = T4^SM6.
    sm_old = {br[3] ^ br[4], bc[4] ^ br[3] ^ br[4], bc[3] ^ prev_v[4],
              bc[2] ^ prev_v[3], bc[1] ^ prev_v[2], prev_y0 ^ prev_v[1]};
    nc[1] = yin0 ^ v[1];
    for (int i = 2; i <= S; i++) nc[i] = bc[i-1] ^ v[i];
    nr[1] = bc[S] ^ br[3] ^ br[4];
    for (int k = 2; k <= M; k++) nr[k] = br[k-1];
    sm_new = {nr[3] ^ nr[4], nc[4] ^ nr[3] ^ nr[4], nc[3] ^ v[4],
              nc[2] ^ v[3], nc[1] ^ v[2], yin0 ^ v[1]};
    base_sw += 16;                                              // 8 clock inputs
    base_sw += $countones({yin0 ^ prev_y0, v ^ prev_v});        // y0..y4, 1 each
    base_sw += $countones(sm_old ^ sm_new);                     // SM1..SM6, 1 each
    base_sw += $countones(nc ^ bc) + $countones(nr[2:1] ^ br[2:1])
             + 2 * (nr[3] ^ br[3]) + (nr[4] ^ br[4]);           // T7 drives T8, SM6
    bc = nc; br = nr;
  endtask

  // Equivalence reference on the SA2x input stream.
  logic [S:1] rc = '0;
  logic [M:1] rr = '0;
  task automatic ref_step(input logic yin0, input logic [S:1] v);
    logic [S:1] nc;
    nc[1] = yin0 ^ v[1];
    for (int i = 2; i <= S; i++) nc[i] = rc[i-1] ^ v[i];
    rr = {rr[M-1:1], rc[S] ^ rr[3] ^ rr[4]};
    rc = nc;
  endtask

  initial begin
    sa2x_nets_t last, now;
    logic [S:1] prev_y, base_prev_v;
    logic prev_y0, last_half, base_prev_y0, by0;
    int pulses = 0, vectors = 0, sa2x_sw = 0, sa2x_clk = 0;
    real wsa_sa2x, wsa_base;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    @(negedge clk); #0.1;
    prev_y = y; prev_y0 = y0; last_half = clk_half;
    base_prev_v = y; base_prev_y0 = 1'b0;
    vectors = 1;
    last = sa2x_nets();
    run = 1'b1;
    while (pulses < PULSES) begin
      // Inputs and delay-gate outputs change at the rising edge.
      @(posedge clk); #0.1;
      now = sa2x_nets();
      sa2x_sw += sa2x_weighted(last, now);
      last = now;
      // The compactor flip-flops change at the falling edge.
      @(negedge clk); #0.1;
      vectors++;
      // Conventional compactor: one clock per vector, own random scan-in.
      by0 = 1'($urandom);
      base_clock(by0, y, base_prev_y0, base_prev_v);
      base_prev_v = y; base_prev_y0 = by0;
      if (clk_half && !last_half) begin
        // Each flip-flop loaded the net that drives it.
        if (pulses < 64) begin
          check("T1..T4 loaded SM1, SM2, SM4, SM6", 32'(scan_q),
                32'({last.sm6, last.sm4, last.sm2, last.sm1}));
          check("T5..T8 loaded SM8, SM9, T5, T6", 32'(sig),
                32'({last.t6, last.t5, last.sm9, last.sm8}));
        end
        ref_step(prev_y0, prev_y);
        ref_step(y0, y);
        check("signature", 32'(sig), 32'(rr));
        pulses++;
        sa2x_clk += 16;
      end
      now = sa2x_nets();
      sa2x_sw += sa2x_weighted(last, now);
      last = now;
      last_half = clk_half;
      prev_y = y; prev_y0 = y0;
    end
    sa2x_sw += sa2x_clk;
    wsa_sa2x = real'(sa2x_sw) / real'(2 * S * pulses);
    wsa_base = real'(base_sw) / real'(S * (vectors - 1));
    $display("SA2x: %0d pulses, %0d bits, %0d weighted transitions (%0d on clock inputs), WSA = %0.4f",
             pulses, 2 * S * pulses, sa2x_sw, sa2x_clk, wsa_sa2x);
    $display("conventional: %0d clocks, %0d bits, %0d weighted transitions, WSA = %0.4f",
             vectors - 1, S * (vectors - 1), base_sw, wsa_base);
    $display("reduction factor %0.3f", wsa_base / wsa_sa2x);
    check("vectors = 2 per pulse", 32'(vectors), 32'(2 * pulses));
    check("clock share per 16 pulses", 32'(sa2x_clk * 16 / pulses), 32'd256);
    check("SA2x WSA within 2% of 5.625", 32'(wsa_sa2x > 5.625 * 0.98 && wsa_sa2x < 5.625 * 1.02), 32'd1);
    check("conventional WSA within 2% of 6.5", 32'(wsa_base > 6.5 * 0.98 && wsa_base < 6.5 * 1.02), 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
