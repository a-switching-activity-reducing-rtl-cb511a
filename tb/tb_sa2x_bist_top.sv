// tb_sa2x_bist_top: end-to-end test of the BIST with the SA2x compactor at
// the default sizes (4-stage pattern generator, 4-cell SP1, 4 CUT outputs,
// 4-stage signature, X^4+X^3+1, f_CLK period 10 ns). A behavioural CUT closes
// the loop. Checked every cycle: the pattern generator state and SP1 contents
// against an independent model; after every compactor pulse: the signature and
// scan cells against a conventional compactor that is clocked once per f_CLK
// cycle on the same responses. The run covers 64 compactor pulses (two
// complete 16-pulse sessions of 128 response bits each, the second after a
// reset) and counts how often each mechanism happened: compactor pulse, two
// vectors absorbed per pulse, a delayed vector that differs from the current
// one, signature feedback, pattern generator wrap-around, scan-in activity, and
// a hold of the pattern generator and SP1 (en = 0) during which the compactor
// keeps absorbing the unchanged responses.
module tb_sa2x_bist_top;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned K1 = 4, S = 4, M = 4, M1 = 4;
  localparam logic [M-1:0]  TAPS     = 4'b1100;
  localparam logic [M1-1:0] TPG_TAPS = 4'b1100;
  localparam int unsigned SESSION = 16;   // pulses per test session

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, y0 = 1'b0;
  logic clk_half;
  logic [K1:1] cut_in;
  logic [S:1]  cut_out, scan_q;
  logic [M:1]  signature;
  logic [M1:1] tpg_state;

  sa2x_bist_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cut_in(cut_in), .cut_out(cut_out),
    .y0(y0), .clk_half(clk_half), .tpg_state(tpg_state), .scan_q(scan_q),
    .signature(signature)
  );

  cut_model #(.K1(K1), .S(S)) u_cut (.x(cut_in), .y(cut_out));

  always #5 clk = ~clk;

  // Scan-in: random, changing with the rising edge like the CUT outputs.
  always @(posedge clk) y0 <= 1'($urandom);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // Reference compactor.
  logic [S:1] rc;
  logic [M:1] rr;
  int n_feedback = 0;
  task automatic base_step(input logic yin0, input logic [S:1] v);
    logic [S:1] nc;
    logic [M:1] nr;
    logic f = 1'b0;
    for (int k = 1; k <= M; k++) if (TAPS[k-1]) f ^= rr[k];
    if (f) n_feedback++;
    nr[1] = rc[S] ^ f;
    for (int k = 2; k <= M; k++) nr[k] = rr[k-1];
    nc[1] = yin0 ^ v[1];
    for (int i = 2; i <= S; i++) nc[i] = rc[i-1] ^ v[i];
    rc = nc; rr = nr;
  endtask

  // Reference pattern generator and SP1.
  logic [M1:1] rt;
  logic [K1:1] rs;
  task automatic tpg_step();
    logic f = 1'b0;
    for (int k = 1; k <= M1; k++) if (TPG_TAPS[k-1]) f ^= rt[k];
    rs = {rs[K1-1:1], rt[M1]};
    rt = {rt[M1-1:1], f};
  endtask

  int n_holds = 0, n_pulses = 0, n_vectors = 0, n_delayed_differs = 0, n_tpg_wraps = 0, n_y0_ones = 0;

  initial begin
    logic [S:1] prev_y;
    logic prev_y0, last_half;
    int session_pulses, session_vectors;
    for (int session = 0; session < 4; session++) begin
      // Assert reset with an edge so the asynchronous reset acts at once.
      rst_n = 1'b1; en = 1'b0;
      #1 rst_n = 1'b0;
      rc = '0; rr = '0; rt = M1'(1); rs = '0;
      repeat (3) @(negedge clk);
      #0.1;
      check("reset signature", 32'(signature), 32'd0);
      check("reset clk_half", 32'(clk_half), 32'd0);
      prev_y = cut_out; prev_y0 = y0; last_half = clk_half;
      session_pulses = 0;
      session_vectors = 1;  // the vector sampled above is the first one of pulse 1
      // Leave reset just after the falling edge sampled above.
      #0.1;
      rst_n = 1'b1; en = 1'b1;
      while (session_pulses < SESSION) begin
        // Session 2 holds the pattern generator for a few cycles (en = 0).
        en = !(session == 2 && session_pulses >= 4 && session_pulses < 6);
        if (!en) n_holds++;
        @(posedge clk); #0.1;
        if (en) tpg_step();
        check("pattern generator", 32'(tpg_state), 32'(rt));
        check("SP1 / CUT inputs", 32'(cut_in), 32'(rs));
        if (rt == M1'(1)) n_tpg_wraps++;
        @(negedge clk); #0.1;
        session_vectors++;
        if (y0) n_y0_ones++;
        if (clk_half && !last_half) begin
          if (prev_y != cut_out) n_delayed_differs++;
          base_step(prev_y0, prev_y);
          base_step(y0, cut_out);
          session_pulses++;
          n_pulses++;
          n_vectors += 2;
          check("signature", 32'(signature), 32'(rr));
          check("scan cells", 32'(scan_q), 32'(rc));
        end
        last_half = clk_half;
        prev_y = cut_out; prev_y0 = y0;
      end
      // A session of 16 pulses absorbs 32 vectors = 128 response bits.
      check("response bits per session", 32'(session_vectors * S), 32'(SESSION * 2 * S));
      $display("session %0d: signature %h after %0d pulses, %0d response bits",
               session, signature, session_pulses, session_vectors * S);
    end
    // Every mechanism must have happened.
    $display("holds=%0d pulses=%0d vectors=%0d delayed_differs=%0d feedback=%0d tpg_wraps=%0d y0_ones=%0d",
             n_holds, n_pulses, n_vectors, n_delayed_differs, n_feedback, n_tpg_wraps, n_y0_ones);
    check("compactor pulses happened", 32'(n_pulses > 0), 32'd1);
    check("two vectors per pulse", 32'(n_vectors), 32'(2 * n_pulses));
    check("delayed path carried a different vector", 32'(n_delayed_differs > 0), 32'd1);
    check("signature feedback happened", 32'(n_feedback > 0), 32'd1);
    check("pattern generator wrapped", 32'(n_tpg_wraps > 0), 32'd1);
    check("scan-in used", 32'(n_y0_ones > 0), 32'd1);
    check("pattern generator held", 32'(n_holds > 0), 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
