// sa2x_compactor_chk: timed checking harness for one size of the SA2x
// compactor (with its delay gates). It makes its own f_CLK (10 ns), presents a
// random response vector of S bits plus scan-in at every rising edge, raises
// the half-rate compactor clock on every second falling edge, and compares
// signature and scan cells after each compactor pulse with a conventional
// compactor clocked once per vector. It reports the number of compactor
// pulses and of response bits absorbed, from which the clock-input switching
// per compressed bit follows.
module sa2x_compactor_chk #(
  parameter int unsigned  S      = 4,
  parameter int unsigned  M      = 4,
  parameter logic [M-1:0] TAPS   = 4'b1100,
  parameter int unsigned  PULSES = 32
) (
  output int   checks,
  output int   failures,
  output int   pulses,
  output int   bits,
  output logic done
);
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, clk_half = 1'b0, rst_n = 1'b1, run = 1'b0;
  logic y0 = 1'b0;
  logic [S:1] y = '0, scan_q;
  logic [M:1] sig;

  sa2x_compactor #(.S(S), .M(M), .TAPS(TAPS), .DELAY(10.0)) dut (
    .clk_half(clk_half), .rst_n(rst_n), .y0(y0), .y(y), .scan_q(scan_q), .sig(sig)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (run) clk_half <= ~clk_half;
  always @(posedge clk) begin
    y0 <= 1'($urandom);
    for (int i = 1; i <= S; i++) y[i] <= 1'($urandom);
  end

  logic [S:1] rc = '0;
  logic [M:1] rr = '0;
  task automatic base_step(input logic yin0, input logic [S:1] v);
    logic [S:1] nc;
    logic [M:1] nr;
    logic f = 1'b0;
    for (int k = 1; k <= M; k++) if (TAPS[k-1]) f ^= rr[k];
    nr[1] = rc[S] ^ f;
    for (int k = 2; k <= M; k++) nr[k] = rr[k-1];
    nc[1] = yin0 ^ v[1];
    for (int i = 2; i <= S; i++) nc[i] = rc[i-1] ^ v[i];
    rc = nc; rr = nr;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL s=%0d m=%0d at %0t %s: got %h expected %h", S, M, $time, what, got, exp);
    end
  endtask

  initial begin
    logic [S:1] prev_y;
    logic prev_y0, last_half;
    int vectors;
    checks = 0; failures = 0; pulses = 0; bits = 0; done = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    check("reset", 64'(sig), 64'(0));
    @(negedge clk); #0.1;
    prev_y = y; prev_y0 = y0; last_half = clk_half;
    vectors = 1;
    run = 1'b1;
    while (pulses < PULSES) begin
      @(negedge clk); #0.1;
      vectors++;
      if (clk_half && !last_half) begin
        base_step(prev_y0, prev_y);
        base_step(y0, y);
        pulses++;
        check("signature", 64'(sig), 64'(rr));
        check("scan cells", 64'(scan_q), 64'(rc));
      end
      last_half = clk_half;
      prev_y = y; prev_y0 = y0;
    end
    bits = vectors * S;
    done = 1'b1;
  end
endmodule
