// sa2x_core_chk: checking harness for one parameterization of sa2x_core.
//
// It drives random vector pairs into the core (the second vector on y/y0, the
// first on the delay-gate inputs as the delay gates would present it) and
// compares scan cells and signature after every pulse with a reference that
// clocks the conventional one-vector-per-clock compactor twice: scan cell i
// takes cell i-1 XOR yi (cell 1: y0 XOR y1), signature stage 1 takes the last
// scan cell XOR the tapped stages, other stages shift. It also checks the
// values sent into the delay gates and an asynchronous reset in mid-run.
module sa2x_core_chk #(
  parameter int unsigned  S     = 4,
  parameter int unsigned  M     = 4,
  parameter logic [M-1:0] TAPS  = 4'b1100,
  parameter int unsigned  PULSES = 200
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  timeunit 1ns; timeprecision 1ps;

  logic         rst_n;
  logic         y0;
  logic [S:1]   y, dly_in, dly_out, scan_q;
  logic [M:1]   sig;

  sa2x_core #(.S(S), .M(M), .TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .y0(y0), .y(y), .dly_in(dly_in),
    .dly_out(dly_out), .scan_q(scan_q), .sig(sig)
  );

  // Reference state of the one-vector compactor.
  logic [S:1] rc;
  logic [M:1] rr;

  task automatic base_step(input logic yin0, input logic [S:1] v);
    logic [S:1] nc;
    logic [M:1] nr;
    logic f;
    f = 1'b0;
    for (int k = 1; k <= M; k++) if (TAPS[k-1]) f ^= rr[k];
    nr[1] = rc[S] ^ f;
    for (int k = 2; k <= M; k++) nr[k] = rr[k-1];
    nc[1] = yin0 ^ v[1];
    for (int i = 2; i <= S; i++) nc[i] = rc[i-1] ^ v[i];
    rc = nc;
    rr = nr;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL S=%0d M=%0d %s: got %h expected %h", S, M, what, got, exp);
    end
  endtask

  initial begin
    logic [S:1] a, b;
    logic y0a, y0b;
    logic [S:1] exp_dly;
    checks = 0; failures = 0; done = 1'b0;
    rst_n = 1'b0; y0 = 1'b0; y = '0; dly_out = '0;
    rc = '0; rr = '0;
    repeat (2) @(negedge clk);
    check("reset scan", 64'(scan_q), 64'(0));
    check("reset sig", 64'(sig), 64'(0));
    rst_n = 1'b1;
    for (int p = 0; p < PULSES; p++) begin
      @(negedge clk);
      if (p == PULSES / 2) begin
        // Asynchronous reset in the middle of a clock period.
        rst_n = 1'b0;
        #1;
        check("async reset scan", 64'(scan_q), 64'(0));
        check("async reset sig", 64'(sig), 64'(0));
        rc = '0; rr = '0;
        rst_n = 1'b1;
      end
      // The first pulses use one-hot patterns, the rest are random.
      if (p < 2 * S) begin
        a = (p < S) ? (S'(1) << p) : '0;
        b = (p >= S) ? (S'(1) << (p - S)) : '0;
        y0a = 1'b0; y0b = 1'b0;
      end else begin
        a = S'($urandom); b = S'($urandom);
        y0a = 1'($urandom); y0b = 1'($urandom);
      end
      y0 = y0b;
      y  = b;
      dly_out    = a;
      dly_out[1] = y0a ^ a[1];
      #1;
      exp_dly = b;
      exp_dly[1] = y0b ^ b[1];
      check("delay gate inputs", 64'(dly_in), 64'(exp_dly));
      base_step(y0a, a);
      base_step(y0b, b);
      @(posedge clk);
      #1;
      check("scan cells", 64'(scan_q), 64'(rc));
      check("signature", 64'(sig), 64'(rr));
    end
    done = 1'b1;
  end
endmodule
