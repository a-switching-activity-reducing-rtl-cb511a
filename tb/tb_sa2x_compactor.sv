// tb_sa2x_compactor: end-to-end check of the SA2x compactor with its delay
// gates, in real time. f_CLK has a 10 ns period; a new random response vector
// (y1..y4 and scan-in y0) is presented at every rising f_CLK edge, and the
// compactor clock rises on every second falling edge. The signature and scan
// cells are compared, after every compactor pulse, with a one-vector-per-clock
// compactor stepped once per f_CLK cycle. Also checked: 2*S response bits are
// absorbed per compactor pulse (16 pulses take 32 vectors, 128 bits).
module tb_sa2x_compactor;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned S = 4, M = 4;
  localparam logic [M-1:0] TAPS = 4'b1100;
  localparam int unsigned PULSES = 64;

  int checks = 0, failures = 0;
  logic clk = 1'b0, clk_half = 1'b0, rst_n = 1'b0, run = 1'b0;
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
    y  <= S'($urandom);
  end

  // Reference: conventional compactor, one vector per f_CLK cycle.
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

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    logic [S:1] prev_y;
    logic prev_y0, last_half;
    int pulses = 0, vectors = 0;
    // Assert reset with an edge so the asynchronous reset acts at once.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #2 rst_n = 1'b1;
    check("reset signature", 32'(sig), 32'(0));
    @(negedge clk); #0.1;
    prev_y = y; prev_y0 = y0; last_half = clk_half;
    vectors++;
    run = 1'b1;
    while (pulses < PULSES) begin
      @(negedge clk); #0.1;
      vectors++;
      if (clk_half && !last_half) begin
        // One compactor pulse: the previous and the current vector.
        base_step(prev_y0, prev_y);
        base_step(y0, y);
        pulses++;
        check("signature", 32'(sig), 32'(rr));
        check("scan cells", 32'(scan_q), 32'(rc));
        if (pulses == 16) check("vectors per 16 pulses", 32'(vectors), 32'(32));
      end
      last_half = clk_half;
      prev_y = y; prev_y0 = y0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
