// tb_tpg_lfsr: checks the pattern generator LFSR. The serial output is
// compared bit by bit with the recurrence of X^4 + X^3 + 1 computed from the
// seed (a[n] = a[n-3] XOR a[n-4] on the stream entering stage 1), the period
// must be 15 with every non-zero state visited once, en = 0 must hold the
// state and reset must reload the seed. A second instance with X^7 + X^6 + 1
// must have period 127.
module tb_tpg_lfsr;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic so4, so7;
  logic [4:1] st4;
  logic [7:1] st7;

  tpg_lfsr #(.M1(4), .TAPS(4'b1100), .SEED(4'b0001)) dut4 (
    .clk(clk), .rst_n(rst_n), .en(en), .so(so4), .state(st4));
  tpg_lfsr #(.M1(7), .TAPS(7'b1100000), .SEED(7'b1010011)) dut7 (
    .clk(clk), .rst_n(rst_n), .en(en), .so(so7), .state(st7));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    // Bit stream entering stage 1: a[0..3] are the seed stages 1..4
    // (stage k holds a[-k] relative to the next bit), so with seed stage1=1:
    // stage k at time n holds a[n-k].
    logic a [0:63];
    logic [4:1] seen;
    bit visited [16];
    int period;
    @(negedge clk);
    check("seed 4", 32'(st4), 32'h1);
    check("seed 7", 32'(st7), 32'h53);
    rst_n = 1'b1;
    // History: a[3] = stage1, a[2] = stage2, a[1] = stage3, a[0] = stage4.
    a[3] = 1'b1; a[2] = 1'b0; a[1] = 1'b0; a[0] = 1'b0;
    for (int n = 4; n < 64; n++) a[n] = a[n-3] ^ a[n-4];
    en = 1'b1;
    for (int n = 0; n < 40; n++) begin
      // At step n the output (stage 4) holds a[n].
      check("serial output", 32'(so4), 32'(a[n]));
      @(negedge clk);
    end
    // Period and state coverage of the 4-stage generator.
    foreach (visited[i]) visited[i] = 1'b0;
    seen = st4;
    period = 0;
    do begin
      visited[st4] = 1'b1;
      @(negedge clk);
      period++;
    end while (st4 != seen && period < 100);
    check("period 4", 32'(period), 32'd15);
    for (int i = 1; i < 16; i++) check("state visited", 32'(visited[i]), 32'd1);
    check("zero state not visited", 32'(visited[0]), 32'd0);
    // Hold.
    en = 1'b0;
    seen = st4;
    repeat (3) @(negedge clk);
    check("hold", 32'(st4), 32'(seen));
    // Reset reloads the seed.
    rst_n = 1'b0;
    #1 check("reset", 32'(st4), 32'h1);
    rst_n = 1'b1;
    // Period of the 7-stage generator.
    en = 1'b1;
    @(negedge clk);
    begin
      logic [7:1] s0;
      s0 = st7;
      period = 0;
      do begin
        @(negedge clk);
        period++;
      end while (st7 != s0 && period < 300);
      check("period 7", 32'(period), 32'd127);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
