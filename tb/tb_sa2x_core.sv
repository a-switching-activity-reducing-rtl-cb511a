// tb_sa2x_core: self-checking testbench of sa2x_core. Three parameterizations
// (the default s = 4, m = 4, X^4+X^3+1; s = 3 with an 8-stage signature
// X^8+X^6+X^5+X^4+1; s = 1 with X^3+X^2+1) are each checked pulse by pulse
// against two steps of the one-vector-per-clock compactor.
module tb_sa2x_core;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  sa2x_core_chk #(.S(4), .M(4), .TAPS(4'b1100))     u_def (.clk(clk), .checks(c0), .failures(f0), .done(d0));
  sa2x_core_chk #(.S(3), .M(8), .TAPS(8'b10111000)) u_big (.clk(clk), .checks(c1), .failures(f1), .done(d1));
  sa2x_core_chk #(.S(1), .M(3), .TAPS(3'b110))      u_one (.clk(clk), .checks(c2), .failures(f2), .done(d2));

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
