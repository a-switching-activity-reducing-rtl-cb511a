// tb_delay_gate: checks the behavioural delay gate. With DELAY = 10 ns, edges
// on d must reappear on q exactly 10 ns later (q unchanged just before,
// changed just after), and a pulse shorter than the delay must still pass
// (transport delay).
module tb_delay_gate;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic d, q;

  delay_gate #(.DELAY(10.0)) dut (.d(d), .q(q));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s: q=%b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    d = 1'b0;
    #20;
    check("initial", q, 1'b0);
    // Rising edge at t0: q must stay 0 until t0+10, then be 1.
    d = 1'b1;
    #9.5 check("before delay (rise)", q, 1'b0);
    #1.0 check("after delay (rise)", q, 1'b1);
    #20;
    d = 1'b0;
    #7.5 check("before delay (fall)", q, 1'b1);
    #3.0 check("after delay (fall)", q, 1'b0);
    #20;
    // 3 ns pulse: must appear on q from +10 to +13 ns.
    d = 1'b1;
    #3 d = 1'b0;
    #6.5 check("pulse not yet", q, 1'b0);
    #1.0 check("pulse high", q, 1'b1);
    #2.0 check("pulse high end", q, 1'b1);
    #1.0 check("pulse over", q, 1'b0);
    #20;
    // Random sequence: q(t) must equal d(t - 10).
    for (int i = 0; i < 200; i++) begin
      automatic logic hist;
      d = 1'($urandom);
      hist = d;
      fork
        begin #10.5 check("random", q, hist); end
      join_none
      #4;
    end
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
