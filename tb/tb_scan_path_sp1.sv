// tb_scan_path_sp1: checks scan path SP1. Random bits are shifted in; after
// every clock cell i must hold the bit shifted in i clocks earlier (cell 1 the
// newest). en = 0 must hold the contents and reset must clear them. Checked at
// the default 4 cells and at 9 cells.
module tb_scan_path_sp1;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, si = 1'b0;
  logic [4:1] q4;
  logic [9:1] q9;

  scan_path_sp1 #(.K1(4)) dut4 (.clk(clk), .rst_n(rst_n), .en(en), .si(si), .q(q4));
  scan_path_sp1 #(.K1(9)) dut9 (.clk(clk), .rst_n(rst_n), .en(en), .si(si), .q(q9));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    logic hist [$];
    logic [9:1] exp9;
    @(negedge clk);
    check("reset 4", 32'(q4), 32'd0);
    check("reset 9", 32'(q9), 32'd0);
    rst_n = 1'b1;
    for (int i = 0; i < 9; i++) hist.push_front(1'b0);
    for (int n = 0; n < 100; n++) begin
      en = (n % 7 != 6);
      si = 1'($urandom);
      @(negedge clk);
      if (en) begin
        hist.push_front(si);
        void'(hist.pop_back());
      end
      for (int i = 1; i <= 9; i++) exp9[i] = hist[i-1];
      check("9 cells", 32'(q9), 32'(exp9));
      check("4 cells", 32'(q4), 32'(exp9[4:1]));
    end
    rst_n = 1'b0;
    #1 check("async reset", 32'(q9), 32'd0);
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
