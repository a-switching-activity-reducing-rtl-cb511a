// scan_path_sp1: scan path SP1 of the test-per-clock BIST, a K1-cell shift
// register loaded serially from the pattern generator; its cells drive the
// K1 inputs of the circuit under test in parallel.
//
// Every enabled f_CLK edge cell 1 takes si and cell i takes cell i-1, so the
// CUT sees a new (overlapping) pattern every clock. The width and the
// asynchronous active-low reset to zero are this design's choices; the
// direction (serial in at cell 1, parallel out) follows the reference
// architecture.
module scan_path_sp1
  import sa2x_pkg::*;
#(
  parameter int unsigned K1 = DEF_K1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        si,
  output logic [K1:1] q
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= (K1 == 1) ? K1'(si) : {q[(K1 > 1 ? K1-1 : 1):1], si};
  end
endmodule
