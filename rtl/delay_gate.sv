// delay_gate: behavioural model of one delay element ("t", E1..Es) of the
// SA2x compactor. Not synthesizable logic: it stands for a delay line whose
// delay is one period of f_CLK.
//
// q follows d after DELAY (ns) with transport semantics, so every change of d,
// however short, reappears on q. In the compactor this makes the previous
// response vector visible at the half-rate clock edge next to the current
// one. The delay value (one f_CLK period, 10 ns by default) is this design's
// choice; the delay gate itself is part of the reference structure. q starts
// at 0 until the first change of d has propagated.
module delay_gate
  import sa2x_pkg::*;
#(
  parameter realtime DELAY = DEF_DELAY   // ns
) (
  input  logic d,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  initial q = 1'b0;

  // Each change of d starts its own delayed update, so changes closer
  // together than DELAY are all kept (transport delay).
  always begin
    @(d);
    fork
      begin
        automatic logic v = d;
        #(DELAY);
        q = v;
      end
    join_none
  end
endmodule
