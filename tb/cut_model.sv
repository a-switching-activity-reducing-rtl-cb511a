// cut_model: small combinational stand-in for a circuit under test, used only
// by testbenches. Output i is x[i] XOR (x[i+1] AND x[i+2]) with input indices
// taken cyclically, so every output depends on several scan cells.
module cut_model #(
  parameter int unsigned K1 = 4,
  parameter int unsigned S  = 4
) (
  input  logic [K1:1] x,
  output logic [S:1]  y
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    for (int unsigned i = 1; i <= S; i++)
      y[i] = x[((i - 1) % K1) + 1] ^ (x[(i % K1) + 1] & x[((i + 1) % K1) + 1]);
  end
endmodule
