// tb_sa2x_workloads: the SA2x compactor at the sizes over which its power
// saving is evaluated: s = 20 CUT outputs with signature lengths m = 5, 30, 50,
// and m = 30 with s = 5 and s = 50 (plus the s = m = 4 example: 16 pulses,
// 128 response bits). For each size the signature must match the conventional
// compactor on the same response stream, and each compactor pulse must absorb
// 2*s response bits, so the (s+m) flip-flop clock inputs switch
// 2*(s+m)/(2*s) times per compressed bit instead of 2*(s+m)/s.
// Polynomials (maximal length, standard tables): X^5+X^3+1,
// X^30+X^6+X^4+X+1, X^50+X^49+X^24+X^23+1.
module tb_sa2x_workloads;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 6;
  localparam logic [4:0]  P5  = 5'b10100;
  localparam logic [29:0] P30 = 30'h2000_0029;                       // stages 30,6,4,1
  localparam logic [49:0] P50 = (50'd1 << 49) | (50'd1 << 48) | (50'd1 << 23) | (50'd1 << 22);

  int c[N], f[N], p[N], b[N];
  logic d[N];
  int sizes_s[N] = '{4, 20, 20, 20, 5, 50};
  int sizes_m[N] = '{4, 5, 30, 50, 30, 30};
  int checks, failures;

  sa2x_compactor_chk #(.S(4),  .M(4),  .TAPS(4'b1100), .PULSES(16)) u0 (c[0], f[0], p[0], b[0], d[0]);
  sa2x_compactor_chk #(.S(20), .M(5),  .TAPS(P5),  .PULSES(40)) u1 (c[1], f[1], p[1], b[1], d[1]);
  sa2x_compactor_chk #(.S(20), .M(30), .TAPS(P30), .PULSES(40)) u2 (c[2], f[2], p[2], b[2], d[2]);
  sa2x_compactor_chk #(.S(20), .M(50), .TAPS(P50), .PULSES(40)) u3 (c[3], f[3], p[3], b[3], d[3]);
  sa2x_compactor_chk #(.S(5),  .M(30), .TAPS(P30), .PULSES(40)) u4 (c[4], f[4], p[4], b[4], d[4]);
  sa2x_compactor_chk #(.S(50), .M(30), .TAPS(P30), .PULSES(40)) u5 (c[5], f[5], p[5], b[5], d[5]);

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      real clk_sw_sa2x, clk_sw_base;
      checks += c[i] + 1; failures += f[i];
      // Each pulse must take two vectors: bits = 2 * s * pulses.
      if (b[i] != 2 * sizes_s[i] * p[i]) begin
        failures++;
        $display("FAIL s=%0d m=%0d: %0d bits in %0d pulses", sizes_s[i], sizes_m[i], b[i], p[i]);
      end
      clk_sw_sa2x = 2.0 * (sizes_s[i] + sizes_m[i]) * p[i] / b[i];
      clk_sw_base = 2.0 * (sizes_s[i] + sizes_m[i]) / sizes_s[i];
      $display("s=%0d m=%0d: %0d pulses, %0d bits, clock-input switchings per bit %0.3f (one vector per clock: %0.3f)",
               sizes_s[i], sizes_m[i], p[i], b[i], clk_sw_sa2x, clk_sw_base);
    end
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
