// tb_gamma_table: checks the interpolation coefficients of every table entry.
//
// For each interval [A, A+1)/2^TAU of the divisor, evaluates the interpolated scale factor
// M = gamma2 - gamma1*d at 17 points across the interval (real arithmetic) and requires
// |M*d - 1| to stay below half the convergence bound (r-2)/(4r(r-1)), leaving the other half
// for the truncations of the scaling multiplier. Also checks gamma1 against the slope of 1/d
// (1/A(A+1) scaled) within 1%. Purely combinational block: no cycle count to check.
module tb_gamma_table;
  import div_pkg::*;

  localparam int unsigned B   = B_DEF;
  localparam int unsigned TIN = tab_in(B);
  localparam int unsigned TAU = tau(B);

  logic [TIN-1:0]     idx;
  logic [g1_w(B)-1:0] gamma1;
  logic [g2_w(B)-1:0] gamma2;

  int checks = 0, failures = 0;

  gamma_table dut (.idx(idx), .gamma1(gamma1), .gamma2(gamma2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, bound, g1, g2, dd, e, a, worst, slope;
    r     = real'(1 << B);
    bound = (r - 2.0) / (4.0 * r * (r - 1.0));
    worst = 0.0;
    for (int i = 0; i < (1 << TIN); i++) begin
      idx = TIN'(i);
      #1;
      g1 = real'(gamma1) / real'(64'(1) << g1_frac(B));
      g2 = real'(gamma2) / real'(64'(1) << g2_frac(B));
      a  = real'((1 << TIN) + i) / real'(1 << TAU);
      slope = 1.0 / (a * (a + 1.0 / real'(1 << TAU)));
      checks++;
      if (g1 < 0.99 * slope || g1 > 1.01 * slope) begin
        failures++;
        $display("entry %0d: gamma1 %f, slope of 1/d %f", i, g1, slope);
      end
      for (int k = 0; k <= 16; k++) begin
        dd = a + real'(k) / 16.0 / real'(1 << TAU);
        e  = (g2 - g1 * dd) * dd - 1.0;
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        checks++;
        if (e > bound / 2.0) begin
          failures++;
          $display("entry %0d d=%f: |z-1| = %g above %g", i, dd, e, bound / 2.0);
        end
      end
    end
    $display("largest |z-1| %g, bound %g", worst, bound);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
