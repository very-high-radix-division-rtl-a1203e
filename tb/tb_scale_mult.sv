// tb_scale_mult: checks the carry-save scale factor against exact integer arithmetic.
//
// For random coefficient pairs and divisor prefixes, the exact value
// gamma2 - gamma1*d_h (2B+9 fractional bits) is computed with wide integers; the two
// truncated output words must add up to that value truncated to FM fractional bits, or to
// one unit less (each word drops less than one unit), modulo 2^RECW. Then runs every
// divisor prefix d_h through gamma_table and checks z = M*d within the convergence bound
// (r-2)/(4r(r-1)) at both ends of the d_h interval.
module tb_scale_mult;
  import div_pkg::*;

  localparam int unsigned B    = B_DEF;
  localparam int unsigned RECW = recw(B);
  localparam int unsigned PF   = g1_frac(B) + dh_w(B);
  localparam int unsigned DROP = PF - fm(B);

  logic [g1_w(B)-1:0] gamma1;
  logic [g2_w(B)-1:0] gamma2;
  logic [dh_w(B)-1:0] dh;
  logic [RECW-1:0]    m_s, m_c;
  logic [g1_w(B)-1:0] tg1;
  logic [g2_w(B)-1:0] tg2;

  int checks = 0, failures = 0;

  scale_mult dut (.gamma1(gamma1), .gamma2(gamma2), .dh(dh), .m_s(m_s), .m_c(m_c));
  gamma_table u_tab (.idx(dh[dh_w(B)-2 -: tab_in(B)]), .gamma1(tg1), .gamma2(tg2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] exact, diff;
    logic [RECW-1:0] got, want;
    real r, bound, m, z, worst;
    r     = real'(1 << B);
    bound = (r - 2.0) / (4.0 * r * (r - 1.0));
    worst = 0.0;
    for (int i = 0; i < 20000; i++) begin
      gamma1 = g1_w(B)'({$urandom, $urandom});
      gamma2 = g2_w(B)'({$urandom, $urandom});
      dh     = dh_w(B)'($urandom);
      #1;
      exact = (128'(gamma2) <<< (PF - g2_frac(B))) - 128'(gamma1) * 128'(dh);
      want  = RECW'(exact >>> DROP);
      got   = m_s + m_c;
      diff  = 128'(want - got);
      checks++;
      if (RECW'(diff) != 0 && RECW'(diff) != 1) begin
        failures++;
        if (failures < 10) $display("g1=%h g2=%h dh=%h: M %h, expected %h", gamma1, gamma2, dh, got, want);
      end
    end
    // with the real coefficients, every d_h
    for (int i = 0; i < (1 << (dh_w(B) - 1)); i++) begin
      dh = {1'b1, (dh_w(B)-1)'(i)};
      #1;
      gamma1 = tg1;
      gamma2 = tg2;
      #1;
      got = m_s + m_c;
      m = real'(got) / real'(1 << fm(B));
      for (int e = 0; e < 2; e++) begin
        z = m * (real'(dh) + real'(e)) / real'(1 << dh_w(B));
        if (z - 1.0 > worst) worst = z - 1.0;
        if (1.0 - z > worst) worst = 1.0 - z;
        checks++;
        if (z - 1.0 >= bound || 1.0 - z >= bound) begin
          failures++;
          if (failures < 10) $display("dh=%h: z=%f outside 1 +- %g", dh, z, bound);
        end
      end
    end
    $display("largest |z-1| %g, bound %g", worst, bound);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
