// gamma_table: coefficient module of the linear-interpolation scaling.
//
// For a divisor d in [1/2, 1) the scale factor is M = gamma2 - gamma1 * d_h ~ 1/d. This module
// returns the pair (gamma1, gamma2) for the interval of d selected by its TIN = floor(B/2)+1
// bits that follow the leading 1 (d truncated to TAU = floor(B/2)+2 fractional bits, d_tau).
// The input/output counts (floor(B/2)+1 in, 2B+11 out) follow the design; the coefficient
// values are this design's own: the chord of 1/d over the interval [a, a+2^-TAU), scaled by
// 8A(A+1)/(8A(A+1)+1) (A = a*2^TAU) so that the error of z = M*d is centred on 1:
//     gamma1 = 8 * 2^(2*TAU)          / (8A(A+1)+1)   (B+3 fractional bits, rounded)
//     gamma2 = 8 * 2^TAU * (2A+1)     / (8A(A+1)+1)   (B+4 fractional bits, rounded)
// gamma1 is returned as a positive magnitude; the scaling multiplier subtracts it.
// The table is computed at elaboration time and read as a combinational ROM.
module gamma_table
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF
) (
  input  logic [tab_in(B)-1:0] idx,     // d bits 2^-2 .. 2^-TAU
  output logic [g1_w(B)-1:0]   gamma1,  // 2 integer + B+3 fractional bits
  output logic [g2_w(B)-1:0]   gamma2   // 2 integer + B+4 fractional bits
);

  localparam int unsigned TIN = tab_in(B);
  localparam int unsigned TAU = tau(B);
  localparam int unsigned NENT = 1 << TIN;

  // round(num/den) for positive integers
  function automatic longint unsigned rdiv(longint unsigned num, longint unsigned den);
    return (2 * num + den) / (2 * den);
  endfunction

  function automatic logic [g1_w(B)-1:0] calc_g1(int unsigned i);
    longint unsigned a, den;
    a   = longint'(NENT) + longint'(i);
    den = 8 * a * (a + 1) + 1;
    return g1_w(B)'(rdiv(longint'(8) << (g1_frac(B) + 2 * TAU), den));
  endfunction

  function automatic logic [g2_w(B)-1:0] calc_g2(int unsigned i);
    longint unsigned a, den;
    a   = longint'(NENT) + longint'(i);
    den = 8 * a * (a + 1) + 1;
    return g2_w(B)'(rdiv((longint'(8) << (g2_frac(B) + TAU)) * (2 * a + 1), den));
  endfunction

  logic [g1_w(B)-1:0] rom1 [NENT];
  logic [g2_w(B)-1:0] rom2 [NENT];

  for (genvar i = 0; i < NENT; i++) begin : g_rom
    assign rom1[i] = calc_g1(i);
    assign rom2[i] = calc_g2(i);
  end

  assign gamma1 = rom1[idx];
  assign gamma2 = rom2[idx];

endmodule
