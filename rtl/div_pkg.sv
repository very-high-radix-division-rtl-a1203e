// div_pkg: shared constants, widths and types of the prescaled very-high-radix divider.
//
// The divider computes Q = x/d with 1/2 <= x <= d < 1, retiring b bits of quotient per
// cycle (radix r = 2^b). All widths follow from the radix exponent B and the operand
// width N through the functions below, so every module can be parameterised by (B, N)
// alone. Fixed-point conventions used throughout:
//   - operands x, d: N fractional bits, held as unsigned integers X = x*2^N.
//   - scale factor M ~ 1/d: FM = B+4 fractional bits, kept in carry-save form.
//   - scaled divisor z = M*d and residual w: FW = N+B+4 fractional bits (exact product).
//   - residual words carry RI integer bits (two's complement, modulo 2^RI), chosen so that
//     the integer part of r*w spans exactly one recoder width.
// The defaults B = 9 and N = 54 are the configuration the design is evaluated at.
package div_pkg;

  localparam int unsigned B_DEF = 9;   // radix r = 2^9 = 512
  localparam int unsigned N_DEF = 54;  // quotient bits produced by the iterations

  // number of divisor bits (after the leading 1) that address the coefficient table
  function automatic int unsigned tab_in(int unsigned b);
    return b / 2 + 1;
  endfunction

  // d_tau: divisor truncated to TAU fractional bits (leading bit always 1)
  function automatic int unsigned tau(int unsigned b);
    return b / 2 + 2;
  endfunction

  // d_h: divisor truncated to H fractional bits
  function automatic int unsigned dh_w(int unsigned b);
    return b + 6;
  endfunction

  // gamma1 magnitude: 2 integer + (b+3) fractional bits; gamma2: 2 integer + (b+4) fractional
  function automatic int unsigned g1_frac(int unsigned b);
    return b + 3;
  endfunction
  function automatic int unsigned g1_w(int unsigned b);
    return b + 5;
  endfunction
  function automatic int unsigned g2_frac(int unsigned b);
    return b + 4;
  endfunction
  function automatic int unsigned g2_w(int unsigned b);
    return b + 6;
  endfunction

  // fractional bits of the scale factor M
  function automatic int unsigned fm(int unsigned b);
    return b + 4;
  endfunction

  // recoder width: an even number of bits, at least b+7, so that both the scale factor
  // (< 2.01 * 2^FM) and a quotient digit (|q| <= r) are below a third of 2^RECW
  function automatic int unsigned recw(int unsigned b);
    return (b + 7) + ((b + 7) % 2);
  endfunction

  function automatic int unsigned ndig(int unsigned b);
    return recw(b) / 2;
  endfunction

  // fractional bits of z, Mx and the residual
  function automatic int unsigned fw(int unsigned b, int unsigned n);
    return n + b + 4;
  endfunction

  // multiplicand register width (z < 2: one integer bit)
  function automatic int unsigned yw(int unsigned b, int unsigned n);
    return n + b + 5;
  endfunction

  // residual word width: RI = recw - b integer bits
  function automatic int unsigned rww(int unsigned b, int unsigned n);
    return fw(b, n) + recw(b) - b;
  endfunction

  // number of iterations ceil(n/b) and quotient bits they produce
  function automatic int unsigned niter(int unsigned b, int unsigned n);
    return (n + b - 1) / b;
  endfunction
  function automatic int unsigned qbits(int unsigned b, int unsigned n);
    return niter(b, n) * b;
  endfunction

  // one recoded radix-4 digit, two's complement, value in {-2,-1,0,1,2}
  typedef logic signed [2:0] r4digit_t;

  // operation of the shared multiplier-accumulator
  typedef enum logic [1:0] {
    MA_PRODUCT = 2'd0,  // out = M * Y          (Md, Mx)
    MA_RECUR   = 2'd1   // out = r*w - q * Y     (iteration)
  } ma_mode_e;

  // controller state; one state per cycle kind of the division
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,  // waiting; on start: M computed, d loaded
    ST_MD   = 3'd1,  // M*d into W, x loaded
    ST_MX   = 3'd2,  // M*x into W, Md assimilated into z
    ST_ITER = 3'd3,  // one quotient digit per cycle
    ST_POST = 3'd4   // sign of last residual, correction and rounding
  } div_state_e;

endpackage
