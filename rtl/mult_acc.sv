// mult_acc: shared carry-save multiplier-accumulator of the divider.
//
// out_s + out_c = acc_s + acc_c + sgn * sum_i dig[i] * 4^i * y   (modulo 2^RWW)
// with sgn = +1 in MA_PRODUCT mode (scaling cycles: M*d, M*x, accumulators forced to zero)
// and sgn = -1 in MA_RECUR mode (iterations: r*w[j] - q*z, the accumulators being the two
// words of the residual already shifted by b). The multiplier operand arrives as NDIG radix-4
// digits in {-2..2} from the recoder; each digit selects 0, y or 2y, and a negative product
// is formed as the bitwise complement plus a 1 placed at the digit's least-significant
// position (all those 1s share one extra row). The NDIG partial products, the correction row
// and the two accumulator rows are reduced by a carry-save tree, so no carry propagates.
// Units: y and the products are integers; with y = z*2^FW and integer digits, or y = d*2^N
// and M digits with FM fractional bits, the result is in units of 2^-FW either way.
// Purely combinational; the divider registers its output in the W register.
// Follows the design: one multiplier shared by the scaling products and the iterations, with
// the residual added as two extra terms. This design's own: the partial-product and
// negation scheme, the tree shape and the output width (FW + RECW - B bits).
module mult_acc
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF,
  parameter int unsigned N = N_DEF
) (
  input  ma_mode_e             mode,
  input  r4digit_t             dig [ndig(B)],
  input  logic [yw(B,N)-1:0]   y,       // multiplicand (d, x or z), unsigned
  input  logic [rww(B,N)-1:0]  acc_s,   // accumulator rows, used in MA_RECUR mode
  input  logic [rww(B,N)-1:0]  acc_c,
  output logic [rww(B,N)-1:0]  out_s,
  output logic [rww(B,N)-1:0]  out_c
);

  localparam int unsigned ND   = ndig(B);
  localparam int unsigned W    = rww(B, N);
  localparam int unsigned NROW = ND + 3;

  logic [W-1:0] rows [NROW];
  logic [W-1:0] corr;
  logic [ND-1:0] neg;

  for (genvar i = 0; i < ND; i++) begin : g_pp
    logic         dneg, is0, is2;
    logic [W-1:0] mag;
    // sign of the digit after the mode's negation
    assign is0  = (dig[i] == 3'sd0);
    assign is2  = (dig[i] == 3'sd2) || (dig[i] == -3'sd2);
    assign dneg = !is0 && ((mode == MA_RECUR) ? !dig[i][2] : dig[i][2]);
    assign mag  = is0 ? '0 : (is2 ? (W'(y) << 1) : W'(y));
    assign neg[i]  = dneg;
    assign rows[i] = (dneg ? ~mag : mag) << (2 * i);
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < ND; i++) corr[2*i] = neg[i];
  end

  assign rows[ND]     = corr;
  assign rows[ND + 1] = (mode == MA_RECUR) ? acc_s : '0;
  assign rows[ND + 2] = (mode == MA_RECUR) ? acc_c : '0;

  csa_tree #(.W(W), .K(NROW)) u_tree (
    .rows (rows),
    .sum  (out_s),
    .carry(out_c)
  );

endmodule
