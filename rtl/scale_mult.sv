// scale_mult: scale-factor multiplier-adder, M = {gamma2 - gamma1 * d_h} truncated, carry-save.
//
// Forms the product -gamma1 * d_h as H = B+6 partial products d_h[j] * (~gamma1) * 2^j plus
// one row equal to d_h (the "+1" of each two's complement negation, -g = ~g + 1), adds
// gamma2 as a further row, and reduces all rows with a carry-save tree. The exact result has
// 2B+9 fractional bits in 2B+12 bits, as in the design (RECW-FM integer bits, two's
// complement modulo 2^(RECW-FM)). Both carry-save words are then truncated to FM = B+4
// fractional bits, giving M in carry-save form; the truncation lowers M by less than two
// units of 2^-FM. The result is not assimilated: it goes to the radix-4 recoder as it is.
// The words are RECW bits wide (3 integer bits for odd B), one integer bit more than the
// design's 2(B+6), so that the recoder sees M modulo 2^RECW (see radix4_recoder).
// Purely combinational; in the divider its output is registered (M register). The operand and
// result sizes follow the design; the partial-product scheme is this design's own.
module scale_mult
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF
) (
  input  logic [g1_w(B)-1:0] gamma1,  // magnitude, 2 integer + B+3 fractional bits
  input  logic [g2_w(B)-1:0] gamma2,  // 2 integer + B+4 fractional bits
  input  logic [dh_w(B)-1:0] dh,      // divisor bits 2^-1 .. 2^-(B+6)
  output logic [recw(B)-1:0] m_s,     // M sum word, FM fractional bits
  output logic [recw(B)-1:0] m_c      // M carry word, FM fractional bits
);

  localparam int unsigned H    = dh_w(B);
  localparam int unsigned PF   = g1_frac(B) + H;          // product fractional bits, 2B+9
  localparam int unsigned MI   = recw(B) - fm(B);         // integer bits kept
  localparam int unsigned SW   = MI + PF;                 // 2B+12 for odd B
  localparam int unsigned NROW = H + 2;
  localparam int unsigned DROP = PF - fm(B);              // bits truncated, B+5

  logic [SW-1:0] rows [NROW];
  logic [SW-1:0] ng1;
  logic [SW-1:0] sum, carry;

  assign ng1 = ~SW'(gamma1);

  for (genvar j = 0; j < H; j++) begin : g_pp
    assign rows[j] = dh[j] ? (ng1 << j) : '0;
  end
  assign rows[H]     = SW'(dh);
  assign rows[H + 1] = SW'(gamma2) << (PF - g2_frac(B));

  csa_tree #(.W(SW), .K(NROW)) u_tree (
    .rows (rows),
    .sum  (sum),
    .carry(carry)
  );

  assign m_s = sum[SW-1:DROP];
  assign m_c = carry[SW-1:DROP];

endmodule
