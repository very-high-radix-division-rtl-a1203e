// digit_select: quotient-digit selection by rounding the shifted residual (carry-save).
//
// Input: the sum and carry words of r*w[j] truncated to two fractional bits: RECW integer
// bits (two's complement, modulo 2^RECW) followed by the fraction bits a,b (sum word) and
// c,d (carry word). The digit is round(y) = floor(y + 1/2) of the estimate y = S + C. As in
// the design, a row of half adders combines the two integer parts, which leaves the least
// significant bit of the carry vector free; that bit takes e = a OR c, and one extra bit
// f = b AND d AND NOT(a XOR c) of weight 1 is output beside the pair. Together e and f are
// floor((2a+2c+b+d+2)/4), the integer carry out of the fraction plus 1/2. Result:
// q = qs + qc + qf (modulo 2^RECW), still in carry-save form. Delay: one half adder.
// Purely combinational.
module digit_select
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF
) (
  input  logic [recw(B)+1:0] ys,  // sum word: RECW integer bits, 2 fractional bits
  input  logic [recw(B)+1:0] yc,  // carry word, same format
  output logic [recw(B)-1:0] qs,  // digit, sum word
  output logic [recw(B)-1:0] qc,  // digit, carry word
  output logic               qf   // digit, extra least-significant bit
);

  localparam int unsigned QW = recw(B);

  logic [QW-1:0] si, ci;
  logic          a, b, c, d, e;

  assign si = ys[QW+1:2];
  assign ci = yc[QW+1:2];
  assign {a, b} = ys[1:0];
  assign {c, d} = yc[1:0];

  assign e  = a | c;
  assign qf = b & d & ~(a ^ c);
  assign qs = si ^ ci;
  assign qc = {(si[QW-2:0] & ci[QW-2:0]), e};

endmodule
