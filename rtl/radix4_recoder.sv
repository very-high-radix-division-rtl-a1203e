// radix4_recoder: recodes a carry-save operand (s + c + f) into radix-4 digits {-2..+2}.
//
// Used for both multiplier operands of the divider: the scale factor M and the quotient digit
// q. Each two-bit group i of the pair holds a value 0..6 (0..7 in group 0, which also takes
// the extra bit f). The recoding follows the two steps of the design, merged per digit:
//   step 1: with a,b the sum bits and c,d the carry bits of group i and h the OR of the two
//           upper bits of group i-1 (h = f for group 0), the digit b + d + h - 2k with
//           k = a XOR c lies in {-2..3}; the OR of a and c moves up as weight 4.
//   step 2: a full adder gives b + d + h as (carry, sum); the digit is held in two's
//           complement {-2..1} as (carry XOR k, sum), and t_out = carry AND NOT k moves +4 up,
//           turning +2 and +3 into 4-2 and 4-1. Adding t_in from the group below gives the
//           final digit in {-2..2}: bit0 = sum XOR t_in, bit1 = m XOR (sum AND t_in),
//           bit2 = m AND NAND(sum, t_in), with m = carry XOR k.
// The transfers out of the top group are dropped, so the digits represent the operand
// modulo 2^RECW; the result is the operand's exact value when its magnitude is below
// 2^RECW/3 (this design's choice of RECW guarantees it). Purely combinational, about two
// full-adder delays, no carry chain.
module radix4_recoder
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF
) (
  input  logic [recw(B)-1:0] s,
  input  logic [recw(B)-1:0] c,
  input  logic               f,
  output r4digit_t           dig [ndig(B)]  // dig[i] has weight 4^i
);

  localparam int unsigned ND = ndig(B);

  logic [ND:0] h;     // OR of the upper bits of the group below
  logic [ND:0] tr;    // step-2 transfer into group i

  assign h[0]  = f;
  assign tr[0] = 1'b0;

  for (genvar i = 0; i < ND; i++) begin : g_dig
    logic ga, gb, gc, gd, k, fs, fc, m;
    assign {ga, gb} = s[2*i+1 -: 2];
    assign {gc, gd} = c[2*i+1 -: 2];
    assign k        = ga ^ gc;
    assign fs       = gb ^ gd ^ h[i];
    assign fc       = (gb & gd) | (gb & h[i]) | (gd & h[i]);
    assign m        = fc ^ k;
    assign h[i+1]   = ga | gc;
    assign tr[i+1]  = fc & ~k;
    assign dig[i]   = {m & ~(fs & tr[i]), m ^ (fs & tr[i]), fs ^ tr[i]};
  end

endmodule
