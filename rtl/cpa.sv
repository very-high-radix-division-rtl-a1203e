// cpa: carry-propagate adder that assimilates a carry-save pair.
//
// sum = a + b modulo 2^W, and neg = the sign bit of that sum read as two's complement. The
// divider uses it twice: to assimilate M*d into the scaled divisor z (scaling cycle), and to
// find the sign of the last residual (post-correction cycle). Written as a plain addition
// and left to synthesis to map to a fast adder; purely combinational.
module cpa #(
  parameter int unsigned W = 74
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         neg
);

  assign sum = a + b;
  assign neg = sum[W-1];

endmodule
