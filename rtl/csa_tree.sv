// csa_tree: reduces K operand rows of W bits to a carry-save pair (sum, carry), modulo 2^W.
//
// Rows are reduced in levels of 3:2 carry-save adders (full-adder rows): every level groups
// its rows in threes and replaces each group by a sum row and a shifted carry row; the one
// or two rows left over pass on unchanged. No carry propagates, so the delay grows with the
// number of levels, about log1.5(K/2) full adders. Purely combinational: sum + carry equals
// the sum of all rows modulo 2^W. Used by the scale-factor multiplier and by the main
// multiplier-accumulator. The level structure is fixed at elaboration time from K. Carry-save
// multipliers are what the design calls for; the shape of the tree is this design's choice.
module csa_tree #(
  parameter int unsigned W = 16,
  parameter int unsigned K = 4
) (
  input  logic [W-1:0] rows [K],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // rows present after lv levels
  function automatic int unsigned rows_at(int unsigned lv);
    int unsigned c;
    c = K;
    for (int unsigned i = 0; i < lv; i++) begin
      if (c > 2) c = 2 * (c / 3) + (c % 3);
    end
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned c, l;
    c = K;
    l = 0;
    while (c > 2) begin
      c = 2 * (c / 3) + (c % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  // rows of level l live in g_lvl[l].rw; level 0 is the input
  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int unsigned C  = rows_at(l);
    logic [W-1:0] rw [C];
    if (l == 0) begin : g_in
      for (genvar r = 0; r < C; r++) begin : g_r
        assign rw[r] = rows[r];
      end
    end else begin : g_red
      localparam int unsigned PC = rows_at(l - 1);
      localparam int unsigned NG = PC / 3;
      for (genvar g = 0; g < NG; g++) begin : g_fa
        logic [W-1:0] a0, a1, a2;
        assign a0 = g_lvl[l-1].rw[3*g];
        assign a1 = g_lvl[l-1].rw[3*g+1];
        assign a2 = g_lvl[l-1].rw[3*g+2];
        assign rw[2*g]   = a0 ^ a1 ^ a2;
        assign rw[2*g+1] = ((a0 & a1) | (a0 & a2) | (a1 & a2)) << 1;
      end
      for (genvar p = 3 * NG; p < PC; p++) begin : g_pass
        assign rw[2*NG + p - 3*NG] = g_lvl[l-1].rw[p];
      end
    end
  end

  assign sum = g_lvl[NL].rw[0];
  if (rows_at(NL) > 1) begin : g_two
    assign carry = g_lvl[NL].rw[1];
  end else begin : g_one
    assign carry = '0;
  end

endmodule
