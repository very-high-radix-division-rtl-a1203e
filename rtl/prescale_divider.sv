// prescale_divider: very-high-radix divider with prescaling and digit selection by rounding.
//
// Computes the quotient of x/d, 1/2 <= x <= d < 1, both with N fractional bits, producing
// b = B quotient bits per cycle (radix r = 2^B). The divisor is first scaled by M ~ 1/d
// (linear interpolation, gamma_table + scale_mult) so that z = M*d lies within
// 1 +- (r-2)/(4r(r-1)); then each quotient digit is simply the rounded value of the
// carry-save residual truncated to two fractional bits (digit_select), and the recurrence
// w[j+1] = r*w[j] - q[j+1]*z, w[0] = M*x, runs entirely in carry-save form in one shared
// multiplier-accumulator (mult_acc), fed through one radix-4 recoder (radix4_recoder) that
// serves both M (scaling cycles) and q (iterations). A carry-propagate adder (cpa)
// assimilates M*d into z and gives the sign of the last residual; otf_convert turns the
// signed digits into the rounded quotient without carry propagation.
//
// Interface: pulse start for one cycle with d valid; x must be valid on the next cycle (it
// enters the multiplicand register then), so the divisor may arrive one cycle before the
// dividend and the scale factor is computed meanwhile. done pulses with quotient valid
// ceil(N/B) + 4 clock edges after the edge that sampled start: 10 cycles for B = 9, N = 54.
// quotient = round-to-nearest(x/d) with N-1 fractional bits, ties away from zero, as
// 1 integer bit (set only when the result is 1.0) and N-1 fractional bits. busy is high
// from the cycle after start until done; start is ignored while busy.
//
// Follows the design: the datapath of one scaling unit, one recoder behind a 2-to-1
// multiplexer, one multiplier-accumulator with the residual register W, the rounding
// selection, one adder and the on-the-fly conversion, and the cycle count. This design's
// own choices: the coefficient values, the register widths rounded up for the recoder
// (RECW bits per digit word, residual words of FW + RECW - B bits), the first digit being
// allowed to reach r, the rounding position, and the handshake.
module prescale_divider
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF,  // radix 2^B
  parameter int unsigned N = N_DEF   // operand and quotient width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,         // dividend, N fractional bits
  input  logic [N-1:0] d,         // divisor, N fractional bits
  output logic [N-1:0] quotient,  // 1 integer bit, N-1 fractional bits
  output logic         done,
  output logic         busy
);

  localparam int unsigned RECW = recw(B);
  localparam int unsigned ND   = ndig(B);
  localparam int unsigned FWB  = fw(B, N);
  localparam int unsigned YW   = yw(B, N);
  localparam int unsigned RWW  = rww(B, N);
  localparam int unsigned TIN  = tab_in(B);
  localparam int unsigned H    = dh_w(B);

  initial begin
    assert (B >= 3 && N >= B) else $error("prescale_divider: need B >= 3 and N >= B");
  end

  // ---------------------------------------------------------------- control
  div_state_e state;
  logic       load_m, first, last;

  div_control #(.B(B), .N(N)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .state (state),
    .load_m(load_m),
    .first (first),
    .last  (last),
    .busy  (busy)
  );

  // ---------------------------------------------------------------- scaling unit
  logic [g1_w(B)-1:0] gamma1;
  logic [g2_w(B)-1:0] gamma2;
  logic [RECW-1:0]    m_s, m_c, m_s_r, m_c_r;

  gamma_table #(.B(B)) u_gamma (
    .idx   (d[N-2 -: TIN]),
    .gamma1(gamma1),
    .gamma2(gamma2)
  );

  scale_mult #(.B(B)) u_scale (
    .gamma1(gamma1),
    .gamma2(gamma2),
    .dh    (d[N-1 -: H]),
    .m_s   (m_s),
    .m_c   (m_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_s_r <= '0;
      m_c_r <= '0;
    end else if (load_m) begin
      m_s_r <= m_s;
      m_c_r <= m_c;
    end
  end

  // ---------------------------------------------------------------- residual register W
  logic [RWW-1:0] w_s, w_c, ma_s, ma_c;
  logic [RWW-1:0] cpa_sum;
  logic           cpa_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_s <= '0;
      w_c <= '0;
    end else if (state == ST_MD || state == ST_MX || state == ST_ITER) begin
      w_s <= ma_s;
      w_c <= ma_c;
    end
  end

  // ---------------------------------------------------------------- multiplicand register
  logic [YW-1:0] y_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_r <= '0;
    end else if (load_m) begin
      y_r <= YW'(d);
    end else if (state == ST_MD) begin
      y_r <= YW'(x);
    end else if (state == ST_MX) begin
      y_r <= cpa_sum[YW-1:0];  // z = M*d, assimilated
    end
  end

  // ---------------------------------------------------------------- digit selection
  logic [RECW-1:0] q_s, q_c;
  logic            q_f;

  digit_select #(.B(B)) u_round (
    .ys(w_s[RWW-1 -: RECW+2]),
    .yc(w_c[RWW-1 -: RECW+2]),
    .qs(q_s),
    .qc(q_c),
    .qf(q_f)
  );

  // ---------------------------------------------------------------- recoder and multiplier
  logic     iter;
  r4digit_t dig [ND];

  assign iter = (state == ST_ITER);

  radix4_recoder #(.B(B)) u_recode (
    .s  (iter ? q_s : m_s_r),
    .c  (iter ? q_c : m_c_r),
    .f  (iter & q_f),
    .dig(dig)
  );

  mult_acc #(.B(B), .N(N)) u_ma (
    .mode (iter ? MA_RECUR : MA_PRODUCT),
    .dig  (dig),
    .y    (y_r),
    .acc_s(w_s << B),
    .acc_c(w_c << B),
    .out_s(ma_s),
    .out_c(ma_c)
  );

  // ---------------------------------------------------------------- adder
  cpa #(.W(RWW)) u_cpa (
    .a  (w_s),
    .b  (w_c),
    .sum(cpa_sum),
    .neg(cpa_neg)
  );

  // ---------------------------------------------------------------- conversion
  otf_convert #(.B(B), .N(N)) u_otf (
    .clk     (clk),
    .rst_n   (rst_n),
    .init    (state == ST_MX),
    .step    (iter),
    .last    (last),
    .qs      (q_s),
    .qc      (q_c),
    .qf      (q_f),
    .post    (state == ST_POST),
    .neg     (cpa_neg),
    .quotient(quotient),
    .valid   (done)
  );

  // the scaled divisor must lie within 1 +- 1/(4r), the range (slightly widened) in which
  // rounding selection converges; checked while the first digit is selected
  localparam logic [YW-1:0] Z_ONE = YW'(1) << FWB;
  localparam logic [YW-1:0] Z_TOL = YW'(1) << (FWB - B - 2);

  a_z_range: assert property (@(posedge clk) disable iff (!rst_n)
      first |-> (y_r > Z_ONE - Z_TOL) && (y_r < Z_ONE + Z_TOL))
    else $error("prescale_divider: scaled divisor out of range");

  // convergence: every residual satisfies |w| <= z (equality only for w[0] = Mx with x = d)
  a_resid_bound: assert property (@(posedge clk) disable iff (!rst_n)
      (state == ST_ITER || state == ST_POST) |->
        (cpa_neg ? ((~cpa_sum + 1'b1) <= RWW'(y_r)) : (cpa_sum <= RWW'(y_r))))
    else $error("prescale_divider: residual outside |w| <= z");

endmodule
