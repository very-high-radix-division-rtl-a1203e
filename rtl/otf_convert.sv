// otf_convert: on-the-fly conversion of the signed quotient digits, with post-correction
// and rounding.
//
// Each iteration delivers a digit q in [-(r-1), r] in carry-save form (qs + qc + qf); a short
// adder of RECW bits assimilates it. Three forms of the partial quotient are kept, Q, QM = Q-1
// and QP = Q+1, and every new form is a previous form with b bits appended, so no carry
// propagates through the quotient: Q*r + t = {Q, t} for 0 <= t < r, {QM, t+r} for t < 0 and
// {QP, t-r} for t >= r. Q takes t = q, QM t = q-1, QP t = q+1. (The first digit may equal r
// because the residual starts at Mx <= z; the rule covers it.)
// On the last digit two rounded forms are built the same way: QR = Q + INC and
// QMR = Q - 1 + INC, with INC = 2^(L-N) half a unit of the returned quotient (L = ceil(N/b)*b
// digit bits). In the post-correction cycle the sign of the last residual picks QMR (negative:
// the digits overestimate x/d by less than one unit) or QR, and dropping L-N+1 bits gives
// the quotient rounded to nearest (ties away from zero) with N-1 fractional bits:
// quotient = floor(x/d * 2^(N-1) + 1/2), an integer bit and N-1 fractional bits.
// Timing: init (with the scaling) clears the forms to 0, -1, +1; step updates them on the
// clock edge; post loads the quotient register and raises valid for one cycle.
// Follows the design: conversion on the fly, with correction and rounding folded into it so
// that the last cycle only needs the residual sign. This design's own: the rounding position
// and mode, and the use of the QP form for digits up to r.
module otf_convert
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF,
  parameter int unsigned N = N_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,   // clear the partial quotient
  input  logic               step,   // append the digit
  input  logic               last,   // this step is the last digit: also form QR, QMR
  input  logic [recw(B)-1:0] qs,     // digit, carry-save
  input  logic [recw(B)-1:0] qc,
  input  logic               qf,
  input  logic               post,   // post-correction cycle
  input  logic               neg,    // sign of the last residual (valid with post)
  output logic [N-1:0]       quotient,
  output logic               valid
);

  localparam int unsigned L   = qbits(B, N);
  localparam int unsigned QRW = L + 2;
  localparam int unsigned TW  = recw(B) + 2;
  localparam int unsigned SH  = L - N + 1;
  localparam logic signed [TW-1:0] INC = TW'(1) << (L - N);
  localparam logic signed [TW-1:0] R   = TW'(1) << B;

  logic [QRW-1:0] q_r, qm_r, qp_r, qr_r, qmr_r;
  logic [recw(B)-1:0] qsum;
  logic signed [TW-1:0] qv;

  assign qsum = qs + qc + recw(B)'(qf);
  assign qv   = TW'(signed'(qsum));

  // Q*r + t from the three forms of Q, for -r <= t < 2r
  function automatic logic [QRW-1:0] append(logic [QRW-1:0] q, logic [QRW-1:0] qm,
                                            logic [QRW-1:0] qp, logic signed [TW-1:0] t);
    logic [QRW-1:0] pre;
    if (t < 0)       pre = qm;
    else if (t >= R) pre = qp;
    else             pre = q;
    return {pre[QRW-B-1:0], t[B-1:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r      <= '0;
      qm_r     <= '1;
      qp_r     <= QRW'(1);
      qr_r     <= '0;
      qmr_r    <= '0;
      quotient <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (init) begin
        q_r  <= '0;
        qm_r <= '1;
        qp_r <= QRW'(1);
      end else if (step) begin
        q_r  <= append(q_r, qm_r, qp_r, qv);
        qm_r <= append(q_r, qm_r, qp_r, qv - 1);
        qp_r <= append(q_r, qm_r, qp_r, qv + 1);
        if (last) begin
          qr_r  <= append(q_r, qm_r, qp_r, qv + INC);
          qmr_r <= append(q_r, qm_r, qp_r, qv + INC - 1);
        end
      end
      if (post) begin
        quotient <= N'((neg ? qmr_r : qr_r) >> SH);
        valid    <= 1'b1;
      end
    end
  end

  // digit set: -(r-1) .. r (r only as the first digit of a division)
  a_digit_range: assert property (@(posedge clk) disable iff (!rst_n)
      step |-> (qv <= R) && (qv > -R))
    else $error("otf_convert: quotient digit out of range");

endmodule
