// tb_prescale_divider: end-to-end test of the divider at its default size (B = 9, N = 54).
//
// Drives random and corner-case operand pairs 1/2 <= x <= d < 1 and compares each quotient
// with floor((X*2^N + D) / (2D)), the quotient x/d rounded to nearest with N-1 fractional
// bits, computed with wide integer arithmetic independently of the design. Half of the
// divisions present d alone in the start cycle and x alone in the next. Also checks the
// latency (ceil(N/B) + 4 = 10 clock edges from start to done), that busy covers the
// operation, and counts how often each mechanism of the design occurred: a first digit
// equal to r, a negative digit, a negative last residual (post-correction), a result of 1.0,
// and a start ignored while busy. A mechanism that never occurred counts as a failure.
module tb_prescale_divider;
  import div_pkg::*;

  localparam int unsigned B   = B_DEF;
  localparam int unsigned N   = N_DEF;
  localparam int unsigned LAT = niter(B, N) + 4;
  localparam int unsigned NRAND = 3000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] x = '0, d = '0;
  logic [N-1:0] quotient;
  logic         done, busy;

  int checks = 0, failures = 0;
  int n_calls = 0;
  int n_first_r = 0, n_neg_digit = 0, n_neg_resid = 0, n_one = 0, n_ignored = 0;

  prescale_divider dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .d(d),
    .quotient(quotient), .done(done), .busy(busy)
  );

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (NRAND * (LAT + 3) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors (observed through the hierarchy)
  always @(posedge clk) begin
    if (dut.u_ctrl.state == ST_ITER) begin
      if (dut.u_ctrl.first && dut.u_otf.qv == (1 <<< B)) n_first_r++;
      if (dut.u_otf.qv < 0) n_neg_digit++;
    end
    if (dut.u_ctrl.state == ST_POST && dut.cpa_neg) n_neg_resid++;
  end

  function automatic logic [N-1:0] expect_q(logic [N-1:0] xv, logic [N-1:0] dv);
    logic [2*N+1:0] num, den;
    num = ({(N+2)'(0), xv} << N) + (2*N+2)'(dv);
    den = (2*N+2)'(dv) << 1;
    return N'(num / den);
  endfunction

  task automatic divide(input logic [N-1:0] xv, input logic [N-1:0] dv, input bit poke_busy);
    int cyc;
    logic [N-1:0] exp_q;
    exp_q = expect_q(xv, dv);
    @(negedge clk);
    // d is needed in the start cycle, x in the next one; on odd calls the other operand
    // carries garbage in the cycle where it is not used
    n_calls++;
    x = n_calls[0] ? ~xv : xv;
    d = dv;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x = xv;
    if (n_calls[0]) d = ~dv;
    cyc = 1;
    // later: optionally try a start (with other operands) that must be ignored
    if (poke_busy) begin
      @(negedge clk);
      cyc++;
      start = 1'b1;
      x = ~xv;
      d = ~dv;
      @(negedge clk);
      cyc++;
      start = 1'b0;
      if (!busy) begin
        failures++;
        $display("busy low during operation");
      end
      checks++;
      n_ignored++;
    end
    while (!done && cyc < 4 * LAT) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, LAT);
    end
    checks++;
    if (quotient !== exp_q) begin
      failures++;
      if (failures < 10)
        $display("x=%h d=%h q=%h expected %h", xv, dv, quotient, exp_q);
    end
    if (exp_q == (N'(1) << (N - 1))) n_one++;
  endtask

  function automatic logic [N-1:0] rand_op();
    logic [N-1:0] v;
    v = {$urandom, $urandom};
    v[N-1] = 1'b1;
    return v;
  endfunction

  initial begin
    logic [N-1:0] a, b, t;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corners: extremes of the operand range
    divide({1'b1, (N-1)'(0)}, {1'b1, (N-1)'(0)}, 0);
    divide({N{1'b1}}, {N{1'b1}}, 0);
    divide({1'b1, (N-1)'(0)}, {N{1'b1}}, 0);
    divide({N{1'b1}} - 1, {N{1'b1}}, 1);
    divide({1'b1, (N-1)'(1)}, {1'b1, (N-1)'(1)}, 0);
    // each coefficient interval, x = d and x just below d
    for (int i = 0; i < (1 << tab_in(B)); i++) begin
      b = {1'b1, tab_in(B)'(i), (N - 1 - tab_in(B))'(0)};
      divide(b, b, 0);
      b = b | ((N'(1) << (N - 1 - tab_in(B))) - 1);
      divide(b, b, 0);
      divide(b - 1, b, 0);
    end
    for (int i = 0; i < NRAND; i++) begin
      a = rand_op();
      b = rand_op();
      if (a > b) begin
        t = a; a = b; b = t;
      end
      if (i % 7 == 0) a = b - N'($urandom_range(0, 3));
      divide(a, b, (i % 50) == 0);
    end
    $display("mechanisms: first digit r %0d, negative digit %0d, negative last residual %0d, result 1.0 %0d, ignored start %0d",
             n_first_r, n_neg_digit, n_neg_resid, n_one, n_ignored);
    checks += 5;
    if (n_first_r == 0) failures++;
    if (n_neg_digit == 0) failures++;
    if (n_neg_resid == 0) failures++;
    if (n_one == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
