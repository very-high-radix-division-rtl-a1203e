// tb_otf_convert: checks on-the-fly conversion, post-correction and rounding.
//
// Feeds digit sequences like those of a division (first digit in [r/2, r], later digits in
// [-(r-1), r-1], each split at random into carry-save form), then a post-correction cycle
// with a random residual sign. The expected quotient, computed with wide integers, is
// (Q - neg + 2^(L-N)) >> (L-N+1) with Q = sum of q_j * r^(NIT-j). Checks that valid pulses
// exactly once, in the cycle after post, and that digits equal to r and negative digits
// (the cases that use the QP and QM forms) occur.
module tb_otf_convert;
  import div_pkg::*;

  localparam int unsigned B    = B_DEF;
  localparam int unsigned N    = N_DEF;
  localparam int unsigned RECW = recw(B);
  localparam int unsigned NIT  = niter(B, N);
  localparam int unsigned L    = qbits(B, N);
  localparam int R = 1 << B;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, step = 1'b0, last = 1'b0, post = 1'b0, neg = 1'b0;
  logic [RECW-1:0] qs = '0, qc = '0;
  logic qf = 1'b0;
  logic [N-1:0] quotient;
  logic valid;

  int checks = 0, failures = 0, n_r = 0, n_neg = 0, n_rm1 = 0;

  otf_convert dut (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step), .last(last), .qs(qs), .qc(qc),
    .qf(qf), .post(post), .neg(neg), .quotient(quotient), .valid(valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] qacc, want;
    int q;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      qacc = 0;
      for (int j = 0; j < NIT; j++) begin
        if (j == 0) q = $urandom_range(R / 2, R);
        else        q = int'($urandom_range(0, 2 * R - 2)) - (R - 1);
        if (t % 4 == 0 && j > 0) q = (j % 2) ? R - 1 : -(R - 1);
        if (j == 0 && t % 3 == 0) q = R;
        if (q == R) n_r++;
        if (q < 0) n_neg++;
        if (q == R - 1) n_rm1++;
        qacc = qacc * R + q;
        qf = 1'($urandom);
        qs = RECW'($urandom);
        qc = RECW'(q) - qs - RECW'(qf);
        step = 1'b1;
        last = (j == NIT - 1);
        @(negedge clk);
      end
      step = 1'b0;
      last = 1'b0;
      neg  = 1'($urandom);
      post = 1'b1;
      checks++;
      if (valid) begin
        failures++;
        $display("valid before post");
      end
      @(negedge clk);
      post = 1'b0;
      want = (qacc - 128'(neg) + (128'(1) << (L - N))) >>> (L - N + 1);
      checks += 2;
      if (!valid) begin
        failures++;
        $display("valid missing");
      end
      if (quotient != N'(want)) begin
        failures++;
        if (failures < 10) $display("Q=%h neg=%b: quotient %h expected %h", qacc, neg, quotient, N'(want));
      end
      @(negedge clk);
      checks++;
      if (valid) begin
        failures++;
        $display("valid longer than one cycle");
      end
    end
    checks++;
    if (n_r == 0 || n_neg == 0 || n_rm1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
