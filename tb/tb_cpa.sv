// tb_cpa: checks the carry-propagate adder's sum and sign on random and corner operands.
module tb_cpa;

  localparam int unsigned W = 74;

  logic [W-1:0] a, b, sum;
  logic         neg;

  int checks = 0, failures = 0;

  cpa dut (.a(a), .b(b), .sum(sum), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] want;
    for (int i = 0; i < 10000; i++) begin
      a = {$urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom};
      if (i == 0) begin a = '1; b = W'(1); end
      if (i == 1) begin a = '1; b = '0; end
      if (i == 2) begin a = {1'b0, {(W-1){1'b1}}}; b = W'(1); end
      #1;
      want = (W+1)'(a) + (W+1)'(b);
      checks += 2;
      if (sum != want[W-1:0]) begin
        failures++;
        $display("a=%h b=%h: sum %h expected %h", a, b, sum, want[W-1:0]);
      end
      if (neg != want[W-1]) begin
        failures++;
        $display("a=%h b=%h: sign %b", a, b, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
