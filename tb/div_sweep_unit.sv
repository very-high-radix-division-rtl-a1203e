// div_sweep_unit: drives one divider of radix 2^B with random operands and checks them.
//
// Helper of tb_radix_sweep. Runs NOPS divisions of random 1/2 <= x <= d < 1 (N bits) on its
// own prescale_divider instance, compares each quotient with floor((X*2^N + D) / (2D)) and the
// latency with the expected cycle count LAT, then raises fin. Counts are read by the parent.
module div_sweep_unit #(
  parameter int unsigned B    = 11,
  parameter int unsigned N    = 54,
  parameter int unsigned LAT  = 9,
  parameter int unsigned NOPS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic fin
);

  logic         start = 1'b0;
  logic [N-1:0] x = '0, d = '0, quotient;
  logic         done, busy;

  prescale_divider #(.B(B), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .d(d),
    .quotient(quotient), .done(done), .busy(busy)
  );

  function automatic logic [N-1:0] expect_q(logic [N-1:0] xv, logic [N-1:0] dv);
    logic [2*N+1:0] num, den;
    num = ({(N+2)'(0), xv} << N) + (2*N+2)'(dv);
    den = (2*N+2)'(dv) << 1;
    return N'(num / den);
  endfunction

  initial begin
    logic [N-1:0] a, b, t;
    int cyc;
    checks   = 0;
    failures = 0;
    fin      = 1'b0;
    @(posedge rst_n);
    for (int i = 0; i < NOPS; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      a[N-1] = 1'b1;
      b[N-1] = 1'b1;
      if (a > b) begin
        t = a; a = b; b = t;
      end
      if (i % 9 == 0) a = b - N'($urandom_range(0, 2));
      @(negedge clk);
      x = a;
      d = b;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 4 * LAT) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (cyc != LAT) begin
        failures++;
        $display("B=%0d: latency %0d, expected %0d", B, cyc, LAT);
      end
      if (quotient != expect_q(a, b)) begin
        failures++;
        if (failures < 5) $display("B=%0d: x=%h d=%h q=%h expected %h", B, a, b, quotient, expect_q(a, b));
      end
    end
    fin = 1'b1;
  end

endmodule
