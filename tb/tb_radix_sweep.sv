// tb_radix_sweep: the divider at the other radices evaluated for 54-bit quotients.
//
// Three dividers, radix 2^11, 2^14 and 2^18 with N = 54, each run 1000 random divisions and
// are checked against exact integer arithmetic; their latencies must be 9, 8 and 7 cycles
// (ceil(54/B) + 4). The radix-2^9 default is covered by tb_prescale_divider.
module tb_radix_sweep;

  localparam int unsigned NOPS = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  int   c11, f11, c14, f14, c18, f18;
  logic fin11, fin14, fin18;
  int   checks, failures;

  always #5 clk = ~clk;

  div_sweep_unit #(.B(11), .N(54), .LAT(9), .NOPS(NOPS)) u11 (.clk(clk), .rst_n(rst_n), .checks(c11), .failures(f11), .fin(fin11));
  div_sweep_unit #(.B(14), .N(54), .LAT(8), .NOPS(NOPS)) u14 (.clk(clk), .rst_n(rst_n), .checks(c14), .failures(f14), .fin(fin14));
  div_sweep_unit #(.B(18), .N(54), .LAT(7), .NOPS(NOPS)) u18 (.clk(clk), .rst_n(rst_n), .checks(c18), .failures(f18), .fin(fin18));

  initial begin
    repeat (NOPS * 40 + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c11 + c14 + c18, f11 + f14 + f18 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin11 && fin14 && fin18);
    checks   = c11 + c14 + c18;
    failures = f11 + f14 + f18;
    $display("B=11: %0d checks %0d failures; B=14: %0d/%0d; B=18: %0d/%0d", c11, f11, c14, f14, c18, f18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
