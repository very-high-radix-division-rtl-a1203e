// tb_div_control: checks the cycle sequence of the controller.
//
// After start in IDLE the states must run MD, MX, NIT times ITER, POST, IDLE, with load_m in
// the start cycle only, first in the first and last in the last ITER cycle, and busy high
// from MD to POST; a start while busy must not disturb the sequence; no start, no change.
module tb_div_control;
  import div_pkg::*;

  localparam int unsigned B   = B_DEF;
  localparam int unsigned N   = N_DEF;
  localparam int unsigned NIT = niter(B, N);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  div_state_e state;
  logic load_m, first, last, busy;

  int checks = 0, failures = 0;

  div_control dut (.clk(clk), .rst_n(rst_n), .start(start), .state(state),
                                   .load_m(load_m), .first(first), .last(last), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(div_state_e st, logic lm, logic fi, logic la, logic bz);
    checks++;
    if (state != st || load_m != lm || first != fi || last != la || busy != bz) begin
      failures++;
      $display("t=%0t state %s load_m %b first %b last %b busy %b; expected %s %b %b %b %b",
               $time, state.name(), load_m, first, last, busy, st.name(), lm, fi, la, bz);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_state(ST_IDLE, 0, 0, 0, 0);
    @(negedge clk);
    expect_state(ST_IDLE, 0, 0, 0, 0);
    for (int t = 0; t < 20; t++) begin
      start = 1'b1;
      #1 expect_state(ST_IDLE, 1, 0, 0, 0);
      @(negedge clk);
      start = (t % 2 == 1);  // start held high while busy must be ignored
      expect_state(ST_MD, 0, 0, 0, 1);
      @(negedge clk);
      expect_state(ST_MX, 0, 0, 0, 1);
      for (int j = 0; j < NIT; j++) begin
        @(negedge clk);
        expect_state(ST_ITER, 0, j == 0, j == NIT - 1, 1);
      end
      @(negedge clk);
      start = 1'b0;
      expect_state(ST_POST, 0, 0, 0, 1);
      @(negedge clk);
      expect_state(ST_IDLE, 0, 0, 0, 0);
      repeat (t % 3) begin
        @(negedge clk);
        expect_state(ST_IDLE, 0, 0, 0, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
