// tb_mult_acc: checks the carry-save multiplier-accumulator against wide integer arithmetic.
//
// Random radix-4 digits in {-2..2}, multiplicands and accumulator words in both modes;
// out_s + out_c must equal acc_s + acc_c - value(dig)*y (MA_RECUR) or value(dig)*y
// (MA_PRODUCT), modulo 2^RWW.
module tb_mult_acc;
  import div_pkg::*;

  localparam int unsigned B  = B_DEF;
  localparam int unsigned N  = N_DEF;
  localparam int unsigned ND = ndig(B);
  localparam int unsigned W  = rww(B, N);
  localparam int unsigned YW = yw(B, N);

  ma_mode_e       mode;
  r4digit_t       dig [ND];
  logic [YW-1:0]  y;
  logic [W-1:0]   acc_s, acc_c, out_s, out_c;

  int checks = 0, failures = 0;

  mult_acc dut (.mode(mode), .dig(dig), .y(y), .acc_s(acc_s), .acc_c(acc_c),
                                .out_s(out_s), .out_c(out_c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [159:0] dv, want;
    logic [W-1:0] got;
    for (int i = 0; i < 20000; i++) begin
      mode = (i % 2) ? MA_RECUR : MA_PRODUCT;
      dv = 0;
      for (int k = ND - 1; k >= 0; k--) begin
        dig[k] = r4digit_t'($urandom_range(0, 4) - 2);
        if (i % 5 == 0) dig[k] = (k % 2) ? -3'sd2 : 3'sd2;
        dv = dv * 4 + 160'(dig[k]);
      end
      y     = {$urandom, $urandom, $urandom};
      acc_s = {$urandom, $urandom, $urandom};
      acc_c = {$urandom, $urandom, $urandom};
      #1;
      if (mode == MA_RECUR) want = 160'(acc_s) + 160'(acc_c) - dv * 160'(y);
      else                  want = dv * 160'(y);
      got = out_s + out_c;
      checks++;
      if (got != W'(want)) begin
        failures++;
        if (failures < 10) $display("mode %0d y=%h: got %h expected %h", mode, y, got, W'(want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
