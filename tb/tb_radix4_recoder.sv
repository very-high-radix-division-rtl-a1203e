// tb_radix4_recoder: checks the carry-save to radix-4 recoding.
//
// For random carry-save operands: every digit must lie in {-2..2}; the digits must
// represent s + c + f modulo 2^RECW; and when that value, read as a signed number, is
// smaller in magnitude than 2^RECW/3 (the case of every operand the divider feeds in), the
// digits must give it exactly. Operands are drawn both at random and as random carry-save
// splits of small values.
module tb_radix4_recoder;
  import div_pkg::*;

  localparam int unsigned B    = B_DEF;
  localparam int unsigned RECW = recw(B);
  localparam int unsigned ND   = ndig(B);

  logic [RECW-1:0] s, c;
  logic            f;
  r4digit_t        dig [ND];

  int checks = 0, failures = 0;

  radix4_recoder dut (.s(s), .c(c), .f(f), .dig(dig));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint val, v, lim;
    logic [RECW-1:0] modv;
    lim = (longint'(1) << RECW) / 3;
    for (int i = 0; i < 40000; i++) begin
      f = 1'($urandom);
      s = RECW'($urandom);
      if (i % 2 == 0) begin
        v = longint'($urandom_range(0, 2 * lim)) - lim;
        c = RECW'(v) - s - RECW'(f);
      end else begin
        c = RECW'($urandom);
      end
      #1;
      val = 0;
      for (int k = ND - 1; k >= 0; k--) begin
        checks++;
        if (dig[k] > 3'sd2 || dig[k] < -3'sd2) begin
          failures++;
          $display("digit %0d out of range", k);
        end
        val = val * 4 + longint'(dig[k]);
      end
      modv = s + c + RECW'(f);
      checks++;
      if (RECW'(val) != modv) begin
        failures++;
        if (failures < 10) $display("s=%h c=%h f=%b: digits give %0d, expected %h mod 2^RECW", s, c, f, val, modv);
      end
      v = longint'(signed'(modv));
      if (v < lim && v > -lim) begin
        checks++;
        if (val != v) begin
          failures++;
          if (failures < 10) $display("s=%h c=%h f=%b: digits give %0d, expected %0d", s, c, f, val, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
