// tb_digit_select: checks the rounding digit selection against floor(y + 1/2).
//
// Random carry-save estimates (RECW integer and 2 fractional bits per word) and every
// combination of the four fraction bits; the digit qs + qc + qf must equal
// floor((ys + yc + 2) / 4) modulo 2^RECW, i.e. the estimate rounded to the nearest integer.
module tb_digit_select;
  import div_pkg::*;

  localparam int unsigned B    = B_DEF;
  localparam int unsigned RECW = recw(B);

  logic [RECW+1:0] ys, yc;
  logic [RECW-1:0] qs, qc;
  logic            qf;

  int checks = 0, failures = 0;

  digit_select dut (.ys(ys), .yc(yc), .qs(qs), .qc(qc), .qf(qf));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RECW+2:0] tot;
    logic [RECW-1:0] want, got;
    for (int i = 0; i < 40000; i++) begin
      ys = (RECW+2)'($urandom);
      yc = (RECW+2)'($urandom);
      if (i < 16) begin
        ys[1:0] = 2'(i >> 2);
        yc[1:0] = 2'(i);
      end
      #1;
      tot  = (RECW+3)'(ys) + (RECW+3)'(yc) + 2;
      want = RECW'(tot >> 2);
      got  = qs + qc + RECW'(qf);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 10) $display("ys=%h yc=%h: digit %h, expected %h", ys, yc, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
