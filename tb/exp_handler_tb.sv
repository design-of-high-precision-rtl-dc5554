// exp_handler_tb: checks ep = EX + EY - 1023, df = EW - ep (Eq. 2) and
// sh = EX + EY - EW - 967 (Eq. 3), saturated to 0..162, on random and extreme
// exponents.
//
// How: 3000 random and extreme exponent triples against the formulas computed
// in integers. Timing: combinational, watchdog after a fixed time. The formulas
// are the document's; the saturation is this design's.
module exp_handler_tb;
  import maf_pkg::*;
  logic [10:0] ex, ey, ew;
  logic signed [SE_W-1:0] ep, df;
  logic [SH_W-1:0] sh;
  int checks = 0, failures = 0;

  exp_handler dut (.ex(ex), .ey(ey), .ew(ew), .ep(ep), .df(df), .sh(sh));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int i = 0; i < 3000; i++) begin
      ex = 11'($urandom());  ey = 11'($urandom());  ew = 11'($urandom());
      if (i < 8) begin ex = i[0] ? 11'h7FE : 11'd1; ey = i[1] ? 11'h7FE : 11'd1; ew = i[2] ? 11'h7FE : 11'd1; end
      if (i % 4 == 1) ew = 11'(int'(ex) + int'(ey) - 1023 + $urandom_range(0, 130) - 70);
      #1;
      s = int'(ex) + int'(ey) - int'(ew) - 967;
      if (s < 0) s = 0;
      if (s > 162) s = 162;
      checks++;
      if (int'(ep) != int'(ex) + int'(ey) - 1023 || int'(df) != int'(ew) - (int'(ex) + int'(ey) - 1023) ||
          int'(sh) != s) begin
        failures++;
        $display("ex=%0d ey=%0d ew=%0d ep=%0d df=%0d sh=%0d", ex, ey, ew, ep, df, sh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
