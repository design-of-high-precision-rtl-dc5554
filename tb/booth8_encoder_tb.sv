// booth8_encoder_tb: exhaustive test of the radix-8 Booth recoder.
// For all 16 groups {y[t+2], y[t+1], y[t], y[t-1]} the digit given by the
// encoder (sign and one-hot magnitude) must equal
// -4*y[t+2] + 2*y[t+1] + y[t] + y[t-1], and the selects must be one-hot or
// all low for a zero digit.
//
// Timing: combinational, one vector per time unit, watchdog after a fixed time.
// The table checked is the document's radix-8 recoding table, written here as
// the formula above.
module booth8_encoder_tb;
  logic [3:0] grp;
  logic neg, one, two, three, four;
  int checks = 0, failures = 0;

  booth8_encoder dut (.grp(grp), .neg(neg), .one(one), .two(two), .three(three), .four(four));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got, mag;
    for (int g = 0; g < 16; g++) begin
      grp = 4'(g);
      #1;
      want = -4 * g[3] + 2 * g[2] + g[1] + g[0];
      mag  = one + 2 * two + 3 * three + 4 * four;
      got  = neg ? -mag : mag;
      checks++;
      if (got != want || (one + two + three + four) > 1 || (neg && mag == 0)) begin
        failures++;
        $display("grp=%b want %0d got %0d", grp, want, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
