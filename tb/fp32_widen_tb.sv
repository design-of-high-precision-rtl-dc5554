// fp32_widen_tb: the widened value of every kind of binary32 input must be
// the same number in binary64 (checked through the simulator's own
// conversion for normal numbers), zero for subnormals, and keep infinity and
// NaN. The narrowing helper used for special results must give the binary32
// value back (quiet NaN 7FC00000 for every NaN).
//
// How: 3000 random binary32 words, a tenth each with all-ones and all-zero
// exponents. Timing: combinational, watchdog after a fixed time. Both helpers
// are this design's choices for the document's single-precision mode.
module fp32_widen_tb;
  logic [31:0] a, n;
  logic [63:0] y;
  int checks = 0, failures = 0;

  fp32_widen dut (.a(a), .y(y));
  fp64_narrow u_n (.a(y), .y(n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    for (int i = 0; i < 3000; i++) begin
      a = $urandom();
      if (i % 10 == 1) a[30:23] = 8'hFF;
      if (i % 10 == 2) a[30:23] = 8'h00;
      if (i % 10 == 3) a[22:0] = '0;
      #1;
      checks++;
      if (a[30:23] == 0) begin
        if (y !== {a[31], 63'd0} || n !== {a[31], 31'd0}) begin failures++; $display("sub %h", a); end
      end else if (a[30:23] == 8'hFF) begin
        if (y[62:52] !== 11'h7FF || y[51:29] !== a[22:0] || y[28:0] !== '0 || y[63] !== a[31] ||
            n !== ((a[22:0] != 0) ? 32'h7FC0_0000 : a)) begin
          failures++; $display("inf/nan %h -> %h", a, y);
        end
      end else begin
        // Value of a: (1.f) * 2^(e - 127), built with real arithmetic.
        r = 1.0 + real'(a[22:0]) / 8388608.0;
        for (int k = 127; k < int'(a[30:23]); k++) r = r * 2.0;
        for (int k = int'(a[30:23]); k < 127; k++) r = r / 2.0;
        if (a[31]) r = -r;
        if (y !== $realtobits(r) || n !== a) begin failures++; $display("normal %h -> %h", a, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
