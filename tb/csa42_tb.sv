// csa42_tb: s + cy must equal a + b + c + d modulo 2^W for random and
// all-ones words.
//
// How: 2000 random vectors and all-ones words. Timing: combinational, one
// vector per time unit, watchdog after a fixed time.
module csa42_tb;
  localparam int W = 106;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  csa42 #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .s(s), .cy(cy));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom(), $urandom(), $urandom(), $urandom()});
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = rnd();  b = rnd();  c = rnd();  d = rnd();
      if (i < 4) begin a = '1; b = '1; c = (i > 1) ? '1 : '0; d = (i[0]) ? '1 : '0; end
      #1;
      checks++;
      if (W'(s + cy) !== W'(a + b + c + d)) begin
        failures++;
        $display("a=%h b=%h c=%h d=%h s=%h cy=%h", a, b, c, d, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
