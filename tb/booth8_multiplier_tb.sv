// booth8_multiplier_tb: the carry-save product (sum + carry mod 2^106) must
// equal x * y for corner operands (0, 1, all ones, 1.0 and 2.0 - ulp as
// significands, the operands of the unit's waveform example) and random ones.
//
// How: 3000 random pairs plus corners, expected value from the simulator's own
// 106-bit multiplication. Timing: combinational, watchdog after a fixed time.
// The example operands are taken from the document's waveform figure; its
// printed sum and carry words are not used, since any split with the right sum
// is correct.
module booth8_multiplier_tb;
  localparam int N = 53;
  logic [N-1:0] x, y;
  logic [2*N-1:0] s, c;
  int checks = 0, failures = 0;

  booth8_multiplier #(.N(N)) dut (.x(x), .y(y), .sum(s), .carry(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if ((2*N)'(s + c) !== (2*N)'(x) * (2*N)'(y)) begin
      failures++;
      $display("x=%h y=%h got %h", x, y, (2*N)'(s + c));
    end
  endtask

  initial begin
    logic [N-1:0] corner [7] = '{'0, 53'd1, '1, {1'b1, 52'd0}, '1, 53'h06722E54320130,
                                 53'h0BA5F001543210};
    foreach (corner[i]) foreach (corner[j]) begin
      x = corner[i];  y = corner[j];  check();
    end
    for (int i = 0; i < 3000; i++) begin
      x = N'({$urandom(), $urandom()});
      y = N'({$urandom(), $urandom()});
      if (i % 3 == 0) x[N-1] = 1'b1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
