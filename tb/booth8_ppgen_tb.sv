// booth8_ppgen_tb: the partial product row plus its +1 must equal digit * x
// for every digit -4..+4 and random multiplicands (including all ones).
//
// How: 400 random multiplicands times the 9 digits; expected value is the
// product computed by the simulator. Timing: combinational, watchdog after a
// fixed time. The digit set is the document's.
module booth8_ppgen_tb;
  localparam int N = 53;
  logic [N-1:0] x;
  logic [N+1:0] x3;
  logic neg, one, two, three, four, nb;
  logic [N+2:0] row;
  int checks = 0, failures = 0;

  booth8_ppgen #(.N(N)) dut (.x(x), .x3(x3), .neg(neg), .one(one), .two(two), .three(three),
                             .four(four), .row(row), .neg_out(nb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [N+5:0] want, got;
    int a;
    for (int i = 0; i < 400; i++) begin
      x  = (i == 0) ? '1 : N'({$urandom(), $urandom()});
      x3 = 3 * (N+2)'(x);
      for (int d = -4; d <= 4; d++) begin
        a = (d < 0) ? -d : d;
        neg = d < 0;  one = a == 1;  two = a == 2;  three = a == 3;  four = a == 4;
        #1;
        want = (N+6)'(d) * $signed({6'b0, x});
        got  = $signed({{3{row[N+2]}}, row}) + (N+6)'(nb);
        checks++;
        if (got !== want) begin
          failures++;
          $display("x=%h d=%0d row=%h nb=%b", x, d, row, nb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
