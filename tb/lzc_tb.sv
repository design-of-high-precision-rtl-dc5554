// lzc_tb: leading-zero count of random 108-bit vectors with every position of
// the leading one, and of zero (count 108).
//
// How: for each leading-one position, random bits below it. Timing:
// combinational, watchdog after a fixed time.
module lzc_tb;
  localparam int W = 108;
  logic [W-1:0] v;
  logic [6:0] cnt;
  int checks = 0, failures = 0;

  lzc #(.W(W)) dut (.v(v), .cnt(cnt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -1; k < W; k++) begin
      for (int i = 0; i < 5; i++) begin
        v = W'({$urandom(), $urandom(), $urandom(), $urandom()});
        if (k < 0) v = '0;
        else begin
          v = v & ((W'(1) << k) - 1);
          v[k] = 1'b1;
        end
        #1;
        checks++;
        if (int'(cnt) != ((k < 0) ? W : W - 1 - k)) begin
          failures++;
          $display("v=%h cnt=%0d", v, cnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
