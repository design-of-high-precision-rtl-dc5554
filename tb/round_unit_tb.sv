// round_unit_tb: third stage against a direct model of round-to-nearest-even.
// Random normalized significands (with all-ones ones to force the carry out),
// round and sticky bits, and exponents from below 1 to above 2046 are rounded
// and packed; the result and flags must match, as must the zero, underflow,
// overflow and special-result cases, in binary64 and in single-precision
// mode (rounding at the 24th significand bit, binary32 packing). Each value
// is handed over as stage 2 does: a random split into two words, with the
// leading one 0..3 bits below the top, so the final addition and the last
// normalization shift of the stage are checked too.
//
// Timing: combinational, one vector per time unit, watchdog after a fixed time.
// The rounding rule is the document's; the flush-to-zero and overflow
// conventions checked are this design's.
module round_unit_tb;
  import maf_pkg::*;
  s23_t s23;
  logic single;
  logic [63:0] res;
  maf_flags_t flags;
  int checks = 0, failures = 0;

  round_unit dut (.s23(s23), .single(single), .res(res), .flags(flags));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] er;
    logic [3:0] ef;
    logic [53:0] m;
    logic [24:0] m24;
    logic [31:0] sv;
    bit r, st;
    int e;
    logic [52:0] man;
    logic [13:0] ex;
    bit rnd, stk;
    logic [162:0] t;
    int f;
    for (int i = 0; i < 5000; i++) begin
      s23 = '0;
      s23.sign   = $urandom_range(0, 1);
      man    = {1'b1, 52'({$urandom(), $urandom()})};
      if (i % 6 == 0) man = '1;
      if (i % 97 == 0) man = '0;
      rnd    = $urandom_range(0, 1);
      stk = $urandom_range(0, 1);
      ex    = (i % 4 == 0) ? 14'($urandom_range(0, 2060) - 6) : 14'($urandom_range(1, 2046));
      s23.spec   = (i % 50 == 0);
      s23.spec_res = {$urandom(), $urandom()};
      s23.spec_inv = $urandom_range(0, 1);
      single = (i % 3 == 0);
      if (single) begin
        ex = (i % 4 == 0) ? 14'($urandom_range(0, 270) + 890) : 14'($urandom_range(897, 1150));
        // Special results in this mode are widened binary32 values.
        sv = $urandom();
        if (i % 200 == 0) sv[30:23] = 8'hFF;
        if (sv[30:23] == 0) sv[30:23] = 8'd1;
        s23.spec_res = {sv[31], (sv[30:23] == 8'hFF) ? 11'h7FF : 11'(int'(sv[30:23]) + 896),
                        sv[22:0], 29'd0};
      end
      // Hand the value over as stage 2 does: two words whose sum has its
      // leading one f = 0..3 bits below the top, sticky either in the low
      // bits of the words or in the separate sticky bit.
      f = $urandom_range(0, 3);
      t = {man, rnd, 109'd0};
      if (stk) begin
        if ($urandom_range(0, 1) == 0) s23.sticky = 1'b1;
        else t[$urandom_range(3, 108)] = 1'b1;
        if ($urandom_range(0, 1) == 0) t[108:3] = t[108:3] | 106'({$urandom(), $urandom(), $urandom(), $urandom()});
      end
      t = t >> f;
      s23.exp = 14'(int'(ex) + f);
      s23.ws  = 163'({$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()});
      s23.wc  = t - s23.ws;
      #1;
      ef = '0;
      if (single) begin
        if (s23.spec) begin
          er = (sv[30:23] == 8'hFF && sv[22:0] != 0) ? 64'h7FC0_0000 : {32'd0, sv};
          ef[3] = s23.spec_inv;
        end else if (!man[52]) begin
          er = '0;
        end else if (int'(ex) - 896 < 1) begin
          er = {32'd0, s23.sign, 31'd0};  ef = 4'b0011;
        end else begin
          e   = int'(ex) - 896;
          r   = man[28];
          st  = (man[27:0] != 0) || rnd || stk;
          m24 = {1'b0, man[52:29]};
          if (r && (st || m24[0])) m24 = m24 + 1;
          if (m24[24]) begin m24 = m24 >> 1; e++; end
          if (e >= 255) begin
            er = {32'd0, s23.sign, 8'hFF, 23'd0};  ef = 4'b0101;
          end else begin
            er = {32'd0, s23.sign, 8'(e), m24[22:0]};  ef[0] = r | st;
          end
        end
      end else if (s23.spec) begin
        er = s23.spec_res;  ef[3] = s23.spec_inv;
      end else if (!man[52]) begin
        er = '0;
      end else if (int'(ex) < 1) begin
        er = {s23.sign, 63'd0};  ef = 4'b0011;
      end else begin
        e = int'(ex);
        m = {1'b0, man};
        if (rnd && (stk || man[0])) m = m + 1;
        if (m[53]) begin m = m >> 1; e++; end
        if (e >= 2047) begin
          er = {s23.sign, 11'h7FF, 52'd0};  ef = 4'b0101;
        end else begin
          er = {s23.sign, 11'(e), m[51:0]};  ef[0] = rnd | stk;
        end
      end
      checks++;
      if (res !== er || flags !== ef) begin
        failures++;
        if (failures < 10) $display("man=%h exp=%0d r=%b s=%b got %h %b exp %h %b", man,
                                    ex, rnd, stk, res, flags, er, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
