// maf_stage2_tb: second stage against the exact sum.
// Builds the stage 1 bundle from random normal operands (product given as a
// random carry-save split) with exponent differences spread over the far and
// close ranges and with near cancellation. Checks the path choice (close
// exactly for effective subtractions with df in -1..2), the sign, the biased
// exponent, the significand, round and sticky bits, and that special results
// pass through. The result leaves the stage as two words normalized before
// their addition; the bench adds them and checks that the leading one is in
// the top four bits.
//
// Timing: combinational, one vector per time unit, watchdog after a fixed time.
// The expected values come from the reference package (exact integers).
module maf_stage2_tb;
  import maf_pkg::*;
  import maf_ref_pkg::*;
  s12_t s12;
  s23_t s23;
  int checks = 0, failures = 0, nclose = 0, nfar = 0;
  logic [52:0] man;
  bit rnd, st, ok;
  int fadj;

  maf_stage2 dut (.s12(s12), .s23(s23));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [52:0] mx, my, eman;
    logic [105:0] P;
    logic [63:0] sr;
    int d, s, erel;
    bit ernd, est, eneg, ezero, sw, close;
    for (int i = 0; i < 4000; i++) begin
      mx = {1'b1, 52'({$urandom(), $urandom()})};
      my = {1'b1, 52'({$urandom(), $urandom()})};
      P  = 106'(mx) * 106'(my);
      split(P, s12.psum, s12.pcarry, ezero);
      d  = (i % 3 == 0) ? $urandom_range(0, 3) - 1 : $urandom_range(0, 300) - 150;
      s12.mw = {1'b1, 52'({$urandom(), $urandom()})};
      if (d >= 0 && d <= 1 && i % 2 == 0) s12.mw = 53'(P >> (52 + d)) ^ 53'($urandom_range(0, 7));
      s12.mw[52] = 1'b1;
      s12.ep = 14'($urandom_range(200, 1800));
      s12.df = 14'(d);
      s  = 56 - d;
      s12.sh = 8'((s < 0) ? 0 : (s > 162) ? 162 : s);
      s12.sp = $urandom_range(0, 1);
      sw = $urandom_range(0, 1);
      s12.eff_sub = s12.sp ^ sw;
      s12.spec = (i % 40 == 0);
      sr = {$urandom(), $urandom()};
      s12.spec_res = sr;
      s12.spec_inv = 1'b1;
      #1;
      close = s12.eff_sub && d >= -1 && d <= 2;
      ref_sum(big_t'(P), s12.mw, d, s12.eff_sub, erel, eman, ernd, est, eneg, ezero);
      words_value(s23.ws, s23.wc, s23.sticky, man, rnd, st, fadj, ok);
      checks++;
      if (s23.close !== close || s23.spec !== s12.spec || s23.spec_res !== sr) begin
        failures++;  $display("path/spec wrong d=%0d", d);
      end else if (ezero) begin
        checks++;
        if (man !== '0 || !ok) begin failures++; $display("zero expected"); end
      end else begin
        if (close) nclose++; else nfar++;
        checks++;
        if (!ok || man !== eman || rnd !== ernd || st !== est ||
            int'(s23.exp) + fadj != int'(s12.ep) + erel || s23.sign !== (s12.sp ^ eneg)) begin
          failures++;
          if (failures < 10) $display("P=%h mw=%h d=%0d sub=%b", P, s12.mw, d, s12.eff_sub);
        end
      end
    end
    checks++;
    if (nclose == 0 || nfar == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
