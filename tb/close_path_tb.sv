// close_path_tb: close data path against the exact difference.
// Effective subtractions with exponent difference -1..2: random products and
// addends, and products built as the addend plus small noise so that the
// difference cancels to a few bits, to zero, or changes sign. The normalized
// significand, round and sticky bits, exponent adjustment and sign flip must
// equal those of the exact P - W; an exact zero must give a zero significand.
//
// Timing: combinational, one vector per time unit, watchdog after a fixed time.
// The expected values come from the reference package (exact integers), not
// from the block's structure. The -1..2 window tested is this design's choice.
module close_path_tb;
  import maf_pkg::*;
  import maf_ref_pkg::*;
  logic [105:0] ps, pc;
  logic pcout, rnd, st, neg;
  logic [52:0] mw, man;
  logic [1:0] df_lo;
  logic signed [13:0] adj;
  int checks = 0, failures = 0, zeros = 0;

  close_path dut (.psum(ps), .pcarry(pc), .pcout(pcout), .mw(mw), .df_lo(df_lo),
                  .man(man), .rnd(rnd), .sticky(st), .exp_adj(adj), .neg(neg));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [105:0] P, wv;
    logic [52:0] eman;
    logic signed [63:0] noise;
    int d, erel;
    bit ernd, est, eneg, ezero;
    for (int i = 0; i < 4000; i++) begin
      d  = $urandom_range(0, 3) - 1;
      mw = {1'b1, 52'({$urandom(), $urandom()})};
      P  = {$urandom(), $urandom(), $urandom(), $urandom()};
      P[105:104] = 2'($urandom_range(1, 3));
      wv = 106'(mw) << (52 + d);
      case ($urandom_range(0, 3))
        0: ;
        1: P = wv;
        2: begin noise = 64'($signed($urandom())); P = wv + 106'(noise); end
        default: begin
          noise = {$urandom(), $urandom()} >> $urandom_range(0, 63);
          if ($urandom_range(0, 1) != 0) noise = -noise;
          P = wv + 106'(noise);
        end
      endcase
      // df = 2 cancels only for W = 4.0 against a product just below 4.0.
      if (d == 2 && i % 2 == 0) begin
        mw = {1'b1, 52'd0};
        P  = '0 - 106'($urandom_range(1, 1 << 20));
      end
      split(P, ps, pc, pcout);
      df_lo = 2'(d);
      #1;
      ref_sum(big_t'(P), mw, d, 1'b1, erel, eman, ernd, est, eneg, ezero);
      checks++;
      if (ezero) begin
        zeros++;
        if (man !== '0) begin failures++; $display("zero expected, P=%h", P); end
      end else if (man !== eman || rnd !== ernd || st !== est || int'(adj) != erel || neg !== eneg) begin
        failures++;
        if (failures < 10)
          $display("P=%h mw=%h df=%0d got %h %b %b %0d %b exp %h %b %b %0d %b", P, mw, d,
                   man, rnd, st, adj, neg, eman, ernd, est, erel, eneg);
      end
    end
    checks++;
    if (zeros == 0) begin failures++; $display("no exact cancellation tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
