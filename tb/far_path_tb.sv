// far_path_tb: far data path against the exact sum.
// Random products (given as a random carry-save split), addends with exponent
// differences from -450 to +600 (effective additions anywhere, effective
// subtractions outside -1..2) and zero addends. The significand, round and
// sticky bits, exponent adjustment and sign flip must equal those of the
// exactly computed and normalized P +- W. The block hands over two words
// normalized before their addition; the bench adds them, checks that the
// leading one is in the top four bits, and normalizes the rest of the way.
//
// Timing: combinational, one vector per time unit, watchdog after a fixed time.
// The expected values come from the reference package (exact integers).
module far_path_tb;
  import maf_pkg::*;
  import maf_ref_pkg::*;
  logic [105:0] ps, pc;
  logic pcout, eff_sub, rnd, st, neg;
  logic [52:0] mw, man;
  logic [162:0] ws, wc;
  logic ast;
  int fadj;
  bit ok;
  logic [7:0] sh;
  logic signed [13:0] df, adj;
  int checks = 0, failures = 0;

  far_path dut (.psum(ps), .pcarry(pc), .pcout(pcout), .mw(mw), .sh(sh), .df(df),
                .eff_sub(eff_sub), .ws(ws), .wc(wc), .sticky(ast), .exp_adj(adj), .neg(neg));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [105:0] P;
    logic [52:0] mx, my, eman;
    int d, s, erel;
    bit ernd, est, eneg, ezero;
    for (int i = 0; i < 4000; i++) begin
      mx = {1'b1, 52'({$urandom(), $urandom()})};
      my = {1'b1, 52'({$urandom(), $urandom()})};
      if (i % 7 == 0) begin mx = '1; my = '1; end
      P = 106'(mx) * 106'(my);
      split(P, ps, pc, pcout);
      mw = {1'b1, 52'({$urandom(), $urandom()})};
      if (i % 5 == 0) mw = '1;
      eff_sub = $urandom_range(0, 1);
      case ($urandom_range(0, 3))
        0:       d = $urandom_range(0, 1050) - 450;
        1:       d = $urandom_range(0, 120) - 60;
        2:       d = $urandom_range(0, 12) - 6;
        default: d = $urandom_range(0, 40) + 40;
      endcase
      if (eff_sub && d >= -1 && d <= 2) d = 3;
      if (i % 50 == 0) begin mw = '0; eff_sub = 0; d = -8192; end
      df = 14'(d);
      s = 56 - d;
      if (s < 0) s = 0;
      if (s > 162) s = 162;
      sh = 8'(s);
      #1;
      ref_sum(big_t'(P), mw, (mw == 0) ? -1000 : d, eff_sub, erel, eman, ernd, est, eneg, ezero);
      words_value(ws, wc, ast, man, rnd, st, fadj, ok);
      checks++;
      if (!ok || man !== eman || rnd !== ernd || st !== est || int'(adj) + fadj != erel || neg !== eneg) begin
        failures++;
        if (failures < 10)
          $display("P=%h mw=%h df=%0d sub=%b got %h %b %b %0d %b exp %h %b %b %0d %b", P, mw, d,
                   eff_sub, man, rnd, st, adj, neg, eman, ernd, est, erel, eneg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
