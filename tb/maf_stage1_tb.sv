// maf_stage1_tb: first stage against independently computed fields.
// For random multiply-add, multiplication and addition operations on normal
// and special operands it checks the carry-save product (psum + pcarry equals
// the product of the significands modulo 2^106), the product exponent and
// sign, the exponent difference (Eq. 2) and shift (Eq. 3), the
// effective-subtraction flag, and, for NaN, infinity and zero operands, the
// special result against the reference model.
//
// Timing: combinational, one vector per time unit, watchdog after a fixed time.
// The formulas checked (Eq. 2, Eq. 3 in the header comments of the RTL) are the
// document's; the special-case conventions are this design's.
module maf_stage1_tb;
  import maf_pkg::*;
  import maf_ref_pkg::*;
  maf_op_e op;
  logic [63:0] x, y, w;
  s12_t s12;
  int checks = 0, failures = 0, nspec = 0;

  maf_stage1 dut (.op(op), .x(x), .y(y), .w(w), .s12(s12));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] pick();
    case ($urandom_range(0, 9))
      0: return 64'h0;
      1: return 64'hFFF0_0000_0000_0000;
      2: return 64'h7FF4_0000_0000_0000;
      3: return {1'b0, 11'd0, 52'd12345};
      default: return rand_fp(1, 2046);
    endcase
  endfunction

  initial begin
    logic [63:0] yy, ww, r;
    logic [3:0] f;
    logic [52:0] mx, my;
    bit spec;
    int ep, d, s;
    for (int i = 0; i < 3000; i++) begin
      op = maf_op_e'($urandom_range(0, 2));
      x = pick();  y = pick();  w = pick();
      #1;
      yy = (op == OP_ADD) ? 64'h3FF0_0000_0000_0000 : y;
      ww = (op == OP_MUL) ? 64'h8000_0000_0000_0000 : w;
      spec = (x[62:52] == 0 || x[62:52] == 11'h7FF || yy[62:52] == 0 || yy[62:52] == 11'h7FF ||
              ww[62:52] == 11'h7FF);
      checks++;
      if (s12.spec !== spec) begin
        failures++;  $display("spec flag x=%h y=%h w=%h op=%0d", x, y, w, op);
      end else if (spec) begin
        nspec++;
        ref_fma(2'(op), x, y, w, r, f);
        checks++;
        if (s12.spec_res !== r || s12.spec_inv !== f[3]) begin
          failures++;  $display("special x=%h y=%h w=%h got %h", x, y, w, s12.spec_res);
        end
      end else begin
        mx = {1'b1, x[51:0]};  my = {1'b1, yy[51:0]};
        ep = int'(x[62:52]) + int'(yy[62:52]) - 1023;
        d  = int'(ww[62:52]) - ep;
        s  = 56 - d;
        if (s < 0) s = 0;
        if (s > 162) s = 162;
        checks++;
        if (106'(s12.psum + s12.pcarry) !== 106'(mx) * 106'(my) || int'(s12.ep) != ep ||
            s12.sp !== (x[63] ^ yy[63])) begin
          failures++;  $display("product x=%h y=%h", x, yy);
        end
        if (ww[62:52] != 0) begin
          checks++;
          if (int'(s12.df) != d || int'(s12.sh) != s || s12.mw !== {1'b1, ww[51:0]} ||
              s12.eff_sub !== (x[63] ^ yy[63] ^ ww[63])) begin
            failures++;  $display("exponent x=%h y=%h w=%h df=%0d sh=%0d", x, yy, ww, s12.df, s12.sh);
          end
        end else begin
          checks++;
          if (s12.mw !== '0 || s12.eff_sub !== 1'b0) begin
            failures++;  $display("zero addend w=%h", ww);
          end
        end
      end
    end
    checks++;
    if (nspec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
