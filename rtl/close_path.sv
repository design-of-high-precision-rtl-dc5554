// close_path: close data path of the multiply-add unit.
//
// Used for effective subtractions with exponent difference df = EW - ep in
// -1..2, where the product (in [1,4) times 2^ep) and the addend can cancel
// down to a few bits or to zero. The addend needs no alignment shifter here:
// it is placed at one of four fixed offsets (bits 51+1+df up), a 4-input
// multiplexer. One 4:2 carry-save adder takes the two product words, the
// inverted addend and a word with the +1 of the two's complement and the
// removal of the 2^106 the carry-save product words may carry (pcout). An
// adder gives the signed difference, the complement stage takes its absolute
// value, and the normalization shifter moves the leading one to the top by
// the count of the leading-zero counter. Both operands fit in the 108-bit
// window, so nothing is lost and no sticky bit enters. An exact zero leaves
// as an all-zero significand. Purely combinational.
//
// Origin: a close path for massive cancellation with a normalization shifter and
// no alignment shifter, a 4:2 CSA at its head and two's-complement vectors
// follow the document. The window -1..2 (the document gives -1..1), the exact
// leading-zero count after the adder instead of an anticipator and the 2^106
// correction are this design's choices.
module close_path
  import maf_pkg::*;
(
  input  logic [PROD_W-1:0]      psum, pcarry,
  input  logic                   pcout,      // psum + pcarry >= 2^106
  input  logic [MAN_W-1:0]       mw,
  input  logic [1:0]             df_lo,      // df in -1 .. 2, two low bits
  output logic [MAN_W-1:0]       man,
  output logic                   rnd,
  output logic                   sticky,
  output logic signed [SE_W-1:0] exp_adj,
  output logic                   neg
);
  localparam int unsigned CW  = PROD_W + 2;      // 108
  localparam int unsigned LCW = $clog2(CW + 1);

  logic [CW-1:0]  wa, ra, rb, rc, rd, cs, cc, d, mag, norm;
  logic [LCW-1:0] lz;

  always_comb begin
    unique case (df_lo)
      2'b11:   wa = CW'(mw) << (FRAC_W - 1);   // df = -1
      2'b00:   wa = CW'(mw) << FRAC_W;         // df =  0
      2'b01:   wa = CW'(mw) << (FRAC_W + 1);   // df =  1
      default: wa = CW'(mw) << (FRAC_W + 2);   // df =  2
    endcase
    ra = CW'(psum);
    rb = CW'(pcarry);
    rc = ~wa;
    rd = {{2{pcout}}, {(CW-3){1'b0}}, 1'b1};
  end

  csa42 #(.W(CW)) u_csa (.a(ra), .b(rb), .c(rc), .d(rd), .s(cs), .cy(cc));

  lzc #(.W(CW)) u_lzc (.v(mag), .cnt(lz));

  always_comb begin
    d       = cs + cc;
    neg     = d[CW-1];
    mag     = neg ? (~d + 1'b1) : d;
    norm    = mag << lz;
    man     = norm[CW-1 -: MAN_W];
    rnd     = norm[CW-1-MAN_W];
    sticky  = |norm[CW-2-MAN_W:0];
    // Leading one at bit CW-1-lz; the product integer bit is bit 104.
    exp_adj = $signed(SE_W'(CW - 1 - (PROD_W - 2))) - $signed(SE_W'(lz));
  end
endmodule
