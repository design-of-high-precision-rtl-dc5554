// far_path: far data path of the multiply-add unit.
//
// Used for effective additions and for effective subtractions whose exponent
// difference df = EW - ep lies outside -1..2, where at most one leading bit
// can cancel. On this path the sign of the result is known before any
// addition: for a subtraction with df >= 3 the addend is larger (W >= 8 * 2^ep
// against a product below 4 * 2^ep), for df <= -2 the product is. So the
// smaller operand is the one negated, and the sum is never negative.
//
// The addend is aligned against the carry-save product by the alignment
// shifter (sh of Eq. 3, 161-bit frame, sticky bit). One 4:2 carry-save adder
// then takes four words:
//   product dominates: psum, pcarry, the aligned addend (inverted for a
//     subtraction) and a word with the +1 of its two's complement (left out
//     when the sticky bit is set, which accounts for the part of the addend
//     shifted out) and the removal of the 2^106 that the carry-save product
//     words may carry above their true sum (pcout);
//   addend dominates (subtraction, df >= 3): the inverted product words, the
//     addend and a word with +2 and +2^106 when pcout is set. No addend bit
//     is shifted out in this case.
//
// Normalization before addition: no large cancellation happens here, so the
// leading one of the sum lies within four bits of a position known from df
// alone: bit 104 + clamp(df,0,56) of the frame, plus 2 down to minus 1. Both
// carry-save words are shifted left by 56 - clamp(df,0,56), which brings that
// region to the top four bits of the 163-bit words without adding them
// (the shifted-out top bits of the two words cancel, as their sum fits).
// The final addition, the remaining shift of 0..3 bits and rounding are in
// stage 3 (round_unit). The document gives the far path its alignment
// shifter and the normalization before the final addition; the shift set by
// df is this design's way of doing that normalization without counting
// leading zeros.
//
// Outputs: the two normalized words, the alignment sticky bit, the exponent
// of the top bit relative to the product exponent ep, and whether the sign
// flips (W dominates a subtraction). Purely combinational.
module far_path
  import maf_pkg::*;
(
  input  logic [PROD_W-1:0]      psum, pcarry,
  input  logic                   pcout,      // psum + pcarry >= 2^106
  input  logic [MAN_W-1:0]       mw,
  input  logic [SH_W-1:0]        sh,
  input  logic signed [SE_W-1:0] df,
  input  logic                   eff_sub,
  output logic [NRM_W-1:0]       ws,
  output logic [NRM_W-1:0]       wc,
  output logic                   sticky,
  output logic signed [SE_W-1:0] exp_adj,
  output logic                   neg
);
  localparam int unsigned TW   = NRM_W;     // 163: frame, carry and sign bit
  localparam int unsigned MAXC = SH_OFS;    // 56: largest useful df

  logic [ALN_W-1:0] wa;
  logic             st;
  logic [TW-1:0]    ra, rb, rc, rd, cs, cc;
  logic [SH_W-1:0]  cd;          // clamp(df, 0, 56)

  align_shifter #(.IN_W(MAN_W), .FW(ALN_W), .SH_W(SH_W)) u_align (
    .m(mw), .sh(sh), .a(wa), .sticky(st)
  );

  always_comb begin
    neg = eff_sub && (df > $signed(SE_W'(2)));
    rd  = '0;
    if (neg) begin
      // W - P = W + ~psum + 1 + ~pcarry + 1 (+ 2^106 if pcout).
      ra    = ~TW'(psum);
      rb    = ~TW'(pcarry);
      rc    = TW'(wa);
      rd[1] = 1'b1;
      rd[PROD_W] = pcout;
    end else begin
      // P +- W, P = psum + pcarry (- 2^106 if pcout).
      ra    = TW'(psum);
      rb    = TW'(pcarry);
      rc    = eff_sub ? ~TW'(wa) : TW'(wa);
      rd[0] = eff_sub && !st;
      if (pcout) rd[TW-1:PROD_W] = '1;     // -2^106
    end
  end

  csa42 #(.W(TW)) u_csa (.a(ra), .b(rb), .c(rc), .d(rd), .s(cs), .cy(cc));

  always_comb begin
    if (df < 0)                          cd = '0;
    else if (df > $signed(SE_W'(MAXC)))  cd = SH_W'(MAXC);
    else                                 cd = SH_W'(df);

    // Bring bit 106 + cd of the sum to the top of the words.
    ws      = cs << (SH_W'(MAXC) - cd);
    wc      = cc << (SH_W'(MAXC) - cd);
    sticky  = st;
    // The top bit is frame bit 106 + cd; above 56 the addend was held at the
    // top of the frame, which adds df - 56.
    exp_adj = ((df > 0) ? df : '0) + $signed(SE_W'(2));
  end

endmodule
