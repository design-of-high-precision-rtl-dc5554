// exp_handler: exponent handling of the multiply-add unit.
//
// From the biased exponents of X, Y and W it forms the biased exponent of the
// product, ep = EX + EY - BIAS, the exponent difference df = EW - ep (Eq. 2 of
// the design, for binary64 df = EW - (EX + EY - 1023)) and the alignment shift
// of the addend, sh = (MAN_W + 3) - df (Eq. 3, sh = 56 - df = EX + EY - EW - 967).
// sh places the addend, which starts 56 bits left of the product's binary
// point, over the product in a 161-bit frame. sh is saturated to 0 (addend so
// large that the product only counts as sticky) and to ALN_W + 1 (addend
// entirely below the frame). Purely combinational; the same module is
// instantiated twice, once in stage 1 and once in the addition bypass.
//
// Origin: the formulas for df and sh (offset 56) are the document's; the signed
// widths and the saturation of sh are this design's choices.
module exp_handler
  import maf_pkg::*;
(
  input  logic [EXP_W-1:0]       ex, ey, ew,
  output logic signed [SE_W-1:0] ep,
  output logic signed [SE_W-1:0] df,
  output logic [SH_W-1:0]        sh
);
  logic signed [SE_W-1:0] sh_raw;

  always_comb begin
    ep     = $signed(SE_W'(ex)) + $signed(SE_W'(ey)) - $signed(SE_W'(BIAS));
    df     = $signed(SE_W'(ew)) - ep;
    sh_raw = $signed(SE_W'(SH_OFS)) - df;
    if (sh_raw < 0)
      sh = '0;
    else if (sh_raw > $signed(SE_W'(ALN_W + 1)))
      sh = SH_W'(ALN_W + 1);
    else
      sh = SH_W'(sh_raw);
  end
endmodule
