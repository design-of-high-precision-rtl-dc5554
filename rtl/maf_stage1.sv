// maf_stage1: first stage of the multiply-add unit, exponent handling and
// multiplication.
//
// Unpacks the operands and handles the exponents (maf_prep, Eq. 2 and 3) in
// parallel with the 53 x 53 radix-8 Booth multiplication of the significands
// (booth8_multiplier), whose product is left in carry-save form. The outputs
// are gathered in the stage 1 -> stage 2 bundle; the enclosing pipeline
// registers it. Purely combinational.
//
// Origin: a first stage of unpacking, exponent handling and multiplication
// follows the document; the contents of the stage register are this design's.
module maf_stage1
  import maf_pkg::*;
(
  input  maf_op_e         op,
  input  logic [FP_W-1:0] x, y, w,
  output s12_t            s12
);
  logic [MAN_W-1:0] mx, my;

  maf_prep u_prep (
    .op(op), .x(x), .y(y), .w(w),
    .mx(mx), .my(my), .mw(s12.mw), .sp(s12.sp), .eff_sub(s12.eff_sub),
    .ep(s12.ep), .df(s12.df), .sh(s12.sh),
    .spec(s12.spec), .spec_res(s12.spec_res), .spec_inv(s12.spec_inv)
  );

  booth8_multiplier #(.N(MAN_W)) u_mul (
    .x(mx), .y(my), .sum(s12.psum), .carry(s12.pcarry)
  );
endmodule
