// fp32_widen: exact binary32 -> binary64 widening at the input of the
// multiply-add unit in single-precision mode.
//
// A binary32 value is exactly representable in binary64: the sign is kept,
// the exponent is rebiased by 1023 - 127 = 896 and the 23-bit fraction is
// placed at the top of the 52-bit fraction. Infinities and NaNs keep the
// all-ones exponent and their fraction (a NaN stays quiet or signaling);
// subnormal binary32 inputs become zeros of the same sign, as subnormal
// binary64 inputs do in the unit. maf_top has one per operand and lane; the
// multiplexer that picks this or the binary64 operand of lane 0 is in
// maf_top. Purely combinational.
//
// Origin: the document runs binary32 operations on the binary64 unit under a
// precision control signal but does not say how; exact widening at the input is
// this design's choice.
module fp32_widen (
  input  logic [31:0] a,
  output logic [63:0] y
);
  logic       s;
  logic [7:0] e;
  logic [22:0] f;

  assign {s, e, f} = a;

  always_comb begin
    if (e == 8'd0)
      y = {s, 63'd0};
    else if (e == 8'hFF)
      y = {s, 11'h7FF, f, 29'd0};
    else
      y = {s, 11'({3'b000, e} + 11'd896), f, 29'd0};
  end
endmodule
