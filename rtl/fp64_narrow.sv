// fp64_narrow: binary64 -> binary32 narrowing of the results that the
// special-case logic fixes before any arithmetic (single-precision mode).
//
// Those results are a NaN, an infinity, a zero, or the addend W itself, which
// in single-precision mode is a widened binary32 value and so narrows
// exactly: the exponent is rebiased by -896 and the fraction's top 23 bits are
// kept. Every NaN becomes the binary32 quiet NaN 7FC00000. Rounded results
// do not pass through here; round_unit packs them directly. Purely
// combinational.
//
// Origin: this design's own helper for the single-precision mode; the document
// does not describe result packing.
module fp64_narrow (
  input  logic [63:0] a,
  output logic [31:0] y
);
  logic        s;
  logic [10:0] e;
  logic [51:0] f;
  logic [10:0] er;

  assign {s, e, f} = a;
  assign er = e - 11'd896;

  always_comb begin
    if (e == 11'h7FF)
      y = (f != '0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    else if (e == 11'd0)
      y = {s, 31'd0};
    else
      y = {s, er[7:0], f[51:29]};
  end
endmodule
