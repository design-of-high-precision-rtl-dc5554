// align_shifter: addend alignment shifter with sticky bit.
//
// Places the IN_W-bit significand m at the top of an FW-bit frame and shifts
// it right by sh. Bits that leave the frame at the bottom are ORed into
// sticky. For the multiply-add unit FW = 161 and the significand starts 56
// bits above the product's binary point, so sh = 56 - df lines the addend up
// with the product (Eq. 3); sh = FW or more moves it out completely. Purely
// combinational.
//
// Origin: the alignment shifter placed after the multiplier, its sticky bit and the
// 161-bit frame follow the document and the standard unit it starts from; the
// saturation of sh and the frame layout (sh = 0 puts the addend at the top) are
// this design's choices.
module align_shifter #(
  parameter int unsigned IN_W = 53,
  parameter int unsigned FW   = 161,
  parameter int unsigned SH_W = 8
) (
  input  logic [IN_W-1:0] m,
  input  logic [SH_W-1:0] sh,
  output logic [FW-1:0]   a,
  output logic            sticky
);
  // Wide enough that no bit of m is lost for any sh of SH_W bits.
  localparam int unsigned XW = FW + (1 << SH_W);

  logic [XW-1:0] e;

  always_comb begin
    e      = {m, {(XW-IN_W){1'b0}}} >> sh;
    a      = e[XW-1 -: FW];
    sticky = |e[XW-FW-1:0];
  end
endmodule
