// booth8_ppgen: radix-8 Booth partial product generator for one digit.
//
// Selects 0, X, 2X, 3X or 4X from the multiplicand by the one-hot select of
// booth8_encoder. 2X and 4X are wired shifts; the hard multiple 3X = 2X + X is
// computed once for all rows by the multiplier and passed in. A negative digit
// gives the one's complement of the selected multiple, and the +1 that
// completes the two's complement leaves on neg_out so that the CSA tree adds it
// instead of a carry-propagate adder here. The row is N+3 bits wide and signed:
// row + neg_out == digit * X. Purely combinational.
//
// Origin: the multiples 0, +-x, +-2x, +-3x, +-4x and the two's complement of
// negative rows follow the document; forming the complement as an inversion
// plus a separate +1 is this design's choice.
module booth8_ppgen #(
  parameter int unsigned N = 53          // multiplicand width
) (
  input  logic [N-1:0] x,                // multiplicand
  input  logic [N+1:0] x3,               // 3 * x
  input  logic         neg, one, two, three, four,
  output logic [N+2:0] row,              // signed row, one's complement if neg
  output logic         neg_out           // +1 to add at the row's LSB
);
  logic [N+2:0] mag;

  always_comb begin
    mag = '0;
    if (one)   mag = {3'b000, x};
    if (two)   mag = {2'b00, x, 1'b0};
    if (three) mag = {1'b0, x3};
    if (four)  mag = {1'b0, x, 2'b00};
    row     = neg ? ~mag : mag;
    neg_out = neg;
  end
endmodule
