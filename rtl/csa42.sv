// csa42: word-wide 4:2 carry-save compressor.
//
// Reduces four W-bit addends to a sum and a carry word with
// a + b + c + d == s + cy (mod 2^W). It is built from two rows of full adders;
// the carries of the first row enter the second row one bit to the left, which
// is the usual 4:2 compressor with its horizontal cin/cout chain one bit long.
// No carry propagates across the word. Purely combinational.
//
// Origin: the document uses 4:2 compressors but does not give their insides;
// the two rows of full adders are this design's choice.
module csa42 #(
  parameter int unsigned W = 106
) (
  input  logic [W-1:0] a, b, c, d,
  output logic [W-1:0] s, cy
);
  logic [W-1:0] s1, c1;

  always_comb begin
    s1 = a ^ b ^ c;
    c1 = ((a & b) | (a & c) | (b & c)) << 1;
    s  = s1 ^ d ^ c1;
    cy = ((s1 & d) | (s1 & c1) | (d & c1)) << 1;
  end
endmodule
