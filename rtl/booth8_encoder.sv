// booth8_encoder: radix-8 Booth recoding of one multiplier digit.
//
// The multiplier is scanned in overlapping groups of four bits
// {y[t+2], y[t+1], y[t], y[t-1]} with t = 0, 3, 6, ... . Each group is read as a
// signed digit in -4..+4, following the radix-8 recoding table:
//   digit = -4*y[t+2] + 2*y[t+1] + y[t] + y[t-1].
// The digit leaves as a sign (neg) and a one-hot magnitude select
// (one, two, three, four); all selects are low for a zero digit. Groups 0000
// and 1111 both give zero. Purely combinational.
//
// Origin: the recoding table is the document's radix-8 Booth table; the output
// form (sign plus one-hot magnitude) is this design's choice.
module booth8_encoder (
  input  logic [3:0] grp,    // {y[t+2], y[t+1], y[t], y[t-1]}
  output logic       neg,    // digit is negative
  output logic       one,    // |digit| == 1
  output logic       two,    // |digit| == 2
  output logic       three,  // |digit| == 3
  output logic       four    // |digit| == 4
);
  always_comb begin
    {neg, one, two, three, four} = 5'b0_0000;
    unique case (grp)
      4'b0000, 4'b1111: ;                              // 0X
      4'b0001, 4'b0010: one   = 1'b1;                  // +X
      4'b0011, 4'b0100: two   = 1'b1;                  // +2X
      4'b0101, 4'b0110: three = 1'b1;                  // +3X
      4'b0111:          four  = 1'b1;                  // +4X
      4'b1000:          {neg, four}  = 2'b11;          // -4X
      4'b1001, 4'b1010: {neg, three} = 2'b11;          // -3X
      4'b1011, 4'b1100: {neg, two}   = 2'b11;          // -2X
      4'b1101, 4'b1110: {neg, one}   = 2'b11;          // -X
    endcase
  end
endmodule
